// clock_gen_2ph: two-phase, non-overlapping clock generator for the delay
// lines, derived from a master clock.
//
// One sample period lasts SAMPLE_CYCLES master cycles, counted by phase:
//   phase 0 .. SAMPLE_CYCLES-4 : ck1 high (computation of the new sample)
//   phase SAMPLE_CYCLES-3      : both low, y_valid high (output settled)
//   phase SAMPLE_CYCLES-2      : ck2 high (delay lines take the new values)
//   phase SAMPLE_CYCLES-1      : both low, sample_req high
// The next error sample must be applied at the master clock edge that ends a
// sample_req cycle, which is the edge that raises ck1. ck1 and ck2 come
// straight from flip-flops, so they are free of glitches, and an idle cycle
// separates them in both directions. While rst_n is low both phases are low
// and sample_req is held high, so the first sample is applied at the first
// clock edge after reset is released, the same edge that raises ck1.
//
// The design description asks only for a simple generator of two phases in
// which the second is much shorter than the first; the counter, the gaps and
// the default of 8 master cycles per sample are this design's choice.
module clock_gen_2ph #(
  parameter int unsigned SAMPLE_CYCLES = 8
) (
  input  logic clk,
  input  logic rst_n,
  output logic ck1,
  output logic ck2,
  output logic y_valid,
  output logic sample_req
);
  localparam int unsigned CW = $clog2(SAMPLE_CYCLES);
  localparam logic [CW-1:0] LAST = CW'(SAMPLE_CYCLES - 1);

  logic [CW-1:0] phase, phase_nxt;

  always_comb phase_nxt = (phase == LAST) ? '0 : phase + 1'b1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase      <= LAST;
      ck1        <= 1'b0;
      ck2        <= 1'b0;
      y_valid    <= 1'b0;
      sample_req <= 1'b1;
    end else begin
      phase      <= phase_nxt;
      ck1        <= (phase_nxt <= CW'(SAMPLE_CYCLES - 4));
      y_valid    <= (phase_nxt == CW'(SAMPLE_CYCLES - 3));
      ck2        <= (phase_nxt == CW'(SAMPLE_CYCLES - 2));
      sample_req <= (phase_nxt == LAST);
    end
  end

  initial begin
    assert (SAMPLE_CYCLES >= 5) else $fatal(1, "clock_gen_2ph: SAMPLE_CYCLES must be at least 5");
  end
endmodule
