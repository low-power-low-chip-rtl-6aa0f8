// delay_line: W-bit one-sample delay built from two transparent latches in
// series, clocked by the two non-overlapping phases ck1 and ck2.
//
// During ck1 the first latch follows d (the value computed for the current
// sample) while the second holds the previous sample, so q = value of sample
// n-1 throughout the computation. During ck2 the first latch holds and the
// second takes its value, so q becomes the value of sample n, ready to be the
// "previous" value when the next ck1 starts. ck1 and ck2 must never be high
// together. rst_n clears both latches asynchronously.
//
// The two-switch, two-inverter structure per bit (storage on the inverters'
// input capacitance, ck1 switch at the input, ck2 switch at the output)
// follows the design description; here each storage node is a level-sensitive
// latch, and the two inversions cancel. The reset is this design's addition.
// The latches are intended: they are the storage the design is built on.
module delay_line #(
  parameter int unsigned W = 16
) (
  input  logic         rst_n,
  input  logic         ck1,
  input  logic         ck2,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  logic [W-1:0] stage1;

  always_latch begin
    if (!rst_n)   stage1 = '0;
    else if (ck1) stage1 = d;
  end

  always_latch begin
    if (!rst_n)   q = '0;
    else if (ck2) q = stage1;
  end

  always_comb begin
    assert (!(ck1 && ck2)) else $error("delay_line: clock phases overlap");
  end
endmodule
