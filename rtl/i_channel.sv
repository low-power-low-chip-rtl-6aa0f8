// i_channel: integral channel, Y_I(n) = Y_I(n-1) + E_I * e(n) / D_I.
//
// The product E_I * e(n) from a binary-tree multiplier is added by a
// multi-bit full adder to the running sum held in a delay line. The overflow
// control block clamps that sum to the signed N1+N2 bit range; its output
// feeds both the delay line (closing the accumulator loop) and the shift
// block that divides by D_I. The running sum is therefore kept undivided and
// the division is applied to the whole sum, so no fraction is lost between
// samples. ovf is high while the clamp is active.
//
// Timing: during ck1 the output settles to the new running sum for the
// current sample and the delay line's first latch follows it; ck2 moves it to
// the second latch, so the adder's input changes and the output is only
// valid until ck2 rises. rst_n clears the running sum. Structure as in the
// design description; saturation as the overflow rule is this design's
// choice.
//
// Tools that treat latches as transparent report the path adder -> overflow
// block -> delay line -> adder as a combinational loop. It stands on
// purpose: the first latch is open only during ck1 and the second only during
// ck2, so the loop is never closed.
module i_channel #(
  parameter int unsigned N1  = 8,
  parameter int unsigned N2  = 8,
  parameter int unsigned NSH = 8
) (
  input  logic                 rst_n,
  input  logic                 ck1,
  input  logic                 ck2,
  input  logic [N1-1:0]        e,
  input  logic [N2-1:0]        k,
  input  logic [NSH:0]         d,
  output logic [N1+N2+NSH-1:0] y,
  output logic                 ovf
);
  localparam int unsigned PW = N1 + N2;

  logic [PW-1:0] prod, acc_prev, sum, acc;
  logic          unused_cout;

  bt_multiplier #(.N1(N1), .N2(N2)) u_mul (.e(e), .k(k), .p(prod));

  mbfa #(.W(PW)) u_add (
    .a(prod), .b(acc_prev), .cin(1'b0), .s(sum), .cout(unused_cout)
  );

  ocb #(.W(PW)) u_ocb (
    .a_sign(prod[PW-1]), .b_sign(acc_prev[PW-1]), .sum(sum), .y(acc), .ovf(ovf)
  );

  delay_line #(.W(PW)) u_dly (
    .rst_n(rst_n), .ck1(ck1), .ck2(ck2), .d(acc), .q(acc_prev)
  );

  shift_block #(.IW(PW), .NSH(NSH)) u_shift (.i(acc), .d(d), .o(y));
endmodule
