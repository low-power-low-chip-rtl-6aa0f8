// d_channel: derivative channel, Y_D(n) = (e(n) - e(n-1)) * E_D / D_D.
//
// The product E_D * e(n) from a binary-tree multiplier is stored in a delay
// line; the stored product of the previous sample is inverted and added to
// the new product with carry-in 1 (two's complement subtraction in one
// multi-bit full adder). The difference goes through a shift block as in the
// P channel. During ck1 the output settles to the value for the current
// sample; ck2 then moves the current product into the second latch of the
// delay line (the output changes then, so it is read before ck2). rst_n
// clears the stored product, so the first sample is differenced against 0.
//
// Structure as in the design description, including the N1+N2 bit width of
// the subtractor: a difference outside the signed N1+N2 bit range (possible
// only for steps of e with |E_D * (e(n) - e(n-1))| > 32767 at the defaults)
// wraps around, since no overflow block is provided in this channel.
module d_channel #(
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
  output logic [N1+N2+NSH-1:0] y
);
  localparam int unsigned PW = N1 + N2;

  logic [PW-1:0] prod, prod_prev, diff;
  logic          unused_cout;

  bt_multiplier #(.N1(N1), .N2(N2)) u_mul (.e(e), .k(k), .p(prod));

  delay_line #(.W(PW)) u_dly (
    .rst_n(rst_n), .ck1(ck1), .ck2(ck2), .d(prod), .q(prod_prev)
  );

  mbfa #(.W(PW)) u_sub (
    .a(prod), .b(~prod_prev), .cin(1'b1), .s(diff), .cout(unused_cout)
  );

  shift_block #(.IW(PW), .NSH(NSH)) u_shift (.i(diff), .d(d), .o(y));
endmodule
