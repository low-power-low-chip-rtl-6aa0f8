// p_channel: proportional channel, Y_P(n) = e(n) * E_P / D_P.
//
// A binary-tree multiplier forms the N1+N2 bit product e * k, and a shift
// block divides it by 2^j for the one-hot select bit d[j]. The output has
// N1+N2+NSH bits, the NSH low ones fractional, so no bit of the quotient is
// lost. Fully combinational: the output follows e, k and d after the
// multiplier and shift delays, with no clock involved. Structure as in the
// design description.
module p_channel #(
  parameter int unsigned N1  = 8,
  parameter int unsigned N2  = 8,
  parameter int unsigned NSH = 8
) (
  input  logic [N1-1:0]        e,
  input  logic [N2-1:0]        k,
  input  logic [NSH:0]         d,
  output logic [N1+N2+NSH-1:0] y
);
  logic [N1+N2-1:0] prod;

  bt_multiplier #(.N1(N1), .N2(N2)) u_mul (.e(e), .k(k), .p(prod));
  shift_block   #(.IW(N1+N2), .NSH(NSH)) u_shift (.i(prod), .d(d), .o(y));
endmodule
