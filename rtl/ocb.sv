// ocb: overflow control block of the I channel.
//
// Takes the wrapped W-bit sum of two two's complement addends and the signs
// of those addends. An overflow happened when both addends have the same
// sign and the sum's sign differs; the output is then clamped to the largest
// (0x7FFF) or smallest (0x8000) W-bit value, in the direction of the addends'
// sign, and ovf is high. Otherwise the sum passes unchanged. Combinational.
//
// The design description only states that this block prevents the overflow
// of the accumulator; saturation is this design's choice of how.
module ocb #(
  parameter int unsigned W = 16
) (
  input  logic         a_sign,
  input  logic         b_sign,
  input  logic [W-1:0] sum,
  output logic [W-1:0] y,
  output logic         ovf
);
  always_comb begin
    ovf = (a_sign == b_sign) && (sum[W-1] != a_sign);
    if (!ovf)        y = sum;
    else if (a_sign) y = {1'b1, {(W-1){1'b0}}};   // most negative
    else             y = {1'b0, {(W-1){1'b1}}};   // most positive
  end
endmodule
