// mbfa: multi-bit full adder, a ripple chain of W one-bit full adders.
//
// s = a + b + cin (mod 2^W), cout is the carry out of the top bit. Setting cin
// to 1 and inverting b turns it into the subtractor a - b used by the D
// channel. Combinational; the result settles after the carry has rippled
// through W cells. Building all sums and differences from such chains follows
// the design description; the ripple carry is this design's own choice.
// In the integral channel this adder lies on the accumulator loop, which lint
// tools report as combinational; the loop is broken by the two latches of the
// delay line, which are never transparent at the same time.
module mbfa #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = cin;
  assign cout = c[W];

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .s(s[i]), .cout(c[i+1]));
  end
endmodule
