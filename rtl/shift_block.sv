// shift_block: the dividing block, division of a signed IW-bit value by 2^k
// (k = 0..NSH) without losing any bit.
//
// The input is placed into an IW+NSH bit output word whose NSH low bits are
// fractional. With d[0] set the input takes the top bits (o[23:8] = i[15:0]
// at the defaults, division by 1); with d[8] set it takes the bottom bits
// (o[15:0] = i[15:0], division by 256). Output bits below the placed input
// are 0, bits above it copy the input's sign bit. Read as a plain integer,
// the output is i * 2^(NSH-k).
//
// This follows the switch field of the design description, where one
// transmission gate per output and shift setting connects an input bit. Here
// the switch field is an AND-OR selection over the one-hot select d: if no d
// bit is set the output is 0. d is expected to be one-hot (asserted).
// Combinational.
module shift_block #(
  parameter int unsigned IW  = 16,
  parameter int unsigned NSH = 8
) (
  input  logic [IW-1:0]     i,
  input  logic [NSH:0]      d,
  output logic [IW+NSH-1:0] o
);
  localparam int unsigned OW = IW + NSH;

  always_comb begin
    logic [OW-1:0] placed;
    o = '0;
    for (int unsigned k = 0; k <= NSH; k++) begin
      // sign-extend to OW bits, then move up by NSH-k positions
      placed = {{NSH{i[IW-1]}}, i} << (NSH - k);
      o |= placed & {OW{d[k]}};
    end
  end

  always_comb begin
    if (d != '0) assert ($onehot(d)) else $error("shift_block: select d=%b is not one-hot", d);
  end
endmodule
