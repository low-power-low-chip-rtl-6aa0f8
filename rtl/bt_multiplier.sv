// bt_multiplier: combinational binary-tree multiplier, signed error times
// unsigned coefficient.
//
// p = e * k, where e is an N1-bit two's complement sample and k an N2-bit
// unsigned numerator (0..255 at the defaults). Leaf j of the tree is the
// partial product e * k[j] (e or 0). Each tree node adds two neighbouring
// groups of partial products, A (lower bit positions) and B (upper ones,
// weight 2^h higher): A + B * 2^h. The h lowest bits of A pass straight to the
// result, so the node's multi-bit full adder only adds A >> h (its top bits
// filled with the sign of the error) to B. With 8 leaves the tree has three
// levels of adders, 4 x 9 bits, 2 x 10 bits and 1 x 12 bits, 68 one-bit full
// adders in all, and its delay grows with log2(N2) adder stages; no clock
// is involved. The product always fits in N1+N2 bits (-128*255 = -32640).
//
// The tree of multi-bit adders and the sign fill of the adders' top bits
// follow the design description. The exact adder widths per level are this
// design's own derivation (the narrowest that cannot overflow); they match
// the description's size of about 2300 transistors for the multiplier.
//
// Node n of the heap-ordered tree (root 1, leaves NLEAF..2*NLEAF-1) keeps its
// value sign-extended to the full tree width TW; each adder reads only the
// bits it needs.
module bt_multiplier #(
  parameter int unsigned N1 = 8,
  parameter int unsigned N2 = 8
) (
  input  logic [N1-1:0]    e,
  input  logic [N2-1:0]    k,
  output logic [N1+N2-1:0] p
);
  localparam int unsigned LEVELS = (N2 > 1) ? $clog2(N2) : 1;
  localparam int unsigned NLEAF  = 1 << LEVELS;
  localparam int unsigned TW     = N1 + NLEAF;   // widest node value

  logic [TW-1:0] node [1:2*NLEAF-1];

  // Leaves: partial products e * k[j], sign-extended.
  for (genvar j = 0; j < NLEAF; j++) begin : g_leaf
    if (j < N2) begin : g_pp
      assign node[NLEAF+j] = k[j] ? {{NLEAF{e[N1-1]}}, e} : '0;
    end else begin : g_pad
      assign node[NLEAF+j] = '0;
    end
  end

  // Adder levels, L = 1 just above the leaves, L = LEVELS at the root.
  for (genvar L = 1; L <= LEVELS; L++) begin : g_level
    localparam int unsigned H  = 1 << (L - 1);   // weight offset of B
    localparam int unsigned AW = N1 + H;         // adder width
    localparam int unsigned NW = N1 + 2 * H;     // width of this level's values

    for (genvar idx = 0; idx < (NLEAF >> L); idx++) begin : g_node
      localparam int unsigned N = (NLEAF >> L) + idx;
      logic [AW-1:0] upper;
      logic          unused_cout;

      mbfa #(.W(AW)) u_add (
        .a   (node[2*N][AW+H-1:H]),   // A >> H, top bits already the sign
        .b   (node[2*N+1][AW-1:0]),   // B
        .cin (1'b0),
        .s   (upper),
        .cout(unused_cout)
      );

      if (NW < TW) begin : g_ext
        assign node[N] = {{(TW-NW){upper[AW-1]}}, upper, node[2*N][H-1:0]};
      end else begin : g_full
        assign node[N] = {upper, node[2*N][H-1:0]};
      end
    end
  end

  assign p = node[1][N1+N2-1:0];
endmodule
