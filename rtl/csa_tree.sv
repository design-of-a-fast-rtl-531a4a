// csa_tree: regrouped ("type II") carry-save summation tree.
//
// Sums the N*B partial-product rows delivered by pp_gen in alignment order
// (rows[j*N + i] has true weight 2^j and is given without its j low zeros).
// The tree is binary in four-input adder nodes (adder_node, two CSAs each):
// level 1 has N*B/4 nodes that each take four rows, every higher level
// halves the node count, and the root is at level L = log2(N*B) - 1. A node
// at level m adds the (S, C) pairs of its two children; the right child
// covers the next 2^m rows, so it is shifted left by 0 while both children
// lie in one group of equal alignment, and by 2^m / N bits above that
// (1, 2, 4, ... : the shift doubles at each level). The shifts are wiring
// only. Because rows of equal alignment are summed first, the paths stay
// narrow near the leaves, and the final carry word has a large forced
// alignment (2*log2 B for N >= 4), which shortens the carry chain of the
// final adder.
//
// Outputs: the root's sum word s (WS bits at weight 2^0) and carry word c
// (WC bits, least significant bit at weight 2^OC). s + (c << OC) equals the
// sum of all rows at their true weights. For N=4, B=8: WS=17, OC=6, WC=12.
//
// Timing: PIPE=0 is fully combinational. PIPE=1 puts a register after every
// CSA, giving a latency of 2*L clock cycles (8 for N=4, B=8) at one new set
// of rows per cycle. Data registers are not reset.
module csa_tree
  import ipp_pkg::*;
#(
  parameter int unsigned N    = 4,
  parameter int unsigned B    = 8,
  parameter bit          PIPE = 1'b1,
  localparam int unsigned L   = $clog2(N * B) - 1,
  localparam int unsigned WS  = mask_hi(csa_tree_mask(N, B, L, 1'b0)),
  localparam int unsigned OC  = mask_lo(csa_tree_mask(N, B, L, 1'b1)),
  localparam int unsigned WC  = mask_hi(csa_tree_mask(N, B, L, 1'b1)) - OC
) (
  input  logic          clk,
  input  logic [B-1:0]  rows [N*B],
  output logic [WS-1:0] s,
  output logic [WC-1:0] c
);
  if (N * B < 4 || (1 << $clog2(N)) != N || (1 << $clog2(B)) != B) begin : g_bad
    $error("csa_tree: N and B must be powers of two with N*B >= 4");
  end

  for (genvar m = 1; m <= L; m++) begin : g_lvl
    // Shape of this level's inputs (the children's outputs) and outputs.
    localparam int unsigned NODES = (N * B) >> (m + 1);
    localparam int unsigned CW_S  = mask_hi(csa_tree_mask(N, B, m - 1, 1'b0));
    localparam int unsigned CO_C  = mask_lo(csa_tree_mask(N, B, m - 1, 1'b1));
    localparam int unsigned CW_C  = mask_hi(csa_tree_mask(N, B, m - 1, 1'b1)) - CO_C;
    localparam int unsigned W_S   = mask_hi(csa_tree_mask(N, B, m, 1'b0));
    localparam int unsigned W_C   = mask_hi(csa_tree_mask(N, B, m, 1'b1)) -
                                    mask_lo(csa_tree_mask(N, B, m, 1'b1));
    localparam int unsigned SH    = sib_shift(N, 1 << m);

    logic [W_S-1:0] s_n [NODES];
    logic [W_C-1:0] c_n [NODES];

    for (genvar k = 0; k < NODES; k++) begin : g_node
      logic [CW_S-1:0] u, w;
      logic [CW_C-1:0] v, z;
      if (m == 1) begin : g_leaf
        assign u = rows[4*k];
        assign v = rows[4*k + 1];
        assign w = rows[4*k + 2];
        assign z = rows[4*k + 3];
      end else begin : g_inner
        assign u = g_lvl[m-1].s_n[2*k];
        assign v = g_lvl[m-1].c_n[2*k];
        assign w = g_lvl[m-1].s_n[2*k + 1];
        assign z = g_lvl[m-1].c_n[2*k + 1];
      end
      adder_node #(
        .W_S(CW_S), .O_C(CO_C), .W_C(CW_C), .SH(SH), .PIPE(PIPE)
      ) u_node (
        .clk(clk), .u(u), .v(v), .w(w), .z(z), .s(s_n[k]), .c(c_n[k])
      );
    end
  end

  assign s = g_lvl[L].s_n[0];
  assign c = g_lvl[L].c_n[0];
endmodule
