// cpa_tree: regrouped ("type II") tree of carry-propagate adders.
//
// The carry-propagate form of the summation tree. It adds the N*B
// partial-product rows of pp_gen (rows[j*N + i], weight 2^j, B bits without
// the j forced low zeros) in a binary tree of two-input adders with
// log2(N*B) levels. At level m an adder adds two results that each cover
// 2^(m-1) rows; the right one is shifted left by 0 while both lie in one
// group of equal alignment and by 2^(m-1)/N bits above that (wiring only).
// Each path is exactly as wide as the largest value it can carry, so for
// N=4, B=8 the widths grow 8 -> 9 -> 10 -> 12 -> 14 -> 18: slowly at first,
// because equal alignments are combined first. Each adder is a plain
// carry-propagate adder ('+'); the low SH bits of the shifted operand are
// zero, so they pass straight through.
//
// Output: the exact sum of the rows at their true weights, WR bits.
// Timing: PIPE=0 is combinational; PIPE=1 registers every level, for a
// latency of log2(N*B) cycles at one set of rows per cycle.
module cpa_tree
  import ipp_pkg::*;
#(
  parameter int unsigned N    = 4,
  parameter int unsigned B    = 8,
  parameter bit          PIPE = 1'b1,
  localparam int unsigned L   = $clog2(N * B),
  localparam int unsigned WR  = mask_hi(cpa_tree_max(N, B, L))
) (
  input  logic          clk,
  input  logic [B-1:0]  rows [N*B],
  output logic [WR-1:0] sum
);
  if (N * B < 2 || (1 << $clog2(N)) != N || (1 << $clog2(B)) != B) begin : g_bad
    $error("cpa_tree: N and B must be powers of two with N*B >= 2");
  end

  for (genvar m = 1; m <= L; m++) begin : g_lvl
    localparam int unsigned ADDERS = (N * B) >> m;
    localparam int unsigned WI     = mask_hi(cpa_tree_max(N, B, m - 1));
    localparam int unsigned WO     = mask_hi(cpa_tree_max(N, B, m));
    localparam int unsigned SH     = sib_shift(N, 1 << (m - 1));

    logic [WO-1:0] r [ADDERS];

    for (genvar k = 0; k < ADDERS; k++) begin : g_add
      logic [WI-1:0] x, y;
      logic [WO-1:0] r_d;
      if (m == 1) begin : g_leaf
        assign x = rows[2*k];
        assign y = rows[2*k + 1];
      end else begin : g_inner
        assign x = g_lvl[m-1].r[2*k];
        assign y = g_lvl[m-1].r[2*k + 1];
      end
      assign r_d = WO'(x) + (WO'(y) << SH);
      if (PIPE) begin : g_reg
        always_ff @(posedge clk) r[k] <= r_d;
      end else begin : g_wire
        assign r[k] = r_d;
      end
    end
  end

  assign sum = g_lvl[L].r[0];
endmodule
