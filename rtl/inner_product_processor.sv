// inner_product_processor: fast N-element, B-bit inner product a . d.
//
// The multipliers of a multiply/add tree are opened up into their partial
// products, and all N*B partial-product rows are summed by one tree. The
// rows are first regrouped by minimum alignment (pp_gen): the N rows of
// equal weight 2^j are summed together first, and subtrees of different
// alignment are combined afterwards through wired shifts. This gives a
// latency of O(log N + log B) adder levels and keeps the data paths narrow
// near the leaves.
//
//   pp_gen -> csa_tree (S, C) -> cla (final add) -> cla (+ constant) -> result
//             or cpa_tree --------------------------^
//
// TREE = TREE_CSA (default): log2(N*B)-1 levels of four-input adder nodes
// (two carry-save adders each) and one carry-lookahead adder. The tree's
// carry word has its lowest OC bits forced to zero (OC = 2*log2 B, 6 for
// N=4, B=8), so those bits of the result are just the sum word and the
// lookahead adder spans only the upper W_RES-OC bits (12 instead of 17).
// TREE = TREE_CPA: log2(N*B) levels of carry-propagate adders.
//
// TWOS_COMP = 1 (default): operands and result are two's complement. The
// rows use the Baugh-Wooley intermediate form (some AND gates become NAND)
// and a second adder stage adds the constant N*(2^(2B-1) + 2^B) modulo
// 2^W_RES. TWOS_COMP = 0: unsigned operands, no constant stage.
//
// Interface: a new vector pair is accepted on every clock edge where
// in_valid is high; result (W_RES = 2B + log2 N bits, signed when
// TWOS_COMP) appears LATENCY cycles later with out_valid high. No stalls:
// the pipeline advances every cycle. rst_n (active low, synchronous) clears
// only the valid pipeline.
// LATENCY with PIPE=1: CSA tree 2*(log2(N*B)-1) + 1 (final adder) + TWOS_COMP,
// i.e. 10 for N=4, B=8; CPA tree log2(N*B) + TWOS_COMP. With PIPE=0 the
// datapath is combinational from a/d to result and LATENCY is 0.
// The pipeline register placement (after every CSA and after each final
// adder) and the valid/reset handshake are this design's choices.
module inner_product_processor
  import ipp_pkg::*;
#(
  parameter int unsigned N         = 4,
  parameter int unsigned B         = 8,
  parameter bit          TWOS_COMP = 1'b1,
  parameter tree_e       TREE      = TREE_CSA,
  parameter bit          PIPE      = 1'b1,
  localparam int unsigned W_RES    = result_width(N, B),
  localparam int unsigned LATENCY  = !PIPE ? 0 :
                                     (TREE == TREE_CSA) ? 2 * ($clog2(N * B) - 1) + 1 + TWOS_COMP
                                                        : $clog2(N * B) + TWOS_COMP
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [B-1:0]     a [N],
  input  logic [B-1:0]     d [N],
  output logic             out_valid,
  output logic [W_RES-1:0] result
);
  logic [B-1:0]     rows [N*B];
  logic [W_RES-1:0] raw;          // sum of all rows, modulo 2^W_RES

  pp_gen #(.N(N), .B(B), .TWOS_COMP(TWOS_COMP)) u_pp (.a(a), .d(d), .rows(rows));

  if (TREE == TREE_CSA) begin : g_csa
    localparam int unsigned L   = $clog2(N * B) - 1;
    localparam int unsigned WS  = mask_hi(csa_tree_mask(N, B, L, 1'b0));
    localparam int unsigned OC  = mask_lo(csa_tree_mask(N, B, L, 1'b1));
    localparam int unsigned WC  = mask_hi(csa_tree_mask(N, B, L, 1'b1)) - OC;
    localparam int unsigned WHI = W_RES - OC;   // carry chain of the final adder

    logic [WS-1:0]    s;
    logic [WC-1:0]    c;
    logic [W_RES-1:0] s_ext;
    logic [WHI-1:0]   c_ext, hi;
    logic [W_RES-1:0] fin_d;
    logic             unused_cout;

    csa_tree #(.N(N), .B(B), .PIPE(PIPE)) u_tree (.clk(clk), .rows(rows), .s(s), .c(c));

    // Final carry-propagate stage. Below bit OC the carry word is zero, so
    // the sum word passes through; the lookahead adder covers bits OC up.
    always_comb begin
      s_ext = W_RES'(s);
      c_ext = WHI'(c);
    end
    cla #(.W(WHI)) u_final (
      .a(s_ext[W_RES-1:OC]), .b(c_ext), .cin(1'b0), .sum(hi), .cout(unused_cout)
    );
    if (OC > 0) begin : g_low
      assign fin_d = {hi, s_ext[OC-1:0]};
    end else begin : g_nolow
      assign fin_d = hi;
    end

    if (PIPE) begin : g_reg
      always_ff @(posedge clk) raw <= fin_d;
    end else begin : g_wire
      assign raw = fin_d;
    end
  end else begin : g_cpa
    localparam int unsigned WR = mask_hi(cpa_tree_max(N, B, $clog2(N * B)));
    logic [WR-1:0] sum;
    cpa_tree #(.N(N), .B(B), .PIPE(PIPE)) u_tree (.clk(clk), .rows(rows), .sum(sum));
    assign raw = W_RES'(sum);
  end

  // Two's complement correction: add the constant ones of the Baugh-Wooley
  // rows in one more carry-lookahead stage.
  if (TWOS_COMP) begin : g_tc
    localparam logic [W_RES-1:0] ALPHA = W_RES'(tc_constant(N, B));
    logic [W_RES-1:0] corr_d;
    logic             unused_cout;
    cla #(.W(W_RES)) u_const (
      .a(raw), .b(ALPHA), .cin(1'b0), .sum(corr_d), .cout(unused_cout)
    );
    if (PIPE) begin : g_reg
      always_ff @(posedge clk) result <= corr_d;
    end else begin : g_wire
      assign result = corr_d;
    end
  end else begin : g_us
    assign result = raw;
  end

  // Valid pipeline, matched to the datapath latency.
  if (LATENCY == 0) begin : g_v0
    assign out_valid = in_valid;
  end else begin : g_vn
    logic [LATENCY-1:0] vpipe;
    always_ff @(posedge clk) begin
      if (!rst_n) vpipe <= '0;
      else        vpipe <= LATENCY'({vpipe, in_valid});
    end
    assign out_valid = vpipe[LATENCY-1];
  end
endmodule
