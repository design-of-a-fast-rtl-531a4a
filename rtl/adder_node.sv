// adder_node: four-input, two-output adder node of the carry-save tree.
//
// A node replaces a pair of sibling two-input adders of a binary adder tree
// by two carry-save adders in series: the first CSA adds U, V and W, the
// second adds its sum and carry to Z. The node therefore keeps the binary
// tree shape while postponing every carry propagation to the final adder.
//
// Inputs come from two child nodes (or, at the leaves, four partial-product
// rows): U = left S, V = left C, W = right S, Z = right C. Each input is
// given without its forced low zeros; the parameters place it:
//   U : W_S bits at offset 0          V : W_C bits at offset O_C
//   W : W_S bits at offset SH         Z : W_C bits at offset SH + O_C
// SH is the wired left shift of the right child (0 inside a subtree of equal
// alignment, 1, 2, 4, ... above it). The outputs are S (WS_O bits at offset
// 0) and C (WC_O bits at offset OC_O), with S + C == U + V + W + Z exactly.
// The output widths come from the occupancy analysis in ipp_pkg, so only
// bit positions that can ever be non-zero are carried; an assertion checks
// that nothing is lost.
//
// Timing: with PIPE=0 the node is combinational (two full-adder delays).
// With PIPE=1 a register follows each CSA (Z is delayed alongside the first
// one), so the node has a latency of two clock cycles and accepts new
// operands every cycle. The data registers are not reset; validity is
// tracked by the enclosing processor. Lint notes that stand: clk is unused
// when PIPE=0, and the top bits of the first CSA's sum span are unused
// because the analysis proves them zero.
module adder_node
  import ipp_pkg::*;
#(
  parameter int unsigned W_S  = 8,
  parameter int unsigned O_C  = 0,
  parameter int unsigned W_C  = 8,
  parameter int unsigned SH   = 0,
  parameter bit          PIPE = 1'b0,
  // Derived from the above.
  localparam mask_t      M_U  = ones(W_S),
  localparam mask_t      M_V  = ones(W_C) << O_C,
  localparam mask_t      M_S  = csa_sum_mask(csa_sum_mask(M_U, M_V, M_U << SH),
                                             csa_carry_mask(M_U, M_V, M_U << SH), M_V << SH),
  localparam mask_t      M_C  = csa_carry_mask(csa_sum_mask(M_U, M_V, M_U << SH),
                                               csa_carry_mask(M_U, M_V, M_U << SH), M_V << SH),
  localparam int unsigned WS_O = mask_hi(M_S),
  localparam int unsigned OC_O = mask_lo(M_C),
  localparam int unsigned WC_O = mask_hi(M_C) - mask_lo(M_C)
) (
  input  logic            clk,
  input  logic [W_S-1:0]  u,
  input  logic [W_C-1:0]  v,
  input  logic [W_S-1:0]  w,
  input  logic [W_C-1:0]  z,
  output logic [WS_O-1:0] s,
  output logic [WC_O-1:0] c
);
  // First-CSA output masks, and a span that holds every intermediate bit.
  localparam mask_t       M_TS  = csa_sum_mask(M_U, M_V, M_U << SH);
  localparam mask_t       M_TC  = csa_carry_mask(M_U, M_V, M_U << SH);
  localparam int unsigned SPAN  = mask_hi((M_U | M_V) << SH) + 2;
  localparam int unsigned TS_W  = mask_hi(M_TS);
  localparam int unsigned TC_LO = mask_lo(M_TC);
  localparam int unsigned TC_W  = mask_hi(M_TC) - TC_LO;

  logic [SPAN-1:0] ue, ve, we;
  logic [SPAN-1:0] t_sum, t_cy;           // first CSA
  logic [TS_W-1:0] ts_d, ts_q;
  logic [TC_W-1:0] tc_d, tc_q;
  logic [W_C-1:0]  z_q;
  logic [SPAN-1:0] x2, y2, z2;
  logic [SPAN-1:0] s_full, c_cy, c_full;  // second CSA
  logic [WS_O-1:0] s_d;
  logic [WC_O-1:0] c_d;

  always_comb begin
    ue = SPAN'(u);
    ve = SPAN'(v) << O_C;
    we = SPAN'(w) << SH;
  end

  csa #(.W(SPAN)) u_csa1 (.x(ue), .y(ve), .z(we), .sum(t_sum), .carry(t_cy));

  always_comb begin
    ts_d = t_sum[TS_W-1:0];
    tc_d = TC_W'({t_cy, 1'b0} >> TC_LO);
  end

  if (PIPE) begin : g_pipe1
    always_ff @(posedge clk) begin
      ts_q <= ts_d;
      tc_q <= tc_d;
      z_q  <= z;
    end
  end else begin : g_comb1
    always_comb begin
      ts_q = ts_d;
      tc_q = tc_d;
      z_q  = z;
    end
  end

  always_comb begin
    x2 = SPAN'(ts_q);
    y2 = SPAN'(tc_q) << TC_LO;
    z2 = SPAN'(z_q) << (SH + O_C);
  end

  csa #(.W(SPAN)) u_csa2 (.x(x2), .y(y2), .z(z2), .sum(s_full), .carry(c_cy));

  always_comb begin
    c_full = {c_cy[SPAN-2:0], 1'b0};
    s_d    = s_full[WS_O-1:0];
    c_d    = WC_O'(c_full >> OC_O);
  end

  // The width analysis must never drop a bit that can be set.
  always_comb begin
    assert ((s_full >> WS_O) == '0 && (c_full >> (OC_O + WC_O)) == '0 &&
            (c_full & SPAN'(ones(OC_O))) == '0 && c_cy[SPAN-1] == 1'b0)
      else $error("adder_node: bits outside the analysed data path widths");
  end

  if (PIPE) begin : g_pipe2
    always_ff @(posedge clk) begin
      s <= s_d;
      c <= c_d;
    end
  end else begin : g_comb2
    always_comb begin
      s = s_d;
      c = c_d;
    end
  end
endmodule
