// ipp_matmul: matrix multiplier built from N inner product processors.
//
// N tree processors work in parallel, one per column of the product
// P = X * Y of two N x N matrices. In every clock cycle the array takes one
// row of X (x_row) and all of Y, given column by column (y_cols[c][k] =
// Y[k][c]); processor c computes the inner product of the row with column
// c. After the processors' latency the whole row of P leaves at once
// (p_row[c] = P[r][c]). Streaming the N rows of X on N consecutive cycles
// therefore produces P row by row at one row per cycle, i.e. one full
// N x N product every N cycles, with the latency of a single inner product
// (10 cycles for N=4, B=8 with the default settings). Each processor is fed
// its own 2N operands per cycle, 2N^2 in all; no operand is stored here.
// Orientation (rows of X in, rows of P out), the port layout and the valid
// handshake are this design's choices. Parameters are passed to every
// inner_product_processor; see there for TWOS_COMP, TREE and PIPE.
module ipp_matmul
  import ipp_pkg::*;
#(
  parameter int unsigned N         = 4,
  parameter int unsigned B         = 8,
  parameter bit          TWOS_COMP = 1'b1,
  parameter tree_e       TREE      = TREE_CSA,
  parameter bit          PIPE      = 1'b1,
  localparam int unsigned W_RES    = result_width(N, B)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [B-1:0]     x_row  [N],
  input  logic [B-1:0]     y_cols [N][N],
  output logic             out_valid,
  output logic [W_RES-1:0] p_row  [N]
);
  logic [N-1:0] valid;

  for (genvar c = 0; c < N; c++) begin : g_col
    inner_product_processor #(
      .N(N), .B(B), .TWOS_COMP(TWOS_COMP), .TREE(TREE), .PIPE(PIPE)
    ) u_ipp (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid),
      .a(x_row), .d(y_cols[c]),
      .out_valid(valid[c]), .result(p_row[c])
    );
  end

  // All processors run in lockstep, so their valid outputs agree.
  assign out_valid = &valid;
endmodule
