// tb_ipp_matmul: end-to-end testbench of the matrix multiplier at its
// default parameters (N=4, B=8, two's complement, CSA tree, pipelined).
// It streams 40 products P = X * Y of random 4 x 4 matrices, plus corner
// matrices (all entries most negative; most negative times most positive;
// all -1), feeding the four rows of X on four consecutive cycles and
// sometimes leaving idle cycles between matrices. Every row of P is
// compared with the product computed here, each row must appear exactly
// 10 cycles after its operands, and back-to-back matrices must leave one
// every N = 4 cycles. It also counts, and requires at least once: negative
// results (two's complement correction), idle cycles between matrices,
// and back-to-back matrices.
module tb_ipp_matmul;
  import ipp_pkg::*;
  localparam int N = 4, B = 8, LAT = 10, NMAT = 40;
  localparam int W = 2 * B + 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         rst_n, in_valid, out_valid;
  logic [B-1:0] x_row [N];
  logic [B-1:0] y_cols [N][N];
  logic [W-1:0] p_row [N];

  ipp_matmul dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_row(x_row), .y_cols(y_cols),
    .out_valid(out_valid), .p_row(p_row)
  );

  int checks = 0, failures = 0;
  int negatives = 0, idles = 0, back_to_back = 0;
  int cyc = 0;

  typedef logic [N-1:0][W-1:0] row_t;   // one row of P, packed
  row_t exp_q [$];
  int   cyc_q [$];

  logic signed [B-1:0] xm [N][N], ym [N][N];

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Matrix m: corner cases first, random after.
  task automatic make_matrices(int m);
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        case (m)
          0: begin xm[r][c] = -128; ym[r][c] = -128; end
          1: begin xm[r][c] = -128; ym[r][c] = 127;  end
          2: begin xm[r][c] = -1;   ym[r][c] = -1;   end
          default: begin xm[r][c] = B'($urandom); ym[r][c] = B'($urandom); end
        endcase
      end
  endtask

  // Scoreboard: runs in every cycle, after the driver.
  int last_first_row_cyc = -1;
  int rows_out = 0;
  always @(negedge clk) begin
    #2;
    if (rst_n && out_valid) begin
      row_t e;
      int   c0;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL result row without operands");
      end else begin
        e  = exp_q.pop_front();
        c0 = cyc_q.pop_front();
        for (int c = 0; c < N; c++) begin
          checks++;
          if (p_row[c] != e[c]) begin
            failures++;
            $display("FAIL cycle %0d column %0d: got %h expected %h", cyc, c, p_row[c], e[c]);
          end
          if (p_row[c][W-1]) negatives++;
        end
        checks++;
        if (cyc - c0 != LAT) begin
          failures++;
          $display("FAIL latency %0d, expected %0d", cyc - c0, LAT);
        end
        if (rows_out % N == 0) begin
          // First row of a matrix: one every N cycles when matrices follow
          // each other without a gap.
          if (last_first_row_cyc >= 0 && cyc - last_first_row_cyc == N) back_to_back++;
          last_first_row_cyc = cyc;
        end
        rows_out++;
      end
    end
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0;
    for (int i = 0; i < N; i++) begin
      x_row[i] = '0;
      for (int j = 0; j < N; j++) y_cols[i][j] = '0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int m = 0; m < NMAT; m++) begin
      make_matrices(m);
      if (m > 3 && $urandom % 3 == 0) begin
        in_valid = 1'b0;
        @(negedge clk); cyc++;
        idles++;
      end
      for (int r = 0; r < N; r++) begin
        row_t e;
        in_valid = 1'b1;
        for (int c = 0; c < N; c++) begin
          logic signed [W-1:0] acc;
          x_row[c] = xm[r][c];
          for (int k = 0; k < N; k++) y_cols[c][k] = ym[k][c];
          acc = '0;
          for (int k = 0; k < N; k++) acc += W'(xm[r][k]) * W'(ym[k][c]);
          e[c] = acc;
        end
        exp_q.push_back(e);
        cyc_q.push_back(cyc);
        @(negedge clk); cyc++;
      end
    end
    in_valid = 1'b0;
    repeat (LAT + 2) begin @(negedge clk); cyc++; end
    checks++;
    if (exp_q.size() != 0 || rows_out != NMAT * N) begin
      failures++;
      $display("FAIL %0d rows still outstanding, %0d delivered", exp_q.size(), rows_out);
    end
    $display("mechanisms: negative results %0d, idle cycles %0d, back-to-back matrices %0d",
             negatives, idles, back_to_back);
    checks += 3;
    if (negatives == 0)     begin failures++; $display("FAIL no negative result"); end
    if (idles == 0)         begin failures++; $display("FAIL no idle cycle"); end
    if (back_to_back == 0)  begin failures++; $display("FAIL no back-to-back matrices"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
