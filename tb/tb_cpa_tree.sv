// tb_cpa_tree: self-checking testbench for cpa_tree.
// Main instance: N=4, B=8, pipelined (5 levels, latency 5 cycles, result 18
// bits wide; level widths 9, 10, 12, 14, 18). Random and all-ones rows enter every cycle and the output
// five edges later must equal the sum of rows[j*N + i] << j. A combinational
// N=1, B=4 instance checks a tree whose first adders already combine
// different alignments.
module tb_cpa_tree;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0]  rows [32];
  logic [17:0] sum;
  cpa_tree #(.N(4), .B(8), .PIPE(1'b1)) dut (.clk(clk), .rows(rows), .sum(sum));

  logic [3:0] r1 [4];
  logic [dut1.WR-1:0] sum1;
  cpa_tree #(.N(1), .B(4), .PIPE(1'b0)) dut1 (.clk(clk), .rows(r1), .sum(sum1));

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint exp_q[$];
  longint e1;

  initial begin
    expect_eq("result width", dut.WR, 18);
    expect_eq("N1 result width", dut1.WR, 8);
    // Path widths per level for N=4, B=8: 9, 10, 12, 14, 18.
    for (int m = 1; m <= 5; m++)
      expect_eq($sformatf("level %0d width", m), ipp_pkg::mask_hi(ipp_pkg::cpa_tree_max(4, 8, m)),
                (m == 1) ? 9 : (m == 2) ? 10 : (m == 3) ? 12 : (m == 4) ? 14 : 18);
    repeat (300) begin
      e1 = 0;
      for (int r = 0; r < 4; r++) begin r1[r] = 4'($urandom); e1 += longint'(r1[r]) << r; end
      #1;
      expect_eq("N1 sum", longint'(sum1), e1);
    end
    @(negedge clk);
    for (int t = 0; t < 204; t++) begin
      if (t < 200) begin
        longint e;
        e = 0;
        for (int r = 0; r < 32; r++) begin
          rows[r] = (t == 1) ? 8'hFF : 8'($urandom);
          e += longint'(rows[r]) << (r / 4);
        end
        exp_q.push_back(e);
      end
      @(posedge clk);
      #1;
      if (t >= 4) expect_eq("N4 B8 sum", longint'(sum), exp_q.pop_front());
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
