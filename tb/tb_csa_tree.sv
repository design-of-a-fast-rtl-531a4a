// tb_csa_tree: self-checking testbench for csa_tree.
// Main instance: N=4, B=8, pipelined. Random rows (and all-ones rows) enter
// on every clock edge; 2*L = 8 edges later s + (c << 6) must equal the sum
// of rows[j*N + i] << j. The root path widths must be S 17 bits and C 12
// bits at offset 6 (the final carry word's forced alignment, 2*log2 B), and
// the widths of every level must be 9/8@1, 10/8@3, 13/9@4, 17/12@6.
// Two small combinational instances (N=1, B=4 and N=2, B=4) cover trees
// whose leaves already mix alignments, and N=8, B=4 covers deeper subtrees.
// The final addition must really need its carry chain at least once: the
// count of results where the carry word overlaps set bits of the sum word
// above offset 6 must not be zero.
module tb_csa_tree;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0]  rows [32];
  logic [16:0] s;
  logic [11:0] c;
  csa_tree #(.N(4), .B(8), .PIPE(1'b1)) dut (.clk(clk), .rows(rows), .s(s), .c(c));

  logic [3:0] r1 [4];
  logic [3:0] r2 [8];
  logic [3:0] r8 [32];
  logic [dut1.WS-1:0] s1;
  logic [dut1.WC-1:0] c1;
  logic [dut2.WS-1:0] s2;
  logic [dut2.WC-1:0] c2;
  logic [dut8.WS-1:0] s8;
  logic [dut8.WC-1:0] c8;
  csa_tree #(.N(1), .B(4), .PIPE(1'b0)) dut1 (.clk(clk), .rows(r1), .s(s1), .c(c1));
  csa_tree #(.N(2), .B(4), .PIPE(1'b0)) dut2 (.clk(clk), .rows(r2), .s(s2), .c(c2));
  csa_tree #(.N(8), .B(4), .PIPE(1'b0)) dut8 (.clk(clk), .rows(r8), .s(s8), .c(c8));

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
  longint e1, e2, e8;
  int carries = 0;

  initial begin
    expect_eq("S width", $bits(s), 17);
    expect_eq("C offset", dut.OC, 6);
    expect_eq("C width", $bits(c), 12);
    expect_eq("tree levels", dut.L, 4);
    // Per-level widths of the N=4, B=8 tree (S width, C offset, C width).
    for (int m = 1; m <= 4; m++) begin
      int ws, oc, wc;
      ws = ipp_pkg::mask_hi(ipp_pkg::csa_tree_mask(4, 8, m, 1'b0));
      oc = ipp_pkg::mask_lo(ipp_pkg::csa_tree_mask(4, 8, m, 1'b1));
      wc = ipp_pkg::mask_hi(ipp_pkg::csa_tree_mask(4, 8, m, 1'b1)) - oc;
      expect_eq($sformatf("level %0d S width", m), ws, (m == 1) ? 9 : (m == 2) ? 10 : (m == 3) ? 13 : 17);
      expect_eq($sformatf("level %0d C offset", m), oc, (m == 1) ? 1 : (m == 2) ? 3 : (m == 3) ? 4 : 6);
      expect_eq($sformatf("level %0d C width", m), wc, (m == 1) ? 8 : (m == 2) ? 8 : (m == 3) ? 9 : 12);
    end

    // Small combinational trees.
    repeat (300) begin
      e1 = 0; e2 = 0; e8 = 0;
      for (int r = 0; r < 4; r++)  begin r1[r] = 4'($urandom); e1 += longint'(r1[r]) << r; end
      for (int r = 0; r < 8; r++)  begin r2[r] = 4'($urandom); e2 += longint'(r2[r]) << (r / 2); end
      for (int r = 0; r < 32; r++) begin r8[r] = 4'($urandom); e8 += longint'(r8[r]) << (r / 8); end
      #1;
      expect_eq("N1 sum", longint'(s1) + (longint'(c1) << dut1.OC), e1);
      expect_eq("N2 sum", longint'(s2) + (longint'(c2) << dut2.OC), e2);
      expect_eq("N8 sum", longint'(s8) + (longint'(c8) << dut8.OC), e8);
    end

    // Pipelined N=4, B=8 tree, one new set of rows per cycle.
    @(negedge clk);
    for (int t = 0; t < 207; t++) begin
      if (t < 200) begin
        longint e;
        e = 0;
        for (int r = 0; r < 32; r++) begin
          rows[r] = (t == 0) ? 8'hFF : 8'($urandom);
          e += longint'(rows[r]) << (r / 4);
        end
        exp_q.push_back(e);
      end
      @(posedge clk);
      #1;
      if (t >= 7) begin
        expect_eq("N4 B8 sum", longint'(s) + (longint'(c) << 6), exp_q.pop_front());
        if ((s[16:6] & 11'(c)) != '0) carries++;
      end
      @(negedge clk);
    end
    checks++;
    if (carries == 0) begin failures++; $display("FAIL final carry chain never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
