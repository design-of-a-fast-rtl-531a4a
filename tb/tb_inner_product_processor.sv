// tb_inner_product_processor: self-checking testbench for
// inner_product_processor. Six configurations run side by side, each driven
// and scored by its own ipp_checker:
//   N=4  B=8  two's complement, CSA tree, pipelined  (default, latency 10)
//   N=4  B=8  unsigned,         CSA tree, pipelined  (latency 9)
//   N=4  B=8  two's complement, CPA tree, pipelined  (latency 6)
//   N=4  B=8  unsigned,         CPA tree, combinational (latency 0)
//   N=8  B=16 two's complement, CSA tree, pipelined  (latency 2*6+2 = 14)
//   N=1  B=4  two's complement, CSA tree, combinational
// Every result and every latency is checked; the two's complement runs
// must also produce negative results.
module tb_inner_product_processor;
  import ipp_pkg::*;
  localparam int K = 6;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int   ck [K], fl [K], ng [K], bb [K], bu [K];
  logic dn [K];

  ipp_checker #(.N(4), .B(8),  .TWOS_COMP(1), .TREE(TREE_CSA), .PIPE(1), .LATENCY(10)) c0 (
    .clk(clk), .checks(ck[0]), .failures(fl[0]), .negatives(ng[0]), .back_to_back(bb[0]), .bubbles(bu[0]), .done(dn[0]));
  ipp_checker #(.N(4), .B(8),  .TWOS_COMP(0), .TREE(TREE_CSA), .PIPE(1), .LATENCY(9)) c1 (
    .clk(clk), .checks(ck[1]), .failures(fl[1]), .negatives(ng[1]), .back_to_back(bb[1]), .bubbles(bu[1]), .done(dn[1]));
  ipp_checker #(.N(4), .B(8),  .TWOS_COMP(1), .TREE(TREE_CPA), .PIPE(1), .LATENCY(6)) c2 (
    .clk(clk), .checks(ck[2]), .failures(fl[2]), .negatives(ng[2]), .back_to_back(bb[2]), .bubbles(bu[2]), .done(dn[2]));
  ipp_checker #(.N(4), .B(8),  .TWOS_COMP(0), .TREE(TREE_CPA), .PIPE(0), .LATENCY(0)) c3 (
    .clk(clk), .checks(ck[3]), .failures(fl[3]), .negatives(ng[3]), .back_to_back(bb[3]), .bubbles(bu[3]), .done(dn[3]));
  ipp_checker #(.N(8), .B(16), .TWOS_COMP(1), .TREE(TREE_CSA), .PIPE(1), .LATENCY(14)) c4 (
    .clk(clk), .checks(ck[4]), .failures(fl[4]), .negatives(ng[4]), .back_to_back(bb[4]), .bubbles(bu[4]), .done(dn[4]));
  ipp_checker #(.N(1), .B(4),  .TWOS_COMP(1), .TREE(TREE_CSA), .PIPE(0), .LATENCY(0)) c5 (
    .clk(clk), .checks(ck[5]), .failures(fl[5]), .negatives(ng[5]), .back_to_back(bb[5]), .bubbles(bu[5]), .done(dn[5]));

  int checks, failures;

  task automatic report();
    checks = 0; failures = 0;
    for (int k = 0; k < K; k++) begin
      checks += ck[k];
      failures += fl[k];
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    report();
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20;
    wait (dn[0] && dn[1] && dn[2] && dn[3] && dn[4] && dn[5]);
    report();
    for (int k = 0; k < K; k++) begin
      checks++;
      if (ck[k] == 0) begin failures++; $display("FAIL configuration %0d checked nothing", k); end
    end
    for (int k = 0; k < K; k++) begin
      if (k == 1 || k == 3) continue;
      checks++;
      if (ng[k] == 0) begin failures++; $display("FAIL configuration %0d gave no negative result", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
