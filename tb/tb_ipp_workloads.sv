// tb_ipp_workloads: the processor at the vector lengths used for the
// latency comparison with earlier inner-product designs, B = 8 bits with
// N = 64 and N = 256 elements, plus the N=4, B=8 reference configuration
// and wide-element cases (N=4, B=32 and N=16, B=64, the widest element
// size of the hardware comparison tables). All use two's complement operands,
// the carry-save tree and full pipelining. Each is scored by ipp_checker:
// every result is compared with a plain-arithmetic inner product, and the
// latency must be 2*(log2(N*B)-1) + 2 cycles (10, 18, 22, 14 and 20).
module tb_ipp_workloads;
  import ipp_pkg::*;
  localparam int K = 5;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  int   ck [K], fl [K], ng [K], bb [K], bu [K];
  logic dn [K];

  ipp_checker #(.N(4),   .B(8),  .LATENCY(10), .NVEC(200)) w0 (
    .clk(clk), .checks(ck[0]), .failures(fl[0]), .negatives(ng[0]), .back_to_back(bb[0]), .bubbles(bu[0]), .done(dn[0]));
  ipp_checker #(.N(64),  .B(8),  .LATENCY(18), .NVEC(100)) w1 (
    .clk(clk), .checks(ck[1]), .failures(fl[1]), .negatives(ng[1]), .back_to_back(bb[1]), .bubbles(bu[1]), .done(dn[1]));
  ipp_checker #(.N(256), .B(8),  .LATENCY(22), .NVEC(50)) w2 (
    .clk(clk), .checks(ck[2]), .failures(fl[2]), .negatives(ng[2]), .back_to_back(bb[2]), .bubbles(bu[2]), .done(dn[2]));
  ipp_checker #(.N(4),   .B(32), .LATENCY(14), .NVEC(100)) w3 (
    .clk(clk), .checks(ck[3]), .failures(fl[3]), .negatives(ng[3]), .back_to_back(bb[3]), .bubbles(bu[3]), .done(dn[3]));
  ipp_checker #(.N(16),  .B(64), .LATENCY(20), .NVEC(50)) w4 (
    .clk(clk), .checks(ck[4]), .failures(fl[4]), .negatives(ng[4]), .back_to_back(bb[4]), .bubbles(bu[4]), .done(dn[4]));

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
    wait (dn[0] && dn[1] && dn[2] && dn[3] && dn[4]);
    report();
    for (int k = 0; k < K; k++) begin
      checks++;
      if (ck[k] == 0 || ng[k] == 0) begin
        failures++;
        $display("FAIL workload %0d: %0d checks, %0d negative results", k, ck[k], ng[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
