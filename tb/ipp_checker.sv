// ipp_checker: stimulus and scoreboard for one inner_product_processor.
// It resets the processor, then streams NVEC operand vectors: a few corner
// cases first (most negative times most negative, most negative times most
// positive, all ones, zero), then random ones, with in_valid dropped on
// about one cycle in four. Every result is compared with the inner product
// computed here in plain arithmetic (signed or unsigned, modulo
// 2^(2B+log2 N)), and the number of cycles between a vector's acceptance
// and its result must equal the expected LATENCY. Counts: checks, failures,
// negative results, back-to-back results, and idle cycles. `done` rises
// when every vector has been checked. Random operands are limited to 64
// bits (B <= 64).
module ipp_checker
  import ipp_pkg::*;
#(
  parameter int unsigned N         = 4,
  parameter int unsigned B         = 8,
  parameter bit          TWOS_COMP = 1'b1,
  parameter tree_e       TREE      = TREE_CSA,
  parameter bit          PIPE      = 1'b1,
  parameter int unsigned LATENCY   = 10,
  parameter int unsigned NVEC      = 300
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output int   negatives,
  output int   back_to_back,
  output int   bubbles,
  output logic done
);
  localparam int unsigned W = result_width(N, B);

  logic         rst_n;
  logic         in_valid, out_valid, prev_out_valid;
  logic [B-1:0] a [N], d [N];
  logic [W-1:0] result;

  inner_product_processor #(
    .N(N), .B(B), .TWOS_COMP(TWOS_COMP), .TREE(TREE), .PIPE(PIPE)
  ) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(a), .d(d),
    .out_valid(out_valid), .result(result)
  );

  logic [W-1:0] exp_q [$];
  int           cyc_q [$];

  function automatic logic [W-1:0] reference();
    logic [W-1:0] acc;
    acc = '0;
    for (int i = 0; i < N; i++) begin
      if (TWOS_COMP) acc += W'($signed(a[i])) * W'($signed(d[i]));
      else           acc += W'(a[i]) * W'(d[i]);
    end
    return acc;
  endfunction

  initial begin
    int sent, cyc;
    checks = 0; failures = 0; negatives = 0; back_to_back = 0; bubbles = 0;
    done = 1'b0; rst_n = 1'b0; in_valid = 1'b0; prev_out_valid = 1'b0;
    sent = 0; cyc = 0;
    for (int i = 0; i < N; i++) begin a[i] = '0; d[i] = '0; end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    while (sent < NVEC || exp_q.size() != 0) begin
      // Drive this cycle's operands.
      in_valid = (sent < NVEC) && (sent < 4 || ($urandom % 4) != 0);
      if (!in_valid && sent < NVEC) bubbles++;
      for (int i = 0; i < N; i++) begin
        case (sent)
          0:       begin a[i] = {1'b1, {(B-1){1'b0}}}; d[i] = {1'b1, {(B-1){1'b0}}}; end
          1:       begin a[i] = {1'b1, {(B-1){1'b0}}}; d[i] = {1'b0, {(B-1){1'b1}}}; end
          2:       begin a[i] = '1; d[i] = '1; end
          3:       begin a[i] = '0; d[i] = '0; end
          default: begin
            a[i] = B'({$urandom, $urandom});
            d[i] = B'({$urandom, $urandom});
          end
        endcase
      end
      if (in_valid) begin
        exp_q.push_back(reference());
        cyc_q.push_back(cyc);
        sent++;
      end
      #1;
      // Check what the processor delivers in this cycle.
      if (out_valid) begin
        logic [W-1:0] e;
        int c0;
        if (exp_q.size() == 0) begin
          failures++;
          $display("FAIL N=%0d B=%0d: result without a vector", N, B);
        end else begin
          e  = exp_q.pop_front();
          c0 = cyc_q.pop_front();
          checks++;
          if (result != e) begin
            failures++;
            $display("FAIL N=%0d B=%0d TC=%0d TREE=%0d: got %h expected %h", N, B,
                     TWOS_COMP, TREE, result, e);
          end
          checks++;
          if (cyc - c0 != int'(LATENCY)) begin
            failures++;
            $display("FAIL N=%0d B=%0d: latency %0d, expected %0d", N, B, cyc - c0, LATENCY);
          end
          if (TWOS_COMP && result[W-1]) negatives++;
          if (prev_out_valid) back_to_back++;
        end
      end
      prev_out_valid = out_valid;
      @(negedge clk);
      cyc++;
    end
    done = 1'b1;
  end
endmodule
