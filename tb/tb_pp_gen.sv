// tb_pp_gen: self-checking testbench for pp_gen (N=4, B=8).
// An unsigned and a two's complement instance receive the same random and
// corner operands. For each element pair i, the rows rows[j*N + i] taken at
// weight 2^j must add up to a_i * d_i (unsigned instance) or, after adding
// the constant 2^(2B-1) + 2^B and reducing modulo 2^(2B), to the signed
// product a_i * d_i (two's complement instance). Individual row bits are
// also compared with the AND / NAND rule.
module tb_pp_gen;
  localparam int N = 4, B = 8;
  int checks = 0, failures = 0;

  logic [B-1:0] a [N], d [N];
  logic [B-1:0] rows_u [N*B], rows_s [N*B];

  pp_gen #(.N(N), .B(B), .TWOS_COMP(1'b0)) dut_u (.a(a), .d(d), .rows(rows_u));
  pp_gen #(.N(N), .B(B), .TWOS_COMP(1'b1)) dut_s (.a(a), .d(d), .rows(rows_s));

  task automatic check();
    longint su, ss, pu, ps;
    #1;
    for (int i = 0; i < N; i++) begin
      su = 0; ss = 0;
      for (int j = 0; j < B; j++) begin
        su += longint'(rows_u[j*N + i]) << j;
        ss += longint'(rows_s[j*N + i]) << j;
      end
      ss = (ss + (longint'(1) << (2*B - 1)) + (longint'(1) << B)) & ((longint'(1) << (2*B)) - 1);
      pu = longint'(a[i]) * longint'(d[i]);
      ps = (longint'($signed(a[i])) * longint'($signed(d[i]))) & ((longint'(1) << (2*B)) - 1);
      checks++;
      if (su != pu) begin failures++; $display("FAIL unsigned i=%0d a=%0d d=%0d sum=%0d", i, a[i], d[i], su); end
      checks++;
      if (ss != ps) begin failures++; $display("FAIL signed i=%0d a=%0d d=%0d sum=%0d", i, $signed(a[i]), $signed(d[i]), ss); end
    end
    // Row 1 of element 2: plain AND; row B-1 of element 0: NAND except bit B-1.
    checks++;
    if (rows_s[1*N + 2][B-2:0] != (d[2][B-2:0] & {(B-1){a[2][1]}}) ||
        rows_s[1*N + 2][B-1] != ~(d[2][B-1] & a[2][1]) ||
        rows_s[(B-1)*N][B-2:0] != ~(d[0][B-2:0] & {(B-1){a[0][B-1]}}) ||
        rows_s[(B-1)*N][B-1] != (d[0][B-1] & a[0][B-1])) begin
      failures++;
      $display("FAIL row bit pattern");
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin a[i] = 8'h80; d[i] = 8'h80; end
    check();
    for (int i = 0; i < N; i++) begin a[i] = 8'h7F; d[i] = 8'h80; end
    check();
    for (int i = 0; i < N; i++) begin a[i] = 8'hFF; d[i] = 8'hFF; end
    check();
    for (int i = 0; i < N; i++) begin a[i] = '0; d[i] = '0; end
    check();
    repeat (300) begin
      for (int i = 0; i < N; i++) begin a[i] = 8'($urandom); d[i] = 8'($urandom); end
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
