// tb_cla: self-checking testbench for cla. Instances of width 1, 12, 17 and
// 18 are driven with random and carry-chain corner cases (all ones plus
// carry-in, alternating patterns) and compared with integer addition,
// including the carry out.
module tb_cla;
  int checks = 0, failures = 0;

  logic [11:0] a12, b12, s12;
  logic [16:0] a17, b17, s17;
  logic [17:0] a18, b18, s18;
  logic        a1, b1, s1;
  logic        ci12, ci17, ci18, ci1, co12, co17, co18, co1;

  cla #(.W(12)) d12 (.a(a12), .b(b12), .cin(ci12), .sum(s12), .cout(co12));
  cla #(.W(17)) d17 (.a(a17), .b(b17), .cin(ci17), .sum(s17), .cout(co17));
  cla #(.W(18)) d18 (.a(a18), .b(b18), .cin(ci18), .sum(s18), .cout(co18));
  cla #(.W(1))  d1  (.a(a1),  .b(b1),  .cin(ci1),  .sum(s1),  .cout(co1));

  task automatic check_all();
    longint r;
    #1;
    r = longint'(a12) + longint'(b12) + longint'(ci12);
    checks++;
    if (r != longint'({co12, s12})) begin failures++; $display("FAIL w12 %h+%h+%b -> %b %h", a12, b12, ci12, co12, s12); end
    r = longint'(a17) + longint'(b17) + longint'(ci17);
    checks++;
    if (r != longint'({co17, s17})) begin failures++; $display("FAIL w17 %h+%h+%b", a17, b17, ci17); end
    r = longint'(a18) + longint'(b18) + longint'(ci18);
    checks++;
    if (r != longint'({co18, s18})) begin failures++; $display("FAIL w18 %h+%h+%b", a18, b18, ci18); end
    r = longint'(a1) + longint'(b1) + longint'(ci1);
    checks++;
    if (r != longint'({co1, s1})) begin failures++; $display("FAIL w1 %b+%b+%b", a1, b1, ci1); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Longest carry chain: all ones plus carry-in, and ones plus one.
    a12 = '1; b12 = '0; ci12 = 1; a17 = '1; b17 = 17'd1; ci17 = 0;
    a18 = '1; b18 = '1; ci18 = 1; a1 = 1; b1 = 1; ci1 = 1;
    check_all();
    a12 = 12'hAAA; b12 = 12'h555; ci12 = 1; a17 = 17'h0AAAA; b17 = 17'h15555; ci17 = 1;
    a18 = 18'h20000; b18 = 18'h20000; ci18 = 0; a1 = 0; b1 = 0; ci1 = 0;
    check_all();
    repeat (1000) begin
      a12 = 12'($urandom); b12 = 12'($urandom); ci12 = 1'($urandom);
      a17 = 17'($urandom); b17 = 17'($urandom); ci17 = 1'($urandom);
      a18 = 18'($urandom); b18 = 18'($urandom); ci18 = 1'($urandom);
      a1  = 1'($urandom);  b1  = 1'($urandom);  ci1  = 1'($urandom);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
