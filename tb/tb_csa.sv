// tb_csa: self-checking testbench for csa. Applies random and corner
// operands to 8-bit and 1-bit instances and checks, against integer
// arithmetic, that x + y + z == sum + 2*carry and that sum is the bitwise
// parity. Combinational, so every check follows a 1 ns settle delay.
module tb_csa;
  int checks = 0, failures = 0;

  logic [7:0] x, y, z, s, cy;
  logic       x1, y1, z1, s1, c1;

  csa #(.W(8)) dut8 (.x(x), .y(y), .z(z), .sum(s), .carry(cy));
  csa #(.W(1)) dut1 (.x(x1), .y(y1), .z(z1), .sum(s1), .carry(c1));

  task automatic check8();
    int unsigned ref_total, got_total;
    #1;
    ref_total = int'(x) + int'(y) + int'(z);
    got_total = int'(s) + 2 * int'(cy);
    checks++;
    if (ref_total != got_total || s != (x ^ y ^ z)) begin
      failures++;
      $display("FAIL csa8 x=%0d y=%0d z=%0d sum=%0d carry=%0d", x, y, z, s, cy);
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
    {x, y, z} = '0;          check8();
    {x, y, z} = '1;          check8();
    x = 8'hAA; y = 8'h55; z = 8'hFF; check8();
    repeat (500) begin
      x = 8'($urandom); y = 8'($urandom); z = 8'($urandom);
      check8();
    end
    for (int v = 0; v < 8; v++) begin
      {x1, y1, z1} = 3'(v);
      #1;
      checks++;
      if (int'(x1) + int'(y1) + int'(z1) != int'(s1) + 2 * int'(c1)) begin
        failures++;
        $display("FAIL csa1 %b", 3'(v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
