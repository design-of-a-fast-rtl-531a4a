// tb_adder_node: self-checking testbench for adder_node.
// Three configurations are exercised:
//  * a leaf node of the N=4, B=8 tree (four 8-bit rows, no shift), PIPE=0;
//  * the root node of that tree (children S 13 bits, C 9 bits at offset 4,
//    right child shifted by 4), PIPE=1;
//  * a leaf of an N=1 tree, whose rows are at alignments 0..3 (V at offset 1,
//    right pair shifted by 2), PIPE=0.
// For each, random inputs are applied and s + (c << OC_O) is compared with
// u + (v << O_C) + (w << SH) + (z << (SH + O_C)) computed in integers. The
// output path widths are compared with the expected ones (leaf: S 9, C 8 at
// offset 1; root: S 17, C 12 at offset 6), and the pipelined node must
// deliver its result exactly two clock cycles after its inputs.
module tb_adder_node;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  // Leaf, combinational.
  logic [7:0] lu, lv, lw, lz;
  logic [8:0] ls;
  logic [7:0] lc;
  adder_node #(.W_S(8), .O_C(0), .W_C(8), .SH(0), .PIPE(1'b0)) leaf (
    .clk(clk), .u(lu), .v(lv), .w(lw), .z(lz), .s(ls), .c(lc));

  // Root, pipelined.
  logic [12:0] ru, rw;
  logic [8:0]  rv, rz;
  logic [16:0] rs;
  logic [11:0] rc;
  adder_node #(.W_S(13), .O_C(4), .W_C(9), .SH(4), .PIPE(1'b1)) root (
    .clk(clk), .u(ru), .v(rv), .w(rw), .z(rz), .s(rs), .c(rc));

  // Leaf of an N=1 tree: rows of alignment 0,1 | 2,3.
  logic [7:0] nu, nv, nw, nz;
  logic [10:0] ns;   // S: 11 bits
  logic [7:0]  nc;   // C: 8 bits at offset 3
  adder_node #(.W_S(8), .O_C(1), .W_C(8), .SH(2), .PIPE(1'b0)) n1 (
    .clk(clk), .u(nu), .v(nv), .w(nw), .z(nz), .s(ns), .c(nc));

  function automatic longint node_ref(longint u, longint v, longint w, longint z,
                                      int oc, int sh);
    return u + (v << oc) + (w << sh) + (z << (sh + oc));
  endfunction

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

  initial begin
    // Path widths of the analysed tree.
    expect_eq("leaf S width", $bits(ls), 9);
    expect_eq("leaf C width", leaf.WC_O, 8);
    expect_eq("leaf C offset", leaf.OC_O, 1);
    expect_eq("root S width", root.WS_O, 17);
    expect_eq("root C width", root.WC_O, 12);
    expect_eq("root C offset", root.OC_O, 6);
    expect_eq("n1 C offset", n1.OC_O, 3);

    // Combinational nodes.
    repeat (300) begin
      lu = 8'($urandom); lv = 8'($urandom); lw = 8'($urandom); lz = 8'($urandom);
      nu = 8'($urandom); nv = 8'($urandom); nw = 8'($urandom); nz = 8'($urandom);
      #1;
      expect_eq("leaf sum", longint'(ls) + (longint'(lc) << 1),
                node_ref(lu, lv, lw, lz, 0, 0));
      expect_eq("n1 sum", longint'(ns) + (longint'(nc) << n1.OC_O),
                node_ref(nu, nv, nw, nz, 1, 2));
    end
    lu = '1; lv = '1; lw = '1; lz = '1;
    #1 expect_eq("leaf max", longint'(ls) + (longint'(lc) << 1), 4 * 255);

    // Pipelined root: new operands on every rising edge, result 2 cycles on.
    @(negedge clk);
    for (int t = 0; t < 301; t++) begin
      if (t < 300) begin
        if (t == 0) begin ru = '1; rv = '1; rw = '1; rz = '1; end
        else begin
          ru = 13'($urandom); rv = 9'($urandom); rw = 13'($urandom); rz = 9'($urandom);
        end
        exp_q.push_back(node_ref(ru, rv, rw, rz, 4, 4));
      end
      @(posedge clk);
      #1;
      if (t >= 1) begin
        // After the edge that ends cycle t the root shows the inputs of t-1.
        expect_eq("root sum", longint'(rs) + (longint'(rc) << 6), exp_q.pop_front());
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
