// csa: W-bit carry-save adder (a row of W full adders, three inputs, two
// outputs). No carry moves between bit positions: bit i of `sum` is the
// parity of the three input bits, and bit i of `carry` is their majority,
// which has weight 2^(i+1). So x + y + z == sum + (carry << 1) exactly.
// Purely combinational, one full-adder delay. The carry-save adder is the
// basic element of the adder nodes of the summation tree; its gate-level
// form (XOR for sum, majority for carry) is the textbook one.
module csa #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry   // weight 2^(i+1) for bit i
);
  always_comb begin
    sum   = x ^ y ^ z;
    carry = (x & y) | (x & z) | (y & z);
  end
endmodule
