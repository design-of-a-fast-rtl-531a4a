// pp_gen: partial-product generation, regrouped by minimum alignment.
//
// For N element pairs (a_i, d_i) of B bits it forms the N*B partial-product
// rows of the N products a_i * d_i. Row j of product i is d_i gated by bit j
// of a_i; it has a minimum alignment of j, i.e. its true weight is 2^j. The
// rows are emitted in alignment order, rows[j*N + i], without their j
// forced low zeros, so every row is B bits wide and the N rows of equal
// alignment j sit next to each other (they form subtree j of the tree).
//
// TWOS_COMP selects the operand format:
//   0: unsigned. Bit k of row j is a_i[j] & d_i[k] (N*B*B AND gates).
//   1: two's complement, in the intermediate form of the Baugh-Wooley
//      scheme. The negatively weighted bits a[j]d[B-1] (j<B-1) and
//      a[B-1]d[k] (k<B-1) are complemented, i.e. produced by NAND gates
//      (2N(B-1) of them); all other bits are ANDs. The rows then still have
//      B bits each, so the tree is unchanged, and the constant correction
//      N*(2^(2B-1) + 2^B) must be added to the tree's result (done after
//      the final adder, see inner_product_processor).
// Purely combinational, one gate delay.
module pp_gen #(
  parameter int unsigned N         = 4,
  parameter int unsigned B         = 8,
  parameter bit          TWOS_COMP = 1'b1
) (
  input  logic [B-1:0] a    [N],
  input  logic [B-1:0] d    [N],
  output logic [B-1:0] rows [N*B]   // rows[j*N + i]: bit j of a_i times d_i
);
  always_comb begin
    for (int unsigned j = 0; j < B; j++) begin
      for (int unsigned i = 0; i < N; i++) begin
        for (int unsigned k = 0; k < B; k++) begin
          if (TWOS_COMP && ((j == B - 1) != (k == B - 1)))
            rows[j*N + i][k] = ~(a[i][j] & d[i][k]);   // NAND
          else
            rows[j*N + i][k] = a[i][j] & d[i][k];      // AND
        end
      end
    end
  end
endmodule
