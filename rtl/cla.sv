// cla: W-bit carry-lookahead adder, sum = a + b + cin.
//
// Bit generate g = a & b and propagate p = a ^ b are combined by a
// parallel-prefix (Kogge-Stone) network of log2(W) levels of the group
// operator (g, p) o (g', p') = (g | p & g', p & p'), so the carry into every
// bit is ready after O(log W) gate delays instead of rippling through W
// full adders. The carry-in enters as the generate of a virtual bit -1.
// The particular lookahead network is this design's choice; the processor
// only needs a fast carry-propagate adder for its final stages.
// Purely combinational.
module cla #(
  parameter int unsigned W = 12
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned LV = (W > 1) ? $clog2(W + 1) : 1;

  // Position 0 is the carry-in; position i+1 is bit i of the operands.
  logic [W:0] g [LV+1];
  logic [W:0] p [LV+1];

  always_comb begin
    g[0] = {a & b, cin};
    p[0] = {a ^ b, 1'b0};
    for (int unsigned l = 0; l < LV; l++) begin
      for (int unsigned i = 0; i <= W; i++) begin
        if (i >= (1 << l)) begin
          g[l+1][i] = g[l][i] | (p[l][i] & g[l][i - (1 << l)]);
          p[l+1][i] = p[l][i] & p[l][i - (1 << l)];
        end else begin
          g[l+1][i] = g[l][i];
          p[l+1][i] = p[l][i];
        end
      end
    end
    // g[LV][i] is the carry out of bit i-1, i.e. the carry into bit i.
    sum  = p[0][W:1] ^ g[LV][W-1:0];
    cout = g[LV][W];
  end
endmodule
