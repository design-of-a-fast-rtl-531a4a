// ipp_pkg: shared constants and elaboration-time width analysis for the
// fast inner product processor.
//
// The processor sums N*B partial-product rows of B bits each. Rows are
// ordered by their minimum alignment (the number of low-order zeros they are
// forced to have): row index r = j*N + i holds the partial product of
// element pair i for multiplier bit j, so all N rows of alignment j are
// adjacent and feed the same subtree. Every row enters the tree without its
// j low zeros; the alignment is restored by wired left shifts where
// subtrees of different alignment meet.
//
// Two trees are supported, both following the regrouped ("type II")
// structure:
//   * the carry-save tree of four-input adder nodes, each two carry-save
//     adders (CSAs) in series, producing a sum word S and a carry word C;
//   * the carry-propagate tree of two-input adders.
// The functions below work out, for every tree level, the width and offset
// of each data path. For the CSA tree they track the set of bit positions
// that can ever be non-zero ("occupancy mask"): a CSA sum bit can be set
// wherever any input bit can be, a carry bit (weight 2^(i+1)) only where at
// least two input bits can be. For N=4, B=8 this gives exactly the path
// widths of the reference tree: S/C = 9/8<<1, 10/8<<3, 13/9<<4, 17/12<<6.
// For the carry-propagate tree the widths follow from the largest value a
// path can carry (8 -> 9 -> 10 -> 12 -> 14 -> 18 for N=4, B=8). All widths
// are design choices derived from the structure; no rounding up is applied.
package ipp_pkg;

  // Summation tree of the processor: four-input carry-save adder nodes
  // followed by one carry-lookahead adder, or two-input carry-propagate
  // adders throughout.
  typedef enum logic {TREE_CSA = 1'b0, TREE_CPA = 1'b1} tree_e;

  // Wide enough for every mask and bound up to N=256, B=64 (136-bit result).
  localparam int unsigned MASK_W = 256;
  typedef logic [MASK_W-1:0] mask_t;

  // Alignment shift of the right half relative to the left half of a tree
  // node whose halves each cover `half_rows` consecutive rows.
  function automatic int unsigned sib_shift(int unsigned n, int unsigned half_rows);
    return (half_rows >= n) ? half_rows / n : 0;
  endfunction

  // Mask with the low w bits set.
  function automatic mask_t ones(int unsigned w);
    return (mask_t'(1) << w) - 1;
  endfunction

  function automatic int unsigned mask_lo(mask_t m);
    for (int unsigned i = 0; i < MASK_W; i++)
      if (m[i]) return i;
    return 0;
  endfunction

  function automatic int unsigned mask_hi(mask_t m);  // highest set bit + 1
    int unsigned h;
    h = 0;
    for (int unsigned i = 0; i < MASK_W; i++)
      if (m[i]) h = i + 1;
    return h;
  endfunction

  // Occupancy masks of one CSA: sum and (already shifted) carry.
  function automatic mask_t csa_sum_mask(mask_t u, mask_t v, mask_t w);
    return u | v | w;
  endfunction

  function automatic mask_t csa_carry_mask(mask_t u, mask_t v, mask_t w);
    return ((u & v) | (u & w) | (v & w)) << 1;
  endfunction

  // Occupancy mask of S (sel=0) or C (sel=1) at the output of CSA-tree
  // level m, relative to the alignment of the node's leftmost row. Level 0
  // is a pair of raw rows taken as (S, C) = (row 2k, row 2k+1).
  function automatic mask_t csa_tree_mask(int unsigned n, int unsigned b,
                                          int unsigned m, bit sel);
    mask_t s, c, u, v, w, z, t_s, t_c;
    int unsigned sh;
    s = '0;
    for (int unsigned i = 0; i < b; i++) s[i] = 1'b1;
    c = s << sib_shift(n, 1);
    for (int unsigned lvl = 1; lvl <= m; lvl++) begin
      sh = sib_shift(n, 1 << lvl);
      u = s;
      v = c;
      w = s << sh;
      z = c << sh;
      t_s = csa_sum_mask(u, v, w);
      t_c = csa_carry_mask(u, v, w);
      s = csa_sum_mask(t_s, t_c, z);
      c = csa_carry_mask(t_s, t_c, z);
    end
    return sel ? c : s;
  endfunction

  // Largest value carried at the output of carry-propagate-tree level m
  // (level 0 is a single B-bit row).
  function automatic mask_t cpa_tree_max(int unsigned n, int unsigned b, int unsigned m);
    mask_t mx;
    mx = (mask_t'(1) << b) - 1;
    for (int unsigned lvl = 1; lvl <= m; lvl++)
      mx = mx + (mx << sib_shift(n, 1 << (lvl - 1)));
    return mx;
  endfunction

  // Width of the result of an N-element, B-bit inner product: 2B + log2 N.
  function automatic int unsigned result_width(int unsigned n, int unsigned b);
    return 2 * b + $clog2(n);
  endfunction

  // Sum of the constant ones of the two's complement rows of N products,
  // modulo 2^(2B+log2 N): each product contributes 2^(2B-1) + 2^B.
  function automatic mask_t tc_constant(int unsigned n, int unsigned b);
    mask_t k;
    k = (mask_t'(1) << (2 * b - 1 + $clog2(n))) + (mask_t'(1) << (b + $clog2(n)));
    return k & ((mask_t'(1) << result_width(n, b)) - 1);
  endfunction

endpackage
