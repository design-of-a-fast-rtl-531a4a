# Fast inner product processor

This is a pipelined hardware unit that computes the inner product
`a·d = a0·d0 + a1·d1 + … + a(N-1)·d(N-1)` of two vectors. Each vector has N elements of B bits. Latency grows with
`log N + log B` adder levels, not with N or B.

A plain multiply/add tree puts a multiplier at each leaf and adders above. Here the
multipliers are opened up, so that all `N·B` partial products of the N
multiplications feed a single adder tree. The partial products are also
re-ordered before they enter that tree, which gives two further gains:

* **Narrower adders.** Partial products of equal weight are added first. Those sums grow by
  only one bit per level until the different weights meet. Counting adder bits
  over the path widths, the tree needs roughly 10-25 % fewer of them than a
  tree that finishes each product before adding products together. The saving
  depends on N and B.
* **A shorter final carry chain.** The tree adds with carry-save adders and keeps the
  result as a sum word S and a carry word C. With the re-ordering, the lowest
  `2·log2 B` bits of C are always zero. The final carry-lookahead adder
  therefore only spans the upper bits: 12 of the 18 result bits for N=4, B=8.

Operands can be unsigned or two's complement. Signed operands use a Baugh-Wooley
form of the partial products, followed by one more adder stage that adds a constant.
On top of the processor, `ipp_matmul` puts N processors side by side to form
a matrix multiplier that delivers one row of an N×N product per clock.

The default configuration is N = 4 elements of B = 8 bits, signed, carry-save
tree, fully pipelined. The result is 18 bits wide, with a latency of 10 clock
cycles and one new inner product accepted every cycle.

## Partial products and minimum alignment (`pp_gen`)

Row `j` of product `i` is `d_i` gated by bit `j` of `a_i`. Its true weight is
`2^j`, so it always ends in at least `j` zeros. This is its *minimum alignment*.
`pp_gen` produces the rows grouped by alignment:

    rows[j*N + i] = bit j of a_i  AND  d_i        (B bits, weight 2^j, zeros dropped)

The N rows of alignment `j` are adjacent and form *subtree j*. They are all B bits wide and
carry none of their forced zeros. Every subtree is therefore identical, and
the dropped zeros come back as wired left shifts wherever subtrees of
different alignment are added.

## Adder node and carry-save tree (`adder_node`, `csa_tree`)

The tree is binary, but its nodes are four-input, two-output **adder
nodes**. Each node stands for a pair of sibling two-input adders and is made of two
carry-save adders (`csa`) in series:

    U, V, W --> CSA1 --(sum, carry)--+
                                     +--> CSA2 --> S, C
    Z -------------------------------+

A node's inputs are the (S, C) pairs of its two children: `U = S_left`,
`V = C_left`, `W = S_right`, `Z = C_right`. Level 1 nodes take four rows
directly. For N·B rows there are `log2(N·B) − 1` node levels. The right child
of a level-m node covers rows of higher alignment. Its words are shifted left
by 0 while both children lie inside one subtree, and above that by `2^m / N`,
which gives 1, 2, 4, … : the shift doubles at every level. The shifts are only
wiring.

The width of every path is computed at elaboration time in `ipp_pkg`. The
computation tracks which bit positions can ever be non-zero:

* a CSA sum bit can be set wherever any of the three input bits can be;
* a carry bit can only be set where at least two input bits can be, and it moves up one position.

Only those bits are carried. An assertion in `adder_node` checks during simulation that no other bit
is ever set. For N=4, B=8:

| level | nodes | right-child shift | S width | C width @ offset |
|------:|------:|------------------:|--------:|-----------------:|
| 1     | 8     | 0                 | 9       | 8 @ 1            |
| 2     | 4     | 1                 | 10      | 8 @ 3            |
| 3     | 2     | 2                 | 13      | 9 @ 4            |
| 4     | 1     | 4                 | 17      | 12 @ 6           |

All nodes at one level are identical, so a layout needs only one node design
per level.

### Why the final adder is short

`S + (C << OC)` is the exact inner product. In the root's carry word, the bits below
`OC = 2·log2 B` are always zero, so the low `OC` bits of the result are simply
the low bits of S. Only bits `OC … 2B+log2N−1` need a carry-propagate adder.
This is the carry-lookahead adder `cla`, a Kogge-Stone parallel-prefix adder.
For N=4, B=8 it is 12 bits wide. If the partial products were not re-ordered,
the carry word would have only one forced zero and the final adder would need
17 bits.

## Two's complement operands

With `TWOS_COMP = 1`, the negatively weighted partial-product bits are complemented.
These are `a[j]·d[B−1]` for `j < B−1` and `a[B−1]·d[k]` for `k < B−1`, and they are
produced by NAND gates instead of AND gates. Every row is still B bits wide at weight
`2^j`, so the tree is unchanged. Turning the two negative partial sums of each product into
complement-plus-one with sign extension leaves a constant of ones. Summed over N products, modulo
`2^(2B+log2 N)`, it is

    K = N · (2^(2B−1) + 2^B)          (K = 0x10400 for N=4, B=8)

`K` is added by a second `cla` stage after the final adder. This adds one
cycle of latency but does not reduce throughput. The result is then the
two's complement inner product in `2B + log2 N` bits.

Note on the constant: the source of this design prints a different value,
`2^(2b−1+log N) + 2^(2b−2+log N) + 2^(b−1+log N)`. That value does not give
correct products with these rows (for example, 0·0 with N=1, B=4 would come out
as 56). The value above is derived from the row construction and is checked
against corner cases and random operands.

## Carry-propagate variant (`cpa_tree`)

`TREE = TREE_CPA` replaces the adder nodes and the final adder with a binary
tree of two-input carry-propagate adders that uses the same re-ordering and wired
shifts (`log2(N·B)` levels). Each path is as wide as the largest value it can
carry: 8 → 9 → 10 → 12 → 14 → 18 bits for N=4, B=8. It has fewer pipeline stages,
but each stage contains a full carry propagation.

## Timing and interface (`inner_product_processor`)

| port        | dir | width       | meaning                                           |
|-------------|-----|-------------|---------------------------------------------------|
| `clk`       | in  | 1           | clock                                             |
| `rst_n`     | in  | 1           | synchronous, active low; clears the valid pipeline only |
| `in_valid`  | in  | 1           | `a`, `d` hold a vector pair this cycle            |
| `a`, `d`    | in  | `[B-1:0] [N]` | the two vectors                                 |
| `out_valid` | out | 1           | `result` holds an inner product                   |
| `result`    | out | `2B+log2 N` | the inner product (signed if `TWOS_COMP`)         |

The pipeline never stalls, and a new pair may be given every cycle. With `PIPE = 1`
there is a register after every CSA, after the final adder and after the
constant adder. The data registers have no reset; a valid bit travels with the data.

| configuration (PIPE=1)         | latency in cycles              | N=4, B=8 |
|--------------------------------|--------------------------------|---------:|
| CSA tree, two's complement     | `2·(log2(N·B)−1) + 2`          | 10       |
| CSA tree, unsigned             | `2·(log2(N·B)−1) + 1`          | 9        |
| CPA tree, two's complement     | `log2(N·B) + 1`                | 6        |
| CPA tree, unsigned             | `log2(N·B)`                    | 5        |

With `PIPE = 0` the whole datapath is combinational, and `out_valid` equals `in_valid`.

## Matrix multiplier (`ipp_matmul`, the top level)

N processors share the input row `x_row` (row r of X). Processor c also gets
column c of Y (`y_cols[c][k] = Y[k][c]`) and produces `p_row[c] = P[r][c]` of
`P = X·Y`. If the N rows of X enter on N consecutive cycles, the N rows of P
leave on N consecutive cycles, one processor latency later. That is one full
N×N product every N cycles, at the latency of a single inner product. The block
stores nothing. Each cycle it needs `2N²` operands (x_row is fanned out to all
processors), and supplying them is left to the surrounding system.

## Parameters

| parameter   | default    | modules                         | notes |
|-------------|------------|---------------------------------|-------|
| `N`         | 4          | all                             | power of two; `N·B ≥ 4` for the CSA tree |
| `B`         | 8          | all                             | power of two |
| `TWOS_COMP` | 1          | `pp_gen`, processor, top        | 0 = unsigned operands |
| `TREE`      | `TREE_CSA` | processor, top                  | `ipp_pkg::tree_e`; `TREE_CPA` for the carry-propagate tree |
| `PIPE`      | 1          | trees, processor, top           | 0 = combinational datapath |

The width analysis uses 256-bit masks. This covers result widths up to 255 bits, for example
N=256 with B=64 (136 bits). The largest sizes simulated are N=256 with B=8 and N=16
with B=64.

## Files

    rtl/ipp_pkg.sv                  tree_e type, width/alignment analysis, constant K
    rtl/csa.sv                      carry-save adder
    rtl/adder_node.sv               two-CSA four-input node
    rtl/pp_gen.sv                   AND/NAND partial products in alignment order
    rtl/csa_tree.sv                 carry-save tree
    rtl/cpa_tree.sv                 carry-propagate tree
    rtl/cla.sv                      Kogge-Stone carry-lookahead adder
    rtl/inner_product_processor.sv  the processor
    rtl/ipp_matmul.sv               N processors as a matrix multiplier (top)
    tb/tb_<module>.sv               self-checking testbench of each module
    tb/ipp_checker.sv               stimulus/scoreboard for one processor
    tb/tb_ipp_workloads.sv          N=64 and N=256 at B=8; B=32 and B=64

## Simulating

Each testbench ends by printing `TB_RESULT checks=<n> failures=<m>`. For example:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/ipp_pkg.sv tb/tb_ipp_matmul.sv --top-module tb_ipp_matmul
    ./obj_dir/Vtb_ipp_matmul

Replace `tb_ipp_matmul` with any other testbench name. The package must be named first.
Linting the top: `verilator --lint-only -Wall -y rtl +libext+.sv rtl/ipp_pkg.sv rtl/ipp_matmul.sv`.

## Verification

* Every module has a self-checking testbench against plain integer arithmetic.
  The testbenches cover random operands and corner cases: most negative times most
  negative, most negative times most positive, all ones, zero, and the longest carry chains.
* The testbenches check the path widths and offsets in the table above. Pipelined
  blocks are checked for their exact latency, with a new input on every cycle.
* `tb_inner_product_processor` runs six configurations: signed and unsigned, both trees,
  pipelined and combinational, N=8 with B=16, and N=1 with B=4.
* `tb_ipp_workloads` runs N=64 and N=256 at B=8, N=4 at B=32 and N=16 at B=64. Its
  latencies are 18, 22, 14 and 20 cycles.
* `tb_ipp_matmul` runs the top at its default parameters. It streams 40 matrix products,
  with and without idle cycles between them, and checks every element of P, the
  10-cycle latency and the one-product-per-N-cycles rate.

## Where this design makes its own choices

* Register placement, the valid bit and the reset. The only stated requirement was
  "registers between the levels of the tree".
* The order in which a node's inputs are assigned (U, V, W, Z above). It is chosen because it
  reproduces the published path widths exactly.
* The adder circuits. The CSA is a row of full adders, the final and constant adders
  are Kogge-Stone, and the `cpa_tree` adders are behavioural `+`.
* The constant K (see above). Also, the gate count of `pp_gen` is `2N(B−1)` NAND and
  `N(B−1)² + N` AND gates. The extra N ANDs form the positive `a[B−1]·d[B−1]` bits.
* The matrix multiplier's port layout and row orientation. There is no operand memory.
