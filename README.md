# Brent-Kung parallel prefix adder (with a BCD digit adder)

A ripple-carry adder waits for the carry to travel through every bit, so
its delay grows linearly with the width. A parallel prefix adder computes
all carries at once, through a tree of small "prefix" cells. The
Brent-Kung tree uses the fewest cells of the common prefix trees. It has
about 2N cells for N bits and a depth of 2·log2(N)−1 cells. Each cell
drives at most two others. The cost is roughly twice the depth of the
fastest (Kogge-Stone) tree.

This RTL gives:

* a parameterised Brent-Kung adder, 16 bits by default and 32 with
  `WIDTH = 32`, with carry-in, carry-out and the bitwise propagate and
  generate brought out;
* a one-digit BCD (decimal) adder built from two 4-bit Brent-Kung adders
  and the usual "add 6" correction;
* a top, `bk_adder_top`, that puts both side by side.

Everything is combinational, with no clock and no reset.

## How a prefix adder forms its carries

Each bit pair `a_i, b_i` is classified by two signals:

* **propagate** `P_i = a_i ^ b_i`: the bit passes an incoming carry on;
* **generate** `G_i = a_i & b_i`: the bit makes a carry by itself.

A group of adjacent bits `[i:j]` has the same two properties. Two adjacent
groups, `hi` above `lo`, merge with an associative operator:

    P[hi∪lo] = P_hi & P_lo
    G[hi∪lo] = G_hi | (P_hi & G_lo)

The carry out of bit i is `G[i:0]`, the generate of the group from bit i
down to bit 0. So computing all carries is a prefix computation, in the
same way as a running sum. Because the operator is associative, the merges
can be done in any tree shape. The choice of tree is what separates
Brent-Kung from Kogge-Stone, Ladner-Fischer and the other prefix adders.

Two cells implement the operator:

| cell | module | computes | gates |
|------|--------|----------|-------|
| black | `bk_black_cell` | `P` and `G` of the merged group | 2 AND, 1 OR |
| gray  | `bk_gray_cell`  | `G` only | 1 AND, 1 OR |

A gray cell is used wherever the merged group reaches bit 0. Its generate
is then a final carry, and nothing above it needs its propagate.

## The Brent-Kung tree

`bk_carry_network` builds the tree in two sweeps. For 16 bits (L = 4):

```
bit:        15 14 13 12 11 10  9  8  7  6  5  4  3  2  1  0
up   l=1    B     B     B     B     B     B     B     g         15:14 13:12 11:10 9:8 7:6 5:4 3:2 1:0
up   l=2    B           B           B           g               15:12 11:8 7:4 3:0
up   l=3    B                       g                           15:8 7:0
up   l=4    g                                                   15:0
down l=3                g                                       11:0
down l=2          g           g           g                     13:0 9:0 5:0
down l=1       g     g     g     g     g     g     g            14:0 12:0 ... 2:0
             (B = black cell, g = gray cell; every other position is a wire)
```

* **Up-sweep**, level l = 1 … L with L = ceil(log2 WIDTH). Bit `k·2^l − 1`
  merges with bit `k·2^l − 2^(l−1) − 1`, for k ≥ 1. This doubles the span of
  every second group, so after level l the bits `2^l − 1` hold complete
  prefixes.
* **Down-sweep**, level l = L−1 … 1. Bit `k·2^l + 2^(l−1) − 1`, for k ≥ 1,
  merges with the complete prefix at bit `k·2^l − 1`. This fills in the
  carries that the up-sweep left out.

The same two rules are used for every `WIDTH`, powers of two or not.
Positions with no cell in a stage pass their pair to the next stage
unchanged. In a schematic of this tree those positions are buffers; here
they are wires. Once a pair reaches bit 0 its propagate is driven 0, since
nothing below it is left to propagate.

Cell counts and depth:

| WIDTH | black | gray (tree) | stages 2L−1 |
|-------|-------|-------------|-------------|
| 16    | 11    | 15          | 7           |
| 32    | 26    | 31          | 9           |

The adder adds one more gray cell for the carry-in, described next.

## Carry-in

`brent_kung_adder` merges the carry-in into bit 0 before the tree, with one
gray cell: `G0' = G0 | (P0 & cin)`. Every prefix the tree then forms
already includes the carry-in, so the tree's outputs are the final carries.
This gives the same result as adding the term `P[i:0] & cin` to each
carry after the tree. It costs one cell on bit 0 instead of an AND/OR pair
on every bit.

The sum stage (`bk_sum_gen`) is then `S_i = P_i ^ C_(i−1)`, with
`C_(−1) = cin`. `s[WIDTH]` is the carry-out.

Critical path: one XOR/AND (pre-processing), the carry-in cell, 2L−1
prefix cells, then one XOR.

## BCD digit adder

`bcd_digit_adder` adds two decimal digits (0–9) and a decimal carry-in:

1. A 4-bit Brent-Kung adder forms the binary sum `z` (0–19) and its carry
   `k`.
2. The sum is above 9 if `k | (z3 & z2) | (z3 & z1)`. The two AND terms
   are named `y1` and `y2`. This condition is also the decimal carry-out.
3. A second 4-bit Brent-Kung adder adds `0110` when a correction is needed.
   Its addend is `{0, cout, cout, 0}` and its carry-in is 0. Its own
   carry-out is dropped.

Digits chain through `cin`/`cout`; the top testbench adds four-digit
numbers this way. Inputs above 9 are not BCD, and their results are
undefined.

## Parameters

| module | parameter | default | note |
|--------|-----------|---------|------|
| `brent_kung_adder`, `bk_carry_network`, `bk_pg_gen`, `bk_sum_gen`, `bk_adder_top` | `WIDTH` | 16 | set 32 for the wider version; any width ≥ 1 works |

The BCD adder has no parameter; it is always one digit.

## Files

| file | contents |
|------|----------|
| `rtl/bk_pkg.sv` | `pg_t` (propagate/generate pair), `bk_levels()` |
| `rtl/bk_black_cell.sv`, `rtl/bk_gray_cell.sv` | the two prefix cells |
| `rtl/bk_pg_gen.sv` | pre-processing: per-bit P and G |
| `rtl/bk_carry_network.sv` | the Brent-Kung tree |
| `rtl/bk_sum_gen.sv` | post-processing: sum bits and carry-out |
| `rtl/brent_kung_adder.sv` | the complete adder |
| `rtl/bcd_digit_adder.sv` | the one-digit BCD adder |
| `rtl/bk_adder_top.sv` | top: both adders side by side |
| `tb/tb_<module>.sv` | a self-checking testbench for each module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and finishes. A
watchdog fails the run if it hangs. To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/bk_pkg.sv tb/tb_bk_adder_top.sv --top-module tb_bk_adder_top
./obj_dir/Vtb_bk_adder_top
```

Replace the testbench name to run any of the others. `-Irtl` lets
Verilator find the submodules by file name.

What the testbenches check:

* **Cells:** exhaustive.
* **Carry network:** 16, 32, 9 and 5 bits, against a serial carry scan.
* **Adder:**
  * exhaustive at 7, 4 and 1 bits;
  * carry chains through every bit at 16 and 32 bits;
  * several thousand random operands.
* **BCD adder:** exhaustive over all 200 digit/carry combinations.
* **Top:**
  * at its default parameters;
  * the reference vector `0x5555 + 0xFFFF` (cin 0), which gives `0x15554`
    with `p = 0xAAAA`, `g = 0x5555`;
  * random additions and multi-digit decimal sums;
  * fails if any of these never happens: carry-in used, carry-out, a
    carry across all 16 bits, no BCD correction, or each of the three
    correction conditions.

## Where this design makes its own choices

* **Carry-in.** It is merged into bit 0 by an extra gray cell, as described
  above. The classic 16-bit Brent-Kung drawing has no carry-in, only a
  buffer on bit 0.
* **Any width.** The cell placement follows the standard 16-bit tree
  exactly. The rule that extends it to widths that are not powers of two
  is this design's own.
* **Sum width.** `s` is one bit wider than the operands, with the
  carry-out on top.
* **BCD adder.** Each 4-bit adder is a 4-bit Brent-Kung adder, and the
  correction logic is the textbook one.
* **Timing.** Everything is a single combinational path. There are no
  pipeline registers, no clock and no reset. Add registers around
  `brent_kung_adder` if it must meet a clock period.
* **Not covered.** No gate-level or physical implementation (placement,
  sizing, buffering for fan-out) is given here. Only the logic is.
