# Multi-input adder from chained (6,0,7;5) counters

This RTL adds M unsigned N-bit numbers in one combinational pass. It is
shaped for LUT-based FPGAs whose logic slices hold four 6-input LUTs and a
4-bit carry chain, such as the Xilinx 7 Series.

Compressor trees on such FPGAs are usually built from generalized parallel
counters (GPCs). A GPC that fits in one slice can reduce bits very
efficiently. The best of these is the (6,0,7;5) counter. It takes 13 bits
(six of weight 4 and seven of weight 1) and returns a 5-bit count, so 13 bits
become 5. There is a catch: one of its seven weight-1 bits must enter through
the slice's carry-in. That only costs nothing when the carry-in comes from the
carry-out of another slice. A general compressor tree cannot promise this,
and then the counter spills into a second slice.

This design makes the promise by construction:

1. **Chain.** Counters are chained, each counter's carry-out feeding the next
   one's carry-in. A chain adds six bits on every other bit position
   (positions 0, 2, 4, ...) and returns one binary number.
2. **6-2 adder.** Two chains, one on the even and one on the odd bit
   positions, add six numbers and return two. Every counter except the first
   of each chain gets its carry-in from the counter below, so each occupies
   exactly one slice.
3. **Tree.** 6-2 adders are arranged in a tree. Each adder of one level takes
   the outputs of three adders of the level above. The tree reduces M rows to
   two, and a ripple-carry row adder on the carry chain adds those two.

Because the structure is regular, the tree is worked out by a few constant
functions. No optimisation problem has to be solved. For M = 2·3^h it is
exactly h levels of 6-2 adders.

## The slice and the (6,0,7;5) counter

`carry4` models the slice's carry chain. Stage i receives a propagate bit
`p[i]` and a generate bit `g[i]` from LUT i, and computes:

    o[i]  = p[i] ^ c            sum bit
    co[i] = p[i] ? c : g[i]     carry to the next stage (c = ci for stage 0)

When the LUTs give `p = X ^ Y` and `g = X`, the four stages add two 4-bit
numbers, X + Y + ci. `gpc_6_0_7_5` turns the counting problem into that
addition:

| slice input | bits                 | LUT contents |
|-------------|----------------------|--------------|
| carry-in    | a[0]                 | none |
| LUT0, LUT1  | a[6:1] (weight 1)    | X = count(a1,a2,a3) and Y = count(a4,a5,a6), each 0..3; stage 0 gets bit 0 of X and Y, stage 1 gets bit 1 |
| LUT2, LUT3  | b[5:0] (weight 4)    | the same, using b0..b2 and b3..b5 |

The sum bits `o[3:0]` and the final carry together give
`{cout, s} = popcount(a) + 4·popcount(b)`, which ranges from 0 to 31. Each
LUT's function depends on only the six bits of its pair. This splitting into
two groups of three is one way to fill the LUTs; any split of the six bits
into two 2-bit counts works.

`gpc_7_3` is the lower half of the same slice. It uses two LUTs, stages 0
and 1, and the carry-in, and returns popcount of 7 bits. A chain uses it for
its top digit when that digit has no weight-4 partner.

## Chains and the 6-2 adder

In a chain, digit j stands for bit position 2j of the addends, so it has
weight 4^j. Each digit holds six bits, one from each of the six addends.
Counter k takes digit 2k as its weight-1 column and digit 2k+1 as its
weight-4 column. Its four sum bits land on positions 4k..4k+3, and its
carry-out (weight 16) is exactly the weight-1 carry-in of counter k+1. A
chain of K digits therefore gives a (2K+1)-bit result:

    sum = cin + Σ_j popcount(col[j]) · 4^j

`adder_6_2 #(W)` splits each of its six W-bit inputs by bit position. Even
positions go to one chain with ceil(W/2) digits. Odd positions go to another
with floor(W/2) digits, and that chain's result is shifted left by one. The
two results are the two output rows, each W+2 bits wide. That width is enough
for any input. For an odd W the even chain has an odd number of digits and
ends in a (7;3) counter. The chains' own carry-ins are tied to 0.

In the worst case a carry ripples through one chain, W/4 slices long. Bit i
of each output row goes to bit i of the next level's input, so the chains of
successive levels overlap in time. The total delay therefore grows as
O(log M + N), not O(N · levels).

## Planning the tree (`mia_pkg`)

The tree is planned level by level from the row count r:

- **r ≥ 6.** Rows 6a..6a+5 feed 6-2 adder a. Its outputs become rows 2a and
  2a+1 of the next level. The r mod 6 rows left over are passed down
  unchanged. Rows widen by 2 bits.
- **3 ≤ r ≤ 5.** Rows are added in pairs by 2-1 adders (the same
  `row_adder`), and an odd row is passed down. Rows widen by 1 bit.
- **r = 2.** The tree stops, and the final `row_adder` adds the two rows.

The row widths grow with each level, so no row can overflow. The result is
exact and is cut to N + clog2(M) bits, which always holds the sum. Some
sample plans:

| M   | rows per level            | 6-2 adders | 2-1 adders in tree |
|-----|---------------------------|-----------:|-------------------:|
| 16  | 16 → 8 → 4 → 2            | 3   | 2 |
| 54  | 54 → 18 → 6 → 2           | 13  | 0 |
| 162 | 162 → 54 → 18 → 6 → 2     | 40  | 0 |
| 512 | 512 → 172 → 60 → 20 → 8 → 4 → 2 | 127 | 2 |

**Where this departs from the original description.** For M other than
2·3^h, the method as originally described first cuts the row count down to a
power-of-three size with a tree of 2-1 adders. For M = 256 that would mean 94
row adders ahead of a 162-input tree. The slice counts published for the
method are far lower than that. They grow in proportion to M and match the
greedy plan above closely, so the greedy plan is what is built. For
M = 2·3^h both readings give the same tree.

**Slice estimate.** Count one slice per counter and ceil(W/4) slices per row
adder. This estimate matches the published slice counts of the method
exactly for every M = 2·3^h at N = 16, 32 and 64. Examples: 118 slices for
16×54, 354 for 16×162, 3979 for 64×486. For the other M, the estimate is 0
to 8% above the published counts, with the largest gap at M = 16.

## Modules

| module              | role |
|---------------------|------|
| `multi_input_adder` | top: `x[M]` of N bits in, `sum` of N + clog2(M) bits out; tree plus final row adder |
| `adder_tree_6_2`    | level-by-level reduction of M rows to 2, planned by `mia_pkg` |
| `adder_6_2`         | six W-bit rows in, two (W+2)-bit rows out |
| `gpc_chain`         | K-digit chain of (6,0,7;5) counters, with a (7;3) on top when K is odd |
| `gpc_6_0_7_5`       | the counter: four LUT functions and one `carry4` |
| `gpc_7_3`           | 7-bit counter in half a slice |
| `row_adder`         | ripple-carry adder on cascaded `carry4` blocks |
| `carry4`            | 4-stage carry chain of a slice |
| `mia_pkg`           | constant functions: rows and widths per level, adder counts, sum width |

Parameters are `N` (default 64) and `M` (default 512). These are the largest
size of the published evaluation, which covered N = 16, 32, 64 and M from 16
to 512. Any N ≥ 2 and M ≥ 2 work. The design has no clock, reset or
handshake, and it produces its result one combinational delay after the
inputs change. For a registered or pipelined version, place registers around
it. Splitting the tree into pipeline stages is not part of this design.

## Using it on an FPGA

`carry4` is written as plain logic, with a mux-and-XOR per stage. A synthesis
tool will implement it correctly, but it does not have to map it onto the
dedicated carry chain, or keep each counter in one slice. To get the intended
packing on a Xilinx 7 Series part, replace the body of `carry4` with the
vendor's CARRY4 primitive. Also make sure the LUT functions of
`gpc_6_0_7_5` are not merged across slices, for example with a
keep-hierarchy attribute. Nothing else depends on the target.

## Simulation

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` at the end.

- `tb_carry4`, `tb_gpc_6_0_7_5`, `tb_gpc_7_3`: exhaustive over all inputs
  (the counter: all 8192 patterns).
- `tb_gpc_chain`: chains of 8 digits and 5 digits, random and extreme inputs,
  both carry-ins.
- `tb_row_adder`, `tb_adder_6_2`: even and odd widths, random and all-ones
  inputs.
- `tb_adder_tree_6_2`: a pure 6-2 tree (16×54) and a mixed tree with odd
  widths (15×16). It also checks the planned row counts.
- `tb_multi_input_adder`: the default 64×512 adder, end to end, with no
  parameter changed. It also checks the tree plan. It counts, through signals
  inside the tree, that each mechanism occurred: a carry passed between
  chained counters, a (7;3) counter receiving ones, rows passed down a level,
  the 2-1 level adding, and a sum reaching the top output bit.
- `tb_workloads`: nine of the published sizes (n = 16 with m = 16..162,
  n = 32 with m = 16 and 54, n = 64 with m = 16).

To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl rtl/mia_pkg.sv \
        tb/tb_multi_input_adder.sv -y rtl --top-module tb_multi_input_adder
    ./obj_dir/Vtb_multi_input_adder

Building the default 64×512 design takes about two minutes in Verilator.
The simulation itself takes well under a second.

Lint with `-Wall` reports unused bits. These are the unused stages of the
slice in `gpc_7_3`, the intermediate carries of `gpc_6_0_7_5`, and the top
bits of the final row adder, which are always zero. They are expected.

## Limits

- Inputs are unsigned. Signed or shifted operands, such as the partial
  products of a multiplier, are not handled.
- Only the combinational adder is provided. The compressor-tree and `+`
  operator circuits it was compared against are not part of this RTL, nor is
  the carry look-ahead final adder that was tried and found slower.
- Timing and slice counts depend on how the target tool places the chains.
  The RTL was checked for function only.
