# Parallel 8-bit squarer with a folded partial-product matrix

This is a combinational circuit that computes `sq = x * x` for an unsigned
N-bit `x`. N is 8 by default, and 4, 6 and 7 are also supported. A general
N×N multiplier would need N² AND gates. This squarer uses only N(N-1)/2 of
them, because the partial products of a square contain two kinds of
redundancy:

1. **Diagonal terms need no gate.** `x_i · x_i = x_i`, so the bit `x_i` is
   wired straight into column 2i.
2. **Symmetric terms fold.** `x_i · x_j` and `x_j · x_i` (i < j) are the same
   bit and both have weight 2^(i+j). Their sum is that bit times two, so one
   copy moves one column to the left, into column i+j+1, and the other copy
   is dropped.

The smaller matrix that results is summed by a Wallace tree of full and half
adders, followed by one carry-propagate adder.

## The folded matrix (N = 8)

Column c has weight 2^c. Within a column the order of the terms does not
matter. `sq_pp_gen` stacks each column's cross products by ascending lower
index, then puts the diagonal bit on top.

| col | terms | | col | terms |
|----:|-------|-|----:|-------|
| 0 | x0 | | 8 | x0x7 x1x6 x2x5 x3x4 x4 |
| 1 | — (constant 0) | | 9 | x1x7 x2x6 x3x5 |
| 2 | x0x1 x1 | | 10 | x2x7 x3x6 x4x5 x5 |
| 3 | x0x2 | | 11 | x3x7 x4x6 |
| 4 | x0x3 x1x2 x2 | | 12 | x4x7 x5x6 x6 |
| 5 | x0x4 x1x3 | | 13 | x5x7 |
| 6 | x0x5 x1x4 x2x3 x3 | | 14 | x6x7 x7 |
| 7 | x0x6 x1x5 x2x4 | | 15 | — |

The matrix has 28 AND terms plus 8 plain wires, 36 bits in all. The column
heights, from column 0 up, are `1 0 2 1 3 2 4 3 5 3 4 2 3 1 2 0`. The
tallest column, column 8, holds 5 bits. Result bit 1 is always 0. Bit 15
is needed only for the carry out of column 14.

For any N, the following rule places every term:

- x_i·x_j with i < j goes into column i+j+1;
- x_i goes into column 2i.

`sq_pkg::pp_height(N, c)` gives the height of column c.

## The Wallace tree

`sq_wallace_tree` knows nothing about squaring. It adds every bit of a
column-ordered matrix at its column's weight. Its structure comes from
column heights alone, computed at elaboration time by functions in
`sq_pkg`. Each layer applies the following rule to every column at once.
Call the column's height h:

- it places floor(h/3) full adders;
- it places a half adder if two bits are left over;
- a single leftover bit passes straight through.

Each adder's sum stays in its column and its carry goes to the next column
up, in the next layer. Layers are added until no column holds more than two
bits. This is Wallace's greedy rule: reduce as much as possible in every
layer. Half adders are therefore used on two-bit columns as well.

For N = 8 the column heights (column 0 first) evolve as:

```
matrix   1 0 2 1 3 2 4 3 5 3 4 2 3 1 2 0
layer 1  1 0 1 2 1 2 3 2 3 3 3 2 2 2 1 1    7 FA, 5 HA
layer 2  1 0 1 1 2 1 2 2 2 2 2 2 2 2 2 1    4 FA, 6 HA
```

So the tree has two layers, with 11 full adders and 11 half adders in all.
A 16-bit carry-propagate adder then adds the two remaining rows. It is
written as `+`, so a synthesis tool can pick the adder architecture. Carries
out of column 2N-1 are not connected. For a square they are always zero,
because x² < 2^(2N).

After synthesis the whole 8-bit squarer has 28 AND gates in the partial
products, 11 full adders, 11 half adders and one 16-bit adder.

Inside the tree, the bits of column c in layer l+1 are ordered as follows:

1. the sums of that column's full adders;
2. its half-adder sum;
3. its pass-through bits;
4. the carries that arrive from column c-1.

The constant `CBASE` in `sq_wallace_tree` is the row where a column's
carries land in the next column up.

## Interface and timing

```
module squarer_top #(parameter int N = 8) (
  input  logic [N-1:0]   x,
  output logic [2*N-1:0] sq
);
```

The design has no clock, no reset and no handshake. `sq` is valid one
combinational delay after `x` changes. That delay runs through one AND
level, the tree layers (two full-adder delays for N = 8) and the final adder.
To fit the squarer into a clocked system, register its input and output
around it.

Settings of N and the tree each one gives (all computed by `sq_pkg`):

| N | layers | full adders | half adders |
|--:|-------:|------------:|------------:|
| 4 | 1 | 1 | 2 |
| 6 | 2 | 4 | 9 |
| 7 | 2 | 7 | 10 |
| 8 | 2 | 11 | 11 |

The package functions are sized for N up to 32 (`sq_pkg::MAX_N`).

## Files

| file | contents |
|------|----------|
| `rtl/sq_pkg.sv` | elaboration-time functions: matrix heights, tree layers and adder counts |
| `rtl/sq_pp_gen.sv` | folded partial-product matrix |
| `rtl/sq_full_adder.sv`, `rtl/sq_half_adder.sv` | the tree's 3:2 and 2:2 counters |
| `rtl/sq_wallace_tree.sv` | adder layers and final adder, generated from the heights |
| `rtl/squarer_top.sv` | top: generator plus tree |
| `tb/tb_squarer_top.sv` | all 256 operands at the default N = 8, end to end |
| `tb/tb_squarer_sizes.sv` | all operands at N = 4, 6 and 7 |
| `tb/tb_sq_pp_gen.sv` | per-column one-counts of the matrix for every operand |
| `tb/tb_sq_wallace_tree.sv` | random, single-bit and all-ones matrices; checks the tree's geometry |

## Verification

Every testbench checks itself. It prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. The expected values
are computed independently in each testbench:

- **Top and other sizes:** results are compared against `v*v`.
- **Partial-product generator:** the testbench counts the expected ones in
  each column directly from the operand bits. It also checks that the
  weighted matrix sum equals `v*v`.
- **Wallace tree:** the testbench computes the weighted bit count modulo
  2^(2N).

The end-to-end test also counts how often each mechanism is exercised, and
fails if one of them never is:

- a diagonal bit that is 1;
- a folded cross product that is 1;
- a carry in the final adder.

Each testbench was also run against a deliberately broken copy of its
module, and every broken copy made it fail:

- cross products formed with OR instead of AND;
- one row dropped from column 9 before the final adder;
- bit 0 of the operand stuck at 0.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wall -Wno-UNUSEDSIGNAL \
  rtl/sq_pkg.sv rtl/sq_full_adder.sv rtl/sq_half_adder.sv \
  rtl/sq_pp_gen.sv rtl/sq_wallace_tree.sv rtl/squarer_top.sv \
  tb/tb_squarer_top.sv --top-module tb_squarer_top
./obj_dir/Vtb_squarer_top
```

To run a different test, replace the last file and the `--top-module`
name. Each run takes well under a second.

## What this RTL does not include

- **Further Boolean rewriting of result bits.** The design approach goes
  beyond the folded matrix. It calls for rewriting each result bit's
  equation algebraically and for reusing terms already formed for lower
  bits. No such rewritten equations are defined here. The RTL stops at the
  folded matrix above. It leaves any further logic minimisation to the
  synthesis tool.
- **Choices this RTL makes where the design description is silent:**
  - the adder-tree rule (greedy Wallace);
  - the final adder (behavioural `+`);
  - the operand being unsigned;
  - the purely combinational timing.
- **Published delay, power and area.** The figures reported for this
  squarer come from a 180 nm CMOS standard-cell implementation:

  | N | delay | power | area |
  |--:|------:|------:|-----:|
  | 4 | 0.64 ns | 34.7 µW | 189.6 µm² |
  | 8 | 3.62 ns | 444.86 µW | 1633.2 µm² |

  RTL simulation cannot reproduce them, and no timing is checked here.

## Changing it

- **Operand width:** set `N`. The matrix, the number of tree layers and the
  adder placement all follow automatically.
- **Pipelining:** add registers on `x` and `sq`. For a deeper pipeline,
  register `m[l]` between layers inside `sq_wallace_tree`.
- **Tree rule:** the rule lives in `sq_pkg::wt_height` and the
  `wt_nfa`/`wt_nha`/`wt_npass` functions, and the generate loops follow
  them. A Dadda-style rule would change only those functions. Update the
  geometry check in `tb_sq_wallace_tree` to match.
