# Efficient Brent-Kung adder, 64 bits

A ripple-carry adder makes every bit wait for the carry of the bit below it, so
its delay grows linearly with the word length. A parallel-prefix adder instead
computes all carries at once with a tree of small "prefix cells", so the delay
grows with log2 of the width. The Brent-Kung tree is the prefix tree with the
fewest cells (about 2N), at the cost of roughly twice the depth of the fastest
trees.

This design is a Brent-Kung adder trimmed for area: wherever a prefix cell
produces a *final* carry, its group-propagate output is never used, so the full
"black" cell is replaced by a cheaper "gray" cell that computes only the group
generate. The carry input is folded into bit 0 before the tree, which turns
every prefix that reaches bit 0 into a final carry, and so every cell on those
paths can be gray. The 64-bit adder is two 32-bit such adders, the carry out of
the lower one feeding the carry input of the upper one.

Everything is combinational: there is no clock, register or reset.

## The two stages

For operands `a`, `b` and carry input `cin`:

1. **Pre-processing** (`ebk_preprocess`) forms, per bit,
   `p[i] = a[i] ^ b[i]` (propagate) and `g[i] = a[i] & b[i]` (generate).
2. **Generation** (`ebk_generation`) turns `(p, g, cin)` into the carry out of
   every bit, `c[i]`, using the prefix tree below, and then the sum
   `s[i] = p[i] ^ c[i-1]`, with `c[-1] = cin`.

`ebk_adder` is the two stages in series, for any power-of-two `WIDTH`.

## The prefix cells

A *group* `[j..i]` of bit positions is summarised by its generate `G` (the
group produces a carry out on its own) and its propagate `P` (a carry into the
group passes through it). Two adjacent groups, an upper one `(G1, P1)` and a
lower one `(G0, P0)`, combine into one:

| cell | module | outputs |
|---|---|---|
| black | `ebk_black_cell` | `G = G1 \| (P1 & G0)`, `P = P1 & P0` |
| gray  | `ebk_gray_cell`  | `G = G1 \| (P1 & G0)` only |
| carry input ("M") | `ebk_cin_cell` | `c0 = g0 \| (p0 & cin)` |

Once a group reaches down to bit 0, with the carry input already folded into
bit 0 by the M cell, its `G` *is* the carry out of its top bit and its `P` is
never read again. Such a combine is a gray cell.

## The carry tree

This is the part worth reading carefully. `ebk_generation` builds the tree
with generate loops over `L = log2(WIDTH)` levels, in two sweeps.

**Up-sweep**, levels `l = 0 .. L-1`. Position `i` is combined at level `l` when
`(i+1)` is a multiple of `2^(l+1)`. It takes its current group (which spans
`2^l` bits) and the group that ends at `i - 2^l`, so after the combine it spans
`2^(l+1)` bits. At level `l` only `i = 2^(l+1) - 1` reaches bit 0. That one is a
gray cell and all the others are black. After the up-sweep, positions
1, 3, 7, 15, ... already hold final carries.

**Down-sweep**, levels `l = L-2 .. 0`. Position `i = k*2^(l+1) + 2^l - 1`, with
`k >= 1`, combines its group with the final carry at `i - 2^l`. The lower
operand is always a finished prefix, so every down-sweep cell is gray.

For the 16-bit case:

| level | sweep | combining positions | cells |
|---|---|---|---|
| 0 | up   | 1,3,5,...,15 | 1 gray (1), 7 black |
| 1 | up   | 3,7,11,15    | 1 gray (3), 3 black |
| 2 | up   | 7,15         | 1 gray (7), 1 black |
| 3 | up   | 15           | 1 gray |
| 2 | down | 11           | 1 gray |
| 1 | down | 5,9,13       | 3 gray |
| 0 | down | 2,4,...,14   | 7 gray |

In general a `WIDTH`-bit tree has `WIDTH - 1 - log2(WIDTH)` black cells and
`WIDTH - 1` gray cells, plus the M cell. That gives 11 black and 15 gray cells
at 16 bits, where an all-black tree would need 26 black cells. At 32 bits it is
26 black and 31 gray. The deepest path runs through `2*log2(WIDTH) - 1` prefix
cells.

Between levels, the group signals are held in arrays
`gu/pu[level][bit]` (up-sweep) and `gd/pd[level][bit]` (down-sweep). A
position that does not combine at a level passes its signals on unchanged. The
propagate slot of a finished prefix is tied to 0 because nothing reads it.

## 64 bits from two 32-bit slices

`ebk_adder64` (the top) has parameters `WIDTH = 64` and `SLICE = 32`. It
instantiates `WIDTH/SLICE` copies of `ebk_adder #(SLICE)` and chains them: the
`cout` of slice `k` is the `cin` of slice `k+1`. So carries cross a slice
boundary only in this ripple step. Setting `SLICE = 64` gives a single 64-bit
Brent-Kung tree instead. `SLICE` must be a power of two that divides `WIDTH`.

## Interface

All the adder modules share the same ports:

| port | dir | width | meaning |
|---|---|---|---|
| `a`, `b` | in | WIDTH | operands, unsigned (two's-complement works the same way) |
| `cin` | in | 1 | carry input |
| `s` | out | WIDTH | sum, `{cout, s} = a + b + cin` |
| `c` | out | WIDTH | `c[i]` = carry out of bit `i`, i.e. bit `i+1` of `a[i:0] + b[i:0] + cin` |
| `cout` | out | 1 | carry out of the top bit (`c[WIDTH-1]`) |

The outputs settle one combinational delay after the inputs change. To use the
adder in a clocked design, register its inputs and/or outputs around it.

## Where this follows the source and where it chooses

Taken from the source design: the pre-processing and generation stages; the
black-cell, gray-cell and sum equations; the carry-input cell feeding bit 0;
gray cells substituted for black ones; the 8-, 16-, 32- and 64-bit sizes; and
the 64-bit adder built as two 32-bit additions chained through their carries.

Choices made here:

- **Cell placement.** The source draws the tree only as groups of cells. The
  placement here is the standard Brent-Kung tree. Gray cells are used wherever
  the lower operand already reaches bit 0. This is the largest substitution
  that stays correct.
- **Carry-input cell.** This cell computes `g0 | (p0 & cin)`, the same form as
  the other cells, which is the carry out of bit 0.
- **Propagate.** The propagate is the XOR of the operand bits, which is what
  the sum equation needs.
- **Gray-cell gates.** The gray cell is one AND and one OR gate.
- **Ports.** `cout` and the carry vector `c` are brought out as ports.
- **Timing.** The design has no clock or reset.
- **Power-of-two widths.** `WIDTH` must be a power of two, which covers every
  size the source uses.

Not reproduced: the source reports FPGA delay (11.2, 12.2 and 13.275 ns for
8, 16 and 64 bits) and synthesis-tool memory figures. These depend on its FPGA
flow, not on the RTL.

## Verification

Each module has a self-checking testbench in `tb/`, named `tb_<module>`. Each
prints `TB_RESULT checks=N failures=M` at the end.

- `tb_ebk_black_cell`, `tb_ebk_gray_cell` and `tb_ebk_cin_cell` are
  exhaustive over all input combinations.
- `tb_ebk_preprocess` compares each bit with a one-bit addition.
- `tb_ebk_generation` runs the stage at 8, 16, 32 and 64 bits on random and
  structured `p`/`g` vectors, including long propagate runs. It compares every
  carry and sum bit with a bit-serial carry recurrence.
- `tb_ebk_adder` runs 8, 16 and 32 bits against integer addition and checks
  every internal carry.
- `tb_ebk_adder64` runs the top at its default parameters against 65-bit
  integer addition. It fails unless each of these happened at least once: a
  carry input that changes the result, a carry crossing the slice boundary, a
  carry travelling all 64 bits, and an overflow.
- `tb_ebk_adder64_slices` checks the top built as one 64-bit tree
  (`SLICE = 64`) and as four 16-bit slices (`SLICE = 16`).

To simulate with Verilator, for example the top:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
          --top-module tb_ebk_adder64 tb/tb_ebk_adder64.sv
./obj_dir/Vtb_ebk_adder64
```

## Files

| file | content |
|---|---|
| `rtl/ebk_adder64.sv` | top: slices chained by carry |
| `rtl/ebk_adder.sv` | one efficient Brent-Kung adder (pre-processing + generation) |
| `rtl/ebk_preprocess.sv` | bit propagate / generate |
| `rtl/ebk_generation.sv` | carry tree and sum |
| `rtl/ebk_black_cell.sv`, `rtl/ebk_gray_cell.sv`, `rtl/ebk_cin_cell.sv` | prefix cells |
| `tb/tb_*.sv` | testbenches |
