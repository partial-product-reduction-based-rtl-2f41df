# Multiplier with look-up-table partial product reduction

Most parallel multipliers work in three steps: they form one partial product
per multiplier bit, reduce those rows to two with a tree of counters or
compressors, and add the two rows with a carry-propagate adder. This design
keeps the first and last steps. For the middle step it uses **LUT-Counters**
instead of full adders or [4:2] compressors. A LUT-Counter is a small
memory. The partial product bits of a block of rows and columns drive its
address lines. The word it reads back is the weighted number of ones in that
block, and every word is pre-calculated. Counters of this kind can take many
more inputs than a full adder (up to 15 here), so the tree needs fewer
levels. A 24-bit multiplication needs 3 levels and a 53-bit one needs 4,
where a Wallace tree of (3,2) counters needs 7 and 9.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017). It has no vendor
primitives. Each table is a constant computed at elaboration from the
formula it stores.

## LUT-Counters

A **(p,t,q) LUT-Counter** (`lut_counter`) takes a tile of `p` rows by `t`
adjacent columns. Bit `x[r][u]` has weight `2^u`. The tile drives `p*t`
address lines of a table with `2^(p*t)` words. Word `a` holds

    sum over r,u of a[r*t+u] * 2^u

on `q` output lines, where `q` is the smallest width that holds
`p*(2^t-1)`. Tile sizes and table sizes:

| counter | p | t | q | table, full | used where |
|---|---|---|---|---|---|
| (3,2)  | 3  | 1 | 2 | 16 bits | tests only |
| (7,3)  | 7  | 1 | 3 | 384 bits | tests only |
| (15,4) | 15 | 1 | 4 | 128 Kbit | every level but the last (pre-processed, see below) |
| (5,2), t=2 | 5 | 2 | 4 | 4 Kbit | last level |

The (5,2) counter with t=2 matters more than its ratio suggests. Its four
output bits land on four consecutive columns, and its tiles start every two
columns. So each column of the next matrix gets exactly two bits per group
of five rows. One level of these counters takes any matrix of up to five
rows straight to two rows.

## Pre-processing: storing only valid words

A full (15,4) table has 32,768 words. `lut_counter_pp` shrinks it with a
pre-processing step (`lut_preproc`) in front of the table, for `t = 1` and
odd `p`. The `p` input bits `w` are split into three fields:

- `w_l`: the upper `floor(p/2)` bits
- `w_m`: the middle bit
- `w_r`: the lower `floor(p/2)` bits

They are replaced by

    v_l = w_l | w_r      v_m = w_m      v_r = w_l & w_r      (bitwise)

For each pair of bits, `(a|b) + (a&b) = a + b`, so `v` has as many ones as
`w`. In `v`, however, every bit of `v_r` is a subset of the bit beside it in
`v_l`. Each pair `(v_l[i], v_r[i])` can only be `00`, `10` or `11`. That
leaves `2 * 3^floor(p/2)` possible words instead of `2^p`. Example for
p=7: `001 1 110` becomes `111 1 000`, and all eight words with three ones
in their outer fields and a 1 in the middle map to that value.

The table keeps only the valid words:

| counter | valid words | stored bits | full table | saving |
|---|---|---|---|---|
| (3,2)  | 6    | 12     | 16      | 25 % |
| (7,3)  | 54   | 162    | 384     | 57.8 % |
| (15,4) | 4374 | 17,496 | 131,072 | 86.7 % |
| (31,5) | 28,697,814 | ~143 Mbit | ~10.7 Gbit | 98.7 % (not built) |

The row decoder still sees all `p` address lines. It reads each pair as a
ternary digit `v_l[i] + v_r[i]`, and selects word
`2 * sum_i digit_i * 3^i + v_m`. That word holds `v_m + sum_i digit_i`.
This numbering of the word lines is one concrete choice. Any decoder that
enables one word line per valid address is equivalent.

## Reduction levels and the schedule

`reduction_stage` is one level of the tree. It cuts an `H_IN x W` bit matrix
into groups of `P` rows and tiles of `T` columns that start at multiples of
`T`. Every group-by-tile block feeds its own LUT-Counter. Bits beyond the
matrix edge read as 0. Output bit `j` of the counter on the tile at column
`s` goes to column `s+j`, in row `g*ceil(Q/T) + j/T` of the output. No two
counters write the same position. The output has
`H_OUT = ceil(H_IN/P) * ceil(Q/T)` rows and the same weighted sum modulo
`2^W`. Bits of weight `2^W` and above are dropped. For a product this
loses nothing, because the product fits in `W = 2N` bits.

`reduction_tree` chains the levels. It uses pre-processed (15,4) counters
while the matrix has more than five rows, then one level of (5,2) t=2
counters:

| N | heights per level | levels |
|---|---|---|
| 24 | 24 -> 8 -> 4 -> 2 | 3 |
| 53 | 53 -> 16 -> 8 -> 4 -> 2 | 4 |

The schedule functions are in `lut_pkg`: `counter_q`, `stage_out_height`,
`num_stages` and `height_after`. Parameters `P_BIG`, `P_FINAL` and
`T_FINAL` change it. `P_BIG` must be odd, because the pre-processing needs
a middle bit. The table sizes in the first section show the cost of a
larger `P_BIG`.

## The multiplier and its timing

`lut_multiplier` (the top) connects three parts:

- `pp_generator`: an AND array of unsigned operands (row `i` = `b[i] ? a<<i : 0`)
- `reduction_tree`
- `final_adder`: a word-level `x + y`, left to synthesis to map

Interface: `clk`, `rst_n` (synchronous, active low), `in_valid`, `a[N]`,
`b[N]` in; `out_valid`, `p[2N]` out. There is no back-pressure.

A register follows every reduction level and the final adder. A new pair
of operands can enter every cycle, and its product appears
`LATENCY = STAGES + 1` cycles later: 4 for N=24 and 5 for N=53. Each
reduction level is one table access. Every bit of a level's output
therefore has about the same delay, which makes the levels easy to balance
as pipeline segments. Only the valid flags are reset. The data registers
carry whatever they held until a valid result reaches them.

## How far the design follows its source, and where it departs

These parts follow the method as described:

- the counter notation and its table contents
- the table size `2^(p*t)*q`
- the OR/AND pre-processing
- the valid-word table sizes, which reproduce the published 12 bits,
  162 bits and 17.08 Kbit
- the use of (15,4) and (5,2) counters
- the 3 and 4 reduction levels for 24- and 53-bit factors

These are this design's own choices:

- the tile placement rule and the level schedule
- the word-line numbering of the compressed table
- unsigned AND-array partial products without Booth recoding
- the plain final adder
- pipeline register placement, the valid handshake and reset

Not built:

- organisations that reuse one table over several cycles, or share a
  multiport table between tiles, which are only named as options
- the (31,5) counter, whose pre-processed table alone is about 143 Mbit
- any delay or area model; timing in the source is given in gate-delay
  units only

## Files

| file | contents |
|---|---|
| `rtl/lut_pkg.sv` | counter width, table size and schedule functions |
| `rtl/lut_preproc.sv` | OR/AND pre-processing |
| `rtl/lut_counter.sv` | full-table (p,t,q) LUT-Counter, default (5,2) t=2 |
| `rtl/lut_counter_pp.sv` | pre-processed t=1 LUT-Counter, default (15,4) |
| `rtl/reduction_stage.sv` | one level of counters over a bit matrix |
| `rtl/reduction_tree.sv` | pipelined chain of levels down to two rows |
| `rtl/pp_generator.sv` | partial products |
| `rtl/final_adder.sv` | final addition |
| `rtl/lut_multiplier.sv` | top: segmented N x N multiplier, default N=24 |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_lut_multiplier_53.sv` | the top at N=53 |

## Simulating

Every testbench checks its results and ends with a
`TB_RESULT checks=<n> failures=<n>` line.

| testbench | what it covers |
|---|---|
| `tb_lut_preproc`, `tb_lut_counter`, `tb_lut_counter_pp` | every address of the (3,2), (7,3), (15,4) and (5,2) counters |
| `tb_reduction_stage` | weighted sums and output heights of random matrices |
| `tb_reduction_tree`, `tb_lut_multiplier`, `tb_lut_multiplier_53` | random and corner operands, with idle cycles mixed in; exact latency, in-order results, pipeline overlap |

Example with Verilator, run from the folder that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb rtl/lut_pkg.sv \
        tb/tb_lut_multiplier.sv --top-module tb_lut_multiplier -o sim
    ./obj_dir/sim

Each (15,4) counter instance carries its own 17,496-bit constant table,
and a 24-bit multiplier has about 150 of them. Elaboration is therefore
slower than the module's size suggests: a few minutes in some tools, and
full synthesis of the multiplier takes longer still.

To change the operand width, set `N` on `lut_multiplier`. The number of
levels and the latency follow from it. `STAGES` and `LATENCY` are
parameters derived from `N`, so leave them at their defaults.
