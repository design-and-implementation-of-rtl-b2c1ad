# Compressor-based Vedic multipliers: 4:2 compressor tree and Wallace tree

This RTL implements two unsigned, purely combinational N × N multipliers
(N = 32 by default, 64-bit product). Both start from the *Urdhva-Tiryakbhyam*
rule of Vedic arithmetic, "vertically and crosswise". Each column of the
product is the sum of all the crosswise digit products that land in it. In
binary, every digit product is one AND gate, so all of them can be formed at
once. The remaining work is to add up tall columns of single bits quickly.

Neither design adds those columns with rows of ordinary adders. Each uses
compressors, cells that take several bits of one column and hand back fewer
bits of higher weight. The two multipliers differ only in how they compress:

| multiplier                   | reduction                                           | stages for 32 rows      |
|------------------------------|-----------------------------------------------------|-------------------------|
| `vedic_c42_multiplier`       | 4:2 compressors, four rows → two per stage           | 4 (32→16→8→4→2)         |
| `vedic_wallace_multiplier`   | Wallace tree of full and half adders, three rows → two | 8 (32→22→15→10→7→5→4→3→2) |

Both end with a ripple-carry adder that merges the last two rows. The top,
`vedic_multiplier_top`, holds the two multipliers side by side, and each has
its own operand and product ports.

## Datapath

```
 in1[N-1:0] ─┐
             ├─ urdhva_pp_gen ── N rows of 2N bits ── c42_tree / wallace_tree ── row_s, row_c ── ripple_carry_adder ── p[2N-1:0]
 in2[N-1:0] ─┘      (N² AND gates)                     (sum row + carry row)                 (2N full adders)
```

There is no clock, reset, register or handshake. The ports are `in1`, `in2`
and `p`, all active high. `p` settles one propagation delay after the
operands change.

### Crosswise partial products (`urdhva_pp_gen`)

The Vedic rule multiplies digit by digit. The units digits are multiplied
vertically. Then the cross products (units × tens, tens × units) are added
into the next column. The rule continues like this up to the highest digits.
For two 2-digit decimal numbers, 21 × 23 gives 3, then 2·3 + 1·2 = 8, then
2·2 = 4, so the product is 483.

For N-bit binary operands, column k collects `a[k-i] & b[i]` for every valid
i. The generator lays these bits out as N rows, and row i holds
`(a & {N{b[i]}}) << i`. Reading down column k of the rows gives exactly
column k's crosswise products. This row form is what the reduction trees
consume. Row i is live only on bits i … i+N-1, and every other bit is the
constant 0.

### 4:2 compressor tree (`c42_tree`, `compressor_4_2`, `full_adder_mux`)

A 4:2 compressor takes four bits of one column, `x0..x3`, and a carry `cin`
from the column to its right. It returns `s` (weight 1) and two carries, `c`
and `cout` (both weight 2):

    x0 + x1 + x2 + x3 + cin = s + 2·(c + cout)

Inside are two full adders in series:

- The first adds `x0`, `x1` and `x2`. Its carry is `cout`.
- The second adds that sum, `x3` and `cin`, giving `s` and `c`.

`cout` never depends on `cin`. So when a whole row of compressors is chained
`cout → cin` across the columns, a carry moves exactly one column and stops.
There is no rippling, and the delay of a stage is that of two full adders
whatever the width.

Both full adders are the XOR/multiplexer type (`full_adder_mux`):

- `p = x1 ^ x2` and `sum = p ^ cin`.
- `carry = p ? cin : x1`. When the two operand bits are equal, either of them
  is the carry. When they differ, the carry equals `cin`.

One stage of `c42_tree` takes the rows four at a time. Each group gets one
compressor per column over all 2N columns. The group becomes a sum row and a
carry row, and the carry row is shifted one column left. Rows left over when
the count is not a multiple of four move down unchanged. A final group of
three rows is padded with a zero row. A power-of-two N halves the row count
at every stage.

Compressors are placed on every column, including columns where some inputs
are the constant 0. Logic optimisation removes those. At N = 32 the tree
places 960 compressors.

### Wallace tree (`wallace_tree`, `full_adder`, `half_adder`)

Each stage groups the rows three at a time from the top. Within a group,
every column is handled according to how many of its three bits can be
non-zero:

- three bits → a full adder (3:2 compressor),
- two bits → a half adder,
- one bit → passed on unchanged,
- none → nothing.

The sum outputs form the group's sum row. The carry outputs, one column to
the left, form its carry row. Rows that do not fill a group of three move to
the next stage, where they join new groups. Stages repeat until two rows
remain.

Which bits are live is known at elaboration. The function `row_mask()`
follows each row's live-bit mask through the stages:

- a sum row is live wherever any input of its group is,
- a carry row is live wherever at least two inputs are, shifted one column.

The generate loops place an FA, an HA or a wire from these masks. At N = 32
the tree holds 906 full adders and 160 half adders.

The full adder here is the classic two-half-adder form: two XOR/AND half
adders plus an OR of their carries, so `s = a^b^c` and `c = ab + bc + ac`.

A worked 4-bit case, 1010 × 1010:

1. The generator gives four rows: 1010, 10100, 000000 and 1010000.
2. The first three rows reduce to a sum row and a carry row.
3. Those two rows and the fourth partial product reduce again to two rows.
4. The final adder produces 1100100 (10 × 10 = 100).

### Final adder (`ripple_carry_adder`)

Both trees hand over a sum row and a carry row of 2N bits. A chain of 2N
`full_adder` cells adds them. The top carries of the trees, and the adder's
`cout`, are dropped. That is safe because the rows always add up to the
product, which fits in 2N bits, so those carries are provably zero.

The ripple adder is the simplest choice, not a fast one. Its delay grows
linearly with N and dominates at 32 bits. Swapping in a parallel-prefix adder
is a local change in the two multiplier modules.

## Parameters

| module                                            | parameter | default | meaning |
|---------------------------------------------------|-----------|---------|---------|
| `vedic_multiplier_top`, both multipliers, `urdhva_pp_gen` | `N` | 32 | operand width; 8, 16 and 32 are the sizes the design was evaluated at |
| `c42_tree`, `wallace_tree`                        | `N`, `W`  | 32, 2N  | number of rows, row width |
| `ripple_carry_adder`                              | `W`       | 64      | adder width |

Any `N >= 2` elaborates. Sizes that are not powers of two are tested too
(N = 7 in the tree testbenches).

## Where this RTL departs from, or goes beyond, the published design

- **Arrangement of the compressors.** The source says that the half and full
  adders of a Vedic multiplier are replaced by compressor-based adders. It
  does not say how the compressors are wired. The regular 4-to-2 row tree
  with `cout → cin` chaining, and the column-wise Wallace grouping of whole
  rows, are this design's reading of it.
- **Inside of the 4:2 compressor.** Two cascaded XOR/MUX full adders. Only
  the compressor's ports and its XOR/MUX full adder are given.
- **Final adder.** A ripple-carry adder was chosen. The published work does
  not describe its final adder.
- **No Booth recoding.** The published Wallace block's name carries an
  unexplained "R4B" tag, but the Wallace multiplier is described only with
  AND partial products and half/full adders, and that is what is built here.
- **Product width.** The published inner blocks have product buses wider
  than 64 bits (66 and 70 bits), trimmed to 64 at the top. Here every
  multiplier produces exactly 2N bits.
- **Other sutras and compressors.** The Nikhilam and Anurupye sutras are
  named but not described, and 7:2 compressors are mentioned but not
  described. None of them is built.
- **Unsigned only.** Operands are unsigned, which is what the published
  waveforms show.
- **Timing.** The published results are FPGA figures: 8/16/32-bit delays and
  LUT counts. No timing or area claim is made for this RTL.
- **Both multipliers in one top.** This is done for convenience. Each
  multiplier is a complete, independent module.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it covers |
|-----------|----------------|
| `tb_half_adder`, `tb_full_adder`, `tb_full_adder_mux` | exhaustive truth tables |
| `tb_compressor_4_2` | all 32 inputs: the counting identity, and that `cout` is independent of `cin` |
| `tb_urdhva_pp_gen` | every bit of every row at N = 8 (exhaustive), column populations and row sum at N = 32 |
| `tb_ripple_carry_adder` | W = 4 exhaustive, W = 64 corner cases (full-length carry) and random |
| `tb_c42_tree`, `tb_wallace_tree` | N = 32 random, N = 8 and N = 7 exhaustive; the two rows must add to a·b without overflow |
| `tb_vedic_c42_multiplier` | N = 16 and 32; includes 0x0F0F × 0x0F0F = 0x00E2C2E1 |
| `tb_vedic_wallace_multiplier` | N = 32 and 8 (exhaustive); includes 0x7FFFFFFF × 0xFFFFFFFE = 0x7FFFFFFE00000002 |
| `tb_vedic_multiplier_top` | the top at its defaults, 20 000+ operand pairs (see below) |
| `tb_vedic_sizes` | both multipliers at the evaluated sizes 8, 16 and 32 |

The top-level test does three things:

- It drives both multipliers with the same operands and compares their
  products with the integer product and with each other.
- It then drives them with different operands, which catches crossed ports.
- It counts how often each mechanism was exercised. The mechanisms are: a
  non-zero carry row out of each tree, a carry propagating in each final
  adder, and a product reaching bit 63. A mechanism that never occurs counts
  as a failure.

Every check is made one time step after the operands change, with no clock
edge in between. This confirms that the result is combinational, with zero
cycles of latency.

## Simulating

All modules are in `rtl/`, one per file, and every testbench is one file in
`tb/`. With Verilator 5:

```
verilator --binary --timing --assert -y rtl tb/tb_vedic_multiplier_top.sv \
          --top-module tb_vedic_multiplier_top -Mdir obj_top
./obj_top/Vtb_vedic_multiplier_top
```

Any other testbench runs the same way. The testbenches use no `timescale`
of their own; they only need time to advance between operand changes.

For a different size, set `N` on `vedic_multiplier_top` or on either
multiplier. The trees derive their stage count and cell placement from `N`
at elaboration.
