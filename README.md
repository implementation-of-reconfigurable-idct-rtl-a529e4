# Reconfigurable multistandard 1-D IDCT

A video decoder that handles MPEG-2, MPEG-4 ASP, H.264/AVC and VC-1 needs
several inverse transforms: the 8-point IDCT of MPEG (real cosine constants),
the 8-point and 4-point integer transforms of H.264, the 4x4 Hadamard
transform of H.264's DC terms, and the 8-point and 4-point integer transforms
of VC-1 (which VC-1 combines into 8x8, 8x4, 4x8 and 4x4 blocks). Building one
transform unit per standard wastes area. This design is a single
one-dimensional IDCT unit that does all of them. The transform is chosen row
by row, and the unit has no multipliers.

The main idea is that all these transforms have the same matrix *pattern*.
They differ only in the values of seven constants a..g:

| mode         | a   | b   | c   | d   | e  | f   | g   |
|--------------|-----|-----|-----|-----|----|-----|-----|
| `MODE_MPEG8` | 181 | 251 | 213 | 142 | 50 | 237 | 98  |
| `MODE_AVC8`  | 8   | 12  | 10  | 6   | 3  | 8   | 4   |
| `MODE_VC1_8` | 12  | 16  | 15  | 9   | 4  | 16  | 6   |
| `MODE_VC1_4` | 17  |     |     |     |    | 22  | 10  |
| `MODE_AVC4`  | 1   |     |     |     |    | 1   | 1/2 |
| `MODE_HAD4`  | 1   |     |     |     |    | 1   | 1   |

The MPEG constants are `round(256 * cos(j*pi/16))`, so MPEG results carry
8 fraction bits. This precision is a choice of this implementation.

## The decomposition

An 8-point inverse transform of this family splits into an even half, an odd
half and a butterfly:

```
E0 = a x0 + f x2 + a x4 + g x6        O0 = b x1 + c x3 + d x5 + e x7
E1 = a x0 + g x2 - a x4 - f x6        O1 = c x1 - e x3 - b x5 - d x7
E2 = a x0 - g x2 - a x4 + f x6        O2 = d x1 - b x3 + e x5 + c x7
E3 = a x0 - f x2 + a x4 - g x6        O3 = e x1 - d x3 + c x5 - b x7

y[n] = En + On,   y[7-n] = En - On      (n = 0..3)
```

The even half is a 4-point transform in its own right: `[a f a g]` is exactly
the pattern of the VC-1 and H.264 4-point matrices. A 4-point row therefore
uses only the even half. Its four coefficients are steered to the positions
x0, x2, x4 and x6, and the butterfly is bypassed.

## Products without multipliers: the subunits

Each input needs only the few constants its column uses, so each input gets
its own subunit:

| subunit     | inputs             | produces         | adders |
|-------------|--------------------|------------------|--------|
| `a_unit`    | x0, x4             | a*x              | 3      |
| `fg_unit`   | x2, x6             | f*x, g*x         | 5      |
| `bcde_unit` | x1, x3, x5, x7     | b*x, c*x, d*x, e*x | 7    |

Each constant of each standard is written as a sum of shifted terms. Two
kinds of sharing keep the adder count down:

* **Factor sharing.** A partial sum that several constants contain is built
  once and then shifted. In `bcde_unit`, 3x and 5x serve every standard. The
  MPEG constants c = 213 = 3·71 and d = 142 = 2·71 both come from one 71x
  term.
* **Adder sharing.** Only one standard is active at a time. So one adder can
  compute a term of standard A or a term of standard B, with a multiplexer
  choosing its operands by mode. In `bcde_unit`, the adder that forms MPEG's
  7x forms VC-1's c = 15x. The adder that forms MPEG's 71x forms VC-1's
  d = 9x.

Each subunit's file has a comment listing its adders one by one. The H.264
4-point g = 1/2 is an arithmetic right shift by one bit. That matches the
H.264 standard exactly, including how it truncates.

## Adder tree and timing

`adder_tree` takes the 16 odd and 6 even products. It has three registered
levels:

1. pairwise sums (the even half is itself a small butterfly)
2. E0..E3 and O0..O3
3. the output butterfly, or the 4-point bypass

`mstd_idct1d` registers the subunit outputs in front of the tree. The whole
unit therefore has a latency of **4 cycles** and accepts **one row per
cycle**. Mode changes cost nothing, because every row carries its mode
through the pipeline. There is no back-pressure. `out_valid` is a delayed
copy of `in_valid`.

## Interface of `mstd_idct1d`

| port        | dir | width           | meaning |
|-------------|-----|-----------------|---------|
| `clk`       | in  | 1               | clock |
| `rst_n`     | in  | 1               | asynchronous active-low reset; it clears only the valid pipeline |
| `in_valid`  | in  | 1               | a row is present on `x` |
| `mode`      | in  | `idct_mode_e`   | transform for this row (see `idct_pkg`) |
| `x[8]`      | in  | `IN_W` signed   | coefficients; a 4-point row uses `x[0..3]` and `x[4..7]` are ignored |
| `out_valid` | out | 1               | result row present (4 cycles after `in_valid`) |
| `out_mode`  | out | `idct_mode_e`   | mode of that row |
| `y[8]`      | out | `IN_W+12` signed| results; a 4-point row gives `y[0..3]`, and `y[4..7]` are 0 |

`IN_W` defaults to 16. Products are `IN_W+9` bits wide. Outputs are `IN_W+12`
bits wide, enough for full-scale inputs in every mode. An assertion flags a
valid row whose mode code is not one of the six defined codes.

**Results are not normalised.** `y` is the exact integer matrix product. The
scaling each standard applies afterwards is left to the surrounding logic:

* VC-1: `(v + 4) >> 3` after the row pass and `(v + 64) >> 7` after the
  column pass.
* MPEG: remove the 2^8 carried by the constants, and apply the standard's 1/2
  per pass.
* H.264 8-point: `y` is the product with the integer matrix. That is 8 times
  what the standard's shift-based butterfly gives, without the butterfly's
  intermediate truncation. Bit-exact H.264 8x8 output would need that
  butterfly.

## 2-D transforms

The unit is one-dimensional. For a 2-D block, pass the rows through it, scale
them, transpose them, and pass the columns through it. Pick the mode for each
pass: a VC-1 8x4 block uses 8-point rows and 4-point columns. An 8x8 block
takes 16 passes, and a 4x4 block takes 8. The transpose buffer between the
two passes is not part of this RTL. The end-to-end testbench plays that role.

## Where this design makes its own choices

The following come from the architecture this RTL implements:

* the decomposition into an even half, an odd half and a butterfly
* the a(x), fg(x) and bcde(x) subunits and their adder budgets (3, 5, 7)
* factor and adder sharing
* the adder tree that holds the butterfly
* eight parallel inputs per row

The following are choices of this implementation:

* the exact shift-add decompositions and which adders are shared
* the 8-bit MPEG constants
* the 16-bit input width
* the pipeline depth and the valid signalling
* how 4-point rows are mapped onto the even half
* including the Hadamard transform as a mode of the same unit
* leaving normalisation outside

## Files

* `rtl/idct_pkg.sv`: mode enum, width constants, `is_4pt()`
* `rtl/a_unit.sv`, `rtl/fg_unit.sv`, `rtl/bcde_unit.sv`: the subunits
* `rtl/adder_tree.sv`: the three-level tree with the butterfly
* `rtl/mstd_idct1d.sv`: the top
* `tb/idct_ref_pkg.sv`: the reference model. It builds each matrix entry from
  the cosine index of the DCT basis and looks up (or, for MPEG, computes) the
  constant, so it does not depend on the RTL's decomposition.
* `tb/tb_*.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.

`tb_mstd_idct1d` runs at the default parameters. It streams 3000 random rows
with random mode switches, idle gaps and full-scale inputs, and checks every
row and the 4-cycle latency. It then runs 20 blocks of each 2-D type listed
above through a row pass and a column pass. It also counts each mechanism
(every mode, mode switches, back-to-back rows, gaps, bypass, full-scale rows,
every block type) and fails if one never happened.

## Simulating

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/idct_pkg.sv tb/idct_ref_pkg.sv tb/tb_mstd_idct1d.sv \
    --top-module tb_mstd_idct1d -o sim
./obj_dir/sim
```

Replace `tb_mstd_idct1d` with `tb_a_unit`, `tb_fg_unit`, `tb_bcde_unit` or
`tb_adder_tree` to test a single module. Each run takes well under a second.

## Limits

* Output normalisation and the transpose buffer are outside the unit.
* H.264 8x8 is computed in matrix form, not with the standard's truncating
  butterfly.
* The odd half and its four subunits sit idle during 4-point rows. Two
  4-point rows per cycle would need a different odd-half mapping, which this
  design does not attempt.
* No synthesis timing or device results are given here. The design is plain
  synthesizable SystemVerilog with no vendor primitives.
