# Approximate 4-2 compressors and 8x8 approximate Dadda multipliers

A fast multiplier spends most of its area, power and delay in the tree
that adds up the partial products. In an exact tree, the workhorse cell is
the 4-2 compressor: it takes four bits of one column plus a carry from the
column to its right, and returns a sum bit, a carry bit for the next stage
and a carry for the column to its left. This design replaces that cell with
two much simpler approximate cells, which are wrong for a few input patterns
and then only by one unit. It builds four 8x8 unsigned multipliers from them.
In two multipliers every compressor is approximate. In the other two only the
low-order columns are, so the errors stay small where they matter.

Everything here is combinational: there is no clock and no register. Each
multiplier is an AND-gate partial product array, a two-stage Dadda reduction
and an exact final adder. The approximation lives only in the reduction.

## The three compressor cells

All three cells use the same weights: inputs `x1..x4` and `cin` have weight
1, `sum` has weight 1, and `carry` and `cout` have weight 2. `cout` never
depends on `cin`, so a row of slices has no rippling carry.

| cell | equations | wrong patterns |
|---|---|---|
| exact (`exact_compressor42`) | two full adders: `cout = maj(x1,x2,x3)`; `{carry,sum}` = full adder of (that sum, `x4`, `cin`) | none |
| Design 1 (`approx_compressor42_d1`) | `carry = cin`; `sum = ~cin & (~(x1^x2) \| ~(x3^x4))`; `cout = (x1\|x2) & (x3\|x4)` | 12 of 32 |
| Design 2 (`approx_compressor42_d2`) | no `cin`/`cout`; `carry = (x1\|x2) & (x3\|x4)`; `sum = ~(x1^x2) \| ~(x3^x4)` | 4 of 16 |

How the approximations work:

- Design 1 starts from the fact that the exact `carry` equals `cin` in 24 of
  the 32 cases, and makes it a wire.
- Design 1 then keeps `sum` at 0 whenever `cin` is 1.
- Design 1 picks `cout` so that every error is at most one unit.
- Design 2 swaps Design 1's `carry` and `cout` roles and drops the sideways
  carry altogether. This leaves a two-level, four-input, two-output cell.

Design 2 is wrong for exactly four patterns of `x4 x3 x2 x1`. It returns
one unit too much for `0000`, and one unit too little for `0011`, `1100`
and `1111`. Design 1 has the same four errors when `cin = 0`, and eight more
when `cin = 1`: five of those are one unit too much and three one unit too
little. Both cells therefore turn an all-zero input into a 1.

Which inputs are paired matters. The approximate cells pair `x1` with `x2`
and `x3` with `x4`. Feeding the same four bits in another order changes the
result. That is why the reduction modules fix the order of every cell input
(see below).

`compressor42` wraps the three cells behind one port list, chosen by the
`KIND` parameter (`cmp42_pkg::cmp_kind_e`). For Design 2 it ignores `cin` and
ties `cout` to 0.

## The four multipliers

| variant (`cmp42_pkg::mult_kind_e`) | compressor cells | reduction layout |
|---|---|---|
| `MULT_EXACT` (reference) | exact everywhere | A |
| `MULT_1` | Design 1 everywhere | A |
| `MULT_2` | Design 2 everywhere | B |
| `MULT_3` | Design 1 in columns 0..6, exact in columns 7..14 | A |
| `MULT_4` | Design 2 in columns 0..6, exact in columns 7..14 | A |

With n = 8, "columns 0..6" are the n-1 least significant product columns and
"columns 7..14" are the n most significant. `cmp42_pkg::cmp_for_column` holds
this rule. Multipliers 3 and 4 keep the exact cells on the critical columns,
so they are no faster than the exact tree. They save power in the low
columns, and their errors are two orders of magnitude smaller than those of
Multipliers 1 and 2.

## The reduction layouts (the part to read carefully)

The 8x8 partial product matrix has columns 0..14. Column heights are
1,2,...,8,...,2,1, and column `c` holds `pp[j][c-j]`. Rows are numbered from
the top, row `j` being `a & b[j]`. Both layouts reduce the matrix to four
bits per column in stage 1, and to two bits per column in stage 2.

### Layout A (`dadda8_reduction_a`): cells with sideways carries

Stage 1 uses 2 half adders, 2 full adders and 8 compressors:

| column | devices (rows of the matrix they take) |
|---|---|
| 4 | half adder on rows 0,1 |
| 5 | compressor on rows 0..3 |
| 6 | compressor on rows 0..3; half adder on rows 4,5 |
| 7 | compressor A on rows 0..3; compressor B on rows 4..7 |
| 8 | compressor A on rows 1..4; compressor B on rows 5..7 plus B's cout from column 7 as `x4` |
| 9 | compressor on rows 2..5; full adder on rows 6,7 plus cout of compressor B of column 8 |
| 10 | compressor on rows 3..6 |
| 11 | full adder on rows 4,5 plus cout of column 10 |

Stage 2 uses a half adder in column 2, one compressor in each of columns
3..12, and a full adder in column 13 that also takes the last cout.

Carry rules:

- Inside a stage, a compressor's `cout` drives the `cin` of the compressor
  one column to the left.
- The first compressor of each chain takes the carry of the half adder to
  its right as `cin`. These are column 5 in stage 1 and column 3 in stage 2.
- A Design 2 cell has no `cin`. In that case the half-adder carry simply
  passes to the next stage.
- Compressor B of column 7 and compressor B of column 8 start with
  `cin = 0`.

The order in which stage-1 results enter the stage-2 cells is written out
column by column in `s1[...]` in the RTL.

Layout A serves the exact multiplier and Multipliers 1, 3 and 4. How much to
trust the unprinted details (cin sources, input order):

- With them, the exact variant gives `a*b` for all 65536 operand pairs.
- Multipliers 3 and 4 reproduce the published error figures exactly (table
  below).
- The same details give Multiplier 1 somewhat different figures from the
  published ones.

### Layout B (`dadda8_reduction_b`): Design 2 only

Design 2 cells cannot absorb a neighbour's cout. The layout therefore uses
more half adders: 6 half adders, 1 full adder and 17 compressors.

| column | stage 1 |
|---|---|
| 4 | half adder on rows 0,1 |
| 5 | compressor on rows 0..3 |
| 6 | compressor on rows 0..3; half adder on rows 4,5 |
| 7 | two compressors, rows 0..3 and 4..7 |
| 8 | compressor on rows 1..4; full adder on rows 5..7 |
| 9 | compressor on rows 2..5; half adder on rows 6,7 |
| 10 | compressor on rows 3..6 |
| 11 | half adder on rows 4,5 |

Stage 2 uses half adders in columns 2 and 13, and a compressor in each of
columns 3..12.

### Final adder

`cpa_adder` adds the two 15-bit rows exactly (a plain `+`, left to
synthesis) and gives the 16-bit product.

## Zero operands

Both approximate cells output 1 for an all-zero input. A zero operand
therefore feeds all-zero columns into the tree, and all four approximate
multipliers return a non-zero product: 511 of the 65536 operand pairs are
wrong. `zero_detect` NORs each operand and forces the product to 0 when
either is zero. `approx_mult8_top` puts one behind each multiplier when
`ZERO_DETECT = 1`, which is the default. The error figures below are, as
usual for these multipliers, over the 65025 pairs with both operands
non-zero.

## Accuracy

These figures come from an exhaustive simulation of all 65025 non-zero
operand pairs. NED is |p - a*b| / 65025.

| variant | exact products | mean NED | largest excess | largest shortfall | published |
|---|---|---|---|---|---|
| Multiplier 1 | 134 | 5.436e-2 | 0.1528 | 0.1403 | 103, 6.065e-2, 0.1593, 0.1375 |
| Multiplier 2 | 563 | 5.017e-2 | 0.1259 | 0.1336 | 458, 5.352e-2, 0.1278, 0.1329 |
| Multiplier 3 | 5888 | 0.9199e-3 | 0.3199e-2 | 0.2707e-2 | same |
| Multiplier 4 | 9320 | 0.7827e-3 | 0.1845e-2 | 0.3076e-2 | same |

Multipliers 3 and 4 match the published numbers digit for digit.
Multipliers 1 and 2 are within about 10 % on mean NED but not identical.
Their wiring differs in details that the published diagrams do not pin down:

- which bits are paired in the cells above column 6;
- for layout B, the position of every cell input.

In the variations tried, changing only the pairing of cell inputs brought
each of them close to, but never onto, all four published figures. So the
difference is probably in which bits the half and full adders take. Treat
Multipliers 1 and 2 as faithful in structure and cell count, but not
bit-exact to the original.

The mean NED per interval of the exact product behaves as described for
these multipliers. There are 127 intervals of 512: 0..512, 513..1024, ...,
64513..65025. For Multipliers 1 and 2 the error is concentrated at very small
and very large products: about 0.12 in the first and last intervals, against
about 0.04 in the middle.

## Blending images

A typical use is blending two 8-bit images by multiplying them pixel by
pixel, with each colour channel handled separately. The output pixel is the
top byte of the product, and quality is the PSNR against the exact blend:
`10*log10(255^2 / MSE)`, where MSE is the mean squared pixel difference.
`tb_image_multiplication` generates two 128x128 test images. One is a
diagonal ramp with black and white bands. The other is a checkerboard of
five grey levels, 0 and 255 included, with some noise. Results:

| variant | PSNR | average NED |
|---|---|---|
| Multiplier 1 | 25.8 dB | 3.5e-2 |
| Multiplier 2 | 26.5 dB | 3.1e-2 |
| Multiplier 3 | 57.0 dB | 0.065e-2 |
| Multiplier 4 | 56.8 dB | 0.062e-2 |

Multipliers 3 and 4 are visually lossless. Multipliers 1 and 2 are only
usable where coarse results are acceptable. Published results on real
photographs show the same ranking, at 25 to 26 dB and 53 to 55 dB. The
figures depend on the images, so treat them as orders of magnitude.

## Files and hierarchy

```
approx_mult8_top            four multipliers + zero correction, ports a, b, p1..p4, zero
  approx_mult8 #(MULT)      one multiplier variant, ports a, b, p
    pp_gen_and              AND-gate partial products, pp[j][i] = a[i] & b[j]
    dadda8_reduction_a      layout A (exact, Multipliers 1, 3, 4)
      compressor42 #(KIND)  cell selector
        exact_compressor42, approx_compressor42_d1, approx_compressor42_d2
      full_adder, half_adder
    dadda8_reduction_b      layout B (Multiplier 2)
      approx_compressor42_d2, full_adder, half_adder
    cpa_adder               exact final adder
  zero_detect               zero-operand correction
cmp42_pkg                   cell and variant enums, per-column cell rule
```

Parameters and their defaults:

- `approx_mult8` takes `MULT`. The default is `MULT_4`, the variant with the
  lowest mean error of the four.
- `approx_mult8_top` takes `ZERO_DETECT`. The default is 1.
- `pp_gen_and`, `cpa_adder` and `zero_detect` take a width parameter.
- The reduction layouts are written for 8x8 only.

Products appear after the combinational delay; a user who wants pipelining
must add registers around the top.

## Simulating

Every testbench in `tb/` is self-checking. It ends with a line
`TB_RESULT checks=N failures=M`. Build and run one with Verilator 5, for
example the end-to-end test:

```
verilator --binary --timing --assert -y rtl \
  rtl/cmp42_pkg.sv tb/mult_ref_pkg.sv tb/tb_approx_mult8_top.sv \
  --top-module tb_approx_mult8_top
./obj_dir/Vtb_approx_mult8_top
```

Swap the last file and the top name for any other testbench.

- `tb_exact_compressor42`, `tb_approx_compressor42_d1`,
  `tb_approx_compressor42_d2` and `tb_compressor42` check all input patterns
  against the cells' truth tables, plus the error counts of 12 and 4.
- `tb_dadda8_reduction_a`, `tb_dadda8_reduction_b` and `tb_approx_mult8` run
  all 65536 operand pairs. The exact variant must give `a*b` everywhere.
  Each approximate variant must reproduce a fingerprint of all its products
  and the figures of the accuracy table. `mult_ref_pkg` holds these expected
  values, which come from an independent bit-level model of the layouts.
- `tb_approx_mult8_top` does the same through the top at its default
  parameters. It also checks the zero correction on all 511 zero-operand
  pairs, and counts that each mechanism was used: zero correction, exact
  products and inexact products.
- `tb_ned_distribution` prints the mean NED of each of the 127 product
  intervals for the four multipliers. It checks the concentration of error
  at the ends for Multipliers 1 and 2.
- `tb_image_multiplication` blends the two generated images and checks the
  PSNR and average NED bands above, and that zero pixels stay zero.
- `tb_pp_gen_and`, `tb_cpa_adder` and `tb_zero_detect` test the small
  blocks with random operands.

Each runs in well under a second.

## What this RTL does not model

- Gate-level and transistor-level structure. The cells are written as Boolean
  equations. Synthesis chooses the gates, including the XOR-XNOR and
  multiplexer form often used for the exact cell. Delay, power and transistor
  counts therefore come from the target library, not from this code.
- Other operand widths. The two reduction layouts are hand-placed for 8x8.
  Other sizes need new layouts built by the same rules.
