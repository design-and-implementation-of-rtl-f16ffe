# 8x8 multipliers with exact and approximate 4:2 compressors

A tree multiplier works in three phases: AND gates form the 64 partial-product bits,
a reduction tree squeezes the 8-high bit matrix down to two rows, and a carry-propagate
adder adds those rows. The reduction tree is where most of the delay and power go. This
RTL builds the tree mainly from **4:2 compressors**: cells that take four bits of one
column plus a carry-in and return one bit in that column and two in the next. A
compressor does the work of two full adders. Two **approximate** compressors trade exact
counting for less logic, and approximate multipliers are built from them.

Four 8x8 unsigned multipliers are provided, side by side in `multiplier_top`:

| output      | tree    | compressors used                                   | product     |
|-------------|---------|----------------------------------------------------|-------------|
| `p_dadda1`  | Dadda   | approximate design 1 everywhere (multiplier 1)     | approximate |
| `p_dadda2`  | Dadda   | approximate design 2 everywhere (multiplier 2)     | approximate |
| `p_dadda3`  | Dadda   | design 1 in columns 0-6, exact in 7-14 (multiplier 3) | approximate |
| `p_wallace` | Wallace | exact                                              | exact       |

All four are purely combinational. There is no clock, no register and no handshake: a
product is valid one propagation delay after `a` and `b` change.

## The compressors

All weights below are relative to the compressor's column: weight 1 is the column
itself, weight 2 the next column up.

**Exact** (`compressor_4_2_exact`). Inputs `x1..x4`, `cin`. Outputs `sum` (weight 1),
`carry` and `cout` (weight 2):

    x1 + x2 + x3 + x4 + cin = sum + 2*(carry + cout)
    sum   = x1 ^ x2 ^ x3 ^ x4 ^ cin
    cout  = (x1 ^ x2) ? x3  : x1      carry of a full adder on x1, x2, x3
    carry = (x1^x2^x3^x4) ? cin : x4  carry of a full adder on that sum, x4, cin

`cout` does not depend on `cin`. A row of compressors chained `cout -> cin` therefore
has no ripple through the chain.

**Approximate design 1** (`compressor_4_2_approx1`). It has the same ports:

    carry = cin
    cout  = x1 x2 + x3 x4
    sum   = ~cin & ((x1 ^ x2) | (x3 ^ x4))

So `carry` is a plain wire. It agrees with the exact carry in 24 of the 32 input
cases. Over the 32 cases, the value `sum + 2(carry + cout)` is wrong in 13, by at
most 2 either way. All-zero inputs give all-zero outputs.

**Approximate design 2** (`compressor_4_2_approx2`). Design 1 with `cin = 0`, which
removes `cin` and the `carry` output. It keeps `sum = (x1^x2)|(x3^x4)` (weight 1) and
`carry = x1x2 + x3x4` (weight 2). Four bits become two. The value is wrong in 5 of the
16 cases:
- two ones that sit in different pairs count as 1;
- four ones count as 2.

`compressor_4_2_sel` wraps design 1 and the exact compressor behind a parameter
`APPROX`, so a tree can choose the kind column by column.

## The reduction trees

Columns are numbered by weight: the partial product `pp[j][i] = b[j] & a[i]` sits in
column `i+j`. Before reduction, the 15 columns are 1,2,3,4,5,6,7,8,7,6,5,4,3,2,1 bits
high. In the tables:
- `C` is a 4:2 compressor, `F` a full adder, `H` a half adder.
- `CC` means two compressors in that column.
- A cell always takes bits from the top of its column, in row order.

Cout-to-cin chaining applies to design 1 and the exact compressor. Compressor k in
column c drives the `cin` of compressor k in column c+1 of the same stage. A `cout`
that no compressor takes joins column c+1 as an ordinary bit; a full adder in that
column may use it in the same stage. A compressor that starts a chain gets `cin = 0`.

### Dadda, multipliers 1 and 3 (`dadda_mult1`)

| stage | goal      | columns and cells                                                       | totals        |
|-------|-----------|-------------------------------------------------------------------------|---------------|
| 1     | <= 4 rows | 4:H 5:C 6:CH 7:CC 8:CC 9:CF 10:C 11:F                                   | 8 C, 2 F, 2 H |
| 2     | <= 2 rows | 2:H 3..12:C 13:F                                                        | 10 C, 1 F, 1 H|

Column heights are 1,2,3,4,4,4,4,4,4,4,4,4,4,2,1 after stage 1. After stage 2, every
column holds two bits or fewer. Column 8 of stage 1 has only seven bits for its two
compressors, so one `x4` is tied to 0. In columns 9, 11 and 13 a full adder takes an
unchained `cout`.

The parameter `APPROX_COLS` sets the kind of each compressor. A compressor in a column
below `APPROX_COLS` is design 1; the others are exact.

| `APPROX_COLS` | result |
|---|---|
| 16 (default) | multiplier 1 |
| 7 = n-1 | multiplier 3: design 1 in the n-1 low columns, exact in the n high columns |
| 0 | exact, useful as a check of the wiring |

### Dadda, multiplier 2 (`dadda_mult2`)

Design 2 has no `cin`/`cout`, so no signal runs sideways within a stage.

| stage | columns and cells                               | totals        |
|-------|-------------------------------------------------|---------------|
| 1     | 4:H 5:C 6:CH 7:CC 8:CF 9:CH 10:C 11:H           | 7 C, 1 F, 4 H |
| 2     | 2:H 3..12:C 13:H                                | 10 C, 2 H     |

### Wallace (`wallace_mult`)

Stage 1 splits the partial products into rows 0-3 and rows 4-7. It reduces each group
on its own. For rows 0-3 the cells are 1:H 2:F 3..8:C 9:F; rows 4-7 use the same
pattern shifted up four columns. The last compressor of each chain has three bits
(`x4 = 0`), and the closing full adder takes the chain's final `cout`. After merging
the two groups, the column heights are 1,1,2,2,3,3,4,4,4,4,4,2,2,2,2.

Stage 2 cells are 2:H 3:H 4:F 5:F 6..10:C 11:F 12:H 13:H 14:H. They bring the matrix
to two rows. The half adders in columns 2 and 3 already make product bit 2 final, so
bits 0-2 leave the tree as single bits. Stage 3 is the final adder.

The compressors here are exact, so `p = a*b` for every input. In stages 1 and 2 there
are 17 compressors, 7 full adders and 7 half adders. Count the final adder as the
cells it needs: a half adder in column 3, full adders in columns 4-14, and a half
adder in column 15. That brings the totals to 17 compressors, 18 full adders and 9
half adders.

### Final adder (`ripple_adder`)

All trees end in a 16-bit ripple-carry adder built from full adders. The carry out of
bit 15 is dropped. An exact product never produces it. An approximate product that
overshoots 65535 wraps around.

## Accuracy of the approximate multipliers

These figures come from all 65536 operand pairs, as printed by `tb_multiplier_top`:

| multiplier | inexact products | mean absolute error |
|------------|------------------|---------------------|
| 1 (design 1 everywhere) | 53682 | 1265.00 |
| 2 (design 2)            | 50550 | 1233.85 |
| 3 (design 1 low, exact high) | 40836 | 41.49 |

Example: 150 x 175 = 26250 (0x668A). The outputs are:
- multiplier 1: 0x66A2;
- multiplier 2: 0x63A2;
- multiplier 3: 0x6622;
- Wallace: 0x668A.

Any operand of 0 gives 0 on every output.

## What is fixed and what is this design's own

Taken from the published design:
- the 8x8 unsigned size;
- AND-gate partial products;
- the equations of the three compressors;
- the two-stage Dadda reduction, to at most 4 rows and then 2;
- the cell totals of multiplier 1 (18 C, 3 F, 3 H, split per stage as above) and of
  multiplier 2 (17 C, 1 F, 6 H);
- the column rule of multiplier 3;
- the three-stage Wallace tree with 17 exact compressors and a four-row grouping in
  stage 1.

This design's own choices:
- **Cell placement.** Which column each cell sits in, as given in the tables.
- **Input order.** Which partial-product bit feeds which cell input. The exact
  multipliers do not care. The approximate products depend on it: design 1 pairs
  `x1,x2` and `x3,x4`. A different grouping with the same cell counts gives other
  approximate products and another error profile.
  Published simulations of multipliers 1 and 2 show 0x5FF2 and 0x66AA for
  150 x 175. This RTL gives the values listed above instead, since it groups the bits
  in its own way.
- **Chaining.** The `cout -> cin` rule described above.
- **Stage split.** How the cells of multiplier 2 divide between its two stages.
- **Final adder.** Ripple carry. Only "a conventional adder" is given.
- **Wallace placement.** Which column each cell of the Wallace tree sits in. The
  totals match the stated ones.
- **Not modelled.** The circuit-level cells that a real compressor would use: a fast
  XOR-XNOR gate and a transmission-gate multiplexer. Their logic is written directly
  as XOR and `?:`.

The trees are wired explicitly for 8x8, column by column. `N` in `mult_pkg` documents the
width but cannot change it.

## Files

- `rtl/mult_pkg.sv`: widths and types (`operand_t`, `product_t`, `pp_matrix_t`).
- `rtl/half_adder.sv`, `rtl/full_adder.sv`: the basic cells.
- `rtl/compressor_4_2_exact.sv`, `rtl/compressor_4_2_approx1.sv`,
  `rtl/compressor_4_2_approx2.sv`, `rtl/compressor_4_2_sel.sv`: the compressors.
- `rtl/partial_product_gen.sv`, `rtl/ripple_adder.sv`: the first and last phase.
- `rtl/dadda_mult1.sv`, `rtl/dadda_mult2.sv`, `rtl/wallace_mult.sv`: the multipliers.
  Each stage opens with a comment listing its cells per column. Net `sN_cC_xK_s` is the
  sum of cell K, of kind x (c, f, h), in column C of stage N.
- `rtl/multiplier_top.sv`: the four multipliers side by side.
- `tb/tb_*.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.
- `tb/dadda_mult{1,2,3}_vectors.hex`: 600 reference products per approximate
  multiplier, one `aabbpppp` word per line. They were computed by a separate bit-level
  model of the same schedules, which evaluates the compressor equations above cell by
  cell.

## Verification

The testbenches check the following:
- **Compressors.** All input cases against their equations and error counts:
  - exact: the count identity;
  - design 1: 13 wrong cases, largest error 2, 24 of 32 carries agreeing;
  - design 2: 5 wrong cases.
- **Partial products and final adder.** Random and corner vectors.
- **Wallace.** All 65536 products are exact.
- **`dadda_mult1`.** The `APPROX_COLS = 0` instance is exact on all 65536 pairs, which
  checks the tree's wiring. Multipliers 1 and 3 match their reference products.
  Multiplier 3 has a smaller total error than multiplier 1.
- **`dadda_mult2`.** It matches its reference products.
- **`tb_multiplier_top`.** It runs the whole design at its default parameters and
  repeats these checks end to end. It also requires each approximation to show up at
  least once.

To simulate with Verilator (from the folder that holds `rtl/` and `tb/`; the
testbenches read their `.hex` files by the relative path `tb/...`):

    verilator --binary --timing -Irtl rtl/mult_pkg.sv tb/tb_multiplier_top.sv \
        --top-module tb_multiplier_top -Mdir obj_top
    ./obj_top/Vtb_multiplier_top

Other testbenches work the same way: replace `multiplier_top` with the module name.
Each simulation finishes in well under a second.
