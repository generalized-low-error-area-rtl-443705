# Low-error fixed-width two's-complement multipliers

A fixed-width multiplier takes two n-bit two's-complement numbers and returns
only an n-bit product: the n most significant bits of the 2n-bit result. This
is what a DSP datapath wants, where word lengths must not grow. Leaving out
the circuitry for the n least significant columns of the partial-product
matrix saves about half the area. Cutting them off outright, though, gives a
large error that is always in the same direction. This RTL builds
multipliers that drop most of those columns but keep a little of the
information in them. From that information they form an *error-compensation
bias* that depends on the operands. The result costs about as much area as
the cheapest earlier compensation schemes, and the error is lower.

Everything is combinational Baugh–Wooley array logic. There are no clocks,
no registers and no reset.

## The partial-product matrix

For n-bit operands `x` and `y`, the Baugh–Wooley form of the product is a
matrix of bits. The bit `x_i*y_j` sits in column `i+j`. When exactly one of
`i`, `j` is the sign position `n-1`, the bit is complemented (a NAND instead
of an AND). Two constant ones are added, in columns `n` and `2n-1`. Summing
every column with its weight gives the exact product modulo 2^2n.

The output is `p = P[2n-1:n]`. The columns below `n` are the *low part*. A
fixed-width multiplier must replace the low part's carry into column `n` by
some estimate `sigma`, so that

    p = (bits of columns n..2n-1) / 2^n + sigma      (mod 2^n)

Three column sums do all the work:

* `E_main` is the number of ones in column `n-1`, the largest low column.
  This column holds `~(x_{n-1}y_0)`, `x_{n-2}y_1`, …, `x_1y_{n-2}`,
  `~(x_0y_{n-1})`.
* `theta` (the *index*) is the number of ones in column `n-1-w`. This is the
  first column that is not built. For the Type 2 design, some of its bits
  may be complemented.
* `w` is the number of low columns that are still built as full adders. The
  array therefore keeps `n+w` columns.

## The idea: threshold on the first dropped column

Earlier designs either add a constant (which ignores the operands) or move
the bits of the first dropped column up by one column. Moving the bits up is
the "variable correction" scheme. It underestimates when that column is all
zeros, because the columns below it, which are also dropped, still carry on
average about half a unit. The designs here add **one extra unit when
`theta = 0`** and nothing otherwise. A single OR chain down the dropped
column detects `theta = 0`, so the extra cost is small.

### Type 1, w = 1 (the main design, `fw_mult_type1` with `W = 1`)

Columns `n-1 .. 2n-1` are built. Column `n-2` is the threshold column. Its
bits `x_{n-2-k}*y_k` enter column `n-1` as carries. The last cell of the
column adds one more unit to column `n-1` when all of them are zero. Only
the carries out of column `n-1` are used:

    sigma = floor( (E_main + theta + [theta = 0]) / 2 ),   theta = sum of column n-2

For n = 8 the array is 8 rows of cells above a ripple-carry row:

```
        x7    x6    x5    x4    x3    x2    x1    x0
 y0     ND    AOR
 y1     ND    AFA   AOR
 y2     ND    AFA   AFA   AOR
 y3     ND    AFA   AFA   AFA   AOR
 y4     ND    AFA   AFA   AFA   AFA   AOR
 y5     ND    AFA   AFA   AFA   AFA   AFA   AOR
 y6     ND    AFA   AFA   AFA   AFA   AFA   AFA   ANOR
 y7     A     NFA   NFA   NFA   NFA   NFA   NFA   NFA
       inv <- FA <- FA <- FA <- FA <- FA <- FA <- FA <- 1
       P15   P14   P13   P12   P11   P10   P9    P8
```

Cell `(x_i, y_j)` is in column `i+j`. Its diagonal output (down and to the
right in the grid) is the sum and stays in the same column. Its vertical
output is the carry into the next column.

* `ND` / `A` pass on the NAND or AND bit of the sign column.
* `AFA` / `NFA` form an AND or NAND partial product and add it with a full
  adder.
* `AOR` (on the diagonal of column `n-2`) sends its AND bit downward as a
  carry into column `n-1`. It also passes the OR of all threshold bits seen
  so far diagonally to the next `AOR`.
* `ANOR` ends the chain. Its one output enters column `n-1` as a carry and
  is worth `x_0*y_{n-2} + [theta = 0]`. The two terms are never both 1, so
  the value fits in one bit, `(x&y) | NOR(or_in, x&y)`.
* The constant one of column `n` is the carry input of the ripple row. The
  one of column `2n-1` is the inverter on its carry out.

### Type 1, general w (`fw_mult_type1` with `W >= 2`)

With more columns kept, the bias becomes

    sigma = floor( (sum over k = n-w..n-1 of colsum_k * 2^(k-n+w)
                    + theta + [theta = 0] + 2^(w-1) - 1) / 2^w )

where `theta` is now the sum of column `n-1-w`. Two things change in the
array:

* The constant `2^(w-1) - 1` is added by a chain of half and full adders on
  the right edge. The chain takes the final sum bits of the kept low
  columns.
* The chain's carry takes over the carry input of the ripple row, so one
  more row of n half adders adds the constant one of column `n`.

For w = 2 the edge is two half adders, one with the constant 1. For w = 2
the first row also has a plain `A` cell at `x_{n-2}y_0` and an `AHA` cell
(AND plus half adder) below it, because no carry arrives there. The
generator handles all of these cases from the cell coordinates. Any
`1 <= W <= N-2` can be built. Only the n = 8 layouts for w = 1 and w = 2
have a published cell diagram. Other values use the same rules.

### Type 2, w = 0 (`fw_mult_type2`)

Only columns `n .. 2n-1` are built, which is the cheapest case. Column `n-1`
is now the threshold column. Its middle bits `x_{n-2}y_1 … x_1y_{n-2}` are
moved up as carries into column `n`. The two corner bits are replaced by a
single compensation bit:

    sigma = x_{n-2}y_1 + ... + x_1y_{n-2} + [theta_Q < n]

`theta_Q` counts the ones of column `n-1`. Bit `q_{n-1}` of the parameter
`Q` complements the `x_{n-1}y_0` corner, and bit `q_0` complements the
`x_0y_{n-1}` corner.

* With the default `Q = 2^(n-1)+1`, `theta_Q` is the Baugh–Wooley column
  itself. The unit is therefore added unless column `n-1` is all ones.
* `Q = 0`, `1` and `2^(n-1)` are also accepted. For n = 8 they give the
  same maximum error and, to within 0.02 percentage points, the same mean
  error.

An AND chain down column `n-1` gives the flag. Its complement enters column
`n` where the `x_0*y_{n-1}` bit would sit. This array structure is the
design's own. Only the bias is specified for this type.

## Accuracy

The errors are measured as `e = x*y - 2^n * p` over all operand pairs. They
are given relative to direct truncation, which simply drops the low part.

* **Max** is the maximum of |e|.
* **Mean** is the mean of |e|.
* **Var** is the variance of |e|.

The simulated RTL gives:

| n | design | max | mean | var |
|---|---|---|---|---|
| 8 | Type 1, w = 1 | 13.22 % | 12.00 % | 3.80 % |
| 8 | Type 1, w = 2 | 9.54 % | 11.22 % | 2.79 % |
| 8 | Type 2, w = 0, Q = 129 | 24.60 % | 18.39 % | 11.11 % |
| 12 | Type 1, w = 1 | 11.43 % | 9.23 % | 3.09 % |
| 12 | Type 2, w = 0 | 21.72 % | 14.60 % | 8.66 % |

For direct truncation at n = 8 the reference values are: maximum |e| = 1793,
mean 576.25, variance of |e| 54286.

The testbenches check these figures, and the ones for n = 6, 10 and 12,
against the published values to their printed rounding. For n = 16 they use
10^6 random pairs and a 0.25-point tolerance. The main design therefore
removes 88 % of the mean truncation error at n = 8.

The published 8×8 Type 1 (w = 1) chip has the following characteristics.
These are physical results, not something this RTL reproduces:

* 70.64 µm × 67.52 µm in a 0.18 µm CMOS process.
* A 6.98 ns critical path.
* 0.336 mW at 100 MHz.
* 67 % of the area of a full 8×8 Baugh–Wooley multiplier.

## Files

`rtl/`:

| file | contents |
|---|---|
| `fw_top.sv` | the three multipliers side by side (Type 1 w = 1, Type 1 w = 2, Type 2), each with its own ports; parameter `N` (default 8) |
| `fw_mult_type1.sv` | Type 1 array generator; parameters `N = 8`, `W = 1` |
| `fw_mult_type2.sv` | Type 2 array generator; parameters `N = 8`, `Q = 2^(N-1)+1` |
| `fw_aor.sv`, `fw_anor.sv` | threshold-column cells |
| `fw_afa.sv`, `fw_nfa.sv`, `fw_aha.sv` | partial-product-plus-adder cells |
| `fw_fa.sv`, `fw_ha.sv` | full and half adder |

All ports are plain vectors:

* `x`, `y`: operand inputs, two's complement.
* `p`: product output, the upper half of the product.

`p` settles one array delay after the operands change.

`tb/`:

| testbench | what it checks |
|---|---|
| `tb_fw_top.sv` | full size (N = 8, default parameters): all 65536 pairs through all three multipliers, bit-exact against the reference, the error statistics against the table values, and that each compensation case (theta = 0 / > 0, theta_Q = n / < n) occurs |
| `tb_fw_mult_type1.sv` | all pairs for n = 8 (w = 1, 2) and n = 6 (w = 1..4); random pairs for n = 12, w = 3 and n = 16, w = 1 |
| `tb_fw_mult_type2.sv` | all pairs for n = 8 with each allowed Q, n = 6; random pairs for n = 16 |
| `tb_fw_error_tables.sv` | error statistics for n = 6, 10, 12 (exhaustive) and 16 (sampled); takes about a minute |
| `tb_fw_*.sv` (cells) | exhaustive truth tables |

The other two files in `tb/` are helpers for these testbenches:

* `fw_ref_pkg.sv` evaluates each bias from its closed-form definition, using
  integers scaled by 2^n. Example for Type 1: `floor(E_main/2 + E_remain/2 +
  theta/2^w - E_reduct + 1/2 - [theta>0]/2^w)`. It shares no structure with
  the arrays.
* `fw_err_stats.sv` is the statistics bench for one width.

Every testbench prints `TB_RESULT checks=N failures=M`.

To simulate with Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb tb/fw_ref_pkg.sv tb/tb_fw_top.sv --top-module tb_fw_top
./obj_dir/Vtb_fw_top
```

Lint a module on its own with `verilator --lint-only -Wall -Irtl rtl/fw_top.sv`.
The only warnings are unused edge signals of the generated arrays.

## Where this RTL goes beyond, or departs from, the published design

* **ANOR cell.** The published cell drawing shows an AND feeding a NOR. That
  output alone would drop `x_0*y_{n-1-w}` from the sum. The error would then
  be far above the published figures: 18.24 % maximum error at n = 8,
  w = 1, against 13.22 %. The cell here outputs `x&y | NOR(or_in, x&y)`,
  which matches the bias equation and reproduces every table value.
* **General W.** The constant `2^(w-1)-1` on the right edge follows from the
  general bias formula. Only w = 1 and w = 2 were drawn.
* **Type 2 array.** The bias is specified, but the array is not. The one
  here reuses the Type 1 cell style with an AND chain.
* **Timing.** No pipelining, clock or reset is implied or added.
* **Not built.** Two things are out of scope:
  * The 35-tap FIR speech filter used as an application example. Its
    coefficients and data are not available.
  * The overflow handling for fractional multiplication. It is defined
    elsewhere.

  The comparison designs are not built either: direct truncation,
  constant-bias, earlier variable-correction designs and the full-width
  multiplier. The testbenches compute direct truncation only as the
  reference for the relative errors.
