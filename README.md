# Truncation- and rounding-based approximate multiplier

An exact N x N multiplier needs an array of partial products. Many DSP and
multimedia workloads can accept a small error in exchange for less area,
power and delay. This multiplier builds its N x N product from leading-one
detectors, shifters and adders only, with no partial-product array. Its
error is a few percent, and that error hardly depends on N.

The design is combinational: operands in, approximate product out, no clock.

## The idea

Write each operand in the form a floating-point number would take:

    A = 2^k1 (1 + x1)      B = 2^k2 (1 + x2)

Here `k` is the position of the leading one and `x` (in [0,1)) is the
fraction made of the bits below it. Then

    A*B = 2^(k1+k2) (1 + x1 + x2 + x1*x2)

Multiplying by `2^(k1+k2)` is a shift, and `1 + x1 + x2` is an addition. Only
the term `x1*x2` would need a real multiplier, so the design approximates
that term in two steps:

1. **Truncation.** Each fraction is cut to a few bits right after the leading
   one. The full width of the operand no longer matters, which is why the
   accuracy hardly depends on N. A `1` is appended below the kept bits. This
   rounds the truncated value to the nearest odd number and centres the
   truncation error on zero instead of always erring low.
2. **Rounding to a power of two.** In the product term, each truncated
   fraction `x` is paired with `x*`, the power of two nearest to `x`. The
   product is then written the way the ROBA (rounding-based approximate)
   scheme does:

       x1*x2  ~  x1*x2* + x2*x1* - x1* * x2*

   Each of the three products has a power-of-two factor, so each one is a
   right shift. The error of this step is exactly
   `(x1 - x1*)(x2 - x2*)`, which is small because both factors are small.

Put together:

    A*B  ~  2^(k1+k2) * (1 + A_t + B_t + (A_apx*B_apx* + B_apx*A_apx* - A_apx* * B_apx*))

- `A_t`, `B_t` are the fractions truncated to `T` bits and rounded to odd.
- `A_apx`, `B_apx` are the fractions truncated to `H` bits and rounded to odd.
- `A_apx*`, `B_apx*` are `A_apx`, `B_apx` rounded to a power of two.

### Worked example (defaults: N = 16, T = H = 4)

A = 200 = `1100_1000`, B = 100 = `110_0100`.

| step | A | B |
|---|---|---|
| leading one k | 7 | 6 |
| fraction x | `.1001000` = 0.5625 | `.100100` = 0.5625 |
| truncated to 4 bits, with a 1 appended (A_t = A_apx) | `.10011` = 0.59375 | `.10011` = 0.59375 |
| nearest power of two (A_apx*) | 0.5 | 0.5 |

The mantissa is M = 1 + 0.59375 + 0.59375 + (0.296875 + 0.296875 − 0.25) = 2.53125.
The product is 2.53125 · 2^13 = **20736**. The exact product is 20000, so the
error is +3.7 %.

## Datapath

```
 a ─┐                                             ┌──────────────┐
    ├─ sign_zero_unit (front) ─ a_mag ─┬─ lod ─ k1┤              │
 b ─┘                         ─ b_mag ─┼─ lod ─ k2┤  shift_unit  ├─ prod_mag ─ sign_zero_unit (back) ─ p
                                       │          │ M<<(k1+k2)   │
             trunc_round_unit (A), (B) ┴─ at,aapx,ea ─ arith_unit ─ M ┘
                                          bt,bapx,eb
```

| module | what it does |
|---|---|
| `lod` | Finds the position of the highest set bit and flags a non-zero word. It is used at width N on each operand and at width H+1 inside the truncation unit. |
| `trunc_round_unit` | Shifts the operand left by `N-1-k` so the bits below the leading one sit at the top. It keeps T bits (for `frac_t`) and H bits (for `frac_apx`) and appends a `1` below each. It then rounds `frac_apx` to `2^-e`. |
| `arith_unit` | Computes M, adding and shifting in fixed point. |
| `shift_unit` | Shifts M left by `k1+k2` and drops the fraction bits. |
| `sign_zero_unit` | Forces the product to 0 when an operand is 0. With `SIGNED=1` it also converts two's-complement operands to magnitudes and negates the result when the signs differ. |
| `tr_approx_mult` | The top level, which wires the units together. |

### Number formats

These are the formats inside the datapath, with the default values in brackets.

- `frac_t` is `T+1` bits wide [5]. Its value is `frac_t / 2^(T+1)`.
- `frac_apx` is `H+1` bits wide [5]. Its value is `frac_apx / 2^(H+1)`.
- `e` is `clog2(H+2)` bits wide [3] and holds 0 … H+1. `A_apx* = 2^-e`, and `e = 0` means 1.0.
- M has `FM = max(T+1, 2H+2)` fraction bits [10] and 2 integer bits.

M is always below 4. The bracketed term in M is exact at FM bits, and it is
never negative because it equals `x1*x2 − (x1−x1*)(x2−x2*)`.

In `shift_unit` the result is `floor(M · 2^(k1+k2))`: the fraction bits left
after the shift are cut off, not rounded.

### The power-of-two rounding rule

Let `2^-j` be the leading one of `frac_apx`. The fraction rounds up to
`2^-(j-1)` when the bit just below that leading one is also 1. In that case
the value is at least `1.5·2^-j`, the midpoint between the two powers. In
every other case it rounds down to `2^-j`.

## Accuracy

These figures were measured by the full-size testbench over 176,048 random
non-zero products at the defaults. Operand bit lengths were drawn uniformly.

- Mean relative error: 2.19 %
- Largest relative error seen: 6.35 %

The source description gives no accuracy figures to compare with.

The linear terms set a floor on the error of about `2^-(T+1)`. The product
term adds `(x1−x1*)(x2−x2*)`. To trade area for accuracy, raise `T` and `H`.

## Where this design departs from, or goes beyond, its source

The source describes the units, the equation and the operations. The points
below were not stated there and are choices made here:

- **Operand width.** N = 16 is a choice. The results the source reports
  (113 LUTs, 9.59 W and 12.2 ns on a Xilinx FPGA, against 182 LUTs,
  10.26 W and 13.5 ns for ROBA) do not give a width, so they cannot be
  compared with this RTL.
- **Truncation widths.** T = H = 4 comes from a remark about rounding with
  4-bit values. T and H are separate parameters because the equation keeps
  the linear term and the product term apart.
- **Rounding to odd in the linear term.** The source asks for rounding to
  odd only in the "multiplication part". Here `A_t` and `B_t` are also
  rounded to odd, which removes the downward bias of truncation.
- **Exponent name.** The source writes the exponent as both `n1+n2` and
  `K1+K2`. Both are read as the sum of the leading-one positions.
- **Power-of-two rounding threshold.** The midpoint rule above is a choice.
- **Final truncation.** Dropping the fraction bits of the result (floor) is a
  choice.
- **Signed mode.** The source evaluates unsigned operands only, and names a
  "sign and zero detector" without describing it. `SIGNED` therefore
  defaults to 0. `SIGNED = 1` wraps the unsigned core in a sign-magnitude
  conversion. It is tested, but it is this design's own extension.
- **No pipeline.** There are no registers, because the source reports only a
  combinational delay.

The ROBA multiplier, the source's comparison baseline, is not included.

## Files

- `rtl/lod.sv`, `rtl/trunc_round_unit.sv`, `rtl/arith_unit.sv`,
  `rtl/shift_unit.sv`, `rtl/sign_zero_unit.sv`, `rtl/tr_approx_mult.sv`: the
  design, one module per file. All of them are parameterised, and
  `tr_approx_mult` is the top.
- `tb/approx_ref_pkg.sv`: a reference model of the approximate product. It
  uses real arithmetic and computes each step by a different route from the
  RTL.
- `tb/tb_<module>.sv`: a self-checking testbench for each unit.
  `tb/tb_tr_approx_mult.sv` is the end-to-end test at the default
  parameters: 200,000 random products plus corner cases, an error report,
  and counts of zero operands, round-ups, round-downs, short operands and
  truncated operands. Each of those must occur at least once.
- `tb/tb_tr_approx_mult_signed.sv`: the same end-to-end test with `SIGNED=1`.

Each testbench ends by printing `TB_RESULT checks=<n> failures=<n>`.

## Simulating

With Verilator 5:

```
verilator --binary --timing -Irtl -Itb tb/approx_ref_pkg.sv \
    tb/tb_tr_approx_mult.sv rtl/*.sv --top-module tb_tr_approx_mult
./obj_dir/Vtb_tr_approx_mult
```

To run another test, replace `tb_tr_approx_mult` with the name of any other
testbench. Each one runs in well under a second.

## Changing it

`N`, `T` and `H` can be set on `tr_approx_mult`. The widths inside the
datapath follow from them. Keep `1 ≤ T ≤ N−1` and `1 ≤ H ≤ N−1`.

The reference model takes the same three numbers. To test another size,
change the testbench's `localparam` values and pass them to the instance.

The outputs matched the model bit for bit at three other configurations.
For each one the table gives the mean relative error:

| N | T | H | mean relative error |
|---|---|---|---|
| 8 | 3 | 2 | 6.5 % |
| 16 | 7 | 3 | 1.4 % |
| 24 | 6 | 5 | 0.69 % |

The end-to-end testbench fails any run whose mean error is above 5 %. That
limit suits the default widths. Raise it if you test narrow truncation
widths.
