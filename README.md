# Inexact single-precision floating-point adder

Applications whose output a person looks at, such as high-dynamic-range
(HDR) image processing, tolerate small arithmetic errors. Floating-point
adders cost much more power than fixed-point ones. This design saves logic
by letting the adder be wrong in controlled places. It is an IEEE-754
single-precision adder with three changes to a textbook adder:

* **Inexact significand adder.** The 24-bit significands go through a
  *lower-part-OR adder* (LOA). The low `N_APPROX` bits are only ORed
  together, with no carry chain. The remaining high bits form an exact
  adder.
* **Inexact exponent subtractor (optional).** The low `EXP_APPROX_BITS`
  bits of the exponent difference are computed with an OR cell instead of a
  full subtractor.
* **No rounding.** Results are truncated and no guard, round or sticky bits
  are kept. The low result bits are already inexact, so a rounding unit would
  buy little. The leading-zero counter is also simplified: it ignores the
  bits that come out of the inexact part of the adder.

The adder is purely combinational: two 32-bit operands in, one 32-bit
result and four flags out.

## Datapath

```
a, b ─► fp_unpack (x2) ─► operand_swap (2x exp_subtractor) ─► align_shifter
      ─► loa_mantissa_adder ─► approx_lzc ─► normalizer ─► fp_pack ─► z, flags
```

| Module | Role |
|---|---|
| `fp_pkg` | Widths, `fp32_t`, `fp_unpacked_t` (sign, exponent, 24-bit significand, class bits) and `fp_flags_t`. |
| `fp_unpack` | Restores the hidden bit and classifies the operand as zero, infinity or NaN. Subnormals are flushed to zero. |
| `exp_subtractor` | Ripple-borrow subtractor `a - b` whose low `EXP_APPROX_BITS` cells are inexact. Outputs the difference and the borrow. |
| `operand_swap` | Computes `Ea-Eb` and `Eb-Ea` in two subtractors. Routes the larger-magnitude operand to `lrg`, the other to `sml`, and outputs the shift amount. |
| `align_shifter` | Barrel right shift of the smaller significand. Shifted-out bits are lost. A shift of 24 or more gives 0. |
| `loa_mantissa_adder` | LOA adder/subtractor with `N_APPROX` inexact low bits. |
| `approx_lzc` | Leading-zero count over bits 23 down to `LZC_APPROX_BITS`. |
| `normalizer` | On carry out of an addition: right shift by 1, exponent +1. Otherwise: left shift by the count, exponent minus the count. Flags exponent overflow and underflow. |
| `fp_pack` | Handles special cases, sets the flags and packs the result. |
| `inexact_fp_adder` | Top level. |

### How the inexact parts behave

**Lower-part-OR significand adder.** Let `b'` be the aligned smaller
significand, inverted for an effective subtraction (operand signs differ).
Let `n = N_APPROX`.

* `sum[n-1:0] = a[n-1:0] | b'[n-1:0]`.
* `{cout, sum[23:n]} = a[23:n] + b'[23:n] + (a[n-1] & b'[n-1])`.

The AND of the top inexact bit pair is the only carry passed to the exact
part. A subtraction is `a + ~b + 1`. The `+1` would enter at bit 0, which is
an OR cell whenever `n > 0`, so it is dropped there. With `n = 24` there is
no exact part, and `cout` is the AND of the two leading bits.

Two consequences are worth knowing:

* **All-inexact significand (the default).** The leading significand bit is
  always 1 after an inexact subtraction (`a23 | ~b23` with `a23 = 1`), so
  left normalization never happens. An addition of two values with equal
  exponents always carries. For two positive operands the result lies
  between the larger operand and 1.5 times the true sum. The magnitude of the
  relative error stays below 50%.
* **Swapping by magnitude.** The operands are swapped by full magnitude:
  exponent first, then significand on a tie. The significand subtraction
  therefore never goes negative, and no negation step is needed.

**Inexact exponent LSB.** Each inexact cell outputs `a_i | b_i` as its
difference bit, and no borrow ripples between inexact cells. The borrow into
the first exact cell is `~a & b` of the top inexact position. That is the
exact borrow when one bit is inexact, so the **swap decision stays exact**.
Only the alignment distance changes: when both exponent LSBs are 1, the
distance is 1 too large. This also applies to equal exponents. Two operands
with the same odd exponent therefore have the smaller one shifted right by
one bit before they are added. This single bit causes a mean error of about
1.2% on the test images.

**Approximate leading-zero count.** The counter looks only at bits
`23..LZC_APPROX_BITS`. If all of them are 0, the count is the width of that
window. The result may then be left unnormalized: the packed word still
implies a leading 1, which adds error. By default `LZC_APPROX_BITS` follows
`N_APPROX`, capped at 23, so with the default all-inexact adder only bit 23
is examined. That is enough, because that adder never produces a leading 0.

### Special cases and flags

`flags` is `{overflow, underflow, zero, invalid}`. The cases are checked in
this order:

1. NaN operand, or infinities of opposite sign: quiet NaN `7FC00000`, with
   `invalid`.
2. One infinite operand: that infinity.
3. Both operands zero: zero, with `zero`. The result is `-0` only for
   `-0 + -0`.
4. One operand zero: the other operand, passed through unchanged.
5. The significands cancel exactly: `+0`, with `zero`.
6. The result exponent is 0 or below: signed zero, with `underflow` and
   `zero`.
7. The result exponent is 255 or above: signed infinity, with `overflow`.

Subnormal inputs count as zero, and no subnormal results are produced.

## Parameters of `inexact_fp_adder`

| Parameter | Default | Meaning |
|---|---|---|
| `N_APPROX` | 24 | Inexact low bits of the 24-bit significand adder. |
| `EXP_APPROX_BITS` | 0 | Inexact low bits of the 8-bit exponent subtractor. |
| `LZC_APPROX_BITS` | `min(N_APPROX, 23)` | Low bits the leading-zero counter ignores. |

Useful settings:

| Setting | Configuration |
|---|---|
| defaults | All-inexact significand adder. |
| `N_APPROX=0, EXP_APPROX_BITS=1, LZC_APPROX_BITS=0` | Only the exponent LSB is inexact. |
| all three 0 | Exact datapath with truncation: within 2 ulp of the larger operand. |
| values in between | Trade accuracy for logic. Making more significand-adder bits exact lowers the error step by step. |

The single-precision format widths (8-bit exponent, 24-bit significand) are
fixed in `fp_pkg`.

## Where this design makes its own choices

The overall flow is that of a standard floating-point adder: compare
exponents, swap, align, add, count leading zeros, normalize. On top of it
come the inexact significand adder, the optional inexact exponent LSB, the
simplified leading-zero detection and the missing rounding step. The
following details are this design's own:

* **Inexact cell types.**
  * The significand adder is an LOA. Approximate mirror adders or
    XOR/XNOR-based approximate adders would be drop-in alternatives for the
    inexact part.
  * The exponent cell is the subtraction analogue of the LOA cell.
* **Approximate leading-zero counter.** It ignores exactly the inexact bits
  (`LZC_APPROX_BITS`).
* **Swap and subtraction.** Ties are broken on the significand. A
  subtraction reuses the adder as `a + ~b + 1`.
* **Special values.** Subnormals are flushed to zero. Underflow gives zero
  and overflow gives infinity. The NaN/invalid handling is added, and a zero
  operand passes the other operand through.
* **Timing.** The adder is fully combinational, with no pipeline registers.
  Register the inputs and outputs outside if a clocked wrapper is needed.
* **Normalization.** The leading-zero counter counts zeros only, not ones.
  Because the significand difference is never negative, a leading-ones count
  is not needed.
* **Exponent adjustment.** The adjustment in the normalizer is exact. Only
  the exponent subtractor that feeds the alignment shift is approximated.

No gate-level area, delay or power figures are reproduced here.

## Verification

All testbenches are self-checking and print
`TB_RESULT checks=N failures=M`. Expected values come from
`tb/tb_fp_ref_pkg.sv`, an integer-arithmetic model of the same algorithm.
It uses masks and whole-word `+`/`-`, not the RTL's structure. The model
also converts singles to `real`, so results can be compared with ordinary
floating-point addition.

| Testbench | What it covers |
|---|---|
| `tb_fp_unpack` | Directed and random words. |
| `tb_exp_subtractor` | Exhaustive over all 65,536 operand pairs, exact and with an inexact LSB. Also checks that the inexact LSB changes exactly one quarter of the results. |
| `tb_operand_swap` | Random operands, half of them with equal exponents. Checks swap order and shift amount. |
| `tb_align_shifter` | Every shift 0..255. |
| `tb_loa_mantissa_adder` | `N_APPROX` = 0, 8, 12, 24, for addition and subtraction. |
| `tb_approx_lzc` | Every leading-one position, exact and with 12 or 23 bits ignored. |
| `tb_normalizer`, `tb_fp_pack` | Normalization arithmetic, flag priority and packing. |
| `tb_inexact_fp_adder` | End to end, in three configurations side by side (see below). |
| `tb_hdr_image_add` | Two generated 256×256 HDR luminance images added at default parameters. Each pixel is compared bit for bit with the model, and its relative error is checked to be below 50%. Measured mean error 3.7%. |
| `tb_hdr_design_sweep` | The same kind of images through six configurations (below). |

`tb_inexact_fp_adder` runs the three configurations on 20,000 random and 14
directed operand pairs. The exact configuration is also held to 2 ulp
against `real` addition. The test counts how often each mechanism occurs
and fails if one never does: swap, full alignment shift-out, carry
normalization, left normalization, overflow, underflow, cancellation,
infinity, NaN, and a result changed by the LOA or by the exponent LSB.

`tb_hdr_design_sweep` runs `N_APPROX` = 24, 16, 12, 8 and 0, plus the
exponent-LSB design. It checks that making more bits exact never increases
the mean error. The mean relative errors measured:

| Configuration | Mean relative error |
|---|---|
| `N_APPROX` = 24 | 4.2e-2 |
| `N_APPROX` = 16 | 7.0e-4 |
| `N_APPROX` = 12 | 5.4e-5 |
| `N_APPROX` = 8 | 3.7e-6 |
| `N_APPROX` = 0 | 4.0e-8 |
| exponent LSB only | 1.2e-2 |

### Simulating

Each testbench is one top module. Read the packages first, and let
Verilator find the other modules on the search path:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/fp_pkg.sv tb/tb_fp_ref_pkg.sv tb/tb_inexact_fp_adder.sv \
    --top-module tb_inexact_fp_adder -o sim
./obj_dir/sim
```

Replace the last source file and `--top-module` to run another testbench.
Each one finishes in well under a second of simulation time. For lint, run
`verilator --lint-only -Wall -y rtl rtl/fp_pkg.sv rtl/inexact_fp_adder.sv`.
It leaves a few unused-signal warnings. They are intentional: the class bits of
the swapped operands and the sign and exponent of the smaller one are not
needed after the swap, and the hidden bit is not stored in the packed
result.
