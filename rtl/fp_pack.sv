// fp_pack: final stage of the adder. Packs the normalized sign, exponent
// and significand into an IEEE-754 single and raises the status flags.
//
// Priority of the cases:
//   1. a NaN operand, or infinities of opposite sign: quiet NaN, invalid
//   2. an infinite operand: that infinity
//   3. both operands zero: zero (negative only for -0 + -0), zero flag
//   4. one operand zero: the other operand, unchanged
//   5. zero significand sum: +0, zero flag
//   6. exponent underflow: signed zero, underflow and zero flags
//   7. exponent overflow: signed infinity, overflow flag
//   8. otherwise sign, exponent and the 23 fraction bits of the significand
// The published inexact-adder architecture names the overflow, underflow
// and zero flags; the flush-to-zero and saturate-to-infinity responses, the NaN handling and
// the invalid flag are this design's choices. There is no rounding: the
// fraction is the truncated significand.
//
// Interface: sign, exp_n, mant_n, ovf, unf, sum_zero, a, b -> z, flags.
// Combinational.
module fp_pack
  import fp_pkg::*;
(
  input  logic              sign,
  input  logic [EXP_W-1:0]  exp_n,
  input  logic [MANT_W-1:0] mant_n,
  input  logic              ovf,
  input  logic              unf,
  input  logic              sum_zero,
  input  fp_unpacked_t      a,
  input  fp_unpacked_t      b,
  output logic [31:0]       z,
  output fp_flags_t         flags
);

  always_comb begin
    flags = '0;
    if (a.is_nan || b.is_nan || (a.is_inf && b.is_inf && (a.sign != b.sign))) begin
      z             = QNAN;
      flags.invalid = 1'b1;
    end else if (a.is_inf) begin
      z = {a.sign, EXP_MAX, {FRAC_W{1'b0}}};
    end else if (b.is_inf) begin
      z = {b.sign, EXP_MAX, {FRAC_W{1'b0}}};
    end else if (a.is_zero && b.is_zero) begin
      z          = {a.sign & b.sign, {(31){1'b0}}};
      flags.zero = 1'b1;
    end else if (b.is_zero) begin
      z = {a.sign, a.exp, a.mant[FRAC_W-1:0]};
    end else if (a.is_zero) begin
      z = {b.sign, b.exp, b.mant[FRAC_W-1:0]};
    end else if (sum_zero) begin
      z          = '0;
      flags.zero = 1'b1;
    end else if (unf) begin
      z               = {sign, {(31){1'b0}}};
      flags.underflow = 1'b1;
      flags.zero      = 1'b1;
    end else if (ovf) begin
      z              = {sign, EXP_MAX, {FRAC_W{1'b0}}};
      flags.overflow = 1'b1;
    end else begin
      z = {sign, exp_n, mant_n[FRAC_W-1:0]};
    end
  end

endmodule
