// inexact_fp_adder: inexact IEEE-754 single-precision adder for
// error-tolerant work such as adding high-dynamic-range images.
//
// Datapath, all combinational:
//   fp_unpack x2      restore hidden bits, classify operands
//   operand_swap      exponent subtraction (inexact LSBs optional), swap
//   align_shifter     right-shift the smaller significand, no guard bits
//   loa_mantissa_adder  lower-part-OR significand adder/subtractor
//   approx_lzc        leading-zero count that ignores the inexact bits
//   normalizer        1-bit right or lzc-bit left shift, exponent adjust
//   fp_pack           special cases, flags, packing; no rounding
//
// The knobs:
//   N_APPROX         inexact low bits of the significand adder (0..24)
//   EXP_APPROX_BITS  inexact low bits of the exponent subtractor
//   LZC_APPROX_BITS  low bits the leading-zero counter ignores (<= 23)
// The defaults give the "all bits of the significand adder inexact"
// design. N_APPROX=0, EXP_APPROX_BITS=1, LZC_APPROX_BITS=0 gives the design
// whose only inexact part is the exponent-subtractor LSB, and all three at
// 0 give an exact adder that truncates instead of rounding.
//
// The datapath order, the inexact significand adder, the approximate
// leading-zero detection, the inexact exponent LSB and the missing rounding
// step follow the published inexact-adder architecture. Flush-to-zero of subnormals, the NaN
// and infinity handling, the tie-break on the significand when exponents
// are equal, and the purely combinational timing are this design's choices.
//
// Interface: a, b (32-bit packed singles) -> z (32-bit packed), flags.
// No clock: the result is valid one combinational delay after the inputs.
module inexact_fp_adder
  import fp_pkg::*;
#(
  parameter int unsigned N_APPROX        = 24,
  parameter int unsigned EXP_APPROX_BITS = 0,
  parameter int unsigned LZC_APPROX_BITS = (N_APPROX > MANT_W - 1) ? MANT_W - 1 : N_APPROX
) (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] z,
  output fp_flags_t   flags
);

  fp_unpacked_t ua, ub, lrg, sml;
  logic [EXP_W-1:0]  shamt;
  logic              swapped;
  logic [MANT_W-1:0] sml_al;
  logic              eff_sub;
  logic [MANT_W-1:0] msum;
  logic              mcout;
  logic [LZC_W-1:0]  lzc;
  logic [MANT_W-1:0] mant_n;
  logic [EXP_W-1:0]  exp_n;
  logic              ovf, unf, sum_zero;

  fp_unpack u_unpack_a (.x(a), .u(ua));
  fp_unpack u_unpack_b (.x(b), .u(ub));

  operand_swap #(.EXP_APPROX_BITS(EXP_APPROX_BITS)) u_swap (
    .a(ua), .b(ub), .lrg(lrg), .sml(sml), .shamt(shamt), .swapped(swapped)
  );

  align_shifter #(.MANT_W(MANT_W), .SH_W(EXP_W)) u_align (
    .m_in(sml.mant), .shamt(shamt), .m_out(sml_al)
  );

  assign eff_sub = ua.sign ^ ub.sign;

  loa_mantissa_adder #(.MANT_W(MANT_W), .N_APPROX(N_APPROX)) u_madd (
    .a(lrg.mant), .b(sml_al), .sub(eff_sub), .sum(msum), .cout(mcout)
  );

  approx_lzc #(.MANT_W(MANT_W), .LZC_APPROX_BITS(LZC_APPROX_BITS)) u_lzc (
    .m(msum), .lzc(lzc)
  );

  normalizer #(.MANT_W(MANT_W), .EXP_W(EXP_W)) u_norm (
    .sum(msum), .cout(mcout), .sub(eff_sub), .lzc(lzc), .exp_in(lrg.exp),
    .mant_out(mant_n), .exp_out(exp_n), .ovf(ovf), .unf(unf), .is_zero(sum_zero)
  );

  fp_pack u_pack (
    .sign(lrg.sign), .exp_n(exp_n), .mant_n(mant_n), .ovf(ovf), .unf(unf),
    .sum_zero(sum_zero), .a(ua), .b(ub), .z(z), .flags(flags)
  );

endmodule
