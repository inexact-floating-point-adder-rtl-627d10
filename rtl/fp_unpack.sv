// fp_unpack: first stage of the adder. Splits a packed IEEE-754 single into
// sign, exponent and a 24-bit significand whose hidden bit is restored, and
// classifies the operand.
//
// Restoring the hidden bit follows the published inexact-adder architecture. Flushing
// subnormals to zero (exponent 0 => significand 0, is_zero set) and
// classifying infinity/NaN are this design's choices.
//
// Interface: x (32-bit packed) -> u (fp_unpacked_t). Purely combinational.
module fp_unpack
  import fp_pkg::*;
(
  input  logic [31:0]  x,
  output fp_unpacked_t u
);

  fp32_t f;
  assign f = fp32_t'(x);

  always_comb begin
    u.sign    = f.sign;
    u.exp     = f.exp;
    u.is_zero = (f.exp == '0);
    u.is_inf  = (f.exp == EXP_MAX) && (f.frac == '0);
    u.is_nan  = (f.exp == EXP_MAX) && (f.frac != '0);
    u.mant    = u.is_zero ? '0 : {1'b1, f.frac};
  end

endmodule
