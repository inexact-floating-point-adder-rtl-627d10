// normalizer: brings the significand sum back to the form 1.xxx.
//
// After an effective addition with a carry out, the 25-bit result
// {cout, sum} is shifted right by one (the dropped bit is simply lost, as
// the adder does not round) and the exponent goes up by one. Otherwise
// the sum is shifted left by the leading-zero count and the exponent goes
// down by the same amount. The exponent arithmetic is done one bit wider so
// overflow (result exponent all-ones or more) and underflow (result
// exponent zero or below) can be flagged. is_zero reports an all-zero sum.
//
// Normalizing by a leading-zero count, and adjusting the exponent, follow
// the published inexact-adder architecture; truncating instead of rounding follows its choice
// to leave out rounding. Exponent adjustment is exact.
//
// Interface: sum (MANT_W), cout, sub, lzc, exp_in (EXP_W) -> mant_out
// (MANT_W), exp_out (EXP_W), ovf, unf, is_zero. Combinational.
module normalizer #(
  parameter int unsigned MANT_W = 24,
  parameter int unsigned EXP_W  = 8
) (
  input  logic [MANT_W-1:0]           sum,
  input  logic                        cout,
  input  logic                        sub,
  input  logic [$clog2(MANT_W+1)-1:0] lzc,
  input  logic [EXP_W-1:0]            exp_in,
  output logic [MANT_W-1:0]           mant_out,
  output logic [EXP_W-1:0]            exp_out,
  output logic                        ovf,
  output logic                        unf,
  output logic                        is_zero
);

  logic signed [EXP_W+1:0] e;   // two bits wider: sign and overflow room

  always_comb begin
    is_zero = (sum == '0) && !(cout && !sub);
    if (cout && !sub) begin
      mant_out = {1'b1, sum[MANT_W-1:1]};
      e        = $signed({2'b00, exp_in}) + 1;
    end else begin
      mant_out = sum << lzc;
      e        = $signed({2'b00, exp_in}) - $signed((EXP_W+2)'(lzc));
    end
    ovf     = (e >= $signed((EXP_W+2)'({EXP_W{1'b1}})));
    unf     = (e <= 0);
    exp_out = e[EXP_W-1:0];
  end

endmodule
