// operand_swap: exponent comparison and operand swap.
//
// Two exponent subtractors run side by side, one for Ea - Eb and one for
// Eb - Ea. The borrow of Ea - Eb says that B has the larger exponent; when
// the exponents are equal the significands decide, so the operand with the
// larger magnitude always leaves on `lrg` and the significand subtraction
// that follows cannot go negative. The alignment shift is the difference
// from the subtractor whose result is non-negative. With EXP_APPROX_BITS > 0
// that difference is inexact in its low bits; the borrow (and so the swap
// decision) stays exact.
//
// Comparing exponents and swapping follows the published inexact-adder architecture. Using two
// subtractors, and breaking exponent ties on the significand, are this
// design's choices.
//
// Interface: a, b (fp_unpacked_t) -> lrg, sml, shamt (EXP_W), swapped.
// Combinational.
module operand_swap
  import fp_pkg::*;
#(
  parameter int unsigned EXP_APPROX_BITS = 0
) (
  input  fp_unpacked_t     a,
  input  fp_unpacked_t     b,
  output fp_unpacked_t     lrg,
  output fp_unpacked_t     sml,
  output logic [EXP_W-1:0] shamt,
  output logic             swapped
);

  logic [EXP_W-1:0] d_ab, d_ba;
  logic             bw_ab, bw_ba;

  exp_subtractor #(.EXP_W(EXP_W), .EXP_APPROX_BITS(EXP_APPROX_BITS)) u_sub_ab (
    .a(a.exp), .b(b.exp), .diff(d_ab), .borrow(bw_ab)
  );
  exp_subtractor #(.EXP_W(EXP_W), .EXP_APPROX_BITS(EXP_APPROX_BITS)) u_sub_ba (
    .a(b.exp), .b(a.exp), .diff(d_ba), .borrow(bw_ba)
  );

  always_comb begin
    // equal exponents: neither subtraction borrows
    swapped = bw_ab | (!bw_ba && (a.mant < b.mant));
    lrg     = swapped ? b : a;
    sml     = swapped ? a : b;
    shamt   = bw_ab ? d_ba : d_ab;
  end

endmodule
