// exp_subtractor: exponent subtractor with an optionally inexact low part.
//
// Computes diff = a - b (modulo 2^EXP_W) and borrow = (a < b) as a ripple
// chain of full subtractors. The lowest EXP_APPROX_BITS positions use an
// inexact cell, the subtraction counterpart of a lower-part-OR adder cell:
// the difference bit is simply a_i | b_i and no borrow ripples between the
// inexact cells. The borrow into the first exact cell is the half-subtractor
// borrow (~a & b) of the top inexact position. With one inexact bit this
// is exact except that 1 - 1 gives 1, so equal exponents with an odd value
// report a difference of one.
//
// Approximating only the exponent LSB is one of the two designs this adder
// is built to study. The particular inexact cell is this design's choice.
//
// Interface: a, b (EXP_W) -> diff (EXP_W), borrow. Combinational.
module exp_subtractor #(
  parameter int unsigned EXP_W           = 8,
  parameter int unsigned EXP_APPROX_BITS = 0
) (
  input  logic [EXP_W-1:0] a,
  input  logic [EXP_W-1:0] b,
  output logic [EXP_W-1:0] diff,
  output logic             borrow
);

  localparam int unsigned K = (EXP_APPROX_BITS > EXP_W) ? EXP_W : EXP_APPROX_BITS;

  logic [EXP_W:0] bw;   // bw[i] is the borrow into bit i

  always_comb begin
    bw = '0;
    for (int unsigned i = 0; i < EXP_W; i++) begin
      if (i < K) begin
        diff[i] = a[i] | b[i];
        bw[i+1] = (i == K - 1) ? (~a[i] & b[i]) : 1'b0;
      end else begin
        diff[i] = a[i] ^ b[i] ^ bw[i];
        bw[i+1] = (~a[i] & b[i]) | (~(a[i] ^ b[i]) & bw[i]);
      end
    end
    borrow = bw[EXP_W];
  end

endmodule
