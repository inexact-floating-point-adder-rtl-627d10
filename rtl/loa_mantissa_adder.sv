// loa_mantissa_adder: inexact significand adder/subtractor built as a
// lower-part-OR adder (LOA).
//
// The operand bits split into a lower part of N_APPROX bits and an upper
// part of MANT_W - N_APPROX bits. The lower part has no carry chain: each
// sum bit is a_i | b'_i, where b' is b, inverted for a subtraction. The
// upper part is an exact adder; its carry-in is a'_{n-1} & b'_{n-1}, the
// AND of the top lower-part bit pair, so the largest carry the lower part
// would produce is not lost. A subtraction is a + ~b + 1 on the same
// adder. The "+1" enters at bit 0, so it only has an effect when
// N_APPROX = 0. With N_APPROX = MANT_W every bit is inexact and cout is the
// AND of the top bit pair.
//
// Using an inexact adder for the significand, and the lower-part-OR adder as
// one of the candidates, follows the published inexact-adder architecture; N_APPROX = MANT_W
// is its "all bits inexact" design. How subtraction is mapped onto the LOA
// is this design's choice.
//
// Interface: a, b (MANT_W), sub -> sum (MANT_W), cout. Combinational.
module loa_mantissa_adder #(
  parameter int unsigned MANT_W   = 24,
  parameter int unsigned N_APPROX = 24
) (
  input  logic [MANT_W-1:0] a,
  input  logic [MANT_W-1:0] b,
  input  logic              sub,
  output logic [MANT_W-1:0] sum,
  output logic              cout
);

  localparam int unsigned N  = (N_APPROX > MANT_W) ? MANT_W : N_APPROX;
  localparam int unsigned HI = MANT_W - N;

  logic [MANT_W-1:0] bx;
  assign bx = b ^ {MANT_W{sub}};

  if (N == 0) begin : g_exact
    assign {cout, sum} = {1'b0, a} + {1'b0, bx} + (MANT_W+1)'(sub);
  end else if (HI == 0) begin : g_all_inexact
    assign sum  = a | bx;
    assign cout = a[MANT_W-1] & bx[MANT_W-1];
  end else begin : g_split
    logic cin;
    assign sum[N-1:0] = a[N-1:0] | bx[N-1:0];
    assign cin        = a[N-1] & bx[N-1];
    assign {cout, sum[MANT_W-1:N]} = {1'b0, a[MANT_W-1:N]} + {1'b0, bx[MANT_W-1:N]}
                                     + (HI+1)'(cin);
  end

endmodule
