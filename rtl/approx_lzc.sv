// approx_lzc: approximate leading-zero counter for normalization.
//
// Counts the zeros above the most significant one of m, but only looks at
// bits MANT_W-1 down to LZC_APPROX_BITS. The lower bits come from the
// inexact part of the significand adder, so their leading-zero position
// carries little information; ignoring them shortens the priority encoder.
// When every examined bit is zero the count is the width of the examined
// part, MANT_W - LZC_APPROX_BITS. With LZC_APPROX_BITS = 0 the counter is
// exact (an all-zero input gives MANT_W).
//
// Simplifying the leading-zero detection because the low bits are inexact
// follows the published inexact-adder architecture; dropping exactly the inexact bits is this
// design's reading of it. LZC_APPROX_BITS is capped at MANT_W-1.
//
// Interface: m (MANT_W) -> lzc ($clog2(MANT_W+1) bits). Combinational.
module approx_lzc #(
  parameter int unsigned MANT_W          = 24,
  parameter int unsigned LZC_APPROX_BITS = 23
) (
  input  logic [MANT_W-1:0]         m,
  output logic [$clog2(MANT_W+1)-1:0] lzc
);

  localparam int unsigned L = (LZC_APPROX_BITS > MANT_W - 1) ? MANT_W - 1 : LZC_APPROX_BITS;
  localparam int unsigned LW = $clog2(MANT_W + 1);

  logic found;

  always_comb begin
    lzc   = LW'(MANT_W - L);
    found = 1'b0;
    for (int i = MANT_W - 1; i >= int'(L); i--) begin
      if (!found && m[i]) begin
        lzc   = LW'(MANT_W - 1 - i);
        found = 1'b1;
      end
    end
  end

endmodule
