// fp_pkg: types and constants shared by the inexact single-precision adder.
//
// The adder works on IEEE-754 single precision (1 sign bit, 8 exponent
// bits, 23 fraction bits). Inside, an operand travels in unpacked form: the
// 24-bit significand with the hidden bit restored, plus class bits that the
// packing stage needs for special cases. The status flags (overflow,
// underflow, zero) follow the published inexact-adder architecture; the invalid flag for NaN
// and inf - inf is this design's own addition.
package fp_pkg;

  localparam int unsigned EXP_W  = 8;
  localparam int unsigned FRAC_W = 23;
  localparam int unsigned MANT_W = FRAC_W + 1;   // significand with hidden bit
  localparam int unsigned LZC_W  = $clog2(MANT_W + 1);

  localparam logic [EXP_W-1:0] EXP_MAX = '1;     // all-ones: infinity / NaN
  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } fp32_t;

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [MANT_W-1:0] mant;     // {hidden, fraction}; zero for a zero operand
    logic              is_zero;  // zero or subnormal (flushed)
    logic              is_inf;
    logic              is_nan;
  } fp_unpacked_t;

  typedef struct packed {
    logic overflow;
    logic underflow;
    logic zero;
    logic invalid;
  } fp_flags_t;

endpackage
