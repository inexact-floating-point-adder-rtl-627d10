// align_shifter: aligns the smaller significand to the larger exponent.
//
// A logarithmic right barrel shifter: stage k shifts by 2^k when bit k of
// the shift amount is set. Any shift of MANT_W or more yields zero. Bits
// shifted out are dropped: the adder keeps no guard, round or sticky bits,
// because it does not round (the published inexact-adder architecture drops the rounding unit). The
// barrel structure is this design's choice.
//
// Interface: m_in (MANT_W), shamt (SH_W) -> m_out (MANT_W). Combinational.
module align_shifter #(
  parameter int unsigned MANT_W = 24,
  parameter int unsigned SH_W   = 8
) (
  input  logic [MANT_W-1:0] m_in,
  input  logic [SH_W-1:0]   shamt,
  output logic [MANT_W-1:0] m_out
);

  localparam int unsigned STAGES = $clog2(MANT_W);

  logic too_far;
  logic [MANT_W-1:0] stage [STAGES+1];

  always_comb begin
    too_far = (32'(shamt) >= MANT_W);
    stage[0] = m_in;
    for (int unsigned k = 0; k < STAGES; k++)
      stage[k+1] = shamt[k] ? (stage[k] >> (1 << k)) : stage[k];
    m_out = too_far ? '0 : stage[STAGES];
  end

endmodule
