// sat: saturator between the VNUs and the CNUs for one column block.
//
// Each 6-bit alpha is clipped to the 4-bit range -7..+7. The CNU of the
// POMS / I-POMS decoders only needs the sign of the clipped value and its
// 3-bit magnitude with the LSB dropped (a 2-bit value a = |alpha_sat| >> 1),
// so that is what is passed on. A zero alpha is given a positive sign (the
// two's-complement sign bit), which is this design's reading of sgn(0).
//
// Purely combinational; no clock.
module sat
  import ldpc_pkg::*;
#(
  parameter int unsigned Z = ZDEF
) (
  input  gamma_t alpha_i [Z],  // 6-bit variable-to-check messages
  output cn_in_t cn_o    [Z]   // sign and 2-bit magnitude for the CNUs
);

  always_comb begin
    for (int i = 0; i < int'(Z); i++) begin
      logic [QT-1:0] mag;
      mag = alpha_i[i][QT-1] ? QT'(-alpha_i[i]) : QT'(alpha_i[i]);
      cn_o[i].sign = alpha_i[i][QT-1];
      // |alpha_sat| >> 1: the largest 4-bit magnitude 7 gives 3
      cn_o[i].a    = (mag > QT'(AMAX)) ? (Q-2)'(AMAX >>> 1) : mag[Q-2:1];
    end
  end

endmodule
