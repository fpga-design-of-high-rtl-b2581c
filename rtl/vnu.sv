// vnu: variable-node unit for one column block of the base matrix.
//
// Computes alpha = gamma - beta for Z variable nodes in parallel with
// 6-bit saturated subtractors (saturation to +/-31). The check-to-variable
// message arrives in the compressed 3-bit POMS form (sign, 2-bit magnitude)
// and is widened to its 4-bit value by appending a zero LSB before the
// subtraction, as in the POMS VNU of the architecture. Symmetric saturation
// is this design's choice.
//
// Purely combinational; no clock.
module vnu
  import ldpc_pkg::*;
#(
  parameter int unsigned Z = ZDEF
) (
  input  gamma_t gamma_i [Z],  // a-posteriori LLRs read for this slot
  input  beta_t  beta_i  [Z],  // previous check-to-variable messages
  output gamma_t alpha_o [Z]   // variable-to-check messages (6 bits)
);

  always_comb begin
    for (int i = 0; i < int'(Z); i++) begin
      alpha_o[i] = sat_gamma(7'(signed'(gamma_i[i])) - 7'(signed'(beta_value(beta_i[i]))));
    end
  end

endmodule
