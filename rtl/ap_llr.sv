// ap_llr: a-posteriori LLR update unit for one column block.
//
// Computes gamma = alpha + beta_new for Z variable nodes in parallel with
// 6-bit saturated adders (saturation to +/-31). The new check-to-variable
// message comes from the CNU in its 3-bit POMS form and is widened to 4 bits
// by appending a zero LSB, as in the POMS AP-LLR unit of the architecture.
// alpha is the unsaturated 6-bit VNU output. Symmetric saturation is this
// design's choice.
//
// Purely combinational; no clock.
module ap_llr
  import ldpc_pkg::*;
#(
  parameter int unsigned Z = ZDEF
) (
  input  gamma_t alpha_i [Z],  // variable-to-check messages from the VNU
  input  beta_t  beta_i  [Z],  // new check-to-variable messages from the CNUs
  output gamma_t gamma_o [Z]   // updated a-posteriori LLRs
);

  always_comb begin
    for (int i = 0; i < int'(Z); i++) begin
      gamma_o[i] = sat_gamma(7'(signed'(alpha_i[i])) + 7'(signed'(beta_value(beta_i[i]))));
    end
  end

endmodule
