// cnu_ipoms: check-node unit of the Imprecise POMS (I-POMS) decoder.
//
// Same interface and sign handling as cnu_poms, but the Detect_0 signal is
// dropped. Each 2-bit magnitude a is first remapped to a* (0->0, 1->1,
// 2->1, 3->3; i.e. a*[1] = a[1]&a[0], a*[0] = a[1]|a[0]) and the outgoing
// magnitude is {AND of the other a*[1], AND of the other a*[0]}. This equals
// the POMS minimum except when all other inputs are >= 2 and one of them is
// 2, where it gives 1 instead of 2. The magnitude logic is two exclusive-AND
// circuits of 12 two-input gates each, as in the architecture; the remap of
// a to a* and the sign XOR come in addition.
//
// Purely combinational; no clock.
module cnu_ipoms
  import ldpc_pkg::*;
(
  input  cn_in_t in_i  [DC],  // saturated variable-to-check messages
  output beta_t  out_o [DC]   // new check-to-variable messages
);

  logic [DC-1:0] sgn, msb_s, lsb_s;
  logic [DC-1:0] and_msb, and_lsb;
  logic          sgn_all;

  always_comb begin
    for (int i = 0; i < int'(DC); i++) begin
      sgn[i]   = in_i[i].sign;
      msb_s[i] = in_i[i].a[1] & in_i[i].a[0];
      lsb_s[i] = in_i[i].a[1] | in_i[i].a[0];
    end
  end

  and_excl #(.N(DC)) u_and_msb (.x_i(msb_s), .y_o(and_msb));
  and_excl #(.N(DC)) u_and_lsb (.x_i(lsb_s), .y_o(and_lsb));

  assign sgn_all = ^sgn;

  always_comb begin
    for (int i = 0; i < int'(DC); i++) begin
      out_o[i].sign = sgn_all ^ sgn[i];
      out_o[i].mag  = {and_msb[i], and_lsb[i]};
    end
  end

endmodule
