// cnu_poms: check-node unit of the Partially Offset Min-Sum (POMS) decoder.
//
// For each of the DC = 6 edges, the outgoing message is the XOR of the other
// five signs and the minimum of the other five 2-bit magnitudes a (the
// 4-bit saturated |alpha| with its LSB removed). The minimum needs no
// comparator tree: with AndMsb / AndLsb the AND of the other inputs' bit 1 /
// bit 0, and Detect_0 = 0 when one of the other inputs is zero,
//   |beta| = 01                  if {Detect_0, AndMsb, AndLsb} == 3'b100
//          = {AndMsb, AndLsb}    otherwise,
// which is the exact minimum. The dropped LSB of the result is zero, which
// is the "partial offset" of POMS: an OMS offset of 1 applied only to odd
// minima. This follows the architecture's equations (2)-(5); the gate
// sharing of the exclusive ANDs (prefix/suffix chains) is this design's.
//
// Purely combinational; no clock.
module cnu_poms
  import ldpc_pkg::*;
(
  input  cn_in_t in_i  [DC],  // saturated variable-to-check messages
  output beta_t  out_o [DC]   // new check-to-variable messages
);

  logic [DC-1:0] sgn, msb, lsb, nz;
  logic [DC-1:0] and_msb, and_lsb, detect_0;
  logic          sgn_all;

  always_comb begin
    for (int i = 0; i < int'(DC); i++) begin
      sgn[i] = in_i[i].sign;
      msb[i] = in_i[i].a[1];
      lsb[i] = in_i[i].a[0];
      nz[i]  = |in_i[i].a;
    end
  end

  and_excl #(.N(DC)) u_and_msb (.x_i(msb), .y_o(and_msb));
  and_excl #(.N(DC)) u_and_lsb (.x_i(lsb), .y_o(and_lsb));
  and_excl #(.N(DC)) u_det_0   (.x_i(nz),  .y_o(detect_0));

  assign sgn_all = ^sgn;

  always_comb begin
    for (int i = 0; i < int'(DC); i++) begin
      out_o[i].sign = sgn_all ^ sgn[i];
      if ({detect_0[i], and_msb[i], and_lsb[i]} == 3'b100) out_o[i].mag = 2'b01;
      else                                                  out_o[i].mag = {and_msb[i], and_lsb[i]};
    end
  end

endmodule
