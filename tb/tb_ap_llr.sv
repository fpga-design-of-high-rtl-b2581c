// tb_ap_llr: exhaustive test of the AP-LLR adders: every 6-bit alpha in
// -31..31 against every 3-bit compressed beta. Expected:
// gamma = clamp(alpha + (+/-2*mag), -31, 31). Counts saturations.
module tb_ap_llr;
  import ldpc_pkg::*;

  localparam int unsigned Z = 8;
  gamma_t g [Z];
  beta_t  b [Z];
  gamma_t a [Z];
  int checks = 0, failures = 0, sats = 0;

  ap_llr #(.Z(Z)) dut (.alpha_i(g), .beta_i(b), .gamma_o(a));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -31; v <= 31; v++) begin
      for (int i = 0; i < int'(Z); i++) begin
        g[i] = gamma_t'(v);
        b[i] = beta_t'(i);
      end
      #1;
      for (int i = 0; i < int'(Z); i++) begin
        int bv, e;
        bv = 2 * (i & 3);
        if (i & 4) bv = -bv;
        e = v + bv;
        if (e > 31) begin e = 31; sats++; end
        if (e < -31) begin e = -31; sats++; end
        checks++;
        if (int'(a[i]) != e) begin
          failures++;
          $display("FAIL alpha=%0d beta=%0d got %0d exp %0d", v, bv, a[i], e);
        end
      end
    end
    checks++;
    if (sats == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
