// tb_vnu: exhaustive test of the VNU subtractors: every 6-bit gamma in
// -31..31 against every 3-bit compressed beta. Expected:
// alpha = clamp(gamma - (+/-2*mag), -31, 31). Counts saturations.
module tb_vnu;
  import ldpc_pkg::*;

  localparam int unsigned Z = 8;
  gamma_t g [Z];
  beta_t  b [Z];
  gamma_t a [Z];
  int checks = 0, failures = 0, sats = 0;

  vnu #(.Z(Z)) dut (.gamma_i(g), .beta_i(b), .alpha_o(a));

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
        e = v - bv;
        if (e > 31) begin e = 31; sats++; end
        if (e < -31) begin e = -31; sats++; end
        checks++;
        if (int'(a[i]) != e) begin
          failures++;
          $display("FAIL gamma=%0d beta=%0d got %0d exp %0d", v, bv, a[i], e);
        end
      end
    end
    checks++;
    if (sats == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
