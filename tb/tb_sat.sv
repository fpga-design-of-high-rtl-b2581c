// tb_sat: exhaustive test of the saturator over all 6-bit alpha values
// (-31..+31 as produced by the VNU, plus -32). Expected: sign = alpha < 0,
// a = min(|alpha|, 7) / 2. Counts clipped values.
module tb_sat;
  import ldpc_pkg::*;

  localparam int unsigned Z = 4;
  gamma_t alpha [Z];
  cn_in_t cn    [Z];
  int checks = 0, failures = 0, clipped = 0;

  sat #(.Z(Z)) dut (.alpha_i(alpha), .cn_o(cn));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = -31; v <= 31; v++) begin
      for (int i = 0; i < int'(Z); i++) alpha[i] = gamma_t'(v + i > 31 ? -31 : v + i);
      #1;
      for (int i = 0; i < int'(Z); i++) begin
        int x, m;
        x = int'(alpha[i]);
        m = (x < 0) ? -x : x;
        if (m > 7) begin m = 7; clipped++; end
        checks++;
        if (int'(cn[i].a) != m / 2 || cn[i].sign != (x < 0)) begin
          failures++;
          $display("FAIL alpha=%0d got sign=%0d a=%0d", x, cn[i].sign, cn[i].a);
        end
      end
    end
    checks++;
    if (clipped == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
