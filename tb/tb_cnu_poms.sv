// tb_cnu_poms: exhaustive test of the POMS check-node unit.
//
// All 2^18 combinations of six (sign, 2-bit magnitude) inputs are applied;
// each output must carry the XOR of the other five signs and the plain
// minimum of the other five magnitudes, computed here with a loop. Counts
// how often the Detect_0 case (no zero, a 1 and a 2 among the others) was
// exercised.
module tb_cnu_poms;
  import ldpc_pkg::*;

  cn_in_t in  [DC];
  beta_t  out [DC];
  int checks = 0, failures = 0, det0 = 0;

  cnu_poms dut (.in_i(in), .out_o(out));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 18); v++) begin
      for (int e = 0; e < int'(DC); e++) in[e] = cn_in_t'(v >> (3 * e));
      #1;
      for (int e = 0; e < int'(DC); e++) begin
        int mn, s, h0, h1, h2;
        mn = 3; s = 0; h0 = 0; h1 = 0; h2 = 0;
        for (int f = 0; f < int'(DC); f++)
          if (f != e) begin
            if (int'(in[f].a) < mn) mn = int'(in[f].a);
            s ^= int'(in[f].sign);
            h0 |= int'(in[f].a == 0); h1 |= int'(in[f].a == 1); h2 |= int'(in[f].a == 2);
          end
        if (h0 == 0 && h1 != 0 && h2 != 0) det0++;
        checks++;
        if (int'(out[e].mag) != mn || int'(out[e].sign) != s) begin
          failures++;
          if (failures < 10) $display("FAIL v=%h e=%0d got %0d/%0d exp %0d/%0d", v, e,
                                      out[e].sign, out[e].mag, s, mn);
        end
      end
    end
    checks++;
    if (det0 == 0) failures++;
    $display("Detect_0 cases: %0d", det0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
