// tb_cnu_ipoms: exhaustive test of the I-POMS check-node unit.
//
// All 2^18 input combinations are applied. Expected outputs: XOR of the
// other five signs, and the minimum of the other five magnitudes after the
// remap 2 -> 1 (a*), computed here with a loop. Also checks that the result
// differs from the exact minimum exactly when all others are >= 2 and one
// of them is 2, and counts those cases.
module tb_cnu_ipoms;
  import ldpc_pkg::*;

  cn_in_t in  [DC];
  beta_t  out [DC];
  int checks = 0, failures = 0, diff = 0;

  cnu_ipoms dut (.in_i(in), .out_o(out));

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
        int mn, mns, s, all_ge2, any2;
        mn = 3; mns = 3; s = 0; all_ge2 = 1; any2 = 0;
        for (int f = 0; f < int'(DC); f++)
          if (f != e) begin
            int a, as;
            a = int'(in[f].a);
            as = (a == 2) ? 1 : a;
            if (a < mn) mn = a;
            if (as < mns) mns = as;
            s ^= int'(in[f].sign);
            if (a < 2) all_ge2 = 0;
            if (a == 2) any2 = 1;
          end
        checks++;
        if (int'(out[e].mag) != mns || int'(out[e].sign) != s) begin
          failures++;
          if (failures < 10) $display("FAIL v=%h e=%0d got %0d/%0d exp %0d/%0d", v, e,
                                      out[e].sign, out[e].mag, s, mns);
        end
        checks++;
        if ((int'(out[e].mag) != mn) != (all_ge2 != 0 && any2 != 0)) failures++;
        if (int'(out[e].mag) != mn) diff++;
      end
    end
    checks++;
    if (diff == 0) failures++;
    $display("imprecise cases: %0d", diff);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
