// tb_ldpc_fer: small error-rate run over a simulated AWGN channel.
//
// The all-zero codeword is sent as BPSK (+1) over Gaussian noise at Eb/N0 =
// 2.0, 2.5 and 3.0 dB (rate 1/2, so sigma^2 = 1 / 10^(EbN0/10)). Channel
// LLRs 2y/sigma^2 are rounded and clipped to -7..+7 (4 bits). Each frame is
// decoded by an I-POMS decoder (default configuration) and a POMS decoder
// side by side. Every output LLR is compared with the reference model, and
// the testbench prints bit and frame error counts per noise level for both
// rules. Checks: exact agreement with the model, fewer bit errors after
// decoding than on the channel at every level, and the 120-cycle decode
// time. Eight frames per level are far too few for smooth curves; this
// shows the error-rate trend and that both rules decode.
module tb_ldpc_fer;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int Z = int'(ZDEF);
  localparam int N = int'(NB) * Z;
  localparam int FRAMES = 8;
  localparam int NPTS = 3;
  localparam real EBN0_DB [NPTS] = '{2.0, 2.5, 3.0};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic load = 1'b0;
  logic [$clog2(NB)-1:0] load_blk = '0;
  llr_t load_llr [ZDEF];
  logic start = 1'b0;
  logic busy_i, done_i, busy_p, done_p;
  gamma_t app_i [NB][ZDEF];
  gamma_t app_p [NB][ZDEF];
  logic [ZDEF-1:0] hard_i [NB];
  logic [ZDEF-1:0] hard_p [NB];
  int checks = 0, failures = 0;

  ldpc_decoder dut_i (
    .clk, .rst_n, .load_i(load), .load_blk_i(load_blk), .load_llr_i(load_llr),
    .start_i(start), .busy_o(busy_i), .done_o(done_i), .app_llr_o(app_i), .hard_o(hard_i)
  );

  ldpc_decoder #(.IMPRECISE(1'b0)) dut_p (
    .clk, .rst_n, .load_i(load), .load_blk_i(load_blk), .load_llr_i(load_llr),
    .start_i(start), .busy_o(busy_p), .done_o(done_p), .app_llr_o(app_p), .hard_o(hard_p)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (NPTS * FRAMES * 200 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1, 1000000))) / 1000001.0;
    u2 = (real'($urandom_range(0, 1000000))) / 1000001.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  initial begin
    int llr[], g_i[], g_p[];
    ref_counts_t cnt;
    cnt = '{default: 0};
    llr = new[N];
    foreach (load_llr[i]) load_llr[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < NPTS; p++) begin
      real s2, sig;
      int ch_err, be_i, be_p, fe_i, fe_p;
      s2 = 1.0 / (10.0 ** (EBN0_DB[p] / 10.0));
      sig = $sqrt(s2);
      ch_err = 0; be_i = 0; be_p = 0; fe_i = 0; fe_p = 0;
      for (int f = 0; f < FRAMES; f++) begin
        int cyc, e_i, e_p;
        for (int n = 0; n < N; n++) begin
          real y;
          int q;
          y = 1.0 + sig * gauss();
          q = int'(2.0 * y / s2);
          if (q > 7) q = 7;
          if (q < -7) q = -7;
          if (q < 0) ch_err++;
          llr[n] = q;
        end
        for (int c = 0; c < int'(NB); c++) begin
          @(negedge clk);
          load = 1'b1;
          load_blk = c[$clog2(NB)-1:0];
          for (int i = 0; i < Z; i++) load_llr[i] = llr_t'(llr[c*Z+i]);
        end
        @(negedge clk);
        load = 1'b0;
        start = 1'b1;
        @(negedge clk);
        start = 1'b0;
        cyc = 0;
        while (!done_i) begin
          if (busy_i) cyc++;
          @(negedge clk);
        end
        check(cyc == int'(2 * NL * NITER) && done_p, "120-cycle decode");
        decode(llr, 1'b1, Z, int'(NITER), g_i, cnt);
        decode(llr, 1'b0, Z, int'(NITER), g_p, cnt);
        e_i = 0; e_p = 0;
        for (int c = 0; c < int'(NB); c++)
          for (int i = 0; i < Z; i++) begin
            check(int'(app_i[c][i]) == g_i[c*Z+i], "I-POMS output equals the model");
            check(int'(app_p[c][i]) == g_p[c*Z+i], "POMS output equals the model");
            if (hard_i[c][i]) e_i++;
            if (hard_p[c][i]) e_p++;
          end
        be_i += e_i; be_p += e_p;
        if (e_i > 0) fe_i++;
        if (e_p > 0) fe_p++;
      end
      $display("Eb/N0 %.1f dB: channel BER %.4f | POMS BER %.5f FER %0d/%0d | I-POMS BER %.5f FER %0d/%0d",
               EBN0_DB[p], real'(ch_err) / (N * FRAMES),
               real'(be_p) / (N * FRAMES), fe_p, FRAMES, real'(be_i) / (N * FRAMES), fe_i, FRAMES);
      check(be_p < ch_err, "POMS reduces bit errors");
      check(be_i < ch_err, "I-POMS reduces bit errors");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
