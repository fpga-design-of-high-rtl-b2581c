// tb_ldpc_decoder: end-to-end test of the layered decoder at the full code
// size (Z = 54, N = 1296), with both check-node rules side by side: one
// decoder with the default I-POMS CNUs and one with POMS CNUs, fed the same
// frames. Each frame is loaded block by block, decoded for 20 iterations,
// and every a-posteriori LLR and hard decision is compared with the
// algorithmic reference in ldpc_ref_pkg. The decode must take exactly
// 2 cycles per layer (120 cycles). Frames run back to back, so the second and
// later frames also check that messages left in the message memory by the
// previous frame are ignored in the first iteration. Frames: a noisy
// all-zero codeword (must decode to all zeros), uniformly random LLRs, and
// strong LLRs of mixed sign. The testbench counts how often each mechanism
// (4-bit clipping, the POMS Detect_0 path, the I-POMS approximation, the
// partial offset, negative messages, stale messages ignored) happened and fails if
// one never did.
module tb_ldpc_decoder;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int unsigned Z = ZDEF;
  localparam int N = NB * Z;
  localparam int CYC_PER_DECODE = 2 * NL * NITER;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic load = 1'b0;
  logic [$clog2(NB)-1:0] load_blk = '0;
  llr_t load_llr [Z];
  logic start = 1'b0;

  logic   busy_i, done_i, busy_p, done_p;
  gamma_t app_i [NB][Z];
  gamma_t app_p [NB][Z];
  logic [Z-1:0] hard_i [NB];
  logic [Z-1:0] hard_p [NB];

  ldpc_decoder dut_i (
    .clk, .rst_n, .load_i(load), .load_blk_i(load_blk), .load_llr_i(load_llr),
    .start_i(start), .busy_o(busy_i), .done_o(done_i), .app_llr_o(app_i), .hard_o(hard_i)
  );

  ldpc_decoder #(.IMPRECISE(1'b0)) dut_p (
    .clk, .rst_n, .load_i(load), .load_blk_i(load_blk), .load_llr_i(load_llr),
    .start_i(start), .busy_o(busy_p), .done_o(done_p), .app_llr_o(app_p), .hard_o(hard_p)
  );

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
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

  ref_counts_t cnt_i, cnt_p;
  int stale_frames = 0;

  task automatic run_frame(input int llr[], input string name, input bit expect_zero);
    int g_i[], g_p[];
    int t0, busy_cycles, errs_i;
    // load
    for (int c = 0; c < int'(NB); c++) begin
      @(negedge clk);
      load = 1'b1;
      load_blk = c[$clog2(NB)-1:0];
      for (int i = 0; i < int'(Z); i++) load_llr[i] = llr_t'(llr[c*Z+i]);
    end
    @(negedge clk);
    load = 1'b0;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    t0 = cycle;
    busy_cycles = 0;
    while (!done_i) begin
      if (busy_i) busy_cycles++;
      check(busy_i == busy_p, "both decoders busy together");
      @(negedge clk);
    end
    check(done_p, {name, ": POMS decoder done together"});
    check(busy_cycles == CYC_PER_DECODE,
          $sformatf("%s: decode took %0d cycles, expected %0d", name, busy_cycles, CYC_PER_DECODE));
    check(!busy_i, "idle after done");
    decode(llr, 1'b1, int'(Z), int'(NITER), g_i, cnt_i);
    decode(llr, 1'b0, int'(Z), int'(NITER), g_p, cnt_p);
    errs_i = 0;
    for (int c = 0; c < int'(NB); c++)
      for (int i = 0; i < int'(Z); i++) begin
        int n;
        n = c * int'(Z) + i;
        check(int'(app_i[c][i]) == g_i[n],
              $sformatf("%s I-POMS gamma[%0d] = %0d, expected %0d", name, n, app_i[c][i], g_i[n]));
        check(int'(app_p[c][i]) == g_p[n],
              $sformatf("%s POMS gamma[%0d] = %0d, expected %0d", name, n, app_p[c][i], g_p[n]));
        check(hard_i[c][i] == (g_i[n] < 0), $sformatf("%s I-POMS hard[%0d]", name, n));
        check(hard_p[c][i] == (g_p[n] < 0), $sformatf("%s POMS hard[%0d]", name, n));
        if (hard_i[c][i]) errs_i++;
      end
    if (expect_zero) check(errs_i == 0, $sformatf("%s: %0d bit errors after decoding", name, errs_i));
    $display("%s: decoded in %0d cycles, I-POMS hard ones=%0d", name, busy_cycles, errs_i);
  endtask

  initial begin
    int llr[];
    int chan_err;
    cnt_i = '{default: 0};
    cnt_p = '{default: 0};
    foreach (load_llr[i]) load_llr[i] = '0;
    llr = new[N];
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // Frame 1: all-zero codeword over a noisy channel (about 2% sign errors).
    chan_err = 0;
    for (int n = 0; n < N; n++) begin
      int v;
      v = 4 + ($urandom_range(0, 8) - 4) + ($urandom_range(0, 99) < 2 ? -7 : 0);
      if (v > 7) v = 7;
      if (v < -8) v = -8;
      if (v < 0) chan_err++;
      llr[n] = v;
    end
    $display("frame 1: %0d channel sign errors", chan_err);
    run_frame(llr, "noisy zero codeword", 1'b1);

    // Frame 2: random LLRs (stale messages from frame 1 in memory).
    for (int n = 0; n < N; n++) llr[n] = $urandom_range(0, 15) - 8;
    run_frame(llr, "random LLRs", 1'b0);
    stale_frames++;

    // Frame 3: strong LLRs of random sign.
    for (int n = 0; n < N; n++) llr[n] = ($urandom_range(0, 1) != 0) ? 7 : -8;
    run_frame(llr, "strong LLRs", 1'b0);
    stale_frames++;

    $display("mechanisms: clip=%0d detect0=%0d imprecise=%0d partial_offset=%0d neg_beta=%0d vnu_sat=%0d ap_sat=%0d",
             cnt_p.sat_clip, cnt_p.detect0_path, cnt_i.imprecise_diff, cnt_p.partial_offset,
             cnt_p.neg_beta, cnt_p.vnu_sat, cnt_p.ap_sat);
    $display("frames decoded over stale messages: %0d", stale_frames);
    check(cnt_p.sat_clip > 0, "4-bit clipping before the CNU happened");
    check(cnt_p.detect0_path > 0, "POMS Detect_0 path happened");
    check(cnt_i.imprecise_diff > 0, "I-POMS approximation differed from the minimum");
    check(cnt_p.partial_offset > 0, "partial offset (odd minimum) happened");
    check(cnt_p.neg_beta > 0, "negative messages happened");
    check(stale_frames > 0, "frame decoded over stale messages");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
