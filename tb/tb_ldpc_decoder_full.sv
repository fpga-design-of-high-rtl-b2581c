// tb_ldpc_decoder_full: one complete decode with the decoder at its default
// configuration (Z = 54, N = 1296, 20 iterations, I-POMS check nodes).
// A noisy all-zero codeword is loaded in 24 block writes, decoded, and
// every a-posteriori LLR is compared with the algorithmic reference in
// ldpc_ref_pkg; the decode must take 120 cycles and must return all zeros.
module tb_ldpc_decoder_full;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int Z = int'(ZDEF);
  localparam int N = int'(NB) * Z;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic load = 1'b0;
  logic [$clog2(NB)-1:0] load_blk = '0;
  llr_t load_llr [ZDEF];
  logic start = 1'b0;
  logic busy, done;
  gamma_t app [NB][ZDEF];
  logic [ZDEF-1:0] hard [NB];
  int checks = 0, failures = 0;

  ldpc_decoder dut (
    .clk, .rst_n, .load_i(load), .load_blk_i(load_blk), .load_llr_i(load_llr),
    .start_i(start), .busy_o(busy), .done_o(done), .app_llr_o(app), .hard_o(hard)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int llr[], g[];
    int cyc, ones, chan_err;
    ref_counts_t cnt;
    cnt = '{default: 0};
    llr = new[N];
    chan_err = 0;
    for (int n = 0; n < N; n++) begin
      int v;
      v = 4 + ($urandom_range(0, 8) - 4) + ($urandom_range(0, 99) < 2 ? -7 : 0);
      if (v < -8) v = -8;
      if (v > 7) v = 7;
      if (v < 0) chan_err++;
      llr[n] = v;
    end
    foreach (load_llr[i]) load_llr[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
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
    while (!done) begin
      if (busy) cyc++;
      @(negedge clk);
    end
    checks++;
    if (cyc != int'(2 * NL * NITER)) begin
      failures++;
      $display("FAIL: decode took %0d cycles", cyc);
    end
    decode(llr, 1'b1, Z, int'(NITER), g, cnt);
    ones = 0;
    for (int c = 0; c < int'(NB); c++)
      for (int i = 0; i < Z; i++) begin
        checks++;
        if (int'(app[c][i]) != g[c*Z+i]) begin
          failures++;
          if (failures < 10) $display("FAIL gamma[%0d] = %0d, expected %0d", c*Z+i, app[c][i], g[c*Z+i]);
        end
        if (hard[c][i]) ones++;
      end
    checks++;
    if (ones != 0) failures++;
    $display("channel sign errors %0d, after decoding %0d, %0d cycles", chan_err, ones, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
