// tb_beta_memory: writes random message words to the three layer
// addresses and reads them back, in the decoder's pattern (write layer l
// while reading layer l+1) and in random order, checking the one-cycle
// read latency and the contents against a shadow copy.
module tb_beta_memory;
  import ldpc_pkg::*;

  localparam int unsigned Z = 4;
  localparam int unsigned LW = $clog2(NL);
  logic clk = 1'b0;
  logic rd = 1'b0, wr = 1'b0;
  logic [LW-1:0] ra = '0, wa = '0;
  beta_t rdata [NB][Z];
  beta_t wdata [NB][Z];
  beta_t shadow [NL][NB][Z];
  int checks = 0, failures = 0;

  beta_memory #(.Z(Z)) dut (.clk, .rd_i(rd), .rd_addr_i(ra), .rd_data_o(rdata),
                            .wr_i(wr), .wr_addr_i(wa), .wr_data_i(wdata));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_word(input int a);
    for (int k = 0; k < int'(NB); k++)
      for (int i = 0; i < int'(Z); i++) begin
        checks++;
        if (rdata[k][i] !== shadow[a][k][i]) begin
          failures++;
          if (failures < 10) $display("FAIL addr %0d [%0d][%0d]", a, k, i);
        end
      end
  endtask

  initial begin
    foreach (wdata[k, i]) wdata[k][i] = '0;
    // fill all layers
    for (int a = 0; a < int'(NL); a++) begin
      @(negedge clk);
      wr = 1'b1;
      wa = a[LW-1:0];
      foreach (wdata[k, i]) begin
        wdata[k][i] = beta_t'($urandom);
        shadow[a][k][i] = wdata[k][i];
      end
    end
    @(negedge clk);
    wr = 1'b0;
    // decoder pattern: write layer l, read layer l+1 in the same cycle
    for (int step = 0; step < 30; step++) begin
      int l, nx;
      l = step % int'(NL);
      nx = (l + 1) % int'(NL);
      @(negedge clk);
      wr = 1'b1;
      wa = l[LW-1:0];
      rd = 1'b1;
      ra = nx[LW-1:0];
      foreach (wdata[k, i]) wdata[k][i] = beta_t'($urandom);
      @(posedge clk);
      foreach (wdata[k, i]) shadow[l][k][i] = wdata[k][i];
      @(negedge clk);
      wr = 1'b0;
      rd = 1'b0;
      expect_word(nx);
    end
    // random reads, data held while rd is low
    for (int step = 0; step < 20; step++) begin
      int a;
      a = $urandom_range(0, NL - 1);
      @(negedge clk);
      rd = 1'b1;
      ra = a[LW-1:0];
      @(negedge clk);
      rd = 1'b0;
      ra = LW'((a + 1) % int'(NL));
      expect_word(a);
      @(negedge clk);
      expect_word(a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
