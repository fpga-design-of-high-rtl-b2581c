// tb_gamma_memory: loads random 4-bit LLRs block by block and checks the
// sign-extended values on the read port, then performs full-width layer
// writes of random 6-bit values (one of them in the same cycle as a load,
// which the write must win) and checks every location against a shadow
// copy kept by the testbench.
module tb_gamma_memory;
  import ldpc_pkg::*;

  localparam int unsigned Z = 6;
  logic clk = 1'b0;
  logic load = 1'b0, wr = 1'b0;
  logic [$clog2(NB)-1:0] blk = '0;
  llr_t   llr  [Z];
  gamma_t wd   [NB][Z];
  gamma_t rd   [NB][Z];
  int     shadow [NB][Z];
  int checks = 0, failures = 0;

  gamma_memory #(.Z(Z)) dut (.clk, .load_i(load), .load_blk_i(blk), .load_llr_i(llr),
                             .wr_i(wr), .wr_data_i(wd), .rd_o(rd));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string what);
    for (int c = 0; c < int'(NB); c++)
      for (int i = 0; i < int'(Z); i++) begin
        checks++;
        if (int'(rd[c][i]) != shadow[c][i]) begin
          failures++;
          if (failures < 10) $display("FAIL %s [%0d][%0d] got %0d exp %0d", what, c, i, rd[c][i], shadow[c][i]);
        end
      end
  endtask

  initial begin
    foreach (llr[i]) llr[i] = '0;
    foreach (wd[c, i]) wd[c][i] = '0;
    for (int c = NB - 1; c >= 0; c--) begin
      @(negedge clk);
      load = 1'b1;
      blk = c[$clog2(NB)-1:0];
      for (int i = 0; i < int'(Z); i++) begin
        llr[i] = llr_t'($urandom_range(0, 15));
        shadow[c][i] = int'(llr[i]);
      end
    end
    @(negedge clk);
    load = 1'b0;
    compare("load");
    for (int rep = 0; rep < 4; rep++) begin
      @(negedge clk);
      wr = 1'b1;
      load = (rep == 2);
      blk = 5;
      foreach (wd[c, i]) begin
        wd[c][i] = gamma_t'($urandom_range(0, 62) - 31);
        shadow[c][i] = int'(wd[c][i]);
      end
      @(negedge clk);
      wr = 1'b0;
      load = 1'b0;
      compare("write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
