// tb_controller: runs two decodes of 20 iterations and checks the control
// sequence cycle by cycle: alternating read and write cycles, layer order
// 0,0,1,1,2,2 repeated, first_iter only during the first 6 cycles, the
// message-memory read address equal to the layer of the next read cycle,
// exactly 120 busy cycles, a one-cycle done pulse, and start ignored while
// busy.
module tb_controller;
  import ldpc_pkg::*;

  localparam int unsigned LW = $clog2(NL);
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done, en_r, en_w, first;
  logic [LW-1:0] layer, bra;
  int checks = 0, failures = 0;

  controller dut (.clk, .rst_n, .start_i(start), .busy_o(busy), .done_o(done),
                  .en_read_o(en_r), .en_write_o(en_w), .count_layer_o(layer),
                  .first_iter_o(first), .beta_rd_addr_o(bra));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    chk(!busy && !done && !en_r && !en_w, "idle after reset");
    chk(bra == 0, "idle read address is layer 0");
    for (int run = 0; run < 2; run++) begin
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      for (int t = 0; t < int'(2 * NL * NITER); t++) begin
        int exp_layer, exp_next;
        exp_layer = (t / 2) % int'(NL);
        exp_next  = (t % 2 == 0) ? exp_layer : (exp_layer + 1) % int'(NL);
        chk(busy, $sformatf("busy at t=%0d", t));
        chk(en_r == (t % 2 == 0) && en_w == (t % 2 == 1), $sformatf("read/write phase t=%0d", t));
        chk(int'(layer) == exp_layer, $sformatf("layer t=%0d got %0d", t, layer));
        chk(first == (t < int'(2 * NL)), $sformatf("first_iter t=%0d", t));
        chk(int'(bra) == exp_next, $sformatf("beta read address t=%0d", t));
        chk(!done, "no done while busy");
        if (t == 7) start = 1'b1;  // ignored while busy
        @(negedge clk);
        start = 1'b0;
      end
      chk(!busy && done, "done pulse after 120 cycles");
      @(negedge clk);
      chk(!busy && !done, "done lasts one cycle, idle");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
