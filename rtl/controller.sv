// controller: layer and iteration sequencer of the layered decoder.
//
// After a start pulse the decoder runs N_ITER iterations of NL layers, two
// clock cycles per layer: a read cycle (En_read: the memories are read, the
// whole layer is processed and the results are registered) followed by a
// write cycle (En_write: the results are written back). One iteration thus
// takes 2*NL = 6 cycles and a decode 2*NL*N_ITER = 120 cycles, as in the
// architecture's throughput figure. count_layer gives the layer being
// processed. first_iter_o marks the first iteration, in which the stored
// check-to-variable messages are replaced by zeros (their initial value).
// beta_rd_addr_o is the layer whose messages must be ready in the next
// cycle, for the synchronous-read message memory.
//
// Timing: busy_o is high for exactly 2*NL*N_ITER cycles starting the cycle
// after start_i is sampled; done_o pulses for one cycle right after. start_i
// is ignored while busy. Active-low synchronous reset. The fixed iteration
// count (no early stop) and the start/done handshake are this design's
// choices.
module controller
  import ldpc_pkg::*;
#(
  parameter int unsigned N_ITER = NITER
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           start_i,
  output logic                           busy_o,
  output logic                           done_o,
  output logic                           en_read_o,
  output logic                           en_write_o,
  output logic [$clog2(NL)-1:0]          count_layer_o,
  output logic                           first_iter_o,
  output logic [$clog2(NL)-1:0]          beta_rd_addr_o
);

  localparam int unsigned LW = $clog2(NL);
  localparam int unsigned IW = $clog2(N_ITER + 1);

  logic          run_q;
  logic          phase_q;  // 0: read/process cycle, 1: write cycle
  logic [LW-1:0] layer_q;
  logic [IW-1:0] iter_q;
  logic          done_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run_q   <= 1'b0;
      phase_q <= 1'b0;
      layer_q <= '0;
      iter_q  <= '0;
      done_q  <= 1'b0;
    end else begin
      done_q <= 1'b0;
      if (!run_q) begin
        if (start_i) begin
          run_q   <= 1'b1;
          phase_q <= 1'b0;
          layer_q <= '0;
          iter_q  <= '0;
        end
      end else if (!phase_q) begin
        phase_q <= 1'b1;
      end else begin
        phase_q <= 1'b0;
        if (layer_q == LW'(NL - 1)) begin
          layer_q <= '0;
          if (iter_q == IW'(N_ITER - 1)) begin
            run_q  <= 1'b0;
            done_q <= 1'b1;
          end else begin
            iter_q <= iter_q + 1'b1;
          end
        end else begin
          layer_q <= layer_q + 1'b1;
        end
      end
    end
  end

  assign busy_o        = run_q;
  assign done_o        = done_q;
  assign en_read_o     = run_q & ~phase_q;
  assign en_write_o    = run_q & phase_q;
  assign count_layer_o = layer_q;
  assign first_iter_o  = (iter_q == '0);

  always_comb begin
    if (!run_q)            beta_rd_addr_o = '0;
    else if (!phase_q)     beta_rd_addr_o = layer_q;
    else if (layer_q == LW'(NL - 1)) beta_rd_addr_o = '0;
    else                   beta_rd_addr_o = layer_q + 1'b1;
  end

endmodule
