// ldpc_decoder: fully layer-parallel layered decoder for a (3,6)-regular
// quasi-cyclic LDPC code (N = 24*Z = 1296, M = 12*Z = 648, rate 1/2) using
// the Partially Offset Min-Sum (POMS) or Imprecise POMS (I-POMS) check-node
// rule.
//
// Data path of one layer (all 4*Z check nodes and 24*Z edges at once):
//   gamma_memory -> per_r -> 24 x bs_r -> 24 x vnu (alpha = gamma - beta)
//   -> 24 x sat -> 4*Z CNUs (POMS or I-POMS) -> 24 x ap_llr
//   (gamma = alpha + beta_new) -> result registers
//   -> 24 x bs_w -> per_w -> gamma_memory, and beta_new -> beta_memory.
// The first half of a layer (controller En_read) reads and processes and
// registers the results; the second half (En_write) writes them back. One
// iteration of 3 layers takes 6 cycles, 20 iterations 120 cycles.
//
// Interface:
//   load_i/load_blk_i/load_llr_i  load the 4-bit channel LLRs, one column
//                                 block of Z values per cycle, while idle
//                                 (LLR > 0 means bit 0 more likely)
//   start_i                       start a decode of the loaded frame
//   busy_o, done_o                busy for 120 cycles, then done pulses
//   app_llr_o, hard_o             a-posteriori LLRs and hard decisions
//                                 (1 when the LLR is negative), valid while
//                                 idle after done; hard_o[c][i] is code bit
//                                 c*Z + i
// IMPRECISE selects the I-POMS check-node unit (1, default) or the POMS one
// (0). The structure, widths and cycle budget follow the architecture; the
// base matrix entries (ldpc_pkg), the load/start/done interface, the fixed
// iteration count and zeroing the messages in the first iteration instead
// of clearing the message memory are this design's choices.
module ldpc_decoder
  import ldpc_pkg::*;
#(
  parameter int unsigned Z         = ZDEF,
  parameter int unsigned N_ITER    = NITER,
  parameter bit          IMPRECISE = 1'b1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   load_i,
  input  logic [$clog2(NB)-1:0]  load_blk_i,
  input  llr_t                   load_llr_i [Z],
  input  logic                   start_i,
  output logic                   busy_o,
  output logic                   done_o,
  output gamma_t                 app_llr_o [NB][Z],
  output logic [Z-1:0]           hard_o    [NB]
);

  localparam int unsigned LW = $clog2(NL);
  localparam int unsigned SW = $clog2(Z);

  // ---------------------------------------------------------------- control
  logic          en_read, en_write, first_iter;
  logic [LW-1:0] layer, beta_rd_addr;

  controller #(.N_ITER(N_ITER)) u_ctrl (
    .clk, .rst_n, .start_i,
    .busy_o, .done_o,
    .en_read_o      (en_read),
    .en_write_o     (en_write),
    .count_layer_o  (layer),
    .first_iter_o   (first_iter),
    .beta_rd_addr_o (beta_rd_addr)
  );

  // Circulant shift of every slot for the current layer.
  logic [SW-1:0] shift [NB];
  always_comb begin
    for (int unsigned k = 0; k < NB; k++) begin
      shift[k] = '0;
      for (int unsigned l = 0; l < NL; l++)
        if (layer == LW'(l)) shift[k] = SW'(shift_of(l, k, Z));
    end
  end

  // ---------------------------------------------------------------- memories
  gamma_t gamma_rd [NB][Z];
  gamma_t gamma_wr [NB][Z];

  gamma_memory #(.Z(Z)) u_gamma_mem (
    .clk,
    .load_i     (load_i & ~busy_o),
    .load_blk_i,
    .load_llr_i,
    .wr_i       (en_write),
    .wr_data_i  (gamma_wr),
    .rd_o       (gamma_rd)
  );

  beta_t beta_rd  [NB][Z];
  beta_t beta_old [NB][Z];
  beta_t beta_new [NB][Z];
  beta_t beta_q   [NB][Z];

  beta_memory #(.Z(Z)) u_beta_mem (
    .clk,
    .rd_i      (1'b1),
    .rd_addr_i (beta_rd_addr),
    .rd_data_o (beta_rd),
    .wr_i      (en_write),
    .wr_addr_i (layer),
    .wr_data_i (beta_q)
  );

  // Initial check-to-variable messages are zero.
  always_comb begin
    for (int k = 0; k < int'(NB); k++)
      for (int i = 0; i < int'(Z); i++)
        beta_old[k][i] = first_iter ? beta_t'('0) : beta_rd[k][i];
  end

  // ---------------------------------------------------------------- read side
  gamma_t slot_g  [NB][Z];
  gamma_t shift_g [NB][Z];
  gamma_t alpha   [NB][Z];
  cn_in_t cn_in   [NB][Z];
  gamma_t gamma_n [NB][Z];
  gamma_t gamma_q [NB][Z];
  gamma_t unsh_g  [NB][Z];

  per_r #(.Z(Z)) u_per_r (.blk_i(gamma_rd), .layer_i(layer), .slot_o(slot_g));

  for (genvar k = 0; k < NB; k++) begin : g_slot
    bs_r   #(.Z(Z)) u_bs_r (.data_i(slot_g[k]), .shift_i(shift[k]), .data_o(shift_g[k]));
    vnu    #(.Z(Z)) u_vnu  (.gamma_i(shift_g[k]), .beta_i(beta_old[k]), .alpha_o(alpha[k]));
    sat    #(.Z(Z)) u_sat  (.alpha_i(alpha[k]), .cn_o(cn_in[k]));
    ap_llr #(.Z(Z)) u_ap   (.alpha_i(alpha[k]), .beta_i(beta_new[k]), .gamma_o(gamma_n[k]));
    bs_w   #(.Z(Z)) u_bs_w (.data_i(gamma_q[k]), .shift_i(shift[k]), .data_o(unsh_g[k]));
  end

  // ---------------------------------------------------------------- CNUs
  // Check node i of base row r of the layer takes lane i of slots 6r..6r+5.
  for (genvar r = 0; r < RPL; r++) begin : g_row
    for (genvar i = 0; i < Z; i++) begin : g_cn
      cn_in_t cin  [DC];
      beta_t  cout [DC];
      for (genvar e = 0; e < DC; e++) begin : g_edge
        assign cin[e] = cn_in[r*DC+e][i];
        assign beta_new[r*DC+e][i] = cout[e];
      end
      if (IMPRECISE) begin : g_ipoms
        cnu_ipoms u_cnu (.in_i(cin), .out_o(cout));
      end else begin : g_poms
        cnu_poms  u_cnu (.in_i(cin), .out_o(cout));
      end
    end
  end

  // ---------------------------------------------------------------- results
  always_ff @(posedge clk) begin
    if (en_read) begin
      gamma_q <= gamma_n;
      beta_q  <= beta_new;
    end
  end

  per_w #(.Z(Z)) u_per_w (.slot_i(unsh_g), .layer_i(layer), .blk_o(gamma_wr));

  assign app_llr_o = gamma_rd;
  always_comb begin
    for (int c = 0; c < int'(NB); c++)
      for (int i = 0; i < int'(Z); i++) hard_o[c][i] = gamma_rd[c][i][QT-1];
  end

  // ---------------------------------------------------------------- checks
  // A frame may only be loaded or started while the decoder is idle.
  a_no_load_when_busy : assert property (@(posedge clk) disable iff (!rst_n)
                                         busy_o |-> !load_i)
    else $error("ldpc_decoder: load while decoding");
  a_no_start_when_busy : assert property (@(posedge clk) disable iff (!rst_n)
                                          busy_o |-> !start_i)
    else $error("ldpc_decoder: start while decoding");

endmodule
