// gamma_memory: storage of the N = NB*Z a-posteriori LLRs (6 bits each).
//
// The whole memory is read every layer (all 24 column blocks at once) and
// written back in full in the following cycle, so it is built from
// registers with a combinational read port: the write of one layer and the
// read of the next happen in back-to-back cycles. Before decoding, the
// channel LLRs (4 bits) are loaded one column block (Z values) per cycle
// through the load port and sign-extended to 6 bits.
//
// Timing: load and layer writes take effect at the rising clock edge;
// rd_o shows the stored values in the same cycle. A layer write has priority
// over a load (the decoder never issues both). No reset: every location is
// loaded before it is read. Register storage and the block-wise load port
// are this design's choices.
module gamma_memory
  import ldpc_pkg::*;
#(
  parameter int unsigned Z = ZDEF
) (
  input  logic                   clk,
  input  logic                   load_i,          // load one column block
  input  logic [$clog2(NB)-1:0]  load_blk_i,      // which block, 0..NB-1
  input  llr_t                   load_llr_i [Z],  // channel LLRs of that block
  input  logic                   wr_i,            // write all blocks (En_write)
  input  gamma_t                 wr_data_i [NB][Z],
  output gamma_t                 rd_o      [NB][Z]
);

  gamma_t mem [NB][Z];

  always_ff @(posedge clk) begin
    if (wr_i) begin
      mem <= wr_data_i;
    end else if (load_i) begin
      for (int i = 0; i < int'(Z); i++) mem[load_blk_i][i] <= gamma_t'(load_llr_i[i]);
    end
  end

  assign rd_o = mem;

endmodule
