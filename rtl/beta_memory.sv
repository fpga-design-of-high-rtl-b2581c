// beta_memory: storage of the check-to-variable messages of all layers.
//
// One word per layer holds the messages of every edge of that layer in
// processing-slot order (NB slots x Z lanes x 3 bits = 3888 bits for the
// default code). Messages are kept in the compressed POMS form (sign and
// 2-bit magnitude, the always-zero LSB is not stored), 25% less than 4-bit
// messages. Because messages are stored in the order the CNUs produce and
// the VNUs consume them, no permutation or shifting is needed on this path.
//
// Timing: synchronous read (the read word appears one cycle after rd_addr_i
// is presented with rd_i high) and synchronous write; the decoder reads the
// next layer's word in the same cycle as it writes the current layer's, so
// the two addresses differ. No reset: the decoder ignores the contents in
// the first iteration. The word-per-layer organisation matches the
// architecture's use of 3 words per block RAM; the port arrangement is this
// design's choice.
module beta_memory
  import ldpc_pkg::*;
#(
  parameter int unsigned Z = ZDEF
) (
  input  logic                   clk,
  input  logic                   rd_i,
  input  logic [$clog2(NL)-1:0]  rd_addr_i,
  output beta_t                  rd_data_o [NB][Z],
  input  logic                   wr_i,
  input  logic [$clog2(NL)-1:0]  wr_addr_i,
  input  beta_t                  wr_data_i [NB][Z]
);

  typedef beta_t [NB*Z-1:0] word_t;

  word_t mem [NL];
  word_t rd_q;
  word_t wr_word;

  always_comb begin
    for (int k = 0; k < int'(NB); k++)
      for (int i = 0; i < int'(Z); i++) wr_word[k*int'(Z)+i] = wr_data_i[k][i];
  end

  always_ff @(posedge clk) begin
    if (wr_i) mem[wr_addr_i] <= wr_word;
  end

  always_ff @(posedge clk) begin
    if (rd_i) rd_q <= mem[rd_addr_i];
  end

  always_comb begin
    for (int k = 0; k < int'(NB); k++)
      for (int i = 0; i < int'(Z); i++) rd_data_o[k][i] = rd_q[k*int'(Z)+i];
  end

endmodule
