// per_w: write-side permutation network, the inverse of per_r.
//
// While layer l is written back, column block c receives the result of the
// slot that processed it, slot SLOT(l, c) with COL(l, SLOT(l, c)) = c (see
// ldpc_pkg). A 3-way multiplexer per column block, selected by the layer
// counter. The mapping follows this design's base matrix; the architecture
// gives the function only.
//
// Purely combinational; no clock.
module per_w
  import ldpc_pkg::*;
#(
  parameter int unsigned Z = ZDEF
) (
  input  gamma_t                  slot_i [NB][Z],  // processing-slot order
  input  logic [$clog2(NL)-1:0]   layer_i,         // layer being written
  output gamma_t                  blk_o  [NB][Z]   // column-block order
);

  always_comb begin
    blk_o = slot_i;  // layer 0 uses the identity order; overwritten below
    for (int unsigned l = 0; l < NL; l++) begin
      if (layer_i == l[$clog2(NL)-1:0]) begin
        for (int unsigned c = 0; c < NB; c++) blk_o[c] = slot_i[slot_of(l, c)];
      end
    end
  end

endmodule
