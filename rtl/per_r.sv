// per_r: read-side permutation network between the gamma memory and the
// 24 processing slots.
//
// While layer l is processed, slot k (base row r = k / 6 of the layer, edge
// e = k % 6 of that row) must receive column block COL(l, k) of the
// a-posteriori LLRs (see ldpc_pkg). The network is a 3-way multiplexer per
// slot, selected by the layer counter, moving whole Z-lane column blocks.
// The mapping follows this design's base matrix; the architecture gives the
// function only.
//
// Purely combinational; no clock.
module per_r
  import ldpc_pkg::*;
#(
  parameter int unsigned Z = ZDEF
) (
  input  gamma_t                  blk_i  [NB][Z],  // column-block order
  input  logic [$clog2(NL)-1:0]   layer_i,         // layer being processed
  output gamma_t                  slot_o [NB][Z]   // processing-slot order
);

  always_comb begin
    slot_o = blk_i;  // layer 0 uses the identity order; overwritten below
    for (int unsigned l = 0; l < NL; l++) begin
      if (layer_i == l[$clog2(NL)-1:0]) begin
        for (int unsigned k = 0; k < NB; k++) slot_o[k] = blk_i[col_of(l, k)];
      end
    end
  end

endmodule
