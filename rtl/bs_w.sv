// bs_w: write-side barrel shifter for one processing slot.
//
// Undoes the read-side rotation before the updated a-posteriori LLRs are
// written back: out[j] = in[(j - s) mod Z], so the value computed in lane i
// returns to variable (i + s) mod Z of its column block. Same logarithmic
// structure as bs_r, each stage rotating the other way by (2^b mod Z). The
// logarithmic structure is this design's choice; the architecture gives only
// the function and the 54-lane width.
//
// Purely combinational; no clock.
module bs_w
  import ldpc_pkg::*;
#(
  parameter int unsigned Z  = ZDEF,
  parameter int unsigned SW = $clog2(Z)
) (
  input  gamma_t         data_i [Z],
  input  logic [SW-1:0]  shift_i,   // 0 .. Z-1
  output gamma_t         data_o [Z]
);

  gamma_t stage [SW+1][Z];

  always_comb begin
    stage[0] = data_i;
    for (int b = 0; b < int'(SW); b++) begin
      for (int i = 0; i < int'(Z); i++) begin
        stage[b+1][i] = shift_i[b] ? stage[b][(i + int'(Z) - ((1 << b) % int'(Z))) % int'(Z)]
                                   : stage[b][i];
      end
    end
    data_o = stage[SW];
  end

endmodule
