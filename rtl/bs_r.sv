// bs_r: read-side barrel shifter for one processing slot.
//
// Applies the cyclic permutation of a Z x Z circulant with shift s to the Z
// a-posteriori LLRs of one column block: out[i] = in[(i + s) mod Z], so that
// lane i feeds check node i of its row block. The shifter is logarithmic:
// stage b rotates by (2^b mod Z) when bit b of the shift is set, which is
// valid for any Z because rotations compose modulo Z. Shift values >= Z are
// not produced by the design. The logarithmic structure is this design's
// choice; the architecture gives only the function and the 54-lane width.
//
// Purely combinational; no clock.
module bs_r
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
        stage[b+1][i] = shift_i[b] ? stage[b][(i + ((1 << b) % int'(Z))) % int'(Z)]
                                   : stage[b][i];
      end
    end
    data_o = stage[SW];
  end

endmodule
