// tb_per_w: write-side permutation network. Slots are filled with values
// tagging the slot number; for every layer, column block (k * {1,5,7}[l] +
// {0,1,3}[l]) mod 24 must receive slot k. Also chains per_r into per_w and
// expects the identity for every layer.
module tb_per_w;
  import ldpc_pkg::*;

  localparam int unsigned Z = 4;
  gamma_t slot [NB][Z];
  gamma_t blk  [NB][Z];
  gamma_t src  [NB][Z];
  gamma_t mid  [NB][Z];
  gamma_t back [NB][Z];
  logic [$clog2(NL)-1:0] layer;
  int checks = 0, failures = 0;
  int mult [NL] = '{1, 5, 7};
  int add  [NL] = '{0, 1, 3};

  per_w #(.Z(Z)) dut (.slot_i(slot), .layer_i(layer), .blk_o(blk));
  per_r #(.Z(Z)) u_r (.blk_i(src), .layer_i(layer), .slot_o(mid));
  per_w #(.Z(Z)) u_w (.slot_i(mid), .layer_i(layer), .blk_o(back));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < int'(NB); k++)
      for (int i = 0; i < int'(Z); i++) begin
        slot[k][i] = gamma_t'(k + i);
        src[k][i]  = gamma_t'($urandom);
      end
    for (int l = 0; l < int'(NL); l++) begin
      layer = l[$clog2(NL)-1:0];
      #1;
      for (int k = 0; k < int'(NB); k++) begin
        int c;
        c = (k * mult[l] + add[l]) % int'(NB);
        for (int i = 0; i < int'(Z); i++) begin
          checks++;
          if (blk[c][i] !== slot[k][i]) begin
            failures++;
            if (failures < 10) $display("FAIL layer=%0d slot=%0d", l, k);
          end
          checks++;
          if (back[k][i] !== src[k][i]) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
