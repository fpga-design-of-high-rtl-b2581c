// tb_per_r: read-side permutation network. Each column block is filled
// with values tagging its block number; for every layer, slot k must hold
// block COL(l, k) and every block must appear in exactly one slot. The
// expected mapping is recomputed here from the base-matrix formula
// (k * {1,5,7}[l] + {0,1,3}[l]) mod 24.
module tb_per_r;
  import ldpc_pkg::*;

  localparam int unsigned Z = 4;
  gamma_t blk  [NB][Z];
  gamma_t slot [NB][Z];
  logic [$clog2(NL)-1:0] layer;
  int checks = 0, failures = 0;
  int mult [NL] = '{1, 5, 7};
  int add  [NL] = '{0, 1, 3};

  per_r #(.Z(Z)) dut (.blk_i(blk), .layer_i(layer), .slot_o(slot));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < int'(NB); c++)
      for (int i = 0; i < int'(Z); i++) blk[c][i] = gamma_t'(c + (i == 0 ? 0 : -c));
    for (int l = 0; l < int'(NL); l++) begin
      int seen [NB];
      layer = l[$clog2(NL)-1:0];
      #1;
      foreach (seen[c]) seen[c] = 0;
      for (int k = 0; k < int'(NB); k++) begin
        int c;
        c = (k * mult[l] + add[l]) % int'(NB);
        seen[int'(slot[k][0])]++;
        for (int i = 0; i < int'(Z); i++) begin
          checks++;
          if (slot[k][i] !== blk[c][i]) begin
            failures++;
            if (failures < 10) $display("FAIL layer=%0d slot=%0d", l, k);
          end
        end
      end
      foreach (seen[c]) begin
        checks++;
        if (seen[c] != 1) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
