// tb_bs_w: write-side barrel shifter at Z = 54, every shift 0..53 with
// random data. Expected: out[j] = in[(j - s) mod Z].
module tb_bs_w;
  import ldpc_pkg::*;

  localparam int unsigned Z = ZDEF;
  localparam int unsigned SW = $clog2(Z);
  gamma_t d [Z];
  gamma_t q [Z];
  logic [SW-1:0] s;
  int checks = 0, failures = 0;

  bs_w #(.Z(Z)) dut (.data_i(d), .shift_i(s), .data_o(q));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 3; rep++)
      for (int sh = 0; sh < int'(Z); sh++) begin
        for (int i = 0; i < int'(Z); i++) d[i] = gamma_t'($urandom);
        s = SW'(sh);
        #1;
        for (int j = 0; j < int'(Z); j++) begin
          checks++;
          if (q[j] !== d[(j + int'(Z) - sh) % int'(Z)]) begin
            failures++;
            if (failures < 10) $display("FAIL shift=%0d lane=%0d", sh, j);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
