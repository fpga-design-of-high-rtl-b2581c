// tb_bs_r: read-side barrel shifter at Z = 54, every shift 0..53 with
// random data. Expected: out[i] = in[(i + s) mod Z]. Also applies bs_w to the
// result and expects the original data back.
module tb_bs_r;
  import ldpc_pkg::*;

  localparam int unsigned Z = ZDEF;
  localparam int unsigned SW = $clog2(Z);
  gamma_t d [Z];
  gamma_t q [Z];
  gamma_t back [Z];
  logic [SW-1:0] s;
  int checks = 0, failures = 0;

  bs_r #(.Z(Z)) dut (.data_i(d), .shift_i(s), .data_o(q));
  bs_w #(.Z(Z)) inv (.data_i(q), .shift_i(s), .data_o(back));

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
        for (int i = 0; i < int'(Z); i++) begin
          checks++;
          if (q[i] !== d[(i + sh) % int'(Z)]) begin
            failures++;
            if (failures < 10) $display("FAIL shift=%0d lane=%0d", sh, i);
          end
          checks++;
          if (back[i] !== d[i]) failures++;
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
