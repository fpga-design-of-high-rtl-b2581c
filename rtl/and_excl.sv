// and_excl: for N inputs, output i is the AND of every input except input i.
//
// Built from a prefix chain and a suffix chain of AND gates, so the N
// "all but one" products share their gates: for N = 6 it takes 12 two-input
// ANDs (4 prefix, 4 suffix, 4 to combine the middle outputs). The check-node
// units use one instance per magnitude bit.
//
// Purely combinational; no clock.
module and_excl #(
  parameter int unsigned N = 6
) (
  input  logic [N-1:0] x_i,  // one bit per check-node input
  output logic [N-1:0] y_o   // y_o[i] = AND of x_i[j], j != i
);

  logic [N-1:0] pre;  // pre[i] = x_i[0] & ... & x_i[i]
  logic [N-1:1] suf;  // suf[i] = x_i[i] & ... & x_i[N-1]

  assign pre[0]   = x_i[0];
  assign suf[N-1] = x_i[N-1];
  for (genvar i = 1; i < N; i++) begin : g_pre
    assign pre[i] = pre[i-1] & x_i[i];
  end
  for (genvar i = 1; i < N - 1; i++) begin : g_suf
    assign suf[i] = suf[i+1] & x_i[i];
  end

  assign y_o[0]   = suf[1];
  assign y_o[N-1] = pre[N-2];
  for (genvar i = 1; i < N - 1; i++) begin : g_out
    assign y_o[i] = pre[i-1] & suf[i+1];
  end

endmodule
