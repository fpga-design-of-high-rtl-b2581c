// ldpc_ref_pkg: bit-accurate algorithmic reference of the layered POMS /
// I-POMS decoder, used by the decoder testbenches.
//
// It walks the parity-check matrix check node by check node, edge by edge,
// exactly as the layered min-sum algorithm is written (alpha = gamma - beta,
// saturation to 4 bits, minimum of the other inputs with the LSB dropped,
// gamma = alpha + beta), with integer arithmetic and a plain minimum search.
// It shares only the base-matrix definition with the RTL, none of its
// permutation, shifting, AND-gate or memory organisation. It also counts how
// often each data-dependent mechanism of the hardware was exercised.
package ldpc_ref_pkg;
  import ldpc_pkg::*;

  typedef struct {
    int sat_clip;       // |alpha| > 7 clipped before a CNU
    int vnu_sat;        // 6-bit saturation in alpha = gamma - beta
    int ap_sat;         // 6-bit saturation in gamma = alpha + beta
    int detect0_path;   // POMS minimum 1 produced from a mix of 1s and 2s
    int imprecise_diff; // I-POMS magnitude differs from the exact minimum
    int partial_offset; // odd 4-bit minimum whose LSB was dropped
    int neg_beta;       // negative check-to-variable messages
  } ref_counts_t;

  function automatic int satg(int x);
    if (x > GMAX) return GMAX;
    if (x < -GMAX) return -GMAX;
    return x;
  endfunction

  // llr: N channel LLRs (-8..7), index c*Z + i. Returns the a-posteriori
  // LLRs after niter iterations in gamma.
  function automatic void decode(input int llr[], input bit imprecise, input int z,
                                 input int niter, output int gamma[],
                                 inout ref_counts_t cnt);
    int n_var, n_chk;
    int beta[];
    int alpha[DC], a2[DC], sg[DC], vn[DC];
    n_var = NB * z;
    n_chk = NL * RPL * z;
    gamma = new[n_var];
    beta  = new[n_chk * DC];
    foreach (beta[j]) beta[j] = 0;
    for (int n = 0; n < n_var; n++) gamma[n] = llr[n];
    for (int it = 0; it < niter; it++) begin
      for (int l = 0; l < NL; l++) begin
        for (int r = 0; r < RPL; r++) begin
          for (int i = 0; i < z; i++) begin
            int m;
            m = (l * RPL + r) * z + i;
            for (int e = 0; e < DC; e++) begin
              int k, d, mag, ms;
              k = r * DC + e;
              vn[e] = int'(col_of(l, k)) * z + (i + int'(shift_of(l, k, z))) % z;
              d = gamma[vn[e]] - beta[m*DC+e];
              if (d != satg(d)) cnt.vnu_sat++;
              alpha[e] = satg(d);
              sg[e] = int'(alpha[e] < 0);
              mag = (alpha[e] < 0) ? -alpha[e] : alpha[e];
              if (mag > 7) begin
                cnt.sat_clip++;
                mag = 7;
              end
              a2[e] = mag / 2;
            end
            for (int e = 0; e < DC; e++) begin
              int mn, mn_i, b, t;
              bit s, has0, has1, has2;
              mn = 3; mn_i = 3; s = 0; has0 = 0; has1 = 0; has2 = 0;
              for (int f = 0; f < DC; f++) begin
                if (f != e) begin
                  int ai;
                  if (a2[f] < mn) mn = a2[f];
                  ai = (a2[f] == 2) ? 1 : a2[f];
                  if (ai < mn_i) mn_i = ai;
                  s ^= sg[f][0];
                  if (a2[f] == 0) has0 = 1;
                  if (a2[f] == 1) has1 = 1;
                  if (a2[f] == 2) has2 = 1;
                end
              end
              if (!has0 && has1 && has2) cnt.detect0_path++;
              if (mn_i != mn) cnt.imprecise_diff++;
              // exact 3-bit minimum of the others, to see whether an offset applies
              begin
                int mn3;
                mn3 = 7;
                for (int f = 0; f < DC; f++)
                  if (f != e) begin
                    int mg;
                    mg = (alpha[f] < 0) ? -alpha[f] : alpha[f];
                    if (mg > 7) mg = 7;
                    if (mg < mn3) mn3 = mg;
                  end
                if (mn3 % 2 == 1) cnt.partial_offset++;
              end
              b = 2 * (imprecise ? mn_i : mn);
              if (s) b = -b;
              if (b < 0) cnt.neg_beta++;
              beta[m*DC+e] = b;
              t = alpha[e] + b;
              if (t != satg(t)) cnt.ap_sat++;
              gamma[vn[e]] = satg(t);
            end
          end
        end
      end
    end
  endfunction

endpackage
