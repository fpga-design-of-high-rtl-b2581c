// ldpc_pkg: shared constants, message types and the base matrix of the
// (3,6)-regular quasi-cyclic LDPC code decoded by ldpc_decoder.
//
// Code structure (from the design description): a 12 x 24 base matrix B,
// expanded by Z = 54 into H of size 648 x 1296, split into L = 3 horizontal
// layers of 4 base rows each, every base column holding exactly one
// circulant per layer and every base row holding six.
//
// The entries of B (which column blocks each row uses and the circulant
// shifts) are not published with the architecture, so this design uses its
// own B, defined by formula:
//   processing slot k = 6*r + e (base row r of the layer, edge e of the row)
//   column block  COL(l,k)   = (k * MULT[l] + ADD[l]) mod 24
//   shift         SHIFT(l,k,Z) = (7*COL(l,k)*(l+1) + 11*l + 5*k) mod Z
// MULT = {1, 5, 7} is coprime with 24, so each layer uses every column block
// exactly once, as the architecture requires. Circulant semantics: in row
// block r, check node i is connected to variable (i + shift) mod Z of its
// column block.
//
// Message formats (from the description): a-posteriori LLRs on QT = 6 bits,
// channel LLRs and variable/check messages on Q = 4 bits. A check-to-variable
// message of the POMS/I-POMS decoders is stored on 3 bits (sign and a 2-bit
// magnitude); its 4-bit value is +/-(2*mag), the LSB always being zero.
// Saturation is symmetric (+/-31 for 6 bits, +/-7 for 4 bits).
package ldpc_pkg;

  localparam int unsigned QT    = 6;   // AP-LLR width
  localparam int unsigned Q     = 4;   // channel LLR / message width
  localparam int unsigned DC    = 6;   // check-node degree
  localparam int unsigned NL    = 3;   // horizontal layers
  localparam int unsigned RPL   = 4;   // base rows per layer
  localparam int unsigned NB    = 24;  // base-matrix columns (= processing slots)
  localparam int unsigned ZDEF  = 54;  // expansion factor
  localparam int unsigned NITER = 20;  // decoding iterations

  localparam int signed GMAX = (1 <<< (QT - 1)) - 1;  // +31
  localparam int signed AMAX = (1 <<< (Q - 1)) - 1;   // +7

  typedef logic signed [QT-1:0] gamma_t;   // AP-LLR / alpha, 6 bits
  typedef logic signed [Q-1:0]  llr_t;     // channel LLR, 4 bits

  // Compressed POMS check-to-variable message: value = (sign ? -1 : +1) * 2*mag
  typedef struct packed {
    logic       sign;
    logic [1:0] mag;
  } beta_t;

  // Saturated variable-to-check message as seen by a CNU:
  // its sign and its 4-bit magnitude with the LSB removed.
  typedef struct packed {
    logic       sign;
    logic [1:0] a;
  } cn_in_t;

  localparam int unsigned LAYER_MULT [NL] = '{1, 5, 7};
  localparam int unsigned LAYER_ADD  [NL] = '{0, 1, 3};

  // Column block processed in slot k while layer l is decoded.
  function automatic int unsigned col_of(int unsigned l, int unsigned k);
    return (k * LAYER_MULT[l] + LAYER_ADD[l]) % NB;
  endfunction

  // Slot in which column block c is processed while layer l is decoded.
  function automatic int unsigned slot_of(int unsigned l, int unsigned c);
    int unsigned s;
    s = 0;
    for (int unsigned k = 0; k < NB; k++)
      if (col_of(l, k) == c) s = k;
    return s;
  endfunction

  // Circulant shift of the base-matrix entry processed in slot k of layer l.
  function automatic int unsigned shift_of(int unsigned l, int unsigned k, int unsigned z);
    return (7 * col_of(l, k) * (l + 1) + 11 * l + 5 * k) % z;
  endfunction

  // 3-bit compressed beta to its 4-bit two's-complement value (zero LSB).
  function automatic llr_t beta_value(beta_t b);
    logic [Q-1:0] m;
    m = {1'b0, b.mag, 1'b0};
    return b.sign ? llr_t'(-m) : llr_t'(m);
  endfunction

  // Saturate a 7-bit sum or difference to the symmetric 6-bit range.
  function automatic gamma_t sat_gamma(logic signed [QT:0] x);
    localparam logic signed [QT:0] HI = (QT+1)'(GMAX);
    localparam logic signed [QT:0] LO = (QT+1)'(-GMAX);
    if (x > HI)      return gamma_t'(HI);
    else if (x < LO) return gamma_t'(LO);
    else             return gamma_t'(x);
  endfunction

endpackage
