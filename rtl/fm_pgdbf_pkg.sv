// fm_pgdbf_pkg: types, constants and constant functions shared by the
// FM-PGDBF (flash-memory adapted probabilistic gradient descent bit-flipping)
// LDPC decoder.
//
// It holds:
//  * the QC-LDPC circulant shift rule used to wire the Tanner graph
//    (qc_shift). Three rules are offered: the array-code rule
//    s(i,j) = i*j mod Z, the multiplicative rule s(i,j) = b^i * a^j mod Z
//    that gives the (155,64) Tanner code with Z=31, a=2, b=5, and an explicit
//    table given as a packed parameter.
//  * the threshold sequence type (up to THR_MAX_LEN entries of 4 bits) and the
//    default sequence of offline-predicted energy maxima.
//  * the hash that fills the random generator's shift register with a fixed
//    Bernoulli(p0) pattern at reset.
// The decoder algorithm (energy, threshold compare, circular threshold use)
// follows the FM-PGDBF description; the shift rules, the default thresholds and
// the random-pattern hash are this design's own choices, since the offline
// values and the code matrices are not published with the algorithm.
package fm_pgdbf_pkg;

  // Maximum length l of the threshold sequence and width of one entry.
  localparam int unsigned THR_MAX_LEN = 16;
  localparam int unsigned THR_W       = 4;
  typedef logic [THR_MAX_LEN-1:0][THR_W-1:0] thr_seq_t;

  // Circulant shift rules.
  typedef enum int unsigned {
    SHIFT_ARRAY = 0,  // s(i,j) = i*j mod Z          (array-code construction)
    SHIFT_MULT  = 1,  // s(i,j) = b^i * a^j mod Z    (Tanner-code construction)
    SHIFT_TABLE = 2   // s(i,j) read from SHIFT_TAB[i*DC+j]
  } shift_mode_e;

  localparam int unsigned SHIFT_TAB_MAX = 256;  // entries of an explicit table
  typedef logic [SHIFT_TAB_MAX-1:0][15:0] shift_tab_t;

  // Shift of the circulant in block row i, block column j.
  function automatic int unsigned qc_shift(
      input shift_mode_e mode, input int unsigned i, input int unsigned j,
      input int unsigned dc, input int unsigned z, input int unsigned a,
      input int unsigned b, input shift_tab_t tab);
    int unsigned s;
    s = 1;
    case (mode)
      SHIFT_ARRAY: s = (i * j) % z;
      SHIFT_MULT: begin
        for (int unsigned k = 0; k < i; k++) s = (s * b) % z;
        for (int unsigned k = 0; k < j; k++) s = (s * a) % z;
      end
      default: s = int'(tab[i*dc+j]) % z;
    endcase
    return s;
  endfunction

  // Default offline threshold sequence (length l = 8) for column weight dv.
  // Entry k is the energy level that is flipped in iterations k, k+l, ...
  function automatic thr_seq_t default_thr_seq(input int unsigned dv);
    thr_seq_t seq;
    int unsigned pattern [8];
    pattern = '{dv, dv, dv, dv - 1, dv, dv - 1, dv, dv - 1};
    seq = '0;
    for (int k = 0; k < 8; k++) seq[k] = THR_W'(pattern[k]);
    return seq;
  endfunction

  // 32-bit integer mixer (xorshift-multiply); used only to build constants.
  function automatic logic [31:0] mix32(input logic [31:0] x);
    logic [31:0] h;
    h = x;
    h = h ^ (h >> 16);
    h = h * 32'h7feb352d;
    h = h ^ (h >> 15);
    h = h * 32'h846ca68b;
    h = h ^ (h >> 16);
    return h;
  endfunction

  // Reset value of bit b of the random generator: 1 with probability
  // p0 = p0_permille/1000 over the hash of (seed, b).
  function automatic logic rg_init_bit(input int unsigned b, input int unsigned seed,
                                       input int unsigned p0_permille);
    logic [31:0] h;
    h = mix32(32'(seed) * 32'h9e3779b9 + 32'(b));
    return (h % 1000) < 32'(p0_permille);
  endfunction

endpackage
