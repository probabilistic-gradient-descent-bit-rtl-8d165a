// fm_pgdbf_decoder: fully parallel FM-PGDBF decoder for a regular QC-LDPC code.
//
// The decoder corrects the hard-read word y of a flash page protected by a
// (DV, DC)-regular quasi-cyclic LDPC code. Its parity-check matrix H is a
// DV x DC array of Z x Z circulant permutation matrices, N = DC*Z bits and
// M = DV*Z checks. All N variable nodes (vnu) and M check nodes (cnu) are
// instantiated and updated together (flooding schedule), one iteration per
// clock cycle:
//   c_m   = XOR of the bits in check m                       (cnu)
//   E_n   = (v_n xor y_n) + number of unsatisfied checks of n (vnu)
//   v_n  ^= (E_n >= T_k) and R_n^(k)                          (vnu)
// T_k is the threshold of iteration k, read circularly from an L-entry
// sequence of offline-predicted energy maxima (threshold_sequencer); this
// replaces the maximum finder of PGDBF and is what makes FM-PGDBF cheaper and
// faster. R^(k) are Bernoulli(p0) bits from an S-bit rotating register
// (random_generator). decoder_ctrl stops when the syndrome is zero or after
// IT_MAX iterations.
//
// Tanner-graph wiring: block (i,j) of H is the identity rotated by
// s = qc_shift(i,j), i.e. check i*Z+r is connected to bit j*Z+((r+s) mod Z).
// The default code is the (4,8)-regular rate-1/2 code of length 1296 (Z=162)
// with the array-code shifts s = i*j mod Z, which is free of 4-cycles; the
// (155,64) Tanner code is obtained with DV=3, DC=5, Z=31, SHIFT_MODE=SHIFT_MULT,
// SHIFT_A=2, SHIFT_B=5. The exact matrices used in published FM-PGDBF results
// are not available, so the shift rule is this design's own choice.
//
// Interface and timing: with ready = 1, a one-cycle start pulse loads y. done
// pulses k+1 cycles later for a frame that needed k iterations; then success
// says whether all checks are satisfied, iters gives k and x_hat holds the
// decisions (valid until the next start). Reset is asynchronous, active low.
module fm_pgdbf_decoder
  import fm_pgdbf_pkg::*;
#(
  parameter int unsigned DV          = 4,     // column weight d_v
  parameter int unsigned DC          = 8,     // row weight d_c
  parameter int unsigned Z           = 162,   // circulant size
  parameter shift_mode_e SHIFT_MODE  = SHIFT_ARRAY,
  parameter int unsigned SHIFT_A     = 2,     // 'a' of SHIFT_MULT
  parameter int unsigned SHIFT_B     = 5,     // 'b' of SHIFT_MULT
  parameter shift_tab_t  SHIFT_TAB   = '0,    // table of SHIFT_TABLE, index i*DC+j
  parameter int unsigned L           = 8,     // threshold sequence length l
  parameter thr_seq_t    THR_SEQ     = default_thr_seq(DV),
  parameter int unsigned S           = DV * Z / 2,  // RG register length, M/2
  parameter int unsigned P0_PERMILLE = 700,   // p0 in 1/1000
  parameter int unsigned RG_SEED     = 1,
  parameter int unsigned IT_MAX      = 300,   // It_max
  localparam int unsigned N          = DC * Z,
  localparam int unsigned M          = DV * Z,
  localparam int unsigned ITW        = $clog2(IT_MAX + 1),
  localparam int unsigned EW         = $clog2(DV + 2)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N-1:0]   y,        // hard-read word from the flash page
  output logic           ready,
  output logic           done,
  output logic           success,
  output logic [ITW-1:0] iters,
  output logic [N-1:0]   x_hat,    // current / final decisions v
  output logic [M-1:0]   syndrome  // check values of x_hat
);
  logic                load, iter;
  logic [THR_W-1:0]    thr;
  logic [N-1:0]        r;
  logic [N-1:0]        v;
  logic [N-1:0][DV-1:0] vn_c;   // checks seen by each bit
  logic [M-1:0][DC-1:0] cn_v;   // bits seen by each check

  // Tanner graph: one permutation per circulant.
  for (genvar i = 0; i < DV; i++) begin : g_brow
    for (genvar j = 0; j < DC; j++) begin : g_bcol
      localparam int unsigned SH = qc_shift(SHIFT_MODE, i, j, DC, Z, SHIFT_A, SHIFT_B, SHIFT_TAB);
      for (genvar rr = 0; rr < Z; rr++) begin : g_edge
        // edge between check i*Z+rr and bit j*Z+((rr+SH) mod Z)
        assign cn_v[i*Z + rr][j]                 = v[j*Z + ((rr + SH) % Z)];
        assign vn_c[j*Z + ((rr + SH) % Z)][i]    = syndrome[i*Z + rr];
      end
    end
  end

  for (genvar m = 0; m < M; m++) begin : g_cnu
    cnu #(.DC(DC)) u_cnu (.v_in(cn_v[m]), .c(syndrome[m]));
  end

  for (genvar n = 0; n < N; n++) begin : g_vnu
    vnu #(.DV(DV), .EW(EW), .TW(THR_W)) u_vnu (
      .clk, .rst_n, .load, .y(y[n]), .iter, .c_in(vn_c[n]), .thr, .r(r[n]),
      .v(v[n]), .energy(), .flip());
  end

  threshold_sequencer #(.L(L), .DV(DV), .SEQ(THR_SEQ)) u_thr (
    .clk, .rst_n, .restart(load), .step(iter), .thr, .idx());

  random_generator #(.N(N), .S(S), .P0_PERMILLE(P0_PERMILLE), .SEED(RG_SEED)) u_rg (
    .clk, .rst_n, .step(iter), .r, .state());

  decoder_ctrl #(.M(M), .IT_MAX(IT_MAX)) u_ctrl (
    .clk, .rst_n, .start, .syndrome, .ready, .load, .iter, .done, .success, .iters);

  assign x_hat = v;
endmodule
