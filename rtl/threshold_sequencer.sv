// threshold_sequencer: source of the per-iteration flipping threshold of the
// FM-PGDBF decoder.
//
// The FM-PGDBF decoder replaces the run-time maximum finder of PGDBF by a
// short sequence of energy maxima predicted offline (by Monte Carlo
// simulation) and uses that sequence circularly: iteration k uses entry
// k mod L. The L entries are a constant parameter (a small ROM), so the
// block costs only an index register of clog2(L) bits.
//
// Interface and timing: restart (one cycle, at the start of a frame) sets the
// index to 0; each cycle with step = 1 (one decoding iteration done) advances
// it by one, wrapping from L-1 to 0. thr is the entry at the current index,
// combinationally, and idx the index itself. restart has priority over step.
// The default sequence comes from fm_pgdbf_pkg::default_thr_seq and is this
// design's own choice; the values used by the published decoder are not given.
module threshold_sequencer #(
  parameter int unsigned            L   = 8,   // sequence length l (<= THR_MAX_LEN)
  parameter int unsigned            DV  = 4,   // column weight, for the default sequence
  parameter fm_pgdbf_pkg::thr_seq_t SEQ = fm_pgdbf_pkg::default_thr_seq(DV),
  localparam int unsigned           IW  = (L > 1) ? $clog2(L) : 1
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            restart,
  input  logic                            step,
  output logic [fm_pgdbf_pkg::THR_W-1:0]  thr,
  output logic [IW-1:0]                   idx
);
  initial assert (L >= 1 && L <= fm_pgdbf_pkg::THR_MAX_LEN)
    else $error("threshold_sequencer: L must be 1..%0d", fm_pgdbf_pkg::THR_MAX_LEN);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              idx <= '0;
    else if (restart)        idx <= '0;
    else if (step) begin
      if (idx == IW'(L - 1)) idx <= '0;
      else                   idx <= idx + 1'b1;
    end
  end

  always_comb thr = SEQ[idx];
endmodule
