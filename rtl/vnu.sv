// vnu: variable node unit of the FM-PGDBF decoder.
//
// Holds two bits: the channel (flash read) bit y_n and the current decision
// v_n. Each iteration it forms the energy
//     E_n = (v_n xor y_n) + sum of the DV neighbouring check values,
// an integer in 0..DV+1, and compares it with the threshold of the current
// iteration (the offline-predicted maximum energy). The bit is flipped when
// E_n >= threshold and the random bit r_n is 1. A comparator per VNU takes
// the place of the global maximum finder of the original PGDBF, which is the
// point of the FM-PGDBF architecture. Energy, comparison and flip rule follow
// the published decoder; the load/iter controls, the priority of load and
// the reset values are this design's own choices.
//
// Timing: load (one cycle) copies y into both registers; on every cycle with
// iter = 1 the flip decision made combinationally from the current v and
// check values is registered, so one iteration costs one clock. load has
// priority over iter. Reset clears both registers. The energy and flip
// outputs are combinational, for observation.
module vnu #(
  parameter int unsigned DV = 4,                    // variable node degree d_v
  parameter int unsigned EW = $clog2(DV + 2),       // width of the energy value
  parameter int unsigned TW = fm_pgdbf_pkg::THR_W   // width of the threshold
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,      // capture y (start of a new frame)
  input  logic          y,         // hard-decision channel bit
  input  logic          iter,      // perform one decoding iteration
  input  logic [DV-1:0] c_in,      // neighbouring check values (1 = unsatisfied)
  input  logic [TW-1:0] thr,       // threshold of this iteration
  input  logic          r,         // Bernoulli(p0) random bit of this iteration
  output logic          v,         // current decision
  output logic [EW-1:0] energy,    // E_n of the current iteration
  output logic          flip       // v will be flipped at the next edge if iter
);
  logic y_q;

  always_comb begin
    energy = EW'(v ^ y_q);
    for (int d = 0; d < DV; d++) energy += EW'(c_in[d]);
  end

  always_comb flip = (TW'(energy) >= thr) && r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_q <= 1'b0;
      v   <= 1'b0;
    end else if (load) begin
      y_q <= y;
      v   <= y;
    end else if (iter) begin
      v   <= v ^ flip;
    end
  end
endmodule
