// random_generator: Bernoulli(p0) random bits R_n^(k) for the FM-PGDBF decoder.
//
// Each of the N VNUs needs one random bit per iteration, 1 with probability
// p0, with a fresh realisation in every iteration. As in the low-cost PGDBF
// generator that FM-PGDBF reuses, the bits come from a cyclic shift register
// of S bits (S = M/2 in the main configuration) instead of N independent
// sources: the register is loaded at reset with a fixed pattern holding about
// p0*S ones, rotates by one position per iteration, and VNU n reads
// register bit n mod S. The reset pattern is a hash of (SEED, bit index) so it
// is a constant of the design; the n mod S fan-out and the hash are this
// design's own choices.
//
// Interface and timing: step = 1 rotates the register at the next clock edge
// (bit b takes bit b-1, bit 0 takes bit S-1); r[n] is register bit n mod S.
// The register is never reloaded except by reset, so successive frames see
// different random sequences.
module random_generator #(
  parameter int unsigned N          = 1296,  // number of VNUs
  parameter int unsigned S          = 324,   // shift-register length
  parameter int unsigned P0_PERMILLE = 700,  // p0 in 1/1000
  parameter int unsigned SEED       = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         step,
  output logic [N-1:0] r,
  output logic [S-1:0] state
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned b = 0; b < S; b++)
        state[b] <= fm_pgdbf_pkg::rg_init_bit(b, SEED, P0_PERMILLE);
    end else if (step) begin
      state <= {state[S-2:0], state[S-1]};
    end
  end

  always_comb
    for (int unsigned n = 0; n < N; n++) r[n] = state[n % S];
endmodule
