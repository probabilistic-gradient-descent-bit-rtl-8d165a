// pgdbf_e2e_run: testbench helper that decodes BSC frames with one
// configuration of the FM-PGDBF decoder and checks it against the reference
// model (see pgdbf_e2e_body.svh). The code is a regular QC-LDPC code given
// by DV, DC, Z and the circulant shift rule; SHIFT_MODE 0 uses i*j mod Z,
// SHIFT_MODE 1 uses the (155,64) Tanner code shifts (DV=3, DC=5, Z=31 only).
// checks, failures and finished report the outcome to the enclosing test.
module pgdbf_e2e_run #(
  parameter int unsigned DV = 3,
  parameter int unsigned DC = 5,
  parameter int unsigned Z = 31,
  parameter int unsigned SHIFT_MODE = 1,
  parameter int unsigned IT_MAX = 60,
  parameter int unsigned NFRAMES = 60,
  parameter int unsigned HEAVY_W = 25,
  parameter int unsigned A0 = 10, A1 = 20, A2 = 30   // BSC crossover in 1/1000
) (
  output int checks,
  output int failures,
  output bit finished
);
  localparam int unsigned N = DC * Z, M = DV * Z;
  localparam int unsigned S = M / 2;
  localparam int unsigned L = 8;
  localparam int unsigned P0_PERMILLE = 700, RG_SEED = 1;
  localparam int unsigned ALPHA_PM [3] = '{A0, A1, A2};
  localparam int unsigned ITW = $clog2(IT_MAX + 1);

  localparam int unsigned TANNER [3][5] = '{'{1, 2, 4, 8, 16}, '{5, 10, 20, 9, 18}, '{25, 19, 7, 14, 28}};
  function automatic int unsigned tb_shift(int i, int j);
    return (SHIFT_MODE == 1) ? TANNER[i][j] : (i * j) % Z;
  endfunction
  // expected threshold sequence {dv,dv,dv,dv-1,dv,dv-1,dv,dv-1}
  function automatic int unsigned tb_thr(int k);
    return (k == 3 || k == 5 || k == 7) ? DV - 1 : DV;
  endfunction

  logic clk, rst_n, start, ready, done, success;
  logic [N-1:0] y, x_hat;
  logic [M-1:0] syndrome;
  logic [ITW-1:0] iters;

  fm_pgdbf_decoder #(
    .DV(DV), .DC(DC), .Z(Z),
    .SHIFT_MODE(SHIFT_MODE == 1 ? fm_pgdbf_pkg::SHIFT_MULT : fm_pgdbf_pkg::SHIFT_ARRAY),
    .SHIFT_A(2), .SHIFT_B(5), .L(L), .S(S), .P0_PERMILLE(P0_PERMILLE), .RG_SEED(RG_SEED),
    .IT_MAX(IT_MAX)
  ) dut (.*);

  `include "pgdbf_ref_model.svh"
  `include "pgdbf_e2e_body.svh"
endmodule
