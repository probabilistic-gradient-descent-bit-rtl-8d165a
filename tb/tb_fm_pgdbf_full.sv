// tb_fm_pgdbf_full: the FM-PGDBF decoder at its default configuration, the
// (4,8)-regular rate-1/2 QC-LDPC code of length 1296 (Z = 162, shifts
// i*j mod 162), threshold sequence of length 8, random register of M/2 = 324
// bits, p0 = 0.7 and It_max = 300. The decoder is instantiated without
// parameter overrides. Frames from a BSC with crossover probabilities of
// 1%, 2% and 3%, and some frames with an error pattern too heavy to correct,
// are decoded and compared bit for bit and cycle for cycle with a reference
// model; each of the decoder's mechanisms has to occur at least once.
module tb_fm_pgdbf_full;
  localparam int unsigned DV = 4, DC = 8, Z = 162;
  localparam int unsigned N = DC * Z, M = DV * Z;
  localparam int unsigned S = M / 2;
  localparam int unsigned L = 8;
  localparam int unsigned IT_MAX = 300;
  localparam int unsigned P0_PERMILLE = 700, RG_SEED = 1;
  localparam int unsigned NFRAMES = 24;
  localparam int unsigned ALPHA_PM [3] = '{10, 20, 30};
  localparam int unsigned HEAVY_W = 200;
  localparam int unsigned WATCHDOG = 400000;
  localparam int unsigned ITW = $clog2(IT_MAX + 1);

  // array-code shifts of the default configuration
  function automatic int unsigned tb_shift(int i, int j); return (i * j) % Z; endfunction
  // threshold sequence expected for DV = 4
  localparam int unsigned THR [8] = '{4, 4, 4, 3, 4, 3, 4, 3};
  function automatic int unsigned tb_thr(int k); return THR[k]; endfunction

  int checks, failures;
  bit finished;
  logic clk, rst_n, start, ready, done, success;
  logic [N-1:0] y, x_hat;
  logic [M-1:0] syndrome;
  logic [ITW-1:0] iters;

  fm_pgdbf_decoder dut (.*);

  `include "pgdbf_ref_model.svh"
  `include "pgdbf_e2e_body.svh"

  initial begin : watchdog
    repeat (WATCHDOG) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
