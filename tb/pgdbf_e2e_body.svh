// pgdbf_e2e_body.svh: end-to-end stimulus and checking for the FM-PGDBF
// decoder, included into the decoder testbenches after pgdbf_ref_model.svh.
// The including module declares clk, rst_n, start, y, ready, done, success,
// iters, x_hat, syndrome (connected to the decoder), checks, failures and
// finished (set when all frames are done), and NFRAMES, ALPHA_PM
// (list of BSC crossover probabilities in 1/1000), HEAVY_W (error weight of
// frames meant to exceed the correction capability) and WATCHDOG.
//
// The stored codeword is the all-zero word: the decoder's rule depends on
// v xor y and on the checks only, so its behaviour is the same for every
// codeword. Each frame is corrupted by a BSC, the decoder runs, and the
// outputs (decisions, success, iteration count, latency in cycles) are
// compared with the reference model.

int n_clean = 0, n_fixed = 0, n_failed = 0, n_miscorrect = 0;
longint cycle = 0;

always #5 clk = ~clk;
always @(posedge clk) cycle <= cycle + 1;

task automatic chk(input bit ok, input string what);
  checks++;
  if (!ok) begin
    failures++;
    if (failures <= 10) $display("FAIL (N=%0d): %s", N, what);
  end
endtask

initial begin : stim
  checks = 0; failures = 0; finished = 0;
  clk = 0; rst_n = 0; start = 0; y = '0;
  rm_build_graph();
  rm_rg_reset();
  repeat (3) @(posedge clk);
  rst_n = 1;
  @(posedge clk);
  for (int f = 0; f < NFRAMES; f++) begin
    int w;
    longint t0;
    int unsigned a;
    bit match;
    w = 0;
    a = ALPHA_PM[f % $size(ALPHA_PM)];
    for (int n = 0; n < N; n++) rm_y[n] = 0;
    if (f == 0) begin
      // clean frame
    end else if (f % 7 == 3) begin
      while (w < HEAVY_W) begin
        int unsigned p;
        p = $urandom_range(N - 1);
        if (!rm_y[p]) begin rm_y[p] = 1; w++; end
      end
    end else begin
      for (int n = 0; n < N; n++)
        if ($urandom_range(999) < a) begin rm_y[n] = 1; w++; end
    end
    rm_decode();
    // drive the decoder
    while (!ready) @(posedge clk);
    #1;
    for (int n = 0; n < N; n++) y[n] = rm_y[n];
    start = 1;
    @(posedge clk);
    #1 start = 0;
    t0 = cycle;
    chk(!ready, $sformatf("frame %0d: still ready after start", f));
    while (!done) begin @(posedge clk); #1; end
    chk(cycle - t0 == longint'(rm_iters) + 1,
        $sformatf("frame %0d: latency %0d cycles, expected %0d", f, cycle - t0, rm_iters + 1));
    match = 1;
    for (int n = 0; n < N; n++) if (x_hat[n] != rm_v[n]) match = 0;
    chk(match, $sformatf("frame %0d: decisions differ from the model", f));
    chk(success == rm_success, $sformatf("frame %0d: success %0b, expected %0b", f, success, rm_success));
    chk(int'(iters) == rm_iters, $sformatf("frame %0d: %0d iterations, expected %0d", f, iters, rm_iters));
    chk((syndrome == '0) == rm_success, $sformatf("frame %0d: syndrome inconsistent", f));
    // a heavy frame may converge to another codeword: legal, only counted
    if (rm_success && x_hat != '0) n_miscorrect++;
    if (rm_success && rm_iters == 0) n_clean++;
    else if (rm_success) n_fixed++;
    else n_failed++;
    @(posedge clk); #1;
    chk(!done, $sformatf("frame %0d: done longer than one cycle", f));
    chk(ready, $sformatf("frame %0d: not ready after done", f));
  end
  $display("N=%0d DV=%0d DC=%0d frames: %0d clean, %0d corrected, %0d not corrected (It_max reached), %0d converged to another codeword",
           N, DV, DC, n_clean, n_fixed, n_failed, n_miscorrect);
  $display("events: %0d masked candidates, %0d idle iterations, %0d low-threshold flips, %0d wrapped-sequence iterations",
           ev_masked, ev_idle_iter, ev_low_thr_flip, ev_wrap);
  chk(n_clean > 0,  "no clean frame (zero-iteration exit) seen");
  chk(n_fixed > 0,  "no frame corrected by iterating");
  chk(n_failed > 0, "no frame reached It_max");
  chk(ev_masked > 0, "random generator never masked a flip");
  chk(ev_low_thr_flip > 0, "no flip at a lowered threshold");
  chk(ev_wrap > 0, "threshold sequence never wrapped");
  finished = 1;
end
