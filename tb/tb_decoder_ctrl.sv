// tb_decoder_ctrl: checks the decoder controller (M = 16, It_max = 10).
// The testbench plays the decoder core: after a start it keeps the syndrome
// non-zero for K iteration cycles and then clears it (or never clears it).
// Checked every cycle: ready/load/iter, the iteration count, the done pulse
// K+1 cycles after start, success, and the stop after It_max iterations.
module tb_decoder_ctrl;
  localparam int unsigned M = 16, IT_MAX = 10;
  localparam int unsigned ITW = $clog2(IT_MAX + 1);
  logic clk = 0, rst_n = 0, start = 0;
  logic [M-1:0] syndrome = '0;
  logic ready, load, iter, done, success;
  logic [ITW-1:0] iters;
  int checks = 0, failures = 0;
  int n_ok = 0, n_fail = 0;

  decoder_ctrl #(.M(M), .IT_MAX(IT_MAX)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    chk(ready && !done && !iter, "not idle after reset");
    for (int f = 0; f < 60; f++) begin
      int k, cyc, exp_it;
      bit exp_ok;
      k = (f % 5 == 4) ? 1000 : $urandom_range(IT_MAX);   // iterations needed
      exp_it = (k > IT_MAX) ? IT_MAX : k;
      exp_ok = (k <= IT_MAX);
      repeat ($urandom_range(3)) begin
        @(negedge clk);
        chk(!done && ready && !iter && !load, "activity while idle");
      end
      @(negedge clk);
      start = 1;
      #1 chk(load, "load not given with start");
      @(negedge clk);
      start = 0;
      cyc = 0;
      // RUN: syndrome non-zero until k iterations have been done
      while (1) begin
        syndrome = (cyc < k) ? M'(1 << $urandom_range(M - 1)) : '0;
        #1;
        chk(!ready && !load, "ready or load during decoding");
        chk(iter == ((cyc < k) && (cyc < IT_MAX)), $sformatf("iter=%0b at iteration %0d", iter, cyc));
        chk(int'(iters) == cyc, $sformatf("iters=%0d expected %0d", iters, cyc));
        @(negedge clk);
        if (done) break;
        cyc++;
        if (cyc > IT_MAX + 2) break;
      end
      chk(done, "no done");
      chk(cyc == exp_it, $sformatf("done after %0d iterations, expected %0d", cyc, exp_it));
      chk(success == exp_ok, "success flag wrong");
      chk(int'(iters) == exp_it, "iteration count wrong at done");
      chk(ready, "not ready at done");
      if (exp_ok) n_ok++; else n_fail++;
      syndrome = '0;
      @(negedge clk);
      chk(!done, "done longer than one cycle");
      chk(success == exp_ok && int'(iters) == exp_it, "results not held");
    end
    chk(n_ok > 0 && n_fail > 0, "both exits not exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
