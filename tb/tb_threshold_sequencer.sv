// tb_threshold_sequencer: checks the circular threshold sequence with a
// custom 5-entry sequence and with the default 8-entry one: restart returns
// to entry 0, step advances, the index wraps from L-1 to 0, and restart wins
// over step.
module tb_threshold_sequencer;
  localparam int unsigned L = 5;
  localparam fm_pgdbf_pkg::thr_seq_t SEQ = {44'h0, 4'd7, 4'd1, 4'd5, 4'd2, 4'd3};
  localparam int unsigned EXP [5] = '{3, 2, 5, 1, 7};
  localparam int unsigned EXPD [8] = '{4, 4, 4, 3, 4, 3, 4, 3};  // default for DV = 4
  logic clk = 0, rst_n = 0, restart = 0, step = 0;
  logic [3:0] thr, thr_d;
  logic [2:0] idx, idx_d;
  int checks = 0, failures = 0;

  threshold_sequencer #(.L(L), .DV(4), .SEQ(SEQ)) dut (.clk, .rst_n, .restart, .step, .thr, .idx);
  threshold_sequencer #(.L(8), .DV(4)) dut_d (.clk, .rst_n, .restart, .step, .thr(thr_d), .idx(idx_d));

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 300; cyc++) begin
      bit rs, st;
      rs = ($urandom_range(29) == 0);
      st = 1'($urandom);
      chk(int'(thr) == EXP[k % L], $sformatf("k=%0d thr=%0d expected %0d", k, thr, EXP[k % L]));
      chk(int'(thr_d) == EXPD[k % 8], $sformatf("k=%0d default thr=%0d expected %0d", k, thr_d, EXPD[k % 8]));
      chk(int'(idx) == k % L, "index wrong");
      restart = rs; step = st;
      @(posedge clk); #1;
      if (rs) k = 0; else if (st) k++;
      restart = 0; step = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
