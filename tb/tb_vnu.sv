// tb_vnu: checks the variable node unit (DV = 4): load of the channel bit,
// energy E = (v xor y) + number of unsatisfied checks for every combination,
// the flip rule E >= threshold and r = 1, the hold when iter = 0 and the
// priority of load over iter. Expected values are computed in the testbench.
module tb_vnu;
  localparam int unsigned DV = 4, EW = 3, TW = 4;
  logic clk = 0, rst_n = 0, load = 0, y = 0, iter = 0, r = 0;
  logic [DV-1:0] c_in = '0;
  logic [TW-1:0] thr = '0;
  logic v, flip;
  logic [EW-1:0] energy;
  int checks = 0, failures = 0;
  int n_flips = 0, n_masked = 0;

  vnu #(.DV(DV), .EW(EW), .TW(TW)) dut (.*);

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
    chk(v == 0, "v not cleared by reset");
    for (int trial = 0; trial < 400; trial++) begin
      bit yb, vb, rb, exp_flip;
      int e, t;
      logic [DV-1:0] cc;
      yb = 1'($urandom);
      // load the channel bit
      @(negedge clk); load = 1; y = yb; iter = 1; r = 1; thr = 0;
      @(negedge clk); load = 0;
      chk(v == yb, $sformatf("trial %0d: load gave v=%0b, y=%0b", trial, v, yb));
      // optionally move v away from y with one forced flip
      if ($urandom_range(1)) begin
        iter = 1; r = 1; thr = 0; c_in = '0;
        @(negedge clk);
        chk(v == !yb, "forced flip with threshold 0 failed");
      end
      vb = v;
      cc = DV'($urandom); rb = 1'($urandom); t = $urandom_range(6);
      c_in = cc; r = rb; thr = TW'(t); iter = 0;
      #1;
      e = (vb != yb) + $countones(cc);
      exp_flip = (e >= t) && rb;
      chk(int'(energy) == e, $sformatf("energy %0d, expected %0d", energy, e));
      chk(flip == exp_flip, $sformatf("flip %0b, expected %0b (E=%0d thr=%0d r=%0b)", flip, exp_flip, e, t, rb));
      @(negedge clk);
      chk(v == vb, "v changed with iter = 0");
      iter = 1;
      @(negedge clk);
      chk(v == (vb ^ exp_flip), $sformatf("after iteration v=%0b expected %0b", v, vb ^ exp_flip));
      if (exp_flip) n_flips++;
      if (e >= t && !rb) n_masked++;
      iter = 0;
    end
    // load has priority over iter
    @(negedge clk); load = 1; iter = 1; y = 1; c_in = '1; thr = 0; r = 1;
    @(negedge clk); load = 0; iter = 0;
    chk(v == 1, "load did not take priority over iter");
    chk(n_flips > 0 && n_masked > 0, "flip and masked cases not both exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
