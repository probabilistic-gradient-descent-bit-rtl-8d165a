// tb_random_generator: checks the rotating random register (N = 100,
// S = 37): the reset pattern has a fraction of ones near p0 = 0.7, each step
// rotates it by one position (bit b takes bit b-1), r[n] equals register bit
// n mod S, and the pattern repeats after exactly S steps. A register of 1000
// bits also checks the fraction of ones against p0.
module tb_random_generator;
  localparam int unsigned N = 100, S = 37;
  logic clk = 0, rst_n = 0, step = 0;
  logic [N-1:0] r;
  logic [S-1:0] state, first, prev;
  logic [999:0] r_big;
  logic [999:0] st_big;
  int checks = 0, failures = 0;

  random_generator #(.N(N), .S(S), .P0_PERMILLE(700), .SEED(3)) dut (.clk, .rst_n, .step, .r, .state);
  random_generator #(.N(1000), .S(1000), .P0_PERMILLE(700), .SEED(1)) dut_big (
    .clk, .rst_n, .step(1'b0), .r(r_big), .state(st_big));

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
    int ones;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int b = 0; b < S; b++)
      chk(state[b] == fm_pgdbf_pkg::rg_init_bit(b, 3, 700), "reset pattern differs");
    ones = $countones(st_big);
    chk(ones > 640 && ones < 760, $sformatf("%0d ones in 1000 bits for p0 = 0.7", ones));
    first = state;
    for (int k = 1; k <= 2 * S + 5; k++) begin
      bit st;
      st = ($urandom_range(3) != 0);
      prev = state;
      step = st;
      @(posedge clk); #1;
      step = 0;
      if (st) begin
        for (int b = 0; b < S; b++)
          chk(state[b] == prev[(b + S - 1) % S], $sformatf("bit %0d not rotated", b));
      end else
        chk(state == prev, "state changed without step");
      for (int n = 0; n < N; n++)
        chk(r[n] == state[n % S], $sformatf("r[%0d] is not register bit %0d", n, n % S));
    end
    // exactly S steps return the register to where it was
    prev = state;
    step = 1;
    repeat (S - 1) begin
      @(posedge clk); #1;
      chk(state != prev || $countones(prev) == 0 || $countones(prev) == S, "period shorter than S");
    end
    @(posedge clk); #1;
    step = 0;
    chk(state == prev, "pattern does not repeat after S steps");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
