// tb_cnu: checks the check node unit (DC = 8) on all 256 input patterns
// against a parity computed by counting ones.
module tb_cnu;
  localparam int unsigned DC = 8;
  logic [DC-1:0] v_in;
  logic          c;
  int checks = 0, failures = 0;

  cnu #(.DC(DC)) dut (.v_in, .c);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < (1 << DC); p++) begin
      int ones;
      ones = 0;
      v_in = DC'(p);
      #1;
      for (int b = 0; b < DC; b++) if (p & (1 << b)) ones++;
      checks++;
      if (c != ones[0]) begin
        failures++;
        $display("FAIL: pattern %0h gives %0b", p, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
