// tb_fm_pgdbf_decoder: end-to-end test of the FM-PGDBF decoder on the
// (155,64) Tanner code (DV=3, DC=5, Z=31, shifts 5^i * 2^j mod 31), with
// It_max lowered to 60 so that undecodable frames finish quickly. Frames with
// BSC errors (1%, 2%, 3%) and frames with 25 errors are decoded and compared
// bit for bit, and cycle for cycle, with a reference model. Each mechanism
// has to occur at least once: zero-iteration exit, iterative correction,
// It_max exit, a flip masked by the random generator, a flip at a threshold
// below DV and a wrap of the threshold sequence.
module tb_fm_pgdbf_decoder;
  int checks, failures;
  bit finished;
  int unsigned ticks = 0;

  pgdbf_e2e_run #(.DV(3), .DC(5), .Z(31), .SHIFT_MODE(1), .IT_MAX(60), .NFRAMES(60), .HEAVY_W(25))
    run (.checks, .failures, .finished);

  // watchdog on the decoder clock
  always @(posedge run.clk) begin
    ticks <= ticks + 1;
    if (ticks == 200000) begin
      $display("FAIL: watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
      $finish;
    end
  end

  initial begin
    wait (finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
