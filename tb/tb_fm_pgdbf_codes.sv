// tb_fm_pgdbf_codes: runs the FM-PGDBF decoder on the other regular
// QC-LDPC code shapes of the hardware comparison: rate 1/2 and 3/4 codes of
// length 1296 with column weight 3, the rate 3/4 length-1296 and the
// length-2212 (rate 6/7) codes with column weight 4. The shapes (DC, Z) are
// derived from the length, rate and column weight; the circulant shifts are
// i*j mod Z. Each decoder gets BSC frames and heavy frames and is compared
// with the reference model, It_max = 300.
module tb_fm_pgdbf_codes;
  int c [4], f [4];
  bit fin [4];
  int unsigned ticks = 0;

  pgdbf_e2e_run #(.DV(3), .DC(6),  .Z(216), .SHIFT_MODE(0), .IT_MAX(300), .NFRAMES(15), .HEAVY_W(150),
                  .A0(5), .A1(10), .A2(20)) r050 (.checks(c[0]), .failures(f[0]), .finished(fin[0]));
  pgdbf_e2e_run #(.DV(3), .DC(12), .Z(108), .SHIFT_MODE(0), .IT_MAX(300), .NFRAMES(15), .HEAVY_W(100),
                  .A0(2), .A1(5), .A2(10)) r075 (.checks(c[1]), .failures(f[1]), .finished(fin[1]));
  pgdbf_e2e_run #(.DV(4), .DC(16), .Z(81),  .SHIFT_MODE(0), .IT_MAX(300), .NFRAMES(15), .HEAVY_W(100),
                  .A0(2), .A1(5), .A2(10)) d4r075 (.checks(c[2]), .failures(f[2]), .finished(fin[2]));
  pgdbf_e2e_run #(.DV(4), .DC(28), .Z(79),  .SHIFT_MODE(0), .IT_MAX(300), .NFRAMES(15), .HEAVY_W(150),
                  .A0(1), .A1(3), .A2(6)) d4r086 (.checks(c[3]), .failures(f[3]), .finished(fin[3]));

  always @(posedge r050.clk) begin
    ticks <= ticks + 1;
    if (ticks == 400000) begin
      $display("FAIL: watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", c.sum(), f.sum() + 1);
      $finish;
    end
  end

  initial begin
    wait (fin[0] && fin[1] && fin[2] && fin[3]);
    $display("TB_RESULT checks=%0d failures=%0d", c.sum(), f.sum());
    $finish;
  end
endmodule
