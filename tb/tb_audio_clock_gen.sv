// tb_audio_clock_gen: checks the codec clocks against a reference cycle count.
//
// After reset the n-th clk must show SCLK = bit 1 of n, the bit counter =
// bits 6:2 of n and LRCK = bit 7 of n, i.e. SCLK = clk/4 and LRCK = clk/256
// (256 clk per stereo frame, 32 SCLK periods per channel). 2048 cycles are
// checked; a watchdog ends the run if it hangs.
module tb_audio_clock_gen;
  logic clk = 1'b0, rst_n = 1'b0;
  logic mclk, sclk, lrck;
  logic [4:0] bit_cnt;
  int checks = 0, failures = 0;

  audio_clock_gen dut (.clk, .rst_n, .mclk, .sclk, .lrck, .bit_cnt);

  always #5 clk = !clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned n;
    int lrck_rises = 0;
    logic lrck_old;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    n = 0;
    lrck_old = 1'b0;
    for (int i = 0; i < 2048; i++) begin
      @(negedge clk);
      checks++;
      if (sclk !== n[1] || lrck !== n[7] || bit_cnt !== 5'(n >> 2)) begin
        failures++;
        if (failures < 10) $display("n=%0d sclk=%b lrck=%b bit_cnt=%0d", n, sclk, lrck, bit_cnt);
      end
      if (lrck && !lrck_old) lrck_rises++;
      lrck_old = lrck;
      n++;
    end
    checks++;
    if (lrck_rises != 8) begin
      failures++;
      $display("lrck rises %0d, want 8 in 2048 clk", lrck_rises);
    end
    checks++;
    if (mclk !== clk) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
