// tb_screen_control: VGA timing over two whole frames.
//
// Counting clk from reset, position n must be x = n mod 800 and
// y = (n div 800) mod 528. hsync, vsync and blank belong to the position two
// clk earlier: hsync low for 594 <= x <= 688, vsync low on lines 494..495,
// blank for x > 512 or y >= 480. The testbench also measures the hsync period
// (800 clk), its low time (95 clk) and the frame length (422400 clk).
module tb_screen_control;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [9:0] x, y;
  logic hsync, vsync, blank, frame_start;
  int checks = 0, failures = 0;

  screen_control dut (.clk, .rst_n, .x, .y, .hsync, .vsync, .blank, .frame_start);

  always #5 clk = !clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, hs_low, hs_fall_last, hs_period, vs_fall_last, vs_period;
    logic hs_old, vs_old;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    hs_low = 0; hs_fall_last = -1; hs_period = 0; vs_fall_last = -1; vs_period = 0;
    hs_old = 1'b1; vs_old = 1'b1;
    for (n = 0; n < 2 * 800 * 528 + 10; n++) begin
      int px, py, m;
      @(negedge clk);
      px = n % 800; py = (n / 800) % 528;
      checks++;
      if (int'(x) != px || int'(y) != py || frame_start != (px == 0 && py == 0)) begin
        failures++;
        if (failures < 10) $display("n %0d: x %0d y %0d", n, x, y);
      end
      if (n >= 2) begin
        m = n - 2; px = m % 800; py = (m / 800) % 528;
        checks++;
        if (hsync !== !(px >= 594 && px <= 688) || vsync !== !(py >= 494 && py <= 495) ||
            blank !== (px > 512 || py >= 480)) begin
          failures++;
          if (failures < 10) $display("pos %0d,%0d: hs %b vs %b blank %b", px, py, hsync, vsync, blank);
        end
      end
      if (!hsync) hs_low++;
      if (!hsync && hs_old) begin
        if (hs_fall_last >= 0) hs_period = n - hs_fall_last;
        hs_fall_last = n;
      end
      if (!vsync && vs_old) begin
        if (vs_fall_last >= 0) vs_period = n - vs_fall_last;
        vs_fall_last = n;
      end
      hs_old = hsync; vs_old = vsync;
    end
    checks++;
    if (hs_period != 800 || vs_period != 800 * 528 || hs_low != 95 * 528 * 2) begin
      failures++;
      $display("hsync period %0d low %0d vsync period %0d", hs_period, hs_low, vs_period);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
