// tb_wf_ctrl: Megasample pacing against a frame-count reference.
//
// frame_tick pulses every 3 to 6 clk. With MEGA_PERIOD = 300 frames the
// reference keeps its own period counter, which wraps after
// 300 * 2**mega / 4 frames (75..1200). A Megasample may start only on a frame
// where that counter is 0, when none is running and freeze is low; it then takes
// samples 0..63 on that frame and every 2**rate frames after it. The
// testbench predicts sample_en/sample_idx for each tick from frame numbers
// alone and compares one clk later. It runs rates 0..3 (rate 3 makes the
// Megasample, 512 frames, longer than the period, so a start is skipped) and
// a frozen stretch with no samples. Rate, period and freeze change only
// between Megasamples; the period also changes while the counter is past the
// new length.
module tb_wf_ctrl;
  logic clk = 1'b0, rst_n = 1'b0;
  logic frame_tick = 1'b0;
  logic [2:0] rate = 3'd0;
  logic [2:0] mega = 3'd2;
  logic freeze = 1'b0;
  logic sample_en, mega_done, active;
  logic [5:0] sample_idx;
  int checks = 0, failures = 0;
  int megas = 0;

  localparam int P = 300;

  wf_ctrl #(.N_SAMPLES(64), .MEGA_PERIOD(P)) dut (.clk, .rst_n, .frame_tick, .rate, .mega, .freeze,
                                                  .sample_en, .sample_idx, .mega_done, .active);

  always #5 clk = !clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int f;            // frame number since reset
    int start_f;      // frame of the running Megasample's first sample, -1 if none
    int skipped = 0;
    int frozen_frames = 0;
    int pc = 0;       // reference period counter
    int plast;
    int mega_seen [5] = '{0, 0, 0, 0, 0};
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    start_f = -1;
    for (f = 0; f < 20000; f++) begin
      logic exp_en;
      int   exp_idx;
      // test plan: rate by Megasample count, freeze in one window
      if (start_f < 0) begin
        rate   = 3'((megas / 3) % 4);
        mega   = 3'((megas / 4) % 6);   // 5 must act as 4
        freeze = (f >= 9000 && f < 10000);
      end
      plast = ((P << ((mega > 4) ? 4 : int'(mega))) >> 2) - 1;
      exp_en = 1'b0; exp_idx = 0;
      if (start_f >= 0) begin
        if ((f - start_f) % (1 << rate) == 0) begin
          exp_en = 1'b1;
          exp_idx = (f - start_f) >> rate;
          if (exp_idx == 63) start_f = -2;  // ends with this sample
        end
      end else if (pc == 0) begin
        if (!freeze) begin
          start_f = f; exp_en = 1'b1; exp_idx = 0;
          mega_seen[(mega > 4) ? 4 : int'(mega)]++;
        end else frozen_frames++;
      end
      // skipped start: a period boundary while running
      if (start_f >= 0 && f != start_f && pc == 0) skipped++;
      pc = (pc >= plast) ? 0 : pc + 1;
      @(negedge clk);
      frame_tick = 1'b1;
      @(negedge clk);
      frame_tick = 1'b0;
      checks++;
      if (sample_en !== exp_en || (exp_en && int'(sample_idx) != exp_idx) ||
          mega_done !== (exp_en && exp_idx == 63)) begin
        failures++;
        if (failures < 10) $display("frame %0d rate %0d: en=%b idx=%0d done=%b want en=%b idx=%0d",
                                    f, rate, sample_en, sample_idx, mega_done, exp_en, exp_idx);
      end
      if (exp_en && exp_idx == 63) megas++;
      if (start_f == -2) start_f = -1;
      repeat ($urandom_range(1, 4)) @(negedge clk);
    end
    checks++;
    if (megas < 20 || skipped == 0 || frozen_frames == 0 ||
        mega_seen[0] == 0 || mega_seen[1] == 0 || mega_seen[3] == 0 || mega_seen[4] == 0) begin
      failures++;
      $display("megasamples %0d skipped starts %0d frozen starts %0d", megas, skipped, frozen_frames);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
