// wf_ctrl: sample enables for the waveform capture.
//
// The display is built from Megasamples: bursts of N_SAMPLES successive
// samples of both channels. A Megasample starts every MEGA_PERIOD * 2**mega / 4
// audio frames (frame_tick pulses once per stereo frame; mega is 0..4, larger
// values count as 4). At mega = 2 the default 3934 frames is 40 ms at a
// 25.175 MHz clock (sample rate clk/256), the Megasample rate of the original
// design; mega 0..4 gives 10, 20, 40, 80 and 160 ms. A period change takes
// effect at once: a period counter already past the new length wraps on the
// next frame. Inside a Megasample one sample is taken every 2**rate
// frames, so each step of rate halves or doubles the sampling frequency. If a
// Megasample is still running when the next period begins, that start is
// skipped. While freeze is high no Megasample starts, so the stored picture
// stays.
//
// Timing: sample_en pulses one clk after the frame_tick it belongs to, with
// sample_idx naming the slot (0..N_SAMPLES-1); mega_done pulses with the last
// sample. The 64-sample Megasample every 40 ms, the adjustable Megasample
// period and sample interval and freezing are the original design's; the
// period steps, the skip rule and the counting in audio frames are this
// design's. MEGA_PERIOD must be at least 4.
module wf_ctrl #(
  parameter int unsigned N_SAMPLES   = 64,
  parameter int unsigned MEGA_PERIOD = 3934,
  localparam int unsigned IW = $clog2(N_SAMPLES),
  localparam int unsigned PW = $clog2(4 * MEGA_PERIOD)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          frame_tick,
  input  logic [2:0]    rate,
  input  logic [2:0]    mega,
  input  logic          freeze,
  output logic          sample_en,
  output logic [IW-1:0] sample_idx,
  output logic          mega_done,
  output logic          active
);

  logic [PW-1:0]   per_cnt, per_last;
  logic [PW+1:0]   per_x4;
  logic [2:0]      msel;
  logic [7:0]      div_cnt;
  logic [IW-1:0]   idx;
  logic [7:0]      interval_m1;

  assign interval_m1 = 8'((9'd1 << rate) - 9'd1);
  assign msel        = (mega > 3'd4) ? 3'd4 : mega;
  assign per_x4      = (PW+2)'(MEGA_PERIOD) << msel;
  assign per_last    = PW'((per_x4 >> 2) - 1'b1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      per_cnt    <= '0;
      div_cnt    <= '0;
      idx        <= '0;
      active     <= 1'b0;
      sample_en  <= 1'b0;
      sample_idx <= '0;
      mega_done  <= 1'b0;
    end else begin
      sample_en <= 1'b0;
      mega_done <= 1'b0;
      if (frame_tick) begin
        per_cnt <= (per_cnt >= per_last) ? '0 : per_cnt + 1'b1;
        if (active) begin
          if (div_cnt >= interval_m1) begin
            div_cnt    <= '0;
            sample_en  <= 1'b1;
            sample_idx <= idx;
            idx        <= idx + 1'b1;
            if (idx == IW'(N_SAMPLES - 1)) begin
              active    <= 1'b0;
              mega_done <= 1'b1;
            end
          end else begin
            div_cnt <= div_cnt + 1'b1;
          end
        end else if (per_cnt == '0 && !freeze) begin
          active     <= 1'b1;
          sample_en  <= 1'b1;
          sample_idx <= '0;
          idx        <= IW'(1);
          div_cnt    <= '0;
        end
      end
    end
  end

endmodule
