// screen_control: VGA scan counters, sync and blanking.
//
// A column counter x runs 0..H_TOTAL-1 at one pixel per clk and a line
// counter y advances at the end of each line, 0..V_TOTAL-1. As in the
// original design, hsync is low while H_SYNC_FIRST <= x <= H_SYNC_LAST
// (594..688) and the picture is blanked for x > H_ACT_LAST (512). Vertically
// the first 480 lines are visible and vsync is low on lines 494..495 of 528:
// these line counts are the timing diagram's 15.25 ms, 15.70 ms, 15.764 ms and
// 16.784 ms divided by its 31.77 us line time. The 800-clock line is 31.77 us
// at the usual 25.175 MHz pixel clock; the line length is this design's
// reading of the diagram.
//
// Interface and timing: x and y are the counters themselves (stage 0); hsync
// and vsync are registered twice and blank is made from registered h/v blank
// flags, so all three belong to the position shown two clk earlier. Later
// blocks work on x/y and line up with the sync signals by delaying their
// colours to the same stage.
module screen_control #(
  parameter int unsigned H_ACT_LAST   = 512,
  parameter int unsigned H_SYNC_FIRST = 594,
  parameter int unsigned H_SYNC_LAST  = 688,
  parameter int unsigned H_TOTAL      = 800,
  parameter int unsigned V_ACTIVE     = 480,
  parameter int unsigned V_SYNC_FIRST = 494,
  parameter int unsigned V_SYNC_LAST  = 495,
  parameter int unsigned V_TOTAL      = 528
) (
  input  logic       clk,
  input  logic       rst_n,
  output logic [9:0] x,
  output logic [9:0] y,
  output logic       hsync,
  output logic       vsync,
  output logic       blank,
  output logic       frame_start   // one clk pulse while x = 0, y = 0
);

  logic h_blank, v_blank, hs1, vs1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0;
      y <= '0;
    end else if (x == 10'(H_TOTAL - 1)) begin
      x <= '0;
      y <= (y == 10'(V_TOTAL - 1)) ? '0 : y + 1'b1;
    end else begin
      x <= x + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hs1     <= 1'b1;
      vs1     <= 1'b1;
      h_blank <= 1'b0;
      v_blank <= 1'b0;
      hsync   <= 1'b1;
      vsync   <= 1'b1;
      blank   <= 1'b1;
    end else begin
      hs1     <= !(x >= 10'(H_SYNC_FIRST) && x <= 10'(H_SYNC_LAST));
      vs1     <= !(y >= 10'(V_SYNC_FIRST) && y <= 10'(V_SYNC_LAST));
      h_blank <= x > 10'(H_ACT_LAST);
      v_blank <= y >= 10'(V_ACTIVE);
      hsync   <= hs1;
      vsync   <= vs1;
      blank   <= h_blank || v_blank;
    end
  end

  assign frame_start = (x == '0) && (y == '0);

endmodule
