// vol_bal_gen: volume and balance indicators on the screen.
//
// Two horizontal bars are drawn near the top-left corner. The volume bar
// fills vol segments of SEG_W pixels each (10 segments at full volume)
// starting at column BAR_X on lines VOL_Y..VOL_Y+BAR_H-1. The balance bar, on
// lines BAL_Y..BAL_Y+BAR_H-1, has 11 positions (balance 0..10) and lights the
// segment at position bal, so it sits in the middle when the balance is
// centred and moves left or right with it. One gap pixel separates segments.
//
// Interface and timing: x/y are the scan position; vb_col (VB_VOL, VB_BAL or
// VB_NONE) follows two clk later, the same latency as sig_alias. A ten-level
// volume and balance display is the original design's; the bar layout,
// sizes and positions are this design's.
module vol_bal_gen
  import osc_pkg::*;
#(
  parameter int unsigned BAR_X = 8,
  parameter int unsigned VOL_Y = 8,
  parameter int unsigned BAL_Y = 24,
  parameter int unsigned BAR_H = 8,
  parameter int unsigned SEG_W = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [9:0] x,
  input  logic [9:0] y,
  input  level_t     vol,
  input  level_t     bal,
  output vb_col_e    vb_col
);

  logic [9:0] dx;
  logic [9:0] seg;
  logic       in_gap, in_span, vol_row, bal_row;
  vb_col_e    stage1;

  always_comb begin
    dx      = x - 10'(BAR_X);
    seg     = dx / 10'(SEG_W);
    in_gap  = (dx % 10'(SEG_W)) == 10'(SEG_W - 1);
    in_span = (x >= 10'(BAR_X)) && (seg <= 10'(LEVEL_MAX)) && !in_gap;
    vol_row = (y >= 10'(VOL_Y)) && (y < 10'(VOL_Y + BAR_H));
    bal_row = (y >= 10'(BAL_Y)) && (y < 10'(BAL_Y + BAR_H));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage1 <= VB_NONE;
      vb_col <= VB_NONE;
    end else begin
      if (vol_row && in_span && seg < 10'(vol))       stage1 <= VB_VOL;
      else if (bal_row && in_span && seg == 10'(bal)) stage1 <= VB_BAL;
      else                                            stage1 <= VB_NONE;
      vb_col <= stage1;
    end
  end

endmodule
