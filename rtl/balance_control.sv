// balance_control: left/right balance for the time-multiplexed stream.
//
// Balance level 5 is the centre and leaves both channels alone. Below 5 the
// right channel (ch_select = 1) is shifted right arithmetically by (5 - bal)
// places; above 5 the left channel (ch_select = 0) is shifted right by
// (bal - 5) places. The other channel always passes unchanged. This rule is
// the original design's; the clamp of levels above 10 is this design's.
//
// Timing: one clk from data_in/valid_in to data_out/valid_out.
module balance_control
  import osc_pkg::*;
#(
  parameter int unsigned CENTER = BAL_CENTER
) (
  input  logic    clk,
  input  logic    rst_n,
  input  level_t  bal,
  input  sample_t data_in,
  input  logic    ch_in,      // 0 left, 1 right
  input  logic    valid_in,
  output sample_t data_out,
  output logic    ch_out,
  output logic    valid_out
);

  level_t lvl;
  level_t shift;

  always_comb begin
    lvl   = (bal > level_t'(LEVEL_MAX)) ? level_t'(LEVEL_MAX) : bal;
    shift = '0;
    if (ch_in && lvl < level_t'(CENTER))
      shift = level_t'(CENTER) - lvl;
    else if (!ch_in && lvl > level_t'(CENTER))
      shift = lvl - level_t'(CENTER);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_out  <= '0;
      ch_out    <= 1'b0;
      valid_out <= 1'b0;
    end else begin
      valid_out <= valid_in;
      if (valid_in) begin
        data_out <= data_in >>> shift;
        ch_out   <= ch_in;
      end
    end
  end

endmodule
