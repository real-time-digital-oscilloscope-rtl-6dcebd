// volume_control: digital volume for the time-multiplexed left/right stream.
//
// Each word is divided by a power of two: it is shifted right arithmetically
// by (10 - vol) places, so level 10 passes the word unchanged and every step
// down halves it. Levels above 10 are treated as 10. The same level applies to
// both channels, whatever ch_select says. Volume by right shifts over ten
// levels follows the original design; the exact shift count (10 - vol) is
// this design's choice.
//
// Timing: one clk from data_in/valid_in to data_out/valid_out; ch_select is
// carried along with the word.
module volume_control
  import osc_pkg::*;
#(
  parameter int unsigned LEVELS = LEVEL_MAX
) (
  input  logic    clk,
  input  logic    rst_n,
  input  level_t  vol,
  input  sample_t data_in,
  input  logic    ch_in,
  input  logic    valid_in,
  output sample_t data_out,
  output logic    ch_out,
  output logic    valid_out
);

  level_t lvl;
  level_t shift;

  always_comb begin
    lvl   = (vol > level_t'(LEVELS)) ? level_t'(LEVELS) : vol;
    shift = level_t'(LEVELS) - lvl;
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
