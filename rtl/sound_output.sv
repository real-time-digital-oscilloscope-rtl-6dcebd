// sound_output: parallel-to-serial transmitter for the codec's DAC data.
//
// Processed words arrive one at a time with their channel flag and are kept
// in a left and a right holding register. The transmitter finds the SCLK
// falling edge by comparing SCLK with its value one clk earlier. On the falling
// edge that opens SCLK period 0 it picks the holding register named by LRCK
// (low left, high right) and then, on each falling edge, drives the next bit,
// most significant first; periods 20..31 send 0, since only the first 20 bits
// are valid. This matches the receive framing of sound_interface, so a word
// received in one LRCK half period is sent back in the next half period of
// the same channel.
//
// Timing: sdout changes one clk after SCLK falls, a full clk before the codec
// samples it on the next SCLK rising edge. Falling-edge transmission, the
// 20-bit framing and LRCK channel selection follow the original design; the
// holding registers and the one-frame latency are this design's.
module sound_output
  import osc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sclk,
  input  logic       lrck,
  input  logic [4:0] bit_cnt,
  input  sample_t    data_in,
  input  logic       ch_in,      // 0 left, 1 right
  input  logic       valid_in,
  output logic       sdout
);

  logic    old_sc;
  sample_t left_reg, right_reg, tx_word, word;
  logic    sclk_fall;

  assign sclk_fall = !sclk && old_sc;

  always_comb begin
    word = tx_word;
    if (bit_cnt == 5'd0) word = lrck ? right_reg : left_reg;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      old_sc    <= 1'b0;
      left_reg  <= '0;
      right_reg <= '0;
      tx_word   <= '0;
      sdout     <= 1'b0;
    end else begin
      old_sc <= sclk;
      if (valid_in) begin
        if (ch_in) right_reg <= data_in;
        else       left_reg  <= data_in;
      end
      if (sclk_fall) begin
        tx_word <= word;
        if (bit_cnt < 5'(DATA_W)) sdout <= word[5'(DATA_W - 1) - bit_cnt];
        else                      sdout <= 1'b0;
      end
    end
  end

endmodule
