// audio_clock_gen: clocks for the audio codec.
//
// One free-running counter, cleared by the active-low reset, makes all codec
// clocks, as in the original design: MCLK is the system clock itself, SCLK is
// counter bit 1 (clk/4), LRCK is the counter's top bit (clk/256 with the
// default 8-bit counter, so MCLK = 256 x the sample rate) and the bits in
// between number the SCLK periods inside one LRCK half period (bit_cnt,
// 0..31). Only bit_cnt 0..19 carry data. All outputs are register bits or
// clk, so they change only on the rising edge of clk.
module audio_clock_gen #(
  parameter int unsigned CNT_W = 8   // counter width: LRCK = clk / 2**CNT_W
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic             mclk,
  output logic             sclk,
  output logic             lrck,
  output logic [CNT_W-4:0] bit_cnt  // SCLK period inside the current LRCK half
);

  logic [CNT_W-1:0] cntr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cntr <= '0;
    else        cntr <= cntr + 1'b1;
  end

  assign mclk    = clk;
  assign sclk    = cntr[1];
  assign bit_cnt = cntr[CNT_W-2:2];
  assign lrck    = cntr[CNT_W-1];

endmodule
