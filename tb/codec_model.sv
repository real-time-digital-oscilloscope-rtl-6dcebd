// codec_model: behavioural model of the stereo audio codec, for testbenches.
//
// ADC side: from each LRCK edge (low = left, high = right) it sends the word
// held in adc_left / adc_right on sdin, most significant bit first, changing
// the bit on every SCLK falling edge and sending 0 after the 20th bit. DAC
// side: it reads sdout on each SCLK rising edge and, after 20 bits of a
// channel, puts the word on dac_left / dac_right and counts it in
// dac_left_count / dac_right_count.
module codec_model (
  input  logic        sclk,
  input  logic        lrck,
  input  logic        sdout,
  output logic        sdin,
  input  logic [19:0] adc_left,
  input  logic [19:0] adc_right,
  output logic [19:0] dac_left,
  output logic [19:0] dac_right,
  output int          dac_left_count,
  output int          dac_right_count
);
  logic [19:0] tx;
  int          txbit;
  logic [19:0] rx;
  int          rxbit;
  int          lr_seen;   // LRCK level of the current half period, -1 before the first

  initial begin
    sdin = 1'b0;
    txbit = 99;
    rxbit = 99;
    dac_left = '0;
    dac_right = '0;
    dac_left_count = 0;
    dac_right_count = 0;
    lr_seen = -1;
  end

  // transmit: the LRCK edge coincides with an SCLK falling edge
  always @(negedge sclk) begin
    if (int'(lrck) != lr_seen) begin
      lr_seen = int'(lrck);
      tx = lrck ? adc_right : adc_left;
      txbit = 0;
      rxbit = 0;
    end else begin
      txbit++;
    end
    sdin = (txbit < 20) ? tx[19 - txbit] : 1'b0;
  end

  always @(posedge sclk) begin
    if (rxbit < 20) begin
      rx = {rx[18:0], sdout};
      rxbit++;
      if (rxbit == 20) begin
        if (lr_seen == 1) begin dac_right = rx; dac_right_count++; end
        else         begin dac_left  = rx; dac_left_count++;  end
      end
    end
  end
endmodule
