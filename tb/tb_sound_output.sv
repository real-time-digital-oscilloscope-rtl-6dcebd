// tb_sound_output: words handed to the transmitter must reach the codec.
//
// audio_clock_gen makes the clocks; at the start of every LRCK half period
// the testbench hands a new random word for the other channel to
// sound_output (as the receive path does), and codec_model reads the serial
// stream. Each word must come out in the next half period of its channel,
// i.e. 256 clk after it was handed over.
module tb_sound_output;
  import osc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic mclk, sclk, lrck, sdin, sdout;
  logic [4:0] bit_cnt;
  sample_t din;
  logic cin, vin;
  logic [19:0] dac_l, dac_r;
  int dlc, drc;
  int checks = 0, failures = 0;

  audio_clock_gen clkgen (.clk, .rst_n, .mclk, .sclk, .lrck, .bit_cnt);
  sound_output dut (.clk, .rst_n, .sclk, .lrck, .bit_cnt, .data_in(din), .ch_in(cin),
                    .valid_in(vin), .sdout);
  codec_model codec (.sclk, .lrck, .sdout, .sdin, .adc_left(20'h0), .adc_right(20'h0),
                     .dac_left(dac_l), .dac_right(dac_r), .dac_left_count(dlc), .dac_right_count(drc));

  always #5 clk = !clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [19:0] q_l, q_r;
    int seen_l, seen_r;
    vin = 0; cin = 0; din = '0;
    q_l = '0; q_r = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    seen_l = 0; seen_r = 0;
    for (int half = 0; half < 200; half++) begin
      // wait for SCLK period 20 of the current half: data bits are done
      do @(negedge clk); while (bit_cnt != 5'd20);
      // the word handed over last time for this channel must have arrived
      if (half >= 2) begin
        checks++;
        if (lrck ? (dac_r !== q_r) : (dac_l !== q_l)) begin
          failures++;
          if (failures < 10) $display("half %0d lrck=%b got %h want %h", half, lrck,
                                      lrck ? dac_r : dac_l, lrck ? q_r : q_l);
        end
      end
      // hand over a new word for the channel of this half period
      din = sample_t'($urandom);
      cin = lrck;
      vin = 1'b1;
      if (lrck) q_r = 20'(din); else q_l = 20'(din);
      @(negedge clk);
      vin = 1'b0;
      while (bit_cnt == 5'd20) @(negedge clk);
    end
    checks++;
    if (dlc < 99 || drc < 99) begin
      failures++;
      $display("codec read %0d left and %0d right words", dlc, drc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
