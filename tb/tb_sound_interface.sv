// tb_sound_interface: receives codec words and compares them with what was sent.
//
// audio_clock_gen makes the clocks and codec_model sends random left/right
// words. Every data_valid must carry the word of the channel just sent, with
// ch_select 0 for left and 1 for right, the channels must alternate, and a
// word must arrive every 128 clk (one LRCK half period).
module tb_sound_interface;
  import osc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic mclk, sclk, lrck, sdin;
  logic [4:0] bit_cnt;
  sample_t data_out;
  logic ch_select, data_valid;
  logic [19:0] adc_l, adc_r, dac_l, dac_r;
  int dlc, drc;
  int checks = 0, failures = 0;

  audio_clock_gen clkgen (.clk, .rst_n, .mclk, .sclk, .lrck, .bit_cnt);
  sound_interface dut (.clk, .rst_n, .sclk, .lrck, .bit_cnt, .sdin,
                       .data_out, .ch_select, .data_valid);
  codec_model codec (.sclk, .lrck, .sdout(1'b0), .sdin, .adc_left(adc_l), .adc_right(adc_r),
                     .dac_left(dac_l), .dac_right(dac_r), .dac_left_count(dlc), .dac_right_count(drc));

  always #5 clk = !clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // a new random word for each channel after its half period has ended
  always @(lrck) begin
    if (lrck) adc_l = 20'($urandom);
    else      adc_r = 20'($urandom);
  end

  initial begin
    int words = 0;
    int last_cycle = 0, cycle = 0;
    logic last_ch;
    adc_l = 20'h12345;
    adc_r = 20'hABCDE;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    last_ch = 1'b1;
    while (words < 200) begin
      @(posedge clk);
      cycle++;
      if (data_valid) begin
        // the word was captured from the half period that has just ended,
        // whose value the LRCK-edge process has not replaced yet
        logic [19:0] want;
        want = ch_select ? adc_r : adc_l;
        // the codec model starts sending at its first LRCK edge, so the
        // very first half period after reset carries no complete word
        if (words > 0) checks++;
        if (words > 0 && data_out !== sample_t'(want)) begin
          failures++;
          if (failures < 10) $display("word %0d ch=%b got %h want %h", words, ch_select, data_out, want);
        end
        checks++;
        if (ch_select === last_ch) failures++;
        last_ch = ch_select;
        if (words > 0) begin
          checks++;
          if (cycle - last_cycle != 128) begin
            failures++;
            $display("word spacing %0d clk, want 128", cycle - last_cycle);
          end
        end
        last_cycle = cycle;
        words++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
