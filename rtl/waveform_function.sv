// waveform_function: stores the sampled signal for display.
//
// The block follows the sound_interface output and keeps the most recent left
// and right words. On each sample_en from wf_ctrl it writes the top STORE_W
// (12) bits of both words into two block-RAM arrays at sample_idx, left and
// right apiece. The display side reads both arrays at rd_addr; rd_left and
// rd_right appear one clk later, as from a synchronous block RAM. cur_left and
// cur_right show the values a sample_en would store now, for the spectrum
// block.
//
// Saving the samples of a Megasample in block RAM for later display is the
// original design's (two block RAMs); keeping 12 bits per sample, the split
// into one array per channel and the read timing are this design's.
module waveform_function
  import osc_pkg::*;
#(
  parameter int unsigned N_SAMPLES = 64,
  localparam int unsigned IW = $clog2(N_SAMPLES)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  sample_t       sound_in,
  input  logic          sound_ch,      // 0 left, 1 right
  input  logic          sound_valid,
  input  logic          sample_en,
  input  logic [IW-1:0] sample_idx,
  input  logic [IW-1:0] rd_addr,
  output store_t        rd_left,
  output store_t        rd_right,
  output store_t        cur_left,      // value a sample_en would store now
  output store_t        cur_right
);

  sample_t left_hold, right_hold;
  store_t  ram_left  [N_SAMPLES];
  store_t  ram_right [N_SAMPLES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      left_hold  <= '0;
      right_hold <= '0;
    end else if (sound_valid) begin
      if (sound_ch) right_hold <= sound_in;
      else          left_hold  <= sound_in;
    end
  end

  // Block RAM contents start at zero (a flat line until the first Megasample).
  initial begin
    for (int i = 0; i < N_SAMPLES; i++) begin
      ram_left[i]  = '0;
      ram_right[i] = '0;
    end
  end

  assign cur_left  = left_hold[DATA_W-1 -: STORE_W];
  assign cur_right = right_hold[DATA_W-1 -: STORE_W];

  always_ff @(posedge clk) begin
    if (sample_en) begin
      ram_left[sample_idx]  <= cur_left;
      ram_right[sample_idx] <= cur_right;
    end
    rd_left  <= ram_left[rd_addr];
    rd_right <= ram_right[rd_addr];
  end

endmodule
