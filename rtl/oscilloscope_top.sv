// oscilloscope_top: real-time audio oscilloscope with keyboard control and
// VGA display.
//
// Audio path: audio_clock_gen drives the codec clocks (MCLK = clk, SCLK =
// clk/4, LRCK = clk/256); sound_interface receives the 20-bit left and right
// words, volume_control and balance_control scale them, and sound_output sends
// them back to the codec, one LRCK frame later.
//
// Control: keyboard_interface reads PS/2 scan codes and keyboard_decoder turns
// them into volume, balance, zoom, sample interval, Megasample period,
// freeze, channel selection and spectrum on/off (status shows them, e.g. on LEDs).
//
// Display: wf_ctrl paces Megasamples of 64 samples; waveform_function stores
// the received (unscaled) words in block RAM; screen_control scans a 800 x 528
// raster with hsync/vsync; sig_alias draws the stored samples, joined by
// vertical runs, over the left 512 columns; vol_bal_gen draws the two level
// bars; special_functions computes the power spectrum of each Megasample and
// draws it as bars when switched on; ram_interface reads a 2-bit-per-pixel
// background picture from the external memory; image_creation merges the
// layers by priority into 8-bit RRRGGGBB. The picture memory is filled
// through the pic_wr_* port, one byte per write_done.
//
// One clock drives everything; the pixel rate equals clk (25.175 MHz for the
// standard 31.77 us line), which also sets the audio sample rate to clk/256.
// The VGA outputs lag the scan counters by three clk. The status flags of
// some blocks (wf_ctrl's mega_done and active, screen_control's frame_start,
// special_functions' busy and spectrum_done) are not needed here and are
// left unconnected inside the top. The split into blocks
// follows the original design; the single clock, the port list and the
// picture loading port are this design's.
module oscilloscope_top
  import osc_pkg::*;
#(
  parameter int unsigned MEGA_PERIOD = 3934,  // audio frames between Megasamples at reset (40 ms)
  parameter int unsigned KB_TIMEOUT  = 2500,  // clk cycles of kb_clk silence that abort a frame
  parameter int unsigned RATE_RESET  = 3      // reset sample interval 2**RATE_RESET frames
) (
  input  logic        clk,
  input  logic        rst_n,
  // audio codec
  output logic        codec_mclk,
  output logic        codec_sclk,
  output logic        codec_lrck,
  input  logic        codec_sdin,
  output logic        codec_sdout,
  // PS/2 keyboard
  input  logic        kb_clk,
  input  logic        kb_data,
  // VGA
  output logic        vga_hsync,
  output logic        vga_vsync,
  output logic [7:0]  vga_rgb,
  // external picture memory (synchronous read, one clk latency)
  output logic [15:0] mem_addr,
  output logic        mem_rd,
  output logic        mem_we,
  output logic [7:0]  mem_wdata,
  input  logic [7:0]  mem_rdata,
  // picture loading
  input  logic        pic_wr_req,
  input  logic [15:0] pic_wr_addr,
  input  logic [7:0]  pic_wr_data,
  output logic        pic_wr_busy,
  output logic        pic_write_done,
  // control state
  output scope_ctrl_t status
);

  localparam int unsigned N_SAMPLES = 64;
  localparam int unsigned IW        = $clog2(N_SAMPLES);

  // ---------------- audio ----------------
  logic       sclk, lrck;
  logic [4:0] bit_cnt;
  sample_t    si_data, vol_data, bal_data;
  logic       si_ch, si_valid, vol_ch, vol_valid, bal_ch, bal_valid;

  audio_clock_gen #(.CNT_W(8)) u_clk (
    .clk, .rst_n, .mclk(codec_mclk), .sclk, .lrck, .bit_cnt
  );
  assign codec_sclk = sclk;
  assign codec_lrck = lrck;

  sound_interface u_si (
    .clk, .rst_n, .sclk, .lrck, .bit_cnt, .sdin(codec_sdin),
    .data_out(si_data), .ch_select(si_ch), .data_valid(si_valid)
  );

  scope_ctrl_t ctrl;

  volume_control u_vol (
    .clk, .rst_n, .vol(ctrl.vol),
    .data_in(si_data), .ch_in(si_ch), .valid_in(si_valid),
    .data_out(vol_data), .ch_out(vol_ch), .valid_out(vol_valid)
  );

  balance_control u_bal (
    .clk, .rst_n, .bal(ctrl.bal),
    .data_in(vol_data), .ch_in(vol_ch), .valid_in(vol_valid),
    .data_out(bal_data), .ch_out(bal_ch), .valid_out(bal_valid)
  );

  sound_output u_so (
    .clk, .rst_n, .sclk, .lrck, .bit_cnt,
    .data_in(bal_data), .ch_in(bal_ch), .valid_in(bal_valid),
    .sdout(codec_sdout)
  );

  // ---------------- keyboard ----------------
  logic [7:0] kb_code;
  logic       kb_valid;

  keyboard_interface #(.TIMEOUT(KB_TIMEOUT)) u_ki (
    .clk, .rst_n, .kb_clk, .kb_data, .code(kb_code), .code_valid(kb_valid)
  );

  keyboard_decoder #(.RATE_RESET(RATE_RESET)) u_kd (
    .clk, .rst_n, .code(kb_code), .code_valid(kb_valid), .ctrl
  );
  assign status = ctrl;

  // ---------------- waveform capture ----------------
  logic          sample_en, mega_done, mega_active;
  logic [IW-1:0] sample_idx, rd_sample;
  store_t        rd_left, rd_right, cur_left, cur_right;

  wf_ctrl #(.N_SAMPLES(N_SAMPLES), .MEGA_PERIOD(MEGA_PERIOD)) u_wfc (
    .clk, .rst_n, .frame_tick(si_valid && si_ch), .rate(ctrl.rate), .mega(ctrl.mega),
    .freeze(ctrl.freeze),
    .sample_en, .sample_idx, .mega_done, .active(mega_active)
  );

  waveform_function #(.N_SAMPLES(N_SAMPLES)) u_wf (
    .clk, .rst_n, .sound_in(si_data), .sound_ch(si_ch), .sound_valid(si_valid),
    .sample_en, .sample_idx, .rd_addr(rd_sample), .rd_left, .rd_right,
    .cur_left, .cur_right
  );

  // ---------------- display ----------------
  logic [9:0] x, y;
  logic       hsync, vsync, blank, frame_start;
  wf_col_e    wf_col;
  vb_col_e    vb_col;
  logic       pic_rd_en;
  logic [15:0] pic_rd_addr;
  logic [1:0] bg_pix;
  logic       sf_on, sf_busy, spectrum_done;

  screen_control u_sc (
    .clk, .rst_n, .x, .y, .hsync, .vsync, .blank, .frame_start
  );

  // The spectrum follows the right channel when only the right channel is
  // shown, and the left channel otherwise.
  special_functions u_sf (
    .clk, .rst_n, .sample_en, .sample_idx,
    .sample_val(ctrl.chan == SHOW_RIGHT ? cur_right : cur_left),
    .x, .y, .show(ctrl.spectrum), .sf_on, .busy(sf_busy),
    .spectrum_done
  );

  sig_alias #(.N_SAMPLES(N_SAMPLES)) u_alias (
    .clk, .rst_n, .x, .y, .zoom(ctrl.zoom), .chan(ctrl.chan),
    .rd_addr(rd_sample), .rd_left, .rd_right, .wf_col
  );

  vol_bal_gen u_vb (
    .clk, .rst_n, .x, .y, .vol(ctrl.vol), .bal(ctrl.bal), .vb_col
  );

  ram_interface #(.ADDR_W(16)) u_ri (
    .clk, .rst_n, .x, .rd_en(pic_rd_en), .rd_addr(pic_rd_addr),
    .wr_req(pic_wr_req), .wr_addr(pic_wr_addr), .wr_data(pic_wr_data),
    .wr_busy(pic_wr_busy), .write_done(pic_write_done), .pix(bg_pix),
    .mem_addr, .mem_rd, .mem_we, .mem_wdata, .mem_rdata
  );

  image_creation #(.ADDR_W(16)) u_ic (
    .clk, .rst_n, .x, .y, .rd_en(pic_rd_en), .rd_addr(pic_rd_addr), .bg_pix,
    .wf_col, .vb_col, .sf_on, .hsync, .vsync, .blank,
    .rgb(vga_rgb), .vga_hsync, .vga_vsync
  );

endmodule
