// osc_pkg: types and constants shared by the oscilloscope blocks.
//
// The audio words are 20-bit two's-complement samples, as delivered by the
// codec. Volume and balance are 4-bit levels: volume runs 0..10 (10 = full
// scale, the reset value) and balance runs 0..10 with 5 as the centre (the
// reset value). The keyboard keys for volume (M/N) and balance (W/Q) follow
// the original design; the keys for zoom, sample rate, Megasample period,
// freeze, channel display and spectrum display are this design's own choice
// (PS/2 scan-code set 2). The 2-bit waveform colour codes (01 left, 10 right, 11 nothing) follow the original
// waveform function; everything else here is this design's own encoding.
package osc_pkg;

  localparam int unsigned DATA_W     = 20;  // audio word width
  localparam int unsigned LEVEL_MAX  = 10;  // highest volume / balance level
  localparam int unsigned BAL_CENTER = 5;   // balance level with no attenuation
  localparam int unsigned STORE_W    = 12;  // bits of each sample kept for display

  typedef logic signed [DATA_W-1:0]  sample_t;
  typedef logic signed [STORE_W-1:0] store_t;
  typedef logic [3:0]                level_t;

  // Which channels the waveform display shows.
  typedef enum logic [1:0] {
    SHOW_BOTH  = 2'd0,
    SHOW_LEFT  = 2'd1,
    SHOW_RIGHT = 2'd2
  } chan_mode_e;

  // Everything the keyboard decoder controls.
  typedef struct packed {
    level_t     vol;     // volume level 0..10
    level_t     bal;     // balance level 0..10, 5 = centre
    logic [1:0] zoom;    // vertical zoom 2**zoom = 1x..8x
    logic [2:0] rate;    // samples inside a Megasample are 2**rate audio frames apart
    logic [2:0] mega;    // Megasample period 2**mega * 10 ms, 0..4
    logic       freeze;  // 1: no new Megasample is taken
    chan_mode_e chan;    // channels drawn
    logic       spectrum;  // 1: power-spectrum bars shown
  } scope_ctrl_t;

  // Waveform pixel codes.
  typedef enum logic [1:0] {
    WF_LEFT  = 2'b01,
    WF_RIGHT = 2'b10,
    WF_NONE  = 2'b11
  } wf_col_e;

  // Volume / balance indicator pixel codes.
  typedef enum logic [1:0] {
    VB_NONE = 2'b00,
    VB_VOL  = 2'b01,
    VB_BAL  = 2'b10
  } vb_col_e;

  // PS/2 scan codes (set 2).
  localparam logic [7:0] KEY_M     = 8'h3A;  // volume up
  localparam logic [7:0] KEY_N     = 8'h31;  // volume down
  localparam logic [7:0] KEY_W     = 8'h1D;  // balance towards left
  localparam logic [7:0] KEY_Q     = 8'h15;  // balance towards right
  localparam logic [7:0] KEY_Z     = 8'h1A;  // zoom in
  localparam logic [7:0] KEY_X     = 8'h22;  // zoom out
  localparam logic [7:0] KEY_A     = 8'h1C;  // sample faster (interval / 2)
  localparam logic [7:0] KEY_S     = 8'h1B;  // sample slower (interval * 2)
  localparam logic [7:0] KEY_E     = 8'h24;  // Megasamples more often (period / 2)
  localparam logic [7:0] KEY_D     = 8'h23;  // Megasamples less often (period * 2)
  localparam logic [7:0] KEY_F     = 8'h2B;  // freeze toggle
  localparam logic [7:0] KEY_C     = 8'h21;  // next channel display mode
  localparam logic [7:0] KEY_P     = 8'h4D;  // spectrum display toggle
  localparam logic [7:0] KEY_BREAK = 8'hF0;  // key-release prefix
  localparam logic [7:0] KEY_EXT   = 8'hE0;  // extended-key prefix

  // 8-bit RRRGGGBB colours.
  localparam logic [7:0] RGB_BLACK  = 8'b000_000_00;
  localparam logic [7:0] RGB_BLUE   = 8'b000_000_11;
  localparam logic [7:0] RGB_GREEN  = 8'b000_111_00;
  localparam logic [7:0] RGB_RED    = 8'b111_000_00;
  localparam logic [7:0] RGB_YELLOW = 8'b111_111_00;
  localparam logic [7:0] RGB_MAGENTA = 8'b111_000_11;
  localparam logic [7:0] RGB_DGRAY  = 8'b010_010_01;
  localparam logic [7:0] RGB_LGRAY  = 8'b101_101_10;
  localparam logic [7:0] RGB_WHITE  = 8'b111_111_11;

endpackage
