// sig_alias: turns the stored samples into waveform pixels while the screen
// is scanned.
//
// The waveform area is the left N_SAMPLES * PIX_PER_SAMPLE (64 * 8 = 512)
// columns of the 480 visible lines. Column x shows sample x / 8. A sample
// value v (12 bits, signed) is placed on line Y_CENTER - (v * 2**zoom) / 8,
// clipped to lines 0..479, so at 1x the full range spans lines -16..496 and
// zoom 8x magnifies the centre. To join adjacent samples (the anti-aliasing
// of the original design) the first column of every sample draws a vertical
// run covering all lines between the previous sample's line and its own; the
// other seven columns draw the sample's own line only. The left channel wins
// where both channels light the same pixel; chan selects which are drawn.
//
// Interface and timing: the block drives rd_addr from the scan position x
// (combinationally), expects the two samples from waveform_function one clk
// later, and gives wf_col two clk after x/y: WF_LEFT, WF_RIGHT or WF_NONE.
// The sample-to-pixel mapping, 8 columns per sample and the centring are this
// design's choices.
module sig_alias
  import osc_pkg::*;
#(
  parameter int unsigned N_SAMPLES      = 64,
  parameter int unsigned PIX_PER_SAMPLE = 8,
  parameter int unsigned Y_CENTER       = 240,
  parameter int unsigned Y_LINES        = 480,
  localparam int unsigned IW = $clog2(N_SAMPLES),
  localparam int unsigned PW = $clog2(PIX_PER_SAMPLE)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [9:0]    x,
  input  logic [9:0]    y,
  input  logic [1:0]    zoom,
  input  chan_mode_e    chan,
  output logic [IW-1:0] rd_addr,
  input  store_t        rd_left,
  input  store_t        rd_right,
  output wf_col_e       wf_col
);

  localparam int unsigned X_LIMIT = N_SAMPLES * PIX_PER_SAMPLE;

  logic [9:0] x1, y1;
  logic       in1;
  store_t     prev_l, prev_r;
  logic [9:0] yl_cur, yl_prev, yr_cur, yr_prev;
  logic       join_col, lit_l, lit_r;

  // Screen line of a stored sample at the current zoom.
  function automatic logic [9:0] line_of(store_t v, logic [1:0] z);
    logic signed [15:0] scaled;
    logic signed [15:0] ypos;
    logic signed [15:0] center, last;
    center = signed'(16'(Y_CENTER));
    last   = signed'(16'(Y_LINES - 1));
    scaled = 16'(v) <<< z;
    ypos   = center - (scaled >>> 3);
    if (ypos < 0)         return '0;
    else if (ypos > last) return 10'(Y_LINES - 1);
    else                  return ypos[9:0];
  endfunction

  assign rd_addr = IW'(x >> PW);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x1     <= '0;
      y1     <= '0;
      in1    <= 1'b0;
      prev_l <= '0;
      prev_r <= '0;
      wf_col <= WF_NONE;
    end else begin
      x1  <= x;
      y1  <= y;
      in1 <= (x < 10'(X_LIMIT)) && (y < 10'(Y_LINES));
      if (x1[PW-1:0] == PW'(PIX_PER_SAMPLE - 1)) begin
        prev_l <= rd_left;
        prev_r <= rd_right;
      end
      if (in1 && lit_l && chan != SHOW_RIGHT)      wf_col <= WF_LEFT;
      else if (in1 && lit_r && chan != SHOW_LEFT)  wf_col <= WF_RIGHT;
      else                                         wf_col <= WF_NONE;
    end
  end

  always_comb begin
    join_col = (x1[PW-1:0] == '0) && (x1 != '0);
    yl_cur   = line_of(rd_left, zoom);
    yr_cur   = line_of(rd_right, zoom);
    yl_prev  = join_col ? line_of(prev_l, zoom) : yl_cur;
    yr_prev  = join_col ? line_of(prev_r, zoom) : yr_cur;
    lit_l    = (y1 >= ((yl_cur < yl_prev) ? yl_cur : yl_prev)) &&
               (y1 <= ((yl_cur < yl_prev) ? yl_prev : yl_cur));
    lit_r    = (y1 >= ((yr_cur < yr_prev) ? yr_cur : yr_prev)) &&
               (y1 <= ((yr_cur < yr_prev) ? yr_prev : yr_cur));
  end

endmodule
