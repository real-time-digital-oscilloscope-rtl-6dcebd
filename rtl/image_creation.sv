// image_creation: builds the final picture from its layers.
//
// The block does two things. It addresses the picture memory: for the scan
// position three columns ahead (wrapping onto the next line) it forms the
// byte address y * PIC_W/4 + x/4 and says whether that position lies inside
// the PIC_W x PIC_H picture (rd_en); ram_interface reads on the columns that
// need a new byte. And it chooses the colour of each pixel by priority
// (the original design's sel_col): the audio waveform first (left blue, right
// green), then the volume (red) and balance (yellow) indicators, then the
// power-spectrum bars (magenta), and last the background picture, whose
// two-bit codes map to black, dark grey, light grey and white. Blanked pixels
// are black.
//
// Timing: x/y are stage 0; wf_col, vb_col, sf_on, hsync, vsync and blank
// arrive at stage 2; bg_pix from ram_interface is the pixel of column x + 1
// and is delayed three clk to stage 2. rgb, vga_hsync and vga_vsync are
// registered at stage 3, three clk after x/y. The layer priority and the channel colours
// follow the original design, which gives no place to the spectrum layer; the
// spectrum layer's place, the palette, 8-bit RRRGGGBB output and the
// look-ahead addressing are this design's.
module image_creation
  import osc_pkg::*;
#(
  parameter int unsigned H_TOTAL = 800,
  parameter int unsigned V_TOTAL = 528,
  parameter int unsigned PIC_W   = 512,
  parameter int unsigned PIC_H   = 480,
  parameter int unsigned ADDR_W  = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [9:0]        x,
  input  logic [9:0]        y,
  output logic              rd_en,
  output logic [ADDR_W-1:0] rd_addr,
  input  logic [1:0]        bg_pix,
  input  wf_col_e           wf_col,
  input  vb_col_e           vb_col,
  input  logic              sf_on,
  input  logic              hsync,
  input  logic              vsync,
  input  logic              blank,
  output logic [7:0]        rgb,
  output logic              vga_hsync,
  output logic              vga_vsync
);

  localparam int unsigned LOOKAHEAD = 3;

  logic [10:0] lx;
  logic [9:0]  ly;
  logic [1:0]  bg_d1, bg_d2, bg_d3;
  logic [7:0]  bg_rgb;

  always_comb begin
    lx = 11'(x) + 11'(LOOKAHEAD);
    ly = y;
    if (lx >= 11'(H_TOTAL)) begin
      lx = lx - 11'(H_TOTAL);
      ly = (y == 10'(V_TOTAL - 1)) ? '0 : y + 1'b1;
    end
    rd_en   = (lx < 11'(PIC_W)) && (ly < 10'(PIC_H));
    rd_addr = ADDR_W'(ly) * ADDR_W'(PIC_W / 4) + ADDR_W'(lx >> 2);
  end

  always_comb begin
    case (bg_d3)
      2'b00:   bg_rgb = RGB_BLACK;
      2'b01:   bg_rgb = RGB_DGRAY;
      2'b10:   bg_rgb = RGB_LGRAY;
      default: bg_rgb = RGB_WHITE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bg_d1     <= '0;
      bg_d2     <= '0;
      bg_d3     <= '0;
      rgb       <= RGB_BLACK;
      vga_hsync <= 1'b1;
      vga_vsync <= 1'b1;
    end else begin
      bg_d1     <= bg_pix;
      bg_d2     <= bg_d1;
      bg_d3     <= bg_d2;
      vga_hsync <= hsync;
      vga_vsync <= vsync;
      if (blank)                 rgb <= RGB_BLACK;
      else if (wf_col == WF_LEFT)  rgb <= RGB_BLUE;
      else if (wf_col == WF_RIGHT) rgb <= RGB_GREEN;
      else if (vb_col == VB_VOL)   rgb <= RGB_RED;
      else if (vb_col == VB_BAL)   rgb <= RGB_YELLOW;
      else if (sf_on)              rgb <= RGB_MAGENTA;
      else                         rgb <= bg_rgb;
    end
  end

endmodule
