// tb_image_creation: layer priority, palette, delays and picture addressing.
//
// Random layer codes, background pixels and sync/blank levels are driven
// every clk while x/y scan a whole frame (800 x 528). Expected, for inputs
// of clk t: rgb in clk t+1 is black when blanked, else blue for a left
// waveform pixel, green for right, red for the volume bar, yellow for the
// balance bar, else the palette colour of the background pixel given in clk
// t-3 (00 black, 01 dark grey, 10 light grey, 11 white); vga_hsync/vsync are
// hsync/vsync of clk t. In each clk rd_en/rd_addr must address the byte of
// the position three columns ahead, wrapping into the next line and frame.
module tb_image_creation;
  import osc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [9:0] x = '0, y = '0;
  logic rd_en;
  logic [15:0] rd_addr;
  logic [1:0] bg_pix = '0;
  wf_col_e wf_col = WF_NONE;
  vb_col_e vb_col = VB_NONE;
  logic sf_on = 1'b0;
  logic hsync = 1'b1, vsync = 1'b1, blank = 1'b0;
  logic [7:0] rgb;
  logic vga_hsync, vga_vsync;
  int checks = 0, failures = 0;

  image_creation dut (.clk, .rst_n, .x, .y, .rd_en, .rd_addr, .bg_pix, .wf_col, .vb_col, .sf_on,
                      .hsync, .vsync, .blank, .rgb, .vga_hsync, .vga_vsync);

  always #5 clk = !clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [7:0] PAL [4] = '{8'b000_000_00, 8'b010_010_01, 8'b101_101_10, 8'b111_111_11};

  initial begin
    logic [1:0] bgh [$];
    logic [7:0] exp_rgb;
    logic exp_hs, exp_vs;
    int n = 0;
    int used [4] = '{0, 0, 0, 0};
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    bgh = '{2'b00, 2'b00, 2'b00};
    @(negedge clk);
    for (int yy = 0; yy < 528; yy++) begin
      for (int xx = 0; xx < 800; xx++) begin
        int lx, ly;
        logic [1:0] w, v;
        x = 10'(xx); y = 10'(yy);
        w = 2'($urandom); v = 2'($urandom_range(0, 2));
        wf_col = wf_col_e'((w == 2'b00) ? 2'b11 : w);
        vb_col = vb_col_e'(v);
        sf_on = 1'($urandom);
        hsync = 1'($urandom); vsync = 1'($urandom); blank = ($urandom_range(0, 7) == 0);
        bg_pix = 2'($urandom);
        // addressing
        lx = xx + 3; ly = yy;
        if (lx >= 800) begin lx -= 800; ly = (yy == 527) ? 0 : yy + 1; end
        #1;
        checks++;
        if (rd_en !== (lx < 512 && ly < 480) || (rd_en && rd_addr !== 16'(ly * 128 + lx / 4))) begin
          failures++;
          if (failures < 10) $display("x %0d y %0d: rd_en %b addr %0d", xx, yy, rd_en, rd_addr);
        end
        // expected output for this clk's inputs
        if (blank)                   begin exp_rgb = 8'h00; used[0]++; end
        else if (wf_col == WF_LEFT)  begin exp_rgb = 8'b000_000_11; used[1]++; end
        else if (wf_col == WF_RIGHT) exp_rgb = 8'b000_111_00;
        else if (vb_col == VB_VOL)   begin exp_rgb = 8'b111_000_00; used[2]++; end
        else if (vb_col == VB_BAL)   exp_rgb = 8'b111_111_00;
        else if (sf_on)              exp_rgb = 8'b111_000_11;
        else                         begin exp_rgb = PAL[bgh[0]]; used[3]++; end
        exp_hs = hsync; exp_vs = vsync;
        bgh.push_back(bg_pix);
        void'(bgh.pop_front());
        @(negedge clk);
        checks++;
        if (rgb !== exp_rgb || vga_hsync !== exp_hs || vga_vsync !== exp_vs) begin
          failures++;
          if (failures < 10) $display("x %0d y %0d: rgb %b want %b", xx, yy, rgb, exp_rgb);
        end
        n++;
      end
    end
    checks++;
    if (used[0] == 0 || used[1] == 0 || used[2] == 0 || used[3] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
