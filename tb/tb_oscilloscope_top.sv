// tb_oscilloscope_top: the whole oscilloscope, end to end, at its default
// parameters (Megasample every 3934 audio frames, 800 x 528 raster).
//
// Around the design sit a codec model (random or constant ADC words, DAC words
// read back), a PS/2 keyboard played by the testbench (each key is a make code
// followed by F0 and the code again on release) and the picture memory model.
//
// Checks:
//  - audio: every DAC word equals the ADC word of the same channel one frame
//    earlier, divided by 2**(10 - vol) and, for the attenuated channel, by
//    2**|bal - 5| (floor), at several volume/balance settings;
//  - keyboard: status follows the keys, releases change nothing;
//  - display: whole VGA frames are rebuilt from hsync/vsync and compared pixel
//    by pixel with a picture drawn here from the ADC levels, zoom, channel
//    mode, volume/balance bars and picture memory contents (part of it
//    rewritten through the loading port first);
//  - freeze keeps the picture although the input changes; unfreezing lets
//    the next Megasample take the new input;
//  - sample interval: the frames between samples follow the A/S keys;
//  - Megasample period: 3934 frames between starts, 1967 after key E;
//  - spectrum: with the P key on, a flat input gives one magenta bar in
//    bin 0 whose height follows the level of the shown channel.
// Each mechanism is counted and a failure is counted for any that never
// happened.
module tb_oscilloscope_top;
  import osc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic codec_mclk, codec_sclk, codec_lrck, codec_sdin, codec_sdout;
  logic kb_clk = 1'b1, kb_data = 1'b1;
  logic vga_hsync, vga_vsync;
  logic [7:0] vga_rgb;
  logic [15:0] mem_addr;
  logic mem_rd, mem_we;
  logic [7:0] mem_wdata, mem_rdata;
  logic pic_wr_req = 1'b0;
  logic [15:0] pic_wr_addr = '0;
  logic [7:0] pic_wr_data = '0;
  logic pic_wr_busy, pic_write_done;
  scope_ctrl_t status;

  logic [19:0] adc_l = '0, adc_r = '0, dac_l, dac_r;
  int dlc, drc, collisions, mreads, mwrites;
  int checks = 0, failures = 0;

  oscilloscope_top dut (
    .clk, .rst_n, .codec_mclk, .codec_sclk, .codec_lrck, .codec_sdin, .codec_sdout,
    .kb_clk, .kb_data, .vga_hsync, .vga_vsync, .vga_rgb,
    .mem_addr, .mem_rd, .mem_we, .mem_wdata, .mem_rdata,
    .pic_wr_req, .pic_wr_addr, .pic_wr_data, .pic_wr_busy, .pic_write_done, .status
  );

  codec_model codec (.sclk(codec_sclk), .lrck(codec_lrck), .sdout(codec_sdout), .sdin(codec_sdin),
                     .adc_left(adc_l), .adc_right(adc_r), .dac_left(dac_l), .dac_right(dac_r),
                     .dac_left_count(dlc), .dac_right_count(drc));

  picture_memory_model pmem (.clk, .addr(mem_addr), .rd(mem_rd), .we(mem_we), .wdata(mem_wdata),
                             .rdata(mem_rdata), .collisions, .reads(mreads), .writes(mwrites));

  always #5 clk = !clk;

  // ---------------- mechanism counters ----------------
  int n_vol_change = 0, n_bal_left = 0, n_bal_right = 0, n_zoom = 0, n_rate = 0;
  int n_freeze = 0, n_chan = 0, n_release = 0, n_mega = 0, n_pic_write = 0;
  int n_join = 0, n_bg = 0, n_frames = 0, n_audio = 0, n_frozen_mega = 0, n_spectrum = 0;

  initial begin
    repeat (30000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- audio reference ----------------
  // The DAC word of a channel must be the previous ADC word of that channel,
  // scaled by the settings in force when it was processed.
  logic [19:0] sent_l [$], sent_r [$];
  logic        audio_random = 1'b1;
  int          audio_skip = 4;         // DAC words to skip after a settings change
  int          lr_prev = -1;
  logic [19:0] const_l = 20'h40000, const_r = 20'hD0000;
  logic        square = 1'b0;
  int          frame_no = 0;

  function automatic int floordiv(int a, int b);
    int q;
    q = a / b;
    if ((a % b != 0) && (a < 0)) q = q - 1;
    return q;
  endfunction

  function automatic logic [19:0] expect_word(logic [19:0] w, logic right);
    int v, b;
    v = int'(signed'(w));
    v = floordiv(v, 1 << (10 - int'(status.vol)));
    b = int'(status.bal);
    if (right && b < 5)  v = floordiv(v, 1 << (5 - b));
    if (!right && b > 5) v = floordiv(v, 1 << (b - 5));
    return 20'(v);
  endfunction

  // Each channel's next word is set at the LRCK edge that opens the other
  // channel's half period, so it is stable when the codec starts sending it.
  always @(codec_lrck) begin
    if (!codec_lrck) frame_no++;
    if (codec_lrck) begin
      // right half begins: choose the next left word
      if (audio_random) adc_l = 20'($urandom);
      else if (square)  adc_l = ((frame_no / 8) % 2 == 0) ? const_l : 20'h20000;
      else              adc_l = const_l;
      sent_l.push_back(adc_l);
    end else begin
      if (audio_random) adc_r = 20'($urandom);
      else              adc_r = const_r;
      sent_r.push_back(adc_r);
    end
  end

  int dlc_seen = 0, drc_seen = 0;
  always @(posedge clk) begin
    if (dlc != dlc_seen || drc != drc_seen) begin
      logic right;
      logic [19:0] got, src, want;
      right = (drc != drc_seen);
      dlc_seen = dlc; drc_seen = drc;
      got = right ? dac_r : dac_l;
      // the word sent back now was received one frame ago: second newest entry
      if (right) begin
        while (sent_r.size() > 2) void'(sent_r.pop_front());
        src = sent_r[0];
      end else begin
        while (sent_l.size() > 2) void'(sent_l.pop_front());
        src = sent_l[0];
      end
      want = expect_word(src, right);
      if (audio_skip > 0) audio_skip--;
      else begin
        checks++;
        n_audio++;
        if (status.vol != 4'd10) n_vol_change++;
        if (right && status.bal < 4'd5) n_bal_right++;
        if (!right && status.bal > 4'd5) n_bal_left++;
        if (got !== want) begin
          failures++;
          if (failures < 20) $display("%t audio %s got %h want %h (src %h vol %0d bal %0d)", $time,
                                      right ? "R" : "L", got, want, src, status.vol, status.bal);
        end
      end
    end
  end

  // ---------------- keyboard ----------------
  task automatic ps2_byte(input logic [7:0] b);
    logic [10:0] f;
    f = {1'b1, ~^b, b, 1'b0};
    for (int i = 0; i < 11; i++) begin
      kb_data = f[i];
      repeat (10) @(posedge clk);
      kb_clk = 1'b0;
      repeat (20) @(posedge clk);
      kb_clk = 1'b1;
      repeat (10) @(posedge clk);
    end
    kb_data = 1'b1;
    repeat (100) @(posedge clk);
  endtask

  task automatic press(input logic [7:0] key);
    scope_ctrl_t before_release;
    audio_skip = 6;
    ps2_byte(key);
    repeat (10) @(posedge clk);
    before_release = status;
    ps2_byte(8'hF0);
    ps2_byte(key);
    repeat (10) @(posedge clk);
    checks++;
    if (status !== before_release) begin failures++; $display("release changed the controls"); end
    else n_release++;
    audio_skip = 6;
  endtask

  // ---------------- Megasample and sample-interval monitor ----------------
  int frames_since_sample = 0, last_gap = 0;
  int frames_since_start = 0, mega_gap = 0, n_period = 0;
  always @(posedge clk) begin
    if (dut.u_si.data_valid && dut.u_si.ch_select) begin frames_since_sample++; frames_since_start++; end
    if (dut.u_wfc.sample_en) begin last_gap = frames_since_sample; frames_since_sample = 0; end
    if (dut.u_wfc.sample_en && dut.u_wfc.sample_idx == 0) begin mega_gap = frames_since_start; frames_since_start = 0; end
    if (dut.u_wfc.mega_done) n_mega++;
    if (rst_n && pic_write_done) n_pic_write++;
  end

  // ---------------- VGA capture ----------------
  // Position of the pixel now on vga_rgb, rebuilt from the sync outputs:
  // hsync falls at column 594, vsync falls at line 494 column 0.
  int cx = 0, cy = 0;
  logic hs_old = 1'b1, vs_old = 1'b1;
  logic [7:0] frame [480][513];
  int capture_req = 0;     // set to 1 to capture the next whole frame
  logic capturing = 1'b0;
  always @(posedge clk) begin
    int nx, ny;
    nx = cx + 1; ny = cy;
    if (nx == 800) begin nx = 0; ny = (cy == 527) ? 0 : cy + 1; end
    if (hs_old && !vga_hsync) nx = 594;
    if (vs_old && !vga_vsync) ny = 494;
    hs_old = vga_hsync; vs_old = vga_vsync;
    cx = nx; cy = ny;
    if (capture_req == 1 && cx == 0 && cy == 0) begin capturing = 1'b1; capture_req = 2; end
    if (capturing) begin
      if (cy < 480 && cx <= 512) frame[cy][cx] = vga_rgb;
      else if (cy < 480 && vga_rgb !== 8'h00) begin failures++; $display("blanked pixel not black"); end
      if (cx == 799 && cy == 479) begin capturing = 1'b0; capture_req = 3; end
    end
  end

  task automatic grab_frame();
    capture_req = 1;
    wait (capture_req == 3);
    n_frames++;
  endtask

  // expected picture for constant left/right levels
  function automatic int line_of(logic [19:0] w, int z);
    int v, p, q;
    v = int'(signed'(w[19:8]));
    p = v * (1 << z);
    q = floordiv(p, 8);
    q = 240 - q;
    if (q < 0) q = 0;
    if (q > 479) q = 479;
    return q;
  endfunction

  // Power-spectrum bar height (lines) of bin 0 for a constant level: the DFT
  // of 64 equal samples is 64 * v * 2047 in bin 0 and zero elsewhere; the
  // block keeps the bit length of (re >>> 12)**2 and draws 6 lines per bit.
  function automatic int spec_height(logic [19:0] w);
    longint re, p;
    int nb;
    re = 64 * longint'(signed'(w[19:8])) * 2047;
    re = re >>> 12;
    p = re * re;
    nb = 0;
    for (int i = 0; i < 62; i++) if (p[i]) nb = i + 1;
    return nb * 6;
  endfunction

  localparam logic [7:0] PAL [4] = '{8'b000_000_00, 8'b010_010_01, 8'b101_101_10, 8'b111_111_11};

  task automatic check_frame(input logic [19:0] lw, input logic [19:0] rw, input string what);
    int yl, yr, z, bad, sh;
    logic showl, showr;
    z = int'(status.zoom);
    yl = line_of(lw, z); yr = line_of(rw, z);
    showl = (status.chan != SHOW_RIGHT);
    showr = (status.chan != SHOW_LEFT);
    sh = status.spectrum ? spec_height(showl ? lw : rw) : 0;
    bad = 0;
    for (int yy = 0; yy < 480; yy++) begin
      for (int xx = 0; xx <= 512; xx++) begin
        logic [7:0] e, b;
        int k, r;
        b = pmem.peek(16'(yy * 128 + xx / 4));
        e = (xx < 512) ? PAL[b[2 * (xx % 4) +: 2]] : 8'h00;
        if (xx < 15 && (479 - yy) < sh) e = 8'b111_000_11;
        k = (xx - 8) / 16; r = (xx - 8) % 16;
        if (xx >= 8 && r != 15 && k <= 10) begin
          if (yy >= 8 && yy < 16 && k < int'(status.vol)) e = 8'b111_000_00;
          if (yy >= 24 && yy < 32 && k == int'(status.bal)) e = 8'b111_111_00;
        end
        if (xx < 512 && showr && yy == yr) e = 8'b000_111_00;
        if (xx < 512 && showl && yy == yl) e = 8'b000_000_11;
        if (frame[yy][xx] !== e) begin
          bad++;
          if (bad < 5) $display("%s: pixel %0d,%0d got %b want %b", what, xx, yy, frame[yy][xx], e);
        end
        if (e != 8'h00 && e == PAL[b[2 * (xx % 4) +: 2]] && xx < 512) n_bg++;
      end
    end
    checks++;
    if (bad != 0) begin failures++; $display("%s: %0d pixels differ", what, bad); end
  endtask

  task automatic wait_mega();
    int m;
    m = n_mega;
    wait (n_mega > m);
  endtask

  // ---------------- test sequence ----------------
  initial begin
    int blue_runs;
    repeat (5) @(posedge clk);
    rst_n <= 1'b1;

    // reset state
    checks++;
    if (status.vol != 4'd10 || status.bal != 4'd5 || status.zoom != 0 || status.freeze ||
        status.chan != SHOW_BOTH || status.rate != 3'd3 || status.spectrum ||
        status.mega != 3'd2) failures++;

    // rewrite lines 300..303 of the picture through the loading port
    for (int a = 300 * 128; a < 304 * 128; a++) begin
      @(negedge clk);
      wait (!pic_wr_busy);
      @(negedge clk);
      pic_wr_req = 1'b1; pic_wr_addr = 16'(a); pic_wr_data = 8'hE4;  // pixels 0,1,2,3
      @(negedge clk);
      pic_wr_req = 1'b0;
    end

    // audio at full volume with random words
    repeat (40 * 256) @(posedge clk);

    // volume down three steps, balance two steps to the left: right attenuated
    press(KEY_N); press(KEY_N); press(KEY_N);
    checks++; if (status.vol != 4'd7) failures++;
    press(KEY_W); press(KEY_W);
    checks++; if (status.bal != 4'd3) failures++;
    repeat (40 * 256) @(posedge clk);
    // balance to the right: left attenuated
    press(KEY_Q); press(KEY_Q); press(KEY_Q); press(KEY_Q);
    checks++; if (status.bal != 4'd7) failures++;
    repeat (40 * 256) @(posedge clk);
    press(KEY_M); press(KEY_M);
    checks++; if (status.vol != 4'd9) failures++;
    repeat (20 * 256) @(posedge clk);

    // constant input: a Megasample captures two flat lines
    audio_random = 1'b0;
    audio_skip = 6;
    wait_mega();
    wait_mega();
    grab_frame();
    check_frame(const_l, const_r, "flat lines");

    // sample interval: the default is 8 frames, A halves it
    checks++; if (last_gap != 8) begin failures++; $display("gap %0d want 8", last_gap); end
    press(KEY_A);
    wait_mega();
    checks++; if (last_gap != 4) begin failures++; $display("gap %0d want 4", last_gap); end
    else n_rate++;
    press(KEY_S);
    checks++; if (status.rate != 3'd3) failures++;

    // Megasample period: 3934 frames at reset, E halves it, D restores it
    checks++; if (mega_gap != 3934) begin failures++; $display("period %0d want 3934", mega_gap); end
    press(KEY_E);
    checks++; if (status.mega != 3'd1) failures++;
    wait_mega();
    wait_mega();
    checks++; if (mega_gap != 1967) begin failures++; $display("period %0d want 1967", mega_gap); end
    else n_period++;
    press(KEY_D);
    checks++; if (status.mega != 3'd2) failures++;

    // zoom 4x and left channel only
    press(KEY_Z); press(KEY_Z);
    checks++; if (status.zoom != 2'd2) failures++; else n_zoom++;
    press(KEY_C);
    checks++; if (status.chan != SHOW_LEFT) failures++; else n_chan++;
    grab_frame();
    check_frame(const_l, const_r, "zoom 4x, left only");
    press(KEY_C); press(KEY_C);
    checks++; if (status.chan != SHOW_BOTH) failures++; else n_chan++;
    press(KEY_X); press(KEY_X);

    // freeze, change the input, wait longer than a Megasample period
    press(KEY_F);
    checks++; if (!status.freeze) failures++; else n_freeze++;
    const_l = 20'hF0000; const_r = 20'h18000;
    begin
      int m;
      m = n_mega;
      repeat (3934 * 256 + 5000) @(posedge clk);
      checks++;
      if (n_mega != m) failures++; else n_frozen_mega++;
    end
    grab_frame();
    check_frame(20'h40000, 20'hD0000, "frozen");
    press(KEY_F);
    checks++; if (status.freeze) failures++;
    wait_mega();
    grab_frame();
    check_frame(const_l, const_r, "after unfreeze");

    // power spectrum of the shown channel: one bar in bin 0 for a flat input
    press(KEY_P);
    checks++; if (!status.spectrum) failures++;
    wait_mega();
    grab_frame();
    check_frame(const_l, const_r, "spectrum of left");
    press(KEY_C); press(KEY_C);
    checks++; if (status.chan != SHOW_RIGHT) failures++;
    wait_mega();
    grab_frame();
    check_frame(const_l, const_r, "spectrum of right");
    checks++;
    if (spec_height(const_l) == spec_height(const_r)) failures++; else n_spectrum++;
    press(KEY_C); press(KEY_P);
    checks++; if (status.chan != SHOW_BOTH || status.spectrum) failures++;

    // a changing input: joined samples show as vertical blue runs
    square = 1'b1;
    wait_mega();
    grab_frame();
    blue_runs = 0;
    for (int xx = 8; xx < 512; xx += 8) begin
      int cnt;
      cnt = 0;
      for (int yy = 0; yy < 480; yy++) if (frame[yy][xx] == 8'b000_000_11) cnt++;
      if (cnt > 1) blue_runs++;
    end
    n_join = blue_runs;

    // summary of mechanisms
    checks++;
    if (n_pic_write != 512) begin failures++; $display("%0d write_done pulses for 512 bytes", n_pic_write); end
    checks++;
    if (collisions != 0) begin failures++; $display("memory read/write collisions"); end
    begin
      int counts [17];
      string names [17];
      counts = '{n_vol_change, n_bal_left, n_bal_right, n_zoom, n_rate, n_freeze, n_chan, n_release,
                 n_mega, n_pic_write, n_join, n_bg, n_frames, n_audio, n_frozen_mega, n_spectrum, n_period};
      names = '{"volume change", "balance left attenuated", "balance right attenuated", "zoom",
                "sample interval", "freeze", "channel mode", "key release ignored", "Megasample",
                "picture write", "joined samples", "background pixels", "frames checked",
                "audio words checked", "Megasample held by freeze", "spectrum bars", "Megasample period change"};
      for (int i = 0; i < 17; i++) begin
        $display("mechanism %-26s %0d", names[i], counts[i]);
        checks++;
        if (counts[i] == 0) begin failures++; $display("mechanism %s never happened", names[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
