// tb_sig_alias: waveform pixels for whole screens against a drawing model.
//
// A 64-entry sample memory model (one clk read latency) is filled with random
// values, including full-scale ones that must clip at lines 0 and 479. The
// testbench scans x = 0..599 on every line 0..489 and, for each pixel, works
// out the expected code from the drawing rule: sample i = x / 8 sits on line
// 240 - floor(v * 2**zoom / 8) clipped to 0..479; column 8i (i > 0) covers
// every line between samples i-1 and i; left wins over right; nothing is
// drawn outside 512 x 480; the channel mode hides a channel. wf_col must show
// that code two clk after the position. Four screens run with different
// zoom and channel settings.
module tb_sig_alias;
  import osc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [9:0] x = '0, y = '0;
  logic [1:0] zoom = '0;
  chan_mode_e chan = SHOW_BOTH;
  logic [5:0] rd_addr;
  store_t rd_left, rd_right;
  wf_col_e wf_col;
  store_t mem_l [64];
  store_t mem_r [64];
  int checks = 0, failures = 0;
  int joins = 0, clips = 0;

  sig_alias dut (.clk, .rst_n, .x, .y, .zoom, .chan, .rd_addr, .rd_left, .rd_right, .wf_col);

  always #5 clk = !clk;
  always @(posedge clk) begin
    rd_left  <= mem_l[rd_addr];
    rd_right <= mem_r[rd_addr];
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int line_of(int v, int z);
    int p, q;
    p = v * (1 << z);
    q = p / 8;
    if (p % 8 != 0 && p < 0) q = q - 1;
    q = 240 - q;
    if (q < 0) q = 0;
    if (q > 479) q = 479;
    return q;
  endfunction

  function automatic logic lit(int xx, int yy, int v_prev, int v_cur, int z);
    int a, b;
    a = line_of(v_cur, z);
    b = (xx % 8 == 0 && xx > 0) ? line_of(v_prev, z) : a;
    if (a > b) begin int t; t = a; a = b; b = t; end
    return (yy >= a && yy <= b);
  endfunction

  initial begin
    wf_col_e exp_q [$];
    for (int i = 0; i < 64; i++) begin
      mem_l[i] = store_t'($urandom);
      mem_r[i] = store_t'($urandom);
    end
    mem_l[5] = 12'h7FF; mem_r[6] = 12'h800;
    mem_l[7] = 12'h000; mem_r[7] = 12'h000;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int scr = 0; scr < 4; scr++) begin
      zoom = 2'(scr);
      chan = (scr == 1) ? SHOW_LEFT : (scr == 2) ? SHOW_RIGHT : SHOW_BOTH;
      for (int yy = 0; yy < 490; yy++) begin
        for (int xx = 0; xx < 600; xx++) begin
          wf_col_e e;
          logic ll, lr;
          @(negedge clk);
          x = 10'(xx); y = 10'(yy);
          e = WF_NONE;
          if (xx < 512 && yy < 480) begin
            int i;
            i = xx / 8;
            ll = lit(xx, yy, (i > 0) ? int'(mem_l[i-1]) : 0, int'(mem_l[i]), scr);
            lr = lit(xx, yy, (i > 0) ? int'(mem_r[i-1]) : 0, int'(mem_r[i]), scr);
            if (ll && chan != SHOW_RIGHT) e = WF_LEFT;
            else if (lr && chan != SHOW_LEFT) e = WF_RIGHT;
            if (xx % 8 == 0 && xx > 0 && ll && line_of(int'(mem_l[i]), scr) != yy) joins++;
            if (ll && (yy == 0 || yy == 479)) clips++;
          end
          exp_q.push_back(e);
          if (exp_q.size() > 2) begin
            wf_col_e w;
            w = exp_q.pop_front();
            checks++;
            if (wf_col !== w) begin
              failures++;
              if (failures < 10) $display("scr %0d x %0d y %0d: got %s want %s", scr, xx - 2, yy, wf_col.name(), w.name());
            end
          end
        end
      end
    end
    checks++;
    if (joins == 0 || clips == 0) begin
      failures++;
      $display("joins %0d clips %0d", joins, clips);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
