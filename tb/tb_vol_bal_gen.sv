// tb_vol_bal_gen: indicator bars for every volume and balance level.
//
// For each volume 0..10 (balance stepping with it, 10 - vol) the testbench
// scans x = 0..255 over lines 0..39 and expects: on lines 8..15 the columns
// 8 + 16k .. 8 + 16k + 14 lit as volume for k < vol; on lines 24..31 the
// columns 8 + 16*bal .. 8 + 16*bal + 14 lit as balance; nothing elsewhere.
// The code must appear two clk after the position.
module tb_vol_bal_gen;
  import osc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [9:0] x = '0, y = '0;
  level_t vol = '0, bal = '0;
  vb_col_e vb_col;
  int checks = 0, failures = 0;

  vol_bal_gen dut (.clk, .rst_n, .x, .y, .vol, .bal, .vb_col);

  always #5 clk = !clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vb_col_e q [$];
    int lit_vol = 0, lit_bal = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int v = 0; v <= 10; v++) begin
      for (int yy = 0; yy < 40; yy++) begin
        for (int xx = 0; xx < 256; xx++) begin
          vb_col_e e;
          int k, r;
          @(negedge clk);
          vol = level_t'(v); bal = level_t'(10 - v);
          x = 10'(xx); y = 10'(yy);
          e = VB_NONE;
          k = (xx - 8) / 16; r = (xx - 8) % 16;
          if (xx >= 8 && r != 15 && k <= 10) begin
            if (yy >= 8 && yy < 16 && k < v) e = VB_VOL;
            if (yy >= 24 && yy < 32 && k == 10 - v) e = VB_BAL;
          end
          q.push_back(e);
          if (q.size() > 2) begin
            vb_col_e w;
            w = q.pop_front();
            checks++;
            if (w == VB_VOL) lit_vol++;
            if (w == VB_BAL) lit_bal++;
            if (vb_col !== w) begin
              failures++;
              if (failures < 10) $display("vol %0d x %0d y %0d got %s want %s", v, xx - 2, yy, vb_col.name(), w.name());
            end
          end
        end
      end
    end
    checks++;
    if (lit_vol == 0 || lit_bal == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
