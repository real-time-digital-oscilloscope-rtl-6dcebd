// tb_special_functions: power-spectrum bars against an exact reference.
//
// Three Megasamples are fed in, 64 samples each, 40 clk apart: a pure tone in
// bin 5, a tone in bin 12 plus random noise, and a constant level. The
// reference computes the 64-point DFT in the testbench with twiddles
// round(2047 cos(2 pi m / 64)) obtained from $cos, the same integer scaling
// (sums >>> 12, squared, summed) and the bit count of the power. After each
// Megasample the testbench scans columns 0..519 over lines 200..479 and
// expects a bar of 6 lines per magnitude step in columns 16k..16k+14; with
// show low nothing may be drawn. It also checks that each sample keeps the
// block busy for 32 clk and that spectrum_done pulses once per Megasample.
module tb_special_functions;
  import osc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sample_en = 1'b0;
  logic [5:0] sample_idx = '0;
  store_t sample_val = '0;
  logic [9:0] x = '0, y = '0;
  logic show = 1'b1;
  logic sf_on, busy, spectrum_done;
  int checks = 0, failures = 0;
  int done_count = 0;

  special_functions dut (.clk, .rst_n, .sample_en, .sample_idx, .sample_val, .x, .y, .show,
                         .sf_on, .busy, .spectrum_done);

  always #5 clk = !clk;
  always @(posedge clk) if (rst_n && spectrum_done) done_count++;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint twiddle(int mm);
    real r;
    r = 2047.0 * $cos(2.0 * 3.14159265358979 * real'(mm) / 64.0);
    return longint'(r);  // rounds to nearest
  endfunction

  function automatic int bits(longint p);
    int r;
    r = 0;
    for (int i = 0; i < 63; i++) if ((p >> i) & 1) r = i + 1;
    return r;
  endfunction

  task automatic run_mega(input int kind, output int expmag [32]);
    int xs [64];
    for (int nn = 0; nn < 64; nn++) begin
      real ph;
      case (kind)
        0: begin ph = 2.0 * 3.14159265358979 * 5.0 * nn / 64.0; xs[nn] = int'(800.0 * $cos(ph)); end
        1: begin ph = 2.0 * 3.14159265358979 * 12.0 * nn / 64.0;
                 xs[nn] = int'(1500.0 * $sin(ph)) + $urandom_range(0, 100) - 50; end
        default: xs[nn] = -1024;
      endcase
    end
    // reference
    for (int kk = 0; kk < 32; kk++) begin
      longint re, im, rs, is;
      re = 0; im = 0;
      for (int nn = 0; nn < 64; nn++) begin
        re += longint'(xs[nn]) * twiddle((kk * nn) % 64);
        im -= longint'(xs[nn]) * twiddle(((kk * nn) % 64 + 48) % 64);
      end
      rs = re >>> 12; is = im >>> 12;
      expmag[kk] = bits(rs * rs + is * is);
    end
    // feed the block
    for (int nn = 0; nn < 64; nn++) begin
      int busy_clk;
      @(negedge clk);
      sample_en = 1'b1; sample_idx = 6'(nn); sample_val = store_t'(xs[nn]);
      @(negedge clk);
      sample_en = 1'b0; sample_val = store_t'($urandom);
      busy_clk = 0;
      while (busy) begin busy_clk++; @(negedge clk); end
      checks++;
      if (busy_clk != ((nn == 63) ? 64 : 32)) begin
        failures++;
        $display("sample %0d kept the block busy %0d clk", nn, busy_clk);
      end
      repeat (6) @(negedge clk);
    end
  endtask

  task automatic scan_check(input int expmag [32], input string what);
    logic q [$];
    int bad, lit_count;
    bad = 0; lit_count = 0;
    for (int yy = 200; yy < 480; yy++) begin
      for (int xx = 0; xx < 520; xx++) begin
        logic e;
        @(negedge clk);
        x = 10'(xx); y = 10'(yy);
        e = show && xx < 512 && (xx % 16 != 15) && (479 - yy) < expmag[xx / 16] * 6;
        q.push_back(e);
        if (q.size() > 2) begin
          logic w;
          w = q.pop_front();
          if (w) lit_count++;
          if (sf_on !== w) bad++;
        end
      end
      q.delete();
      repeat (2) @(negedge clk);
    end
    checks++;
    if (bad != 0) begin
      failures++;
      $display("%s: %0d pixels differ", what, bad);
      for (int kk = 0; kk < 32; kk++) $write("%0d ", expmag[kk]);
      $display("");
    end
    if (show && lit_count == 0) begin failures++; $display("%s: no bars", what); end
  endtask

  initial begin
    int mags [32];
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int kind = 0; kind < 3; kind++) begin
      int d;
      d = done_count;
      run_mega(kind, mags);
      checks++;
      if (done_count != d + 1) begin failures++; $display("spectrum_done count %0d", done_count - d); end
      scan_check(mags, $sformatf("megasample %0d", kind));
      // the tone bins must stand out
      checks++;
      if (kind == 0 && !(mags[5] > mags[4] + 5)) failures++;
      if (kind == 2 && !(mags[0] > 0 && mags[1] == 0)) failures++;
    end
    show = 1'b0;
    scan_check(mags, "hidden");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
