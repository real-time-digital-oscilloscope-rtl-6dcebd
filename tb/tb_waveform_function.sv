// tb_waveform_function: sample storage and read-back.
//
// Random left/right words stream in; at random moments a sample is stored at a
// random slot. A reference array in the testbench keeps the top 12 bits of
// the latest left and right words for each slot. Reads at random addresses
// must return the reference values one clk later; before any write every
// slot reads zero. cur_left/cur_right must always show the values a store
// would take.
module tb_waveform_function;
  import osc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  sample_t sin;
  logic sch = 1'b0, sval = 1'b0, sen = 1'b0;
  logic [5:0] sidx = '0, raddr = '0;
  store_t rl, rr, cl, cr;
  int checks = 0, failures = 0;
  logic [5:0] a_prev;

  waveform_function #(.N_SAMPLES(64)) dut (.clk, .rst_n, .sound_in(sin), .sound_ch(sch),
    .sound_valid(sval), .sample_en(sen), .sample_idx(sidx), .rd_addr(raddr),
    .rd_left(rl), .rd_right(rr), .cur_left(cl), .cur_right(cr));

  always #5 clk = !clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [11:0] ref_l [64];
    logic [11:0] ref_r [64];
    logic [19:0] last_l, last_r;
    sin = '0;
    for (int i = 0; i < 64; i++) begin ref_l[i] = '0; ref_r[i] = '0; end
    last_l = '0; last_r = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 5000; i++) begin
      logic [5:0] a;
      @(negedge clk);
      // check the read issued in the previous cycle
      if (i > 0) begin
        checks++;
        if (rl !== ref_l[a_prev] || rr !== ref_r[a_prev]) begin
          failures++;
          if (failures < 10) $display("addr %0d got %h/%h want %h/%h", a_prev, rl, rr, ref_l[a_prev], ref_r[a_prev]);
        end
      end
      // the write of the previous cycle is now in the reference
      if (sen) begin ref_l[sidx] = last_l[19:8]; ref_r[sidx] = last_r[19:8]; end
      if (sval) begin if (sch) last_r = 20'(sin); else last_l = 20'(sin); end
      checks++;
      if (cl !== last_l[19:8] || cr !== last_r[19:8]) failures++;
      sval = 1'($urandom_range(0, 1));
      sin  = sample_t'($urandom);
      sch  = 1'($urandom);
      sen  = ($urandom_range(0, 3) == 0) && (i > 50);
      sidx = 6'($urandom);
      a = 6'($urandom);
      raddr = a;
      a_prev = a;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
