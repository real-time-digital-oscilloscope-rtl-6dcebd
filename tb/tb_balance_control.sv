// tb_balance_control: random words, channels and balance levels.
//
// Reference: right words (ch 1) with bal < 5 are divided by 2**(5 - bal),
// left words (ch 0) with bal > 5 by 2**(bal - 5), floor rounding, all other
// words pass unchanged; levels above 10 act as 10. One clk latency.
module tb_balance_control;
  import osc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  level_t bal;
  sample_t din, dout;
  logic cin, vin, cout, vout;
  int checks = 0, failures = 0;

  balance_control dut (.clk, .rst_n, .bal, .data_in(din), .ch_in(cin), .valid_in(vin),
                       .data_out(dout), .ch_out(cout), .valid_out(vout));

  always #5 clk = !clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int floordiv(int a, int b);
    int q;
    q = a / b;
    if ((a % b != 0) && (a < 0)) q = q - 1;
    return q;
  endfunction

  initial begin
    vin = 0; cin = 0; din = '0; bal = 4'd5;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 2000; i++) begin
      int v, want, lvl;
      @(negedge clk);
      bal = level_t'($urandom_range(0, 15));
      din = sample_t'($urandom);
      cin = 1'($urandom);
      vin = 1'b1;
      v   = int'(din);
      lvl = (bal > 10) ? 10 : int'(bal);
      want = v;
      if (cin && lvl < 5)       want = floordiv(v, 1 << (5 - lvl));
      else if (!cin && lvl > 5) want = floordiv(v, 1 << (lvl - 5));
      @(negedge clk);
      vin = 1'b0;
      checks++;
      if (!vout || int'(dout) != want || cout != cin) begin
        failures++;
        if (failures < 10) $display("bal=%0d ch=%b in=%0d got %0d want %0d", bal, cin, v, dout, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
