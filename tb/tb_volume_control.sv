// tb_volume_control: random words at every volume level.
//
// The reference is the word divided by 2**(10 - vol), rounded towards minus
// infinity (arithmetic shift), computed here by integer division with a
// floor correction, not by a shift. Levels above 10 must act as 10. The
// output must follow the input by exactly one clk and keep ch_select.
module tb_volume_control;
  import osc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  level_t vol;
  sample_t din, dout;
  logic cin, vin, cout, vout;
  int checks = 0, failures = 0;

  volume_control dut (.clk, .rst_n, .vol, .data_in(din), .ch_in(cin), .valid_in(vin),
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
    vin = 0; cin = 0; din = '0; vol = 4'd10;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int i = 0; i < 2000; i++) begin
      int v, want, lvl;
      @(negedge clk);
      vol = level_t'($urandom_range(0, 15));
      din = sample_t'($urandom);
      cin = 1'($urandom);
      vin = 1'b1;
      v   = int'(din);
      lvl = (vol > 10) ? 10 : int'(vol);
      want = floordiv(v, 1 << (10 - lvl));
      @(negedge clk);
      vin = 1'b0;
      checks++;
      if (!vout || int'(dout) != want || cout != cin) begin
        failures++;
        if (failures < 10) $display("vol=%0d in=%0d got %0d want %0d", vol, v, dout, want);
      end
      checks++;
      @(negedge clk);
      if (vout) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
