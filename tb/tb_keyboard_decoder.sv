// tb_keyboard_decoder: random scan-code sequences against a reference model.
//
// The stream mixes the ten control keys, other keys, break prefixes (F0,
// after which one code is ignored) and extended prefixes (E0). A model kept
// in the testbench steps volume, balance, zoom, rate, Megasample period, freeze, channel mode and spectrum display
// with the same saturation rules; the decoder's ctrl must match it after
// every code. The reset values (volume 10, balance 5) are checked first.
module tb_keyboard_decoder;
  import osc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] code;
  logic code_valid;
  scope_ctrl_t ctrl;
  int checks = 0, failures = 0;

  keyboard_decoder #(.RATE_RESET(3)) dut (.clk, .rst_n, .code, .code_valid, .ctrl);

  always #5 clk = !clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [7:0] CODES [16] = '{8'h3A, 8'h31, 8'h1D, 8'h15, 8'h1A, 8'h22, 8'h1C, 8'h1B,
                                        8'h24, 8'h23, 8'h2B, 8'h21, 8'h4D, 8'hF0, 8'hE0, 8'h29};

  initial begin
    int vol, bal, zoom, rate, frz, chan, spec, mega;
    logic brk;
    code = '0; code_valid = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    vol = 10; bal = 5; zoom = 0; rate = 3; frz = 0; chan = 0; spec = 0; mega = 2; brk = 1'b0;
    checks++;
    if (ctrl.vol != 4'd10 || ctrl.bal != 4'd5) failures++;
    for (int i = 0; i < 3000; i++) begin
      logic [7:0] c;
      c = CODES[$urandom_range(0, 15)];
      code = c; code_valid = 1'b1;
      @(negedge clk);
      code_valid = 1'b0;
      code = 8'($urandom);
      if (c == 8'hF0) brk = 1'b1;
      else if (c == 8'hE0) ;
      else if (brk) brk = 1'b0;
      else begin
        case (c)
          8'h3A: vol  = (vol < 10) ? vol + 1 : vol;
          8'h31: vol  = (vol > 0)  ? vol - 1 : vol;
          8'h1D: bal  = (bal > 0)  ? bal - 1 : bal;
          8'h15: bal  = (bal < 10) ? bal + 1 : bal;
          8'h1A: zoom = (zoom < 3) ? zoom + 1 : zoom;
          8'h22: zoom = (zoom > 0) ? zoom - 1 : zoom;
          8'h1C: rate = (rate > 0) ? rate - 1 : rate;
          8'h1B: rate = (rate < 7) ? rate + 1 : rate;
          8'h2B: frz  = 1 - frz;
          8'h21: chan = (chan + 1) % 3;
          8'h4D: spec = 1 - spec;
          8'h24: mega = (mega > 0) ? mega - 1 : mega;
          8'h23: mega = (mega < 4) ? mega + 1 : mega;
          default: ;
        endcase
      end
      checks++;
      if (int'(ctrl.vol) != vol || int'(ctrl.bal) != bal || int'(ctrl.zoom) != zoom ||
          int'(ctrl.rate) != rate || int'(ctrl.freeze) != frz || int'(ctrl.chan) != chan ||
          int'(ctrl.spectrum) != spec || int'(ctrl.mega) != mega) begin
        failures++;
        if (failures < 10) $display("code %h: got v%0d b%0d z%0d r%0d f%0d c%0d want v%0d b%0d z%0d r%0d f%0d c%0d",
          c, ctrl.vol, ctrl.bal, ctrl.zoom, ctrl.rate, ctrl.freeze, ctrl.chan, vol, bal, zoom, rate, frz, chan);
      end
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
