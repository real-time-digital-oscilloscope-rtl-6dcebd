// tb_keyboard_interface: PS/2 frames in, scan codes out.
//
// The testbench plays a keyboard: 11-bit frames (start 0, data LSB first,
// odd parity, stop 1), data changed while kb_clk is high, kb_clk low for 20
// clk and high for 20 clk per bit. Good frames must give their byte once;
// frames with a wrong parity or stop bit must give nothing; a frame cut off
// after a few bits, followed by a silence longer than TIMEOUT, must not
// disturb the next frame.
module tb_keyboard_interface;
  logic clk = 1'b0, rst_n = 1'b0;
  logic kb_clk = 1'b1, kb_data = 1'b1;
  logic [7:0] code;
  logic code_valid;
  int checks = 0, failures = 0;
  int got_count = 0;
  logic [7:0] got_last;

  keyboard_interface #(.TIMEOUT(200)) dut (.clk, .rst_n, .kb_clk, .kb_data, .code, .code_valid);

  always #5 clk = !clk;

  always @(posedge clk) if (code_valid) begin got_count++; got_last = code; end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_bits(input logic [10:0] f, input int nbits);
    for (int i = 0; i < nbits; i++) begin
      kb_data = f[i];
      repeat (10) @(posedge clk);
      kb_clk = 1'b0;
      repeat (20) @(posedge clk);
      kb_clk = 1'b1;
      repeat (10) @(posedge clk);
    end
    kb_data = 1'b1;
    repeat (50) @(posedge clk);
  endtask

  function automatic logic [10:0] frame_of(logic [7:0] b);
    return {1'b1, ~^b, b, 1'b0};
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (10) @(posedge clk);
    for (int i = 0; i < 100; i++) begin
      logic [7:0] b;
      int n_prev;
      b = 8'($urandom);
      n_prev = got_count;
      send_bits(frame_of(b), 11);
      checks++;
      if (got_count != n_prev + 1 || got_last !== b) begin
        failures++;
        if (failures < 10) $display("byte %h: %0d codes, last %h", b, got_count - n_prev, got_last);
      end
    end
    // wrong parity and wrong stop bit
    begin
      int n_prev;
      logic [10:0] f;
      n_prev = got_count;
      f = frame_of(8'h3A); f[9] = !f[9];
      send_bits(f, 11);
      f = frame_of(8'h31); f[10] = 1'b0;
      send_bits(f, 11);
      checks++;
      if (got_count != n_prev) begin failures++; $display("bad frame accepted"); end
    end
    // cut-off frame, silence, then a good frame
    begin
      int n_prev;
      n_prev = got_count;
      send_bits(frame_of(8'h55), 4);
      repeat (400) @(posedge clk);
      send_bits(frame_of(8'h1D), 11);
      checks++;
      if (got_count != n_prev + 1 || got_last !== 8'h1D) begin
        failures++;
        $display("after timeout: %0d codes, last %h", got_count - n_prev, got_last);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
