// tb_ram_interface: picture reads while the screen scans, and byte writes.
//
// The testbench scans x = 0..799 line after line and, like image_creation,
// asks for the byte of the position three columns ahead (line * 128 + x / 4,
// inside 512 x 480). From the memory model's contents it expects pix on
// column c to be pixel c + 1 (bits 2k+1:2k of its byte for k = pixel mod 4),
// 0 outside the picture. Meanwhile random bytes are written through the write
// port; each must end in the memory with exactly one write_done, and the
// memory must never see a read and a write in the same clk.
module tb_ram_interface;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [9:0] x = '0;
  logic rd_en = 1'b0;
  logic [15:0] rd_addr = '0;
  logic wr_req = 1'b0;
  logic [15:0] wr_addr = '0;
  logic [7:0] wr_data = '0;
  logic wr_busy, write_done;
  logic [1:0] pix;
  logic [15:0] mem_addr;
  logic mem_rd, mem_we;
  logic [7:0] mem_wdata, mem_rdata;
  int collisions, reads, writes;
  int checks = 0, failures = 0;
  int done_count = 0;

  ram_interface #(.ADDR_W(16)) dut (.clk, .rst_n, .x, .rd_en, .rd_addr, .wr_req, .wr_addr, .wr_data,
    .wr_busy, .write_done, .pix, .mem_addr, .mem_rd, .mem_we, .mem_wdata, .mem_rdata);
  picture_memory_model mem (.clk, .addr(mem_addr), .rd(mem_rd), .we(mem_we), .wdata(mem_wdata),
    .rdata(mem_rdata), .collisions, .reads, .writes);

  always #5 clk = !clk;
  always @(posedge clk) if (rst_n && write_done) done_count++;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected background pixel at column px of line py
  function automatic logic [1:0] pixel(int px, int py);
    logic [7:0] b;
    if (px >= 512 || py >= 480) return 2'b00;
    b = mem.peek(16'(py * 128 + px / 4));
    return b[2 * (px % 4) +: 2];
  endfunction

  initial begin
    int n_wr = 0;
    logic [15:0] wa [$];
    logic [7:0]  wd [$];
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int line = 0; line < 20; line++) begin
      for (int xx = 0; xx < 800; xx++) begin
        int lx, ly;
        @(negedge clk);
        // during the clk that carries column xx, pix shows pixel xx + 1
        if (line > 0 || xx >= 4) begin
          int p, pl;
          p = xx + 1; pl = line;
          if (p == 800) begin p = 0; pl = line + 1; end
          checks++;
          if (pix !== pixel(p, pl)) begin
            failures++;
            if (failures < 10) $display("line %0d col %0d: pix %0d want %0d", line, xx, pix, pixel(p, pl));
          end
        end
        x = 10'(xx);
        lx = xx + 3; ly = line;
        if (lx >= 800) begin lx -= 800; ly++; end
        rd_en   = (lx < 512) && (ly < 480);
        rd_addr = 16'(ly * 128 + lx / 4);
        // writes go to lines 100.. so that the scanned lines stay intact
        if (!wr_busy && !wr_req && $urandom_range(0, 9) == 0) begin
          wr_req = 1'b1;
          wr_addr = 16'(12800 + $urandom_range(0, 4000));
          wr_data = 8'($urandom);
          wa.push_back(wr_addr); wd.push_back(wr_data);
          n_wr++;
        end else begin
          wr_req = 1'b0;
        end
      end
    end
    wr_req = 1'b0;
    repeat (20) @(negedge clk);
    checks++;
    if (done_count != n_wr || writes != n_wr || collisions != 0) begin
      failures++;
      $display("writes %0d done %0d memory writes %0d collisions %0d", n_wr, done_count, writes, collisions);
    end
    // the last write to each address must be in the memory
    for (int i = 0; i < wa.size(); i++) begin
      logic last;
      last = 1'b1;
      for (int j = i + 1; j < wa.size(); j++) if (wa[j] == wa[i]) last = 1'b0;
      if (last) begin
        checks++;
        if (mem.peek(wa[i]) !== wd[i]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
