// ram_interface: access to the external picture memory.
//
// The background picture is kept in an external memory at two bits per pixel,
// four pixels per byte, the first pixel in bits 1:0. While the screen is
// scanned, the block reads one byte on every column x with x[1:0] = 01 (when
// rd_en says the look-ahead position is inside the picture); one clk later,
// when the delayed column x_tmp has x_tmp[1:0] = 01, the byte is loaded into
// a pixel register, and on the other three columns that register shifts right
// by two bits. pix is its low two bits: on column c it holds the pixel of
// column c + 1, because image_creation addresses the byte that starts three
// columns ahead.
//
// Writes: a byte offered with wr_req (while wr_busy is low) is written at the
// next clk the memory is not needed for a display read; write_done then
// pulses for one clk. Reads always come first.
//
// Memory port: mem_addr/mem_rd/mem_we/mem_wdata are combinational from this
// block's registers and the scan position; mem_rdata must be valid one clk
// after mem_rd (a synchronous memory). The byte load on x_tmp = 01, the
// two-bit shifting and write_done follow the original design; the
// arbitration and the synchronous memory port are this design's.
module ram_interface #(
  parameter int unsigned ADDR_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [9:0]        x,
  input  logic              rd_en,
  input  logic [ADDR_W-1:0] rd_addr,
  input  logic              wr_req,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [7:0]        wr_data,
  output logic              wr_busy,
  output logic              write_done,
  output logic [1:0]        pix,
  output logic [ADDR_W-1:0] mem_addr,
  output logic              mem_rd,
  output logic              mem_we,
  output logic [7:0]        mem_wdata,
  input  logic [7:0]        mem_rdata
);

  logic [1:0]        x_tmp;
  logic              rd_q;
  logic [7:0]        pix_byte_tmp;
  logic [ADDR_W-1:0] wa_q;
  logic [7:0]        wd_q;

  assign mem_rd    = (x[1:0] == 2'b01) && rd_en;
  assign mem_we    = wr_busy && !mem_rd;
  assign mem_addr  = mem_rd ? rd_addr : wa_q;
  assign mem_wdata = wd_q;
  assign pix       = pix_byte_tmp[1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_tmp        <= '0;
      rd_q         <= 1'b0;
      pix_byte_tmp <= '0;
      wr_busy      <= 1'b0;
      wa_q         <= '0;
      wd_q         <= '0;
      write_done   <= 1'b0;
    end else begin
      x_tmp <= x[1:0];
      rd_q  <= mem_rd;
      if (x_tmp == 2'b01) pix_byte_tmp <= rd_q ? mem_rdata : 8'h00;
      else                pix_byte_tmp <= {2'b00, pix_byte_tmp[7:2]};

      write_done <= mem_we;
      if (mem_we) begin
        wr_busy <= 1'b0;
      end else if (wr_req && !wr_busy) begin
        wr_busy <= 1'b1;
        wa_q    <= wr_addr;
        wd_q    <= wr_data;
      end
    end
  end

endmodule
