// keyboard_interface: PS/2 keyboard receiver.
//
// The keyboard sends 11-bit frames on kb_data, clocked by kb_clk: a start bit
// (0), eight data bits least significant first, an odd-parity bit and a stop
// bit (1); the receiver reads kb_data on each falling edge of kb_clk. Both
// lines are first brought into the clk domain by two flip-flops. When all 11
// bits are in and start, parity and stop are right, the byte appears on code
// with a one-clk code_valid pulse; a bad frame is dropped. If kb_clk stays
// quiet for TIMEOUT clk cycles in the middle of a frame, the partial frame is
// discarded so that the receiver falls back into step.
//
// Reading serial scan codes with the keyboard clock is the original design's;
// the PS/2 framing checks, synchroniser and timeout are this design's.
module keyboard_interface #(
  parameter int unsigned TIMEOUT = 2500   // clk cycles, 100 us at 25 MHz
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       kb_clk,
  input  logic       kb_data,
  output logic [7:0] code,
  output logic       code_valid
);

  logic [1:0]  clk_sync, dat_sync;
  logic        clk_old;
  logic [10:0] frame;
  logic [3:0]  nbits;
  logic [$clog2(TIMEOUT+1)-1:0] idle;
  logic        fall;
  logic [10:0] full;

  assign fall = clk_old && !clk_sync[1];
  assign full = {dat_sync[1], frame[10:1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clk_sync   <= 2'b11;
      dat_sync   <= 2'b11;
      clk_old    <= 1'b1;
      frame      <= '0;
      nbits      <= '0;
      idle       <= '0;
      code       <= '0;
      code_valid <= 1'b0;
    end else begin
      clk_sync   <= {clk_sync[0], kb_clk};
      dat_sync   <= {dat_sync[0], kb_data};
      clk_old    <= clk_sync[1];
      code_valid <= 1'b0;
      if (fall) begin
        idle  <= '0;
        frame <= full;
        if (nbits == 4'd10) begin
          nbits <= '0;
          // full = {stop, parity, data[7:0], start}
          if (!full[0] && full[10] && (^full[9:1]))
          begin
            code       <= full[8:1];
            code_valid <= 1'b1;
          end
        end else begin
          nbits <= nbits + 1'b1;
        end
      end else if (nbits != 0) begin
        if (idle == ($clog2(TIMEOUT+1))'(TIMEOUT)) begin
          nbits <= '0;
          idle  <= '0;
        end else begin
          idle <= idle + 1'b1;
        end
      end
    end
  end

endmodule
