// sound_interface: serial-to-parallel receiver for the codec's ADC data.
//
// The codec sends each channel as 20 bits, most significant bit first, one bit
// per SCLK period, starting at the LRCK edge; LRCK low carries the left word
// and LRCK high the right word. The receiver finds the SCLK rising edge by
// comparing SCLK with its value one clk earlier, and on that edge shifts sdin
// into a register. When the bit of SCLK period 19 arrives, the finished word is
// copied to data_out, ch_select is set to the LRCK level (0 left, 1 right) and
// data_valid pulses for one clk. data_out and ch_select then hold until the
// next word is complete, so ch_select toggles once per word.
//
// Timing: data_out is updated one clk after the SCLK rising edge that carries
// the last bit. The edge detection and the 20-bit/LRCK word framing follow the
// original design; the data_valid strobe is this design's addition so that
// later blocks need not watch ch_select for changes.
module sound_interface
  import osc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sclk,
  input  logic       lrck,
  input  logic [4:0] bit_cnt,     // SCLK period number inside the LRCK half
  input  logic       sdin,        // serial data from the codec
  output sample_t    data_out,    // last complete word
  output logic       ch_select,   // channel of data_out: 0 left, 1 right
  output logic       data_valid   // one-clk pulse when data_out is new
);

  logic                old_sc;
  logic [DATA_W-1:0]   shreg;
  logic                sclk_rise;

  assign sclk_rise = sclk && !old_sc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      old_sc     <= 1'b0;
      shreg      <= '0;
      data_out   <= '0;
      ch_select  <= 1'b0;
      data_valid <= 1'b0;
    end else begin
      old_sc     <= sclk;
      data_valid <= 1'b0;
      if (sclk_rise) begin
        shreg <= {shreg[DATA_W-2:0], sdin};
        if (bit_cnt == 5'(DATA_W - 1)) begin
          data_out   <= {shreg[DATA_W-2:0], sdin};
          ch_select  <= lrck;
          data_valid <= 1'b1;
        end
      end
    end
  end

endmodule
