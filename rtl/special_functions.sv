// special_functions: power spectrum of each Megasample, drawn as bars.
//
// The block computes a 64-point discrete Fourier transform of one channel
// while the Megasample is being taken, then its power spectrum, and draws the
// spectrum on the screen.
//
// Transform: each stored sample x[n] (12 bits, signed) arrives with sample_en
// and its slot n. For the 32 bins k = 0..31 the block adds x[n] * C(kn) to the
// real and subtracts x[n] * S(kn) from the imaginary accumulator, one bin per
// clk (32 clk per sample), where C(m) = round(2047 cos(2 pi m / 64)) and
// S(m) = C(m - 16), taken from a quarter-wave table of 17 values. Slot 0
// restarts the sums. After slot 63 every bin's power
// P = (Re >>> 12)**2 + (Im >>> 12)**2 is reduced to a magnitude: the number of
// bits it needs (0 for P = 0, up to 36), kept in a 32-entry register file
// until the next Megasample ends. Samples must be at least 32 clk apart
// (they are a whole audio frame apart in the oscilloscope).
//
// Display: bin k owns columns 16k..16k+14 of the 512-column picture; a bar
// rises from line 479 with a height of HEIGHT_STEP lines per magnitude step.
// With show low nothing is drawn. sf_on follows x/y by two clk, the same
// stage as the other layers.
//
// The original design only names this block ("FFT and power spectrum"). The
// transform length (one Megasample), direct DFT evaluation, scaling,
// logarithmic bar height and layout are this design's own choices.
module special_functions
  import osc_pkg::*;
#(
  parameter int unsigned HEIGHT_STEP = 6,
  parameter int unsigned Y_LAST      = 479,
  localparam int unsigned N_POINTS = 64,
  localparam int unsigned N_BINS   = 32,
  localparam int unsigned ACC_W    = 30
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sample_en,
  input  logic [5:0] sample_idx,
  input  store_t     sample_val,
  input  logic [9:0] x,
  input  logic [9:0] y,
  input  logic       show,
  output logic       sf_on,
  output logic       busy,
  output logic       spectrum_done
);

  typedef enum logic [1:0] {S_IDLE, S_ACC, S_POWER} state_e;

  state_e                   state;
  logic signed [ACC_W-1:0]  acc_re [N_BINS];
  logic signed [ACC_W-1:0]  acc_im [N_BINS];
  logic [5:0]               mag    [N_BINS];
  store_t                   xv;
  logic [5:0]               n;
  logic [4:0]               k;
  logic                     last;

  // round(2047 * cos(2 pi i / 64)) for i = 0..16
  function automatic logic signed [11:0] quarter(logic [4:0] i);
    case (i)
      5'd0:  return 12'sd2047;  5'd1:  return 12'sd2037;  5'd2:  return 12'sd2008;
      5'd3:  return 12'sd1959;  5'd4:  return 12'sd1891;  5'd5:  return 12'sd1805;
      5'd6:  return 12'sd1702;  5'd7:  return 12'sd1582;  5'd8:  return 12'sd1447;
      5'd9:  return 12'sd1299;  5'd10: return 12'sd1137;  5'd11: return 12'sd965;
      5'd12: return 12'sd783;   5'd13: return 12'sd594;   5'd14: return 12'sd399;
      5'd15: return 12'sd201;   default: return 12'sd0;
    endcase
  endfunction

  function automatic logic signed [11:0] cos_q(logic [5:0] m);
    if (m <= 6'd16)      return  quarter(5'(m));
    else if (m < 6'd32)  return -quarter(5'(6'd32 - m));
    else if (m <= 6'd48) return -quarter(5'(m - 6'd32));
    else                 return  quarter(5'(7'd64 - 7'(m)));
  endfunction

  // number of bits needed for p (0 for p = 0)
  function automatic logic [5:0] bits_of(logic [35:0] p);
    logic [5:0] r;
    r = '0;
    for (int i = 0; i < 36; i++) if (p[i]) r = 6'(i + 1);
    return r;
  endfunction

  logic [5:0]               m;
  logic signed [11:0]       c, s;
  logic signed [23:0]       prod_re, prod_im;
  logic signed [ACC_W-1:0]  base_re, base_im;
  logic signed [17:0]       re_s, im_s;
  logic [35:0]              power;

  always_comb begin
    m       = 6'(n * 6'(k));
    c       = cos_q(m);
    s       = cos_q(m - 6'd16);
    prod_re = xv * c;
    prod_im = xv * s;
    base_re = (n == 0) ? '0 : acc_re[k];
    base_im = (n == 0) ? '0 : acc_im[k];
    re_s    = 18'(acc_re[k] >>> 12);
    im_s    = 18'(acc_im[k] >>> 12);
    power   = 36'(re_s * re_s) + 36'(im_s * im_s);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      xv            <= '0;
      n             <= '0;
      k             <= '0;
      last          <= 1'b0;
      spectrum_done <= 1'b0;
      for (int i = 0; i < N_BINS; i++) begin
        acc_re[i] <= '0;
        acc_im[i] <= '0;
        mag[i]    <= '0;
      end
    end else begin
      spectrum_done <= 1'b0;
      case (state)
        S_IDLE: if (sample_en) begin
          xv    <= sample_val;
          n     <= sample_idx;
          last  <= (sample_idx == 6'(N_POINTS - 1));
          k     <= '0;
          state <= S_ACC;
        end
        S_ACC: begin
          acc_re[k] <= base_re + ACC_W'(prod_re);
          acc_im[k] <= base_im - ACC_W'(prod_im);
          k <= k + 1'b1;
          if (k == 5'(N_BINS - 1)) state <= last ? S_POWER : S_IDLE;
        end
        S_POWER: begin
          mag[k] <= bits_of(power);
          k <= k + 1'b1;
          if (k == 5'(N_BINS - 1)) begin
            state         <= S_IDLE;
            spectrum_done <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // ---------------- display ----------------
  logic [4:0]  bin;
  logic [9:0]  height, rise;
  logic        lit, stage1;

  always_comb begin
    bin    = 5'(x >> 4);
    height = 10'(mag[bin]) * 10'(HEIGHT_STEP);
    rise   = 10'(Y_LAST) - y;
    lit    = show && (x < 10'(N_BINS * 16)) && (y <= 10'(Y_LAST)) &&
             (x[3:0] != 4'hF) && (rise < height);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage1 <= 1'b0;
      sf_on  <= 1'b0;
    end else begin
      stage1 <= lit;
      sf_on  <= stage1;
    end
  end

endmodule
