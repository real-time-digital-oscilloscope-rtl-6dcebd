// keyboard_decoder: turns keyboard scan codes into the oscilloscope controls.
//
// Every make code of a known key steps one control: M/N raise/lower the volume
// (0..10), W/Q move the balance towards the left/right channel (0..10, 5 is
// the centre, lower values attenuate the right channel), Z/X zoom in/out
// (1x, 2x, 4x, 8x), A/S halve/double the interval between the samples of a
// Megasample (1..128 audio frames), E/D halve/double the time between
// Megasamples (10..160 ms), F toggles freeze, P toggles the power spectrum
// display and C steps the channel display through both, left only, right
// only. All steps saturate. The code that follows a break prefix (F0, key
// released) is ignored, as is the E0 prefix, so a key press moves a control
// once per make code (auto-repeat keeps stepping). Reset values: volume 10,
// balance 5, zoom 1x, interval 2**RATE_RESET, Megasample period 40 ms, not
// frozen, both channels, no spectrum.
//
// The M/N and W/Q assignments, 4-bit volume/balance signals and their ten
// levels follow the original design; the other keys, the step sizes and the
// reset interval are this design's. Timing: ctrl changes one clk after
// code_valid.
module keyboard_decoder
  import osc_pkg::*;
#(
  parameter int unsigned RATE_RESET = 3
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  code,
  input  logic        code_valid,
  output scope_ctrl_t ctrl
);

  logic brk;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      brk         <= 1'b0;
      ctrl.vol    <= level_t'(LEVEL_MAX);
      ctrl.bal    <= level_t'(BAL_CENTER);
      ctrl.zoom   <= 2'd0;
      ctrl.rate   <= 3'(RATE_RESET);
      ctrl.mega   <= 3'd2;
      ctrl.freeze <= 1'b0;
      ctrl.chan   <= SHOW_BOTH;
      ctrl.spectrum <= 1'b0;
    end else if (code_valid) begin
      if (code == KEY_BREAK) begin
        brk <= 1'b1;
      end else if (code == KEY_EXT) begin
        // prefix only: wait for the key code
      end else if (brk) begin
        brk <= 1'b0;
      end else begin
        case (code)
          KEY_M: if (ctrl.vol < level_t'(LEVEL_MAX)) ctrl.vol <= ctrl.vol + 1'b1;
          KEY_N: if (ctrl.vol != 0)                  ctrl.vol <= ctrl.vol - 1'b1;
          KEY_W: if (ctrl.bal != 0)                  ctrl.bal <= ctrl.bal - 1'b1;
          KEY_Q: if (ctrl.bal < level_t'(LEVEL_MAX)) ctrl.bal <= ctrl.bal + 1'b1;
          KEY_Z: if (ctrl.zoom != 2'd3)              ctrl.zoom <= ctrl.zoom + 1'b1;
          KEY_X: if (ctrl.zoom != 2'd0)              ctrl.zoom <= ctrl.zoom - 1'b1;
          KEY_A: if (ctrl.rate != 3'd0)              ctrl.rate <= ctrl.rate - 1'b1;
          KEY_S: if (ctrl.rate != 3'd7)              ctrl.rate <= ctrl.rate + 1'b1;
          KEY_E: if (ctrl.mega != 3'd0)              ctrl.mega <= ctrl.mega - 1'b1;
          KEY_D: if (ctrl.mega != 3'd4)              ctrl.mega <= ctrl.mega + 1'b1;
          KEY_F: ctrl.freeze <= !ctrl.freeze;
          KEY_P: ctrl.spectrum <= !ctrl.spectrum;
          KEY_C: case (ctrl.chan)
                   SHOW_BOTH: ctrl.chan <= SHOW_LEFT;
                   SHOW_LEFT: ctrl.chan <= SHOW_RIGHT;
                   default:   ctrl.chan <= SHOW_BOTH;
                 endcase
          default: ;
        endcase
      end
    end
  end

endmodule
