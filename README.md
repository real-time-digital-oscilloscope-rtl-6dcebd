# Real-time audio oscilloscope for an FPGA

This design turns a small FPGA board into a stand-alone oscilloscope for audio.
It needs an audio codec, a PS/2 keyboard and a VGA monitor, and no computer.
Stereo audio from the codec is passed straight back to the codec with digital
volume and balance applied. At the same time, bursts of samples are stored in
block RAM and drawn on the screen as two coloured traces: blue for left, green
for right. They are drawn over volume and balance bars and a background
picture read from an external memory. On request, the power spectrum of each
burst is drawn as bars along the bottom of the screen. Keys on the keyboard
set volume, balance, zoom, sampling rate, how often a burst is taken, freeze,
which channels are shown
and whether the spectrum is shown.

The RTL is SystemVerilog (IEEE 1800-2017), one clock domain and one
active-low asynchronous reset. It is a re-implementation of a published VHDL
design for a Spartan-3E board. The block structure, the codec framing, the
volume and balance rules, the sync positions and the picture-memory unpacking
follow that design. Where it says nothing, the choices here are my own, and
they are listed in [Departures and own choices](#departures-and-own-choices).

## Signal flow

```
            +-----------------+   +----------------+   +-----------------+   +--------------+
codec sdin->| sound_interface |-->| volume_control |-->| balance_control |-->| sound_output |->codec sdout
            +-----------------+   +----------------+   +-----------------+   +--------------+
                  |  ^ sclk/lrck/bit_cnt from audio_clock_gen (also drives codec MCLK/SCLK/LRCK)
                  v
            +---------+ sample_en  +-------------------+ rd_left/rd_right +-----------+
            | wf_ctrl |----------->| waveform_function |----------------->| sig_alias |--wf_col--+
            +---------+            |  2 x 64 x 12 RAM  |<---rd_addr-------+-----------+          |
                                   +-------------------+                                        v
kb_clk/kb_data -> keyboard_interface -> keyboard_decoder -> ctrl   vol_bal_gen --vb_col--> image_creation -> rgb,
                                        (vol, bal, zoom, rate,                                  ^   |          hsync,
                                         freeze, chan)          screen_control --x,y,sync-------+   |          vsync
                                                                ram_interface <--rd_addr------------+
                                                                  ^  |  bg_pix
                                                     picture memory  +----------> image_creation
```

`special_functions` sits beside `waveform_function`. It takes each stored
sample as it is written and sends its spectrum bars (`sf_on`) to
`image_creation`. `oscilloscope_top` wires these blocks together. The display
shows the words as they were received, before volume and balance are applied.

## Codec link and audio clocks

`audio_clock_gen` is a free-running 8-bit counter that makes every codec clock:

| signal | source | rate |
|---|---|---|
| MCLK | `clk` | clk |
| SCLK | counter bit 1 | clk/4 |
| bit number in the half frame | counter bits 6:2 | 0..31 |
| LRCK | counter bit 7 | clk/256 (MCLK = 256·fs) |

With a 25.175 MHz clock the sample rate is 98.3 kHz.

Each LRCK half period carries one channel: **low is left, high is right**.
Each word is 20 bits, MSB first, one bit per SCLK period, starting at the
LRCK edge. Periods 20..31 carry nothing.

- **Receiving (`sound_interface`).** The receiver finds the SCLK rising edge
  by comparing SCLK with its value one clk earlier, and shifts `sdin` in on
  that edge. When the bit of period 19 arrives, it publishes the word with
  `ch_select` = LRCK (0 left, 1 right) and a one-clk `data_valid` pulse. So a
  finished word appears every 128 clk and `ch_select` toggles with each one.
- **Sending (`sound_output`).** The transmitter keeps the last processed left
  and right words. On the SCLK falling edge that opens period 0, it picks the
  word named by LRCK. It then drives one bit per falling edge, MSB first, and
  sends 0 after bit 19. `sdout` changes one clk after SCLK falls, one full clk
  before the codec samples it on the rising edge.
- **Latency.** Audio goes through with a latency of one stereo frame (256 clk).

## Volume and balance

Both controls work by arithmetic right shifts of the 20-bit two's-complement
word. Each adds one clk of delay.

- **Volume (`volume_control`).** A word is shifted right by `10 - vol`
  places, the same for both channels. Level 10 is full scale and the reset
  value.
- **Balance (`balance_control`).** Level 5 is the centre and the reset value.
  - For `bal < 5`, right words are shifted by `5 - bal` places.
  - For `bal > 5`, left words are shifted by `bal - 5` places.
  - The other channel always passes unchanged.

## Keyboard

`keyboard_interface` is a PS/2 receiver:

- It synchronises `kb_clk` and `kb_data` into the clk domain and samples data
  on each falling edge of `kb_clk`.
- It checks the start bit, odd parity and stop bit, and drops bad frames.
- If the keyboard clock stops in mid-frame for `TIMEOUT` clk (100 µs), it
  discards the partial frame.

`keyboard_decoder` acts on make codes (scan-code set 2). It ignores the code
after a release prefix `F0` and skips `E0`. Every control saturates at its
ends.

| key | action | range, reset value |
|---|---|---|
| M / N | volume up / down | 0..10, 10 |
| W / Q | balance towards left / right (W attenuates the right channel) | 0..10, 5 |
| Z / X | vertical zoom in / out | 1x, 2x, 4x, 8x; 1x |
| A / S | halve / double the sample interval | 1..128 frames; 8 |
| E / D | halve / double the time between Megasamples | 10..160 ms; 40 ms |
| F | freeze toggle | off |
| C | show both → left only → right only → both | both |
| P | spectrum bars on / off | off |

M, N, W and Q are the original assignments. The other keys are this design's
own choice.

## Megasamples: how the trace is captured

The screen does not show a rolling record. It shows one **Megasample**: 64
successive samples of both channels.

`wf_ctrl` counts stereo frames (one per received right word):

- A Megasample may start once per period. The period is
  `MEGA_PERIOD · 2^mega / 4` frames, with `mega` = 0..4 set by keys E/D.
  At reset (`mega` = 2) it is `MEGA_PERIOD`; the default, 3934 frames, is
  40 ms at 98.3 kHz. A shorter period takes effect at once.
- Inside a Megasample, one sample is taken every `2**rate` frames.
- If a Megasample is still running at the next period boundary, that start
  is skipped. At the 40 ms period this happens at intervals of 64 or 128
  frames.
- While freeze is on, no Megasample starts, so the picture stays.

`waveform_function` keeps the latest left and right words. On each sample
enable it writes their top 12 bits (bits 19:8, sign included) into two
64-entry arrays, one per channel. These are block RAMs with a one-clk read.
They start at zero, which shows as a flat line at mid-screen.

Changing the sample interval is how the horizontal time base is set. At the
reset interval, the 64 samples span 512 frames (5.2 ms).

## Power spectrum (`special_functions`)

The original names a "special functions" block for an FFT and a power
spectrum and says nothing more. This version fills it in as follows.

- **Transform.** A 64-point discrete Fourier transform of one Megasample. It
  is computed directly, not with FFT butterflies; the result is the same.
- **When.** While the Megasample is being taken. On each sample the block
  updates all 32 bins (k = 0..31), one bin per clk. Samples are a whole audio
  frame (256 clk) apart, so it never falls behind. Slot 0 restarts the sums.
- **Arithmetic.** Twiddle factors are `round(2047 · cos(2πm/64))`, from a
  17-entry quarter-wave table; the sine is the cosine shifted by a quarter
  period. Real and imaginary sums use 30-bit accumulators.
- **Power.** After the last sample, each bin's power is
  `(Re >>> 12)² + (Im >>> 12)²`. The block keeps only its bit length, 0..36,
  which is a logarithmic (about 3 dB per step) magnitude. This takes 32 more
  clk, then `spectrum_done` pulses.
- **Channel.** The right channel when only the right channel is shown,
  otherwise the left.
- **Drawing.** Bin k owns columns 16k..16k+14. Its magenta bar rises from the
  bottom line (479) by 6 lines per magnitude step. Key P turns the bars on
  and off; the transform runs either way.

A constant input gives a single bar in bin 0. For example, a stored level of
-256 gives magnitude 26, a bar 156 lines high.

## Drawing the screen

This is the part that needs the most care, because four sources must meet at
the same pixel on the same clk.

### Raster

`screen_control` counts columns `x` from 0 to 799 and lines `y` from 0 to 527,
one pixel per clk.

| item | columns or lines |
|---|---|
| horizontal sync (active low) | columns 594..688 |
| blanking | columns above 512, lines from 480 up |
| vertical sync (active low) | lines 494..495 |

The horizontal positions are those of the original design. The line and
frame lengths are chosen to match a 31.77 µs line and a 16.78 ms frame (about
60 Hz) at a 25.175 MHz pixel clock. The picture area is the left 513 columns
of 480 lines. The rest of the visible line is black.

### Pipeline stages

All layer generators take the scan position `x, y` (stage 0). Their results
line up at stage 2:

| stage | sig_alias | vol_bal_gen | background | screen_control |
|---|---|---|---|---|
| 0 | `rd_addr = x/8` to the sample RAM | compare x, y with the bar rectangles | | x, y |
| 1 | samples arrive; line numbers computed | register | | hsync/vsync, h/v blank registered |
| 2 | `wf_col` registered | `vb_col` registered | `bg_pix` delayed to this stage | hsync/vsync/blank |
| 3 | `image_creation` registers `rgb`, `vga_hsync`, `vga_vsync` | | | |

`special_functions` also registers its bar test twice, so `sf_on` arrives at
stage 2 too. The VGA outputs therefore describe the pixel three clk behind
the counters.

### Waveform pixels (`sig_alias`)

- **Column to sample.** Each sample is 8 columns wide, so 64 samples fill
  512 columns.
- **Sample to line.** A stored value `v` (12-bit signed) goes on line
  `240 - floor(v · 2^zoom / 8)`, clipped to 0..479. At 1x the full range fits
  the screen. Higher zoom magnifies the region around the centre line.
- **Joining adjacent samples.** Column `8i` (i > 0) lights every line between
  the lines of samples `i-1` and `i`, so adjacent samples are joined by a
  vertical run. The other seven columns of a sample light only its own line.
  The previous sample is kept in a register captured at the last column of
  each sample, so one RAM read per pixel is enough.
- **Channels.** Left wins over right on a shared pixel. The channel mode can
  hide either channel.

### Indicators (`vol_bal_gen`)

Both bars are near the top-left corner and use 16-pixel segments with a
1-pixel gap:

- The volume bar (red) on lines 8..15 fills `vol` segments.
- The balance bar (yellow) on lines 24..31 lights segment number `bal` out of
  positions 0..10, so it sits in the middle when centred.

### Background picture (`ram_interface`, `image_creation`)

**Storage.** The picture is 512 × 480 pixels at 2 bits per pixel, four pixels
per byte, first pixel in bits 1:0. Byte address = `y·128 + x/4`, 61440 bytes.

**Reading.** The memory is read once every four columns:

1. `image_creation` computes the address of the position **three columns
   ahead** of the scan. At the end of a line it wraps into the next line.
   Because the line length is a multiple of four, that position starts a
   byte exactly when `x[1:0] = 01`.
2. On that column `ram_interface` issues the read.
3. One clk later the column register `x_tmp` (x delayed by one clk) equals
   `01`. The byte is loaded into a pixel register.
4. On the other three columns the register shifts right by two bits.

So the register's low two bits always hold the pixel of column `x + 1`, and
three more register stages bring it to stage 2.

**Writing.** A byte offered on `pic_wr_*` is written on the next clk that
does not need a display read. `pic_write_done` then pulses once. Reads always
win, so a write waits at most one clk.

**Colours.** `image_creation` chooses each pixel in this order:

1. waveform: left blue, right green
2. volume bar red, balance marker yellow
3. spectrum bars magenta
4. background palette: black, dark grey, light grey, white

Blanked pixels are black. The output is 8-bit RRRGGGBB.

## Top-level interface (`oscilloscope_top`)

| group | ports |
|---|---|
| clock, reset | `clk` (pixel and system clock, 25.175 MHz intended), `rst_n` (asynchronous, active low) |
| codec | `codec_mclk`, `codec_sclk`, `codec_lrck` out; `codec_sdin` in; `codec_sdout` out |
| keyboard | `kb_clk`, `kb_data` in |
| VGA | `vga_hsync`, `vga_vsync`, `vga_rgb[7:0]` |
| picture memory | `mem_addr[15:0]`, `mem_rd`, `mem_we`, `mem_wdata[7:0]` out; `mem_rdata[7:0]` in, valid one clk after `mem_rd` |
| picture loading | `pic_wr_req`, `pic_wr_addr[15:0]`, `pic_wr_data[7:0]` in; `pic_wr_busy`, `pic_write_done` out |
| status | `status` (`scope_ctrl_t`: vol, bal, zoom, rate, mega, freeze, chan, spectrum), e.g. for LEDs |

Top parameters:

| parameter | default | meaning |
|---|---|---|
| `MEGA_PERIOD` | 3934 | frames between Megasample starts after reset |
| `KB_TIMEOUT` | 2500 | PS/2 frame timeout, in clk |
| `RATE_RESET` | 3 | sample interval after reset, 2^3 = 8 frames |

Shared types, codes and key constants are in `rtl/osc_pkg.sv`.

## Departures and own choices

Points where the original description is contradictory, and the choice made:

- **Channel levels.** Different parts of the original text disagree on
  whether LRCK high means left or right. Here LRCK low is left and LRCK high
  is right, and `ch_select` = 1 means right. This matches the original
  receiver's `ch_select` assignment and its balance rule.
- **Screen width.** The original sync timing calls for about 634 visible
  columns, but its blanking code ends the picture at column 512. The code is
  followed, so the traces use 512 columns.
- **Waveform path.** The original waveform process emitted point coordinates
  from bits 18:10 of each sample, up to column 793. Here samples go through
  block RAM and a scanline renderer, as the original block description says.
  Twelve bits are kept so that zoom has something to magnify.

The original design does not specify the following, so they are my own
choices:

- the clock frequency
- the volume shift count
- the bit order on the codec link
- the keys beyond M/N/W/Q
- the zoom axis (vertical) and its steps
- the sample-interval range, and the Megasample period steps and range
- the Megasample skip rule
- the bar layout and all colours except blue/green for the channels
- the picture format and address map
- the memory timing and the read/write arbitration
- the picture-loading port
- the `data_valid` strobe
- the PS/2 framing checks and timeout
- everything about the spectrum: its length, direct evaluation, scaling,
  logarithmic magnitude, channel choice, bar layout, colour, its place in the
  colour priority (the original priority list does not mention it) and key P

**Not built.** The codec, the picture memory, the keyboard and the monitor
are off-chip. They appear only as behavioural models
in the testbenches: `tb/codec_model.sv` and `tb/picture_memory_model.sv`.

The original design reports 603 flip-flops and 2 block RAMs on an XC3S500E.
A coarse synthesis of this version with yosys gives about 2560 flip-flop
bits plus 1536 bits of sample memory. Without the spectrum block it is about
420 flip-flop bits. The spectrum block holds 64 accumulators of 30 bits and
32 magnitudes of 6 bits in registers, and uses two 12 × 12 multipliers. Its
accumulators could go into block RAM instead.

## Verification

Every block has a self-checking testbench in `tb/` named `tb_<module>.sv`.
Each compares against values computed in the testbench, checks latencies
where they are defined, has a watchdog, and prints
`TB_RESULT checks=N failures=M`. Highlights:

- **`tb_sig_alias`** compares four whole screens against a drawing model,
  covering zoom levels, channel modes, clipping and joins.
- **`tb_special_functions`** feeds three Megasamples (a pure tone, a tone
  with noise, a constant) and compares every bar with an exact DFT computed
  in the testbench with the same twiddle table. It also checks the busy time
  and that the bars vanish when switched off.
- **`tb_ram_interface`** checks the `x + 1` pixel alignment and write
  arbitration against the memory model.
- **`tb_oscilloscope_top`** runs the whole design at its default parameters,
  for about 8.8 M clk (roughly 12 s of run time):
  - It plays the keyboard over PS/2 and compares every DAC word with the
    scaled ADC word.
  - It rebuilds whole VGA frames from the sync outputs and compares them
    pixel by pixel with a picture drawn from the input levels, the controls
    and the picture memory.
  - It checks freeze, unfreeze, zoom, channel modes, the sample interval,
    the Megasample period, joined samples, picture writes and the
    spectrum bars of both channels.
  - It counts each of these mechanisms and fails if one never happens.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/osc_pkg.sv tb/tb_oscilloscope_top.sv \
          --top-module tb_oscilloscope_top -Mdir obj_top
./obj_top/Vtb_oscilloscope_top
```

Use the same pattern for any other `tb_*`. The testbenches do not rely on
X-propagation: every register that is read is reset, and the sample RAMs are
initialised to zero.

To change the design:

- Most sizes are parameters with the defaults above. The sample count,
  8 columns per sample and the 512-column picture are tied together (64 × 8).
- Colours, key codes and layer codes live in `osc_pkg`.
- The stage-2 alignment in `image_creation` must be kept if a layer
  generator's latency changes.
