# A background-rejecting QVGA vision sensor: digital core

Surveillance cameras spend most of their power shipping frames in which nothing of interest
happens. Frame differencing flags every change, including the ones that are part of the
scene: leaves in the wind, ripples on water. This design moves the first filtering step onto
the image sensor itself. For every pixel it learns a *band* of normal levels, `[I_MIN, I_MAX]`,
that opens quickly when the pixel goes outside it and closes slowly otherwise. A pixel that
keeps swinging between the same extremes ends up inside its own band and stops being reported.
A pixel that lands well outside the band is a *hot pixel*. The sensor sends out the ordinary
320x240 gray-scale image, plus a 160x120 bitmap of hot pixels cleaned up by a 3x3 erosion. A
processor downstream only has to look at the bitmap.

The SystemVerilog here is the digital part of such a sensor: the global ADC ramp counter, 320
column ADC latches, 160 column processors, the 375 Kibit reference memory, the erosion filter
bank, the row sequencer and the gray-scale readout. It follows the architecture of the
published chip "A 1.6 mW 320x240-Pixel Vision Sensor with Programmable Dynamic Background
Rejection and Motion Detection". That publication gives the algorithm, the main sizes and the
ramp-time processing. Everything it leaves open was filled in for this RTL, and each such
choice is listed under [Where this RTL goes beyond the published design](#where-this-rtl-goes-beyond-the-published-design).
The analog parts (pixels, column amplifiers, ramp DAC) are not RTL. They connect through ports,
and a behavioural model stands in for them in simulation.

## The algorithm

Each processed pixel `P` (8 bits) has two reference values, `I_MIN` and `I_MAX`. They are kept
at 10 bits: 8 integer bits and 2 fractional bits, so steps of a quarter code are possible. Once
per frame the processor:

| condition (integer part of the threshold vs. `P`) | update |
|---|---|
| `I_MIN > P` (opening below) | `I_MIN -= delta_open` |
| otherwise (closing) | `I_MIN += delta_close` |
| `P > I_MAX` (opening above) | `I_MAX += delta_open` |
| otherwise (closing) | `I_MAX -= delta_close` |

The pixel is **hot** when `I_MIN - P > delta_hot` or `P - I_MAX > delta_hot`. Both tests use the
thresholds from before this frame's update. `delta_open` should be larger than `delta_close`,
so the band opens faster than it closes. The hardware does not enforce this. Updates saturate
at 0 and at 1023.

`delta_open` and `delta_close` count in quarter codes. `delta_hot` counts in whole ADC codes.

## Doing the arithmetic on the ADC ramp

This is the central trick of the design, and the part that takes the most care to follow.

The column ADCs are single-ramp converters. A global counter drives a DAC whose output falls
from the top of the range. In every column, the amplifier works as a comparator: its output goes
high in the clock cycle in which the ramp has fallen to the pixel's level. The column latch
stores the counter value at that edge, and that value is the pixel code.

Here the counter counts *down*, from 255 to 0, one code per clock. At any clock the ramp code
`c` therefore means "levels `>= c` have already been reached". The processors do not need the
digitised pixel. During those same 256 clocks they compare `c` with the integer parts of their
stored thresholds, using plain 8-bit comparators:

```
        clock ->   c = 255 ... P+1   P ... I_MAX+1   I_MAX ... 0
 comp (pixel)      0 ......... 0     1 ........ 1    1 ....... 1
 c <= I_MAX        0 ......... 0     0 ........ 0    1 ....... 1
 OPEN_MAX                            ^ set: comparator rose before c reached I_MAX
 WIDTH             ___________|‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾|___________
 NWIDTH counter                      1 2 ... (P - I_MAX)
 HOT                                 set once the count exceeds delta_hot
```

- **OPEN_MAX** is set if the pixel comparator rises while the ramp is still above `I_MAX`,
  that is, if `P > I_MAX`.
- **OPEN_MIN** is set if the ramp reaches `I_MIN` while the pixel comparator is still low,
  that is, if `I_MIN > P`.
- **WIDTH** is high between the two crossings. One counter (`NWIDTH`) counts its clocks, so it
  ends at `P - I_MAX` on the upper side or at `I_MIN - P` on the lower side. **HOT** is set as
  soon as the count exceeds `delta_hot`.
- The two windows never overlap in time: the lower one ends exactly at the comparator edge,
  where the upper one begins. The counter restarts at that edge, so the two margins are never
  added together, even when `I_MIN > I_MAX`.

After the ramp, one update clock applies the table above. The new thresholds then go back to
memory. No subtractor ever sees the pixel value, and the only per-pixel arithmetic is the
10-bit add/subtract of the update. `rtl/column_processor.sv` is this circuit.

## Row timing

The sensor is a rolling shutter: rows are read top to bottom, one every `ROW_CYCLES` clocks.
With a 4 MHz clock, `ROW_CYCLES = 1111` gives 240 rows at 15 frames per second. Each row goes
through these phases (`rtl/sensor_sequencer.sv`):

| phase | clocks | what happens |
|---|---|---|
| ROWSTART | 1 | column amplifiers reset (`amp_res`); shutter reset of row `rd_row + exposure_rows` (`sh_rst`) |
| SAMP_SIG | 2N | row selected, `phl` low, N pulses on `s`: the signal is sampled N times (gain 2N) |
| SAMP_RST | 2N | the read row is reset (`pix_rst`), `phl` high, N pulses on `s`: the reset level is subtracted |
| LOAD | 3 | processed rows only: read the I_MIN row, then the I_MAX row, from memory; the last clock starts the ramp |
| RAMP | 256 | 64 us: `pre_n` low (ramp connected), `s` high, `len` high; latches capture, processors compare |
| UPDATE | 24 | 6 us: update clock, write I_MIN row, write I_MAX row, hand the hot row to the erosion filters |
| READOUT | 1 + 320 | the row's 320 gray-scale codes leave, one per clock |
| PAD | rest | idle until the row period ends |

At most 633 clocks are busy (N = 7) out of the 1111 available. Only every second row is
processed (rows 0, 2, ..., 238). Processor `k` uses column `2k`, which gives the 160x120 grid.
Odd rows are still converted and read out for the gray-scale image. `exposure_rows = 0` means
a full frame of exposure.

Setting `cfg.bg_init` makes the next frame an initialisation frame. The sequencer samples it at
the start of each frame. In that frame every processor loads `I_MIN = I_MAX = P` and reports no
hot pixels. After reset the reference memory holds no defined data, so the first frame should
be an initialisation frame.

## Reference memory

`rtl/ref_sram.sv` is a single-port synchronous array of 240 words x 1600 bits (384,000 bits).
One word is a full row of the 160 processors' 10-bit thresholds. Words 0-119 hold I_MIN and
words 120-239 hold I_MAX for processed row q = 0-119. Reads have one clock of latency. The
silicon uses a 6T-cell macro, and the array here stands for it. In an ASIC flow, replace it
with a macro of the same shape.

## Erosion filter bank

`rtl/erosion_filter_bank.sv` holds the two previous hot rows. When row `y` arrives it emits
eroded row `y-1`. After the last row of the frame it spends one extra clock emitting the bottom
row. An output pixel stays 1 only if every neighbour selected by the 9-bit `erode_kernel` is 1.
Bit `3*dy + dx` selects the neighbour at row offset `dy-1` and column offset `dx-1`. Neighbours
outside the bitmap are ignored. `9'h1FF` is a full 3x3 erosion, and `9'h010` passes the bitmap
through unchanged.

## Top-level interface (`vision_sensor_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n`, `enable` | in | 4 MHz clock, asynchronous active-low reset, run frames continuously |
| `cfg` (`vs_pkg::cfg_t`) | in | `delta_open`, `delta_close`, `delta_hot`, `bg_init`, `erode_kernel`, `n_samples` (N), `exposure_rows` |
| `col_comp[319:0]` | in | comparator outputs of the analog column amplifiers |
| `ramp_code[7:0]` | out | to the ramp DAC |
| `rd_row`, `row_sel`, `pix_rst`, `sh_row`, `sh_rst` | out | pixel-array row controls |
| `amp_res`, `s`, `phl`, `pre_n`, `len` | out | column amplifier and latch switches |
| `pix_valid`, `pix_x`, `pix_y`, `pix_data` | out | gray-scale stream, one pixel per clock |
| `bm_valid`, `bm_last`, `bm_y`, `bm_row[159:0]` | out | eroded hot-pixel bitmap, one row per valid |
| `frame_start`, `frame_done` | out | frame markers |

Parameters: `N_COLS` (320), `N_ROWS` (240), `SUB` (2), `UPD_CYCLES` (24) and `ROW_CYCLES`
(1111). The processor count and the memory size follow from these. Synthesised at the default
size, the core has about 18,900 word-level cells, 8,730 flip-flop bits and the 384,000-bit
memory.

## Where this RTL goes beyond the published design

The published design gives the algorithm, the ramp-time comparison with OPEN / WIDTH / HOT and
a WIDTH counter, the 8-bit ADC, the 10-bit thresholds, 160 processors, the 240 x 160 x 10-bit
memory, a 3x3 erosion bank, a 4 MHz ramp of 64 us, a 6 us update and 15 frames/s. This RTL
makes the following choices of its own:

- **Down-counting ramp code**, so that the latched code is the pixel value.
- **Hot test.** The rule "margin > delta_hot" is used. One description of the timing speaks of
  the counter *reaching* delta_hot, which would mean `>=`.
- **Update rule.** The update depends only on the comparisons. One description says the update
  relies on OPEN and HOT together.
- **One NWIDTH counter** for both thresholds, restarted at the comparator edge.
- **Units and widths**: 8-bit `delta_open` and `delta_close` in quarter codes, 8-bit
  `delta_hot` in codes. Saturation at 0 and 1023.
- **Sub-sampling.** Column 2k of every even row, rather than any averaging of the 2x2 block.
- **Memory word layout** and single-port, one-clock-latency access.
- **Initialisation frame** (`bg_init`). How the references start is not published.
- **Erosion programmability.** A 9-bit structuring-element mask, with out-of-frame neighbours
  ignored.
- **Row phases** other than the ramp and the update, their order, and one clock per half-pulse
  of `s`. Exposure set by a rolling shutter reset row.
- **Output formats.** One gray pixel per clock after the update phase, and one bitmap row per
  valid.
- **Configuration.** A plain struct input. The chip was configured from an external FPGA.

Not built: the pixel array, the column amplifier/comparator, the ramp DAC (all analog) and the
external FPGA host.

## Simulating

Each testbench checks itself and ends with `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/vs_pkg.sv tb/tb_vision_sensor_top.sv \
          --top-module tb_vision_sensor_top -Mdir obj && ./obj/Vtb_vision_sensor_top
```

| testbench | what it shows |
|---|---|
| `tb_ramp_counter` | 256-clock ramp, codes 255..0, `done` at code 0 |
| `tb_column_adc_latch` | the latch keeps the code of the first comparator edge |
| `tb_column_processor` | thresholds and hot bit against the rules, random and corner cases, init frame |
| `tb_processor_bank` | 8 processors, per-processor results and row-bus slicing |
| `tb_ref_sram` | write / read-back, one-clock latency |
| `tb_erosion_filter_bank` | random bitmaps and kernels against a reference erosion, frame flush |
| `tb_column_readout` | pixel order, count and `done` |
| `tb_sensor_sequencer` | full size, 2 frames: row and frame periods, S pulses, ramp, 24-clock update, memory addresses |
| `tb_periodic_pixel` | a pixel swinging 125 +/- 100 with a 32-frame period: hot at first, absorbed after frame 120 |
| `tb_vision_sensor_top` | 32x16 pixels, 80 frames: gray stream and every bitmap row against a reference model of the whole algorithm, with a swaying patch and a moving object |
| `tb_vision_sensor_full` | the same at the default 320x240 size, 4 frames (about 20 s) |

`tb/column_afe_model.sv` is the behavioural stand-in for the analog front end: the comparator
output is `ramp_code <= pixel` while the ramp is connected. The two end-to-end testbenches are
the same code at two sizes. In both of them, the bitmap rows and gray pixels are checked, and
so are the frame period, the S pulses and the shutter row. The test counts openings, closings,
hot pixels, pixels removed by erosion, the initialisation frame and a mid-run switch of the
kernel to pass-through. Each of these must occur.

## Files

- `rtl/vs_pkg.sv`: sizes, timing constants and the `cfg_t` settings struct.
- `rtl/vision_sensor_top.sv`: the top level.
- `rtl/sensor_sequencer.sv`, `rtl/ramp_counter.sv`, `rtl/column_adc_latch.sv`,
  `rtl/column_processor.sv`, `rtl/processor_bank.sv`, `rtl/ref_sram.sv`,
  `rtl/erosion_filter_bank.sv` and `rtl/column_readout.sv`: the blocks.
- `tb/`: the testbenches above and the front-end model.
