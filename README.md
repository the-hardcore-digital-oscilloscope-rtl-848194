# A 10 MS/s FPGA digital oscilloscope with VGA output

This is the RTL of a digital storage oscilloscope built around an FPGA. An external 12-bit ADC
samples the input at 10 MHz. The FPGA triggers on a user-set level and records one screen of 700
samples. It scales the record into a 700-column trace and measures the minimum, maximum and mean
voltage and the frequency. It then draws the trace, a graticule and a text read-out into a
1024 x 768, 8-bit-per-pixel frame held in external ZBT SRAM, and shows it on a VGA monitor. Six
push buttons set the time scale, the vertical scale and the trigger level. Together the buttons
work like the basic controls of a bench scope.

The design follows a published project proposal for such a scope. That proposal fixes the
block structure and most bus widths, the 700-sample record, the 9-bit trace, the measurement
widths, the 8 x 10 character cells and the double-buffered frame store. It leaves many details
open: clocking, handshakes, encodings, the frequency method, the screen layout and the memory
timing. Those choices are this implementation's, and each is marked as such below and at the top
of every source file.

## Block structure

```
 adc_data/adc_valid ──► triggering ──START──► sampling (700x12 BRAM) ◄─ADDR/DATA─► computation
                    └──────────────────────► sampling                                 │  │
                                                               VMIN VMAX VMEAN FREQ ◄─┘  ▼ 9-bit heights
 btn[5:0] ─► debounce ─► scaling ─DURATION─► sampling, rendering              plotting (700x9 BRAM)
                                  ─SCALE───► computation, rendering                │
                                  ─level───► triggering                             ▼
   rendering ──{x,y,colour}──► frame_buffer ◄── plotting (trace heights)
   rendering ◄──NFRAME──────── frame_buffer ──► two ZBT SRAM chips (one frame each)
   rendering ◄─► charmap       frame_buffer ◄──hcount/vcount── vga ──► RGB, syncs
                               frame_buffer ──24-bit colour───► vga
```

The whole design runs on one clock, `clk`. At 65 MHz this is the pixel clock for
1024 x 768 at 60 Hz: 1344 x 806 clocks per frame, 1,083,264 cycles. The ADC does not share this
clock. Its samples arrive as `adc_data`, with a one-cycle `adc_valid` strobe per conversion,
already synchronised by the board logic. At 65 MHz, 10 MS/s means a strobe on 10 of every 65
cycles.

## Acquisition: trigger, capture, analysis

**Trigger** (`triggering`). Every valid sample is compared with the trigger level
(`sample >= level`). START is raised when this comparison changes in the selected direction:
below to above for a rising slope (`trig_falling = 0`), above to below for a falling slope.
START is combinational, in the same cycle as the crossing sample. That sample therefore becomes
element 0 of the record. The trigger has no hysteresis and no auto-trigger: a flat input leaves
the last record on screen.

**Capture** (`sampling`). When the capture block is armed, START begins a record. After that it
keeps every n-th valid sample until it holds 700. The factor n is taken from the DURATION code at
the trigger and follows a 1-2-5 sequence:

| DURATION | 0 | 1 | 2 | 3 | 4 | 5 | 6 | … | 15 |
|---|---|---|---|---|---|---|---|---|---|
| n | 1 | 2 | 5 | 10 | 20 | 50 | 100 | … | 100000 |

A record spans 700 · n · 100 ns. The reset value, code 3, gives 700 µs across the screen, or
70 µs per division. The full record stays frozen (`data_ready`) until the computation block
releases it. Triggers that arrive in the meantime are ignored.

**Analysis** (`computation`). This block makes two passes over the record at one sample per
clock.

* Pass 1 finds the minimum, maximum and sum of the samples.
* Pass 2 writes one trace height per column to the plotting RAM:
  `h = clamp(256 + ((s − 2048) · G) >>> 3, 0, 511)`. The gain G = 1…8 comes from the SCALE code
  (code + 1, saturating at 8). G = 1 maps the whole 12-bit range onto the 512-pixel window.
  G = 8 shows one ADC step per pixel, the most that 12 bits give on a 9-bit display. Heights
  outside the window clip to its edge.
* Also in pass 2, a comparator with hysteresis counts rising crossings. Its threshold is
  mid = (min + max)/2, with hysteresis ±(max − min)/8. The comparator also records the index of
  the first and the last crossing.
* Two 36-cycle serial divisions follow:
  * VMEAN = sum · 2000 / (700 · 4096)
  * FREQ = (crossings − 1) · 10 MHz / (n · (last − first))

  FREQ is 0 when there are fewer than two crossings, and saturates at 2²⁰ − 1.

Voltages are 15-bit integers in millivolts. The ADC span is taken as 0…2.000 V, so
VMIN = min · 2000 / 4096. Frequency is a 20-bit integer in hertz. The whole analysis takes about
1,480 cycles per record. That is far inside the original budget of 600 cycles per sample.

## Building a frame: the frame store and its engine

This is the least obvious part of the design.

**Storage.** A frame is 1024 x 768 pixels of 8 bits (RGB332), 6.3 Mbit. Two frames do not fit
in block RAM, so each frame lives in its own external ZBT SRAM chip (512K x 36). A 36-bit word
holds four pixels, one in the low 8 bits of each 9-bit byte lane:

* word address = `{0, y[9:0], x[9:2]}`
* lane = `x[1:0]`

A frame therefore occupies 196,608 words. A single pixel is written with one byte-lane write, so
no read-modify-write is needed.

**Roles.** At any time one chip is the *output* buffer and the other is the *construction*
buffer. The output buffer is read for display, and the construction buffer is written by the
engine. Because the two roles are on different chips, display reads and drawing writes never
compete for a bus.

**Memory timing.** The chips are assumed to be pipelined ZBT parts. A command (`ce_n`, `we_n`,
`bwe_n`, `addr`) is held for one cycle. Read data returns two cycles later. Write data must be
driven two cycles later, on `zbt_wdata` with `zbt_wdata_oe`. The data bus is brought out as three
separate signals, so the tristate pad belongs to the board-level wrapper.

**Display path.** The `vga` block sends its counters (hcount 11 bits, vcount 10 bits) to the
frame buffer. Each cycle the frame buffer reads the output chip at that pixel's word and selects
the lane. It expands RGB332 to 24-bit colour by bit replication. The colour is ready 4 cycles
after the counters, and `vga` delays its syncs and blank by the same 4 cycles.

**Engine, once per frame:**

1. **START.** Pulse NFRAME. The renderer latches the current measurements and settings.
2. **ERASE.** Repaint, in background colour, the 700 trace pixels that this buffer received
   two frames ago. A full clear of the frame would cost 786k writes, so erasing is done this way
   instead. The engine keeps the heights it drew into each buffer in a 2 x 700 x 9 history RAM.
3. **RENDER.** Accept the renderer's pixel writes (valid/ready, one per cycle) until it reports
   done. These are the grid (11,932 pixels) and the text (7,680 pixels).
4. **TRACE.** Read the 700 heights from the plotting RAM and set one pixel per column at row
   `543 − h`, recording the heights in the history RAM. The trace is drawn last, so it lies on
   top of the grid.
5. **WAIT.** Stay idle until the output frame has been scanned out, at the start of vertical
   blank (vcount = 768). Then swap the roles and go to START.

One frame costs 21,015 cycles of the 1,083,264 available. The engine therefore spends
nearly all its time waiting for vertical blank. After reset, both chips are cleared to background
in parallel (196,608 cycles), unless `CLEAR_ON_RESET` is 0.

The plotting RAM is a single buffer. Computation may rewrite it while TRACE is reading it.
TRACE takes only 700 cycles, so a frame can at worst show columns from two consecutive records.
The history RAM keeps the erase exact even in that case.

## Screen and read-out

* **Scope window.** 700 x 512 pixels at (162, 32). The graticule has 10 x 8 divisions of
  70 x 64 pixels, plus the right and bottom edges, in grey.
* **Trace.** Green.
* **Text.** Six lines of sixteen 8 x 10 glyph cells at (162, 576), 12 pixels apart, white on
  black. Every cell is rewritten in full each frame, so old text needs no erasing.

  ```
  VMIN   0.492 V
  VMAX   1.460 V
  VMEAN  0.976 V
  FREQ    10000 HZ
  T/DIV     70 US
  V/DIV 250 MV
  ```

  Leading zeros are blanked. T/DIV = 7 · n µs. V/DIV = 2000 / (8 · G) mV, truncated. Numbers are
  converted to decimal by shift-and-add-3 when NFRAME arrives.

The `charmap` block is a 64-glyph, 1-bit font ROM. Its inputs are CHAR (6 bits, ASCII − 0x20,
covering space through `_`) and XY = `{row[3:0], col[3:0]}`. It is read combinationally and
loaded from `rtl/charmap_font.hex`: one byte per glyph row, glyph g and row r on line 10g + r,
bit 7 = column 0. The glyphs are a classic 5 x 7 font placed at columns 1–5 and rows 1–7 of the
cell.

## Controls

`debounce` synchronises each button and passes a new level only after it has been stable for
`DEBOUNCE_CYCLES`, 65,536 by default (about 1 ms at 65 MHz). `scaling` acts on each press, that
is, on each rising edge of a debounced button. All settings saturate at their limits.

| button | action | reset value |
|---|---|---|
| 0 / 1 | DURATION up / down (longer / shorter time scale) | 3 (n = 10) |
| 2 / 3 | SCALE up / down (more / less gain, codes 0–7) | 0 (G = 1) |
| 4 / 5 | trigger level up / down in steps of 64 codes | 2048 |

The trigger slope is a separate level input, `trig_falling`.

## Top-level ports (`oscilloscope_top`)

| port | dir | width | use |
|---|---|---|---|
| clk, rst | in | 1 | 65 MHz clock; synchronous active-high reset |
| adc_data, adc_valid | in | 12, 1 | ADC sample and its strobe |
| btn | in | 6 | push buttons, active high |
| trig_falling | in | 1 | trigger slope |
| zbt_ce_n, zbt_we_n, zbt_wdata_oe | out | 2 | per chip |
| zbt_bwe_n | out | 2 x 4 | byte-lane write enables |
| zbt_addr | out | 2 x 19 | word address |
| zbt_wdata / zbt_rdata | out / in | 2 x 36 | write / read data |
| vga_rgb, vga_hsync_n, vga_vsync_n, vga_blank_n | out | 24, 1, 1, 1 | display |

The syncs follow VESA 1024 x 768 at 60 Hz: H 1024/24/136/160, V 768/3/6/29, both active low.

## Files

`rtl/scope_pkg.sv` holds the shared constants, types (`pixel_wr_t`, …), the decimation and gain
tables, and the palette. Each other module is in `rtl/<module>.sv`:

* `oscilloscope_top`
* `debounce`
* `scaling`
* `triggering`
* `sampling`
* `computation`, with its helper `serial_divider`
* `plotting`
* `rendering`
* `charmap`, with its data file `charmap_font.hex`
* `frame_buffer`
* `vga`

Each file opens with a description of its interface and timing.

`tb/` has one self-checking testbench per module, named `tb_<module>.sv`. It also has
`zbt_sram_model.sv`, a behavioural model of one ZBT chip used by the frame-buffer and top-level
tests. Each testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

Run Verilator from the repository root, because the font ROM is loaded by the relative path
`rtl/charmap_font.hex`. Example, for the full-system test:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/scope_pkg.sv tb/tb_oscilloscope_top.sv --top-module tb_oscilloscope_top
./obj_dir/Vtb_oscilloscope_top
```

Any other test builds the same way with its own name. Lint a module with:

```
verilator --lint-only -Wall -Irtl -y rtl rtl/scope_pkg.sv rtl/<module>.sv --top-module <module>
```

`tb_oscilloscope_top` runs the whole design at its default parameters, including the full
1024 x 768 frame timing and the 65,536-cycle debounce. It takes about 11 s and simulates about
12 million cycles. It feeds a 10 kHz triangle wave (codes 1000–3000) and steps through several
settings: the reset settings, a longer time scale with a rejected button glitch, the maximum
gain (the trace clips), and a raised trigger level with falling slope. For each setting it
checks:

* the measurements against a record it computes itself;
* every trace column, the grid and every text pixel of the displayed buffer;
* the VGA output over whole frames.

It also counts that each mechanism actually occurred: rising and falling triggers, decimated
captures, a debounced press, clipping, trace erase, buffer flips and the idle wait. It measures
the time to construct a frame: 21,015 cycles from NFRAME to the idle wait.

The module tests cover the details:

* the debounce latency;
* saturation of the settings;
* triggers exactly at the level;
* the decimation and re-arm behaviour of the capture;
* trace heights and all four measurements against a reference model;
* every grid and text pixel for several values;
* the power-on clear, the flip timing, the erase and the display read path through the ZBT
  models;
* the full VGA timing.

## Where this implementation departs from, or goes beyond, the original description

* **Clock.** The original planned the frame-drawing budget around 450,000 cycles per frame,
  which implies a 27 MHz clock. Here a single 65 MHz clock is used, so that one pixel per clock
  drives a 1024 x 768 at 60 Hz monitor. The ADC rate enters only as the `adc_valid` strobe.
* **Grid size.** The graticule has 11,932 pixels, against the estimated "about 10,000". A frame
  costs about 21,000 cycles, against the estimated "under 20,000". Both are far inside the frame
  time.
* **Trace-memory read width.** The block diagram labels this bus 10 bits, while the memory is
  700 x 9. The read port is 9 bits.
* **NFRAME.** The diagram also shows the new-frame signal entering the trace memory, but gives
  it no function there. It is used only by the renderer.
* **Choices that are this implementation's own:** the frequency measurement method, the
  erase-by-history scheme, the ZBT chip size and timing, the screen layout, the colours and the
  trigger slope input.
* **Not built:** the ADC chip and the ZBT SRAM chips are external parts (the SRAM has a
  simulation model only). The optional extensions the original lists are not part of this
  design:
  * a variable-gain input amplifier;
  * an auto-set button;
  * colour character maps.
