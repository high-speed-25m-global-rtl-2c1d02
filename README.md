# Digital readout of a 25 Mpixel global shutter image sensor

This is the synthesizable digital part of a high-speed 25 Mpixel global shutter
CMOS image sensor. The sensor has 2.5 µm charge-domain pixels, 10/12 bit
column-parallel ramp ADCs and sub-LVDS outputs. The ADCs measure time with two
clocks and with both edges of the fast one. The design follows the sensor
published as *"High speed 25M global shutter image sensor with 2.5 μm pixel"*
(150 fps at 10 bit, 40 fps at 12 bit). Where that publication gives only a
block's purpose, the logic here is this design's own. Each such choice is
listed below under "Choices made here".

The analog parts are not in the RTL: pixels, row drivers, PGAs,
sample-and-holds, ramp generator, comparators, clock generation and sub-LVDS
drivers. The top module drives their control inputs. It takes the column
comparator outputs as inputs and produces the serial bit streams.

```
            CLK_L domain                         CLK_H domain (both edges)
 cfg ──► readout_sequencer ──► pixel controls (grst, gtx, row_*), S&H, ramp
               │  conv/clear/latch
               ▼
   comp_top ─► adc_counter_bank (top: columns 1,3,5,...)  ─► data_block ─► ser_top[32]
   comp_bot ─► adc_counter_bank (bottom: columns 2,4,6,...)─► data_block ─► ser_bot[32]
               (2560 × dcde_counter each)                    (mux, eq.(1), test
                                                              pattern, serializer)
```

## The column counter: two clocks, both edges

Each column compares its sampled pixel level against a common ramp. The
comparator output `comp` rises at the crossing time t_c. Counting a fast clock
for the whole ramp in every column would cost too much power, so the time from
t_c to the ramp end is measured in three parts (`rtl/dcde_counter.sv`):

* **CNT_MSB**, clocked by the slow clock CLK_L = CLK_H / K. `MSB_EN` is `comp`
  sampled by CLK_L. CNT_MSB counts the whole CLK_L periods from the first CLK_L
  edge after t_c to the ramp end. During most of the ramp this is the only
  counter that toggles.
* **CNT_LSB**, clocked by CLK_H. `LSB_EN = comp & conv_en & ~MSB_EN` is high
  only from t_c to the next CLK_L edge, so this counter runs for at most one
  CLK_L period.
* **CNT_EB**, the extra bit. `LSB_EN` is also registered on the *falling* edge
  of CLK_H (`lsb_f`). At each CLK_H rising edge:
  * `LSB_EN & lsb_f` means a falling edge and the next rising edge both lie in
    the window. That is one full CLK_H period, so CNT_LSB advances.
  * `LSB_EN ^ lsb_f` means an edge whose partner lies outside the window, so
    CNT_EB advances.

  Within one window CNT_EB can pulse at most twice. With the window shape used
  here it pulses at most once.

The ADC code is the number of CLK_H edges, rising and falling, between t_c and
the ramp end:

    DN = 2·K·N_MSB + 2·N_LSB + N_EB          (computed in rtl/dn_calc.sv)

The code therefore has a resolution of half a CLK_H period. A 10 bit ramp lasts
2^10 half periods, which is 64 CLK_L periods at K = 8. A 12 bit ramp lasts
256 CLK_L periods.

Worked example, K = 8 (a CLK_L period holds 16 half periods), ramp of 64 CLK_L
periods, crossing 37.5 half periods after the ramp start:

* The first CLK_L edge after the crossing is at 48 half periods, so
  N_MSB = 64 − 3 = 61.
* The window (37.5, 48] holds 11 edges. Its first edge, at 38, is a rising
  edge with no falling partner before it, so N_EB = 1. The other ten edges form
  five falling/rising pairs (39/40 … 47/48), so N_LSB = 5.
* DN = 16·61 + 2·5 + 1 = 987, which equals 1024 − 37.

Timing rules that the rest of the design relies on:

* CLK_L rising edges coincide with CLK_H rising edges. Both clocks come from
  outside the design.
* `conv_en` (the top's `ramp_en`) is a CLK_L-domain signal that is high for
  exactly the ramp.
* `comp` must be low when a ramp starts. It is asynchronous.
* `cnt_clr` zeroes all three counters.
* `latch` copies them to `count_q` on a CLK_L edge. The data block reads that
  copy while the next row converts.

### Digital and analog CDS

Correlated double sampling (CDS) removes the pixel's reset level from its
signal level. Both methods are supported, selected per frame by `cfg.dcds`:

* **Analog CDS** (`dcds = 0`) is done in the column PGA. Each row gets one
  signal ramp, counted up.
* **Digital CDS** (`dcds = 1`): each row first gets a reset ramp of R_SIG/4
  CLK_L periods, counted *down*, then the signal ramp, counted up. The counters
  hold signed net values. Equation (1) is linear, so `dn_calc` then yields
  signal minus reset directly.

`dn_calc` clamps the result to 0 … 2^bits − 1: digital CDS can give negative
codes, and a pixel crossing in the first half period gives 2^bits. The data
block counts clamped words in `clamp_cnt`.

## Row pipeline and global shutter timing

`rtl/readout_sequencer.sv` runs on CLK_L and divides time into row slots.

**Global shutter.** `grst` holds all photodiodes in reset outside exposure. It
falls `exp_rows` slots before the end of a frame. The exposure ends with `gtx`,
a one-cycle global transfer of every photodiode's charge into its in-pixel
memory node, in cycle 0 of the next frame. Frames follow one another, so the
next exposure runs while the memory nodes are being read out.

**Row slots.** A frame is ROWS + 2 + `vblank` slots long. In slot *s*:

| work in slot *s*               | row   | when (CLK_L cycle *t* in the slot)                 |
|--------------------------------|-------|----------------------------------------------------|
| latch the counters             | s − 2 | t = 0                                              |
| clear the counters, announce the line to the data blocks | s − 2 / s − 1 | t = 1            |
| sample through PGA into S&H bank `sh_bank` | s | row_rst 1–2, sh_rst 3, row_tx 4–5, sh_sig 6, row_sel 1–6 |
| convert from the other S&H bank | s − 1 | from t = OVH: reset ramp (digital CDS only), 1 idle cycle, signal ramp |
| send the line on the lanes     | s − 2 | from t = 1, (3 + 80) words                         |

The slot length is OVH + R_SIG + 1 CLK_L cycles. Digital CDS adds R_RST + 1
cycles. R_SIG = 2^bits / (2K) and R_RST = R_SIG / 4.

Depth, CDS mode, exposure and blanking are captured at a frame boundary. The
test pattern setting takes effect immediately. The first frame after
`cfg.stream_en` rises was exposed with `grst` high, so it reads out dark.

## Data path to the lanes

The array's columns are split between the two edges of the array: odd columns
(1, 3, 5, … counting from 1) go to the top readout and even columns to the
bottom. Each side has its own counter bank and data block
(`rtl/data_block.sv`).

**Channel multiplexing.** Lane *l* of a side carries that side's columns
l·80 … l·80+79, in order. With 2560 columns and 32 lanes that is 80 columns per
lane. The side's columns are counted from 0 here, so array column (1-based)
= 2·j + 1 on top and 2·j + 2 at the bottom.

**Per word.** For each word the data block selects the column's latched counts,
applies equation (1) (`dn_calc`) and optionally substitutes a test pattern
(`rtl/test_pattern_gen.sv`). The patterns are: fixed value, column index, row
index, row + column, each masked to the word width.

**Framing.** Each line on each lane is:

    HDR0 (all ones)  HDR1 (all zeros)  SOF | SOL  pixel[0] … pixel[79]

* SOF = 0xC00 marks the first line of a frame. SOL = 0x800 marks the other
  lines.
* Idle time is filled with TRAIN = 0x5A4, so a receiver can find word
  boundaries.
* Values are given for 12 bit words. In 10 bit mode the two LSBs are dropped.

**Serialization.** `rtl/lane_serializer.sv` shifts each word out MSB first, two
bits per CLK_H cycle: `ser[1]` for the first half of the cycle and `ser[0]` for
the second. A double-data-rate output cell then drives the sub-LVDS pair at
2 × f(CLK_H). A 10 bit word takes 5 cycles and a 12 bit word takes 6.

**Timing.** A line starts within one word period of `line_start`. If a new
line is announced before the previous one has finished, the sticky `overrun`
flag is set.

## Rates

These figures assume CLK_H = 480 MHz. The publication does not state the clock
frequencies, so this is this design's assumption. It gives 960 Mbit/s per lane,
the sub-LVDS maximum.

| mode                   | row slot (CLK_L / CLK_H cycles) | frame (5122 slots) | frame rate | line on lane (cycles) |
|------------------------|-------------|------------|-----------|-----|
| 10 bit, analog CDS     | 73 / 584    | 6.23 ms    | 160.5 fps | 415 |
| 10 bit, digital CDS    | 90 / 720    | 7.68 ms    | 130 fps   | 415 |
| 12 bit, analog CDS     | 265 / 2120  | 22.6 ms    | 44.2 fps  | 498 |
| 12 bit, digital CDS    | 330 / 2640  | 28.2 ms    | 35.5 fps  | 498 |

The sensor's rated 150 fps (10 bit) and 40 fps (12 bit) are met with analog CDS.
Digital CDS costs the reset ramp.

## Parameters and configuration

| parameter (gs_sensor_top) | default | meaning |
|---|---|---|
| `COLS`  | 5120 | pixel columns, half per side |
| `ROWS`  | 5120 | pixel rows |
| `K`     | 8    | CLK_H / CLK_L |
| `LANES` | 32   | lanes per side; must divide COLS/2 |
| `OVH`   | 8    | CLK_L cycles of row sampling before the first ramp |

Counter widths are set in `rtl/cis_pkg.sv`: MSB 11 bits, LSB 6 bits, EB 3 bits,
all signed. They cover K up to 31 and 12 bit ramps.

The configuration is the `cfg_t` struct:

| field | meaning |
|---|---|
| `stream_en` | run frames back to back |
| `adc_mode`  | `ADC_10B` or `ADC_12B` |
| `dcds`      | select digital CDS |
| `tp_mode`, `tp_value` | test pattern and its fixed value |
| `exp_rows`  | exposure in row slots |
| `vblank`    | extra slots per frame |

The sensor's register interface is not described, so none is provided.

## Choices made here

From the published description this design takes:

* the array size class (25 Mpixel)
* the split of odd and even columns between the top and bottom readouts
* the PGA → S&H → ADC chain, with sampling overlapping the conversion of the
  previous row
* CDS in analog or digital form
* CNT_MSB on CLK_L, CNT_LSB on CLK_H, and CNT_EB derived from LSB_EN delayed
  by the CLK_H edges
* equation (1), computed after the column multiplexer
* the data block's tasks: channel multiplexing, test patterns and
  serialization
* the 960 Mbit/s lanes
* 10/12 bit depth at 150/40 fps
* GRST held high before exposure, and the memory-node global shutter with
  pipelined exposure

This design's own choices:

* **Counter windows and EB logic.** The exact MSB_EN/LSB_EN windows (counting
  from the crossing to the ramp end) and the pairing logic for CNT_EB. The
  published text describes these only in outline.
* **Counter extras.** Up/down counting for digital CDS, and the output latch in
  each column.
* **Sizes and clocks.** K = 8, 5120 × 5120 pixels, 32 lanes per side, and
  CLK_H = 480 MHz. None of these is given.
* **Slot timing.** The slot layout and every pixel pulse position and width,
  the reset ramp length (R_SIG/4), and two S&H banks alternating per slot.
* **Data block details.** The lane framing words, the channel grouping, the
  test pattern set, the output clamping, and two bits per cycle in the
  serializer.

## Not included

* **Analog and process-specific parts:** pixel array, row drivers, PGA,
  sample-and-hold, ramp generator and comparators, sub-LVDS drivers, clock
  generation.
* **Parts not described by the source:** a register/control interface and
  temperature or bias circuits.
* **The data block's unnamed "etc." tasks.**
* **Routing of shared row control lines.** The sharing of pixels and row
  control lines between vertical neighbours is a matter for the row driver
  and is not represented.

## How far it has been checked

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

* **`tb_dcde_counter`.** Sweeps every crossing position of a short ramp and
  random positions of 10 bit ramps, alone and as digital CDS pairs. It checks
  each counter against a prediction made from the crossing time.
* **`tb_adc_counter_bank`.** 16 columns with independent crossings.
* **`tb_dn_calc`, `tb_test_pattern_gen`, `tb_lane_serializer`.** Random
  vectors against their definitions. The serializer test also checks the word
  period.
* **`tb_data_block`.** A bit-level receiver finds the headers and checks
  every word. It also checks idle words, latency, both depths, all patterns,
  clamping and overrun.
* **`tb_readout_sequencer`.** Checks every control output, cycle by cycle,
  against the slot specification across configuration changes.
* **`tb_gs_sensor_top`.** End to end at 32 × 6 pixels and 4 lanes per side.
  It runs seven frames through all depth, CDS and test-pattern combinations.
  `tb/sensor_model.sv` is a behavioural model of the S&H, ramp and comparators
  plus a lane receiver; it predicts and checks every pixel word. The testbench
  also checks frame periods and exposure windows, and that extra-bit counts,
  clamping both ways, non-crossing pixels, SOF and mode switches all occurred.
* **`tb_gs_sensor_full`.** The top at its default parameters (5120 × 5120,
  64 lanes). It starts a frame and checks the first 8 rows, 5120 words each.
  It measures the row slot, which gives 160.5 fps at 480 MHz. A whole
  full-size frame (about 3 million CLK_H cycles with 5120 columns) has not been
  simulated.
* **`tb_gs_sensor_rate12`.** The same full-size top in 12 bit mode with
  analog CDS. It checks the first 3 rows as 12 bit words and measures a
  2120 CLK_H cycle row slot: 44.2 fps at 480 MHz, against the 40 fps target.

Limits:

* The clock relationship between CLK_L and CLK_H is assumed, not generated.
  The counter logic relies on their rising edges coinciding.
* `comp` is sampled asynchronously by the CLK_H falling-edge register.
  Metastability handling in the column is not modelled.
* The sequencer's outputs are decoded from its state registers. They are not
  individually retimed for the analog drivers.

## Simulating

Verilator 5 with `--timing`. All files share `rtl/cis_pkg.sv`. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb \
    rtl/cis_pkg.sv tb/tb_gs_sensor_top.sv --top-module tb_gs_sensor_top -o sim
./obj_dir/sim
```

Substitute any testbench name. The testbenches use a 1 ns = ¼ CLK_H period
time base, so crossings fall between clock edges. The two full-size testbenches
build in one to several minutes and run in seconds.

## Files

| file | content |
|---|---|
| `rtl/cis_pkg.sv` | shared types (`col_count_t`, `cfg_t`, modes), widths, framing words |
| `rtl/dcde_counter.sv` | one column's double clock, double edge counter and latch |
| `rtl/adc_counter_bank.sv` | one side's column counters |
| `rtl/dn_calc.sv` | equation (1) with clamping |
| `rtl/test_pattern_gen.sv` | test patterns |
| `rtl/lane_serializer.sv` | 10/12 bit word to 2 bits per cycle |
| `rtl/data_block.sv` | per side: channel mux, codes, patterns, framing, serializers |
| `rtl/readout_sequencer.sv` | global shutter and row pipeline timing |
| `rtl/gs_sensor_top.sv` | the top |
| `tb/sensor_model.sv` | behavioural analog column chain and lane receiver for the sensor testbenches |
| `tb/tb_*.sv` | testbenches |
