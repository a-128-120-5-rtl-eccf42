# SPAD time-resolved image sensor SoC — digital core

A 128 × 120 single-photon (SPAD) image sensor meant for the tip of a
microendoscope. The package has only five wires: a clock and a bidirectional
data line, which together form an ARM Serial Wire Debug (SWD) port, plus supplies.
Three ideas shape the digital design:

* **Photon counting in the pixel.** Each pixel has a 14-bit counter that
  counts SPAD pulses. It has no read noise, but its full well is small:
  15 360 events.
* **Noiseless oversampling into SRAM.** The array is read many times per
  output image, at an oversampled internal frame rate. The frames are summed
  in two 262 kb SRAM banks, which extends the dynamic range well beyond one
  counter's range. Two summation modes exist:
  * 32-bit integer sums, using both banks;
  * 16-bit floating-point sums, with the banks used as ping-pong buffers.
* **Time gating for fluorescence lifetime imaging.** Every system clock
  period, a ring oscillator of about 390 ps period is restarted. Counting its
  periods produces gates A and B, which open the pixels only within a
  programmable window after each clock edge. Gate C triggers the pulsed light
  source.

This repository holds the synthesizable RTL for all of that logic. It also
holds behavioural models of the analog parts, used by the testbenches. The
analog parts themselves are outside the RTL: the SPAD front ends, the ring
oscillator, the power-on reset, the regulator and the pads.

## Data flow

```
           SWCLK = sys_clk        SWDIO (swdio_i / swdio_o / swdio_oe)
                 |                          |
                 v                          v
          +------------+  register bus  +-----------+
          | swd_target |<-------------->|    mcu    |--- ro_en ---> ring oscillator (analog)
          +------------+  (6-bit index) | registers |                     |
                                        | sequencer |<-- ro_count --+     | ro_clk
                                        | drift_comp|--- taps ----->|     v
                                        +-----------+          +---------------+
              exposure, row_rst, row_sel,  |   |  pix_valid,     | time_gate_gen |-- gate_c --> light source
              gate_en, interleave          |   |  pix_addr ...   +---------------+
                                           v   |                   gate_a | gate_b
  spad[r][c] --> +-------------+ col_data +----------------+  pix0/1  +------------------+
                 | pixel_array |--------->| column_readout |--------->|    image_proc    |
                 | 120 x 128   |          | latch + pair   |          | read / add / wr  |
                 | spad_pixel  |          | multiplexer    |          | 2 x sram_bank    |
                 +-------------+          +----------------+          +------------------+
                        ^                                                host reads via mcu
                        +--- gate_a / gate_b (per column, interleaved or not)
```

Everything except `time_gate_gen` runs on the system clock. That clock is
also the SWD clock, nominally 12.5 MHz. `time_gate_gen` runs on the ring
oscillator clock. The pixel counters are clocked by their own gated SPAD
pulses.

## The pixel and the array

`spad_pixel` counts rising edges of `spad & en`. Here `en` is the global
exposure signal ANDed with the time gate of the pixel's column. The counter
stops when its four top bits are all one, i.e. at 15 · 1024 = 15 360. It
then holds that value until the row is reset. The row reset clears the
counter asynchronously. Since the counter is clocked by the gated pulse
itself, the time gate takes effect with sub-nanosecond resolution. The gate
does not need to be sampled by any clock.

`pixel_array` holds 120 rows of 128 pixels and distributes the gates:

| `gate_en` | `interleave` | even columns | odd columns |
|-----------|--------------|--------------|-------------|
| 0         | –            | always open  | always open |
| 1         | 0            | gate A       | gate A      |
| 1         | 1            | gate A       | gate B      |

`row_sel` multiplexes one row of counts onto the 128 column lines.

## Frame sequencing (mcu)

The controller is a fixed state machine. Reading one row takes 67 clocks:

| clocks | action |
|--------|--------|
| 1 | select the row |
| 1 | latch its 128 counts in `column_readout` |
| 1 | reset the row, which then counts again |
| 64 | send pixel pairs 0..63 (columns 2p and 2p+1) to `image_proc`, one pair per clock |

One oversampled frame is 120 rows, 8 040 clocks or 0.64 ms at 12.5 MHz.

* **Global shutter:**
  1. 8 clocks of global reset. The ring oscillator also warms up here.
  2. `EXPOSURE` clocks with all pixels exposed.
  3. Read-out of all rows with exposure off. No pixel is exposed while
     others are read.
* **Rolling shutter:** exposure stays on, and rows are read and reset one
  after another. Each row is therefore exposed for one frame time.
  `EXPOSURE` adds idle clocks after every row. The first sweep after a start
  only resets the rows; its counts are discarded.

An output image is the sum of `NFRAMES` frames. The first frame of an image
is written to SRAM without adding the old contents, so the SRAM is never
cleared explicitly.

## Summation in SRAM (image_proc, hdr_adder, sram_bank)

Each bank is 8 192 words × 32 bits (262 144 bits), with one read port and one
write port. The pixel pair of row r and pair p lives at word `{r, p}` (13
bits). The pipeline has two stages:

1. Read the old sums.
2. Add the new counts and write the result back.

This sustains one pixel pair per clock.

| mode | bank 0 | bank 1 | while the host reads |
|------|--------|--------|----------------------|
| 32-bit lossless | sum of the even pixel | sum of the odd pixel | summation is paused and the oscillator stopped |
| 16-bit float | image A: {float(odd), float(even)} | image B: same layout | the other bank keeps summing (ping-pong) |

Details of the two modes:

* 32-bit sums saturate at 2³²−1.
* **Float format** (this design's choice): bits [15:12] are an exponent e
  and bits [11:0] a mantissa m. The value is m · 2^e, up to 4095 · 2¹⁵.
  * Encoding picks the smallest exponent whose mantissa fits, truncates the
    dropped bits and saturates.
  * The error per addition is below one mantissa step, 2^e.
  * Sums below 4096 are exact.
* **Ping-pong:** when an image is finished in float mode, the banks swap.
  * The host reads the finished bank while the next image is summed into the
    other one.
  * Suppose the next image finishes before the host has read all 7 680 words
    of the previous one. The controller then **stalls** until the host
    is done. It does not overwrite unread data.

## Time gates (time_gate_gen, drift_comp)

The oscillator and the tap counter restart on every rising edge of the system
clock. Jitter therefore cannot build up over more than one clock period.

* The restart reaches the oscillator domain through a two-flop synchroniser,
  so tap 0 begins three oscillator periods after the clock edge.
* The gate outputs are registered, which adds one more period.
* As a result, a gate with taps `[start, stop)` opens `(start + 3.5)` periods
  after the clock edge and stays open for `stop − start` periods.
* The counter also records how many periods fitted in the last clock period
  (`ro_count`, 205 at 390 ps and 80 ns).

**Drift compensation.** The user does not program taps directly. Each gate
edge is programmed as a fraction f of the clock period, in units of 1/256.
`drift_comp` sits inside the MCU and recomputes `tap = f · ro_count / 256`.
It updates one of the six edges per clock, round-robin. A gate therefore
stays at the same time even when the oscillator speeds up or slows down. The
oscillator runs only:

* during the global reset warm-up;
* while pixels are exposed with gating on.

When it is stopped, the last count and taps are kept.

The taps cross from the system clock domain into the oscillator domain
without synchronisers. They change rarely and only by small steps.
`ro_count` crosses the other way, and is stable for nearly a whole clock
period when it is sampled.

## Host interface (swd_target)

The interface is standard SWD framing:

* an 8-bit request (start, APnDP, RnW, A[2], A[3], even parity, stop, park);
* a turnaround cycle;
* a 3-bit acknowledge;
* 32 data bits plus parity.

All fields go LSB first. The target samples on the rising edge and drives
just after it. A read takes 49 clocks, counting one turnaround and three
idle bits. Other protocol rules:

* A request with bad parity, stop or park gets no answer.
* 50 ones reset the line.
* A write whose data parity is wrong is dropped.

Debug port registers:

| address | name | access | behaviour |
|---------|------|--------|-----------|
| 0x0 | IDCODE | read | `0x0BA01477` |
| 0x4 | CTRL/STAT | read/write | power-up requests mirrored as acknowledged |
| 0x8 | SELECT | write | bits [7:4] select a bank of four sensor registers |
| 0xC | RDBUFF | read | last access port read |

Access port transfers reach sensor register `{SELECT[7:4], A[3:2]}`. Unlike
ARM's memory access port, a read returns its own data: it is not posted.

Sensor registers (`sensor_pkg::reg_idx_e`):

| idx | name | meaning |
|-----|------|---------|
| 0 | CTRL | bit 0 start, bit 2 mode (0 = 32-bit, 1 = float), bit 3 shutter (0 = rolling, 1 = global), bit 4 gate enable, bit 5 interleave, bit 6 continuous. Mode and shutter change only while idle |
| 1 | NFRAMES | frames summed per image (0 is treated as 1) |
| 2 | EXPOSURE | global: exposure clocks; rolling: extra clocks per row |
| 3 | STATUS | bit 0 busy, bit 1 image ready, bit 2 bank being read, bit 3 stalled, [8:5] state, [31:16] frame in image |
| 4/5/6 | GATE_A/B/C | [7:0] start, [15:8] stop, in 1/256 of the clock period |
| 7 | RO_COUNT | oscillator periods per clock period |
| 8 | RD_ADDR | read pointer: pixel index (32-bit mode) or word index (float mode) |
| 9 | RD_DATA | image data, auto-increment; answers **WAIT** while no image is ready |
| 10 | FRAMES | images completed |
| 11 | TAPS_A | compensated taps of gate A |
| 12 | SCRATCH | free |

To take an image:

1. Write the gates, `NFRAMES`, `EXPOSURE`, then `CTRL` with bit 0 set.
2. Poll `STATUS` bit 1, or simply read `RD_DATA` and retry on WAIT.
3. Read the image from `RD_DATA`:
   * 32-bit mode: 15 360 reads, pixel `row·128 + col`. Integration then
     restarts if continuous mode is set.
   * Float mode: 7 680 reads, two pixels per word (odd column in the upper
     half). The pointer resets at every bank swap.

## Clocks and resets

* `por_n`, the power-on reset output, is synchronised separately into both
  clock domains (`reset_sync`).
* The pixel counters are reset asynchronously, by the row resets and while
  the chip is in reset.
* The SRAM contents are not reset.

## What follows the published sensor and what is this design's own

**Taken from the published sensor:**

* the 128 × 120 array;
* the 14-bit counter with its 15 360 limit;
* the two 262 kb banks;
* the read / add-transform / write structure;
* the 32-bit parallel mode, paused for read-out, and the 16-bit float
  ping-pong mode;
* rolling and global shutter;
* pixel-pair read-out, 0..63 per row, with the column latch and row reset;
* SWD as the only interface, on a clock and data pad;
* the ring oscillator time gates:
  * restart every clock;
  * start/stop registers;
  * gates A, B and C;
  * odd/even interleave;
  * drift compensation by counting oscillator periods per clock.

**Chosen here, because the description does not give it:**

* the bank organisation (8192 × 32, 1R1W);
* the float format;
* the saturation rules;
* the register map;
* the SWD details (non-posted reads, IDCODE value, no JTAG switch sequence);
* the row timing (1 + 1 + 1 + 64 clocks);
* the 8-clock global reset;
* the stall policy of the ping-pong;
* turning the oscillator on only around exposure;
* the fractional gate registers;
* the round-robin compensation.

The controller is a hard-wired state machine, not a programmable
microcontroller core.

**Not modelled:**

* the analog parts: SPAD, oscillator, reset, regulator and pads;
* the read/reset race that made a corner of the fabricated array
  insensitive. That was a defect, not a function.

Throughput was not tuned to the published rates. For example, an SWD read of
one 32-bit pixel costs 49 clocks, so a full 32-bit image costs about 60 ms of
read-out at 12.5 MHz.

## Files

* `rtl/sensor_pkg.sv`: geometry, modes, register indices, float functions.
* `rtl/spad_pixel.sv`, `rtl/pixel_array.sv`, `rtl/column_readout.sv`
* `rtl/hdr_adder.sv`, `rtl/sram_bank.sv`, `rtl/image_proc.sv`
* `rtl/time_gate_gen.sv`, `rtl/drift_comp.sv`
* `rtl/swd_target.sv`, `rtl/mcu.sv`, `rtl/reset_sync.sv`
* `rtl/spad_sensor_soc.sv`: the top.
* `tb/tb_<block>.sv`: one self-checking testbench per block.
* `tb/swd_host_model.sv`: behavioural SWD host.
* `tb/ring_osc_model.sv`: behavioural oscillator with restart and adjustable
  period.
* `tb/soc_test_bench.sv`: end-to-end environment with a photon source and a
  reference model.
* `tb/tb_spad_sensor_soc.sv`: all scenarios at 8 × 16 pixels.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
through a watchdog. Use Verilator 5 with timing support. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/sensor_pkg.sv tb/tb_spad_sensor_soc.sv --top-module tb_spad_sensor_soc
./obj_dir/Vtb_spad_sensor_soc
```

Replace the testbench name for any other block. `tb_spad_sensor_soc` covers
these scenarios:

* global shutter with gates A/B interleaved;
* pixel saturation;
* 32-bit summation with paused integration;
* RO drift with float ping-pong, including a late host (stall);
* rolling shutter with its reset sweep;
* a WAIT answer.

It counts each mechanism and fails if one never occurs. It takes about 20 s.
The largest end-to-end simulation is the 8 × 16 array of
`tb_spad_sensor_soc`. The pixel array alone is simulated at its full
128 × 120 size in `tb_pixel_array` (about 10 s). The `FULL` switch of
`soc_test_bench` selects a single float-mode global-shutter operation for a
full 128 × 120 run. That build takes about 7 minutes with 8 compile jobs, and
the simulation needs well over 5 minutes. It is slow because every one of the
15 360 pixel counters has its own clock.

To change the array size, override `ROWS` and `COLS` on `spad_sensor_soc`.
The SRAM depth follows as `ROWS` rounded up to a power of two × `COLS/2`.
