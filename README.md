# Infrared target recognition accelerator: Round 0 and Round 1 in SystemVerilog

An infrared automatic target recognition (ATR) program looks for ground
vehicles in a 480 x 640 image. It works in rounds. Round 0 is the most costly
round. It tests every pixel against six *template pairs*. Each pair has a
background template and a target template of 30 points each, placed around
the pixel. The pixel becomes a *region of interest* (ROI) for one target
group when its target points are hot or cold enough compared with its
background points. Round 1 then tests every ROI again with a finer
correlation over 40 point pairs.

This RTL accelerates both rounds for a PCI co-processor board with several
FPGA modules:

* **Round 0 uses six identical chips, one per template pair.** The host
  broadcasts an image strip into the SRAM of every chip and gives each chip
  its own template pair. All six chips then test the strip in parallel. Each
  chip tests two neighbouring pixels at a time and reads one 16-bit SRAM word
  per cycle, so a pixel pair costs 60 cycles. Each chip writes the address of
  every ROI it finds into its own SRAM and then raises an interrupt.
* **Round 1 uses one chip** that the host feeds with point pairs. It answers
  after a fixed latency.

All arithmetic is integer, and no chip divides or takes a square root.

## The Round 0 test without division

For one pixel and one template pair, the original algorithm works as
follows:

1. Take the 30 background values `b[i]` and their mean `MEAN`.
2. Add up how far each background point and each target point `t[i]` lies
   above the mean (HOT) or below it (COLD).
3. Compute `hot = (TRG_Hot - BKG_Hot) / (TRG_Hot + BKG_Hot)`, clamped at 0,
   and `cold` in the same way.
4. The pixel is an ROI if `hot + cold >= 0.65`.

The hardware scales everything by 30, so the mean becomes the plain sum
`SUM = b[1] + ... + b[30]`, and it multiplies the divisions away:

| step | what is computed | unit |
|---|---|---|
| TEMPERATURE | for every point `p`: if `30p > SUM` then `Hot30 += 30p - SUM`, else `Cold30 += SUM - 30p`. This is done separately for background and target, giving `BKG_Hot30, BKG_Cold30, TRG_Hot30, TRG_Cold30` | `temperature_unit` |
| CONVERT | `Hot_N = max(TRG_Hot30 - BKG_Hot30, 0)`, `Hot_D = TRG_Hot30 + BKG_Hot30`, and the same for Cold | `convert_unit` |
| ASSERT | ROI if `20 (Hot_N Cold_D + Cold_N Hot_D) - 13 (Hot_D Cold_D) >= 0`, because `0.65 = 13/20` | `assert_unit` |

The multiplications by 30, 20 and 13 are shifts and adds
(`30p = 32p - 2p`, `20X = 16X + 4X`, `13Y = 8Y + 4Y + Y`).

Pixels are kept with **five bits**, the top five bits of the 8-bit input.
The widths follow from that:

* `SUM` is at most 930, which needs 10 bits.
* Each HOT or COLD sum is at most 30 x 930 = 27,900.
* A denominator is at most 55,800, which needs 16 bits.
* The three products need 32 bits, and the final comparison needs 38 bits.

One edge case follows the integer form, not the original floating-point
code. Suppose a denominator is zero, for example `Hot_D = 0` because no
point lies above the mean. Its numerator is then zero too, all three
products vanish, and the test reads `0 >= 0`, so the pixel counts as an
ROI. The original code would divide by zero there. Elsewhere the two forms
give the same decisions, as the whole-frame test shows.

### TEMPERATURE unit

The points of a template pair arrive as a stream: the 30 background points
first, then the 30 target points.

* **Background points:** the unit adds each one into `SUM` and also stores
  it in a 30-entry buffer.
* **Target points:** `SUM` is complete by then. With each target point `t[i]`
  the unit also reads `b[i]` back from the buffer. Both points go through
  their own comparator and adder in the same cycle.

The four sums are therefore ready one cycle after the last target point.
No point is read twice from the SRAM.

### ASSERT unit

The three products `Hot_N·Cold_D`, `Cold_N·Hot_D` and `Hot_D·Cold_D` come
from bit-serial shift-and-add multipliers. Each cycle they consume one bit
of `Cold_D` or `Hot_D`, least significant bit first. A decision takes 16
cycles of accumulation plus one cycle for the final comparison, so 17 in
all.

## One Round 0 chip

```
 host bus ──► registers ──► tp_buffer (60 x 16-bit offsets, circular)
                 │                 │ offset
                 ▼                 ▼
            r0_sequencer ── pixel + offset ──► sram_ctrl ◄──► 64K x 16 SRAM
                 ▲   │ tags                     │ word {pixel n+1, pixel n}
                 │   ▼                          ▼
                 │  compute_unit: TEMPERATURE A (low byte)  ─┐
                 │                TEMPERATURE B (high byte) ─┴► latch ─► mux ─► CONVERT ─► ASSERT
                 └─────────── roi_a, roi_b ◄────────────────────────────────────────────────┘
```

### Two pixels from one read

A plain line-by-line image in a 16-bit memory holds two pixels per word.
With that layout, the pair n+1, n+2 would straddle two words. Instead, the
SRAM controller stores word `k` as `{pixel k+1, pixel k}` (high byte, low
byte), so every pixel except the first and last appears twice. N+1 pixels
loaded fill N words. This is why a 64K-word SRAM holds only 64K pixels.

The payoff is this: for a pixel pair (n, n+1) and a test point at offset
`o`, the single word at address `n + o` holds the point for pixel n (low
byte) and the point for pixel n+1 (high byte). One read per cycle therefore
feeds both TEMPERATURE units.

### Sequencing and timing

The host sets the area to test with three values:

* `BASE`: the address of the first pixel.
* `DX`: the number of pixels per row.
* `DY`: the number of rows.

Rows are `IMG_W` = 640 words apart. The sequencer takes the pixels two at a
time in scan order. For each pair it reads 60 words at `pixel + offset[k]`,
one per cycle. It tags each word as "first of the pair" and as background
or target. The next pair starts in the very next cycle.

The two TEMPERATURE results are latched. One CONVERT unit and one ASSERT
unit then process them one after the other, first pixel n and then pixel
n+1. The decisions come out 40 cycles after the last word of the pair. That
is well before the next pair's 60 reads end, so the latch is always free.
An assertion checks this.

Every ROI address goes into a small queue. It is then written into the
SRAM list that starts at `ROI_BASE`. An ROI write takes the SRAM for one
cycle and holds back the read stream for that cycle.

Test time is `ceil(DX/2) · DY · 60` cycles, plus one cycle per ROI, plus
about 40 cycles to drain. A whole 480 x 640 frame costs 9.2 M cycles per
chip, or 0.58 s at 16 MHz. The six template pairs run at the same time on
the six chips.

If `DX` is odd, the second pixel of the last pair in a row lies outside the
area. Its decision is dropped.

### SRAM arbitration

The SRAM controller is the only user of the SRAM. It grants one access per
cycle, in this priority order:

1. ROI write
2. test-point read
3. host image write
4. host read-back

Read data arrives one cycle after the address.

## The Round 1 chip

For one ROI and one template, the host sends 40 point pairs `(P_i, Q_i)`
with 4 bits per point. Each 16-bit write carries two pairs: pair `i` for
the first half (SumP) and pair `i+20` for the second half (SumM), laid out
as `{P_i, Q_i, P_i+20, Q_i+20}`. The chip accumulates:

```
SumP = Σ_{1..20} |P-Q|      SumM = Σ_{21..40} |P-Q|      SSum = Σ_{1..40} (P-Q)²
```

The write that completes the 20th word starts a five-stage pipeline:

1. `Sum`, `SumP - SumM` and `40·SSum`
2. the two squares
3. `SM = 40·SSum - Sum²`
4. `400·(SumP-SumM)²` and `81·SM`
5. the comparison

The ROI passes to Round 2 if `SumP > SumM` and `400 (SumP-SumM)² >= 81 SM`.
This is `correlation >= 0.45` with the square root and the division
removed, since `0.45² = 81/400`.

The result is valid exactly **5 cycles** after the last write. The host
reads it after a fixed delay, so the chip needs no interrupt. The first
write of the next template clears the sums.

The parameter `DBG_READ = 1` adds host read-back of SumP, SumM and SSum.
This is a debugging variant, and it is off by default.

## Host view

All chips share one register bus, `hbus_req_t` / `hbus_rsp_t` in
`atr_pkg`:

* The host raises `req` with `we`, a 4-bit register number and 16-bit
  data, and holds it until a one-cycle `ack`.
* Read data comes with `ack`.
* `host_chip` selects the chip: 0–5 are the Round 0 chips, 6 is the Round 1
  chip, and 15 broadcasts a write to all Round 0 chips. The broadcast is
  acknowledged when the slowest chip has acknowledged.
* A request to a missing chip is acknowledged with zero data.

Round 0 registers (`r0_reg_e`):

| # | name | access | meaning |
|---|---|---|---|
| 0 | CMD | W | bit 0 start, bit 1 clear test points, bit 2 acknowledge interrupt |
| 1 | STATUS | R | bit 0 busy, bit 1 irq, bits 15:8 number of test points held |
| 2 | IMG_ADDR | W | first SRAM word of the next image load |
| 3 | IMG_DATA | W | next 8-bit pixel (bits 7:0) of the image stream |
| 4 | TP_DATA | W | append one 16-bit offset (30 background, then 30 target) |
| 5–7 | BASE, DX, DY | R/W | area to test |
| 8 | ROI_BASE | R/W | start of the ROI list in SRAM |
| 9 | ROI_COUNT | R | ROIs written by the last test |
| 10 | RD_ADDR | W | SRAM read-back pointer |
| 11 | RD_DATA | R | SRAM word at the pointer, then the pointer advances |

Round 1 registers (`r1_reg_e`):

| # | name | access | meaning |
|---|---|---|---|
| 0 | CMD | W | bit 0 clears the sums |
| 1 | PAIRS_IN | W | two point pairs |
| 2 | RESULT | R | bit 0 valid, bit 1 pass |
| 3–5 | DBG_SUMP, DBG_SUMM, DBG_SSUM | R | only with `DBG_READ` |

A Round 0 run goes like this:

1. Broadcast `IMG_ADDR` and the pixels of the strip.
2. Broadcast `BASE`, `DX`, `DY` and `ROI_BASE`.
3. Broadcast CMD=2 to clear the test points.
4. Write each chip's 60 offsets to that chip.
5. Broadcast CMD=1 to start all chips.
6. Wait for the interrupts.
7. For each chip, read `ROI_COUNT`, set `RD_ADDR = ROI_BASE` and read the
   list.
8. Acknowledge with CMD=4.

Offsets are added modulo 2¹⁶, so a point above or to the left of the pixel
is a negative (two's-complement) offset. The strip in SRAM needs margin rows
above and below the tested rows for the template to reach into.

## Where this design departs from the original design or fills gaps

* **One clock.** The original runs the ASSERT unit on a clock twice the
  chip clock (33 vs 16 MHz). Here ASSERT uses the chip clock. Its two
  17-cycle decisions per pixel pair still fit within the pair's 60 cycles,
  so throughput is unchanged.
* **Host bus.** The board's real host bus protocol (pins and timing) is not
  modelled. The request/acknowledge bus, the chip numbering, the broadcast
  code and both register maps are this design's own.
* **ROI list location.** The ROI list position (`ROI_BASE`) is an extra
  register. The original passes only base address, delta_x and delta_y.
  Here delta_x and delta_y are read as the area's width and height.
* **Chosen details.** The following are choices, not given facts:
  * the byte order of the stored pixel pair
  * quantising to five bits by keeping the top bits
  * sending background points before target points
  * synchronous SRAM timing
  * the SRAM priority order
  * how the Round 1 word is laid out
* **Reset.** Control state and registers reset asynchronously with
  active-low `rst_n`. The storage arrays (test-point offsets, background
  buffers) are not reset, because they are always written before they are
  read.
* **Outside this RTL.** These are not part of the design:
  * the 64K x 16 SRAMs, which are ports of `atr_top`; a behavioural model,
    `tb/sram_64kx16.sv`, is used in simulation
  * the PCI bridge FPGA
  * the clock and configuration FPGA
  * the module DRAM
  * the inter-module busses, which Round 0 does not use
  * the host software that shares the modules between programs and
    reconfigures them at run time. Running Round 0 on fewer chips needs only
    the host to run the six template pairs in several passes, or
    `N_R0` to be set lower.
* **Sizes.** All sizes are the original ones: six chips, 640-pixel rows,
  60 test points, 5-bit pixels, 4-bit Round 1 points and the 5-cycle
  Round 1 latency.

## Files

`rtl/`:

* `atr_pkg.sv`: sizes, bus and SRAM structs, register maps
* `atr_top.sv`: the board: decoder, six `r0_chip`, one `r1_chip`
* `hbus_decoder.sv`: chip select and broadcast
* `r0_chip.sv`: registers and wiring of one Round 0 chip
* `sram_ctrl.sv`: SRAM arbitration, image layout, read-back
* `tp_buffer.sv`: test-point offsets
* `r0_sequencer.sv`: area walk, address generation, ROI queue and writes
* `compute_unit.sv`, `temperature_unit.sv`, `convert_unit.sv`,
  `assert_unit.sv`: the Round 0 arithmetic
* `r1_chip.sv`: Round 1

`tb/`: one self-checking testbench per module, `tb_<module>.sv`. Each
compares against plain-integer reference equations (`atr_ref.svh`) and
checks cycle counts where timing is defined. Also in `tb/`:

* `r0_scene.svh` generates test images with hot and cold blobs and matching
  template pairs.
* `hb_host.svh` holds the host bus tasks.
* `atr_top_body.svh` is the board-level test shared by the two top-level
  testbenches:
  * `tb_atr_top.sv` runs a small strip.
  * `tb_atr_full.sv` runs a full 90-row x 640 strip at the default
    parameters: 6 chips, 26,040 pixel pairs each, 1.57 M cycles. It takes
    about 15 s to build and run.

  Both check every chip's ROI list and Round 1 decisions against the
  reference. They also count that each mechanism happened: broadcasts, ROI
  writes stalling the read stream, shared-ASSERT decisions, interrupts,
  dropped odd pixels, and Round 1 passes and rejections.
* `tb_atr_frame.sv` runs Round 0 over a whole 480 x 640 frame at the default
  parameters. The frame is cut into five range strips of different heights,
  each with its own template pairs, and the strips are cut again into
  chunks that fit the SRAM. The rows next to a chunk border are sent twice.
  The run checks every ROI list and the pair count of each chip, and that
  the summed compute time sits at 60 cycles per pixel pair. The frame's
  474 x 624 tested pixels take 8.91 M cycles per chip, or 0.56 s at
  16 MHz.

  The run also compares each chip's ROI set pixel by pixel with the
  original algorithm: a real-valued mean, real divisions and the 0.65
  threshold, on the same 5-bit pixels. All 1.77 M comparable decisions
  agree. The ones not compared are the few where the original divides by
  zero. The run takes about 30 s.
* `tb_atr_round1.sv` runs the Round 1 load of one frame: 5,627 ROIs with
  five templates each and 8,154 ROIs with two, 44,443 templates in all. The
  host writes once every 5 cycles. The run checks two things:
  * each template takes exactly 105 cycles from its first write to a
    readable result;
  * every decision matches both the integer test and the original
    real-valued correlation, `(SumP - SumM) / sqrt(SM) >= 0.45`.
* `tb_atr_fewer.sv` builds the board with `N_R0 = 2`, as when only part of
  the board is available to this program. It applies the six template pairs
  in three passes over one broadcast strip, and reaches the Round 1 chip at
  its shifted chip number, 2.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -j 4 --top-module tb_atr_top \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/atr_pkg.sv tb/tb_atr_top.sv
./obj_dir/Vtb_atr_top
```

Use any `tb_*` module in place of `tb_atr_top`. Each testbench prints
`TB_RESULT checks=N failures=M` and stops. A watchdog ends a hung run with a
failure. Testbenches drive inputs on the falling clock edge and read
reference values with plain integer arithmetic, so the arithmetic of a
change can be checked without waveforms. Lint with
`verilator --lint-only -Wall -Irtl rtl/atr_pkg.sv rtl/atr_top.sv`.
