# Shift-and-add chroma resampler for 4:4:4, 4:2:2 and 4:2:0 video

Video encoders and decoders carry colour at a lower resolution than
brightness: 4:2:2 keeps every second chroma sample in each line, 4:2:0 also
keeps only every second chroma line. Converting between these formats is a
resampling problem. Simply dropping or repeating samples aliases and blocks
the colour; a proper low-pass or interpolating FIR filter avoids that but
normally costs multipliers. This core uses short FIR filters whose
coefficients are all sums of powers of two (1/2, 1/4, 1/8, 3/4, 3/8, 5/8,
7/8), so every filter is a handful of wired shifts and one pipelined adder.
It performs all six conversions between the three formats, with either those
filters or plain drop/replicate. A third method replaces them with
multiplier-based filters whose coefficients and tap counts (up to 24
horizontal and 8 vertical taps) are loaded at run time. The conversion, the method and the scan type
(progressive or interlaced) are inputs, so they can change at run time.

The design follows a published chroma-resampling IP core description: its
filter set, its circuit structure for the four basic converters and its
port set. Where that description is silent or inconsistent, the choices made
here are listed under [Departures and limits](#departures-and-limits).

## Stream format

All converters take and produce a raster stream, one pixel per clock:

| signal | meaning |
|---|---|
| `din_valid` / `dout_valid` | active pixel; low in horizontal and vertical blanking |
| `y_in` / `y_out` | luma; never filtered, only delayed to stay aligned with the chroma |
| `cb_in`, `cr_in` / `cb_out`, `cr_out` | Cb/U and Cr/V of a 4:4:4 stream, one pair per pixel |
| `chr_in` / `chr_out` | 4:2:2 or 4:2:0 chroma, interleaved on one bus at pixel rate: Cb0, Cr0, Cb1, Cr1, ... (Cb of a pair sits on the even pixel) |
| `vs_in`, `hs_in` / `vs_out`, `hs_out` | syncs, delayed by the converter's latency |
| `chr_valid` | the chroma bus carries data; in 4:2:0 output only the odd lines do |

Conventions the converters rely on:

* A line is a run of `din_valid` high. Lines hold an even number of pixels,
  at most `MAX_WIDTH`, and are separated by at least two blanking cycles.
* `vs_in` high marks vertical blanking and restarts the line count, so the
  first line after it is line 0.
* In a 4:2:0 stream the chroma rides on the odd lines (1, 3, 5, ...). Chroma
  line *k* is the filtered result of lines 2*k* and 2*k*+1. Luma runs on
  every line.
* YUV uses the same ports as YCbCr: U on the Cb side, V on the Cr side.
* For interlaced video the field flag toggles at every rising edge of
  `vs_in`. The first frame after reset is the odd field.
* Change `conv`, `method` or `interlaced` only in vertical blanking, after
  the pipeline has drained (a few clocks).

## The six conversions

| conversion | direction | FIR weights (`METHOD_FIR`) | `METHOD_DROP` | latency (clocks) |
|---|---|---|---|---|
| 4:4:4 → 4:2:2 | horizontal 2:1 | [1/4 1/2 1/4], centred on even pixels | keep even pixels | 3 |
| 4:2:2 → 4:4:4 | horizontal 1:2 | phase 0: copy; phase 1: [1/2 1/2] | repeat | 3 |
| 4:2:2 → 4:2:0 | vertical 2:1 | progressive [1/2 1/2]; odd field [1/4 3/4]; even field [3/4 1/4] (even line, odd line) | keep odd line | 2 |
| 4:2:0 → 4:2:2 | vertical 1:2 | see the table in the 4:2:0 → 4:2:2 section | repeat | 2 |
| 4:4:4 → 4:2:0 | both | 4:4:4 → 4:2:2, then 4:2:2 → 4:2:0 | both drop | 5 |
| 4:2:0 → 4:4:4 | both | 4:2:0 → 4:2:2, then 4:2:2 → 4:4:4 | both repeat | 5 |

A latency of *L* means that the output pixel belonging to an input pixel
leaves *L* clocks after that pixel entered. `y_out`, the syncs and
`dout_valid` are the inputs delayed by exactly *L*. Throughput is one pixel
per clock with no stalls. There is no back-pressure: the core follows the
input timing. Every weight is applied as a sum of right shifts, and each
shifted term is truncated before the addition. A weight of 3/4 therefore
gives `(x>>1)+(x>>2)`, which can be one LSB below `3x/4`. The weights of each
filter sum to at most 1, so the sums never overflow `DATA_W` bits.

## Horizontal converters

**4:4:4 → 4:2:2 (`chroma_444to422`).** Cb and Cr each pass a three-sample
window: the current sample and the samples one and two clocks older. The
three taps are shifted right by 2, 1 and 2 bits and summed in a registered
adder. At the first pixel of a line the missing left neighbour is replaced
by pixel 1 (mirroring). Only the sums centred on even pixels are kept. A
one-clock register delays the Cr sum, so a multiplexer can alternate between
the Cb sum and the delayed Cr sum and lay them on one bus:

```
clock      0      1      2      3      4      5      6
chr_in   C0     C1     C2     C3     C4 ...           (Cb_n/Cr_n pairs, 4:4:4)
chr_out                       Cb0    Cr0    Cb1    Cr1
```

Cb0 is `Cb[1]/4 + Cb[0]/2 + Cb[1]/4`, and Cb1 is
`Cb[1]/4 + Cb[2]/2 + Cb[3]/4`. Its Cr partner follows one clock later.

**4:2:2 → 4:4:4 (`chroma_422to444`).** The interleaved bus passes through
two registers, so the delayed sample and the incoming sample are
neighbouring samples of the same component. Phase 0 (co-sited, even output
pixels) is the delayed sample itself. Phase 1 is the average of the two,
each shifted right by one bit, in a registered adder. Cr arrives one clock
after Cb, so the Cb multiplexer output gets one extra register and both
components leave together:

```
clock      0     1     2     3            4                    5
chr_in   Cb0   Cr0   Cb1   Cr1          Cb2                  Cr2
cb/cr out                  Cb0/Cr0      (Cb0+Cb1)/2,         Cb1/Cr1
                                        (Cr0+Cr1)/2
```

At the end of a line the missing next sample is replaced by the last one,
so the final odd pixel repeats its left neighbour.

## Programmable filters

`METHOD_PROG` replaces the fixed filters of all six conversions with general
FIR filters. This section covers the horizontal pair; the vertical pair
follows the vertical converters below. Each filter is a window of the most recent samples
and a `fir_mac`: one multiplier per tap with registered products, then a
registered adder tree, then rounding and clamping. Coefficient index 0
always weighs the newest sample:

    P_out = sum over i < N of W(i) * P_in(newest - i)

Coefficients are signed 16-bit numbers with 14 fraction bits, so 1.0 is
16384 and the range is about ±2. The sum is rounded to the nearest integer,
with ties rounded up. It is then clamped to `0 .. 2^DATA_W-1`, because
negative lobes can overshoot. `N` is a run-time tap count from 1 to 24.
Coefficients at and above `N` are ignored, so a shorter filter needs no
zeroing.

**Alignment.** The hardest point is which output pixel a window belongs to.
It is set by `N`:

* **4:4:4 → 4:2:2 (`chroma_444to422_prog`).** The value belongs to the
  pixel `h = (N-1)/2` behind the newest sample, the window centre. This is
  exact for odd `N`; even `N` is half a pixel late. Only even pixels are
  kept, and Cb and Cr are interleaved as in the fixed converter. There are
  two MACs, one for Cb and one for Cr.
* **4:2:2 → 4:4:4 (`chroma_422to444_prog`).** Even output pixels copy the
  input sample, as in the fixed filter. The odd pixel between samples *j*
  and *j*+1 uses a window whose newest sample is *j* + `N/2`. For
  `N = 4` with `W = [a b c d]`, a weighs *j*+2, b weighs *j*+1, c weighs *j*
  and d weighs *j*-1. The interleaved bus runs through a 48-stage delay line,
  and every second stage feeds the window. A single MAC therefore serves Cb
  and Cr on alternate clocks.

**Edges.** At a line start the whole window is filled with the first sample
(for the interpolator: the first Cb, then the first Cr on the Cr stages).
After the line the window keeps repeating the last sample. Samples outside
the line therefore equal the edge sample. This needs horizontal blanking of
at least 13 clocks for the decimator and 25 for the interpolator.

**Latency** follows the tap count: `(N-1)/2 + 5` clocks for decimation and
`2*floor(N/2) + 6` for interpolation (`lat_444to422_prog`,
`lat_422to444_prog` in `chroma_pkg`). The defaults `N = 3` and `N = 2` give
6 and 8 clocks. Luma, syncs and valid are taken from a tapped delay line at
the same depth.

## Vertical converters

Both vertical converters use a `line_tracker` to follow column, line parity
and field. They also use one or two `line_buffer`s: one-line memories with a
synchronous, read-before-write read port, addressed by the column. The
buffer read costs one clock and the adder one more, hence the 2-clock
latency.

**4:2:2 → 4:2:0 (`chroma_422to420`).** Each even line is written into the
buffer. During the following odd line the buffer is read at the same column,
so even-line sample *e* and odd-line sample *o* meet. Three shift/add
branches run in parallel:

* progressive: `e>>1 + o>>1`
* odd field: `e>>2 + o>>1 + o>>2`
* even field: `e>>1 + e>>2 + o>>2`

A multiplexer picks one branch from the scan type and the field. The result
leaves on the odd line with `chr_valid` set. On even lines the chroma bus is
zero and `chr_valid` is low.

**4:2:0 → 4:2:2 (`chroma_420to422`).** This is the most involved block. Each
incoming chroma line *cur* (odd input line) is combined with the previous
chroma line *prev*. Buffer A holds *prev* and is read at the same column
while *cur* overwrites it. Six shift/add branches form two output lines,
with weights on (*prev*, *cur*):

| scan / field | first line (sent on the odd line) | second line (sent on the next even line) |
|---|---|---|
| progressive | 3/4, 1/4 | 1/4, 3/4 |
| interlaced, odd field | 3/8, 5/8 | 7/8, 1/8 |
| interlaced, even field | 1/8, 7/8 | 5/8, 3/8 |

The first line goes out at once. The second is written to buffer B and read
out on the next line. For the first chroma line of a frame *prev* is taken
equal to *cur*. Line 0 of each frame comes before any chroma of that frame,
so it carries mid-scale chroma (2^(DATA_W-1), no colour). With
`METHOD_DROP` both output lines are copies of *cur*.

The luma is **not** delayed by lines. The output chroma on lines 2*k*+1 and
2*k*+2 is therefore interpolated between chroma lines *k*-1 and *k*. The
chroma trails the luma by one chroma line, two luma lines, compared with a
centred interpolation. The original design delays luma and syncs by whole
lines to hide this. That needs a luma line store and flushing of the last
lines after the frame ends, which were not built.

## Programmable vertical filters

Under `METHOD_PROG` the two vertical conversions use `chroma_422to420_prog`
and `chroma_420to422_prog`. Both are built around `line_window`: a chain of
seven line buffers, all read at the current column. Its output is the
current sample and the samples of the seven lines above it, newest first.
Each read value is written one buffer further down, so the chain shifts by
one line per input line. At the top of a frame the first line is written
into every buffer. Lines above the frame therefore repeat the first line.
The same `fir_mac` as in the horizontal filters applies up to 8
coefficients to the window, with W(0) on the newest line:

    P_out(line) = sum over i < N of W(i) * P_in(line - i)

In an interleaved column every sample is the same component, so one MAC
serves both Cb and Cr.

* **4:2:2 → 4:2:0.** Every input line enters the window. The result is
  sent on odd lines, with `chr_valid`, like the fixed converter.
* **4:2:0 → 4:2:2.** Only the chroma lines (odd input lines) enter the
  window. Two MACs apply the phase-0 and phase-1 coefficient sets. The
  phase-0 result goes out at once, on the odd line. The phase-1 result goes
  into an eighth line buffer and is sent on the next even line. Line 0
  carries mid-scale chroma, as in the fixed converter.

Both have a latency of 4 clocks: 1 for the window read and 3 for the MAC.
The same coefficients serve both interlaced fields. The 2D conversions
chain a horizontal and a vertical programmable filter, as the fixed ones
do. Their latency is the horizontal latency plus 4.

## Top level: `chroma_resampler`

The top instantiates all six fixed converters and the four programmable
ones.
`conv` (`chroma_pkg::conv_e`) gates `din_valid` to the selected one and
picks its outputs. `method` (`METHOD_FIR`, `METHOD_DROP`, `METHOD_PROG`)
and `interlaced` go to all of them. Under `METHOD_PROG`, 4:4:4 → 4:2:0 runs
the programmable horizontal decimator into the programmable vertical one.
4:2:0 → 4:4:4 runs the vertical interpolator into the horizontal one.

The programmable filters take their coefficients from five register banks.
The two horizontal banks hold 24 registers each and the three vertical banks
hold 8. Registers are written one per clock:

| port | meaning |
|---|---|
| `coef_we` | write `coef_data` into the bank at `coef_addr` |
| `coef_bank` | 0: horizontal decimation, 1: horizontal interpolation (odd pixel), 2: vertical decimation, 3: vertical interpolation phase 0, 4: phase 1 |
| `coef_addr` | tap index, 0 = newest sample or line |
| `coef_data` | signed coefficient, 14 fraction bits |
| `ntaps_hdec`, `ntaps_hint` | tap counts of the horizontal filters, 1..24 |
| `ntaps_vdec`, `ntaps_vint` | tap counts of the vertical filters, 1..8 |

Reset loads `[1/4 1/2 1/4]`, `[1/2 1/2]`, `[1/2 1/2]`, `[1/4 3/4]` and
`[3/4 1/4]` into banks 0 to 4. Set the tap counts to 3, 2, 2 and 2 to use
them as they are. Write
coefficients and change tap counts only in vertical blanking. For the two
horizontal-only converters, which have no sync ports, the top delays the
syncs itself. Parameters:

| parameter | default | meaning |
|---|---|---|
| `DATA_W` | 10 | bits per component (8, 10, 12 and 16 are the intended widths) |
| `MAX_WIDTH` | 1920 | line-buffer depth, the largest line width; up to 7680 is intended |

At the defaults the fixed paths hold six 1920 × 10-bit line buffers, 115
kbit in all: one in each of the two 4:2:2 → 4:2:0 paths and two in each of
the two 4:2:0 → 4:2:2 paths. They have about 600 flip-flops and no
multipliers. The programmable filters add 15 more line buffers: seven in
each vertical window and one for the second interpolated line. They also
add 96 multipliers: 24 in each of the three horizontal MACs and 8 in each of
the three vertical MACs. Then come the coefficient banks and the delay
lines.

## Departures and limits

* **Programmable filters.** The original's multiplier-based option covers
  up to 8 vertical and 24 horizontal taps, and both sizes are built. The
  original gives only the function of this option. The coefficient format,
  the register interface, the window alignment, the edge handling, the
  latencies and one coefficient set for both interlaced fields are this
  design's own.
* **Latencies.** The latencies here come from the circuit structure: 3, 3, 2
  and 2 clocks for the basic converters. The original quotes vendor-style
  latencies of 8 clocks, and "one line plus" 8 or 9 clocks for the vertical
  converters. Its own timing charts and latency formulas agree with 3 clocks
  for the horizontal converters. Drop/replicate keeps the filter's latency
  here, so luma alignment does not depend on the method. In the original,
  drop/replicate is a few clocks shorter.
* **Vertical alignment** of 4:2:0 → 4:2:2: see above (no luma line delay,
  mid-scale line 0).
* **Chroma order.** Cb/U comes first in each interleaved pair, as in the
  original's timing charts. One sentence of its text puts Cr/V first.
* **Which 4:2:0 line carries chroma, which line is dropped,** the
  left-edge mirroring, the right-edge replication, truncating shifts, reset
  values and the field toggling on `vs_in` are this design's choices.
* **Run-time settings.** The original builds one core per conversion, with
  the filter option fixed at generation time. Here one core holds all six
  and selects at run time, which costs area.

## Verification

Every block has a self-checking testbench in `tb/`. The testbenches compare
the outputs with a line-based reference model, `tb_chroma_ref_pkg`, which
builds each filter from its weights. They also check latency and sync
alignment exactly. Each prints `TB_RESULT checks=N failures=M`.

| testbench | what it runs |
|---|---|
| `tb_chroma_444to422`, `tb_chroma_422to444` | random lines, FIR and drop/replicate |
| `tb_chroma_422to420`, `tb_chroma_420to422`, `tb_chroma_444to420`, `tb_chroma_420to444` | frames of random video: progressive, interlaced odd and even field, drop/replicate |
| `tb_line_tracker`, `tb_line_buffer` | counters and fields over random line widths; read latency and read-before-write |
| `tb_chroma_444to422_prog`, `tb_chroma_422to444_prog` | random lines through six coefficient sets each: the defaults, 1, 4, 5 or 7 taps, all 24 taps, negative lobes, clipping, tap count 0 |
| `tb_chroma_422to420_prog`, `tb_chroma_420to422_prog` | random frames through five coefficient sets each: the defaults, 1, 3 or 5 taps, all 8 taps, negative lobes, clipping |
| `tb_chroma_resampler` | the top at default parameters, 32 short frames covering all six conversions × all three methods, both interlaced fields, the programmable filters with reset and with written coefficients in all five banks, with every mechanism counted |
| `tb_chroma_resampler_full` | the top at default parameters: 1920×1080 frames 4:4:4 → 4:2:0 and 4:2:0 → 4:4:4, first with the fixed filters, then with the programmable ones at 24 horizontal and 8 vertical taps; every pixel checked (about 20 s) |
| `tb_round_trip` | four round trips through chained cores: 4:4:4→4:2:2→4:4:4, 4:4:4→4:2:0→4:4:4, 4:4:4→4:2:2→4:2:0→4:4:4, 4:4:4→4:2:0→4:2:2→4:4:4 |

`tb_round_trip` uses a synthetic 64×32 frame with gradients, a sharp colour
block and ±4 LSB noise. It reports a chroma CPSNR of 32.7 dB for the 4:2:2
round trip and 22.2 dB for the three round trips through 4:2:0. The three
4:2:0 round trips are bit-identical, because the 2D converters are exactly
the cascades of the 1D ones. The 4:2:0 figure is held down by the one-line
chroma lag and the mid-scale line 0 described above. It is not comparable
with the 43–45 dB the original reports on natural 8-bit test images with a
line-aligned luma path.

Simulate with Verilator 5 (packages first), for example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/chroma_pkg.sv tb/tb_chroma_ref_pkg.sv tb/tb_chroma_resampler.sv \
    --top-module tb_chroma_resampler
./obj_dir/Vtb_chroma_resampler
```

The same pattern works for every testbench. Verilator finds the other
modules through `-Irtl -Itb`, since each file holds one module named after
the file.

## Files

* `rtl/chroma_pkg.sv`: method and conversion enums, latency constants and
  functions, programmable-filter sizes.
* `rtl/chroma_resampler.sv`: top level.
* `rtl/chroma_444to422.sv`, `rtl/chroma_422to444.sv`: horizontal converters.
* `rtl/chroma_422to420.sv`, `rtl/chroma_420to422.sv`: vertical converters.
* `rtl/chroma_444to420.sv`, `rtl/chroma_420to444.sv`: 2D cascades.
* `rtl/chroma_444to422_prog.sv`, `rtl/chroma_422to444_prog.sv`: programmable
  horizontal filters.
* `rtl/chroma_422to420_prog.sv`, `rtl/chroma_420to422_prog.sv`: programmable
  vertical filters.
* `rtl/fir_mac.sv`: pipelined multiply-accumulate shared by all four.
* `rtl/line_window.sv`: chain of line buffers giving a vertical tap window.
* `rtl/line_tracker.sv`: column, line and field state machine.
* `rtl/line_buffer.sv`: one-line memory.
* `rtl/delay_line.sv`: alignment delays.
* `tb/`: testbenches and the reference-model package.
