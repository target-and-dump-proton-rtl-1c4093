# Beam imaging video chain for proton beam target and dump monitoring

A camera looks at a scintillating screen in front of a proton beam target or
dump. For machine protection, each camera frame must be turned into a few
numbers, such as where the beam is, how wide it is, how much of it misses the
intended footprint and how dense its hottest spot is, well within one frame
period. The frame rate is 28 Hz, so the budget is 35 ms per frame. This RTL
does that work on an FPGA as one streaming pass over the image: pixels enter
one per clock, noise is removed, lens and camera-angle distortion is
corrected, and three statistics units measure the corrected image while it
flows past. None of them stores a frame. A 720x576 frame takes 414,720
clocks, which is 4.2 ms at 100 MHz.

```
               median_en                     map stream (src_x, src_y per output pixel)
                  |                                   |
 pixels in --> median_filter --> geo_remap ---------------> pixels out
 (valid/ready)   3x3 median      line-buffer remap     |
                                                       +--> centroid       Cx, Cy, RMSx, RMSy, sum
                                                       +--> footprint_sum  total / inside / outside
                                                       +--> peak_density   densest WIN x WIN mean + centre
```

The five processing functions, their sizes (720x576 frames, a 10x10 peak
window, a 64-line correction buffer) and their outputs follow a published
design study. That study built the functions as separate high-level-synthesis
cores and checked them against MATLAB. The RTL here is a new, hand-written
implementation. Its arithmetic, border rules, handshakes and the order of the
chain are this design's own choices; each is listed under
[Departures and choices](#departures-and-choices).

## Files

| file | contents |
|------|----------|
| `rtl/bvid_pkg.sv` | pixel and map types, the median-of-9 exchange network |
| `rtl/median_filter.sv` | 3x3 median filter with bypass |
| `rtl/geo_remap.sv` | geometrical distortion correction |
| `rtl/centroid.sv` | centroid and RMS width |
| `rtl/footprint_sum.sv` | beam inside and outside a rectangle |
| `rtl/peak_density.sv` | sliding-window peak density |
| `rtl/seq_div.sv`, `rtl/isqrt.sv` | serial divider and square root used by the statistics |
| `rtl/beam_video_top.sv` | the chain |
| `tb/tb_*.sv` | one self-checking testbench per block, plus the end-to-end tests |

## Pixel streams

Every stream is a valid/ready handshake. A word moves when both are high. A
pixel word (`pix_t`) is 10 bits: `sof` (first pixel of the frame), `eol`
(last pixel of a row) and an 8-bit grey value, in the style of AXI4-Stream
video. The frame size is fixed at build time by `COLS` and `ROWS`. Blocks count
rows and columns themselves, and `sof` only re-aligns their counters. The
statistics blocks are taps: they take a pixel whenever their `in_valid` is
high and never push back. In the top, that signal is `out_valid && out_ready`,
so holding the output stalls the whole chain and no pixel is counted twice.

## Median filter

Two line buffers supply the two rows above the incoming pixel. The three
values of each column are shifted into a 3x3 window, and a fixed network of 19
compare-exchange steps picks the median. The network is `med9()` in
`bvid_pkg`: it sorts each column, then takes the median of the column maxima,
medians and minima. It is pure combinational logic with no control.

The median is issued at the position of the newest (bottom-right) window
pixel. The filtered image is therefore shifted one row down and one column
right. This is deliberate: it matches the behaviour the design was specified
with. In the first two rows and columns, where the window is incomplete, the
input pixel passes unchanged. `median_en = 0` passes every pixel unchanged,
but the line buffers keep loading, so turning the filter back on takes effect
at once. Latency is one clock, and the rate is one pixel per clock.

## Distortion correction (the remapper)

This is the part that needs the most care. The correction is a lookup: for
each output pixel `(r, c)` in raster order, a map entry gives the source
`(src_x, src_y)` to copy. The map arrives as a second stream, for example
from a DMA engine reading a precomputed table. Because the source row can lie
above or below `r`, source rows must be buffered. `geo_remap` keeps a circular
buffer of `LINES` rows, and row `y` lives in slot `y mod LINES`.

With `HALF = LINES/2`:

* **Band.** Output row `r` may read source rows `r-(HALF-1)` to `r+(HALF-1)`.
  That is a vertical displacement of up to 31 rows either way for the default
  64 lines, or 63 rows for 128 lines. The one remaining slot holds the source
  row being written, which lets input and output both run at one pixel per
  clock. A band using all `LINES` rows would make them take turns and halve
  the rate.
* **Write rule.** Source row `w` may be written only while `w <= r + HALF`.
  The row it overwrites, `w - LINES`, is then below every band still to be
  read. When this rule holds back a source pixel, `in_stall` goes high. This
  is normal at the start of every frame.
* **Read rule.** Output row `r` starts once source rows up to
  `min(r + HALF - 1, ROWS - 1)` are in. At the start of a frame, HALF source
  rows enter before the first output pixel.
* **Fill.** A map entry outside the band or outside the image gives a 0 pixel,
  and `out_oob` is set with it. To correct a large rotation without losing
  pixels, give the buffer enough lines, or pre-rotate the camera.
* The next frame's source pixels are accepted after the last output pixel of
  the current frame, so each frame has a HALF-row fill gap.

The buffer is read synchronously: one clock from map entry to output pixel.
`LINES` must be a power of two.

## Centroid and RMS width

For each pixel value P at 1-based column m and row n, the block accumulates
S = ΣP, Sx = ΣmP, Sy = ΣnP, Sxx = Σm²P and Syy = Σn²P. At the end of the frame
these sums are handed to a result engine, and the accumulators restart with
the next pixel, so frames can follow back to back. The engine computes:

```
Cx   = Sx / S
RMSx = sqrt(Sxx/S - Cx^2) = sqrt((S*Sxx - Sx*Sx) / S^2)      (y alike)
```

The variance is formed exactly in integers before one division. Only the
final truncations lose precision. Four serial restoring dividers run in
parallel, then two digit-by-digit square roots. All outputs are unsigned
fixed point with `FRAC` (16) fraction bits, truncated. The result is ready
about 150 clocks after the last pixel at 720x576. A frame that sums to zero
sets `empty`, and its results read zero.

## Footprint sums

Three sums per frame: all pixels, pixels inside a rectangle
`top <= row <= bottom, left <= col <= right` (0-based, borders included), and
the difference. The borders are sampled with the first pixel of a frame. The
result comes one clock after the last pixel. No percentage is formed. If one is
needed, it is one more divider on `sum_out / sum_total`.

## Peak density

A `WIN x WIN` window (default 10x10) slides over the image. `WIN-1` line
buffers (nine by default) hold the rows above, so each incoming pixel completes a column sum of `WIN`
values. A shift register of the last `WIN` column sums gives the sum of the
window whose bottom-right corner is the current pixel. Only windows that lie
completely inside the frame take part.

A strictly larger sum replaces the stored maximum, so on ties the first window
in raster order wins. Comparing sums is the same as comparing means. The
stored position is the window centre, `(top-left row + WIN/2, top-left column
+ WIN/2)`, 0-based. After the frame, a serial divider turns the best sum into
the mean, `sum * 2^FRAC / (WIN*WIN)`. The result follows about 35 clocks
after the last pixel.

## Timing through the chain

Each stage accepts one pixel per clock. In steady state the chain therefore
needs `COLS*ROWS` clocks per frame. Added to that is the remapper's fill of
`LINES/2` rows at the start of each frame, which is 32 rows or 23,040 clocks
at 720x576. The results then follow the last output pixel after about 150
clocks (centroid), 35 clocks (peak density) and 1 clock (footprint). At
720x576, the last result of a frame is ready 437,902 clocks after its first
pixel enters. That is 4.4 ms at 100 MHz, against a 35 ms frame period.

## Parameters of the top

| parameter | default | meaning |
|-----------|---------|---------|
| `COLS`, `ROWS` | 720, 576 | frame size |
| `LINES` | 64 | remap buffer lines (power of two) |
| `WIN` | 10 | peak density window side |
| `FRAC` | 16 | fraction bits of centroid, RMS and mean results |

The pixel depth is `PIX_W = 8` in `bvid_pkg`. Result widths follow from these
values. At the defaults: sums 27 bits, centroid and RMS 10.16, peak mean 8.16,
window sum 15 bits.

## Departures and choices

* **Fixed point instead of floating point.** The design study computed the
  ratios and roots in single-precision float. Here exact integer sums feed a
  truncating fixed-point division and square root. In the tests, results agree
  with double-precision references to within 2^-14.
* **Latency.** Every block here keeps the one-pixel-per-clock rate. The
  post-frame work is shorter than that of the study's floating-point cores:
  about 150 clocks here against about 2300 for the centroid. The study's
  200 MHz timing figures for specific FPGAs do not carry over; this RTL has not
  been through FPGA place and route.
* **Order of the chain.** The study tested the four measurement/filter cores
  together, and the correction core on its own. Putting correction between
  the filter and the measurements is a choice made here. A 1:1 map makes the
  correction transparent.
* **Remap details.** The centred band, the black fill, integer (not
  interpolated) source coordinates and the flow control are this design's
  own. The map format is two signed 16-bit coordinates per output pixel.
* **Borders.** The median filter passes incomplete-window pixels through.
  Peak density ignores incomplete windows. Footprint borders are inclusive.
  For an even window, the centre is top-left + WIN/2.
* **Results as ports.** In the study, a processor read the results over an
  AXI bus. No register map is given, so here results and settings are plain
  ports of `beam_video_top`. The processor, DRAM, DMA engines and VGA output
  of the test board are not part of this RTL.
* **Frame size** is a build parameter. Running 720x480, 1280x720 or 1920x1080
  means rebuilding with other `COLS`/`ROWS`. A 585-row image does not fit the
  default 576 rows.

## Verification

Each block has a self-checking testbench that compares every output with a
reference computed in the testbench from the definitions. Each ends with
`TB_RESULT checks=N failures=M`.

* `tb_median_filter`: 16x12 frames with popcorn noise, reference median by
  sorting. It covers filter on, off, and on again with input gaps and output
  back-pressure, and checks one-clock latency and one pixel per clock.
* `tb_centroid`: 24x16 frames back to back against double-precision formulas.
  It includes a single lit pixel (RMS 0) and a black frame (`empty`), and
  bounds the result latency.
* `tb_footprint_sum`: random rectangles, including an empty one and the full
  frame. Borders change mid-frame.
* `tb_peak_density`: the 10x10 window on 32x24 frames, with spots against
  the corners and a flat frame (tie rule), checked against a brute-force
  search.
* `tb_geo_remap`: identity, shear and random maps with an 8-line buffer, gaps
  and back-pressure on all three streams. It checks the fill flag, the stall,
  and one pixel per clock.
* `tb_geo_remap_rotation`: a 585x585 grid rotated by 10 degrees through a
  128-line buffer. No pixel inside the image may be lost. A 1:1 frame runs at
  full rate.
* `tb_beam_video_resolutions`: one frame each at 720x480, 720x576, 1280x720
  and 1920x1080 through the whole chain, with the filter on, and all pixels
  and results checked. At 1920x1080, the last output pixel leaves 2,135,042
  clocks after the first pixel enters, which is 21.4 ms at 100 MHz.
* `tb_beam_video_top` (48x32) and `tb_beam_video_full` (720x576, all defaults):
  the whole chain over three frames: bypass with a 1:1 map, filter on with
  noise, a shear map beyond the band and output back-pressure, and a black
  frame. Every output pixel and every frame result is checked, and the test
  fails if any of these never happens: filter on, bypass, pixels replaced by
  the filter, remap stall, black fill, back-pressure, empty frame, beam inside
  and outside the footprint. Both share `tb/tb_e2e_body.svh`.

The full-size run takes about 2 s of simulation time after a build of about
15 s.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_beam_video_full \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/bvid_pkg.sv tb/tb_beam_video_full.sv -o sim
./obj_dir/sim
```

Replace the top module and testbench file to run any other test.
`rtl/bvid_pkg.sv` must come first, because every block imports it. To change
the frame size, set `COLS`/`ROWS` on `beam_video_top`. The remap buffer is
`LINES * COLS` bytes and is the largest memory. The statistics blocks
assume a frame is longer than their post-frame computation (a few hundred
clocks), which assertions check.
