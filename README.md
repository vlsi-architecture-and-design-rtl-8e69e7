# Edge-adaptive 2x video up-scaler (QCIF → CIF → 4CIF)

Enlarging a picture with pixel replication, bilinear or bicubic interpolation
makes sharp edges and thin lines jagged or blurred. This design interpolates
luma *along* the local edge direction instead. For every input pixel it
measures the gradient orientation of its neighbourhood. Where one orientation
clearly dominates, it uses a 16-tap filter made for that orientation.
Otherwise it falls back to bilinear interpolation. Chroma (U, V) is always
interpolated bilinearly.

Each stage doubles the picture in both directions. The top level cascades two
stages: QCIF 176×144 → CIF 352×288 → 4CIF 704×576. Two 2x steps give better
pictures than one 4x step. The target is 30 frames/s.

The RTL follows a published VLSI architecture for this algorithm: folded
(time-multiplexed) Sobel, orientation, histogram and filter units, line delays
in place of frame memories, and ping-pong output line buffers. Where that
architecture leaves details open, this implementation makes its own choices.
They are listed in [Departures and own choices](#departures-and-own-choices).

## What happens for one input pixel

Take input pixel p[0,0] at image position (i, j). Its 2x2 output block covers
output pixels (2i, 2j) … (2i+1, 2j+1):

```
  (2i,  2j) = p[0,0]           (2i,  2j+1) = filter "right"
  (2i+1,2j) = filter "below"   (2i+1,2j+1) = filter "diag"
```

Each filter works on the 4×4 neighbourhood p[-1..2, -1..2]. The filter is
chosen as follows:

1. **Sobel** (`sobel_folded`). Computes the gradients fx, fy of every pixel from
   its 3×3 window.
2. **Orientation** (`angle_cordic`). Turns atan(-fx/fy) into one of 8 codes,
   where code k means an edge at 22.5·k degrees (modulo 180).
3. **Histogram** (`histogram_folded`). Counts the 16 codes of the 4×4
   neighbourhood. The neighbourhood is *oriented* if one code occurs more than 6
   times.
4. **Filtering** (`filter_mac` ×3 with `coef_rom`). Three filters run in
   parallel, one per new pixel. They use the filter set of the dominant code
   (sets 0–7) when the neighbourhood is oriented, and the bilinear set (set 8)
   otherwise.

The units work one after another, with no pipelining between them. The
controller (`luma_ctrl`) starts each unit when the previous one is done. One
output position takes:

| step | cycles |
|---|---|
| fetch pixel, shift lines and windows | 1 |
| Sobel (start + 3) | 4 |
| orientation (code pushed into the orientation lines in its last cycle) | 7 |
| histogram (start + 10) | 11 |
| three filters (16 MAC + final add + result) | 18 |
| write 2x2 block | 1 |
| **total** | **42** |

Positions on the padded border need only the Sobel and orientation steps (12
cycles) or just the fetch and push (2 cycles).

## Orientation quantiser

This is the least obvious part of the design. A divider plus a lookup table
would need a 17-bit quotient and a 128K-word table. Instead, one shift-and-add
rotator makes five micro-rotations with shifts s = 0, 2, 3, 3, 4. A 16-word ×
3-bit table then turns four decision bits into the code.

* **Fold.** The vector (X, Y) = (fy, -fx) is negated if X < 0. This leaves the
  orientation unchanged, because it is taken modulo 180°. The sign of Y becomes
  bit `neg`, and Y is replaced by |Y|. The angle t now lies in 0..90°.
* **Stage s=0.** Rotates by -45°. Bit `up` = (t ≥ 45°). The residual is then
  reflected, so the remaining stages see r = |t - 45°|.
* **Stages s=2, 3.** Always rotate by -(14.04° + 7.13°). Bit `d` = (r ≥ 21.16°).
* **Stages s=3, 4.** Rotate by a further -(7.13° + 3.58°) if `d`, or back by
  +10.70° if not. Bit `f` is then (r ≥ 31.86°) or (r ≥ 10.46°).
* **Table.** Addressed by {neg, up, d, f}. It gives the first-quadrant bin
  (0, 22.5, 45, 67.5 or 90°), which is mirrored to code 8 - bin when `neg` is
  set.

The decision thresholds fall at 13.1°, 34.5°, 55.5° and 76.9°. The ideal
values are 11.25°, 33.75°, 56.25° and 78.75°, so every threshold is within 2°
of ideal. All choices after the fold depend only on signs, and the folded
rotator takes 7 cycles. The rotator carries 4 fraction bits. A zero gradient
gives code 0.

## Histogram

The 16 codes are latched. A 3-bit counter then steps through the codes 0..7.
Each cycle, 16 comparators and a population count give how many registers
hold the counter value. A maximum-count register and a dominant-code register
follow the largest count; they update only on a strictly larger count, so a
tie keeps the lower code. The unit takes 1 load cycle, 8 count cycles and
1 decision cycle. The count is 5 bits wide so that 16 equal codes are
counted exactly.

## Filters and coefficients

`filter_mac` has one multiplier: 8-bit unsigned pixel × 11-bit signed
coefficient. It walks the 16 taps (tap = 4·row + col of the 4×4 window) and
keeps the running sum as a separate sum word and carry word (carry-save).
After tap 15, one carry-propagate addition forms the sum. The result is
rounded, shifted right by 9 and clamped to 0..255. The three filter copies run
in lock step, so one pixel multiplexer feeds all three.

`coef_rom` stores 9 sets × 3 phases × 16 taps of 11-bit coefficients with 9
fraction bits. Phase 0 is right, 1 is below, 2 is diagonal.

**The oriented filter values are not part of this RTL.** After reset, all nine
sets hold the bilinear filter. The oriented sets must be loaded through the
`coef_*` write port: one coefficient per cycle, `coef_set` 0..7, `coef_phase`
0..2, `coef_tap` 0..15. Until they are loaded, the luma path still makes its
oriented/non-oriented decisions, but every decision interpolates bilinearly.
The bilinear set is defined in `scaler_pkg::bilinear_coef`: weight 1/2 on the
two neighbours for right and below, 1/4 on the 2×2 block for diag.

## Line delays, windows and borders

* **Pixel lines and window.** Four pixel delay lines plus the incoming pixel
  give five rows. They feed a 5×5 register window. The newest 3×3 goes to the
  Sobel unit; the older 4×4 goes to the filters. Each input pixel costs five
  line reads.
* **Orientation lines and window.** Three orientation delay lines plus the new
  code feed a 4×4 window, which costs three reads per pixel.
* **Line length.** All delay lines are W+5 long, because the controller walks a
  padded grid of (H+5) × (W+5) positions.

Border rule: pixels outside the image repeat the nearest image pixel.
Concretely:

* image row 0 is taken at padded row -2;
* padded rows -1 and 0 copy the line above;
* rows 1..H-1 are taken at their own position;
* padded rows H..H+2 copy the line above again.

Columns work the same way, copying the previous pixel. Sobel and orientation
run once a full 3×3 window is available. Histogram and filters run only where
the 4×4 window is centred on a real pixel, at padded position (i+3, j+3).

The chroma path (`chroma_scaler`) uses one delay line of {V,U} pairs and a 2×2
window. It pads one extra row and column at the bottom and right.

## Output ordering

A 2x2 block spans two output lines, but consumers want raster order.
`output_sync` keeps four output lines per component as two banks of two
lines. The interpolator fills the upper and lower line of one bank while the
other bank is read out: all of its upper line, then all of its lower line.

If the writer finishes a bank before the reader has emptied the other one,
`wr_ready` drops and the controller waits. This is how the first stage is
held back by the slower second stage in `scaler_top`.

## Interfaces

`scaler_top` (parameters `W` = 176, `H` = 144: the input frame size):

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock, asynchronous active-low reset |
| y_in_valid / y_in_ready / y_in | in/out/in | 1/1/8 | input luma, raster order, W×H per frame |
| uv_in_valid / uv_in_ready / uv_in | in/out/in | 1/1/16 | input chroma {V,U}, (W/2)×(H/2) per frame |
| y_out_valid / y_out_ready / y_out | out/in/out | 1/1/8 | output luma, 4W×4H per frame |
| uv_out_valid / uv_out_ready / uv_out | out/in/out | 1/1/16 | output chroma {V,U}, 2W×2H per frame |
| coef_wr, coef_set, coef_phase, coef_tap, coef_data | in | 1,4,2,4,11 | write one filter coefficient (both stages) |

* All streams transfer on a clock edge where valid and ready are both high.
* Frames follow each other with no frame marker. The first pixel after reset
  starts a frame, and frames are counted from there.
* Luma and chroma streams are independent. Luma sets the pace; chroma needs
  about 5 cycles per sample.

## Throughput and size

* In the second stage, 42 cycles per CIF pixel plus border positions come to
  4,299,764 cycles per frame. This is measured by the full-size testbench,
  42.4 cycles per CIF pixel.
* 30 frames/s therefore needs a clock period of 7.75 ns or less.
* The original architecture budgets about 42 cycles at 7.81 ns, without
  counting border positions.
* The first stage needs a quarter of those cycles and mostly waits for the
  second.

Storage per stage: 4 luma lines and 3 orientation lines of W+5 entries, 1
chroma line of W/2+1 {V,U} pairs, and 3 × 4 output lines of 2W, W and W
pixels. The coefficient store adds 432 × 11 bits per stage.

## Departures and own choices

Taken from the original architecture:

* the algorithm;
* the Sobel sub-expression sharing (8 additions on 4 adders over 3 cycles);
* the rotator's shift sequence, 16×3 table, 2° accuracy target and 7 cycles;
* the histogram structure and its "more than 6 of 16" rule;
* 11-bit coefficients and the carry-save MAC;
* bilinear chroma with a 2-cycle unit;
* four luma and two half-size chroma input lines;
* four output lines per component;
* the two-step cascade and its frame sizes.

Own choices of this implementation:

* **Rotator decisions.** The order and direction of the add/subtract decisions
  and the table contents are reconstructed so that the shift sequence
  0,2,3,3,4 meets the 2° target.
* **Coefficient store.** The oriented coefficients are not provided, so the
  store is a loadable register file, preset to bilinear.
* **Chroma format.** Chroma is taken as 4:2:0 and sent as one {V,U} stream.
* **Borders.** Border pixels are replicated; the padded grid walk follows
  from that.
* **Interfaces.** The valid/ready streams, output-buffer back-pressure and
  asynchronous reset are added.
* **Arithmetic and formats.** Rounding and clamping of the filter, rounding of
  the bilinear averages, 9 coefficient fraction bits, a 5-bit histogram count,
  4 rotator fraction bits, and code 0 for a zero gradient.
* **Filter latency.** The filter reports done 18 cycles after start. The
  original gives at least 17 cycles in its text and 20 in its synthesis
  table.

The original also estimates area and timing for a 0.8 µm / 0.5 µm
standard-cell library. The delay lines and ROM there are memory macros; here
they are plain register arrays.

## Files

| file | role |
|---|---|
| `rtl/scaler_pkg.sv` | widths, types, bilinear coefficient function |
| `rtl/scaler_top.sv` | QCIF → CIF → 4CIF cascade |
| `rtl/scale_stage.sv` | one 2x stage: luma + chroma |
| `rtl/luma_scaler.sv` | adaptive luma path (lines, windows, units) |
| `rtl/luma_ctrl.sv` | per-pixel sequencer, padded-grid walk |
| `rtl/sobel_folded.sv` | folded Sobel |
| `rtl/angle_cordic.sv` | orientation quantiser |
| `rtl/histogram_folded.sv` | dominant orientation |
| `rtl/coef_rom.sv` | coefficient store |
| `rtl/filter_mac.sv` | 16-tap carry-save MAC |
| `rtl/chroma_scaler.sv`, `rtl/bilinear_unit.sv` | chroma path |
| `rtl/delay_line.sv` | line delay |
| `rtl/output_sync.sv` | ping-pong output line buffers |

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each compares
the module with reference models in `tb/tb_ref_pkg.sv`, which are written from
the algorithm rather than from the RTL. Each ends with a line
`TB_RESULT checks=N failures=M`.

* **Unit testbenches.** These also check the latencies (3, 7, 10, 18 and 2
  cycles) and the 42-cycle controller schedule.
* **Orientation reference.** The quantiser is compared with an atan2-based
  reference. Angles within 1° of a decision threshold are skipped (4° for very
  small gradients), and codes are also checked against the ideal 22.5° bins
  away from the transitions.
* **`tb_luma_scaler` and `tb_scale_stage`.** These load easily distinguished
  oriented filters, so a wrong orientation decision changes the output. They
  then run frames made of ramps at several angles and noise.
* **`tb_scaler_top`.** Runs one full QCIF frame through both stages at the
  default sizes, about 4.3 M cycles and about 15 s. It checks 405,504 luma and
  101,376 chroma output pixels. It also counts oriented and bilinear
  decisions, border replication, first-stage stalls, input gaps and output
  back-pressure.
* **Skipped luma pixels.** Interpolated luma pixels whose neighbourhood
  contains a near-threshold orientation, at any stage, are not compared.

Running one testbench with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_scaler_top \
  -y rtl -y tb +libext+.sv rtl/scaler_pkg.sv tb/tb_ref_pkg.sv tb/tb_scaler_top.sv
./obj_dir/Vtb_scaler_top
```

Change `tb_scaler_top` to any other `tb_*` name to run that testbench. Smaller
frame sizes are set with the `W`/`H` parameters of `scaler_top`,
`scale_stage`, `luma_scaler` and `luma_ctrl`. In `chroma_scaler` they are
`WC`/`HC`, and in `output_sync` just `W`. Delay lines adapt to W.
