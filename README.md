# Real-time SURF object detection and motion detection in RTL

This repository holds synthesizable SystemVerilog for two video detectors that take 800x600 video at one pixel per clock. At 60 frames per second the pixel clock is about 40 MHz.

- **`surf_system`** finds SURF interest points in every frame and builds a 64-element descriptor for each one. It matches the descriptors against a stored library of 128 reference descriptors. Once per frame it decides whether the reference object is in view; the original application was a stop sign.
- **`diff_tracker`** detects moving objects in front of a fixed camera. It compares every pixel with the same pixel of the previous frame and paints the pixels that changed red.

`video_detect_top` places the two side by side. Each has its own video input, and they share only the clock and reset.

The architecture follows S. Zhu, *Real-Time Implementation of SURF Algorithm on FPGA Platform* (M.S. thesis, WPI, 2014). That work gives the block structure, the buffer sizes and the word widths. Many details are not specified there, and this design fills them in. The section "Where this design departs or fills gaps" lists those choices.

## The SURF pipeline

```
RGB video -> integral_image_gen -> interest_point_detector -> point FIFO --+
                   |                                                        |
                   +--> mem_ctrl --(write)--> external DDR3 (2 frame banks) |
                        mem_ctrl <--(read 26x26 samples per point)----------+
                            |
                            v
                   descriptor_extractor -> descriptor FIFO -> descriptor_matcher (+ library_rom)
                                                                   -> det_valid / detected
```

### Integral image (`rgb2gray`, `video_pos_gen`, `integral_image`, `integral_image_gen`)

- **Gray value:** gray = 0.2989 R + 0.5870 G + 0.114 B, computed with Q0.16 constants and rounded.
- **Position:** `video_pos_gen` derives column, row and the linear address `row*800+col` from `vsync`, `hsync` and `de`. All three are active high; `vsync` clears the counters and a falling edge of `de` ends a line.
- **Integral value:** each 28-bit integral value is `I(x,y) = I(x,y-1) + I(x-1,y) - I(x-1,y-1) + pixel`. The row above comes from one 800-entry line buffer.
- **Latency:** two cycles from pixel to integral value.

### Hessian responses (`hessian_response`)

**Line buffer.** The last 56 integral lines are kept. When pixel (x, y) arrives, the approximate Hessian determinant is evaluated at the point (x-26, y-26), so every box filter up to size 51 fits inside the buffered window.

**Box filters.** Six filter sizes cover the first two SURF octaves: 9, 15, 21 and 27, then 15, 27, 39 and 51. The box geometry is standard SURF, with lobe length L/3.

- Dxx and Dyy each read 8 integral samples.
- Dxy reads 16.

**Normalisation.** Each response is multiplied by round(2^20/L²) and shifted right by 12. This normalises by filter area and leaves 8 fractional bits. The determinant is `Dxx*Dyy - 0.81*Dxy²`, where 0.81 is applied as 207/256. The result saturates to 36 bits.

**Parallel, not serialised.** All six sizes are computed in parallel at the pixel clock. The original design instead serialised them through one unit on a faster clock, behind a clock-crossing FIFO. The results are the same, but this version has one clock domain and many read ports on the line buffer (next paragraph).

**Synthesis note.** The line buffer is read at 192 positions per pixel, 32 per filter size. Generic synthesis (yosys) does not finish elaborating this in 10 minutes. An FPGA build would map it to 56 line RAMs with replicated read ports, or go back to time-multiplexing the sizes.

### Extrema and interpolation (`is_extreme`, `interpolate_extremum`, `interest_point_detector`)

**Sampling.** Octave 0 samples every 2 pixels and octave 1 every 4 pixels. For each layer, `is_extreme` keeps three rows of the sampled grid, i.e. 400 or 200 entries per row.

**Candidates.** A candidate is a point on a middle layer (sizes 15, 21, 27 and 39, scale index 0 to 3, stride s = 2 to 5). It must:
- exceed `THRESH` (default 400), and
- be strictly larger than all 26 neighbours in its 3x3x3 block.

Equal neighbours therefore suppress a point.

**Derivatives.** Gradient and Hessian are computed by central differences and kept as integers: D2 = 2 × gradient and H4 = 4 × Hessian. Candidates pass through a 16-deep FIFO.

**Interpolation test.** The standard test is that the sub-pixel offset O = -H⁻¹D is below 0.5 in every component. `interpolate_extremum` evaluates it without a divider:

    accept  <=>  4 * |(adj(H4) * D2)_i| < |det(H4)|   for i = x, y, s

The point is reported at its integer sample position; the sub-pixel offset is not forwarded.

### Frame memory and neighbourhood fetch (`mem_ctrl`)

**Writing.** Integral values go to external memory at address `{bank, row*800+col}`. The bank bit toggles at every frame end.

**Point queue.** Interest points are tagged with their frame's bank and wait in the point FIFO (`IPF_DEPTH`, default 512). A frame-end marker follows each frame's points.

**Fetching.** A point is served once its frame is complete (its bank is not being written) and the extractor is idle. `mem_ctrl` then requests the 26x26 integral samples at `(x+(j-13)s, y+(i-13)s)`, clamped to the frame, one per cycle while `ddr_rd_ready` is high.

**Read port.** Read data must come back in request order. Any latency is allowed.

**Markers.** Markers are forwarded to the descriptor FIFO only when the extractor is idle, so each frame's decision sees all of that frame's descriptors.

### Descriptor (`descriptor_extractor` and its parts)

This is the most intricate part. The 26x26 samples at stride s become a 24x24 grid of Haar responses, so the descriptor window is 24s pixels wide.

1. **`haar_wavelet`** keeps two sample lines plus two samples in a shift register. From the 3x3 window it forms four two-pixel boxes around the centre:

       dx = S_right - S_left
       dy = S_bottom - S_top

   The first response appears 56 cycles after the first sample: 26·2 + 2 + 2 adder stages.
2. **`wavelet_reconstructor`** assigns every response to the 9x9 sub-regions that contain it. There are 16 such sub-regions, k = 4R + C, starting at rows and columns 0, 5, 10 and 15. Neighbouring regions overlap by four samples, so a response belongs to one, two or four of them. It also supplies the row and column inside each region.
3. **`gaussian_mask_lut`** holds the 9x9 weights as unsigned Q0.32, with one unit per scale. The table is:

       w(r,c) = 0x3BDCB4DC * exp(-((r-5)² + (c-5)²) / (2·3.3²)),   r, c = 0..8

   The peak is at row and column 5, as in the published table. It is stored in `rtl/gauss_lut.hex`. Because samples are taken at stride s, a Gaussian that scales with s is the same table in sample units, so all four units hold it.
4. **`gaussian_weight`**:
   - Sub-regions k and k+8 never share a row band, so one multiplier per pair serves both. That is 8 multipliers per direction.
   - Products are `(response * weight) >>> 24`, 36 bits.
   - Each sub-region accumulates Σdx, Σdy, Σ|dx| and Σ|dy| in 48-bit registers.
   - The element order is `[Σdx 0..15, Σdy 0..15, Σ|dx| 0..15, Σ|dy| 0..15]`.
5. **`descriptor_normalizer`**:
   - It weights each sub-region with a 4x4 Gaussian of σ = 1.5 about the grid centre (Q0.16: 58644, 37602 and 24109).
   - It sums the absolute values (an L1 norm).
   - `seq_divider` computes floor(2^62 / norm) in 64 cycles. Every element is multiplied by it and shifted right by 32.
   - The output is a unit-L1 vector scaled to 2^30: the element magnitudes sum to 2^30 within truncation.

With gap-free input, one descriptor takes 749 cycles from its first sample.

### Matching (`library_rom`, `descriptor_matcher`)

**Library ROMs.** The library is split over 8 ROMs. ROM b holds element 8t+b of descriptor d at address 8d+t, so one library descriptor is read in 8 cycles.

**Distance and minima.** For each frame descriptor the matcher computes the L1 distance to all 128 library descriptors, which takes 1024 cycles plus 2. It keeps a running minimum per library descriptor.

**Decision.** At the frame marker, the matcher:
1. inserts the 128 minima into a sorted list of the 30 smallest, one per cycle;
2. sums that list;
3. raises `det_valid` with `detected = sum < MATCH_THRESH`.

The default threshold is 8,053,063,680, which is 7.5 × 2^30. Minima start at 2^56 - 1, so a frame without points is never a detection.

**Library contents.** The reference descriptors of the object are not part of this repository. By default the ROMs hold a deterministic stand-in set: element e of descriptor d is `((h >> 8) - 2^23) * 4` with `h = ((64d + e + 1) * 2654435761) mod 2^32`.

**Loading a real library.** Pass `LIB_FILE` on `surf_system`, `descriptor_matcher` or `library_rom`. The file holds 8192 hex words, descriptor-major, in the Q.30 unit-L1 format above.

### Rates and buffering

| quantity | value |
|---|---|
| pixels accepted | 1 per clock |
| descriptor extraction | 749 cycles per point |
| matching | 1026 cycles per point (this is the bottleneck) |
| frame decision | about 131 cycles after the marker reaches the matcher |
| points per frame | up to `IPF_DEPTH` = 512 |

512 points take about 525,000 cycles. That fits inside one 800x600 frame period, which is about 663,000 clocks with standard SVGA blanking.

**Overflow.** Points beyond the FIFO depth are dropped. `ip_dropped` counts them.

**Bank reuse.** A frame's points must be finished before the frame after next overwrites their memory bank. At 800x600 the numbers above guarantee this. At much smaller frame sizes the video source must leave enough idle time between frames, as the end-to-end tests do.

## The motion detector (`diff_tracker`)

The motion detector is a four-stage pipeline, with the control signals delayed to match:

1. input registers;
2. gray conversion and position counter;
3. a ping-pong frame memory: 2 × 800 × 600 × 8 bits, half written with the current frame while the other half is read at the same address;
4. the compare stage, `diff_compare`.

A pixel whose gray value differs from the stored one by at least 30 is output as pure red (FF0000) and flagged on `moving`. Other pixels are output as gray on all three channels.

The memory is not reset. The first frame is therefore compared with whatever the unwritten half holds.

## Where this design departs or fills gaps

**Choices where the source is silent:**
- Thresholds: Hessian 400, match 7.5·2^30, motion 30.
- All fixed-point formats and binary points.
- Sync polarities.
- The frame-bank scheme in external memory.
- Frame markers, and the sampling grid of the descriptor window.
- FIFO depths: 512 points, 16 candidates, 4 descriptors.
- The highlight colour.

**Corrected formulas:** two printed formulas disagree with the surrounding definitions, and the definitions were followed.
- The integral-image update was printed with the signs of its terms swapped.
- dx was printed as a sum of the left and right halves; the text says "right minus left".

**Simplifications:**
- There is one clock domain. The six Hessian sizes run in parallel instead of on a faster second clock.
- The vendor divider is replaced by a 64-cycle sequential divider.
- Candidate interpolation uses the divider-free test above.
- The descriptor uses the L1 norm, as in the original design, which replaces the square root with absolute values.
- Descriptors are upright, as in the original design, which also skips orientation assignment. The point position is the integer sample position; the sub-pixel offset is not used.

**Outside parts.** The DVI input and output boards, the DDR3 memory and its controller, and the clock buffers are not modelled. Their signals are the top-level ports.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints `TB_RESULT checks=N failures=M` and stops on a watchdog. With Verilator 5:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb --top-module tb_descriptor_extractor \
        rtl/surf_pkg.sv tb/tb_descriptor_extractor.sv -o sim && obj_dir/sim

Run it from the repository root. `gaussian_mask_lut` reads `rtl/gauss_lut.hex` by that relative path.

What the testbenches check against:
- **Arithmetic blocks:** integer or floating-point reference models. For example, `tb_descriptor_extractor` recomputes the whole descriptor from the pixels in floating point.
- **Matcher:** a model of the minimum, sort and sum. It is checked on frames that contain exact library descriptors, noisy copies and unrelated descriptors.

**End-to-end testbenches.** `tb_video_detect_top` (112x104, three frames) and `tb_surf_system` drive a moving grid of bright discs. They use a memory model with random read stalls and 4-cycle read latency, and check:
- every integral value written;
- every frame decision, recomputed from the descriptors that reached the matcher;
- the motion output, pixel by pixel.

They also count read stalls, descriptor-FIFO back-pressure, point-FIFO overflow and highlighted pixels, and fail if any of these never happens.

**Full-size testbench.** `tb_video_detect_top_full` runs the top at its default size, two 800x600 frames, in about 25 seconds.

## Files

- `rtl/surf_pkg.sv`: shared widths, filter-size tables and the interest point record.
- `rtl/*.sv`: one module per file, named as in the text above.
- `rtl/gauss_lut.hex`: the 9x9 Gaussian weight table, four times.
- `tb/tb_<module>.sv`: the testbenches.
- `tb/tb_util.svh`: the check and watchdog macros.
- `tb/tb_top_body.svh`: the shared end-to-end test.
