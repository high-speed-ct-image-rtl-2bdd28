# Filtered backprojection engine for parallel-beam CT

A CT scanner measures, for many angles θ, line integrals of the X-ray
attenuation through a slice of the body. The result is the *sinogram*: one
row of detector samples per angle, called a projection. To get the slice
image back you filter every projection with a ramp (high-pass) filter and
then *backproject*: smear each filtered projection back across the image
along the direction it was measured from, and add up all angles:

    f(x, y) = Σθ Qθ(x·cos θ + y·sin θ),     Qθ = projection θ ∗ ramp filter

Backprojection is where the work is. Every angle touches every pixel, so a
256 × 256 image from 180 angles needs 11.8 million pixel updates. This RTL
streams the sinogram in and does one pixel update per clock. Filtering of
the next projection overlaps with backprojection of the current one, so a
frame takes `NUM_ANGLES × IMG_N²` cycles. At 144.7 MHz, the clock rate
reported for the source design, that is 81.5 ms per 256 × 256 slice.

The design follows the structure of a published FPGA implementation of
filtered backprojection (FBP):

* a 121-tap symmetric FIR ramp filter, applied in the spatial domain;
* a two-bank buffer for the filtered projections;
* a backprojector that produces one partial pixel per clock;
* accumulation of the partial pixels over all angles.

The source gives only that outline. Word widths, image and detector sizes,
coefficient formula, geometry, interpolation, handshakes and memory
organisation are all choices made here. They are listed under
[Departures and choices](#departures-and-choices).

## Data flow

```
 sinogram  s_valid/s_ready/s_data
     │
     ▼
 filter_subsystem ──(ramp_fir: 121-tap symmetric FIR)
     │  writes N_DET filtered samples, then commits the bank
     ▼
 pingpong_buffer   bank A ◄─ written   bank B ─► read
     │
     ▼
 backprojector ◄── trig_lut (cos θ, sin θ)
     │  one partial pixel per clock: (pixel address, Qθ at that pixel)
     ├──────────────► pp_* output stream
     ▼
 image_accumulator  (IMG_N² words, read-modify-write)
     │
     ▼
 img_rd_addr / img_rd_data   (host reads the finished image)
```

| File | Role |
|---|---|
| `rtl/fbp_pkg.sv` | Default sizes, word formats, and the constant functions for filter taps and cos/sin |
| `rtl/ramp_fir.sv` | 121-tap symmetric FIR: pre-add, multiply, sum, round, saturate |
| `rtl/filter_subsystem.sv` | Runs one projection through the FIR with zero padding and writes it to the buffer |
| `rtl/pingpong_buffer.sv` | Two banks of filtered samples, each with a full flag; banks are handed over in turn |
| `rtl/trig_lut.sv` | Table of cos θ and sin θ for every projection angle |
| `rtl/backprojector.sv` | Raster scan, incremental detector position, nearest-bin lookup |
| `rtl/image_accumulator.sv` | Sums the partial pixels over all angles; image read port |
| `rtl/fbp_top.sv` | Wires the above together |

## The ramp filter

The ideal FBP filter multiplies the spectrum of each projection by |w|.
Here it is applied as a convolution in the spatial domain, so no FFT
hardware is needed. The taps are the band-limited ramp (Ram-Lak kernel),
sampled at the detector spacing:

    h(0) = 1/4,   h(n) = −1/(π² n²) for odd n,   h(n) = 0 for even n ≠ 0,   |n| ≤ 60

`fbp_pkg::ramp_coef` computes them at elaboration time in signed fixed
point with 17 fraction bits, so h(0) = 32768.

Because h is symmetric, `ramp_fir` adds each mirrored pair of samples
before multiplying. It builds 61 multipliers; the 30 even-offset taps are
zero and synthesis removes them. The pipeline has three stages (delay line,
multiply, sum/round/saturate), so a result appears exactly 3 cycles after
its input sample. Output m is the filter centred on input m−60.

`filter_subsystem` turns this into a centred convolution of one
projection:

1. It waits for a free bank, then clears the delay line. This is the zero
   padding before the projection.
2. It takes the N_DET samples from the input stream.
3. It pushes 60 zeros of its own, the padding after the projection.
4. It writes FIR outputs 60 … N_DET+59 to buffer addresses 0 … N_DET−1.
   The bank is committed together with the last write.

So the filtered projection has the same length and the same centre bin as
the input. One angle takes N_DET + 65 cycles when the input never stalls:
432 cycles at the defaults, against 65 536 for backprojecting one angle.
The filter is always far ahead, and the input is back-pressured
(`s_ready` low) most of the time.

The rounding (round half up, then saturate to 18 bits) is modelled exactly
in the testbenches.

A limitation to be aware of: a ramp cut off at ±60 taps keeps a small gain
at zero frequency, about 0.0017. With projections 256 pixels wide, this
lifts the background of the reconstructed image. In the full-size test the
image mean is about 1.6 times the phantom's, while the correlation with
the phantom is 0.96. A longer filter, or subtracting the DC error,
would remove this; the 121-tap length is kept as the source has it.

The source designs its ramp in the frequency domain and transforms it into
the 121 taps. Sampling |w| on a fine frequency grid and keeping the centre
121 taps of the inverse transform gives, in the limit, the taps above.
Sampling |w| at only 121 frequencies instead makes the taps sum to exactly
zero. That was tried and is worse. The missing tail of the kernel is then
spread evenly over ±60 bins, which pulls the background down: the image
mean drops to 0.3 times the phantom's, and the correlation to 0.95.

## Ping-pong buffer handover

Each of the two banks has a *full* flag.

* The writer owns bank `wr_bank` and may write it only while that bank is
  not full (`wr_ready`). `wr_commit` sets the bank's flag and moves the
  writer to the other bank.
* The reader owns bank `rd_bank`, which holds data while its flag is set
  (`rd_ready`). `rd_release` clears the flag and moves the reader on.

Both selectors start at bank 0, so projections come out in the order they
went in. Reads are synchronous with one cycle of latency, like a block RAM.
The backprojector gives `rd_release` in the same cycle as its last read.
`rd_next_ready` (the other bank is full) tells it in that cycle whether it
can carry on straight into the next bank. Assertions
flag a write, commit or release into a bank in the wrong state.

## Backprojection geometry and arithmetic

This is the part to read carefully if you change sizes.

* **Pixels.** Pixel (row r, column c) sits at x = c − (IMG_N−1)/2 and
  y = (IMG_N−1)/2 − r. So y points up, and the pixel spacing is 1.
* **Detector.** Bin k sits at t = k − (N_DET−1)/2, with a bin spacing of 1.
* **Angles.** Angle index a means θ = a·180°/NUM_ANGLES.

These follow the usual MATLAB `radon`/`iradon` conventions. A sinogram
produced that way, with N_DET = 367 for a 256 × 256 image, can be fed in
directly.

The detector position of a pixel, measured in bins from bin 0, is
`TC + x cos θ + y sin θ` with `TC = (N_DET−1)/2`. The backprojector never
multiplies this out. It keeps the position in signed fixed point with
16 fraction bits (28 bits in total at the defaults). C and S are cos θ and
sin θ from `trig_lut`, each with 16 fraction bits.

* At the start of an angle it loads
  `T0 = TC·2¹⁶ + floor((IMG_N−1)·(S − C) / 2)`.
* It adds C for each step to the right.
* At the end of a row it subtracts S from the row's start value.

All of this is integer arithmetic. Pixel (r, c) therefore gets exactly
`T0 + c·C − r·S`, which is how the testbenches compute it directly.

The pixel takes the nearest bin, `floor(t + ½)`. A bin outside
0 … N_DET−1 contributes 0. At the default sizes the detector covers the
whole image diagonal, so that never happens; it does happen in the
reduced-size unit test.

The pipeline runs in three steps:

1. The bin address is issued from the position register.
2. The buffer returns the sample.
3. The partial pixel is registered on `pp_*`.

With `pp_addr = r·IMG_N + c` it appears two cycles after its address was
issued. `pp_first` and `pp_last` mark the first and last angle of a frame.
`frame_done` comes with the last partial pixel of a frame.

## Accumulation and reading the image

`image_accumulator` holds one ACC_W = 26-bit word per pixel. This is
enough for 180 sums of 18-bit values, so it never overflows. It works as a
read-modify-write pipeline:

* The word is read in the cycle the partial pixel arrives.
* The sum is written back in the next cycle.
* On the first angle (`pp_first`) the old word is ignored. No clearing
  pass is needed between frames.
* If a partial pixel addresses the word being written in that same cycle,
  the new sum is forwarded. Any pixel order therefore works, not only
  raster order.

The image word is the plain sum over angles. To obtain attenuation values,
multiply by π / (NUM_ANGLES · s), where s is the scale of the input
samples. The testbenches use s = 64, meaning sample = 64 × line integral in
pixel units.

The image memory has a single read port, shared with the accumulation.
So the host reads the image between frames, and the `run` input makes room
for that:

* The backprojector starts a new frame (angle 0) only while `run` is high.
  Inside a frame it ignores `run`.
* The filter keeps working ahead regardless, filling both banks.
* A host that wants the image raises `run` to start a frame, lowers it once
  `bp_busy` is seen, and waits for `frame_done`. It then reads
  `img_rd_addr` → `img_rd_data` (one cycle later), and raises `run` again.
* With `run` tied high, frames follow each other back to back. The
  `pp_*` stream is then the output, for a host that sums externally.

## Timing

| Quantity | Cycles |
|---|---|
| Filter, one angle | N_DET + 65 (432) |
| Backprojector, one angle | IMG_N² (65 536) |
| Frame, filter already ahead | NUM_ANGLES·IMG_N² (11 796 480) |
| First frame after reset | add the filtering of the first projection and the pipeline, under 450 cycles |

Angles follow each other without a gap. During the last pixel of an angle,
the cos/sin table is already addressed with the next angle. If the other
buffer bank is full (`rd_next_ready`), the start position of the next
angle is loaded in the same cycle. If the bank is not full yet, the
backprojector waits in an idle state. The source
reports 144.7 MHz on a Virtex-II Pro; this RTL has not been through FPGA
timing analysis. The multiply stage has 61 parallel multipliers, and the
sum stage adds 61 products in one cycle. For a high clock rate, split the
sum into an adder tree with more register stages.

## Sizes and formats

All defaults live in `fbp_pkg` and are passed down as parameters of
`fbp_top`.

| Parameter | Default | Meaning |
|---|---|---|
| `IMG_N` | 256 | Image is IMG_N × IMG_N |
| `N_DET` | 367 | Detector bins per projection (radon length for 256 × 256) |
| `NUM_ANGLES` | 180 | Projections over 180°, 1° apart |
| `TAPS` | 121 | Ramp filter length (odd) |
| `SAMPLE_W` | 16 | Signed input sample |
| `COEF_W`, `COEF_FRAC` | 18, 17 | Filter coefficient format |
| `FILT_W` | 18 | Filtered sample (saturated) and partial pixel |
| `TRIG_W`, `TRIG_FRAC` | 18, 16 | cos/sin format |
| `ACC_W` | 26 | Image word; must be ≥ FILT_W + ⌈log2 NUM_ANGLES⌉ (checked at elaboration) |

Memory at the defaults:

* image: 65 536 × 26 bits = 1.70 Mbit;
* buffer: 2 × 367 × 18 bits;
* cos/sin table: 180 × 2 × 18 bits.

On a Virtex-II Pro xc2vp30 this fits in about 94 of its 136 block RAMs.

## Departures and choices

Taken from the source design:

* parallel-beam FBP;
* ramp filter applied as a 121-tap symmetric FIR in the spatial domain;
* filter output written into one bank of a two-bank buffer while the other
  bank feeds backprojection;
* one partial pixel per clock;
* contributions summed over all angles;
* a frame time of (180 / angle step) × image size² cycles;
* look-up tables and embedded multipliers.

Chosen here, because the source does not say:

* **Sizes.** 256 × 256, 180 angles and 367 bins are the MATLAB Shepp-Logan
  phantom and `radon` defaults.
* **Formats.** All word widths, fixed-point formats and rounding.
* **Coefficients.** The tap formula is the analytic Ram-Lak kernel. The
  source designed its ramp in the frequency domain and transformed it, and
  its exact taps or window are not known.
* **Interpolation.** Nearest bin, not linear.
* **Geometry.** Centre and orientation conventions as above.
* **Filter structure.** Pre-adder symmetric FIR with 31 non-zero
  multipliers. The source's own implementation reports 27 multipliers and
  only 2 block RAMs. Its filter structure is not described, and its image
  sum was probably formed outside the FPGA. Here the image accumulator is
  on chip.
* **Interfaces.** The valid/ready input, the buffer handshake, the `run`
  input, the partial-pixel and image ports, and the asynchronous
  active-low reset `rst_n`.

Not included: generating the sinogram (done in software) and displaying
the image.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_ramp_fir` | Random stream with gaps and clears against a direct 121-tap convolution, exact 3-cycle latency, saturation (12-bit instance) |
| `tb_pingpong_buffer` | Random-pace writer and shuffled-order reader, data and order, ready flags against a bank-count model, overlap and writer stalls |
| `tb_trig_lut` | Every entry of a 180- and a 12-angle table against floating point |
| `tb_filter_subsystem` | With a buffer: centred zero-padded convolution of every sample, back-pressure, cycle count N_DET + 62 from first sample to commit |
| `tb_backprojector` | 16 × 16 image, 15 bins, 12 angles: every partial pixel, flags, out-of-range bins, frame time NUM_ANGLES·IMG_N² |
| `tb_image_accumulator` | Random addresses with back-to-back repeats (forwarding), first-angle restarts, readback |
| `tb_fbp_top` | 32 × 32, 47 bins, 30 angles, two frames of the Shepp-Logan phantom (details below) |
| `tb_fbp_full` | The same at the default sizes with an unparameterised `fbp_top`: one 256 × 256 frame from 180 projections |

`tb_fbp_top` does the following:

* It computes the sinogram analytically from the ten ellipses in
  `tb/fbp_ref_pkg.sv`.
* It compares every image word with a bit-exact software model of the
  filter and the backprojection.
* It checks the frame time: exactly NUM_ANGLES·IMG_N² + 2 cycles from
  `run` when the filter is already ahead. The extra two cycles are the
  start and the output register.
* It requires that each of these occurred: input back-pressure, overlap of
  filtering and backprojection, bank swaps, a starved backprojector, an
  angle following the previous one without a gap, a frame held by `run`,
  and the first-angle restart.
* It checks that the image resembles the phantom.

`tb_fbp_full` checks all 65 536 pixels bit-exactly, and the frame time of
about 11.8 M cycles. It runs in well under a minute.

The bit-exact model shares formulas with the RTL (tap formula, fixed-point
formats) but not code. A design error in the formulas themselves is caught
by the comparison with the phantom instead. The correlation coefficient
is ≥ 0.6 at 32 × 32 and ≥ 0.85 at 256 × 256, where 0.96 is reached.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/fbp_pkg.sv tb/fbp_ref_pkg.sv tb/tb_fbp_top.sv --top-module tb_fbp_top -o sim
./obj_dir/sim
```

Replace `tb_fbp_top` with any testbench name. Unit testbenches that do
not use `fbp_ref_pkg` need only `rtl/fbp_pkg.sv` ahead of them. Everything
is two-state clean: registers that are read are reset or written first.

To change a size, override the parameters of `fbp_top` (or change the
package defaults). Keep these in mind:

* `TAPS` must be odd.
* `ACC_W` must cover the sum (an elaboration-time assertion checks it).
* `N_DET` should be at least IMG_N·√2 + 1 if the image corners are to
  receive data.
