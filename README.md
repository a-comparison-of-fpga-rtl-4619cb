# Phase-based stereo, optical flow and local features engine

This is a streaming hardware engine that computes three dense results from a stereo
video sequence, pixel by pixel:

- a **stereo disparity** from the left/right pair;
- a two-component **optical flow** from three consecutive left frames;
- three **local image features**: energy, orientation and phase.

All three come from the same place: the complex responses of a bank of eight oriented
Gabor filters. Disparity and motion are read from *phase differences* between the
filter responses of two images. Large displacements are handled coarse to fine over a
six-level image pyramid. Each scale's estimate is expanded to the next finer scale and
used to warp the images before the residual is measured there.

The architecture follows a published FPGA design for this algorithm. There is one
single-scale stereo core and one single-scale optical-flow core, and both are reused for
every scale. Around them are the multiscale units: pyramid reduction, expansion, 1D and
2D warping, merge and 3x3 median regularisation. A memory controller writes the
per-pixel result to an external SRAM bank that a host shares. The default size is
640x512 pixels with six scales.

## Number formats

| quantity | format |
|---|---|
| pixels | 8-bit unsigned |
| Gabor responses C_q, S_q | 16-bit signed integers |
| phases | 12-bit binary angles: 4096 = 2*pi, so wrapping is two's-complement overflow |
| amplitudes | 18-bit unsigned, from CORDIC |
| disparity, flow | 12-bit signed, 1/16 pixel (8.4 fixed point) plus a separate valid bit inside the engine; on the output `-2048` means invalid |
| features | 9 bits each: energy `sqrt(sum C^2+S^2) >> 6`; orientation over [0, pi) (512 = pi); phase (512 = 2*pi) |

Sign conventions:
- The disparity is `x_right - x_left`, so a scene shifted left in the right image gives
  a negative disparity.
- The flow is the displacement from frame t to frame t+1.

One result is 63 bits: `{feature(27), disparity(12), vx(12), vy(12)}`. It goes to the
output bank as two 36-bit words at addresses `2*(y*W+x)` (low 36 bits) and `+1`.

## The Gabor filter bank (`gabor_bank`, `window_gen`, `gabor_phase`)

The bank holds eight complex filters with orientations theta_q = q*pi/8. Each is
11x11 taps with a 4-pixel period (w0 = pi/2 rad/pixel), under a Gaussian of sigma 2.0.

Each complex filter is separable. The bank first filters the 11 pixels of a column with
a complex column filter, then filters 11 such column results along the row with a
complex row filter. The two complex products give C_q and S_q.

An 11-row line buffer (`window_gen`) feeds the column pass. A shift register of column
results feeds the row pass. The filter coefficients are computed during elaboration by
package functions (`vision_pkg::gabor_coef`), using `$exp` and `$cos` on the filter
formula, so there is no coefficient table. Outside the image the taps read zero.

`gabor_phase` adds eight CORDIC units in vectoring mode. They turn (C_q, S_q) into an
amplitude rho_q and a phase phi_q.

Every pass over an image scans an *extended raster*: the image plus a few extra columns
and rows. This lets the window pipelines empty without any stall logic. Each block that
uses a window reports its output coordinate and whether that coordinate lies inside the
image.

## Local features (`local_features`)

From the eight responses:
- **energy**: `E = sum_q rho_q^2`, followed by an integer square root;
- **orientation**: half the angle of `sum_q rho_q * e^{2j theta_q}` (a CORDIC);
- **phase**: `atan2(sum S_q, sum C_q)`.

The phase is a simplification. A steered filter would give the phase in the dominant
orientation; this design sums the responses instead.

## Stereo (`phase_disparity`, `stereo_core`)

For each orientation q:

    delta_q = wrap(phi_L - phi_R) / (w0 * cos theta_q)

A constant reciprocal table implements the division and yields 1/16 pixel.

A component is dropped when:
- its orientation is vertical (q = 4), since it carries no horizontal information; or
- either amplitude is below `AMP_MIN`.

All eight components go through an 8-input odd-even transposition sorting network. Each
invalid component is first replaced by a huge key or a tiny key, in alternation, so the
fourth smallest key is a median of the valid ones (the lower one for an even count). The disparity is valid when at least
`MIN_VALID` (3) components are.

`stereo_core` holds two Gabor/CORDIC pipelines (left and right), `local_features` on the
left image, and the disparity unit.

## Optical flow (`of_solver`, `of_core`)

`of_core` filters three frames, t-1, t and t+1. The outer two have already been warped
toward frame t by the prior flow. Per orientation:
- Two wrapped differences are taken: `d01 = phi_t - phi_{t-1}` and
  `d12 = phi_{t+1} - phi_t`.
- Their sum is the unwrapped phase change over two frames.
- The least-squares line through the three phases has slope `psi = (d01+d12)/2`.
- Its mean squared error is `(d12-d01)^2 / 18`.

A component is reliable when that error is below the linearity threshold tau_l = 0.5 rad²
(`LIN_THRESH`) and all three amplitudes exceed `AMP_MIN`.

Each reliable component gives one constraint, `vx cos theta_q + vy sin theta_q = -psi/w0`.
The solver builds the 2x2 normal equations from these constraints and solves them by
Cramer's rule. The flow is valid with at least `MIN_COMP` (3) reliable components and a
non-singular system.

## Coarse to fine (`scale_sequencer`, `pyramid_reduce`, `pyramid_expand`, `warp_1d`, `warp_2d`, `merge_unit`, `median3x3`)

This is the part that needs the most attention when changing the design.

**Frame cycle.** The sequencer runs each frame through three phases:

1. **LOAD.** The new left and right frames stream in (`pix_valid`/`load_ready`). They are
   written into level 0 of the newest pyramid slots. There are three left slots (frames
   t-1, t, t+1 rotate through them) and two right slots.
2. **BUILD.** The pyramid is built one level at a time. Level L is scanned, and
   `pyramid_reduce` (5x5 binomial filter, then keep even rows and columns) writes level
   L+1 of the left and right pyramids. The reduction is iterative because each level
   depends on the one before.
3. **PROC.** This phase starts once three left frames are stored. The sequencer scans
   each scale from the coarsest to the finest. Every pass at scale L runs this pipeline:
   - **expansion** (`pyramid_expand`): reads the scale L+1 estimates from the 2x2
     neighbourhood in the coarser map. It interpolates them to scale L and doubles them
     to scale L units. At even coordinates it takes the coarse value; at odd ones it
     averages the available neighbours.
   - **warping**: the right image is sampled at `x + d` with linear interpolation
     (`warp_1d`). Frames t-1 and t+1 are sampled at `(x, y) -/+ u` with bilinear
     interpolation (`warp_2d`). Frame t is read unwarped.
   - the **stereo** and **flow cores** measure the residual displacement.
   - a second expansion at the cores' output coordinate, then **merge**
     (`merge_unit`): estimate = residual + prior. An invalid residual gives an invalid
     estimate, and an invalid prior counts as zero.
   - a **3x3 median** (`median3x3`) of the disparity, vx and vy. It outputs the median of
     the valid neighbours when at least 5 of the 9 are valid. The features travel along
     with the disparity median to stay aligned.
   - the result is written to one of two **ping-pong estimate maps**, for the next finer
     scale, and goes out on the result stream. At scale 0 it also goes to the output
     bank.

**Memories.** Both the pyramids and the estimate maps are `quad_ram`s. A quad_ram has
four banks selected by the parity of (x, y), so any 2x2 neighbourhood can be read in one
clock. That is what gives the warping and expansion units one pixel per clock. The
pyramid levels are packed one after another in each bank (`vision_pkg::pyr_base`).

**Latency alignment.** Every pipeline stage carries its pixel coordinate with it through
delay lines, so none of the latencies depend on each other. The top-level comment lists
the clock at which each stage sees a pixel.

## Memory controller and host access (`mcu`, `async_fifo`)

The output SRAM bank runs in its own, faster clock `mclk`. Two *abstract access ports*
(AAPs) connect to it. Port 0 is the engine's result writer, which writes two words per
pixel. Port 1 is the host, which can read and write single words. Each port has a
request FIFO and a response FIFO between the clock domains. These are Gray-pointer
dual-clock FIFOs.

A round-robin arbiter serves the ports. A write takes one `mclk` cycle per word; a read
takes three. When the engine's request FIFO is full, a result is lost and the sticky
`ovf` flag is set. With `mclk` at least twice as fast as `clk`, this does not happen.

The SRAM interface is synchronous:
- `sram_ce`/`sram_we`/`sram_addr`/`sram_wdata` are driven from flops;
- read data is expected on `sram_rdata` one `mclk` after the read cycle.

## Throughput and size

At 640x512 one frame takes:

| phase | clocks |
|---|---|
| loading | 327,680 |
| building the pyramid | 441,764 |
| processing six scales | 451,584 |

That is 1,221,040 clocks in total, or 3.73 clocks per input pixel, as measured by the
full-size testbench.

The reference FPGA design reaches 2.7 clocks per pixel. Its pyramid construction
overlaps better with loading. In this design, building level 1 needs a full extra pass
over level 0. Doing the first reduction while the frame streams in would remove about one
clock per pixel.

**Memory.** The pyramids are held on chip. The five pyramid slots need 17.5 Mbit at
640x512, and the two estimate maps need 6.4 Mbit. The reference design instead keeps the
pyramids in external SRAM banks.

**1280x1024.** A 1280x1024 frame needs `W`/`H` set accordingly and four times the
memory. The 20-bit output-bank address (1 M words) also has to grow, because the result
words of such a frame occupy 2.6 M words.

## Where this design departs from the reference design

- The pyramids and estimate maps are in on-chip memory. The reference design uses
  external SRAM.
- A 2x2 neighbourhood is read from four parity banks. The reference design stores a 2x2
  window per pixel instead.
- The Gabor bank uses the direct separable form. The reference design saves
  multiplications by exploiting symmetry.
- A standard pipelined CORDIC and an integer square root replace vendor cores.
- The feature phase is the phase of the summed responses, not a steered filter.
- The flow gets one 3x3 median pass per scale, like the disparity. The reference design
  regularises the flow iteratively but does not give the number of passes.
- The sequencing is simple: load, then build, then process. This gives 3.73 clocks per
  pixel against 2.7.
- These values are this design's own choices, not taken from the reference design:
  - the Gaussian sigma;
  - all arithmetic widths;
  - `AMP_MIN`, `MIN_VALID` and `MIN_COMP`;
  - the replacement keys used in the median;
  - treating an invalid prior as zero;
  - zero padding at the image borders;
  - the number of scales (six).
- The PCIe link and the SRAM chips are outside the RTL. The top brings out the SRAM pins
  and the host's access port instead.

## Interface of the top (`vision_engine`)

Parameters: `W` (640), `H` (512), `NSCALES` (6).

- `pix_valid`, `pix_l`, `pix_r`, `load_ready`: the frame stream. `W*H` pixel pairs are
  accepted while `load_ready` is high, in raster order.
- `phase`, `level`: the current phase (`PH_LOAD`, `PH_BUILD`, `PH_PROC`) and the current
  scale.
- `frame_done`: pulses after each processed frame. The first one comes after the third
  frame.
- `res_valid`, `res_level`, `res_x`, `res_y`, `res`: one `result_t` per pixel of every
  scale, coarsest scale first.
- `host_req_*`, `host_rsp_*`: the host AAP. A request is accepted when `host_req_ready`
  is high. A read response is held until `host_rsp_ready`.
- `sram_*`: the SRAM bank, in the `mclk` domain. `ovf` is the sticky overflow flag.

## Verification

Each testbench is self-checking and prints `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_cordic` | angle and magnitude against `atan2`/`hypot` for random vectors; latency |
| `tb_isqrt` | exact integer square roots; latency |
| `tb_window_gen` | every window against the image, zeros outside; latency |
| `tb_gabor_bank` | responses against a floating-point 2D Gabor convolution; latency |
| `tb_local_features` | energy, orientation and phase against floating-point references; latency |
| `tb_phase_disparity` | median of the valid per-orientation disparities, validity rule; latency |
| `tb_of_solver` | least-squares flow against a floating-point solution, with non-linear and weak components; latency |
| `tb_median3x3` | median of the valid samples, the 5-of-9 rule, auxiliary data alignment, latency |
| `tb_pyramid_reduce` | binomial reduction, output order, latency |
| `tb_merge_unit`, `tb_quad_ram`, `tb_async_fifo` | the arithmetic, 2x2 reads and read latency, and order, full and empty across two clocks |
| `tb_pyramid_expand` | interpolation, doubling, saturation and validity against a reference, `prior_en`; latency |
| `tb_warp_1d`, `tb_warp_2d` | linear / bilinear interpolation with clamping at the border, from a four-bank memory model; latency |
| `tb_stereo_core` | disparity of a texture shifted by 0.75 px, energy, one output per pixel; latency |
| `tb_of_core` | flow of a texture moving by (0.75, -0.5) px per frame, one output per pixel; latency |
| `tb_mcu` | two ports: every word stored, reads, round-robin order, blocking when the request FIFO fills, idle read latency |
| `tb_scale_sequencer` | phase and scale order, scan counts per pass, slot rotation, frame length |
| `tb_vision_engine` | end to end on 64x48 with three scales and four frames (details below) |
| `tb_vision_full` | the same checks at the default 640x512 with six scales and three frames; about one minute of simulation |

In `tb_vision_engine`, a synthetic texture moves by 1.5 px per frame and has a 3 px
disparity. Both are beyond the ±2 px that one scale can resolve, so the test only passes
if the coarse scales, expansion and warping work. The testbench checks:
- that each scale outputs every pixel exactly once, coarsest first;
- disparity and flow accuracy to within 1/2 px over the interior;
- non-zero energy;
- invalid corners from the median;
- results read back from the SRAM model through the host port;
- host traffic interleaved with result writes;
- no overflow;
- the frame period.

To simulate with Verilator:

    verilator --binary --timing -Wno-fatal --top-module tb_vision_engine \
        -y rtl -y tb +libext+.sv rtl/vision_pkg.sv tb/tb_vision_engine.sv
    ./obj_dir/Vtb_vision_engine
