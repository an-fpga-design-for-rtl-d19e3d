# AVDDF coprocessor: impulse-noise removal for RGB images

Salt-and-pepper noise leaves isolated pixels that have nothing to do with
their neighbours. The adaptive vector directional distance filter (AVDDF)
removes them. It treats each RGB pixel as a 3-D vector and, in every 3x3
window, asks two questions. Which pixel lies closest to all the others, in
length and in direction? And is the centre pixel so far from the others that
it must be noise? If so, the centre is replaced by the most central pixel.
If not, it is left alone. This is what keeps edges and fine detail intact.

This repository holds synthesizable SystemVerilog for a streaming AVDDF
coprocessor. It is meant to sit next to a processor, fed by three AXI DMA
channels. It takes a 256x256 RGB image as bands of three lines and keeps the
filtered image in on-chip memory. When the image is complete, it sends it
back as one AXI4-Stream packet. At 100 MHz one image takes about 2.45 million
cycles, or 24.5 ms.

## The filter

Number the window pixels x0..x8, row by row, with x4 at the centre. For
every pixel i, the filter sums two distances to the other eight pixels:

* the magnitude sum `D_i = sum_j ||x_i - x_j||`, which is Euclidean;
* the angular sum `A_i = sum_j angle(x_i, x_j)`, where
  `angle = arccos(x_i.x_j / (|x_i||x_j|))`.

It combines them with a weight `l` (0 <= l <= 1):

    gamma_i = A_i^(1-l) * D_i^l                     (l = 0.75 here)

Let `x(1)` be the pixel with the smallest gamma, and `gamma(1)` that gamma.
The centre counts as noisy when

    gamma_4 >= xi = gamma(1) + lambda * Psi,   Psi = gamma(1) / (N-1),  N = 9

The output is then `x(1)`. Otherwise the output is the centre `x4`. Lambda
sets how readily the filter smooths.

## Architecture

    s1 (line i)   --\
    s2 (line i+1) ---> stream join --> 3x3 window --> AVDDF filter --> image memory --> m1
    s3 (line i+2) --/                                                   (N x N x 24 bit)

| Module | Role |
|---|---|
| `avddf_coprocessor` | Top level. Frame control: counts the windows and writes, starts the read-back, holds input off until the image has left. |
| `avddf_axis_if` | Joins the three input streams into columns. Streams the finished image out with TLAST. |
| `avddf_window` | The 3x3 window. Shifts in one column (one pixel per line) per step and replicates the edge columns. |
| `avddf_filter` | Sends the 36 pixel pairs of a window into the distance units. Holds the accumulators and the decision stage. |
| `avddf_mag_dist` | `||a-b||`: three differences, squares, a sum, a pipelined square root. |
| `avddf_ang_dist` | `angle(a,b)`: dot and cross products, a square root, a normalising shift and a vectoring CORDIC. |
| `avddf_accum` | Per-pixel sums `D_i`, `A_i`. Takes a snapshot when a window's last pair arrives. |
| `avddf_decide` | Weighted combination, argmin, threshold test and output pixel. |
| `avddf_image_mem` | 65,536 x 24-bit simple dual-port RAM. |
| `avddf_isqrt` | Pipelined integer square root, one result bit per stage. |
| `avddf_pkg` | Pixel type and fixed-point formats. Pipeline depths. |

### How a window flows through the filter

This is the part that takes the most care to follow.

1. **Pair issue.** Both distances are symmetric and are zero for `i = j`. So
   only the 36 unordered pairs `(i, j)` with `i < j` are computed, in the
   order (0,1), (0,2) … (7,8), one per cycle. The issue stage copies the
   window and accepts the next one during its last pair. Windows therefore
   follow each other with no gap: **one output pixel per 36 cycles**.
2. **Distance units.** The pairs enter both units together. The magnitude
   unit takes 18 cycles. The angular unit takes 44 cycles, and the magnitude
   result is delayed to match it. The angular unit never divides. It uses
   `arccos(a.b/(|a||b|)) = atan2(|a x b|, a.b)`. The square root of the
   squared cross product gives `|a x b|`. Both operands are then shifted left
   together, so that dark pixels keep their resolution. A 15-stage vectoring
   CORDIC then gives the angle. RGB components are never negative, so the
   angle always lies in [0, pi/2].
3. **Accumulators.** Each pair's two results are added to the sums of both
   `i` and `j`. The pixel values travel with the pairs. This way the
   accumulators always know the window they belong to, even though the next
   window is already in the pipeline. On the last pair, the completed sums
   and the nine pixels are copied out, and the sums restart from zero in the
   same cycle.
4. **Decision.** Fractional powers are avoided by comparing fourth powers.
   All gammas are non-negative, so ordering and threshold stay exact:

       g_i = gamma_i^4 = D_i^3 * A_i
       noisy  <=>  g_4 * (4(N-1))^4  >=  g(1) * (4(N-1) + 4*lambda)^4

   Psi and xi thus become two constant factors. One index per cycle enters
   a three-stage weighted multiplier, one product per stage. Its results go,
   one per cycle, into a single comparator that keeps the running minimum.
   The two threshold products get a cycle of their own. The result comes
   15 cycles after the window's sums.

The latency from accepting a window to writing its pixel is
36 + 44 + 1 + 15 = 96 cycles.

### Image framing and borders

Per image, the host sends `IMG_N` bands. Band `r` carries lines `r-1`, `r`
and `r+1` on streams s1, s2 and s3, one pixel per beat. Line -1 is sent as a
copy of line 0, and line `IMG_N` as a copy of line `IMG_N-1`. Inside a band,
the window replicates the first and last columns. So every pixel, border
pixels included, gets a full 3x3 window: `IMG_N` windows per band, and
`IMG_N^2` per image. Results are written in raster order. When the last one
is written, the image is streamed out on m1 from address 0, with TLAST on
the last pixel. The next image's columns wait until then.

### Interfaces

All AXI4-Stream ports carry 24-bit RGB with R in bits 23:16, G in bits 15:8
and B in bits 7:0. The inputs do not use TLAST. The three inputs are joined:
a column is taken only when all three TVALIDs are high, and all three
TREADYs then rise together. Status outputs:

* `sending`: the image is being sent.
* `pix_valid` and `pix_replaced`: a pixel was written, and whether its
  centre was replaced.
* `band_end`: the last window of a band was taken.

The reset is asynchronous and active low.

### Number formats

| Quantity | Format |
|---|---|
| `||a-b||` | unsigned, 9 integer + 8 fraction bits, truncated |
| angle | unsigned, 1 + 14 fraction bits (radians) |
| `D_i`, `A_i` | same fractions, 3 more integer bits |
| `g_i` | up to 80 bits; the threshold products up to 104 bits |

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `IMG_N` | 256 | image is `IMG_N x IMG_N`; sets the memory depth and the line length |
| `L_QUARTERS` | 3 | `l = L_QUARTERS/4`, so the default weights magnitude 0.75 and angle 0.25 |
| `LAMBDA_X4` | 4 | `lambda = LAMBDA_X4/4`, so the default is lambda = 1.0 |

## Where this design departs from the published filter, and why

* **Fixed point instead of floating point.** The filter was published as a
  floating-point accelerator. Here every quantity is fixed point, with the
  widths shown above. Against a double-precision model, outputs differ only
  where two candidates are nearly tied.
* **No divider and no arccos.** The angle is computed as atan2 with a
  CORDIC, and fourth powers replace the fractional powers. Both give the same
  function as the published datapath.
* **36 pairs instead of 81.** This uses symmetry and gives identical sums.
* **Black pixels.** For (0,0,0), the angle to or from it is taken as pi/2,
  since the formula is 0/0 there. If it were taken as 0, a black impulse
  would get gamma = 0, win every window it is in, and spread.
* **Chosen values.** Lambda = 1 is a default chosen here. When several
  pixels tie for the smallest gamma, the lowest index wins.
* **This design's own choices.** None of these is specified by the
  published filter:
  * the border treatment (replicated edge lines and columns);
  * the band order;
  * joining the three streams;
  * holding input off while the image is sent;
  * all pipelining.
* **Not included.** These belong to the host system, not to the
  coprocessor:
  * the DMA engines;
  * the processor;
  * the DDR memory;
  * the AXI4-Lite and memory-mapped interconnect.

  The coprocessor is started by its data and has no register interface.
* **Timing.** The design has not been through FPGA synthesis or timing
  closure. The angular unit and the decision stage are pipelined so that
  no stage chains two multipliers. The longest remaining paths are probably
  the 80-bit multiplier stages and the 104-bit threshold comparison.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`:

| Testbench | Checks |
|---|---|
| `tb_avddf_mag_dist`, `tb_avddf_ang_dist` | 2000 random and corner pairs against `sqrt`/`acos` in double precision; latency |
| `tb_avddf_accum` | sums and pixels of 40 windows, with and without gaps |
| `tb_avddf_decide` | 3000 cases around the threshold against a floating-point gamma, at l = 0.75, lambda = 1 and at l = 0.5, lambda = 0.5; latency |
| `tb_avddf_filter` | 400 windows against the reference model; 36-cycle rate; 96-cycle latency |
| `tb_avddf_window`, `tb_avddf_axis_if`, `tb_avddf_image_mem` | window contents and edges under stalls; stream join, TLAST, hold under backpressure, restart; RAM |
| `tb_avddf_coprocessor` | two 8x8 images back to back, end to end |
| `tb_avddf_coprocessor_full` | one 256x256 image at the default parameters |

`tb/avddf_ref_pkg.sv` is the reference model: the filter equations in double
precision. The hardware rounds, so the model widens each gamma into an
interval and accepts any pixel that a correct implementation could output.
When the outcome is forced, the replaced/kept flag is checked too.
`tb/avddf_frame_bench.sv` plays the host:

* three DMA channels, with random gaps;
* a synthetic smooth colour image with black, white and random-colour
  impulses;
* random TREADY on the output.

It checks every pixel and TLAST. It also measures the two image-quality
figures commonly used for this filter, both against the clean image:

* PSNR, `10 log10(3*255^2 / mean squared RGB error)`, must improve by at
  least 3 dB;
* the normalised colour difference NCD, the summed CIE L\*u\*v\* error
  divided by the summed L\*u\*v\* norm of the clean image, must fall.

The bench also counts the mechanisms (centre replaced, centre kept, input
stall, output backpressure, hold-off during sending, band end) and fails if
one never happens.

The full-size run takes 2,446,690 cycles for a 256x256 image with 3%
impulses. PSNR rises from 21.8 dB to 46.0 dB, and NCD falls from 0.030 to
0.015. The noise and the stalls come from `$urandom`, so another simulator
seed (`+verilator+seed+N`) gives slightly different numbers.

Running a testbench with Verilator 5:

    verilator --binary --timing --assert --top-module tb_avddf_coprocessor_full \
      -y rtl -y tb +libext+.sv rtl/avddf_pkg.sv tb/avddf_ref_pkg.sv \
      tb/tb_avddf_coprocessor_full.sv -o sim
    ./obj_dir/sim

The full-size run takes a few seconds. Any other testbench runs by swapping
in its name. Lint with
`verilator --lint-only -Wall -y rtl rtl/avddf_pkg.sv rtl/avddf_coprocessor.sv`.
