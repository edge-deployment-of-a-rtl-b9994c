# Low-power iris recognition accelerator with power-of-two approximate multipliers

This is SystemVerilog RTL for an iris recognition engine aimed at a small FPGA
with no DSP blocks. A person is identified from a near-infrared eye image in
four steps:

1. A streaming **Canny edge detector** finds the pupil and iris boundaries.
2. A circle fit turns those edges into two circles. This step is not part of
   the RTL; its results enter through ports.
3. A **normaliser** unwraps the iris ring into a 200 x 40 rectangle.
4. A small **CNN** classifies the rectangle into one of 40 identities. It has
   two convolution/pooling stages, four dense layers and a softmax.

The main idea is the multiplier. Every multiplication goes through a
**power-of-two approximate multiplier** built from logic cells. It is exact
when one operand is a signed power of two, and it is cheaper and faster than
a general logic-cell multiplier. The network's weights are therefore signed
powers of two, or zero. The Sobel coefficients (±1, ±2) are powers of two as
well.

## The power-of-two multiplier (`approx_mult`)

The multiplier `B` is recoded into marking bits `D_n = b_n & ~b_(n-1)`, with
`b_-1 = 0`. `D_n` is set at the lowest bit of every run of ones in `B`. The
marks are taken in pairs, as in radix-4 Booth recoding, so an N-bit multiplier
has N/2 partial products:

| D(2k+1) D(2k) | partial product PP_k (weight 4^k) |
|---|---|
| 00 | 0 |
| 01 | A, or ~A when B < 0 |
| 10 | A << 1, or ~A << 1 when B < 0 |

When B is negative, the one's complements are completed by the conditioning
bits `aju_n = D_n & B_MSB`, which are added at bit n. The result is
`P = sum(aju_n << n) + sum(PP_k << 2k)`, formed with an adder rather than a
selector.

- For `B = 2^m`, only `D_m` is set and `P = A·2^m`.
- For `B = -2^m` (ones from bit m up), `P = (~A << m) + (1 << m) = -A·2^m`.
- For any other B, each run of ones contributes `±A·2^(start of run)`, so the
  result is an approximation.

The default width is 16 x 16, the width used in the CNN. `N = 8` also works.

What to trust:
- The exhaustive 8 x 8 test matches the run-of-ones definition on all 65,536
  pairs.
- Power-of-two multipliers give exact products at both widths.
- Under this reading of the encoding, 54,570 of the 65,536 signed 8 x 8
  products differ from the exact product. The published error statistics
  give 35,712, so the published error figures are **not** reproduced. Products
  with a power-of-two multiplier, which is all the network ever uses, are
  unaffected.

## Edge detector (`canny_edge`)

The image is streamed in at one pixel per cycle in raster order, with no
back-pressure. Three 3x3 stages follow, each behind a `line_window`. A
`line_window` holds two line buffers and a 3x3 register window.

1. **Gradient** (`sobel_gradient`, `grad_mag_dir`)
   - Two `mac3x3` units apply the Sobel kernels. Each unit has nine
     approximate multipliers and an adder tree.
   - With `a = max(|fx|,|fy|)` and `b = min(|fx|,|fy|)`, the magnitude is
     `max(0.875a + 0.5b, a)`. No square root is needed.
   - The direction is quantised into four 45° sectors (0/45/90/135) by a
     look-up on two slope comparisons (tan 22.5° ≈ 53/128, tan 67.5° ≈
     309/128) and the sign agreement of fx and fy. y grows downwards.
2. **Suppression and thresholds** (`nms`, `adaptive_threshold`, `mean9`,
   `median9`)
   - The centre magnitude is kept if it is not below its two neighbours
     along the gradient direction. Otherwise it becomes 0.
   - Thresholds come from the same 3x3 window of magnitudes:
     `TH = P1·mean` and `TL = TH/2`.
   - `P1` is the parameter `P1_Q8/256`, default 0.8.
   - `Te = 0.75·mean` and the window median are also computed and are
     outputs of `adaptive_threshold`, but nothing downstream uses them.
   - The result is classified as none (≤ TL), weak (TL < g ≤ TH) or strong
     (> TH).
3. **Hysteresis** (`hysteresis`): a strong pixel is an edge. A weak pixel is
   an edge only if one of its 8 neighbours is strong. This is a single local
   pass: chains of weak pixels are not followed further.

Each stage loses one pixel on every border, so an `IMG_W x IMG_H` frame gives
an `(IMG_W-6) x (IMG_H-6)` edge map. The default frame is 320 x 280.

## Normaliser (`iris_normalize`)

Output column t is the angle `θ = 2πt/200`. Output row j is the radial
position `ρ = j/40`. The unit reads the pixel nearest to
`(1-ρ)·(pupil centre + r_p·(cosθ, sinθ)) + ρ·(iris centre + r_i·(cosθ, sinθ))`,
clamped to the frame. This is the rubber-sheet model, which allows the two
circles to have different centres.

- The cos/sin table (Q1.14) is built at elaboration.
- The frame store is reached through a simple read port: `img_rd`, `img_x`
  and `img_y` out, and `img_data` back one cycle later.
- Each output pixel takes 4 cycles when the CNN does not stall it.
- The whole ring between the two circles is unwrapped. Removing the rows
  hidden by eyelids is left to the choice of the circles.

## CNN (`cnn_top`)

| layer | output | module | notes |
|---|---|---|---|
| input | 200x40x1 | | pixel p enters as p/16 (Q8.8) |
| Conv1 3x3, 6 kernels, ReLU | 198x38x6 | `conv_layer` | 60 weights + 6 biases |
| max pool 3x3/3 | 66x12x6 | `max_pool` K=3 | |
| Conv2 3x3, 16 kernels, ReLU | 64x10x16 | `conv_layer` | 864 + 16 |
| max pool 5x5/5 | 12x2x16 = 384 | `max_pool` K=5 | flatten order: row, column, channel |
| Dense 120, ReLU | 120 | `fc_layer` | 46,200 |
| Dense 120, ReLU | 120 | `fc_layer` | 14,520 |
| Dense 84, ReLU | 84 | `fc_layer` | 10,164 |
| Dense 40 | 40 | `fc_layer` | 3,400 |
| softmax | 40 probabilities + winner | `softmax` | |

All layers are connected by valid/ready streams of 16-bit Q8.8 values, so
the network is a pipeline. While the dense layers finish one image, the
convolutions already take the next.

- **Convolution** (`conv_layer`)
  - The input carries the channels of a pixel interleaved.
  - A packer gathers them into one wide word, and a `line_window` builds 3x3
    windows of those words.
  - A single `mac3x3` is reused serially: for each kernel, one input channel
    per cycle is accumulated. Then the bias is added, the result is
    saturated to Q8.8 and ReLU is applied. ReLU is just a selector.
  - This sharing of one set of nine multipliers over all kernels is the
    serial-parallel scheme.
  - A window costs `COUT·(CIN+1) + 2` cycles.
- **Max pooling** (`max_pool`)
  - Per channel, a register tracks the running maximum of the current row
    inside each K-column group.
  - At the group's last column, that maximum is merged into a FIFO entry for
    that column group and channel. The FIFO holds `(W/K)·C` entries.
  - At the group's last row, the FIFO value is the result.
  - Leftover rows and columns are dropped, which gives 38 → 12 and
    64 → 12.
- **Fully connected** (`fc_layer`)
  - The input vector is buffered and split into three equal segments, the
    channels.
  - Three neurons are computed at a time. Each cycle, every channel presents
    one input, which is multiplied by the weights of all three neurons. That
    is 3 x 3 = 9 multipliers feeding nine accumulators.
  - After `N_IN/3` cycles, the three channel sums of each neuron are added
    with the bias.
  - One vector costs `N_IN + ceil(N_OUT/3)·(N_IN/3+1) + N_OUT` cycles.
- **Softmax** (`softmax`)
  - The table holds `e^(-k/16)` in Q0.16 for k = 0..255 and is addressed
    with `(max - x_i)` in steps of 1/16. The maximum is subtracted first, so
    nothing overflows.
  - The terms are summed, and a 32-step restoring divider gives each
    `p_i = e_i/sum` in Q0.16.
  - Ties for the winner go to the lowest class index.

**Weights.** The trained weights are not published. The weight and bias ROMs
are filled at elaboration by `iris_pkg::weight_code` and `bias_val`, a fixed
hash that gives `±2^-e` (e in a small per-layer range) or 0, and biases in
[-0.5, 0.5). `weight_val` is the decoded weight, which the reference models
use. To deploy a trained, power-of-two-quantised network, replace
those two functions or the ROM initialisation in `conv_layer` and
`fc_layer`. Each layer's weights must then use at most four consecutive
exponents, starting at `weight_emin`, to fit the 4-bit code. Weight n of a
dense layer's neuron j is number `j·N_IN + n`. Weight
(kernel k, input channel c, tap r,q) of a convolution is number
`(k·CIN + c)·9 + 3r + q`.

## Top level (`iris_top`)

`iris_top` holds `canny_edge`, `iris_normalize` and `cnn_top`. The parts
outside the RTL are reached through ports:

- **Circle fit:** `edge_valid/edge_o` go out to it, and the two circles come
  back in on `pupil_*` and `iris_*`, with `norm_start` to begin.
- **Frame store** (SDRAM): `img_rd/img_x/img_y/img_data`.
- **Camera:** `cam_valid/cam_pix`.

The normaliser streams straight into the CNN. `prob_*` gives all 40
probabilities and `res_*` the recognised identity. Reset is synchronous and
active low everywhere.

Measured at the defaults, one recognition takes 155,828 cycles from
`norm_start` to `res_valid`, which is 0.78 ms at 200 MHz. Clock frequency has
not been checked here.

## Where this design departs from, or adds to, its description

- The source lists four dense layers (384-120-120-84-40), and its parameter
  counts match them. One passage instead speaks of a single 40-in/40-out
  dense layer. The four-layer network is built.
- The first convolution's listed parameter count (168) would mean three input
  channels. The input is listed as a single channel, and one channel is built
  (60 weights).
- The second pooling stage must be 5x5 with stride 5 to map 64x10 to 12x2 as
  listed. Only the 3x3 pooling is described in words.
- These are choices made here, not given by the source:
  - the Q8.8 number format and the input scaling;
  - ReLU on the hidden dense layers;
  - the stream protocol;
  - `P1 = 0.8`;
  - the sector constants;
  - the single-pass hysteresis;
  - the rubber-sheet formula;
  - the softmax table resolution and divider;
  - the 320 x 280 frame size.
- Not built:
  - the circle Hough transform;
  - the camera controller;
  - the SDRAM and its controller;
  - the Flash weight loader.
- The approximate multiplier's published error statistics are not reproduced
  (see above).

## Memory

The network has 74,838 weights and 386 biases. Every weight is a signed
power of two (or zero), so the ROMs keep a 4-bit code per weight: a
non-zero flag, the sign and a 2-bit exponent offset from a per-layer
smallest exponent (`weight_code` / `wdecode` in `iris_pkg`). The code is
expanded to a Q8.8 value right in front of the multiplier. Weight codes
take about 300 Kbit, the 16-bit biases about 6 Kbit, and the buffers (line
buffers, pooling FIFOs, dense-layer input vectors, softmax store) about
62 Kbit, roughly 370 Kbit in all. That fits the 594 Kbit of M9K block RAM of
a Cyclone 10 LP 10CL025, but it is far more on-chip memory than a design that
streams its parameters from an external Flash would need; that loader is
not part of this RTL.

## Files

- `rtl/iris_pkg.sv`: number format, types, weight/bias/exponential
  generators.
- Multiplier and MAC: `rtl/approx_mult.sv`, `rtl/mac3x3.sv`.
- Window: `rtl/line_window.sv`.
- Edge detector: `rtl/sobel_gradient.sv`, `grad_mag_dir.sv`, `nms.sv`,
  `mean9.sv`, `median9.sv`, `adaptive_threshold.sv`, `hysteresis.sv`,
  `canny_edge.sv`.
- Normaliser: `rtl/iris_normalize.sv`.
- CNN: `rtl/conv_layer.sv`, `max_pool.sv`, `fc_layer.sv`, `softmax.sv`,
  `cnn_top.sv`.
- Top: `rtl/iris_top.sv`.
- Testbenches: `tb/tb_<module>.sv`. `tb/tb_threshold.sv` covers `mean9`,
  `median9` and `adaptive_threshold`.
- `tb/iris_ref_pkg.sv`: the behavioural models the testbenches compare
  against. These are a plain-integer CNN, pooling, softmax with real
  arithmetic, a whole-array Canny, and the run-of-ones multiplier
  definition.

## Simulating

Each testbench checks itself and ends with
`TB_RESULT checks=<n> failures=<m>`. It has a watchdog and uses only
`$urandom`. With Verilator 5:

```sh
verilator --binary -j 8 -Irtl -Itb -y rtl -y tb \
    rtl/iris_pkg.sv tb/iris_ref_pkg.sv tb/tb_iris_top.sv --top-module tb_iris_top
./obj_dir/Vtb_iris_top
```

Replace `tb_iris_top` with any other testbench. What they cover:

- **`tb_iris_top`** runs the whole design at its default sizes: a synthetic
  320 x 280 eye, the full edge map, the 200 x 40 unwrap and the CNN. It
  finishes in about 15 s.
  - Every edge bit is compared with the Canny model.
  - Every frame-store read must fall within one pixel of the exact
    rubber-sheet position.
  - All 40 probabilities (±2 LSB) and the identity are compared with the
    reference network fed with the pixels that were read.
  - It counts strong edges, promoted and rejected weak pixels, NMS
    suppressions, CNN back-pressure on the normaliser and ReLU clipping, and
    fails if any of them never happened.
- **`tb_cnn_top`** runs two full-size images back to back. The second image
  enters while the first is still in the dense layers.
- The block testbenches use reduced sizes, random input gaps and random
  output stalls. Where a block has a fixed schedule, they also check cycle
  counts: conv window period, dense-layer compute cycles, softmax cycles and
  normaliser rate.

All testbenches pass.
