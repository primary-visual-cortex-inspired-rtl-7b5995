# SLIT: a multiplier-free first stage for a LeNet-5 classifier, with a V1-style stereo detector

The first convolution layer of a CNN is the most expensive one to run: the
input image is largest there, and every pixel is multiplied by every kernel
weight of every output channel. The SLIT approach removes that layer. It
replaces it with a fixed, parameter-free feature extractor modelled on the
primary visual cortex (V1):

1. the image is reduced to one bit per pixel;
2. a 3x3 edge detector marks pixels whose neighbourhood is not point-symmetric;
3. a 4x4 "SLIT" detector looks for short straight edge segments at eight
   orientations, 0 to 157.5 degrees in 22.5-degree steps.

The result is eight binary feature maps, one per orientation. Because these
maps are binary, the layers after them get cheaper too:

* max pooling becomes an OR gate (**SMP**);
* the multiplies of the next convolution become multiplexers that pass a
  weight or zero (**SCONV**).

This repository holds synthesizable SystemVerilog for two designs:

* **`slit_lenet5_top`**, a complete LeNet-5 inference core for 28x28 grey images
  (MNIST-style digits):
  `SLIT(8) -> SMP(2) -> SCONV(16) -> MP(2) -> FC(120) -> FC(84) -> FC(10) -> argmax`.
* **`parallax_map`**, a left/right stereo parallax detector from the same V1
  model. It compares the SLIT maps of two images to estimate disparity. It sits
  in the same top module, next to the classifier, with its own ports.

The layer sequence, the edge/SLIT/SMP/SCONV rules and the parallax criterion
come from the thesis *Primary Visual Cortex Inspired Feature Extraction
Hardware Model and Applications*. That thesis evaluated its hardware with
high-level synthesis on a Zynq-7020. The register-level architecture here
(storage, schedules, number format, interfaces) is this design's own. Each
such choice is listed under "Design choices" below.

## Data path at a glance

```
 pixels (8b)                 ┌────────── one clock cycle, whole frame ─────────┐
 ──► image regs 28x28 ──► binarise ──► edge 28x28 ──► SLIT 8x24x24 ──► SMP 8x12x12 ──► smp_reg
                             (>= th1)     (th)          (8 AND4)         (OR4)
 smp_reg ──► SCONV 16x8x8 ──► MP 16x4x4 ──► FC 256→120 ──► FC 120→84 ──► FC 84→10 ──► argmax
             MUX-accumulate    comparators   MAC, ReLU      MAC, ReLU      MAC          class_o
             12 800 cycles     (comb.)       30 720 cyc.    10 080 cyc.    840 cyc.
```

Two parts need no stored parameters: the SLIT front end and SMP. They are
plain combinational logic over the whole frame and are captured into a
register (`smp_reg`) in the cycle that `start` is seen. Once that capture is
done, the image memory is free, so the next image can be loaded while the
current one is being classified.

## The SLIT front end (`slit_layer`, `edge_detect`, `slit_detect`)

This is the part with the least familiar behaviour.

**Binarisation.** A pixel becomes 1 when `pixel >= th1`.

**Edge rule.** For a 3x3 window `P0..P8` (raster order, `P4` in the centre),
the detector compares the four point-symmetric pairs:

* `(P0,P8)`: the 135-degree diagonal;
* `(P1,P7)`: vertical;
* `(P2,P6)`: the 45-degree diagonal;
* `(P3,P5)`: horizontal.

A pair whose two bits differ counts one (an XOR). The centre pixel is an edge
when the count is at least `th` (0..4). So a uniform patch is never an edge,
and a clean step edge counts three. Pixels outside the image read as 0, so the
edge map has the same 28x28 size as the image.

**SLIT rule.** For each 4x4 window of the edge map, channel `t` is the AND of
the four cells that a line at `t * 22.5` degrees crosses. Row 0 is at the top
and angles run counter-clockwise from the horizontal:

| ch | angle | cells (row, col) |
|----|-------|------------------|
| 0 | 0.0   | (1,0) (1,1) (1,2) (1,3) |
| 1 | 22.5  | (2,0) (2,1) (1,2) (1,3) |
| 2 | 45.0  | (3,0) (2,1) (1,2) (0,3) |
| 3 | 67.5  | (3,1) (2,1) (1,2) (0,2) |
| 4 | 90.0  | (0,1) (1,1) (2,1) (3,1) |
| 5 | 112.5 | (0,1) (1,1) (2,2) (3,2) |
| 6 | 135.0 | (0,0) (1,1) (2,2) (3,3) |
| 7 | 157.5 | (1,0) (1,1) (2,2) (2,3) |

The windows start at edge rows and columns 0..23. This gives 8 maps of 24x24,
the size of the 5x5 CONV1 output they replace. The last edge row and column
are not used.

The cell sets in the table are this design's reading of the digital line at
each angle. Changing them means editing one constant table, `LINES` in
`rtl/slit_detect.sv`, and the matching `pts_r`/`pts_c` tables in the
testbenches.

**Cost.** The whole front end for a 28x28 frame is about 24 k word-level cells
after yosys coarse synthesis. It uses no multipliers and stores no
parameters.

## SMP and SCONV: cheap layers on binary maps

**`smp_layer`** pools 2x2 blocks with stride 2. The maximum of four bits is
their OR, so each output is one 4-input OR gate.

**`sconv_engine`** convolves the 8x12x12 binary maps with 16 kernels of 5x5x8
(no padding), giving 16x8x8. A binary input of 1 stands for 1.0, so each
product is just "the weight or zero". The engine works as follows:

* It visits the output positions in raster order.
* For each position it steps through the 200 taps in the order (channel, ky, kx).
* In each cycle one tap goes to all 16 output channels at once: 16
  multiplexers feed 16 accumulators of 32 bits.
* After the last tap it adds the bias, saturates to 16 bits, applies ReLU and
  stores the 16 results.

One image takes 64 x 200 = 12 800 cycles.

**`maxpool_layer`** is an ordinary comparator max pool (2x2, stride 2). It
reduces the multi-bit SCONV output to 16x4x4.

## Fully connected layers and classification (`fc_layer`)

Each `fc_layer` has:

* one multiply-accumulate unit, using a 16x16-bit product and a 48-bit
  accumulator;
* a weight memory with a single read port, read in address order `o*N_IN + i`.

At the end of each output row, the unit:

1. adds the bias, aligned to the product's 16 fraction bits;
2. shifts right arithmetically by 8 (rounding toward minus infinity);
3. saturates to 16 bits;
4. applies ReLU when `RELU = 1`.

The top uses three instances: 256→120 and 120→84 with ReLU, and 84→10 without
ReLU. The 256 inputs of the first one are the pooled SCONV outputs, flattened
channel-major: `index = ch*16 + y*4 + x`. `class_o` is the index of the
largest logit; a tie goes to the lowest index.

## Number format

Weights, biases and activations are signed 16-bit fixed point with 8
fraction bits (Q8.8, range −128 .. +127.996). Every layer saturates its
output to this range rather than wrapping. The 16-bit width matches the
fixed-point evaluation of the source design; the 8/8 split is a choice. All
widths derive from `DATA_W` and `FRAC_W` in `rtl/slit_pkg.sv`.

## Stereo parallax (`parallax_map`, `parallax_detect`)

`parallax_map` holds a left and a right 28x28 image, and each image goes
through its own `slit_layer`. On `start`, both SLIT maps and both images are
captured. Then one position of the 24x24 SLIT grid is scanned per cycle.

For each position, `parallax_detect` scores the candidate disparities
`d = 0..MAX_D` (the right-image feature is expected at column `x - d`) with
two numbers:

* **coincidence**: how many of the 8 x 3 x 3 SLIT bits are set in both the
  left window and the shifted right window (0..72);
* **SAD**: the sum of absolute differences between the 3x3 grey-pixel
  windows. SLIT position `(y,x)` is matched with the pixel window centred on
  `(y+2, x+2)`.

The winner has the highest coincidence. Among equal coincidences the lowest
SAD wins, and after that the smallest `d`. `MAX_D = ceil(DIM/16)`, which
follows the rule of searching 1/16 of the image width; that gives 2 for
28-pixel images. The chosen disparity goes into `disp_map`. A frame takes
24 x 24 + 1 = 577 cycles.

## Interface of `slit_lenet5_top`

| port | dir | width | use |
|------|-----|-------|-----|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset of the control state |
| `pix_we`, `pix_addr`, `pix_data` | in | 1, 10, 8 | write pixel `pix_addr = y*28 + x` |
| `wt_wr` | in | `wt_wr_t` | parameter write: `{en, sel, addr[15:0], data[15:0]}` |
| `th1`, `th` | in | 8, 3 | binarisation and edge thresholds, sampled in the start cycle |
| `start` | in | 1 | classify the stored image (ignored while `busy`) |
| `busy`, `done` | out | 1 | run in progress; one-cycle pulse at the end |
| `class_o`, `logits` | out | 4, 10 x 16 | argmax and raw FC(10) outputs; valid from `done` until the next run ends |
| `st_l_we`, `st_r_we`, `st_pix_addr`, `st_pix_data` | in | 1, 1, 10, 8 | write left / right stereo pixels |
| `st_start`, `st_busy`, `st_done` | in/out | 1 | parallax scan control |
| `disp_map` | out | 24 x 24 x 2 | disparity per SLIT position |

Parameter memories, selected by `wt_wr.sel` (`slit_pkg::wsel_e`):

| sel | memory | address | words |
|-----|--------|---------|-------|
| `WSEL_SCONV_W` | SCONV weights | `(oc*8 + ic)*25 + ky*5 + kx` | 3 200 |
| `WSEL_SCONV_B` | SCONV biases | `oc` | 16 |
| `WSEL_FC1_W` / `_B` | FC 256→120 | `o*256 + i` / `o` | 30 720 / 120 |
| `WSEL_FC2_W` / `_B` | FC 120→84 | `o*120 + i` / `o` | 10 080 / 84 |
| `WSEL_FC3_W` / `_B` | FC 84→10 | `o*84 + i` / `o` | 840 / 10 |

The parameters stay loaded across images, and the memories have no reset.

**Sequence.** To classify an image:

1. Load the parameters.
2. Write the 784 pixels.
3. Pulse `start`.
4. Wait for `done`, then read `class_o`.

`done` arrives exactly **54 445 cycles** after the start cycle:

| stage | cycles |
|-------|--------|
| capture | 1 |
| SCONV | 12 801 |
| FC1 | 30 721 |
| FC2 | 10 081 |
| FC3 | 841 |

That is 0.54 ms at 100 MHz. The image memory may be rewritten as soon as
`busy` is high.

## Design choices

These points are not fixed by the source description and were decided here:

* The exact cells of each SLIT orientation (table above).
* Zero border for the edge map, and the placement of the 24x24 SLIT windows.
  The source also says the SLIT maps have as many elements as the input
  image. This design keeps 24x24 so that the maps line up with LeNet-5.
* Edge rule: "edge when the count of differing pairs ≥ `th`". The threshold
  values are not given, so `th1` and `th` are run-time inputs.
* Q8.8 format, saturation everywhere, floor rounding in the FC layers.
* ReLU after SCONV and after FC(120) and FC(84), as in a standard LeNet-5.
* Schedules: SCONV applies one tap per cycle to all 16 channels; each FC layer
  does one MAC per cycle; the layers run strictly one after another.
* Whole-frame combinational SLIT/SMP, captured at start, so the next image can
  be loaded during a run.
* Host access through plain write ports. The source system used an ARM
  processor with AXI and block RAM for this.
* Parallax: criterion order (coincidence first, then SAD), search direction,
  window alignment, `MAX_D = ceil(DIM/16)`, 28x28 stereo images.

## Not included

* **XY movement detection** (16 channels) and **approach/separation detection**
  (6 channels) of the V1 model. Only their purpose and channel counts are
  described: they combine left/right SLIT maps over time. The channel
  definitions are not specified, so no RTL is given for them.
* **SLIT(11)** for colour inputs (8 SLIT maps plus 3 normalised colour
  channels) and the larger networks built on it: SVHN CNN, VGG-16/19 on
  CIFAR and ImageNet. The core handles 28x28 grey images only.
* **SFC**, a fully connected layer fed directly by binary SMP outputs. It is
  used only in a layer-by-layer evaluation (SLIT+SMP+SFC), not in the LeNet-5
  pipeline, where FC(120) sees multi-bit max-pooled values.
* The **Xilinx DPU** variant and the host processor system.

The engines are parameterised. For example, the smaller
`SLIT(8) + SMP(2) + SCONV(8) + MP(2) + FC(10)` network can be assembled from
`sconv_engine #(.OC(8))` and `fc_layer`, but no top for it is provided.

## Verification

Each module has a self-checking testbench in `tb/`. Each testbench computes
its expected values with its own integer model, has a watchdog, and ends by
printing `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_edge_detect` | all 512 windows x thresholds 0..5 |
| `tb_slit_detect` | each drawn line fires its channel; all 65 536 windows x 8 channels |
| `tb_slit_layer` | full 28x28 frames with bright strokes, two threshold settings; all 8x24x24 bits; every orientation occurs |
| `tb_smp_layer`, `tb_maxpool_layer` | random maps, including ties and all-negative blocks |
| `tb_sconv_engine` | full LeNet-5 size, three weight sets; all outputs; latency 12 801; ReLU and saturation both occur |
| `tb_fc_layer` | 256→120 with ReLU and 7→5 without; latency `N_IN*N_OUT+1`; negative sums and saturation occur |
| `tb_parallax_detect` | random windows, known shifts, SAD tie-breaks |
| `tb_parallax_map` | three stereo frames with shifts 2, 1, 0; every map entry against the model; latency 577; known shift recovered |
| `tb_slit_lenet5_top` | full default size, end to end (see below) |

`tb_slit_lenet5_top` runs the top at its default parameters:

* It loads random parameters and classifies four synthetic stroke images. For
  each it checks all logits, the class and the 54 445-cycle latency against
  the model.
* While each image runs, it loads the next one.
* Between images it re-programs FC(10) biases, so that at least three
  different classes win.
* Finally it runs a stereo pair with a known shift of 2 through the parallax
  detector.

It counts each mechanism and fails if one never happens: edges, each of the
8 orientations, SMP merges, SCONV and FC ReLU clamps, overlapped loads, and
the class changes. It runs in under a minute once compiled.

To run a testbench with Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl rtl/slit_pkg.sv \
          tb/tb_slit_lenet5_top.sv --top-module tb_slit_lenet5_top
./obj_dir/Vtb_slit_lenet5_top
```

Replace the testbench name to run any other. Building the top-level
testbench takes one to two minutes, because the whole-frame SLIT logic and
the parameter memories are large.

## How far to trust it

* Every module passes Verilator `-Wall` lint and slang elaboration. The only
  warnings left are for address bits that a memory does not use. Every
  testbench passes against the RTL.
* Deliberately broken copies of each module make their testbenches fail.
* The testbenches check the RTL against independent models of the rules
  described above. They do not check it against trained network weights or
  real MNIST images, so classification accuracy is not measured here.
* The SLIT orientation cells and all items under "Design choices" are
  interpretations. Tune them before relying on accuracy results from the
  source design.

## Files

`rtl/slit_pkg.sv` holds the sizes, `data_t`, the parameter-write struct and
the saturation function.

The modules, listed bottom-up:

* `edge_detect`, `slit_detect`: the V1 rules for one window;
* `slit_layer`: the whole-frame front end;
* `smp_layer`, `sconv_engine`, `maxpool_layer`, `fc_layer`: the classifier
  layers;
* `parallax_detect`, `parallax_map`: the stereo detector;
* `slit_lenet5_top`: the top.

`tb/` holds one testbench per module.
