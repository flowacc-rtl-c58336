# FlowAcc-style optical-flow accelerator in SystemVerilog

Dense optical flow assigns every pixel of a frame a motion vector that points
to the same scene point in the next frame. This design estimates that vector
by block matching, but it does not compare grey levels. A small binary neural
network (BNN) turns the neighbourhood of each pixel into a 64-bit binary
descriptor, and two pixels match when their descriptors have a small Hamming
distance. Matching is done coarse to fine over three pyramid levels, so each
level only needs a short search window:

| level | grid (for a W x H frame) | how it is made          | flow unit            |
|-------|--------------------------|-------------------------|----------------------|
| 1     | W/2 x H/2                | 2x2 mean of the frame   | 2 input pixels       |
| 2     | W x H                    | the frame itself        | 1 input pixel        |
| 3     | 2W x 2H                  | bilinear interpolation  | 1/2 input pixel      |

At each level the flow found at the level before it, doubled, is the centre
of the search. The result of level 3 therefore has half-pixel resolution.

The architecture follows the FlowAcc accelerator, a published FPGA design:

- one BNN shared by all levels;
- a Hamming unit built from 3-bit XOR/full-adder cells;
- a smoothness step that reuses the matching window;
- a median filter at the end of every level.

The published description leaves out many details: the network itself, the
window size, the filters, the borders and the pipeline schedule. For those,
this RTL makes its own choices. They are marked below and in the comment at
the top of each file.

## Per-level processing

For pixel `p` at level `l`, with `prev(p)` the final flow of level `l-1` at
`(x/2, y/2)` (zero at level 1) and `off = 2*prev(p)`:

1. **Match (M).** Compute the cost of every candidate `mv` in a D x D window
   (D = 5, offsets -2..+2):
   `C(mv) = Hamming(f1(p), f2(p + off + mv))`.
   `block_matching_unit` computes all 25 costs in parallel. `wta_argmin` keeps
   the cheapest one; on a tie, the lowest index wins, scanning dy then dx from
   -2. The result is the *residual* `mv_m(p)`.
   Level 3 has four times as many pixels as the frame. There, four
   matching units (with their WTAs) take the four half-pixel positions of a
   2x2 group in the same clock. All four read the same previous-level flow,
   so they share one offset.
2. **Smooth (S), level 2 only.** The candidates are the nine residuals
   `mv_m(i)` of the 3x3 support region around `p`. `flow_regularizer` picks the
   one with the lowest energy
   `E(i) = Hamming(f1(p), f2(p + off + mv_m(i))) + LAMBDA * Theta(i)`.
   `Theta(i)` (`penalty_factor`) is the sum of the L1 distances from
   `mv_m(i)` to the other eight flows of the region. The key trick: every
   residual lies inside p's own D x D window, so the descriptor for candidate
   `i` is already in the matching window. The smoothness step only
   multiplexes it out and runs one more Hamming unit per candidate; it fetches
   no new descriptors. A neighbour's residual is applied at p's own offset, so
   neighbours with a different `prev` are compared by residual, not by total
   flow.
3. **Compose.** `mv_s + off` is the total flow at this level's grid.
4. **Median (F).** `median3x3_flow` takes the component-wise 3x3 median of
   the composed flow. The result is `mv_f^l`, which the next level doubles.

Which levels smooth is set by `REG_LEVELS`, one bit per level with bit 0 for
level 1. The default `3'b010` smooths at level 2 only, as the published
block diagram shows. Every coordinate that falls outside its grid is clamped
to the border: patch pixels, window descriptors, support-region and median
neighbours.

## Descriptors: the shared BNN

`bnn_feature_extractor` maps a 5x5 patch of 8-bit pixels to 64 bits. It has
three layers, each neuron thresholded to one bit:

- **Layer 1:** 64 neurons. Each adds or subtracts each pixel (weight bit 1 or
  0) and fires when the sum is at least its signed threshold.
- **Layers 2 and 3:** 64 neurons each, XNOR-popcount over the previous layer,
  firing at or above the threshold.

The published design takes its network from another work and does not
describe it. Layer sizes, the patch size and this neuron model are therefore
this design's choices.

**Weights are not built in.** Load them through the `wr_*` port before use,
one neuron per write:

- `wr_layer` is 0..2;
- `wr_neuron` is the neuron index;
- `wr_weight` holds the weights, bit k for input k;
- `wr_thresh` is the threshold.

Writes are taken only while `busy` is low. With random +/-1 weights
(thresholds 0, 32, 32) the descriptors already work as locality-sensitive
hashes. On random texture they find the true motion for most background
pixels: 74 % of the measured pixels at 640 x 480 and 72-82 % at 40 x 30. A
trained network should do better.

The one instance serves both frames and all three levels, one patch per clock.
This is the "temporal multiplexing" that keeps the network's cost independent
of the number of levels.

## Hamming unit

`hamming64` cuts both descriptors into 22 segments of 3 bits. The two bits
beyond bit 63 are zero in both operands. Each segment goes through
`hd3_lut6`, which XORs the bits and adds them with a full adder. Its sum and
carry outputs are each a 6-input function, so on an FPGA with 6-input LUTs a
segment costs two LUTs. An adder tree then sums the sum bits (weight 1) and
the carry bits (weight 2) to give a 7-bit distance. The segmenting follows
the published unit; the adder tree is written as one sum, and synthesis
balances it.

## Schedule, memories and timing

`flowacc_top` keeps everything in frame-sized arrays and runs phases one
after another. Each phase walks its grid in raster order at one pixel per
clock, then drains for 5 clocks:

```
load W*H pixel pairs (pix_valid & pix_ready)
for level 1, 2, 3:
    PYR    nl clocks      build level images of both frames
    FEAT   2*nl clocks    BNN over every pixel of frame 1, then frame 2
    MATCH  nl clocks      M, writes residual (and composed flow if no S);
                          nl/4 at level 3, where four matching units run
    REG    nl clocks      S, only on REG_LEVELS
    MED    nl clocks      F, writes mv_f^l
OUT    4*W*H clocks       flow_valid with mv_f^3 in raster order
```

`busy` is high for the sum of `(phase length + 5)` over all phases. At
640 x 480 that is 8,678,470 clocks, plus 307,200 clocks of loading. Latencies
inside the phases:

| unit                    | latency  |
|-------------------------|----------|
| `block_matching_unit`   | 1 clock  |
| `flow_regularizer`      | 2 clocks |
| `bnn_feature_extractor` | 3 clocks |
| `hd3_lut6`, `hamming64`, `wta_argmin`, `penalty_factor`, `median3x3_flow`, `pyramid_resampler` | combinational |

Memories: two input frames of W*H bytes, and two level images of 4*W*H bytes.
For 4*W*H pixels each, there are also two descriptor arrays (64 bits), two
flow arrays (16 bits) and the level-1/3 final-flow array; the level-2 final
flow needs W*H entries. The read ports are combinational: the design reads up
to 25 descriptors per clock. On an FPGA this needs line buffers or banked RAM
in place of these arrays.

**Departure from the published design.** The published accelerator streams
all levels concurrently and reports 131.5 frames/s at 640 x 480
(40.4 Mpixel/s). This frame-sequential schedule needs about 9.0 M clocks per
frame, so that rate would need a 1.18 GHz clock. The datapath units are
pipelined for one pixel per clock and could be reused in a streaming top;
the top itself is not that streaming design. One more detail is not
reproduced: the published design uses "four down-sampled features" per
matching cost at level 1, without saying how they are combined. Here level 1
matches single descriptors.

## Interface of `flowacc_top`

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `wr_en`, `wr_layer[1:0]`, `wr_neuron[7:0]`, `wr_weight`, `wr_thresh[15:0]` | in | BNN weight load, taken while idle |
| `pix_valid`, `pix1[7:0]`, `pix2[7:0]` | in | pixel pair of frames 1 and 2, raster order |
| `pix_ready` | out | high while idle; a pair is taken on `pix_valid & pix_ready` |
| `flow_valid`, `flow` | out | `flow_t` {y, x}, 8-bit two's complement each, half-pixel units, (2W) x (2H) in raster order, no back-pressure |
| `busy`, `done` | out | processing; `done` pulses with the last vector |

Processing starts by itself after the W*H-th pixel pair.

## Parameters

| parameter | default | origin |
|-----------|---------|--------|
| `W`, `H` | 640, 480 | published frame size |
| `D` | 5 | own choice (search window D x D) |
| `PATCH` | 5 | own choice (BNN input patch) |
| `HID` | 64 | own choice (hidden BNN layer width) |
| `LAMBDA` | 1 | own choice (smoothness weight) |
| `REG_LEVELS` | 3'b010 | smoothing at level 2, as in the published block diagram |
| `FEAT_W` (package) | 64 | published descriptor width |
| `FLOW_W` (package) | 8 | own choice; holds the largest reachable flow, +/-14 half-pixels |

The 3x3 support region and the 22 x 3-bit segmentation are fixed.

## Files

`rtl/`:

- `flowacc_pkg` – widths, `flow_t` and the `flow_x`/`flow_y` helpers
- `hd3_lut6`, `hamming64` – the Hamming unit
- `block_matching_unit`, `wta_argmin` – M
- `penalty_factor`, `flow_regularizer` – S
- `median3x3_flow` – F
- `pyramid_resampler` – building the pyramid levels
- `bnn_feature_extractor` – the shared BNN
- `flowacc_top` – the whole accelerator

`tb/` has one self-checking testbench per module, `tb_<module>.sv`, and a
full-size test, `tb_flowacc_full.sv`:

- The unit testbenches compare against values computed independently in the
  testbench. Where a unit is clocked they also check its latency to the clock.
- `tb_flowacc_top` runs two 40 x 30 frame pairs: a textured background moving
  (+2,+1), with a square moving (-1,+1). A complete reference model of the
  algorithm inside the testbench predicts every output vector bit-exactly. The
  test also checks the clock count of the schedule. It counts each mechanism
  and fails if one never occurs: down-sampling, interpolation, BNN use at each
  level, four-unit matching at level 3, offset from the previous level, a
  flow changed by smoothing, a flow changed by the median, window clamping,
  and input refused while busy.
- `tb_flowacc_full` runs the same test once at the default 640 x 480
  parameters. Verilator takes several minutes to build it (the arrays are
  large), and it runs in about 80 seconds.

Every testbench prints `TB_RESULT checks=N failures=M`. To run one:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    rtl/flowacc_pkg.sv tb/tb_flowacc_top.sv --top-module tb_flowacc_top
./obj_dir/Vtb_flowacc_top
```

## How far to trust it

Each module's testbench passes, and each testbench was shown to catch a
deliberate fault in its module. The top-level result matches the testbench's
own model of the algorithm bit for bit, at both sizes. That shows the RTL does
what this README describes. It does not show that the description matches the
original accelerator: the network, the penalty formula, the filters and the
border handling are reasoned choices where the published design is silent.

Two quirks of the simulator used for checking, kept in mind in the code:

- `$signed()` of a member of a packed struct held in an array can come back at
  the width of the whole struct, so `flow_t` members are unsigned and are
  read through `flow_x`/`flow_y`, which go via a signed variable;
- `sort()` on a queue of `int` orders the values as unsigned, so the
  testbenches find medians by counting.
