# Soft coprocessors for streamed image processing

This is a set of small image-processing engines, called soft coprocessors
(SCPs), for an FPGA. They share one AXI-Stream switch. Each SCP does one
class of image-algebra operation:

- point operations;
- 3x3 neighbourhood operations;
- the same kernel in several rotations;
- global reductions;
- block-wise operations;
- two fixed-function engines (Sobel, Otsu).

The class of each SCP is fixed when the hardware is built. What it computes
is not. Every frame travels as one packet: a **parameter header** comes
first, then the pixels. The header holds one section per SCP. A section
gives the SCP its operands and the switch channel its output goes to. So
the host can change, from one frame to the next:

- which SCPs are chained and in what order;
- which function each SCP applies;
- kernels, strides and block sizes.

None of this needs resynthesis, and the pipeline never stops.

The intended use is design exploration. An engineer tries an image pipeline
on a live camera stream, such as opening, then edge detection, then
automatic threshold. Once the algorithm is settled, the engineer may
replace a chain of generic SCPs with a fixed-function one (like `sobel_scp`)
that is much smaller.

Everything here is synthesizable SystemVerilog (IEEE 1800-2017). It runs at
one pixel per clock.

## The stream format

All SCPs use the same 37-bit beat, `scp_pkg::axis_word_t`:

- `data[31:0]`: TDATA;
- `dest[3:0]`: TDEST;
- `last`: TLAST.

The top four bits of TDATA tag the word:

| tag | name  | fields |
|-----|-------|--------|
| 0   | DATA  | pixel in `[7:0]`, or a wider result in `[27:0]` |
| 1   | FRAME | width `[27:16]`, height `[11:0]` |
| 2   | TYPE  | SCP type `[23:16]`, SCP ID `[7:0]`: starts a section |
| 3   | OP    | one operand `[27:0]` |
| 4   | TDEST | output channel of the SCP owning the section, `[3:0]` |
| 5   | END   | ends the section |

A frame packet looks like this. TLAST is set on the last pixel only:

```
FRAME(w,h)
TYPE(neigh,4) OP OP ... OP TDEST(5) END     <- section for SCP 4
TYPE(neigh,5) OP ... TDEST(9) END           <- section for SCP 5
TYPE(sobel,9) TDEST(10) END
...
DATA DATA DATA ... DATA(last)
```

The first word tagged DATA ends the header. Sections may come in any order.
Sections for SCPs that are not on the frame's path do no harm: every SCP
forwards the whole header.

### What each SCP does with a packet (`scp_header`)

Every SCP is built around the same front end, `scp_header`. It runs three
phases:

1. **Receive.** The header words are stored in a buffer of 128 words
   (`HDR_DEPTH`). While they arrive, the front end:
   - picks out the section whose TYPE word carries its own type and ID,
     decoding the operands into `cfg_ops[]` and the channel into `cfg_dest`;
   - reads the input frame size from the FRAME word.
2. **Send.** The stored header is replayed on the output, with TDEST set to
   the SCP's own `cfg_dest`. The FRAME word is rewritten to the size of the
   image this SCP will produce. For example, a 3x3 window gives
   (W-2) x (H-2), and a histogram gives 256 x 1. So every later SCP sees
   correct dimensions.
3. **Data.** Pixels go to the SCP core, and its results go to the output
   with TDEST set. The phase ends once both the last input word and the
   last output word have passed; then the next header is received.

The header must be stored before it is replayed, because the output
channel is only known once the SCP's own section has been read. This costs
one header length of latency per SCP in the chain, once per frame.

### The switch (`axis_switch`)

The switch is a crossbar. It routes each packet by its TDEST:

- A destination that is free grants the lowest-numbered source offering a
  word for it.
- The grant is held until TLAST, so packets never interleave.
- Every destination output has a two-entry register slice (`axis_skid`).
  This breaks the ready path, so a chain of SCPs cannot form a
  combinational loop through the switch.

### Where frames enter: the streamer

The `streamer` is where frames enter. The host writes the header words
into its memory (`cfg_we`, `cfg_addr`, `cfg_wdata`) and sets:

- `cfg_len`: the number of header words;
- `cfg_dest`: the first SCP of the graph.

Writing a FRAME word also sets the frame size. The streamer then sends,
for each `run`, the header followed by the camera frame. The camera port
is valid/ready with a start-of-frame flag. Pixels that arrive before a
start of frame are dropped, so packets always hold whole frames.

## The configuration in `scopes_top`

The switch channel of each SCP is also its ID:

| channel | SCP | module |
|---|---|---|
| 0 | host output (`out_*`) | - |
| 1 | point, image-scalar | `point_is_scp` |
| 2 | point, image-image, input A | `point_ii_scp` |
| 3 | point, image-image, input B | `point_ii_scp` |
| 4 | 3x3 neighbourhood #0 | `neigh_scp` |
| 5 | 3x3 neighbourhood #1 | `neigh_scp` |
| 6 | complex (rotated) neighbourhood | `cneigh_scp` |
| 7 | global reduction to scalar, with frame buffer | `global_r2s_scp` |
| 8 | global reduction to vector (histogram) | `global_r2v_scp` |
| 9 | Sobel with threshold | `sobel_scp` |
| 10 | Otsu thresholding | `otsu_scp` |
| 11 | block-based neighbourhood | `block_scp` |

The switch has 11 sources: the streamer, then the ten SCP outputs.

There are two basic neighbourhood SCPs, so that an opening (dilation, then
erosion) can run in one pass.

Top-level parameters:

- `MAX_W = 640`: line-buffer length (640x480 camera video);
- `MAX_H = 512`: with `MAX_W`, sizes the frame buffers at 640 x 512, so
  both 640x480 frames and 512x512 images fit;
- `HDR_DEPTH = 128`: header buffer depth, in words.

The host and the camera sit outside the top. The host uses `cfg_*`, `run`,
`out_*`, `r2s_result` and `otsu_threshold`. The camera uses `pix_*`.

## The coprocessors and their operands

Operand numbers are the order of the OP words in the SCP's section.

Function codes:

- Point functions (`point_op_e`): add 0, sub 1, mul 2, abs-diff 3, and 4,
  or 5, xor 6, min 7, max 8, > 9, >= 10, < 11, <= 12, == 13, != 14.
- Pairwise functions (`pair_op_e`): mul 0, add 1, sub 2, and 3, or 4.
- Reductions (`red_op_e`): sum 0, |sum| 1, max 2, min 3, and 4, or 5.

Each SCP in brief:

- **`point_is_scp`**: one function of each pixel and a scalar. Operands:
  - 0: scalar;
  - 1: function;
  - 2: output when a relation is false;
  - 3: output when a relation is true.

  A threshold at 90 is `(90, >, 0, 255)`. Arithmetic saturates to 0..255.
- **`point_ii_scp`**: one function of two images, pixel by pixel. Operands:
  - 0: function;
  - 1: false value;
  - 2: true value.

  Input A carries the header that is forwarded. Input B's header words are
  dropped. A pair is consumed when both inputs offer a pixel.
- **`neigh_scp`**: a two-stage 3x3 operation. First, each window pixel is
  combined with its kernel weight by the pairwise function. Then the nine
  results are reduced to one. Examples:
  - (mul, sum) is a convolution;
  - (mul, or) with weights of 1 is a binary dilation;
  - (mul, and) is an erosion;
  - (mul, max) is a grey dilation.

  Operands:
  - 0..8: signed 8-bit weights, row-major;
  - 9: pairwise function;
  - 10: reduction;
  - 11, 12: horizontal and vertical stride (0 means 1).

  The window, line buffer and position counting are in `window3x3`: two
  line buffers plus a 3x3 register. It produces the (W-2) x (H-2) windows
  that lie fully inside the image. With strides sx, sy, only every sx-th
  window of every sy-th line is kept, giving ((W-3)/sx+1) x ((H-3)/sy+1)
  pixels.
- **`cneigh_scp`**: one kernel in up to `MAX_ROT = 8` orientations, all
  evaluated in parallel on the same window, so one line buffer serves
  them all. Operands:
  - 0..8: kernel;
  - 9: pairwise function;
  - 10: per-orientation reduction;
  - 11: number of orientations;
  - 12: step angle in degrees;
  - 13: final operation combining the orientations.

  Rotating by 45 degrees moves each outer weight one place clockwise
  around the border of the 3x3 kernel; the centre stays put. Angles are
  used in whole multiples of 45 degrees.

  Sobel edge strength |Gx| + |Gy| is kernel `[-1,0,1,-2,0,2,-1,0,1]`,
  2 orientations, 90 degrees, (mul, |sum|), final sum.
- **`global_r2s_scp`**: reduces a frame to one scalar. Operand 0 selects
  the result:
  - 0: sum;
  - 1: |sum|;
  - 2: max;
  - 3: min;
  - 4: count of non-zero pixels;
  - 5: average (truncated).

  All statistics are gathered every cycle as pixels stream in. The result
  leaves as one DATA word and is also held on `result`. With the build
  option `FRAME_BUF = 1` and operand 1 non-zero, the stored frame is sent
  again after the result. A later SCP can then use the result on the same
  image.
- **`global_r2v_scp`**: the 256-bin grey-level histogram. It is sent as a
  256 x 1 frame, and each bin is cleared as it is read.
- **`block_scp`**: tiles the image into BW x BH blocks. Block origins are
  SX apart horizontally and SY lines apart vertically. A 3x3
  neighbourhood operation is applied to each block separately. The block
  buffer is one column wider than the block: each block line is read out
  with the first pixel to its right. That pixel is the last image pixel
  of the line when the block touches the right image edge. Windows that
  straddle the right block edge are therefore computed; windows never
  cross the top or bottom block edge. Operands:
  - 0..10: as in `neigh_scp`;
  - 11, 12: BW, BH;
  - 13, 14: SX, SY (0 means the block size).

  The blocks are sent one after another, each (BW-1) x (BH-2). How it
  works:
  1. A strip buffer of `MAX_BH = 16` lines collects one band of blocks.
     It is used circularly (line y goes to slot y mod 16).
  2. Input then stalls while the band's blocks are read out, block by
     block, into a window unit of width BW+1 that restarts for every
     block.
  3. Filling resumes until the next band is complete. Bands may overlap
     (SY < BH): their shared lines stay in the strip.
- **`sobel_scp`**: fixed-function Sobel. It uses constant shifts and adds,
  no multipliers. It outputs 255 where |Gx| + |Gy| >= `THRESH` (200) and
  0 elsewhere.
- **`otsu_scp`**: automatic threshold. How it works:
  1. It stores the frame while it builds the histogram.
  2. It sweeps the 256 candidate thresholds, one per cycle. It keeps the
     one that maximises Otsu's between-class variance. Comparisons are
     cross-multiplications of (N·s0 − S·w0)² / (w0·(N − w0)), so no
     divider is needed.
  3. It replays the frame binarised: 255 above the threshold, 0
     otherwise.

  The threshold is also held on `threshold`.

## Timing

Every SCP accepts one pixel per clock when its output is not stalled.
Latency and extra cycles per SCP:

| SCP | latency or extra cycles |
|---|---|
| point, 3x3 window | 1–2 cycles |
| R2S | result 2 cycles after the last pixel |
| R2V | 256 cycles to send the histogram |
| Otsu | 256-cycle sweep, then one frame time of replay |
| block | up to 4 cycles between blocks, and input stalls during read-out |

Each SCP in a chain also adds the header length once per frame.

Measured in simulation with no back-pressure, a 640x480 frame through the
complex-neighbourhood Sobel and then a threshold takes 307,290 clock
cycles. At 150 MHz that is about 488 frames per second. By the same
count, a 512x512 image takes 262,144 cycles plus the header, or about 572
frames per second.

The original design was built with high-level synthesis. In its fastest
build mode it reports, for 512x512 images at 150 MHz:

| SCP | frames per second |
|---|---|
| point | 556 |
| 3x3 neighbourhood | 380 |
| complex neighbourhood | 374 |
| global | 568 |

Its small-area build mode is about three times slower. It also reports
about 125 FPS for Sobel on 640x480 video, both as the generic and as the
fixed-function SCP. This RTL runs every SCP at one pixel per clock. That
matches the fastest original figures for point and global SCPs, and is
faster than its neighbourhood figures.

## Where this design departs from the original

- **Interconnect.** The original connects SCPs through a vendor AXI-Stream
  interconnect IP. Here a simple TDEST crossbar (`axis_switch`) stands in.
  It uses fixed priority and packet locking.
- **Header encoding.** The section layout (type and ID, operands, output
  channel, end) follows the original. The tag codes, field positions, and
  the FRAME word carrying the image size are this design's own.
- **Histogram before Otsu.** The original's automatic-threshold example
  chains a histogram SCP before the Otsu SCP. Here Otsu builds its own
  histogram. The example graph therefore runs as
  open → Sobel → Otsu, without the histogram stage. The histogram SCP is
  still available on its own.
- **How results leave an SCP.** The histogram is sent as a 256-word frame,
  and a scalar result as a DATA word, because there is no shared vector
  memory.
- **Block SCP.**
  - Input stalls while a band is read out, so this SCP does not keep one
    pixel per clock.
  - Only the buffer width grows by one column, as in the original. Block
    heights are not padded, so each block loses its top and bottom output
    rows.
- **One build mode.** The original offers a small-area build, about three
  times slower, besides the fastest one. This RTL has only the
  one-pixel-per-clock form; a slower, smaller variant is not provided.
- **Image edges.** Border pixels are never padded: a 3x3 SCP produces
  (W-2) x (H-2) pixels.
- **Sizes.**
  - Kernels are 3x3 only.
  - Weights are signed 8-bit.
  - Results saturate to 0..255.
  - Rotations are in multiples of 45 degrees, up to 8 of them.
- **Sobel SCP output.** The Sobel SCP's threshold (200) comes from the
  original. Its 0/255 output levels are a choice made here.
- **Not hardware here.** The host processor, the camera, the
  configuration and code-generation tools, and the high-level-synthesis
  templates are not part of the RTL. Their signals are top-level ports.

## Simulating

Each testbench is a module without ports in `tb/`. It prints
`TB_RESULT checks=N failures=M` at the end. For example:

```
verilator --binary --timing -Wno-fatal --top-module tb_scopes_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/scp_pkg.sv tb/tb_ref_pkg.sv tb/tb_scopes_top.sv
./obj_dir/Vtb_scopes_top
```

Shared testbench code:

- `tb/tb_ref_pkg.sv` holds integer reference models. They are written from
  the operation definitions, not from the RTL. The Otsu reference uses
  floating point.
- `tb/tb_stream.svh` is a stream driver and collector with random idle
  cycles and random back-pressure.

Every block testbench checks:

- the forwarded header, word by word;
- every output pixel and TLAST;
- one unstalled frame, timed to confirm the one-pixel-per-clock rate.

Two testbenches cover the whole system:

- **`tb_scopes_top`** runs the system at `MAX_W = MAX_H = 64`, on 24x16
  frames. Twelve frames change the graph through the header alone:
  - opening;
  - complex-SCP Sobel then threshold;
  - strided convolution;
  - average with replay;
  - histogram;
  - Otsu;
  - Sobel;
  - blocks;
  - a two-input join, where an Otsu result from one frame is combined
    with the next frame;
  - the five-SCP chain open → Sobel → Otsu.

  It counts how often each mechanism happened, and fails if one never did:
  - host and camera stalls;
  - reconfiguration between frames;
  - forwarding of sections that belong to other SCPs;
  - skipped strided windows;
  - replayed pixels;
  - joined pixels;
  - blocks.
- **`tb_scopes_top_full`** uses the default sizes, with no parameter
  overrides. It runs a 640x480 frame through complex Sobel and threshold,
  and a 512x512 image through Otsu. It checks every pixel and the cycle
  counts. It simulates in a few seconds.
- **`tb_scopes_top_rates`** also uses the default sizes. It sends one
  512x512 image through each class of SCP: point, basic neighbourhood,
  complex neighbourhood (Sobel) and global (sum). It then sends a 640x480
  frame through the function-specific Sobel SCP. It checks every output
  and prints the cycles per frame and the frame rate at 150 MHz. Each
  512x512 frame takes 262166 to 262190 cycles, about 572 frames/s. The
  640x480 frame takes 307218 cycles, about 488 frames/s.

## Files

`rtl/` holds one module or package per file:

- `scp_pkg`: types and shared arithmetic;
- `scp_header`, `window3x3`, `axis_skid`, `axis_switch`, `streamer`;
- the ten SCPs;
- `scopes_top`.

`tb/` holds one testbench per module, plus `tb_scopes_top_full` and
`tb_scopes_top_rates`.

Some unused-bit warnings remain. They come from fields of the shared
stream word that a given SCP does not read.
