# A morphological image sub-module for road and obstacle segmentation

This is RTL for a real-time mathematical-morphology processor that was
built to find the traffic lane and the obstacles in front of a vehicle. The
main idea is to stream each 256x256 image at one pixel per clock through a
long pipeline of 3x3 neighbourhood operators. The pipeline is made of copies
of a dedicated morphology chip, PIMM1. It has two independent pipelines:

* **The main pipeline** (processor 0) has two boards with four PIMM1 each,
  so eight chips. It runs the lane segmentation all the time. That work is
  mostly a watershed transform. It is computed as repeated binary
  thickenings on an image reduced to 8 grey levels.
* **The second pipeline** (processor 1) has one board of four PIMM1. It runs
  obstacle detection on request, on the regions of interest (ROI) that the
  lane segmentation finds.

Both pipelines are fed by one image memory board. Each processor has a
16-frame memory on that board. The board also holds double-buffered memories
for the camera, the display and the host CPU. A host CPU programs the
pipelines and the memory board between scans. Each scan is one elementary
step of an iterative algorithm. The board tells the host that a scan has
ended through interrupts.

The top module is `msm_top`. Its defaults are the full system:
* 256x256 images;
* 16 frames per processor memory;
* 264-clock video lines;
* 2 + 1 processor boards.

## The pixel stream

Every block passes images as a raster stream with one pixel per clock.
20 MHz was the pixel rate of the original system. Two video signals travel
with the pixels:

* `HEN` is high on pixels that belong to the current line.
* `VEN` is high for the lines of the frame.

A line lasts `P` clocks. That is the image width (or the ROI width) plus at
least one blanking clock. The default is `P = 264`, i.e. 256 pixels and 8
blanking clocks. Nothing in the data path counts pixels. Each chip works out
where the image borders are from delayed copies of `HEN`/`VEN`. It then
treats window positions outside the image as absent. They count as neutral
for a dilation or an erosion, and as 0 for binary operators. As a result,
any ROI width below `P` works without reprogramming.

Each block's latency is fixed by its configuration. Stage latency is `SL = P + 2`.

| path | latency (clocks) |
|---|---|
| PIMM1, greytone or recursive mode, binary stages in parallel | `P + 3` |
| PIMM1, binary mode (8 stages) | `1 + 8·SL` |
| processor board | `2 + Σ chip latencies` (input LUT + input register + chips + output LUT) |
| memory board, scan address -> morphobus | 2 |

The `HEN`/`VEN` leaving a pipeline are delayed by exactly its latency. The
memory board uses them to know when to write the result. So the scan
controller never needs to know how the pipeline is programmed.

## PIMM1 (`pimm1`)

The chip's interface uses its original pin names:

| pins | function |
|---|---|
| `DIA` | main flow in |
| `DIB` | second flow in |
| `DIC` | control flow in |
| `DIO` | main flow out |
| `GPO` | general-purpose output |
| `HENI/VENI`, `HENO/VENO` | video signals in and out |
| `ADD/DATAI/DATAO/CSN/RWN` | register access |
| `PROC_PROGN` | 1 = processing, 0 = programming |

The 3x3 neighbourhood needs two previous lines. They live outside the chip,
in a 24-bit-wide, one-line-deep delay line (`line_delay`). The chip sends
24 bits into it (`dl_to`) and gets them back one line later (`dl_from`). How
the 24 bits are shared depends on the mode. This is the least obvious part of
the design:

| mode | `[7:0]` | `[15:8]` | `[23:16]` |
|---|---|---|---|
| greytone | line above of the main flow | two lines above | second flow, realigned to the window centre |
| binary | stage k: bits `2k`, `2k+1` = its two previous lines | (continues) | stage k: bit `16+k` = its mask (second flow) |
| recursive | result of the line above (feedback) | result, realigned to the output | second flow, realigned |

Every pixel first goes through the **point unit** (`pimm1_point_unit`, one
clock). It can:
* copy A or B;
* add or subtract with saturation;
* take the min or max;
* threshold to 0/255 within [lo, hi];
* apply AND/OR/XOR/NOT;
* select A or B with DIC as the control.

Then the mode register picks one of three neighbourhood engines:

* **Greytone** (`pimm1_greytone_unit`). Two 3x3 processors work side by
  side on the same window. Each does a dilation (max) or an erosion (min) over
  a 9-bit structuring element. Bit `3·row + col` is set for each position
  used: row 0 is the line above, col 0 the left column, bit 4 the centre. A
  combination stage then gives one of:
  * P0, or P1;
  * P0−P1 (the morphological gradient);
  * min(P0, second flow) or max(P0, second flow). These are one step of a
    geodesic dilation or erosion.
  * centre−P0, or P0−centre.

  `GPO` carries either the realigned second flow or P1.
* **Binary** (`pimm1_binary_unit`, eight `pimm1_binary_stage` in a row).
  Each stage sees bit 0 of the pixels. A stage has an operation plus two
  templates: `fg` (must be 1) and `bg` (must be 0). The operations are:
  * dilation (OR over `fg`);
  * erosion (AND over `fg`);
  * hit-or-miss;
  * thickening (`x | hit`);
  * thinning (`x & ~hit`);
  * complement;
  * pass.

  A stage can optionally be geodesic, which ANDs its result with the mask
  flow. The mask travels alongside, one bit per stage in the delay line. So
  eight rotations of a thickening template fit in one chip. That makes 64
  rotations in one scan of the main pipeline. `DIO` is the result on all 8
  bits (0 or 255). `GPO` is the mask.
* **Recursive** (`pimm1_recursive_unit`). The result is fed back to the
  window, so each output depends on results already computed in the same
  scan:
  * Distance: `d = min(in, min(left, up) + 1)`. Feed a 0/255 image and get the
    forward pass of the 4-connected (city-block) distance. Scan the result
    again in reverse order to get the exact distance. The memory board can
    scan in reverse.
  * Reconstruction: `r = mask & (in | left | up)`. This is one propagation
    pass of binary reconstruction. Alternate direct and reverse scans until
    nothing changes.

The **synchronization unit** (`pimm1_sync_unit`) is a shift register of
`HEN` and `VEN`. It is long enough for the binary mode. It supplies:
* the delayed output video signals for the current mode;
* the "inside the image" flag for every window position of every stage.

It is cleared while the chip is in programming mode. This means a new mode
never sees stale flags.

The **programming unit** (`pimm1_prog_unit`) holds 64 8-bit registers. They
can only be written while `PROC_PROGN` is 0, that is, between scans.

| addr | content |
|---|---|
| 0x00 | `[1:0]` mode (0 greytone, 1 binary, 2 recursive), `[2]` GPO = P1, `[3]` binary stages in parallel |
| 0x01 | point operation (see `msm_pkg::pt_op_e`) |
| 0x02, 0x03 | threshold low, high (reset 0, 255) |
| 0x04, 0x05 | processor 0: `[0]` erosion, `[7]` SE bit 8; SE bits 7..0 (reset: centre only) |
| 0x06, 0x07 | processor 1, same layout |
| 0x08 | greytone combination (`g_comb_e`) |
| 0x09 | recursive operation: 0 distance, 1 reconstruction |
| 0x10 + 3k | binary stage k: `[2:0]` op, `[3]` geodesic, `[4]` fg bit 8, `[5]` bg bit 8 |
| 0x11 + 3k, 0x12 + 3k | fg bits 7..0, bg bits 7..0 |

## The processor board (`morpho_board`)

One board chains these parts in order:

1. a 9-bit-in / 9-bit-out **input LUT** (`morpho_lut`) on the main flow;
2. four PIMM1, each with its own 24-bit delay line;
3. an 8-bit-in / 9-bit-out **output LUT**.

Data moves through the board as follows:

* **Input LUT.** It is the identity after reset. The host loads
  `floor(log2(f+1))` into it to cut 256 grey levels down to 8 before a
  watershed. Bit 8 of the LUT output drives the `DIC` of the first chip.
* **Second flow.** It comes in on `DIBBUS`. It runs alongside the chips
  through a chain of four programmable delay lines (`resync_delay`, up to
  `8·(P+2)+2` clocks). Each delay should be set to the latency of the chip
  it bypasses. That is `P+3` (the reset value) for greytone or recursive and
  `1+8(P+2)` for binary stages in pipeline.
* **Mux before chips 2–4.** A mux in front of each `DIB` picks either the
  delay line or the `GPO` of the previous chip. `DIC` of chips 2–4 is the
  previous `GPO`.
* **Geodesic steps.** With every chip doing "dilate, then min with the
  second flow", four geodesic dilation steps are done in one scan.
* **Histogrammer.** The optional histogrammer (`histogrammer`, 256 bins of
  17 bits) counts the values leaving chip 3.

Board address space (`cfg_addr[15:12]` target, `[11:0]` index):

| target | content |
|---|---|
| 0–3 | PIMM1 n, index = chip register |
| 4 | input LUT, 512 entries |
| 5 | output LUT, 256 entries |
| 6 | index 0: run bit (drives `PROC_PROGN` of all four chips); 1: mux selects (bit n: `DIB` of chip n+1 from `GPO` n; bit 3: `DIBOBUS` from `GPO` of chip 4); 2..5: delay of line n |
| 7 | histogram bins (read); any write clears them |

`pipeline_processor` chains `NBOARDS` boards. `cfg_addr[17:16]` selects the
board. The main pipeline has 2 boards, the second pipeline 1.

## The image memory board (`image_memory_board`)

* **Two processor memories** (`frame_memory`). Each holds 16 frames of
  256x256 9-bit pixels. It has two registered read ports, for the main flow
  and the second flow of a morphobus, and one write port for the result flow.
* **Three two-bank buffers** (`bank_buffer`): acquisition, host interface
  and display. One bank faces the outside (camera, host, display) while the
  other faces the processors. A swap exchanges them. The camera's end-of-frame
  strobe swaps the acquisition banks and raises `irq_acq`. The host swaps the
  display and host banks through register 0x01.
* **Scan controllers** (`scan_controller`), one per processor. Each produces
  the address raster and `HEN`/`VEN`:
  * full image or any window `(x0, y0, w, h)`;
  * direct or reverse order.

  It waits for the video signals to come back from the pipeline and writes
  each result pixel at the same place in the destination frame(s). When the
  last pixel is written it pulses `done`, which sets `irq_proc[p]`.
* **Crossbars and write muxes.**
  * A flow can come from any frame of the processor's own memory, or from
    the acquisition or host buffer.
  * A result can go to any set of: memory 0, memory 1, display, host.
  * Writing to the other processor's memory is how ROI data moves from the
    lane segmentation to the obstacle detection.
  * If both processors write the same target in the same clock, processor 0
    wins.

Both processors can scan at the same time while the camera and the display
use their own banks.

Register map (`host_addr[7:0]` in region 0):

| addr | content |
|---|---|
| 0x00 | read: `[1:0]` `irq_proc`, `[2]` `irq_acq`, `[4:3]` busy; write 1s to clear interrupt bits |
| 0x01 | write: `[0]` swap display banks, `[1]` swap host banks; read: `[0]` display, `[1]` host, `[2]` acquisition bank selects |
| 0x10+0x10·p +0 / +1 | main / second flow source: 0–15 frame, 16 acquisition, 17 host |
| +2 | destinations: `[0]` memory 0, `[1]` memory 1, `[2]` display, `[3]` host |
| +3 | destination frame |
| +4..+7 | window x0, y0, w, h (reset: full image) |
| +8 | `[0]` reverse scan |
| +9 | any write starts the scan |

## Programming a step

A scan on processor `p` goes like this:

1. Write the chip, LUT and board registers with the run bit at 0.
2. Write the memory-board scan registers.
3. Set the run bit of every board of that pipeline.
4. Write the start register.
5. Wait for `irq_proc[p]`.
6. Clear it, then clear the run bits before reprogramming.

`tb/tb_msm_top.sv` is a worked example of a whole chain of steps:
* temporal max of two frames;
* gradient;
* log2 LUT;
* threshold and 8-rotation thickening;
* geodesic step;
* transfer to the second processor;
* two-pass distance on a window;
* contour points by eight parallel hit-or-miss stages;
* reconstruction;
* output LUT.

## Timing at the default size

| item | clocks | time at 20 MHz |
|---|---|---|
| one full 256x256 scan | 256·264 = 67,584 + pipeline latency | — |
| measured, main pipeline in greytone mode | 69,719 | 3.5 ms |
| main pipeline with all 8 chips in binary mode | latency 17,036 | about 4.2 ms per scan |

About 18 full binary scans fit in 80 ms, and each scan applies 64
thickening rotations.

## What was chosen here rather than taken from the original system

The original system specifies:
* the chip counts;
* the board structure of input LUT, four chips, 24-bit delay lines,
  second-flow delay lines with muxes, output LUT and histogrammer on chip 3;
* the memory sizes;
* the buffers;
* the crossbars;
* the interrupts;
* the kinds of operation each PIMM1 unit performs.

The internals of PIMM1 are not published, so `pimm1` is a functional model
with the same pins. These parts are this design's own choices:

* every latency, and the split of the 24 delay-line bits;
* the register maps of the chips, boards and memory board;
* the border handling by delayed video signals;
* the exact sets of point operations, greytone combinations and binary
  operations;
* the forward-only recursive operators, where the full transforms use
  alternating scan directions;
* `P = 264`, i.e. 8 blanking clocks per line;
* the write priority of processor 0.

In binary mode the eight processors can also work side by side (mode
register bit 3). Each stage then sees the same window, and the output is the
OR of the stages that are not set to pass. The original chip offered a
parallel organisation, but how its results were combined is this design's
choice. In this organisation the chip latency is `P + 3`.

These parts of the original system are not in the RTL:
* **The PIMM1 measurement unit.** Its function is not known.
* **The VSB and VME buses and the CPU board.** A plain synchronous host port
  (`host_we/host_re/host_addr/host_wdata/host_rdata`) takes their place.
* **The Maxbus acquisition/display board.** It is replaced by plain pixel
  ports: `acq_we/acq_addr/acq_data/acq_frame_done` and `vis_addr/vis_data`.
  The display port reads combinationally.
* **The board clock generators.** The whole design uses one clock.
* **The coordinate extraction** read by the host.
* **Bit-plane storage of binary images.** Binary images are kept as 0/255
  pixels, one image per 9-bit frame.

## Files and simulation

* `rtl/` holds one module per file.
* `rtl/msm_pkg.sv` holds the shared enums, configuration structs, register
  addresses and saturating arithmetic.
* `tb/` has a self-checking testbench per module, named `tb_<module>`. Each
  one compares the outputs with software models in `tb/tb_img_pkg.sv` of
  dilation/erosion, binary stages, distance and reconstruction, and checks
  the latencies.
* `tb_msm_top` runs the whole chain end to end at `P=36` with 32x16 images.
  It also runs a contour detection with the binary stages in parallel,
  followed by a reconstruction pass and the output LUT. It fails if any
  mechanism was never exercised.
* `tb_msm_top_full` runs the top at its defaults: one 256x256 gradient +
  log2 scan, checked pixel by pixel and timed. It takes well under a minute.

For example:

```
verilator --binary --timing -Irtl -y rtl -y tb rtl/msm_pkg.sv tb/tb_img_pkg.sv \
          tb/tb_msm_top.sv --top-module tb_msm_top -Mdir obj -o sim
./obj/sim
```

Each testbench ends by printing `TB_RESULT checks=<n> failures=<m>` and has
a watchdog. Parameters worth changing:
* `P` (line length, at least the image width + 1);
* `IMG_W`/`IMG_H`;
* `NFRAMES`;
* the number of boards per pipeline (in `msm_top`);
* `HIST_MASK` (which boards carry a histogrammer).
