# Streaming morphology and contour-tracing labeling for a surveillance camera

This is the hardware core of an automated surveillance system. A segmentation
stage (background subtraction, not part of this RTL) marks every pixel that
moved, producing a one-bit *motion mask* per 320 x 240 frame at 25 frames per
second. The RTL here turns that mask into a list of objects:

1. **Morphology** cleans the mask. By default an erosion followed by a
   dilation (an *opening*) removes specks smaller than the structuring element
   (SE) and keeps the shape of larger blobs. It works on the pixel stream with
   one row of small counters instead of a frame buffer.
2. **Labeling** gives every 8-connected cluster of the cleaned mask its own
   number and its bounding box. It does this by tracing the outer contour of each
   cluster rather than by the usual label-equivalence tables, so it needs no
   equivalence memory, fills holes inside objects for free, and always has
   enough labels for up to 61 clusters.
3. The labels and boxes of the last finished frame can be read by a processor
   at random while the next frame is being labeled (double buffering).
4. A display path shows one of four pictures on a VGA monitor: the camera video
   in gray,
   the raw mask, the cleaned mask or the labeled image. Each can have bounding
   boxes drawn on top.

```
              clk_seg (100 MHz)       clk (67 MHz)
 mask ──► async_fifo ──► morph_chain ─────────────► labeling_unit ──► host ports
          (16 x 1)       ├ morph_unit: erode         ├ sync_fifo (51200 x 1)       (labels, boxes)
                         │  ├ sync_fifo (2170 x 1)   ├ contour_tracer (FSM_1)   ──► feature stream
                         │  ├ morph_ctrl             ├ feature_fsm (FSM_2)
                         │  └ morph_datapath         ├ pingpong_ram label  2 x 76800 x 6
                         └ morph_unit: dilate        └ pingpong_ram cluster 2 x 64 x 34
                                                 └──► filt_pix (filtered mask)
 mask (as taken) ─┐
 filtered mask ───┼─► vga_output: mode mux + box overlay ─► frame memory ─► 640x480 raster (clk_pix)
 video, labels ───┘   (320 x 240 x 8)
```

All modules are in `rtl/`, one per file; `rtl/surv_pkg.sv` holds the shared
constants (frame size, largest SE, number of labels, label codes). The top is
`surveillance_top`.

## Morphology on a stream

### Erosion as counting

With a rectangular SE of ones, erosion at a pixel is 1 exactly when every mask
pixel under the SE is 1. A `w x h` rectangle is a `w x 1` row segment followed by
a `1 x h` column segment, so the test splits into two counters:

* **Stage 1** keeps a running count of consecutive ones in the current row (a
  4-bit register). A zero resets it. When count + input reaches `w`, the row
  segment ending here is all ones: stage 1 outputs 1 and keeps the *old* count
  (`w-1`), so the next one also produces a hit.
* **Stage 2** does the same vertically: one 4-bit counter per column (a row
  memory of `IM_W` words) counts how many consecutive rows had a stage-1 hit in
  that column, and reports 1 when it reaches `h`.

Each input pixel is touched once. Memory is `4 + 4 x 320 = 1284` bits for SEs up
to 15 x 15.

**Dilation** uses the same kernel through duality: dilating A equals eroding the
complement of A and complementing the result. Stage 0 inverts the input and
stage 3 the output when the unit is set to dilate. A cascade of units
(`morph_chain`), each with its own operation and SE, gives opening, closing or
longer sequences.

### Borders without extra memory

At the image border the SE hangs outside the frame. Padding with ones makes
the outside neutral for erosion and, through the inversion, for dilation too.
The padding costs no storage:

* **West and north** padding would only ever add `floor(w/2)` or `floor(h/2)`
  ones to a counter. The counters are therefore *preset* to those values at the
  first column (W-boundary) and the first row (N-boundary).
* **East and south** padding does need extra steps: after each row, `floor(w/2)`
  steps push in ones so that the last output columns can complete. After the
  frame, `floor(h/2)` extra rows do the same for the last output rows. During
  these steps no input is consumed.

`morph_ctrl` walks this padded frame of `(IM_W + floor(w/2)) x (IM_H + floor(h/2))`
positions, one per clock. It tells the datapath which position is a boundary
and which results are real output pixels. A frame therefore takes exactly

    t_exe = (IM_W + floor(w/2)) * (IM_H + floor(h/2))
          = IM_W*IM_H + floor(w/2)*IM_H + floor(h/2)*(IM_W + floor(w/2))   cycles,

80,769 for 320 x 240 and a 15 x 15 SE. The output stream has exactly
`IM_W*IM_H` pixels in raster order, two cycles after the step that completes
them. While the padding steps run, the incoming pixels wait in the unit's input
FIFO. The longest wait is the south padding, `floor(h/2)*(IM_W + floor(w/2))`
steps. With the unit clocked at the lowest rate that keeps up (8.1 MHz for the
7.68 MHz sensor rate), that needs 2170 entries, the default `FIFO_DEPTH`. At
faster clocks the FIFO is larger than needed.

The operation and SE size are inputs. Each unit samples them at the first step
of a frame and holds them for that frame, so they can change between frames.
Sizes from 1 to 15 are supported (0 counts as 1). For an even size the window
reaches `floor(w/2)` pixels right of (below) the output pixel and the rest to
the left (above).

## Labeling by contour tracing

### Memory codes

The label memory holds 6 bits per pixel:

| value | meaning |
|---|---|
| 0 | background, or a hole |
| 1 | cluster pixel not (yet) on a traced contour |
| 2 | reserved: background pixel next to a traced contour |
| 3..63 | cluster labels (61 labels) |

### Phases of a frame (`contour_tracer`)

1. **Write.** The incoming mask is written into the label memory as 0/1, one
   pixel per cycle. The first and last 1 of the frame are recorded as start and
   end points, so the scan can skip empty rows at the top and bottom.
2. **Scan.** The memory is read from the start point to the end point, one pixel
   per cycle, with an *inside-cluster* flag:
   * outside, value 1: an untraced cluster. Trace its contour (phase 3), then
     continue with the flag raised;
   * outside, a label: entering a cluster traced before. Raise the flag;
   * inside, reserved (2): the scan has crossed the contour to the outside.
     Lower the flag;
   * inside, 0 or 1: a hole or interior pixel, which belongs to the cluster;
   * at the right frame edge the flag is lowered.

   So interior pixels never start a second trace, and holes count as part of
   their cluster.
3. **Trace.** This is a Moore-neighbour walk around the outer contour, testing
   one neighbour per memory access. Directions are numbered clockwise: 0
   up-right, 1 right, 2 down-right, 3 down, 4 down-left, 5 left, 6 up-left,
   7 up. Two small tables drive the walk:
   * *initial search*: after arriving in direction d, the first neighbour to
     test is `6,0,0,2,2,4,4,6` for d = 0..7. The start pixel counts as reached
     in direction 1, the scan direction.
   * *address offset* per direction: `-W+1, +1, W+1, W, W-1, -1, -W-1, -W`.

   A miss increments the direction. A hit writes the label, reports the
   coordinate to the feature machine and moves there. Every background neighbour
   tested along the way is overwritten with the reserved code 2, so the contour
   ends up lined with 2s on the outside. This is what lowers the inside flag in
   phase 2.

   The walk ends when it stands on the start pixel and the next move would
   repeat its first move. A single-pixel cluster ends after its eight
   neighbours miss. Stopping at the first return to the start pixel would be
   wrong for contours that pass through their start pixel twice, as happens at
   a one-pixel-wide neck.
4. **Done.** The memory banks swap (`swap`), and one cycle later `frame_done`
   pulses with `n_clusters`. The next frame is written into the other bank at
   once.

Neighbours outside the frame count as background and are never written. The
62nd and later clusters of a frame are left unlabeled; the frame then reports
`label_overflow`.

### Features and double buffering

`feature_fsm` (FSM 2) tracks the minimum and maximum x and y of the contour
pixels. It writes `{x_min, y_min, width, height}` (9 + 8 + 9 + 8 = 34 bits at
320 x 240) into the cluster memory at the cluster's label when the trace ends,
and it also emits the record on `feat_valid/feat_label/feat_rec`. The contour
holds every extreme pixel, so this is the bounding box of the cluster.

Label and cluster memories are each a `pingpong_ram`: two banks, one
being worked on and one readable through the host port (`host_label_addr`,
`host_cluster_addr`, one cycle read latency) for a whole frame time.

For the display, the label memory has a second read port on the finished
bank. Starting two cycles after each `frame_done`, the unit streams the
finished label image once in raster order, one label per cycle, on
`disp_valid/disp_label`. The stream lasts `IM_W*IM_H` cycles. It ends before
the next swap, because the next frame alone needs that many writes.

### Throughput and the input FIFO

The unit makes one memory access per clock. A frame needs `IM_W*IM_H` writes,
up to `IM_W*IM_H` scan reads, and one access per contour step (label writes,
reserved writes and neighbour tests). The design assumes that the contour work
stays below one frame's worth of accesses, as it does for compact objects. A
clock of three times the pixel rate then keeps up. While the unit scans and
traces it does not take pixels, so they collect in the input FIFO. At that
clock, two frame-times of accesses let 2/3 of a frame arrive, which gives the
default depth of 51,200.

**Limit:** the "3 accesses per pixel" budget is an assumption, not a
guarantee. Frames of scattered single-pixel noise cost about 10 accesses per
noise pixel and can exceed it. The FIFO then overflows and `label_fifo_overflow`
is set. In the system this input comes after the opening, which removes such
noise.

## Display path (`vga_output`)

The display runs on its own pixel clock and shares only the frame memory
(320 x 240 x 8 bits, dual port) with the rest of the design.

On the processing clock, four sources stream pixels:
* the camera video, 24-bit RGB, converted to gray as (R + 2G + B) / 4;
* the segmentation mask as it enters the morphology chain;
* the morphology result;
* the labeled image, read out of the labeling unit after each frame.

Each source has its own raster counter, so every stream keeps its frame position
whatever is shown. The source selected by `disp_mode` is written into the frame
memory: video as gray, masks as 0/255, labels as label x 4. With `overlay_en`,
any pixel on the edge of a box in the box table is written as 255. The
processor fills the table (`box_we/box_addr/box_wdata`, same record format as
the cluster memory, `box_clear` to empty it), typically with the boxes it read
from the cluster memory. The boxes are drawn into the stored picture as it is
written, not mixed in when the picture is read for the screen.

On the pixel clock, a 640 x 480, 60 Hz raster (800 x 525 clocks; 25.175 MHz
pixel clock) reads the memory. Each stored pixel is shown as a 2 x 2 block
and the gray value goes on all three colours. The sync pulses are active low.
Colour and sync outputs are registered and aligned, two pixel clocks behind
the raster counters. The memory is single-buffered, so a picture written
while it is displayed can tear. Frames smaller than 320 x 240 appear in the
top-left corner.

## Top-level interface (`surveillance_top`)

| port | dir | meaning |
|---|---|---|
| `clk_seg`, `rst_seg_n` | in | segmentation clock and reset |
| `mask_valid`, `mask_pix`, `mask_ready` | in/in/out | motion mask stream, raster order |
| `clk`, `rst_n` | in | processing clock and reset |
| `morph_op[i]`, `morph_se_w[i]`, `morph_se_h[i]` | in | per-unit operation and SE size, taken at the start of each frame |
| `filt_valid`, `filt_pix` | out | filtered mask stream |
| `frame_done`, `n_clusters`, `label_overflow` | out | end of labeling of a frame |
| `host_label_addr` → `host_label_data` | in → out | label of pixel `y*IM_W+x` of the finished frame |
| `host_cluster_addr` → `host_cluster_data` | in → out | bounding box of a label of the finished frame |
| `feat_valid`, `feat_label`, `feat_rec` | out | one record per traced cluster |
| `morph_fifo_overflow`, `label_fifo_overflow` | out | sticky FIFO overflow flags |
| `ev_pad`, `ev_trace`, `ev_reserved`, `ev_enter` | out | activity pulses, for monitoring |
| `clk_pix`, `rst_pix_n` | in | VGA pixel clock and reset |
| `disp_mode`, `overlay_en` | in | displayed source (0 video, 1 mask, 2 filtered, 3 labels), box overlay on/off |
| `video_valid`, `video_rgb` | in | 24-bit {R, G, B} camera video stream (processing clock) |
| `box_we`, `box_addr`, `box_wdata`, `box_clear` | in | box table for the overlay |
| `vga_r/g/b`, `vga_hsync`, `vga_vsync`, `vga_de` | out | VGA output |

All parameters default to the prototype: 320 x 240, two morphology units,
FIFO depths 2170 (morphology), 51,200 (labeling) and 16 (clock crossing).
Reset is asynchronous and active low in both domains.

## Where this design makes its own choices

The following are not fixed by the original system description. They were
chosen here:

* **Contour stop rule**: stop on the repeated first move, not at the first
  return to the start pixel (explained above).
* **Reserved marking**: every background neighbour tested during a trace gets
  the reserved code.
* **Label FIFO depth**: 51,200 is derived above rather than specified. The
  clock-crossing FIFO depth (16) and its Gray-pointer design are also this
  design's choices.
* **Run-time configuration**: operation and SE size are ports sampled per frame,
  not constants.
* **Latency**: one pipeline register between the two morphology counters plus a
  registered output give a latency of two steps.
* **Stored widths**: width and height are stored as counts (max − min + 1).
* **Even SE sizes**: the window anchoring for even sizes is described above.
* **Overflow and events**: the overflow flags and event outputs were added for
  monitoring.
* **Display**:
  * the 640 x 480 timing and 2 x 2 scaling;
  * the gray conversion of the video, and the gray mapping of masks and labels;
  * boxes drawn in hardware from a box table (the original system draws them
    in software);
  * the labeled image reaching the display through a second read port of the
    label memory;
  * the boxes drawn into the frame memory on the write side, rather than
    combined with the memory output on the read side.

## Not included

* The Gaussian-mixture segmentation unit, its DDR memory and the camera
  interface. The mask enters as a port.
* The processor and its software. This includes drawing the bounding boxes,
  for which the host ports and the feature stream are the interface.
* The clock crossing of the camera's video stream. The RGB video enters the
  display path as a port on the processing clock.
* Clock generation.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. Reference models live in two
testbench packages:

* `morph_ref_pkg`: direct window erosion/dilation with the same border
  convention.
* `label_ref_pkg`: hole filling by flood fill from the border, then 8-connected
  components in raster order of their first pixel. It also holds a shape
  generator.

| testbench | block | what it checks |
|---|---|---|
| `tb_sync_fifo`, `tb_async_fifo` | FIFOs | ordering, full/empty, overflow flag; the asynchronous FIFO with unrelated clocks |
| `tb_morph_datapath` | `morph_ctrl` + `morph_datapath` | pixels, boundary signals, step counts, random SE sizes 1..15 |
| `tb_morph_unit` | `morph_unit` | pixels, exact cycle count `t_exe`, SE/operation changes between frames, FIFO stalls |
| `tb_morph_chain` | `morph_chain` | opening, closing, double erosion/dilation |
| `tb_feature_fsm` | `feature_fsm` | bounding boxes of random point sequences |
| `tb_labeling_unit` | labeling unit | labels, boxes, cluster counts, holes, overflow of labels, bank swap, host reads, display read-out equal to the host reads, 3-cycles-per-pixel budget |
| `tb_vga_output` | display path, 8 x 6 | all modes with and without boxes, box clear, every displayed pixel, sync widths, line and frame lengths |
| `tb_surveillance_top` | top, 40 x 30 | end to end across three clocks; counts padding stalls, SE and mode changes, traces, reserved writes, cluster entries, filled holes, label overflow, bank swaps; checks one displayed VGA frame in morphology mode and one in label mode |
| `tb_surveillance_full` | top, default parameters | four 320 x 240 frames: 3 x 3 opening with a burst, 15 x 15 opening, 5 x 5 closing, 70-cluster frame; displayed VGA frames in morphology and label mode |

To run one with plain verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_surveillance_top \
  rtl/surv_pkg.sv tb/morph_ref_pkg.sv tb/label_ref_pkg.sv \
  $(ls rtl/*.sv | grep -v surv_pkg) tb/tb_surveillance_top.sv -o sim
./obj_dir/sim
```

The full-size testbench runs in about ten seconds. All testbenches are
cycle-based and use `$urandom` for stimulus.

What has not been verified: timing closure at 67 MHz (the label memory read is
combinational within a cycle and needs a memory with asynchronous read, or
a retimed state machine for synchronous block RAM), and behaviour on real
camera sequences.
