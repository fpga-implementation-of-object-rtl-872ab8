# Object-based real-time tracker for FPGA

This design follows moving objects in a live camera picture, frame after frame. It does not look
for a fixed template. It cuts every frame into regions of similar colour. It describes each region
by a few numbers: where it is, how big it is, its colour and its area. Then it pairs each region with
the most similar region of the previous frame. A paired region keeps its track number, so an object
can be followed even when its shape changes or something partly hides it. A push switch picks one
tracked object as the target. On the monitor output that object is painted blue.

The camera delivers 640x480 pixels. Tracking works on an 80x60 copy of each frame. At the reference
clock of 12.27 MHz the design has 409,000 cycles for each frame at 30 frames/s.

## Data flow

```
camera --> image_resize --> frame memory (3 banks) --> tracking_core --> image_restore --> monitor
 640x480     8x8 average       frame_buffer_ctrl          80x60             x8 repeat     640x480
                                                            ^
                                      push switch --> push_switch_ctrl
```

`tracker_top` connects these blocks. The frame memories are external: the top drives their write
and read ports (`fb_*`). The pre-processing stage is also external (`pre_*`). See "Ports left
outside" below.

Inside `tracking_core`, each frame goes through these phases in order:

| phase | what happens | blocks |
|---|---|---|
| LOAD | read the frame; compute the link to the left and upper neighbour of each pixel | pre-processing (external), `weight_calc`, `image_scan_seg` |
| SEG  | region growing until no label changes | `image_scan_seg` (`seg_pe_array`, `seg_state_mem`) |
| FEAT | read the frame again with labels; add up each region's features | `feature_extract` |
| PREP | divide the sums into centroid, mean colour and box size | `search_data_prep` (`seq_div`) |
| MATCH | compare all current objects with all reference objects; assign tracks; predict positions | `object_matching`, `est_position`, `matched_obj_mem` |
| OUT  | read the frame a third time; mark target pixels | `post_process` |

## Image-scan segmentation

This is the core of the design and the hardest part to follow.

**Links.** `weight_calc` compares each pixel with its left and upper neighbour. It adds the
absolute differences of R, G and B. If the sum is at most `TH` (default 40), the two pixels are
linked. Each pixel stores two link bits, `wl` and `wu`. A link to the right or below is the same
bit stored at the neighbour.

**Labels.** Every pixel starts with its own raster index, `y*80 + x` (13 bits), as its label. In
one region-growing step, each pixel takes the smallest label among itself and its linked
neighbours. Repeated often enough, this gives every region the index of its first pixel in raster
order. A label is therefore also a pixel address, which later stages use.

**A small array moved over the image.** A full array would need one processing element for each
of the 4,800 pixels. Instead, `seg_pe_array` has only 80x2 elements: one block of two rows. It is
purely combinational. In one cycle it does one step for the whole block, using the stored rows
just above and just below the block as fixed neighbours. `image_scan_seg` moves the array from top
to bottom:

1. Read the block's two rows, the row above and the row below from storage (one cycle).
2. Step the array once per cycle until no label changes. At most `MAX_ITER` steps (default 160).
3. Write the two rows back.
4. Go to the next block.

One pass over all 30 blocks is a *scan*. A region can reach up from a lower block to a higher
one. A single top-to-bottom scan cannot carry a small label downward into a block it has already
left, so scans repeat. They stop when a whole scan changes nothing (`converged`), or after
`MAX_SCANS` scans (default 64). Each block resumes from the state it stored in the previous scan.

**Banked storage.** The block and its two neighbour rows are four rows, and all four must be read
in one cycle. `seg_state_mem` keeps the labels and link bits in ROWS+2 = 4 banks, each one row
wide, and puts row `y` in bank `y mod 4`. Any four consecutive rows then sit in four different
banks. Rows outside the image are read as "no link".

**Cost.** A scan of a flat image costs about 30 x (1 + 2 + 2) cycles. Each block spends more
steps when labels must cross it. On the full-size test scene, a whole frame (all phases)
took 16,887 cycles with 12 scans. The worst case is bounded by the limits:
64 scans x 30 blocks x (160 + 5) = 316,800 cycles for segmentation, plus about 16,500 cycles for
the other phases. That is about 333,000 cycles, inside the 409,000-cycle frame budget. If the
limits cut a frame short, `seg_converged` is low for that frame, and a region may then carry
more than one label.

## Features and matching

**Feature pass.** `feature_extract` reads pixels with their labels in raster order. A pixel whose
label equals its own index is the first pixel of a new region, so it opens a new slot. The region
gets a table entry at that index: label → slot. Later pixels look up their slot through their
label. This table never needs clearing, because each entry is written before it is read. Each
slot sums x, y, R, G and B, counts pixels, and tracks the bounding box. There are 16 slots. Regions
after the sixteenth are counted in `overflow` and ignored.

**Records.** `search_data_prep` divides the sums by the area with a shift-subtract divider
(`seq_div`), one bit per cycle. That takes 5 x 23 + 1 = 116 cycles per object. It writes one
record per object: label, centroid, box width and height, mean colour and area.

**Distance.** `object_matching` holds two memories: this frame's objects and the previous
frame's objects (the references). It compares every pair, one pair per cycle; that is
n_cur x (n_ref + 1) + 2 cycles. The distance is the sum of absolute differences of eight features.
Each feature is first scaled to 0..255 (`norm8`, an integer multiply by 65,280/range and a shift
by 8). Position, size, colour and area therefore weigh alike. The nearest reference wins if its
distance is at most `MATCH_TH` (default 192). The object then keeps that reference's track number;
otherwise it opens a new track.

**Motion.** `est_position` computes the motion vector: this frame's position minus the matched
reference's measured position. It adds the vector to the position again, clamped to the image.
That estimate is where the object is looked for in the next frame. The references of the next
frame are this frame's objects with their estimated positions. They are written into the second
of two banks, which then swap.

**Target.** `matched_obj_mem` keeps label and track of each object of the current frame. Each
`select` pulse from the push switch moves the target to the next object in the table. The
target is a track number, so it follows the object from frame to frame. `post_process` marks a
pixel as target when its label belongs to an entry with the target track. If the target is not
seen in a frame, `tgt_found` is low, and the track is kept for later frames.

## Frame buffers and display

`image_resize` averages each 8x8 block of the camera picture (sum of 64 values, shift by 6) and
writes one 80x60 frame. `frame_buffer_ctrl` rotates three frame memories. At any time one bank is
being written, one is being read by the tracker, and one holds the newest complete frame. When the
writer finishes a frame while the newest one has not been taken, the older one is dropped and
`dropped_frames` counts it. The writer never waits, so the camera runs at its own pace.

`image_restore` collects the 80x60 result stream into one of two buffers. When a frame is complete,
it plays that buffer out at 640x480 by repeating each pixel 8x8 times, target pixels in pure blue.
Meanwhile the other buffer fills. A finished frame that arrives during a playout waits and is
shown next.

`push_switch_ctrl` synchronises the switch and accepts a new level only after it has been stable
for `DEBOUNCE` cycles (default 122,700: 10 ms at 12.27 MHz). Each accepted press gives one
`select` pulse.

## Ports left outside

- **Frame memories.** Three banks of 4,800 x 24 bits. The read data is expected one cycle after
  the address. `tb/frame_sram_model.sv` is a behavioural model of them used by the testbenches.
- **Pre-processing.** The original system has a pre-processing stage in front of the weight
  computation, but its function is not specified. `pre_valid`, `pre_sof` and `pre_rgb` carry each
  pixel out; the processed colour must return on `pre_in_rgb` in the same cycle. The testbenches
  connect `pre_in_rgb` to `pre_rgb`.
- **Video.** NTSC decoding and encoding, camera and monitor are outside. `vid_*` expects digital
  RGB, one pixel per clock, with `vid_sof` on the first pixel. `disp_*` gives digital RGB with
  start and end flags.

## Departures and own choices

The following are not taken from the original architecture. They are this design's own, or
differ from it:

- **Sequential phases.** The original overlaps the segmentation of one frame with the matching of
  the previous frame. Here the phases run one after another. The frame time stays inside the
  30 frame/s budget (see Cost), so throughput does not need the overlap at this image size.
- **Single chip.** The original spreads the system over three FPGAs because of pin limits. Here it
  is one module hierarchy with a single clock.
- **Own choices.** These were not specified and were chosen here:
  - binary links and the colour threshold `TH`;
  - the minimum-label rule for region growing;
  - the scan stop rule and its limits (`MAX_ITER`, `MAX_SCANS`);
  - 16 object slots;
  - the feature set (centroid, box, mean colour, area) and its 0..255 scaling;
  - the match threshold and track numbering;
  - the constant-velocity prediction;
  - the target-stepping rule;
  - 8x8 averaging for the resize, and pixel repetition for the restore;
  - the triple-buffer policy;
  - the debounce time.
- **Fixed size.** The image size is set in `tracker_pkg` (`IMG_W`, `IMG_H`), and all label and
  address widths follow from it. For 320x240, change the package: labels then need 17 bits, and the
  worst-case cycle bound grows about 15-fold, beyond the frame budget at this clock.

## Files

`rtl/` holds one module or package per file. `tracker_pkg.sv` holds the sizes, the `rgb_t`,
`obj_feat_t` and `obj_acc_t` types and the distance function. `tracker_top.sv` is the top.
`seg_state_mem`, `seg_pe_array` and `seq_div` are helpers used by the blocks above them.

`tb/` has one self-checking testbench per module: `tb_<module>.sv`. Each one compares the outputs
with values it works out itself, stops on a watchdog, and ends by printing
`TB_RESULT checks=<n> failures=<n>`.

- `tb_tracker_top` runs a small camera picture through the whole design. It counts these events:
  multi-scan segmentation, table overflow, new tracks, matches, non-zero motion, blue display
  frames, the target found behind an obstacle, and use of all three frame banks. It fails if any
  of them never happens.
- `tb_tracker_full` runs the top with every parameter at its default: 640x480 input, 5 frames. It
  also checks the cycle count per frame against the 30 frame/s budget.

## Simulating

With Verilator 5 (no other tools needed), from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/tracker_pkg.sv tb/tb_tracker_top.sv --top-module tb_tracker_top -Mdir obj_top
./obj_top/Vtb_tracker_top
```

Substitute any testbench name. Verilator finds the other modules by file name through `-I`.
`tb_tracker_top` takes a few seconds and `tb_tracker_full` about 15 s. Registers are reset and
memories are written before they are read, so results do not depend on the simulator's initial
values.
To lint the RTL: `verilator --lint-only -Wall -Irtl rtl/tracker_pkg.sv rtl/tracker_top.sv`.
