// tracker_top: the complete object-tracking system. A camera image
// (640x480 RGB) is shrunk to 80x60, buffered in one of three external frame
// memories, segmented and tracked, and shown again at 640x480 with the chosen
// tracking target painted blue. A push switch picks the target.
//
// Data path: vid_* (source pixels, one per cycle when vid_valid) ->
// image_resize -> frame memory (fb_wr_*) ; frame memory (fb_rd_*, one-cycle
// read latency) -> tracking_core -> image_restore -> disp_* (display pixels).
// frame_buffer_ctrl decides which of the three memories is written and which
// is read. The frame memories and the pre-processing unit are outside this
// module: their ports (fb_*, pre_*) are brought out. pre_in_rgb must return
// the processed colour of pre_rgb in the same cycle. Status outputs report
// segmentation, matching and buffering events.
// In the prototype the resize, restore and push-switch functions sit in two
// smaller FPGAs beside the main one; here all of it is one module hierarchy.
module tracker_top
  import tracker_pkg::*;
#(
  parameter int unsigned SRC_W     = 640,
  parameter int unsigned SRC_H     = 480,
  parameter int unsigned FACTOR    = 8,
  parameter int unsigned MAX_ITER  = IMG_W * 2,
  parameter int unsigned MAX_SCANS = 64,
  parameter int unsigned TH        = 40,
  parameter int unsigned MATCH_TH  = 192,
  parameter int unsigned DEBOUNCE  = 122_700
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // camera side
  input  logic                         vid_valid,
  input  logic                         vid_sof,
  input  rgb_t                         vid_rgb,
  // push switch
  input  logic                         sw_in,
  // three external frame memories
  output logic                         fb_wr_en,
  output logic [1:0]                   fb_wr_bank,
  output logic [LW-1:0]                fb_wr_addr,
  output rgb_t                         fb_wr_data,
  output logic                         fb_rd_en,
  output logic [1:0]                   fb_rd_bank,
  output logic [LW-1:0]                fb_rd_addr,
  input  rgb_t                         fb_rd_data,
  // external pre-processing unit
  output logic                         pre_valid,
  output logic                         pre_sof,
  output rgb_t                         pre_rgb,
  input  rgb_t                         pre_in_rgb,
  // display side
  output logic                         disp_valid,
  output logic                         disp_sof,
  output logic                         disp_eof,
  output rgb_t                         disp_rgb,
  // status
  output logic [15:0]                  frames_tracked,
  output logic [15:0]                  frames_dropped,
  output logic [7:0]                   seg_scans,
  output logic                         seg_converged,
  output logic [$clog2(MAX_OBJ+1)-1:0] n_obj,
  output logic [15:0]                  obj_overflow,
  output logic [15:0]                  n_matched,
  output logic [15:0]                  n_new,
  output logic                         tgt_valid,
  output logic                         tgt_found,
  output logic [TW-1:0]                tgt_track,
  output logic [AW-1:0]                tgt_pixels,
  output logic [31:0]                  frame_cycles
);
  localparam int unsigned W = SRC_W / FACTOR;
  localparam int unsigned H = SRC_H / FACTOR;

  logic wr_done, rd_start, frame_avail, select;
  logic [15:0] presses;

  image_resize #(.SRC_W(SRC_W), .SRC_H(SRC_H), .FACTOR(FACTOR)) u_resize (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (vid_valid),
    .in_sof   (vid_sof),
    .in_rgb   (vid_rgb),
    .out_valid(fb_wr_en),
    .out_idx  (fb_wr_addr),
    .out_rgb  (fb_wr_data),
    .out_eof  (wr_done)
  );

  frame_buffer_ctrl u_fbc (
    .clk           (clk),
    .rst_n         (rst_n),
    .wr_frame_done (wr_done),
    .rd_start      (rd_start),
    .wr_bank       (fb_wr_bank),
    .rd_bank       (fb_rd_bank),
    .frame_avail   (frame_avail),
    .dropped_frames(frames_dropped)
  );

  push_switch_ctrl #(.DEBOUNCE(DEBOUNCE)) u_sw (
    .clk    (clk),
    .rst_n  (rst_n),
    .sw_in  (sw_in),
    .select (select),
    .presses(presses)
  );

  logic          c_valid, c_target, c_eof, c_done, c_busy;
  logic [LW-1:0] c_idx, c_label;
  rgb_t          c_rgb;

  tracking_core #(
    .W(W), .H(H), .ROWS(2), .MAX_ITER(MAX_ITER), .MAX_SCANS(MAX_SCANS),
    .TH(TH), .MATCH_TH(MATCH_TH), .N_OBJ(MAX_OBJ)
  ) u_core (
    .clk          (clk),
    .rst_n        (rst_n),
    .frame_avail  (frame_avail),
    .rd_start     (rd_start),
    .fb_rd_en     (fb_rd_en),
    .fb_rd_addr   (fb_rd_addr),
    .fb_rd_data   (fb_rd_data),
    .pre_valid    (pre_valid),
    .pre_sof      (pre_sof),
    .pre_rgb      (pre_rgb),
    .pre_in_rgb   (pre_in_rgb),
    .select       (select),
    .out_valid    (c_valid),
    .out_idx      (c_idx),
    .out_label    (c_label),
    .out_rgb      (c_rgb),
    .out_target   (c_target),
    .out_eof      (c_eof),
    .frame_done   (c_done),
    .busy         (c_busy),
    .frame_count  (frames_tracked),
    .seg_scans    (seg_scans),
    .seg_converged(seg_converged),
    .n_obj        (n_obj),
    .obj_overflow (obj_overflow),
    .n_matched    (n_matched),
    .n_new        (n_new),
    .tgt_valid    (tgt_valid),
    .tgt_found    (tgt_found),
    .tgt_track    (tgt_track),
    .tgt_pixels   (tgt_pixels),
    .frame_cycles (frame_cycles)
  );

  logic restore_busy;

  image_restore #(.W(W), .H(H), .FACTOR(FACTOR)) u_restore (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (c_valid),
    .in_idx   (c_idx),
    .in_rgb   (c_rgb),
    .in_target(c_target),
    .show     (c_done),
    .busy     (restore_busy),
    .out_valid(disp_valid),
    .out_sof  (disp_sof),
    .out_eof  (disp_eof),
    .out_rgb  (disp_rgb)
  );
endmodule
