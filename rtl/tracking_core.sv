// tracking_core: the main tracking processor. For each frame it segments the
// image, extracts the features of every segment, matches the objects with
// those of the preceding frame, and streams the image out with the target's
// pixels marked.
//
// The frame sits in an external frame memory (fb_rd_*, one-cycle read
// latency) and is read three times, one pixel per cycle in raster order:
//   1. LOAD  pixels -> pre-processing (external, pre_*) -> weight_calc ->
//            image_scan_seg storage;
//   then     SEG: image-scan segmentation until the labels settle;
//   2. FEAT  pixels + labels -> feature_extract;
//   then     PREP: search_data_prep writes feature records into
//            object_matching, and MATCH: all-pairs matching writes the
//            result into matched_obj_mem;
//   3. OUT   pixels + labels -> post_process -> out_* stream.
// A frame starts when frame_avail is high (rd_start pulses to claim it). The
// pre-processing unit is outside this module: pre_valid/pre_sof/pre_rgb go
// out and the processed colour must come back on pre_in_rgb in the same
// cycle. select (one-cycle pulse) steps the tracking target. out_eof marks
// the last result pixel; frame_done pulses one cycle after it.
// The chain of blocks follows the document's block diagram. The document
// interleaves segmentation and matching of successive frames; here the
// phases of one frame run one after another, which is this design's
// simplification.
module tracking_core
  import tracker_pkg::*;
#(
  parameter int unsigned W         = IMG_W,
  parameter int unsigned H         = IMG_H,
  parameter int unsigned ROWS      = 2,
  parameter int unsigned MAX_ITER  = IMG_W * 2,
  parameter int unsigned MAX_SCANS = 64,
  parameter int unsigned TH        = 40,
  parameter int unsigned MATCH_TH  = 192,
  parameter int unsigned N_OBJ     = MAX_OBJ
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // frame buffer hand-over and read port
  input  logic                       frame_avail,
  output logic                       rd_start,
  output logic                       fb_rd_en,
  output logic [LW-1:0]              fb_rd_addr,
  input  rgb_t                       fb_rd_data,
  // external pre-processing unit
  output logic                       pre_valid,
  output logic                       pre_sof,
  output rgb_t                       pre_rgb,
  input  rgb_t                       pre_in_rgb,
  // target selection
  input  logic                       select,
  // result stream
  output logic                       out_valid,
  output logic [LW-1:0]              out_idx,
  output logic [LW-1:0]              out_label,
  output rgb_t                       out_rgb,
  output logic                       out_target,
  output logic                       out_eof,
  output logic                       frame_done,
  // status
  output logic                       busy,
  output logic [15:0]                frame_count,
  output logic [7:0]                 seg_scans,
  output logic                       seg_converged,
  output logic [$clog2(N_OBJ+1)-1:0] n_obj,
  output logic [15:0]                obj_overflow,
  output logic [15:0]                n_matched,
  output logic [15:0]                n_new,
  output logic                       tgt_valid,
  output logic                       tgt_found,
  output logic [TW-1:0]              tgt_track,
  output logic [AW-1:0]              tgt_pixels,
  output logic [31:0]                frame_cycles
);
  localparam int unsigned SW = $clog2(N_OBJ);

  typedef enum logic [3:0] {
    C_IDLE, C_LOAD, C_LDRAIN, C_SEG, C_FEAT, C_FDRAIN, C_PREP, C_MATCH, C_OUT, C_ODRAIN
  } cst_t;
  cst_t st;

  // ---------------- pixel read counter shared by the three passes ----------------
  logic          scan_en;
  logic [XW-1:0] sx;
  logic [YW-1:0] sy;
  logic [LW-1:0] sidx;
  logic          last_px;
  logic          rv;            // read data valid (one cycle after the request)
  logic [XW-1:0] rx;
  logic [YW-1:0] ry;
  logic [LW-1:0] ridx;
  logic          rlast;
  logic [2:0]    drain;

  always_comb begin
    scan_en    = (st == C_LOAD) || (st == C_FEAT) || (st == C_OUT);
    last_px    = (32'(sidx) == W * H - 1);
    fb_rd_en   = scan_en;
    fb_rd_addr = sidx;
  end

  // ---------------- pass 1: pre-processing and weights ----------------
  logic          wc_valid, wc_wl, wc_wu;
  logic [LW-1:0] wc_idx;

  always_comb begin
    pre_valid = rv && (st == C_LOAD || st == C_LDRAIN);
    pre_sof   = pre_valid && (ridx == '0);
    pre_rgb   = fb_rd_data;
  end

  weight_calc #(.W(W), .H(H), .TH(TH)) u_wc (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (pre_valid),
    .in_sof   (pre_sof),
    .in_rgb   (pre_in_rgb),
    .out_valid(wc_valid),
    .out_idx  (wc_idx),
    .w_left   (wc_wl),
    .w_up     (wc_wu)
  );

  logic          seg_start, seg_busy, seg_done;
  logic [23:0]   seg_steps;
  logic [LW-1:0] px_label;

  image_scan_seg #(.W(W), .H(H), .ROWS(ROWS), .MAX_ITER(MAX_ITER), .MAX_SCANS(MAX_SCANS)) u_seg (
    .clk      (clk),
    .rst_n    (rst_n),
    .ld_valid (wc_valid),
    .ld_idx   (wc_idx),
    .ld_wl    (wc_wl),
    .ld_wu    (wc_wu),
    .start    (seg_start),
    .busy     (seg_busy),
    .done     (seg_done),
    .converged(seg_converged),
    .scans    (seg_scans),
    .steps    (seg_steps),
    .px_en    (scan_en),
    .px_x     (sx),
    .px_y     (sy),
    .px_label (px_label)
  );

  // ---------------- pass 2: features ----------------
  logic              fe_clear;
  logic [SW-1:0]     fe_rd_slot;
  obj_acc_t          fe_rd_acc;

  feature_extract #(.N_OBJ(N_OBJ)) u_fe (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear   (fe_clear),
    .in_valid(rv && (st == C_FEAT || st == C_FDRAIN)),
    .in_x    (rx),
    .in_y    (ry),
    .in_idx  (ridx),
    .in_label(px_label),
    .in_rgb  (fb_rd_data),
    .n_obj   (n_obj),
    .overflow(obj_overflow),
    .rd_slot (fe_rd_slot),
    .rd_acc  (fe_rd_acc)
  );

  logic                       sp_start, sp_busy, sp_done, sp_wr_en;
  logic [SW-1:0]              sp_wr_slot;
  obj_feat_t                  sp_wr_feat;
  logic [$clog2(N_OBJ+1)-1:0] sp_n;

  search_data_prep #(.N_OBJ(N_OBJ)) u_sp (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (sp_start),
    .n_obj  (n_obj),
    .rd_slot(fe_rd_slot),
    .rd_acc (fe_rd_acc),
    .wr_en  (sp_wr_en),
    .wr_slot(sp_wr_slot),
    .wr_feat(sp_wr_feat),
    .busy   (sp_busy),
    .done   (sp_done),
    .n_out  (sp_n)
  );

  logic                       om_start, om_busy, om_done;
  logic                       res_valid, res_matched;
  logic [SW-1:0]              res_slot;
  logic [LW-1:0]              res_root;
  logic [TW-1:0]              res_track;
  logic [DW-1:0]              res_dist;
  logic signed [XW:0]         res_mv_x;
  logic signed [YW:0]         res_mv_y;
  logic [$clog2(N_OBJ+1)-1:0] om_n_ref;

  object_matching #(.N_OBJ(N_OBJ), .W(W), .H(H), .MATCH_TH(MATCH_TH)) u_om (
    .clk        (clk),
    .rst_n      (rst_n),
    .cur_wr_en  (sp_wr_en),
    .cur_wr_slot(sp_wr_slot),
    .cur_wr_feat(sp_wr_feat),
    .n_cur      (sp_n),
    .start      (om_start),
    .busy       (om_busy),
    .done       (om_done),
    .res_valid  (res_valid),
    .res_slot   (res_slot),
    .res_root   (res_root),
    .res_track  (res_track),
    .res_matched(res_matched),
    .res_dist   (res_dist),
    .res_mv_x   (res_mv_x),
    .res_mv_y   (res_mv_y),
    .n_ref      (om_n_ref),
    .n_matched  (n_matched),
    .n_new      (n_new)
  );

  logic [N_OBJ-1:0]          tgt_hit;
  logic [N_OBJ-1:0][LW-1:0]  tgt_root;

  matched_obj_mem #(.N_OBJ(N_OBJ)) u_mom (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (om_start),
    .res_valid(res_valid),
    .res_slot (res_slot),
    .res_root (res_root),
    .res_track(res_track),
    .select   (select),
    .tgt_valid(tgt_valid),
    .tgt_track(tgt_track),
    .tgt_found(tgt_found),
    .tgt_hit  (tgt_hit),
    .tgt_root (tgt_root)
  );

  // ---------------- pass 3: output ----------------
  logic pp_last;
  always_comb out_eof = pp_last;

  post_process #(.N_OBJ(N_OBJ)) u_pp (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (om_done),
    .in_valid  (rv && (st == C_OUT || st == C_ODRAIN)),
    .in_idx    (ridx),
    .in_label  (px_label),
    .in_rgb    (fb_rd_data),
    .tgt_hit   (tgt_hit),
    .tgt_root  (tgt_root),
    .out_valid (out_valid),
    .out_idx   (out_idx),
    .out_label (out_label),
    .out_rgb   (out_rgb),
    .out_target(out_target),
    .tgt_pixels(tgt_pixels)
  );

  // ---------------- controller ----------------
  always_comb begin
    rd_start  = (st == C_IDLE) && frame_avail;
    seg_start = (st == C_LDRAIN) && (drain == 3'd4);
    fe_clear  = rd_start;
    sp_start  = (st == C_FDRAIN) && (drain == 3'd2);
    om_start  = (st == C_PREP) && sp_done;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st           <= C_IDLE;
      sx           <= '0;
      sy           <= '0;
      sidx         <= '0;
      rv           <= 1'b0;
      rx           <= '0;
      ry           <= '0;
      ridx         <= '0;
      rlast        <= 1'b0;
      pp_last      <= 1'b0;
      drain        <= '0;
      busy         <= 1'b0;
      frame_done   <= 1'b0;
      frame_count  <= '0;
      frame_cycles <= '0;
    end else begin
      rv         <= scan_en;
      rx         <= sx;
      ry         <= sy;
      ridx       <= sidx;
      rlast      <= scan_en && last_px;
      pp_last    <= rlast && (st == C_OUT || st == C_ODRAIN);
      frame_done <= 1'b0;
      if (busy) frame_cycles <= frame_cycles + 1'b1;
      if (scan_en) begin
        if (last_px) begin
          sx   <= '0;
          sy   <= '0;
          sidx <= '0;
        end else begin
          sidx <= sidx + 1'b1;
          if (32'(sx) == W - 1) begin
            sx <= '0;
            sy <= sy + 1'b1;
          end else begin
            sx <= sx + 1'b1;
          end
        end
      end
      unique case (st)
        C_IDLE: if (frame_avail) begin
          st           <= C_LOAD;
          busy         <= 1'b1;
          frame_cycles <= '0;
        end
        C_LOAD: if (last_px) begin
          st    <= C_LDRAIN;
          drain <= '0;
        end
        C_LDRAIN: begin
          drain <= drain + 1'b1;
          if (drain == 3'd4) st <= C_SEG;
        end
        C_SEG: if (seg_done) st <= C_FEAT;
        C_FEAT: if (last_px) begin
          st    <= C_FDRAIN;
          drain <= '0;
        end
        C_FDRAIN: begin
          drain <= drain + 1'b1;
          if (drain == 3'd2) st <= C_PREP;
        end
        C_PREP: if (sp_done) st <= C_MATCH;
        C_MATCH: if (om_done) st <= C_OUT;
        C_OUT: if (last_px) begin
          st    <= C_ODRAIN;
          drain <= '0;
        end
        C_ODRAIN: begin
          drain <= drain + 1'b1;
          if (out_eof) begin
            st          <= C_IDLE;
            busy        <= 1'b0;
            frame_done  <= 1'b1;
            frame_count <= frame_count + 1'b1;
          end
        end
        default: st <= C_IDLE;
      endcase
    end
  end
endmodule
