// tb_tracker_top: end-to-end test of the tracking system at a reduced image
// size (128x96 camera image, 16x12 tracking image). The camera stream shows
// a grey background, a fixed yellow U shape, a fixed brown bar, a red block
// moving right (it passes behind the bar in the later frames) and a green
// block moving left; one frame carries a chequered strip of 32 one-pixel
// segments, more than the object table holds. After the first processed
// frame the push switch is pressed four times (with bounce), which selects
// the red block. Every display frame is checked pixel by pixel: scene colour
// everywhere, blue exactly on the red block once it is the target, and never
// blue outside it. Counts and requires: multi-scan segmentation, object
// table overflow, new and continued tracks, a non-zero motion vector, target
// selection, all three frame banks written, blue target pixels, and the
// target still found while partly hidden.
module tb_tracker_top;
  import tracker_pkg::*;
  localparam int unsigned SW = 128, SH = 96, F = 8, W = SW / F, H = SH / F, NP = W * H;
  localparam int unsigned NFRAMES = 10;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic vid_valid, vid_sof, sw_in;
  rgb_t vid_rgb;
  logic fb_wr_en, fb_rd_en, pre_valid, pre_sof, disp_valid, disp_sof, disp_eof;
  logic [1:0] fb_wr_bank, fb_rd_bank;
  logic [LW-1:0] fb_wr_addr, fb_rd_addr;
  rgb_t fb_wr_data, fb_rd_data, pre_rgb, pre_in_rgb, disp_rgb;
  logic [15:0] frames_tracked, frames_dropped, obj_overflow, n_matched, n_new;
  logic [7:0] seg_scans;
  logic seg_converged, tgt_valid, tgt_found;
  logic [$clog2(MAX_OBJ+1)-1:0] n_obj;
  logic [TW-1:0] tgt_track;
  logic [AW-1:0] tgt_pixels;
  logic [31:0] frame_cycles;

  assign pre_in_rgb = pre_rgb;

  tracker_top #(.SRC_W(SW), .SRC_H(SH), .FACTOR(F), .MAX_ITER(2 * W), .DEBOUNCE(4)) dut (.*);

  frame_sram_model u_fb (
    .clk(clk), .wr_en(fb_wr_en), .wr_bank(fb_wr_bank), .wr_addr(fb_wr_addr), .wr_data(fb_wr_data),
    .rd_en(fb_rd_en), .rd_bank(fb_rd_bank), .rd_addr(fb_rd_addr), .rd_data(fb_rd_data));

  localparam rgb_t GREY = '{8'd128, 8'd128, 8'd128}, YEL = '{8'd220, 8'd220, 8'd30},
                   RED = '{8'd220, 8'd30, 8'd30}, GRN = '{8'd30, 8'd200, 8'd40},
                   BRN = '{8'd90, 8'd50, 8'd20}, BLK = '{8'd0, 8'd0, 8'd0},
                   WHT = '{8'd255, 8'd255, 8'd255}, BLUE = '{8'd0, 8'd0, 8'd255};

  function automatic rgb_t scene(int fr, int i);
    int x, y;
    rgb_t c;
    x = i % W; y = i / W;
    c = GREY;
    if ((x == 13 || x == 15) && y >= 1 && y <= 4) c = YEL;
    if (x == 14 && y == 4) c = YEL;
    if (y >= 3 && y <= 6 && x >= 1 + fr && x <= 3 + fr) c = RED;
    if (y >= 7 && y <= 9 && x >= 11 - fr && x <= 12 - fr) c = GRN;
    if (x >= 8 && x <= 9 && y >= 2 && y <= 8) c = BRN;
    if (fr == 2 && y >= 10) c = ((x + y) % 2 == 0) ? BLK : WHT;
    return c;
  endfunction

  // ---------------- camera ----------------
  int vid_frames = 0;
  initial begin
    vid_valid = 0; vid_sof = 0; vid_rgb = '0;
    wait (rst_n);
    for (int fr = 0; fr < NFRAMES; fr++) begin
      for (int p = 0; p < SW * SH; p++) begin
        int sx, sy;
        sx = p % SW; sy = p / SW;
        if ($urandom_range(0, 15) == 0) begin @(negedge clk); vid_valid = 0; vid_sof = 0; end
        @(negedge clk);
        vid_valid = 1; vid_sof = (p == 0);
        vid_rgb = scene(fr, (sy / F) * W + sx / F);
      end
      @(negedge clk); vid_valid = 0; vid_sof = 0;
      vid_frames++;
      repeat (200) @(negedge clk);
    end
  end

  // ---------------- bookkeeping of which frame is where ----------------
  int last_written = -1, in_core = -1, shown = -1;
  bit tgt_at_done;
  bit banks_used [3];
  int multi_scan = 0, overflow_seen = 0, new_seen = 0, match_seen = 0, mv_seen = 0;
  int blue_frames = 0, occl_found = 0, frames_checked = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.wr_done) last_written++;
    if (fb_wr_en) banks_used[fb_wr_bank] = 1;
    if (dut.rd_start) in_core = last_written;
    if (dut.u_core.res_valid && (dut.u_core.res_mv_x != 0 || dut.u_core.res_mv_y != 0)) mv_seen++;
    if (dut.c_done) begin
      if (seg_scans > 1) multi_scan++;
      if (obj_overflow > 0) overflow_seen++;
      if (n_new > 0) new_seen++;
      if (n_matched > 0) match_seen++;
      checks++;
      if (!seg_converged) begin failures++; $display("FAIL segmentation did not settle"); end
      if (tgt_valid && in_core >= 6) begin
        if (tgt_found) occl_found++;
      end
    end
  end

  // ---------------- display check ----------------
  int dn, dframe, nblue, nred;
  bit dtgt, frame_bad;
  always @(posedge clk) if (rst_n && disp_valid) begin
    int dx, dy, i;
    rgb_t c, e;
    if (disp_sof) begin
      dn = 0; dframe = in_core; dtgt = tgt_valid && tgt_found; nblue = 0; nred = 0; frame_bad = 0;
    end
    dx = dn % SW; dy = dn / SW;
    i = (dy / F) * W + dx / F;
    c = scene(dframe, i);
    if (disp_rgb == BLUE) nblue++;
    if (c == RED) nred++;
    // a pixel is either its scene colour or, on the red block, blue
    if (!(disp_rgb == c || (disp_rgb == BLUE && c == RED))) frame_bad = 1;
    // before the target is known and while the block is in plain view the result is exact
    if (dframe <= 4 && disp_rgb != ((dtgt && c == RED) ? BLUE : c)) frame_bad = 1;
    dn++;
    if (disp_eof) begin
      checks++;
      frames_checked++;
      if (frame_bad || dn != SW * SH) begin
        failures++; $display("FAIL display of frame %0d (%0d pixels, target %0d)", dframe, dn, dtgt);
      end
      if (nblue > 0) blue_frames++;
      $display("display frame %0d: blue %0d of %0d red display pixels, objects %0d overflow %0d scans %0d",
               dframe, nblue, nred, n_obj, obj_overflow, seg_scans);
    end
  end

  // ---------------- push switch ----------------
  initial begin
    sw_in = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    wait (frames_tracked == 1);
    for (int p = 0; p < 4; p++) begin
      repeat (3) begin @(negedge clk); sw_in = 1; @(negedge clk); sw_in = 0; end
      sw_in = 1; repeat (12) @(negedge clk);
      sw_in = 0; repeat (12) @(negedge clk);
    end
  end

  initial begin
    wait (vid_frames == NFRAMES);
    wait (!dut.c_busy && !dut.restore_busy);
    repeat (100) @(negedge clk);
    wait (!dut.c_busy && !dut.restore_busy);
    repeat (20) @(negedge clk);
    checks++;
    if (frames_tracked < NFRAMES - 1 || frames_checked < NFRAMES - 2) begin
      failures++; $display("FAIL only %0d frames tracked, %0d displayed", frames_tracked, frames_checked);
    end
    $display("mechanisms: multi-scan %0d, overflow %0d, new tracks %0d, matches %0d, motion %0d, blue frames %0d, target found behind bar %0d, dropped %0d",
             multi_scan, overflow_seen, new_seen, match_seen, mv_seen, blue_frames, occl_found, frames_dropped);
    checks++; if (multi_scan == 0)     begin failures++; $display("FAIL no multi-scan segmentation"); end
    checks++; if (overflow_seen == 0)  begin failures++; $display("FAIL no object table overflow"); end
    checks++; if (new_seen == 0)       begin failures++; $display("FAIL no new track"); end
    checks++; if (match_seen == 0)     begin failures++; $display("FAIL no matched track"); end
    checks++; if (mv_seen == 0)        begin failures++; $display("FAIL no motion vector"); end
    checks++; if (!tgt_valid)          begin failures++; $display("FAIL no target selected"); end
    checks++; if (blue_frames == 0)    begin failures++; $display("FAIL target never painted"); end
    checks++; if (occl_found == 0)     begin failures++; $display("FAIL target lost behind the bar"); end
    checks++; if (!(banks_used[0] && banks_used[1] && banks_used[2])) begin failures++; $display("FAIL frame banks not rotated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
