// tb_tracker_full: the tracking system at its full size and default
// settings: 640x480 camera frames, 80x60 tracking image, 80x2 processing
// array, 10 ms switch debounce at 12.27 MHz. The scene has a grey
// background, a yellow U shape, a red block moving right and a green block
// moving left. After the first frame is tracked the push switch is held
// twice, which steps the target to the background and then to the second
// object in raster order, the red block. Every display frame is checked
// pixel by pixel: each pixel shows its scene colour or blue, blue covers
// exactly the pixels of one scene colour, and the last frames must show the
// red block blue. The tracking time of every frame must stay within the
// 30 frame/s budget of 409,000 cycles at 12.27 MHz.
module tb_tracker_full;
  import tracker_pkg::*;
  localparam int unsigned SW = 640, SH = 480, F = 8, W = SW / F, H = SH / F;
  localparam int unsigned NFRAMES = 5;
  localparam int unsigned BUDGET = 409_000;
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

  tracker_top dut (.*);

  frame_sram_model u_fb (
    .clk(clk), .wr_en(fb_wr_en), .wr_bank(fb_wr_bank), .wr_addr(fb_wr_addr), .wr_data(fb_wr_data),
    .rd_en(fb_rd_en), .rd_bank(fb_rd_bank), .rd_addr(fb_rd_addr), .rd_data(fb_rd_data));

  localparam rgb_t GREY = '{8'd128, 8'd128, 8'd128}, YEL = '{8'd220, 8'd220, 8'd30},
                   RED = '{8'd220, 8'd30, 8'd30}, GRN = '{8'd30, 8'd200, 8'd40},
                   BLUE = '{8'd0, 8'd0, 8'd255};

  function automatic rgb_t scene(int fr, int i);
    int x, y;
    rgb_t c;
    x = i % W; y = i / W;
    c = GREY;
    if ((x == 60 || x == 70) && y >= 20 && y <= 40) c = YEL;
    if (x >= 60 && x <= 70 && y == 40) c = YEL;
    if (y >= 10 && y <= 30 && x >= 5 + 3 * fr && x <= 14 + 3 * fr) c = RED;
    if (y >= 45 && y <= 55 && x >= 50 - 2 * fr && x <= 57 - 2 * fr) c = GRN;
    return c;
  endfunction

  int vid_frames = 0;
  initial begin
    vid_valid = 0; vid_sof = 0; vid_rgb = '0;
    wait (rst_n);
    for (int fr = 0; fr < NFRAMES; fr++) begin
      for (int p = 0; p < SW * SH; p++) begin
        @(negedge clk);
        vid_valid = 1; vid_sof = (p == 0);
        vid_rgb = scene(fr, ((p / SW) / F) * W + (p % SW) / F);
      end
      @(negedge clk); vid_valid = 0; vid_sof = 0;
      vid_frames++;
      repeat (1000) @(negedge clk);
    end
  end

  int last_written = -1, in_core = -1, max_cycles = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.wr_done) last_written++;
    if (dut.rd_start) in_core = last_written;
    if (dut.c_done) begin
      if (int'(frame_cycles) > max_cycles) max_cycles = frame_cycles;
      checks++;
      if (frame_cycles > BUDGET || !seg_converged) begin
        failures++; $display("FAIL frame %0d took %0d cycles, settled %0d", in_core, frame_cycles, seg_converged);
      end
      $display("tracked frame %0d: %0d objects, %0d scans, %0d cycles, matched %0d new %0d",
               in_core, n_obj, seg_scans, frame_cycles, n_matched, n_new);
    end
  end

  int dn, dframe, nblue, frames_checked = 0, red_frames = 0;
  int ncol [rgb_t];
  rgb_t tcol;
  bit frame_bad, has_t;
  always @(posedge clk) if (rst_n && disp_valid) begin
    int i;
    rgb_t c;
    if (disp_sof) begin dn = 0; dframe = in_core; nblue = 0; frame_bad = 0; has_t = 0; ncol.delete(); end
    i = ((dn / SW) / F) * W + (dn % SW) / F;
    c = scene(dframe, i);
    ncol[c] = ncol.exists(c) ? ncol[c] + 1 : 1;
    if (disp_rgb == BLUE) begin
      nblue++;
      if (!has_t) begin has_t = 1; tcol = c; end
      else if (c != tcol) frame_bad = 1;
    end else if (disp_rgb != c) frame_bad = 1;
    dn++;
    if (disp_eof) begin
      checks++;
      frames_checked++;
      if (has_t && ncol[tcol] != nblue) frame_bad = 1;
      if (has_t && tcol == RED) red_frames++;
      if (frame_bad || dn != SW * SH) begin failures++; $display("FAIL display of frame %0d", dframe); end
      $display("display frame %0d: %0d blue pixels on colour %h", dframe, nblue, has_t ? tcol : 24'h0);
    end
  end

  initial begin
    sw_in = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    wait (frames_tracked == 1);
    for (int p = 0; p < 2; p++) begin
      sw_in = 1; repeat (130_000) @(negedge clk);
      sw_in = 0; repeat (130_000) @(negedge clk);
    end
  end

  initial begin
    wait (vid_frames == NFRAMES);
    wait (!dut.c_busy && !dut.restore_busy);
    repeat (100) @(negedge clk);
    wait (!dut.c_busy && !dut.restore_busy);
    repeat (20) @(negedge clk);
    $display("longest tracking time %0d cycles of %0d", max_cycles, BUDGET);
    checks++;
    if (frames_tracked != NFRAMES || frames_checked != NFRAMES) begin
      failures++; $display("FAIL %0d frames tracked, %0d displayed", frames_tracked, frames_checked);
    end
    checks++;
    if (!tgt_valid || red_frames < 2) begin failures++; $display("FAIL target never shown"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
