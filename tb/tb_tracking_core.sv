// tb_tracking_core: runs the tracking core on a 16x12 image sequence: grey
// background, a fixed yellow U shape (needs several segmentation scans), a
// red block moving right, a green block moving left and a fixed brown bar.
// For every frame it checks each output pixel's colour and segment label
// against a flood-fill segmentation done here, the object count and the
// end-of-frame marker. After the first frame select is pulsed four times,
// which steps the target to the fourth object in raster order, the red
// block; in the following frames exactly the red pixels must be marked.
module tb_tracking_core;
  import tracker_pkg::*;
  localparam int unsigned W = 16, H = 12, NP = W * H;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic frame_avail, rd_start, fb_rd_en, pre_valid, pre_sof, select;
  logic [LW-1:0] fb_rd_addr, out_idx, out_label;
  rgb_t fb_rd_data, pre_rgb, pre_in_rgb, out_rgb;
  logic out_valid, out_target, out_eof, frame_done, busy, seg_converged, tgt_valid, tgt_found;
  logic [15:0] frame_count, obj_overflow, n_matched, n_new;
  logic [7:0] seg_scans;
  logic [$clog2(MAX_OBJ+1)-1:0] n_obj;
  logic [TW-1:0] tgt_track;
  logic [AW-1:0] tgt_pixels;
  logic [31:0] frame_cycles;

  assign pre_in_rgb = pre_rgb;

  tracking_core #(.W(W), .H(H), .MAX_ITER(2 * W)) dut (.*);

  localparam rgb_t GREY = '{8'd128, 8'd128, 8'd128}, YEL = '{8'd220, 8'd220, 8'd30},
                   RED = '{8'd220, 8'd30, 8'd30}, GRN = '{8'd30, 8'd200, 8'd40},
                   BRN = '{8'd90, 8'd50, 8'd20};
  rgb_t img [NP];
  int   lab [NP];
  int   nseg;

  always @(posedge clk) if (fb_rd_en) fb_rd_data <= img[fb_rd_addr];

  task automatic draw(int fr);
    for (int i = 0; i < NP; i++) img[i] = GREY;
    for (int y = 1; y <= 4; y++) begin img[y*W+13] = YEL; img[y*W+15] = YEL; end
    img[4*W+14] = YEL;
    for (int y = 3; y <= 6; y++) for (int x = 1 + fr; x <= 3 + fr; x++) img[y*W+x] = RED;
    for (int y = 7; y <= 9; y++) for (int x = 11 - fr; x <= 12 - fr; x++) img[y*W+x] = GRN;
    for (int y = 2; y <= 8; y++) for (int x = 8; x <= 9; x++) img[y*W+x] = BRN;
  endtask

  task automatic segment();
    bit ch;
    for (int i = 0; i < NP; i++) lab[i] = i;
    do begin
      ch = 0;
      for (int i = 0; i < NP; i++) begin
        if (i % W != 0 && img[i] == img[i-1] && lab[i] != lab[i-1]) begin
          int m; m = lab[i] < lab[i-1] ? lab[i] : lab[i-1]; lab[i] = m; lab[i-1] = m; ch = 1;
        end
        if (i >= W && img[i] == img[i-W] && lab[i] != lab[i-W]) begin
          int m; m = lab[i] < lab[i-W] ? lab[i] : lab[i-W]; lab[i] = m; lab[i-W] = m; ch = 1;
        end
      end
    end while (ch);
    nseg = 0;
    for (int i = 0; i < NP; i++) if (lab[i] == i) nseg++;
  endtask

  int fr_cur, nout, multi_scan;
  bit tgt_on;

  always @(posedge clk) if (rst_n && out_valid) begin
    int i;
    bit e;
    i = int'(out_idx);
    e = tgt_on && img[i] == RED;
    checks++;
    if (i != nout || out_rgb != img[i] || int'(out_label) != lab[i] || out_target != e ||
        out_eof != (i == NP - 1)) begin
      failures++;
      $display("FAIL fr %0d pixel %0d (n %0d) label %0d/%0d target %0d/%0d rgb %h/%h eof %0d", fr_cur, i, nout, out_label, lab[i], out_target, e, out_rgb, img[i], out_eof);
    end
    nout++;
  end

  initial begin
    frame_avail = 0; select = 0; multi_scan = 0; tgt_on = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int fr = 0; fr < 5; fr++) begin
      fr_cur = fr; nout = 0;
      draw(fr);
      segment();
      @(negedge clk); frame_avail = 1;
      @(negedge clk); frame_avail = 0;
      while (!frame_done) @(negedge clk);
      checks++;
      if (nout != NP || int'(n_obj) != nseg || !seg_converged) begin
        failures++; $display("FAIL fr %0d: %0d pixels, %0d objects exp %0d", fr, nout, n_obj, nseg);
      end
      if (seg_scans > 1) multi_scan++;
      if (fr > 0) begin
        checks++;
        if (int'(n_matched) != nseg || n_new != 0 || !tgt_found || int'(tgt_pixels) != 12) begin
          failures++; $display("FAIL fr %0d: matched %0d new %0d found %0d pixels %0d", fr, n_matched, n_new, tgt_found, tgt_pixels);
        end
      end
      $display("frame %0d: %0d objects, %0d scans, %0d cycles", fr, n_obj, seg_scans, frame_cycles);
      if (fr == 0) begin
        for (int p = 0; p < 4; p++) begin
          @(negedge clk); select = 1;
          @(negedge clk); select = 0;
        end
        tgt_on = 1;
      end
    end
    checks++;
    if (multi_scan == 0) begin failures++; $display("FAIL segmentation never needed a second scan"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
