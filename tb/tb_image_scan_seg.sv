// tb_image_scan_seg: loads random weight maps into the image-scan
// segmentation, runs it, reads every label back and compares it with the
// smallest pixel index of the pixel's connected region, found here by
// repeated relaxation over the whole image. Includes a U-shaped region whose
// label must travel back up the image, which needs more than one scan, and
// checks the cycle count of a scan.
module tb_image_scan_seg;
  import tracker_pkg::*;
  localparam int unsigned W = 8, H = 6, ROWS = 2;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ld_valid, ld_wl, ld_wu, start, busy, done, converged, px_en;
  logic [LW-1:0] ld_idx, px_label;
  logic [7:0] scans;
  logic [23:0] steps;
  logic [XW-1:0] px_x;
  logic [YW-1:0] px_y;

  image_scan_seg #(.W(W), .H(H), .ROWS(ROWS), .MAX_ITER(W*ROWS), .MAX_SCANS(32)) dut (.*);

  bit wl [W*H];
  bit wu [W*H];
  int ref_lab [W*H];
  int multi_scan = 0;

  task automatic reference();
    bit ch;
    for (int i = 0; i < W*H; i++) ref_lab[i] = i;
    do begin
      ch = 0;
      for (int i = 0; i < W*H; i++) begin
        if (wl[i] && ref_lab[i-1] != ref_lab[i]) begin
          int m = ref_lab[i-1] < ref_lab[i] ? ref_lab[i-1] : ref_lab[i];
          ref_lab[i-1] = m; ref_lab[i] = m; ch = 1;
        end
        if (wu[i] && ref_lab[i-W] != ref_lab[i]) begin
          int m = ref_lab[i-W] < ref_lab[i] ? ref_lab[i-W] : ref_lab[i];
          ref_lab[i-W] = m; ref_lab[i] = m; ch = 1;
        end
      end
    end while (ch);
  endtask

  task automatic run_one(int t);
    int cyc;
    reference();
    for (int i = 0; i < W*H; i++) begin
      @(negedge clk);
      ld_valid = 1; ld_idx = LW'(i); ld_wl = wl[i]; ld_wu = wu[i];
    end
    @(negedge clk); ld_valid = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 0;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (!converged) begin failures++; $display("FAIL t=%0d not converged", t); end
    if (scans > 1) multi_scan++;
    // a scan costs per block: read, latch, steps+1, write, next
    checks++;
    if (cyc != int'(scans) * (H/ROWS) * 5 + int'(steps)) begin
      failures++; $display("FAIL t=%0d cycles %0d scans %0d steps %0d", t, cyc, scans, steps);
    end
    for (int i = 0; i < W*H; i++) begin
      @(negedge clk);
      px_en = 1; px_x = XW'(i % W); px_y = YW'(i / W);
      @(negedge clk);
      px_en = 0;
      checks++;
      if (int'(px_label) != ref_lab[i]) begin
        failures++;
        $display("FAIL t=%0d pixel %0d label %0d exp %0d", t, i, px_label, ref_lab[i]);
      end
    end
  endtask

  initial begin
    ld_valid = 0; ld_wl = 0; ld_wu = 0; ld_idx = '0; start = 0; px_en = 0; px_x = '0; px_y = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // U shape: two columns joined only at the bottom row
    for (int i = 0; i < W*H; i++) begin
      int x = i % W, y = i / W;
      bit inu = (x == 1 || x == 6 || (y == H-1 && x >= 1 && x <= 6));
      bit inl = (x > 0) && inu && ((x-1 == 1 || x-1 == 6 || (y == H-1 && x-1 >= 1)));
      wl[i] = inl && (y == H-1 || (x == 7 ? 0 : 0));
      if (y == H-1 && x >= 2 && x <= 6) wl[i] = 1;
      wu[i] = (y > 0) && (x == 1 || x == 6);
    end
    run_one(0);
    for (int t = 1; t < 25; t++) begin
      int p = $urandom_range(30, 75);
      for (int i = 0; i < W*H; i++) begin
        wl[i] = (i % W != 0) && ($urandom_range(0, 99) < p);
        wu[i] = (i >= W) && ($urandom_range(0, 99) < p);
      end
      run_one(t);
    end
    checks++;
    if (multi_scan == 0) begin failures++; $display("FAIL no run needed a second scan"); end
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
