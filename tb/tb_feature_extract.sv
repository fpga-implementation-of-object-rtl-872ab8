// tb_feature_extract: builds random segment maps (labels = smallest index of
// each 4-connected region of a random few-colour image), streams them
// through the feature extraction with 6 object slots, and compares every
// slot's root, sums, bounding box and area with values computed here, and
// the overflow count with the number of segments that found no slot.
module tb_feature_extract;
  import tracker_pkg::*;
  localparam int unsigned W = 10, H = 6, N = 6;
  int checks = 0, failures = 0, overflow_runs = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear, in_valid;
  logic [XW-1:0] in_x;
  logic [YW-1:0] in_y;
  logic [LW-1:0] in_idx, in_label;
  rgb_t in_rgb;
  logic [$clog2(N+1)-1:0] n_obj;
  logic [15:0] overflow;
  logic [$clog2(N)-1:0] rd_slot;
  obj_acc_t rd_acc;

  feature_extract #(.N_OBJ(N)) dut (.*);

  int cls [W*H];
  int lab [W*H];
  rgb_t px [W*H];

  initial begin
    clear = 0; in_valid = 0; in_x = '0; in_y = '0; in_idx = '0; in_label = '0; in_rgb = '0; rd_slot = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      bit ch;
      int roots [$];
      int ncls;
      ncls = (t < 10) ? 2 : 4;
      roots.delete();
      for (int i = 0; i < W*H; i++) begin
        cls[i] = $urandom_range(0, ncls - 1);
        lab[i] = i;
        px[i]  = '{8'($urandom), 8'($urandom), 8'($urandom)};
      end
      do begin
        ch = 0;
        for (int i = 0; i < W*H; i++) begin
          if (i % W != 0 && cls[i] == cls[i-1] && lab[i] != lab[i-1]) begin
            int m; m = lab[i] < lab[i-1] ? lab[i] : lab[i-1]; lab[i] = m; lab[i-1] = m; ch = 1;
          end
          if (i >= W && cls[i] == cls[i-W] && lab[i] != lab[i-W]) begin
            int m; m = lab[i] < lab[i-W] ? lab[i] : lab[i-W]; lab[i] = m; lab[i-W] = m; ch = 1;
          end
        end
      end while (ch);
      for (int i = 0; i < W*H; i++) if (lab[i] == i) roots.push_back(i);
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      for (int i = 0; i < W*H; i++) begin
        in_valid = 1; in_x = XW'(i % W); in_y = YW'(i / W); in_idx = LW'(i);
        in_label = LW'(lab[i]); in_rgb = px[i];
        @(negedge clk);
      end
      in_valid = 0;
      @(negedge clk);
      checks++;
      if (int'(n_obj) != (roots.size() < N ? roots.size() : N) ||
          int'(overflow) != (roots.size() > N ? roots.size() - N : 0)) begin
        failures++; $display("FAIL t=%0d n_obj %0d overflow %0d segs %0d", t, n_obj, overflow, roots.size());
      end
      if (roots.size() > N) overflow_runs++;
      for (int s = 0; s < N && s < roots.size(); s++) begin
        obj_acc_t e;
        e = '0;
        e.root = LW'(roots[s]); e.xmin = '1; e.ymin = '1;
        for (int i = 0; i < W*H; i++) if (lab[i] == roots[s]) begin
          e.sx += (LW+XW)'(i % W); e.sy += (LW+YW)'(i / W);
          e.sr += (LW+8)'(px[i].r); e.sg += (LW+8)'(px[i].g); e.sb += (LW+8)'(px[i].b);
          e.area += 1;
          if (XW'(i % W) < e.xmin) e.xmin = XW'(i % W);
          if (XW'(i % W) > e.xmax) e.xmax = XW'(i % W);
          if (YW'(i / W) < e.ymin) e.ymin = YW'(i / W);
          if (YW'(i / W) > e.ymax) e.ymax = YW'(i / W);
        end
        rd_slot = $bits(rd_slot)'(s);
        #1;
        checks++;
        if (rd_acc !== e) begin
          failures++; $display("FAIL t=%0d slot %0d root %0d/%0d area %0d/%0d", t, s, rd_acc.root, e.root, rd_acc.area, e.area);
        end
      end
    end
    checks++;
    if (overflow_runs == 0) begin failures++; $display("FAIL overflow never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
