// tb_object_matching: feeds frames of objects that drift, change order,
// appear and vanish, and checks every matching result (nearest reference,
// track number, match flag, distance, motion vector) against a model of the
// rule kept here, including the estimated positions carried into the next
// frame. Also checks the cycle count n_cur * (n_ref + 1) + 2.
module tb_object_matching;
  import tracker_pkg::*;
  localparam int unsigned N = 8, TH = 192;
  int checks = 0, failures = 0;
  int n_match_seen = 0, n_new_seen = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic cur_wr_en, start, busy, done, res_valid, res_matched;
  logic [$clog2(N)-1:0] cur_wr_slot, res_slot;
  obj_feat_t cur_wr_feat;
  logic [$clog2(N+1)-1:0] n_cur, n_ref;
  logic [LW-1:0] res_root;
  logic [TW-1:0] res_track;
  logic [DW-1:0] res_dist;
  logic signed [XW:0] res_mv_x;
  logic signed [YW:0] res_mv_y;
  logic [15:0] n_matched, n_new;

  object_matching #(.N_OBJ(N), .MATCH_TH(TH)) dut (.*);

  typedef struct { obj_feat_t f; int ex, ey, ax, ay, track; } mref_t;
  mref_t refs [$];
  mref_t nrefs [$];
  obj_feat_t cur [N];
  int next_track = 0;

  function automatic int nrm(int v, int range);
    int k = (255 * 256) / range;
    int p = (v * k) / 256;
    return p > 255 ? 255 : p;
  endfunction
  function automatic int ad(int a, int b); return a > b ? a - b : b - a; endfunction
  function automatic int fdist(obj_feat_t a, obj_feat_t b, int bx, int by);
    return ad(nrm(a.px, 80), nrm(bx, 80)) + ad(nrm(a.py, 60), nrm(by, 60))
         + ad(nrm(a.w, 81), nrm(b.w, 81)) + ad(nrm(a.h, 61), nrm(b.h, 61))
         + ad(a.col.r, b.col.r) + ad(a.col.g, b.col.g) + ad(a.col.b, b.col.b)
         + ad(nrm(a.area, 4801), nrm(b.area, 4801));
  endfunction

  // base objects that move a little every frame
  obj_feat_t base [6];

  initial begin
    cur_wr_en = 0; start = 0; n_cur = '0; cur_wr_slot = '0; cur_wr_feat = '0;
    for (int k = 0; k < 6; k++) begin
      base[k].root = '0;
      base[k].px = XW'($urandom_range(10, 69)); base[k].py = YW'($urandom_range(10, 49));
      base[k].w = (XW+1)'($urandom_range(3, 30)); base[k].h = (YW+1)'($urandom_range(3, 30));
      base[k].col = '{8'($urandom), 8'($urandom), 8'($urandom)};
      base[k].area = AW'($urandom_range(10, 900));
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int fr = 0; fr < 12; fr++) begin
      int nc, cyc, nr;
      nc = (fr == 5) ? 0 : $urandom_range(2, 6);
      for (int k = 0; k < 6; k++) begin
        base[k].px = XW'(int'(base[k].px) + $urandom_range(0, 4) - 2);
        base[k].py = YW'(int'(base[k].py) + $urandom_range(0, 2) - 1);
      end
      for (int s = 0; s < nc; s++) begin
        int k;
        k = (s + fr) % 6;
        cur[s] = base[k];
        cur[s].root = LW'($urandom_range(0, 4799));
        if ($urandom_range(0, 5) == 0) cur[s].col = '{8'($urandom), 8'($urandom), 8'($urandom)};
        @(negedge clk); cur_wr_en = 1; cur_wr_slot = $bits(cur_wr_slot)'(s); cur_wr_feat = cur[s];
      end
      @(negedge clk); cur_wr_en = 0;
      nr = refs.size();
      n_cur = $bits(n_cur)'(nc); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      nrefs.delete();
      for (int s = 0; s < nc; s++) begin
        int bd, bj, mvx, mvy, tr, ex, ey;
        bit m;
        while (!res_valid) begin @(negedge clk); cyc++; end
        bd = 1 << 30; bj = 0;
        foreach (refs[j]) begin
          int d;
          d = fdist(cur[s], refs[j].f, refs[j].ex, refs[j].ey);
          if (d < bd) begin bd = d; bj = j; end
        end
        m = (refs.size() > 0) && bd <= TH;
        mvx = m ? int'(cur[s].px) - refs[bj].ax : 0;
        mvy = m ? int'(cur[s].py) - refs[bj].ay : 0;
        tr = m ? refs[bj].track : next_track;
        if (!m) next_track = (next_track + 1) % 256;
        if (m) n_match_seen++; else n_new_seen++;
        checks++;
        if (int'(res_slot) != s || res_root != cur[s].root || res_matched != m || int'(res_track) != tr ||
            (m && int'(res_dist) != bd) || int'(res_mv_x) != mvx || int'(res_mv_y) != mvy) begin
          failures++;
          $display("FAIL fr %0d obj %0d: m %0d/%0d track %0d/%0d dist %0d/%0d mv %0d,%0d/%0d,%0d", fr, s,
                   res_matched, m, res_track, tr, res_dist, bd, res_mv_x, res_mv_y, mvx, mvy);
        end
        ex = int'(cur[s].px) + mvx; ey = int'(cur[s].py) + mvy;
        ex = ex < 0 ? 0 : (ex > 79 ? 79 : ex);
        ey = ey < 0 ? 0 : (ey > 59 ? 59 : ey);
        nrefs.push_back('{cur[s], ex, ey, int'(cur[s].px), int'(cur[s].py), tr});
        @(negedge clk); cyc++;
      end
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != nc * (nr + 1) + 2 && nc > 0) begin
        failures++; $display("FAIL fr %0d cycles %0d exp %0d", fr, cyc, nc * (nr + 1) + 2);
      end
      refs = nrefs;
      checks++;
      if (int'(n_ref) != nc) begin failures++; $display("FAIL n_ref"); end
    end
    checks++;
    if (n_match_seen == 0 || n_new_seen == 0) begin failures++; $display("FAIL matched %0d new %0d", n_match_seen, n_new_seen); end
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
