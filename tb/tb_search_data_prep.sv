// tb_search_data_prep: serves random feature sums from a table kept here,
// runs the preparation and checks every written record (centroid, box size,
// mean colour, area, root) against integer division done here, the number of
// records, and the time per object.
module tb_search_data_prep;
  import tracker_pkg::*;
  localparam int unsigned N = 5;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, wr_en, busy, done;
  logic [$clog2(N+1)-1:0] n_obj, n_out;
  logic [$clog2(N)-1:0] rd_slot, wr_slot;
  obj_acc_t rd_acc;
  obj_feat_t wr_feat;
  obj_acc_t tab [N];
  int nwr;

  always_comb rd_acc = tab[rd_slot];

  search_data_prep #(.N_OBJ(N)) dut (.*);

  always @(posedge clk) if (rst_n && wr_en) begin
    obj_acc_t a;
    obj_feat_t e;
    a = tab[wr_slot];
    e.root = a.root;
    e.px = XW'(a.sx / a.area); e.py = YW'(a.sy / a.area);
    e.w = (XW+1)'(a.xmax - a.xmin + 1); e.h = (YW+1)'(a.ymax - a.ymin + 1);
    e.col = '{8'(a.sr / a.area), 8'(a.sg / a.area), 8'(a.sb / a.area)};
    e.area = a.area;
    checks++;
    if (wr_feat !== e || int'(wr_slot) != nwr) begin
      failures++; $display("FAIL slot %0d px %0d/%0d py %0d/%0d", wr_slot, wr_feat.px, e.px, wr_feat.py, e.py);
    end
    nwr++;
  end

  initial begin
    start = 0; n_obj = '0; nwr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 8; t++) begin
      int cyc, n;
      n = (t == 0) ? 0 : $urandom_range(1, N);
      for (int s = 0; s < N; s++) begin
        int ar = $urandom_range(1, 4800);
        tab[s].root = LW'($urandom_range(0, 4799));
        tab[s].area = AW'(ar);
        tab[s].sx = (LW+XW)'(ar * $urandom_range(0, 79));
        tab[s].sy = (LW+YW)'(ar * $urandom_range(0, 59));
        tab[s].sr = (LW+8)'(ar * $urandom_range(0, 255));
        tab[s].sg = (LW+8)'($urandom_range(0, ar * 255));
        tab[s].sb = (LW+8)'($urandom_range(0, ar * 255));
        tab[s].xmin = XW'($urandom_range(0, 40)); tab[s].xmax = tab[s].xmin + XW'($urandom_range(0, 39));
        tab[s].ymin = YW'($urandom_range(0, 30)); tab[s].ymax = tab[s].ymin + YW'($urandom_range(0, 29));
      end
      nwr = 0;
      @(negedge clk); n_obj = $bits(n_obj)'(n); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      @(negedge clk);
      checks++;
      if (int'(n_out) != n || nwr != n) begin failures++; $display("FAIL count %0d %0d exp %0d", n_out, nwr, n); end
      checks++;
      if (n > 0 && cyc != n * (5 * (LW + 10) + 1) + 1) begin failures++; $display("FAIL cycles %0d for %0d objects", cyc, n); end
    end
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
