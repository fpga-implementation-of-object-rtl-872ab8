// tb_matched_obj_mem: fills the table with random results, presses select a
// number of times and checks that the target steps through the filled
// entries in order, that tgt_hit/tgt_root point at exactly the entries of
// the target track, and that the target survives a clear but is reported
// missing until an entry with its track comes back.
module tb_matched_obj_mem;
  import tracker_pkg::*;
  localparam int unsigned N = 6;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear, res_valid, select, tgt_valid, tgt_found;
  logic [$clog2(N)-1:0] res_slot;
  logic [LW-1:0] res_root;
  logic [TW-1:0] res_track, tgt_track;
  logic [N-1:0] tgt_hit;
  logic [N-1:0][LW-1:0] tgt_root;

  matched_obj_mem #(.N_OBJ(N)) dut (.*);

  bit   v [N];
  int   rt [N], tk [N];
  int   sel;

  task automatic check_hits(string what);
    bit any;
    any = 0;
    for (int k = 0; k < N; k++) begin
      bit e;
      e = tgt_valid && v[k] && tk[k] == int'(tgt_track);
      any |= e;
      checks++;
      if (tgt_hit[k] != e || (e && int'(tgt_root[k]) != rt[k])) begin
        failures++; $display("FAIL %s entry %0d hit %0d exp %0d", what, k, tgt_hit[k], e);
      end
    end
    checks++;
    if (tgt_found != any) begin failures++; $display("FAIL %s found", what); end
  endtask

  initial begin
    clear = 0; res_valid = 0; select = 0; res_slot = '0; res_root = '0; res_track = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++;
    if (tgt_valid) begin failures++; $display("FAIL target before select"); end
    sel = -1;
    for (int t = 0; t < 20; t++) begin
      int n;
      n = $urandom_range(1, N);
      @(negedge clk); clear = 1;
      for (int k = 0; k < N; k++) v[k] = 0;
      @(negedge clk); clear = 0;
      for (int k = 0; k < n; k++) begin
        res_valid = 1; res_slot = $bits(res_slot)'(k);
        rt[k] = $urandom_range(0, 4799); tk[k] = (t < 10) ? k + 3 : $urandom_range(0, 3);
        res_root = LW'(rt[k]); res_track = TW'(tk[k]); v[k] = 1;
        @(negedge clk);
      end
      res_valid = 0;
      #1 check_hits("after fill");
      if (t % 3 != 2) begin
        int exp_idx;
        exp_idx = -1;
        for (int s = 1; s <= N; s++) if (exp_idx < 0 && v[(sel + s + N) % N]) exp_idx = (sel + s + N) % N;
        select = 1;
        @(negedge clk); select = 0;
        sel = exp_idx;
        checks++;
        if (!tgt_valid || int'(tgt_track) != tk[exp_idx]) begin
          failures++; $display("FAIL t=%0d select -> track %0d exp %0d (entry %0d)", t, tgt_track, tk[exp_idx], exp_idx);
        end
        #1 check_hits("after select");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
