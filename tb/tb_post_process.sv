// tb_post_process: random pixels with labels from a small set, random target
// entries; checks the one-cycle-late output (colour, label, index, target
// flag) and the target pixel count.
module tb_post_process;
  import tracker_pkg::*;
  localparam int unsigned N = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear, in_valid, out_valid, out_target;
  logic [LW-1:0] in_idx, in_label, out_idx, out_label;
  rgb_t in_rgb, out_rgb;
  logic [N-1:0] tgt_hit;
  logic [N-1:0][LW-1:0] tgt_root;
  logic [AW-1:0] tgt_pixels;

  post_process #(.N_OBJ(N)) dut (.*);

  initial begin
    int cnt, hits;
    clear = 0; in_valid = 0; in_idx = '0; in_label = '0; in_rgb = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    hits = 0;
    for (int t = 0; t < 10; t++) begin
      for (int k = 0; k < N; k++) begin tgt_root[k] = LW'(k * 7); tgt_hit[k] = $urandom_range(0, 1); end
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      cnt = 0;
      for (int i = 0; i < 50; i++) begin
        logic [LW-1:0] lab;
        rgb_t c;
        bit e;
        lab = LW'($urandom_range(0, 4) * 7);
        c = '{8'($urandom), 8'($urandom), 8'($urandom)};
        e = 0;
        for (int k = 0; k < N; k++) if (tgt_hit[k] && tgt_root[k] == lab) e = 1;
        cnt += e;
        in_valid = 1; in_idx = LW'(i); in_label = lab; in_rgb = c;
        @(negedge clk);
        in_valid = 0;
        checks++;
        if (!out_valid || out_idx != LW'(i) || out_label != lab || out_rgb != c || out_target != e) begin
          failures++; $display("FAIL t=%0d i=%0d target %0d exp %0d", t, i, out_target, e);
        end
        hits += e;
      end
      checks++;
      if (int'(tgt_pixels) != cnt) begin failures++; $display("FAIL count %0d exp %0d", tgt_pixels, cnt); end
    end
    checks++;
    if (hits == 0) begin failures++; $display("FAIL no target pixel"); end
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
