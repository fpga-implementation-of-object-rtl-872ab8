// tb_weight_calc: streams random two-tone images through the weight
// calculation and compares every pixel's left and up weights with the
// colour-difference rule computed here.
module tb_weight_calc;
  import tracker_pkg::*;
  localparam int unsigned W = 8, H = 5, TH = 40;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_sof, out_valid, w_left, w_up;
  rgb_t in_rgb;
  logic [LW-1:0] out_idx;
  rgb_t img [W*H];

  weight_calc #(.W(W), .H(H), .TH(TH)) dut (.*);

  function automatic logic close(rgb_t a, rgb_t b);
    int d;
    d = (a.r > b.r ? a.r - b.r : b.r - a.r) + (a.g > b.g ? a.g - b.g : b.g - a.g)
      + (a.b > b.b ? a.b - b.b : b.b - a.b);
    return d <= TH;
  endfunction

  int seen;
  always @(posedge clk) if (rst_n && out_valid) begin
    int i, x, y;
    logic el, eu;
    i = out_idx; x = i % W; y = i / W;
    el = (x > 0) && close(img[i], img[i-1]);
    eu = (y > 0) && close(img[i], img[i-W]);
    checks++;
    if (i != seen % (W*H) || w_left !== el || w_up !== eu) begin
      failures++;
      $display("FAIL idx %0d (exp %0d) wl %b/%b wu %b/%b", i, seen % (W*H), w_left, el, w_up, eu);
    end
    seen++;
  end

  initial begin
    seen = 0; in_valid = 0; in_sof = 0; in_rgb = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      for (int i = 0; i < W*H; i++) begin
        rgb_t base;
        base = ($urandom_range(0, 1)) ? '{8'd200, 8'd40, 8'd40} : '{8'd30, 8'd160, 8'd60};
        base.r = base.r + 8'($urandom_range(0, 30));
        img[i] = base;
      end
      for (int i = 0; i < W*H; i++) begin
        if ($urandom_range(0, 3) == 0) begin
          @(negedge clk); in_valid = 0; in_sof = 0;
        end
        @(negedge clk);
        in_valid = 1; in_sof = (i == 0); in_rgb = img[i];
      end
      @(negedge clk); in_valid = 0; in_sof = 0;
      @(negedge clk);
    end
    repeat (3) @(posedge clk);
    checks++;
    if (seen != 3 * W * H) begin failures++; $display("FAIL count %0d", seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
