// tb_image_restore: writes random 5x3 results with some target pixels,
// plays them out at FACTOR 4 and checks every display pixel (repeated colour,
// blue for target pixels), the frame markers and the pixel count. Frame 0 is
// shown on an idle block; frame 1 is written and shown while frame 0 is still
// playing (it must wait, then play whole and untorn); frame 2 is written
// while frame 1 plays and shown after it.
module tb_image_restore;
  import tracker_pkg::*;
  localparam int unsigned W = 5, H = 3, F = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_target, show, busy, out_valid, out_sof, out_eof;
  logic [LW-1:0] in_idx;
  rgb_t in_rgb, out_rgb;

  image_restore #(.W(W), .H(H), .FACTOR(F)) dut (.*);

  localparam int unsigned NF = 3;
  rgb_t img [NF][W*H];
  bit   tg [NF][W*H];
  int   n, first_cyc, last_cyc, cyc, blue_seen;

  always @(posedge clk) begin
    cyc++;
    if (rst_n && out_valid) begin
      int x, y, i, f;
      rgb_t e;
      x = n % (W*F); y = (n / (W*F)) % (H*F);
      i = (y / F) * W + x / F;
      f = n / (W*H*F*F);
      if (f >= int'(NF)) f = NF - 1;
      e = tg[f][i] ? '{8'd0, 8'd0, 8'd255} : img[f][i];
      if (tg[f][i]) blue_seen++;
      checks++;
      if (out_rgb != e || out_sof != (n % (W*H*F*F) == 0) || out_eof != (n % (W*H*F*F) == W*H*F*F-1)) begin
        failures++; $display("FAIL display pixel %0d (%0d,%0d)", n, x, y);
      end
      if (n == 0) first_cyc = cyc;
      last_cyc = cyc;
      n++;
    end
  end

  initial begin
    n = 0; cyc = 0; blue_seen = 0;
    in_valid = 0; in_target = 0; in_idx = '0; in_rgb = '0; show = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < int'(NF); r++) begin
      for (int i = 0; i < W*H; i++) begin
        img[r][i] = '{8'($urandom), 8'($urandom), 8'($urandom)};
        tg[r][i] = ($urandom_range(0, 3) == 0);
        @(negedge clk);
        in_valid = 1; in_idx = LW'(i); in_rgb = img[r][i]; in_target = tg[r][i];
      end
      @(negedge clk); in_valid = 0; show = 1;
      @(negedge clk); show = 0;
      if (r == 0) begin
        // frame 0 starts at once; frame 1 follows while it still plays
        while (!busy) @(negedge clk);
        checks++;
        if (n > W*H*F*F / 2) begin failures++; $display("FAIL frame 0 too far on: %0d", n); end
      end else if (r == 1) begin
        // wait until frame 1 has taken over the display
        checks++;
        if (!busy) begin failures++; $display("FAIL busy low during frame 0"); end
        while (n < W*H*F*F + 1) @(negedge clk);
      end else begin
        while (n < int'(NF) * W*H*F*F) @(negedge clk);
        repeat (8) @(negedge clk);
      end
    end
    checks++;
    if (n != NF * W*H*F*F) begin failures++; $display("FAIL %0d display pixels", n); end
    checks++;
    if (blue_seen == 0) begin failures++; $display("FAIL no target pixel shown"); end
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
