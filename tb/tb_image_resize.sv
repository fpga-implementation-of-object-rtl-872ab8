// tb_image_resize: streams random 32x16 frames (with gaps in the valid
// signal) into the resize stage with FACTOR 8 and compares each output pixel
// with the mean of its 8x8 source block, its index and the end-of-frame flag.
module tb_image_resize;
  import tracker_pkg::*;
  localparam int unsigned SW = 32, SH = 16, F = 8, DW_ = SW / F, DH = SH / F;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_sof, out_valid, out_eof;
  rgb_t in_rgb, out_rgb;
  logic [LW-1:0] out_idx;
  rgb_t src [SW*SH];
  int nout;

  image_resize #(.SRC_W(SW), .SRC_H(SH), .FACTOR(F)) dut (.*);

  always @(posedge clk) if (rst_n && out_valid) begin
    int i, bx, by, sr, sg, sb;
    i = nout % (DW_*DH); bx = i % DW_; by = i / DW_;
    sr = 0; sg = 0; sb = 0;
    for (int y = 0; y < F; y++)
      for (int x = 0; x < F; x++) begin
        sr += src[(by*F+y)*SW + bx*F+x].r;
        sg += src[(by*F+y)*SW + bx*F+x].g;
        sb += src[(by*F+y)*SW + bx*F+x].b;
      end
    checks++;
    if (int'(out_idx) != i || out_rgb.r != 8'(sr/64) || out_rgb.g != 8'(sg/64) ||
        out_rgb.b != 8'(sb/64) || out_eof != (i == DW_*DH-1)) begin
      failures++;
      $display("FAIL out %0d idx %0d rgb %0d %0d %0d exp %0d %0d %0d", i, out_idx,
               out_rgb.r, out_rgb.g, out_rgb.b, sr/64, sg/64, sb/64);
    end
    nout++;
  end

  initial begin
    nout = 0; in_valid = 0; in_sof = 0; in_rgb = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++) begin
      for (int i = 0; i < SW*SH; i++) src[i] = '{8'($urandom), 8'($urandom), 8'($urandom)};
      for (int i = 0; i < SW*SH; i++) begin
        if ($urandom_range(0, 4) == 0) begin @(negedge clk); in_valid = 0; in_sof = 0; end
        @(negedge clk);
        in_valid = 1; in_sof = (i == 0); in_rgb = src[i];
      end
      @(negedge clk); in_valid = 0; in_sof = 0;
      @(negedge clk);
    end
    repeat (3) @(posedge clk);
    checks++;
    if (nout != 3 * DW_ * DH) begin failures++; $display("FAIL count %0d", nout); end
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
