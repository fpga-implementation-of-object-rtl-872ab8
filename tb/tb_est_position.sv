// tb_est_position: random current and reference positions; checks motion
// vector and clamped estimate against arithmetic done here, and that an
// unmatched object keeps its position.
module tb_est_position;
  import tracker_pkg::*;
  int checks = 0, failures = 0;
  logic matched;
  logic [XW-1:0] cur_x, ref_x, est_x;
  logic [YW-1:0] cur_y, ref_y, est_y;
  logic signed [XW:0] mv_x;
  logic signed [YW:0] mv_y;
  int clamped = 0;

  est_position dut (.*);

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int mx, my, ex, ey;
      matched = $urandom_range(0, 3) != 0;
      cur_x = XW'($urandom_range(0, 79)); ref_x = XW'($urandom_range(0, 79));
      cur_y = YW'($urandom_range(0, 59)); ref_y = YW'($urandom_range(0, 59));
      #1;
      mx = matched ? int'(cur_x) - int'(ref_x) : 0;
      my = matched ? int'(cur_y) - int'(ref_y) : 0;
      ex = int'(cur_x) + mx; ey = int'(cur_y) + my;
      if (ex < 0 || ex > 79 || ey < 0 || ey > 59) clamped++;
      ex = ex < 0 ? 0 : (ex > 79 ? 79 : ex);
      ey = ey < 0 ? 0 : (ey > 59 ? 59 : ey);
      checks++;
      if (int'(mv_x) != mx || int'(mv_y) != my || int'(est_x) != ex || int'(est_y) != ey) begin
        failures++; $display("FAIL cur %0d,%0d ref %0d,%0d m%0d -> %0d,%0d", cur_x, cur_y, ref_x, ref_y, matched, est_x, est_y);
      end
    end
    checks++;
    if (clamped == 0) begin failures++; $display("FAIL clamping never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
