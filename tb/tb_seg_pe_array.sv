// tb_seg_pe_array: checks one region-growing step of the processing array
// against a cell-by-cell model, on random labels and weights, and checks that
// repeating the step floods a fully connected block with its smallest label.
module tb_seg_pe_array;
  import tracker_pkg::*;
  localparam int unsigned W = 8, ROWS = 2;
  int checks = 0, failures = 0;

  logic [ROWS-1:0][W-1:0][LW-1:0] cur, nxt;
  logic [ROWS-1:0][W-1:0]         wl, wu;
  logic [W-1:0][LW-1:0]           above, below;
  logic [W-1:0]                   wub;
  logic                           changed;

  seg_pe_array #(.W(W), .ROWS(ROWS)) dut (
    .cur(cur), .w_left(wl), .w_up(wu), .above(above), .below(below),
    .wu_below(wub), .nxt(nxt), .changed(changed));

  // neighbour label as seen by cell (r,c) in direction d, or the cell's own
  function automatic logic [LW-1:0] nb(int r, int c, int d);
    case (d)
      0: return (c > 0 && wl[r][c]) ? cur[r][c-1] : cur[r][c];
      1: return (c < W-1 && wl[r][c+1]) ? cur[r][c+1] : cur[r][c];
      2: return !wu[r][c] ? cur[r][c] : (r == 0 ? above[c] : cur[r-1][c]);
      default: begin
        if (r == ROWS-1) return wub[c] ? below[c] : cur[r][c];
        return wu[r+1][c] ? cur[r+1][c] : cur[r][c];
      end
    endcase
  endfunction

  initial begin
    for (int t = 0; t < 300; t++) begin
      logic exp_ch;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < W; c++) begin
          cur[r][c] = LW'($urandom_range(0, 200));
          wl[r][c]  = $urandom_range(0, 1);
          wu[r][c]  = $urandom_range(0, 1);
        end
      for (int c = 0; c < W; c++) begin
        above[c] = LW'($urandom_range(0, 200));
        below[c] = LW'($urandom_range(0, 200));
        wub[c]   = $urandom_range(0, 1);
      end
      #1;
      exp_ch = 0;
      for (int r = 0; r < ROWS; r++)
        for (int c = 0; c < W; c++) begin
          logic [LW-1:0] e;
          e = cur[r][c];
          for (int d = 0; d < 4; d++) if (nb(r, c, d) < e) e = nb(r, c, d);
          if (e != cur[r][c]) exp_ch = 1;
          checks++;
          if (nxt[r][c] !== e) begin
            failures++;
            $display("FAIL t=%0d cell %0d,%0d got %0d exp %0d", t, r, c, nxt[r][c], e);
          end
        end
      checks++;
      if (changed !== exp_ch) begin failures++; $display("FAIL changed t=%0d", t); end
    end
    // flood: all weights set, no outside links -> everything becomes the minimum
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < W; c++) begin
        cur[r][c] = LW'(100 + r * W + c);
        wl[r][c]  = (c != 0);
        wu[r][c]  = (r != 0);
      end
    cur[1][7] = 5;
    wub = '0;
    for (int it = 0; it < 2 * W * ROWS; it++) begin
      #1;
      if (!changed) break;
      cur = nxt;
    end
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < W; c++) begin
        checks++;
        if (cur[r][c] != 5) begin failures++; $display("FAIL flood %0d,%0d = %0d", r, c, cur[r][c]); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
