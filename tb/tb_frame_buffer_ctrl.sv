// tb_frame_buffer_ctrl: runs a writer that finishes frames at random times
// and a reader that claims frames at random times, tracks by itself which
// bank holds which frame, and checks that the reader always gets the newest
// complete frame, that the writer never writes the reader's bank, and that
// replaced frames are counted as dropped.
module tb_frame_buffer_ctrl;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wr_frame_done, rd_start, frame_avail;
  logic [1:0] wr_bank, rd_bank;
  logic [15:0] dropped_frames;

  frame_buffer_ctrl dut (.*);

  int bank_frame [3];
  int wr_frame = 0, newest = -1, exp_drop = 0, taken = -1, reads = 0;
  bit newest_taken = 1;

  initial begin
    wr_frame_done = 0; rd_start = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      checks++;
      if (wr_bank == rd_bank || wr_bank > 2 || rd_bank > 2) begin failures++; $display("FAIL banks"); end
      wr_frame_done = ($urandom_range(0, 9) == 0);
      rd_start      = frame_avail && ($urandom_range(0, 14) == 0);
      if (rd_start) begin taken = newest; newest_taken = 1; reads++; end
      @(posedge clk); #1;
      if (wr_frame_done) begin
        bank_frame[wr_bank_q] = wr_frame;
      end
      if (rd_start) begin
        checks++;
        if (bank_frame[rd_bank] != taken) begin
          failures++; $display("FAIL reader got frame %0d exp %0d", bank_frame[rd_bank], taken);
        end
      end
      if (wr_frame_done) begin
        if (!newest_taken && !rd_start) exp_drop++;
        newest = wr_frame; newest_taken = 0; wr_frame++;
      end
      wr_frame_done = 0; rd_start = 0;
      checks++;
      if (dropped_frames != 16'(exp_drop)) begin failures++; $display("FAIL drop %0d exp %0d", dropped_frames, exp_drop); end
    end
    checks++;
    if (reads < 20 || exp_drop < 5) begin failures++; $display("FAIL too few events"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bank being written during the cycle that ends a frame
  logic [1:0] wr_bank_q;
  always @(negedge clk) wr_bank_q = wr_bank;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
