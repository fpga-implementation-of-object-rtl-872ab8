// frame_buffer_ctrl: hands three frame memories round between the image
// writer (the resize stage) and the tracking core, so that the writer never
// overwrites the frame the core is reading and the core always starts on the
// newest complete frame.
//
// At any time one bank is being written (wr_bank), one is held by the core
// (rd_bank) and the third holds the newest complete frame, valid when
// frame_avail is high. wr_frame_done (one cycle, at the end of a written
// frame) turns the written bank into the newest frame and moves the writer to
// the bank that is neither the newest nor the core's. rd_start (one cycle)
// gives the newest frame to the core; it may come only while frame_avail is
// high. A complete frame that is replaced before the core took it is counted
// in dropped_frames. All outputs are registered; after reset the writer owns
// bank 0 and the core bank 2.
// Three external frame memories are the prototype's; this rotation is this
// design's own choice of how to use them.
module frame_buffer_ctrl (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_frame_done,
  input  logic        rd_start,
  output logic [1:0]  wr_bank,
  output logic [1:0]  rd_bank,
  output logic        frame_avail,
  output logic [15:0] dropped_frames
);
  logic [1:0] ready_bank;
  logic [1:0] rd_next;

  always_comb rd_next = (rd_start && frame_avail) ? ready_bank : rd_bank;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_bank        <= 2'd0;
      rd_bank        <= 2'd2;
      ready_bank     <= 2'd1;
      frame_avail    <= 1'b0;
      dropped_frames <= '0;
    end else begin
      rd_bank <= rd_next;
      if (wr_frame_done) begin
        ready_bank  <= wr_bank;
        wr_bank     <= 2'd3 - wr_bank - rd_next;
        frame_avail <= 1'b1;
        if (frame_avail && !rd_start) dropped_frames <= dropped_frames + 1'b1;
      end else if (rd_start) begin
        frame_avail <= 1'b0;
      end
    end
  end

  // The three roles always sit in three different banks.
  a_distinct: assert property (@(posedge clk) disable iff (!rst_n)
    wr_bank != rd_bank && wr_bank != 2'd3 && rd_bank != 2'd3);
  a_start_avail: assert property (@(posedge clk) disable iff (!rst_n)
    rd_start |-> frame_avail);
endmodule
