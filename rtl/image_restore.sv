// image_restore: builds the display image: the 80x60 result is scaled back
// to 640x480 and the pixels of the tracking target are painted blue.
//
// The result stream (in_valid, raster index, colour, target flag) is written
// into one of two result buffers. A pulse on show marks that buffer complete:
// the writer moves to the other buffer and the display frame is played out
// from the complete one in raster order, one pixel per cycle, each small
// pixel repeated over a FACTOR x FACTOR square: out_valid, out_rgb, out_sof
// on the first and out_eof on the last pixel. A show that arrives during a
// playout is remembered and served when the playout ends, so a result that
// comes early is neither lost nor torn by the next one. The buffer read and
// the colour choice are registered: the output trails the raster counters
// by two cycles. busy is high while playing.
// Scaling back and showing the target as a blue region follow the document;
// pixel repetition and the two result buffers are this design's choices.
module image_restore
  import tracker_pkg::*;
#(
  parameter int unsigned W      = IMG_W,
  parameter int unsigned H      = IMG_H,
  parameter int unsigned FACTOR = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [LW-1:0] in_idx,
  input  rgb_t          in_rgb,
  input  logic          in_target,
  input  logic          show,
  output logic          busy,
  output logic          out_valid,
  output logic          out_sof,
  output logic          out_eof,
  output rgb_t          out_rgb
);
  localparam int unsigned FB = $clog2(FACTOR);
  localparam rgb_t BLUE = '{r: 8'd0, g: 8'd0, b: 8'd255};

  typedef struct packed {
    logic tgt;
    rgb_t rgb;
  } cell_t;

  cell_t mem [2][W * H];
  logic  wbuf, pbuf, pending;

  logic [XW+FB-1:0] dx;
  logic [YW+FB-1:0] dy;
  logic [LW-1:0]    ridx;
  logic             rd, rd_first, rd_last;
  cell_t            rcell;

  always_comb ridx = LW'(32'(dy >> FB) * W + 32'(dx >> FB));

  always_ff @(posedge clk) begin
    if (in_valid) mem[wbuf][in_idx] <= '{tgt: in_target, rgb: in_rgb};
    if (busy) rcell <= mem[pbuf][ridx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dx        <= '0;
      dy        <= '0;
      busy      <= 1'b0;
      rd        <= 1'b0;
      rd_first  <= 1'b0;
      rd_last   <= 1'b0;
      out_valid <= 1'b0;
      out_sof   <= 1'b0;
      out_eof   <= 1'b0;
      out_rgb   <= '0;
      wbuf      <= 1'b0;
      pbuf      <= 1'b0;
      pending   <= 1'b0;
    end else begin
      rd       <= busy;
      rd_first <= busy && dx == '0 && dy == '0;
      rd_last  <= busy && 32'(dx) == W * FACTOR - 1 && 32'(dy) == H * FACTOR - 1;
      if (show) begin
        wbuf    <= !wbuf;
        pending <= 1'b1;
      end
      if (!busy) begin
        if (pending) begin
          busy    <= 1'b1;
          pbuf    <= !wbuf;
          pending <= show;
          dx      <= '0;
          dy      <= '0;
        end
      end else if (32'(dx) == W * FACTOR - 1) begin
        dx <= '0;
        if (32'(dy) == H * FACTOR - 1) begin
          dy   <= '0;
          busy <= 1'b0;
        end else begin
          dy <= dy + 1'b1;
        end
      end else begin
        dx <= dx + 1'b1;
      end
      out_valid <= rd;
      out_sof   <= rd_first;
      out_eof   <= rd_last;
      out_rgb   <= rcell.tgt ? BLUE : rcell.rgb;
    end
  end
endmodule
