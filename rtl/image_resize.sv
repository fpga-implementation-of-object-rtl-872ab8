// image_resize: reduces the camera image (640x480) to the tracking image
// (80x60) by averaging each FACTOR x FACTOR block of source pixels.
//
// The source arrives as a raster-order pixel stream, one pixel per cycle
// when in_valid is high; in_sof marks the first pixel of a frame. A row of
// FACTOR pixels is summed in one register, and each finished row sum is added
// to one of DST_W column accumulators. On the last pixel of a block the
// output pixel is the block sum divided by FACTOR*FACTOR (a shift, FACTOR is a
// power of two). The output is registered: out_valid follows the last source
// pixel of the block by one cycle, with its raster index in the small image
// and out_eof on the frame's last pixel.
// That the 80x60 image is made from the VGA image follows the prototype's
// description; averaging (rather than, say, dropping pixels) is this design's
// choice.
module image_resize
  import tracker_pkg::*;
#(
  parameter int unsigned SRC_W  = 640,
  parameter int unsigned SRC_H  = 480,
  parameter int unsigned FACTOR = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_sof,
  input  rgb_t          in_rgb,
  output logic          out_valid,
  output logic [LW-1:0] out_idx,
  output rgb_t          out_rgb,
  output logic          out_eof
);
  localparam int unsigned DST_W = SRC_W / FACTOR;
  localparam int unsigned DST_H = SRC_H / FACTOR;
  localparam int unsigned FB    = $clog2(FACTOR);
  localparam int unsigned SW    = 8 + 2 * FB;           // block sum width
  localparam int unsigned SXW   = $clog2(SRC_W);
  localparam int unsigned SYW   = $clog2(SRC_H);

  typedef struct packed {
    logic [SW-1:0] r, g, b;
  } sum_t;

  logic [SXW-1:0] sx;
  logic [SYW-1:0] sy;
  sum_t           hsum;
  sum_t           colacc [DST_W];

  // Position of the incoming pixel: in_sof restarts the frame at (0,0).
  logic [SXW-1:0] cx;
  logic [SYW-1:0] cy;
  always_comb begin
    cx = in_sof ? '0 : sx;
    cy = in_sof ? '0 : sy;
  end

  logic last_col, last_row;
  logic [$clog2(DST_W)-1:0] dcol;
  sum_t hnext, blk;
  always_comb begin
    last_col = (cx[FB-1:0] == FB'(FACTOR - 1));
    last_row = (cy[FB-1:0] == FB'(FACTOR - 1));
    dcol     = $bits(dcol)'(cx >> FB);
    hnext.r  = ((cx[FB-1:0] == '0) ? '0 : hsum.r) + SW'(in_rgb.r);
    hnext.g  = ((cx[FB-1:0] == '0) ? '0 : hsum.g) + SW'(in_rgb.g);
    hnext.b  = ((cx[FB-1:0] == '0) ? '0 : hsum.b) + SW'(in_rgb.b);
    blk.r    = ((cy[FB-1:0] == '0) ? '0 : colacc[dcol].r) + hnext.r;
    blk.g    = ((cy[FB-1:0] == '0) ? '0 : colacc[dcol].g) + hnext.g;
    blk.b    = ((cy[FB-1:0] == '0) ? '0 : colacc[dcol].b) + hnext.b;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sx        <= '0;
      sy        <= '0;
      hsum      <= '0;
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_rgb   <= '0;
      out_eof   <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_eof   <= 1'b0;
      if (in_valid) begin
        hsum <= hnext;
        if (last_col) colacc[dcol] <= blk;
        if (last_col && last_row) begin
          out_valid <= 1'b1;
          out_idx   <= LW'((32'(cy) >> FB) * DST_W + 32'(dcol));
          out_rgb   <= '{r: 8'(blk.r >> (2 * FB)), g: 8'(blk.g >> (2 * FB)), b: 8'(blk.b >> (2 * FB))};
          out_eof   <= (32'(cy) == SRC_H - 1) && (32'(cx) == SRC_W - 1);
        end
        if (32'(cx) == SRC_W - 1) begin
          sx <= '0;
          sy <= (32'(cy) == SRC_H - 1) ? '0 : cy + 1'b1;
        end else begin
          sx <= cx + 1'b1;
          sy <= cy;
        end
      end
    end
  end

  initial begin
    assert (FACTOR == (1 << FB)) else $error("FACTOR must be a power of two");
    assert (DST_W * DST_H <= NPIX) else $error("resized image larger than the tracking image");
  end
endmodule
