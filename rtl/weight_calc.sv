// weight_calc: connection weights between neighbouring pixels, the input of
// the region-growing segmentation.
//
// Pixels arrive in raster order, one per cycle when in_valid is high, in_sof
// on the first pixel of the image. For each pixel the circuit compares its
// colour with the left neighbour (kept in a register) and with the pixel
// above (kept in a one-row line buffer). A weight is 1 when the sum of the
// absolute R, G and B differences is at most TH, so the two pixels may belong
// to one region, and 0 otherwise; weights to pixels outside the image are 0.
// The result for a pixel leaves one cycle later as {w_up, w_left} with
// out_valid and its raster index.
// The document names a weight calculation circuit in front of the
// segmentation array; binary weights from a colour-difference threshold are
// this design's reading of it.
module weight_calc
  import tracker_pkg::*;
#(
  parameter int unsigned W  = IMG_W,
  parameter int unsigned H  = IMG_H,
  parameter int unsigned TH = 40
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_sof,
  input  rgb_t          in_rgb,
  output logic          out_valid,
  output logic [LW-1:0] out_idx,
  output logic          w_left,
  output logic          w_up
);
  logic [XW-1:0] x;
  logic [YW-1:0] y;
  logic [LW-1:0] idx;
  rgb_t          left_px;
  rgb_t          line_buf [W];

  logic [XW-1:0] cx;
  logic [YW-1:0] cy;
  logic [LW-1:0] cidx;
  always_comb begin
    cx   = in_sof ? '0 : x;
    cy   = in_sof ? '0 : y;
    cidx = in_sof ? '0 : idx;
  end

  function automatic logic close(input rgb_t a, input rgb_t b);
    logic [9:0] d;
    d = 10'(absdiff8(a.r, b.r)) + 10'(absdiff8(a.g, b.g)) + 10'(absdiff8(a.b, b.b));
    return d <= 10'(TH);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x         <= '0;
      y         <= '0;
      idx       <= '0;
      left_px   <= '0;
      out_valid <= 1'b0;
      out_idx   <= '0;
      w_left    <= 1'b0;
      w_up      <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_idx        <= cidx;
        w_left         <= (cx != '0) && close(in_rgb, left_px);
        w_up           <= (cy != '0) && close(in_rgb, line_buf[cx]);
        left_px        <= in_rgb;
        line_buf[cx]   <= in_rgb;
        idx            <= (32'(cidx) == W * H - 1) ? '0 : cidx + 1'b1;
        if (32'(cx) == W - 1) begin
          x <= '0;
          y <= (32'(cy) == H - 1) ? '0 : cy + 1'b1;
        end else begin
          x <= cx + 1'b1;
          y <= cy;
        end
      end
    end
  end
endmodule
