// est_position: estimated position of an object in the next frame.
//
// For an object matched to a reference object the motion vector is the
// step from the reference object's measured position to the current one,
// and the estimate is the current position plus that vector, held inside
// the image. An object without a match is assumed to stand still.
// Combinational.
// Using a motion vector to estimate the next position follows the document;
// the constant-velocity rule and the clamping are this design's choices.
module est_position
  import tracker_pkg::*;
#(
  parameter int unsigned W = IMG_W,
  parameter int unsigned H = IMG_H
) (
  input  logic                 matched,
  input  logic [XW-1:0]        cur_x,
  input  logic [YW-1:0]        cur_y,
  input  logic [XW-1:0]        ref_x,
  input  logic [YW-1:0]        ref_y,
  output logic signed [XW:0]   mv_x,
  output logic signed [YW:0]   mv_y,
  output logic [XW-1:0]        est_x,
  output logic [YW-1:0]        est_y
);
  logic signed [XW+1:0] ex;
  logic signed [YW+1:0] ey;

  always_comb begin
    mv_x = matched ? (XW+1)'(signed'({1'b0, cur_x}) - signed'({1'b0, ref_x})) : '0;
    mv_y = matched ? (YW+1)'(signed'({1'b0, cur_y}) - signed'({1'b0, ref_y})) : '0;
    ex   = signed'({2'b00, cur_x}) + (XW+2)'(mv_x);
    ey   = signed'({2'b00, cur_y}) + (YW+2)'(mv_y);
    if (ex < 0)                est_x = '0;
    else if (ex > (XW+2)'(W - 1)) est_x = XW'(W - 1);
    else                       est_x = XW'(ex);
    if (ey < 0)                est_y = '0;
    else if (ey > (YW+2)'(H - 1)) est_y = YW'(H - 1);
    else                       est_y = YW'(ey);
  end
endmodule
