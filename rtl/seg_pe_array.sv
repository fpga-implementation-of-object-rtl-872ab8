// seg_pe_array: the processing-element layer of the image-scan segmentation,
// an array of W x ROWS cells (80 x 2 in the prototype) that performs one
// region-growing step on the pixel block it holds.
//
// Every cell holds a label. In one step each cell takes the smallest label
// among itself and those 4-neighbours it is connected to by a weight of 1.
// Neighbours inside the block come from the array itself; the row above the
// block and the row below it come from the storage layer (above, below) and
// stay fixed during the block's processing. Weights are given per cell as
// w_left (to the left cell) and w_up (to the cell above); the link from the
// last row down to the storage row below is wu_below. Repeating the step
// until nothing changes floods each region with its smallest label.
// Purely combinational: nxt and changed settle within the cycle.
// The array shape follows the document; the min-label flooding rule is this
// design's version of the region-growing step, which the document does not
// spell out.
module seg_pe_array
  import tracker_pkg::*;
#(
  parameter int unsigned W    = IMG_W,
  parameter int unsigned ROWS = 2
) (
  input  logic [ROWS-1:0][W-1:0][LW-1:0] cur,
  input  logic [ROWS-1:0][W-1:0]         w_left,
  input  logic [ROWS-1:0][W-1:0]         w_up,
  input  logic [W-1:0][LW-1:0]           above,
  input  logic [W-1:0][LW-1:0]           below,
  input  logic [W-1:0]                   wu_below,
  output logic [ROWS-1:0][W-1:0][LW-1:0] nxt,
  output logic                           changed
);
  function automatic logic [LW-1:0] lmin(input logic [LW-1:0] a, input logic [LW-1:0] b,
                                         input logic en);
    return (en && b < a) ? b : a;
  endfunction

  always_comb begin
    changed = 1'b0;
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < W; c++) begin
        logic [LW-1:0] m;
        m = cur[r][c];
        if (c > 0)     m = lmin(m, cur[r][c-1], w_left[r][c]);
        if (c < W - 1) m = lmin(m, cur[r][c+1], w_left[r][c+1]);
        if (r > 0)     m = lmin(m, cur[r-1][c], w_up[r][c]);
        else           m = lmin(m, above[c],    w_up[r][c]);
        if (r < ROWS - 1) m = lmin(m, cur[r+1][c], w_up[r+1][c]);
        else              m = lmin(m, below[c],    wu_below[c]);
        nxt[r][c] = m;
        if (m != cur[r][c]) changed = 1'b1;
      end
    end
  end
endmodule
