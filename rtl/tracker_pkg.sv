// tracker_pkg: types and constants shared by the object-tracking pipeline.
//
// The image that the tracking core works on is 80x60 pixels (the prototype's
// target image size), 24-bit RGB. Pixels are numbered in raster order,
// idx = y*IMG_W + x, and a segment is named by a label that is a pixel index.
// Object features are gathered into an obj_feat_t record; the Manhattan
// distance used for matching is taken over normalised (0..255) copies of the
// eight features. The number of object slots (16), the colour threshold for
// connecting neighbour pixels and the matching threshold are this design's
// own choices.
package tracker_pkg;

  localparam int unsigned IMG_W    = 80;
  localparam int unsigned IMG_H    = 60;
  localparam int unsigned NPIX     = IMG_W * IMG_H;
  localparam int unsigned XW       = $clog2(IMG_W);       // 7
  localparam int unsigned YW       = $clog2(IMG_H);       // 6
  localparam int unsigned LW       = $clog2(NPIX);        // 13, label / pixel index width
  localparam int unsigned AW       = LW + 1;              // area width, up to NPIX
  localparam int unsigned MAX_OBJ  = 16;
  localparam int unsigned OW       = $clog2(MAX_OBJ);     // object slot index width
  localparam int unsigned TW       = 8;                   // track identifier width
  localparam int unsigned DW       = 11;                  // distance width, 8 features x 255

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  // Per-object feature record (raw units: pixels, 8-bit colour, pixel count).
  typedef struct packed {
    logic [LW-1:0] root;   // label of the segment (its first pixel in raster order)
    logic [XW-1:0] px;     // centroid x
    logic [YW-1:0] py;     // centroid y
    logic [XW:0]   w;      // bounding box width  (1..IMG_W)
    logic [YW:0]   h;      // bounding box height (1..IMG_H)
    rgb_t          col;    // mean colour
    logic [AW-1:0] area;   // pixel count
  } obj_feat_t;

  // Running sums for one segment while the image is read.
  typedef struct packed {
    logic [LW-1:0]    root;
    logic [LW+XW-1:0] sx;
    logic [LW+YW-1:0] sy;
    logic [XW-1:0]    xmin, xmax;
    logic [YW-1:0]    ymin, ymax;
    logic [LW+7:0]    sr, sg, sb;
    logic [AW-1:0]    area;
  } obj_acc_t;

  // Scale a value of range 0..range-1 to about 0..255: (v * K) >> 8 with
  // K = 255*256/range, so that features of different units weigh alike.
  function automatic logic [7:0] norm8(input logic [15:0] v, input int unsigned range);
    logic [31:0] k, p;
    k = (255 * 256) / range;
    p = (32'(v) * k) >> 8;
    return (p > 255) ? 8'd255 : p[7:0];
  endfunction

  function automatic logic [7:0] absdiff8(input logic [7:0] a, input logic [7:0] b);
    return (a > b) ? a - b : b - a;
  endfunction

  // Manhattan distance of two objects over the normalised features.
  function automatic logic [DW-1:0] feat_dist(input obj_feat_t a, input obj_feat_t b);
    logic [DW-1:0] d;
    d  = DW'(absdiff8(norm8(16'(a.px), IMG_W),     norm8(16'(b.px), IMG_W)));
    d += DW'(absdiff8(norm8(16'(a.py), IMG_H),     norm8(16'(b.py), IMG_H)));
    d += DW'(absdiff8(norm8(16'(a.w),  IMG_W + 1), norm8(16'(b.w),  IMG_W + 1)));
    d += DW'(absdiff8(norm8(16'(a.h),  IMG_H + 1), norm8(16'(b.h),  IMG_H + 1)));
    d += DW'(absdiff8(a.col.r, b.col.r));
    d += DW'(absdiff8(a.col.g, b.col.g));
    d += DW'(absdiff8(a.col.b, b.col.b));
    d += DW'(absdiff8(norm8(16'(a.area), NPIX + 1), norm8(16'(b.area), NPIX + 1)));
    return d;
  endfunction

endpackage
