// feature_extract: gathers, for every segment of the image, the sums from
// which its position, size, colour and area follow.
//
// The image is read in raster order, one pixel per cycle (in_valid, with the
// pixel's position, raster index, segment label and colour); clear, one cycle
// before the first pixel, empties the object table. A segment's label is the
// raster index of its first pixel, so the pixel whose label equals its own
// index opens a new object slot (while fewer than MAX_OBJ are open) and all
// later pixels of that segment find their slot through a label-to-slot table
// that every pixel writes at its own index. Each slot sums x, y, R, G, B and
// the pixel count, and keeps the bounding box. Segments found after the
// table is full are not tracked and are counted in overflow.
// The table is read through rd_slot/rd_acc (combinational); n_obj says how
// many slots hold objects.
// Which features are extracted (position, size, colour, area) follows the
// document; the slot table, its size and the overflow rule are this design's.
module feature_extract
  import tracker_pkg::*;
#(
  parameter int unsigned N_OBJ = MAX_OBJ
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       in_valid,
  input  logic [XW-1:0]              in_x,
  input  logic [YW-1:0]              in_y,
  input  logic [LW-1:0]              in_idx,
  input  logic [LW-1:0]              in_label,
  input  rgb_t                       in_rgb,
  output logic [$clog2(N_OBJ+1)-1:0] n_obj,
  output logic [15:0]                overflow,
  input  logic [$clog2(N_OBJ)-1:0]   rd_slot,
  output obj_acc_t                   rd_acc
);
  localparam int unsigned SW = $clog2(N_OBJ);

  typedef struct packed {
    logic          valid;
    logic [SW-1:0] slot;
  } map_t;

  obj_acc_t acc [N_OBJ];
  map_t     map [NPIX];

  map_t hit;
  always_comb hit = map[in_label];

  always_comb rd_acc = acc[rd_slot];

  always_ff @(posedge clk) begin
    if (in_valid) begin
      if (in_label == in_idx)
        map[in_idx] <= '{valid: (32'(n_obj) < N_OBJ), slot: SW'(n_obj)};
      else
        map[in_idx] <= '{valid: 1'b0, slot: '0};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_obj    <= '0;
      overflow <= '0;
      for (int i = 0; i < N_OBJ; i++) acc[i] <= '0;
    end else if (clear) begin
      n_obj    <= '0;
      overflow <= '0;
      for (int i = 0; i < N_OBJ; i++) acc[i] <= '0;
    end else if (in_valid) begin
      if (in_label == in_idx) begin
        if (32'(n_obj) < N_OBJ) begin
          acc[SW'(n_obj)] <= '{root: in_idx,
                               sx: (LW+XW)'(in_x), sy: (LW+YW)'(in_y),
                               xmin: in_x, xmax: in_x, ymin: in_y, ymax: in_y,
                               sr: (LW+8)'(in_rgb.r), sg: (LW+8)'(in_rgb.g), sb: (LW+8)'(in_rgb.b),
                               area: AW'(1)};
          n_obj <= n_obj + 1'b1;
        end else begin
          overflow <= overflow + 1'b1;
        end
      end else if (hit.valid) begin
        obj_acc_t a;
        a      = acc[hit.slot];
        a.sx   = a.sx + (LW+XW)'(in_x);
        a.sy   = a.sy + (LW+YW)'(in_y);
        a.sr   = a.sr + (LW+8)'(in_rgb.r);
        a.sg   = a.sg + (LW+8)'(in_rgb.g);
        a.sb   = a.sb + (LW+8)'(in_rgb.b);
        a.area = a.area + 1'b1;
        if (in_x < a.xmin) a.xmin = in_x;
        if (in_x > a.xmax) a.xmax = in_x;
        if (in_y < a.ymin) a.ymin = in_y;
        if (in_y > a.ymax) a.ymax = in_y;
        acc[hit.slot] <= a;
      end
    end
  end
endmodule
