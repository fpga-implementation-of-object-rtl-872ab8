// post_process: marks the pixels that belong to the tracking target.
//
// The image is read once more in raster order (in_valid with the pixel's
// raster index, segment label and colour). A pixel is a target pixel when
// its label equals the label of an object that carries the target track
// (tgt_hit / tgt_root from matched_obj_mem). Colour, label and the target
// flag leave one cycle later on out_*, and tgt_pixels counts the target
// pixels since the last clear.
// Combining pixel data, segment labels and the tracking result for the
// display stage follows the document; the label comparison is this design's.
module post_process
  import tracker_pkg::*;
#(
  parameter int unsigned N_OBJ = MAX_OBJ
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     in_valid,
  input  logic [LW-1:0]            in_idx,
  input  logic [LW-1:0]            in_label,
  input  rgb_t                     in_rgb,
  input  logic [N_OBJ-1:0]         tgt_hit,
  input  logic [N_OBJ-1:0][LW-1:0] tgt_root,
  output logic                     out_valid,
  output logic [LW-1:0]            out_idx,
  output logic [LW-1:0]            out_label,
  output rgb_t                     out_rgb,
  output logic                     out_target,
  output logic [AW-1:0]            tgt_pixels
);
  logic is_tgt;
  always_comb begin
    is_tgt = 1'b0;
    for (int k = 0; k < N_OBJ; k++)
      if (tgt_hit[k] && tgt_root[k] == in_label) is_tgt = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      out_idx    <= '0;
      out_label  <= '0;
      out_rgb    <= '0;
      out_target <= 1'b0;
      tgt_pixels <= '0;
    end else begin
      out_valid <= in_valid;
      if (clear) tgt_pixels <= '0;
      if (in_valid) begin
        out_idx    <= in_idx;
        out_label  <= in_label;
        out_rgb    <= in_rgb;
        out_target <= is_tgt;
        if (is_tgt && !clear) tgt_pixels <= tgt_pixels + 1'b1;
      end
    end
  end
endmodule
