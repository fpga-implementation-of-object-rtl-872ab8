// matched_obj_mem: keeps the matching result of the current frame (for each
// object: its segment label and its track number) and the track chosen as
// the tracking target.
//
// clear (one cycle, before matching starts) empties the table; each res_valid
// writes one entry. A pulse on select moves the target to the track of the
// next object in the table (wrapping), so repeated presses step through the
// objects on screen. The target track is kept from frame to frame. The table
// is read combinationally: tgt_hit[k] is high when entry k belongs to the
// target track, and tgt_root[k] is that entry's label, so the output stage
// can test any pixel's label against all entries at once. tgt_valid says a
// target has been chosen, tgt_found that it is visible in this frame.
// A memory of matched objects between matching and post-processing is shown
// in the document's block diagram; its contents and the stepping selection
// are this design's choices.
module matched_obj_mem
  import tracker_pkg::*;
#(
  parameter int unsigned N_OBJ = MAX_OBJ
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           clear,
  input  logic                           res_valid,
  input  logic [$clog2(N_OBJ)-1:0]       res_slot,
  input  logic [LW-1:0]                  res_root,
  input  logic [TW-1:0]                  res_track,
  input  logic                           select,
  output logic                           tgt_valid,
  output logic [TW-1:0]                  tgt_track,
  output logic                           tgt_found,
  output logic [N_OBJ-1:0]               tgt_hit,
  output logic [N_OBJ-1:0][LW-1:0]       tgt_root
);
  localparam int unsigned SW = $clog2(N_OBJ);

  logic [N_OBJ-1:0]          ent_valid;
  logic [N_OBJ-1:0][LW-1:0]  ent_root;
  logic [N_OBJ-1:0][TW-1:0]  ent_track;
  logic [SW-1:0]             sel_idx;

  always_comb begin
    tgt_root = ent_root;
    for (int k = 0; k < N_OBJ; k++)
      tgt_hit[k] = tgt_valid && ent_valid[k] && (ent_track[k] == tgt_track);
    tgt_found = |tgt_hit;
  end

  // Next filled entry after sel_idx, wrapping; sel_idx itself if it is the only one.
  logic [SW-1:0] nxt_idx;
  logic          nxt_ok;
  always_comb begin
    nxt_idx = sel_idx;
    nxt_ok  = 1'b0;
    for (int s = N_OBJ; s >= 1; s--) begin
      logic [SW-1:0] k;
      k = SW'((32'(sel_idx) + s) % N_OBJ);
      if (ent_valid[k]) begin
        nxt_idx = k;
        nxt_ok  = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ent_valid <= '0;
      ent_root  <= '0;
      ent_track <= '0;
      sel_idx   <= SW'(N_OBJ - 1);
      tgt_valid <= 1'b0;
      tgt_track <= '0;
    end else begin
      if (clear) ent_valid <= '0;
      else if (res_valid) begin
        ent_valid[res_slot] <= 1'b1;
        ent_root[res_slot]  <= res_root;
        ent_track[res_slot] <= res_track;
      end
      if (select && nxt_ok) begin
        sel_idx   <= nxt_idx;
        tgt_valid <= 1'b1;
        tgt_track <= ent_track[nxt_idx];
      end
    end
  end
endmodule
