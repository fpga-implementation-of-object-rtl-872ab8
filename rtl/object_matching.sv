// object_matching: finds, for every object of the current frame, the most
// similar object of the preceding frame and carries its track number over.
//
// Two memories hold object features: the current memory, written by the
// search data preparation (cur_wr_*), and the reference memory with the
// objects of the preceding frame. For the reference objects the position
// stored for matching is the one estimated for this frame (est_position);
// their measured position and track number are kept alongside. A pulse on
// start compares every current object with every reference object, one pair
// per cycle, by the Manhattan distance of the normalised features
// (tracker_pkg::feat_dist) and keeps the nearest. If its distance is at most
// MATCH_TH the current object inherits that track number and a motion vector
// is formed; otherwise it opens a new track. Each result leaves on res_*
// for one cycle. The current objects, with their estimated next positions,
// then become the reference objects of the next frame, and done pulses.
// Time: n_cur x (n_ref + 1) + 2 cycles from start to done.
// The two memories, the all-pairs one-by-one comparison and the normalised
// Manhattan distance follow the document; the threshold and the track
// numbering are this design's choices.
module object_matching
  import tracker_pkg::*;
#(
  parameter int unsigned N_OBJ    = MAX_OBJ,
  parameter int unsigned W        = IMG_W,
  parameter int unsigned H        = IMG_H,
  parameter int unsigned MATCH_TH = 192
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // current-object memory write
  input  logic                       cur_wr_en,
  input  logic [$clog2(N_OBJ)-1:0]   cur_wr_slot,
  input  obj_feat_t                  cur_wr_feat,
  input  logic [$clog2(N_OBJ+1)-1:0] n_cur,
  // control
  input  logic                       start,
  output logic                       busy,
  output logic                       done,
  // one result per current object
  output logic                       res_valid,
  output logic [$clog2(N_OBJ)-1:0]   res_slot,
  output logic [LW-1:0]              res_root,
  output logic [TW-1:0]              res_track,
  output logic                       res_matched,
  output logic [DW-1:0]              res_dist,
  output logic signed [XW:0]         res_mv_x,
  output logic signed [YW:0]         res_mv_y,
  // statistics of the last run
  output logic [$clog2(N_OBJ+1)-1:0] n_ref,
  output logic [15:0]                n_matched,
  output logic [15:0]                n_new
);
  localparam int unsigned SW = $clog2(N_OBJ);

  typedef struct packed {
    obj_feat_t     f;      // features, position = estimate for the next frame
    logic [XW-1:0] ax;     // measured position
    logic [YW-1:0] ay;
    logic [TW-1:0] track;
  } ref_t;

  obj_feat_t cur_mem [N_OBJ];
  ref_t      ref_mem [2][N_OBJ];
  logic      rb;                         // bank holding the reference objects

  typedef enum logic [1:0] {M_IDLE, M_CMP, M_RES, M_END} st_t;
  st_t st;

  logic [SW:0]                 i, j;
  logic [$clog2(N_OBJ+1)-1:0]  nc;
  logic [DW-1:0]               best_d;
  logic [SW-1:0]               best_j;
  logic                        any_ref;
  logic [TW-1:0]               next_track;
  obj_feat_t                   ci;
  ref_t                        rj, rbest;
  logic [DW-1:0]               d;

  always_comb begin
    ci    = cur_mem[SW'(i)];
    rj    = ref_mem[rb][SW'(j)];
    rbest = ref_mem[rb][best_j];
    d     = feat_dist(ci, rj.f);
  end

  logic                 is_match;
  logic signed [XW:0]   mvx;
  logic signed [YW:0]   mvy;
  logic [XW-1:0]        ex;
  logic [YW-1:0]        ey;

  always_comb is_match = any_ref && (best_d <= DW'(MATCH_TH));

  est_position #(.W(W), .H(H)) u_est (
    .matched(is_match),
    .cur_x  (ci.px),
    .cur_y  (ci.py),
    .ref_x  (rbest.ax),
    .ref_y  (rbest.ay),
    .mv_x   (mvx),
    .mv_y   (mvy),
    .est_x  (ex),
    .est_y  (ey)
  );

  always_ff @(posedge clk) begin
    if (cur_wr_en) cur_mem[cur_wr_slot] <= cur_wr_feat;
  end

  always_ff @(posedge clk) begin
    if (st == M_RES) begin
      ref_t nr;
      nr.f     = ci;
      nr.f.px  = ex;
      nr.f.py  = ey;
      nr.ax    = ci.px;
      nr.ay    = ci.py;
      nr.track = is_match ? rbest.track : next_track;
      ref_mem[!rb][SW'(i)] <= nr;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= M_IDLE;
      rb          <= 1'b0;
      i           <= '0;
      j           <= '0;
      nc          <= '0;
      best_d      <= '1;
      best_j      <= '0;
      any_ref     <= 1'b0;
      next_track  <= '0;
      busy        <= 1'b0;
      done        <= 1'b0;
      res_valid   <= 1'b0;
      res_slot    <= '0;
      res_root    <= '0;
      res_track   <= '0;
      res_matched <= 1'b0;
      res_dist    <= '0;
      res_mv_x    <= '0;
      res_mv_y    <= '0;
      n_ref       <= '0;
      n_matched   <= '0;
      n_new       <= '0;
    end else begin
      done      <= 1'b0;
      res_valid <= 1'b0;
      unique case (st)
        M_IDLE: if (start) begin
          nc        <= n_cur;
          i         <= '0;
          j         <= '0;
          best_d    <= '1;
          best_j    <= '0;
          any_ref   <= 1'b0;
          busy      <= 1'b1;
          n_matched <= '0;
          n_new     <= '0;
          st        <= (n_cur == '0) ? M_END : ((n_ref == '0) ? M_RES : M_CMP);
        end
        M_CMP: begin
          if (!any_ref || d < best_d) begin
            best_d <= d;
            best_j <= SW'(j);
          end
          any_ref <= 1'b1;
          if (32'(j) + 1 >= 32'(n_ref)) st <= M_RES;
          else j <= j + 1'b1;
        end
        M_RES: begin
          res_valid   <= 1'b1;
          res_slot    <= SW'(i);
          res_root    <= ci.root;
          res_matched <= is_match;
          res_track   <= is_match ? rbest.track : next_track;
          res_dist    <= any_ref ? best_d : '1;
          res_mv_x    <= mvx;
          res_mv_y    <= mvy;
          if (is_match) n_matched <= n_matched + 1'b1;
          else begin
            n_new      <= n_new + 1'b1;
            next_track <= next_track + 1'b1;
          end
          j       <= '0;
          best_d  <= '1;
          any_ref <= 1'b0;
          if (32'(i) + 1 >= 32'(nc)) st <= M_END;
          else begin
            i  <= i + 1'b1;
            st <= (n_ref == '0) ? M_RES : M_CMP;
          end
        end
        M_END: begin
          rb    <= !rb;
          n_ref <= nc;
          busy  <= 1'b0;
          done  <= 1'b1;
          st    <= M_IDLE;
        end
        default: st <= M_IDLE;
      endcase
    end
  end
endmodule
