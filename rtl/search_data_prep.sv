// search_data_prep: turns the feature sums of every object into the feature
// record that the matching block searches with: centroid (x, y), bounding box
// size (w, h), mean colour and area.
//
// A pulse on start walks the slots 0 .. n_obj-1 of the feature table
// (rd_slot/rd_acc, combinational read). For each slot five divisions by the
// area (sum x, sum y, sum R, sum G, sum B) run one after another on a
// sequential divider, and the finished record is written out with wr_en,
// wr_slot, wr_feat. After the last object done pulses for one cycle with
// n_out, the number of records written, together with the last record.
// Each object takes 5 x (LW+10) + 1 cycles (LW+8 per division plus two
// cycles of hand-over, and one to write).
// The document only names a unit that prepares the search data from the
// extracted features; computing the means here is this design's reading.
module search_data_prep
  import tracker_pkg::*;
#(
  parameter int unsigned N_OBJ = MAX_OBJ
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [$clog2(N_OBJ+1)-1:0] n_obj,
  output logic [$clog2(N_OBJ)-1:0]   rd_slot,
  input  obj_acc_t                   rd_acc,
  output logic                       wr_en,
  output logic [$clog2(N_OBJ)-1:0]   wr_slot,
  output obj_feat_t                  wr_feat,
  output logic                       busy,
  output logic                       done,
  output logic [$clog2(N_OBJ+1)-1:0] n_out
);
  localparam int unsigned SW = $clog2(N_OBJ);
  localparam int unsigned NW = LW + 8;

  typedef enum logic [1:0] {P_IDLE, P_DIV, P_WAIT, P_WRITE} st_t;
  st_t st;

  logic [$clog2(N_OBJ+1)-1:0] n_lat;
  logic [SW:0]                slot;
  logic [2:0]                 k;          // which sum is being divided
  logic [NW-1:0]              num;
  logic                       dv_start, dv_busy, dv_done;
  logic [NW-1:0]              dv_q;
  obj_feat_t                  f;

  always_comb begin
    rd_slot = SW'(slot);
    unique case (k)
      3'd0:    num = NW'(rd_acc.sx);
      3'd1:    num = NW'(rd_acc.sy);
      3'd2:    num = rd_acc.sr;
      3'd3:    num = rd_acc.sg;
      default: num = rd_acc.sb;
    endcase
  end

  assign dv_start = (st == P_DIV);

  seq_div #(.NW(NW), .DW(AW)) u_div (
    .clk  (clk),
    .rst_n(rst_n),
    .start(dv_start),
    .num  (num),
    .den  (rd_acc.area),
    .busy (dv_busy),
    .done (dv_done),
    .quot (dv_q)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st      <= P_IDLE;
      slot    <= '0;
      k       <= '0;
      f       <= '0;
      n_lat   <= '0;
      wr_en   <= 1'b0;
      wr_slot <= '0;
      wr_feat <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
      n_out   <= '0;
    end else begin
      wr_en <= 1'b0;
      done  <= 1'b0;
      unique case (st)
        P_IDLE: if (start) begin
          n_lat <= n_obj;
          slot  <= '0;
          k     <= '0;
          busy  <= 1'b1;
          n_out <= '0;
          if (n_obj == '0) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            st <= P_DIV;
          end
        end
        P_DIV: st <= P_WAIT;
        P_WAIT: if (dv_done) begin
          unique case (k)
            3'd0:    f.px    <= XW'(dv_q);
            3'd1:    f.py    <= YW'(dv_q);
            3'd2:    f.col.r <= 8'(dv_q);
            3'd3:    f.col.g <= 8'(dv_q);
            default: f.col.b <= 8'(dv_q);
          endcase
          if (k == 3'd4) begin
            st <= P_WRITE;
          end else begin
            k  <= k + 1'b1;
            st <= P_DIV;
          end
        end
        P_WRITE: begin
          wr_en        <= 1'b1;
          wr_slot      <= SW'(slot);
          wr_feat      <= f;
          wr_feat.root <= rd_acc.root;
          wr_feat.w    <= (XW+1)'(rd_acc.xmax - rd_acc.xmin) + 1'b1;
          wr_feat.h    <= (YW+1)'(rd_acc.ymax - rd_acc.ymin) + 1'b1;
          wr_feat.area <= rd_acc.area;
          n_out        <= n_out + 1'b1;
          k            <= '0;
          if (32'(slot) + 1 >= 32'(n_lat)) begin
            busy <= 1'b0;
            done <= 1'b1;
            st   <= P_IDLE;
          end else begin
            slot <= slot + 1'b1;
            st   <= P_DIV;
          end
        end
        default: st <= P_IDLE;
      endcase
    end
  end
endmodule
