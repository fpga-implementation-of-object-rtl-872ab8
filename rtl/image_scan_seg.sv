// image_scan_seg: image-scan region-growing segmentation. It labels every
// pixel of a W x H image with the smallest raster index of the connected
// region it belongs to, using a small W x ROWS processing array that is moved
// over the image from top to bottom instead of one cell per pixel.
//
// Load: pixels' weights arrive in raster order (ld_valid, ld_idx, {ld_wu,
// ld_wl}, from weight_calc); each completed row is written to the storage
// layer with every label set to the pixel's own index.
// Segmentation: a pulse on start begins the scans. For each block of ROWS
// rows the block, the row above and the row below are read from the banked
// storage in one cycle, the array (seg_pe_array) repeats its region-growing
// step once per cycle until no label changes (at most MAX_ITER steps), and
// the block's rows are written back. A scan is one pass over all H/ROWS
// blocks; scans repeat until a scan changes nothing or MAX_SCANS scans were
// made. Then done pulses for one cycle, busy falls, and converged tells
// whether the last scan was quiet. scans and steps report the work done.
// Read-out: px_en with (px_x, px_y) returns that pixel's label in px_label
// one cycle later; it may be used whenever the block is not busy.
// The block-wise scan, the storing and reloading of block state between
// steps and the banked memory follow the document; the flooding rule, the
// repeat-until-quiet scan loop and its limits are this design's choices.
module image_scan_seg
  import tracker_pkg::*;
#(
  parameter int unsigned W         = IMG_W,
  parameter int unsigned H         = IMG_H,
  parameter int unsigned ROWS      = 2,
  parameter int unsigned MAX_ITER  = IMG_W * 2,
  parameter int unsigned MAX_SCANS = 64
) (
  input  logic          clk,
  input  logic          rst_n,
  // load
  input  logic          ld_valid,
  input  logic [LW-1:0] ld_idx,
  input  logic          ld_wl,
  input  logic          ld_wu,
  // control
  input  logic          start,
  output logic          busy,
  output logic          done,
  output logic          converged,
  output logic [7:0]    scans,
  output logic [23:0]   steps,
  // read-out
  input  logic          px_en,
  input  logic [XW-1:0] px_x,
  input  logic [YW-1:0] px_y,
  output logic [LW-1:0] px_label
);
  localparam int unsigned NBLK = H / ROWS;
  localparam int unsigned NB   = ROWS + 2;

  typedef enum logic [2:0] {S_IDLE, S_READ, S_LATCH, S_ITER, S_WRITE, S_NEXT} state_t;
  state_t st;

  // ---------------- load: assemble one row, then write it ----------------
  logic [XW-1:0]        lx;
  logic [YW-1:0]        ly;
  logic [W-1:0]         row_wl, row_wu;
  logic                 ld_wr;
  logic [YW-1:0]        ld_row;
  logic [W-1:0][LW-1:0] ld_lab;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lx     <= '0;
      ly     <= '0;
      row_wl <= '0;
      row_wu <= '0;
      ld_wr  <= 1'b0;
      ld_row <= '0;
    end else begin
      ld_wr <= 1'b0;
      if (ld_valid) begin
        logic [XW-1:0] cx;
        logic [YW-1:0] cy;
        cx = (ld_idx == '0) ? '0 : lx;
        cy = (ld_idx == '0) ? '0 : ly;
        row_wl[cx] <= ld_wl;
        row_wu[cx] <= ld_wu;
        if (32'(cx) == W - 1) begin
          ld_wr  <= 1'b1;
          ld_row <= cy;
          lx     <= '0;
          ly     <= cy + 1'b1;
        end else begin
          lx <= cx + 1'b1;
          ly <= cy;
        end
      end
    end
  end

  always_comb
    for (int c = 0; c < W; c++) ld_lab[c] = LW'(32'(ld_row) * W + c);

  // ---------------- scan controller ----------------
  logic [$clog2(NBLK+1)-1:0]            blk;
  logic signed [YW+1:0]                 rd_row0;
  logic [NB-1:0][W-1:0][LW-1:0]         m_lab;
  logic [NB-1:0][W-1:0]                 m_wl, m_wu;
  logic [ROWS-1:0][W-1:0][LW-1:0]       cur, nxt;
  logic [ROWS-1:0][W-1:0]               c_wl, c_wu;
  logic [W-1:0][LW-1:0]                 above, below;
  logic [W-1:0]                         wu_below;
  logic                                 pe_changed;
  logic                                 scan_changed;
  logic [$clog2(MAX_ITER+1)-1:0]        iter;
  logic [YW-1:0]                        wr_row;

  always_comb begin
    rd_row0 = (YW+2)'(int'(32'(blk) * ROWS) - 1);
    wr_row  = YW'(32'(blk) * ROWS);
  end

  seg_state_mem #(.W(W), .H(H), .ROWS(ROWS)) u_mem (
    .clk        (clk),
    .ld_en      (ld_wr),
    .ld_row     (ld_row),
    .ld_lab     (ld_lab),
    .ld_wl      (row_wl),
    .ld_wu      (row_wu),
    .blk_rd_en  (st == S_READ),
    .blk_rd_row0(rd_row0),
    .blk_lab    (m_lab),
    .blk_wl     (m_wl),
    .blk_wu     (m_wu),
    .blk_wr_en  (st == S_WRITE),
    .blk_wr_row (wr_row),
    .blk_wr_lab (cur),
    .px_en      (px_en),
    .px_x       (px_x),
    .px_y       (px_y),
    .px_label   (px_label)
  );

  seg_pe_array #(.W(W), .ROWS(ROWS)) u_pe (
    .cur     (cur),
    .w_left  (c_wl),
    .w_up    (c_wu),
    .above   (above),
    .below   (below),
    .wu_below(wu_below),
    .nxt     (nxt),
    .changed (pe_changed)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st           <= S_IDLE;
      blk          <= '0;
      iter         <= '0;
      scan_changed <= 1'b0;
      busy         <= 1'b0;
      done         <= 1'b0;
      converged    <= 1'b0;
      scans        <= '0;
      steps        <= '0;
      cur          <= '0;
      c_wl         <= '0;
      c_wu         <= '0;
      above        <= '0;
      below        <= '0;
      wu_below     <= '0;
    end else begin
      done <= 1'b0;
      unique case (st)
        S_IDLE: if (start) begin
          st           <= S_READ;
          busy         <= 1'b1;
          blk          <= '0;
          scans        <= '0;
          steps        <= '0;
          scan_changed <= 1'b0;
          converged    <= 1'b0;
        end
        S_READ: st <= S_LATCH;
        S_LATCH: begin
          above    <= m_lab[0];
          below    <= m_lab[NB-1];
          wu_below <= m_wu[NB-1];
          for (int r = 0; r < ROWS; r++) begin
            cur[r]  <= m_lab[r+1];
            c_wl[r] <= m_wl[r+1];
            c_wu[r] <= m_wu[r+1];
          end
          iter <= '0;
          st   <= S_ITER;
        end
        S_ITER: begin
          if (pe_changed && 32'(iter) < MAX_ITER) begin
            cur          <= nxt;
            iter         <= iter + 1'b1;
            steps        <= steps + 1'b1;
            scan_changed <= 1'b1;
          end else begin
            st <= S_WRITE;
          end
        end
        S_WRITE: st <= S_NEXT;
        S_NEXT: begin
          if (32'(blk) == NBLK - 1) begin
            blk <= '0;
            if (scan_changed && 32'(scans) + 1 < MAX_SCANS) begin
              scans        <= scans + 1'b1;
              scan_changed <= 1'b0;
              st           <= S_READ;
            end else begin
              scans     <= scans + 1'b1;
              converged <= !scan_changed;
              busy      <= 1'b0;
              done      <= 1'b1;
              st        <= S_IDLE;
            end
          end else begin
            blk <= blk + 1'b1;
            st  <= S_READ;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  initial assert (H % ROWS == 0) else $error("image height must be a multiple of the block height");
endmodule
