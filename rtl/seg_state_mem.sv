// seg_state_mem: the storage layer of the image-scan segmentation: the label
// (cell state) and the two connection weights of every pixel, kept one image
// row per word.
//
// Rows are spread over NB = ROWS+2 banks, row y in bank y mod NB at word
// y / NB. A processing block of ROWS rows needs its own rows plus the row
// above and the row below, which are NB consecutive rows and so always lie in
// NB different banks: all of them are read in one cycle (blk_rd_*), and the
// block's ROWS rows are written back in one cycle (blk_wr_*). This is the
// wide, multi-bank access between storage and processing layer. Rows outside
// the image read as label 0 with all weights 0. A third port writes one whole
// row during loading (ld_*), and a fourth reads one pixel's label (px_*).
// All reads are synchronous: data is valid the cycle after the request.
// Write ports are used one at a time; ld_en wins over blk_wr_en.
// Multi-bank on-chip memory with an efficient data mapping is the document's;
// the mapping row mod (ROWS+2) is this design's choice.
module seg_state_mem
  import tracker_pkg::*;
#(
  parameter int unsigned W    = IMG_W,
  parameter int unsigned H    = IMG_H,
  parameter int unsigned ROWS = 2
) (
  input  logic                             clk,
  // row load
  input  logic                             ld_en,
  input  logic [YW-1:0]                    ld_row,
  input  logic [W-1:0][LW-1:0]             ld_lab,
  input  logic [W-1:0]                     ld_wl,
  input  logic [W-1:0]                     ld_wu,
  // block read: rows blk_rd_row0 .. blk_rd_row0+ROWS+1 (row0 may be -1)
  input  logic                             blk_rd_en,
  input  logic signed [YW+1:0]             blk_rd_row0,
  output logic [ROWS+1:0][W-1:0][LW-1:0]   blk_lab,
  output logic [ROWS+1:0][W-1:0]           blk_wl,
  output logic [ROWS+1:0][W-1:0]           blk_wu,
  // block write: rows blk_wr_row .. blk_wr_row+ROWS-1
  input  logic                             blk_wr_en,
  input  logic [YW-1:0]                    blk_wr_row,
  input  logic [ROWS-1:0][W-1:0][LW-1:0]   blk_wr_lab,
  // single label read
  input  logic                             px_en,
  input  logic [XW-1:0]                    px_x,
  input  logic [YW-1:0]                    px_y,
  output logic [LW-1:0]                    px_label
);
  localparam int unsigned NB = ROWS + 2;
  localparam int unsigned D  = (H + NB - 1) / NB;

  logic [W-1:0][LW-1:0] lab_mem [NB][D];
  logic [W-1:0]         wl_mem  [NB][D];
  logic [W-1:0]         wu_mem  [NB][D];

  always_ff @(posedge clk) begin
    if (ld_en) begin
      lab_mem[32'(ld_row) % NB][32'(ld_row) / NB] <= ld_lab;
      wl_mem [32'(ld_row) % NB][32'(ld_row) / NB] <= ld_wl;
      wu_mem [32'(ld_row) % NB][32'(ld_row) / NB] <= ld_wu;
    end else if (blk_wr_en) begin
      for (int i = 0; i < ROWS; i++) begin
        if (32'(blk_wr_row) + i < H)
          lab_mem[(32'(blk_wr_row) + i) % NB][(32'(blk_wr_row) + i) / NB] <= blk_wr_lab[i];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (blk_rd_en) begin
      for (int i = 0; i < NB; i++) begin
        int rr;
        rr = int'(blk_rd_row0) + i;
        if (rr < 0 || rr >= int'(H)) begin
          blk_lab[i] <= '0;
          blk_wl[i]  <= '0;
          blk_wu[i]  <= '0;
        end else begin
          blk_lab[i] <= lab_mem[rr % NB][rr / NB];
          blk_wl[i]  <= wl_mem [rr % NB][rr / NB];
          blk_wu[i]  <= wu_mem [rr % NB][rr / NB];
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (px_en) px_label <= lab_mem[32'(px_y) % NB][32'(px_y) / NB][px_x];
  end
endmodule
