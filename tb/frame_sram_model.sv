// frame_sram_model: behavioural model of the three external frame memories
// (one bank per frame). Writes take effect at the clock edge; reads return
// the addressed word one cycle after fb_rd_en, like a registered read.
module frame_sram_model
  import tracker_pkg::*;
(
  input  logic          clk,
  input  logic          wr_en,
  input  logic [1:0]    wr_bank,
  input  logic [LW-1:0] wr_addr,
  input  rgb_t          wr_data,
  input  logic          rd_en,
  input  logic [1:0]    rd_bank,
  input  logic [LW-1:0] rd_addr,
  output rgb_t          rd_data
);
  rgb_t mem [3][NPIX];

  initial
    for (int b = 0; b < 3; b++)
      for (int i = 0; i < NPIX; i++) mem[b][i] = '0;

  always @(posedge clk) begin
    if (wr_en && wr_bank < 3) mem[wr_bank][wr_addr] <= wr_data;
    if (rd_en && rd_bank < 3) rd_data <= mem[rd_bank][rd_addr];
  end
endmodule
