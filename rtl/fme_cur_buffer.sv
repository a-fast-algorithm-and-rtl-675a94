// fme_cur_buffer: original (current) block memory of the FME engine.
//
// Holds the MAX_H x MAX_W original pixels of the partition being refined.
// Four horizontally adjacent pixels are read per cycle and broadcast to all
// processing units, as the document describes.  Write port: one pixel per
// cycle; read port: row rd_row, columns 4*rd_x4 .. 4*rd_x4+3, registered
// (data one cycle after the address).  Organisation and port widths are this
// design's choices.
module fme_cur_buffer
  import fme_pkg::*;
#(
  parameter int unsigned MAX_W = 16,
  parameter int unsigned MAX_H = 16
) (
  input  logic clk,
  input  logic wr_en,
  input  logic [$clog2(MAX_H)-1:0] wr_row,
  input  logic [$clog2(MAX_W)-1:0] wr_col,
  input  pix_t wr_data,
  input  logic [$clog2(MAX_H)-1:0] rd_row,
  input  logic [$clog2(MAX_W/4)-1:0] rd_x4,
  output pix_t rd_pix [4]
);
  pix_t mem [MAX_H][MAX_W];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_row][wr_col] <= wr_data;
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < 4; k++) rd_pix[k] <= mem[rd_row][{rd_x4, 2'(k)}];
  end
endmodule
