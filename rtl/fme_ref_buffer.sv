// fme_ref_buffer: reference-window memory of the FME engine.
//
// Holds the integer reference pixels around the best integer motion vector of
// the partition being refined: (MAX_H+6) rows by (MAX_W+6) columns, i.e. the
// partition plus the 3-pixel margin on every side that the 6-tap filter and
// the +-3/4-pel search range need.  Window (0,0) is the pixel 3 rows above and
// 3 columns left of the partition's top-left pixel at integer-pel position.
//
// Write port: one pixel per cycle (wr_en, wr_row, wr_col, wr_data).
// Read port: a 10-pixel horizontal segment starting at (rd_row, rd_col), the
// input that the interpolation unit needs for a 4-pixel-wide column strip;
// the data appear one cycle after the address (registered read).  Segment
// pixels beyond the last column read as 0.
// The document only implies this buffer; its organisation is this design's.
module fme_ref_buffer
  import fme_pkg::*;
#(
  parameter int unsigned MAX_W = 16,
  parameter int unsigned MAX_H = 16
) (
  input  logic clk,
  input  logic wr_en,
  input  logic [$clog2(MAX_H+6)-1:0] wr_row,
  input  logic [$clog2(MAX_W+6)-1:0] wr_col,
  input  pix_t wr_data,
  input  logic [$clog2(MAX_H+6)-1:0] rd_row,
  input  logic [$clog2(MAX_W+6)-1:0] rd_col,
  output pix_t rd_seg [10]
);
  localparam int unsigned ROWS = MAX_H + 6;
  localparam int unsigned COLS = MAX_W + 6;

  pix_t mem [ROWS][COLS];

  always_ff @(posedge clk) begin
    if (wr_en && int'(wr_row) < ROWS && int'(wr_col) < COLS) mem[wr_row][wr_col] <= wr_data;
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < 10; k++) begin
      if (int'(rd_row) < ROWS && int'(rd_col) + k < COLS)
        rd_seg[k] <= mem[rd_row][int'(rd_col) + k];
      else
        rd_seg[k] <= '0;
    end
  end
endmodule
