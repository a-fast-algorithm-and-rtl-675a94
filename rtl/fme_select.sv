// fme_select: selection unit with the quarter-pel bilinear filters.
//
// For each of the five processing units it picks, from the 5 x 11 half-pel
// grid that the interpolation unit presents around one pixel row, the four
// reference samples at that unit's candidate quarter-pel offset (dx, dy in
// -3..+3).  Samples on the half-pel grid are taken directly; the others are
// H.264 quarter-pel samples, the rounded average of two grid samples:
// horizontal or vertical neighbours when only one coordinate is a quarter
// position, and the two diagonal neighbours that are half-pels of the
// "integer row, half column" and "half row, integer column" kinds when both
// are.  The document places this adaptive selection in front of the PUs
// because the second-step pattern is irregular; folding the bilinear filters
// into it, one per PU pixel, is this design's choice.
// Timing: one register stage; out_tag is in_tag delayed to match.
module fme_select
  import fme_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  pix_t win [HG_ROWS][HG_COLS],
  input  qmv_t cand [NPU],
  input  row_tag_t in_tag,
  output pix_t ref_pix [NPU][4],
  output row_tag_t out_tag
);
  pix_t sel [NPU][4];

  function automatic pix_t pick(input pix_t w [HG_ROWS][HG_COLS], input int yq, input int xq);
    int y0, x0;
    y0 = yq / 2;
    x0 = xq / 2;
    if (yq % 2 == 0 && xq % 2 == 0) return w[y0][x0];
    else if (yq % 2 == 0)           return avg2(w[y0][x0], w[y0][x0+1]);
    else if (xq % 2 == 0)           return avg2(w[y0][x0], w[y0+1][x0]);
    else if ((y0 + x0) % 2 == 1)    return avg2(w[y0][x0], w[y0+1][x0+1]);
    else                            return avg2(w[y0][x0+1], w[y0+1][x0]);
  endfunction

  always_comb begin
    for (int p = 0; p < NPU; p++)
      for (int k = 0; k < 4; k++)
        // quarter-pel coordinates inside the grid: pixel k sits at (4, 4+4k)
        sel[p][k] = pick(win, 4 + int'(cand[p].dy), 4 + 4*k + int'(cand[p].dx));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_tag <= '0;
      for (int p = 0; p < NPU; p++)
        for (int k = 0; k < 4; k++) ref_pix[p][k] <= '0;
    end else begin
      out_tag <= in_tag;
      ref_pix <= sel;
    end
  end
endmodule
