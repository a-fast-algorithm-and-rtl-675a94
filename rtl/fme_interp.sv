// fme_interp: interpolation unit (separable 6-tap half-pel FIR).
//
// Every cycle it takes one 10-pixel row segment of the reference window
// (columns -3..+6 around a 4-pixel-wide strip) and
//   1. runs five horizontal 6-tap FIRs, giving the unrounded half-pels between
//      columns -1..4, and keeps them with the six integer pixels -1..4 in a
//      six-row interpolation buffer that shifts one row per cycle;
//   2. runs eleven vertical 6-tap FIRs over the buffer (six on integer
//      columns, five on the unrounded horizontal half-pels), giving the
//      half-pel row below the middle buffer row;
//   3. keeps the last three (integer row, half row) pairs, so that each cycle
//      it can present the 5 x 11 half-pel grid around one pixel row R:
//      rows R-1, R-1/2, R, R+1/2, R+1 by columns -1, -1/2, 0, ..., 4.
// Together with the rounded averages in the selection unit these give every
// quarter-pel sample within +-3/4 pel of the four pixels of row R.
// The structure (5 horizontal and 11 vertical FIRs, buffer of six integer
// pixels and five intermediate values shifted cycle by cycle) follows the
// document; the rounding is H.264's.  The unit runs freely: win for the row
// fed at cycle t is valid at cycle t+6, and in_tag is delayed to out_tag to
// mark it.  The integer row R+1 of a window only needs rows up to R+3, so the
// rows R+4.. that follow a strip may already belong to the next strip.
module fme_interp
  import fme_pkg::*;
#(
  parameter int unsigned TAG_BITS = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  pix_t in_seg [10],
  input  logic [TAG_BITS-1:0] in_tag,
  output pix_t win [HG_ROWS][HG_COLS],
  output logic [TAG_BITS-1:0] out_tag
);
  // interpolation buffer: six rows of 6 integer pixels + 5 raw half-pels
  pix_t ib_int [6][6];
  raw_t ib_half [6][5];
  // (integer row, half row) pairs on the half-pel grid
  pix_t pair_int  [3][HG_COLS];
  pix_t pair_half [3][HG_COLS];
  pix_t new_int  [HG_COLS];
  pix_t new_half [HG_COLS];
  raw_t hfir [5];
  logic [TAG_BITS-1:0] tag_d [6];

  // horizontal FIRs on the incoming segment
  always_comb begin
    for (int k = 0; k < 5; k++)
      hfir[k] = fir6_pix(in_seg[k], in_seg[k+1], in_seg[k+2],
                         in_seg[k+3], in_seg[k+4], in_seg[k+5]);
  end

  // vertical FIRs: the half row between buffer rows 3 and 2 (row 0 newest)
  always_comb begin
    for (int c = 0; c < HG_COLS; c++) begin
      if (c % 2 == 0) begin
        new_int[c]  = ib_int[3][c/2];
        new_half[c] = round_half(fir6_pix(ib_int[5][c/2], ib_int[4][c/2], ib_int[3][c/2],
                                          ib_int[2][c/2], ib_int[1][c/2], ib_int[0][c/2]));
      end else begin
        new_int[c]  = round_half(ib_half[3][c/2]);
        new_half[c] = round_center(fir6_raw(ib_half[5][c/2], ib_half[4][c/2], ib_half[3][c/2],
                                            ib_half[2][c/2], ib_half[1][c/2], ib_half[0][c/2]));
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < 6; r++) begin
        for (int c = 0; c < 6; c++) ib_int[r][c] <= '0;
        for (int c = 0; c < 5; c++) ib_half[r][c] <= '0;
        tag_d[r] <= '0;
      end
      for (int p = 0; p < 3; p++)
        for (int c = 0; c < HG_COLS; c++) begin
          pair_int[p][c]  <= '0;
          pair_half[p][c] <= '0;
        end
    end else begin
      for (int r = 5; r > 0; r--) begin
        ib_int[r]  <= ib_int[r-1];
        ib_half[r] <= ib_half[r-1];
      end
      for (int c = 0; c < 6; c++) ib_int[0][c] <= in_seg[c+2];
      for (int c = 0; c < 5; c++) ib_half[0][c] <= hfir[c];
      pair_int[2]  <= pair_int[1];
      pair_half[2] <= pair_half[1];
      pair_int[1]  <= pair_int[0];
      pair_half[1] <= pair_half[0];
      pair_int[0]  <= new_int;
      pair_half[0] <= new_half;
      tag_d[0] <= in_tag;
      for (int r = 1; r < 6; r++) tag_d[r] <= tag_d[r-1];
    end
  end

  always_comb begin
    win[0] = pair_int[2];
    win[1] = pair_half[2];
    win[2] = pair_int[1];
    win[3] = pair_half[1];
    win[4] = pair_int[0];
  end
  assign out_tag = tag_d[5];
endmodule
