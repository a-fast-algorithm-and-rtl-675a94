// fme_pu: 4x4 block processing unit (PU).
//
// Computes the SATD of one candidate over a partition that is decomposed into
// 4x4 blocks.  Each cycle it takes one row of four original and four reference
// pixels: four PEs form the residuals, the row 1-D Hadamard transform turns
// them into a transformed row, which is written into a transpose register
// array.  The array has two 4x4 banks: while one fills row by row with the
// next block, the column 1-D Hadamard transform reads the other column by
// column over four cycles, and the absolute values of its outputs are summed.
// So four pixels per cycle are processed with no gaps between blocks.
// A 4x4 block's SATD is (sum |coefficients| + 1) >> 1 and the partition cost
// is the sum over its blocks.
// Interface: in_valid with in_brow (row within the block, 0..3); in_first /
// in_last mark the rows of the first / last block of the partition (the
// accumulator restarts with the first block).  cost_valid pulses with cost
// five cycles after the last row of the last block is accepted.
// The PE / Hadamard / transpose structure follows the document; the
// ping-pong banks, the halving of the 4x4 sum and the timing are this
// design's choices.
module fme_pu
  import fme_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic [1:0] in_brow,
  input  logic in_first,
  input  logic in_last,
  input  pix_t cur [4],
  input  pix_t refp [4],
  output logic cost_valid,
  output cost_t cost
);
  typedef logic signed [10:0] hrow_t;   // after the row transform
  typedef logic signed [12:0] hcol_t;   // after the column transform

  logic signed [8:0] resid [4];
  hrow_t hrow [4];
  hrow_t bank [2][4][4];                // [bank][row][column]
  logic  bank_full [2];
  logic  bank_first [2], bank_last [2];
  logic  wbank, rbank;
  logic [1:0] col;
  hrow_t colv [4];
  hcol_t hcol [4];
  logic [14:0] col_abs;
  logic [12:0] mag [4];
  logic [16:0] blk_round;
  logic [15:0] blk_sum;
  logic [15:0] blk_total;
  cost_t acc, acc_next;

  // four PEs: residual generation
  always_comb
    for (int k = 0; k < 4; k++) resid[k] = $signed({1'b0, cur[k]}) - $signed({1'b0, refp[k]});

  fme_hadamard4 #(.IN_W(9))  u_row (.x(resid), .y(hrow));

  always_comb
    for (int r = 0; r < 4; r++) colv[r] = bank[rbank][r][col];

  fme_hadamard4 #(.IN_W(11)) u_col (.x(colv), .y(hcol));

  always_comb begin
    col_abs = '0;
    for (int r = 0; r < 4; r++) begin
      mag[r] = hcol[r] < 0 ? 13'(-hcol[r]) : 13'(hcol[r]);   // |coef| <= 4080
      col_abs += 15'(mag[r]);
    end
    blk_total = blk_sum + 16'(col_abs);
    blk_round = {1'b0, blk_total} + 17'd1;
    acc_next  = (bank_first[rbank] ? '0 : acc) + cost_t'(blk_round[16:1]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbank <= 1'b0;
      rbank <= 1'b0;
      col <= '0;
      blk_sum <= '0;
      acc <= '0;
      cost <= '0;
      cost_valid <= 1'b0;
      for (int b = 0; b < 2; b++) begin
        bank_full[b] <= 1'b0;
        bank_first[b] <= 1'b0;
        bank_last[b] <= 1'b0;
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 4; c++) bank[b][r][c] <= '0;
      end
    end else begin
      cost_valid <= 1'b0;
      // row side: fill the write bank
      if (in_valid) begin
        bank[wbank][in_brow] <= hrow;
        if (in_brow == 2'd3) begin
          bank_full[wbank]  <= 1'b1;
          bank_first[wbank] <= in_first;
          bank_last[wbank]  <= in_last;
          wbank <= ~wbank;
        end
      end
      // column side: drain the read bank, one column per cycle
      if (bank_full[rbank]) begin
        if (col == 2'd3) begin
          col <= '0;
          blk_sum <= '0;
          acc <= acc_next;
          bank_full[rbank] <= 1'b0;
          rbank <= ~rbank;
          if (bank_last[rbank]) begin
            cost <= acc_next;
            cost_valid <= 1'b1;
          end
        end else begin
          col <= col + 2'd1;
          blk_sum <= blk_total;
        end
      end
    end
  end
endmodule
