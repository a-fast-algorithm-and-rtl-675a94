// fme_top: fast fractional motion estimation engine for H.264/AVC.
//
// Refines the best integer motion vector of one partition (4x4 up to 16x16,
// given as blk_w4 x blk_h4 blocks of 4x4) to quarter-pel precision with the
// two-step search: step 1 evaluates the integer position and the four
// half-pel diamond points in parallel on five 4x4-block processing units;
// step 2 evaluates three or four quarter-pel points whose pattern (cases 1-4)
// is chosen from the best three step-1 positions.  The matching cost is the
// SATD (4x4 Hadamard).  Step 2 is skipped when the best step-1 SATD is under a
// threshold predicted from the integer-pel SAD and QP.
//
// Datapath: reference buffer -> interpolation unit (6-tap half-pel FIRs) ->
// selection unit (per-PU sample selection and quarter-pel averaging) -> five
// PUs, with four original pixels per cycle broadcast to every PU from the
// current-block buffer; the compare-and-determine unit, the early-termination
// unit and the controller close the loop.
//
// Usage: write the (4*blk_h4+6) x (4*blk_w4+6) reference pixels around the
// integer-pel match (window (0,0) is 3 rows above and 3 columns left of it)
// through ref_wr_*, the original pixels through cur_wr_*, then pulse start
// with blk_w4, blk_h4, int_sad and qp held.  done pulses with mv (quarter-pel
// offset from the integer MV, -3..+3 per component), cost (SATD), the case of
// step 2 (CASE_NONE when terminated early) and early_term.  Loading the
// buffers while busy is not allowed.
// A step takes blk_w4*(4*blk_h4+6)+11 cycles (feed, pipeline drain and the
// decision), plus one cycle for start: a 16x16 partition takes 100 cycles
// with early termination and 2*99+1 = 199 cycles with both steps.
module fme_top
  import fme_pkg::*;
#(
  parameter int unsigned MAX_W = 16,
  parameter int unsigned MAX_H = 16
) (
  input  logic clk,
  input  logic rst_n,
  // buffer loading
  input  logic cur_wr_en,
  input  logic [$clog2(MAX_H)-1:0] cur_wr_row,
  input  logic [$clog2(MAX_W)-1:0] cur_wr_col,
  input  pix_t cur_wr_data,
  input  logic ref_wr_en,
  input  logic [$clog2(MAX_H+6)-1:0] ref_wr_row,
  input  logic [$clog2(MAX_W+6)-1:0] ref_wr_col,
  input  pix_t ref_wr_data,
  // command
  input  logic start,
  input  logic [2:0] blk_w4,
  input  logic [2:0] blk_h4,
  input  logic [SAD_W-1:0] int_sad,
  input  logic [QP_W-1:0] qp,
  // result
  output logic busy,
  output logic done,
  output qmv_t mv,
  output cost_t cost,
  output fme_case_e step2_case,
  output logic early_term
);
  initial begin
    assert (MAX_W == 16 && MAX_H == 16)
      else $error("fme_top: row tags are sized for a 16x16 macroblock");
  end

  logic [4:0] ref_rd_row, ref_rd_col;
  pix_t ref_seg [10];
  row_tag_t ctl_tag, interp_tag, sel_tag;
  logic [TAG_W-1:0] interp_tag_bits;
  pix_t win [HG_ROWS][HG_COLS];
  qmv_t cand [NPU];
  pix_t ref_pix [NPU][4];
  pix_t cur_pix [4];
  cost_t pu_cost [NPU];
  logic  pu_cost_valid [NPU];
  cost_t cmp_cost [NPU];
  logic  cmp_mask [NPU];
  logic [2:0] cmp_best, cmp_second, cmp_third;
  cost_t cmp_best_cost;
  fme_case_e cmp_case;
  qmv_t cmp_pat [4];
  logic cmp_pat_valid [4];
  logic et_load, et_terminate;
  logic signed [SAD_W+2:0] et_threshold_q;

  fme_ref_buffer #(.MAX_W(MAX_W), .MAX_H(MAX_H)) u_ref (
    .clk, .wr_en(ref_wr_en), .wr_row(ref_wr_row), .wr_col(ref_wr_col), .wr_data(ref_wr_data),
    .rd_row(ref_rd_row[$clog2(MAX_H+6)-1:0]), .rd_col(ref_rd_col[$clog2(MAX_W+6)-1:0]),
    .rd_seg(ref_seg));

  fme_interp #(.TAG_BITS(TAG_W)) u_interp (
    .clk, .rst_n, .in_seg(ref_seg), .in_tag(ctl_tag), .win, .out_tag(interp_tag_bits));
  assign interp_tag = row_tag_t'(interp_tag_bits);

  fme_select u_select (
    .clk, .rst_n, .win, .cand, .in_tag(interp_tag), .ref_pix, .out_tag(sel_tag));

  // the original row for a tag is read as the tag leaves the interpolation
  // unit, so it arrives together with the selected reference samples
  fme_cur_buffer #(.MAX_W(MAX_W), .MAX_H(MAX_H)) u_cur (
    .clk, .wr_en(cur_wr_en), .wr_row(cur_wr_row), .wr_col(cur_wr_col), .wr_data(cur_wr_data),
    .rd_row(interp_tag.cur_row), .rd_x4(interp_tag.x4), .rd_pix(cur_pix));

  for (genvar p = 0; p < NPU; p++) begin : g_pu
    fme_pu u_pu (
      .clk, .rst_n, .in_valid(sel_tag.v), .in_brow(sel_tag.brow),
      .in_first(sel_tag.first), .in_last(sel_tag.last),
      .cur(cur_pix), .refp(ref_pix[p]),
      .cost_valid(pu_cost_valid[p]), .cost(pu_cost[p]));
  end

  fme_compare u_cmp (
    .cost(cmp_cost), .mask(cmp_mask), .best(cmp_best), .second(cmp_second),
    .third(cmp_third), .best_cost(cmp_best_cost), .step2_case(cmp_case),
    .pat(cmp_pat), .pat_valid(cmp_pat_valid));

  fme_early_term u_et (
    .clk, .rst_n, .load(et_load), .sad(int_sad), .qp, .best_cost(cmp_best_cost),
    .threshold(et_threshold_q), .terminate(et_terminate));

  fme_control u_ctl (
    .clk, .rst_n, .start, .blk_w4, .blk_h4, .busy,
    .ref_rd_row, .ref_rd_col, .tag(ctl_tag), .cand,
    .pu_cost, .pu_cost_valid(pu_cost_valid[0]),
    .cmp_cost, .cmp_mask, .cmp_best, .cmp_best_cost, .cmp_case,
    .cmp_pat, .cmp_pat_valid, .et_load, .et_terminate,
    .done, .mv, .cost, .step2_case, .early_term);
endmodule
