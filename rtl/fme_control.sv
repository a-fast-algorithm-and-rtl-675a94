// fme_control: sequencer of the two-step fractional search.
//
// On start it latches the partition size (blk_w4 x blk_h4 blocks of 4x4) and
// loads the early-termination threshold, then runs the first step: the five
// PUs get the centre and the four half-pel diamond points, and the reference
// window is streamed as 4-pixel-wide column strips, H+6 rows each (3 margin
// rows above and below), one 10-pixel row segment per cycle.  Each row read
// carries a row tag telling the PUs which block row it is.  When the PUs
// report their costs the compare unit ranks them; if the best cost is under
// the early-termination threshold the result is final, otherwise the second
// step streams the window again with the case's 3 or 4 quarter-pel
// candidates, and a final comparison against the step-1 winner gives the
// result.  done pulses for one cycle with mv, cost, the case taken (CASE_NONE
// when terminated early) and early_term.
// Timing: a step takes blk_w4*(4*blk_h4+6) feed cycles plus 11 cycles of
// pipeline drain and decision; done follows one cycle after the last one.
// The step order and the step-level termination follow the document; the
// strip order, the tags and the handshake (start / done) are this design's.
module fme_control
  import fme_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic [2:0] blk_w4,
  input  logic [2:0] blk_h4,
  output logic busy,
  // reference window read (row segment) and its tag, one cycle later
  output logic [4:0] ref_rd_row,
  output logic [4:0] ref_rd_col,
  output row_tag_t tag,
  // candidates of the five PUs
  output qmv_t cand [NPU],
  // PU results (all PUs run in lock step)
  input  cost_t pu_cost [NPU],
  input  logic  pu_cost_valid,
  // compare-and-determine unit
  output cost_t cmp_cost [NPU],
  output logic  cmp_mask [NPU],
  input  logic [2:0] cmp_best,
  input  cost_t cmp_best_cost,
  input  fme_case_e cmp_case,
  input  qmv_t cmp_pat [4],
  input  logic cmp_pat_valid [4],
  // early termination unit
  output logic et_load,
  input  logic et_terminate,
  // result
  output logic done,
  output qmv_t mv,
  output cost_t cost,
  output fme_case_e step2_case,
  output logic early_term
);
  typedef enum logic [2:0] {S_IDLE, S_FEED, S_DRAIN, S_DECIDE, S_FINAL} state_e;
  state_e state;
  logic step;                 // 0: first step, 1: second step
  logic [2:0] w4, h4;
  logic [1:0] strip;
  logic [4:0] row;            // 0 .. 4*h4+5
  cost_t costs [NPU];
  logic  pmask [NPU];
  qmv_t  best1_pos;
  cost_t best1_cost;
  row_tag_t tag_c;
  logic [4:0] r;

  assign busy = (state != S_IDLE);
  assign et_load = (state == S_IDLE) && start;
  assign ref_rd_row = row;
  assign ref_rd_col = {1'b0, strip, 2'b00};

  // row tag of the row being read
  always_comb begin
    r = row - 5'd3;
    tag_c.v       = (state == S_FEED) && row >= 5'd3 && row < {h4[2:0], 2'b00} + 5'd3;
    tag_c.brow    = r[1:0];
    tag_c.first   = (strip == 2'd0) && r < 5'd4;
    tag_c.last    = ({1'b0, strip} == w4 - 3'd1) && r >= {h4[2:0], 2'b00} - 5'd4;
    tag_c.cur_row = r[3:0];
    tag_c.x4      = strip;
  end

  // compare-unit inputs: step-1 costs, or step-2 costs (PUs 1..4) with the
  // step-1 winner in slot 0, so that it wins ties
  always_comb begin
    for (int p = 0; p < NPU; p++) begin
      cmp_cost[p] = costs[p];
      cmp_mask[p] = (state == S_FINAL) ? pmask[p] : 1'b1;
    end
    if (state == S_FINAL) begin
      cmp_cost[0] = best1_cost;
      cmp_mask[0] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      step <= 1'b0;
      w4 <= 3'd1; h4 <= 3'd1;
      strip <= '0; row <= '0;
      tag <= '0;
      done <= 1'b0;
      mv <= '0; cost <= '0; step2_case <= CASE_NONE; early_term <= 1'b0;
      best1_pos <= '0; best1_cost <= '0;
      for (int p = 0; p < NPU; p++) begin
        cand[p] <= '0; costs[p] <= '0; pmask[p] <= 1'b0;
      end
    end else begin
      done <= 1'b0;
      tag <= tag_c;
      unique case (state)
        S_IDLE: if (start) begin
          w4 <= blk_w4; h4 <= blk_h4;
          step <= 1'b0;
          strip <= '0; row <= '0;
          for (int p = 0; p < NPU; p++) begin
            cand[p] <= step1_pos(3'(p));
            pmask[p] <= 1'b1;
          end
          state <= S_FEED;
        end
        S_FEED: begin
          if (row == {h4[2:0], 2'b00} + 5'd5) begin
            row <= '0;
            if ({1'b0, strip} == w4 - 3'd1) begin
              strip <= '0;
              state <= S_DRAIN;
            end else strip <= strip + 2'd1;
          end else row <= row + 5'd1;
        end
        S_DRAIN: if (pu_cost_valid) begin
          costs <= pu_cost;
          state <= step ? S_FINAL : S_DECIDE;
        end
        S_DECIDE: begin
          best1_pos  <= step1_pos(cmp_best);
          best1_cost <= cmp_best_cost;
          if (et_terminate) begin
            mv <= step1_pos(cmp_best);
            cost <= cmp_best_cost;
            step2_case <= CASE_NONE;
            early_term <= 1'b1;
            done <= 1'b1;
            state <= S_IDLE;
          end else begin
            step2_case <= cmp_case;
            early_term <= 1'b0;
            for (int p = 0; p < 4; p++) begin
              cand[p+1]  <= cmp_pat[p];
              pmask[p+1] <= cmp_pat_valid[p];
            end
            cand[0]  <= '0;
            pmask[0] <= 1'b0;
            step <= 1'b1;
            state <= S_FEED;
          end
        end
        S_FINAL: begin
          mv   <= (cmp_best == 3'd0) ? best1_pos : cand[cmp_best];
          cost <= cmp_best_cost;
          done <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
