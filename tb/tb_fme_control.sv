// tb_fme_control: runs the controller with the real compare unit and
// tb-driven PU results and early-termination decisions.  Checks the strip /
// row read order and the row tags of both steps cycle by cycle, the step-1
// and step-2 candidates, the early-termination exit, the final choice
// (step-1 winner kept on ties) and the done timing.
module tb_fme_control;
  import fme_pkg::*;
  import fme_tb_model::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [2:0] blk_w4, blk_h4;
  logic busy;
  logic [4:0] ref_rd_row, ref_rd_col;
  row_tag_t tag;
  qmv_t cand [NPU];
  cost_t pu_cost [NPU];
  logic pu_cost_valid = 0;
  cost_t cmp_cost [NPU];
  logic cmp_mask [NPU];
  logic [2:0] cmp_best, cmp_second, cmp_third;
  cost_t cmp_best_cost;
  fme_case_e cmp_case;
  qmv_t cmp_pat [4];
  logic cmp_pat_valid [4];
  logic et_load, et_terminate = 0;
  logic done, early_term;
  qmv_t mv;
  cost_t cost;
  fme_case_e step2_case;
  int checks = 0, failures = 0;
  int n_term = 0, n_two = 0;

  fme_control dut (.*);
  fme_compare u_cmp (.cost(cmp_cost), .mask(cmp_mask), .best(cmp_best), .second(cmp_second),
                     .third(cmp_third), .best_cost(cmp_best_cost), .step2_case(cmp_case),
                     .pat(cmp_pat), .pat_valid(cmp_pat_valid));
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // one step's reads: address each cycle, tag one cycle later
  task automatic feed_check(input int w4, input int h4);
    int H, n, i, s, pi, ps, r;
    H = 4 * h4;
    n = w4 * (H + 6);
    for (int k = 0; k <= n; k++) begin
      if (k < n) begin
        s = k / (H + 6); i = k % (H + 6);
        chk("rd_row", ref_rd_row, i);
        chk("rd_col", ref_rd_col, 4 * s);
      end
      if (k > 0) begin
        ps = (k - 1) / (H + 6); pi = (k - 1) % (H + 6); r = pi - 3;
        chk("tag.v", tag.v, pi >= 3 && pi < H + 3);
        if (pi >= 3 && pi < H + 3) begin
          chk("tag.brow", tag.brow, r % 4);
          chk("tag.cur_row", tag.cur_row, r);
          chk("tag.x4", tag.x4, ps);
          chk("tag.first", tag.first, ps == 0 && r < 4);
          chk("tag.last", tag.last, ps == w4 - 1 && r >= H - 4);
        end
      end
      @(negedge clk);
    end
  endtask

  initial begin
    int w4, h4, c1 [5], c2 [5], ord [5], t, ncase, n, cy [4], cx [4];
    int bdy, bdx, bc, py [5], pxx [5];
    py  = '{0, -2, 0, 0, 2};
    pxx = '{0, 0, -2, 2, 0};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 60; trial++) begin
      w4 = 1 << (trial % 3); h4 = 1 << ((trial / 3) % 3);
      et_terminate = (trial % 4 == 3);
      blk_w4 = 3'(w4); blk_h4 = 3'(h4);
      start = 1;
      #1;
      chk("et_load", et_load, 1);
      @(negedge clk);
      start = 0;
      chk("busy", busy, 1);
      for (int p = 0; p < NPU; p++) begin
        chk("step1 cand dy", int'(cand[p].dy), py[p]);
        chk("step1 cand dx", int'(cand[p].dx), pxx[p]);
      end
      feed_check(w4, h4);
      repeat ($urandom_range(0, 4)) @(negedge clk);
      for (int p = 0; p < NPU; p++) begin
        c1[p] = (trial % 2) ? $urandom_range(0, 3) : $urandom_range(0, 5000);
        pu_cost[p] = cost_t'(c1[p]);
        ord[p] = p;
      end
      for (int i = 0; i < 5; i++)
        for (int k = i + 1; k < 5; k++)
          if (c1[ord[k]] < c1[ord[i]] || (c1[ord[k]] == c1[ord[i]] && ord[k] < ord[i])) begin
            t = ord[i]; ord[i] = ord[k]; ord[k] = t;
          end
      pu_cost_valid = 1;
      @(negedge clk);
      pu_cost_valid = 0;
      @(negedge clk);                  // decision cycle
      if (et_terminate) begin
        n_term++;
        chk("done (terminated)", done, 1);
        chk("early_term", early_term, 1);
        chk("mv.dy", int'(mv.dy), py[ord[0]]);
        chk("mv.dx", int'(mv.dx), pxx[ord[0]]);
        chk("cost", int'(cost), c1[ord[0]]);
        chk("case", int'(step2_case), 0);
      end else begin
        n_two++;
        chk("done too early", done, 0);
        pattern(ord[0], ord[1], ord[2], ncase, cy, cx, n);
        for (int k = 0; k < n; k++) begin
          chk("step2 cand dy", int'(cand[k + 1].dy), cy[k]);
          chk("step2 cand dx", int'(cand[k + 1].dx), cx[k]);
        end
        feed_check(w4, h4);
        bdy = py[ord[0]]; bdx = pxx[ord[0]]; bc = c1[ord[0]];
        for (int p = 0; p < NPU; p++) begin
          c2[p] = (p == 0 || p > n) ? 0 : (trial % 2 ? bc - 1 + int'($urandom_range(0, 2))
                                                     : $urandom_range(0, 5000));
          if (c2[p] < 0) c2[p] = 0;
          pu_cost[p] = cost_t'(c2[p]);
          if (p >= 1 && p <= n && c2[p] < bc) begin
            bc = c2[p]; bdy = cy[p - 1]; bdx = cx[p - 1];
          end
        end
        pu_cost_valid = 1;
        @(negedge clk);
        pu_cost_valid = 0;
        @(negedge clk);                // final comparison
        chk("done", done, 1);
        chk("early_term", early_term, 0);
        chk("case", int'(step2_case), ncase);
        chk("mv.dy", int'(mv.dy), bdy);
        chk("mv.dx", int'(mv.dx), bdx);
        chk("cost", int'(cost), bc);
      end
      @(negedge clk);
      chk("idle", busy, 0);
      chk("done pulse", done, 0);
    end
    chk("both exits taken", n_term > 0 && n_two > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
