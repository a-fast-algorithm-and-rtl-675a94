// tb_fme_top: end-to-end test of the FME engine at its default size.
//
// Each trial builds a smooth random reference window, makes the original block
// a quarter-pel shifted copy of it (plus noise), loads both, runs one
// refinement and compares mv, cost, case and early termination with the
// reference model in fme_tb_model.  All seven H.264 partition shapes are used.
// The start-to-done cycle count is checked against
// steps * (w4*(4*h4+6) + 11) + 1.  Every mechanism (cases 1-4, early
// termination, each partition shape) must occur at least once.
module tb_fme_top;
  import fme_pkg::*;
  import fme_tb_model::*;

  localparam int NTRIALS = 140;

  logic clk = 0, rst_n = 0;
  logic cur_wr_en = 0, ref_wr_en = 0;
  logic [3:0] cur_wr_row, cur_wr_col;
  logic [4:0] ref_wr_row, ref_wr_col;
  pix_t cur_wr_data, ref_wr_data;
  logic start = 0;
  logic [2:0] blk_w4, blk_h4;
  logic [SAD_W-1:0] int_sad;
  logic [QP_W-1:0] qp;
  logic busy, done, early_term;
  qmv_t mv;
  cost_t cost;
  fme_case_e step2_case;

  fme_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int case_seen [5];
  int shape_seen [7];
  win_t w;
  blk_t cur;

  initial begin
    repeat (2_000_000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run_one(input int t, input int wp, input int hp, input int ty, input int tx,
                         input int noise, input int sad, input int q);
    result_t exp;
    int cyc, steps;
    int gx, gy, base;
    // smooth texture: ramps plus a few bumps plus noise
    gx = $urandom_range(0, 12) - 6; gy = $urandom_range(0, 12) - 6;
    base = $urandom_range(40, 200);
    for (int y = 0; y < WN; y++)
      for (int x = 0; x < WN; x++)
        w[y][x] = clip1(base + gx * x + gy * y + int'($urandom_range(0, 60)) - 30
                        + ((((x / 3) + (y / 2)) % 2) == 0 ? 25 : -25));
    for (int y = 0; y < 16; y++)
      for (int x = 0; x < 16; x++)
        cur[y][x] = clip1(sample(w, 4*y + ty, 4*x + tx) + int'($urandom_range(0, 2*noise)) - noise);
    exp = search(w, cur, wp, hp, sad, q);

    @(negedge clk);
    for (int y = 0; y < WN; y++)
      for (int x = 0; x < WN; x++) begin
        ref_wr_en = 1; ref_wr_row = 5'(y); ref_wr_col = 5'(x); ref_wr_data = 8'(w[y][x]);
        @(negedge clk);
      end
    ref_wr_en = 0;
    for (int y = 0; y < 16; y++)
      for (int x = 0; x < 16; x++) begin
        cur_wr_en = 1; cur_wr_row = 4'(y); cur_wr_col = 4'(x); cur_wr_data = 8'(cur[y][x]);
        @(negedge clk);
      end
    cur_wr_en = 0;
    blk_w4 = 3'(wp / 4); blk_h4 = 3'(hp / 4);
    int_sad = 16'(sad); qp = 6'(q);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    check($sformatf("t%0d mv.dy", t), int'(mv.dy), exp.dy);
    check($sformatf("t%0d mv.dx", t), int'(mv.dx), exp.dx);
    check($sformatf("t%0d cost", t), int'(cost), exp.cost);
    check($sformatf("t%0d case", t), int'(step2_case), exp.ncase);
    check($sformatf("t%0d early", t), int'(early_term), exp.ncase == 0);
    steps = (exp.ncase == 0) ? 1 : 2;
    check($sformatf("t%0d cycles", t), cyc, steps * ((wp / 4) * (hp + 6) + 11) + 1);
    case_seen[exp.ncase]++;
  endtask

  initial begin
    int shapes_w [7], shapes_h [7];
    int s, sad, q;
    shapes_w = '{16, 16, 8, 8, 8, 4, 4};
    shapes_h = '{16, 8, 16, 8, 4, 8, 4};
    for (int i = 0; i < 5; i++) case_seen[i] = 0;
    for (int i = 0; i < 7; i++) shape_seen[i] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < NTRIALS; t++) begin
      s = t % 7;
      if (t % 5 == 4) begin sad = 4000; q = 40; end      // generous threshold
      else if (t % 5 == 2) begin sad = $urandom_range(0, 3000); q = $urandom_range(0, 51); end
      else begin sad = $urandom_range(0, 300); q = $urandom_range(0, 20); end
      run_one(t, shapes_w[s], shapes_h[s], $urandom_range(0, 6) - 3, $urandom_range(0, 6) - 3,
              $urandom_range(0, 3), sad, q);
      shape_seen[s]++;
    end
    for (int i = 0; i < 5; i++) begin
      $display("case %0d seen %0d times", i, case_seen[i]);
      checks++;
      if (case_seen[i] == 0) begin
        failures++;
        $display("FAIL: case %0d never exercised", i);
      end
    end
    for (int i = 0; i < 7; i++) begin
      checks++;
      if (shape_seen[i] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
