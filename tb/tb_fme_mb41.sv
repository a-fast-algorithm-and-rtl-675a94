// tb_fme_mb41: refines all 41 partitions of one 16x16 macroblock (one 16x16,
// two 16x8, two 8x16, four 8x8, eight 8x4, eight 4x8, sixteen 4x4), each
// with its own reference window cut from a 22x22 reference area, and checks
// every result against the model.  With the threshold disabled (SAD 0, QP 0)
// every partition runs both steps, and the compute cycles of the macroblock
// (start to done, summed) must equal the worst case of 2607 cycles.  A second
// pass with a generous threshold must need fewer cycles.
module tb_fme_mb41;
  import fme_pkg::*;
  import fme_tb_model::*;

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
  int area [WN][WN];     // reference area around the macroblock, offset 3
  int mb [16][16];

  initial begin
    repeat (2_000_000) @(posedge clk);
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

  // refine the partition at (oy, ox) of size hp x wp; returns compute cycles
  task automatic part(input int oy, input int ox, input int hp, input int wp,
                      input int sad, input int q, output int cyc);
    win_t w;
    blk_t cur;
    result_t exp;
    for (int y = 0; y < WN; y++)
      for (int x = 0; x < WN; x++)
        w[y][x] = (y < hp + 6 && x < wp + 6) ? area[oy + y][ox + x] : 0;
    for (int y = 0; y < 16; y++)
      for (int x = 0; x < 16; x++)
        cur[y][x] = (y < hp && x < wp) ? mb[oy + y][ox + x] : 0;
    exp = search(w, cur, wp, hp, sad, q);
    @(negedge clk);
    for (int y = 0; y < hp + 6; y++)
      for (int x = 0; x < wp + 6; x++) begin
        ref_wr_en = 1; ref_wr_row = 5'(y); ref_wr_col = 5'(x); ref_wr_data = 8'(w[y][x]);
        @(negedge clk);
      end
    ref_wr_en = 0;
    for (int y = 0; y < hp; y++)
      for (int x = 0; x < wp; x++) begin
        cur_wr_en = 1; cur_wr_row = 4'(y); cur_wr_col = 4'(x); cur_wr_data = 8'(cur[y][x]);
        @(negedge clk);
      end
    cur_wr_en = 0;
    blk_w4 = 3'(wp / 4); blk_h4 = 3'(hp / 4); int_sad = 16'(sad); qp = 6'(q);
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    chk($sformatf("%0dx%0d@(%0d,%0d) dy", wp, hp, oy, ox), int'(mv.dy), exp.dy);
    chk($sformatf("%0dx%0d@(%0d,%0d) dx", wp, hp, oy, ox), int'(mv.dx), exp.dx);
    chk($sformatf("%0dx%0d@(%0d,%0d) cost", wp, hp, oy, ox), int'(cost), exp.cost);
    chk($sformatf("%0dx%0d@(%0d,%0d) case", wp, hp, oy, ox), int'(step2_case), exp.ncase);
  endtask

  initial begin
    int sw [7], sh [7], total, c, nparts, totals [2];
    sw = '{16, 16, 8, 8, 8, 4, 4};
    sh = '{16, 8, 16, 8, 4, 8, 4};
    for (int y = 0; y < WN; y++)
      for (int x = 0; x < WN; x++)
        area[y][x] = clip1(60 + 5 * x + 3 * y + int'($urandom_range(0, 40)) + ((x * y) % 7) * 6);
    // the macroblock: the area shifted by a quarter pel right and down
    for (int y = 0; y < 16; y++)
      for (int x = 0; x < 16; x++)
        mb[y][x] = sample(area, 4 * y + 1, 4 * x + 1);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      total = 0; nparts = 0;
      for (int s = 0; s < 7; s++)
        for (int oy = 0; oy < 16; oy += sh[s])
          for (int ox = 0; ox < 16; ox += sw[s]) begin
            part(oy, ox, sh[s], sw[s], pass ? 2000 : 0, pass ? 40 : 0, c);
            total += c;
            nparts++;
          end
      totals[pass] = total;
      chk("partitions", nparts, 41);
      $display("pass %0d: %0d compute cycles per macroblock", pass, total);
    end
    chk("worst-case cycles per macroblock", totals[0], 2607);
    chk("early termination saves cycles", totals[1] < totals[0], 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
