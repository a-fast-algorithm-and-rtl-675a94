// tb_fme_compare: checks the ranking (with ties and masked entries) and the
// step-2 case and pattern for every ordering of the five step-1 points
// against the model's geometric description of the four cases.
module tb_fme_compare;
  import fme_pkg::*;
  import fme_tb_model::*;
  cost_t cost [NPU];
  logic  mask [NPU];
  logic [2:0] best, second, third;
  cost_t best_cost;
  fme_case_e step2_case;
  qmv_t pat [4];
  logic pat_valid [4];
  int checks = 0, failures = 0;

  fme_compare dut (.*);

  initial begin
    #1000000;
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

  initial begin
    int c [5], m [5], ord [5], t, n, ncase, cy [4], cx [4], nm;
    // random costs with many ties, random masks
    for (int it = 0; it < 2000; it++) begin
      nm = 0;
      for (int i = 0; i < 5; i++) begin
        c[i] = (it % 2) ? $urandom_range(0, 4) : $urandom_range(0, 100000);
        m[i] = (it < 1000) ? 1 : $urandom_range(0, 1);
        if (i == 4 && nm < 3) m[i] = 1;
        nm += m[i];
        cost[i] = cost_t'(c[i]);
        mask[i] = m[i][0];
        ord[i] = i;
      end
      // masked entries last; among valid ones ascending cost, then index
      for (int i = 0; i < 5; i++)
        for (int k = i + 1; k < 5; k++)
          if ((m[ord[k]] && !m[ord[i]]) ||
              (m[ord[k]] == m[ord[i]] && (c[ord[k]] < c[ord[i]] ||
                                          (c[ord[k]] == c[ord[i]] && ord[k] < ord[i])))) begin
            t = ord[i]; ord[i] = ord[k]; ord[k] = t;
          end
      #1;
      chk("best", best, ord[0]);
      if (nm >= 2) chk("second", second, ord[1]);
      if (nm >= 3) chk("third", third, ord[2]);
      chk("best_cost", best_cost, c[ord[0]]);
      // pattern for this ordering (only meaningful with all five valid)
      if (it < 1000) begin
        pattern(ord[0], ord[1], ord[2], ncase, cy, cx, n);
        chk("case", int'(step2_case), ncase);
        for (int k = 0; k < 4; k++) begin
          chk("pat_valid", pat_valid[k], k < n);
          if (k < n) begin
            chk($sformatf("pat%0d.dy", k), int'(pat[k].dy), cy[k]);
            chk($sformatf("pat%0d.dx", k), int'(pat[k].dx), cx[k]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
