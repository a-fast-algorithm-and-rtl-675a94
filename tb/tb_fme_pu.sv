// tb_fme_pu: checks the processing unit's partition SATD against the model.
// Partitions of 1, 2, 4, 8 and 16 blocks are fed back to back (so that the
// column phase of one partition overlaps the first rows of the next) and with
// random idle cycles between rows; cost_valid must come exactly five cycles
// after the last row.
module tb_fme_pu;
  import fme_pkg::*;
  import fme_tb_model::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_last = 0;
  logic [1:0] in_brow = 0;
  pix_t cur [4], refp [4];
  logic cost_valid;
  cost_t cost;
  int checks = 0, failures = 0;
  int exp_q [$];
  int last_cyc_q [$];
  int cyc = 0;

  fme_pu dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // result monitor
  always @(posedge clk) begin
    if (rst_n && cost_valid) begin
      checks += 2;
      if (exp_q.size() == 0) begin
        failures += 2;
        $display("FAIL unexpected cost_valid");
      end else begin
        int e, lc;
        e = exp_q.pop_front();
        lc = last_cyc_q.pop_front();
        if (int'(cost) != e) begin
          failures++;
          $display("FAIL cost %0d expected %0d", cost, e);
        end
        if (cyc - lc != 5) begin
          failures++;
          $display("FAIL latency %0d", cyc - lc);
        end
      end
    end
  end

  initial begin
    int nb, d [4][4], e, gaps;
    int sizes [5] = '{1, 2, 4, 8, 16};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      nb = sizes[t % 5];
      gaps = (t % 3 == 0);
      e = 0;
      for (int b = 0; b < nb; b++) begin
        int extreme;
        extreme = (t == 7);   // all-255 minus all-0: largest coefficients
        for (int r = 0; r < 4; r++) begin
          for (int k = 0; k < 4; k++) begin
            cur[k]  = extreme ? 8'd255 : 8'($urandom_range(0, 255));
            refp[k] = extreme ? 8'd0   : 8'($urandom_range(0, 255));
            d[r][k] = int'(cur[k]) - int'(refp[k]);
          end
          in_valid = 1; in_brow = 2'(r);
          in_first = (b == 0); in_last = (b == nb - 1);
          if (b == nb - 1 && r == 3) begin
            e += satd4(d);
            exp_q.push_back(e);
            last_cyc_q.push_back(cyc + 1);
          end
          @(negedge clk);
          in_valid = 0;
          if (gaps) repeat ($urandom_range(0, 3)) @(negedge clk);
        end
        if (b != nb - 1) e += satd4(d);
      end
    end
    repeat (10) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
