// tb_fme_early_term: checks the threshold on all three SAD segments and their
// boundaries over the QP range, and the terminate decision for costs just
// below, at and above the threshold.
module tb_fme_early_term;
  import fme_pkg::*;
  import fme_tb_model::*;
  logic clk = 0, rst_n = 0, load = 0;
  logic [SAD_W-1:0] sad;
  logic [QP_W-1:0] qp;
  cost_t best_cost;
  logic signed [SAD_W+2:0] threshold;
  logic terminate;
  int checks = 0, failures = 0;

  fme_early_term dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int s, q, th, bc;
    int edges [8] = '{0, 3, 499, 500, 501, 1000, 1001, 1003};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 1000; it++) begin
      s = (it < 8 * 6) ? edges[it % 8] : $urandom_range(0, 6000);
      q = (it < 8 * 6) ? (it / 8) * 10 : $urandom_range(0, 51);
      sad = 16'(s); qp = 6'(q);
      load = 1;
      @(negedge clk);
      load = 0;
      sad = 16'($urandom);       // must not matter after load
      th = fme_tb_model::threshold(s, q);
      checks++;
      if (int'(threshold) != th) begin
        failures++;
        $display("FAIL threshold sad %0d qp %0d: %0d expected %0d", s, q, threshold, th);
      end
      for (int d = -1; d <= 1; d++) begin
        bc = th + d;
        if (bc < 0) bc = 0;
        best_cost = cost_t'(bc);
        #1;
        checks++;
        if (terminate != (th > 0 && bc < th)) begin
          failures++;
          $display("FAIL terminate th %0d cost %0d", th, bc);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
