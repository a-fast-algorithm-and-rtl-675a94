// tb_fme_select: fills the half-pel grid window from a random integer window
// with the model's H.264 samples, gives the five PUs random quarter-pel
// offsets (every offset in -3..+3 appears), and checks the selected samples
// of each PU one cycle later against the model's quarter-pel samples.
module tb_fme_select;
  import fme_pkg::*;
  import fme_tb_model::*;
  logic clk = 0, rst_n = 0;
  pix_t win [HG_ROWS][HG_COLS];
  qmv_t cand [NPU];
  row_tag_t in_tag, out_tag;
  pix_t ref_pix [NPU][4];
  int checks = 0, failures = 0;
  win_t w;

  fme_select dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int R, e, dy [NPU], dx [NPU];
    repeat (2) @(negedge clk);
    rst_n = 1;
    R = 4;
    for (int t = 0; t < 300; t++) begin
      for (int y = 0; y < WN; y++)
        for (int x = 0; x < WN; x++) w[y][x] = $urandom_range(0, 255);
      for (int r = 0; r < HG_ROWS; r++)
        for (int c = 0; c < HG_COLS; c++)
          win[r][c] = 8'(sample(w, 4 * R + 2 * (r - 2), 2 * (c - 2)));
      for (int p = 0; p < NPU; p++) begin
        // sweep all 49 offsets with PU 0, random ones with the others
        dy[p] = (p == 0) ? (t / 7) % 7 - 3 : int'($urandom_range(0, 6)) - 3;
        dx[p] = (p == 0) ? t % 7 - 3       : int'($urandom_range(0, 6)) - 3;
        cand[p] = '{dx: 3'(dx[p]), dy: 3'(dy[p])};
      end
      in_tag = row_tag_t'($urandom);
      @(negedge clk);
      checks++;
      if (out_tag != in_tag) failures++;
      for (int p = 0; p < NPU; p++)
        for (int k = 0; k < 4; k++) begin
          e = sample(w, 4 * R + dy[p], 4 * k + dx[p]);
          checks++;
          if (int'(ref_pix[p][k]) != e) begin
            failures++;
            $display("FAIL t%0d pu%0d px%0d (dy %0d dx %0d): %0d expected %0d",
                     t, p, k, dy[p], dx[p], ref_pix[p][k], e);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
