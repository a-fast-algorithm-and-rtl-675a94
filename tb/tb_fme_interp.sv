// tb_fme_interp: streams random 10-pixel rows into the interpolation unit and
// checks every half-pel grid window against the H.264 sample equations of the
// model, and that each window appears with the tag of its centre row six
// cycles after that row went in.
module tb_fme_interp;
  import fme_pkg::*;
  import fme_tb_model::*;
  logic clk = 0, rst_n = 0;
  pix_t in_seg [10];
  logic [7:0] in_tag, out_tag;
  pix_t win [HG_ROWS][HG_COLS];
  int checks = 0, failures = 0;
  win_t w;

  fme_interp #(.TAG_BITS(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ctr, e, bad;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 20; trial++) begin
      for (int y = 0; y < WN; y++)
        for (int x = 0; x < WN; x++)
          w[y][x] = (x < 10) ? ((trial == 0) ? ((x + y) % 2) * 255 : int'($urandom_range(0, 255))) : 0;
      for (int j = 0; j < WN; j++) begin
        for (int k = 0; k < 10; k++) in_seg[k] = 8'(w[j][k]);
        in_tag = 8'(j);
        @(negedge clk);
        // window centred on row j-5 is out now
        ctr = j - 5;
        if (ctr >= 5 && ctr <= 15) begin
          checks++;
          if (int'(out_tag) != ctr) begin
            failures++;
            $display("FAIL tag %0d expected %0d", out_tag, ctr);
          end
          bad = 0;
          for (int r = 0; r < HG_ROWS; r++)
            for (int c = 0; c < HG_COLS; c++) begin
              e = sample(w, 4 * (ctr - 3) + 2 * (r - 2), 2 * (c - 2));
              checks++;
              if (int'(win[r][c]) != e) begin
                failures++;
                if (bad++ < 5) $display("FAIL t%0d ctr %0d win[%0d][%0d]=%0d expected %0d",
                                        trial, ctr, r, c, win[r][c], e);
              end
            end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
