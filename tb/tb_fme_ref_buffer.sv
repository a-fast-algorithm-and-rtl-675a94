// tb_fme_ref_buffer: fills the reference window with random pixels and reads
// back every 10-pixel segment, checking the one-cycle read latency and the
// zero fill past the last column.
module tb_fme_ref_buffer;
  import fme_pkg::*;
  logic clk = 0, wr_en = 0;
  logic [4:0] wr_row, wr_col, rd_row, rd_col;
  pix_t wr_data;
  pix_t rd_seg [10];
  int checks = 0, failures = 0;
  int img [22][22];

  fme_ref_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    rd_row = 0; rd_col = 0;
    for (int pass = 0; pass < 2; pass++) begin
      for (int y = 0; y < 22; y++)
        for (int x = 0; x < 22; x++) begin
          img[y][x] = $urandom_range(0, 255);
          @(negedge clk);
          wr_en = 1; wr_row = 5'(y); wr_col = 5'(x); wr_data = 8'(img[y][x]);
        end
      @(negedge clk);
      wr_en = 0;
      for (int y = 0; y < 22; y++)
        for (int x0 = 0; x0 <= 16; x0 += 4) begin
          rd_row = 5'(y); rd_col = 5'(x0);
          @(negedge clk);
          rd_row = 5'(21 - y);     // next address must not disturb this result
          for (int k = 0; k < 10; k++) begin
            e = (x0 + k < 22) ? img[y][x0 + k] : 0;
            checks++;
            if (int'(rd_seg[k]) != e) begin
              failures++;
              $display("FAIL row %0d col %0d: %0d expected %0d", y, x0 + k, rd_seg[k], e);
            end
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
