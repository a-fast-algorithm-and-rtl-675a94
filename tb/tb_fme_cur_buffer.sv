// tb_fme_cur_buffer: writes a random 16x16 block and reads back every
// four-pixel group, one cycle after its address.
module tb_fme_cur_buffer;
  import fme_pkg::*;
  logic clk = 0, wr_en = 0;
  logic [3:0] wr_row, wr_col, rd_row;
  logic [1:0] rd_x4;
  pix_t wr_data;
  pix_t rd_pix [4];
  int checks = 0, failures = 0;
  int img [16][16];

  fme_cur_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_row = 0; rd_x4 = 0;
    for (int pass = 0; pass < 3; pass++) begin
      for (int y = 0; y < 16; y++)
        for (int x = 0; x < 16; x++) begin
          img[y][x] = $urandom_range(0, 255);
          @(negedge clk);
          wr_en = 1; wr_row = 4'(y); wr_col = 4'(x); wr_data = 8'(img[y][x]);
        end
      @(negedge clk);
      wr_en = 0;
      for (int y = 0; y < 16; y++)
        for (int x4 = 0; x4 < 4; x4++) begin
          rd_row = 4'(y); rd_x4 = 2'(x4);
          @(negedge clk);
          rd_row = 4'(15 - y);
          for (int k = 0; k < 4; k++) begin
            checks++;
            if (int'(rd_pix[k]) != img[y][4 * x4 + k]) begin
              failures++;
              $display("FAIL (%0d,%0d)", y, 4 * x4 + k);
            end
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
