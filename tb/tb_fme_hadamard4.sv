// tb_fme_hadamard4: checks the 4-point Hadamard transform against the matrix
// definition for corner values and random vectors.
module tb_fme_hadamard4;
  import fme_tb_model::*;
  logic signed [8:0]  x [4];
  logic signed [10:0] y [4];
  int checks = 0, failures = 0;

  fme_hadamard4 #(.IN_W(9)) dut (.x, .y);

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    for (int t = 0; t < 500; t++) begin
      for (int k = 0; k < 4; k++)
        x[k] = (t < 16) ? ((t >> k) & 1 ? 9'sd255 : -9'sd255) : 9'(int'($urandom_range(0, 510)) - 255);
      #1;
      for (int i = 0; i < 4; i++) begin
        e = 0;
        for (int k = 0; k < 4; k++) e += hmat(i, k) * int'(x[k]);
        checks++;
        if (int'(y[i]) != e) begin
          failures++;
          $display("FAIL t%0d y[%0d]=%0d expected %0d", t, i, y[i], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
