// fme_hadamard4: 4-point 1-D Hadamard transform (butterfly form).
//
// y0 = a+b+c+d, y1 = a+b-c-d, y2 = a-b-c+d, y3 = a-b+c-d, computed with two
// layers of four adders/subtractors.  Purely combinational; the output is
// two bits wider than the input.  Two of these, one for rows and one for
// columns, make up the 2-D transform of a processing unit, as in the
// document; the output order is this design's (it does not affect SATD).
module fme_hadamard4 #(
  parameter int unsigned IN_W = 9
) (
  input  logic signed [IN_W-1:0]   x [4],
  output logic signed [IN_W+1:0]   y [4]
);
  logic signed [IN_W:0] s0, s1, d0, d1;
  always_comb begin
    s0 = (IN_W+1)'(x[0]) + (IN_W+1)'(x[1]);
    s1 = (IN_W+1)'(x[2]) + (IN_W+1)'(x[3]);
    d0 = (IN_W+1)'(x[0]) - (IN_W+1)'(x[1]);
    d1 = (IN_W+1)'(x[2]) - (IN_W+1)'(x[3]);
    y[0] = (IN_W+2)'(s0) + (IN_W+2)'(s1);
    y[1] = (IN_W+2)'(s0) - (IN_W+2)'(s1);
    y[2] = (IN_W+2)'(d0) - (IN_W+2)'(d1);
    y[3] = (IN_W+2)'(d0) + (IN_W+2)'(d1);
  end
endmodule
