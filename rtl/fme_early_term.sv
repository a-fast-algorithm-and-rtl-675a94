// fme_early_term: early-termination unit.
//
// Predicts an SATD threshold from the best integer-pel SAD of the partition
// and the quantisation parameter with the QP-adaptive piecewise-linear rule
//   SAD <= 500        : 1.25*SAD + 16*(QP-28) + 36
//   500 < SAD <= 1000 : SAD      + 16*(QP-28) + 161   (125 + 36)
//   SAD > 1000        : 0.75*SAD + 16*(QP-28) + 411   (375 + 36)
// using only shifts and adds (0.25*SAD is SAD >> 2, truncated).  As in the
// document's hardware variant, the test is made once per partition, after
// the first step: when the best step-1 SATD is below the threshold the
// second step is skipped.  The threshold is registered on load (start of a
// refinement); terminate is combinational from best_cost.  A threshold of
// zero or below never terminates.
module fme_early_term
  import fme_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  logic [SAD_W-1:0] sad,
  input  logic [QP_W-1:0] qp,
  input  cost_t best_cost,
  output logic signed [SAD_W+2:0] threshold,
  output logic terminate
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    threshold <= '0;
    else if (load) threshold <= et_threshold(sad, qp);
  end

  assign terminate = (threshold > 0) &&
                     ($signed({1'b0, best_cost}) < 21'(threshold));
endmodule
