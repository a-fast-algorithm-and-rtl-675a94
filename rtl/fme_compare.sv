// fme_compare: compare-and-determine unit.
//
// Ranks up to five candidate costs and returns the indices of the best,
// second and third ones (ties go to the lower index; masked-off entries rank
// last).  From the step-1 ranking (index 0 centre, 1 up, 2 left, 3 right,
// 4 down) it also determines the second-step case and its pattern of quarter-
// pel candidates, with u = unit quarter-pel step towards a half-pel point and
// p = the unit step perpendicular to it:
//   case 1  centre best, 2nd and 3rd opposite: u2-p, u2, u2+p (the three
//           quarter-pels between the centre and the 2nd best)
//   case 2  centre best, 2nd and 3rd perpendicular: u2, u3, u2+u3 ("L")
//   case 3  half-pel best, 2nd a perpendicular half-pel: d1+u2, u1+u2, d2+u1
//           (an "L" between the best two, its corner towards the centre)
//   case 4  otherwise: the four quarter-pels around the best half-pel d1
// The four cases and their conditions follow the document; the exact points
// of each pattern are this design's reading of its figures.  Purely
// combinational.  pat_valid marks the pattern entries in use (3 or 4).
module fme_compare
  import fme_pkg::*;
(
  input  cost_t cost [NPU],
  input  logic  mask [NPU],
  output logic [2:0] best,
  output logic [2:0] second,
  output logic [2:0] third,
  output cost_t best_cost,
  output fme_case_e step2_case,
  output qmv_t pat [4],
  output logic pat_valid [4]
);
  logic [2:0] rank [NPU];

  always_comb begin
    for (int i = 0; i < NPU; i++) begin
      rank[i] = '0;
      for (int j = 0; j < NPU; j++) begin
        if (j != i) begin
          if (!mask[i])
            rank[i] = rank[i] + 3'd1;          // masked entries sink to the bottom
          else if (mask[j] && (cost[j] < cost[i] || (cost[j] == cost[i] && j < i)))
            rank[i] = rank[i] + 3'd1;
        end
      end
    end
    best = 3'd0; second = 3'd0; third = 3'd0;
    for (int i = NPU - 1; i >= 0; i--) begin
      if (rank[i] == 3'd0) best   = 3'(i);
      if (rank[i] == 3'd1) second = 3'(i);
      if (rank[i] == 3'd2) third  = 3'(i);
    end
    best_cost = cost[best];
  end

  // pattern determination from the step-1 ranking
  qmv_t d1, d2, d3, u1, u2, u3, p2, p1;
  always_comb begin
    d1 = step1_pos(best);
    d2 = step1_pos(second);
    d3 = step1_pos(third);
    u1 = '{dx: d1.dx >>> 1, dy: d1.dy >>> 1};
    u2 = '{dx: d2.dx >>> 1, dy: d2.dy >>> 1};
    u3 = '{dx: d3.dx >>> 1, dy: d3.dy >>> 1};
    p1 = '{dx: u1.dy, dy: u1.dx};
    p2 = '{dx: u2.dy, dy: u2.dx};
    for (int k = 0; k < 4; k++) begin
      pat[k] = '0;
      pat_valid[k] = (k < 3);
    end
    if (best == 3'd0) begin
      if (step1_opposite(second, third)) begin
        step2_case = CASE_1;
        pat[0] = '{dx: u2.dx - p2.dx, dy: u2.dy - p2.dy};
        pat[1] = u2;
        pat[2] = '{dx: u2.dx + p2.dx, dy: u2.dy + p2.dy};
      end else begin
        step2_case = CASE_2;
        pat[0] = u2;
        pat[1] = u3;
        pat[2] = '{dx: u2.dx + u3.dx, dy: u2.dy + u3.dy};
      end
    end else if (second != 3'd0 && !step1_opposite(best, second)) begin
      step2_case = CASE_3;
      pat[0] = '{dx: d1.dx + u2.dx, dy: d1.dy + u2.dy};
      pat[1] = '{dx: u1.dx + u2.dx, dy: u1.dy + u2.dy};
      pat[2] = '{dx: d2.dx + u1.dx, dy: d2.dy + u1.dy};
    end else begin
      step2_case = CASE_4;
      pat[0] = '{dx: d1.dx + u1.dx, dy: d1.dy + u1.dy};
      pat[1] = '{dx: d1.dx - u1.dx, dy: d1.dy - u1.dy};
      pat[2] = '{dx: d1.dx + p1.dx, dy: d1.dy + p1.dy};
      pat[3] = '{dx: d1.dx - p1.dx, dy: d1.dy - p1.dy};
      pat_valid[3] = 1'b1;
    end
  end
endmodule
