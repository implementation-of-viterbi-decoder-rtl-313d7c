// acs_unit: add-compare-select for one trellis state.
//
// The state has two incoming branches: "upper" (decision 0) and "lower"
// (decision 1). Each candidate is the predecessor's path metric plus the
// branch metric. The smaller sum survives and is output as sum_out. decision
// tells which branch won. On a tie the upper branch wins (decision 0).
// Purely combinational.
//
// The add, compare and select and the tie rule (upper wins when the sums are
// equal) follow the design description.
module acs_unit
  import viterbi_pkg::*;
(
  input  pm_t  pm_upper,  // path metric of the upper predecessor
  input  pm_t  pm_lower,  // path metric of the lower predecessor
  input  bm_t  bm_upper,  // branch metric of the upper branch
  input  bm_t  bm_lower,  // branch metric of the lower branch
  output sum_t sum_out,   // surviving (smaller) candidate
  output logic decision   // 0: upper branch survives, 1: lower branch
);

  sum_t sum_upper, sum_lower;

  always_comb begin
    sum_upper = sum_t'(pm_upper) + sum_t'(bm_upper);
    sum_lower = sum_t'(pm_lower) + sum_t'(bm_lower);
    if (sum_upper <= sum_lower) begin
      sum_out  = sum_upper;
      decision = 1'b0;
    end else begin
      sum_out  = sum_lower;
      decision = 1'b1;
    end
  end

endmodule
