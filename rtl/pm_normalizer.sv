// pm_normalizer: minimum search and path metric normalisation.
//
// Scans the four new path metrics in state order 0..3 and keeps the first
// strictly smaller value, so on a tie the lowest-numbered state wins. The
// state holding the minimum is best_state, where traceback starts. Every
// metric minus the minimum is the normalised metric for the next symbol,
// which keeps the metrics bounded without changing their differences.
// Purely combinational.
//
// The scan order, the tie rule and the subtraction follow the design
// description. The normalised values fit PM_W bits for this code (see
// viterbi_pkg); the decoder asserts that on every clock.
module pm_normalizer
  import viterbi_pkg::*;
(
  input  sum_vec_t sum_in,      // new path metrics, one per state
  output pm_vec_t  pm_out,      // sum_in minus the minimum
  output state_t   best_state,  // lowest-numbered state with the minimum
  output sum_t     min_value    // the minimum itself
);

  always_comb begin
    min_value  = sum_in[0];
    best_state = '0;
    for (int s = 1; s < NUM_STATES; s++) begin
      if (sum_in[s] < min_value) begin
        min_value  = sum_in[s];
        best_state = state_t'(s);
      end
    end
    for (int s = 0; s < NUM_STATES; s++) begin
      pm_out[s] = pm_t'(sum_in[s] - min_value);
    end
  end


endmodule
