// tb_pm_normalizer: exhaustive check of the minimum search and normalisation
// over every vector of four 3-bit path metrics: minimum value, the
// lowest-numbered state holding it, and each metric minus the minimum
// (checked where the difference fits the 2-bit normalised metric).
module tb_pm_normalizer;
  import viterbi_pkg::*;

  sum_vec_t sum_in;
  pm_vec_t  pm_out;
  state_t   best_state;
  sum_t     min_value;
  int checks = 0, failures = 0;

  pm_normalizer dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4096; v++) begin
      int m [4];
      int mn, best;
      for (int s = 0; s < 4; s++) begin
        m[s] = (v >> (3 * s)) & 7;
        sum_in[s] = sum_t'(m[s]);
      end
      #1;
      mn = 8; best = -1;
      for (int s = 3; s >= 0; s--) if (m[s] <= mn) begin mn = m[s]; best = s; end
      checks++;
      if (int'(min_value) != mn || int'(best_state) != best) begin
        failures++;
        $display("%p: min %0d state %0d, expected %0d state %0d", m, min_value, best_state, mn, best);
      end
      for (int s = 0; s < 4; s++) begin
        if (m[s] - mn <= 3) begin
          checks++;
          if (int'(pm_out[s]) != m[s] - mn) begin
            failures++;
            $display("%p: pm_out[%0d] = %0d, expected %0d", m, s, pm_out[s], m[s] - mn);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
