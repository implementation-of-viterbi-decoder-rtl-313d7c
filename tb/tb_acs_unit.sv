// tb_acs_unit: exhaustive check of the add-compare-select unit over every
// path metric (0..3) and branch metric (0..2) combination, including the
// rule that the upper branch wins a tie.
module tb_acs_unit;
  import viterbi_pkg::*;

  pm_t  pm_upper, pm_lower;
  bm_t  bm_upper, bm_lower;
  sum_t sum_out;
  logic decision;
  int checks = 0, failures = 0, ties = 0;

  acs_unit dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 4; a++)
      for (int b = 0; b < 4; b++)
        for (int x = 0; x < 3; x++)
          for (int y = 0; y < 3; y++) begin
            int up, lo, exp_sum;
            logic exp_dec;
            pm_upper = pm_t'(a); pm_lower = pm_t'(b);
            bm_upper = bm_t'(x); bm_lower = bm_t'(y);
            #1;
            up = a + x; lo = b + y;
            exp_dec = (lo < up);
            exp_sum = exp_dec ? lo : up;
            if (up == lo) ties++;
            checks++;
            if (int'(sum_out) != exp_sum || decision !== exp_dec) begin
              failures++;
              $display("pm %0d/%0d bm %0d/%0d: got %0d,%b expected %0d,%b",
                       a, b, x, y, sum_out, decision, exp_sum, exp_dec);
            end
          end
    if (ties == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
