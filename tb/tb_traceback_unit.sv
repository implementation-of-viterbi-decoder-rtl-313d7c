// tb_traceback_unit: random survivor windows and start states against a
// traceback written from the rule "states 0 and 1 come from 0 (upper) or 2
// (lower), states 2 and 3 from 1 (upper) or 3 (lower)"; also a window of
// all-upper decisions, which must lead to state 0 and output 0.
module tb_traceback_unit;
  import viterbi_pkg::*;

  localparam int unsigned DEPTH = WINDOW_LENGTH_DEFAULT;
  decision_t window [DEPTH];
  state_t    start_state;
  logic      bit_out;
  state_t    end_state;
  int checks = 0, failures = 0;

  traceback_unit dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int s;
      logic d;
      for (int i = 0; i < DEPTH; i++)
        window[i] = (n == 0) ? '0 : decision_t'($urandom);
      start_state = state_t'($urandom_range(0, 3));
      #1;
      s = int'(start_state);
      d = 1'b0;
      for (int i = 0; i < DEPTH; i++) begin
        d = window[i][s];
        if (s <= 1) s = d ? 2 : 0;
        else        s = d ? 3 : 1;
      end
      checks++;
      if (bit_out !== d || int'(end_state) != s) begin
        failures++;
        $display("trial %0d: got %b/%0d expected %b/%0d", n, bit_out, end_state, d, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
