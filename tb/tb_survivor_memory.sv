// tb_survivor_memory: drives random decision vectors with random shift
// enables into the survivor memory and compares every entry with a
// queue model after each clock (default depth, 31 stored entries); also checks that reset clears the window.
module tb_survivor_memory;
  import viterbi_pkg::*;

  localparam int unsigned DEPTH = WINDOW_LENGTH_DEFAULT - 1;
  logic clk = 1'b0, rst_n = 1'b0, shift = 1'b0;
  decision_t decisions_in = '0;
  decision_t window [DEPTH];
  decision_t model [$];
  int checks = 0, failures = 0;

  survivor_memory dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(string when);
    for (int i = 0; i < DEPTH; i++) begin
      checks++;
      if (window[i] !== model[i]) begin
        failures++;
        $display("%s: window[%0d] = %h, expected %h", when, i, window[i], model[i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < DEPTH; i++) model.push_back('0);
    #12 rst_n = 1'b1;
    compare("after reset");
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      shift = ($urandom_range(0, 4) != 0);
      decisions_in = decision_t'($urandom);
      @(posedge clk);
      if (shift) begin
        model.push_front(decisions_in);
        void'(model.pop_back());
      end
      #1 compare("run");
    end
    @(negedge clk) rst_n = 1'b0;
    #1;
    model.delete();
    for (int i = 0; i < DEPTH; i++) model.push_back('0);
    compare("second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
