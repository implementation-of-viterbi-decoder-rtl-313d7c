// tb_viterbi: decoder test.
//
// Part 1 replays a 72-bit message, encoded, with the published error
// patterns: none; one error on data_in[1]; five on data_in[1]; eight on
// data_in[0]; and those eight plus three more (eleven). Each message is
// followed by 40 "00" symbols. For every pattern the output must match the
// reference model on every clock, and the decoded bits must appear exactly
// WINDOW_LENGTH+1 = 33 clocks after their symbols (one bit per clock). With
// up to eight errors every bit must be decoded correctly; with eleven
// exactly one bit, bit 65, is wrong. The stored path metrics are compared
// with the model's after reset and on every clock.
// A second decoder with WINDOW_LENGTH = 16 (the shorter traceback also
// reported for the design) decodes the same symbols; it is checked against a
// 16-deep model on every clock and must decode error-free input with a
// latency of 17 clocks.
// A sweep then inserts the first 1, 2, ... 11 errors of that eleven-error
// list; only the full list may cause a wrong bit.
// Part 2 runs random messages through random channel errors and checks the
// output against the reference model on every clock.
module tb_viterbi;
  import viterbi_pkg::*;
  import viterbi_ref_pkg::*;

  localparam int unsigned WL = 32;
  localparam int LAT = WL + 1;

  logic clk = 1'b0, rst_all = 1'b0;
  sym_t data_in = '0;
  logic data_out;
  int checks = 0, failures = 0;

  viterbi dut (.clk(clk), .rst_all(rst_all), .data_in(data_in), .data_out(data_out));

  // Second decoder with the shorter traceback depth of 16.
  localparam int unsigned WL16 = 16;
  logic data_out16;
  viterbi #(.WINDOW_LENGTH(WL16)) dut16 (.clk(clk), .rst_all(rst_all), .data_in(data_in),
                                         .data_out(data_out16));

  always #11 clk = ~clk;  // 22 ns period

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam string TX72 = "001011100101000110111000011011101001100011011000001100010001101010011000";

  // Symbol index of each inserted error and the bit it hits (1: data_in[1]).
  typedef struct { int idx; int bitpos; } err_t;

  viterbi_model ref_m, ref16;
  int wrong16_total = 0;

  task automatic do_reset();
    @(negedge clk);
    rst_all = 1'b0;
    data_in = '0;
    #3 rst_all = 1'b1;
    ref_m.reset();
    ref16.reset();
    // Reset values: 0 for state 0, 2 for the others.
    for (int st = 0; st < 4; st++) begin
      checks++;
      if (int'(dut.pm_q[st]) != (st == 0 ? 0 : 2)) begin
        failures++;
        $display("after reset: metric of state %0d is %0d", st, dut.pm_q[st]);
      end
    end
  endtask

  // Runs one message; returns the number of wrong decoded bits.
  task automatic run_message(logic msg [$], err_t errs [$], string name, output int wrong,
                             ref int wrong_first);
    conv_enc_model enc;
    int n_sym, wrong16;
    enc = new();
    wrong = 0;
    wrong16 = 0;
    wrong_first = -1;
    n_sym = msg.size() + 40;
    do_reset();
    for (int n = 0; n < n_sym; n++) begin
      sym_t s;
      logic exp, exp16;
      s = enc.push(n < msg.size() ? msg[n] : 1'b0);
      foreach (errs[e]) if (errs[e].idx == n) s[errs[e].bitpos] = ~s[errs[e].bitpos];
      data_in = s;
      @(posedge clk);
      exp = ref_m.step(s);
      exp16 = ref16.step(s);
      @(negedge clk);
      checks++;
      if (data_out !== exp) begin
        failures++;
        $display("%s: clock %0d data_out %b, model %b", name, n, data_out, exp);
      end
      // Stored path metrics against the model's normalised metrics.
      for (int st = 0; st < 4; st++) begin
        checks++;
        if (int'(dut.pm_q[st]) != ref_m.gd[st]) begin
          failures++;
          $display("%s: clock %0d metric of state %0d is %0d, model %0d",
                   name, n, st, dut.pm_q[st], ref_m.gd[st]);
        end
      end
      checks++;
      if (data_out16 !== exp16) begin
        failures++;
        $display("%s: depth-16 decoder, clock %0d data_out %b, model %b", name, n, data_out16, exp16);
      end
      if (n >= WL16 + 1 && n - (WL16 + 1) < msg.size() && data_out16 !== msg[n - (WL16 + 1)])
        wrong16++;
      if (n >= LAT && n - LAT < msg.size()) begin
        if (data_out !== msg[n - LAT]) begin
          wrong++;
          if (wrong_first < 0) wrong_first = n - LAT;
        end
      end
    end
    $display("%s: depth 32: %0d wrong bits, depth 16: %0d wrong bits", name, wrong, wrong16);
    if (errs.size() == 0) begin
      checks++;
      if (wrong16 != 0) begin failures++; $display("%s: depth-16 decoder made errors", name); end
    end
  endtask

  initial begin
    logic msg [$];
    err_t errs [$];
    int wrong, first;
    ref_m = new(WL);
    ref16 = new(WL16);
    for (int i = 0; i < 72; i++) msg.push_back(TX72[i] == "1");

    // No errors: also the latency check (bit k appears after clock k+33).
    errs = {};
    run_message(msg, errs, "clean", wrong, first);
    checks++; if (wrong != 0) begin failures++; $display("clean: %0d wrong bits", wrong); end

    // One error on data_in[1].
    errs = '{'{6, 1}};
    run_message(msg, errs, "1 error", wrong, first);
    checks++; if (wrong != 0) begin failures++; $display("1 error: %0d wrong bits", wrong); end

    // Five errors on data_in[1].
    errs = '{'{6, 1}, '{21, 1}, '{28, 1}, '{39, 1}, '{54, 1}};
    run_message(msg, errs, "5 errors", wrong, first);
    checks++; if (wrong != 0) begin failures++; $display("5 errors: %0d wrong bits", wrong); end

    // Eight errors on data_in[0].
    errs = '{'{7, 0}, '{15, 0}, '{23, 0}, '{24, 0}, '{36, 0}, '{37, 0}, '{46, 0}, '{58, 0}};
    run_message(msg, errs, "8 errors", wrong, first);
    checks++; if (wrong != 0) begin failures++; $display("8 errors: %0d wrong bits", wrong); end

    // Eleven errors: one wrong output bit expected.
    errs.push_back('{65, 0}); errs.push_back('{66, 0}); errs.push_back('{67, 0});
    run_message(msg, errs, "11 errors", wrong, first);
    $display("11 errors: %0d wrong decoded bits, first at bit %0d", wrong, first);
    checks++; if (wrong != 1 || first != 65) failures++;

    // Error-count sweep, 1 to 11 errors: the first k errors of the list
    // above (eight on data_in[0], then the three extra ones).
    begin
      err_t all_errs [$];
      all_errs = errs;
      for (int k = 1; k <= 11; k++) begin
        errs = all_errs[0:k-1];
        run_message(msg, errs, $sformatf("sweep %0d errors", k), wrong, first);
        checks++;
        if (wrong != (k == 11 ? 1 : 0)) begin
          failures++;
          $display("sweep: %0d errors gave %0d wrong bits", k, wrong);
        end
      end
    end

    // Random messages and channel errors.
    for (int t = 0; t < 20; t++) begin
      int rate;
      msg = {};
      errs = {};
      rate = $urandom_range(0, 20);  // percent of symbols hit
      for (int i = 0; i < 200; i++) begin
        msg.push_back(1'($urandom));
        if ($urandom_range(0, 99) < rate) errs.push_back('{i, int'($urandom_range(0, 1))});
      end
      run_message(msg, errs, $sformatf("random %0d", t), wrong, first);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
