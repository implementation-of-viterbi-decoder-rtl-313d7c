// tb_viterbi_top: end-to-end test of the coding link at its default size
// (32-deep survivor window).
//
// Random messages go through the encoder, a channel that flips random code
// bits at rates from 0 to 12 %, and the decoder. On every clock data_out is
// compared with the reference model, and each decoded bit with the message
// bit sent WINDOW_LENGTH+1 = 33 clocks earlier. Error-free runs must decode
// without a single wrong bit. Also exercised: the encoder hold (enc_en low)
// and a reset in the middle of a message. The test counts how often each
// mechanism of the decoder happened and fails if one never did: path metric
// normalisation with a non-zero minimum, an add-compare-select tie resolved
// to the upper branch, a lower-branch survivor, a tie in the minimum search,
// a channel error corrected, the encoder hold and the mid-message reset.
module tb_viterbi_top;
  import viterbi_pkg::*;
  import viterbi_ref_pkg::*;

  localparam int LAT = WINDOW_LENGTH_DEFAULT + 1;

  logic clk = 1'b0, rst_all = 1'b0;
  logic enc_en = 1'b0, enc_bit_in = 1'b0;
  sym_t enc_sym_out;
  sym_t data_in = '0;
  logic data_out;
  int checks = 0, failures = 0;

  viterbi_top dut (.*);

  always #11 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  viterbi_model   ref_m;
  conv_enc_model  enc_m;
  int n_normalise = 0, n_acs_tie = 0, n_lower = 0, n_min_tie = 0;
  int n_corrected_runs = 0, n_enc_hold = 0, n_mid_reset = 0;
  int n_channel_errors = 0, n_wrong_bits = 0, n_bits = 0;

  task automatic do_reset();
    @(negedge clk);
    rst_all = 1'b0;
    enc_en = 1'b0;
    data_in = '0;
    #3 rst_all = 1'b1;
    ref_m.reset();
    enc_m = new();
  endtask

  // Sends len random bits (then 40 zero bits) at the given error rate in
  // tenths of a percent. If reset_at >= 0, reset is applied at that clock
  // and the rest of the message is dropped.
  task automatic run(int len, int rate, int reset_at);
    logic msg [$];
    int errs, wrong, total;
    errs = 0; wrong = 0;
    total = len + 40;
    do_reset();
    for (int n = 0; n < total; n++) begin
      logic b, exp;
      sym_t s;
      if (n == reset_at) begin
        do_reset();
        n_mid_reset++;
        return;
      end
      b = (n < len) ? 1'($urandom) : 1'b0;
      msg.push_back(b);
      @(negedge clk);
      enc_en = 1'b1;
      enc_bit_in = b;
      #1;
      s = enc_m.push(b);
      checks++;
      if (enc_sym_out !== s) begin
        failures++;
        $display("clock %0d: encoder gave %b, model %b", n, enc_sym_out, s);
      end
      if (n < len && $urandom_range(0, 999) < rate) begin
        s[$urandom_range(0, 1)] ^= 1'b1;
        errs++;
      end
      data_in = s;
      @(posedge clk);
      exp = ref_m.step(s);
      if (dut.u_dec.min_value != 0) n_normalise++;
      #2;
      checks++;
      if (data_out !== exp) begin
        failures++;
        $display("clock %0d: data_out %b, model %b", n, data_out, exp);
      end
      if (n >= LAT && n - LAT < len) begin
        n_bits++;
        if (data_out !== msg[n - LAT]) wrong++;
      end
    end
    n_channel_errors += errs;
    n_wrong_bits += wrong;
    if (errs > 0 && wrong == 0) n_corrected_runs++;
    if (rate == 0) begin
      checks++;
      if (wrong != 0) begin failures++; $display("error-free run decoded %0d wrong bits", wrong); end
    end
    $display("run: %0d bits, %0d channel errors, %0d wrong decoded bits", len, errs, wrong);
  endtask

  initial begin
    ref_m = new(WINDOW_LENGTH_DEFAULT);
    enc_m = new();
    do_reset();

    // Encoder hold: with enc_en low the register keeps its contents.
    for (int i = 0; i < 6; i++) begin
      logic b;
      b = 1'($urandom);
      @(negedge clk);
      enc_en = (i % 2 == 0);
      enc_bit_in = b;
      #1;
      if (!enc_en) begin
        conv_enc_model peek;
        peek = new();
        peek.state = enc_m.state;
        checks++;
        if (enc_sym_out !== peek.push(b)) failures++;
        n_enc_hold++;
      end else begin
        checks++;
        if (enc_sym_out !== enc_m.push(b)) failures++;
      end
    end

    run(300, 0, -1);
    run(300, 0, 150);         // reset in the middle of a message
    run(300, 0, -1);          // clean run right after the reset
    for (int r = 10; r <= 120; r += 10) run(400, r, -1);
    run(2000, 40, -1);

    n_acs_tie = ref_m.acs_ties; n_lower = ref_m.lower_wins; n_min_tie = ref_m.min_ties;
    $display("mechanisms: normalise=%0d acs_tie=%0d lower_branch=%0d min_tie=%0d corrected_runs=%0d enc_hold=%0d mid_reset=%0d",
             n_normalise, n_acs_tie, n_lower, n_min_tie, n_corrected_runs, n_enc_hold, n_mid_reset);
    $display("channel errors %0d, wrong decoded bits %0d of %0d", n_channel_errors, n_wrong_bits, n_bits);
    checks++; if (n_normalise == 0)      begin failures++; $display("normalisation never happened"); end
    checks++; if (n_acs_tie == 0)        begin failures++; $display("no ACS tie"); end
    checks++; if (n_lower == 0)          begin failures++; $display("no lower-branch survivor"); end
    checks++; if (n_min_tie == 0)        begin failures++; $display("no tie in the minimum search"); end
    checks++; if (n_corrected_runs == 0) begin failures++; $display("no run with all channel errors corrected"); end
    checks++; if (n_enc_hold == 0)       begin failures++; $display("encoder hold never used"); end
    checks++; if (n_mid_reset == 0)      begin failures++; $display("no mid-message reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
