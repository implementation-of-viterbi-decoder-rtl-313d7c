// tb_conv_encoder: checks the convolutional encoder against the encoded
// streams listed for the design (a 7-bit example and a 72-bit stream, printed
// as "high low" pairs) and against the state-diagram model on random data.
module tb_conv_encoder;
  import viterbi_pkg::*;
  import viterbi_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, bit_in = 1'b0;
  sym_t sym_out;
  int checks = 0, failures = 0;

  conv_encoder dut (.clk(clk), .rst_n(rst_n), .en(en), .bit_in(bit_in), .sym_out(sym_out));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // 72-bit stream and its printed encoding ("high low" per symbol).
  localparam string TX72  = "001011100101000110111000011011101001100011011000001100010001101010011000";
  localparam string ENC72 =
    "000011100001100111111000101100110101000110011100001101010001100100101111010111001101010001011100000011010111001110110011010100100010111101011100";

  function automatic int printed(string s, int i);
    return (s[2*i] == "1" ? 2 : 0) + (s[2*i+1] == "1" ? 1 : 0);
  endfunction

  task automatic push_check(logic b, sym_t exp, string what);
    @(negedge clk);
    bit_in = b; en = 1'b1;
    #1;
    checks++;
    if (sym_out !== exp) begin
      failures++;
      $display("%s: bit %0d gave %b, expected %b", what, b, sym_out, exp);
    end
    @(posedge clk);
  endtask

  initial begin
    conv_enc_model m;
    string tx7, enc7;
    #12 rst_n = 1'b1;
    // Seven-bit example: 0010111 -> 00 00 11 10 00 01 10.
    tx7  = "0010111";
    enc7 = "00001110000110";
    for (int i = 0; i < 7; i++)
      push_check(tx7[i] == "1", str_to_sym(printed(enc7, i)), "7-bit example");
    // Reset, then the 72-bit stream.
    @(negedge clk); en = 1'b0; rst_n = 1'b0; #2 rst_n = 1'b1;
    for (int i = 0; i < 72; i++)
      push_check(TX72[i] == "1", str_to_sym(printed(ENC72, i)), "72-bit stream");
    // Hold: en low keeps the register; output still follows bit_in.
    @(negedge clk); en = 1'b0; rst_n = 1'b0; #2 rst_n = 1'b1;
    m = new();
    for (int i = 0; i < 300; i++) begin
      logic b;
      sym_t exp;
      b = 1'($urandom);
      @(negedge clk);
      en = 1'($urandom_range(0, 3) != 0);
      bit_in = b;
      #1;
      if (en) exp = m.push(b);
      else begin
        conv_enc_model peek;
        peek = new();
        peek.state = m.state;
        exp = peek.push(b);
      end
      checks++;
      if (sym_out !== exp) begin
        failures++;
        $display("random %0d: got %b expected %b", i, sym_out, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
