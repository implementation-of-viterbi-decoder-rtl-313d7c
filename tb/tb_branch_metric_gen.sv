// tb_branch_metric_gen: checks all four received symbols against the
// distance table given for the design (rows: received 00, 01, 10, 11;
// columns: code symbol 0..3).
module tb_branch_metric_gen;
  import viterbi_pkg::*;

  sym_t    sym_in;
  bm_vec_t bm;
  int checks = 0, failures = 0;

  branch_metric_gen dut (.sym_in(sym_in), .bm(bm));

  localparam int TABLE [4][4] = '{'{0, 1, 1, 2}, '{1, 0, 2, 1}, '{1, 2, 0, 1}, '{2, 1, 1, 0}};

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 4; r++) begin
      sym_in = sym_t'(r);
      #1;
      for (int c = 0; c < 4; c++) begin
        checks++;
        if (int'(bm[c]) != TABLE[r][c]) begin
          failures++;
          $display("sym %b code %0d: got %0d expected %0d", sym_in, c, bm[c], TABLE[r][c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
