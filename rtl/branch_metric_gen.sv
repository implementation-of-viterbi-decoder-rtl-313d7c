// branch_metric_gen: branch metric generator (BMG) of the hard-decision
// Viterbi decoder.
//
// For the received symbol pair it returns the Hamming distance to each of the
// four possible code symbols: bm[c] = popcount(sym_in ^ c), c = 0..3. The
// decoder's ACS units pick from these four values the one that belongs to
// each trellis branch. Purely combinational.
//
// The Hamming-distance metric and the four-entry distance table follow the
// design description; computing it with XOR and a bit count instead of a
// lookup table is this implementation's choice (the result is the same).
module branch_metric_gen
  import viterbi_pkg::*;
(
  input  sym_t    sym_in,  // received {OUT_low, OUT_high}
  output bm_vec_t bm       // bm[c]: distance of sym_in to code symbol c
);

  always_comb begin
    for (int c = 0; c < NUM_STATES; c++) begin
      sym_t diff;
      diff  = sym_in ^ sym_t'(c);
      bm[c] = bm_t'(diff[0]) + bm_t'(diff[1]);
    end
  end

endmodule
