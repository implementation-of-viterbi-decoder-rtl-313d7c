// viterbi_ref_pkg: behavioural reference model of the K=3, rate-1/2
// hard-decision Viterbi decoder and of its encoder, for the testbenches.
//
// The model is written from the encoder's state-transition diagram, not from
// the RTL's package functions: states are named by the printed register
// string (newest bit first) and numbered S0="00", S1="10", S2="01", S3="11".
// Every transition carries the printed output "high low"; the decoder's
// symbol is {low, high}. Metrics are plain integers, the survivor history is
// a queue, and traceback walks it from the newest entry to the oldest.
package viterbi_ref_pkg;

  // next_state[s][u], out_str[s][u] ("high low" as a 2-bit number, high in
  // bit 1), from the state diagram.
  localparam int NEXT_STATE [4][2] = '{'{0, 1}, '{2, 3}, '{0, 1}, '{2, 3}};
  localparam int OUT_STR    [4][2] = '{'{2'b00, 2'b11}, '{2'b10, 2'b01},
                                        '{2'b11, 2'b00}, '{2'b01, 2'b10}};

  // Decoder symbol {low, high} from the printed "high low" value.
  function automatic logic [1:0] str_to_sym(int str);
    return {str[0], str[1]};
  endfunction

  function automatic int hamming2(logic [1:0] a, logic [1:0] b);
    logic [1:0] x;
    x = a ^ b;
    return int'(x[0]) + int'(x[1]);
  endfunction

  class conv_enc_model;
    int state;
    function new();
      state = 0;
    endfunction
    function logic [1:0] push(logic u);
      logic [1:0] sym;
      sym   = str_to_sym(OUT_STR[state][u]);
      state = NEXT_STATE[state][u];
      return sym;
    endfunction
  endclass

  class viterbi_model;
    int depth;
    int gd [4];
    bit [3:0] hist [$];   // hist[0] newest
    int min_events;        // steps where the minimum before normalising was > 0
    int acs_ties;          // state updates where both candidates were equal
    int min_ties;          // steps where several states shared the minimum
    int lower_wins;        // state updates won by the lower branch

    function new(int depth_i);
      depth = depth_i;
      reset();
    endfunction

    function void reset();
      gd = '{0, 2, 2, 2};
      hist.delete();
      for (int i = 0; i < depth; i++) hist.push_back(4'b0000);
      min_events = 0; acs_ties = 0; min_ties = 0; lower_wins = 0;
    endfunction

    // One symbol; returns the decoded bit produced at this step.
    function logic step(logic [1:0] sym);
      int cand [4][2];   // [next state][0 = upper, 1 = lower]
      int pred [4][2];
      int nm [4];
      bit [3:0] dec;
      int mn, best, s, nmin;
      logic d;
      foreach (pred[n]) begin pred[n][0] = -1; pred[n][1] = -1; end
      // Enumerate transitions; the lower-numbered predecessor is "upper".
      for (int p = 0; p < 4; p++) begin
        for (int u = 0; u < 2; u++) begin
          int n, slot, c;
          n = NEXT_STATE[p][u];
          c = gd[p] + hamming2(sym, str_to_sym(OUT_STR[p][u]));
          slot = (pred[n][0] < 0) ? 0 : 1;
          pred[n][slot] = p;
          cand[n][slot] = c;
        end
      end
      for (int n = 0; n < 4; n++) begin
        if (cand[n][0] == cand[n][1]) acs_ties++;
        if (cand[n][0] <= cand[n][1]) begin nm[n] = cand[n][0]; dec[n] = 1'b0; end
        else begin nm[n] = cand[n][1]; dec[n] = 1'b1; lower_wins++; end
      end
      mn = nm[0]; best = 0;
      for (int n = 1; n < 4; n++) if (nm[n] < mn) begin mn = nm[n]; best = n; end
      nmin = 0;
      for (int n = 0; n < 4; n++) if (nm[n] == mn) nmin++;
      if (nmin > 1) min_ties++;
      if (mn > 0) min_events++;
      for (int n = 0; n < 4; n++) gd[n] = nm[n] - mn;
      hist.push_front(dec);
      void'(hist.pop_back());
      // Traceback: the predecessor chosen by decision d, found by search of
      // the transition table.
      s = best;
      d = 1'b0;
      for (int i = 0; i < depth; i++) begin
        int cnt, found;
        d = hist[i][s];
        cnt = 0; found = -1;
        for (int p = 0; p < 4; p++)
          for (int u = 0; u < 2; u++)
            if (NEXT_STATE[p][u] == s) begin
              if (cnt == int'(d)) found = p;
              cnt++;
            end
        s = found;
      end
      return d;
    endfunction
  endclass

endpackage
