// traceback_unit: combinational traceback through the survivor window.
//
// Starting in start_state at the newest entry (window[0]), each of the DEPTH
// steps reads the decision bit of the current state, d = window[i][state],
// and moves to that state's predecessor {d, state[1]}. The decision read at
// the oldest entry, window[DEPTH-1], is the decoded bit. Because the decision
// d of a step is the encoder input bit that left the shift register on that
// transition, the decoded bit is the information bit DEPTH+1 symbols older
// than the newest entry. The whole walk is one combinational chain of DEPTH
// multiplexers, so a bit is decoded on every clock.
//
// The walk, its direction (newest to oldest), the predecessor rule and the
// use of the last branch direction as the output follow the design
// description.
module traceback_unit
  import viterbi_pkg::*;
#(
  parameter int unsigned DEPTH = WINDOW_LENGTH_DEFAULT
) (
  input  decision_t window [DEPTH],  // window[0] newest .. window[DEPTH-1] oldest
  input  state_t    start_state,     // state with the smallest path metric
  output logic      bit_out,         // branch direction at the oldest entry
  output state_t    end_state        // state reached after the last step
);

  always_comb begin
    state_t s;
    logic   d;
    s = start_state;
    d = 1'b0;
    for (int i = 0; i < DEPTH; i++) begin
      d = window[i][s];
      s = predecessor(s, d);
    end
    bit_out   = d;
    end_state = s;
  end

endmodule
