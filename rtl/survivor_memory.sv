// survivor_memory: the stored part of the survivor window, a DEPTH-deep
// shift register of decision vectors (one bit per trellis state).
//
// The decoder's traceback window is WINDOW_LENGTH entries deep, but its
// newest entry is the decision vector the ACS units produce in the current
// cycle, so only WINDOW_LENGTH-1 older entries are stored here; the default
// DEPTH is therefore 31 for the 32-deep window.
//
// On every rising clk edge with shift high the new decision vector enters at
// entry 0 and every entry moves one place towards the old end; entry DEPTH-1
// is dropped. window[i] therefore holds the decisions made i symbols ago.
// rst_n (asynchronous, active low) clears every entry.
//
// The shift-register organisation, the window of 32 and the clearing on reset
// follow the design description. The shift enable is this implementation's
// choice; the decoder ties it high, so the window moves once per symbol.
module survivor_memory
  import viterbi_pkg::*;
#(
  parameter int unsigned DEPTH = WINDOW_LENGTH_DEFAULT - 1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      shift,          // accept decisions_in at this edge
  input  decision_t decisions_in,   // decisions of the newest trellis step
  output decision_t window [DEPTH]  // window[0] newest .. window[DEPTH-1] oldest
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) window[i] <= '0;
    end else if (shift) begin
      window[0] <= decisions_in;
      for (int i = 1; i < DEPTH; i++) window[i] <= window[i-1];
    end
  end

endmodule
