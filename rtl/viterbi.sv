// viterbi: hard-decision Viterbi decoder for the K=3, rate-1/2 code of
// viterbi_pkg, decoding one bit per clock.
//
// On every rising clk edge one received symbol pair is taken from data_in and
// a whole trellis step is done in that cycle:
//   1. branch_metric_gen gives the Hamming distance of data_in to each of the
//      four code symbols;
//   2. four acs_unit instances add those distances to the stored path metrics
//      of the two predecessors of each state and keep the smaller sum, giving
//      one decision bit per state;
//   3. pm_normalizer finds the smallest new metric and its state and
//      subtracts the minimum from every metric, which are then stored;
//   4. traceback_unit walks the survivor window, with the new decisions as
//      its newest entry, from the best state back to the oldest entry; the
//      branch direction found there is registered onto data_out;
//   5. survivor_memory, which stores the WINDOW_LENGTH-1 older entries of
//      the window, shifts the new decisions in and drops its oldest entry.
// Timing: the symbol sampled at clock edge n yields, at the same edge, the
// decoded information bit of symbol n-(WINDOW_LENGTH+1) on data_out, so a bit
// leaves the decoder WINDOW_LENGTH+1 clocks after its symbol entered. Before
// the window has filled, data_out shows 0s traced from the cleared window.
// rst_all is an asynchronous, active-low reset: it clears the window and
// data_out and sets the path metrics to 0 for state 0 and 2 for the others,
// so decoding assumes the encoder started in state 0.
//
// The pins (clk, rst_all, data_in[1:0], data_out), the single-cycle trellis
// step, the window length of 32, the tie rules, the reset values and the
// output timing follow the design description. The split into the five
// submodules above and the bit widths are this implementation's.
module viterbi
  import viterbi_pkg::*;
#(
  parameter int unsigned WINDOW_LENGTH = WINDOW_LENGTH_DEFAULT  // traceback depth
) (
  input  logic clk,
  input  logic rst_all,   // asynchronous reset, active low
  input  sym_t data_in,   // received {OUT_low, OUT_high}, one pair per clock
  output logic data_out   // decoded bit, WINDOW_LENGTH+1 clocks late
);

  // Path metric registers ("global distances").
  pm_vec_t pm_q, pm_d;

  bm_vec_t   bm;
  sum_vec_t  acs_sum;
  decision_t decisions;
  state_t    best_state;
  sum_t      min_value;
  logic      tb_bit;
  state_t    tb_end_state;

  decision_t window    [WINDOW_LENGTH-1];
  decision_t tb_window [WINDOW_LENGTH];

  branch_metric_gen u_bmg (
    .sym_in (data_in),
    .bm     (bm)
  );

  for (genvar s = 0; s < NUM_STATES; s++) begin : g_acs
    localparam state_t S = state_t'(s);
    acs_unit u_acs (
      .pm_upper (pm_q[predecessor(S, 1'b0)]),
      .pm_lower (pm_q[predecessor(S, 1'b1)]),
      .bm_upper (bm[branch_symbol(S, 1'b0)]),
      .bm_lower (bm[branch_symbol(S, 1'b1)]),
      .sum_out  (acs_sum[s]),
      .decision (decisions[s])
    );
  end

  pm_normalizer u_norm (
    .sum_in     (acs_sum),
    .pm_out     (pm_d),
    .best_state (best_state),
    .min_value  (min_value)
  );

  survivor_memory #(.DEPTH(WINDOW_LENGTH - 1)) u_sm (
    .clk          (clk),
    .rst_n        (rst_all),
    .shift        (1'b1),
    .decisions_in (decisions),
    .window       (window)
  );

  // The traceback sees the window as it will be after this edge's shift.
  always_comb begin
    tb_window[0] = decisions;
    for (int i = 1; i < WINDOW_LENGTH; i++) tb_window[i] = window[i-1];
  end

  traceback_unit #(.DEPTH(WINDOW_LENGTH)) u_tb (
    .window      (tb_window),
    .start_state (best_state),
    .bit_out     (tb_bit),
    .end_state   (tb_end_state)
  );

  always_ff @(posedge clk or negedge rst_all) begin
    if (!rst_all) begin
      pm_q     <= '{default: pm_t'(2)};
      pm_q[0]  <= '0;
      data_out <= 1'b0;
    end else begin
      pm_q     <= pm_d;
      data_out <= tb_bit;
    end
  end

  // Normalised path metrics must fit PM_W bits.
  logic pm_fits;
  always_comb begin
    pm_fits = 1'b1;
    for (int s = 0; s < NUM_STATES; s++) begin
      if (acs_sum[s] - min_value >= sum_t'(1 << PM_W)) pm_fits = 1'b0;
    end
  end

  a_pm_fits : assert property (@(posedge clk) disable iff (!rst_all) pm_fits)
    else $error("normalised path metric overflow");

endmodule
