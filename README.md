# Viterbi decoder for the K=3, rate-1/2 convolutional code

This is a hard-decision Viterbi decoder that decodes one bit per clock. The
code it decodes has constraint length 3 and rate 1/2, the code the IEEE
802.16 broadband wireless access profile uses with a traceback depth of 32.
Each clock the decoder takes one received pair of code bits and does a whole
trellis step in that clock: branch metrics, add-compare-select and
normalisation of the path metrics. In the same clock it traces back through
a 32-deep survivor window and emits the decoded bit 33 clocks after its code
symbol. The encoder for the code is included, so the transmitter and
receiver halves of a coding link can be simulated together.

The decoder is deliberately small. It has four states, 2-bit path metrics
and a 31 x 4-bit shift register of survivor decisions: 133 flip-flops in
total. It was sized for a 9,000-gate FPGA at a 22 ns clock (45.4 Mbit/s).

## The code

The encoder shifts each information bit into a two-stage register and sends
two code bits per input bit:

    OUT_high = in(t) ^ in(t-1) ^ in(t-2)
    OUT_low  = in(t) ^ in(t-2)

On the wires a symbol is `sym[1:0] = {OUT_low, OUT_high}`. Written as a
two-character string in "high low" order, the string `10` is `sym = 2'b01`.
For example, the message `0010111` becomes `00 00 11 10 00 01 10`. Both the
encoder and the decoder use this bit order, so mind it when you connect
another encoder.

**States.** The trellis state is the register contents. Inside the RTL a
state is numbered `s = {in(t-2), in(t-1)}`, so `s[0]` is the newest bit.
This gives S0 = `00`, S1 = `10`, S2 = `01` and S3 = `11` when the register
is written newest bit first. Every state `s` has two predecessors,
`{d, s[1]}` with `d` = 0 or 1:

| state | predecessor, d = 0 ("upper") | predecessor, d = 1 ("lower") |
|-------|------------------------------|------------------------------|
| S0, S1 | S0 | S2 |
| S2, S3 | S1 | S3 |

The decision bit `d` is the oldest register bit that leaves the encoder on
that transition. Tracing decisions back therefore yields information bits
directly. The helper functions `predecessor()`, `branch_symbol()` and
`encode()` in `rtl/viterbi_pkg.sv` express these rules once for the whole
design.

## One trellis step per clock

```
 data_in ─► branch_metric_gen ─► 4 x acs_unit ─► pm_normalizer ─► pm_q (path metric regs)
                                   ▲   │ decisions      │ best_state
                    pm_q ──────────┘   ▼                ▼
                         survivor_memory (31 entries) ─► traceback_unit (32 steps) ─► data_out reg
```

| file | job |
|------|-----|
| `viterbi_pkg.sv` | constants, types, trellis functions |
| `conv_encoder.sv` | the encoder |
| `branch_metric_gen.sv` | Hamming distance of the received pair to each of the 4 code symbols (0..2) |
| `acs_unit.sv` | one state: two candidate sums, keep the smaller, emit the decision bit |
| `pm_normalizer.sv` | minimum of the four new metrics, its state, metrics minus the minimum |
| `survivor_memory.sv` | shift register of decision vectors |
| `traceback_unit.sv` | combinational walk through the window |
| `viterbi.sv` | the decoder: wires the above, holds the metric and output registers |
| `viterbi_top.sv` | encoder and decoder side by side |

**Tie rules.** These are fixed, and every testbench depends on them:

* In the ACS, the upper branch (decision 0) wins when the two sums are
  equal.
* In the minimum search, the lowest-numbered state wins.

**Path metric width.** The metrics are normalised on every clock by
subtracting the minimum. They start at 0 for S0 and 2 for the other states.
For this code, an exhaustive search over all reachable metric vectors shows
that a normalised metric never exceeds 3, so 2 bits are exact, not a
saturating approximation. A metric plus a branch metric is at most 5 and
fits in 3 bits. `viterbi` asserts the 2-bit bound on every clock
(`a_pm_fits`).

## The survivor window and traceback

This is the part that takes the most care.

The traceback window is `WINDOW_LENGTH` = 32 decision vectors deep:

* Entry 0 is the decision vector the ACS units produce *in the current
  clock*. It goes straight to the traceback, not through a register.
* Entries 1..31 are the previous 31 decision vectors, held in
  `survivor_memory`.

So only 31 x 4 bits are stored. A registered copy of entry 0 would duplicate
entry 1 of the next clock.

Every clock the traceback starts in `best_state`, the state with the
smallest new metric. At window entry `i` it reads the decision
`d = window[i][state]` and moves to `predecessor(state, d)`. The decision it
reads at the oldest entry is the output. That decision belongs to the
trellis step 31 symbols back, and it is the information bit that entered the
encoder two steps before that step. So the symbol sampled at clock edge `n`
produces the decoded bit of symbol `n - 33`, registered onto `data_out` at
that same edge. The latency is `WINDOW_LENGTH + 1` clocks, and the
throughput is one bit per clock with no stalls.

There is no separate "paths have converged" check. If the survivor paths
have not merged within the window, the bit simply follows the path of the
current best state.

The walk is a chain of 32 four-way bit selects. Together with the ACS and
the minimum search it forms the critical path, so the clock rate depends on
`WINDOW_LENGTH`.

**After reset.** The window is cleared, and a cleared window traces back
along all-zero decisions. `data_out` is therefore 0 for the first 33 clocks,
and then the bits of symbols 0, 1, 2, ... appear. Decoding assumes the
encoder started in state 00, through the 0/2/2/2 reset metrics.

## Interfaces

`viterbi` (the decoder):

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | one symbol per rising edge |
| `rst_all` | in | 1 | asynchronous reset, active low |
| `data_in` | in | 2 | received `{OUT_low, OUT_high}`, sampled every rising edge |
| `data_out` | out | 1 | decoded bit, registered, `WINDOW_LENGTH+1` clocks after its symbol |

The decoder has no valid or ready signals: it consumes a symbol on every
clock. To pause it, gate its clock or add an enable to the `pm_q`, output
and `survivor_memory` (`shift`) registers.

`viterbi_top` has the same decoder ports plus the encoder ports:
`enc_en` (shift enable), `enc_bit_in`, and `enc_sym_out`, which is
combinational in `enc_bit_in` and the register contents. The two halves
share `clk` and `rst_all` and are not connected to each other. The channel
belongs between `enc_sym_out` and `data_in`.

Parameter: `WINDOW_LENGTH` (default 32) on `viterbi` and `viterbi_top`.
It must be at least 2; the testbenches run 32 and 16. The constraint
length is fixed at 3: the package functions encode that trellis.

## Verification

Each module has a self-checking testbench in `tb/`. The shared reference
model, `tb/viterbi_ref_pkg.sv`, is written from the encoder's
state-transition table. It uses integer metrics and a queue for the
survivor history, and it does not use the RTL package functions.

* `tb_conv_encoder`: the 7-bit example above, a 72-bit reference stream
  with its published encoding, and random data with random `en`.
* `tb_branch_metric_gen`, `tb_acs_unit`, `tb_pm_normalizer`: exhaustive.
* `tb_survivor_memory`: random shift and hold cycles against a queue, plus
  reset.
* `tb_traceback_unit`: 2,000 random windows and start states.
* `tb_viterbi`: the 72-bit reference message with five published error
  patterns: none, 1 error, 5 errors on `data_in[1]`, 8 errors on
  `data_in[0]`, and those 8 plus 3 more. After that it runs 20 random
  200-bit messages at error rates up to 20 %. Both the 32-deep decoder and a
  16-deep one are compared with the model on every clock, including their
  path metric registers. The test also checks the 33-clock latency through
  ground-truth comparison.

  With up to 8 errors in the 72 symbols, every bit is decoded correctly.
  With 11 errors (about 15 %), exactly one bit, bit 65, is wrong. That bit
  leaves the decoder at clock 98, which is 2237 ns in a 22 ns-clock
  simulation that releases reset at 70 ns, as originally reported for this
  design. A sweep that inserts the first k errors of the 11-error list, for
  k = 1 to 11, gives 0 wrong bits up to k = 10 and 1 wrong bit at k = 11.
  Depth 16 gives the same results on all these patterns.
* `tb_viterbi_top`: end to end at the default size, through the encoder, a
  random bit-flip channel (0 to 12 %) and the decoder, for about 7,500 bits.
  It includes a reset in the middle of a message and the encoder hold. It
  counts and requires each of these:
  * normalisation with a non-zero minimum
  * an ACS tie
  * a lower-branch survivor
  * a tie in the minimum search
  * a run with every channel error corrected
  * the encoder hold
  * the mid-message reset

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/viterbi_pkg.sv tb/viterbi_ref_pkg.sv tb/tb_viterbi_top.sv --top-module tb_viterbi_top
./obj_dir/Vtb_viterbi_top
```

Replace `tb_viterbi_top` with any other testbench name. The testbenches
drive every register through reset, so two-state simulation is enough.

## Choices made in this implementation

* **Tie breaking.** Ties are broken deterministically (upper branch, lowest
  state), not at random.
* **Normalisation** happens on every symbol rather than periodically.
* **Survivor storage** is a shift register, not a RAM. Moving 124 bits per
  clock is cheap at this size. For much deeper windows a RAM with a
  traceback pointer would be the usual change.
* **Encoder.** The enable and the asynchronous reset are additions.
  Placing the encoder beside the decoder in `viterbi_top` is a convenience
  for link-level tests. The original device contained only the decoder.
* **Not included.** FPGA pad placement and any physical (ASIC) layout are
  outside this RTL.
* **Throughput is not verified.** Meeting 44.8 Mbit/s needs a 44.8 MHz
  clock. Whether the 32-step traceback chain closes timing at that rate
  depends on the target and has not been checked here.
