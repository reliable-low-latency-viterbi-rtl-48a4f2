# Viterbi decoder with rolling metrics and an LFSR signature check

This is a small, complete hard-decision Viterbi decoding chain. It is built so
that the decoder's own failures can be seen. An input byte gets a CRC from a
linear feedback shift register (LFSR), is convolutionally encoded, and has a
chosen error pattern injected into its code symbols. It is then decoded by a
branch metric unit (BMU), a path metric unit (PMU) and a trace-back unit. On
the way out, the decoded bits are fed back through a second CRC LFSR. When the
decoder could not repair the injected errors, the CRC remainder is non-zero
and an error flag is raised. Path metrics are only 5 bits wide and are never
normalised: they wrap around, and the wrap-around is what makes them cheap.

The structure follows the paper "Reliable Low-Latency Viterbi Algorithm
Architectures Using LFSR": an LFSR stage, then BMU, PMU and trace-back, with
the trace-back output returning to the LFSR. The following also come from
that paper:

- the 5-bit state and branch metrics;
- metrics that roll over instead of being normalised;
- the four-level noise monitor;
- the first-in-last-out (FILO) buffer in the trace-back unit;
- the top-level name `veterbi_ALGORITHM` and the port names `u`, `v`,
  `v_decoder` and `v_encoder`.

The paper does not fix the code, the CRC polynomial, the frame format or any
timing. All of these are this design's own choices, listed in
[Departures and choices](#departures-and-choices).

## One operation, end to end

A pulse on `start` latches `u` (the input byte) and `v` (the error pattern).
The design then builds a 14-bit frame and sends it, one bit per clock:

| frame bits | content |
|---|---|
| 0-7   | `u`, MSB first |
| 8-11  | CRC-4 of `u` (polynomial x^4 + x + 1), MSB first |
| 12-13 | two zero tail bits, which return the encoder to state 0 |

Each frame bit becomes one 2-bit code symbol `{c1, c0}`. The code has rate
1/2 and constraint length K = 3, with generators 7 and 5 (octal). The clean
code word is collected on `v_encoder`, with the first symbol in bits 27:26.

Before a symbol reaches the decoder, bit `v[7-i]` is XORed into code bit `c0`
of symbol `i`, for i = 0..7. A 1 in `v` is therefore one channel bit error on
one of the data symbols. With `v = 0` the channel is clean.

The decoder computes branch metrics and updates the path metrics once per
symbol. Once the last symbol is in, it traces the survivor path back from
state 0, one step per clock. It then pops the bits out of the FILO buffer in
transmission order. Bits 0-7 form `v_decoder`. Bits 0-11 pass through the
check LFSR: a non-zero remainder sets `crc_error`.

`done` pulses 46 clocks (3 × 14 + 4) after the clock edge that sampled
`start`. The 46 clocks break down as:

| clocks | activity |
|---|---|
| 15 | sending and encoding |
| 2 | BMU and PMU |
| 14 | trace-back |
| 14 | popping the decoded bits |
| 1 | registering the result |

Throughput is one symbol per clock while a frame is received. Trace-back and
output take another 2 × 14 clocks, and a new `start` is accepted only when
`busy` is low.

Example from the paper's waveform: `u = 00100101` with `v = 01010010` (three
channel errors) decodes to `v_decoder = 00100101` with `crc_error = 0`.

## Trellis convention

All blocks share one state numbering, defined in `viterbi_pkg`:

- A state holds the last K-1 = 2 input bits, with the newest bit in the MSB.
- Taking input bit `b` in state `s` leads to state `{b, s[1]}` and emits
  `{^({b,s} & 3'b111), ^({b,s} & 3'b101)}`.
- The two predecessors of state `n` are `{n[0], 0}` and `{n[0], 1}`. The
  PMU's decision bit for `n` tells which one survived.
- The input bit on any branch into `n` is `n[1]`. This is what trace-back
  outputs.

`encode_sym` and `pred_state` in the package encode these rules. The PMU
derives all its trellis wiring from them at elaboration time. K and the
generators are package parameters, but only K = 3 has been simulated.

## Rolling 5-bit path metrics

This is the least obvious part of the design.

**Compare by modular difference.** Each `acs` cell adds a branch metric to
each of two 5-bit state metrics, with wrap-around. It then decides which sum
is smaller from the sign bit of `sum0 - sum1`, computed modulo 32. A plain
unsigned compare would be wrong as soon as one sum has wrapped and the other
has not. The sign-bit rule is exact as long as every live metric is within
15 (2^(5-1) - 1) of every other. Ties keep predecessor `{n, 0}`.

**Why the spread stays small.** With hard decisions a branch costs 0, 1 or 2.
Any state can be reached from the best state in K-1 = 2 steps, at a cost of at
most 4. So once running, no metric is more than 4 above the best one.

**Frame start without a reset.** A frame always ends in state 0, because of
the tail. At the next `start` the PMU:

- keeps state 0's metric `m` unchanged;
- loads `m + 6` into the other three states.

Six is more than any path from state 0 can gain in two steps, so the search
is forced to start from state 0. The spread is 6 at the start, at most 8 one
step later and at most 4 from then on, so it never exceeds 8; the end-to-end
testbench checks this on every step. The metrics are set to zero only by
`rst_n`.

**Noise monitor.** Because state 0's metric is never cleared, its growth
across frames measures how noisy the channel is. `noise_monitor` splits the
32-value range into four bands of 8, using the metric's top two bits. Every
time state 0's metric moves up into the next band (with band 3 wrapping to
band 0), it increments a saturating 8-bit counter, `noise_count`. A small
downward move of that metric, which can happen when the survivor into state 0
changes, is ignored. `noise_clear` restarts the count.

**Branch metric width.** Branch metrics are 5 bits wide, as the paper
specifies, although hard decisions need only 2. The BMU's `Q` parameter
accepts Q-bit soft levels: the metric is then the sum of absolute differences
from the ideal levels 0 and 2^Q - 1, and the wider field is used. Only the
BMU has been tested with soft levels. Larger branch metrics would break the
spread bound above, so a soft-decision decoder would also need wider state
metrics and a larger start bias. The top instantiates the BMU with Q = 1.
With Q = 1 the three upper bits of every
branch metric are constant zero, which synthesis removes.

## Trace-back and the FILO buffer

`tbu` writes one 4-bit decision word per symbol into a 14-entry survivor
memory. The clock after `dec_last`, it starts at state 0 and the last step.
On each clock it:

1. outputs the state's MSB as the decoded bit;
2. reads the decision bit of that state;
3. moves to the predecessor the decision bit names.

The bits appear last-first, so they are pushed into `filo`, a 14-deep stack.
Once the trace-back is complete, the stack is popped for 14 clocks. `ready`
is low from the clock after `dec_last` until the last bit has left.
Assertions flag a decision arriving while `ready` is low, and a push into a
full or pop from an empty FILO.

The decoder traces whole frames from a known end state. It has no sliding
trace-back window and no best-state search, which is possible only because
frames are short and tail-terminated.

## CRC LFSR

`lfsr_crc` is a 4-bit internal-XOR (Galois) LFSR. On each enabled clock the
register shifts towards its MSB. `crc[3] ^ din` decides whether the
polynomial taps (`4'h3`) are XORed in.

- **Generator.** After the message bits, the register holds the check bits
  to append.
- **Checker.** Running the message followed by its check bits through a
  cleared register leaves zero.

The top uses one instance of each. A single LFSR module serves as both, so
the polynomial is defined in one place (`viterbi_pkg::CRC_POLY`).

## Top-level ports (`veterbi_ALGORITHM`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `start` | in | 1 | begin an operation (ignored while `busy`) |
| `noise_clear` | in | 1 | clear `noise_count` |
| `u` | in | 8 | input byte |
| `v` | in | 8 | error pattern; `v[7-i]` flips `c0` of symbol `i` |
| `busy` | out | 1 | operation in progress |
| `done` | out | 1 | one-clock pulse: results valid |
| `v_decoder` | out | 8 | decoded byte |
| `v_encoder` | out | 28 | clean code word, first symbol in the MSBs |
| `crc_error` | out | 1 | decoded bits fail the CRC check |
| `noise_count` | out | 8 | noise monitor count, saturating |

## Module map

| file | role |
|---|---|
| `rtl/viterbi_pkg.sv` | code, metric widths, frame layout, trellis functions |
| `rtl/veterbi_ALGORITHM.sv` | top: frame builder, CRC generator, encoder, error injection, decoder, CRC checker, control |
| `rtl/lfsr_crc.sv` | serial CRC LFSR (generator and checker) |
| `rtl/conv_encoder.sv` | rate-1/2 K=3 encoder |
| `rtl/viterbi_decoder.sv` | decoder core: BMU, PMU, trace-back, noise monitor |
| `rtl/bmu.sv` | branch metrics for the four code symbols |
| `rtl/pmu.sv` | four ACS cells in trellis order, metric registers, frame-start rule |
| `rtl/acs.sv` | add-compare-select with modular compare |
| `rtl/tbu.sv` | survivor memory and frame trace-back |
| `rtl/filo.sv` | first-in-last-out buffer |
| `rtl/noise_monitor.sv` | four-band noise counter on state 0's metric |

At the defaults, the whole design has about 260 word-level cells, 160
flip-flop bits and a 56-bit survivor memory.

## Simulating

Every block has a self-checking testbench in `tb/`, named `tb_<module>`.
Each compares the block with golden models in `tb/tb_ref_pkg.sv`:

- a long-division CRC;
- a reference (7,5) encoder;
- a Viterbi decoder with unbounded integer metrics.

Each testbench prints `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/viterbi_pkg.sv tb/tb_ref_pkg.sv tb/tb_veterbi_ALGORITHM.sv \
    --top-module tb_veterbi_ALGORITHM -o sim && ./obj_dir/sim
```

Replace the testbench file and the top-module name to run another block's
testbench. `tb_ref_pkg.sv` is needed only by the testbenches that import it.

`tb_veterbi_ALGORITHM` runs the top at its default parameters. It covers:

- the waveform vector above;
- all 256 bytes with no errors;
- every single-bit error pattern;
- 3000 random `u`/`v` pairs.

On every operation it checks `v_decoder`, `crc_error`, `v_encoder`,
`noise_count` and the 46-clock latency against the reference models. It also
counts each mechanism and fails if one never occurs. In a typical run it sees
about:

| mechanism | occurrences |
|---|---|
| operations where the errors were corrected | 1300 |
| operations flagged by the CRC check | 1700 |
| metric wrap-arounds | 40 000 |
| FILO buffer full | 3300 |
| operations ending with the noise count saturated | 2700 |

The decoder-core testbench also runs a 40-symbol frame length with random
errors in both code bits. The trace-back testbench also runs a 5-step frame.

## Departures and choices

- **Code, CRC and frame layout.** The paper gives none of these: not the
  convolutional code, the CRC polynomial and width, the frame layout, nor the
  tail. K = 3 with generators (7,5), CRC-4 x^4+x+1, 8 + 4 + 2 bits per frame
  and MSB-first order are this design's choices.
- **Meaning of `v`.** In the paper's block diagram, "input bits" and
  "message bits" both enter the LFSR, and the paper describes its decoder as
  instrumented for error-detection experiments. Here `u` is the input byte
  and `v` is the injected error pattern. This is an interpretation.
- **`v_encoder` width.** The paper's waveform shows a 16-bit `v_encoder`.
  Here it is 28 bits, because the frame also carries the CRC and tail
  symbols. The paper's printed encoder value is not reproduced by this code,
  nor by any other common K = 3 rate-1/2 code, so it was not used as a
  reference.
- **Stopping on CRC errors.** The paper uses the CRC only to flag that
  errors happened. The design does not retry or correct on a CRC failure.
- **Hard decisions.** The decoder uses hard decisions, and the paper presents
  soft decisions as future work. The BMU's `Q` parameter supports soft
  levels, but the top uses Q = 1.
- **Timing and control.** Metric initialisation at frame start, the
  start/busy/done handshake, the latencies and the whole-frame trace-back are
  this design's choices.
- **Not built.** The paper names a quantizer and a frame/symbol
  synchronizer in front of the decoder, but assumes their work is already
  done; they have no RTL here. The `start` handshake stands in for frame
  synchronization. The paper also describes earlier error-detecting
  compare-select-add units that recompute with shifted or rotated operands.
  These are its point of comparison, not part of this design, and are not
  included.
- **No look-ahead.** The paper mentions, in passing, an M-step look-ahead
  with branch metric pre-computation. Its description of the add-compare-select
  unit requires instead that the state metrics are updated on every clock,
  and that pipelining the recursion is not applicable. This design follows
  the ACS description: one trellis step per clock, with no look-ahead, since
  M is never given.
- **No adaptive pruning.** The paper calls the decoder "adaptive" but
  describes no pruning threshold. All four states survive every step.
