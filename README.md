# Modified Viterbi decoder for a rate-1/2, K=3 convolutional code

A Viterbi decoder tracks every state of the encoder's trellis at every step.
The work grows with 2^(K-1) states. The *modified Viterbi algorithm* (MVA)
implemented here cuts that work by dropping unpromising paths as it goes:

* a path survives a trellis stage only if its metric is at most `bm + T`,
  where `bm` is the smallest metric kept at the previous stage and `T` is a
  fixed threshold (T = 1 here);
* at most `max_paths` paths survive a stage, a limit set before
  communication starts;
* at the next stage only the survivors are extended. Pruned states cost no
  branch additions.

The RTL holds the complete chain used to exercise such a decoder: the
convolutional encoder, a channel that flips chosen bits, the decoder (branch
metric unit, add-compare-select unit with the pruning, path metric unit,
survivor memory with trace back) and a checker that compares decoded and
sent bits. On random traffic with about one error every twelve symbols, the
default decoder does 70 % fewer branch additions than the full algorithm.
Over all one- and two-bit error placements in a 16-bit frame it does 47 %
fewer additions.

## The code

Rate 1/2, constraint length 3. Two flip-flops hold X(n-1) and X(n-2), and two
XOR adders form each output pair:

    Y0 = X(n) ^ X(n-1) ^ X(n-2)      generator 111
    Y1 = X(n) ^ X(n-2)               generator 101

The encoder state is `{X(n-1), X(n-2)}`. On input `u` the next state is
`{u, X(n-1)}`. A channel symbol is packed as `{Y0, Y1}`, with Y0 in bit 1.
The full state diagram (input/output on each arc):

| from | input 0 → to, out | input 1 → to, out |
|------|-------------------|-------------------|
| 00   | 00, 00            | 10, 11            |
| 01   | 00, 11            | 10, 00            |
| 10   | 01, 10            | 11, 01            |
| 11   | 01, 01            | 11, 10            |

The two branches leaving any state carry complementary pairs. A received
pair is therefore at distance d from one branch and 2-d from the other.
So with T ≥ 1, the best path of a stage always has a successor within
`bm + 1`, and pruning can never leave a stage empty. The ACSU still keeps
the best candidate regardless of the threshold, so this also holds for
T = 0.

Data is sent in **frames** of `FRAME_LEN` = 8 symbols, i.e. 16 channel bits.
Each frame holds 6 data bits followed by 2 zero tail bits, so every frame
starts and ends in state 00. The decoder restarts its trellis at state 00
for every frame.

## How the decoder works

```
 sym ──► BMU ──► ACSU ◄──► PMU
                   │
                   └──► SMU ──► out_bits
```

**BMU** (`bmu`) gives the Hamming distance from the received pair to each of
the four ideal pairs 00, 01, 10 and 11. Decisions are hard: one bit per code
bit.

**ACSU** (`acsu`) computes one trellis stage combinationally. The two
predecessors of next state `ns` are `{ns[0], 0}` and `{ns[0], 1}`. For each
predecessor that survived the previous stage, the ACSU adds the distance of
the pair that branch would carry. It keeps the smaller sum; on a tie it
keeps the predecessor whose X(n-2) is 0. The chosen predecessor's low bit
is the **decision bit**. Then the ACSU ranks the candidates by metric (ties
by state number) and applies the two rules:

* **threshold**: keep if `metric <= bm_prev + THRESH`, or if it is the best;
* **survivor limit**: of those, keep rank < `max_paths` (0 = no limit).

It also reports per stage the additions performed (2 per surviving
predecessor; the full algorithm does 8), the paths kept, and how many
candidates each rule removed.

**PMU** (`pmu`) holds the per-state metric and survivor flag between stages,
plus `bm` (the smallest kept metric) and the state that holds it. At each
frame start it resets to "state 00 only, metric 0".

**SMU** (`smu`) stores the 4 decision bits of every stage, one memory word
per stage. After the last stage it traces back from the best final state,
one stage per clock. The decoded bit of a stage is the MSB of the current
state; the previous state is `{state[0], decision}`.

### Worked example

Received `00 11 11 00`, T = 1, no limit. States pruned by the threshold are
shown in brackets.

| stage | rx | bm_prev + T | kept states : metric        | pruned      | additions |
|-------|----|-------------|-----------------------------|-------------|-----------|
| 0     | 00 | 1           | 00:0                        | [10:2]      | 2         |
| 1     | 11 | 1           | 10:0                        | [00:2]      | 2         |
| 2     | 11 | 1           | 01:1, 11:1                  | —           | 2         |
| 3     | 00 | 2           | 10:1, 01:2, 11:2            | [00:3]      | 4         |

The trellis takes 10 additions; the full algorithm takes 2 + 4 + 8 + 8 = 22.
Trace back from state 10 gives the bits 0, 1, 0, 1 with final metric 1.
Without pruning, received `00 11 11` ends with metrics 3, 1, 2, 1 for states
00..11 and decodes to 0, 1, 0. Both cases are checked in
`tb/mva_workloads_tb.sv`.

### Timing

* Received pairs enter one per clock through `sym_valid`/`sym_ready`. One
  trellis stage is computed per clock.
* Count from the clock edge that accepts the last pair of a frame.
  `out_valid` pulses `FRAME_LEN + 1` edges later, carrying `out_bits` (bit t
  = stage t, tail bits included) and `out_metric`.
* `sym_ready` is low from the edge after the last pair until `out_valid`.
  A frame therefore occupies 2·FRAME_LEN + 1 = 17 cycles at full input rate.
* A pair that is offered but not yet accepted must be held. An assertion
  checks this.

## The test system (`mva_top`)

`mva_top` chains the blocks:

1. `conv_encoder` takes `data_bit` with a valid-ready handshake and appends
   the tail by itself. Its output pair is visible as `tx_sym`.
2. The received pair is `rx_sym = tx_sym ^ chan_err`. A 1 in `chan_err`
   flips that bit of the pair the decoder takes in that cycle. `rx_valid`
   marks those cycles.
3. `viterbi_decoder` decodes each frame, with `max_paths` as its survivor
   limit.
4. `error_checker` collects the bits sent (data and tail) into frames, in a
   2-frame FIFO. It XORs each stored frame with the decoded one. One cycle
   after `dec_valid` it pulses `chk_valid` with:
   * `decode_out` (low when the frames agree);
   * `err_bits` (the wrong positions);
   * `nerr` (how many are wrong).

The encoder has one symbol of output buffering. While the decoder traces
back, the encoder stalls and `data_ready` drops.

## Parameters

| parameter   | default | meaning |
|-------------|---------|---------|
| `CL`        | 3       | constraint length; 2^(CL-1) states |
| `G0`, `G1`  | 111, 101| generators; bit CL-1 taps X(n) |
| `FRAME_LEN` | 8       | symbols per frame, tail included |
| `THRESH`    | 1       | pruning threshold T |
| `max_paths` | port    | survivor limit, 0 = none, 3 bits at CL = 3 |

Path metrics are `$clog2(2*FRAME_LEN+1)` bits wide and are never
normalised. Within a frame they cannot overflow. A `THRESH` of 2·FRAME_LEN
or more turns pruning off and gives the plain Viterbi decoder.

The modules are written for any `CL`. The ranking in the ACSU compares every
pair of states, so it grows as 4^(CL-1). Only CL = 3 has been simulated.

## What follows the source design and what is this design's own choice

These parts follow the source design:
* the code and its generators;
* the BMU/ACSU/PMU/SMU split;
* hard-decision distances to the four ideal pairs;
* the threshold rule with T = 1;
* a pre-set limit on the number of survivors;
* one decision bit per survivor choice, with trace back from the best state;
* the XOR comparison with a flag that is low when the frames agree.

The source states the threshold rule as "metric less than bm + T". Its
worked example, however, keeps paths whose metric equals bm + T. This RTL
keeps them (`<=`).

These are choices of this design:
* the frame structure (8 symbols, zero tail, trellis restarted per frame);
* frame-wise trace back instead of a sliding window;
* the valid-ready handshakes;
* the tie rules;
* the "always keep the best" fallback;
* the survivor limit as a run-time input (its value is not given);
* the 2-frame FIFO in the checker;
* the statistics outputs;
* the active-low asynchronous reset.

The source's own trellis figure for the pruned example labels some branches
with pairs that do not match this encoder. The RTL follows the encoder.

Not provided:
* codes with other constraint lengths (e.g. K = 9), because no generator
  polynomials are given for them;
* soft-decision metrics;
* any other part of a Wi-Fi receiver.

## Verification

Every block has a self-checking testbench in `tb/`, and each prints
`TB_RESULT checks=N failures=M`. The expected values come from
`tb/mva_ref_pkg.sv`. This is a behavioural model written from the state
table above. It implements the same pruning and tie rules and never reads
the RTL.

| testbench | what it shows |
|-----------|---------------|
| `conv_encoder_tb` | every symbol, source bit and frame flag under random stalls; tail blocks input; one-cycle latency |
| `bmu_tb` | all 16 distances |
| `acsu_tb` | 3000 random stages: metrics, decisions, survivors, best state, counts; both pruning rules occur |
| `pmu_tb` | reset/init/load contents |
| `smu_tb` | random decision memories traced back; `done` after FRAME_LEN edges |
| `viterbi_decoder_tb` | the worked example; 300 random frames with 0–3 errors and random limits against the model; error-free frames exact; latency FRAME_LEN+1 |
| `error_checker_tb` | flagged positions, counts and `decode_out`, with the next frame arriving during the check |
| `mva_top_tb` | 240 frames end to end at default parameters, limits 0/2/1/3; counts threshold pruning, limit pruning, stalls, corrected and reported errors, and the saving in additions, and fails if any never occurs |
| `mva_workloads_tb` | both worked examples; every 1- and 2-bit error placement in 16-bit frames, pruned decoder beside the unpruned one |

In the last test every single error is corrected. Of the 1440 frames with
two errors, the pruned decoder recovers 1272 and the unpruned decoder 1332.

To simulate with Verilator, for example the end-to-end test:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
  rtl/mva_pkg.sv tb/mva_ref_pkg.sv tb/mva_top_tb.sv --top-module mva_top_tb
./obj_dir/Vmva_top_tb
```

For other tests, replace the testbench file and `--top-module`. Verilator
finds the modules in `rtl/` and `tb/` by file name. The two packages must
be listed first.
