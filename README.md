# Relaxed adaptive Viterbi decoder (state-parallel, K = 7, rate 1/2)

An adaptive Viterbi decoder saves power by keeping only the winning paths whose
metrics fall within a window T of the best one. The other paths are purged, so
most trellis states hold no survivor at any given depth. The usual way to find
the window edge is to search all winners for the best metric at every depth.
That search is serial and sits inside the add-compare-select (ACS) loop, so it
rules out a fast decoder that updates every state in the same clock.

This decoder never searches. It shifts the branch metrics at every depth so
that the best survivor metric always stays close to -T. The purge limit can
then be the constant 0: any winner whose metric is not negative is dropped.
What is left is a normal state-parallel Viterbi data path, with one validity
bit per state and a cheap feedback that needs only an AND gate.

The RTL decodes the rate-1/2, constraint length 7 convolutional code with
generators 133/171 (octal), which has 64 trellis states. It takes 3-bit soft
input and decodes one bit per clock. It contains both kinds of survivor memory
side by side: a register-exchange unit with a majority vote, and a trace-back
unit with three pointers. K, the generators and the decision lengths are
parameters, and the K = 8 and K = 9 codes of the same family have been
simulated as well.

## Data path

```
 y0,y1 ─► BMU ─►[reg]─► best-BM search ─┐
                    └──────────────────►(−)─► normalization ─►[reg]─► 64 modified ACS ─┬─► RE array ─► majority vote ─► re_bit
                                         ▲                              ▲      │       │
                                 d = r or 0                      WM, Vb │      │       └─► decision memory + 3 trace-back pointers ─► tb_bits
                                         └──── threshold check (AND of all Tb) ◄─┘
```

| stage | module | what it does |
|---|---|---|
| branch metrics | `rav_bmu` | `BM(c1,c0) = |y0 − 7·c0| + |y1 − 7·c1|` for the 4 branch symbols, registered |
| best branch metric | `rav_best_bm` | minimum of the 4 metrics, `BM_B` |
| normalization | `rav_bm_norm` | `nBM = BM − (BM_B + d)`, registered (the pipeline register in front of the ACS loop) |
| ACS array | `rav_acs_array`, `rav_acs`, `rav_cmp_sel` | one modified ACS unit per state, all updated in the same clock |
| threshold check | `rav_threshold_check` | `d = r` if every state reports `Tb = 1`, otherwise `d = 0` |
| RE survivor memory | `rav_re_smu`, `rav_re_array`, `rav_majority_vote` | 64 × 40 register exchange and a vote over the survivors |
| TB survivor memory | `rav_tb_smu`, `rav_dec_mem`, `rav_prio_enc` | 6 banks × 24 columns × 64 decision bits, 3 trace-back pointers |
| top | `rav_decoder` | wires all of the above together |

Shared constants and the trellis helper function are in `rav_pkg`.

## Keeping the best metric near −T

The feedback works like this:

* **Purge at zero.** A winner becomes a survivor only if its metric is
  negative. At start-up the starting state (state 0) gets metric −T and
  survives. Every other state gets 0 and does not survive.
* **Normalization.** At every depth the smallest branch metric `BM_B` is
  subtracted from all four branch metrics. The normalized metrics are then
  ≥ 0, so no path metric can fall, and the best survivor sinks no further.
* **Bias.** Each ACS unit raises `Tb = 0` when it holds a survivor with metric
  below −T + r. If no unit does (the AND of all `Tb` is 1), the best survivor
  has drifted up from −T. The normalization then subtracts another r. That
  lets metrics fall by up to r per depth, which pulls them back toward −T.

With T = 24 and r = 4, the window between the purge limit (0) and the best
survivor stays close to T without anyone ever finding the best survivor. How
many states survive follows the channel. The end-to-end test sees about 16–21
of 64 states surviving per depth. The metric registers of all the other states
are not reloaded.

### Why 6-bit path metrics are enough

Path metrics are 6-bit two's-complement numbers. Because of the pipeline
register, the bias applied at a depth was chosen from the ACS state two depths
earlier. From that lag:

* the best survivor metric stays at or above −T − r (−28), and every survivor
  metric is negative;
* a candidate sum `WM + nBM` lies between −T − 2r (−32) and −1 + 14 (13).

That fits exactly into [−32, 31]. Changing T or r needs T + 2r ≤ 2^(PM_W−1);
otherwise widen `PM_W`. `rav_acs` has an assertion that fires if a surviving
metric ever wraps. None of the tests triggers it.

## The modified ACS unit

`rav_acs` adds the normalized branch metric to each predecessor's winner
metric. `rav_cmp_sel` then picks the winner:

| Vb0 Vb1 | decision (select) | winner M | survives (V) |
|---|---|---|---|
| 1 1 | comparator: PM1 < PM0 | smaller of the two (tie → PM0) | M < 0 |
| 1 0 / 0 1 | the valid one (select = Vb1) | the valid candidate | M < 0 |
| 0 0 | 0 | PM0 (unused) | 0 |

The unit registers V as `Vb` and the decision as `Dec`. It loads the winner
metric `WM` only when V = 1. For a state that does not survive, `WM` keeps its
old value, so nothing downstream toggles. In silicon this is a clock gate; in
this RTL it is a load enable. `Tb = NAND(Vb, WM < −T + r)` is formed from the
registered values.

Trellis convention: a state is the last six input bits, with the newest in
the MSB. Input u takes state s to `{u, s[5:1]}`. The two predecessors of state
n are `{n[4:0], b}`, and the decision bit is that b. The branch symbol is
`c0 = ^({u,s} & 133₈)` and `c1 = ^({u,s} & 171₈)`. `rav_pkg::branch_sym`
evaluates this at elaboration time, so the array wiring follows from the
generator parameters alone.

## Register-exchange survivor memory

`rav_re_array` holds one 40-bit row per state: the decoded bits of the survivor
ending there, oldest at bit 39. When a new depth arrives, each surviving state
copies the row of its winning predecessor, shifts it by one and appends its
own newest input bit. The rows of non-surviving states are left alone, which
is where the RE style saves most of its power.

`rav_majority_vote` then votes over bit 39 of the surviving rows only. Stage 1
counts survivors and ones in groups of 8 rows. Stage 2 adds up the counts and
outputs 1 on a strict majority. A tie or an empty set gives 0. The first 39
votes after a restart refer to depths before the stream began, and
`rav_re_smu` suppresses them.

## Trace-back survivor memory with three pointers

The decision columns (64 bits per depth) are written into six banks of
D = 24 columns. The trace-back length is L = 48 = 2D.

* **Launch.** Each time a bank is full, the next of three pointers is launched.
  It starts from the state that `rav_prio_enc` picks among the validity bits of
  that newest column: the lowest-numbered state holding a survivor. An
  arbitrary state might hold no survivor, so the start state has to be chosen
  this way.
* **Stepping.** A pointer reads one column per clock and steps to
  `{state[4:0], decision[state]}`.
* **Merge and decode.** It first traces back through the two newest banks
  (L = 48 steps) to reach a merged path. It then traces through the third bank
  (D = 24 steps), where the MSB of each state it visits is a decoded bit.

A pointer is busy for 72 clocks and a new one starts every 24, so three are
always running. While the pointer launched at bank b reads banks b, b−1 and
b−2, the writer fills b+1, b+2 and b+3. Six banks are therefore the minimum.
That is 3 × L columns of decision storage. Every access
in a clock goes to a different bank, so the store can be built from
single-ported banks. `rav_dec_mem` models it as one array with three
synchronous read ports.

The decoded bits come out as a 24-bit block on `tb_bits`, with `tb_bits[i]`
being the i-th depth of the block. Blocks come out in order. The pointers run
every clock even when the input stalls. This is safe because they only read
banks that are complete, and the writer is then slower than they are.

## Interface and timing of `rav_decoder`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `init` | in | 1 | one-cycle pulse: restart a stream (metrics to −T / 0, memories emptied) |
| `in_valid` | in | 1 | a soft symbol pair is presented; when low, the decoder stalls |
| `y0`, `y1` | in | 3 | soft values of code bits c0 (133) and c1 (171); 0 = sure '0', 7 = sure '1' |
| `re_valid`, `re_bit` | out | 1 | register-exchange output, one bit per depth, from depth 0 on |
| `tb_valid`, `tb_bits` | out | 1, 24 | trace-back output, one block of 24 bits per 24 depths |

Latencies without stalls, counted from the clock in which a symbol is
presented:

* The decision column appears 3 clocks later (BMU register, normalization
  register, ACS register).
* The RE bit for depth t appears 6 clocks after symbol t + 39.
* The TB block for depths 24j … 24j+23 appears 77 clocks (L + D + 5) after
  symbol 24j + 71.

The throughput is one decoded bit per clock.

Parameters of `rav_decoder` (defaults in brackets): `K` [7], `G0` ['o133],
`G1` ['o171], `SOFT_W` [3], `PM_W` [6], `T` [24], `R` [4], `L_RE` [40],
`L_TB` [48]. The trace-back block length is `L_TB/2`. The larger codes of the
same family use `K=8, G0='o247, G1='o371, L_RE=46, L_TB=56` and
`K=9, G0='o561, G1='o753, L_RE=55, L_TB=64`.

## Where this RTL goes beyond the published architecture

The following follow the published decoder: the algorithm, the word lengths,
T, r, L, D, the code generators, the structure of the modified ACS unit and of
compare-and-select, the AND-based threshold check, the validity-gated RE array
with a survivor-only majority vote, and a priority encoder to start
trace-back.

The published description leaves these points open, and this design fills
them in:

* **Branch metric.** The simplified branch metric formula and the soft-value
  coding.
* **Start state.** The choice of state 0 as the starting state.
* **Majority vote.** The internal organisation of the multi-stage majority vote
  (only its name is given), its tie rule, and the suppression of the first
  L − 1 outputs.
* **Trace-back scheme.** The exact scheme: bank count, pointer schedule,
  parallel block output instead of a reversing buffer, and pointers that keep
  running during input stalls.
* **Handshake and reset.** The `in_valid` stall handshake, the `init` restart
  and the reset values.
* **Tie-break.** Ties in compare-and-select go to predecessor 0.
* **Clock gating.** It is written as load enables. A real implementation would
  map them onto gated clock cells.
* **Pipelining.** The RE array feeds the vote from its own row registers, with
  no extra output column, and there is one register after the BMU.

Other points to keep in mind:

* **Survivor loss.** If all survivors are lost (every state has `Vb = 0`), the
  decoder cannot recover until `init`, and the published design does not cover
  this case. It did not happen in any simulated stream.
* **Code family.** Only rate-1/2 codes with one input bit per depth are
  supported. Rate-1/4 and rate-2/3 codes would need a different branch metric
  unit and trellis.

## How far it has been checked

Every module has a self-checking testbench in `tb/` that compares it with a
model written independently in the testbench:

* **ACS array.** `rav_acs_array_tb` runs the complete relaxed recursion as a
  behavioural model for 3000 depths and compares every state's Vb, Dec, Tb and
  surviving metric.
* **Survivor memories.** The RE and TB unit tests check exact latencies and
  decoded output.
* **End to end.** `rav_decoder_tb` runs the default configuration on 3 × 12000
  encoded random bits:
  * with mild noise, both outputs must decode without a single error;
  * with random input stalls and restarts, the same holds;
  * on a noisier channel, the bit error rate must stay under 1 %.

  It also checks the exact output latencies. It requires every mechanism to
  occur at least once: both bias values, held metrics, all three
  compare-and-select cases, stalls, trace-back launches, split majority votes
  and restarts.
* **Larger codes.** `rav_decoder_k8k9_tb` decodes the K = 8 and K = 9 codes
  error-free under mild noise. It then sends 48000 bits for each code over the
  Gaussian channel described below, at 3.5 dB. Both bit error rates must stay
  under 1e-3, and fewer than half of the states may survive on average. The
  measured results:

  | code | RE BER | TB BER | average survivors |
  |---|---|---|---|
  | K = 8 | 2.1e-5 | 0 | 29.5 of 128 |
  | K = 9 | 0 | 0 | 30.7 of 256 |

  The published curves show about 35 and 37 survivors at this point. 48000
  bits are too few to measure error rates this low with any precision.

* **Gaussian channel.** `rav_decoder_awgn_tb` sends BPSK over an additive
  white Gaussian noise channel and quantizes to 3 bits with a step of 0.25
  around zero. It decodes 192000 bits at each of three Eb/N0 points:

  | Eb/N0 | RE BER | TB BER | average survivors (of 64) |
  |---|---|---|---|
  | 3.0 dB | 1.7e-3 | 1.3e-3 | 29.2 |
  | 3.5 dB | 2.7e-4 | 2.3e-4 | 25.3 |
  | 4.0 dB | 1.6e-5 | 0 | 22.2 |

  This is within about a factor of two of the published fixed-point results
  for this code and these T and r. Those are roughly 7e-4, 1.5e-4 and 3.5e-5,
  with 34, 28.5 and 23.5 survivors. The quantizer and the branch metric scale
  differ and shift both numbers. The error counts at 4 dB are too small to be
  meaningful.

  The survivor count is also the switching activity that matters for power.
  Only survivors load a metric register and shift an RE row. At 3.5 dB that
  is 40 % of the loads a plain Viterbi decoder makes every depth.

* **Threshold and bias sweep.** `rav_decoder_tr_sweep_tb` builds nine
  decoders side by side, with T in {20, 24, 28} and r in {2, 4, 8}. Each
  decodes 480000 bits at 3.5 dB. Where T + 2r exceeds 32, the path metrics
  are widened to 7 bits. The test requires the survivor count to grow with T.
  It requires 20 to 34 survivors at T = 24, r = 4, and a BER under 1e-3 for
  T >= 24 with r <= 4. The measured results:

  | T | survivors (r = 2 / 4 / 8) | TB BER (r = 2 / 4 / 8) |
  |---|---|---|
  | 20 | 13.8 / 14.0 / 14.6 | 4.5e-4 / 2.0e-4 / 6.0e-4 |
  | 24 | 25.2 / 25.4 / 25.2 | 2.0e-4 / 2.2e-4 / 2.6e-4 |
  | 28 | 39.1 / 38.6 / 37.2 | 2.1e-4 / 2.5e-4 / 2.1e-4 |

  The survivor count depends almost only on T, as in the published surface,
  which gives about 27 at T = 24, r = 4. The error rate levels off from
  T = 24 at about twice the published 1.5e-4. T = 20 loses accuracy.

## Simulating

All files are SystemVerilog 2017. The package comes first; the other modules
are found by name:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/rav_pkg.sv tb/rav_decoder_tb.sv --top-module rav_decoder_tb -o sim
./obj_dir/sim
```

Replace `rav_decoder_tb` with any other `tb/*_tb.sv` to run a unit test. Every
testbench ends by printing `TB_RESULT checks=<n> failures=<m>`.
`tb/rav_e2e_run.sv` is the parameterized harness behind the K = 8/9 test.
