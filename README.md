# Butterfly-based Viterbi decoder for a rate-1/3, K=5 convolutional code

This is a hard-decision Viterbi decoder and its matching convolutional
encoder. The encoder takes one bit per clock and sends three code bits. The
decoder takes one 3-bit symbol per clock and finds the most likely input
sequence, even if the channel has flipped some code bits. With 16 trellis
states, a straightforward decoder would compute 32 branch metrics per symbol.
This design computes 8. The trellis splits into eight *butterflies*. In each
butterfly, the four branches carry only two code symbols, and those two are
bitwise complements of each other. So one Hamming distance `d` per butterfly
is enough: the other metric is `3 - d`. Survivor paths are kept by
*register exchange*. Every state has a register that holds the decoded bits
of its survivor path. The decoded sequence is read out of the register of the
state with the smallest path metric.

The structure follows a published VHDL design of the same decoder: the code,
the trellis numbering, the butterfly sharing, the four-unit split
(BMU, ACSU, PMU, SMU) and register exchange. Widths, start values,
normalisation, handshakes and the survivor length are choices made here. They
are marked as such below and in the header comment of each file.

## The code

| item | value |
|---|---|
| inputs per step k, outputs n, constraint length K | 1, 3, 5 |
| trellis states | 2^(K-1) = 16 |
| G0 | `in ^ M2 ^ M0` (octal 25) |
| G1 | `in ^ M3 ^ M1 ^ M0` (octal 33) |
| G2 | `in ^ M3 ^ M2 ^ M1 ^ M0` (octal 37) |

`M3..M0` is the encoder's shift register. `M3` holds the previous input bit
and `M0` the oldest. A code symbol is the 3-bit value `{G0, G1, G2}`, with G0
in bit 2. For the input `0 1 1 0 1 0 1 0`, starting from reset, the encoder
sends `000 111 100 110 001 111 101 000`.

States are numbered with the oldest bit in the MSB, `state = {M0, M1, M2, M3}`.
From state `s`, input `u` leads to state `((s << 1) | u) mod 16`. This has two
consequences:

* states `j` and `j+8` (for `j` = 0..7) lead to the same two states, `2j` and
  `2j+1`. Together these form butterfly `j`;
* the new state's LSB is the input bit that led to it. The survivor memory
  uses this fact.

All of this is in `rtl/viterbi_pkg.sv`. The package holds the generator
constants, the `branch_symbol()` and `hamming()` functions, and the types
`state_t`, `sym_t` and `bm_t`.

## Butterflies and the shared branch metric

Each generator taps both the current input and the oldest stage `M0`.
Flipping either of those two bits therefore flips all three code bits. In
butterfly `j`:

| branch | code symbol | branch metric |
|---|---|---|
| `j -> 2j` (input 0) | `c_j` | `d = dist(rx, c_j)` |
| `j -> 2j+1` (input 1) | `~c_j` | `3 - d` |
| `j+8 -> 2j` (input 0) | `~c_j` | `3 - d` |
| `j+8 -> 2j+1` (input 1) | `c_j` | `d` |

Butterfly 0 is the pair S0/S8 → S0/S1. Its metric `d` is the distance to
`000`. The crossing branches carry `111`.

`bmu` computes the eight values of `d` from the received symbol. Each
expected symbol `c_j` is a constant worked out at elaboration time from the
generator table. With a 2-bit metric, `3 - d` is simply `~d`. The butterfly
forms it with one inverter per bit, so the branch metric unit needs no
subtractors.

`butterfly` does add, compare and select for one butterfly:

```
ometu_0 = min(imetu_a + d,     imetu_b + (3-d))    dec_0 = (second term wins)
ometu_1 = min(imetu_a + (3-d), imetu_b + d)        dec_1 = (second term wins)
```

`imetu_a` and `imetu_b` are the previous metrics of states `j` and `j+8`.
`ometu_0` and `ometu_1` are the new metrics of states `2j` and `2j+1`. A
decision bit of 1 means the survivor came from the upper-half state `j+8`. On
a tie, the path from `j` is kept. `acsu` places eight butterflies side by
side, so a whole trellis stage is computed in one clock cycle.

## Path metrics: start, normalisation, width

`pmu` stores the 16 metrics in registers. After reset, state 0 has metric 0
and every other state has 16. This matches an encoder that starts from the
all-zero state, without hard-forbidding the other states. On each accepted
symbol, the unit stores `acsu` output minus the minimum of the metrics it
held before.

Every new metric is at least the previous minimum, so stored metrics never go
negative. After four symbols, every state can be reached from the best state
at a cost of at most 4 × 3 = 12. Before that, the start penalty dominates. So
stored metrics stay at or below 16 + 12 + 3 = 31, and 6 bits (`PM_W = 6`)
leave headroom. An assertion in `pmu` checks that every stored metric leaves
room for one more branch metric of 3.

The same comparator chain that finds the minimum also gives `best_state`,
which selects the output survivor. Ties go to the lower state number.

The absolute path metric of the best path is `best_metric` plus all the
minima removed so far. The testbenches rebuild it this way and compare it
with a brute-force search.

## Register-exchange survivor memory

`smu_re` has 16 registers of `SURV_LEN` = 8 bits each. On each accepted
symbol, new state `s` copies the register of its chosen predecessor,
`(s >> 1) + 8*dec[s]`. It shifts that copy left by one and appends `s[0]`,
the input bit of the branch just taken. Bit 0 is always the newest decoded
bit.

Output is read from the register of `best_state`:

* `survivor` is the whole register: the best path's last `SURV_LEN` bits.
  After exactly 8 symbols from reset, it is the complete decoded 8-bit
  message.
* `out_bit` is the register's oldest bit. In a continuous stream, this is the
  decoded bit `SURV_LEN` symbols back.

`SURV_LEN = 8` is enough for 8-bit messages decoded from reset. For long
streams with dense errors, a depth of about 5K (25 or more) is the usual
choice. Only the parameter needs to change.

## Timing

| signal | timing |
|---|---|
| `conv_encoder.op` | combinational from `ip` and the register: valid in the same cycle as `ip` |
| decoder input | a symbol is accepted on a rising edge while `in_valid` is high; throughput is one symbol per clock |
| `survivor`, `best_state`, `best_metric` | in the cycle after the n-th accepted symbol, they describe the best path up to symbol n |
| `out_valid` | high for one cycle after each accepted symbol, from the `SURV_LEN`-th symbol on |
| `out_bit` | valid while `out_valid` is high; it is the decoded bit of symbol n − `SURV_LEN` + 1 |
| `rst` | synchronous and active high everywhere; restarts encoder and decoder from state 0 |

The critical path is: stored metric → 16-way minimum search → subtract, or
stored metric → BMU-fed add → compare → select. All of this happens in one
cycle.

## The top level

`viterbi_codec_top` connects the encoder to the decoder through a model of
the channel: `rx_sym = tx_sym ^ err_mask`. Setting bits in `err_mask`
corrupts the symbol sent in that cycle. The top brings out the encoder symbol,
the corrupted symbol and all decoder outputs.

The reference example uses this path: `0 1 1 0 1 0 1 0` is encoded, and the
first symbol `000` is received as `001`. After eight bits, `survivor` reads
`01101010`, `best_metric` is 1, and `best_state` is 10 (`1010`, the last four
bits).

Hierarchy:

```
viterbi_codec_top
├── conv_encoder
└── viterbi_decoder
    ├── bmu            8 Hamming distances
    ├── acsu
    │   └── butterfly ×8
    ├── pmu            metric registers, normalisation, minimum search
    └── smu_re         16 × SURV_LEN register exchange
```

Parameters, with defaults: `PM_W = 6` (path metric width) and `SURV_LEN = 8`
(survivor register length), on `viterbi_codec_top`, `viterbi_decoder`,
`acsu`, `butterfly`, `pmu` and `smu_re`. `pmu` also has `PM_INIT = 16`. K, n
and the generators are package constants. The code is written for a K=5 code
with three outputs: `tap_vector()` and the fixed taps in `conv_encoder` would
need rewriting for a different code.

## Where this departs from the reference design

* **Additions are inside the butterflies.** The reference design puts the
  "add" step in the path metric unit and compare/select in the ACS unit. Here
  the butterfly does all three, and the path metric unit only stores,
  normalises and searches. The arithmetic is the same.
* **The channel error is injected in the top level** through `err_mask`. In
  the reference demonstration, the encoder itself emits the corrupted
  symbol.
* Choices made here where the reference design gives no detail: the
  synchronous active-high reset, the `en`/`in_valid` strobes, the
  combinational encoder output, the 6-bit metrics with minimum-subtraction
  normalisation, the start penalty of 16, tie-breaking (upper predecessor
  `j`, lower state number), the 8-bit survivor length, and the streamed
  `out_bit`/`out_valid` read-out.
* Only register exchange is built. The trace-back alternative is not built.
* Decisions are hard only. There is no soft-decision (Euclidean) branch
  metric.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`. The reference models in
`tb/viterbi_ref_pkg.sv` are written separately from the RTL:

* the encoder equations use an explicit bit history;
* a brute-force maximum-likelihood search tries every input sequence of a
  short frame.

| testbench | what it checks |
|---|---|
| `conv_encoder_tb` | the worked 8-bit example symbol by symbol; 400 random bits with idle cycles against the model; reset mid-stream |
| `bmu_tb` | all 8 received symbols × 8 butterflies; also that the other three branch metrics of each butterfly are `3-d`, `3-d`, `d` |
| `butterfly_tb` | exhaustive small metrics and 2000 random ones against a reference ACS, including tie-breaking |
| `acsu_tb` | 3000 random stages against a full 32-branch trellis reference |
| `pmu_tb` | reset values; storing with normalisation; hold when disabled; minimum and argmin |
| `smu_re_tb` | 2000 random decision vectors against a model of the 16 registers |
| `viterbi_decoder_tb` | 300 eight-bit frames with 0–3 errors: after every symbol, the absolute best metric equals the brute-force ML distance and the survivor reaches it; frames with ≤1 error decode exactly. Then a 3000-bit stream with idle cycles and isolated errors, checking every `out_bit` and the `out_valid` timing |
| `viterbi_codec_top_tb` | end to end at default parameters: the worked example with the corrupted first symbol, then a 4000-bit stream with idle cycles, isolated errors and a mid-stream reset. It counts corrected errors, normalisations, upper-predecessor selections, idle cycles, streamed bits and restarts, and fails if any count is zero |

To run one with Verilator 5:

```
verilator --binary --timing --assert --top-module viterbi_codec_top_tb \
    -y rtl -y tb +libext+.sv rtl/viterbi_pkg.sv tb/viterbi_ref_pkg.sv \
    tb/viterbi_codec_top_tb.sv -o sim
./obj_dir/sim
```

Replace the testbench name to run any other. Each testbench finishes in
seconds.

What the tests do not establish:

* error-rate performance over a noisy channel. The streams keep errors at
  least 12 symbols apart, where decoding must be exact;
* behaviour with a survivor length other than 8;
* any timing closure on a real target.
