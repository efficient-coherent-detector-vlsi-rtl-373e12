# SPEC-T coherent detector for continuous phase modulation

Continuous phase modulation (CPM) is spectrally efficient, but its optimum
coherent detector is a Viterbi decoder over a large trellis: for the
quaternary, h = 2/5, 5RC signal set targeted here that is 5 x 4^4 = 1280
states. A reduced-search decoder (the T-algorithm) keeps only the paths
whose metric is within a threshold T of the best one, which cuts the work
by orders of magnitude, but it has two properties that hurt in hardware:

* finding the best metric at every trellis depth is a serial search that
  sits inside the decoding recursion, and
* the set of surviving paths changes shape every depth, so the survivors
  have to be moved between storage slots before the next depth can run in
  parallel.

This RTL implements the SPEC-T variant of the T-algorithm, which removes
both problems:

* **Speculated best metric, corrected late.** Each depth the best metric is
  not searched; it is *speculated* as the previous value plus the sum of the
  received sample magnitudes, an upper bound on what any branch can add.
  Every `V` depths a separate correction module searches, off the critical
  loop and one path per clock, for the real gap `E` between speculation and
  best path. `E` is subtracted `V` depths later and the best path's old
  symbols are released as decisions.
* **Token bus redistribution.** Each survivor lives in its own register
  array `PD_i` next to its own processing element `PE_i`. After the purge,
  arrays that hold several live extended paths hand the extras to empty
  arrays over a shared bus. A broadcasting token and a receiving token
  decide who sends and who receives, one path per clock.

The analog quadrature demodulator and the sampling converter that feed the
detector are not part of this RTL. It takes two complex samples per symbol
and puts out decided symbols and their Gray-coded bits.

## Signal set and branch metrics

| item | value |
|---|---|
| symbols | quaternary, alpha in {-3,-1,+1,+3}, kept as 2-bit code c with alpha = 2c - 3 |
| modulation index | h = 2/5, so 5 phase states theta, in steps of 2*pi/5 |
| phase pulse | 5RC (raised cosine over L = 5 symbols) |
| samples | N = 2 complex samples per symbol, 8-bit signed I and Q |
| trellis state | theta plus the previous L - 1 = 4 symbols (1280 states) |
| bit mapping | Gray: -3, -1, +1, +3 -> 00, 01, 11, 10 |

A branch is a trellis state extended by a candidate symbol. Its ideal phase
at sample i (time nT + iT/N) is

    phi_i = theta*2*pi/5 + 2*pi*h * sum_{j=0..4} alpha[n-j] * q((j + i/N) T)

and its metric is `sum_i Re{(I_i + jQ_i) e^{-j phi_i}} = sum_i (I_i cos phi_i + Q_i sin phi_i)`,
the correlation of the received samples with the branch's ideal samples.
`branch_metric_unit` builds `phi_i` in a 12-bit one-turn phase word from two
constant tables: `QTAB`, h*q(t) at the 10 sample offsets, and `THETA_PH`,
the 5 phase states. It wraps the sum and looks cos/sin up in 256-entry,
8-bit tables. All tables are computed at elaboration from the formulas in
`cpm_pkg.sv`; there are no data files. Each product sum is divided by 128,
which puts the metric on the scale of the sample magnitude and never above
it.

## Metrics as differences to the speculated best

This is the part that needs the most care. Each path stores
`d = Gamma_B - Gamma_path`, its distance below the speculated best metric
`Gamma_B`, instead of an absolute metric. Extending a path by a branch
with metric `bm` gives

    d' = d + inc - bm - (correction depth ? E : 0)        clamped to [0, 4095]

where `inc = sum_i |I_i + jQ_i|` is the speculation increment. `inc` is
estimated per sample as `max(|I|,|Q|) + ceil(min(|I|,|Q|)/2)`. This estimate
is never below the true magnitude and at most 12% above it. So `inc >= bm`
always, and `d` only grows between corrections. `inc` and `E` are the same
for every path of a depth. Ranking paths by `d` is therefore exactly
ranking them by accumulated branch metric, but all numbers stay bounded.
`best_metric_spec` also keeps the absolute `Gamma_B` as a 24-bit wrapping
register, for observation only.

**Correction timing.** Depths are counted from 0. Every `V`-th depth
(depth m = V-1, 2V-1, ...) is a *correction point*. At the end of a
correction point the decoder hands a snapshot to `correction_module`: every
path's `d` and `V` of its symbols, alpha[m-L-V+1 .. m-L]. The module then
scans the snapshot for the smallest `d`, which is `E`, and keeps that path's
symbols. It takes `NPD + 2` cycles and has `V` depths to finish. At the
next correction point (depth m + V) three things happen:

1. `E` is subtracted from every extended path, removing the accumulated
   over-estimate.
2. Paths whose oldest `V` symbols disagree with the released ones are purged.
   This is the T-algorithm's "purge paths that disagree with the decision"
   rule, applied `V` symbols at a time. If no path at all agrees (the
   correct path was already lost), this purge is skipped for that depth.
3. The new snapshot is taken at the end of the depth.

The released block goes out (`out_valid`) as soon as the search ends. Block
k (k = 0, 1, ...) holds alpha[m-L-V+1 .. m-L] with m = (k+1)V - 1 and
`out_sym[0]` the oldest. Symbols before depth 0 are the start-up history
`INIT_SYM`. Each path therefore keeps L + 2V = 21 symbols: the newest 4 are
its trellis state, the next `V` go into snapshots, and the oldest `V` are
compared with the released block.

The decision delay is fixed by this rule: a symbol is released from the
path that was best L to L+V-1 depths after it was received. The rule is
taken as stated for SPEC-T. It is short for a 5-symbol pulse (see
*Detection performance*).

## Threshold loop

After extension every PE compares its four extended `d` with `T`. The total
number of live extended paths must land in `[M_MIN, M_MAX]` (default
`[8, 32]`); `M_MAX` is also the number of PE/PD pairs. If it does not,
`threshold_controller` changes `T` by 10% (`T/10`, at least 1): down when
there are too many paths, up when there are too few. The purge is then
repeated on the stored extended metrics, at one clock per repeat. `T` carries over
to the next depth. This design adds guards so the loop always ends. The
purge is accepted when raising `T` could not add paths (all extended paths
already alive, or `T` at 4095), when `T` is 0, or after `MAX_REP = 64`
repeats. If too many paths remain after a guard fires, the token bus
discards the surplus (`ev_drop`). A repeat limit of 16 was tried and, at
start-up, discarded the correct path; with 64 no drop was seen in any test.

## Token bus

Each `path_register` classifies itself after the purge:

* empty: no live extended path;
* carefree: exactly one;
* congested: more than one.

In `token_bus` both tokens enter at PD_0 and run down a bypass chain. The
broadcasting token BT stops at the first congested array and the receiving
token RT stops at the first empty one. Carefree arrays pass both tokens on.
Each clock the BT holder drives its highest-numbered extra path onto an
AND-OR bus and drops it from its own set, and the RT holder loads it as its
survivor. An array that has received a path no longer counts as empty.
When nothing is congested, every array commits in the same clock:

* an array that received a path keeps it;
* an array with one live extended path takes it;
* any other array becomes invalid.

Extended path s of a survivor has history `{hist[19:0], s}`. Its phase
state is `theta + alpha(hist[3]) mod 5`, because the symbol leaving the
correlative window moves into theta.

The source description lets the bus run on a faster clock than the PEs. Here
everything runs on one clock, so each transfer costs one PE clock cycle.

## Sequencer and timing

`specT_decoder` steps through one state per clock:

| state | cycles | action |
|---|---|---|
| IDLE | 1 + wait | take one symbol's samples (`in_valid`/`in_ready`); at a correction point wait here (`ev_stall`) while the previous search still runs |
| EXT | 1 | all PEs extend, PDs register the four `d'` |
| PURGE | 1 + repeats | threshold compare, count, maybe change T and repeat |
| REDIST | transfers + 1 | one token-bus transfer per cycle, then commit |
| SNAP | 1, correction points only | snapshot to the correction module |

With input always available a depth takes `4 + repeats + transfers`
cycles, plus one at correction points. The testbenches check this cycle by
cycle. At the default size (32 paths, V = 8) the correction search
(34 cycles) always finishes within V depths, so the decoder does not stall.
With V = 2 it stalls regularly. `rst` is synchronous and active high. After
reset PD_0 holds the start path (theta = 0, d = 0, history `INIT_SYM`), all
other arrays are empty, and T = `T_INIT` = 256. The decoder has no flush:
the last symbols of a stream come out only as later symbols push them
through.

## Module map

    cpm_detector_top          ports, Gray demapping
    └─ specT_decoder          sequencer, counters, wiring
       ├─ best_metric_spec    inc = sum |r|, Gamma_B register
       │  └─ iq_magnitude     max + ceil(min/2)
       ├─ processing_element  x M_MAX   extension + purge of one survivor
       │  └─ branch_metric_unit x 4    phase tables, cos/sin, correlation
       ├─ path_register       x M_MAX   PD_i: survivor, extended paths, class
       ├─ token_bus           BT/RT chains and bus
       ├─ threshold_controller
       └─ correction_module   serial min search, release
    cpm_pkg                   widths, types, constant tables, helpers

## Parameters

| parameter | default | meaning |
|---|---|---|
| `M_MAX` | 32 | survivors kept at most, and number of PE/PD pairs |
| `M_MIN` | 8 | survivors kept at least, unless fewer extended paths exist |
| `V` | 8 | correction period in depths, and symbols released per block |
| `T_INIT` | 256 | threshold after reset, in metric units (below) |
| `MAX_REP` | 64 | purge repeats per depth before the loop gives up |
| `INIT_SYM` | 0 | start-up history symbol (code) |

Metric units: the branch metric of one sample is its correlation divided by
128 with 127-scaled tables, so a noiseless sample of amplitude A adds about
A. Word widths are package parameters in `cpm_pkg.sv`: 8-bit samples,
12-bit phase, 12-bit `d` and `T`. The signal set (M, h, L, N) is fixed
there too. The values of `M_MAX`, `M_MIN`, `V`, `T_INIT` and all word widths
are this design's choices; the source description names these quantities
but gives no numbers.

## Detection performance

`tb/tb_cpm_snr_sweep.sv` runs 3000 random symbols per point through the
default-size detector. The noise is Gaussian with per-sample
sigma = A sqrt(N / (2 Es/N0)), Es/N0 = 2 Eb/N0, and A = 64. It reports:

* the bit error rate;
* DL_o, purge repeats per 1000 symbols;
* NC_r, token-bus transfers per depth.

| Eb/N0 | BER | DL_o | NC_r |
|---|---|---|---|
| 2 dB | 0.34 | 2081 | 13.7 |
| 4 dB | 0.28 | 1738 | 13.4 |
| 6 dB | 0.28 | 1556 | 13.1 |
| 7 dB | 0.12 | 1289 | 12.8 |
| 10 dB | 0.017 | 980 | 12.7 |
| 13 dB | 0 in 5990 bits | 988 | 12.4 |

The transfer count per depth is close to the 11-24 reported for SPEC-T.
The repeat count is higher than the 23-394 per 1000 symbols reported there.
That depends on `M_MIN`/`M_MAX` and on how the threshold moves, neither of
which is specified. The bit error rate is far from the near-Viterbi results
reported for SPEC-T at 2-7 dB. The cause is not the reduced search. A
floating-point model of a full 1280-state Viterbi detector, with the same
signal set, two samples per symbol and this noise definition, gives symbol
error rates of 0.36, 0.26, 0.09 and 0 at 3, 5, 7 and 10 dB. A
floating-point M-algorithm model with 23-128 paths behaves like the RTL.
At this SNR scale even the optimum detector is poor below about 8 dB. The
published curves must therefore use a different SNR definition or
receiver front end, which the source does not state. The RTL,
with its fixed-point datapath and 32 paths, is somewhat worse again, for
example a bit error rate of 0.12 at 7 dB. Treat
the detection performance of this configuration as unverified against the
published curves.

## Verification

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=F`, and each has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_branch_metric_unit` | 3000 random branches against a floating-point metric (tolerance 8), metric never above the sum of magnitudes |
| `tb_best_metric_spec` | increment bounds the true magnitude within 12%, Gamma_B follows a running sum with corrections |
| `tb_processing_element` | exact `d'` with clamping and correction, purge by threshold and by agreement derived from a symbol sequence |
| `tb_path_register` | start state, classification, offered path (history shift, theta step), broadcast removal, receive, commit |
| `tb_token_bus` | token positions, bus word, no receiver without broadcaster, drop flag, on random patterns |
| `tb_threshold_controller` | 20000 random evaluations against a model of the 10% rule and the guards |
| `tb_correction_module` | minimum and its symbols (both orders), latency NPD + 2, busy, hold until taken |
| `tb_specT_decoder` | small decoder (8 paths, V = 4) with input gaps: exact decisions on a noiseless stream, cycle count of every depth, survivor bounds |
| `tb_cpm_detector_top` | end to end at 16 paths, V = 2: noiseless half exact, noisy half (about 16 dB Es/N0) under 5% errors, Gray bits; requires threshold cut and raise, broadcasts, released blocks, agreement purges and stalls to occur |
| `tb_cpm_detector_full` | default size, 2000 symbols, same checks plus depth timing |
| `tb_cpm_snr_sweep` | the SNR sweep above; checks completion, NC_r bound and BER at 13 dB |

The reference transmitter (`tb/tb_cpm_ref_pkg.sv`) works in real
arithmetic, straight from the CPM phase definition, independent of the
design's tables. To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/cpm_pkg.sv tb/tb_cpm_ref_pkg.sv tb/tb_cpm_detector_full.sv \
        --top-module tb_cpm_detector_full -o sim
    ./obj_dir/sim

Replace the testbench name for the others. All of them finish in a few
seconds. The design is two-state clean: everything that is read is reset
or loaded first.

## Departures and open points

* One clock for the token bus and the PEs (the source allows a faster bus
  clock).
* A repeated depth repeats only the purge, not the extension, which gives
  the same result.
* The loop guards, the bus drop, the skipped agreement purge and the
  metric clamping are additions of this design.
* The sign of `E` in the speculation update and of the purge comparison is
  taken as "subtract the over-estimate" and "purge when `d > T`".
* The start state, Gray assignment, token order (lowest index first),
  which extra path a congested array sends (highest symbol), the magnitude
  estimator and all word widths are this design's choices.
* Not included: the analog quadrature demodulator and the sampler. The
  Viterbi, M- and T-algorithm detectors used as comparisons are not
  included either.
