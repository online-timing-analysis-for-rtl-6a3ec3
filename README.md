# Wearout detection unit: online timing analysis of one wire

Most wearout mechanisms in CMOS (electromigration in wires, gate-oxide
breakdown, NBTI, hot-carrier injection) do not break a circuit at once. For a
long time before the failure they only make cells and wires slower. Inside a
logic block many slightly slower cells lie on the path to every output, so the
output settles later within the clock period by far more than any one cell
slowed down. This design watches one such output wire while the chip runs. It
measures, on every transition, how long before the capturing clock edge the
wire settled. It compares a short-term, trend-following average of that
measurement with a long-term average kept over the life of the part, and
raises `failing` when the wire keeps settling clearly later than it used to.
A system can use the flag to swap in a spare unit or retire the block before
it produces wrong results.

The unit has three stages:

```
 sig_in ──┬───────────────────────────────► [FF] ─┬─► [FF] (previous value)
          │                                        │      │
          └─[buf]─┬─[buf]─┬─ ... ─[buf]─┐          │  XOR ─► transition
                  ▼       ▼             ▼          │
                 [FF]    [FF]   ...    [FF]        │
                  └── XOR with undelayed FF ◄──────┘
                          │ count zeros = slack
                          ▼
   Stage 1  ─►  mux(transition ? slack : 0)
   Stage 2  ─►  every other value ─► adder/accumulator (1024 values)
                ─► TRIX: EMA ─► EMA' ─► EMA'' (one shared datapath)
   Stage 3  ─►  compare with AVG ─► excursion run counter ─► failing
                or fold into AVG / COUNT ─► save_req to nonvolatile storage
```

| file | block |
|---|---|
| `rtl/wdu_pkg.sv` | default sizes, phase and state enums |
| `rtl/wdu_delay_chain.sv` | Stage 1 delay line (behavioural model) |
| `rtl/wdu_latency_detect.sv` | Stage 1 capture, compare, zero count, transition gate |
| `rtl/wdu_latency_sampler.sv` | Stage 2 decimation and accumulation |
| `rtl/wdu_trix.sv` | Stage 2 triple exponential moving average |
| `rtl/wdu_long_term.sv` | Stage 3 running average, threshold test, save/restore |
| `rtl/wdu_top.sv` | the whole unit for one wire |

## Stage 1: turning settling time into a number

The wire feeds a chain of 38 buffers. Each buffer is five inverters, about
100 ps in the 130 nm, 5 ns (200 MHz) setting the sizes come from, so the chain
spans 3.8 ns of the 5 ns period. The undelayed wire and all 38 taps are
captured by flip-flops on the same clock edge.

Suppose the wire settles at time *a* after the launching edge. Tap *k* shows the
new value at *a* + (*k*+1)·100 ps. If that is before the capturing edge, its
flip-flop agrees with the undelayed flip-flop; otherwise it still holds the
old value and disagrees. XOR of each tap register with the undelayed register
gives a vector whose zeros are the taps that made it in time. Their count is
the **slack**, in units of one buffer:

    slack = min(38, floor((T_clk - a) / 100 ps))

A later-settling wire therefore shows *less* slack. Everything downstream works
on slack, and "latency went up" means "slack went down".

The count only means something when the wire actually changed at that edge.
Without a transition all taps agree and the count reads 38. A second register
holds the previous undelayed value. The XOR of the two selects between the
count and a constant 0, and it also drives `slack_valid`. `enable` also gates
`slack_valid`, so the unit can be run only part of the time.

The delay chain is a property of placed buffer cells, so `wdu_delay_chain` is a
behavioural model using continuous-assignment delays (timeunit 1 ps). It gives
the right answer in an event-driven simulator. Synthesis reduces it to wires,
and a real implementation puts hand-placed delay cells in its place. The
capture logic `wdu_latency_detect` takes the taps as a plain input vector, so
it can be tested and synthesized on its own. A real chain also needs its
flip-flops' setup time taken into account. The model ignores it, so the
comparison happens exactly at the edge.

## Stage 2: snapshots and TRIX

The latency of a single transition depends heavily on the input data that
caused it, so single values are useless for trend detection. `wdu_latency_sampler`
accepts every other valid slack value and adds 1024 of them into a 16-bit
accumulator (38 × 1024 = 38912 fits). When the 1024th value is in, the sum is
passed on as one **snapshot** and the accumulator restarts. With a wire that
toggles every cycle, that is one snapshot every 2048 cycles. The sum is not
divided by 1024: every later step is linear, so the scale only sets the units
of the threshold.

`wdu_trix` smooths the snapshots three times with an exponential moving
average of weight α = 2⁻⁶:

    EMA1 += α (sample − EMA1)
    EMA2 += α (EMA1   − EMA2)
    TRIX += α (EMA2   − TRIX)

Multiplying by α is an arithmetic right shift by 6. The three updates share one
subtract–shift–add datapath, stepped through in three consecutive cycles by
the phase enum `trix_phase_e`. The registers carry 6 fraction bits below the
snapshot's units (22 bits in all), so steps smaller than 64 units are not lost.
The first snapshot after reset loads all three registers, so TRIX starts at the
measured level rather than at zero. `trix_valid` pulses three edges after a
snapshot is accepted, or at once for the seeding snapshot.

TRIX follows trends but lags them. With α = 1/64, a step in latency reaches half
its size in TRIX only after roughly 170 snapshots. This lag, together with the
Stage 3 persistence rule, is what makes the unit ignore short disturbances such
as temperature spikes, supply noise and jitter.

## Stage 3: the long memory and the decision

`wdu_long_term` holds `avg` and `count`. It takes one TRIX value in 16. For each
value it takes:

* if `count` is 0, the value becomes `avg`;
* otherwise it forms `gap = avg − trix`. A positive gap means less slack than
  the lifetime average, that is, more latency.
  * If `gap > threshold`, this is an **excursion**. The value is *not* folded
    into the average, so a wearing-out wire cannot drag its own reference
    along. A run counter advances, and 4 excursions in a row set the sticky
    `failing` flag.
  * Otherwise the run counter clears and
    `avg += (trix − avg) / (count + 1)`, `count += 1`, saturating at
    2¹⁶ − 1. Beyond that point the average weighs new values by 2⁻¹⁶.

The division runs on a serial restoring divider, one quotient bit per clock,
and truncates toward zero. `avg` is written TRIX_W + 2 = 24 clocks after the
value was taken. Stage 3 acts so rarely (every 16 × 2048 cycles at the
defaults) that the divider is never in the way. A TRIX value that arrives while
it is busy is dropped.

`threshold` is an input, in TRIX units. One buffer of slack on every accepted
transition is 1024 × 64 = 65536 units at the default sizes. The latency
increase that counts as total failure is commonly taken as 20 % of the clock
period, which is 1 ns or 10 buffers here. A threshold must sit well below that
to give warning in time. The full-size test uses 2 buffers (131072).

Wearout takes years, and the long-term average is only useful if it survives
power cycles. After every change of `avg`/`count` the unit pulses `save_req`
so that a controller can copy both to flash or other nonvolatile memory. At
power-up the controller drives `nv_avg`, `nv_count` and one cycle of `nv_load`
to restore them. A restore cancels an update in progress. The storage itself
and its controller are outside this design.

## Top level and ports

`wdu_top` chains the five blocks for one wire. Each wire to be watched needs
its own unit. In a processor, one would place units on selected outputs of
the blocks most likely to wear out (decode, fetch, register file and so on),
and a block counts as failing once any of its watched outputs is flagged. That
wiring is not part of this RTL.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `enable` | in | 1 | measurements on |
| `sig_in` | in | 1 | watched wire; changes once per cycle at most |
| `threshold` | in | 22 | excursion threshold, TRIX units |
| `nv_load`, `nv_avg`, `nv_count` | in | 1, 22, 16 | restore of saved Stage 3 state |
| `slack`, `slack_valid` | out | 6, 1 | Stage 1 result |
| `sum`, `sum_valid` | out | 16, 1 | snapshot |
| `trix`, `trix_valid` | out | 22, 1 | TRIX value |
| `avg`, `count` | out | 22, 16 | Stage 3 state (to be saved) |
| `exceed`, `save_req`, `failing` | out | 1 | excursion pulse, save request, failure flag |

Widths are for the default parameters:

| parameter | default | origin |
|---|---|---|
| `TAPS` | 38 | reference design (190 inverter delays) |
| `BUF_DELAY_PS` | 100 | five inverters of ~20 ps |
| `SAMPLES` | 1024 | reference design |
| `SAMPLE_EVERY` | 2 | reference design (every other transition) |
| `ALPHA_SHIFT` | 6 | reference design (α = 2⁻⁶) |
| `LT_INTERVAL` | 16 | this design's choice |
| `COUNT_W` | 16 | this design's choice |
| `PERSIST` | 4 | this design's choice |

Derived widths: slack `clog2(TAPS+1)`, sum `clog2(TAPS·SAMPLES+1)`, TRIX
sum width + `ALPHA_SHIFT`.

## What follows the reference design and what does not

Taken from the reference design:

* the structure of all three stages;
* 38 taps of five inverters each;
* XOR with the undelayed capture, with slack as the number of zeros;
* gating on a transition;
* every other transition and 1024-value snapshots used undivided;
* three EMAs with α = 2⁻⁶ on one shared datapath over three cycles;
* AVG and COUNT registers, with TRIX compared against AVG and folded in only
  when within the threshold;
* saving the state to nonvolatile storage.

Choices made here, where the reference gives no detail:

* the zero count in binary as the Stage 1 encoding;
* the `enable` gate and two warm-up cycles after reset;
* which transition of each pair is accepted;
* the fixed-point format and seeding of the EMAs;
* the direction of the comparison, so that only latency increases are flagged;
* "consistently beyond the threshold" taken as 4 consecutive sampled values;
* a sticky flag;
* one long-term sample in 16;
* the running-average arithmetic, with a divider and a saturating counter;
* `threshold` as a port;
* the save/restore handshake.

The design has not been characterized against silicon. How fast it detects a
given wear depends directly on `LT_INTERVAL`, `PERSIST`, the threshold and
how long the restored history is. These should be tuned for the block being
watched.

## Simulation

Every testbench is self-checking and ends with
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/wdu_pkg.sv rtl/wdu_*.sv \
    tb/wdu_top_tb.sv --top-module wdu_top_tb -o sim && obj_dir/sim
```

| testbench | what it does |
|---|---|
| `wdu_delay_chain_tb` | each tap changes between (k+1)·100 ps ± 10 ps |
| `wdu_latency_detect_tb` | 3000 random captures: thermometer and scrambled tap vectors, held wire, enable off |
| `wdu_latency_sampler_tb` | four full 1024-value snapshots against a model; decimation and timing |
| `wdu_trix_tb` | 1000 snapshots with a step, EMA1/EMA2/TRIX bit-exact against a model, latency, settling |
| `wdu_long_term_tb` | two configurations against a model: excursions, persistence, saturation, restore, update latency |
| `wdu_top_tb` | end to end with real arrival times through the delay chain, at 16-value snapshots, α = 1/4: held wire, enable off, a short late spike that must not be flagged, restore, lasting slowdown that must be |
| `wdu_top_full_tb` | all defaults: restored history at 37 buffers of slack, then a 400 ps slowdown; flagged about 460 000 cycles (2.3 ms at 200 MHz) later; about 20 s of simulation |
| `wdu_wearout_sweep_tb` | all defaults, data-dependent arrivals spread over 1000–3000 ps: learn, power-cycle and restore, then raise a wearout delay by 20 ps every 32 snapshots; no flag up to 100 ps, flag required before 1000 ps (20 % of the period). It flags at 340 ps; about 40 s of simulation |

The simulation is two-state. Every register the logic reads is reset.

## Known limits

* The delay chain is only a timing model. Real delay cells vary with process,
  voltage and temperature, and the chain ages along with the logic it
  watches. Neither effect is modelled.
* A single unit watches a single wire. Grouping several units into one
  per-block verdict is left to the system.
* The Stage 3 threshold, sampling interval and persistence have no reference
  values; the defaults are only reasonable starting points.
