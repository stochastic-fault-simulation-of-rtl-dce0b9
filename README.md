# Triple-modular redundant clockless pipelines

A clockless (self-timed) pipeline moves data by handshakes: a request says "data is here", an
acknowledge says "taken". Its timing lives in C-elements, which wait for their inputs to agree.
One faulty gate anywhere on that control path can stall the whole pipeline forever, or double or
drop a data item.

This RTL makes such pipelines tolerate faults with triple-modular redundancy (TMR):

- Every wire, C-element and latch is triplicated.
- The three copies of each signal (a *triplet*) are restored by a *triplex voter* behind every
  C-element and every mutual-exclusion element. The voter is three 2-of-3 voters, each seeing
  all three copies.

A single stuck gate then changes one copy, and the next voter outvotes it. The copies never
need a shared clock. Each voter follows the median (second-arriving) transition of its
triplet, so it also evens out the skew between the copies.

Everything is in SystemVerilog. The gates are behavioural, with zero delay, and explicit delay
elements sit where a matched delay is needed. This is the same level of modelling that
stochastic fault simulation uses, and the test benches here do such a simulation too.

## Building blocks

| Module | What it is |
|---|---|
| `c_element` | N-input Muller C-element. The output goes to the common value when all inputs agree and holds otherwise. Modelled as a latch. |
| `maj3` | Combinational 2-of-3 majority gate, bitwise. |
| `hfmv` | Hazard-free majority voter. It follows the first majority change, then *freezes* until all three inputs agree. A late glitch on the third copy therefore cannot reach the output. |
| `voter` | Selects `maj3` or `hfmv` through the `VOTER` parameter (`tmr_pkg::voter_e`). |
| `triplex_voter` | Triplex restoring stage for a WIDTH-bit triplet. |
| `capture_pass_latch` | Two-phase latch. It is transparent when its capture and pass controls are equal and holds when they differ. |
| `delay_element` | Behavioural inertial delay with optional random jitter. Used for matched delays and inside the CMAJ. |
| `cmaj` | C-element that degrades to a majority gate. See below. |
| `mutex` | Behavioural two-way arbiter. A real one needs an analogue metastability filter. |

## The two pipelines

**Triplex 2-phase bundled-data micropipeline** (`triplex_dataless_pipeline`,
`triplex_micropipeline`):

- Each stage of the control has three C-elements. Each C-element joins the previous stage's
  request with the inverted acknowledge of the next stage.
- A triplex voter restores the three C-elements.
- A forward delay element models the data path.
- The voted control of stage *i* and *i+1* drives the capture and pass inputs of the three
  latch copies of stage *i*.
- Between stages, every data bit is voted, so a corrupted latch copy is corrected in the next
  stage.
- Defaults: 10 stages and 8 bits. Capacity: 10 words.

**Triplex 4-phase dual-rail (4P2R) pipeline** (`triplex_4p2r_stage`, `triplex_4p2r_pipeline`):

- One bit is coded on a true rail and a false rail. Both low means empty; both high is illegal.
- Each stage has a true-rail and a false-rail C-element. Each joins its rail with the inverted
  next-stage acknowledge.
- An OR gate over the voted rails gives the acknowledge sent back.
- In triplex form a stage has 6 C-elements, 6 voters and 3 OR gates.
- No matched delays are needed.
- Each stage is a half buffer. The 10-stage default holds 5 bits.

## Getting in and out: the CMAJ element

A simplex (single-copy) sender or receiver must join the triplex world at each end.

Requests and data are simply fanned out (`s2t_bundled`, `s2t_handshake`). Combining three
copies into one is harder:

- A majority gate fires on the second-arriving copy. At that moment the third copy's data may
  still be changing.
- A C-element waits for all three copies, so a stuck copy deadlocks it.

`cmaj` combines the two. It acts as a 3-input C-element until two inputs have agreed for
`DELAY` time units, and then acts as a 2-of-3 majority gate. It is built from:

- a majority gate;
- a delay element;
- a 3-of-5 majority gate whose inputs are the three copies, the delayed majority and its own
  output.

If all three copies arrive together, it fires at once. If one copy is dead, it fires `DELAY`
after the second copy.

Where the CMAJ is used:

- `s2t_bundled` uses it on the acknowledge triplet.
- `t2s_bundled` uses it on the request triplet. It then latches the bitwise vote of the three
  data copies at the CMAJ transition, using a capture-pass latch that the simplex acknowledge
  reopens.
- The 4P2R interfaces (`s2t_handshake`, `t2s_handshake`) use plain voters. Dual-rail data
  carries its own validity.

`DELAY` defaults to 10. It must exceed the largest skew between the copies.

## Flow-control elements

Larger systems are composed from these elements:

- **`triplex_fork`**: copies a 2-phase channel to two branches. The two acknowledge triplets are
  joined by a C-element triplet and a voter.
- **`triplex_join`**: the mirror of the fork. The output data is `{a, b}`.
- **`triplex_merge`**: a 4-phase bundled-data merge of two mutually exclusive inputs:
  - output request = OR of the two input requests;
  - data is selected by request B;
  - each input acknowledge = C(its request, output acknowledge), restored by a voter.
- **`triplex_mutex`**: three arbiters, one per copy. Their grants pass through two triplex voters.
  Copies that decided differently because of skew are outvoted, so the voted grants always
  agree.

## Timing rules a user must respect

The zero-delay gate model makes some rules explicit that real gate delays would partly hide:

1. **Delay elements are inertial.** A pulse shorter than the delay is swallowed.
   - In the micropipeline control, `JITTER` (random extra delay for testing) must stay below
     `REV_DELAY`. Otherwise the one-copy request pulse that a stuck C-element produces can
     vanish in its neighbour, and the pipeline deadlocks.
   - Elaboration stops with an error if `JITTER >= REV_DELAY`.
2. **Switch acknowledge copies together at the micropipeline output.** If one acknowledge copy
   lags by more than the last stage's acknowledge delay, that latch copy reopens briefly and
   takes the next word. The result is a silently corrupted copy, which one more fault could turn
   into a wrong output.
3. **Switch rail copies together at the 4P2R input.** If a rail copy is still high after the
   voted handshake has completed, it fires its C-element again as a stale token.
4. **Space CMAJ input events more than `DELAY` apart.** The slow path must finish before the
   inputs change again.
5. **Keep merge inputs mutually exclusive.** Put a `triplex_mutex` in front of the merge
   otherwise.

Every module that holds handshake state has an active-high `rst`, which empties C-elements, HFMVs and arbiters. Apply it for
longer than the longest delay element.

## Top level

`tmr_async_top` has default parameters STAGES=10, WIDTH=8, VOTER=MAJ, FWD_DELAY=2 and
CMAJ_DELAY=10. It places three designs side by side:

- `mp_*`: simplex 2-phase source → `s2t_bundled` → 10-stage 8-bit triplex micropipeline →
  `t2s_bundled` → simplex sink.
- `dr_*`: simplex dual-rail source → `s2t_handshake` → 10-stage triplex 4P2R pipeline →
  `t2s_handshake`.
- `fk_*`, `jn_*`, `mg_*`, `mx_*`: the triplex fork, join, merge and mutex, with their triplex
  ports brought out.

Simulators report `UNOPTFLAT` loop warnings on the handshake nets. These loops are the intended
asynchronous feedback through C-elements, voters and OR gates.

## Verification

Every module has a self-checking bench in `tb/`. Each bench prints
`TB_RESULT checks=N failures=M` and has a watchdog. To run one with plain Verilator:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv -Irtl -Itb rtl/tmr_pkg.sv tb/tb_tmr_async_top.sv \
  --top-module tb_tmr_async_top
./obj_dir/Vtb_tmr_async_top +verilator+rand+reset+2
```

What the benches cover:

- **`tb_tmr_async_top`** runs the whole top at its default parameters.
  - It sends words through the micropipeline until the pipeline is full, then drains it.
  - It repeats this with a stuck C-element, and again with a stuck first-stage voter copy. The
    stuck voter copy makes the input CMAJ take its slow path.
  - It sends bits through the 4P2R pipeline, with and without a stuck C-element.
  - It exercises fork, join, merge and mutex contention.
  - It counts every one of these events and fails if one never happened.
- **`mp_fault_bench` / `dr_fault_bench`** are the cores behind `tb_triplex_micropipeline` and
  `tb_triplex_4p2r_pipeline`.
  - They force each C-element, voter, OR gate and latch copy stuck-at-0 and stuck-at-1, one at
    a time.
  - Each run fills the pipeline until it stalls, then drains it.
  - A run fails on deadlock, on wrong data, or on an output without an input.
  - Every single-fault run must pass. All do, for both voter types.
- **`tb_fault_sweep`** runs a stochastic fault simulation:
  - Each control gate is independently stuck-at-0 or stuck-at-1.
  - The probability is P_SA times the gate's size weight: C-element 1.25, majority gate 1.5,
    HFMV 6.25, OR gate 0.75.
  - The weight is transistors / 8. Stuck-at-0 and stuck-at-1 each get this share.
  - The micropipeline is also swept with *early-transition* faults in place of stuck-at faults.
    A faulty C-element switches on one of its two input events alone. A faulty voter copy
    follows one of its inputs alone. The weights are 2.5, 1.5 and 6.25.
  - There are 60 runs at each of 8 fault probabilities, so the rates below are coarse (about
    ±0.06). One run of the bench takes about 75 s.

Pipeline error rate (fraction of runs that failed):

| P (stuck-at, or early for the last two columns) | micropipeline MAJ | micropipeline HFMV | 4P2R MAJ | 4P2R HFMV | micropipeline MAJ, early | micropipeline HFMV, early |
|---|---|---|---|---|---|---|
| 0.0005 | 0.00 | 0.00 | 0.00 | 0.03 | 0.00 | 0.00 |
| 0.001  | 0.00 | 0.05 | 0.00 | 0.03 | 0.00 | 0.00 |
| 0.002  | 0.03 | 0.08 | 0.02 | 0.13 | 0.00 | 0.00 |
| 0.005  | 0.05 | 0.40 | 0.08 | 0.62 | 0.00 | 0.02 |
| 0.01   | 0.13 | 0.78 | 0.23 | 0.95 | 0.00 | 0.08 |
| 0.02   | 0.27 | 1.00 | 0.75 | 1.00 | 0.03 | 0.13 |
| 0.05   | 0.90 | 1.00 | 1.00 | 1.00 | 0.23 | 0.55 |
| 0.1    | 1.00 | 1.00 | 1.00 | 1.00 | 0.72 | 0.95 |

The hazard-free voter is about four times the size of a majority gate. It is therefore a bigger
fault target, and at equal gate fault probability its pipelines fail more often. The 4P2R
pipeline has 2.5 times as many control gates per stage, so it is less reliable than the
micropipeline. In these runs, early transitions were tolerated better than stuck-at faults at
the same probability.

Every bench was also run against a deliberately broken copy of its module and reported failures.

## Where this RTL stops

- **Fault models.** Stuck-at faults are injected in both pipelines. Early-transition faults
  are injected only in the micropipeline control. Late-transition faults are not modelled, and
  stuck-at and early faults are not mixed in one run. In the zero-delay 4P2R model, a C-element
  that follows one input alone forms a loop with its voter and OR gate that never settles.
  Early faults there would need gate delays.
- **Reduced sweep.** The sweep uses 8 probabilities × 60 runs, not a dense grid with thousands
  of runs per point. Raise `RUNS` in `tb_fault_sweep` for finer estimates.
- **Not provided:**
  - the triplex MUX/DEMUX (conditional flow control);
  - the dual-rail merge;
  - simplex baseline pipelines for comparison.
- **Zero-delay gates.** The only delays are `FWD_DELAY` (2), `REV_DELAY` (1) and `CMAJ_DELAY`
  (10). They are chosen values and do not come from a process.
- **Zero-delay voters.** A real design also needs each voter's minimum delay to exceed the skew
  between its input copies. Here the voters have zero delay, so that rule is not modelled. The
  environment rules above take its place.
- **Behavioural parts.** `mutex` and `delay_element` are behavioural models. The arbiter
  resolves simultaneous requests in favour of `r1` at once.
- **Voter choice.** The default voter is the majority gate. Set `VOTER = VOTER_HFMV` to build
  everything with hazard-free voters.
