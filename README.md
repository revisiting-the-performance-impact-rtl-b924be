# Overriding branch prediction front end with hierarchical update and multi-overriding

A large, accurate branch predictor cannot answer in one clock cycle, but fetch needs a
direction every cycle. The usual answer is an *overriding* organisation: a small single-cycle
predictor steers fetch at once, a slower and better predictor looks up the same branch in
parallel, and when it finishes a few cycles later and disagrees, fetch is re-steered. A
disagreement costs a few bubbles instead of a full pipeline flush.

Such a front end suffers from two latencies:

* **Lookup latency** – every override of the fast predictor costs the slow predictor's
  latency in fetch bubbles. This design adds a *middle* level that costs almost nothing: a
  *partial perceptron* prediction tapped from the perceptron's own adder tree over only the
  most recent history bits. It is ready earlier than the full sum and catches many of the
  fast predictor's mistakes sooner (*multi-overriding*).
* **Update latency** – predictors are normally trained at commit, which can be hundreds of
  cycles after the prediction when an older load misses in the caches. Meanwhile the small
  first-level predictor keeps repeating the same mistake, and each repetition is an override
  or a flush. This design trains the first level *as soon as the overriding predictor has
  spoken* (*hierarchical update*), and corrects that early training at commit if the
  overriding predictor turned out to be wrong.

The RTL is the branch-prediction front end of a one-instruction-per-cycle fetch: PC register
and re-steer multiplexer, BTB, first-level gshare, banked perceptron with partial and full
outputs, speculative global history, and the hierarchical-update path. The instruction cache
and the out-of-order core are outside it; they connect through ports.

## Default configuration

The defaults are those of a 20-stage pipeline (branch predictor to fetch restore):

| Part | Default | Parameter |
|---|---|---|
| First-level gshare | 2048 two-bit counters, 1 cycle | `L1_ENTRIES` |
| Perceptron | 348 rows × (bias + 47 history weights), 8-bit weights (≈16 KB) | `PERC_ENTRIES`, `bp_pkg::HIST_LEN` |
| Full perceptron latency | 4 cycles | `LAT_FULL` |
| Partial perceptron latency | 2 cycles (bias + 11 newest history weights, bank 0 of 4) | `LAT_PART` |
| BTB | 4096 entries, 4 ways | `BTB_ENTRIES`, `BTB_WAYS` |
| Hierarchical update | on | `HIER_UPDATE` |
| Multi-overriding | on | `MULTI_OVERRIDE` |
| Overriding predictor | perceptron | `OVR_KIND` |

Deeper pipelines use the same RTL with other parameters: for 40 stages, `L1_ENTRIES=1024`,
`LAT_FULL=8` (and e.g. `LAT_PART=4`); for 30 stages `L1_ENTRIES=1024`, `LAT_FULL=6`; for 10
stages `LAT_FULL=2`, where there is no cycle left for a middle level and multi-overriding
switches itself off. `OVR_KIND=OVR_HYBRID` replaces the perceptron by a global/local
tournament predictor (1K local histories of 10 bits, 1K three-bit local counters, 4K global and
4K choice counters); it has no partial output, so only hierarchical update applies. Its
20-stage latency is 3 (`LAT_FULL=3`).

## Life of one fetch

Latency *L* means: looked up in cycle *t*, result used in cycle *t+L-1*, corrected address
fetched in cycle *t+L*. The prediction pipeline has `LAT_FULL` stages, stage 0 being the fetch
cycle itself.

1. **Stage 0 (fetch).** `fetch_pc` is the PC register. The BTB says whether it is a branch and
   gives the taken target; gshare (address ⊕ history) gives a direction. The next PC is the
   target or PC+4 and the global history is shifted with the predicted direction, all in this
   cycle. The perceptron lookup starts with the same address and history.
2. **Stage `LAT_PART-1`.** The partial sum (bias + newest-history bank) arrives. If its sign
   disagrees with the direction fetch followed, the fetch is re-steered, younger stages are
   squashed, and the history is rebuilt from the history this branch saw plus the new
   direction.
3. **Stage `LAT_FULL-1`.** The full sum arrives and is compared the same way (final override).
   The first-level entry is written with the perceptron's direction (hierarchical update). The
   instruction leaves on `deliver_valid`/`deliver_meta` with its prediction record.

Re-steers are ranked by the age of the instruction causing them: back-end misprediction,
then a decode-stage source (RAS, static predictor, decode target, iBTB; in that order among
themselves), then the final override, the middle override and finally the first-level
prediction. Back-end and decode-stage re-steers come from instructions that have already left
the prediction pipeline, so they flush all of it.

## Hierarchical update and compensating counters

This is the subtle part. The first-level predictor has one write port, fed through a
multiplexer (`hu_mux`) from two sources:

* the **early update** from the final perceptron stage: move the counter one step toward the
  perceptron's direction, whether or not the two predictors agreed;
* the **commit update** with the real outcome.

Each branch's record carries `hu_done` (its early update was written) and the perceptron's
direction, so at commit `hu_mux` knows what happened earlier:

| Early update written? | Perceptron was | Commit action |
|---|---|---|
| no | – | one step toward the outcome |
| yes | right | none – the counter already moved correctly |
| yes | wrong | **two** steps toward the outcome |

The two-step update exists because a wrong early update pushed the counter the wrong way.
With only one corrective step a counter could swing between 00 and 01 forever, never
predicting taken although the branch always is. Doing two steps in one write (`comp_counter`)
undoes the bad step and trains in the same cycle. Counters saturate at 00 and 11:

| counter | taken, step 1 | taken, step 2 | not taken, step 1 | not taken, step 2 |
|---|---|---|---|---|
| 00 | 01 | 10 | 00 | 00 |
| 01 | 10 | 11 | 00 | 00 |
| 10 | 11 | 11 | 01 | 00 |
| 11 | 11 | 11 | 10 | 01 |

If a commit and an early update want the port in the same cycle, the commit wins and the
early update is dropped; the dropped branch then has `hu_done` clear and gets a normal
commit update, so nothing is double-counted. Early updates from branches later found to be on
a wrong path are never undone. With multi-overriding, only the full perceptron trains the
first level, never the partial one.

## The partial perceptron

The perceptron predicts taken when `w0 + Σ xᵢ·wᵢ ≥ 0`, with `xᵢ = +1` for a taken history bit
and `-1` otherwise. The weight table is split into four banks of 12 weights; bank 0 holds the
bias and the weights of the 11 newest history bits, which carry the strongest correlation. One
narrow extra adder sums bank 0 alone and gives the middle-level prediction; the full adder
tree sums all 48. Both come from one table and one training rule (at commit: when the stored
sum had the wrong sign or `|sum| ≤ 104 = ⌊1.93·47+14⌋`, each weight steps by ±1, saturating
at −128/127). In the RTL the table is read at the lookup's clock edge, both sums are formed in
the next cycle, and register chains (`pipe_delay`) give them their latencies; the Wallace-tree
shape of a real implementation is left to synthesis.

## Interface to the rest of the core

All types are in `rtl/bp_pkg.sv`.

* `fetch_valid`, `fetch_pc` – address for the instruction cache, one per cycle once `ready`.
* `deliver_valid`, `deliver_meta` (`bp_meta_t`) – the instruction leaving the predictor
  pipeline, `LAT_FULL-1` cycles after its fetch, with: PC, the history it saw, BTB hit and
  target, the first-level, partial, full and final directions, the perceptron sum, the hybrid
  predictor's local history and component directions, and `hu_done`. The core keeps this
  record with the instruction.
* `misp_redirect` (`bp_redirect_t`) – from execute: correct PC and the repaired history
  (`{record.ghr, outcome}` for a branch).
* `dec_redirect[4]` – the decode-stage re-steer points, indexed by `resteer_src_e`.
* `commit` (`bp_commit_t`) – a committed conditional branch: its record, outcome and target.
  Trains the perceptron (or tournament predictor), the first level through `hu_mux`, and fills
  the BTB for taken branches.
* `events` (`bp_events_t`) – one-cycle pulses for performance counters: overrides per level,
  re-steers, early updates written or dropped, commit updates normal/compensating/skipped.

After reset every table is cleared one entry per cycle; `ready` rises after the longest walk
(2048 cycles for gshare, 4096 with the tournament predictor). There is no fetch back-pressure
input.

## Files

| File | Contents |
|---|---|
| `rtl/bp_pkg.sv` | sizes, record and event types, threshold function |
| `rtl/bp_frontend.sv` | top: PC, re-steer mux, override stages, wiring |
| `rtl/gshare_l1.sv` | first-level predictor |
| `rtl/comp_counter.sv` | 2-bit counter with step 1 or 2 |
| `rtl/hu_mux.sv` | update-port multiplexer and commit rules |
| `rtl/perceptron_mo.sv` | banked perceptron, partial and full outputs, training |
| `rtl/hybrid_ovr.sv` | tournament predictor (alternative overriding level) |
| `rtl/ghr_spec.sv` | speculative global history |
| `rtl/btb.sv` | 4-way BTB |
| `rtl/pipe_delay.sv` | register chain for predictor latencies |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/bp_backend_model.sv`, `tb/bp_tb_pkg.sv` | behavioural back end and program used by the front-end tests |
| `tb/tb_bp_frontend.sv` | end-to-end test at the default sizes |
| `tb/tb_bp_frontend_hybrid.sv` | end-to-end test with the tournament predictor |
| `tb/tb_bp_workload.sv` | base / HU / MO / both at 10- to 40-stage latencies, base / HU with the tournament predictor |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. With Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal \
  rtl/bp_pkg.sv rtl/*.sv tb/bp_tb_pkg.sv tb/bp_backend_model.sv tb/tb_bp_frontend.sv \
  --top-module tb_bp_frontend -Mdir obj -o sim
./obj/sim
```

Replace the last file and top name for another testbench (the module tests need only
`rtl/` plus their own file). All run in well under a minute.

The unit tests compare each module with a reference model written separately in the
testbench: exhaustive next states for `comp_counter`, random traffic against reference tables
for gshare, BTB (including round-robin replacement), perceptron (sums, exact partial and full
latency, training and saturation) and tournament predictor, and all rule combinations for
`hu_mux`. The end-to-end test runs 40 000 fetch cycles of a small looping program (counted
loop, a random branch, a branch repeating it, a periodic branch) through a behavioural core
with 14-cycle commit and 150-cycle commit stalls. It checks every correct-path instruction's
address, its history and its `LAT_FULL-1` cycle transit, and requires each mechanism (both
override levels, back-end and decode re-steers, early updates written and dropped, normal,
compensating and skipped commit updates) to occur. On that program hierarchical update cuts
final perceptron overrides by about 15 % at 10 stages and by about a third at 20 to 40
stages. With the tournament predictor the effect is small and goes either way (10 % more at
20 stages, 12 % fewer at 40), in line with early updates from a less accurate predictor
being wrong more often. Throughput differences on a five-branch loop are not meant to
reproduce benchmark results and are only printed.

## How far to trust it, and what was chosen here

Taken from the published design: the overriding organisation and its re-steer points, the
three prediction levels from one banked perceptron, hierarchical update through a single
multiplexer with skip/step-2 compensation, early training by the full perceptron only, no
repair of wrong-path early updates, speculative history with repair, and all table sizes and
latencies listed above.

Choices made here where the source is silent:

* partial-perceptron latency (2 cycles at 20 stages), four equal banks, 8-bit weights, the
  training threshold, and indexing by word address modulo 348;
* one instruction fetched and predicted per cycle, with the BTB deciding what is a branch
  (BTB misses run sequentially and stay out of the history);
* re-steer priorities, and commit winning the first-level write port;
* the record-based interface to the core instead of an internal queue of in-flight branches;
* the tournament predictor's counter widths, index bits and local-history update timing;
* reset by clearing walks, counter start values (weakly not-taken), 64-bit PC and reset PC.

Not included: the instruction cache, the decode-stage predictors that issue re-steers (RAS,
static predictor, iBTB), and the out-of-order core; only their interfaces are present. The
idealised study settings (no lookup latency, update at prediction time) use oracle knowledge
and are not hardware. No timing or area claims are made: the adder tree and the 348-row
modulo index are written for clarity, not for a cycle-time target.
