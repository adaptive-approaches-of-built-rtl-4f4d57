# Low-power scan BIST with weighted test-enables and LFSR reseeding

Scan-based built-in self-test burns far more power than normal operation,
because pseudorandom patterns toggle every scan flip-flop on every shift
clock. This design cuts that power by splitting the scan flip-flops into
K subsets and clocking only one subset at a time. With the default K = 10,
at most 10% of the scan flip-flops (in the default setting) can change in any clock cycle, both while
patterns are shifted in and while responses are captured.

The test has two phases that share one small LFSR:

1. **Weighted pseudorandom phase.** The LFSR drives a phase shifter, which
   drives a *scan forest*. Each chain has its own test-enable signal, which
   is 1 (shift) with a programmable probability of 0.5, 0.625, 0.75 or
   0.875. A chain with a weight below 1 sometimes captures in the middle of
   shifting. This mixes circuit responses into the patterns and reaches
   faults that plain test-per-scan patterns miss.
2. **Deterministic phase with reseeding.** Faults that resist random
   patterns are covered by stored seeds. A seed is shifted into the LFSR
   and copied into a *shadow register*. The LFSR then expands it into a
   deterministic vector, while *extra variables* are XORed into LFSR stages
   during the first shift cycles. Each subset is filled in turn, and the
   LFSR is restored from the shadow register before each one, so every
   subset receives the same vector while only one subset is clocked. After
   the vector is captured, the LFSR's final state serves as a new seed for
   further *reseeding rounds*. These rounds give more vectors without more
   stored bits.

The method follows the low-power BIST scheme published in "Adaptive
Approaches of Built-In-Self-Test for Low Power Integrated Circuits" (Savitha
T. and Sujaya Grace CH). That paper describes the architecture and the test
schedule but not a netlist. Section "What is taken from the method and what
is chosen here" lists every decision made in this RTL.

## Block structure

```
            seed_rom ──► bist_controller ──► (mode, xv, seed_bit, shadow_cap,
                              │                 phase, test, subset init/adv,
                              │                 MISR enable)
                              ▼
  shadow_register ◄──► lfsr_xv ──► phase_shifter ──┬─► scan-in pins (NSI)
        (reload in one clock)  ▲                   └─► primary inputs (NPI)
                      extra variables xv
                                                    scan_forest (K subsets)
  weight_gen ──e[j]──► gating_logic ──te[j], clk_en[s]──►  NSI x K trees
                                                           x LPT chains x D
                                                           │ ppi ▲ ppo
                                                           ▼     │
                                                     circuit under test
                                                      (outside the top)
                     scan-outs, POs ──► xor_compactor ──► misr ──► signature
```

| module | role |
|---|---|
| `lp_bist_top` | the complete BIST; the circuit under test is attached through ports |
| `lfsr_xv` | external-XOR LFSR with extra-variable injection, serial seed shift-in, one-clock reload |
| `shadow_register` | copy of the current round's seed |
| `phase_shifter` | XOR network, three LFSR stages per output |
| `weight_gen` | per-chain weighted test-enables, or test-per-scan timing |
| `gating_logic` | subset ring R_k..R_1 (one-hot, or `nact` adjacent ones in phase 0), subset clock enables, per-chain test-enable multiplexer |
| `scan_chain` | mux-D scan chain (shift when te = 1, capture when te = 0) with clock enable |
| `scan_forest` | NSI scan-ins × K subsets × LPT chains per tree × depth D |
| `xor_compactor` | masks scan-outs with their subset's enable and folds them and the POs to the MISR width |
| `misr` | 32-bit multiple-input signature register |
| `seed_rom` | seed and extra-variable store; loaded through a write port, read synchronously |
| `bist_controller` | sequencing of both phases |
| `lpbist_pkg` | shared enums (`weight_t`, `lfsr_mode_t`, `phase_t`, `state_t`) |

## The scan forest and the subsets

Each phase-shifter output (a scan-in pin) drives K scan trees, one in
each subset. A tree is LPT chains of depth D that share the same scan-in,
so the LPT flip-flops at one level of a tree receive the same shifted bit.
This sharing compresses the data: an LFSR of 22 stages with 3 scan-in pins
loads 1800 flip-flops. All trees of subset s share clock enable `clk_en[s]`.

Numbering, used at the top-level ports:

* chain `j = (s*NSI + p)*LPT + t` is chain t of the tree on scan-in p in
  subset s, so subset s owns chains `s*CPS .. s*CPS+CPS-1`, with
  `CPS = NSI*LPT`;
* flip-flop b of chain j (b = 0 next to the scan-in) is bit `j*D + b` of
  `cut_ppi` and `cut_ppo`;
* `active_subset` is the ring R_k..R_1. Bit K-1 (R_k) is the first subset
  selected, and the selection moves one bit down per advance, wrapping from
  R_1 back to R_k. `clk_en[s]` is 1 only for the selected subset, and only
  in clocks in which the controller lets chains run.

Disabled chains keep their contents, so the circuit under test always sees
defined constants on their outputs. Scan flip-flops reset to 0.

## Phase 0: weighted pseudorandom patterns

For `pr_cycles` clocks the LFSR runs freely. The selected subset is clocked,
and each of its chains shifts or captures according to its own enable
`e[j]`. Every `pr_sub_cycles` clocks the next subset is selected, and the
ring wraps until the budget is spent. The MISR compacts every clock.

The run-time input `pr_active` sets how many subsets run together in this
phase. The ring then holds `pr_active` adjacent ones, starting at R_k, and
each step moves them on by `pr_active` places. With K = 10, `pr_active` = 1,
2 or 3 clocks 10%, 20% or 30% of the chains, the three activation levels
the method was evaluated with. A value of 0 counts as 1, and values above K
count as K. Phase 1 always clocks one subset at a time, because its
schedule fills and captures subset by subset.

`weights[j]` (type `weight_t`) selects:

| code | P(shift) | note |
|---|---|---|
| `W_0500` | 4/8 | |
| `W_0625` | 5/8 | |
| `W_0750` | 6/8 | |
| `W_0875` | 7/8 | |
| `W_TPS`  | D/(D+1) | conventional test-per-scan: D shifts, then one capture |

Weights below 0.5 are not offered, so a chain never captures more often
than it shifts. The weights themselves are chosen offline by a testability
analysis (COP controllability/observability with the weighted scan-cell
model, minimising a gain function over the random-pattern-resistant faults).
That analysis is software and is not part of this RTL. `W_TPS` is the
fallback for chains for which no weight improves the cost.

Inside `weight_gen`, a private 31-stage LFSR (x^31 + x^28 + 1) steps once
per phase-0 clock. Chain j reads three bits, each the XOR of two stages,
forms r in 0..7 and shifts when r < 4 + code.

## Phase 1: deterministic vectors, shadow register and reseeding

This is the part of the design that is hardest to follow. For each of the
first `num_seeds` words of the seed store, the controller runs the schedule
below. Clock counts are in brackets.

```
ROMRD   read word n                                         [1]
SEED    shift the L seed bits into the LFSR, MSB first      [L]
repeat 1 + num_reseed rounds:
  SAVE    shadow <= LFSR                                    [1]
  for each subset s (R_k first):
    FLOAD   LFSR <= shadow                                  [1]
    FILL    D shift clocks into subset s; during shift
            clock c < I, extra variables word[L+c*V +: V]
            are XORed into LFSR stages INJ_POS[]            [D]
  for each subset s:
    CAP     subset s captures (te = 0)                      [1]
    RLOAD   LFSR <= shadow                                  [1]
    REFILL  D shift clocks: the same vector is shifted in
            again while the responses go through the
            compactor into the MISR                         [D]
```

One seed word therefore takes `1 + L + (1 + num_reseed) * (1 + K*(D+1) +
K*(D+2))` clocks: 254 clocks at the defaults with no reseeding rounds, and
716 with two. The pseudorandom phase takes exactly `pr_cycles` clocks. `done`
rises after the last refill.

Key points:

* **Why the shadow register.** Only one subset may be clocked at a time, so
  one vector has to be shifted K times. Reloading the seed from the shadow
  register in one clock, and injecting the same extra-variable values
  again, reproduces the identical bit stream for every subset without
  storing the vector.
* **Reseeding rounds.** Round 0 expands the stored seed. Round r > 0 saves
  whatever the LFSR holds after round r-1 into the shadow register and
  runs the same schedule with the same extra-variable values. This yields a
  new, different vector at no storage cost. The encoder keeps a stored
  vector out of the seed list when a reseeding round already produces a
  compatible one. That compatibility check is offline; the hardware simply
  runs `num_reseed` rounds per seed (10, 20 and 30 in the published
  experiments).
* **Extra variables.** A vector with S care bits is encodable only if
  `L + I*V >= S`, and, cycle by cycle, if the care bits already shifted
  never exceed L plus the variables injected so far. With L = 22, V = 2 and
  I = 10, each vector may have up to 42 care bits per tree stream.
* **Seed word layout** (`seed_rom`, `WIDTH = L + I*V` bits): bits
  `[L-1:0]` are the seed, and bits `[L + c*V +: V]` are the V extra
  variables for shift clock c of every fill and refill.

### Producing seed words

Every scan bit is a linear (GF(2)) function of the seed and the extra
variables. The function follows from the LFSR recurrence (`TAPS`,
`INJ_POS`), the phase-shifter taps (three stages per output, chosen by
the formula in `phase_shifter.sv`) and the shift order: the bit shifted at
clock c of a fill ends in flip-flop D-1-c. To encode a test cube, write one
equation per care bit, in the tree stream of its scan-in pin, and solve
for the seed and the variables. `tb_lp_bist_top` contains a reference model
of exactly this expansion (`expect_tree`). The testbench checks it against
the hardware for every subset, round and seed.

### Measured shift activity

The s38417-sized workload testbench counts how many scan flip-flops
change in each clock. No clock toggled more flip-flops than the clocked
subsets hold (180 per subset). The average toggles per phase-0 clock were
95.7 with one subset clocked, 191.5 with two, 287.2 with three and 957.6
with all ten. That is 10.0%, 20.0% and 30.0% of the all-subsets figure. The
stand-in circuit is not a real netlist, so these numbers show how activity
scales, not the power of any particular chip.

## Top-level interface and timing

All signals are synchronous to `clk`. `rst_n` is an active-low synchronous
reset.

| port | dir | width | meaning |
|---|---|---|---|
| `start` | in | 1 | sampled while idle or done: clears the MISR, selects R_k, starts phase 0 (or phase 1 if `pr_cycles` = 0) |
| `pr_cycles` | in | 32 | clocks of phase 0 |
| `pr_sub_cycles` | in | 16 | clocks per subset in phase 0 |
| `num_seeds` | in | AW+1 | seed words used in phase 1 (0 skips it) |
| `num_reseed` | in | 8 | reseeding rounds per seed |
| `pr_active` | in | KW = clog2(K+1) | subsets clocked together in phase 0 (normally 1) |
| `weights` | in | `weight_t [NCH]` | weight per chain |
| `rom_we`, `rom_waddr`, `rom_wdata` | in | 1, AW, WIDTH | seed store load port; load before `start` |
| `cut_ppi` | out | NFF | scan flip-flop contents, to the circuit under test |
| `cut_pi` | out | NPI | primary-input patterns from the phase shifter |
| `cut_ppo` | in | NFF | circuit next-state values (captured when te = 0) |
| `cut_po` | in | NPO | circuit primary outputs, compacted every MISR clock |
| `bist`, `phase`, `state` | out | 1, 1, 4 | status |
| `active_subset`, `clk_en` | out | K | subset ring and subset clock enables |
| `signature` | out | 32 | MISR contents |
| `done` | out | 1 | test finished; stays high until the next `start` |

The configuration inputs must stay stable while a test runs. When no test
runs (`bist` = 0), every subset is enabled and every flip-flop loads
`cut_ppo`, which is the functional mode. The circuit under test connects
combinationally: `cut_ppo`/`cut_po` must depend only on
`cut_ppi`/`cut_pi` (and the circuit's real primary inputs).

## Parameters

Defaults of `lp_bist_top`:

| parameter | default | origin |
|---|---|---|
| `L` | 22 | LFSR size reported for s38417 (reported sizes range from 20 to 26) |
| `TAPS` | x^22 + x^21 + 1 | chosen (known primitive trinomial) |
| `V` | 2 | two extra variables, as in the published 8-stage example |
| `INJ_POS` | {0, 11} | chosen: first stage and mid-register, so the two variables are independent |
| `I` | 10 | chosen: extra variables in every shift clock of a fill |
| `K` | 10 | 10% of the chains active, the main configuration of the experiments |
| `NSI` | 3 | chosen ("a very small number of scan-in pins") |
| `LPT` | 6 | chosen: chains per tree |
| `D` | 10 | scan-tree depth reported for s38417 and most circuits |
| `NPI`, `NPO` | 28, 106 | s38417 primary inputs and outputs |
| `MW` | 32 | chosen MISR width |
| `DEPTH` | 512 | chosen: covers the largest reported vector count (384) |

With these values there are 180 chains and 1800 scan flip-flops, which is
room for the 1636 flip-flops of s38417. `lfsr_xv` on its own defaults to
the published 8-stage example: x^8 + x^6 + x^5 + x^4 + 1 with two extra
variables. In that example the second variable enters the feedback line,
which ends at the first stage, so both `INJ_POS` entries are 0.

## What is taken from the method and what is chosen here

Taken from the method:

* the scan forest: one phase-shifter stage per group of trees, and one
  tree per subset on each scan-in;
* one active subset per clock, with subsets rotated in phase 0 after a
  given number of clocks (and 20% or 30% of the chains as alternatives in
  phase 0);
* separate weighted test-enables from {0.5, 0.625, 0.75, 0.875}, with
  test-per-scan as the fallback;
* the phase multiplexer between the weighted enables and the common
  `test`;
* one LFSR for both phases, with extra variables;
* a shadow register as wide as the LFSR, reloaded in one clock;
* the deterministic schedule: fill per subset, then capture and refill per
  subset, with responses compacted during refill;
* reseeding rounds that keep the LFSR's final state;
* an XOR compactor followed by a MISR.

Chosen here:

* **Clock gating as clock enables.** The method gates the subset clocks
  with hold latches and multiplexes the shift and capture clocks. Here each
  gated clock is a clock enable on the scan flip-flops, which has the same
  cycle behaviour. A gated-clock implementation would put a latch-based
  clock gate on each `clk_en[s]`.
* **Phase-shifter taps**: three stages per output by a fixed formula. All
  32 default outputs have distinct tap sets, which the testbench checks.
  The method uses a synthesised phase shifter.
* **Compactor wiring**: chain j of a subset goes to MISR input
  `(j mod CPS) mod 32`. Since CPS = 18 ≤ 32, no two chains of one subset
  share an XOR. Scan-outs of unclocked subsets are masked.
* **MISR** width and polynomial (x^32 + x^22 + x^2 + x + 1), and
  **weight generation** (private LFSR, 3-bit comparison).
* **Seed store** as a loadable array, the word layout, serial MSB-first seed
  shift-in, a separate reload clock before each fill and refill, and MISR
  compaction only during refills in phase 1.
* **Several subsets in phase 0**: `pr_active` adjacent subsets, stepped
  by `pr_active` places. The method reports results for 20% and 30% but
  does not say how the subsets are grouped.
* Synchronous active-low reset everywhere; the scan flip-flops reset to 0.

## Not included

* The circuit under test. The method was evaluated on benchmark circuits
  (ISCAS89 s38417, ITC99 b19, IWLS2005 and an open core). Attach your own
  combinational logic to the `cut_*` ports.
* The offline procedures: weight selection, choice of primitive polynomial
  and number of extra variables, seed encoding, and the compatibility check
  of reseeded vectors. They produce the `weights` and the seed words.
* Sizing for circuits larger than s38417. Raise `NSI`, `LPT`, `D`, `NPI`
  and `NPO` (and `L`, `V`, `I` for vectors with more care bits).

## Simulating

Every testbench is self-checking and ends with
`TB_RESULT checks=N failures=M`. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/lpbist_pkg.sv tb/tb_lp_bist_top.sv --top-module tb_lp_bist_top
./obj_dir/Vtb_lp_bist_top
```

| testbench | what it shows |
|---|---|
| `tb_lp_bist_top` | the whole BIST at default parameters. It runs phase 0 and 3 seeds with 2 reseeding rounds, and checks every clock that at most one subset is clocked and no other flip-flop changes. It checks every filled and refilled vector against a reference expansion of seed + extra variables, that reseeding gives new vectors, and the exact test length. It also counts that every mechanism occurs. |
| `tb_workload_s38417` | the s38417-sized schedule: 500 000 phase-0 clocks and 3 seeds with 10, 20 and 30 reseeding rounds, then the 10-round schedule with 20%, 30% and 100% of the chains active in phase 0. It checks the test length, the largest number of subsets clocked at once, that the signature repeats, and that a stuck-at fault in a stand-in circuit changes the signature. It also counts scan flip-flop toggles (about 40 s). |
| `tb_bist_controller` | the state sequence, clock counts, seed-bit order, extra-variable values per clock, and the number of subset advances and MISR enables |
| `tb_lfsr_xv` | period 255 for the 8-stage example and 2^22-1 for the default top LFSR; a reference recurrence with random extra variables; shift-in, load and hold |
| `tb_weight_gen` | the measured shift probability per weight (±0.025 over 16 000 clocks), and the exact test-per-scan pattern |
| `tb_gating_logic`, `tb_scan_chain`, `tb_scan_forest`, `tb_xor_compactor`, `tb_misr`, `tb_shadow_register`, `tb_seed_rom`, `tb_phase_shifter` | each block against a reference model written in the testbench |

Phase 0 of the workload testbench uses 500 000 clocks, the length used in
the published fault-coverage experiments. Fault coverage itself is not
measured here, because that requires the benchmark netlists and a fault
simulator.
