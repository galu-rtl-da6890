# GALU: genetic-algorithm key search for logic-locked circuits

Logic locking hides a circuit's function behind extra key gates: the chip
behaves correctly only when the right key bits are applied. An attacker who
holds the locked netlist and a working chip can record input/output pairs from
the chip and then search for a key that reproduces them. GALU does that search
with a genetic algorithm, not a SAT solver. A population of candidate keys is
scored by how many circuit outputs they get right on the recorded pairs. The
better keys are bred into the next population, and the search stops when one
key gets (almost) every output right.

Nearly all the time goes into scoring. Each generation evaluates the locked
circuit P x T times (P keys, T training pairs). This RTL therefore builds the
locked circuit itself into the accelerator ("circuit emulation"). It then runs
the whole genetic loop on chip around it: scoring, sorting, selection,
crossover, mutation and the diversity control. The host only loads the
buffers and reads the result.

## The loop in hardware

```
            key_buffer (P keys) <------------------------------------+
                 |                                                     |
  training_buffer -> emulator_stage -> pingpong_buffer -> cnf_eval_unit |
   (T pairs)          (locked netlist)   (2 banks)        (N_CE engines)|
                 |                                             |        |
          diversity_unit                          fitness_accumulator  |
          (bit counts, D)                                      |        |
                 |                                      sorting_engine |
                 +--> mutate_en, p_mutate                      |        |
                                                        selection_unit |
                                                               |        |
                                              crossover_mutation_unit --+
  rand_buffer (host random words) --> selection, crossover/mutation
  ensemble_voter: majority of the top E keys, after the search
```

There is no central state machine. Each unit starts when the unit before it
raises its done flag. `galu_top` keeps only the generation counter and the
stop test:

* `fitness_accumulator.eval_done` starts `sorting_engine` and the diversity
  computation.
* `sorting_engine.done` decides the outcome:
  * success if the best score reaches the threshold;
  * stop if this was generation G-1;
  * otherwise start `selection_unit`.
* `selection_unit.done`, together with the diversity result, starts
  `crossover_mutation_unit`. It also restarts `emulator_stage` for the next
  generation.

The restart is the early start. The emulator may evaluate key j as soon as
the breeder has written child j. `keys_avail` tracks the breeder's written
count, and the emulator waits whenever it catches up. So breeding overlaps
the next evaluation instead of adding to it.

## Scoring: emulation, ping-pong buffer and checking engines

`emulator_stage` walks keys in the outer loop and training pairs in the inner
loop. Each cycle it applies one (input, key) pair to the combinational locked
netlist (`target_circuit`) and registers the observed outputs. It pushes
`{last pair, key index, expected, observed}` into the ping-pong buffer.
`key_seen` pulses when a key's first pair is emitted, which feeds the
diversity counters.

`pingpong_buffer` has two banks. The emulator fills one bank while the
checkers read the other. A bank is freed by the reader's `rd_release`. When
both banks are full the emulator stalls (`stall`).

`cnf_eval_unit` holds N_CE `cnf_checking_engine`s on one broadcast bus. Each
engine owns a CNF buffer: a short list of observable-wire indices. All engines
step through their lists in lock step, one slot per cycle. Each counts the
wires where the observed value equals the expected one. A bank is therefore
checked in ceil(N/N_CE) cycles. With the defaults (N = 7, N_CE = 16) that is
one cycle, so evaluation runs at one pair per clock. The lists default to a
round-robin split (wire w goes to engine w mod N_CE). The host can rewrite
them through `cnf_cfg_*`, for instance to group wires that depend on the same
key gates.

After a key's last pair, the per-engine counts go to `fitness_accumulator`.
It adds them serially, one engine per cycle (N_CE cycles), stores the key's
fitness, and tracks the best key. Fitness is kept as an integer count of
matching outputs out of T x N; the ratio is never formed. The stop test is
`fitness >= floor(T*N*(1-eps)) + 1`, which is the integer form of
"fitness > 1 - eps". With the defaults this is 700 of 700 matches.

Timing of one generation, with every key present: P x T x ceil(N/N_CE)
cycles of emulation. The last key's accumulation adds up to N_CE cycles, and
sorting adds P+1. `tb_galu_top` checks the first-generation evaluation time
against P x T x D ... P x T x D + N_CE + 8.

## Sorting and diversity

`sorting_engine` is an odd-even transposition sorter over P (fitness, index)
cells. It does P phases of neighbour compare-and-swap, descending by fitness,
with ties going to the lower index. `done` follows P+1 cycles after `start`.

`diversity_unit` counts, per key bit j, how many keys have a one (c_j) while
keys enter emulation. For 0/1 keys the per-bit variance of the population is
c_j (P - c_j) / P^2. The absolute-deviation (l1) form is just twice that. The
unit therefore works with the integer D = sum_j c_j (P - c_j), summed over K
cycles.

* **First generation.** The threshold is set to D/2, and mutation stays off.
* **Later generations with D below the threshold.** Mutation switches on. Its
  rate is chosen so that the expected diversity gain fills the gap:
  adding bit noise with probability p_F = p_mutate x p_flip raises the summed
  variance by about K x p_F. Solving for p_mutate gives

      p_mutate = (D_th - D) / (P^2 x K x p_flip),

  computed as a 16-bit fraction `((D_th - D) << 32) / (P^2 K p_flip_fx)`. A
  64-step serial divider (`seq_divider`) does the division, and the result
  saturates at 0xFFFF. The noise variance sigma^2 is taken as 1.

The unit takes K+1 cycles, or K+67 when the divider runs. Both overlap the
sort.

## Selection, pairing, crossover and mutation

All probabilities are 16-bit fractions of 65536:

| probability | value | fraction of 65536 |
|-------------|-------|-------------------|
| p_cross | 0.9 | 58982 |
| p_exch | 0.5 | 32768 |
| p_flip | 0.05 | 3277 |

A probabilistic decision compares one 16-bit half of a word from the host's
random buffer against the fraction. Selection and breeding read from
separate regions of that buffer.

`selection_unit` draws L parents with replacement, each with probability
proportional to (fitness - worst fitness). The worst key can never be chosen.
It works in three phases:

1. **Prefix sums.** P cycles to build the prefix sums of (fitness - worst
   fitness).
2. **Draws.** One draw per cycle. A draw scales a 32-bit random word by the
   total. The chosen rank is the number of prefix sums not above that value,
   found by a parallel compare. If every key has the same fitness the draw is
   uniform.
3. **Emit.** The parents come out in rank order, best first, read from the
   key buffer through the sort order.

`crossover_mutation_unit` is a single breeding unit. For each of the L/2
pairs:

* **Pairing.** The first parent is the fittest parent not yet paired. The
  second is the unpaired parent at the largest Hamming distance from it, with
  ties going to the fitter one. This is disparity-aware pairing.
* **Crossover.** One word decides crossover with p_cross. Each couple of
  children uses an exchange mask of K bits. With crossover, each mask bit is
  one with p_exch, two bits per random word; without crossover the mask is
  zero. The two children are `p1 ^ (mask & (p1 ^ p2))` and
  `p2 ^ (mask & (p1 ^ p2))`. Each pair makes C children, so P = (L/2) x C,
  which elaboration checks.
* **Mutation.** When enabled, each child is mutated with probability
  p_mutate. A mutated child has each bit flipped with p_flip.
* **Write-back.** The children go straight back into `key_buffer`, and the
  next generation's emulator follows behind.

Because the children of a couple are complementary, crossover keeps every
bit column's count of ones unchanged. Only selection and mutation change
diversity.

## The emulated circuit

The locked netlist is part of the RTL, as it would be when mapped onto an
FPGA. `target_circuit` selects it by the `CIRCUIT` parameter:

* `CIRC_C17`: `c17_locked`, the ISCAS-85 c17 with two key gates and the
  output comparators (`comp = po XNOR g_po`, `equal = AND(comp)`). The correct
  key is key[0] = 1, key[1] = 0.
* `CIRC_SYNTH` (default): `synth_locked_circuit`, a generated netlist with M
  inputs, N outputs, GATES two-input gates and K key gates. Gate g reads from
  the inputs or from the WIN previous nets. Its type (AND, OR, NAND, NOR,
  XOR, XNOR) and its inputs come from `hash32(SEED + 3g + {0,1,2})`. Key gate
  i sits after gate `(GATES-N)*i/K + (GATES-N)/(2K)` and computes
  `y ^ key[i] ^ hash32(SEED ^ 0x9e3779b9 ^ i)[0]`, so the correct key is that
  hash bit pattern (`correct_key()`). The outputs are the last N nets.

The defaults (36 inputs, 7 outputs, 160 gates, 16-bit key) match c432 locked
at 10 % overhead. The real benchmark netlists are not included, so each is
represented by a circuit of the same size. To attack a real netlist, replace
`target_circuit`'s contents with it. The rest of the design only sees
`pi`, `key` and `po`.

## Using it

Host sequence:

1. **Load.** Write the random buffer (`rnd_*`), the T training pairs
   (`trn_*`) and P initial keys (`key_*`). Optionally set the CNF lists
   (`cnf_cfg_*`).
2. **Start.** Pulse `start`.
3. **Wait.** Wait for `done`. `success`, `generation`, `best_fit` and
   `best_idx` describe the result. `rd_addr` reads any key and its fitness.
4. **Query (optional).** Pulse `ens_start` with `ens_query` to get the
   bitwise majority of the top E keys on `ens_out` (`ens_valid`, E+2 cycles
   later).

The training pairs should be filtered inputs (ones whose outputs differ
between keys), with responses recorded from a working chip. The testbench
harness (`tb/galu_harness.sv`) shows one way to build them: draw random
inputs, keep those whose outputs under two random keys differ, and take the
expected outputs from the correct key.

Default parameters: P = 100, L = 50, C = 4, G = 50, T = 100, N_CE = 16,
E = 3, eps = 0.001, random buffer 4096 words, circuit as above.

## Verification

Every unit has a self-checking testbench in `tb/` that compares against values
computed in the testbench. Each prints
`TB_RESULT checks=N failures=F` and has a watchdog. Run one with:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_sorting_engine \
  -y rtl -y tb +libext+.sv rtl/galu_pkg.sv tb/tb_sorting_engine.sv
./obj_dir/Vtb_sorting_engine
```

`tb_galu_top` runs three end-to-end searches through `galu_harness`, each
checking scores, best key, stop rule and ensemble output against a
re-evaluation in the testbench:

| run | circuit | P | T | other sizes | notes |
|-----|---------|---|---|-------------|-------|
| 1 | defaults | 100 | 100 | G = 12 | |
| 2 | c17 | 8 | 16 | | |
| 3 | 12-input, 6-output, 10-key synthetic | 16 | 32 | N_CE = 4 | 10 % of expected bits flipped, so it cannot succeed and must stop at G = 40 |

It counts each mechanism and fails if one never happens:

* crossover, and uncrossed copy;
* mutation;
* ping-pong stall;
* early-start overlap;
* wait for an unwritten child;
* further generations;
* stop by success, and stop by G.

`tb_galu_full` runs the untouched default build to completion (about 0.2 s
of simulation).

`tb_galu_benchmarks` builds the design at two larger benchmark sizes, with
the default GA settings and a lower G:

* c880 size: 60 inputs, 26 outputs, 383 gates, 96-bit key.
* c2670 size: 233 inputs, 140 outputs, 1193 gates, 119-bit key. This checks
  the wide data paths and the multi-cycle checking (9 cycles per pair on 16
  engines).

The generator has a weakness at the larger size. In a 1193-gate
`synth_locked_circuit`, most key gates are masked before they reach the
outputs. Only a few key bits then matter, and the initial random population
usually already holds a key that matches every training output. Real locked
benchmarks do not behave like this, so use a real netlist for realistic
search behaviour at that size.

The 8000-gate and larger synthetic circuits have not been simulated, because
their generated netlists take minutes to build.

The cycle counts checked are:

| unit | cycles checked |
|------|----------------|
| emulator | P x T + 1 from start to done |
| accumulator | N_CE per key |
| sorter | P + 1 |
| diversity | K + 1 or K + 67 |
| ensemble | E + 2 |

## Where this design departs from the published GALU architecture

* **Integer fitness.** Fitness is an integer match count instead of a ratio.
  The success test is the equivalent integer comparison.
* **Diversity formula and timing.** Diversity is the integer sum
  c_j (P - c_j) (proportional to both the l1 and l2 forms). It is measured on
  the keys as they are evaluated, then used to decide mutation for the
  breeding that follows, not measured between crossover and mutation.
* **Mutation rate.** The formula for p_mutate takes the mutation noise
  variance as 1.
* **Random numbers.** A preloaded buffer, reused cyclically, supplies them.
  The fixed-point encoding of probabilities, the two-bits-per-word masks and
  the complementary child pairs are this design's choices.
* **Host interface.** Plain write ports replace the AXI/DRAM interface; the
  host processor and off-chip memory are outside the RTL.
* **Training data.** Training data generation and filtering are the host's
  job.
* **Ensemble voting.** The ensemble vote is done in hardware, on a second
  copy of the locked circuit, after the search ends.
* **Emulated circuit.** The default circuit is synthetic with c432's size,
  not c432 itself. The other benchmarks (for example c2670: 233 inputs,
  140 outputs, 1193 gates; des: 256/245/6473) and the 8k-20k-gate synthetic
  circuits need a build with their own M, N, K and GATES. The default build
  holds only c432-sized circuits.
* **Not modelled.** FPGA resource use and the 100 MHz timing of the original
  prototype have not been checked.
