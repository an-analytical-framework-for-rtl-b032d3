# A one-evaluation-per-clock hardware particle swarm optimiser

Particle swarm optimisation (PSO) minimises a function f by moving a swarm
of candidate points ("particles") through the search space. Each particle
remembers the best point it has visited (pbest). The swarm remembers the best
point any particle has visited (gbest). On every step each particle's velocity
is pulled towards both:

    v' = w*v + c1*r1*(pbest - x) + c2*r2*(gbest - x)      clamped to [vmin, vmax]
    x' = x + v'                                           clamped to [xmin, xmax]
                                                          (v' := 0 if x' was clamped)

Here r1 and r2 are fresh random numbers in [0, 1) for every particle and
every dimension.

This RTL runs the complete algorithm in hardware:

- random initialisation;
- fitness evaluation;
- personal-best and global-best bookkeeping;
- velocity and position updates;
- the stopping test.

The particles are handled one after another, in the order of the classical
sequential algorithm. The datapath is pipelined so that a new particle enters
on every clock. After a pipeline fill of a few cycles, the processor therefore
completes **one fitness evaluation per clock cycle**, whatever the benchmark
function is. The fitness unit is combinational. It is chosen at build time
from eleven benchmark functions (thirteen benchmark set-ups, counting the
shifted variants).

## Datapath and pipeline

```
            +-----------+   +---------+   +-------------+   +-------------+
 position --> fitness   |-->| pbest / |-->| velocity    |-->| position    |--> position memory
 memory     | unit f(x) |   | gbest   |   | update (xD) |   | update (xD) |--> velocity memory
   ^        +-----------+   | update  |   +-------------+   +-------------+
   |            DR1 ------->|  DR2 -------------> DR3 ----------->|
   |                        +---------+        ^    ^
   |                 pbest memories    velocity memory, RNG, gbest register
```

| stage | work | registers at its end |
|---|---|---|
| 1 | Read x_i from the position memory. The fitness unit computes f(x_i). | delay register 1 (x_i), f(x_i), index, valid bit |
| 2 | Read pbest_i's fitness. The pbest update unit decides whether f(x_i) ≤ f(pbest_i). If so, it writes both pbest memories and offers x_i to the gbest unit. The gbest register is updated in the same cycle. | delay register 2 (x_i) |
| 3 | Read v_i and pbest_i's position. One velocity update unit per dimension uses the current gbest and 2·D random fractions from the RNG. | delay register 3 (x_i), v'_i |
| 4 | One position update unit per dimension computes x'_i. It writes x'_i to the position memory. It writes v'_i to the velocity memory, or 0 if that coordinate hit a bound. | — |

Some points about the timing:

- **The three delay registers** carry a particle's position beside the results
  computed from it. The velocity and position units therefore see the x that
  was evaluated, even though the position memory may already hold a newer
  value by then.
- **Particle i sees the gbest produced by particles 0..i.** This is the same
  as the sequential algorithm: the gbest register is written in stage 2, and
  the next particle reaches stage 3 one cycle later.
- **The swarm must have at least 4 particles.** A position written in stage 4
  must be in memory before the same particle is read again in stage 1. With np
  particles, that next read happens np cycles after the previous read. An
  assertion enforces np ≥ 4.
- **Memories.** There are four register-array memories (`pso_particle_mem`):
  - position (D×17 bits);
  - velocity (D×17 bits);
  - pbest position (D×17 bits);
  - pbest fitness (64 bits).

  Each has an asynchronous read and a synchronous write, so every stage reads
  and writes in a single cycle. The pbest fitness and pbest position are kept
  in separate arrays because they are read in different stages (2 and 3).

## Control: the state machine

`pso_controller` uses the states S0, S1, S3, S4, S5, S6, S7 and STOP. There is
deliberately no S2.

- **S0 – idle.** `start` loads the 64-bit seed into the RNG.
- **S1 – initialisation.** S1 repeats for np cycles. In each cycle it writes
  one particle's random position and velocity:
  - x = xmin + (xmax − xmin)·r
  - v = vmin + (vmax − vmin)·r

  It also sets that particle's pbest to its position, with fitness "infinity".
- **S3.** Clears gbest and the counters, and issues particle 0.
- **S4, S5, S6.** Issue particles 1 to 3 while particle 0 moves through delay
  registers 1, 2 and 3.
- **S7 – main loop.** All four stages are busy, and one particle enters per
  clock. The particle index wraps at np − 1. Each wrap counts one iteration.
- **STOP.** Results are held and `done` is high. Another `start` begins a new
  run from S1, using the new settings.

The run ends on whichever comes first:

- **Convergence:** `gbest_fit < f_opt + err_thresh`.
- **Budget:** exactly `max_evals` evaluations.

The pipeline freezes as soon as the FSM leaves S7. A run of E evaluations
takes E + np + 2 clock cycles from `start` to `done`.

## Number formats (`pso_pkg`)

| quantity | format |
|---|---|
| position, velocity, bounds (`fix_t`) | 17-bit signed: 8 integer bits including the sign, 9 fraction bits, range [−128, 128) |
| fitness (`fit_t`) | 64-bit signed, 9 fraction bits |
| random fraction r (`rnd_t`) | 9-bit unsigned fraction in [0, 1) |
| w, c1, c2 (`coef_t`) | 11-bit unsigned: 2 integer bits, 9 fraction bits |

- **Products** are truncated with an arithmetic right shift, i.e. rounded
  towards −∞.
- **Sums inside the fitness units** are formed at 64 bits, so they do not
  overflow inside the search domains used.
- **Defaults:** w = 0.25 and c1 = c2 = 2. Because r is in [0, 1), c·r lies in
  [0, 2).
- **Narrower variables.** The 8-bit variables are read here as the integer
  part of the number. Engineers who want narrower variables can change
  `VAR_INT` and `FRAC` in `pso_pkg`.
- **Thresholds below one LSB.** An error threshold smaller than one LSB
  (2⁻⁹ ≈ 0.002) cannot be represented. Use `err_thresh = 1` (one LSB) for
  "as close as the format allows".

## Random numbers (`pso_rng_ca`)

The RNG is a cyclic one-dimensional cellular automaton of 2·D·9 cells. Each
cell's next state depends on four cells:

    next[i] = c[i-1] XOR (c[i] OR c[i+1]) XOR c[i+2]

This is rule 30 with an extra XOR-ed neighbour. The whole state is read as
2·D nine-bit fractions on every clock. Those are r1 and r2 for each dimension
in stage 3, and the initialisation fractions in S1. An all-zero seed is
replaced by 1.

## Benchmark fitness units

Select the unit with the `FUNC` parameter of `pso_top`, and set `D` to match.
The wrapper `pso_fitness` stops elaboration if D does not suit a fixed-size
function.

| FUNC | function | D | used for |
|---|---|---|---|
| FN_B2 | x1² + 2x2² − 0.3cos3πx1 − 0.4cos4πx2 + 0.7 | 2 | F1, domain [−100, 100] |
| FN_BRANIN | Branin | 2 | F2, [−4, 4], optimum 0.397887 |
| FN_GOLDSTEIN | Goldstein–Price | 2 | F3, [−2, 2], optimum 3 |
| FN_ROSENBROCK (default) | Σ 100(x_{i+1} − x_i²)² + (x_i − 1)² | 2 | F4, [−9, 11] |
| FN_ZAKHAROV | Σx² + s² + s⁴, with s = Σ 0.5·i·x_i | 2 | F5, [−10, 10] |
| FN_SPHERE | Σ z² | 3 / 32 | F6 [−5.12, 5.12]; F9 shifted, [−100, 100] |
| FN_HARTMANN3 | Hartmann 3-D | 3 | F7, [0, 1], optimum −3.863433 |
| FN_VARDIM | variably dimensioned | 4 | F8, [−9, 11] |
| FN_ROSENBROCK + shift | f(z + 1) | 32 | F10 |
| FN_SCHWEFEL12 | Σ_i (Σ_{j≤i} z_j)² | 32 | F11 |
| FN_RASTRIGIN | Σ z² − 10cos2πz + 10 | 32 | F12 |
| FN_ELLIPTIC | Σ (10⁶)^((i−1)/(D−1)) z_i² | 32 | F13 (unrotated) |

For the shifted functions, z = x − `shift`, so the optimum lies at the shift
vector. That vector is a port of the top.

Transcendental parts:

- **Cosines** come from `pso_cos`. It is a 1024-entry table over one period,
  with a 10-bit phase measured in turns. The table is computed at elaboration
  with `$cos`, so no data file is involved.
- **exp(−u)** is computed by `pso_exp_neg` as 2^−(u·log₂e):
  - a 512-entry table holds 2^−f for the fraction f;
  - the integer part becomes a right shift.

Fixed-point effects to know about:

- **Hartmann.** The 9-bit fraction truncates very small squared distances to 0.
  Near its minimiser the fixed-point function reaches about −4.02 rather than
  −3.86. A run with f_opt = −3.863433 is therefore declared converged somewhat
  before it reaches the true minimiser.
- **Elliptic.** F13 is normally also rotated by a random orthogonal matrix.
  That matrix is not part of this design, so the unit evaluates the shifted,
  unrotated function.

## Top-level interface (`pso_top`)

Parameters:

| parameter | default | meaning |
|---|---|---|
| `NP_MAX` | 32 | largest swarm |
| `D` | 2 | number of dimensions |
| `FUNC` | `FN_ROSENBROCK` | benchmark in the fitness unit |

Inputs are sampled while a run is active, so keep them stable from `start`
to `done`:

- `np`: swarm size, 4..NP_MAX;
- `max_evals`: 32-bit evaluation budget;
- `f_opt` and `err_thresh`: optimum and stopping threshold;
- `xmin`, `xmax`, `vmin`, `vmax`: position and velocity bounds;
- `w`, `c1`, `c2`: coefficients;
- `shift[D]`: shift vector for the shifted functions;
- `seed`: loaded into the RNG on `start`.

Outputs:

- `done` and `converged`;
- `gbest_x[D]` and `gbest_fit`;
- `eval_count` and `iter_count`;
- `state`, the FSM state.

Reset is asynchronous and active low. One clock is used throughout.

At the default parameters, a generic synthesis run gives about 310 cells,
417 flip-flop bits and 5,312 bits of register-array memory.

## Relation to the published design and its evaluation

These parts follow the published processor:

- **Block structure:** fitness unit, pbest and gbest update units, velocity
  and position update units, RNG, three delay registers, and position, pbest
  and velocity memories.
- **State names**, including the missing S2.
- **The algorithm**, including the `≤` comparisons and the velocity reset at
  the bounds.
- **Evaluation settings:** 8-bit variables, 9 fraction bits and 64-bit fitness
  words; swarm sizes 8/16/32; w = 0.25; c·r in 0–2.

The following are this design's own choices:

- **Pipeline timing: one evaluation per clock.** The published processor's
  execution times imply roughly 2 µs per evaluation.
- **The cellular-automaton rule.**
- **Initialisation formula.**
- **Table sizes** for cos and exp.
- **Shifted variants.** Implemented as a run-time shift vector.
- **Build-time benchmark selection.** A processor is built per benchmark, as
  the published resource figures are per benchmark.
- **Run-time bounds and coefficients.**
- **Velocity memory written in stage 4.** In the published datapath the
  velocity update unit writes the velocity memory directly. Here the write is
  made one stage later, by the position stage. The velocity that is stored
  has then already been zeroed if the position hit a bound, so each particle
  needs a single write.

Known departures:

- no rotation for F13;
- the Hartmann offset described above;
- error thresholds below one LSB are rounded up to one LSB.

### Results of the benchmark testbench

`tb_pso_workloads` builds one processor per benchmark. It uses:

- the domains and budgets listed above (10,000 evaluations for F1–F8, 200,000
  for F9–F13);
- `vmax` = half the domain width and `err_thresh` = one LSB;
- random shift vectors.

Success rate per swarm size np = 8 / 16 / 32:

| | F1 | F2 | F3 | F4 | F5 | F6 | F7 | F8 |
|---|---|---|---|---|---|---|---|---|
| runs | 100 | 100 | 100 | 100 | 100 | 100 | 100 | 100 |
| success % | 98/100/100 | 97/100/100 | 86/97/100 | 85/100/100 | 99/100/100 | 100/100/100 | 95/100/100 | 77/100/100 |

For comparison, the published hardware reports success rates of 84/98/96,
90/91/100, 77/89/95, 56/83/95, 92/95/89, 76/93/90, 45/77/87 and 24/81/93 % for
F1 to F8. Its numbers come from its own random generator and rounding, so
they are a plausibility check, not a target.

The 32-dimensional functions are run four times per swarm size, to keep the
simulation short (about 90 s for the whole testbench):

- **F9** succeeds in 0/25/100 % of the runs; at np = 32 it takes about 15,000
  evaluations.
- **F13**, unrotated, succeeds in one of four runs at np = 32.
- **F10–F12** do not reach one-LSB accuracy within 200,000 evaluations at any
  swarm size.

The published results for the 32-dimensional set (31–100 %) imply a looser
success criterion there, which is not specified further.

Those testbench runs check that the hardware completes the runs with correct
cycle counts and stopping behaviour. They are not a tuned optimiser study.

## Files

| file | content |
|---|---|
| `rtl/pso_pkg.sv` | formats, constants, enums, fixed-point helpers |
| `rtl/pso_top.sv` | processor: memories, pipeline, delay registers, stop test |
| `rtl/pso_controller.sv` | state machine |
| `rtl/pso_velocity_update.sv`, `rtl/pso_position_update.sv` | update units, one per dimension |
| `rtl/pso_pbest_update.sv`, `rtl/pso_gbest_update.sv` | best-record units |
| `rtl/pso_rng_ca.sv` | cellular-automaton RNG |
| `rtl/pso_particle_mem.sv` | per-particle memory |
| `rtl/pso_fitness.sv` | benchmark selection wrapper |
| `rtl/pso_fitness_*.sv` | the eleven benchmark units |
| `rtl/pso_cos.sv`, `rtl/pso_exp_neg.sv` | cosine table, exp(−u) |
| `tb/tb_pso_ref_pkg.sv` | reference model (fixed-point functions, velocity, initialisation) |
| `tb/tb_<unit>.sv` | self-checking unit testbenches |
| `tb/tb_pso_top.sv` | end-to-end test at the default parameters; compares every memory write against a software model of the algorithm |
| `tb/tb_pso_bench.sv`, `tb/tb_pso_workloads.sv` | benchmark runs F1–F13 |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
A watchdog ends it if it hangs. To build and run the end-to-end test with
Verilator 5:

    verilator --binary -j 0 -Wno-fatal --top-module tb_pso_top \
        rtl/pso_pkg.sv $(ls rtl/*.sv | grep -v pso_pkg) \
        tb/tb_pso_ref_pkg.sv tb/tb_pso_top.sv
    ./obj_dir/Vtb_pso_top

To run another testbench, replace the last file and the top-module name:

- **Benchmark runs:** add `tb/tb_pso_bench.sv` and use `tb_pso_workloads`.
  This takes about 90 s.
- **Unit tests:** `tb_pso_fitness` covers all fitness units and the cos/exp
  helpers.

To build a processor for another benchmark, override the top's parameters,
for example `pso_top #(.FUNC(FN_SPHERE), .D(32))`. Then drive `xmin`/`xmax`,
`vmin`/`vmax`, `f_opt` and `shift` for that function.
