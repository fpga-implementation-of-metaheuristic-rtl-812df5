# Binary Simulated Kalman Filter optimizer

This is a hardware metaheuristic optimizer. It searches for the minimum of the sphere function
f(x) = Σ x[d]² over D integer dimensions. It uses the Simulated Kalman Filter (SKF), a
population-based method in which every search agent behaves like a Kalman filter: it
*measures* a noisy position near the best solution found so far, then *estimates* a new position
between its current position and the measurement.

The floating-point original is too costly for a small FPGA, so two simplifications make it cheap:

* **Integers only.** Positions are 8-bit two's-complement integers. The initial population lies
  in -100..100.
* **Fixed Kalman gain of 0.5.** The original algorithm computes K = P/(P+R) every iteration, and
  its value settles near 0.62. Fixing K = 0.5 turns the estimate into an add and a one-bit shift.
  It also makes the error covariance P unused, so the *predict* step disappears from the
  hardware.

The second idea is **parallel-in parallel-out (PIPO)** datapath units. Every memory and
arithmetic unit takes and returns *all D dimensions of one agent at once*. The time for one run
therefore depends on the number of agents and iterations but not on D. More dimensions cost area,
not time.

## The algorithm as the hardware runs it

A run works on N agents X[0..N-1], each a vector of D positions:

1. **Generate population.** X[a][d] is a random value in -100..100.
2. Repeat MAX_ITER times:
   * **Evaluate.** fit[a] = Σ_d X[a][d]². Xbest is the agent with the smallest fitness in this
     iteration. If fit(Xbest) < fit(Xtrue), Xbest replaces Xtrue, the best-so-far solution of
     the run.
   * **Measure.** Y[a][d] = X[a][d] + s[a]·|X[a][d] − Xtrue[d]|. Here s[a] = sin(2π·r/4) is
     drawn once per agent from a 2-bit random number r, so s ∈ {0, +1, 0, −1}. Half the agents
     stay where they are; the others step away from their position by the distance to Xtrue, in
     one direction or the other.
   * **Estimate.** X[a][d] = X[a][d] + ⌊(Y[a][d] − X[a][d]) / 2⌋. With K = 0.5 this is the
     midpoint of the position and the measurement.
3. Report Xtrue.

MAX_RUN runs follow one another. The random generators are not reseeded between runs, so each run
starts from a fresh population.

## Datapath

```
            rng_8bit[0..D-1]                      rng_2bit
  skf_rng8 x D ───────────┐                          │
                          ▼                          ▼
                  ┌────────────┐  x_cur[D]    ┌─────────────┐  y[D]   ┌────────────┐
        ┌────────►│   RAM_X    │─────┬───────►│ skf_measure │────────►│   RAM_Y    │
        │ est[D]  │ N x D x 8b │     │        └─────────────┘         │ N x D x 9b │
        │         └────────────┘     │              ▲ xtrue[D]        └─────┬──────┘
        │                            │              │                       │ y_cur[D]
        │         ┌──────────────┐   │        ┌───────────┐                 │
        └─────────│ skf_estimate │◄──┼────────│ skf_best  │                 │
                  └──────────────┘◄──┼────────┼───────────┼─────────────────┘
                                     │        │Xbest/Xtrue│◄── fitness ── skf_act_fn ◄── x_cur
                                     └───────►└───────────┘   (position delayed 1 cycle)
```

Two memories hold the population:

* **RAM_X** holds the positions.
* **RAM_Y** holds the measurements. These are 9 bits wide because a measurement can leave the
  8-bit range.

Both are plain register arrays with a parallel write port and a registered parallel read port.
The three arithmetic units (`skf_act_fn`, `skf_measure`, `skf_estimate`) each have one register
at their output.

## Schedule: why one iteration takes 3·(N + 2) cycles

This is the part of the design that most needs care. The controller `skf_ctrl` has six states:

| state | name                       | cycles | what happens |
|-------|----------------------------|--------|--------------|
| s0    | Reset                      | 1      | clears Xtrue, iteration counter to 0 |
| s1    | Generate population        | N      | cycle c writes the D generator outputs to RAM_X[c] |
| s2    | Fitness evaluation         | N + 2  | read RAM_X[c]; fitness of agent c−2 goes to the Xbest/Xtrue registers |
| s3    | Measure                    | N + 2  | read RAM_X[c]; measurement of agent c−2 written to RAM_Y[c−2] |
| s4    | Estimate                   | N + 2  | read RAM_X[c] and RAM_Y[c]; estimate of agent c−2 written to RAM_X[c−2] |
| s5    | All runs complete          | —      | `done` high until reset |

After s4 the controller goes to s2 if iterations remain, to s0 for the next run if runs remain,
and to s5 otherwise.

In s2, s3 and s4, agent c is read in cycle c. Its data leaves the registered RAM read in cycle
c + 1 and leaves the registered arithmetic unit in cycle c + 2. The result is consumed at the end
of that cycle. Streaming N agents through this two-stage pipeline takes N + 2 cycles.

Some consequences of this timing:

* **Write-back in s4.** RAM_X[c−2] is written while RAM_X[c] is read, so a position is never
  read and overwritten in the same cycle.
* **Xtrue update.** Xtrue is updated with the last agent of s2, at the end of the state, so the
  measure step always sees the current best-so-far solution.
* **Random value per agent.** The 2-bit random value used for agent k is the generator output in
  cycle k + 1 of s3.

`skf_ctrl` carries assertions for these pipeline rules:

* an s4 write-back never hits the agent being read in the same cycle;
* write addresses stay below N;
* the last-agent strobe implies a valid strobe;
* the cycle counter never passes N + 1.

Total run time is MAX_RUN · (1 + N + MAX_ITER · 3 · (N + 2)) cycles. At the default sizes this is
39,002,550 cycles, or 0.780 s at the 50 MHz board clock. This equals the run time published for the
original FPGA implementation, for all three dimension counts.

The original state diagram labels each state "N clock cycles". The registered RAM read and the
resulting N + 2 cycles are this design's choice: it is the pipeline that matches the published
0.780 s. N cycles per state would give 0.750 s.

## Number formats and bounds

| quantity              | format                 | notes |
|-----------------------|------------------------|-------|
| position X, Xtrue     | signed 8 bit           | saturated to -128..127 after each estimate |
| initial position      | signed 8 bit, -100..100 | 8-bit LFSR value; above 100 → minus 100, below -100 → plus 100 |
| measurement Y         | signed 9 bit           | saturated to -256..255 |
| fitness               | unsigned 32 bit        | cannot overflow for D up to 131072 |
| measure random number | 2 bit                  | sine value 0, +1, 0, −1 for r = 0, 1, 2, 3 |

Choices of this design:

* the exact folding rule that keeps initial positions in -100..100;
* both saturations;
* the arithmetic (floor) shift in the estimate;
* the 2-bit reading of sin(2π·rand).

The published description asks only that the positions stay in the search region, that K = 0.5 be
a one-bit shift, and that the measure unit take a 2-bit random input.

The random generators are:

* **Positions (`skf_rng8`).** One 8-bit maximal-length LFSR per dimension, x⁸+x⁶+x⁵+x⁴+1.
  Dimension d is seeded with SEED8 + 37·d.
* **Measure step (`skf_rng2`).** One 16-bit LFSR, x¹⁶+x¹⁴+x¹³+x¹¹+1, whose two low bits are the
  random value.

## Modules

| file | role |
|------|------|
| `rtl/skf_pkg.sv`      | widths, types (`pos_t`, `meas_t`, `fit_t`), state enum |
| `rtl/skf_top.sv`      | top level: instances and wiring |
| `rtl/skf_ctrl.sv`     | six-state controller, iteration and run counters, RAM addresses and strobes |
| `rtl/skf_rng8.sv`     | 8-bit LFSR position generator with -100..100 folding |
| `rtl/skf_rng2.sv`     | 2-bit random number for the measure step |
| `rtl/skf_ram.sv`      | N × D × W register array, PIPO, registered read (RAM_X and RAM_Y) |
| `rtl/skf_act_fn.sv`   | sphere fitness of one agent |
| `rtl/skf_best.sv`     | Xbest (iteration) and Xtrue (best-so-far) registers |
| `rtl/skf_measure.sv`  | measurement Y = X + s·\|X − Xtrue\| |
| `rtl/skf_estimate.sv` | estimate X + (Y − X)/2 |

## Top-level interface (`skf_top`)

Parameters:

| parameter  | default    | meaning |
|------------|------------|---------|
| `N`        | 50         | agents |
| `D`        | 10         | dimensions; 5 and 20 are the other published variants |
| `MAX_ITER` | 5000       | iterations per run |
| `MAX_RUN`  | 50         | runs |
| `SEED8`    | `8'h5A`    | seed of the position generators |
| `SEED2`    | `16'hACE1` | seed of the measure generator |

The reset `rst` is synchronous and active high. When it is released the optimizer starts on its
own; there is no start input.

| port        | dir | width            | meaning |
|-------------|-----|------------------|---------|
| `clk`, `rst` | in | 1                | clock, synchronous reset |
| `state`     | out | 3                | controller state s0..s5 |
| `iter`, `run` | out | clog2 of limits | iteration and run counters |
| `run_done`  | out | 1                | pulse in the last cycle of each run; `xtrue_fit`/`xtrue_pos` hold that run's result |
| `done`      | out | 1                | all runs complete |
| `improved`  | out | 1                | pulse when Xtrue is replaced |
| `xbest_fit` | out | 32               | best fitness of the latest evaluation |
| `xtrue_fit` | out | 32               | best-so-far fitness of the current run |
| `xtrue_pos` | out | 8 × D            | best-so-far position (two's complement) |

At the default sizes the design holds 625 flip-flop bits of control and pipeline state. The two
arrays hold 8,500 bits: 50 × 10 × 8 for RAM_X and 50 × 10 × 9 for RAM_Y.

## Simulating

Each testbench is self-checking and prints `TB_RESULT checks=<n> failures=<m>`. To build and run
one with Verilator:

```
verilator --binary --timing --assert --top-module tb_skf_top -Irtl -Itb \
    rtl/skf_pkg.sv tb/tb_skf_top.sv -o sim
./obj_dir/sim
```

| testbench | what it checks |
|-----------|----------------|
| `tb_skf_rng8`, `tb_skf_rng2` | outputs against independent LFSR models, range, period, value spread |
| `tb_skf_ram`       | random PIPO writes and reads, read latency, same-address collision |
| `tb_skf_act_fn`    | worked integer example (fitness 5331, 3874, 1842), extremes, random D = 10 agents |
| `tb_skf_measure`, `tb_skf_estimate` | random operands against arithmetic models, including saturation |
| `tb_skf_best`      | iteration minimum with ties, best-so-far replacement, run clear |
| `tb_skf_ctrl`      | state order, cycles per state, addresses and strobes, total cycle count |
| `tb_skf_top`       | whole optimizer at N=6, D=4, 30 iterations, 3 runs against a reference model; see below |
| `tb_skf_full`      | default sizes (39 M cycles, about 35 s of simulation); every run checked against the reference model |
| `tb_skf_variants`  | the D = 5 and D = 20 variants side by side at full size; checks that their cycle counts match |

`tb_skf_top` also requires that each mechanism happens at least once:

* iteration loop;
* run restart;
* completion;
* Xtrue improvement;
* RNG folding;
* each sine value;
* measurement saturation;
* estimate saturation.

The three large testbenches share `tb/skf_ref_checker.sv`. It is an untimed model of the
algorithm, driven by the top's `state` output, with its own copies of the random generators. It
checks every evaluation, every run result and the length of every state.

## Results and how far to trust them

All testbenches pass. The end-to-end ones compare the RTL cycle by cycle with an independent
model. The model does follow the same integer rules and random-number timing, so it confirms the
RTL implements the algorithm described here. It cannot show that this algorithm matches the
original hardware bit for bit: the original seeds and LFSR polynomials are not known.

Mean best fitness over 50 runs in simulation (the optimum is 0):

| D  | this RTL | published FPGA run |
|----|----------|--------------------|
| 5  | 4        | 32                 |
| 10 | 104      | 253                |
| 20 | 624      | 4749               |

For the published figures it is not stated whether they are means or single runs. Both show the
known weakness of the fixed gain and integer positions: the search stalls short of the optimum,
increasingly so as D grows. Cycle counts match the published 0.780 s exactly.

## Departures and open points

* **Module structure.** The sequencer is a separate module. In the original, the FSM module also
  holds the datapath instances. The Xbest comparison is likewise a separate module, `skf_best`,
  rather than part of the fitness unit.
* **Unbuilt steps.** Only minimisation is built. The predict step and the error covariance are
  not built, because a fixed gain makes them unused.
* **Clock and reset.** The 50 MHz clock comes from the board. Reset is synchronous. The random
  generators are reseeded only by reset.
* **Changing the design.**
  * Fitness function: replace `skf_act_fn`.
  * Gain: edit the shift in `skf_estimate`.
  * Wider positions: change `POS_W`/`MEAS_W` in `skf_pkg`, and the fixed 8-bit generator in
    `skf_rng8`.
