# Pigeon-inspired optimisation in hardware

This is a synthesizable SystemVerilog model of an accelerator for
pigeon-inspired optimisation (PIO). PIO is a population-based metaheuristic.
A flock of candidate solutions ("pigeons") moves through a D-dimensional
search space towards the best solution found so far. The accelerator gets
its speed from parallel hardware in two directions:

- **Across pigeons.** Every pigeon has its own evaluation, velocity and
  position units, so the whole flock is updated at once.
- **Across dimensions.** Inside each unit, one floating-point operator
  works on each dimension, so all D coordinates are processed together.

All arithmetic is IEEE754 single precision. The default configuration is
D = 10 dimensions and NP = 10 pigeons. It minimises the benchmark

    fitness(X) = sum_d (x_d + 0.5)^2,    x_d in [0, 15]

whose minimum inside the search range is 2.5, at x = 0.

## The algorithm as the hardware runs it

The top level, `pio_top`, has a control unit and the population memory. The
control unit is a state machine. The population memory holds the position,
velocity and fitness of every pigeon in registers. A run does the following:

1. **Initialise.** Load the positions from `init_pos` and set all velocities
   to zero. Clear the global best X_g. Set the population size np = NP.
2. **Evaluate.** All NP `fitness_eval` units run at the same time.
3. **Sort.** `bubble_sort` orders the pigeons by fitness, best (lowest)
   first. The population memory is then permuted to match.
4. **Best.** `best_update` compares the first pigeon with X_g and keeps
   the better of the two.
5. **Map-and-compass operator.** This runs for t = 1 .. iter1. Every pigeon
   updates its velocity and then its position:

       V = V * e^(-R t) + rand * (X_g - X)      (vel_update)
       X = X + V                                (pos_update_compass)

   Then go back to step 2.
6. **Landmark operator.** This runs for iter2 rounds, after the compass
   rounds. Each round:
   - Halve the population: np = max(1, np/2), with integer division. The
     sequence is 10, 5, 2, 1, 1, ...
   - Compute the centre of the np best pigeons:

         X_c = sum_{i<np} X_i f_i / (NP * sum_{i<np} f_i)     (center_value)

   - Move only the kept pigeons towards it:

         X = X + rand * (X_c - X)                              (pos_update_landmark)

   Then go back to step 2.
7. **Finish.** Pulse `done`. `bestvalue` and `best_pos` hold the result.

The sort places discarded pigeons at the end by giving them the key +inf.
They keep their slots in memory but are no longer moved.

Two details of the centre formula have a large effect on behaviour:

- **The divisor uses NP, not np.** The sums cover only the np kept pigeons,
  but the divisor multiplies by the fixed population size NP. Once np < NP,
  X_c therefore shrinks towards the origin. For this benchmark that is
  exactly where the optimum lies. This is why the landmark phase drives the
  best fitness quickly towards 2.5.
- **The weights are raw fitness values.** Because fitness is being
  minimised, this weights worse pigeons more heavily.

Both follow the algorithm as specified. They were not tuned.

## Random numbers

Each velocity unit and each landmark unit has its own `lfsr_rand`. This is
an 8-stage Fibonacci shift register with feedback polynomial
x^8 + x^6 + x^5 + x^4 + 1:

- The taps are stages 4, 5, 6 and 8.
- The taps are combined by exclusive-or.
- The sequence is maximal length, with period 255.

One draw works like this:

1. The register shifts eight times. Its eight serial output bits form a
   word u, with the first bit as the most significant.
2. u is read as an unsigned fixed-point number with 3 integer bits and 5
   fraction bits, giving u/32 in [0, 8).
3. That value is converted to a float and divided by 8 in a floating-point
   divider. The result is u/256 in [0, 1).

One random number is shared by all dimensions of one update. The seeds
differ per pigeon slot:

- `vel_update` of slot i: seed (37 i + 1) mod 256.
- `pos_update_landmark` of slot i: seed (53 i + 101) mod 256.

A seed that comes out as 0 is replaced by 1. The registers are seeded only
by reset, so a second run continues each sequence where the first one
stopped.

## e^(-Rt) by Taylor series

`fp_exp` evaluates the fifth-order Taylor polynomial
1 + x + x^2/2! + ... + x^5/5!. It has two parts:

- A power generator: one multiplier forms x^2 .. x^5 in turn.
- A compute module: one divider divides each power by its factorial, and
  one adder sums the terms.

Everything runs in sequence and takes 218 clocks.

The series is accurate only near zero. With R = 0.2 and t up to 15, x goes
down to -3. There the polynomial gives about -0.65, against a true value of
0.05. For late compass iterations the "decay" factor on the old velocity is
therefore negative. This is how the specified unit behaves. It is kept on
purpose, and the testbenches check against the polynomial, not against exp().

## Floating-point units

`pio_pkg` contains the combinational IEEE754 add, multiply, divide, compare
and integer-to-float functions. `fp_addsub`, `fp_mul` and `fp_div` wrap
them in register pipelines of fixed depth:

| Unit | Latency (clocks) |
| --- | --- |
| `fp_addsub` (add and subtract) | 12 |
| `fp_mul` | 8 |
| `fp_div` | 28 |

Each unit accepts one operation per clock.

The arithmetic follows these rules:

- Rounding is to nearest, with ties to even.
- Subnormal inputs and results are flushed to zero.
- Infinities propagate.

The result is computed at the pipeline input and then delayed. A synthesis
flow must retime these pipelines, or replace them with vendor floating-point
cores of the same latency, to reach a useful clock rate.

## Units and their timing

Each unit starts on a one-clock `start` pulse and answers with a one-clock
`done` pulse. Its result holds until the next `done`. The latencies below
count from the clock that samples `start` to the clock that samples `done`,
with the default unit latencies.

| Module | Function | Latency | Original design |
| --- | --- | --- | --- |
| `fitness_eval` | D adders (+0.5), D multipliers (square), sequential sum | 140 | 93 |
| `bubble_sort` | odd-even transposition, N/2 = 5 reused swappers | 11 | 148 |
| `best_update` | compare unit driving the register enable | 3 | 4 |
| `fp_exp` | Taylor e^x, k = 5 | 218 | 259 |
| `lfsr_rand` | random float in [0,1) | 39 | 43 |
| `vel_update` | Eq. for V, all D dimensions | 252 | 370 |
| `pos_update_compass` | X + V, D adders | 14 | 34 |
| `fp_mac` | multiply-accumulate, overlapped | 13 n + 12 | 16 per term |
| `center_value` | D + 1 MACs, one multiplier, D dividers | 13 n + 52 | 242 |
| `pos_update_landmark` | X + rand (X_c - X) | 64 | 88 |

The "Original design" column gives the clock counts published for the
design this RTL models. The unit latencies match those counts exactly. The
module latencies are this implementation's own and do not match the
published ones.

The MAC overlaps work in two ways, so n back-to-back terms cost about
13 clocks each instead of 20:

- Products wait in a small FIFO while the previous addition finishes.
- A sum that comes back from the adder is fed straight back in with the
  next product.

Three more points about how the units are built:

- **Sort.** The sort steers its five swappers onto the pairs of the current
  phase and does one phase per clock. The even phase covers pairs
  (0,1)..(8,9). The odd phase covers pairs (1,2)..(7,8).
- **Velocity update.** Three things start in parallel: the R*t multiply,
  the random draw and the D subtractions X_g - X. The exponent path is the
  longest.
- **Whole run.** A map-and-compass iteration takes about 425 clocks and a
  landmark iteration about 300. A run with iter1 = iter2 = 15 finishes in
  roughly 11,000 clocks.

## Where this RTL departs from or adds to the original design

- **Initial population.** It is supplied on the `init_pos` port. How the
  original generates it is not specified. Velocities start at zero.
- **Sort direction.** The original's sort example sorts in descending order.
  The optimiser sorts ascending, because fitness is minimised and the best
  pigeon must come first. The `DESCENDING` parameter gives the other order.
  The fittest pigeons are kept when the population is halved.
- **Sort payload.** The swappers carry a 4-bit pigeon index, not whole
  pigeons. The population memory is permuted afterwards, in one clock.
- **End of halving.** Halving stops at one pigeon.
- **Feedback gates.** The gates in the shift register's feedback are assumed
  to be exclusive-or.
- **Handshakes and reset.** The start/done handshakes, the synchronous
  active-high reset, the seeds and the schedules inside the units are this
  design's own.
- **Run parameters.** R, iter1 and iter2 are run-time inputs. The published
  settings are R = 0.2 and iter1 = 15. The value of iter2 is given as 15 in
  one place and as 10 in another. The testbench runs both.
- **Best fitness.** The published run reports best fitness 562.14 after
  initialisation, 452.41 after the compass phase and 2.54 at the end. Those
  numbers depend on an initial population that is not known. The testbench
  uses its own random population, so its numbers differ. Its two runs give
  the following best fitness values:

  | Run | After initialisation | After compass phase | At the end |
  | --- | --- | --- | --- |
  | iter2 = 15 | 648.5 | 470.2 | 2.5003 |
  | iter2 = 10 | 492.5 | 292.8 | 2.64 |

  The pattern is the same as in the published run: the compass phase gives
  a modest gain, and the landmark phase then falls steeply to near the
  optimum of 2.5.

## Files

- `rtl/pio_pkg.sv`: the `f32_t` type, sizes, latencies and the IEEE754
  functions.
- `rtl/fp_addsub.sv`, `rtl/fp_mul.sv`, `rtl/fp_div.sv`: pipelined
  arithmetic units.
- `rtl/lfsr_rand.sv`, `rtl/fp_exp.sv`, `rtl/fp_mac.sv`: random number,
  exponent and MAC units.
- `rtl/fitness_eval.sv`, `rtl/swapper.sv`, `rtl/bubble_sort.sv`,
  `rtl/best_update.sv`: evaluation, sort and best-update units.
- `rtl/vel_update.sv`, `rtl/pos_update_compass.sv`, `rtl/center_value.sv`,
  `rtl/pos_update_landmark.sv`: operator units.
- `rtl/pio_top.sv`: control unit, population memory and all instances.
- `tb/fp_ref_pkg.sv`: reference helpers for the testbenches (see below).
- `tb/tb_<module>.sv`: one self-checking testbench per module.
- `tb/tb_pio_top.sv`: the end-to-end test at the default size, D = 10,
  NP = 10.
- `tb/tb_pio_top_small.sv`: the same test at D = 3, NP = 4 (builds in
  under a minute).

`tb/fp_ref_pkg.sv` provides:

- Conversion between float bit patterns and `real`. An operation computed
  in double precision and rounded once to single precision is correctly
  rounded, so the expected values do not depend on the RTL's arithmetic.
- A model of the shift register.
- A reference Taylor exponent and fitness.

## Simulating

Build and run any testbench with Verilator 5. For example, the end-to-end
test:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/pio_pkg.sv tb/fp_ref_pkg.sv tb/tb_pio_top.sv --top-module tb_pio_top -j 8
    ./obj_dir/Vtb_pio_top

Every testbench prints `TB_RESULT checks=N failures=M`. Each one also has a
watchdog that counts a failure if the simulation hangs. The C++ build of
the full-size design takes about five minutes with 8 parallel compile jobs
and more than ten minutes with 2; the simulation itself takes seconds.
The largest size simulated is the default one, D = 10, NP = 10: `tb_pio_top`
passed there with 151 checks and no failures. `tb_pio_top_small` runs the same
end-to-end test at D = 3, NP = 4 and builds in under a minute.

What the testbenches check:

- **Arithmetic units.** Thousands of random operations, compared bit for
  bit with correctly rounded references. Every result's latency is checked.
- **Composite units.** Compared bit for bit with reference models that
  perform the same single-precision steps in the same order. Cycle counts
  are checked.
- **Sort.** Reproduces the ten-number descending example, including its
  intermediate rows. It also checks order, permutation and stability on
  random data.
- **Top level (`tb_pio_top`, `tb_pio_top_small`).** Runs the design twice
  with R = 0.2 and iter1 = 15: once with iter2 = 15 and once with
  iter2 = 10. A software model runs the whole algorithm alongside. After
  every ranking step the testbench compares every population word and
  the best fitness bit for bit. It also counts how often each mechanism
  occurred:
  - compass rounds
  - landmark rounds
  - halving
  - halving stopped at one pigeon
  - best replaced
  - best kept
  - sort changed the order

  A mechanism that never occurs fails the test.

## Changing it

- **Population and dimensions.** `D` and `NP` are parameters of `pio_top`
  and its units. Their defaults come from `pio_pkg`.
- **Unit latencies.** `LAT` on each arithmetic unit defaults to the package
  constants `LAT_ADD`, `LAT_MUL` and `LAT_DIV`; change those to retune the
  whole design. The control logic waits on valid signals, so other
  latencies work unchanged. Only the testbenches' cycle-count checks assume the
  defaults.
- **Random seeds.** `SEED` sets the seed of each random unit.
