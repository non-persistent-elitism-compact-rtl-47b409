# A self-evolving circuit: ne-TCGA on an 8 x 5 virtual reconfigurable array

This RTL evolves a small combinational circuit in hardware. A grid of 40
look-up-table cells is configured by one 800-bit word, the *chromosome*. A
genetic algorithm searches for the chromosome whose circuit best matches a
target truth table. The standard example is a full adder.

The search uses the *non-persistent elitism compact genetic algorithm with
tendency* (ne-TCGA). It is a compact GA, so it stores no population. It keeps
one probability per chromosome bit, and it samples only one or two chromosomes
at a time. Two additions make it search harder than a plain compact GA:

* a **tendency test**: the winner is re-scored with single bits inverted, to
  find out which way each bit should move;
* **elitism that expires**: the best chromosome is carried into later
  generations, but for at most `ALPHA` of them. After that the population is
  sampled afresh. This keeps selection pressure high without collapsing
  diversity.

The algorithm, the cell, the array and the scoring rule come from a published
evolvable-hardware system. In that system the algorithm and the scoring ran as
C code on a soft processor next to the array. Here both are hardware, so the
whole evolution loop runs without a processor. Where this RTL makes its own
choices, the last section lists them.

## Block diagram

```
            start, target[8], mask
                    |
   +----------------v-----------------+        +-----------------------+
   | ne_tcga_engine                   |        | fitness_unit          |
   |  P[0..L-1]  (0..N each)          | chrom  |  load chromosome      |
   |  a, b, c    (L bits each)        |------->|  8 test vectors       |---> cell_array (8 x 5 evo_cell)
   |  xorshift RNG (evo_rng)          |<-------|  XNOR / MASK / count  |<--- dout[7:0]
   +----------------------------------+ score  +-----------------------+
        result, result_fitness, counters                 arr_din / arr_dout
```

`evo_system` is the top. Its files are:

* `rtl/evo_pkg.sv`: sizes and types;
* `rtl/evo_cell.sv`, `rtl/cell_array.sv`: the reconfigurable array;
* `rtl/fitness_unit.sv`: the scorer;
* `rtl/ne_tcga_engine.sv`, `rtl/evo_rng.sv`: the algorithm.

## The cell

Each cell has 16 candidate inputs, which are the signals offered to its
column. It has three 16-to-1 selectors and an 8 x 1-bit look-up table (LUT).
The three selected bits form the LUT address, and the addressed bit is the
cell output. A 20-bit configuration register holds the cell's setting:

| bits    | meaning                                   |
|---------|-------------------------------------------|
| [3:0]   | input index for LUT address bit 0         |
| [7:4]   | input index for LUT address bit 1         |
| [11:8]  | input index for LUT address bit 2         |
| [19:12] | LUT contents; bit k is the output for address k |

So a cell can compute any 3-input function of any three of its 16 inputs.
The register loads when `cfg_load` is high. The path from input to output is
combinational.

## The array

The array has 5 columns of 8 cells. The signals each column offers are:

| column | inputs 0..7            | inputs 8..15               |
|--------|------------------------|----------------------------|
| 0      | external inputs 0..7   | inverted external inputs   |
| 1      | external inputs 0..7   | outputs of column 0        |
| k >= 2 | outputs of column k-2  | outputs of column k-1      |

Column 4 drives the 8 array outputs. Signals only flow forward, so the array
has no loops. Cell (column c, row r) takes chromosome bits
`[(c*8 + r)*20 +: 20]`. One `cfg_load` pulse loads all 800 bits at once.

## Scoring

`fitness_unit` gives a chromosome its score:

1. Load the chromosome into the array. The target table and the MASK word
   are captured at the same time.
2. For each v = 0..7, drive v onto inputs 0..2 and hold inputs 3..7 at 0.
3. Count the ones in `~(dout ^ target[v]) & mask`, i.e. the output bits that
   match the table within the mask.
4. Add up the eight counts.

The score therefore lies between 0 and 64. For a full adder, put a, b and
carry-in on inputs 0..2, sum on output 0 and carry-out on output 1, and set
mask to `8'h03`. The best score is then 16.

Timing: one test vector per clock. `done` pulses 9 clocks after `start`, and
`fitness` stays valid until the next start. A `start` that arrives while the
unit is busy is ignored.

## The ne-TCGA engine

This block is the core of the design, and the hardest one to follow.

### State

| state       | size        | meaning |
|-------------|-------------|---------|
| `P[i]`      | L entries of `$clog2(N+1)` bits | an integer 0..N; P[i]/N is the probability that bit i is 1 |
| `a`, `b`    | L bits each | the two chromosomes being compared |
| `c`         | L bits      | the mutant, which is also the final result |
| `z`         | small counter | how many generations the elite has been kept |

The step size of P is 1/N, where N is the population size.

### One generation

1. **Start of run.** Every `P[i] = N/2`, and `a` and `b` are sampled from P.
2. **Select.** Score `a` and `b`. The higher score wins; on a tie, `b` wins.
   Call the winner's score `fwn`.
3. **Tendency.** Visit every bit `i` where `a` and `b` differ. Score the
   winner with bit `i` inverted; call that score `fw`.
   * If `fw > fwn`, move `P[i]` one step toward the value of the inverted bit.
   * Otherwise, move it one step toward the winner's original bit.

   `P` is clamped to 0..N. Each test starts from the unmodified winner, so
   the tests are independent single-bit changes.
4. **Converged?** If every `P[i]` is 0 or N, the run stops.
5. **Mutate.** Build `c[i] = (P[i] > N/2)`, which is the winner pulled toward
   the rounded probability vector. If `c` scores more than `fwn`, it becomes
   the winner.
6. **Non-persistent elitism.**
   * If `z < ALPHA`, keep the winner as `a`, sample a new `b`, and increment
     `z`.
   * Otherwise, sample both `a` and `b` anew and set `z = 0`.

   Then return to step 2.

When a bit's score does not change on inversion (a "don't care" bit), its
probability drifts toward the winner's value. This is what lets all 800
entries converge even though only a few cells matter for a full adder.

### Sampling

Random numbers come from a 32-bit xorshift generator (`evo_rng`) that steps
every clock. Each clock gives two independent 16-bit values, one for `a` and
one for `b`. A bit is set when `(r * N) >> 16 < P[i]`, so the probability is
P[i]/N to within 2^-16.

### Sequencing and cost

The engine visits `P`, `a`, `b` and `c` one index per clock. `P` is only ever
read and written at the current index, so it can map to a single-port RAM.
Each generation makes three passes over all L bits:

* sampling;
* the tendency pass, which costs 1 clock per equal bit and about 11 clocks
  per differing bit, since the fitness unit is busy meanwhile;
* the convergence/mutation pass.

Each generation also makes 3 ordinary scorings (`a`, `b` and `c`), about 11
clocks each.

At L = 800 the passes dominate. In the full adder runs of the testbench a
generation takes about 2,500 clocks, because few bits still differ once the
run has settled.

After convergence the engine scores `c` once more and reports it:

* `result` is the converged chromosome;
* `result_fitness` is its score;
* `gen_count` and `eval_count` count generations and scorings;
* `done` stays high until the next `start`.

Five one-clock pulses show the mechanisms at work:

* `ev_elite`: the winner was kept;
* `ev_regen`: both chromosomes were resampled;
* `ev_mutate`: the mutant won;
* `ev_p_up` / `ev_p_down`: a tendency test stepped an entry of P up or down.

An assertion checks that `P` never leaves 0..N.

### Parameters

| parameter | default     | meaning |
|-----------|-------------|---------|
| `L`       | 800         | chromosome length; 20 bits x 40 cells |
| `N`       | 10          | population size; the step of P is 1/N |
| `ALPHA`   | 3           | maximum number of generations the elite is kept |
| `SEED`    | 32'h2545F491 | RNG seed |
| `FW`      | 7           | width of a score; the array scorer gives 0..64 |

`evo_system` passes `N`, `ALPHA` and `SEED` through. The engine works with any
L and any N ≥ 2. With `L` set to another value it can be connected to any
other scorer that follows the `fit_start` / `fit_done` handshake: pulse
`fit_start` with `fit_chrom` valid, then answer with a one-clock `fit_done`
and `fit_value`, after any delay.

## Top-level use

1. Hold `target[0..7]` and `mask` for the whole run, and pulse `start`.
2. Wait for `done`.
3. The array then holds `result`. While the scorer is idle, `arr_din` drives
   the array inputs, so the evolved circuit can be exercised directly on
   `arr_din` / `arr_dout`.

All state resets asynchronously with `rst_n` (active low).

At the defaults, synthesis gives about 6,600 flip-flops. Most of them are the
800-bit `a`, `b` and `c` registers, the 3,200 bits of P and the 800 bits of
array configuration.

## Simulation

Each testbench is self-checking. It ends by printing
`TB_RESULT checks=<n> failures=<n>`.

For example, to build and run the end-to-end test with Verilator 5:

```
verilator --binary --timing --assert --top-module tb_evo_system \
    -y rtl -y tb +libext+.sv rtl/evo_pkg.sv tb/evo_tb_pkg.sv tb/tb_evo_system.sv
./obj_dir/Vtb_evo_system
```

The testbenches are:

* **`tb_evo_cell`:** random configurations and inputs against a reference
  model, plus a directed 3-input XOR.
* **`tb_cell_array`:** random 800-bit configurations against an independent
  loop model of the array (`tb/evo_tb_pkg.sv`), plus a hand-built full adder.
* **`tb_fitness_unit`:** random chromosomes, tables and masks scored against
  the model. The full adder must score 16, and 15 with one table bit wrong.
  The test also checks that the latency is exactly 9 clocks and that a
  start while busy is ignored.
* **`tb_ne_tcga_engine`:** a 32-bit engine driven by a behavioural scorer
  with random response delays. The scorer counts the bits that match a hidden
  pattern; in some runs about a quarter of the bits are excluded, which
  creates ties. The testbench follows the algorithm step by step with its own
  copy of P. It checks the order and content of every scoring request, the
  P updates, the elite hand-over, the mutant, convergence, the counters and
  the event pulses. Six runs are made.
* **`tb_evo_system`:** the whole system at default sizes evolves a full adder
  three times in a row. It checks:
  * the reported score against the model;
  * all 256 input words of the evolved circuit;
  * that elitism, resampling, mutant acceptance and tendency steps in both
    directions each occurred;
  * that at least one run reached the full score of 16.

  It takes a few seconds. With the default seed the three runs end with
  scores of 14, 16 and 15, after roughly 900 to 1,000 generations each. Like
  any compact GA, the algorithm can converge on a local optimum.
* **`tb_ne_tcga_functions`:** the engine alone, on the two real-valued test
  functions described in the next section.

## Choices made in this RTL

These points are not fixed by the source description. They are worth knowing
before trusting or changing the design.

* **Algorithm in hardware.** The algorithm and the scoring are hardware state
  machines rather than processor software. So there is no bus, and the target
  table and mask are plain inputs.
* **Layout and wiring.** The bit layout of the cell configuration is a
  choice. So are the order of the 16 column inputs and the mapping from
  chromosome to cells. "Column k takes the two preceding columns" is how the
  array's wiring rule is read here.
* **Tendency rule details.**
  * "Improves" means strictly greater.
  * The update for the not-improved case is the opposite step.
  * Each single-bit test starts from the unmodified winner.
  * `P` is clamped at 0 and N.
* **Stopping rule.** The run stops only when every `P[i]` has reached 0 or N.
  There is no generation limit.
* **Defaults.** `N = 10` and `ALPHA = 3` are choices. The source gives no
  values for the hardware experiment, and it studies population sizes from
  10 to 100 in software.
* **Randomness.** The random number generator and the sampling rule are
  choices.
* **Full adder mapping.** Inputs 0..2 carry a, b and carry-in; output 0 is
  sum and output 1 is carry-out.
* **Final scoring.** The extra scoring of the converged chromosome at the end
  is an addition, made so that the result comes with its score.

## The engine on two test functions

The algorithm is usually judged by maximising two functions of one real
variable x. x is encoded as a 16-bit chromosome spread evenly over the
interval. The engine is run with `L = 16`, `FW = 16` and N = 10, 20, ..., 100.
The testbench computes the score, scaled to a 16-bit integer:

| function | interval | maximum | runs within 0.5% of the maximum |
|----------|----------|---------|---------------------------------|
| sin(pi x/180) - 5x^2 + 60x + 800 | [0, 20] | 980.1 at x = 6.0 | 8 of 10 |
| x sin(10 pi x) + 2 | [0, 2] | 3.85 at x = 1.85 | 1 of 10 |

The second function has a row of peaks of rising height, and most runs settle
on the next-highest one, 3.65 at x = 1.65. Earlier software results for this
algorithm report the top peak at every N, with far fewer generations. The
encoding behind those results is not known, and a shorter chromosome may
explain part of the gap. Treat these figures as the behaviour of this
implementation, not as a reproduction. The runs can be repeated with
`tb/tb_ne_tcga_functions.sv`, which also prints the generations and
evaluations for each N.

Comparisons with the plain compact GA and with the tendency-only variant are
not part of this RTL.
