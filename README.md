# Constant-free stochastic circuits

Stochastic computing represents a number in [0, 1] as a random bit-stream whose fraction of 1s is
the value. Arithmetic then takes very little logic: an AND gate multiplies, a multiplexer adds.
But most such circuits need extra *constant* inputs, meaning random bit-streams of a fixed value
such as 1/2. A scaled adder, for example, is a multiplexer whose select is a random stream of value
1/2. These constants cost random-number hardware. They also add their own random fluctuation to
the result, so longer streams, more time and more energy are needed for the same accuracy.

This RTL removes the constants. It replaces them with a small **modulo counter** that accumulates
fractional contributions exactly and emits a 1 each time it wraps. A circuit built this way is
called an optimal modulo-counting (OMC) circuit. Its only remaining error comes from the
randomness of the user's inputs and from rounding the final count to an integer. For Bernoulli
inputs that is the lowest mean-squared error any implementation of the function can reach.

The repository contains:

* a generic OMC counter;
* four circuits built from it:
  * a scaled adder;
  * a degree-2 polynomial in two forms, with a modulo-16 counter and with a majority gate;
  * a linear-FSM function evaluator;
  * a complex matrix-vector multiplier;
* a shuffling de-autocorrelator and a squarer. Together they show how to chain an OMC circuit
  into a downstream sequential circuit.

## From a constant to a counter

Any combinational stochastic circuit with variable inputs `b` and random constants computes

    Z = sum over input patterns b of  g(b) * p(b)

In this formula, `p(b)` is the probability of seeing pattern `b` in a cycle. `g(b)` is the fraction
of constant combinations for which the logic outputs 1 on `b`. The constants exist only to make the
coefficients `g(b)` fractional. The conversion is:

1. Let `Q` be the least common multiple of the denominators of all `g(b)`.
2. Set the jump for each pattern to `a(b) = Q * g(b)`, an integer from 0 to Q.
3. Build a modulo-Q counter. In each cycle it adds `a(b)` for the pattern it sees. The output is 1
   in a cycle where the addition carries past Q-1. The counter keeps the remainder.

After N cycles the output holds exactly `floor((sum over cycles of a(b) + INIT) / Q)` ones.
`INIT` is the counter's initial state. The fractional weights are therefore applied exactly, with
no random selection, and the output differs from the ideal by less than one bit.

`omc_counter` is step 3 for any Q. The jump arrives on an input port, so steps 1 and 2 stay in the
instantiating module as a small case statement or a ones-counter.

Example, the scaled adder `(X + Y)/2`:

* The coefficients are g(00), g(01), g(10), g(11) = 0, 1/2, 1/2, 1.
* So Q = 2 and the jumps are 0, 1, 1, 2.
* A one-flip-flop counter therefore outputs a 1 on every second cycle that sees `01` or `10`, and on
  every `11`.

Because the count is exact, the adder gives the right answer even for fully anti-correlated
inputs:

* `010101010101` and `101010101010` give exactly six 1s in twelve cycles.
* With two bits of X flipped, the output has five 1s. An upset therefore costs only a proportional
  error.

### Rounding and the initial state

The counter's final state is a remainder that never reaches the output. The initial state decides
how that remainder rounds:

* `INIT = 0` truncates the fractional part of the expected number of 1s.
* `INIT = Q/2` rounds it to the nearest integer.
* In general, starting in state `a0` adds `a0/Q` before the floor.

Example with the adder, `X = 00011010` and `Y = 01100110` (first bit on the left), where the ideal
is 3.5 ones:

| Start state | Output `Z` | Number of 1s | End state |
|---|---|---|---|
| s0 | `00101010` | 3 | s1 |
| s1 | `01010110` | 4 | s0 |

Every module has an `INIT` parameter, default 0 (truncation). Reset loads it.

## The circuits

All modules take one bit of each stream per clock cycle. Each output bit is a combinational
function of the current inputs and the registered state, so it appears in the same cycle as its
inputs, with no latency. Every module has an asynchronous, active-low reset `rst_n`.

### `omc_adder`: scaled adder (X + Y)/2

* One flip-flop holds the state, with next state = `state ^ x ^ y`.
* The output is `MAJ(x, y, state)`.
* This is the Q = 2 counter from the example above, written directly as gates.

### `omc_strauss16` and `omc_maj16`: a polynomial with a 16-state counter

Both modules compute `Z = 11/16 p(X1X2 = 00) + 7/16 p(X1X2 = 11)`. For two independent inputs of the
same value, in inverted-bipolar format (value `1 - 2p`), this is the polynomial
`7/16 - (X1 + X2)/8 - 9/16 X1 X2`. A combinational version needs four random constants of value 1/2.

**`omc_strauss16`**

* A two-input adder counts the 1s among the inputs.
* A modulo-16 counter adds 11, 0 or 7 for a count of 0, 1 or 2.
* The counter's overflow is Z.
* The state takes four flip-flops.

**`omc_maj16`** is the same machine built around a majority gate.

* The counter `cnt` holds its state `s` as a thermometer code on 16 lines: `s` ones, and line 15 is
  never set.
* The combinational block C drives 17 lines that carry `a + 1` ones, where `a` is the jump.
* A 33-input majority gate fires at 17 ones, that is, when `s + a + 1 >= 17`. That is exactly the
  overflow condition `s + a >= 16`.
* The extra always-1 line in C is what makes the two forms agree bit for bit. A C that drives only
  `a` ones would fire one state late.
* The testbenches check that the two forms agree on every bit.

### `seq_cease`: linear-FSM circuit without its random constant

The original circuit computes `(X - 2X^2 + 1.5X^3) / (1 - 2X + 2X^2)`.

* It has a four-state saturating up/down counter, `sat_updown_fsm`, that moves up on a 1 and down on
  a 0.
* A multiplexer then outputs a stream selected by the state S: 0, 1, 0, or a random stream of
  value 1/2, for S = 0, 1, 2, 3.

Treating the multiplexer as a function of S:

* The coefficients are {0, 1, 0, 1/2}, so Q = 2 and the jumps are {0, 2, 0, 1}.
* In state 1 the counter always overflows.
* In state 3 it outputs a 1 on every second visit.
* The random constant becomes one flip-flop.

The up/down counter keeps its own fluctuation: the conversion applies only to the combinational
part. Measured values for Bernoulli inputs: 0.375 for X = 0.5 and 0.2375 for X = 0.25, both as the
formula predicts.

### `cmm_omc`: complex matrix-vector multiplier

The module computes `Z1 = (A X1 + B X2)/4` and `Z2 = (C X1 + D X2)/4` on complex bipolar streams.
Each complex stream is an `sc_pkg::cbit_t` holding `re` and `im` bits, each of value `2p - 1`.

* Each of the four real outputs is the sum of four bipolar products divided by 4. For example,
  `Re Z1 = (Ar X1r - Ai X1i + Br X2r - Bi X2i)/4`.
* A product is an XNOR. Subtraction inverts the product bit.
* The combinational version picks one product per cycle with three random selects.
* Here a modulo-4 counter (two flip-flops) adds the number of 1s among the four product bits.

### `deautocorrelator` and `sc_squarer`: chaining into sequential circuits

A counter's output is not Bernoulli. Whether a bit is 1 depends on the counter state, which
depends on the previous bits. An OMC circuit is itself insensitive to this: it only counts
patterns. But a downstream circuit that combines a bit with an earlier bit of the same stream is
not insensitive.

The sequential squarer `Z(t) = X(t) AND X(t-1)` (`sc_squarer`) is the standard case. Feed it the
adder output for two independent inputs of value 0.5:

* The ideal output is 0.25.
* The squarer returns 3/16. The reason: from state s0 the adder emits two 1s in a row only on
  `11, 11`, while from s1 five input pairs do it.
* The end-to-end test measures 0.188.

`deautocorrelator` shuffles the stream to break this dependence.

* K flip-flops hold K bits.
* Each cycle a random index R picks one flip-flop. Its bit goes to the output, and the input bit
  takes its place.
* Every bit that enters eventually leaves, so the stream's value is kept and only the positions of
  its 1s move.
* With K = 8 the squarer measures 0.242.
* R must come from a random source outside this design. It is the port `deac_r`. K must be a power
  of two. The flip-flops reset to 0, so the first K output bits carry some warm-up bias.

## Top level: `cease_top`

`cease_top` puts the designs side by side. They share only `clk` and `rst_n`.

| Ports | Design |
|---|---|
| `add_x`, `add_y` → `add_z`; `deac_r`; `sq_x`, `sq_z` | adder → de-autocorrelator (`DEAC_K = 8`) → squarer |
| `st_x1`, `st_x2` → `st_z`, `maj_z` | modulo-16 polynomial, counter form and majority form, same inputs |
| `seq_x` → `seq_z` | linear-FSM circuit |
| `cmm_a` … `cmm_x2` (`cbit_t`) → `cmm_z1`, `cmm_z2` | complex multiplier |

The only parameter is `DEAC_K`, the shuffle size. The default is 8 because 2 flip-flops leave
visible error in the squarer.

## Files

| File | Contents |
|---|---|
| `rtl/sc_pkg.sv` | `cbit_t`, one cycle of a complex stream |
| `rtl/omc_counter.sv` | generic modulo-Q counter with jump input, parameters `Q` (16), `INIT` |
| `rtl/omc_adder.sv` | scaled adder |
| `rtl/omc_strauss16.sv`, `rtl/omc_maj16.sv` | modulo-16 polynomial, two forms |
| `rtl/sat_updown_fsm.sv`, `rtl/seq_cease.sv` | saturating counter; linear-FSM circuit |
| `rtl/cmm_omc.sv` | complex matrix-vector multiplier |
| `rtl/deautocorrelator.sv`, `rtl/sc_squarer.sv` | shuffle buffer (`K`, default 2); squarer |
| `rtl/cease_top.sv` | top level |

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each testbench:

* compares every output bit with a reference model written in the testbench;
* checks the exact output count `floor((sum of jumps + INIT)/Q)` where it applies;
* has a cycle watchdog;
* prints `TB_RESULT checks=N failures=M`.

`tb_cease_top` runs the top at its default parameters for 65536 cycles.

* It checks every output of every design.
* It requires each mechanism to occur at least once: adder overflow, use of every shuffle
  flip-flop, modulo-16 overflow and hold, both saturations of the up/down counter, both jumps of
  the modulo-2 counter, and the full jump and the wrap of the modulo-4 counters.
* It checks the squarer values given above.

Accuracy workloads, each over many random trials:

| Testbench | What is measured | Result |
|---|---|---|
| `tb_wl_adder_mse` | adder MSE at N = 64, 128, 256 | within 15% of the Bernoulli lower bound `1/(12N)` plus truncation, e.g. 1.3e-3 at N = 64; a multiplexer adder with a random select gives about 3.2e-3 |
| `tb_wl_omc16_mse` | modulo-16 polynomial at N = 32, inputs drawn uniformly | MSE about 0.0024 against a bound of 0.0021 plus truncation |
| `tb_wl_seq_mse` | linear-FSM circuit at N = 16, 64, 256 against the same circuit with its random constant | the counter version has about half the MSE at every length, e.g. 1.0e-3 against 2.3e-3 at N = 64 |
| `tb_wl_cmm_mse` | one complex-multiplier output at N = 32 and 256 | at its lower bound (2.0e-3 at N = 32), against 7.5e-3 for a random-select version |
| `tb_wl_random_functions` | 3000 random functions f(x1, x2, r1..r4), with 0 to 4 constants turned into counters of 2..16 states | MSE falls with every constant removed and stays at its lower bound |

The random-function distribution is this testbench's own. Absolute MSE values therefore depend on
it; the ordering and the match to the bound do not.

To run a testbench with Verilator:

    verilator --binary --timing --assert -Irtl -y rtl +libext+.sv rtl/sc_pkg.sv \
        tb/tb_cease_top.sv --top-module tb_cease_top -o sim && obj_dir/sim

Every simulation finishes in under a second.

## Where this RTL makes its own choices

These points are interpretations, not fixed parts of the method:

* **Reset.** All state resets asynchronously to `INIT` (counters) or to 0 (shuffle buffer, squarer
  delay, up/down counter).
* **Jump interface.** `omc_counter` takes the jump on a port instead of holding a pattern table as
  a parameter. The mapping from pattern to jump is a few lines in each wrapper.
* **Majority form.** The 17th line of block C is tied to 1. As described above, this makes the
  majority gate fire exactly at counter overflow.
* **Complex multiplier.** The multiplier's function, meaning which products feed which output and
  the bipolar XNOR arithmetic, is the standard complex product. The counter conversion is applied
  to all four outputs.
* **Shuffle select.** The select `R = k` reads flip-flop `k`.
* **Not included.** The random-number source for the shuffle select is not included.

## Adapting it to another function

1. Write the target as `sum g(b) p(b)` with `g(b)` in [0, 1].
2. Take `Q` as the least common multiple of the denominators and compute the jumps `a(b) = Q g(b)`.
3. Instantiate `omc_counter #(.Q(Q), .INIT(...))` and drive `inc` from the input pattern with a case
   statement.

`INIT = 0` truncates and `INIT = Q/2` rounds to nearest. If the output feeds a circuit that looks at
several consecutive bits, put a `deautocorrelator` in between.
