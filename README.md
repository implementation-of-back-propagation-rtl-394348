# On-chip back-propagation training for a 4-4 neural network

This RTL trains a small two-layer neural network in hardware. There are four
inputs, four hidden sigmoid neurons and four output sigmoid neurons, with
sixteen weights in each layer. You give it an input pattern, a target pattern
and starting weights. It then repeats back-propagation iterations on its own:
a forward pass through both layers, the output error, the error sent back to
the hidden layer, and new weights for both layers. After each iteration the
new weights go back into the weight registers, so the outputs move towards
the target.

The same network is built twice, in two architectures, and the top `bp_top`
holds both side by side:

* `bp_network` (ports `net_*` on the top) splits back-propagation into
  the units of a classic textbook hardware partition: synapse, neuron, an
  error generator at the output, an error generator at the input (hidden)
  side, weight update and weight transfer. Each unit is a small
  SystemVerilog module with a `start` pulse in and a `done` pulse out. The
  network chains them done-to-start.
* `chip_network` (ports `arr_*`) is built from an *expandable unit network*.
  This is an array of 4 neuron cells, 16 synapse cells and 4 error-generator
  cells that can be cascaded into larger networks. Two units are cascaded
  here: one as the hidden layer and one as the output layer. Each synapse
  cell stores and updates its own weight.

Both share the clock, reset, input pattern `x`, targets `t`, gain `alpha` and
threshold `theta`. Each has its own `start`, iteration count, initial
weights and results, so they can run alone or together.

## Training iteration of `bp_network`

Write `w_ij[j][i]` for the weight from input `i` to hidden neuron `j`. Write
`w_jk[k][j]` for the weight from hidden neuron `j` to output neuron `k`. One
iteration computes:

| step | unit (instance) | computation |
|---|---|---|
| 1 | `synapse` (`u_s1`) | `si[j] = sum_i w_ij[j][i] * x[i]` (the products are on `mi`) |
| 2 | `neuron` (`u_n1`) | `oi = f(si)`, `di = oi * (1 - oi)` |
| 3 | `synapse` (`u_s2`) | `sj[k] = sum_j w_jk[k][j] * oi[j]` |
| 4 | `neuron` (`u_n2`) | `oj = f(sj)`, `dj = oj * (1 - oj)` |
| 5 | `error_genr_op` (`u_e1`) | `delta_j[k] = (oj[k] - t[k]) * dj[k]` |
| 6 | `error_genr_ip` (`u_e2`) | `error_i[j] = sum_k w_jk[k][j] * delta_j[k]`, `delta_i[j] = error_i[j] * di[j]` |
| 6 | `weight_update` (`u_w1`) | `w_jk'[k][j] = w_jk[k][j] - delta_j[k] * oj[k]` |
| 7 | `weight_update` (`u_w2`) | `w_ij'[j][i] = w_ij[j][i] - delta_i[j] * oi[j]` |
| 8 | `weight_transfer` (`u_wu1`, `u_wu2`) | `w_jk <= w_jk'`, `w_ij <= w_ij'` |

Here `f(s) = 1 / (1 + exp(-alpha * (s + theta)))`. The gain `alpha` and the
threshold `theta` are input ports, shared by both layers.

Steps 5 to 7 hold the parts that most need care:

* **Sign of the output delta.** `delta_j` is *actual minus target*. With the
  update `w - delta * o`, this is the sign that moves the outputs towards the
  target. Some write-ups of this partition print the opposite sign
  (`t - o`). Their weights then grow in the wrong direction.
* **The activation in the weight step is the layer's own output.** A weight
  of row `r` changes by `delta[r] * o[r]`. Here `o` is the output of the
  neuron that the row feeds (`oj` for the output layer, `oi` for the hidden
  layer), not the input that the weight multiplies. This follows the design
  that this RTL reproduces. So every weight in a row changes by the same
  amount. Textbook back-propagation multiplies by the source activation
  instead (`oi` for `w_jk` and `x` for `w_ij`). To get that, change the `o`
  connections of `u_w1`/`u_w2` and make the step depend on the column.
  Training still converges with this rule, because the step has the same
  sign as the textbook one.
* **Old weights for the back-propagated error.** `error_genr_ip` reads
  `w_jk` before this iteration's update. The update `u_w1` only writes its
  result into `dw_jk`, and the register changes in step 8.
* **No learning-rate factor by default.** `weight_update` has a parameter
  `ETA_SHIFT` that scales the step by `2^-ETA_SHIFT`. The default is 0, which
  means a learning rate of 1.

## Timing and control of `bp_network`

Every unit registers its outputs and holds them until its next `start`. The
latencies are synapse 1, neuron 3, error generator at the output 1, error
generator at the input 2, weight update 1, and weight transfer 1.
`error_genr_ip` and the output-layer weight update both start when the output
error generator is done. The output-layer update therefore finishes two cycles
before the hidden-layer update. The top waits for both (a join on two
sticky flags, `w1_fin` and `w2_fin`) before it pulses `start` on both weight
registers. The next iteration then starts from the weight-transfer `done`.

Protocol of `bp_network`:

1. Hold `x`, `t`, `alpha`, `theta`, `n_iter`, `w_ij_init` and `w_jk_init`
   stable.
2. Pulse `start` for one cycle while `busy` is low. A `start` while `busy`
   is high is ignored.
3. The first cycle loads the initial weights into the two `weight_transfer`
   registers. Iterations then follow every 14 cycles. `iter_done` pulses
   `14*n` cycles after the clock edge that sampled `start`, for `n = 1 ..
   n_iter`. `iter` counts the completed iterations.
4. `done` pulses one cycle after the last `iter_done`, and `busy` falls.
   `n_iter = 0` runs a single iteration.

All intermediate values of the latest iteration are outputs. They are `mi`,
`si`, `oi`, `di`, `mj`, `sj`, `oj`, `dj`, `delta_j`, `error_i`, `delta_i`, and
the current weights `w_ij` and `w_jk`. `sat_i`/`sat_j` flag neurons whose
input was clamped to the sigmoid table range.

Reset is asynchronous and active low (`rst_n`). It clears every register to
zero. There is one clock.

## The expandable unit network (`chip_network`)

One unit (`chip_unit_network`) is a 4×4 grid. Synapse cell `(i, j)` sits on
row `i`, which carries input `x_in[i]` and the row error line `e_out[i]`. It
also sits on column `j`, which carries the column sum and that column's
delta. Each column ends in a neuron cell and an error-generator cell. The
cells are:

| cell | module | function |
|---|---|---|
| synapse | `chip_synapse` | `m = w*x` onto its column sum, `eps_out = w*delta` onto its row sum, and on `upd`: `w <= w + (x*delta) >>> ETA_SHIFT` |
| neuron | `chip_neuron` | `x = f(s)`, with two more outputs `x1 = x` and `x2 = x*x`, so that `x1 - x2 = x(1-x)` is the derivative |
| error generator | `chip_error_gen` | `c = 1`: `delta = (t - x)(x1 - x2)`; `c = 0`: `delta = eps_in (x1 - x2)`. The port `t_eps` carries either the target or the error. |

The per-column mode pin `cfg` (= `c`) is what makes units cascadable. A unit
whose columns are output neurons takes targets on `t_e_in`. A unit whose
columns are hidden neurons takes the row error sums `e_out` of the unit
after it. `chip_network` wires two units that way:

```
x ──> u_hid (cfg=0) ──h──> u_out (cfg=1) ──> y
        ^ t_e_in              | e_out
        └──────── e_hid ──────┘          t ──> u_out.t_e_in
```

A unit has three phases, each with its own start and done. The forward
phase takes 3 cycles: it registers the column sums (`mul`) and then the
neuron outputs. The backward phase takes 2 cycles: the deltas (`del`) first,
then the row error sums (`e_out`). The update phase takes 1 cycle, in which
every cell moves its weight. A state machine in `chip_network` runs one
iteration as:

1. hidden forward;
2. output forward;
3. output backward;
4. hidden backward;
5. both updates at once.

So the error that is sent back uses the output weights from before the
update. The sequence is one load cycle and then 16 cycles per iteration:
`iter_done` pulses `16*n` cycles after the edge that samples `arr_start`.
The handshake is the same as for `bp_network`.

Each weight moves by *source activation × delta*, the textbook rule:
`w_hid[i][j] += x[i]*del_hid[j]` and `w_out[j][k] += h[j]*del_out[k]`. This
is not the same rule as in `bp_network`, which uses the layer's own output.
The two networks therefore give identical forward passes in the first
iteration and different weights after it. Both rules learn.

Weights in this network are indexed `[source][destination]` (row = input,
column = neuron). `bp_network` uses `[destination][source]`. To start both
from the same weights, pass transposed arrays.

## Number format and the sigmoid

`bp_pkg` defines every value as signed fixed point. It has 32 bits with 24
fraction bits (`fix_t`, Q8.24), so the range is about ±128 and the resolution
is 6·10⁻⁸. Products are rounded to the nearest value (`bp_pkg::fmul`). Sums
are not saturated. With weights of order 1 and inputs in [0, 1], they stay far
inside the range.

The neuron does not compute `exp`. It reads a table of 513 samples of
`1/(1+e^-z)`, taken every 1/32 over [-8, 8], and interpolates linearly between
the two samples around `z = alpha*(s+theta)`. The error is below about 2·10⁻⁵.
Outside [-8, 8) the input is clamped, and the `sat` flag reports it. The
table is a constant computed at elaboration by `bp_pkg::sig_table()`. That
function computes `exp(z)` as `(1 + y + y²/2! + … + y¹⁰/10!)^256` with
`y = z/256`, using eight squarings in double precision. It then rounds each
sample to Q8.24. To change the resolution or the range, change
`SIG_STEP_LOG2` (samples per unit, as a power of two) and `SIG_ZMAX_LOG2`
(range, as a power of two) in `bp_pkg`. Each neuron lane reads two samples
per evaluation. After synthesis the table appears as read-only memories,
two per neuron (`sigmoid_interp`), 32 in the whole top.

## Files

| file | contents |
|---|---|
| `rtl/bp_pkg.sv` | number format, network size (`N_IN`, `N_NEUR` = 4), `fmul`, sigmoid table |
| `rtl/sigmoid_interp.sv` | one sigmoid: clamp, table lookup, interpolation (combinational) |
| `rtl/synapse.sv` | 4×4 weights × 4 inputs → 4 sums and 16 products, 1 cycle |
| `rtl/neuron.sv` | 4 sigmoids with gain/threshold, derivative `o(1-o)`, 3 cycles |
| `rtl/error_genr_op.sv` | output deltas, 1 cycle |
| `rtl/error_genr_ip.sv` | back-propagated errors and hidden deltas, 2 cycles |
| `rtl/weight_update.sv` | new weights of a layer, parameter `ETA_SHIFT` |
| `rtl/weight_transfer.sv` | weight register of a layer, with an initial load |
| `rtl/bp_network.sv` | the partition network: the chain, iteration counter, join, assertions |
| `rtl/chip_synapse.sv` | synapse cell with its own weight |
| `rtl/chip_neuron.sv` | neuron cell with outputs `x`, `x1`, `x2` |
| `rtl/chip_error_gen.sv` | error-generator cell with mode pin `c` |
| `rtl/chip_unit_network.sv` | one expandable unit: 16 + 4 + 4 cells, three phases |
| `rtl/chip_network.sv` | two cascaded units and their phase controller |
| `rtl/bp_top.sv` | top: both networks side by side |
| `tb/tb_*.sv` | one self-checking testbench per module |

The size of each unit is fixed at 4 and 4. In `bp_network`, `N_IN` must
equal `N_NEUR`, because the hidden outputs feed the second `synapse`. A
larger network is meant to be built by cascading more expandable units.
Only the two-unit cascade is built here. More units would need a
controller with more phases.

## Verification

Each testbench compares against values computed independently in `real`
arithmetic, and checks the unit's latency. Each one prints
`TB_RESULT checks=N failures=M`.

* `tb_synapse`, `tb_error_genr_op`, `tb_error_genr_ip`, `tb_weight_update`
  and `tb_weight_transfer` check the published operating point and then
  several hundred random cases. The operating point is: weights 0.01, inputs
  0.1, so sums of 0.004; hidden outputs 0.501, so sums of 0.02004; output
  delta magnitude 0.100992; hidden errors −0.00403968; hidden deltas
  −0.00100992; updated hidden weights 0.010506.
* `tb_neuron` checks `f(0.004) = 0.501` and `f(0.02004) = 0.50501`, with
  derivatives 0.249999 and 0.249975. It then checks random sums, gains and
  thresholds against `$exp`, including clamped inputs.
* `tb_bp_network` runs the whole network at its default parameters. Each
  iteration is checked against a `real` model that starts from the weights
  the hardware held at the start of that iteration. Four trainings are run:
  1. The operating point above, for 4 iterations. The first-iteration values
     must match, and the outputs must fall towards the 0.101 target. With the
     sign and update rule above, they go 0.50501 → 0.4795 → 0.4569 → 0.4368
     in this design.
  2. A random pattern for 300 iterations. The squared output error must shrink
     (0.30 to below 10⁻⁶ with the default seed). A `start` is pulsed while the
     network is busy and must be ignored.
  3. Large weights, to exercise clamping.
  4. `n_iter = 0`.

  The testbench counts iterations, weight loads, weight transfers, join waits,
  clamps and ignored starts, and fails if any of these never happens.
* `tb_chip_synapse`, `tb_chip_neuron` and `tb_chip_error_gen` check the cells
  against `real` arithmetic: products, weight load and update, `x1 - x2`
  against `x(1-x)`, and both error-generator modes.
* `tb_chip_unit_network` loads random weights and runs the three phases 100
  times, with a random mix of output and hidden columns. It checks every
  sum, output, delta, row error and weight, and the latencies 3, 2 and 1.
* `tb_chip_network` runs the same four trainings as `tb_bp_network`. It
  checks each iteration against a `real` model of textbook
  back-propagation, and checks the 16-cycle period. It counts the five
  phases, loads, clamps and ignored starts.
* `tb_bp_top` runs the whole top at its default parameters. It trains both
  networks at the same time on the same patterns, from the same initial
  weights, with the four trainings above. Each network is checked against
  its own model. Their first forward passes must agree. Every mechanism of
  both is counted.

Run any testbench with plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
  --top-module tb_bp_top rtl/bp_pkg.sv tb/tb_bp_top.sv
./obj_dir/Vtb_bp_top
```

## Where this design departs from its source, and what it adds

* **Equations.** The source states some equations two ways. This design
  follows the version that is consistent with its own simulated numbers and
  with a network that learns:
  * output delta = output minus target;
  * hidden delta = back-propagated error × derivative (not "target minus
    output" of the hidden layer);
  * weight step uses the layer's own output.
* **Iteration values after the first.** In the source's own full-network
  simulation, the printed output-delta magnitude in the first iteration
  (0.0752) does not follow from its printed outputs, derivatives and target.
  This design gives 0.100992 there. Its later iteration values therefore
  differ from that trace, although they move in the same direction.
* **Own choices.** These are all choices of this implementation, not taken
  from the source:
  * the fixed-point format, the sigmoid table and the clamping;
  * every latency, and the pulse form of `start`/`done`;
  * the iteration counter `n_iter`, the load step for the initial weights,
    and the join;
  * the `sat` flags;
  * `ETA_SHIFT`.

  The source model used real arithmetic. Its blocks had extra timing inputs
  and about forty separate done outputs. This design does not reproduce
  them.
* **The cell array is digital.** The source describes the neuron, synapse
  and error-generator cells of the expandable network as analog
  current-mode circuits. They use currents on summing lines, a gain set by
  a control voltage and a resistor, and a bias current for the threshold.
  Here these cells are clocked digital logic in the same number format:
  * the gain becomes the port `alpha`;
  * the bias becomes `theta`;
  * `x1`/`x2` are chosen as `x` and `x²`, so their difference is the
    derivative the error generator needs.

  The cell functions, the mode pin and the cascading follow the source.
  The following are choices of this design:
  * the update rule inside the synapse's weight unit (the source gives no
    formula for it);
  * the three phases and their latencies;
  * the controller and the 16-cycle iteration;
  * the learning-rate shift.

  No electrical behaviour is modelled.
* **One top for two architectures.** The source presents the two
  architectures separately. Putting both under `bp_top` lets them be
  compared on the same pattern.
