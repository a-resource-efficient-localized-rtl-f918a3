# Clustered TRTRL: a recurrent neural network that learns on line, in hardware

Real-time recurrent learning (RTRL) trains a recurrent network one sample at a
time. The cost is high: every neuron tracks how its output depends on every
weight in the network, which is N^3 stored sensitivities and N^4 operations
per step. Truncated RTRL (TRTRL) keeps only the sensitivities a neuron has to
the weights on its own links:

- ingress: links coming into the neuron
- egress: links going out of it

The output neuron combines these local values into its own gradient. Storage
drops to a few values per link, and every update uses only data from direct
neighbours.

This RTL builds the clustered form of TRTRL as a network engine:

- 96 hidden neurons in 12 clusters of 8, laid out as a 3 x 4 grid
- one input per time step
- one output neuron

Each accepted sample runs one forward step of the network and one learning
step. Every neuron computes its own weight changes in parallel. The learning
rate is a power of two, so applying it costs only a shift.

## The learning rule as built

For hidden neuron i, with net input s_i = sum_j w_ij z_j (neighbours, input and
bias), activation y_i = f(s_i), output o and output error e = y_o - d:

| Quantity | Update |
|---|---|
| ingress p^i_ij | p^i_ij <- f'(s_i) * (w_ij * p^j_ij + z_j) |
| egress p^i_ji | p^i_ji <- f'(s_i) * (w_ij * p^j_ji + y_i) (self link: p^i_ii <- f'(s_i) * (w_ii * p^i_ii + y_i)) |
| output sensitivity | p^o_ij = f'(s_o) * (w_oi * p^i_ij + w_oj * p^j_ij) |
| hidden weight | w_ij <- w_ij - 2^-A * e * p^o_ij |
| hidden-to-output weight | w_oi <- w_oi - 2^-A * e * f'(s_o) * z_i (kept inside neuron i) |
| output input/bias weights | w_om <- w_om - 2^-A * e * f'(s_o) * x_m |

Input and bias weights have no recurrence, so their ingress sensitivity is
simply f'(s_i) * x. Output sensitivities are computed fresh each step from the
neuron's current sensitivities. They are not carried from step to step.

`A` is `ALPHA_SHIFT`, default 4. The shifted step rounds to nearest (`fx_step`
in the package). A plain arithmetic shift would round every step toward minus
infinity. Every weight would then creep upward by half an LSB per update, and
over a few thousand steps that drift outweighs the real gradient.

## Numbers and the sigmoid

All values are 20-bit two's complement with 12 fraction bits:

- range -128 .. +128
- resolution 2^-12
- products are truncated
- sums and products saturate

The activation is a 15-segment piecewise-linear sigmoid on [-7, 8):

- The integer points are f(k) = 1 - 2^-(k+1) for k >= 0 and f(-k) = 2^-(k+1), so f(0) = 1/2.
- Neighbouring points are joined by straight lines.
- The slope of every segment is a power of two: 2^-(k+2) on [k, k+1) for k >= 0, and 2^(k-1) for k < 0. Each output is therefore one shift and one add.
- Sixteen comparators (x >= k for k = -7 .. 8) produce a thermometer code. XOR of neighbouring bits picks the segment.
- Outside the range the output holds 2^-8 or 1 - 2^-9.
- The derivative used for learning is the slope of the current segment, and 0 outside the range.

The unit is combinational (`pwl_sigmoid`, `pwl_sigmoid_deriv`, `pwl_interval`).

## Clusters and links

Each cluster holds the following parts:

- eight neurons
- a controller
- a 60-bit shared bus
- a small memory
- the bias source (1.0)
- one shared sigmoid / derivative unit

Inside a cluster every neuron is linked to all seven others. The neurons sit
around a 3 x 3 square with an empty centre:

```
 0  1  2
 3  .  4
 5  6  7
```

The corner neurons also link to neurons in the neighbouring clusters, each
over its own dedicated line:

- horizontal link (port 0): node 2 talks to node 0 of the cluster on its right, and node 7 to node 5
- vertical link (port 1): node 5 talks to node 0 of the cluster below, and node 7 to node 2

A corner on an inside edge therefore has up to two external links. Each neuron
has 12 slots, 10 for neighbours plus the input and the bias:

| Slot | Contents |
|---|---|
| 0 | itself |
| 1-7 | cluster mates |
| 8-9 | external ports |
| 10 | the input |
| 11 | the bias |

Weights and sensitivities live in small dual-port RAMs inside each neuron
(`dp_ram`). There are seven per neuron, each 20 bits wide:

- weights
- ingress sensitivities
- egress sensitivities
- and, for every neighbour, its activation, output weight, ingress value and egress value

Between neighbours, the ingress value is p^j_ij and the egress value is p^j_ji.
Unused link slots simply keep weight 0.

## One time step

The main controller (`main_controller`) drives all clusters through the same
phases in lock step. A phase ends when every cluster has reported done.

1. **INPUT** (9 cycles). The input layer sends x on a 20-bit line to every
   cluster, and (x, d) on a 40-bit line to the output node. Each cluster
   controller then hands x to its eight neurons, one per cycle.
2. **EXCH** (116 cycles). Two cycles capture the words on the external links.
   Then the bus runs two rounds of 56 time slots each, covering every ordered
   pair (sender, receiver) of the eight neurons:
   - round one carries (z, w_o, ingress value)
   - round two carries the egress value

   Slot codes are issued one cycle before they are used, so the sender has
   time to read its RAM.
3. **ACT** (14 cycles per cluster). Each neuron accumulates its 12 products,
   one per cycle. The cluster's sigmoid then serves the neurons one per cycle.
   At the same time, the main controller's multiplexer streams the (z_i, w_oi)
   pair of all 96 neurons, cluster by cluster, into the output node. These
   pairs were captured in cluster memory during EXCH.
4. **Output**. The output node forms s_o from:
   - the streamed sum
   - its input and bias terms

   It then computes y_o, f'(s_o) and e = y_o - d, and updates its own input
   and bias weights.
5. **ERR**. The pair (e, f'(s_o)) is buffered by the main controller,
   broadcast to the clusters, and forwarded to each neuron one per cycle.
6. **UPD** (15 cycles). Each neuron walks its slots and updates ingress and
   egress sensitivities and weights. It then updates w_oi and takes its new
   activation.

At the default size one step takes 264 cycles from the start of the broadcast
to the result (265 from `in_valid`). The 96-cycle output stream and the
112-slot exchange dominate.

## Top-level interface (`trtrl_network`)

| Port | Meaning |
|---|---|
| `clk`, `rst_n` | clock, asynchronous active-low reset |
| `ready` | initial clear finished; the network takes samples |
| `in_valid`, `in_ready`, `in_x[N_IN]`, `in_d` | sample handshake: inputs and target |
| `out_valid`, `out_y`, `out_err` | one-cycle pulse with y_o and e = y_o - d after each step |
| `cfg_we`, `cfg_cluster`, `cfg_node`, `cfg_addr`, `cfg_data` | weight loading (see below) |

Weight loading:

- `cfg_addr` selects a slot from the table above. The value 12 selects the weight to the output.
- `cfg_cluster = 12` addresses the output node: address 0 is the input weight, address 1 the bias weight.

Reset clears all activations, sensitivities and weights. Load the weights
after reset, then wait for `ready`.

Parameters of the top:

| Parameter | Default |
|---|---|
| `ROWS` | 3 |
| `COLS` | 4 |
| `N_IN` | 1 |
| `ALPHA_SHIFT` | 4 |

Shared types and constants are in `rtl/trtrl_pkg.sv`.

## Where this design goes beyond or departs from the original protocol

- **Second bus round.** The source protocol sends each neuron's (z, w_o,
  ingress value) over the 60-bit bus in 56 cycles. The sensitivity update also
  needs the neighbour's egress value, so a second 56-slot round carries it.
- **w_oi stays local.** The output weight w_oi lives in neuron i and is
  updated there. No per-neuron sensitivity is sent to the output node.
- **Sensitivity to the output weight.** Neuron i's sensitivity to w_oi is
  taken as zero, so p^o_oi = f'(s_o) * z_i.
- **Error sign.** The error is e = y - d, and the step subtracts
  (gradient descent).
- **No output self-loop.** The output node has none.
- **Sigmoid output.** The output neuron applies the sigmoid. The software
  experiments the method was tuned on used a linear output, so targets must lie
  in (0, 1).
- **Forwarding paths.** The error pair and the input value reach each neuron
  over a separate fan-out with a per-neuron write enable, not over the shared
  60-bit bus. The timing is the same: one neuron per cycle.
- **RAM depth.** The weight and ingress RAMs hold 12 entries: 10 links plus
  input and bias.
- **Timing.** The net-input phase takes 14 cycles per neuron.
- **Not built:**
  - momentum and adaptive learning rates
  - the Booth multiplier that was considered as a cheaper alternative (the
    products here are plain fixed-point multiplies)

## Verification

Every block has a self-checking bench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

- `tb_trtrl_network` runs the default 96-neuron network for 40 learning steps.
  After every step it compares y_o, e and every neuron's z and w_o, bit for bit,
  with a behavioural model written from the equations above. It also counts:
  - broadcasts
  - bus slots
  - link captures
  - sigmoid services and saturations
  - error broadcasts
  - update phases

  It checks the 9-cycle input broadcast and the 112 bus slots per cluster.
- `tb_workload_tasks` trains the full network on three classic tasks:
  - frequency doubler
  - depth-4 sequence memorization
  - Mackey-Glass prediction 30 steps ahead

  Each task runs 3000 online steps and reports the error of the first and
  last 375 steps. The bench checks only that learning stays stable: the error
  may not grow by more than 10 %. In these runs the error stays close to that
  of a constant guess: about 0.09 for the doubler, 0.17 for memorization and
  0.015 for Mackey-Glass. The Mackey-Glass error falls slightly with some random
  seeds. Solving the tasks needs far longer training than a simulation here
  allows (`+steps=N`), so this bench demonstrates stable learning, not
  converged solutions.
- Block benches cover the sigmoid and derivative over their whole input range,
  the RAM, the bus, the controllers, the neuron against its own model, a single
  cluster, the input layer and the output node.

Simulate with Verilator, for example:

```
verilator --binary --timing -Irtl rtl/trtrl_pkg.sv rtl/*.sv tb/tb_trtrl_network.sv --top-module tb_trtrl_network
./obj_dir/Vtb_trtrl_network
```

The full-size build takes a few minutes. The simulation itself takes well
under a second for `tb_trtrl_network` and about 30 s for `tb_workload_tasks`
(`+steps=N` lengthens it).
