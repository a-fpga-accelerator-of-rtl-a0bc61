# A3C training accelerator with shared engines

Asynchronous advantage actor-critic (A3C) trains one network with many agents.
Each agent plays its own copy of the environment. It runs a few inference
steps, computes gradients over that short rollout, and pushes them into a
central set of parameters without waiting for the other agents. Giving every
agent its own inference and training hardware wastes most of it. Agents spend
much of their time waiting for their environment, and training costs far more
than inference.

This design instead serves **8 agents** with **6 forward engines** and
**6 training slots**. The engines are pooled, and any agent uses whichever one
is free. A single **RMSProp unit** applies the finished rollouts to the central
parameters one at a time, in the order the rollouts finished.

The network is the Atari-RAM actor-critic:

    state 1x128 -> FC 256 -> ReLU -> FC 128 -> ReLU -> FC 64 -> ReLU -> FC 4 (+1)
                                                               softmax policy / linear value

The last layer has five rows: four policy logits and one value output.
Arithmetic is IEEE-754 single precision throughout. The package has FP32 adder,
multiplier, divider, 1/sqrt, exp and ln functions that round to nearest even.
Subnormals are flushed to zero.

## System view

```
 host (8 environments)                         a3c_accel
 ─────────────────────          ┌─────────────────────────────────────────────┐
 th_*  load/read params  ─────► │ memory_unit: theta[74501]  act[8][8*581]     │
 st_*  write observation ─────► │   rew[8][8]  sign store  back-prop buffers   │
 rw_*  write reward      ─────► │                                             │
 inf_req ─► FCU (6 x FPE) ──────┤──► inf_rsp (pi[4], v)                        │
 train_req ─► slot k of 6:      │                                             │
             LGCU/LPE ─► BCU(BPE) + PGCU(GPE) ─► gradient buffers of agent a  │
                                 RMSProp unit: agent FIFO ─► parameter update │
 upd_done/upd_agent  ◄──────────┤                                             │
                                └─────────────────────────────────────────────┘
```

The host protocol for one agent is:

1. Write the observation of step `t` (128 words, `st_*`) and request an
   inference (`inf_req_*`). The response returns pi and v, and the same values
   are stored in the agent's buffer. The host picks an action and steps its
   environment. It then writes the reward (`rw_*`).
2. After `nsteps` steps (T_max = 5), write the next observation at step
   `nsteps` and request one more inference. This is the bootstrap value.
3. Request training (`train_req_*` with `nsteps`, and `terminal` if the
   episode ended).
4. From the accepted training request until `upd_done` for this agent, the
   agent is *pending*. Its inference and training requests are refused
   (`ready` low), because its buffers are in use. After `upd_done` the next
   rollout may start.

Every request uses a valid/ready handshake. Responses are single-cycle pulses
with no back-pressure.

## Memory organisation

All buffers are arrays in `memory_unit`. Each consumer has its own port, so no
engine ever waits for another engine's memory access.

| buffer | size | written by | read by |
|---|---|---|---|
| central parameters `theta` | 74,501 words, layer by layer: row-major weights then biases | host, RMSProp | forward engines (8-wide + bias), training slots (8-wide), RMSProp (8-wide), host |
| agent buffer `act[a]` | 8 steps x 581 words: state(128), h1(256), h2(128), h3(64), pi(4), v(1) | host (state), forward engines | forward engines, training slots, LGCU |
| rewards `rew[a][t]` | 8 x 8 | host | LGCU |
| sign store (CSG) | 8 agents x 8 steps x 448 bits | forward engines | training slots |
| output gradients `gout[slot][t]` | 6 x 8 x 5 | LGCU | training slots |
| back-prop banks `gbuf[slot][2][256]` | two banks per slot | backward engines | training slots |
| gradient buffers `grad[a]` | 8 x 74,501 words (in the RMSProp unit) | aggregation adders | parameter update |
| mean square `g` | 74,501 words (in the RMSProp unit) | parameter update | parameter update |

Agents keep **no local copy of the parameters**. Inference reads the central
parameters directly. A rollout therefore sees the central network as it is
while the rollout runs, including updates from other agents that land
mid-rollout.

This is a departure from textbook A3C, where an agent copies the central
parameters at the start of a rollout. Eight private copies of 74.5 k words
would exceed the block RAM the original implementation reports for its
memory unit, so direct reads are the only reading consistent with that
budget.

## Forward computation (FCU, FPE)

`fcu` hands each accepted request to the lowest-numbered idle `fpe`. Finished
results leave one per cycle, lowest engine first. An engine holds its result
until it is taken.

Each `fpe` contains three blocks:

- **Multiplier-AddTree** (`mult_addtree`): 8 products per cycle, a balanced
  adder tree, and one more adder. On the first chunk of a neuron that adder
  adds the bias. On later chunks it adds the running sum.
- **ReLU** (`relu_unit`).
- **Softmax** (`softmax_unit`): exp of each logit, sum, and divide.

The sequencer loops over layers, then output neurons, then 8-wide input
chunks. It handles one chunk per cycle. The engine writes each finished
hidden neuron back to the agent buffer. It also writes the neuron's ReLU sign
to the sign store, which the training engines read later.

The value row of the last layer stays linear. The four logits go through the
softmax.

A pass takes `sum(out*in/8) + 4 + 2 + 4 = 9,266` cycles. The response appears
two cycles later at the top. At 200 MHz that is about 46 µs per inference.

## Training slot: loss gradient (LGCU, LPE)

A training slot processes a rollout backwards in time. Its `lgcu` slot
computes:

- `R = v(bootstrap)`, or 0 if `terminal`.
- For each step t from `nsteps-1` down to 0: `R = r_t + γR` and
  `δ = R - v_t`.

The slot passes the policy z = pi_t and δ to its `lpe`. The LPE's actor part
computes:

    X'π[j] = c · Σ_k (1 - ln z_k) · J[k][j]  +  δ · (e_i[j] - z_j)

Here J is the softmax Jacobian (`J[k][k] = z_k(1-z_k)`, `J[k][j] = -z_k z_j`),
c = 0.01 is the entropy weight, and `e_i` is one-hot at the most probable
action. The critic part gives `-2δ` for the value row.

The LPE outputs the negated actor term (the descent direction) and `-2δ`. The
LGCU stores these five numbers for every step, which takes `2·nsteps+1`
cycles. The value gradient is multiplied by the value weights on its way down
through the backward engine. This is how the critic's contribution `X'v`
reaches the shared layers.

The action used in the advantage term is the most probable one, following the
formula's one-hot vector `e_i`. A host that samples actions stochastically
would need the sampled action passed in. That path is not built.

## Training slot: backward and parameter-gradient engines (the core)

This part is the hardest to follow. Each slot owns one backward engine
(`bpe`, one per slot, grouped in `bcu`) and one gradient engine (`gpe`,
grouped in `pgcu`). Both engines consume the **same stream**, one item per
cycle:

    for t in steps, for l = 3 downto 0, for input chunk jc, for output neuron k:
        gk  = gradient at output neuron k of layer l   (x'_k)
        sel = ReLU sign of neuron k at step t          (1 for the linear layer 3)
        w   = theta[l][k][8*jc .. 8*jc+7]              (weights, for the BPE)
        x   = layer-l input of step t, words 8*jc..+7  (for the GPE)

**Why the loop order is (chunk outer, neuron inner).** Back-propagation
multiplies by the transposed weight matrix: `x'_in[j] = Σ_k W[k][j]·A'_k·x'_k`.
Weights are stored row-major (row = output neuron k). If the engine fixes a
chunk of 8 inputs j and walks over k, it reads 8 contiguous words per cycle.
It can then keep 8 accumulators, one per input j, and never needs a
transposed copy of the weights.

After the last k, the 8 input gradients of that chunk are complete
(`y_valid`). They go to the *other* bank of the slot's back-prop buffer,
where layer l-1 reads them as its `gk`. Layers alternate banks. One idle
cycle between layers lets the last chunk's write land before it is read.

**Sign bits instead of derivatives.** The ReLU derivative is 1 where the
forward output was positive and 0 otherwise. The forward engine already knew
this. The sign store keeps it as one bit per neuron, per step and per agent.

In the BPE, `sel` gates the weights through the input-control multiplexers, so
a dead neuron contributes nothing to any input gradient. In the GPE, `sel`
gates the inputs, which gives `dW[k][j] = sel·x'_k·x_j` and
`db[k] = sel·x'_k`. The bias gradient is sent once per row, with the first
chunk.

**Aggregation.** Each GPE output is tagged with its parameter address. The
RMSProp unit adds it straight into the gradient buffer of the agent this slot
trains, so the gradients of all steps are summed in place.

A step costs `sum(out*in/8) + 4` ≈ 9,260 cycles. The LGCU adds
`2·nsteps+1` cycles per rollout. The six slots are fully independent. The one
shared resource is the parameter-memory read port of each slot.

## RMSProp unit and asynchronous update

When a slot finishes, it offers its agent number (`fin_valid`/`fin_ready`).
If several slots finish together, the lowest slot goes first. The agent number
enters a synchronous FIFO (`agent_fifo`), which keeps the order in which
agents finished aggregating.

Whenever the parameter update module (`param_update`) is idle, it pops the
oldest agent. It then sweeps all 74,501 parameters, 8 per cycle, through a
3-stage pipeline:

    read  dθ (clearing it), g, θ
    g  ← ρ·g + (1-ρ)·dθ²                 ρ = 0.99
    θ  ← θ + lr·dθ / sqrt(g + ε)         lr = -7e-4, ε = 0.1

Writes go back to θ and g. A sweep takes `ceil(74501/8) + 2 = 9,315` cycles.
Then `upd_done`/`upd_agent` pulse, and the agent stops being pending.

Reading a gradient word clears it, so the agent's buffer is empty for its next
rollout without an extra pass. After reset, a clearing sweep of 9,313 cycles
(`init_busy`) zeroes every gradient buffer and g. Training requests are held
off until it ends.

## Timing summary (defaults, cycles)

| operation | cycles |
|---|---|
| inference request → response | 9,268 |
| training, per step | ≈ 9,260 (+ 2·nsteps+1 for the LGCU) |
| parameter update | 9,315 |
| clearing sweep after reset | 9,313 |

The source reports 638 explorations per second at 200 MHz. One exploration is
one inference, plus a fifth of a bootstrap inference, a training and an
update. At that rate this design needs about 1.2 M cycles per second on the
engines and on the update unit, far below the clock. Its compute bound is
about 107 k explorations/s, set by the single update unit.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NAG` | 8 | agents (the optimal agent count of the source) |
| `NF`, `NT` | 6, 6 | forward engines, training slots (the optimal PE count of the source) |
| `LANES` | 8 | multipliers per engine. The source calls this n and gives no value |
| `GAMMA`, `ENT_C` | 0.99, 0.01 | discount and entropy weight (not given by the source) |
| `RHO`, `LRN`, `EPS` | 0.99, -7e-4, 0.1 | RMSProp constants (not given by the source) |

Network sizes, `MAX_STEPS = 8` and the buffer layout are in `a3c_pkg`.

## Where this design departs from, or adds to, the source

- The source reallocates resources between training and inference with a
  ratio of 2.8. It does not say how that ratio maps onto engines or
  multipliers. Here both kinds of engine have `LANES` multipliers, and the
  ratio is not modelled.
- The host link (Ethernet in the original system) and the environments are
  not built. The top's request/response ports carry the same messages.
- There are no local parameter copies (see *Memory organisation*).
- The value output is a fifth row of the last layer, so actor and critic
  share the trunk.
- The advantage's action is the argmax of pi (see the LGCU section).
- The lane count, handshakes, memory map, pipeline depths, reset behaviour
  and all RL constants are this design's own choices.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends with
`TB_RESULT checks=N failures=M`. The reference values come from a
double-precision model of the network and its A3C gradients
(`tb_a3c_ref_pkg`), not from the RTL.

Notable tests:

- `fpe_tb`: complete forward passes, checking every hidden word, pi, v and the
  9,266-cycle latency.
- `bcu_tb`, `pgcu_tb`: sign-gated transposed products.
- `lgcu_tb`: returns, advantages, and bootstrap versus terminal rollouts.
- `rmsprop_unit_tb`: two slots aggregating at once, FIFO order, RMSProp
  against real arithmetic, and buffer clearing.
- `a3c_accel_tb`: the full-size system at default parameters. It loads the
  parameters, runs 5-step rollouts plus bootstrap inferences for all 8 agents
  concurrently, and checks all 48 responses. It trains agent 0 alone and
  checks **every** updated parameter against the reference gradient plus
  RMSProp. Then it trains agents 1–7 back to back.

`a3c_accel_tb` also counts the system's mechanisms and fails if any never
occurs:

- all 6 engines busy at once;
- all 6 slots busy at once;
- a training request waiting for a slot;
- updates queued in the FIFO;
- inference refused for a pending agent;
- terminal and bootstrapped rollouts.

It runs in about 30 s of simulation after a 1-minute build.

Run any test with plain Verilator, for example:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/a3c_pkg.sv tb/tb_fp_pkg.sv tb/tb_a3c_ref_pkg.sv tb/a3c_accel_tb.sv \
        --top-module a3c_accel_tb -j 8
    ./obj_dir/Va3c_accel_tb

## File map

- `rtl/a3c_pkg.sv`: types, network geometry, memory layout, FP32 functions.
- `rtl/a3c_accel.sv`: top. It holds the request handshakes, the pending bits
  and the slot choice.
- `rtl/memory_unit.sv`, `rtl/csg_buffer.sv`: storage.
- `rtl/fcu.sv`, `rtl/fpe.sv`, `rtl/mult_addtree.sv`, `rtl/relu_unit.sv`,
  `rtl/softmax_unit.sv`: inference.
- `rtl/lgcu.sv`, `rtl/lpe.sv`: loss gradient.
- `rtl/train_ctrl.sv`: slot sequencer.
- `rtl/bcu.sv`, `rtl/bpe.sv`, `rtl/pgcu.sv`, `rtl/gpe.sv`: backward and
  parameter-gradient engines.
- `rtl/rmsprop_unit.sv`, `rtl/agent_fifo.sv`, `rtl/param_update.sv`: gradient
  aggregation and parameter update.
