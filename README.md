# Learning-controlled power management for a mesh network-on-chip

A 64-core chip spends a large share of its power in the on-chip network, and
most of that network is idle most of the time. This design puts two power knobs
on every router: **power gating** to switch an idle router off, and **DVFS**
(dynamic voltage and frequency scaling) to run a lightly used router slower at
a lower voltage. Each router has its own small **reinforcement-learning (RL)
agent** that sets these knobs.

Every 10,000 cycles the agent does the following:

- It looks at what happened around its router: cache misses of the attached
  core, flits received per port, request and response traffic, and time spent
  gated off.
- It turns those counts into a coarse 12-number state.
- It scores the epoch that just ended with a reward. The reward is the power
  saved minus the cost of wake-ups. It becomes −1 when the core's read misses
  took too long.
- It picks one of three voltage/frequency levels for the next epoch.

The agent does not store a Q-table for every possible state. Instead, a small
neural network (12 inputs, 20 hidden neurons, 3 outputs, 300 weights of 20
bits) estimates the Q-value of each action. That network is trained offline.

The RTL here is the network side of that system: an 8×8 mesh of 4-stage
virtual-channel routers, each with its power-gating controller, DVFS
controller and RL agent. The cores, the caches and the analog voltage
regulators are not included. Their signals are ports of the top module.

## Block map

```
noc_mesh_top                      MESH_X x MESH_Y tiles, XY mesh wiring
└── router_node  (one per tile)
    ├── noc_router                5-port VC router, XY routing, credits
    │   ├── dc_fifo               one per input VC (dual-clock buffer)
    │   └── rr_arbiter            VA / SA round-robin arbiters
    ├── pg_controller             idle detection, header switch, wake-up
    ├── dvfs_controller           V/F level, regulator transition, clock enable
    └── rl_agent                  epoch FSM
        ├── state_counters        12 attribute counters + wake-ups
        ├── state_binning         counts -> 5 bins each
        ├── mshr_latency_monitor  read-miss latency vs threshold
        ├── reward_unit           reward of the epoch (power saved)
        ├── ann_engine            12-20-3 MLP, one MAC
        │   ├── weight_sram       300 x 20-bit weights
        │   └── sigmoid_plan      piecewise-linear sigmoid
        └── q_update_unit         Q-learning update -> training sample
noc_pkg                           flit/link/credit types, fixed-point formats
```

## One clock, many frequencies

All routers are clocked by a single 2 GHz base clock. A router's DVFS level is
a clock enable:

| level | voltage | frequency | enable pattern         |
|-------|---------|-----------|------------------------|
| 0     | 1.0 V   | 2 GHz     | every base cycle       |
| 1     | 0.8 V   | 1.5 GHz   | 3 of every 4 cycles    |
| 2     | 0.6 V   | 1 GHz     | every other cycle      |

`vsel` is the regulator's voltage select. `fsel` is the frequency level
actually in effect.

A regulator transition takes 100 ns, which is `TRANS_CYCLES = 200` base
cycles. The order of steps depends on the direction:

- **Speeding up:** the voltage is raised first. The frequency follows once the
  transition time has passed.
- **Slowing down:** the frequency is lowered at once. The voltage follows.

This way the logic never runs faster than its voltage allows. An action that
arrives during a transition, or that asks for the current level, is ignored.

The routers' enables are independent, so neighbours run at different rates.
Each input VC buffer is therefore a Gray-pointer dual-clock FIFO, and the
router is split into two parts:

- **Base clock, every cycle:** the link registers, the credit counters and the
  FIFO write sides. This way a one-cycle flit or credit pulse on a link is
  never lost.
- **Router's own enable:** route computation, allocation and buffer reads.

The router's enable is the DVFS enable AND'ed with "powered on".

### Why the buffers are deeper than the credits

The published sizing is 1 flit per control VC and 3 flits per data VC, and the
credit counters use exactly those numbers. However, the writer of a dual-clock
FIFO learns about a read two cycles late, through the synchronizer. A credit
can come back before the writer's view of "full" has cleared. So the physical
FIFOs have 4 and 8 entries. The extra slots are never used as extra
buffering, because the credits still allow only 1 or 3 flits in flight.
Assertions in `dc_fifo` check for overflow and underflow.

## The router

`noc_router` is a wormhole router with five ports: local, +X, −X, +Y and −Y
(see `noc_pkg::port_e`). It has four stages:

1. **Buffer write.** The flit enters its input VC.
2. **RC.** XY route computation on the head flit: X first, then Y.
3. **VA.** A separable round-robin allocator assigns a free downstream VC of
   the same virtual network. It makes one grant per output port per cycle.
4. **SA.** The switch allocator picks one ready VC per input port, then one
   input per output port. The winner crosses the crossbar into the output
   register.

An output VC is released when the tail flit leaves.

There are two virtual networks with two VCs each:

- VN0 carries requests, which are 1-flit control packets.
- VN1 carries responses, which are 5-flit data packets: a head and four
  16-byte data flits (a 64-byte block).

Flit format (`noc_pkg::flit_t`):

| field   | bits | meaning                            |
|---------|------|------------------------------------|
| ftype   | 2    | head / body / tail / head-tail     |
| vc      | 2    | VC on the link (bit 1 = VN)        |
| dst_x   | 3    | destination column                 |
| dst_y   | 3    | destination row                    |
| payload | 128  | data                               |

The unloaded latency through one router is 6 base cycles from link in to link
out at level 0. That is buffer write, 2 synchronizer cycles, RC, VA and SA.

## Power gating and the wake-up handshake

`pg_controller` watches the router's `idle` signal. The router is idle when:

- all its buffers are empty;
- no VC is allocated;
- all credits are home;
- no flit or credit is on any link.

After `IDLE_DETECT = 4` consecutive idle cycles, the controller opens the
header switch (`sleep`=1) and drops `power_on`. Waking takes
`WAKEUP_CYCLES = 8`.

Two things wake a gated router:

- A neighbour, or the local network interface, that holds a packet for this
  router. It sees `power_on` low, holds the packet and raises its
  `wake_out` towards the router.
- A flit that was already on the link when the router gated. It is still
  written into the buffer, whose write side is always clocked, and it also
  wakes the router.

This handshake is this design's own. The published design says only that an
incoming flit wakes the router.

## The RL agent, epoch by epoch

`rl_agent` runs on the base clock and is never gated. At the end of each
10,000-cycle epoch it goes through these steps:

1. **Snapshot.** `state_counters` latches and clears the twelve attribute
   counts (16-bit, saturating):

   | index | attribute                          |
   |-------|------------------------------------|
   | 0–2   | L1D, L1I and L2 misses             |
   | 3–7   | flits received on +X, −X, +Y, −Y, local |
   | 8     | router throughput (all flits received) |
   | 9, 10 | response flits, request flits      |
   | 11    | cycles powered off (PG efficiency) |

   The wake-up count is latched with them. `mshr_latency_monitor`, which
   time-stamps each read-miss MSHR entry from issue to completion, reports
   whether the average latency exceeded `LAT_THRESH`. It compares
   `sum > LAT_THRESH × count`, so no divider is needed.
2. **Bin.** `state_binning` computes `bin = min(4, floor(5·count/FS))` for
   each attribute, where FS is the full scale:
   - the epoch length for flit counts and powered-off cycles;
   - `MISS_FS = 1000` for cache misses.

   A PG efficiency of 0.5 thus lands in bin 2.
3. **Reward.** `reward_unit` works in Q.12, normalised to the router's power
   at 1 V. With `off` the gated fraction of the epoch and `util` the flits
   per cycle:
   - static saving = `off + (1−off)(1−V)`
   - dynamic saving = `util·(1−V²)`
   - PG overhead = `wakeups·WAKE_COST`

   The reward is the two savings minus the overhead. It is replaced by −1.0
   when the latency threshold was exceeded.
4. **ANN.** `ann_engine` feeds `bin/4` (0..1) into the 12-20-3 network:
   - There are no biases, so the weights are exactly 12·20 + 20·3 = 300.
   - The hidden layer uses a piecewise-linear (PLAN) sigmoid. The outputs go
     through ReLU.
   - One multiply-accumulate unit steps through `weight_sram` in address
     order, so a pass takes 301 enabled cycles.
   - The engine runs at half the base clock (`ANN_DIV = 2`), which gives
     about 300 ns per pass.
5. **Decide.** The agent takes the largest Q-value. With probability
   ε = 102/1024 ≈ 0.1 it takes a random action instead, using a 16-bit LFSR
   seeded from the tile position. The action goes to the DVFS controller
   about 610 base cycles after the epoch boundary. That delay is small
   compared with the epoch.
6. **Learn.** `q_update_unit` applies
   `Q(s,a) + α(r + γ·max Q(s',·) − Q(s,a))` with α = 410/4096 and
   γ = 3891/4096 to the previous state-action pair. It puts the result on
   `sample` (state, action, target, reward) as a training example for the
   offline network. The network's weights are not changed on chip. They are
   loaded through the configuration port (`cfg_*` at the top).

Fixed-point formats (`noc_pkg`):

| value                  | format                                   |
|------------------------|------------------------------------------|
| activations            | unsigned 13-bit Q.12                     |
| weights                | signed 20-bit with 12 fraction bits      |
| Q-values and reward    | signed 32-bit Q.12                       |

## Top-level interface

`noc_mesh_top` (defaults: 8×8 mesh, 10K-cycle epochs, 100 ns transitions).
Node `n = y·MESH_X + x`.

| port                                   | dir | per node  | use                                          |
|----------------------------------------|-----|-----------|----------------------------------------------|
| `inj_link` / `inj_credit`              | in/out | link_t / credit_t | network interface → router       |
| `ej_link` / `ej_credit`                | out/in | link_t / credit_t | router → network interface       |
| `inj_wake`, `node_on`                  | in/out | 1        | interface wake request; router powered       |
| `l1d_miss`, `l1i_miss`, `l2_miss`      | in  | 1         | cache-miss pulses of the core                |
| `mshr_issue_*`, `mshr_done_*`          | in  | 1 + id    | read-miss MSHR allocate / complete           |
| `cfg_we/cfg_bcast/cfg_node/cfg_addr/cfg_data` | in | shared | ANN weight writes, to one node or all    |
| `vsel`, `fsel`, `sleep`, `clk_en`      | out | 2/2/1/1   | regulator select, level, header switch, enable |
| `action*`, `explored`, `penalized`, `dvfs_switch`, `wakeup` | out | 1–2 | agent and controller events |
| `sample`                               | out | sample_t  | Q-update training sample                     |

The interface obeys credit flow control like a router port. It must not send
while `node_on` is low. To send, it raises `inj_wake` and waits.

## Where this departs from the published design

- **Frequency is a clock enable** on one base clock, not a separate clock per
  router. The dual-clock FIFOs are still in place.
- **Wake-up latency** (8 cycles), the **MSHR latency threshold** (300 cycles),
  the **miss full scale** (1000 per epoch), the **wake-up cost** and the
  **power model inside the reward** are this design's numbers. The published
  design names the reward terms but gives no formula for them.
- **State attributes 3–7** (numbered 4–8 in the published design) count flits received per port. One figure of the
  published design calls them "buffer utilization", but the text counts
  received flits, and the text was followed.
- **Q-learning with the ANN:** the published design both trains the network
  offline and describes online Q updates to a table. Here the network only
  infers, and the online updates are exported as samples.
- The network has **no bias terms**, so the weight count matches the
  published 300.
- One ANN pass is **301 ns**, against the published 299 ns.
- **Not built:** the cores, the caches and the coherence protocol, and the
  analog regulator and header switch. No Q-table is built, since it is only
  the alternative that the ANN replaces.

## Simulating

Each block has a self-checking testbench in `tb/`. It prints
`TB_RESULT checks=N failures=M` and has a watchdog. For example, with plain
Verilator 5:

```
verilator --binary --timing --assert -Irtl \
    rtl/noc_pkg.sv rtl/*.sv tb/tb_noc_router.sv --top-module tb_noc_router
./obj_dir/Vtb_noc_router
```

`noc_pkg.sv` must come first on the command line. Replace `tb_noc_router` with
any testbench name.

| testbench                 | what it checks                                                        |
|---------------------------|-----------------------------------------------------------------------|
| `tb_dc_fifo`              | random traffic across unrelated enables, full/empty, ordering         |
| `tb_noc_router`           | XY routes to all ports, VC/VN rules, credits, 6-cycle latency, clock-enabled operation |
| `tb_pg_controller`        | gating after exactly 4 idle cycles, 8-cycle wake-up, wake during idle count |
| `tb_dvfs_controller`      | V/F ordering both ways, 200-cycle transition, enable patterns, ignored actions |
| `tb_state_counters`       | every attribute, VN split, saturation, snapshot/clear                 |
| `tb_state_binning`        | bin edges against a reference model                                   |
| `tb_mshr_latency_monitor` | latencies, average vs threshold                                       |
| `tb_reward_unit`          | reward against a real-number model, penalty                           |
| `tb_q_update_unit`        | Eq 2 against a reference over random inputs                           |
| `tb_weight_sram`          | write/read, read-enable hold                                          |
| `tb_ann_engine`           | Q-values against a bit-exact model, 301-cycle latency, half-rate mode |
| `tb_rl_agent`             | epoch timing, state, greedy choice, ε exploration, penalty, samples   |
| `tb_router_node`          | traffic through a tile while it gates, wakes and changes level        |
| `tb_noc_mesh_top`         | end-to-end mesh traffic with every mechanism counted                  |

The end-to-end test runs a 3×3 mesh with 1500-cycle epochs and 50-cycle
transitions for five epochs of alternating light and heavy traffic. It checks
that every packet arrives intact and in order. It also requires each of these
mechanisms to occur at least once:

- power-off and wake-up;
- credit stalls;
- hold-offs in front of gated routers;
- agent decisions, V/F switches, explorations and latency penalties;
- training samples.

The 8×8 mesh at its default parameters is the largest configuration that was
compiled. It was not simulated, because building the 64-router C++ model takes
longer than one simulation budget. The largest simulated configuration is the
3×3 mesh above.

To change the size, override `MESH_X`/`MESH_Y` on `noc_mesh_top`. To change
the network's hidden layer, set `ANN_HID` in `noc_pkg`; `ann_engine` takes its
sizes as parameters.
