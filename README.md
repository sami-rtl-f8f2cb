# SAMi congestion control platform: self-aware task migration for a mesh many-core chip

On a many-core chip whose cores talk over a 2D-mesh network-on-chip, a few cores or a whole
region can become traffic hot spots. Packet latency and network power then grow quickly.
This design watches congestion on every router and predicts how much each communicating
task pair will send next. From those two it derives adaptive thresholds. When a core or a
region stays above its threshold, it moves tasks away from the hot spot: it picks the
heaviest task and the least congested destination. The decision is a feedback loop: a
measurement, a set point, a PID controller and an actuator. Here the actuator is task
migration.

The RTL covers the control platform: the per-router meters, the regional manager nodes and
the central controller. It does not cover the data network, the processor cores or the
software that copies a migrated task's state. Those appear as ports.

## The control loop

```
 router links ──► congestion_meter (x144) ──► manager_node (x9) ──┬─► core_congestion_meter ──► CC vector ─┐
                                                                   │        │avg     │max (CC measurement) │
                                                                   └─► region_congestion_meter ─► RC vector ┤
                                                                            │avg     │max (RC measurement) │
 task-pair packets ──► traffic_predictor ──► threshold_calculator ──► th_c, th_r   │                     │
 delivered packets ─► sample_period ─┘              │                   │          │                     │
                                                    └──► error = measurement − threshold ──► pid_controller (x2)
                                                                                          │ PID-out > 0     │
                                                          task_mapping_table ◄──► task_migration_manager ◄┘
                                                                                          │
                                                                                          ▼ migration orders
```

The default configuration is a 12 × 12 mesh (144 cores) cut into 9 regions of 4 × 4 cores.
Every region has a Manager Node (MN). A central manager holds everything from the two meters
onwards. The 10 × 10 and 8 × 8 meshes with 4 regions each are parameter settings of the same
RTL.

### Units

Every congestion number in the design is a packet rate in fixed point, where 256 means one
packet per cycle on one link. These numbers include core levels, region levels, thresholds
and task weights.

- A router's level is the sum over its five input links, so it is at most 1280.
- A region's level is the sum of its cores' levels.
- A task's weight uses the same unit. It is the congestion the task is expected to take
  with it when it moves.

Because all of these share one scale, the migration test can add a weight to a core level
and compare the result with a threshold directly.

## Measuring congestion

`congestion_meter` keeps one leaky accumulator per link:
`acc ← acc − acc/16 + (packet ? 256 : 0)`. The output is `acc/16`. This is an exponential
moving average of the packet flow over about 16 cycles, and it settles at exactly 256 for a
link that is busy every cycle.

`manager_node` registers the levels of its region's routers. It forwards them to the Core
Congestion Meter (CCM) and sends their sum to the Region Congestion Meter (RCM). In a real
chip these transfers travel over a small dedicated network between the MNs and the central
manager. Here that network is one register stage.

The CCM and RCM each produce three outputs, registered every cycle:

- the average, which the threshold calculator uses;
- the maximum, which is the *measurement* the controllers compare with the threshold;
- the whole vector, which the migration manager uses.

## Predicting traffic and setting thresholds

`sample_period` counts packets delivered to cores, which are the pulses on each router's
local link. It marks the end of a period every `PERIOD_PKTS` = 15000 packets. Periods are
measured in packets, not cycles.

`traffic_predictor` tracks 64 task pairs ("flows"). It counts each flow's packets in the
current period. At the end of a period it forms two predictions for the next one:

- **Short-term:** last period's count.
- **Long-term:** a small table per flow, indexed by the flow's recent history. The history is
  the last two periods' traffic, each quantised to 2 bits as `count >> 7`, saturated at 3.
  Each table entry remembers how much the flow sent the last time that history occurred. At
  the end of a period, the entry for the old history is overwritten with the count just
  closed. The entry for the new history becomes the long-term prediction.

A per-flow selector bit picks one of the two predictions. It chooses long-term when the
long-term prediction was strictly closer to the traffic just observed. A flow that
alternates between two rates is predicted exactly after a few periods.

`threshold_calculator` turns the averages and the prediction into thresholds:

```
g    = predicted total / last period's total      (Q8, limited to 4.0; 1.0 if nothing was sent)
p    = average × g                                (expected average next period)
th   = max(lower bound, p + p/4)
```

The bounds are 128 for `th_c` and 2048 for `th_r`. They keep light traffic from causing
migrations.

## From threshold to trigger: the PID controllers

There are two `pid_controller` instances, one for cores and one for regions. Each forms the
error `e = measurement − threshold`, so the error is positive when congested. Once per period
it evaluates `Kp·e + Ki·Σe + Kd·(e − e_prev)`. The gains are 1.0, 0.25 and 0.5, in Q4. The
integral is clamped to ±65535.

An output above zero marks "core congested" or "region congested". The proportional term
turns the trigger on as soon as the measurement exceeds the threshold. The integral term
keeps it on while a hot spot persists, and can hold it on for a period or two after the
measurement falls back below the threshold.

## The migration algorithm (`task_migration_manager`)

This is the part that needs the closest reading. One *pass* runs after every controller
update, on a snapshot of the CC and RC vectors.

**Core phase** (runs if the core PID output is above zero):

1. `cs` is the most congested core. `cd` is the least congested other core.
2. Repeat while `cs` still has unexamined tasks **and** `C(cs) > th_c`:
   - Take the heaviest unexamined task on `cs`, with weight `w`.
   - If `w + C(cd) ≤ th_c`, migrate it to `cd`. Otherwise reject it.

**Region phase** (runs if the region PID output is above zero):

1. `rs` is the most congested region. `cd` is the least congested core *outside* `rs`.
2. Repeat while `rs` has unexamined cores **and** `R(rs) > th_r`:
   - `cs` is the most congested unexamined core of `rs`.
   - For the tasks of `cs`, heaviest first, while `R(rs) > th_r`: migrate to `cd` if both
     `w + C(cd) ≤ th_c` and `w + R(region of cd) ≤ th_r`. Otherwise reject the task.

The congestion a task removes from its source is estimated as its weight. After each
migration the snapshot is updated: `w` moves from the source core to `cd` and from the source
region to the destination region. Later decisions in the same pass therefore see the effect.
In practice the fixed destination `cd` often fills up after one or two tasks, and the
remaining candidates are rejected. A pass therefore tends to move a few tasks, and the next
period's pass continues the work.

When several cores share the minimum congestion, the destination is chosen among them at
random. A 16-bit LFSR supplies a starting index, and the tied core nearest after it wins.

On the hardware side, the source and destination selections are combinational arg-max and
arg-min over the snapshot. Finding the heaviest task is a scan of `task_mapping_table`, one
entry per cycle (256 cycles). Each accepted migration:

- pulses `mig_valid` with `mig_cmd = {task, source core, destination core}`;
- raises `mig_region` if the region phase issued it;
- rewrites the task's core in the table in the same cycle.

Remapping a task is only this table change. The message-passing layer then moves the task's
state, but not its code.

A pass lasts roughly 256 cycles per examined task plus a few cycles per phase. It can
therefore span more than one sample period. While a pass is running, further start requests
are ignored.

## Timing of one sample period

| cycle after `period_end` | event |
|---|---|
| +1 | per-flow predictions and selectors updated |
| +2 | `pred_total`, `act_total` valid |
| +4 | `th_c`, `th_r` updated |
| +5 | both PID outputs updated (`pid_valid`); migration pass starts |
| +6 … | `tmm_busy` high; `mig_valid` pulses; `tmm_done` at the end |

## Top-level interface (`sami_top`)

| port | dir | meaning |
|---|---|---|
| `link_pkt[144][5]` | in | one pulse per packet on each router input link; bit 4 is the local link |
| `flow_pkt[64]` | in | one pulse per packet of each tracked task pair |
| `map_we, map_idx, map_valid, map_core, map_weight` | in | the mapping unit places or removes tasks |
| `mig_valid, mig_cmd, mig_region` | out | migration orders |
| `period_end, th_c, th_r` | out | sample period and current thresholds |
| `pid_c_out, pid_r_out, pid_valid` | out | controller outputs |
| `tmm_busy, tmm_done, max_core, max_reg` | out | pass status, hottest core and region |
| `flow_pred, pred_sel` | out | per-flow predictions and selector bits |

The top's parameters are `MESH_X, MESH_Y, REG_X, REG_Y` (the mesh must divide evenly into
regions), `N_LINKS`, `NUM_FLOWS`, `MAX_TASKS`, `PERIOD_PKTS`, `TH_C_MIN` and `TH_R_MIN`. The
widths and types shared between blocks are in `rtl/sami_pkg.sv`.

## What is given and what is chosen

These points follow the method as published:

- the four-part structure: prediction, triggers, cost rule, controller;
- the two predictors and their table, indexed by history and holding the last traffic seen;
- core and region triggers with adaptive thresholds and lower bounds;
- the PID law;
- the migration algorithm, including heaviest-task-first, the minimum-congestion
  destination, the outside-the-region rule for region triggers and the random tie-break;
- one manager node per region;
- the 12 × 12, 10 × 10 and 8 × 8 configurations;
- a sample period measured in packets, with 15000 the best length for core triggers.

These are this design's own choices, and worth checking before reuse:

- the EMA window and the fixed-point scale;
- the maximum core or region level as the controller measurement;
- the selector rule and the history format (two 2-bit levels, 64 tracked flows);
- the threshold formula (`p + p/4`, growth ratio limited to 4) and the lower-bound values;
- the PID gains, the error sign and the integral clamp;
- "PID output > 0" as the trigger;
- the task weight standing in for the congestion a task carries;
- the table format and size, and the one-entry-per-cycle scan;
- the sequencing between blocks shown in the timing table;
- regions as equal rectangles.

The published loop conditions can be read literally as "while a task remains *or* the
source is already below threshold". They are implemented as "while a task remains *and* the
source is still above threshold", the only reading under which the loop stops once the hot
spot is relieved. The published trigger wording says migration starts when congestion
"reaches" the threshold. The comparisons follow the algorithm's strict `>`.

The message-passing layer that moves task state, the MN interconnect and the initial mapping
unit are not part of this RTL. Migration cost (from about 45 thousand cycles for a 1 KB task to nearly a
million for 32 KB) is therefore not modelled. The ports are where those parts attach.

## Simulating

Every testbench is self-checking, prints `TB_RESULT checks=N failures=M` and has a watchdog.
With Verilator 5:

```
verilator --binary --timing --assert rtl/sami_pkg.sv -y rtl -y tb tb/tb_sami_top.sv \
          --top-module tb_sami_top -Mdir obj && obj/Vtb_sami_top
```

| testbench | what it covers |
|---|---|
| `tb_congestion_meter` | reference EMA every cycle; settling at 256 per busy link, decay to 0 |
| `tb_manager_node` | forwarding and region sum |
| `tb_core_congestion_meter`, `tb_region_congestion_meter` | average, maximum, tie-breaking, vectors |
| `tb_sample_period` | period pulses against a running packet total |
| `tb_traffic_predictor` | reference model; a repeating pattern predicted exactly by the long-term table |
| `tb_threshold_calculator` | formula, bounds, growth limit, saturation, two-cycle latency |
| `tb_pid_controller` | PID law with clamp; integral build-up and release |
| `tb_task_mapping_table` | both write ports and their priority |
| `tb_task_migration_manager` | independent model of the algorithm, order by order, on 40 random cases; random destination choice among ties |
| `tb_sami_top` | full default size, 40 sample periods in closed loop (about 15 s) |
| `tb_sami_setups` | the 10 × 10 and 8 × 8 four-region configurations in closed loop |

The two closed-loop testbenches model the cores as traffic sources. Each core's links carry
packets at a rate set by the weights of the tasks mapped on it. A migration order moves that
load. The testbenches check that:

- every order is consistent with the table;
- region orders leave their region;
- the overloaded core ends at less than half its starting level;
- both kinds of migration occur.

`tb_sami_top` also requires every other mechanism to occur at least once: period end,
long-term prediction chosen, threshold at its bound and above it, both PID triggers, and a
rejected candidate. The migration manager carries assertions on its order interface: an
order never names the same source and destination, orders and table writes happen only
inside a pass, and `done` is a single-cycle pulse. Run with `--assert` to check them.

## Limits

- Area: the migration manager keeps a full snapshot of the CC vector (144 × 12 bits) and
  compares all cores combinationally. The 256 × 21-bit task table is built from flip-flops.
- Timing closure at any particular frequency has not been studied.
- The testbenches show the platform relieving an overloaded core in a synthetic closed loop.
  Latency, throughput and power gains at application level are outside what this RTL can
  show.
