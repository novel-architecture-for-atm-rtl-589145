# Sorter-based QoS scheduler for a shared-buffer ATM switch

An ATM switch keeps, for every output port, one cell queue per delay class
(QoS). Each time a port may send a cell, the switch must pick the queue that
sends it. A fixed priority order is simple but starves the low classes when
high-priority traffic keeps arriving. This RTL uses ageing by subtraction
instead, and one scheduler serves every port of the switch:

* every queue has a **priority value** and a **cost**;
* the port sends from its non-empty queue with the highest priority;
* that queue's priority then drops by its cost.

A small cost means the priority falls slowly and the queue is served often.
Every cost is above zero, so every waiting queue reaches the top in the end
and nothing starves. When all queues of a port stay busy, queue *m* receives
the share

    share_m = (1/D_m) / sum_x (1/D_x)          (D = cost)

of the port's output slots. Between two of its services, at most
`sum_{x != m} (2^P - 1)/D_x` cells go to other queues, where P is the width of
the priority value.

In hardware, the queues of every port are kept **already sorted** by
priority in one memory, the *priority pool*. A request therefore only has to
take the top record, age it, and put it back at its new rank. A one-pass
insertion sorter does this in a single cycle. The result is one output
decision per clock for the whole switch, whatever the number of ports.

The design follows the architecture in *"Novel architecture for ATM QoS
management"* (J.-M. Tsai, C.-Y. Lee): the multiplexer-based sorter version,
with the cascading options of its later sections. Where this RTL departs
from that architecture or fills in details, the section *Departures and
choices* says so.

## Scheduling rules

For one output request on port *p*:

1. Read the records of *p*'s queues from the pool. They are in rank order.
2. The top record is the **output candidate**. If its empty flag is 0, every
   queue of the port is empty and nothing happens.
3. Otherwise one cell of that queue is sent, and the queue's cell count goes
   down by one.
   * If that was the queue's last cell, the priority stays as it is (it
     **bypasses the subtractor**) and the empty flag is cleared.
   * Otherwise the new priority is `priority - cost`.
4. The aged record goes back into the sorted list at the rank it now earns.
   If its key equals that of other records, it goes **above** them.
5. **Renormalisation.** If the new priority is smaller than the cost, the
   next subtraction would underflow. The MSB of every non-empty queue's
   priority is then set to 1.
6. The port's records are written back to the pool.

A cell arriving at an empty queue gives that queue the top record's priority
and moves it to the top rank. So the first cell of an idle queue is served
next. This is the cheap one of the two options for refilling a queue. It
favours queues that are usually empty. A cell arriving at a busy queue only
increments the queue's count.

**Why renormalising keeps the order.** Costs are below `2^(P-2)`. Suppose
the candidate's new priority `old - cost` is below `cost`. Then `old` is
below `2*cost`, which is below `2^(P-1)`. Every other non-empty queue ranks
below the candidate, so its priority is below `2^(P-1)` as well. All MSBs are
therefore 0, and setting them adds the same `2^(P-1)` to every non-empty
queue. Only non-empty records are raised. An empty record may keep a stale
priority whose MSB is already set, and raising only some of the empty
records could put them out of order.

### Worked example (one port, P = 6, 4-bit costs)

There are four queues, all starting at priority 16: ds (cost 5, 8 cells),
dns (cost 10, 9 cells), mc (cost 2, 5 cells) and OAM (cost 1, 4 cells).
Entries are `queue:priority:cells`, with rank 1 the next to send. Priorities
are shown without the normalise bit.

| request | rank 1 (sent) | rank 2 | rank 3 | rank 4 |
|---|---|---|---|---|
| T0 | OAM:16:4 | mc:16:5 | ds:16:8 | dns:16:9 |
| T1 | mc:16:5 | ds:16:8 | dns:16:9 | OAM:15:3 |
| T2 | ds:16:8 | dns:16:9 | OAM:15:3 | mc:14:4 |
| T3 | dns:16:9 | OAM:15:3 | mc:14:4 | ds:11:7 |
| T4 | OAM:15:3 | mc:14:4 | ds:11:7 | dns:6:8 |
| T5 | OAM:14:2 | mc:14:4 | ds:11:7 | dns:6:8 |
| T6 | mc:14:4 | OAM:13:1 | ds:11:7 | dns:6:8 |
| T7 | OAM:13:1 | mc:12:3 | ds:11:7 | dns:6:8 |
| T8 | mc:12:3 | ds:11:7 | dns:6:8 | OAM:13:0 |
| T9 | ds:11:7 | mc:10:2 | dns:6:8 | OAM:13:0 |

* T3 to T4: dns drops to 6, below its cost of 10. This renormalises the port:
  every stored priority gains 32, which the table does not show.
* T4 to T5: OAM falls to 14 and ties with mc. It goes above mc.
* T7 to T8: OAM sends its last cell. Its priority stays at 13, its empty flag
  is cleared, and it drops below every busy queue.

`tb_qos_manager` and `tb_qos_module` replay this table row by row.

## Record and sort key

The pool holds one entry per port: NQ records in rank order, with index
`NQ-1` as the top rank. Each record is a packed struct
(`rtl/qos_rec.svh`), MSB first:

| field | bits | meaning |
|---|---|---|
| `eflag` | 1 | 1 = queue holds cells, 0 = empty |
| `prio` | PW | priority value; its MSB is the normalise bit |
| `cost` | CW | amount subtracted per service |
| `qid` | log2(NQ) | which queue of the port |
| `cnt` | NW | cells waiting |

The sorter compares `{eflag, prio}`, the top `1+PW` bits. Because the empty
flag is the most significant bit of the key, every busy queue outranks
every empty one.

## Datapath and timing

```
 op, port ──► pool read ──► [A] entry ─┬─► output stage ──► cell_port/cell_qid
                                       │       │ last (empty check)
                                       │       ▼
                                       ├─► subtractor ──► new record (global bus)
                                       │                        │
                                       └─► sorter (one pass) ◄──┘
                                               │
                                        normalise circuit
                                               │
                                     [D] pool write / upd_*
```

There are two pipeline stages, and one operation is accepted every clock:

* **Stage 0.** The operation's port addresses the pool. The port's entry is
  captured in the pool's read register (A).
* **Stage 1.** The whole request is processed in one cycle: output stage,
  subtractor, sorter, normalise circuit, and the write back to the pool (D).
  If the previous operation wrote the same port, a forwarding register
  supplies the new entry in place of the stale read.

An operation sampled at clock edge *k* shows its results (`cell_*`, `upd_*`,
`norm_event`) after edge *k+1*. The latency is two cycles and the rate is
one request per cycle. At a 50 MHz clock this would be 50 M decisions/s, or
21.2 Gbit/s of 53-byte cells. Whether a given process meets that clock is
not established here.

## The one-pass sorter (`mux_odi_sorter`, `mux_sorter_pe`)

This is the part that takes most thought. The sorter has no registers. Its
NQ processing elements (PEs) each receive their record straight from the
pool, and a global bus carries the new record. Ranks rise from left to
right, so the rightmost PE holds the top rank.

Every PE compares its own key with the new key:
`gt = own_key > new_key`. One slot is being removed, and it reports
`gt = 1`. A control circuit in each PE looks at its own `gt` and its two
neighbours' `gt`, then routes one of four records to its output:

| PE position | condition | output |
|---|---|---|
| any | sort disabled | own record |
| left of removed slot | `!gt` | own |
| | `gt && !gt_left` | new record |
| | `gt && gt_left` | left neighbour's record (shift up) |
| removed slot | `gt_left` | left neighbour's record |
| | `!gt_left && gt_right` | new record |
| | otherwise | right neighbour's record (shift down) |
| right of removed slot | `gt` | own |
| | `!gt && gt_right` | new record |
| | `!gt && !gt_right` | right neighbour's record |

At the chain ends, the left boundary reads `gt = 0` and the right boundary
reads `gt = 1`. The right boundary's 1 stands for a maximum value fed in
above the top PE.

* **Output request.** The removed slot is the top one. Records above the new
  record's rank shift up by one, and the new record fills the gap.
* **Cell arrival at an empty queue.** The removed slot is that queue's slot,
  and the new record (with the top priority copied in) lands at the top.
  Records above the removed slot shift down.

The list stays sorted because the `gt` pattern is monotonic on each side of
the removed slot. Because `gt` is strict, a new record goes above records
with an equal key.

**Cascading the sorter.** The leftmost and rightmost PEs' `gt` and pool
records are brought out as ports (`gt_left_o`, `d_right_o`, and so on).
Several slices chained this way behave like one long sorter.
`tb_mux_odi_sorter` checks a lone 8-slot sorter and two chained 4-slot
slices against the same reference.

## Cascadable modules (`qos_module`, `port_decoder`)

`qos_manager` is built from `qos_module`s. Each module holds:

* a pool,
* a subtractor,
* a sorter slice,
* a normalise circuit.

A module in **master** mode drives the output-stage bus (its top record) and
the new-priority bus (its subtractor's result). A **slave** module's drivers
output zero, so the manager can OR the buses together. Two parameters
arrange the modules:

* `KQ` gives more QoSs per port. Each port's NQ ranks are split over KQ
  modules whose sorter slices are chained. The rightmost module holds the
  top ranks and is the master.
* `KP` gives more ports. The ports are split into KP rows of modules, each
  row holding a contiguous block of ports. `port_decoder` selects the row
  that owns the requested port, and that row's rightmost module becomes the
  master. Modules in other rows neither read nor write.

The output stage, the operation register and the bus control are shared.
With `KQ = KP = 1`, the default, a single master module serves every port.

## Interface (`qos_manager`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `op_valid`, `op` | in | operation (`qos_pkg::qos_op_e`): `OP_SERVE`, `OP_ARRIVE`, `OP_LOAD`, `OP_NONE` |
| `op_port` | in | port addressed |
| `op_qid` | in | queue receiving a cell (`OP_ARRIVE`) |
| `load_data` | in | whole entry for `OP_LOAD`, NQ records in rank order (must be sorted by `{eflag, prio}`) |
| `cell_valid`, `cell_port`, `cell_qid` | out | a cell leaves: which port and queue |
| `upd_valid`, `upd_port`, `upd_data` | out | the entry just written back |
| `norm_event` | out | that write renormalised the port |
| `underflow_event` | out | a priority was below its cost (should never happen) |

The pool is a memory and is not reset, so load every port with `OP_LOAD`
before using it. An `OP_ARRIVE` must name a queue that exists; an assertion
checks this.

Parameters and their defaults:

* `NPORTS = 16`: assumed.
* `NQ = 4`, `PW = 6`, `CW = 4`: the sizes of the worked example.
* `NW = 8`: cell-count bits, assumed.
* `KQ = 1`, `KP = 1`.

`CW` must not exceed `PW-2`; an elaboration-time assertion checks this.

## Files

| file | block |
|---|---|
| `rtl/qos_pkg.sv` | operation codes |
| `rtl/qos_rec.svh` | record struct macro |
| `rtl/qos_manager.sv` | top: operation pipeline, output stage, module array, bus control |
| `rtl/qos_module.sv` | cascadable module |
| `rtl/priority_pool.sv` | per-port record memory |
| `rtl/priority_processor.sv` | subtractor, empty-check bypass, renormalisation request |
| `rtl/mux_odi_sorter.sv`, `rtl/mux_sorter_pe.sv` | one-pass sorter and its PE |
| `rtl/normalise_circuit.sv` | MSB-setting network |
| `rtl/output_stage.sv` | cell output register and empty check |
| `rtl/port_decoder.sv` | module-row select |

## Departures and choices

* **Fourth PE source.** The published PE routes three sources: its own
  record, the new record, and the left neighbour's. A fourth source, the
  right neighbour's record, is added here. It is needed to delete a slot
  below the new record's rank, which happens when a cell wakes an empty
  queue.
* **No tristates.** Internal buses are multiplexers or zero-gated ORs.
* **Normalisation.** Only non-empty records get the MSB; the reason is given
  under *Scheduling rules*. A wake-up that copies a top priority below the
  waking queue's cost also renormalises the port, so that queue's first
  service cannot underflow.
* **Occupancy.** It is tracked by a per-queue cell counter. The switch's
  cell memory and pointer lists are not part of this RTL: the outputs say
  which port and queue send, and the buffer manager turns that into a cell
  pointer. The count saturates at `2^NW - 1`.
* **Underflow.** If a priority is ever below its cost on entry, the result
  is clamped to 0 and `underflow_event` is raised. This cannot happen while
  the renormalisation rule holds.
* **Pool.** It has a separate read port and write port, plus forwarding.
  This lets a request start while the previous one is written back. A
  single-port SRAM, or a FIFO when ports are served in turn, would need a
  slower request rate.
* **Word lengths.** The rule followed is cost < `2^(PW-2)`, i.e.
  `CW <= PW-2`. This matches the worked example (6-bit priority, 4-bit
  cost). A stricter `CW < PW-2` would exclude that example.
* **Not included:**
  * the earlier shift-register version of the sorter, which needs a load
    cycle before each sort and so runs at half the rate;
  * other cost functions;
  * the per-cell (rather than per-queue) priority variant.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends the
simulation itself. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/qos_pkg.sv tb/tb_qos_manager.sv --top-module tb_qos_manager
./obj_dir/Vtb_qos_manager
```

| testbench | what it shows |
|---|---|
| `tb_qos_manager` | default size: the worked example row by row; two-cycle latency and one cell per cycle; 20 000 random operations against a reference model, with every mechanism counted (send, empty port, last-cell bypass, renormalisation, wake-up, busy arrival, equal keys, forwarding, load) |
| `tb_qos_bandwidth` | default size, all queues kept busy for 9000 requests: each queue's share matches `(1/D_m)/sum(1/D_x)` to within 1%, and every wait stays under the `sum (2^P-1)/D_x` bound |
| `tb_qos_cascade` | 2 x 2 modules (8 QoSs split over two chained modules, 16 ports over two rows), random operations against the model |
| `tb_qos_manager_nq64` | 64 QoSs per port (10-bit priority, 8-bit cost), random operations |
| `tb_qos_module` | one module driven directly through the worked example; slave-mode gating; arrival lookup |
| `tb_mux_odi_sorter`, `tb_mux_sorter_pe` | sorter against a list-insertion reference, lone and chained; PE routing table |
| `tb_priority_processor`, `tb_normalise_circuit`, `tb_output_stage`, `tb_priority_pool`, `tb_port_decoder` | unit checks |

`tb/qos_random_env.sv` is the parameterised random test and reference model
behind the three random testbenches. To try another size, instantiate it
with different parameters.
