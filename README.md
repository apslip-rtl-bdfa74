# apSLIP: a VOQ mesh router with an adaptively pipelined iSLIP switch allocator

On-chip routers face a trade-off in switch allocation. Strong allocators such
as iSLIP find good input-to-output matchings, but each round has internal
dependencies. That makes them hard to pipeline, so they force a slow clock.
Simple allocators pipeline well, but they waste switch bandwidth. This
SystemVerilog design resolves the trade-off in three steps:

1. **Virtual output queues (VOQs).** Each input port keeps one queue per
   output port. This removes head-of-line blocking and makes virtual channels
   unnecessary. It also lets a grant be used by *any* flit of the queue,
   because every flit in a queue goes to the same output.
2. **A fully pipelined iSLIP.** A new allocation round starts every cycle,
   although the previous rounds have not finished. Two read-after-write
   hazards come with that. The VOQs absorb the first. The second is solved by
   keeping two private copies of every priority counter, one for rounds in
   even cycles and one for rounds in odd cycles.
3. **Adaptive effort.** The allocator always holds two iSLIP iterations (six
   stages). At low load the matching is taken after the first iteration, so
   the router latency is 4 cycles. At high load it is taken after the second
   iteration, so the latency is 7 cycles but the matching is better.

The RTL contains the router and an 8x8 mesh built from it. The cores, caches,
directories and memory controllers that would sit on the local ports are not
included.

## The router pipeline

A router has seven ports: East, West, North and South (numbers 0–3), and
three local ports L0–L2 (numbers 4–6). The local ports are for a core with
its L1, an L2 bank and a directory slice. A flit that shows up on an input
link in cycle *c* goes through these stages:

| cycle | stage | what happens |
|---|---|---|
| c | LAR + RQ | flit written into its VOQ; look-ahead routing works out its VOQ at the next router; every VOQ forms its request |
| c+1 | OA | iteration 1: each output grants one requesting input |
| c+2 | IA/CU | iteration 1: each input accepts one grant; the accepted pair's counters move |
| c+3 | RQ | iteration 2: requests between inputs and outputs that are still unmatched (a register stage only) |
| c+4 | OA | iteration 2 output arbitration |
| c+5 | IA | iteration 2 input arbitration |
| c+3 or c+6 | ST | switch traversal: the matched VOQ's head flit crosses the crossbar into the output register |
| c+4 or c+7 | link | the flit is on the output link and the neighbour samples it at the end of the cycle |

With no contention, a flit is on the output link 4 cycles after it arrived
(one iteration) or 7 cycles after (two iterations). Across a mesh, a lone
flit with one-iteration allocation takes `4 * (hops + 1)` cycles from
injection to ejection.

## Virtual output queues and look-ahead credits

With virtual channels, the *sender* picks the downstream buffer. With VOQs,
the buffer depends on the flit's output port at the *receiving* router. That
would normally be known only after the flit arrives. The router therefore
routes one hop ahead (`apslip_lar`, XY dimension-order routing). It stores
that result in the flit's `lar` field. On the link, `lar` tells the
receiving router which VOQ to write the flit into.

Each output port has one credit counter per VOQ of the neighbour's input port
(`apslip_credit_tracker`). A flit is sent only while the counter for its
downstream VOQ is non-zero. Each departing flit returns one credit upstream
on `credit_out_*`, tagged with the VOQ it left.

Each input port's VOQs share one 64-flit pool (`apslip_voq_buffer`), split
statically and unevenly. Under XY routing, some queues can never be used:
a flit arriving from North or South never turns into X, and no flit makes a
U-turn. Only the usable queues get space:

| input port | usable VOQs | split of 64 flits |
|---|---|---|
| East / West | 6 (the other X direction, N, S, 3 local) | 11, 11, 11, 11, 10, 10 |
| North / South | 4 (straight on, 3 local) | 16 each |
| local | all 7 | 10, 9, 9, 9, 9, 9, 9 |

The split comes from `apslip_pkg::voq_size`. The pool and its static uneven
partitioning follow the original design, but this particular split is this
implementation's choice.

## Pipelining iSLIP

One iSLIP round has three steps:

- **Request (RQ):** each input requests every output for which it holds a flit.
- **Output arbitration (OA):** each output grants one requester. It picks
  round-robin, starting from its own priority counter.
- **Input arbitration / counter update (IA/CU):** each input accepts one of
  the grants it received, again round-robin from its own counter. For each
  accepted pair, both counters move to one past the partner.

`apslip_rr_arb` is the round-robin picker used in both arbitration steps.
Starting a round every cycle creates two hazards.

**Requests before earlier grants are known.** A round's requests are formed
while the two previous rounds are still being allocated. A VOQ therefore
keeps requesting for a flit that is about to be granted. This implementation
does not try to avoid those extra requests. At switch traversal, the router
checks whether the granted VOQ still holds a flit and whether the output
still has a credit for it:

- If so, the head flit goes. This is often a *later* flit of the same queue,
  which is fine because every flit in a VOQ goes to the same output.
- If not, the grant is dropped. The `grant_dropped` output shows this.

At high load, queues hold several flits and almost every grant is used. At
low load some grants are dropped, but bandwidth is not the bottleneck then.
A lone flit produces three requests in a row: one grant carries it and the
other two are dropped.

**Counters read before they are written.** The output counters are written in
IA/CU (stage 3) but read in OA (stage 2) of the next round, one cycle too
early. With stale counters, an output keeps picking the same input while the
inputs' counters move on. The ports then stay synchronised, and matching
quality and fairness suffer. The fix is to give every output and input port
*two* counters (`g_ptr[2][N]` and `a_ptr[2][N]` in `apslip_alloc`):

- Rounds that start in even cycles read and write set 0.
- Rounds that start in odd cycles read and write set 1.

A set is written in cycle *t* and next read in cycle *t+1*, by the round two
behind. So each set behaves exactly like an unpipelined iSLIP allocator, and
every counter moves once per accepted grant. Under saturated all-to-all
requests, the testbench checks that the allocator delivers a complete
7-pair matching every cycle.

In the second iteration, only pairs whose input and output are both still
unmatched can request. The second iteration reads the counter set of its
round but does not write it: as in standard iSLIP, only first-iteration
accepts move the counters.

## Adaptive effort

The allocator always runs both iterations. `apslip_effort_ctrl` decides
which result the router uses:

- The mode goes to **two iterations** when any VOQ holds at least half of its
  partition (`THRESH_PCT` = 50, rounded up).
- It returns to **one iteration** only when every VOQ of the router is empty.

This hysteresis keeps the pipeline depth from flipping back and forth.
Because both results are always computed, switching modes never produces an
illegal matching. At most a few grants are repeated or dropped, and the
traversal check catches them.

The original work gives a 50% threshold but does not say over what the
occupancy is measured. Measuring a whole 64-flit pool barely ever triggers:
traffic through a router concentrates on a few queues, and those are capped
at 9–16 flits. This implementation therefore measures each VOQ against its
own size.

## The mesh

`apslip_mesh` connects `MESH_X x MESH_Y` routers (8x8 by default), with tile
`t = y*MESH_X + x` at coordinates (x, y). X grows East and Y grows North.

- Output *o* of one router feeds input `opposite(o)` of the neighbour. That
  input's credit output comes back on credit input *o*.
- The router's output register is the 1-cycle link.
- Ports on the mesh edge are tied off.
- Each tile's three local ports are exposed as `inj_*` / `ej_*` channels.

An injecting interface must do two things:

- set `flit.lar` to the flit's output port at its own router, using XY
  routing from its own tile;
- keep credits for that router's local-input VOQs (10, 9, 9, 9, 9, 9, 9),
  restoring one on each `inj_credit_valid`.

An ejecting interface starts with 8 credits (`EJECT_CREDITS`) and returns
one on `ej_credit_*` (queue 0) for each flit it consumes.

## Flit format (`apslip_pkg::flit_t`, 147 bits)

| field | bits | meaning |
|---|---|---|
| `data` | 128 | payload |
| `dst_x`, `dst_y` | 3 + 3 | destination tile |
| `vnet` | 2 | virtual network (carried, not used for queueing) |
| `dst_unit` | 2 | local port at the destination (0–2) |
| `lar` | 3 | VOQ at the router that receives the flit (0 on ejection) |

The 8 address bits (destination plus virtual network) are the per-flit cost
of VOQs with per-flit allocation in an 8x8 mesh. `dst_unit` and `lar` are
this implementation's sideband fields.

## Modules

| file | role |
|---|---|
| `rtl/apslip_pkg.sv` | flit type, port numbers, VOQ partition functions |
| `rtl/apslip_mesh.sv` | **top**: 2-D mesh of routers |
| `rtl/apslip_router.sv` | one router: stage-1 logic, allocator, traversal, credits |
| `rtl/apslip_alloc.sv` | six-stage two-iteration pipelined iSLIP with privatized counters |
| `rtl/apslip_rr_arb.sv` | round-robin picker from an external counter |
| `rtl/apslip_effort_ctrl.sv` | one/two-iteration mode with hysteresis |
| `rtl/apslip_voq_buffer.sv` | per-input shared pool with statically partitioned VOQs |
| `rtl/apslip_lar.sv` | look-ahead XY routing |
| `rtl/apslip_credit_tracker.sv` | per-output credit counters for downstream VOQs |
| `rtl/apslip_crossbar.sv` | 7x7 switch fabric |

Parameters, with defaults from the original design unless marked:

| parameter | default | where |
|---|---|---|
| `MESH_X`, `MESH_Y` | 8, 8 | mesh |
| `POOL` | 64 flits per input port | mesh, router, buffer |
| `THRESH_PCT` | 50 | mesh, router, effort controller |
| `EJECT_CREDITS` | 8 (own choice) | mesh, router, credit tracker |
| `DATA_W` | 128 (package constant) | flit payload |

The port count (4 mesh + 3 local) and the XY routing are built into the
package and the routing unit, so they are not parameters.

## Simulating

All testbenches check themselves and end with a line
`TB_RESULT checks=N failures=M`. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_apslip_router \
    -y rtl -y tb rtl/apslip_pkg.sv tb/tb_apslip_router.sv
./obj_dir/Vtb_apslip_router
```

| testbench | what it checks |
|---|---|
| `tb_apslip_rr_arb` | every request pattern and counter value against a cyclic-distance reference |
| `tb_apslip_lar` | every router position, direction and destination of an 8x8 mesh against a hop-by-hop XY walk |
| `tb_apslip_crossbar` | random permutations and partial matchings |
| `tb_apslip_credit_tracker` | counters of an East and an ejection output against hand-computed start values |
| `tb_apslip_voq_buffer` | two differently split pools against reference FIFOs, driven to full |
| `tb_apslip_effort_ctrl` | threshold and hysteresis, directed and random |
| `tb_apslip_alloc` | cycle-exact comparison with a reference model of the pipelined allocator; full matchings every cycle under saturation; 3- and 6-cycle allocation latency |
| `tb_apslip_router` | one router at full size with sender and receiver models: delivery, order, look-ahead routes, no overflow; 4- and 7-cycle latency, mode up and down, dropped grants, back-to-back grants from one VOQ, credit exhaustion, both counter sets |
| `tb_apslip_mesh` | 3x3 mesh with interface models: lone-flit latency per hop count; uniform random, bit-complement and transpose traffic in 5-flit data and 1-flit control packets; a hot spot that drives routers into two-iteration mode; full drain; return to one iteration |
| `tb_apslip_mesh_full` | the same on the default 8x8 mesh at 0.3 flits per tile per cycle (about 3 minutes to build, seconds to run) |

`tb_mesh_env.sv` holds the traffic models and checks that both mesh
testbenches share. Its senders have no source queue: a sender that has no
credit holds its flit and stops injecting. The mesh testbenches therefore
check correct delivery under load. They do not sweep latency against load.
Mesh-edge ports are tied off and not exercised.

## Where this implementation makes its own choices

These points were left open by the original description and were decided
here:

- Port numbering, the exact VOQ split, the `dst_unit` and `lar` fields, and
  the ejection credits.
- **Requests depend on credits.** A VOQ requests only when its output has a
  credit for the head flit's downstream VOQ. This avoids winning grants that
  could never be used.
- **Occupancy is measured per VOQ** for the effort threshold (see above).
- **The second iteration does not move counters,** following standard iSLIP.
- **Virtual networks are not separate queues.** The original description
  says that each input port has as many VOQs as there are output ports. It
  also says that separate VOQs keep virtual networks apart. This
  implementation follows the first statement: there is one VOQ per output
  port. The `vnet` field is carried, but nothing keeps virtual networks apart
  in the buffers. Protocol-deadlock avoidance across virtual networks would
  therefore need per-virtual-network VOQs, which are not implemented.
- **Resets are asynchronous and active low.** The flit storage is not reset;
  it is read only where a queue is non-empty.

## Not included

- The tile endpoints (cores, caches, directory, memory controllers) and
  their network interfaces. The testbenches model the interfaces.
- The baseline routers the design was compared against (virtual-channel
  routers with SPAA allocation, packet chaining).
- A fixed two-iteration mode. The original work compares the adaptive
  allocator with fixed 3-stage and 6-stage versions. Setting `THRESH_PCT`
  above 100 gives a fixed one-iteration router (3 allocation stages). No
  setting holds the router at two iterations, because it always returns to
  one iteration when its queues are empty.
- A latency-against-load sweep. The mesh testbenches check delivery; they do
  not measure where the network saturates.
- The 32-bit link width of the smaller full-system configuration. The
  payload width is the package constant `DATA_W` = 128.
