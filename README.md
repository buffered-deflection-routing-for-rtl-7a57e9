# Buffered deflection routing for a 2D-mesh network-on-chip

This is a SystemVerilog model of two router microarchitectures for an 8x8 mesh
network-on-chip. Both make the same bet: a deflection router never stalls a
neighbour. Every flit that arrives is either sent on or parked in a small local
buffer pool, and a flit is only sent the wrong way ("deflected") when the pool
cannot hold it. The two routers differ in how they organise that pool:

* **CENTRAL(NB,B)**: one shared pool of NB buffers. Any flit can go to any port.
* **RING**: NB buffers split into four groups, one per port. The groups are
  joined in a ring that rotates every clock.

`bdr_noc_top` holds one 8x8 mesh of each kind side by side, so both can be run
on the same traffic and compared.

## The idea

A bufferless deflection router must send out every flit it receives in the same
clock. Under load, many flits get deflected, which adds hops and latency. A
buffered router with credit flow control avoids that, but it needs virtual
channels and a back-pressure protocol. This design sits between the two:

* Links carry no back-pressure. A router accepts whatever its neighbours send.
  This means there is no deadlock.
* Each router owns NB flit buffers. A flit that has no productive port free
  waits in a buffer, instead of being deflected.
* Deflection only happens when waiting is impossible.
* Priority is age (oldest first). The oldest flit in the network always makes
  progress, so there is no livelock.

## Flit and priority (`bdr_pkg`)

`flit_t` is 62 bits, made of:

* `valid`
* `dst_x`, `dst_y`: destination
* `src_x`, `src_y`: source, kept for checking
* `age`: 12 bits, saturating
* `data`: 32-bit payload

Every register that holds a flit for a clock (link register, router buffer or
ring slot) stores it with `age + 1` (`age_step`). So the age is the flit's time
in the network, and it is also its priority. Ties between equal ages go to the
lower candidate index.

`bdr_route` works out the productive directions, using minimal XY-free
adaptive routing: every direction that reduces the distance counts. Bit 4
(`EJECT_BIT`) means "this is the destination". x grows to the East and y grows
to the South.

## CENTRAL(NB,B) (`bdr_central_router`)

Each clock, the router considers 4 + NB candidates: the four link inputs and the
NB buffers. `bdr_sorter` ranks them by age in a single clock. It uses a
pairwise-compare rank: for each entry, it counts the entries that beat it. Only
the best B candidates may leave; B=0 means all of them.

1. **Productive pass.** In rank order, each of the best B takes a free productive
   output (or the single ejection slot, if it is at its destination).
2. **Full-buffer pass.** If the flits that remain are more than NB, the
   highest-ranked leftovers within the best B are deflected to any free output,
   until the rest fits.
3. **Write-back.** The remaining flits are written into the buffers, compacted
   in rank order.

Capacity: at most 4 flits arrive, and at least as many free outputs exist as
there are flits beyond NB. So pass 2 always finds a place, and no flit is lost.
An assertion guards this.

**Injection.** The local injection queue offers its head flit. The flit takes
the place of an idle link input (an input that carried no flit this clock), so
injection never forces an extra deflection. If all four link inputs are busy,
the queue waits and that clock counts as a stall.

**Timing.** Everything above is one combinational step, followed by registers:

* out_flit, the buffers and ej_flit are all registered.
* A flit that goes straight through takes one clock per hop.
* `defl_cnt` and `buf_cnt` give per-clock statistics.

## RING (`bdr_ring_router`, `bdr_ring_group`)

NB buffers are split into four groups of NP = NB/4 (4 for NB=16), one per port,
in N, E, S, W order. A group sees its own NP buffers and its port's link input,
so NP+1 candidates. Arbitration is local to each group:

* **Ranking key.** The key is `{productive, productive ? age : ~age}`. The
  productive flits come first, oldest first. The non-productive flits follow,
  youngest first.
* **Head.** The head of the list leaves through the group's port if it is
  productive there. It also leaves if the group holds NP+1 flits and someone has
  to go. In that case the head is the youngest non-productive flit, and it is
  deflected.
* **Rotation.** Of the flits that stay, the last min(m, NP/2) in the list move to
  the next group clockwise (N→E→S→W→N), into that group's upper half. Those are
  the oldest non-productive flits, or failing that the lowest-priority productive
  ones. The rest stay in the lower half.
* **Ejection.** Each group nominates its oldest flit that has arrived. The router
  grants the oldest nominee, one per clock.
* **Injection.** The new flit replaces an idle link input, preferring a port that
  is productive for it.

**Livelock.** The oldest flit is either productive at its group, and so at the
head, or non-productive, and so in the rotating tail. It reaches a productive
group within three rotations. The ring testbench checks this during drain.

**Latency cost.** A flit that needs to turn rides the ring, one clock per group,
before it can leave. That is why RING latency below is higher than CENTRAL. The
trade-off is the much simpler 5-input local arbitration.

## Mesh and timing (`bdr_mesh`, `bdr_noc_top`)

`bdr_mesh` builds an MESH_X x MESH_Y mesh of one router type. Node `n = y*MESH_X + x`.

* Links are the routers' registered outputs. Border links are tied off, since
  there is no wrap-around.
* Each node has an `bdr_inj_fifo` with a valid/ready interface. On push, the mesh
  stamps the source coordinates, sets `valid`, and sets age 0.
* `ej_flit[n]` is valid for one clock when a flit is delivered.
* Coordinates reach the routers as ports, so every router is the same module
  with the same code.

`bdr_noc_top` instantiates a CENTRAL mesh (`c_*` ports) and a RING mesh (`r_*`
ports). Reset is asynchronous and active-low; everything else is on `clk`.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| MESH_X, MESH_Y | 8, 8 | mesh size (3-bit coordinates, up to 8x8) |
| NB | 16 | buffers per router (RING: a multiple of 4 with NB/4 even) |
| B | 8 | CENTRAL: candidates allowed to route each clock, 0 = all |
| INJ_DEPTH | 8 | injection queue depth per node |

## Departures and own choices

* The processor's "infinite" injection queue is a finite FIFO (INJ_DEPTH). The
  testbench keeps an unbounded queue in front of it.
* The traffic generator, statistics phases and the comparison routers
  (virtual-channel baseline, rotary, BLESS, bufferless) are not built.
* "Buffers are full" in the CENTRAL algorithm is read as "the flits not routed
  productively would exceed NB".
* These are not specified, and were chosen here:
  * the buffer organisation (compacted in rank order)
  * tie-break order
  * choice among two productive ports (lowest index)
  * RING rotation size min(m, NP/2)
  * injection port choice
* Age is a 12-bit saturating counter. Past 4095 clocks, ties fall back to index
  order.

## Verification

Each block has a self-checking testbench in `tb/` that ends with a
`TB_RESULT checks=… failures=…` line:

* `tb_bdr_route`: exhaustive over all coordinates.
* `tb_bdr_sorter`: random keys against a reference sort.
* `tb_bdr_inj_fifo`: against a queue model.
* `tb_bdr_central_router`: random traffic at three (B, position) settings.
  Checks conservation, ageing, deflection only when the buffers are full, the
  oldest flit moving productively, rank < B, and one-clock latency.
* `tb_bdr_ring_group`: against a reference model of the ranking and rotation.
* `tb_bdr_ring_router`: conservation, deflection only in a full group, oldest
  ejection, livelock bound.
* `tb_bdr_mesh`: 4x4 meshes of both kinds, with an end-to-end scoreboard.
* `tb_bdr_noc_top`: full 8x8 size with default parameters. It runs a
  corner-to-corner latency probe, then uniform 35%, transpose 25% and tornado
  25% load, then drain. Every flit is scoreboarded.

Run any of them with plain Verilator, for example:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
  --top-module tb_bdr_noc_top -y rtl -y tb +libext+.sv rtl/bdr_pkg.sv tb/tb_bdr_noc_top.sv
./obj_dir/Vtb_bdr_noc_top
```

The full-size build takes about two minutes and the run a few seconds. One run
(1500 clocks per phase) gave:

| traffic | CENTRAL(16,8) accepted / latency | RING(16) accepted / latency |
|---|---|---|
| uniform 35% | 0.346 / 9 | 0.345 / 22 |
| transpose 25% | 0.218 / 13 | 0.223 / 26 |
| tornado 25% | 0.246 / 28 | 0.240 / 47 |

Accepted load is in flits/node/clock. Latency is in clocks from generation, and
includes queueing. Over the run, CENTRAL deflected 6242 times and RING 23172
times, out of about 79000 flits each. Every flit was delivered.

## Limits

* These runs are short fixed-load runs, not saturation sweeps. Treat the numbers
  as a sanity check of the routers, not as a characterisation.
* The sorter is a flat all-pairs comparator (about N²/2 comparators, 190 for
  CENTRAL). At 20 candidates it is fine in simulation. Timing closure in silicon
  has not been studied.
* The single routers and the smaller blocks go through coarse synthesis
  cleanly. For the complete top, with two 64-router meshes, only parsing and
  elaboration have been checked.
