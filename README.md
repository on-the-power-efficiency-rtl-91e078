# D-bypass power gating for a mesh network-on-chip

A router in a network-on-chip spends most of its life idle. Switching its supply off saves
leakage, but the router then blocks every packet whose route crosses it, and waking it costs
several cycles. Earlier bypass schemes add a small latch so that packets can still get
through a sleeping router. They can do so only in one direction, or only toward the local
core, or they need one latch per input port.

The D-bypass ("dynamic bypass") scheme keeps **one** bypass latch per router. The latch is
always powered and can be **reserved** by any one neighbour, or by the local network
interface, at a time. A neighbour that wants to send through a sleeping router asks for the
latch and waits for a grant. It then streams its packet through the latch one flit at a
time. The sleeping router needs no buffering or allocation, so the flit crosses it in a
single "forward packet" cycle. A chain of sleeping routers can be crossed latch to latch, in
any direction. A sleeping router is woken in only two cases: when two or more neighbours ask
for its latch at once, or when a neighbour has more than one packet waiting for it.

This repository contains synthesizable SystemVerilog for the whole network:

- an 8×8 mesh of 4-stage virtual-channel routers, each extended with the bypass path and a
  power-gating controller;
- one network interface per router;
- unit testbenches, plus end-to-end testbenches at 4×4 and at the full 8×8 size.

## Network and router

| Item | Value |
|---|---|
| Topology | 8×8 mesh (`MESH_X`, `MESH_Y`); X-Y dimension-order routing |
| Ports | 0 Local (NI), 1 X+, 2 X−, 3 Y+, 4 Y− |
| Virtual networks | 3 VNs × 2 VCs = 6 VCs per input port |
| Buffers | VNs 0 and 1 (control): 1-flit VCs. VN 2 (data): 5-flit VCs |
| Flit | 128-bit payload + head, tail, VC, source and destination (x, y) |
| Packets | control = 1 flit, data = 2 flits (head + tail) |
| Wake-up delay | 8 cycles |
| Break-even time | 10 cycles (used as the idle-detect window) |
| Thresholds | th_IC = 1, th_IVC = 1 |

The powered-on router is a conventional credit-based input-queued VC router
(`dbypass_router`), with the stages RC, VA, SA, ST and then one link cycle (LT):

- **RC**: XY route computation on the head flit.
- **VA**: one round-robin arbiter per output port (`vc_allocator`). It gives the winner the
  lowest-numbered free VC of the winner's VN.
- **SA**: a separable, input-first allocator (`switch_allocator`).
- **ST**: a 5×5 multiplexer crossbar (`crossbar`) into a register per output.

A flit sees five cycles per hop through a powered-on router. Each output port has an
`upstream_port_ctrl`, which holds the credit counters and busy bit for each downstream VC,
plus the upstream half of the power-gating handshake. Credit counters and VC busy bits sit
in the always-on domain. Input buffers, VC state and ST registers are in the gated domain
and are cleared while the router is off or recharging.

## The bypass path

The bypass path adds three things to the router, all always powered:

1. An **input multiplexer** selects the flit arriving on the reserved input port.
2. A **single-flit bypass latch** (`bypass_latch`) holds that flit.
3. A **bypass multiplexer in front of each output port** lets the latch drive that link
   instead of the crossbar.

While the router is powered down, in the **FP (forward packet)** cycle the latch:

- computes the XY route of the flit it holds;
- for a head flit, picks the lowest free downstream VC of its VN that has a credit;
- drives the flit onto the output link, or into the NI at the destination;
- returns a credit upstream, on the input port the flit came from.

So a sleeping router adds two cycles per hop (FP and LT) instead of five.

The latch holds one flit and uses a strict rule: **only one flit may be outstanding in it**.
The upstream sends the next flit of the packet only after the credit for the previous one
has come back. A 2-flit packet therefore crosses a sleeping router in about 5 cycles per
flit. This is the credit round-trip cost the design accepts in exchange for a single shared
latch.

## Reservation handshake (IC, RS, PG, WU)

Each link carries four power-gating wires next to the flit and credit wires:

| Signal | Direction | Meaning |
|---|---|---|
| `PG` | down → up (one per router, broadcast) | "I am off, or about to be; do not use the normal path" |
| `IC` | up → down | "I have a packet for you" — the request for the bypass latch |
| `RS` | down → up | "the latch is reserved for you" |
| `WU` | up → down | "wake up now" |

Sequence for router A sending through a sleeping router B:

1. A sees `PG` from B and has a packet routed to B, so A raises `IC` (registered).
2. B's controller (`pg_ctrlr`) arbitrates round-robin among the ports that raised `IC`. It
   marks the latch as reserved for the winner and raises that port's `RS` (registered).
3. With `RS` and a credit, A sends the head flit. The link is then locked to this packet
   until its tail, and A cannot send again until the latch's credit returns.
4. The body flits follow the same way, one credit round trip each.
5. A keeps `IC` high until the credit for the tail has returned. B releases the reservation
   when `IC` falls and the latch is empty. Only then can another port be granted.

A head flit may leave only while A's own registered `IC` is high. B therefore always sees
`IC` in the cycle a head is in flight, and cannot release the reservation underneath it.

Each hop of a multi-hop bypass makes its own reservation. A head therefore moves
latch-to-latch across a chain of sleeping routers, each holding its latch until the packet
has passed.

The unit testbench `tb_dbypass_router` checks the cycle numbers for one router:

- `IC` in cycle 0 and `RS` in cycle 2;
- the head flit leaves the sleeping router in cycle 6;
- its credit is back in cycle 6;
- the tail leaves in cycle 10.

## Power states and wake-up

`pg_ctrlr` runs the following states:

| State | Entered when | Behaviour |
|---|---|---|
| `PS_ON` | reset, or after a hand-over | normal router |
| `PS_IDLE_DET` | the router is empty and no `IC`/`WU` arrives | `PG` is already high, so upstream routers stop sending normally. After 10 idle cycles → `PS_OFF`. Any `IC`, `WU` or flit returns it to `PS_ON`. |
| `PS_OFF` | end of idle detection | supply cut (`sleep`); the latch serves reservations |
| `PS_WAKE` | more than th_IC = 1 `IC` inputs at once, or any `WU` | recharging for 8 cycles; the latch still serves its current reservation and may grant new ones |
| `PS_DRAIN` | end of recharge | no new grants, `RS` low; after `RS_GUARD` = 6 cycles the hand-over happens and the router goes to `PS_ON` |

Two events can wake a router:

- **N_IC > th_IC**: two or more neighbours want the latch at once. The latch can serve only
  one of them, and the losers would otherwise wait for a long time.
- **N_IVC > th_IVC**: an upstream router or NI has more than one VC waiting for the same
  sleeping router. It raises `WU`, because a single latch would make these packets queue
  behind each other's credit round trips.

**Hand-over.** When a woken router takes over again, a packet may be half-way through its
latch. The controller waits until no bypassed packet is between its head and tail. At the
hand-over:

- A head flit still waiting in the latch (its downstream neighbour had not yet granted it)
  moves into the input buffer of the VC it arrived on. That buffer slot is free, because its
  upstream credit was never returned.
- `PG` falls. The upstream drops its bypass lock and sends the rest of the packet through
  the normal pipeline.

Without this hand-over, woken routers whose latches wait on each other can deadlock. The
4×4 traffic test reproduces that case.

## Network interface

`network_interface` does the following:

- Accepts one packet per VN from the core, with a valid/ready handshake.
- Splits the packet into flits, allocates a VC of the local input port, and sends the flits
  with round-robin among the VNs.
- Its NI controller is an `upstream_port_ctrl`, so it takes part in the reservation protocol
  exactly like a neighbouring router. While the local router sleeps, the NI reserves that
  router's latch to inject.
- Ejected flits are registered and credited back one cycle later. The ejection port is always
  powered, so a sleeping router can deliver through its latch straight into the NI.

## Files

| File | Content |
|---|---|
| `rtl/dbp_pkg.sv` | constants, flit/link/credit/packet types, power states, XY routing function |
| `rtl/dbypass_noc.sv` | top: `MESH_X`×`MESH_Y` routers and NIs, neighbour wiring, edge tie-offs |
| `rtl/dbypass_router.sv` | VC router with bypass path and controller |
| `rtl/pg_ctrlr.sv` | latch reservation and power-state machine |
| `rtl/bypass_latch.sv` | latch, FP stage, downstream VC choice, credit return |
| `rtl/upstream_port_ctrl.sv` | credits, VC busy bits, IC/WU generation, bypass eligibility |
| `rtl/network_interface.sv` | NI with NI controller |
| `rtl/vc_fifo.sv`, `rtl/vc_allocator.sv`, `rtl/switch_allocator.sv`, `rtl/crossbar.sv`, `rtl/rr_arbiter.sv` | router building blocks |
| `tb/tb_<module>.sv` | self-checking unit testbenches |
| `tb/tb_dbypass_noc_small.sv` | end-to-end test on a 4×4 mesh |
| `tb/tb_dbypass_noc.sv` | the same test on the default 8×8 mesh |

The top's ports, one entry per node:

- core side: `inj_valid`, `inj_pkt`, `inj_ready`, `ej_link`;
- observation: `sleep` (the power-switch control), `pstate` and an `events` struct.
  `events` flags latch forwards, reservations, wake-up causes and crossbar use, for
  performance counting.

## Where this design departs from, or fills in, the original description

- **Release of the reservation.** The original releases the latch once the last flit has
  been forwarded. Here it is released when the upstream drops `IC`, after the last flit's
  credit has returned. This is one cycle later, but the release never races with a flit in
  flight.
- **Hand-over on power-on.** The original only says that a packet waiting on a woken router
  continues once that router is on. The `PS_DRAIN` guard time, the move of a waiting head
  into its input buffer, and the rule that a half-bypassed packet is finished through the
  latch are this design's.
- **Not specified in the original, chosen here:**
  - the idle-detect window (10 cycles);
  - round-robin arbitration everywhere;
  - the VA/SA policies;
  - which VN carries data;
  - the packet lengths (1 and 2 flits);
  - the flit sideband;
  - the NI's queue depth;
  - the VC choice for a bypassed head.
- **Routing.** Routing is X-Y only. The adaptive routing listed next to it in the original
  parameter table belongs to a scheme this design is compared with.
- **Bit-complement traffic** sends (x, y) to (7−x, 7−y) on the 8×8 mesh.
- **Not built:**
  - the sleep transistor itself, which is analog (`sleep` is brought out per router);
  - the caches, coherence protocol and memory controllers of the evaluated chip
    multiprocessor. The NI ports stand in for them, so application workloads cannot be run,
    only their NoC traffic.

## Verification

Every block has a self-checking testbench that prints
`TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog. Highlights:

- `tb_pg_ctrlr` covers:
  - the idle-detect window and its abort;
  - the 8-cycle recharge;
  - the exclusive reservation and release;
  - wake-up by two ICs and by WU;
  - the hand-over;
  - round robin between ports.
- `tb_upstream_port_ctrl` compares the controller with a reference model over random
  traffic.
- `tb_dbypass_router` checks the cycle-exact bypass timeline above and the 5-cycle hop of a
  powered-on router.
- `tb_dbypass_noc_small` (4×4) and `tb_dbypass_noc` (8×8, default parameters) run:
  - a packet across three sleeping routers;
  - a wake-up by two simultaneous ICs;
  - a wake-up by WU;
  - uniform, bit-complement and transpose traffic at 0.002 and 0.08 packets/node/cycle.

  A scoreboard checks that every packet arrives once, intact and in order, and that all
  routers go back to sleep at the end. A counter is kept for each mechanism, and a mechanism
  that never occurred counts as a failure:
  - latch forwards, multi-hop bypasses and ejections from a sleeping router;
  - reservations;
  - wake-ups by IC and by WU;
  - idle-detect aborts;
  - hand-overs;
  - crossbar traversals.

  The 4×4 run passes. It delivers 631 packets with about 890 latch forwards, 85 hand-overs
  and 85 wake-ups.

**Known open problem.** The largest size that passes end to end is 4×4. At the default 8×8
size, `tb_dbypass_noc` passes its directed phases and most of the traffic. It then delivers
1995 of 2003 packets, and the last 8 stay stuck until the watchdog fires, so the test
reports 2 failures. This points to a remaining circular wait between bypass reservations
and woken routers that only the larger mesh exposes. Treat the 8×8 configuration as
unverified until that is found.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/dbp_pkg.sv rtl/*.sv tb/tb_dbypass_noc_small.sv \
          --top-module tb_dbypass_noc_small -o sim && ./obj_dir/sim
```

(`dbp_pkg.sv` must come first; listing it twice is harmless.) Use the same command with
another `tb_*` file and `--top-module` for the unit tests. The 4×4 test builds in about a
minute and runs in about a second. The 8×8 test takes about 5 minutes to build, because
Verilator generates code for each of the 64 router instances, and about 8 minutes to run.

Sizes, depths, delays and thresholds are parameters:

- in `dbp_pkg` (`WAKEUP_DELAY`, `T_IDLE_DETECT`, `TH_IC`, `TH_IVC`, `RS_GUARD`, buffer
  depths);
- on `dbypass_noc` (`MESH_X`, `MESH_Y`).

Coordinates are 3 bits wide (`COORD_W`), so a mesh larger than 8×8 needs that constant
widened.
