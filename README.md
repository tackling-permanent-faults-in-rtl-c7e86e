# A network-on-chip router that keeps working with a permanent fault in every pipeline stage

A single broken arbiter or multiplexer in a network-on-chip router can block every packet
that needs it, and with it the whole chip. This router tolerates one permanent fault in each
of its four pipeline stages (routing computation, VC allocation, switch allocation, crossbar)
at a time, without copying the router. It adds a little logic to each stage and otherwise
shares resources the router already has over time: another VC's arbiters, another VC's
buffer, another crossbar multiplexer.

The design here is a 5-port (local, north, east, south, west), 4-virtual-channel wormhole router
for a 2D mesh with XY routing, 16-byte flits and credit-based flow control. It does not find faults
itself. An on-line fault detector, which is not part of this RTL, reports which part is broken
through a set of fault-status inputs. From then on the router steers around that part.

## Pipeline and interfaces

```
 link in ─► VC buffer ─► RC ─► VA ─► SA ─► [SA/XB reg] ─► crossbar ─► [out reg] ─► link out
            (per VC)    (head flits only)  (every flit)
```

* **RC**: one XY routing unit per input port. It routes one waiting head flit per cycle
  and writes the output port into the VC's `R` field.
* **VA**: a two-stage separable allocator. In stage 1, every input VC has a set of five 4:1
  arbiters, one per output port. The set uses the arbiter of its output port to pick a free VC
  of the next router. In stage 2, one 20:1 arbiter per downstream VC settles collisions.
* **SA**: a two-stage separable allocator. In stage 1, a 4:1 arbiter per input port picks one VC.
  In stage 2, a 5:1 arbiter per crossbar multiplexer picks one input port.
* **XB**: a 5×5 crossbar, extended with the secondary paths described below.

An uncontended head flit leaves 5 cycles after it was presented at the input. The body and
tail flits follow one per cycle. A flit's `vc` field names the VC it occupies at the receiving
router, and the router rewrites it on the way out. A flit is 128 bits: the type
(head/body/tail/head+tail), the VC, a 3-bit destination x and y, and 118 bits of payload
(`pftr_pkg::flit_t`).

Flow control: each output port keeps a credit counter (initially 4, the buffer depth) and a
busy flag for each downstream VC. A downstream VC is handed out again only after the tail of
the previous packet has left *and* all of its credits have come back. Every VC buffer therefore
holds at most one packet. The packet-move mechanism below depends on this.

Fault-status inputs of `pftr_router` (index `i` = input port, `j`/`o` = output port, `k`/`v` = VC):

| input               | meaning                                       | reaction |
|---------------------|-----------------------------------------------|----------|
| `rc_fault[i]`       | main RC unit of port i broken                  | the port's duplicate RC unit is used |
| `va_set_fault[i][k]`| stage-1 VA arbiter set of VC k broken           | VC k's requests run on another VC's set |
| `va2_fault[o][v]`   | stage-2 VA arbiter of downstream VC v broken   | that VC is no longer handed out |
| `sa1_fault[i]`      | stage-1 SA arbiter of port i broken             | bypass register picks the VC; packets are moved into it |
| `sa2_fault[j]`      | stage-2 SA arbiter j broken                     | output j is reached over its secondary path |
| `xb_fault[j]`       | crossbar multiplexer Mj broken                  | output j is reached over its secondary path |

The `ev_*` outputs pulse once per event of each mechanism. They are useful for counting
events in simulation.

## Per-VC state

Every VC buffer carries the classic fields, plus five that the fault handling adds:

| field | meaning |
|-------|---------|
| `G`   | idle / routing / VC allocation / active |
| `R`   | output port computed by RC |
| `O`   | VC at the next router, from VA |
| `P`   | read and write pointers, occupancy |
| `C`   | credits of the downstream VC; kept once per output VC in the router and read through `R`,`O` |
| `R2`  | output port of a request lodged here by another VC |
| `ID`  | which VC lodged it |
| `VF`  | this VC's arbiter set is working for VC `ID` |
| `SP`  | crossbar multiplexer to compete for in SA |
| `FSP` | use `SP`, not `R`: the secondary path |

## Routing computation: a duplicate unit

XY routing needs no table, only two comparisons. That makes a second copy of the unit cheap.
Both copies compute every cycle, and `rc_fault` selects the duplicate's result. RC also looks at
which output paths are broken (`sa2_fault | xb_fault`). If the regular path to the computed
output is broken, RC writes the secondary multiplexer into `SP` and sets `FSP`.

## VC allocation: borrowing another VC's arbiters

All arbiter sets are identical, so a VC whose own set is broken can use another VC's set.
If the set of VC *a* is broken, then in the cycle RC finishes for *a* the port writes *a*'s
route into `R2` of a healthy VC *b* whose `VF` is clear, writes *a* into `b.ID` and sets `b.VF`.
From the next cycle, set *b* serves requests in this order:

1. its own VC, if *b* itself is waiting for VA;
2. otherwise the lodged request.

When the lodged request is granted, VC `ID` receives the downstream VC in its `O` field and
becomes active, and `R2`/`ID`/`VF` of *b* are cleared.

The cost follows from this order. If the lender is idle, the borrower is allocated in the same
cycle as with its own arbiters. If the lender's own head flit is waiting too, the lender serves
itself first and the borrower is allocated one cycle later. If no healthy set is free when RC
finishes, the port retries the lodge in every later cycle. A port fails only when all four sets
are broken.

A broken **stage-2** VA arbiter just means its downstream VC is never handed out. Stage 1 masks
that VC, and packets take another VC of the same output port.

## Switch allocation: the bypass path and packet moves

After each stage-1 SA arbiter sits a 2:1 multiplexer. Its second input is a register holding a
VC number (the bypass register). It resets to VC 1 (the second VC) and can be rewritten through
`bp_we`/`bp_vc`. With `sa1_fault[i]` set, port *i* always offers exactly that VC to stage 2.
Packets in the other VCs of the port can then only leave by first moving into the bypass VC:

* A move happens when the bypass VC is idle and empty, no flit is arriving for it in that
  cycle, and another VC is active (its VA is done).
* In one cycle, the flits, the pointers and the `G R O SP FSP` fields of that VC are copied into
  the bypass VC, and the source VC becomes idle. `R2/VF/ID` stay where they are because they
  belong to the physical arbiter set.
* The move costs one cycle. In the test, the head latency goes from 5 to 6 cycles.

The upstream router does not know about the move and keeps sending the rest of the packet to the
old VC number, and credits must go back under that number. So each port keeps a
logical-to-physical VC map. Incoming flits are written through it, returned credits are translated
back through it, and a move swaps the two entries involved. Outside the port, the move cannot be
seen. A port fails only if both the arbiter and the bypass path are broken. The bypass path itself
is not monitored here.

## Crossbar: two paths to every output

The plain crossbar has one 5:1 multiplexer per output (M1..M5). Here, the outputs of M2..M5 go
through small demultiplexers, and each output port is a 2:1 multiplexer (P1..P5):

```
M1 ────────────────────────► P1 ─► out1        D1 (1:3) after M2 ─► P1, P2, P3
M2 ─► D1 ─┬─► P1 (secondary)                    D2 (1:2) after M3 ─► P2, P3
          ├─► P2 (regular)                      D3 (1:2) after M4 ─► P4, P5
          └─► P3 (secondary)                    D4 (1:2) after M5 ─► P4, P5
```

| output | regular path   | secondary path |
|--------|----------------|----------------|
| out1   | M1 → P1        | M2 → D1 → P1   |
| out2   | M2 → D1 → P2   | M3 → D2 → P2   |
| out3   | M3 → D2 → P3   | M2 → D1 → P3   |
| out4   | M4 → D3 → P4   | M5 → D4 → P4   |
| out5   | M5 → D4 → P5   | M4 → D3 → P5   |

A VC whose output uses the secondary path competes in SA stage 2 for the arbiter of the
secondary multiplexer (`SP`), not the arbiter of its own output. The switch allocator sets the
D and P selects from the winner's real output port (`R`). A broken SA stage-2 arbiter is handled
exactly like a broken multiplexer, because the arbiter and the multiplexer form one path. Faults
in M2 and M4 together are still tolerated: M3 then serves out2 and out3 in turn, and M5 serves
out4 and out5. A further fault in M1, M3 or M5 cuts an output off.

The wiring of D2..D4 to P2..P5 was read from a small drawing. The regular/secondary order at
each P input is this design's choice.

## How far it tolerates faults

Counting one fault per broken unit, as in the design's reliability analysis for this 5-port,
4-VC configuration:

| stage | faults tolerated (best case) | fewest faults that break it |
|-------|-----------------------------|-----------------------------|
| RC    | 5 (one main unit per port)   | 2 (main and duplicate of one port) |
| VA    | 15 (3 of 4 sets per port)    | 4 (all sets of one port) |
| SA    | 5 (one arbiter per port)     | 2 (arbiter and bypass of one port) |
| XB    | 2 (M2 and M4)                | 2 |

Up to 27 faults can be tolerated, and as few as 2 can cause a failure. Against the router's
31 % reported area overhead, this gives a silicon protection factor of about 11:
(2+28)/2 = 15 mean faults to failure, divided by 1.31.

## Files

| file | contents |
|------|----------|
| `rtl/pftr_pkg.sv`          | sizes, flit type, VC state, crossbar control struct, secondary-path table |
| `rtl/rr_arbiter.sv`        | N:1 round-robin arbiter used by all allocators and RC |
| `rtl/rc_unit.sv`           | XY routing |
| `rtl/input_port.sv`        | VC buffers, state fields, duplicate RC, arbiter borrowing, packet moves |
| `rtl/vc_allocator.sv`      | two-stage VA |
| `rtl/switch_allocator.sv`  | two-stage SA with bypass registers; crossbar selects |
| `rtl/pftr_crossbar.sv`     | 5×5 crossbar with secondary paths |
| `rtl/pftr_router.sv`       | top: ports, allocators, credit bookkeeping, pipeline registers |
| `tb/tb_*.sv`               | one self-checking testbench per module |
| `tb/tb_mesh.sv`            | 8x8 mesh of routers under uniform random traffic, with and without faults |

Parameters of `pftr_router`: `P` = 5 ports and `V` = 4 VCs. `DEPTH` = 4 flits per VC is this
design's choice. The crossbar and the switch allocator's path table are written for 5 ports. The
VC number field is 2 bits, so `V` can be at most 4 without changing `pftr_pkg`.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself. To build and run
the router test with Verilator 5:

```
verilator --binary --timing -Irtl rtl/pftr_pkg.sv rtl/rr_arbiter.sv rtl/rc_unit.sv \
  rtl/pftr_crossbar.sv rtl/switch_allocator.sv rtl/vc_allocator.sv rtl/input_port.sv \
  rtl/pftr_router.sv tb/tb_pftr_router.sv --top-module tb_pftr_router
./obj_dir/Vtb_pftr_router
```

`tb_pftr_router` runs the router at its default size. It injects 5-flit packets from all five
inputs to random destinations of an 8x8 mesh, with the router at (3,3). It runs under ten fault
configurations: none, all main RC units broken, several VA arbiter sets, VA stage-2 arbiters,
three SA stage-1 arbiters, M3, M2+M4, SA arbiter 1 + M5, and one fault in every stage at once.
Each configuration runs to drain, and the test checks:

* that every packet arrives on its XY output, complete, in order and unchanged;
* that no downstream buffer is overrun;
* the head latencies through an empty router: 5 cycles fault-free, 5 with a borrowed VA set,
  6 with an SA bypass move;
* that a reported-broken part is never used, cycle by cycle: no VA request from a broken arbiter
  set, no SA grant other than the bypass VC behind a broken stage-1 arbiter, no traffic through a
  broken multiplexer, the spare RC result whenever the main RC unit is broken, and no allocation
  of a downstream VC whose stage-2 arbiter is broken.

It also counts how often each mechanism acted: duplicate RC, secondary path, lodged and
borrowed VA requests, packet moves, VA stalls, credit stalls and SA conflicts. A mechanism that
never acted counts as a failure. It finishes in well under a second.

The unit testbenches cover:

* **RC**: exhaustive over 8x8 × 8x8 positions.
* **Crossbar**: every output over both paths from every input, permutations, and M2+M4 sharing.
* **VA and SA**: random requests checked against grant rules, and round-robin fairness.
* **Bypass register**: rewrite.
* **Input port**: each mechanism in isolation, including the one-cycle penalty when a lender
  serves its own VC first.

`tb_mesh` connects 64 routers into an 8x8 mesh. Each node injects 5-flit packets of 16-byte
flits to uniformly random destinations at a fixed rate in packets/node/cycle. Every packet is
checked on arrival at its destination's local port: right node, complete and in order. It runs
two experiments.

* Rates 0.01, 0.03, 0.05, 0.07 and 0.1, each fault-free and with 24 faults spread over 20 random
  routers.
* 4, 8, 16, 24 and 32 faults at rate 0.1.

Faults go at most one per pipeline stage in a router. Each point runs 300 warm-up cycles and
1500 measured cycles, then drains the network. The test prints the average flit latency: total
latency over the flits received, counted from packet creation. Build it like the router test,
with `tb/tb_mesh.sv` and `--top-module tb_mesh`. The C++ build takes a few minutes and the run
about 1.5 minutes. Results with the default seed, fault-free / 24 faults:

| rate | 0.01 | 0.03 | 0.05 | 0.07 | 0.1 |
|------|------|------|------|------|-----|
| average flit latency (cycles) | 34.7 / 35.1 | 36.4 / 36.8 | 39.9 / 68.3 | 73.3 / 140.6 | 472 / 736 |

At low load, faults add about 1% to the average latency. This router keeps one packet per VC
buffer, so it saturates between 0.05 and 0.07. Above that the queues at the sources dominate,
and the fault-free and faulty figures mostly show that.

## Limits and departures

* The fault detector is outside the design. The status inputs are assumed static, or changed
  only while the router is idle.
* A fault is not modelled inside the logic. The tests show that the router works *around* the
  reported part and never uses it. They do not show that a part which really misbehaves is
  isolated from the datapath.
* Arbitration is round-robin throughout. The lender for a borrowed VA request is the
  lowest-numbered free healthy VC. Packets are moved in VC order.
* The one-packet-per-VC rule (credits must all return before reuse) is this design's choice. It
  costs some throughput under heavy load compared with reusing a VC once the tail has left.
* Only the router is synthesizable. The 8x8 mesh and its traffic generators exist only in
  `tb_mesh`. Its runs are far shorter than a full latency study.
