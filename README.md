# BRS: a virtual channel router whose buffers share block RAMs

A virtual channel (VC) router needs a small FIFO per VC per input port. On an
FPGA those FIFOs either eat a lot of logic (distributed RAM or registers) or
each waste most of a block RAM, because a 2-VC x 16-flit x 18-bit buffer set
fills only a small part of a 9-kbit M9K. BRS ("Block RAM Split") puts the
payload buffers of **two** input ports into **one** true-dual-port block RAM.
The cost is that the RAM has only two ports while the two router ports could
want up to four accesses per cycle (a write of an arriving flit and a read of a
departing flit on each). BRS resolves this with one rule: writes never wait,
and reads that would not find a free RAM port are stopped before switch
allocation.

This repository holds synthesizable SystemVerilog for the router and a 4x4
network of them, plus self-checking testbenches.

## Configuration

| what | value |
|---|---|
| ports per router | 5: local, north (y+1), east (x+1), south (y-1), west (x-1) |
| VCs per port, buffer depth | 2 VCs, 16 flits each |
| flit payload | 18 bits, the widest true-dual-port mode of an M9K |
| packets | 4 flits in the tests; any length works |
| RAM sharing | east+west share one 512x18 RAM, north+south another, local has its own |
| routing | XY dimension order, lookahead (one hop ahead) |
| network | 4x4 mesh by default, 4x4 torus with `TORUS=1` |

The sizes live in `rtl/noc_pkg.sv` (`NVC`, `FLIT_W`, `BUF_DEPTH`) and as
module parameters (`DEPTH`, `KX`, `KY`, `TORUS`, `PARTNER`). A shared RAM holds
2 ports x `NVC` x `DEPTH` words, which must be at most 512 (checked at
elaboration); with 2 VCs of 16 flits that is 64 words, 1152 of the 9216 bits.

## The shared-RAM rule

`rtl/bram_share_ctrl.sv` sits between the two input units of a pair and the
RAM. Its inputs in a cycle are which side writes (an arriving flit sits in that
port's input register) and which side has any switch request. Its output is a
mask applied to the switch requests before they reach the switch allocator:

| sides written this cycle | switch requests allowed |
|---|---|
| none | both sides (side 0 reads on RAM port A, side 1 on port B) |
| both | neither: every request of both ports is squashed |
| one | the side *not* written; the written side only if the other side has no request |

Side 0 always writes on RAM port A and side 1 on port B; when only one side is
written, the single permitted read uses the other RAM port. Squashing requests
*before* allocation (rather than cancelling a grant) keeps a VC from winning
the switch and then not using it, which would block another input needlessly.
The price is occasional lost opportunities: the preferred side can lose
allocation while the masked side would have won. Since writes are never
refused, the credit protocol stays the ordinary one: an upstream router with a
credit may always send.

Assertions check that no read happens on a masked side and that at most one
read happens when one side writes.

## Router pipeline

For a head flit arriving on a link in cycle *t* (`rtl/brs_router.sv`):

| cycle | what happens |
|---|---|
| t | flit on the input link |
| t+1 | flit in the input register; payload written to the RAM at its VC's tail slot; head/tail marks and, for a head, the route information recorded in logic |
| t+2 | VC allocation (separable, input first, round robin) |
| t+3 | switch allocation (separable, input first, round robin) after the shared-RAM mask; the winner's RAM read address is issued |
| t+4 | RAM data and the recorded header go through the crossbar into the output register; the credit for the freed slot goes upstream |
| t+5 | flit on the output link |

So a router adds 5 cycles of latency at zero load and body flits stream one per
cycle behind the head. A packet crossing *R* routers takes 5R + 3 cycles from
its head entering the network to its tail leaving it. The mask decision uses
the writes of cycle t+3 itself because the granted read also reaches the RAM
in that cycle.

Only the payload goes into the RAM. Head/tail marks per slot, pointers,
counts, the VC state and the route information stay in logic
(`rtl/input_unit.sv`): they are small and needed every cycle, and a shared RAM
port could not supply them.

## Lookahead routing and VC handling

A head flit arrives tagged with the output port it must take *here*. While the
VC competes for an output VC, `rtl/lookahead_route.sv` works out the port the
*next* router will use, and that becomes the flit's tag when it leaves. The
local input has no upstream router, so for it the port at this router is
computed too. The destination travels in the head payload: x in bits 3:0, y in
bits 7:4.

The route is recorded once, when the head is written. As a consequence a VC
buffer holds one packet at a time. An input VC stays bound to its output VC
until its tail leaves, and an output VC (`rtl/output_unit.sv`) becomes
allocatable again only when its tail has been sent *and* all 16 credits have
come back, i.e. when the downstream buffer is empty. The credits themselves
work as usual. Each output port keeps one counter per downstream VC, starting
at 16. The counter drops when a flit wins switch allocation and rises for each
credit returned.

On a torus, dimension-order routing needs VCs to avoid deadlock. Here VC 0 is
used before a packet crosses the wrap-around link of its current dimension and
VC 1 after it (a dateline scheme); the VC allocator is given the usable set
per packet. Routing on a torus takes the shorter way around each ring.

## Files

| file | contents |
|---|---|
| `rtl/noc_pkg.sv` | sizes, port enum, flit/credit structs, XY routing functions |
| `rtl/rr_arbiter.sv` | round-robin arbiter |
| `rtl/vc_allocator.sv`, `rtl/switch_allocator.sv` | separable input-first allocators |
| `rtl/lookahead_route.sv` | next-hop route, torus VC classes |
| `rtl/bram_tdp.sv` | 512x18 true-dual-port RAM with M9K read-during-write behaviour |
| `rtl/bram_share_ctrl.sv` | the shared-RAM rule and RAM port assignment |
| `rtl/input_unit.sv`, `rtl/output_unit.sv`, `rtl/crossbar.sv` | router datapath and control |
| `rtl/brs_router.sv` | the router; `PARTNER` selects the port pairing |
| `rtl/brs_noc.sv` | KX x KY mesh/torus, local ports brought out (top) |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/noc_traffic.sv` | per-node traffic source and checker used by the network tests |

The network's local ports are plain flit/credit channels. A node must act like
an upstream router: it may start a packet only on a VC with all credits back,
and it may send only with a credit.

## Verification

Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

* Unit tests compare against reference models written in the testbench. The
  arbiter, both allocators, the RAM, the shared-RAM mask table and data path,
  the crossbar and the output unit's credit/VC state are tested with random
  stimulus. The route module is checked exhaustively for mesh and torus. The
  input unit is checked for write slots, VA timing, switch requests, the read
  order and credits.
* `tb_brs_router` surrounds one router with neighbour models under heavy load.
  It checks every packet's port, order, payload and lookahead tag, and checks
  the 5-cycle latency and the one-flit-per-cycle streaming. Both stall cases
  of the shared RAMs must occur. `tb_brs_router_pairing` repeats this with
  north+east and south+west as the RAM pairs.
* `tb_brs_noc` runs the default 4x4 mesh with no parameter overrides. It checks
  zero-load latencies of 5R+3 cycles. It runs uniform random, neighbour,
  transpose and bit-complement traffic at a light and a saturating injection
  rate, and every packet must arrive intact. Under transpose traffic exactly
  two of the 16 routers see shared-RAM conflicts. Over the run it counts shared-RAM
  squashes and maskings, lost VC allocations and output VCs waiting to drain;
  each must occur.
* `tb_brs_noc_torus` does the same on the torus. It also checks a property of
  the design: with neighbour traffic only the west, south and local inputs
  receive, so the shared-RAM stalls never trigger.

Running one test with plain Verilator, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/noc_pkg.sv tb/tb_brs_noc.sv \
          --top-module tb_brs_noc -o sim && ./obj_dir/sim
```

The network test takes under a minute. The testbenches print accepted
throughput and mean latency per pattern. These numbers are in cycles at this
design's own injection model, not a reproduction of a latency-versus-load
sweep.

## Choices made here, and limits

* Cycle boundaries of the pipeline, the RAM address layout ({side, VC, slot}),
  the RAM port numbering, the credit return one cycle after the read, the
  destination encoding and the pointer rule of the arbiters are this design's
  choices.
* Reset is asynchronous, active low, and empties all VCs and fills all
  credits. RAM contents are not reset.
* The torus deadlock scheme (dateline VC classes) and its shortest-way routing
  are this design's own; on a mesh all VCs are usable.
* One packet per VC buffer, and output VCs that are reused only after the
  downstream buffer is empty. With 4-flit packets in 16-flit buffers, credits
  therefore never run out. This limits throughput, most visibly for neighbour
  traffic.
* `bram_tdp` is an inferable memory; targeting another FPGA family needs a RAM
  with true dual ports. If it lacks "new data on the same port", a bypass must
  be added. This design never reads a word in the cycle it is written, so
  the cross-port behaviour does not matter to the router.
* No resource or clock-rate figures are claimed. These depend on the FPGA tool
  flow.
