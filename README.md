# A 64-port virtual-channel router with carry-lookahead arbitration

In a switch fabric built from routers, a packet's delay grows with the number
of routers it crosses on its way. Giving each router more ports (a higher
*radix*) cuts that number. This repository holds synthesizable SystemVerilog
for one such high-radix router. It is an input-queued virtual-channel (VC)
router with 64 ports, 2 VCs per port and 55-bit flits.

Two choices shape it:

* **Routing is a programmable lookup table.** There is no routing function
  tied to one topology. A head flit's destination address indexes a table that
  names the output port. The same router can therefore serve in any network,
  once the table is loaded.
* **Arbitration is fixed-priority carry-lookahead by default.** Every arbiter
  in the two allocators computes its winner straight from the request bits,
  so no grant has to ripple through the grants above it. This is the
  fastest, smallest arbiter, but it is unfair: port 0 always wins a tie. A
  matrix (least-recently-served) arbiter and a round-robin arbiter can replace
  it through one parameter. They are fairer and have a longer critical path.

The radix, VC count, flit width and the three arbiter algorithms, including
their request lock and priority levels, follow the design study this router
comes from. That study picked radix 64 with carry-lookahead arbiters because
that pair gave the best throughput per unit latency. Everything else is this
implementation's own choice and is marked as such below: the flit field
layout, buffer depth, credit protocol, pipeline timing and allocator
structure.

## How a packet crosses the router

A packet is a sequence of flits. The head flit carries the destination and a
priority level. The flits after it (body flits, ending with the tail flit)
carry only data. A packet's flits travel on one VC of a link.

| cycle | head flit                                                       | module           |
|-------|-----------------------------------------------------------------|------------------|
| t     | presented on `in_valid/in_vc/in_flit`                           | –                |
| t     | written at the edge into its VC's FIFO                           | `input_unit`     |
| t+1   | **route computation**: `dest` indexes the table, port stored     | `route_lut`      |
| t+2   | **VC allocation**: wins a free VC of that output port            | `vc_allocator`   |
| t+3   | **switch allocation**: wins the output port and is popped        | `switch_allocator` |
| t+4   | **switch traversal**: crosses the crossbar into the output buffer | `crossbar`       |
| t+5   | on `out_valid/out_vc/out_flit`                                   | `output_unit`    |

Through an idle router a head flit therefore takes **5 cycles**. Body flits skip
route computation and VC allocation, because they use the route and output VC
their head flit obtained. A body flit that finds its packet already active
leaves 3 cycles after it arrives. A port moves at most one flit per cycle in
each direction.

Each input VC has a state: idle, waiting for an output VC, or active. It also
holds its route (output port) and its output VC. An idle VC with a head flit
at its FIFO front is routed; only one VC per port is routed per cycle, the
lowest-index one. The tail flit leaving the switch returns the input VC to
idle and frees the output VC.

## The arbiters

All three arbiters share one interface (`psf_arbiter` selects among them):

```
req[N], release_lock[N], prio[N][PW], ready  ->  grant[N], chosen, valid
```

`grant` is one-hot (or zero) and combinational in the current requests, so an
allocation takes effect in the cycle it is requested. `grant = winner AND
ready`. `ready` says the shared resource can be taken at all; the VC allocator,
for example, drives it with "this port has a free VC".

**Carry-lookahead (`cl_arbiter`).** Request 0 has the highest priority.
Inverting the requests turns the zeros below the lowest request into ones.
Adding one carries through them and stops at the lowest request's position:
that bit becomes 1 and the bits below it become 0. ANDing the sum with the
requests keeps only that bit, so `(~req + 1) & req` is the winner. That is one
adder, not a chain of per-port grant logic.

**Matrix (`matrix_arbiter`).** It keeps a priority bit `w[i][j]` for each pair
of requesters: 1 means *i* beats *j*. Only the upper triangle is stored,
N(N-1)/2 flip-flops, because `w[j][i] = ~w[i][j]`. Request *j* is disabled
when any request *i* with `w[i][j] = 1` is present. The one request left
enabled wins. When a grant is taken, the winner's row is cleared and its
column is set, which puts it last. After reset the order is 0, 1, …, N-1.
Its storage grows with N², against N for the other two arbiters.

**Round robin (`rr_arbiter`).** A pointer names the request with the highest
priority. After a taken grant the pointer moves just past the winner.

**Request lock (all three).** The arbiter remembers last cycle's winner. If
that requester is still requesting and does not raise its `release_lock` bit,
it wins again, even against higher-priority requests. The allocators drive
`release_lock` with "this flit is a tail flit". A packet that starts winning
therefore keeps its connection, flit after flit, until its tail. The lock
lapses as soon as the holder stops requesting for a cycle, for example when
its buffer runs dry or it runs out of credits. It starts empty after reset.

**Priority levels.** With `LEVELS > 1`, `prio_filter` first finds the highest
priority level among the requests. Only requests at that level go on to the
normal arbitration. A held lock is kept whatever the levels. The switch
allocator uses 8 levels, taken from each flit's `prio` field; the VC
allocator uses none.

## Allocation

**VC allocator.** Each output port has one arbiter over all
`NUM_PORTS × VCS` input VCs (128 at the default size). The winner among the
input VCs waiting for that port receives the lowest-numbered free VC. An
input VC asks for one port only, so it can win at most once. Each port
allocates at most one VC per cycle.

**Switch allocator.** It is separable and input-first. It has two ranks of
arbiters, both with locks and priority levels:

1. Each input port picks one of its VCs that is active, has a flit, and holds
   a credit for its output VC.
2. Each output port picks one of the input ports whose pick is routed there.

An input whose pick wins pops that flit. The crossbar select and enable are
registered here and act in the next cycle, when the popped flit reaches the
crossbar.

## Flow control and the link

Links use credit-based flow control in both directions. A sender may put a
flit on a VC only while it holds a credit for it. Each VC starts with `DEPTH`
credits (4).

* **Input side.** When a flit leaves an input FIFO, the router returns a
  credit upstream on `cr_out_valid/cr_out_vc`, one cycle later.
* **Output side.** Each output VC counts the credits for the downstream
  buffer. A flit may compete for the switch only when its output VC has a
  credit. That check happens *before* switch allocation, so the one-entry
  output buffer never has to hold a flit back. The receiver returns a credit
  on `cr_in_valid/cr_in_vc` when it frees a slot.

The 55-bit flit (`psf_pkg::flit_t`) has this layout, which is this
implementation's choice:

| bits  | field   | meaning                                         |
|-------|---------|-------------------------------------------------|
| 54    | head    | first flit of a packet                          |
| 53    | tail    | last flit (a one-flit packet sets head and tail) |
| 52:50 | prio    | priority level, 7 highest                       |
| 49:42 | dest    | destination address, index into the route table |
| 41:0  | payload |                                                 |

The VC number travels next to the flit (`in_vc`, `out_vc`), not inside it.

To load the routing table, raise `cfg_we` with `cfg_addr` (destination) and
`cfg_port` (output port). The entry is used from the next cycle on. After
reset, entry *a* holds *a* mod `NUM_PORTS`. Reset is synchronous and active
low throughout.

## Parameters

| parameter   | default  | where                  | origin |
|-------------|----------|------------------------|--------|
| `NUM_PORTS` | 64       | `psf_router`           | study's chosen radix |
| `VCS`       | 2        | `psf_router`           | study's evaluation setting |
| `FLIT_W`    | 55       | `psf_pkg`              | study's evaluation setting |
| `ARB_KIND`  | `ARB_CL` | `psf_router`           | study's chosen arbiter; `ARB_MATRIX`, `ARB_RR` selectable |
| `PRIO_LVLS` | 8        | `psf_pkg`              | study's arbiter configuration |
| `DEPTH`     | 4        | `psf_router`           | own choice |
| `DEST_W`    | 8        | `psf_pkg` (256 entries) | own choice |

## Files

| file | contents |
|------|----------|
| `rtl/psf_pkg.sv` | flit type, arbiter kinds, VC states |
| `rtl/psf_router.sv` | top level: wires the blocks below |
| `rtl/input_unit.sv` | per-port VC FIFOs and VC state |
| `rtl/route_lut.sv` | programmable routing table |
| `rtl/vc_allocator.sv`, `rtl/switch_allocator.sv` | allocators |
| `rtl/crossbar.sv` | switch |
| `rtl/output_unit.sv` | output VC state, credits, output buffer |
| `rtl/psf_arbiter.sv` | arbiter-kind selector |
| `rtl/cl_arbiter.sv`, `rtl/matrix_arbiter.sv`, `rtl/rr_arbiter.sv`, `rtl/prio_filter.sv` | arbiters |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/router_traffic.sv` | packet source, sink and scoreboard for router tests |
| `tb/tb_psf_router.sv` | 8-port routers with each arbiter kind, plus a credit-starved one |
| `tb/tb_psf_router_full.sv` | the 64-port default router under the evaluation workload |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. Run
one with Verilator 5 from the repository root, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/psf_pkg.sv \
    tb/tb_psf_router_full.sv --top-module tb_psf_router_full -Mdir obj_full
./obj_full/Vtb_psf_router_full
```

Modules are found through `-Irtl -Itb` by file name. Swap the testbench name
to run another one. The 64-port build takes about a minute and the simulation
under a second.

## How it was verified

* **Arbiters.** Each arbiter is compared cycle by cycle with a behavioural
  model over thousands of random cycles. The stimulus covers random requests,
  lock releases, `ready` and priority levels. Directed cases also check lock
  hold and release (carry-lookahead), least-recently-served order (matrix) and
  fairness (round robin).
* **Other blocks.** The routing table, crossbar, input unit, output unit and
  both allocators each have a model-based testbench. They check state, timing
  and credit counts.
* **Router, `tb_psf_router`.** Routers with each arbiter kind run the
  evaluation workload: 10% injection per VC, 64 packets of 1–4 flits per input
  port, random destinations, priorities and table contents. The scoreboard
  checks four things: every packet leaves at the port its table entry names,
  its flits stay in order on one output VC without mixing with other packets,
  no credit is overrun, and every packet arrives once. The test also counts
  each mechanism and fails if one never happens: VC-allocation waits, switch
  conflicts, a connection held against other requests, priority selection,
  and credit stalls at inputs and outputs. A fourth router with slow sinks
  forces the credit stalls.
* **Full size, `tb_psf_router_full`.** The default 64-port router delivers all
  4096 packets of the evaluation workload, with a minimum head latency of
  5 cycles.

In the 8-port runs the carry-lookahead router shows the highest average and
maximum packet latency of the three kinds, while all three share the same
minimum. That is the expected cost of its fixed priority.

Many modules carry SystemVerilog assertions for their rules. Examples: no
push into a full FIFO, a VC starts with a head flit, each arbiter grants one
requester at most, no allocation of a busy VC, and no flit without a credit.
Run with `--assert` to enable them.

## Limits and departures

* **Sizing is not characterised here.** The study judged its designs by
  synthesised clock period, area and power. Those depend on a standard-cell
  library and are not reproduced in this repository.
* **Output buffer.** The output buffer is a single register. Credits are
  checked before switching, so it never has to stall.
* **Priority selection timing.** It is combinational, on the current
  requests, rather than taken from a register of the previous cycle's
  priorities.
* **Allocator structure.** The allocators use one arbiter kind for all
  arbiters. The switch allocator is separable and input-first: it can leave a
  match unused when two inputs pick VCs for the same output.
* **Radix.** A 128-port router was only considered by extrapolation in the
  study. Set `NUM_PORTS = 128` to build one; it has not been simulated.
* **Network level.** The network around the router is not part of this code:
  topology, network interfaces, and injection and ejection queues. The
  router's links are its ports.
