# Hybrid packet-switched / TDM hard network-on-chip for FPGAs

A hard (custom-silicon) network-on-chip inside an FPGA usually switches
packets: every router decides at run time where each packet goes and buffers
flits while outputs are busy. Much FPGA traffic, though, is a set of steady
streams whose sources, destinations and bandwidth are known when the design
is compiled. This design lets the same routers carry those streams as
**time-division multiplexed (TDM)** traffic. Each stream gets a connection
that is booked, slot by slot, in advance. TDM flits never touch the router
buffers, never wait and never compete for an output. A TDM flit can also be
copied to several outputs of a router in the same cycle, which gives
multicast at no extra cost. Whatever the schedule does not use is left to
normal packet switching. That includes a booked slot whose stream has no flit
ready in that cycle.

The RTL is a complete 8 x 8 mesh (`rtl/hybrid_noc.sv`). Each node holds:

* a 5-port, two-stage router with two virtual channels (VCs);
* a write core port, which takes packets from an FPGA core;
* a read core port, which delivers packets to an FPGA core.

Each core port has one lane for packet-switched traffic and one for TDM
traffic. The ports cross between the NoC clock and the core clock.

| Parameter | Default | Where set |
|---|---|---|
| Mesh | 8 x 8, X-then-Y routing | `MESH_X`, `MESH_Y` |
| Flit payload | 128 bits | `hnoc_pkg::FLIT_DATA_W` |
| Packet | up to 4 flits | `PKT_FLITS` |
| VCs per port | 2 | `hnoc_pkg::NUM_VCS` |
| VC buffer | 10 flits | `VC_BUF_DEPTH` |
| Time slots (context memory entries) | 8 | `NUM_SLOTS` |
| Router context entry | 20 bits (5 outputs x {enable, 3-bit source}) | `hnoc_pkg::ctx_entry_t` |
| Read-port packet-switched FIFO | 16 flits (8 credits per VC) | `RX_PS_FIFO_DEPTH` |
| Other lane FIFOs | 8 flits | `FIFO_DEPTH` |

## Time slots and the schedule

This is the part of the design that has to be understood before anything
else.

**Slot numbering.** Each router and each port has a counter that runs
0, 1, ..., `NUM_SLOTS-1`, 0, ... on the NoC clock. All counters restart at
reset, so the whole network agrees on the current slot. Nothing in the
hardware re-aligns them later. Reset all nodes together, from one NoC clock.

**What a router entry means.** Entry *t* of a router's context memory is a
list of crossbar connections. For each output port it holds an enable bit and
a source input port (`ctx_out_t`). These connections are made in the cycle
whose slot is *t*. Several outputs may name the same input, which multicasts
the flit.

**Hop timing.** Suppose a TDM flit crosses router R's crossbar in slot *t*.
It then sits in R's output register in slot *t+1*, which is the next router's
first pipeline stage. It crosses the next router's crossbar in slot *t+2*.
A TDM flit therefore moves one router every two slots, and a path never
stalls or buffers.

**Port tables.** Each port has a 1-bit-per-slot table:

* Write port entry *k* = 1: a waiting TDM flit is put on the link to the
  router during slot *k*. The local router must then connect its local
  input in slot *k+1*.
* Read port entry *k* = 1: a TDM flit on the link from the router during
  slot *k* goes to the TDM lane. That flit crossed the router in slot *k-1*.

**Worked example.** A stream goes from (0,0) to (2,0). It is injected in
slot 0 and takes two hops east. Write the following entries (slots are mod
`NUM_SLOTS`):

| Node | Memory | Slot | Content |
|---|---|---|---|
| (0,0) | write-port table | 0 | 1 |
| (0,0) | router | 1 | output E from input L |
| (1,0) | router | 3 | output E from input W |
| (2,0) | router | 5 | output L from input W |
| (2,0) | read-port table | 6 | 1 |

This stream gets one flit per 8-cycle round. Book more source slots for more
bandwidth.

**Multicast.** Give several outputs of one entry the same source. The
testbenches schedule a three-destination stream that splits inside the
network, at a router that both ejects locally and forwards east.

**Schedule rules.**

* Two streams must never claim the same output of the same router in the
  same slot.
* The path must reach every router at exactly the slot the entries name.

The hardware does not check a schedule for consistency. It does report two
kinds of mismatch:

* `tdm_unrouted`: a TDM flit reached a router input that no entry of that
  slot names. The flit is dropped.
* `rx_sched_err`: a TDM flit reached a read port in an unmarked slot. The
  flit is dropped.

The schedule itself (choice of paths and slots, balancing slot use across
routers) is computed by a compile-time tool. That tool is not part of this
RTL. `tb/tb_hybrid_noc.sv` has a small function, `add_path`, that builds
X-then-Y schedules and detects conflicts.

**Loading.** Use the configuration bus of `hybrid_noc`: `cfg_we`,
`cfg_node` (= y*MESH_X + x), `cfg_target` (`CFG_ROUTER`, `CFG_TX`,
`CFG_RX`), `cfg_slot` and `cfg_data`. Port tables use bit 0 of `cfg_data`.
Reset clears every entry, and a network with empty context memories is a
plain packet-switched NoC. The schedule is meant to be loaded once, before
TDM traffic starts. Writes take effect on the next clock edge.

## Router pipeline (`hybrid_router`)

Input registers are not duplicated: the upstream router's output register
(or the write port's output register) serves as this router's input
register.

**Stage 1** (the flit is in the input register):

* The context entry of the *next* slot is read (`tdm_context.next_entry`).
  For each output it books, the router checks the flit at the named input.
  If that flit is valid and marked TDM, the connection will be made next
  cycle. The input and the output are then masked from packet-switched
  allocation, so TDM always wins. Otherwise the booked output stays free for
  packet switching.
* A TDM flit is stored in the input's bypass register. A packet-switched
  flit is stored in the buffer of its VC. If that buffer is empty, the flit
  takes part in allocation in the same cycle. If it wins, it never enters
  the buffer.
* Switch allocation (`switch_allocator`) runs in two round-robin steps.
  First each input picks one of its VCs, then each output picks one of the
  inputs that chose it. A VC may only ask for an output if all of these
  hold:
  * the downstream buffer of the same VC has a credit;
  * for a head flit, the output VC is not held by another packet;
  * for a body or tail flit, the output VC is held by this input.

  A packet keeps one VC from source to destination, so no VC allocation is
  needed. Holding the output VC from head to tail keeps two packets from
  mixing in one downstream buffer.

**Stage 2:**

* The crossbar (`crossbar`) moves each input's flit into the output
  registers (`output_module`). The flit comes from the bypass register or
  from the stage register that holds the granted buffer flit.
* For a packet-switched head flit leaving towards a neighbour, the output
  module writes the lookahead route. This is the port the flit will take at
  the next router.

Packet-switched latency is two cycles per router when there is no
contention. TDM latency is always two cycles.

**Credits.** Each freed buffer entry returns one credit pulse per VC to the
upstream sender, in the cycle the flit leaves. Counters start at
`VC_BUF_DEPTH` for router-to-router links. For the local output they start at
`LOCAL_CREDITS` (the read port's FIFO divided between the two VCs).

### Flit format (`hnoc_pkg::flit_t`, 142 bits)

| Field | Bits | Meaning |
|---|---|---|
| `valid` | 1 | flit present |
| `tdm` | 1 | 1 = TDM, 0 = packet-switched |
| `vc` | 1 | virtual channel, fixed for the whole packet |
| `head`, `tail` | 1 + 1 | packet boundaries (a single-flit packet has both) |
| `dst_x`, `dst_y` | 3 + 3 | destination; x grows east, y grows north |
| `la_port` | 3 | port to take at the receiving router (N=0, E=1, S=2, W=3, L=4) |
| `data` | 128 | payload |

TDM flits ignore `dst_*`, `la_port` and `vc`. Their route is in the context
memories.

## Core ports

**Write port (`tx_port`).** The core writes a whole packet: up to 4 flits as
one 512-bit word, with its length. Packet-switched writes also carry a
destination and a VC. The packet goes into the write buffer of the lane the
core chose. The buffer (`flit_serializer`) sends it into a dual-clock FIFO
(`async_fifo`), one flit per core cycle. On the NoC side:

* In a slot marked in the table, a waiting TDM flit is sent first.
* In every other cycle, and in a marked slot with no TDM flit waiting, the
  next packet-switched flit is sent if its VC has a credit.

The TDM lane is therefore limited to the rate booked for it; a core that
writes faster is held off by `tdm_wr_ready`.

**Read port (`rx_port`).** Each flit arriving from the router goes to one
place:

* the TDM lane, if the slot is marked and the flit is a TDM flit;
* the packet-switched lane, if it is a packet-switched flit (even in a
  marked slot);
* nowhere, if it is a TDM flit in an unmarked slot. It is dropped and
  `sched_err` is raised.

Each lane has a dual-clock FIFO. On the core side, a collector
(`flit_collector`) turns the flits back into one wide packet word. The
packet-switched lane has one collector per VC, because the router may
interleave flits of the two VCs. A round-robin arbiter hands complete packets
to the core.

The TDM lane has no backpressure towards the network. The core must take TDM
packets (`tdm_pkt_ready`) at the booked rate. A TDM flit that meets a full
FIFO is lost, and the sticky `tdm_overflow` flag is set. The packet-switched
lane returns credits in the NoC clock domain. A small FIFO of VC numbers on
the NoC side is popped each time the synchronized read pointer shows a freed
entry.

## Where this design makes its own choices

The overall architecture comes from the description of a hybrid hard FPGA
NoC. That includes: the two-stage router with lookahead routing, bypass
registers, TDM priority with fallback to packet switching, context memory
with one entry per slot and multicast by fan-out, two lanes per core port
with FIFOs and slot tables, and the sizes in the table above. The following
points were not specified there and are choices of this implementation:

* Credit-based packet-switched flow control, and the output-VC hold from
  head to tail.
* The separable input-first round-robin allocator.
* The 20-bit entry layout: {enable, source} per output.
* The slot offsets of the port tables.
* One output register per port. The description speaks of one per VC; one
  flit leaves a port per cycle, so one register is enough.
* Same-cycle allocation for a flit arriving at an empty VC buffer. The
  original scheme writes every packet-switched flit into its VC buffer and
  reads it from there. Here a flit that wins allocation on arrival skips the
  buffer, which saves a buffer write and read without changing the
  two-cycle router latency.
* Stage 1 looks up the entry of the slot in which the crossbar connection
  is made, i.e. the next slot. The description speaks of fetching the
  "current" entry for connections made in the next cycle; the two readings
  differ only in how slots are numbered.
* The lane roles are fixed: lane 0 of each port carries packet-switched
  traffic and lane 1 TDM traffic. The description allows either lane to
  carry either type.
* The read port uses both the slot table and the flit's type bit. The table
  alone would misdirect packet-switched flits that use an empty TDM slot.
* Dropping and reporting TDM flits that do not match the schedule.
* All FIFO depths of the core ports.
* One core clock for all ports, and the configuration bus.
* Power gating of unused TDM logic or unused lanes is not modelled. An
  unused lane simply stays idle.

Not included:

* The compile-time routing/scheduling algorithm. It is software.
* The FPGA cores. They are represented by the top-level core ports.
* A packet-switched multicast table. It is not part of the hybrid design.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it shows |
|---|---|
| `tb_tdm_context` | slot counter wraps every 8 cycles; current/next entries; live writes |
| `tb_async_fifo` | 300 words across unrelated clocks, in order, full with a paused reader |
| `tb_crossbar` | random selections including multicast |
| `tb_output_module` | registered outputs; lookahead route computed from the neighbour |
| `tb_switch_allocator` | round-robin fairness, TDM masking, credit stall and release, VC hold, random one-grant-per-port rules |
| `tb_hybrid_input_port` | same-cycle allocation, buffering and order, body flits following the head's route, bypass register, credit count |
| `tb_hybrid_router` | 2-cycle packet-switched latency, TDM multicast on schedule, TDM priority delaying a packet-switched flit by one cycle, booked-but-unused slot used by packet switching, unrouted TDM flit, credit stall |
| `tb_tx_port` | serialization, lookahead, credit limit, TDM only in its slot, mixed lanes |
| `tb_rx_port` | interleaved VCs reassembled, credits per VC, packet-switched flit in a TDM slot, TDM packet assembly, schedule error, overflow |
| `tb_hybrid_noc` | whole network on a 4 x 4 mesh, all other sizes at their defaults (see below) |
| `tb_hybrid_noc_full` | the same test on the full 8 x 8 network, default parameters |

`tb_hybrid_noc` covers the whole network:

* Traffic: three TDM streams (two unicast, one multicast to three nodes)
  and random packet-switched packets from many cores, plus a hot spot whose
  core stops reading.
* Checks: every packet arrives intact, and TDM packets arrive in order at
  every destination. It also counts that each of these happened at least
  once: a packet-switched request held back by TDM, a booked slot reused by
  packet switching, a credit stall, read-port backpressure, and a TDM lane
  overflow. The overflow is provoked at the end.

`tb_hybrid_noc` is the regular end-to-end test. It uses a 4 x 4 mesh; every
other parameter is at its default. `tb_hybrid_noc_full` runs the same kind
of traffic on the default 8 x 8 network, with twelve packet-switched sources
and no parameter overrides. It has been simulated and passes with 798
checks, and every counted mechanism occurs. It is still slow to use: a
Verilator build with two compile threads takes more than ten minutes,
because compiling the C++ model of 64 routers is slow. Once built, it
simulates its 1440 NoC cycles in seconds.

## Simulating

Every testbench runs with plain Verilator 5 from the directory that holds
`rtl/` and `tb/`, for example:

```
verilator --binary --timing --assert --top-module tb_hybrid_router \
    -y rtl -y tb +libext+.sv rtl/hnoc_pkg.sv tb/tb_hybrid_router.sv
./obj_dir/Vtb_hybrid_router
```

The package `rtl/hnoc_pkg.sv` must come first. The other files are found by
module name through `-y`. To use a different mesh, set `MESH_X`/`MESH_Y` on
`hybrid_noc` (up to 8 x 8; coordinates are 3 bits). To change the number of
slots, set `NUM_SLOTS`. The flit width and VC count are package constants.

## Files

* `rtl/hnoc_pkg.sv`: flit and context-entry types, X-then-Y route function.
* `rtl/hybrid_noc.sv`: the mesh (top).
* `rtl/hybrid_router.sv` with `hybrid_input_port`, `vc_buffer`,
  `switch_allocator`, `rr_arbiter`, `crossbar`, `output_module`,
  `tdm_context`.
* `rtl/tx_port.sv` with `flit_serializer`, `async_fifo`.
* `rtl/rx_port.sv` with `flit_collector`, `async_fifo`, `vc_buffer`.
* `tb/`: one testbench per block, plus the two network-level testbenches.
