# Centrally controlled ATM switch for link-grouped routing

This is a small-to-medium ATM switch (32 ports at 150 Mb/s by default) for networks that route
on *link groups*. A link group is a set of physical links to the same neighbour node. A cell
asks for a group, not a link, and any free link of the group will do. Grouping raises
throughput. It also allows a simple allocator: a controller only has to count how many links
of each group are taken.

The main idea is to do all output contention in one central controller, outside the data path.
In every cell slot the controller does two things. It gives each input either a free link of the
group its cell wants, or a spare output for a test packet. Because every output then gets
exactly one packet, a plain Batcher sorter routes all the packets by itself, and no banyan
network is needed. The allocation for the next slot runs while the current slot's packets cross
the sorter.

The switch is built with two switching planes. Each plane has its own controller and its own
sorter. Plane 0 is offered the first cell of every input queue and plane 1 the second cell, so
the look-ahead window is two cells deep. Output queues absorb the up to two cells an output can
receive in one slot. If a plane fails, the other plane carries on with the first cells alone,
at reduced capacity.

```
 in[i] ──► port controller i ──┬── plane 0: packet ──► Batcher sorter 0 ──┐
          (input queue, 15)    └── plane 1: packet ──► Batcher sorter 1 ──┤
               ▲   ▲                                                      ▼
   bus (STR/KA/IGA/CA/BF)  POLL chain                      output queue o (17) ──► out[o]
               │   │
        central controller 0, central controller 1 (one per plane)
```

## One cell slot, step by step

One slot is `SLOT_CYCLES` controller cycles: 280 by default, which is 2.8 µs (one 53-octet
cell at 150 Mb/s) at 10 ns per cycle. `slot_start` marks the slot boundary. On that edge three
things happen:

* the port controllers launch the packets decided during the previous slot;
* granted cells leave the input queues, and the arriving cell (if any) is appended;
* each enabled controller starts a new allocation.

Each controller then goes through its sequencer states (`atm_pkg::cc_phase_e`):

1. **INIT** (one cycle per group). Each group's working word is reset: no outputs reserved,
   busy flag clear, and the next output to hand out set to the round-robin point (see below).
2. **Phase I** (N cycles). The port address counter (`ka`) visits every port controller once.
   Each slot it starts one port further on, so the port priorities rotate. The strobed port
   controller places two things on the plane's bus: a request bit and the group number of the
   cell it offers to this plane. In the same cycle the controller reads that group's word and
   answers with two values: the next free output address (`ca`) and the busy flag (`bf`). If
   the group is not busy, the port controller keeps `ca` as its routing tag. The controller
   then increments the word. When the output just handed out was the group's last one, the
   busy flag is set.
3. **Phase II**. The controller walks the groups in order and raises `poll` with each still-free
   output address. `poll` ripples through the port controllers as a daisy chain. Each port
   controller that has no reservation, either because it had nothing to send or because its
   group was busy, takes exactly one address, and the first such controller on the chain stops
   the ripple. A full group costs one cycle and is skipped. The phase ends when all groups are
   full or when no port controller takes the poll.
4. **DONE**. The controller waits for the next `slot_start`.

The worst case is `NG + N + (N − smallest group) + NG + 1` cycles. That is 77 cycles at the
default size and 269 at N = 128, so a 128-port switch still fits in the 280-cycle slot. If a
slot ends before allocation has finished, `cc_overrun` is raised.

At the next `slot_start` each port controller drives its plane's sorter input. A reserved cell
is sent as `{present=1, addr, live=1, cell}` and a test packet as `{present=1, addr, live=0,
port number}`. The sorter orders packets by `{!present, addr}` and registers the result one
cycle later. The output queues take their packet one cycle after that. A cell that arrives at an
empty switch appears on its output line two slots after it arrived.

## The group RAM inside a controller

Each controller holds one RAM word per link group (`NG` words):

| field | bits | meaning |
|---|---|---|
| `base`, `size_m1` | log2 N, log2 GMAX | the group's first output and its size − 1 (the group table) |
| `ca` | log2 N | next output to hand out |
| `cnt` | log2 GMAX | outputs reserved in this slot so far |
| `b` | 1 | group busy |
| `rr` | log2 N | output after the last one granted in phase I of the previous slot |

An adder increments `ca`, wrapping from the group's last output back to its first, and
increments `cnt` at the same time. A comparator sets `b` when `cnt` reaches `size_m1`. A
multiplexer addresses the RAM with one of two values: the bus group number in phase I, or the
controller's own group counter in phase II. The RAM is read asynchronously and written at the
clock edge, so one request is served per cycle.

A cycle's critical path is bus → port controller → bus → RAM read and compare → bus → tag
register.

**Round robin over the links of a group.** Phase II hands out every remaining output, so a
group's address counter always comes back to where it started. If every slot began at the
group's first link, that link would get the first grant of both planes in almost every slot. At
λ = 0.9 its output queue then overflows, and about 11 % of cells are lost. To prevent this, the
`rr` field records where phase I stopped, and the next slot starts there. With this change no
cell is lost in 4000 slots at λ = 0.9 (see `tb_switch_load`). This is a choice of this
implementation.

The group table is loaded from `cfg_we / cfg_group / cfg_base / cfg_size_m1`, which writes both
controllers. A new table takes effect at the next slot. After reset the groups are `NG` equal
blocks of consecutive ports. If a new table leaves a group's round-robin point outside the
group, the group restarts at its first output. The table must cover every output exactly once.
Otherwise phase II cannot give every output a packet and the output self-test reports it.

## Port controller and the two planes

Each port controller (`port_controller`) owns an input queue (`input_queue`). The queue shows its
first two cells and can remove either or both in one slot. Which cell a plane is offered depends
on how many planes are in service:

* with both planes in service, plane 0 gets cell 0 and plane 1 gets cell 1;
* with one plane in service, that plane gets cell 0.

The planes in service are taken from `plane_ok` at each `slot_start` and held for the whole slot.
Cells of one connection can overtake each other across the two planes: nothing enforces
sequence across planes.

## Output side and self test

Each `output_queue` examines its sorter output of every plane. Each plane that was in service for
that slot must deliver one packet addressed to this port. A missing or misrouted packet raises
`selftest_err` for one cycle. Test packets are then discarded. User cells are queued, plane 0's
cell first, and one cell per slot goes to the line. Cells that find the queue full are counted
in `oq_drop`, and cells that find the input queue full are counted in `iq_drop`.

## Parameters (top `atm_switch`)

| parameter | default | meaning |
|---|---|---|
| `N` | 32 | ports (power of two) |
| `NG` | 8 | link groups = RAM words |
| `NP` | 2 | switching planes |
| `DW` | 424 | cell bits (53 octets) |
| `IQ_DEPTH` | 15 | input queue cells |
| `OQ_DEPTH` | 17 | output queue cells |
| `GMAX` | N | largest group size (sets counter width) |
| `SLOT_CYCLES` | 280 | cycles per cell slot |

Cells enter as parallel words that are already labelled with their link group (`in_group`).
This design does not include the serial line interface, cell delineation, or the translation
from header to group.

## What follows the reference architecture and what is this design's own

These parts follow the architecture:

* input queues, port controllers, Batcher sorter and a central controller on a parallel bus;
* phase I strobe, group number, output address and busy flag, with rotating scan start;
* the phase II POLL daisy chain with test packets, and banyan-free routing;
* the RAM-based controller with its increment and compare logic and a configurable group table;
* duplicated planes with a window of two, plus output queues;
* the sizes: 32 ports, 8 groups of 4, input queue 15 (3 in the duplicated evaluation), output
  queue 17, 10 ns cycle and 2.8 µs slot.

These are choices of this design:

* the packet format, the wired-OR bus, and one-cycle request service with an asynchronously read
  RAM;
* the INIT pass that resets the working words;
* round-robin use of a group's links;
* phase II group order (from group 0, skipping full groups at one cycle each);
* bitonic form of the sorter, with one register stage;
* plane-0-first order of writes to the output queues;
* the form of the self-test check;
* the test packet contents;
* taking planes out of service through `plane_ok`. Fault detection itself is not included.

The optional translation RAM in the output-address path, for priority schemes beyond rotation,
is not built.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_input_queue` | random head and second-cell removals and arrivals against a queue model, including overflow |
| `tb_central_control` | every port's output address each slot against an independent allocation model (rotation, busy groups, round robin with wrap, re-arranged unequal groups, disabled plane) and the exact cycle count of INIT + phase I + phase II |
| `tb_port_controller` | bus behaviour, window position per plane, grant and poll capture, launched packets and queue removal |
| `tb_batcher_sorter` | full permutations (output i carries address i) and sparse packet sets; one-cycle latency |
| `tb_output_queue` | order, one cell per slot, two writes per slot, overflow, self-test flag |
| `tb_atm_switch` | the whole switch at default size against a slot-level model, exact per output and per slot. It covers a lone cell (two-slot latency), uniform load, a hot spot that makes groups busy and overflows both queue types, each plane out of service in turn, two group-table rewrites, and a final drain with full accounting of cells |
| `tb_switch_load` | Bernoulli uniform traffic on 32 ports with 8 groups of 4, over 4000 slots. The duplicated switch with input queue 3 and output queue 17 runs at λ = 0.9, and a single-plane switch with input queue 15 runs at λ = 0.7. Every cell must arrive once, on a link of its group. The loss must stay below 1e-3: about 1e-6 is the expected level, which so short a run cannot resolve |

To run one with Verilator, for example:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv rtl/atm_pkg.sv \
          tb/tb_atm_switch.sv --top-module tb_atm_switch
./obj_dir/Vtb_atm_switch
```

`tb_atm_switch` uses the default parameters and runs for about 20 s. The other testbenches
override sizes to stay short. `tb_switch_load` uses 80-cycle slots, enough for the worst-case
allocation at 32 ports.
