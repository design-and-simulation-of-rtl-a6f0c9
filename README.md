# Ring network-on-chip for 64 nodes (scalable 2 to 256)

This design joins a set of on-chip nodes with a bidirectional ring. It does not
use a shared bus. Each node has its own router. A router passes traffic to its
two neighbours, and a packet goes around the ring the shorter way until it
reaches its destination router. In the main configuration there are
**64 nodes**, addressed by 6 bits (node 0 = `000000` to node 63 = `111111`).
Each node carries a **256-bit** word. The number of nodes and the word width
are parameters, and the design has been simulated at every power of two from
2 to 256 nodes.

Each node's processing element is modelled as one register that holds that
node's word. The whole network is driven from a small pin interface:

* `write` loads `data_in` into the register of node `source_address`.
* `read` asks the network to carry the word of node `source_address` to node
  `destination_address`. The word is packed into a packet and sent around
  the ring. When it arrives, it is written into the destination node's
  register and also appears on `data_out`.

## Block structure

```
                  write ──► src_decoder ──► one-hot write enable ─┐
 source_address ──┤                                               ▼
 data_in ─────────┼────────────────────────────────────────► node_mem (64 x 256-bit registers)
                  │                                           ▲ rd_addr = head.src   │ rd_data
  read ──► req_fifo {src,dst} ──► head ──► ring_route ──► dir │                      ▼
 destination_address ┘               │                        │          packet {src,dst,data}
                                     └──► src_decoder ──► inj_sel ──► ring_fabric (64 x ring_router)
                                                                             │ delivered packet
                                     dst_demux ◄──────────────────────────────┘
                                        │ write strobe + word for node dst
                                        ▼
                                  node_mem port B          data_out / data_valid
```

| File | Role |
|---|---|
| `rtl/noc_pkg.sv` | Default sizes (64 nodes, 256 bits) and the ring direction type `dir_e` |
| `rtl/src_decoder.sv` | Address decoder (6 → 64 one-hot) with an enable |
| `rtl/dst_demux.sv` | 1 → 64 demultiplexer. It steers the delivered word to the destination register |
| `rtl/node_mem.sv` | The 64 node registers. Port A is the external write, port B the delivery write, plus an asynchronous read port |
| `rtl/req_fifo.sv` | First-in first-out queue of `{src, dst}` transfer requests |
| `rtl/ring_route.sv` | Shortest-path choice of direction and hop count |
| `rtl/ring_router.sv` | One router: pass-through, injection, delivery |
| `rtl/ring_fabric.sv` | `NODES` routers wired into a bidirectional ring, optionally with cross links |
| `rtl/led_byte_view.sv` | Shows one byte of the delivered word on 8 LEDs |
| `rtl/ring_noc.sv` | Top level: pins, control, and the wiring of all of the above |

## Packets and addressing

A packet is `{src, dst, data}`, with the source address in the top bits.
At 64 nodes this is 6 + 6 + 256 = 268 bits. Node `i` sits at router `i`.
The address width is `ADDR_W = $clog2(NODES)`, which gives 7 bits for 128 nodes
and 8 bits for 256.

## Routing on the ring

Router `i` has one outgoing link register in each direction:

* clockwise (`DIR_CW`), to router `(i+1) mod NODES`
* counter-clockwise (`DIR_CCW`), to router `(i-1) mod NODES`
* with `CROSS_LINKS = 1` only: a cross link (`DIR_CROSS`) to the opposite
  router `(i + NODES/2) mod NODES`

`ring_route` computes `d = (dst - src) mod NODES`. If `d <= NODES - d`, the
packet goes clockwise for `d` hops. Otherwise it goes counter-clockwise for
`NODES - d` hops. An exact half-ring tie (`d = NODES/2`) goes clockwise.
`src == dst` is a 0-hop transfer, which is delivered at the source router in
the cycle it is injected. For 64 nodes a transfer takes at most 32 hops.

### The octagon option (`CROSS_LINKS = 1`)

The classic small ring network is the **octagon**: 8 nodes, 8 ring links,
and 4 more links joining opposite nodes (0–4, 1–5, 2–6, 3–7), 12 links in
all. Any node then reaches any other in at most 2 hops. Set `NODES = 8` and
`CROSS_LINKS = 1` to get it. The option works for any even `NODES` ≥ 4.

With cross links, `ring_route` adds a third candidate route: take the cross
link first, then walk the ring for `|d - NODES/2|` hops. The cross link is
only chosen when it is strictly shorter, because ties prefer the plain ring.
A packet that arrives over a cross link and is not for this node turns onto
the ring. The router picks the shorter direction towards the destination
from the destination address alone, so routers hold no per-packet state. A
packet already walking the ring never needs a cross link later on its way:
if the cross link was not shorter at the source, it is not shorter at any
later router either.

Inside a router, a packet arriving on a link is compared against the
router's own number:

* If the destination matches, the packet is delivered (combinationally) on
  the router's local port.
* Otherwise it is copied into the outgoing link register of the same
  direction. Each hop therefore costs exactly one clock.

Packets already on the ring take priority over injection on the same link.
`inj_ready` tells the injector whether the link is free. The other direction
stays free for injection.

## Transfers, the request queue and timing

`ring_noc` keeps **one packet on the ring at a time**. A `read` pushes
`{source_address, destination_address}` into `req_fifo`, which is 4 entries
deep by default (`FIFO_DEPTH`). When the ring is idle and the queue is not
empty, the head request is served:

1. The source register is read, and the packet is formed and injected at
   the source router in the direction chosen by `ring_route`.
2. The packet crosses `h` links, one per clock.
3. At the destination router it leaves the ring. `dst_demux` writes it into
   the destination register, and at the same clock edge `data_out` takes the
   word and `data_valid` goes high for one cycle.

Cycle by cycle, with an idle network: `read` is sampled at rising edge `t`.
The packet is injected during the following cycle. `data_valid` and the new
`data_out` are visible after edge `t + h + 1`. Examples:

* Node 1 → node 9 (8 hops) takes 9 clocks.
* A 0-hop transfer takes 1 clock.
* The worst case at 64 nodes (32 hops) takes 33 clocks.

With a long transfer in flight, further reads wait in the queue and are
served strictly in the order they arrived. When several requests compete,
this first-in first-out order decides who goes first. `busy` is high while
anything is queued or in flight. `req_full` is high when the queue is full.
**A `read` given while `req_full` is high is dropped**, unless a request
leaves the queue in that same cycle. Hold `read` back while `req_full` is
high.

`write` and `read` may be given together. The write lands at edge `t`, and
the injection in the next cycle reads the new word. If an external write and
a delivery hit the same register in one cycle, the external write wins.

`reset` is synchronous and active high. It clears all 64 node registers,
`data_out`, the queue and both link registers of every router. After reset,
every node reads zero.

## Pins of `ring_noc`

| Pin | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | Rising-edge clock |
| `reset` | in | 1 | Synchronous clear of memory, queue, ring and `data_out` |
| `source_address` | in | `ADDR_W` (6) | Node written by `write`, source of `read` |
| `destination_address` | in | `ADDR_W` (6) | Destination of `read` |
| `write` | in | 1 | Load `data_in` into the source node |
| `read` | in | 1 | Queue a transfer from source to destination |
| `data_in` | in | `DATA_W` (256) | Word for `write` |
| `data_out` | out | `DATA_W` (256) | Last delivered word. It holds until the next delivery |
| `data_valid` | out | 1 | One-cycle pulse when `data_out` changes |
| `busy` | out | 1 | Request queued or packet in flight |
| `req_full` | out | 1 | Request queue full |
| `led_byte_sel` | in | 5 | Which byte of `data_out` is shown on `led` |
| `led` | out | 8 | That byte, for eight board LEDs |

At the defaults, the top has 544 pins.

### Reading the word on LEDs

The delivered word is checked on a board by eye: eight LEDs show one byte
of `data_out`, and switches step through the bytes. `led_byte_view` does
this. Byte 0 is the **most significant** byte, so a word holding an ASCII
string reads out in string order. For example, `TMU@…` shows `0x54` ('T')
at byte 0. The mapping of switches and LEDs to board pins belongs in a board
wrapper and is not included.

## Parameters

| Parameter | Default | Notes |
|---|---|---|
| `NODES` | 64 | Any value ≥ 2 works, including values that are not powers of two. Simulated at 2 to 256 |
| `DATA_W` | 256 | Word width per node |
| `FIFO_DEPTH` | 4 | Request queue depth |
| `CROSS_LINKS` | 0 | 1 adds the cross links to opposite nodes (the octagon at `NODES = 8`). Needs an even `NODES` ≥ 4 |
| `ADDR_W` | `$clog2(NODES)` | Derived. Leave it alone |
| `LED_SEL_W` | `$clog2(DATA_W/8)` | Derived. Leave it alone |

Size at the defaults:

* node memory: 64 × 256 = 16,384 flip-flops
* ring: 64 routers × 2 links × 269 bits, about 34k flip-flops in total

Latency grows linearly with `NODES/2`. The clock period is set by one
router's address compare and one link multiplexer.

## What is specified and what is this design's choice

Taken from the original description:

* the pin set (clk, reset, addresses, read, write, data_in, data_out)
* 64 nodes with 6-bit addresses and 256-bit data, scalable to 256 nodes
* the packet fields `{source, destination, data}`
* a node register memory addressed through a decoder, with a
  demultiplexer that selects the destination
* a router per node, with two-way links around a ring
* shortest-path routing
* the octagon with cross links between opposite nodes
* first-in first-out priority among competing requests
* reset clearing the memory
* the example transfer of the ASCII word `TMU@TMU@ComputerTMU@TMU@Computer`
  from node 1 to node 9
* checking the delivered word on LEDs, one byte at a time

Filled in here, because the description does not give them:

* the router's internal structure, with one link register per direction
  and one clock per hop
* the half-ring tie rule
* the one-packet-in-flight policy
* the queue depth, and dropping a read when the queue is full
* the two-port node memory and its write priority
* the extra status pins `data_valid`, `busy` and `req_full`
* the exact cycle timing
* how a packet turns onto the ring after a cross link, and the tie order
  between the candidate routes
* the byte order of the LED view

Departures:

* The cross links of the 8-node octagon, which give at most 2 hops between
  any pair, are an option and are off by default. The main 64-node network
  is described only as nodes placed in a ring, so by default it is a plain
  bidirectional ring with a worst case of 32 hops. With `CROSS_LINKS = 1` at
  64 nodes the worst case is 17 hops; this is a natural extension, not a
  described configuration.
* The address ports are 6 bits wide (`[5:0]` at 64 nodes), matching the
  stated 6-bit addressing. They are not 7 bits wide.
* The board pin assignment for the switches and LEDs is not part of this
  RTL. Only the byte view is.
* The reported FPGA resource and timing figures come from a different
  implementation. Do not expect this RTL to reproduce them. In particular it
  keeps every node's full 256-bit register.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares the
module against values computed in the testbench and ends with a line
`TB_RESULT checks=N failures=M`.

| Testbench | What it covers |
|---|---|
| `tb_src_decoder` | All 64 addresses, with the enable high and low |
| `tb_dst_demux` | All 64 destinations with random 256-bit words. Unselected outputs must be zero |
| `tb_node_mem` | Reset clearing, both write ports, write collision priority, and the read port against a model |
| `tb_req_fifo` | 2000 random cycles against a queue model, including full, overflow and simultaneous push and pop |
| `tb_ring_route` | Every pair at 64 nodes and at 6 nodes (not a power of two), and with cross links at 8 nodes (longest route must be 2 hops) and 64 nodes |
| `tb_ring_router` | Pass-through in both directions, delivery from either link, injection both ways, 0-hop delivery, injection held off by through traffic. With cross links: cross injection, cross delivery, turning onto the ring either way |
| `tb_ring_fabric` | 8-node ring. Every source/destination pair plus random packets, checked for place, content and exact hop latency. Then every pair on the 8-node octagon, each in ≤ 2 hops |
| `tb_led_byte_view` | The ASCII word and random words, byte by byte |
| `tb_ring_noc` | **Full size, default parameters.** Described below |
| `tb_ring_noc_sizes` | One instance at each of 2, 4, 8, 16, 32, 64, 128 and 256 nodes, plus the 8-node octagon, all with 256-bit data. Each runs random transfers checked for data and latency. Uses the helper `tb/noc_size_run.sv` |

`tb_ring_noc` runs these steps, checking data, the destination register and
the `h + 1` latency for every transfer:

* a reset check
* the ASCII example from node 1 to node 9, also read back byte by byte
  from the LED view
* directed clockwise, counter-clockwise, wrap-around, half-ring and 0-hop
  transfers
* a write and read in the same cycle
* 200 random transfers
* a burst of reads behind a 32-hop transfer, which makes requests queue,
  fills the queue and drops one read; deliveries must come out in request
  order
* a final comparison of all 64 node registers

It counts each of these mechanisms and fails if one never happened.

The RTL also carries assertions:

* a router never receives two packets for its node in the same cycle
* the fabric delivers at most one packet per cycle
* every packet in the top arrives after exactly its shortest-path hop
  count, at its own destination router

### Running with Verilator

From the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/noc_pkg.sv tb/tb_ring_noc.sv --top-module tb_ring_noc -o sim
./obj_dir/sim
```

Replace `tb_ring_noc` with any testbench name above. `tb_ring_noc_sizes`
takes about a minute to build because of its 256-node instance. Every
testbench finishes in well under a second of simulation. Lint a single
module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/noc_pkg.sv rtl/ring_noc.sv`.
