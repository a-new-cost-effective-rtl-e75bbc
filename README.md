# Two-VC QoS switch for cluster interconnects

Interconnect standards reserve eight or sixteen virtual channels (VCs) to give
each traffic class its own queue in every switch. Each VC costs buffer memory
proportional to the link round trip, and it costs scheduler queues. That makes
many-VC switches large, and in practice few are built.

This design gets by with **two VCs per switch port**:

- **VC 0** carries all regulated (QoS) traffic.
- **VC 1** carries all best-effort traffic.

The fine-grained work is done at the **end-node network interfaces**. Each
keeps one queue per traffic class (eight) and picks packets with weighted
round-robin. Each node's interface therefore emits its packets already in a good
order. A switch only has to merge these ordered flows without spoiling them.
It does this with a simple rule:

1. VC 0 goes strictly before VC 1.
2. Within a VC, the packet that arrived first goes first.

The RTL holds:

- the 16-port single-chip switch: a combined input/output-queued (CIOQ),
  virtual cut-through design with credit flow control;
- the network interface;
- a top level, `qos_cluster`, that joins one switch with sixteen interfaces.
  Multistage networks are built from this unit.

## Blocks

| module | role |
|---|---|
| `qos_pkg` | Widths, header and link-word layout, helper functions |
| `qos_cluster` | Top: `qos_switch` plus 16 × `network_interface` |
| `qos_switch` | 16 × (`input_port` + `output_port`), `switch_scheduler`, `crossbar` |
| `input_port` | 16 KB block buffer, 2 × 16 virtual output queues (VOQs) as linked lists. Uses `route_decode` and `block_allocator` |
| `route_decode` | Source-route lookup, class-to-VC mapping, hop advance |
| `block_allocator` | Free list of the 256 blocks of an input buffer |
| `switch_scheduler` | Central packet-mode crossbar scheduler |
| `crossbar` | 16 × 16 multiplexer, 64 bits wide |
| `output_port` | Per-VC output FIFOs, credit queue, output scheduling, line pacing. Also used as the interface transmitter |
| `wrr_arbiter` | Packet-level weighted round-robin for the interface's eight class queues |
| `network_interface` | Host side: eight class queues + WRR transmit, receive with credit return |

## Clock, words and links

- **Core clock.** 250 MHz with a 64-bit data path, so one word per cycle
  (16 Gb/s).
- **Lines.** Each line runs at 8 Gb/s: one word every `LINK_DIV = 2` cycles. The
  switch core therefore has an internal speedup of two.
- **Link word.** A link is modelled as one `link_word_t {valid, ctrl, data[63:0]}`
  per cycle, not as a serial lane. The serializer/deserializer is outside the
  RTL.
- **Credit symbols.** A word with `ctrl = 1` is a credit symbol:
  - `data[0]` is the VC;
  - `data[16:8]` is the number of 64-byte blocks returned.

  Flow control is in-band because the links have no separate flow-control
  wires.

## Packet header

The first word of each packet is its header. The layout is this design's own,
source-routed:

| bits | field | meaning |
|---|---|---|
| 63:61 | `tc` | Traffic class 0..7 (0 = most urgent). Classes 0..3 are QoS |
| 60:52 | `len` | Packet length in 64-bit words including the header, 1..256 (2 KB) |
| 51:48 | `hop` | Which route field the next switch uses |
| 47:8 | `route` | Ten 4-bit output-port numbers; hop *h* uses bits `[8+4h +: 4]` |
| 7:0 | `src` | Source node, carried unchanged |

Each switch:

- reads `route[hop]` as its output port;
- maps `tc` to a VC (`vc = tc[2]`, so classes 0..3 use VC 0);
- increments `hop` before forwarding the header.

Classes 0..3 are network control, audio, video and controlled load. Classes 4..7
are best effort.

## Input port: one memory, 32 linked-list queues

This is the part that takes the most care.

**Memory.** Each input port has one 16 KB memory of 256 blocks. Each block holds
64 bytes, or 8 words.

**Queues.** Logically the memory holds `2 × NPORTS` queues, one per
(VC, output). The queue index is `q = vc*NPORTS + out`. Space is not statically
divided. Each queue is a linked list of blocks:

- `next_blk[b]` links the blocks of one packet together. It also links the last
  block of a packet to the first block of the next packet in the same queue.
- Per block: `blk_len` (the packet length, kept in the packet's first block) and
  `blk_ts` (its arrival time).
- Per queue: `head_blk`, `tail_blk` and a packet count.

**Write side.**

1. The header arrives and is decoded.
2. A block is allocated for the header, and another for every further eight
   words.

Every packet starts on a fresh block. A packet of *L* words therefore holds
exactly ⌈L/8⌉ blocks, the same number of credits the sender spent on it.

**Scheduling during the write.** A queue's head packet is offered to the
scheduler as soon as its header is written, while the rest is still arriving.
This is what makes the switch cut-through.

**Read side.** After a grant, the port streams the packet to the crossbar at one
word per cycle. The first word appears two cycles after the grant (registered
start plus synchronous memory read). The reader would outrun the writer because
the crossbar is twice as fast as the line. So it stalls whenever the next word
has not yet been written.

**Freeing blocks.** A block is freed after its last word is read. One credit of
its VC then goes to the paired output port, which sends it back upstream.

**Who enforces the per-VC share.** Each VC owns 8 KB of the buffer. The share is
enforced by the upstream sender's credit counter (128 blocks per VC), not by the
memory itself.

**Time stamps.** Arrival time stamps are 16 bits wide and compared modulo
wrap-around. A head packet that has waited more than 32 768 cycles (131 µs)
looks young again and loses its place in the order. It is still delivered.

## Switch scheduler: merging ordered flows

The scheduler sees the head packet of every VOQ of every input. Each cycle it
runs one request–grant–accept round:

- **Grant.** Each free output looks at the free inputs with a head packet for
  it. It grants the best one whose full length fits in the unreserved space of
  that output's VC queue.
- **Accept.** Each input accepts the best grant it received.

"Best" means, in order:

1. VC 0 before VC 1;
2. the older time stamp;
3. the lower index.

The oldest-first rule preserves the interfaces' order. A plain round-robin or
iSLIP choice would interleave flows and delay the most urgent packets.

A connection is held for the whole packet (packet mode). It is released the
cycle after the input's last word. The packet's length is reserved in the
output queue at grant time, so a transfer never stalls on output space.

Grants are registered and appear one cycle after the requests.

## Output port: two queues and a credit queue

**Queues.** The output buffer (16 KB) is split statically: 8 KB for VC 0 and 8 KB
for VC 1. A burst of best-effort traffic cannot fill the QoS queue.

**Credit queue.** A third "queue" holds the credits that the paired input port
has freed. It is one pending counter per VC.

**Slot selection.** Every line slot (every `LINK_DIV` cycles) the port sends one
word:

- If credits are pending, a credit symbol goes out. It carries all pending
  credits of one VC. A credit symbol may not take two slots in a row while data
  is waiting.
- Otherwise a data word goes out.

**Packet selection.**

- A packet may start only when the downstream VC has credits for all of its
  blocks (virtual cut-through).
- Between packets, a switch port chooses by strict priority: VC 0 first.
- Once started, a packet is sent to its end. Its later words follow as the
  crossbar delivers them.

The same module with `NVC = 8` and `WRR = 1` is the transmit side of the network
interface. Queue *v* uses downstream VC `v / (NVC/2)`.

## Network interface and weighted round-robin

**Transmit.**

- Eight class queues of 8 KB each (`BUF_BYTES = 64 KB` in all).
- The host writes a packet as a word stream: `host_valid/ready/data/last`, with
  `host_tc` choosing the queue.
- A header is accepted only if its queue has room for the whole packet, so the
  host sees back-pressure early.

**Weighted round-robin (`wrr_arbiter`).**

- It works on whole packets. Weights and costs are in 64-byte blocks.
- The current queue keeps its turn while it has a packet and budget left.
  Otherwise the turn moves round-robin to the next ready queue, whose budget is
  reloaded from its weight minus the cost of the packet just chosen.
- A packet that overdraws the budget is still sent whole.
- A weight of 0 still allows one packet per turn, so no class starves.

Choosing the weights belongs to connection admission and is left to the user;
they are inputs.

**Receive.** Packets go straight to the host (`rx_valid/data/last`), which is
assumed never to stall. One credit is returned to the switch:

- for every eight words delivered;
- for the tail of each packet.

## Timing and latency

- **Header latency.** A header entering a switch input leaves the chosen output
  **5–6 cycles** later (20–24 ns) when nothing competes. The path is: decode and
  write, request, registered grant, memory read, crossbar, output queue,
  next line slot.
- **Comparison with the estimate.** The switch description estimates
  1 + 3 × 8 + 1 cycles = 104 ns, because it moves whole 64-byte blocks between
  the pipeline stages. This RTL forwards single words, so it is faster than that
  estimate. The per-word rate limits are unchanged:
  - 1 word per cycle through the crossbar;
  - 1 word per 2 cycles on a line.

  Transceiver delay is not modelled.
- **Throughput.** A port takes one link word per cycle at most. At the default
  `LINK_DIV = 2`, an output line runs at half the core rate. Credit symbols take
  line slots.

## Where this RTL departs from the switch description

- **Word-level cut-through** instead of a block-level pipeline (see above).
- **Interface queues.** There is one queue per traffic class, each finite
  (8 KB). The description keeps one queue per destination and class, and treats
  the host queues as unbounded. Splitting a class by destination would not change
  the order packets leave in: the interface's only link is credit-controlled per
  switch VC, not per destination, so a packet to one destination can never be
  blocked where a packet of the same class to another could go. A FIFO per class
  sends the same order as oldest-first over per-destination queues. The finite
  size shows up as host back-pressure.
- **Credit queue.** The outgoing-credit queue is described as a third
  partition of the output memory. Here it is one pending-credit counter per VC.
  This is equivalent, because credits of one VC can be merged into one symbol.
- **Scheduler.** One request–grant–accept iteration per cycle. The number of
  iterations is not specified.
- **Arrival order inside a VC.** The described "FIFO among the queues of a VC"
  is implemented as oldest-time-stamp-first over head packets.
- **Not built:**
  - connection admission control (a management function that keeps QoS load
    under 70 % of each link and balances routes);
  - the serial transceivers;
  - the hosts;
  - multistage topologies. The 64-node network in the evaluation needs 16 such
    switches; the top level holds one.

## Parameters

Top level (`qos_cluster`):

| parameter | default | meaning |
|---|---|---|
| `NPORTS` | 16 | Switch ports = nodes |
| `IN_BUF_BYTES` | 16384 | Input buffer per port (8 KB per VC) |
| `OUT_BUF_BYTES` | 16384 | Output buffer per port (split per VC) |
| `NI_BUF_BYTES` | 65536 | Interface transmit buffer (8 KB per class) |
| `LINK_DIV` | 2 | Core cycles per line word |

**Credit budget.** The credits a sender starts with equal
`IN_BUF_BYTES / 64 / 2` blocks per VC.

**The 8-port / 64 KB-per-port variant.** Set `NPORTS = 8` and both buffer sizes
to 32768.

**Header width limit.** `NPORTS` must be at most 16, because route fields are
4 bits.

## Simulation

Every testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<m>` and stops; a watchdog ends a run that hangs.
With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
    rtl/qos_pkg.sv rtl/*.sv tb/tb_qos_cluster.sv --top-module tb_qos_cluster
./obj_dir/Vtb_qos_cluster
```

Replace `tb_qos_cluster` with any testbench name. Uninitialised memories are
never read before they are written, so any `+verilator+rand+reset` setting
works.

| testbench | what it covers |
|---|---|
| `tb_route_decode` | Random headers against a reference decode |
| `tb_block_allocator` | Random allocate/free against a model, lowest-free order, counts (64 blocks) |
| `tb_crossbar` | Random configurations against a reference mux |
| `tb_wrr_arbiter` | Reference model cycle by cycle; long-run shares match the weights |
| `tb_switch_scheduler` | Directed priority cases (VC 0 first, oldest first, space check, packet mode) and random traffic checked for rule violations (4 ports) |
| `tb_output_port` | Strict priority, line pacing, stall on missing credits, credit symbols, data integrity. A random phase runs 80 packets against a downstream model that returns credits late, checking per-VC order, data, that credits are never overdrawn, and that all freed blocks are returned |
| `tb_input_port` | Fill to full, drain, cut-through start, random traffic against a model, one credit per freed block (4 ports, 2 KB) |
| `tb_network_interface` | One WRR round with weights 1..8, back-pressure, receive-side credits |
| `tb_qos_switch` | 4-port switch with default buffers. Header latency, QoS packets overtaking best effort, QoS latency bound under best-effort load, random traffic with withheld credits, in-order delivery |
| `tb_qos_cluster` | Full default size. 16 hosts × 40 packets of all classes, half aimed at one node, plus a best-effort burst. Checks delivery, integrity, routing and per-flow order. Counts cut-through, QoS overtaking, WRR reordering, host back-pressure, credit symbols and crossbar grants, and fails if any never occurs. About 26 000 cycles |
| `tb_table3_traffic` (with `table3_run`) | The evaluated traffic mix, on both switch variants side by side: the default 16 ports with 16 KB + 16 KB, and 8 ports with 32 KB + 32 KB. Per host: 1 % network control, 3 × 16.33 % constant-rate QoS connections, 4 × 12.5 % bursty best effort with Pareto sizes. Zipf destinations, 80 % load, 20 000 cycles of generation. Checks delivery and order, and that QoS mean and worst latency stay below best effort. The 16-port run carries about 6 500 packets, with QoS mean latency about 1 100 cycles against 6 300 for best effort. Most of it is time spent waiting in the host interface under bursts. The 8-port run gives similar figures |
