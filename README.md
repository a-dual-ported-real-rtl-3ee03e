# Graph Memory System: a dual-ported memory with hardware reference counting for the G-machine

The G-machine is a graph-reduction evaluator for lazy functional languages.
Everything it computes lives in a graph of small nodes. It allocates nodes at a
very high rate, around 100K nodes per second at 10 MHz. A stop-the-world
collector would stall it constantly. This design instead lets a general-purpose
host processor (a 68020-class CPU) run garbage collection **concurrently** with
evaluation. The trick is that the memory itself is dual-ported: the G-machine
uses one port and the host the other. One small custom chip, the
**ref-chip**, keeps every node's reference count up to date in hardware as the
G-machine overwrites pointers. Three FIFOs carry the rest of the traffic
between evaluator and collector:

* free node addresses flow from the host to the evaluator;
* alloc/call/return events flow from the evaluator to the host;
* candidates for collection flow from the ref-chip to the host.

Cycle detection (traversing sub-graphs whose count did not reach zero) is host
software. It is not part of this RTL.

```
             read/write/trash + G bus (33b)           port A
 G-machine ----------------------------+----------> Graph memory --+
   |  ^                                |                           | port B
   |  | memory_ready_a = AND of:       v                           |
   |  |  Graph ready, ref-chip rdy,  ref-chip --T bus--> Tags mem --+-- host
   |  |  FIFO output-ready            |  ^   (32b)       port A    |  (H bus,
   |  +---- alloc address --- FIFO <--|--|------------------------ +   33b)
   +--- alloc/call/return --> Signal Queue ------------------------+
                                     |  |                          |
                                     +--|-> Garbage Can ---------->+
                                        +-- rmw, host addr[17:0] --+
```

## Node format and memory organisation

A graph node holds these fields:

| field | bits | memory |
|---|---|---|
| is_pointer1 + data1 | 1 + 32 | Graph |
| is_pointer2 + data2 | 1 + 32 | Graph |
| is_evaluated | 1 | Graph |
| reference count | 8 | Tags |
| recently_visited | 1 | Tags |
| persistent_bit | 1 | Tags |
| forever_uncollectible | 1 | Tags |

One memory module holds 2^20 nodes (four 256K banks). Each separately
addressable part sits behind its own dual-port DRAM controller: data1, data2,
is_evaluated and the 11-bit tags word. So a field can be read or written alone,
which is what a list-structured memory needs. Because the Graph and Tags
memories are separate, the ref-chip can update counts while the G-machine goes
on using the Graph memory.

The encoded address is 23 bits wide:

| bits | meaning |
|---|---|
| 22 | 1 selects the Tags memory |
| 21:20 | field: 0 = data1, 1 = data2, 2 = is_evaluated |
| 19:0 | node number |

A pointer is a data word with is_pointer set. Its low 20 bits are the node
number.

Each controller (`dram_port_ctrl`) models an i8207-style dual-port DRAM
controller:

* Port A (synchronous, G-machine and ref-chip side) always wins arbitration
  over port B (host).
* Refresh has priority over both ports. It is requested every 132 clocks and
  lasts 4 clocks.
* A memory cycle takes 3 clocks to a different bank and 4 clocks back to back
  on the same bank. Banks are interleaved on the two low address bits.
* Port A is acknowledged in the first clock of its memory cycle (early
  acknowledge). Port B is acknowledged in the second (late acknowledge).
* A read that finds an idle controller starts in the same clock. The G-machine
  therefore has its data at the end of its third cycle. To keep accesses in
  order, such a direct start is not taken while the other port has an
  unserved request.

`graph_tags_memory` puts four controllers together and exposes three ports:

* G: the G-machine and ref-chip, on port A of the Graph controllers.
* T: the ref-chip, on port A of the Tags controller.
* H: the host, on port B of all four.

A port's ready is the AND of the ready signals of the controllers behind it.

## The ref-chip: sequencing

The ref-chip (`ref_chip.sv`) is the heart of the design and the part that
takes the most care to read.

**What it sees.** The ref-chip snoops the G-machine's `write` and `trash`
strobes. The G bus protocol is:

* The strobe goes with the field address on the bus.
* One clock later the bus holds the datum, for a write, or still the address,
  for a trash.
* The ref-chip latches the bus in that second clock.

"Trash" is how the G-machine announces that a field is about to be
overwritten. The reference the old contents held must then be released.

**Queue.** Instructions go into a two-entry queue (current and next), so the
G-machine can issue another instruction while one is being processed. `rdy`
goes low when:

* both entries are full; or
* the current entry is a trash whose Graph read has not come back yet.

In the second case the ref-chip must read the old field value before the
G-machine overwrites it.

**Sequences.**

* **Write of a pointer:**
  1. Read the target node's tags on the T bus.
  2. Add one to the count.
  3. Set recently_visited.
  4. Write the tags back.

  A write of non-pointer data retires at once.
* **Trash:**
  1. Read the field from the Graph memory over the G bus. The ref-chip drives
     the address itself and takes the G port of the memory.
  2. If the field holds a pointer, read the target's tags, subtract one, set
     recently_visited and write them back.
  3. If the target is persistent and not forever_uncollectible, put its node
     number in the Garbage Can. The host later decides whether it has become
     garbage, possibly by traversing the sub-graph below it.

  If the Garbage Can is full, the ref-chip waits. While it waits, rdy goes low
  as soon as the queue behind it fills.
* **Overflow:** incrementing a count that is already 255 sets
  forever_uncollectible and leaves the count at 255.
* Once a node is forever_uncollectible, its count no longer changes.
* A count already at zero is not decremented.

After each memory strobe the sequencer skips one clock, then waits for the
memory's ready. States: idle, Graph read / wait, tags read / wait, tags write,
write data, enqueue, and fault.

## The ref-chip: collision detection

The host also changes reference counts. It decrements them during traversal,
and does so with a read-modify-write over its own port. If the host and the
ref-chip modify the same node's count at the same time, one update is lost.

To prevent this, the host raises `rmw` for the duration of its
read-modify-write and shows the low 18 bits of its address to the ref-chip.
The ref-chip compares those bits with the node it is working on:

* **Match while the ref-chip is between its tags read and its tags write.**
  The ref-chip abandons the sequence and goes to the fault state. When `rmw`
  falls, it re-reads the tags and starts the update again.
* **Match while the ref-chip is about to issue the tags read.** It holds off
  until `rmw` falls.
* **The ref-chip has already issued its write.** Nothing needs to be done,
  because the host's read comes after it at the memory.

Comparing only 18 bits may cause false collisions between nodes that differ in
bits 19:18. These cost time but never correctness. The end-to-end testbench
aims host decrements at the node the G-machine has just pointed at, so
collisions happen hundreds of times per run. Every count is checked at the end.

## Buffers

All three are 64-word first-word-fall-through FIFOs (`gms_queue`), each with an
output-ready (not empty) and input-ready (not full) flag. A word can be read
one clock after it is written.

* **Signal Queue** (`signal_queue`): 3-bit entries {ret, call, alloc}. The
  G-machine may issue alloc, call or return only when `sin_rdy` is high. The
  host reads it to learn when a node was allocated, so it can refill the
  FIFO. Exactly one of the three bits must be set.
* **Free-node FIFO** (`free_node_fifo`): the host fills it with free node
  addresses. An alloc dequeues the head and puts it on the G bus in the same
  clock. An empty FIFO lowers the G-machine's memory ready.
* **Garbage Can** (`garbage_can`): node numbers enqueued by the ref-chip and
  dequeued by the host. It has `grdy` (not empty) and `gfull`.

## Top level and timing

`gms_top` wires it all together with one 10 MHz clock. Ports are grouped by
partner:

* the G-machine lines `gm_*`;
* the host queue ports;
* the host memory port `read_b`, `write_b`, `host_ad` and `host_q`, plus
  `rmw`;
* one-clock event strobes for statistics (`gms_events_t`);
* fill counts.

The G bus is a multiplexer. Its value comes from the first of these that is
active:

1. the G-machine driving;
2. the ref-chip driving its own read address;
3. the FIFO head during an alloc;
4. Graph read data.

The G-machine protocol:

* It may start a memory instruction only when `memory_ready_a` is high.
* It must leave one clock between two memory instructions.
* A trash address is held for two clocks.

Assertions check these rules.

## Optional threshold bit

Most garbage never forms cycles. It is wasteful to traverse the sub-graph
below every persistent node whose count dropped but did not reach zero. The
threshold bit is an extra tag that the compiler's code sets at allocation on
nodes that might root a cycle, such as the graphs of recursive functions. The
host reads it together with the count and skips the traversal for nodes
without it.

With `THRESHOLD = 1` on `gms_top`:

* The Tags word grows to 12 bits, and bit 11 is the threshold bit.
* The G-machine's alloc carries an operand, `gm_alloc_thr`.
* The ref-chip queues each alloc like a write. It takes the new node's address
  from the G bus in the alloc clock, where the free-node FIFO drives it. It
  then reads the node's tags and writes them back with the threshold bit equal
  to the operand.
* Count updates carry the threshold bit along unchanged.

The default is 0, which builds the base design without the bit.

## How this design departs from the source description

* The original circuit is clocked on two non-overlapping phases. Here
  everything happens on one rising edge. The ref-chip's `rdy` is a registered
  function of its queue, so it drops one clock after an instruction, not in the
  same phase. The mandatory idle clock between memory instructions makes this
  safe.
* Tri-state buses (G bus, T bus, the ref-chip's readg line) are split into
  inputs and outputs plus a multiplexer.
* The host memory data path is 33 bits, so that the host can see is_pointer.
* The host's rmw and address are assumed to be already synchronised to the
  clock by the host's bus controller.
* What a count holds after overflow, the freezing of forever-uncollectible
  counts, and the no-decrement-below-zero rule are this design's choices.
* So are the encoding of the field-select bits and the Tport bit layout.

## What is not built

* The G-machine, the host CPU and its software (allocation, traversal,
  collection), the host's bus controller, the DRAM chips and the output
  latches. Behavioural G-machine and host models live inside the system
  testbench.
* The "most recently used" arbitration mode of the controller (only port A
  priority is built).
* Several memory modules (only one module of 2^20 nodes, without the extra
  module-select address bits).
* The time the controller needs to switch its port multiplexer (taken as
  hidden under the previous cycle).
* The vendor FIFO's 1.3 µs fall-through time. Here a word falls through in one
  clock.
* Reference counts larger than 8 bits, and the host-private node fields
  (local count, is_collectible, allocated).

## Simulating

Each testbench ends by printing `TB_RESULT checks=N failures=M`. Example with
verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/gms_pkg.sv rtl/gms_queue.sv \
  rtl/signal_queue.sv rtl/free_node_fifo.sv rtl/garbage_can.sv \
  rtl/dram_port_ctrl.sv rtl/graph_tags_memory.sv rtl/ref_chip.sv \
  rtl/gms_top.sv tb/tb_gms_top.sv --top-module tb_gms_top
./obj_dir/Vtb_gms_top
```

For a single block, compile its testbench with the files it uses (always
`gms_pkg.sv` first).

Testbenches:

* `tb_gms_top`: the whole system at its default sizes (2^20 nodes, 64-word
  queues). It runs about 15,000 G-machine memory instructions against a random
  behavioural G-machine and host, and checks:
  * every read value;
  * the final tags of every allocated node, read back by the host and compared
    with counts the testbench computes itself;
  * the number of Garbage Can entries;
  * the 3-cycle read latency.

  It also counts, and requires at least once, each of these: ref-chip queue
  full, trash hold, Garbage Can full, collision restart, count overflow,
  Signal Queue full, FIFO empty, refresh, same-bank cycle, and the host losing
  arbitration.
* `tb_gms_workload`: the throughput experiment at the default sizes. It runs
  500,000 G-machine RISC instructions at each of 25K, 50K, 75K, 100K, 125K and
  150K allocations per second, against a host that only refills the FIFO and
  drains the queues. It prints the simulated time next to the time the
  G-machine would need if memory never stalled it, checks every read and the
  final counts, and requires the overhead to stay under 10 percent. Typical
  result: about 1.2 percent at 100K allocations/s, rising to 2.6 percent at
  150K. The whole run is 3.6 million cycles, a few seconds in verilator.
* `tb_gms_threshold`: the same workload at 100K allocations/s with
  `THRESHOLD = 1`. A fifth of the allocations carry a set threshold operand.
  It checks every node's threshold bit, count and persistent bit at the end.
* `tb_ref_chip`: the ref-chip against behavioural memories. It covers
  increments, decrements, the Garbage Can rule, overflow, no decrement below
  zero, rdy behaviour, waiting on a full Garbage Can, a collision with restart
  and no lost update, no restart for a different node, and a random stream
  against a model.
* `tb_dram_port_ctrl`: a small controller (64 words). It covers acknowledge
  timing, port A priority, same-bank timing and the refresh rate, then checks
  random traffic on both ports against an array model.
* `tb_graph_tags_memory`: a 256-node module. It covers field separation across
  the three ports and the 3-cycle (G port) and 4-cycle (host port) reads.
* `tb_signal_queue`, `tb_free_node_fifo`, `tb_garbage_can`: random
  enqueue/dequeue against a reference queue, including full and empty.

All parameters are typed parameters of the modules:

* `NODE_BITS` (20);
* `QUEUE_DEPTH` (64; 16 and 32 also work);
* `THRESHOLD` (0);
* `REFRESH_INTERVAL` (132);
* the controller's cycle counts `CYC_DIFF` (3) and `CYC_SAME` (4).
