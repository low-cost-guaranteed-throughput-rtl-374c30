# Slotted write-only ring for real-time streaming multiprocessors

This is RTL for a small on-chip ring network that joins the processing tiles
of a streaming multiprocessor (16 tiles by default). It gives each tile a
guaranteed share of bandwidth and a bounded latency, yet it needs almost no
hardware. There are no routers, no buffers inside the network and no
per-connection state. Three properties make this possible:

* **Write-only, single-word packets.** A packet is one data word plus its
  destination: a tile number and a word address in that tile's local data
  memory. There are no remote reads. A tile that needs data from another
  tile asks for it, and the other tile writes it back.
* **No back-pressure.** A packet moves one tile per clock until it arrives,
  and the receiving memory must accept it in that same cycle. Nothing in the
  ring can stall, so the ring has no contention and no head-of-line blocking.
  Its latency is simply a count of hops.
* **Slot ownership.** Each of the N register stages ("slots") has a number
  and an owner. A tile may always use its own slot, so it gets at least 1/N of
  the bandwidth. It may also borrow any empty slot that it can use without
  getting in the way of that slot's owner. This makes the ring
  work-conserving.

Flow control between tasks is left to software. A FIFO whose read and write
pointers are exchanged by remote writes (the split-pointer or C-HEAP scheme)
provides back-pressure at the application level. This works because the ring
never reorders the writes of one source.

## Slots, owners and the two injection rules

Each network interface (NI) holds one slot register. At every clock edge,
every slot moves from NI i to NI i+1 (mod N). A slot holds
`{valid, slot number, destination, address, data}`. At reset NI i holds the
empty slot i. Slot s is therefore at NI (s + k) mod N after k clocks, and each
NI meets its own slot once every N cycles.

In every cycle an NI does the following with the slot it holds:

1. **Delivery.** If the slot is valid and addressed to this NI, the word goes
   out on the NI's output port to the local data memory, and the slot becomes
   empty.
2. **Arbitration** (combinational, `ni_arbiter`). The oldest word in the NI's
   input buffer may be put into the slot if the slot is free (empty, or just
   emptied by step 1) and one of two rules holds:
   * **Rule 1:** the slot is this NI's own slot.
   * **Rule 2:** the slot belongs to another NI, and going downstream the
     destination comes no later than that slot's owner.

   Count distances downstream as 1..N hops, with a node N hops from itself.
   The two rules then become one comparison:
   `hops(me, dest) <= hops(me, owner)`. The owner of your own slot is N hops
   away, so Rule 1 is the special case where the right-hand side is N.
3. **Forwarding.** A two-input multiplexer sends the old slot or the newly
   injected word to the next NI.

**Why the guarantees hold.** No packet ever travels past the owner of the slot
it rides in. A packet in its owner's slot arrives within N hops. A borrowed
slot only carries packets whose destination comes at or before the owner.
So every slot is empty when it reaches its owner, and Rule 1 can never be
refused. The `ni` module asserts this invariant in simulation ("own slot
arrived occupied").

**Bandwidth.** For a connection of M hops, the usable slots are the source's
own slot plus the N - M slots whose owners lie at or beyond the destination.
On an idle ring that gives (N - M + 1)/N of the link. For the default 16-node
ring and a 4-hop connection that is 13/16 = 81.25% of 400 MB/s (32-bit words
at 100 MHz). Under full contention the guarantee is 1/N, which is 25 MB/s.

**Timing of one write.** A CPU store accepted at a clock edge is in the input
buffer one cycle later. It is then injected after waiting 0..N-1 cycles for a
usable slot when the buffer was empty, or up to N per word ahead of it when
the buffer was full. After that it is delivered `hops` cycles later, in the
cycle it sits in the destination NI's register, and it is written to memory
at the end of that cycle. So the total is:

    delivery_cycle - accept_cycle  =  1 + wait + hops  <=  depth*N + hops

Example on an idle ring: tile 0 writes to tile 1 in cycle 0, and the
buffered word sees slot 15 at NI 0 in cycle 1. Its owner is 15 hops away and
the destination is 1 hop away, so the word is injected at once and delivered
in cycle 2. If instead the slot at NI 0 belongs to NI 1 and the destination
is NI 2, the slot is refused. The word then takes the next slot, which is NI 0's
own.

## Network interface (`ni`, `ni_buffer`, `ni_arbiter`)

The input buffer (`ni_buffer`) is a FIFO of `BUF_DEPTH` tuples
`{dest, addr, data}` (4 by default). When it is full, `wr_stall` holds the
CPU, and a write is refused while the buffer is full even if a word leaves in
the same cycle. A deeper buffer absorbs longer bursts without stalls, but it
raises the worst-case wait to N*depth. With `BUF_DEPTH = 0` the buffer is
left out: the CPU's write goes straight to the arbiter, and `wr_stall` stays
high until the cycle the write is injected. A write is then delivered exactly
`hops` cycles after it is accepted, and `wr_stall` depends combinationally on
the slot at the NI.

The CPU must hold a stalled write, unchanged, until the cycle it is
accepted; `ni` asserts this in simulation.

The arbitration rules and the two-input multiplexer are as described above.
The `inj_own` and `inj_borrow` outputs report which rule granted an
injection. They are status signals only, and the tests use them.

## Processing tile (`tile`, `dmem`, `imem`, `tile_timer`)

A tile is the NI plus the memories and timer of one CPU. The CPU itself (a
32-bit soft-core RISC processor) is not part of this RTL, and its ports are
the tile's ports:

| Port group | Meaning |
|---|---|
| `net_*` | remote store: destination tile, word address in that tile's data memory, data; `net_stall` |
| `dm_*` | local data memory, port A: byte-enabled writes, reads 1 cycle after `dm_en` |
| `im_*` | instruction fetch (1-cycle read) and a separate program-load port |
| `tmr_*` | time-slice timer: period, enable, sticky interrupt, acknowledge |

The data memory (`dmem`) is dual-ported. Port B is driven only by the NI's
output port and is write-only and always ready. The ring serialises all
traffic to a tile into at most one word per cycle, so no arbitration between
remote writers is needed. If the CPU and the network write the same word in
the same cycle, the network write wins. The remote address width (`ADDR_W`,
11 bits) is also the size of the data memory: 2048 words, 8 KiB.

The timer (`tile_timer`) raises an interrupt every `period` cycles. This is
the time slice of the CPU's task scheduler. Slices are reloaded without drift,
and the interrupt stays high until `tmr_ack`.

`ring_mpsoc` is the top level. It builds N tiles and closes the ring
(`slot_out` of tile i feeds `slot_in` of tile i+1 mod N). Every port is an
array indexed by tile.

## Software FIFOs over the ring

The testbench `ring_mpsoc_tb` shows how tasks on different tiles use the
ring. A FIFO of α containers of S words lives in the consumer's data memory.
The producer keeps its write pointer and a copy of the read pointer. The
consumer keeps its read pointer and a copy of the write pointer. Each pointer
is `{wrap flag, container index}`, and the wrap flag toggles when the index
rolls over. The FIFO is empty when the two pointers are equal, and full when
the indices are equal but the wrap flags differ.

* **Producer:** it polls its local copy of the read pointer until there is
  room. It remote-writes a container into the consumer's memory, advances
  its write pointer, and remote-writes the new pointer to the consumer.
  Writes from one source arrive in order, so the data is always there before
  the pointer.
* **Consumer:** it polls its local copy of the write pointer, reads the
  container from its own memory in single cycles, advances its read pointer
  and remote-writes it back to the producer.

No locks or atomic operations are needed.

## Parameters

| Parameter | Default | Origin |
|---|---|---|
| `N_NODES` | 16 | the evaluated 16-core system; cost was also reported for 2, 4, 8 and 32 |
| `DATA_W` | 32 | four-byte words |
| `ADDR_W` | 11 | this design's choice (8 KiB data memory per tile) |
| `BUF_DEPTH` | 4 | this design's choice; the depth is a design-time option, and 0 leaves the buffer out |
| `IMEM_WORDS` | 2048 | this design's choice |
| timer period | 100000 | this design's choice (1 ms at 100 MHz) |

Node numbers are `$clog2(N_NODES)` bits wide, and a slot is
`1 + 2*$clog2(N) + ADDR_W + DATA_W` bits wide (52 by default). Shared
defaults and the hop-distance function are in `ring_pkg`.

## Simulating

All testbenches are self-checking. Each prints `TB_RESULT checks=N failures=M`
and uses only `$urandom`. For example:

    verilator --binary --timing --assert -Irtl -Itb rtl/ring_pkg.sv tb/ring_mpsoc_tb.sv \
              --top-module ring_mpsoc_tb -o sim && obj_dir/sim

Each testbench covers the following:

* `ni_buffer_tb`: FIFO against a queue model, including refused pushes when full.
* `ni_arbiter_tb`: all input combinations for NI 5 of 16 and NI 3 of 5,
  against a ring walk. It also counts the usable slots per destination
  against N - hops + 1.
* `ni_tb`: one NI fed by a modelled ring. It predicts the delivery, the
  forwarded slot, the stall and the rule used in every cycle, and checks the
  wait bound.
* `dmem_tb`, `imem_tb`, `tile_timer_tb`: memories against array models; exact
  timer periods.
* `tile_tb`: one tile in a modelled ring. It checks pass-through, delivery
  into memory, the order of injections, stalls, instruction fetch and the
  timer.
* `ring_mpsoc_tb` (default sizes, end to end):
  * delivery cycles on an idle ring, predicted exactly from the slot rotation;
  * all-to-all saturation with a scoreboard (exactly once, in order, within
    depth*N + hops);
  * each tile's guaranteed 1/N share;
  * two split-pointer FIFO streams (4 and 9 hops) with background traffic,
    which must go full, go empty and wrap;
  * memory read-back, instruction fetch and timers.
* `ring_sizes_tb`: rings of 2, 4, 8 and 32 tiles, plus 8 tiles without input
  buffers. It checks the idle-ring bandwidth (N - hops + 1)/N exactly, the
  saturation scoreboard and the guaranteed share.
* `ring_pal_tb`: the traffic of a 16-stage PAL luminance decoder. Each
  connection carries 3 MS/s (one word per 33.3 cycles, 3% of a link) and the
  longest connection is 4 hops. No tile may stall, even when the 4-hop stream
  runs against a saturated ring. The best case of a 4-hop connection must
  measure exactly 13/16.

## What is and is not here, and where this design chose

The following parts of the system are not in this RTL: the CPUs and their
caches, the external SDRAM, the tree interconnect that shares it, and the
display controller. The decoder software is not here either. `ring_pal_tb`
reproduces only the decoder's traffic, on an assumed mapping of tasks to
tiles (a pipeline i → i+1, with one stage fanning out to 4 hops).

The following are this design's own choices:

* the field widths;
* the reset state (all slots empty, NI i holding slot i);
* the refusal of a push into a full buffer even when a word leaves in the
  same cycle;
* reusing a slot in the cycle it is delivered;
* sending a write addressed to a tile's own NI around the full ring (N hops);
* the byte enables and collision rule of the data memory;
* the instruction-memory load port;
* the timer's registers.

The NI here has 59 flip-flops plus the buffer, in line with the roughly
60 registers per NI that the original FPGA implementation reported.
