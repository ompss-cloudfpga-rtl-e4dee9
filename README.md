# A task runtime and MPI-style messaging for network-attached FPGAs

This design is for a cluster of FPGA cards that sit directly on a datacentre
network, with no PCIe host attached. Each card runs a program made of
*tasks*: small jobs handed to hardware accelerators. Each task declares which
memory regions it reads and which it writes. The cards run these tasks
without a CPU in the loop:

* each card has its own hardware task scheduler;
* an accelerator on the card can itself create tasks;
* cards exchange data over UDP with blocking `send`/`recv` calls in the
  style of MPI.

The host only starts one *distributed task* on every card and collects the
results at the end.

The RTL here is the application region ("Role") of one card. The card's
platform logic (network stack, memory controller) provides the streams the
Role talks to. The Role contains:

* a packet **decoder** and **encoder**: the entry and exit points for all
  network traffic;
* a hardware **task manager** that queues tasks, orders them by their data
  dependences and dispatches them to accelerators;
* a **message sender** and **message receiver**. Together they turn
  send/receive requests into a reliable stream of frames over an unreliable
  network;
* a **memory manager** that serves host memory accesses and parks incoming
  messages in a circular buffer in board memory;
* a **memory interconnect** that shares the single memory port;
* the **N-body task creator**, the application's distributed task. It spawns
  force and update tasks and exchanges the force buffer around a ring of
  cards.

The numeric accelerators (four N-body force units and one update unit) are
outside the Role; their task and memory channels are ports of the top
module.

```
              +--------------------------- ompss_role ---------------------------+
 rx  ------>  | packet_decoder --task--> pom --task--> nbody_creator (slot 0)     |
 (Shell)      |   |   |   |               |  ^   \---> ext accelerators (1..5) --+--> ext_task/ext_done
              |   |   |   +--ack--> message_sender <-- send petitions           |
              |   |   +--mem/data--> memory_manager --desc--> message_receiver   |
              |   +--acks, counter replies --+          ^ recv petitions (pom)  |
              |                              v                                   |
 tx  <------  | packet_encoder <-- sender frames, mm responses, pom completions   |
 (Shell)      |                                                                  |
              |  mem_arbiter: mm, sender, receiver, accelerators --> mem_rd/wr -+--> board memory
              +------------------------------------------------------------------+
```

The Role runs on the accelerator clock `clk` (200 MHz in the original
system). The network streams run on the platform's network clock `net_clk`
(156.25 MHz there). All data paths are 512 bits wide, the width of the
memory controller's data bus. Every address and every size is a multiple
of 64 bytes.

## Two clocks

`rx` and `tx` belong to `net_clk`. Each direction crosses into `clk`
through an `async_fifo` of `NET_FIFO` (8) beats. The FIFO is a dual-clock
RAM with Gray-coded read and write pointers, each passed to the other clock
through two flip-flops. A beat written on one side can be read three edges
of the other clock later.

At 156.25 MHz × 64 bytes the network side can move 10 GB/s. That is far
more than the 10 Gbit/s link, so the crossing never limits throughput. In
the original system the packet encoder and decoder themselves run on the
network clock. Here they sit on the `clk` side of the crossing, which
needs one crossing per direction instead of one for each of their six
internal streams. Assert `rst_n` and `net_rst_n` together.

## Packets on the network stream

The network side is a valid/ready stream of `net_beat_t`. Each beat holds
512 data bits, a `last` flag and the packet header `pkt_hdr_t`. The header is
a side-band struct repeated on every beat of a packet. It is not serialised
into the payload, so converting to and from real UDP header bytes is left to
the platform side. The header fields are:

* `ptype`: one of four packet classes:
  * CPU command (host to card)
  * CPU response (card to host)
  * data message (card to card)
  * ack message (card to card)
* `cmd`: the command code of a CPU command;
* `node`: the remote node. On receive it is the source; on send it is the
  destination. The host is node `8'hFF`.
* `udp_port`: one of
  * 2718, host tasks
  * 2719, host memory traffic
  * 2720, card-to-card messages
* `src_rank`, `dst_rank`, `tag`;
* `seq` and `ack_req`: the reliability fields, described in the next
  section;
* `msg_bytes`: the size of the whole message;
* `len`: the bytes carried by this packet;
* `addr` and `id`.

The host drives the card with five CPU commands (`cpu_cmd_e`):

| command | fields used | effect |
|---|---|---|
| `CMD_EXEC_TASK` | task type in `tag`, id in `id`, up to eight 64-bit arguments in one data beat | queues a task; a completion response carrying `id` returns when it ends |
| `CMD_MEM_WRITE` | `addr`, `len`, data beats | writes board memory; a one-beat response follows the write |
| `CMD_MEM_READ` | `addr`, `len` | reads board memory; one response packet carries the data |
| `CMD_READ_CNT` | `dst_rank` selects a node | returns the debug counters |
| `CMD_SET_RANK` | rank in `dst_rank`, cluster size in `len` | sets the card's rank and the cluster size |

The counter report is one beat:

| data bits | contents |
|---|---|
| 127:0 | packets received, by type |
| 255:128 | packets sent, by type |
| 287:256 | messages received from the selected node |
| 319:288 | messages sent to the selected node |

Command codes, port numbers, task type codes and the report layout are this
design's own encodings.

## Reliable messages over UDP

This is the part of the design that needs the most care. UDP may drop any
packet, and the receiving card stores whatever arrives without asking
whether anyone is waiting for it.

### Frames and windows

A message can be far larger than one network packet. The packet limit is
1450 bytes, and 1408 bytes is the largest multiple of 64 that fits. So
`message_sender` cuts a message into frames of 1408 bytes (22 beats); only
the last frame may be shorter. Frames are sent in **windows of four**. The
last frame of each window (or the last frame of the message) carries
`ack_req = 1`. After sending a window, the sender waits for an ack naming
that frame's sequence number:

```
 frame:    0    1    2    3*  | wait ack(3) | 4    5    6    7*  | wait ack(7) | 8  9*  | wait ack(9) | done
                               (* = ack_req)
```

If the ack does not arrive within `TIMEOUT` cycles (default 20,000, which is
100 µs at 200 MHz), the sender rewinds to the first frame of the window,
reads it from memory again and resends all four frames. The petition
completes (`done`) only when the last window has been acked. At that point
the send buffer may be reused.

### Sequence numbers and what the decoder does with them

The sender keeps a running 16-bit sequence number per destination. It does
not restart with each message, so a resent frame can always be told apart
from a new one. The decoder keeps, per source, the sequence number it
expects next. Each data frame falls into one of three cases:

| arriving `seq` | meaning | frame | ack (if `ack_req`) |
|---|---|---|---|
| = expected | in order | stored; expected number advances | sent |
| < expected (mod 2^16) | a resend of a frame already stored: its window's ack was lost | dropped | **sent again** |
| > expected | an earlier frame was lost | dropped | not sent |

These rules cover every loss:

* **A data frame is lost.** The frames after it in the window are dropped,
  so the window's ack never comes. The sender times out and resends the
  window. The frames that were already stored are recognised as duplicates
  and dropped. The lost frame and its successors are now in order and get
  stored.
* **An ack is lost.** The sender times out and resends the window. All four
  frames are duplicates and are dropped. The last one still triggers an
  ack, and that ack releases the sender.

Either way, each frame is stored exactly once and in order. Ack messages
travel on the same stream back to the sender. The decoder passes each
received ack to the sender as a one-cycle `ack_valid` pulse. The sender
checks that the ack comes from the expected source and names the expected
sequence number.

The rule "resend the whole window after a fixed time" comes from the
original system. The running sequence numbers, the ack-request flag and the
three-case rule are this design's own way of making that rule safe.

### Where arriving frames go

`memory_manager` writes every stored frame into a **temporary buffer**. By
default this is a circular region of 1 GiB at the top of the 16 GB board
memory (`TMP_BASE`, `TMP_BYTES`). A frame that would run past the end of the
buffer is placed at its start. As in the original system, the buffer is
*assumed* large enough: nothing checks that it is full. When the write is
done, the manager passes a descriptor (source, tag, length, buffer address)
to the receiver.

### Matching receives

`message_receiver` holds the descriptors in a RAM of `NDESC` = 32768 slots,
with a next-pointer RAM beside it. The slots form one linked list per source
rank, in arrival order. Free slots come first from a counter of slots never
used, then from a free list. This way neither RAM needs a reset.

A receive petition (source, tag, destination address, size) is served one
frame at a time:

1. Walk the source's list from its head, one slot per cycle, to the first
   frame with the petition's tag.
2. Read the frame from the temporary buffer and write it to
   `destination + bytes already copied`.
3. Unlink the slot, then free it.
4. When `size` bytes have been copied, pulse `done`.

If no matching frame is present, the receiver waits for the next arrival
from that source and walks again. Frames of one source are stored in order
(the decoder enforces that), so the frames of one message are copied in
order, even when frames of other tags are interleaved with them.

## The hardware task manager (`pom`)

Tasks are `task_t` records. Each has:

* a type;
* a creator (an accelerator slot, or the host);
* an id;
* up to three dependences, each giving a region address and whether the task
  writes that region (`inout_dir`);
* eight 64-bit arguments.

The host, through the decoder, and task-creating accelerators submit tasks.
A round-robin arbiter places them in a queue of 16 entries kept in age
order. Where a task goes depends on its type:

* `TT_SEND` / `TT_RECV` are OMPIF petitions. Arguments 0..3 are address,
  bytes, peer rank and tag. They go to the sender or receiver once that
  engine is free. An accelerator therefore calls the message layer through
  the same interface it uses to create tasks.
* Any other type goes to the lowest-numbered idle accelerator whose kind
  matches. The default slots are 0 for the creator, 1–4 for force and 5 for
  update.

Two dependences *conflict* when they name the same region address and at
least one of the two tasks writes it. Every cycle the runtime looks at all
queued entries at once. An entry is *ready* when:

* its engine or an accelerator of its kind is free;
* none of its dependences conflicts with a running task;
* none of its dependences conflicts with an older task still in the queue.

The oldest ready entry is dispatched. The entries behind it move up one
place, so the queue stays in age order. A task blocked on a dependence
therefore does not hold up younger independent tasks; they overtake it.
Conflicting tasks can never overtake each other, because the younger one
also checks the older queued ones. So read-after-write, write-after-read
and write-after-write pairs always run in program order. Two readers of the
same region can run at the same time.

Each creating accelerator has a counter of its unfinished child tasks
(`children_pending`). The counter rises when a child enters the queue and
falls when the child finishes. *Taskwait* is waiting for this counter to
reach zero. When a task sent by the host finishes, a completion packet
carrying the task's id goes back to the host.

The original runtime, Picos, keeps a full dependence graph in hardware.
This queue gives the same ordering guarantees, with two limits. It can only
look 16 tasks ahead. It also does not rename regions to remove false
(write-after-read and write-after-write) dependences. A ready task reaches its accelerator two
cycles after the runtime accepts it (checked in `tb_pom`). That is well
inside the roughly 60 cycles per task that the original runtime reports.

## The N-body creator and the ring allgather

`nbody_creator` is the distributed task that the host starts on every card.
Its arguments are:

* the particle buffer;
* the force buffer;
* the number of blocks `n`;
* the number of time steps.

Blocks are 2048 particles. The design assumes 28 bytes per particle (seven
32-bit values) and 12 bytes per force (three 32-bit values). With rank `r`
and cluster size `s`, the card owns blocks `j` in `[r·n/s, (r+1)·n/s)`. The
division is done by repeated subtraction at start-up. Each time step runs
four phases:

1. **Forces.** One task per pair `(i, j)`, for every block `i` and every
   owned block `j`. The task reads `part_i` and `part_j` and updates
   `forces_j`.
2. **Taskwait.**
3. **Allgather of the force buffer, in place.** For `k = 1 … s−1`, the card
   sends its own force range to rank `(r+k) mod s` and receives the range of
   rank `(r−k) mod s` into its slot in the buffer. Both use tag 0. It then
   waits for all of these petitions.
4. **Updates.** One task per block `i`. The task updates `part_i` and reads
   `forces_i`.

There is no taskwait after the updates. The update tasks of one step
overlap the force tasks of the next, and the dependence check orders each
pair that touches the same block. After the last step the creator waits
for all children and pulses `done`. The host sees the completion of the
creator task.

Example for three cards (A, B, C) owning one block each, step `k = 1`:
A→B, B→C, C→A; step `k = 2`: A→C, B→A, C→B. After two steps, every card
holds all three force blocks.

## Memory interconnect (`mem_arbiter`)

All memory users share one read channel and one write channel of a
data-mover style interface:

* a command carrying a 64-byte-aligned address and a byte count;
* 512-bit data beats with `last`;
* a `wr_done` pulse when a write has landed.

Inside the top, the read masters are:

* the memory manager;
* the sender;
* the receiver;
* the five accelerators.

The write masters are:

* the memory manager;
* the receiver;
* the five accelerators.

Commands are granted round-robin. A read grant is held until its last data
beat, and a write grant until its `wr_done`. So at most one read and one
write are in flight, and beats need no IDs.

## Interfaces of the top (`ompss_role`)

| group | signals | notes |
|---|---|---|
| clocks | `clk`, `rst_n`, `net_clk`, `net_rst_n` | Role clock and network clock, active-low asynchronous resets |
| network | `rx_*`, `tx_*` | `net_beat_t` streams to and from the platform's UDP stack, on `net_clk` |
| memory | `mem_rd_*`, `mem_wr_*` | data-mover command/data channels; `mem_wr_done` must follow the last beat |
| accelerators | `ext_task_valid/ready`, `ext_task`, `ext_done` | bits 0–3 force, bit 4 update; `ext_task` is shared, qualified by the valid bit |
| accelerator memory | `ext_rd_*`, `ext_wr_*` | one read and one write master per accelerator |
| status | `my_rank`, `cluster_size`, `retx_count` | rank and size as set by the host; windows resent |

Parameters of the top:

| parameter | default | meaning |
|---|---|---|
| `NFORCE` | 4 | force accelerators |
| `NUPD` | 1 | update accelerators |
| `TIMEOUT` | 20000 | ack timeout in cycles |
| `BLOCK` | 2048 | particles per block |
| `NET_FIFO` | 8 | depth of each clock-crossing FIFO, in beats |

The package `ompif_pkg` holds the fixed sizes:

* 1408-byte frames;
* a window of 4;
* 8-bit tags and ranks;
* 34-bit addresses;
* up to 64 nodes in the per-node counters and sequence tables.

## Capacity at the default sizes

The largest run in the original evaluation is 56 cards, 30 blocks per card
(3,440,640 particles) and 16 time steps. The design holds it as follows:

* Each card's share of the force buffer is 30 × 2048 × 12 = 737,280 bytes,
  which is 524 frames.
* In the worst case, a card holds the frames of all 55 other cards before
  it posts a receive. That is 28,820 descriptors, within 32,768, and 40.6
  MB of temporary buffer, within 1 GiB.
* Ranks fit in 8 bits, node tables in 64 entries, and message sizes in 32
  bits.

A 16-card run with about 1.25 million particles needs 9,960 descriptors.

## Departures from the original system

* The encoder and decoder run on the Role clock behind the clock crossing,
  not on the network clock.
* The packet header is a side-band struct, not bytes on the wire.
* The task manager orders tasks with a 16-entry window of conflict checks
  instead of a full dependence graph, and does not rename (see above).
* The force and update accelerators, the network stack, the memory
  controller with its data mover, and the host software are not part of
  this RTL. The testbenches model them behaviourally.
* Particle and force record sizes are assumed; the numeric format of the
  N-body is not modelled.
* Timeout value, sequence-number scheme, encodings and buffer placement are
  this design's choices.
* Accelerators create only accelerator tasks and petitions. Creating tasks
  for the host CPU from the card is not supported.
* Send and receive petitions give their size in bytes. The element count and
  datatype of the programming interface are converted by the caller. The
  only collective is the in-place ring allgather inside the N-body creator.

## Verification

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`:

| testbench | what it exercises |
|---|---|
| `tb_packet_decoder` | routing of every packet class, in-order / duplicate / gap handling and re-acks, counter report, rank setting |
| `tb_packet_encoder` | no interleaving under random back-pressure, routing, response marking, counters |
| `tb_message_sender` | frame cutting, short last frame, windows, acks, timeout and whole-window resend, sequence continuity |
| `tb_message_receiver` | tag/source matching with interleaved tags, waiting for late frames, multi-frame copies, slot reuse |
| `tb_memory_manager` | host write/read with responses, frames into the buffer with wrap-around, descriptors |
| `tb_mem_arbiter` | round-robin fairness, data and `wr_done` return to the right master |
| `tb_pom` | dispatch by type, parallel independent tasks, serialised conflicting writes, overlapping reads, a younger independent task overtaking a blocked one, petitions, child counters, host completion, dispatch latency |
| `tb_nbody_creator` | task sequence of the N-body time-step loop, ring allgather order, taskwaits |
| `tb_async_fifo` | both clock ratios, full and empty, order and completeness |
| `tb_ompss_role` | end to end, see below |
| `tb_nbody_workload` | the N-body workload with realistic accelerator timing, see below |

`tb_ompss_role` connects three copies of the top, all at default
parameters, through a network model. The network drops the second data
frame of rank 0 and the first ack of rank 2. Behavioural force and update
accelerators (`tb_acc_model`) and a memory model (`tb_mem_model`) complete
the setup. The testbench then:

1. sets the ranks;
2. writes and reads memory through host commands;
3. starts the N-body task (3 blocks of 2048, 2 steps) on all cards, and
   polls every card's debug counters from the host while it runs;
4. checks the force buffer contents after the allgather, and each update's
   inputs.

It counts each mechanism and fails if one never happened:

* window resends;
* dropped duplicates;
* gaps;
* short last frames;
* dependence stalls;
* tasks dispatched past a blocked older one;
* taskwait cycles;
* receive waits;
* memory and encoder contention;
* acks.

It finishes in about 30,000 cycles.

`tb_nbody_workload` runs a scaled-down N-body workload on three cards:

* 4 blocks of 2048 particles per card;
* 2 time steps;
* each force task taking 2048 × 2048 / 8 cycles, the time of an accelerator
  that computes 8 forces per cycle.

A card needs at least four blocks to keep its four force accelerators busy,
because the force tasks of one block all update that block's forces. The
test checks the data, as above, and measures efficiency: ideal force time
over elapsed time. The run takes 12.62 million cycles against an ideal
12.58 million, which is 99.7%. That corresponds to 19.1 of a possible 19.2
Gpairs/s at 200 MHz. The test fails below 95%. It takes about a minute of
simulation.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ompif_pkg.sv tb/tb_util_pkg.sv tb/tb_ompss_role.sv --top-module tb_ompss_role
./obj_dir/Vtb_ompss_role
```

Replace `tb_ompss_role` with any other testbench name. The testbenches
reset or drive everything they read, so they also pass with random initial
values (`+verilator+rand+reset+2`).
