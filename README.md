# DAMQ switch with a high-priority queue, and a 64x64 Omega network built from it

Large multiprocessors connect their nodes through multistage networks of small
n x n switches. Under load, some packets wait far longer than average, because
they queue behind other traffic inside the switches. That is a problem for
traffic that must arrive quickly, such as real-time I/O or system-wide exception
handling. This design gives such traffic its own path through every switch:

* Each input port of a 4x4 switch has one **DAMQ buffer** (dynamically-allocated
  multi-queue). Its storage is a pool of blocks shared by several queues kept as
  linked lists: one queue per output port, so a packet for an idle output never
  waits behind a packet for a busy one.
* One **extra queue per buffer holds only high-priority packets**. A packet is
  high priority when the sender sets one bit of its header byte. The extra queue
  costs no extra storage, because it draws blocks from the same shared pool.
* The **crossbar arbiter** serves the heads of the high-priority queues before
  it looks at any normal queue.

A high-priority packet therefore never waits in a queue behind normal packets.
At most, it waits for a normal packet that is already being sent through the
same output. In the 64x64 network testbench below, at a throughput of 0.47 with
5% high-priority packets, the 99th-percentile latency is 28 cycles for
high-priority packets and 93 cycles for normal ones.

## Packets, blocks and links

A packet is a sequence of **blocks** of eight bytes. A block is the unit of
buffer storage, and also what a link carries in one clock cycle:

```
flit_t = { last : 1,  data : 64 }        (switch_pkg)
byte 0 of a packet's first block = header byte:
    bit 7     high priority
    bit 6     unused
    bits 5:0  destination node (0..63)
```

Every link is a `valid`/`ready` pair with a `flit_t`: a block moves in a cycle
where both are high. Packets may be any number of blocks long, even longer than
a buffer. Blocks of different packets never interleave on a link.

Each switch reads its 2-bit output-port number from the header at bit
`ROUTE_LSB`. In the network, stage 0 uses bits 5:4, stage 1 bits 3:2 and
stage 2 bits 1:0.

## How the DAMQ buffer keeps its queues (`damq_buffer`)

This is the part that needs care. The buffer has `NUM_BLOCKS` (8) storage
blocks and the following lists:

| list                 | index | holds                                    |
|----------------------|-------|------------------------------------------|
| normal queue *o*     | 0..3  | blocks of normal packets for output *o*  |
| high-priority queue  | 4     | blocks of high-priority packets, any output |
| free list            | 5     | unused blocks                            |

Each list has a `head` register, a `tail` register and a block `count`. Each
block has three fields:

* `nxt`: pointer to the next block of its list;
* `blk_last`: set on the last block of a packet;
* `blk_port`: the packet's output port.

Only the high-priority queue needs `blk_port`, because that one queue holds
packets for every output.

**Write (input link).** A block is accepted while the free list is not empty
(`in_ready`). The block at the head of the free list is unlinked and written,
then linked to the rear of the packet's queue. The header block picks the queue:
the high-priority queue if bit 7 is set, otherwise the normal queue of its
output port. Later blocks of the packet follow the header into the same queue.
Only one packet arrives at a time on an input, so a packet's blocks are
contiguous in its queue.

**Read (towards the crossbar).** `rd_q` selects a queue. Its head block appears
combinationally on `rd_flit`. `rd_en` unlinks that block and appends it to the
free list.

**Read and write in the same cycle.** Both can happen in one cycle, and two
cases need care. Everything else is ordinary linked-list manipulation.

* If the queue being read is also the queue being written, and it holds exactly
  one block, its new head is the block being written.
* If the free list holds exactly one block, that block is allocated while the
  block being read is freed. The freed block then becomes both head and tail of
  the free list.

The `count` registers make "empty" and "exactly one" easy to test. They are an
addition to the plain head/tail organisation.

**Cut-through.** A stored block can be read from the next cycle on. A packet can
therefore leave the switch before its last block has arrived. If a packet's
next block has not arrived yet, `rd_avail` drops and the output idles.

## Arbitration (`xbar_arbiter`) and crossbar (`crossbar`)

An input buffer has one read port, so an input feeds at most one output at a
time. A connection is set up for a whole packet and released in the cycle its
last block crosses. Every cycle, the arbiter matches idle outputs to idle
inputs in two passes:

1. **High-priority pass.** Visiting the inputs in round-robin order, each idle
   input with a non-empty high-priority queue gets the output named by that
   queue's head packet (`hp_port`), if the output is idle.
2. **Normal pass.** Each output that is still idle goes to the next idle input,
   in that output's round-robin order, whose normal queue for the output is not
   empty.

Grants are registered. A grant made in cycle *t* connects the crossbar from
*t+1*. The crossbar is combinational: it routes the selected buffer's head
block to the output and sends `rd_en` back when the block is accepted
downstream (`out_valid && out_ready`). Two consequences:

* A block that arrives at an idle switch leaves **two cycles** after it was
  accepted, and the rest of the packet follows at one block per cycle.
* An output is idle for **one cycle** between two packets.

`hp_grant` and `norm_grant` pulse once per new connection. They are brought out
for observation.

## The Omega network (`omega_network`)

The network is 64 nodes wide. Three stages, each of sixteen 4x4 `damq_switch`es,
are separated by 4-way perfect shuffles: line *x*, written in base 4 as
*x2 x1 x0*, moves to line *x1 x0 x2*. Switch *k* of a stage owns lines
*4k..4k+3*. Stage *s* routes on destination digit *2-s*, so after three stages
a packet is on the line equal to its destination. One path joins each source to
each destination, and each switch queue is FIFO. Packets of the same priority
from one source to one destination therefore arrive in order. A packet's first
block needs at least six cycles through an idle network.

Top-level ports: `src_valid/src_ready/src_flit[64]` into the network,
`dst_valid/dst_ready/dst_flit[64]` out of it, and the per-stage grant pulses.

## Module hierarchy and parameters

```
omega_network        RADIX=4, STAGES=3, NUM_BLOCKS=8
└─ damq_switch x48   N_PORTS=4, NUM_BLOCKS=8, ROUTE_LSB
   ├─ damq_buffer x4 (one per input port)
   │  └─ damq_storage   NUM_BLOCKS x 64-bit array, 1 write / 1 async read port
   ├─ xbar_arbiter
   └─ crossbar
switch_pkg           flit_t, header layout, make_header()
```

* 4x4 switches, the 64-node, three-stage network and the buffer of eight
  eight-byte blocks are the sizes of the original design.
* `NUM_BLOCKS` sets the buffer size. With two-block packets, 4, 6 and 8 blocks
  give buffers of two, three and four packet slots.

Reset (`rst_n`, active low) is synchronous. It empties every queue and puts all
blocks on the free list.

The default network synthesizes to about 2,400 flip-flop bits plus 122,880
bits of block storage and list registers.

## Simulating

Each file holds one module. Every testbench is self-checking: it prints
`TB_RESULT checks=N failures=M` and stops itself after a fixed cycle limit.
For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/switch_pkg.sv tb/tb_omega_network.sv --top-module tb_omega_network
./obj_dir/Vtb_omega_network
```

| testbench            | what it shows |
|----------------------|---------------|
| `tb_damq_storage`    | array write/read, write-then-read timing |
| `tb_damq_buffer`     | random traffic against a reference model of all queues and the free list; full buffer; all blocks return; cut-through read |
| `tb_crossbar`        | routing, valid, pop and end-of-packet signals against a model |
| `tb_xbar_arbiter`    | the arbitration rules every cycle (high priority first, one output per input, no output left idle while asked for, connections hold for a packet); round-robin; high-priority head beats an earlier normal request |
| `tb_damq_switch`     | two-cycle latency and one-block-per-cycle streaming; a high-priority packet overtaking normal packets, including one ahead of it on the same input; random traffic with back-pressure and cut-through, every packet checked |
| `tb_omega_network`   | the full default network: latency 2 cycles per stage; a 12-block packet (longer than a buffer) cutting through; high-priority overtaking across stages; uniform random load with 5% high-priority packets and exponential think times at light and heavy load, printing throughput, average and 99th-percentile latencies per class |
| `tb_omega_workloads` | buffer sizes of 2, 3 and 4 packet slots and high-priority fractions of 1% to 50%, at heavy load, printing 99th-percentile latencies |

Typical `tb_omega_network` output (two-block packets):

```
light load: throughput 0.07  normal avg 8.7 99% 15  high-priority avg 8.4 99% 11
heavy load: throughput 0.47  normal avg 35.1 99% 93  high-priority avg 11.9 99% 28
```

`tb_omega_workloads` at heavy load (99th-percentile latency in cycles):

```
slots  high-priority share   throughput   normal 99%   high-priority 99%
  4          5%                 0.48          96              21
  3          5%                 0.36          90              36
  2          5%                 0.36          60              31
  4          1% / 10% / 30% / 50%   0.43-0.49   89 / 99 / 112 / 152   28 / 30 / 35 / 45
```

Throughput is delivered blocks per node per cycle. Latency runs from packet
creation to arrival of the last block, in cycles. The 99th percentile is the
shortest latency among the worst 1% of packets.

## What was decided here, and what is left out

The published description fixes the organisation: shared block pool, free
list, per-output linked queues with head and tail registers, an extra
high-priority queue with output-port bits per block, and an arbiter that tries
all high-priority heads before any normal queue. It also fixes the sizes: 4x4
switches, eight eight-byte blocks, and a 64-node, three-stage Omega network.
The following are choices of this implementation:

* the header layout, the block-per-cycle link and its valid/ready flow control;
* the block counts on each list;
* registered, packet-long connections with round-robin order in each pass;
* the two-cycle switch latency and the one-cycle gap between packets on an
  output;
* the Omega wiring details and the synchronous reset.

Not included:

* the message-transport logic of the original communication coprocessor
  (virtual circuits) that sits beside its buffer. It is only named, not
  specified.
* the FIFO, SAMQ and SAFC buffers and the split-buffer variants. These are
  alternatives the DAMQ switch was measured against, not parts of it.

Known limitation: high-priority and normal packets share a buffer's blocks. If
normal packets fill the next switch's buffer, a high-priority packet waits for
space like any other. Switches with split buffers would avoid that wait, at the
cost of statically divided storage. Flow control is per block, so a buffer full
of partial packets stalls its input until blocks drain. The cycle counts
reported by the testbenches are cycles of this RTL. They are not comparable
one-to-one with the time units of the original event-driven simulations.
