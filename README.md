# HIBI multiprocessor interconnect: eight DMA nodes on one shared bus segment

This RTL is the communication fabric of a multiprocessor system-on-chip built
around HIBI (Heterogeneous IP Block Interconnection). HIBI is a
wrapper-based on-chip network: each IP block gets a wrapper, and the wrappers
share one bus segment. Each of the eight nodes is the communication half of a
processor tile. It has a dual-port RAM shared with its processor, a
Nios-to-HIBI DMA controller that moves blocks of words between that RAM and
the network, and a HIBI wrapper. A processor sets up a transfer in a few
registers and then gets on with its work. The DMA streams the data, one
32-bit word per cycle, to the RAM of another node. That node's processor is
interrupted only when a whole buffer has arrived.

The processors are not part of this RTL. They are 32-bit soft cores, each
with its own instruction, boot and data memories, timer and UART. The top
brings out each node's processor connections instead: the DMA register port
with its interrupt, and port A of the dual-port RAM.

```
            processor 0                processor 1            ...  processor 7
   (DMA regs, irq)  (RAM port A)
        |               |
   +----v----+     +----v----+
   | n2h_dma |<--->|  dpram  |      (same for each node)
   +----+----+     +---------+
        | tx/rx FIFO interface
   +----v---------+          +--------------+         +--------------+
   | hibi_wrapper |          | hibi_wrapper |   ...   | hibi_wrapper |
   |  + arbiter   |          |  + arbiter   |         |  + arbiter   |
   +----+---------+          +------+-------+         +------+-------+
        | bus_out / full            |                        |
   =====v===========================v========================v=====
                     hibi_bus_or: OR of all drives  ->  bus, bus_full
```

## Files

| file | contents |
|---|---|
| `rtl/hibi_pkg.sv` | command codes, bus and FIFO-word structs, arbitration modes, config indices |
| `rtl/hibi_fifo.sv` | flip-flop show-ahead FIFO (any depth) |
| `rtl/hibi_arbiter.sv` | one copy of the distributed arbitration (turn counter) |
| `rtl/hibi_bus_or.sv` | OR resolution network of a segment |
| `rtl/hibi_wrapper.sv` | wrapper: two-priority tx/rx FIFOs, transfer FSM, address decode, config registers |
| `rtl/dpram.sv` | dual-port RAM, one-cycle read latency |
| `rtl/n2h_dma.sv` | Nios-to-HIBI DMA controller |
| `rtl/hibi_mpsoc.sv` | top: eight nodes on one segment |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_hibi_mpsoc` runs the whole system at its default size |

## The bus segment

All bus wires are one-directional and shared. There are no request or grant
wires between agents. Every wrapper drives its own copy of the bus, all zeros
unless it owns the bus, and the segment bus is the OR of all copies
(`hibi_bus_or`). The owner drives:

| signal | meaning |
|---|---|
| `data[31:0]` | address when `av` = 1, otherwise data (addresses are multiplexed with data) |
| `av` | address valid |
| `comm[2:0]` | command; `CMD_IDLE` (0) when nothing is driven |
| `lock` | high in every cycle the owner holds the bus |

In the other direction, any addressed receiver may raise `full`. That wire is
ORed the same way.

A **tenure** is one owner's use of the bus. It is one address cycle, then one
data word per cycle, then one release cycle in which nothing is driven and
`lock` is low:

```
cycle     t     t+1   t+2   t+3   t+4   t+5   t+6
data      A     d0    d1    d2    d3    d4    -
av        1     0     0     0     0     0     0
comm      WR    WR    WR    WR    WR    WR    IDLE
lock      1     1     1     1     1     1     0      <- release cycle
```

A tenure ends when any of these happens:
- the FIFO being sent runs empty;
- the next word in that FIFO is a new address;
- the **send limit** is reached (a run-time register, default 64 data words);
- a receiver raises **target full**;
- in TDMA mode, the agent's time slot is about to end.

### Commands (3 bits)

| code | command | FIFO / handling |
|---|---|---|
| 0 | `CMD_IDLE` | nothing on the bus |
| 1 | `CMD_WR_DATA` | normal priority |
| 2 | `CMD_WR_MSG` | high priority |
| 3 | `CMD_MCAST_DATA` | normal priority, meant for overlapping address ranges |
| 4 | `CMD_MCAST_MSG` | high priority, meant for overlapping address ranges |
| 5 | `CMD_RD_REQ` | normal priority; passed to the target IP, which answers with a write (split read) |
| 6 | `CMD_WR_CFG` | taken by the wrapper itself (see configuration) |
| 7 | `CMD_RD_CFG` | taken by the wrapper itself: read a configuration register (see configuration) |

### Distributed, pipelined arbitration

This is the least obvious part of the design. Each wrapper holds an
identical `hibi_arbiter`: a register `turn` that names the agent allowed to
start a tenure in this cycle. All copies see the same resolved `lock`, so
they always hold the same value. No agent has to tell the others that it
wants the bus. The turn is a register, computed one cycle ahead, so the grant
is ready at the start of the cycle.

| bus in this cycle | next turn |
|---|---|
| `lock` = 1 | unchanged (the owner continues) |
| `lock` = 0, previous cycle `lock` = 1 (a tenure just ended) | priority mode: agent 0; round-robin mode: turn + 1 |
| `lock` = 0, previous cycle `lock` = 0 (idle) | turn + 1 |

In priority mode an agent's index is its priority, 0 being the highest.
After every tenure the scan restarts at agent 0. In round-robin mode the scan
continues with the next agent.

In **TDMA** mode the lock flag is ignored. The turn moves to the next agent
every `slot_len` cycles, so each agent owns one slot in turn. The arbiter
also tells its wrapper how many cycles of the slot remain. A wrapper starts a
tenure only if at least 3 cycles of its slot remain (address, one data word,
release). It always releases the bus in the last cycle of the slot, so a
tenure never crosses into the next agent's slot. Every copy counts cycles from
the same reset, so all copies stay in step. An unused slot stays idle.

The cost of this scheme: an agent with data may wait up to N−1 idle cycles
for its turn (N agents). Every tenure also carries one release cycle.

### Target full and retry

A receiver that cannot store the word on the bus raises `full` in the same
cycle. The path from the bus word through the address decode and back to
`full` is combinational, so no word is ever in flight unacknowledged. The
sender leaves the refused word in its FIFO and moves to a release cycle. At
its next turn it sends the same address again and then the refused word.
Receivers therefore see an address repeated inside a stream, and the DMA
treats a repeated identical address as a continuation (see below).

If `full` is raised during the address cycle, the sender likewise only
releases the bus.

### Two priorities

`WR_MSG` and `MCAST_MSG` words travel in 3-word high-priority FIFOs. Other
words use 5-word normal FIFOs, in both directions. When the transmitter gets
its turn, it serves the high-priority FIFO first.

On the receive side the IP reads a single merged stream, high priority
first. A high-priority transfer can arrive in the middle of a normal one.
When the stream then returns to the interrupted FIFO, the wrapper repeats
that FIFO's last address before its next data word. Every data word the IP
reads therefore follows the address it belongs to.

### Addresses, multicast and configuration

- A wrapper accepts every address in `[BASE_ADDR, BASE_ADDR+ADDR_RANGE)`. In
  the top, node *i* owns addresses `16*i … 16*i+15`. A sender can use a
  separate address for each stream going to the same node.
- If the ranges of several wrappers overlap, all of them take the words
  (multicast). If one of them refuses a word with `full`, the retry reaches
  the others a second time. Multicast is only safe towards receivers that
  keep up.
- `CMD_WR_CFG` to a wrapper's own address, or to the broadcast address
  `0xFFFF_FFFF`, writes its configuration registers. Each data word is
  `{index[31:24], value[23:0]}`:
  - index 0: arbitration mode (0 = priority, 1 = round-robin, 2 = TDMA);
  - index 1: send limit (0 is stored as 1);
  - index 2: TDMA slot length in cycles (values below 3 are stored as 3).

  The arbitration copies must agree, so change the arbitration of a running
  segment with the broadcast address. All wrappers then take the new value
  in the same cycle.
- `CMD_RD_CFG` to a wrapper's own address reads its configuration
  registers. Broadcast reads are not served. Each data word is one request,
  `{index[31:24], return_address[23:0]}`. The wrapper answers each request
  with a normal `CMD_WR_DATA` transfer of one word, the register value (0 for
  an unknown index), sent to the return address. The read is split: the
  requester gets the answer later, like any incoming transfer. A DMA node
  sends a read with `TX_COMM` = 7, and the answer fills one of its receive
  buffers.

  The answer is queued into the wrapper's own normal-priority transmit FIFO.
  Only one answer can be pending. While it is being queued, the local IP sees
  that FIFO as full. Afterwards the wrapper writes the IP's last
  normal-priority address into the FIFO once more, so the IP's interrupted
  transfer carries on to the right address. A second request that arrives
  while an answer is still pending is refused with `full`, and its sender
  retries it like any other refused word.

## The Nios-to-HIBI DMA controller

The processor's side is a register slave. Reads are combinational (zero wait
states) and writes take effect at the clock edge. Word addresses:

| addr | register | access |
|---|---|---|
| 0 | `TX_MEM_ADDR`: RAM word address of the transmit data | rw |
| 1 | `TX_AMOUNT`: number of data words | rw |
| 2 | `TX_HIBI_ADDR`: destination HIBI address | rw |
| 3 | `TX_COMM`: command (`CMD_WR_DATA`, `CMD_WR_MSG`, `CMD_WR_CFG`, ...) | rw |
| 4 | `CTRL`: write bit 0 = start; read bit 0 = transmit busy | rw |
| 5 | `RX_ACK`: read the done mask; write a mask to free done buffers | rw |
| 6 | `RX_STALL`: cycles the receiver waited for a free buffer | r |
| 8+4c | `CH_MEM_ADDR` of buffer c | rw |
| 9+4c | `CH_MAX` of buffer c; writing it arms the buffer | rw |
| 10+4c | `CH_COUNT`: words received into buffer c | r |
| 11+4c | `CH_HIBI_ADDR`: HIBI address the buffer was filled from | r |

**Transmit.** A start write passes `SYNC_STAGES` (2) flip-flops. This is
where a clock-domain crossing between the processor and the DMA would sit;
here both run on one clock. The DMA then writes the HIBI address word into
the wrapper FIFO. In the same cycle it issues the first RAM read. Words read
from RAM go to the wrapper one per cycle, through a 2-word skid buffer when
the FIFO is full. The address word reaches the wrapper FIFO 3 cycles after
the start write, and the data follow without gaps.

**Receive.** There are four buffers. For each one the processor sets a RAM
pointer and a maximum size. When data arrive, the lowest armed buffer takes
them. It keeps taking words until one of two things happens:
- an address *different* from the current one arrives;
- the buffer's maximum size is reached.

The buffer is then done. `irq` stays high while any buffer is done. The
processor reads the buffer's count and HIBI address, processes the data and
writes the buffer's bit to `RX_ACK`, which arms it again.

If no buffer is free, the DMA stops reading the wrapper. The wrapper's
receive FIFO fills up and the wrapper refuses further words with target
full, so back-pressure reaches the sender through the bus.

Two consequences matter to software:
- A repeated identical address continues the current buffer. This is how
  retried or split transfers are reassembled. It also means two successive
  transfers to the same address run together into one buffer.
- A buffer that has not reached its maximum size stays open until some
  other address arrives. The receiver should set `CH_MAX` to the expected
  transfer size, or the senders should use distinct addresses.

Receive writes to the RAM have priority over transmit reads on the DMA's
port.

## Timing

Measured in `tb_hibi_mpsoc` with all parameters at their defaults and the
bus otherwise idle. Latency runs from the start-register write at node 0 to
the interrupt at node 1:

| transfer | latency | of which from address on bus to interrupt |
|---|---|---|
| 5 words | 20 cycles | 8 |
| 50 words | 64 cycles (50 + 14) | 53 |

Each extra word costs exactly one cycle. The published prototype measured 27
cycles for 5 words and 50 + 22 cycles for 50 words. This implementation has
fewer pipeline stages in the FIFO path and the DMA start-up. The wait for
the turn depends on where the turn counter happens to be: 0 to 7 cycles with
eight agents.

Peak bus throughput is one 32-bit word per cycle during data cycles. Each
tenure also costs one address cycle and one release cycle.

## Parameters

| module | parameter | default | note |
|---|---|---|---|
| `hibi_mpsoc` | `N_NODES` | 8 | eight processor tiles on one segment |
| | `ADDR_RANGE` | 16 | addresses per node |
| | `MEM_AW` | 8 | 256 × 32-bit RAM per node (8 kbit) |
| | `N_RX_CH` | 4 | pending receive buffers per DMA |
| | `ARB_MODE_INIT` | `ARB_ROUND_ROBIN` | arbitration mode after reset |
| | `SEND_LIMIT_INIT` | 64 | data words per tenure after reset |
| | `SLOT_LEN_INIT` | 16 | TDMA slot length after reset |
| `hibi_wrapper` | `TX_LO_DEPTH` / `RX_LO_DEPTH` | 5 | normal-priority FIFOs |
| | `TX_HI_DEPTH` / `RX_HI_DEPTH` | 3 | high-priority FIFOs |
| `n2h_dma` | `SYNC_STAGES` | 2 | start-request delay, at least 2 |

The arbitration needs `N_AGENTS` of at least 2. The data width is the
package constant `hibi_pkg::DATA_W` (32).

## What this RTL does and does not cover

Built:
- the bus segment and its OR resolution;
- distributed, pipelined arbitration in priority, round-robin and TDMA modes;
- the send limit;
- target full with retry;
- two data priorities;
- several addresses per agent, with multicast through overlapping ranges;
- run-time configuration by bus writes, and configuration reads;
- flip-flop buffers sized 2×5 + 2×3 words;
- the DMA controller with four pending receive buffers and a 256-word RAM;
- the eight-node top.

Not built:
- a TDMA slot table other than one equal slot per agent, and combined
  algorithms (for example giving unused TDMA slots to round-robin);
- cycle counters, power modes and configuration pages;
- dual-clock (asynchronous) IP interfaces;
- the OCP IP interface;
- bridges between segments (hierarchical topologies).

Only the DMA/FIFO interface is provided. The processors, their caches and
peripherals, and the off-chip memories and their controllers are outside
this RTL.

The design choices are spelled out in each file's header comment. They
include:
- the command encoding;
- the configuration word format;
- the turn-passing arbitration and the release cycle;
- the combinational full and retry rule;
- the receive merge that repeats addresses;
- the DMA register map;
- single-clock operation.

## Verification

Each testbench checks the outputs against values it computes itself and
ends with a `TB_RESULT checks=N failures=M` line. Each has a watchdog.

- `tb_hibi_fifo`: random traffic against a queue model.
- `tb_hibi_arbiter`: four copies against a model of the turn rules, in
  all three modes, including a slot length changed at run time.
- `tb_hibi_bus_or`: random owners and full flags.
- `tb_dpram`: random dual-port traffic, including collisions.
- `tb_hibi_wrapper`: three wrappers with random traffic and slow
  receivers. Every per-address stream must arrive intact through full
  retries, priority interleaving and send-limit splits. Also checked: the
  exact bus occupancy of a 4-word tenure, and that a broadcast configuration
  reaches all wrappers. In TDMA mode only the slot owner drives, and the bus
  is free in the last cycle of every slot. Configuration reads sent to a
  wrapper busy with its own traffic return the right values in order. The
  test fails if a refused read request or a resumed stream never occurred.
- `tb_n2h_dma`: transmit timing and content with and without
  back-pressure. Receive buffer closing by address change and by maximum
  size, continuation on a repeated address, stall and release, and
  transmit and receive at the same time.
- `tb_hibi_mpsoc`: the whole system at default parameters. It runs the
  timed 5- and 50-word transfers, all-to-all traffic, a broadcast switch to
  priority arbitration with send limit 8, long transfers plus messages
  while one node reads two configuration registers of another, and a
  broadcast switch to TDMA followed by more traffic.
  It compares every word received by every node, and fails if any of these
  never occurred: contention, target full, a send-limit split, a message,
  a DMA stall, either kind of buffer closing, priority-mode tenures, TDMA
  tenures, interrupts, a configuration read.

Run one with Verilator, for example the system test:

```
verilator --binary --timing --assert -Irtl -Wno-fatal \
    rtl/hibi_pkg.sv rtl/hibi_fifo.sv rtl/hibi_arbiter.sv rtl/hibi_bus_or.sv \
    rtl/hibi_wrapper.sv rtl/dpram.sv rtl/n2h_dma.sv rtl/hibi_mpsoc.sv \
    tb/tb_hibi_mpsoc.sv --top-module tb_hibi_mpsoc -o sim
./obj_dir/sim
```

For another testbench, list the package, the module under test with the
modules it instantiates, and the testbench file.
