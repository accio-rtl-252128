# Accio I/O hardware: a connection table the OS fills and the NIC and user threads use

Fast networking usually means choosing between the kernel, which multiplexes
and protects the NIC but costs a system call, copies and a scheduler pass per
message, and kernel bypass, which is fast but hands the NIC to one
application. This design takes the virtual-memory route instead. The kernel
still sets up every connection and decides who may use it, but it writes that
decision into a small hardware table, the **I/O Connection Table (ICT)**. Once
an entry is in place, data moves without the kernel:

* a user thread writes a message into a ring in its own memory and stores the
  new write pointer into its ICT entry; the store notifies the NIC, which
  reads the ring, builds the UDP/IPv4/Ethernet frame and sends it;
* a received UDP frame whose port belongs to an accelerated entry is written
  by the NIC straight into that connection's ring, and the entry's write
  pointer is advanced;
* a thread that had to block on an empty (or full) ring is not found by the
  OS scheduler: the NIC's pointer update puts the entry into a **hardware
  ready queue**, and for entries flagged for it, raises a **prioritized I/O
  interrupt**. The kernel pops the next ready entry from a register.

The ICT works like a TLB for connections: a cache of OS state that hardware
may use and check (by ASID) without asking the OS. Exceptional cases (link
loss, a full ring, NIC errors) go to a **control event queue** with its own
interrupt, so software can fall back to the normal socket path.

The RTL here contains the ICT with its ready queue, event queue and interrupt
logic, the fast-path UDP offload engine of the NIC (receive and transmit), and
the merge of offloaded frames with those of the NIC's normal traffic engine.
CPU, memory, MAC and the normal engine are outside, as ports.

## Block map

```
            MMIO (kernel / user)          irq_io   irq_evt
                 |                           ^        ^
        +--------v---------------------------+--------+---------+
        | ict                                                   |
        |  entry table [N_ENTRIES]   io_irq_ctrl   event_queue  |
        |  ready_queue (2 x round robin)                        |
        +--+----------------+------------------+-------------+--+
    notify |     rx lookup / |       tx read /   |  link, errors
    (TX)   |     wr_ptr upd  |       rd_ptr upd  |
        +--v------------+ +--+-------------+    |
        | udp_tx_engine | | udp_rx_engine  |<---+---- mac_rx (64-bit stream)
        +--+--------+---+ +--+---------+---+
     DMA rd|        |frames   |DMA wr   | other frames
           v        v         v         v
      host memory  tx_frame_mux <-- norm_tx     norm_rx --> normal NIC engine
                      |
                      v mac_tx
```

`rtl/accio_top.sv` wires these together. All modules run on one clock
(`clk`, 50 MHz in the prototype the design comes from) with an active-low
asynchronous reset `rst_n`.

## The connection table

Each entry (`ict_entry_t` in `rtl/accio_pkg.sv`) holds:

| field | meaning |
|---|---|
| `sock` (16) | socket id; for the UDP engine, the local UDP port |
| `asid` (16) | address space of the owning process |
| `dir` | `DIR_RX` or `DIR_TX` (one entry per direction) |
| `buf_addr`, `buf_len` (32) | DMA ring base and length in bytes (length a power of two) |
| `rd_ptr`, `wr_ptr` (32) | free-running byte pointers; ring offset = `ptr & (buf_len-1)` |
| `valid`, `accel` | entry in use; connection is on the fast path |
| `susp` | a thread is blocked on this entry |
| `irq_en` | wake that thread with the I/O interrupt (high priority) |

The default is 64 entries, the connection limit of the prototype.

### Register map

Byte addresses on the MMIO port (16-bit offset; 64-bit registers):

* entry `i`, register `r`: `i*64 + r*8`
  * `0 CTRL`: `sock[15:0] asid[31:16] dir[32] valid[33] accel[34] susp[35] irq_en[36]`
  * `1 ADDR`, `2 LEN`, `3 RDPTR`, `4 WRPTR`
  * `5 WAIT` (store only, see below)
* global register `g`: `0x8000 + g*8`
  * `0 READY_POP` (load pops): `valid[63] high[62] entry[15:0]`
  * `1 IRQ`: load `{rq_any_hi, rq_valid, irq_evt, irq_io, io_pending}` in bits 4..0; any store acknowledges the I/O interrupt
  * `2 CUR_ACCEL`: 1 while the CPU runs an accelerated I/O thread
  * `3 EVENT_POP` (load pops): `valid[63] lost[62] code[27:24] entry[23:16] info[15:0]`
  * `4 STATS`: ready-queue occupancy `[40:32]`, wake-up count `[31:0]`

The answer (`mmio_rsp`) comes one cycle after the request.

### Protection

Every request carries the requester's privilege (`kernel`) and ASID. Kernel
accesses always succeed. A user access succeeds only on a valid entry whose
ASID matches, and a user may store only the pointer that it owns: `rd_ptr` of an
RX entry (it consumed data) and `wr_ptr` of a TX entry (it produced data).
Everything else, including the global registers, returns `fault = 1` and changes
nothing; the CPU would raise its usual access exception. A pointer store
(by anyone) emits a one-cycle `notify_valid` with the entry index and
direction: this is the CPU-to-NIC notification, so the NIC never scans the
table.

### Blocking without a lost wake-up

The `WAIT` register is this design's answer to the race between "ring is
empty" and "thread goes to sleep". A kernel store to `WAIT` of entry `i` sets
`susp` **only if the entry is not ready**: an RX ring is not ready while
`wr_ptr == rd_ptr`; a TX ring is not ready while its free space is below the
value stored. The kernel then reads `CTRL`: if `susp` is set, the thread
sleeps and the NIC's next pointer update will wake it; if not, data (or space)
arrived in between and the thread continues. Because test and set happen in one
cycle, no update can fall between them.

### Wake-up, ready queue and the I/O interrupt

When the NIC updates a pointer of an entry whose `susp` bit is set, the ICT
clears `susp` and pushes the entry into `ready_queue`. The queue is a bitmap
(one bit per entry, so it cannot overflow and holds an entry once) with two
round-robin classes. Entries with `irq_en` form the high class and are
always popped first. The kernel pops through `READY_POP`. Invalidating an
entry (storing `CTRL` with `valid = 0`) removes it from the queue.

A wake-up of an `irq_en` entry sets the pending bit of `io_irq_ctrl`.
`irq_io = pending && !cur_accel`: while the CPU runs an accelerated I/O thread
(the kernel keeps `CUR_ACCEL` up to date on context switches), the interrupt
is held back rather than lost, and it fires when that thread is switched out.
One store to `IRQ` acknowledges all wake-ups at once. Entries without
`irq_en` are only queued; the kernel finds them when it next polls.

### Control events

`event_queue` (16 entries) records link-up and link-down edges, frames
dropped because an RX ring was full (with entry and length), and NIC error
codes. Up to three events can arrive in one cycle. `irq_evt` is high while the
queue is non-empty. When it is full, new events are dropped and a sticky
`lost` flag is returned with the next pop. Reacting to events (moving a
socket back to the normal path) is left to software.

## Ring records

Both directions use the same record layout in a connection's ring, aligned to
8 bytes:

```
ptr + 0 : descriptor  [63:32] IPv4 address  [31:16] UDP port  [15:0] payload bytes
ptr + 8 : payload, padded with zeros to a multiple of 8 bytes
```

On RX the address and port are the sender's; on TX they are the destination.
A record therefore takes `8 + roundup8(len)` bytes, and the pointer advances
by that. Pointers are 32-bit byte counters that are never reduced modulo the
ring length, so `wr_ptr - rd_ptr` is always the number of bytes used, even
when the ring is full.

## Receive engine (`udp_rx_engine`)

Frames arrive as 64-bit little-endian words (byte 0 of the frame in bits
7:0) with byte `keep` and `last`, without FCS. The Ethernet, IPv4 and UDP
headers end at byte 42, and every field the engine needs lies in bytes 0-39.
So the engine buffers the first five words. When the sixth word arrives, it
decides:

* **fast path**: EtherType IPv4, IHL 5, not fragmented, protocol UDP,
  destination `local_ip`, and the ICT lookup finds a valid, accelerated RX
  entry with `sock == destination port`, and the ring has room for the
  record. The payload, which starts at byte 42, is realigned: each ring word
  is the upper six bytes of one frame word plus the lower two of the next.
  The descriptor is written last (its slot was reserved at `wr_ptr`). Then the
  new `wr_ptr` is sent to the ICT. A frame shorter than its UDP length is
  completed with zeros.
* **ring full**: the frame is consumed and dropped. An overflow event goes to
  the event queue.
* **anything else**: the five buffered words and the rest of the frame are
  passed unchanged to `norm_rx_*`.

The engine accepts one word per cycle back to back as long as the DMA port
accepts one word per cycle. It does so because the descriptor write and
pointer update of one frame overlap the header of the next. The decision
waits only if the previous frame's pointer update has not yet reached the ICT,
so the free-space test never sees a stale pointer. On a 64-bit, 50 MHz bus
this is 3.2 Gbit/s, the bus limit.

The receive side does not check the IPv4 or UDP checksums.

## Transmit engine (`udp_tx_engine`)

A `notify` from a TX entry sets that entry's pending bit. The engine serves
pending entries round-robin, one record at a time:

1. read the entry over the sideband. If it is not valid, accelerated TX, or its
   ring is empty, clear the pending bit;
2. DMA-read the descriptor at `rd_ptr`. If the record claims more bytes than the
   ring holds, treat the ring as corrupt and drop its whole content by moving
   `rd_ptr` to `wr_ptr`;
3. send the 42-byte header, then the payload. The header holds `peer_mac` as
   destination, `local_mac` as source, IPv4 with TTL 64, DF set, an
   incrementing identification and a computed header checksum, the entry's
   `sock` as source port, and UDP checksum 0. Payload words are shifted two
   bytes to follow the header;
4. after the last word, publish `rd_ptr + record size` to the ICT. That wakes
   a thread blocked in `WAIT` for ring space.

Payload reads start while the header is going out. They run up to
`RD_OUTSTANDING` (8) words ahead of the output, into a small FIFO. When the
memory answers within 8 cycles, the payload leaves at one word per cycle. Each
record also pays two cycles to pick and read the entry, plus one descriptor
read. Frames shorter than 60 bytes are left for the MAC to pad.

`tx_frame_mux` merges the offload engine's frames with the normal engine's
frames on the MAC port. It uses frame-level round robin: the grant is taken on
the first valid word and held until `last`, so frames never interleave and
the choice cannot change while the MAC stalls.

## Sideband between NIC and ICT

The engines reach the ICT through direct ports, not bus transactions:

* `rx_lkp_sock` → `rx_lkp_hit/idx/entry`: a combinational compare of all
  entries (valid, accelerated, RX, matching port);
* `tx_rd_idx` → `tx_rd_entry`: combinational read;
* `rx_upd_*` / `tx_upd_*`: write `wr_ptr` / `rd_ptr` at the next edge. A NIC
  update wins over a CPU store to the same field in the same cycle.

## How this departs from the original design

* The NIC reads and updates the table through dedicated ports, not through
  memory-mapped reads routed by the CPU. This assumes the NIC and table sit
  next to each other, as in the integrated prototype.
* The "accelerated thread running" bit is a register (`CUR_ACCEL`) that the
  kernel writes, not an extra bit carried with the ASID. The interrupt is
  masked by that bit.
* Sharing table slots among more connections than slots (a walker or a
  refill exception, as with a TLB) is not built. The table has 64 fixed slots.
* There is one table for the whole machine on the system bus, shared by all
  cores; the kernel routes its interrupts to one core. A table per core, with
  the NIC steering requests to the core that owns a flow, is not built.
* The `WAIT` register, the register map, the record format, the event format,
  the TX header fields, the ring-full drop on RX and the frame-level TX merge
  are this design's own choices; the original gives the mechanisms, not these
  details.
* The wake-up on TX ring space (TX completion) is implemented, although the
  original prototype left it out.
* Not included: the CPU, the memory system and bus, the MAC/PHY and the
  normal (non-accelerated) traffic engine. The first three are standard
  parts; the normal engine is an existing NIC design that only gained
  multiple pre-allocated RX buffers.
* No FPGA timing run has been made. The widest path is the 64-way port
  compare of the RX lookup.

## Files

| file | content |
|---|---|
| `rtl/accio_pkg.sv` | widths, entry and MMIO types, register and event codes, IPv4 checksum function |
| `rtl/rr_pick.sv` | round-robin pick over a request vector |
| `rtl/ready_queue.sv` | hardware ready queue |
| `rtl/event_queue.sv` | control event queue |
| `rtl/io_irq_ctrl.sv` | prioritized I/O interrupt |
| `rtl/ict.sv` | connection table, MMIO, protection, WAIT, sideband |
| `rtl/udp_rx_engine.sv` | receive offload |
| `rtl/udp_tx_engine.sv` | transmit offload |
| `rtl/tx_frame_mux.sv` | transmit merge |
| `rtl/accio_top.sv` | top level |
| `tb/accio_tb_pkg.sv` | frame builder and reference checksum for testbenches |
| `tb/host_mem.sv` | behavioural host memory with latency and random back-pressure |
| `tb/tb_*.sv` | one self-checking testbench per block, plus `tb_accio_top` (end to end) and `tb_accio_workloads` |

Parameters: `N_ENTRIES` (table slots, default 64) and `EVQ_DEPTH` (event queue, 16) on
`accio_top` and `ict`; `RD_OUTSTANDING` (transmit read-ahead, 8 words) on
`udp_tx_engine`. Widths are in the package.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself
(each has a watchdog). With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/accio_pkg.sv tb/accio_tb_pkg.sv -y rtl -y tb +libext+.sv \
    tb/tb_accio_top.sv --top-module tb_accio_top -Mdir obj_top
./obj_top/Vtb_accio_top
```

Replace `tb_accio_top` with any other `tb_*` name to run a unit test. The unit
testbenches use small tables (8 entries, a 4-deep event queue) so that full
and wrap-around cases happen quickly. `tb_accio_top` runs the top with its
default parameters (64 entries, 8 KB rings, a 20 ns clock) and a host memory
with 3-cycle latency and random stalls. It plays the kernel and the user
threads through the MMIO port, and checks payloads, headers and
checksums on both paths. It counts each mechanism and fails if one never
happened: fast-path RX, fallback to the normal path, fast-path TX, RX and TX
wake-ups, an interrupt held back while an accelerated thread runs, contention
at the TX merge, a ring-full drop, link events, a fallback write to the
entry, and protection faults.

`tb_accio_workloads` runs the traffic patterns the design was evaluated
with, also at the default size:

* a stream of 64-byte UDP messages to one connection, with a thread that reads
  and discards them. With a memory that never stalls, 200 frames (2800 words)
  go in over 2800 consecutive cycles: one word per cycle, 3.2 Gbit/s of
  frame words at 50 MHz, which is the bus limit. Nothing is dropped;
* all 64 slots open as receive connections, each with a blocked thread and
  half flagged for interrupts. 64-byte messages arrive interleaved over all of
  them into a memory that stalls 25% of the time. Every ring must hold its
  data, and the kernel must pop all 64 entries once, flagged ones first;
* echo of 64, 128, 256, 512 and 1024-byte messages from a receive ring to a
  transmit ring and back onto the wire. Each reply must leave at one word per
  cycle. With a 3-cycle memory, the turnaround measured from the first
  received word to the last sent word is 42 cycles for 64 bytes and 282
  cycles for 1024 bytes (the thread's own reaction time included).
