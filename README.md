# MAGIC message-passing node controller

A shared-memory multiprocessor can also move bulk data as explicit messages, if
the node controller that already handles cache coherence is allowed to run
message handlers too. This RTL builds that idea for one node of a FLASH-style
machine. The node controller, MAGIC, sits between a commodity processor, the
node's part of the distributed main memory and a two-channel network. A user
process sends a message of any length with a few uncached loads and stores. It
makes no system call and needs no interrupt at either end. MAGIC then moves the
data one 128-byte cache line at a time. It interleaves that work with
everything else it serves.

Three things make this safe and fast:

* **Protected initiation.** The process describes a message by writing to an
  alternate physical address space. The processor's own MMU translates those
  addresses, so every physical address MAGIC receives is authentic.
* **Atomic commit.** The description builds up in a per-process *sender
  record* and takes effect only on a final read. That read answers success,
  retry or failure.
* **Safe long transfers.** A long transfer runs in slices through a *software
  queue*, so it never blocks coherence traffic. A change of a page's
  translation is caught in the middle of a transfer by a hashed invalidation
  table.

The same machinery carries a small active message: a remote Fetch-and-Op.

## Node structure

`magic_top` is one node. Requests flow through a three-stage pipeline:

1. **Inbox / dispatcher** (`inbox_dispatcher`). It takes one request per cycle
   from four sources:
   * the network reply channel;
   * the network request channel;
   * the processor interface queue;
   * the head of the software queue.

   It classifies the request by address space or message type and picks a
   handler.
2. **Handler engine** (`pp_msg_engine`). It runs the handler. In the source
   design this stage is a programmable protocol processor running handler
   code. Here the message-passing and Fetch-and-Op handlers are a single
   hardwired state machine. It serves one dispatched request at a time.
3. **Outbox** (`outbox`). It steers each message the handler produces to the
   processor reply queue, the network request queue or the network reply
   queue. When the message carries a data line, the outbox reads that line out
   of the data buffers.

Around the handler engine sit:

| Block | File | Role |
|---|---|---|
| hardware queues | `sync_fifo` | 3 inbound and 3 outbound FIFOs, QDEPTH entries, with a free-entry count |
| data buffers | `data_buffers` | NBUF line-sized registers with a shifting, wrapping load |
| software queue | `sw_queue` | pending transfer tasks; the head is what the dispatcher sees |
| hold-off counter | `holdoff_counter` | counts operations that need stable translations |
| invalidation table | `xlate_inval_table` | hash table on physical page → (V, PA, VA) entries |
| virtual-PID table | `vpid_table` | virtual process id → (node, OS PID) |
| Fetch-and-Op unit | `fetch_op_alu` | the arithmetic of the home-node operation |

`magic_pkg` holds the shared formats: addresses, commands, network header and
memory port. Every block uses a synchronous, active-low reset.

The ports of `magic_top` are plain valid/ready pairs:

* **Processor.** The processor issues uncached accesses `{we, addr[39:0],
  data[63:0]}` and receives reply doublewords. Two interrupt outputs go to the
  processor: `xlate_irq` asks for a retranslation, and `recv_irq` signals that
  a message has arrived for a blocking receive.
* **Network.** Request and reply channels, in and out. Each message is a
  16-byte header plus an optional 128-byte line.
* **Memory.** One line per request, with a 16-bit doubleword write mask. Read
  data returns with `mem_rsp_valid`, at any latency.
* **Events.** The `events` output exports event counters for observation.

The processor, the DRAM, the mesh router and the coherence protocol are outside
this RTL. The testbench models the first three.

## Address spaces and commands

A physical address is 40 bits:

```
 39 38 | 37 .. 30 | 29 .. 7      | 6 .. 0
 space | node     | line number  | byte in line
```

| space | use |
|---|---|
| `00` base | ordinary memory; MAGIC serves the access from local memory |
| `01` I/O | commands: `addr[10:3]` names the command, the data word is its argument |
| `10` message | an authentic physical address (page of a description, or the target of a Fetch-and-Op) |
| `11` | unused here |

The OS maps the message space so that each page of a process's buffer also
appears at a second virtual address. That second mapping differs from the
ordinary one only in the space bits. A store through it therefore hands MAGIC
the page's real physical address, and MAGIC can trust that address.

I/O commands (`io_cmd_e` in `magic_pkg`):

| cmd | access | meaning |
|---|---|---|
| 1 `IO_MSG_INIT` | W | open a description: `{dest_vpid[63:48], status_flag[47:40], type[39:32], num_addrs[31:24], length[23:0]}` |
| 2 `IO_CTX_SWITCH` | W | OS: PID now running (selects the sender record) |
| 3 `IO_VPID_SET` | W | OS: `{ok[63], vpid[47:32], node[23:16], ospid[15:0]}` |
| 4 `IO_BUFALLOC` | W | next message-space write registers a receive buffer: `type[39:32], size[23:0]`, owned by the running process |
| 5 `IO_RTAB_SETUP` | W | next message-space write gives the receive-table base |
| 6 `IO_STAT_SETUP` | W | next message-space write gives the status-flag area base |
| 7 `IO_FOP_RESULT` | R | result of the outstanding Fetch-and-Op (the reply waits for it) |
| 8 `IO_XLATE_CHG` | W / R | announce a translation change of a page / wait for permission |
| 9 `IO_XLATE_NEW` | W | answer a retranslation interrupt: `{entry[59:56], new PA[37:0]}` |
| 10 `IO_MCOPY_DEST` | W | after `IO_MSG_INIT`: make the description a memory copy to this physical address |
| 11 `IO_RECV_WAIT` | W | `data[0]=1` arms the arrival interrupt, `0` disarms it; either way it clears `recv_irq` |

## Initiation protocol

A send is a short series of accesses:

1. Write `IO_MSG_INIT` with the destination virtual PID, a status-flag number,
   a type, the page count and the length in bytes.
2. Do one message-space store per page. The address is the page's authentic
   physical address, and the data word is its virtual address. Each page is
   linked into the invalidation table at once.
3. Do a message-space read. This commits the description, or aborts it.

| answer | when |
|---|---|
| `SUCCESS` (0) | accepted; bits 63:32 hold the message number `{node, 24-bit send count}` |
| `RETRY` (1) | the process's record is still busy with its previous message, a described page changed translation in the meantime, or the invalidation table is full |
| `FAIL` (2) | unknown or invalid destination, a length that is not whole doublewords, or a page count that does not cover the length |

Only the final read changes any state outside the sender record. Each process
has its own record (NPROC of them, selected by PID modulo NPROC), so a context
switch in the middle of a description does no harm. Success does not mean the
data has arrived. It means the transfer is queued. Completion shows up later
in the status flag, a doubleword at `stat_base + 8*flag`:

* `1` means delivered;
* `2` means the receiver had no buffer.

## Transfer engine and the software queue

A committed record goes on the software queue as an 8-bit task header, which is
its record number. Each time the dispatcher hands the task to the engine:

* the first invocation sends the user-message header on the request channel;
* it then sends up to CHUNK components. Each component is one 128-byte line,
  labelled with the message number and its line index in the message;
* an unfinished task goes back to the tail of the queue, so other requests and
  other transfers get their turn;
* before each component the engine checks the request outbound queue. If the
  queue is full, the task yields to the software queue instead of waiting.
  Waiting would deadlock a handler that the network is itself waiting on.

The dispatcher's space guarantee makes this work. It starts a handler only when
at least MIN_REQ request, MIN_REP reply and MIN_PROC processor outbound entries
are free. So any single message a handler emits always finds room.

The dispatcher serves its sources in this order:

1. reply channel;
2. request channel;
3. processor;
4. software queue.

Replies always drain, and background transfers use only idle cycles. Only the
head task of the software queue is held in a register. In the source design
the rest of the queue is a linked list in memory. Here it is a small on-chip
ring of NTASK headers, and `enq_front` can put a task back at the head.

## Alignment in the data buffers

The receiver's buffer is assumed to be line-aligned. The sender's buffer may
start at any doubleword `d`. The data buffers fix this with one kind of load.
It writes a memory line into buffer A starting at doubleword position `s`, and
the doublewords that run past the end wrap into positions `0..s-1` of a second
buffer B named in the same load. Positions not covered keep their contents.

For component `k`, the engine loads:

* source line `k` with shift `16-d`. Its tail wraps into the buffer that
  collects component `k`;
* source line `k+1` into that buffer's remaining positions.

Two loads therefore assemble an aligned 128-byte component. A slice of the
transfer does not keep buffers across invocations. So the first component of
each slice reloads the line it needs, and each further component costs one
memory read. The final component writes only the doublewords inside the
message.

## Reception

The receiving MAGIC needs no help from its processor while data arrives:

* **Buffers.** The OS (or the process) registers up to NRBUF receive buffers
  ahead of time. Each buffer has a type, an owner PID, a size and a base
  address.
* **Header.** A header claims a free receiver record (NRR of them). It takes
  the first free buffer whose type and owner match and which is large enough.
  If no buffer matches, the message is counted as dropped. The sender is then
  acknowledged with status 2, and the components that follow are ignored.
* **Components.** Each component finds its record by message number. It is
  checked for sequence and written to `base + 128*index`.
* **Lost components.** A component beyond the expected index means one was
  lost. The receiver discards it and sends one `NM_RETX` message on the reply
  channel, carrying the first missing index. Until that component arrives, it
  discards everything else for the message without asking again. The sender
  keeps its record until the acknowledgement, so it can rewind to the missing
  index and put the task back on the software queue. The unaligned path needs
  nothing special here, because every slice of a transfer starts by reloading
  its lines. A lost header, or a lost `NM_RETX`, is not recovered: there is no
  timeout.
* **Completion.** When the last byte is in, the engine writes a two-doubleword
  entry in the receive table at its next slot (RTAB_N slots):
  * `{8'h01, sender PID[47:32], length[23:0]}`;
  * the buffer address.

  It then returns an acknowledgement on the reply channel. The receiving
  process polls the table.
* **Blocking receive.** A process that would rather sleep than poll arms the
  arrival interrupt with `IO_RECV_WAIT`. The next message delivered into a
  receive buffer raises `recv_irq` and disarms it, and the OS clears the
  interrupt with another `IO_RECV_WAIT` write. There is one such interrupt
  per node.

## Translation hold-off and invalidation

A send is described with physical addresses, so the OS may remap a page while
MAGIC still uses it. Two mechanisms cover this.

**Hold-off** (`holdoff_counter`) covers short operations such as Fetch-and-Op:

* each such operation increments a counter and decrements it when it finishes;
* the OS announces a change (`IO_XLATE_CHG` write) and then reads
  `IO_XLATE_CHG`. The read is answered only when the count is zero;
* while a change is pending, no new hold-off operation may start, so the
  count is sure to drain.

**Invalidation** (`xlate_inval_table`) covers long transfers, which do not use
hold-off:

* every page of every live description is an entry {V, PA, VA}. The entry is
  chained in a bucket chosen by a hash of the physical page number (the two
  low 3-bit groups XORed, for 8 buckets);
* on a change, the table walks that one bucket and clears V in every entry for
  the page, one entry per cycle. It reports how many it cleared;
* an entry cleared during a description makes the final read answer RETRY;
* an entry cleared during a transfer stops the transfer when it reaches that
  page. MAGIC then raises `xlate_irq` with the entry number, the virtual page
  and the PID.

The processor looks the page up again and answers with `IO_XLATE_NEW`. MAGIC
re-links the entry under the new physical page and resumes the transfer on the
software queue.

## Memory copy

In the memory-copy variant the sender names the destination, not just the
receiving process. The processor opens a description as for a send. It then
writes the destination's physical address with `IO_MCOPY_DEST`. The address
must be line-aligned, and its node field selects the receiving node. The
destination virtual PID is ignored.

* **Hold-off.** On commit, the copy takes translation hold-off and keeps it
  until the acknowledgement returns. If hold-off is blocked by a pending change,
  the final read answers RETRY. Because of hold-off, a translation change for
  any page cannot be granted while the copy runs. So the transfer skips the V
  check that a plain send needs.
* **Messages.** The header (`NM_MHDR`) carries the length and the destination.
  Each component (`NM_MCOMP`) is labelled with its index and with the physical
  address of its destination line.
* **Receiver.** The receiver keeps only a component count. It writes each line
  where the label says, and acknowledges the message as for a send. It picks no
  buffer and writes no receive-table entry.
* **Shared machinery.** Sequence checking and retransmission work the same way
  as for a send. The alignment load also works the same way: the source may
  start at any doubleword.

## Fetch-and-Op

A message-space store outside a description is a Fetch-and-Op command. The
address is the target word. The data word is `{op[63:60], constant[59:0]}`,
with these operations:

| op | operation |
|---|---|
| 0 | add |
| 1 | and |
| 2 | or |
| 3 | xor |
| 4 | swap |
| 5 | unsigned max |

The operation proceeds as follows:

1. The requesting node takes hold-off and sends the request to the target's
   home node. If the target is local, it performs the operation itself.
2. The home node reads the line, computes with `fetch_op_alu`, writes it back
   and returns the old value on the reply channel.
3. The processor collects the old value with an uncached read of
   `IO_FOP_RESULT`. The read may come before or after the reply. One
   Fetch-and-Op per node may be outstanding.

## Parameters

| parameter | default | meaning | origin |
|---|---|---|---|
| `LINE_BYTES` | 128 | cache line and component size | source design |
| header | 16 bytes | network header | source design |
| `NODE_W` | 8 | 256 nodes (8×8×4 mesh) | source design |
| `PAGE_BYTES` | 4096 | page | source design |
| `QDEPTH` | 8 | depth of each hardware queue | chosen |
| `NBUF` | 16 | data buffers | chosen |
| `NPROC` | 4 | sender records | chosen |
| `MAX_PAGES` | 4 | pages per message (16 KB) | chosen |
| `NRR` | 4 | receiver records (messages arriving at once) | chosen |
| `NRBUF` | 4 | registered receive buffers | chosen |
| `CHUNK` | 4 | components per software-queue slice | chosen |
| `NENT` / `NBKT` | 16 / 8 | invalidation-table entries / buckets | chosen |
| `NVPID` | 64 | virtual-PID table entries | chosen |
| `NTASK` | 8 | software-queue capacity | chosen |
| `MIN_REQ/MIN_REP/MIN_PROC` | 2/1/1 | dispatcher's outbound space guarantee | chosen |

The memory latency is whatever the memory port returns. The testbench uses 30
cycles, the figure given for the source design's DRAM.

## How far it follows the source design

These points follow the source design:

* the split of the address space into four spaces;
* double mapping for authentic addresses;
* per-process sender records and atomic commit on the final read;
* the three answer classes;
* messages as a header plus line-sized components carrying a message number
  and offset;
* chunked transfers rescheduled on a software queue that keeps only its head
  on chip, and yielding on a full outbound queue;
* the shifting, wrapping alignment load;
* preallocated receive buffers chosen by process and type, a receive table and
  a status flag;
* the hold-off counter rules;
* the hashed invalidation table with (V, PA, VA) entries and the
  retranslation interrupt;
* the virtual-PID table;
* resending from the first missing component, with the sender record kept
  until the acknowledgement;
* memory copy, with components labelled by destination address and protected
  by hold-off;
* an interrupt on message arrival for a receiver that blocks;
* the three-phase Fetch-and-Op.

These are choices of this design:

* All field widths, command codes, answer codes and the header layout.
* The hash function and every size in the table above.
* The dispatcher's priority order and its minimum space counts.
* How buffers are picked and how the status word is located.
* How a retransmission is requested: one `NM_RETX` per gap on the reply
  channel.
* How a memory copy gets its destination: `IO_MCOPY_DEST`, taken as given
  without checking.
* The Fetch-and-Op result is returned as the answer to an uncached read. The
  source design describes this in one place. Elsewhere it writes the result to
  a notification address; that variant is not built.

Departures and omissions:

* **Hardwired handlers.** The handlers are a state machine, not code on a
  programmable processor. The timing is this engine's, not a software
  handler's: a component costs about one memory latency.
* **On-chip state.** Sender records and the rest of the software queue are
  kept in registers on chip. The source design keeps them in memory behind a
  data cache.
* **Receiver lookup.** Receiver records are found by comparing message numbers
  in parallel, not through a hash table in memory.
* **Not built:**
  * the coherence protocol; message data are read from and written to memory
    as if no cache holds them dirty;
  * a memory copy to a destination that is not line-aligned;
  * a timeout to recover a lost header or a lost retransmission request;
  * handing undeliverable messages to the OS (they are dropped and the sender
    is told);
  * the software TLB alternative.
* **Network.** The network router is not part of this RTL.

## Simulating

Everything is plain SystemVerilog-2017. `magic_pkg.sv` must come first. With
Verilator 5:

```
verilator --binary --timing -Irtl rtl/magic_pkg.sv \
    $(ls rtl/*.sv | grep -v magic_pkg) tb/tb_magic_top.sv --top-module tb_magic_top
./obj_dir/Vtb_magic_top
```

Replace `tb_magic_top` with any other testbench in `tb/`. Each testbench ends
with a line `TB_RESULT checks=N failures=M` and has a watchdog.

`tb_magic_top` runs two nodes at default parameters. A crossbar joins them,
with no latency. Each node has a memory model with a 30-cycle read latency and
a scripted processor. The test takes these steps:

1. an unaligned 3000-byte send across two non-contiguous pages;
2. a 4 KB page send while the request channel is held, so the transfer yields;
3. a retry for a busy record;
4. a failure for an unknown destination;
5. a translation change during a description (retry);
6. a translation change during a transfer (interrupt, new page, resume);
7. remote Fetch-and-Add, local Swap, and a Fetch-and-Or that makes a
   translation change wait for hold-off;
8. base-space accesses;
9. a message with no receive buffer;
10. a lost component, repaired by retransmission, delivered to a receiver
    blocked on the arrival interrupt;
11. a memory copy from an unaligned source, during which a translation change
    is held off until the copy completes.

It counts every mechanism and fails if any of them never happened.

## Test results

All eleven testbenches pass:

| testbench | checks | what it exercises |
|---|---|---|
| `tb_magic_top` | 76 | end-to-end, two nodes, default parameters |
| `tb_pp_msg_engine` | 59 | engine with real helper blocks; send, receive, alignment, retries, chunking, retransmission, memory-copy reception, arrival interrupt |
| `tb_inbox_dispatcher` | 29862 | priority, handler decode, space guarantee |
| `tb_outbox` | 10001 | steering and buffer read |
| `tb_sync_fifo` | 8982 | random push/pop against a model |
| `tb_sw_queue` | 8167 | head/tail insertion against a model |
| `tb_holdoff_counter` | 16003 | counting, blocking, grant |
| `tb_xlate_inval_table` | 4055 | insert, remove, invalidate against a model |
| `tb_vpid_table` | 398 | writes and lookups |
| `tb_fetch_op_alu` | 1600 | all operations |
| `tb_data_buffers` | 513 | shifted and wrapped loads |

Each unit testbench was also run against a copy of its module with one
deliberate bug. Every such copy fails.

The end-to-end test also measures three times:

* **4 KB aligned send.** It takes 30 cycles per component with the 30-cycle
  memory. The source design estimates about 30 cycles of handler time per
  component: 426 MB/s of data at a 10 ns cycle.
* **4 KB aligned send on a 400 MB/s link.** The testbench limits node 0's
  request link to 4 bytes per cycle. A 144-byte component then holds the link
  for 36 cycles. The send takes 1235 cycles from initiation to status flag:
  38 cycles per component, 331 MB/s of data. The source design estimates
  355 MB/s of data and about 317 MB/s of useful bandwidth.
* **Remote Fetch-and-Add.** It takes 57 cycles from command to result with no
  network latency. The source design estimates about 88 cycles of controller
  time, plus network latency.
