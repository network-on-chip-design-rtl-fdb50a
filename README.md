# Network interface for a tiled waferscale processor

A waferscale processor is built by bonding many small chiplets, called tiles,
onto one silicon wafer. Each tile carries 14 Cortex-M3 cores, their private
memories, and a slice of a machine-wide shared memory. The tiles form a 2-D
mesh, and any core may use the shared memory of any tile.

This RTL is the glue that makes that work: the logic on each tile between its
AHB bus and the two mesh routers. The two meshes route differently: one goes
X then Y, the other Y then X. With two routes between any pair of tiles, the
machine survives a dead tile on one route.

Three kinds of access cross the mesh:

* **Remote write.** A core stores to a special address range. The store
  becomes one network message, and the write lands in the destination tile's
  shared memory. The core is free as soon as the message has left.
* **Remote read and compare-and-swap (CAS).** A core could wait hundreds of
  cycles for an answer, and it must not hold its tile bus that long. So these
  run like a tiny DMA:
  1. the core writes a request into per-core registers;
  2. the request travels to the owning tile, where a bus master performs the
     access;
  3. the answer comes back on the *other* network, so it retraces the
     request's path;
  4. the answer is written into a *bucket* in the requester's bookkeeping
     memory, and the bucket's valid flag is set;
  5. the core polls the flag whenever it likes.
* **Local traffic.** Messages addressed to the issuing tile never enter a
  router. They are looped back inside the tile.

Every message is one 99-bit flit that moves with a valid/ready handshake.
There are no multi-flit packets and no virtual channels.

## What is here and what is not

| Part | Where |
|---|---|
| Message format, address map, shared types | `rtl/wsp_pkg.sv` |
| Packetizer: store to message, request registers | `rtl/packetizer.sv` |
| Depacketizer: writes and responses to memory | `rtl/depacketizer.sv` |
| Depacketizer2: serves reads and CAS, emits responses | `rtl/depacketizer2.sv` |
| Two-input configurable arbiter | `rtl/msg_arbiter.sv` |
| Message FIFO | `rtl/msg_queue.sv` |
| Split by message type | `rtl/msg_sort.sv` |
| Split into loopback, XY or YX | `rtl/msg_steer.sv` |
| Whole network interface | `rtl/net_if.sv` |
| Arbiter configuration registers | `rtl/config_regs.sv` |
| AHB SRAM bank (shared, bookkeeping, private) | `rtl/ahb_sram.sv` |
| One tile (top level) | `rtl/wsp_tile.sv` |

Three parts are bought or borrowed IP in the real machine and are not in
`rtl/`:

* the Cortex-M3 cores;
* the ARM AHB bus matrix, which has 16 masters and 7 slaves and supports
  master lock;
* the mesh routers.

`wsp_tile` brings all of their connections out as ports. Simple behavioural
stand-ins for the bus matrix and the routers live in `tb/`; the testbench
itself plays the cores.

## The message

| Bits | Field | Meaning |
|---|---|---|
| 98:96 | size | bytes of the AHB access: 1, 2 or 4 for writes, 4 for reads, 2 for CAS |
| 95:80 | compare | CAS compare value |
| 79:64 | swap | CAS swap value |
| 63:32 | data | meaning depends on the type; see the list below |
| 31 | network | 0 = XY mesh, 1 = YX mesh |
| 30:29 | type | 00 write, 01 read, 10 CAS, 11 response |
| 28:10 | address | byte address inside the destination tile (19 bits) |
| 9:5 | dest y | |
| 4:0 | dest x | |

The data word holds:

* for a write, the store data;
* for a read or CAS request, the return label
  `{6'b0, src_y[4:0], src_x[4:0], 2'b0, core[3:0], bucket[9:0]}`;
* for a read response, the word that was read;
* for a CAS response, 1 on success and 0 on failure.

A response carries `{core, bucket, 3'b000}` in its address field. This is the
bucket's offset inside bookkeeping memory, so the receiving tile needs no
further lookup.

Coordinates are 5 bits each, so the mesh can be up to 32 x 32 tiles. The
19-bit address covers the 512 kB of shared memory on each tile. Together that
is 128 MB of machine-wide shared memory.

## Address map seen by a core

| Range | What |
|---|---|
| `0x2000_0000`-`0x2007_FFFF` | this tile's four shared 128 kB banks (bank = address bits 18:17) |
| `0x2008_0000`-`0x2009_FFFF` | bookkeeping bank (128 kB) |
| `0x4000_0000`-`0x4000_0017` | arbiter configuration, one word per arbiter |
| `0x6000_0000`-`0x6000_01FF` | packetizer request registers |
| `0x8000_0000`-`0x9FFF_FFFF` | remote write over the XY mesh |
| `0xA000_0000`-`0xBFFF_FFFF` | remote write over the YX mesh |

**Remote write address:**
`{2'b10, network, dest_x[4:0], dest_y[4:0], address[18:0]}`.

**Bookkeeping address of a bucket:**
`{12'h200, 3'b100, core[3:0], bucket[9:0], flag, 2'b00}`.

* flag 0 is the data word and flag 1 the valid flag.
* Each core owns 1024 buckets, so it can have up to 1024 requests
  outstanding.

**Packetizer register address:**
`{20'h60000, 3'b000, send, reg[1:0], core[3:0], 2'b00}`.

Each core has its own three registers, so cores can build requests at the same
time without interfering:

| reg | Contents |
|---|---|
| 0 | data: CAS compare value in 31:16, swap value in 15:0 |
| 1 | target: `{1'b0, cas, network, dest_x, dest_y, address[18:0]}` |
| 2 | bucket index, in bits 9:0 |
| 3 | reserved |

Writing a register at the `send = 1` alias also launches a request from that
core's current register values. Registers left unchanged need not be
rewritten between requests.

A remote read from core 5 looks like this:

```
write 0x6000_0054 = {1'b0, 1'b0, net, dx, dy, addr}   // target register
write 0x6000_0194 = bucket                            // bucket, with send
poll  0x2008_0000 | core<<13 | bucket<<3 | 4  until 1
read  0x2008_0000 | core<<13 | bucket<<3             // the data
write 0x2008_0000 | core<<13 | bucket<<3 | 4 = 0     // free the bucket
```

For a CAS, first write reg 0 with `{compare, swap}` and set `cas = 1` in the
target. Address bit 1 picks which half of the word is compared and swapped.

## The three engines

### Packetizer

The packetizer is an AHB slave with four states.

| State | Meaning |
|---|---|
| INIT | idle |
| WRITE | a write message is on offer to the routers |
| REGSTORE | the data phase of a register access |
| REQUEST | a read or CAS request is on offer to the routers |

* **Remote stores.** A store to the remote-write range enters WRITE in its
  data phase. The message is built from the captured address and the live
  HWDATA, and it is offered in that same cycle. HREADYOUT follows the router's
  ready, so a busy network stretches the store, and the core is released the
  cycle the message is taken.
* **Register accesses.** A register access goes to REGSTORE. Reads return the
  register.
* **Sending a request.** A write through a send alias moves on to REQUEST.
  During REQUEST, a bus transfer that arrives is held in its data phase until
  the request has gone.
* **Back to back.** After WRITE or REQUEST, a waiting transfer goes straight
  to its next state without passing through INIT.

### Depacketizer

The depacketizer is an AHB master that writes incoming messages into memory.

* **Write messages** take two bus cycles: an address phase into shared memory,
  then a data phase with the message data on its byte lanes.
* **Response messages** take three cycles:
  1. the address of the bucket's data word;
  2. the response data, overlapped with the address of the flag;
  3. the flag value 1.

It takes the next message in the last data phase, so a stream of messages
runs with no idle cycles. With zero-wait memory, that is 2 cycles per write
and 3 per response.

### Depacketizer2

Depacketizer2 is an AHB master that serves incoming reads and CAS requests.

* **Reads** take two cycles: the address, then the data. The response is
  offered in the same cycle the data returns.
* **CAS** runs through four states:

  | State | Bus activity |
  |---|---|
  | CAS_ADDR | reads the whole word |
  | CAS_COMPARE | compares the chosen half of the word with the compare value |
  | CAS_SWAP | puts the halfword write address on the bus (success only) |
  | CAS_RETURN | drives the swap data and offers the response |

  On a failed compare it goes from CAS_COMPARE straight to CAS_RETURN, without
  writing. HMASTLOCK is held from the read's address phase through the write's
  address phase, so no other master can slip in between the read and the
  write.
* **Router busy.** If the router will not take the response, depacketizer2
  parks in ROUTER_WAIT.
* **Addressing the response.** The response goes on the opposite network to
  its request. It is addressed with the return label carried in the request.

## Inside the network interface

```
 packetizer ----+--> steer --+--> loopback arbiter --> local queue ----> sort --+
 depacketizer2 -+            +--> XY arbiter -------> XY router                 |
                             +--> YX arbiter -------> YX router                 |
 XY router --+                                                                  |
 YX router --+--> receive arbiter --> network queue --> sort --+                |
                                                               v                v
                         depacketizer arbiter  <-- writes and responses of both sorts
                         depacketizer2 arbiter <-- reads and CAS of both sorts
```

* **Steer.** Each steer sends a message to the loopback path if its
  destination is this tile; otherwise it sends it to the router its network
  bit names.
* **Sort.** Each sort sends writes and responses to the depacketizer, and
  reads and CAS to depacketizer2.
* **Queues.** Both queues are 8 messages deep (`Q_DEPTH`). A queue's ready
  depends only on its own fill level, which keeps every ready signal free of
  combinational loops.

### Arbiters and their configuration

All six merge points are the same two-input arbiter. Arbitration matters only
when both inputs are valid (a conflict). There are three modes:

| mode | Behaviour |
|---|---|
| 0 alternate (reset default) | the input holding priority wins; priority passes to the other input after every conflict |
| 1 strict | the preferred input always wins |
| 2 relaxed | the preferred input wins `count` conflicts, then the other input wins one; this repeats |

Once an arbiter has offered a message, it keeps the same input selected until
the message is taken. So a message on offer never changes, as the link
protocol requires.

Configuration word *i* (at `0x4000_0000 + 4*i`) has this layout: `[1:0]` mode,
`[2]` preferred input, `[15:8]` count. It can be read back.

| i | Arbiter | Input 0 | Input 1 |
|---|---|---|---|
| 0 | depacketizer | network queue | local queue |
| 1 | depacketizer2 | network queue | local queue |
| 2 | loopback | packetizer | depacketizer2 |
| 3 | XY transmit | packetizer | depacketizer2 |
| 4 | YX transmit | packetizer | depacketizer2 |
| 5 | receive | XY router | YX router |

For example, giving depacketizer2 strict priority on arbiters 3 and 4 lets
responses out ahead of new requests.

### Deadlock, and how to stay clear of it

Depacketizer2 both consumes messages and produces them, so the interface can
lock up. The queues make this much rarer but do not rule it out.

**Inside one tile.** Suppose the local queue is full of a tile's own requests
to itself. Depacketizer2 then waits to loop a response into that full queue,
and the requests at the head of the queue wait for depacketizer2. Nothing
moves.

This is easy to reach: four cores with four requests each to their own tile
is already enough. Software must keep no more self-addressed requests in
flight than `Q_DEPTH`.

**Across tiles.** A similar cycle through the routers needs the network queue
of every tile around a loop to be full of requests at the same moment. Under
hot-spot load, the hot tile's incoming requests and outgoing responses use
opposite link directions, so that case drains. Priority settings, such as
responses first on the transmit arbiters, make the remaining cases rarer
still.

## The tile top, `wsp_tile`

`wsp_tile` instantiates:

* the network interface;
* four shared banks and the bookkeeping bank;
* one 64 kB private bank per core;
* the configuration registers.

Its ports:

| Port | Meaning |
|---|---|
| `tile_x`, `tile_y` | this tile's coordinates, strapped per tile |
| `s_*[7]` | slave side of the bus matrix: 0-3 shared banks, 4 bookkeeping, 5 configuration, 6 packetizer |
| `m_*[2]` | master side of the bus matrix: 0 depacketizer, 1 depacketizer2 |
| `p_*[NCORE]` | each core's private memory port |
| `rt_out_*[2]`, `rt_in_*[2]` | local port of the XY (0) and YX (1) router |
| `arb_conflict` | one bit per arbiter, high in a conflict cycle |

Bus bundles are packed structs from `wsp_pkg`:

* `ahb_req_t` holds `haddr, htrans, hwrite, hsize, hmastlock, hwdata`;
* `ahb_rsp_t` holds `hrdata, hready, hresp`.

A slave sees its HSEL and the bus HREADY separately.

## Parameters

| Module | Parameter | Default |
|---|---|---|
| `wsp_tile` | `NCORE` | 14 |
| | `SHARED_BYTES` | 131072 |
| | `BOOK_BYTES` | 131072 |
| | `PRIV_BYTES` | 65536 |
| | `Q_DEPTH` | 8 |
| `ahb_sram` | `BYTES` | 131072 |
| `msg_queue` | `DEPTH` | 8 |

Field widths (coordinates 5 bits, address 19 bits, bucket 10 bits, core 4
bits) and the base addresses are constants in `wsp_pkg`.

## Design choices beyond the published description

The published description fixes the following: the message fields and their
order, the address ranges, the state sets of the three engines, the
network-interface structure, and the three arbiter modes. This RTL decides the
rest:

* the type encoding;
* the return label inside request data;
* the bookkeeping offset carried in responses;
* the size field values;
* the halfword split of the CAS word;
* the shared-memory and configuration base addresses;
* the configuration register layout;
* which input is input 0 of each arbiter;
* the queue depth;
* the grant lock in the arbiters;
* treating a full queue as not ready.

Three further choices:

* Write data passes through on its byte lanes unchanged. A halfword store to
  an odd halfword therefore carries its data in bits 31:16, as AHB puts it.
* Memory contents are not reset. Software must clear a bucket's flag before
  it first uses the bucket.
* Only arbitration is configurable. The tile's other configuration functions
  are not described anywhere and are not built.

## Verification

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_msg_arbiter` | all three modes, against a reference pattern; the grant lock; hold-until-ready |
| `tb_msg_queue` | random push/pop against a model queue; full and empty behaviour |
| `tb_msg_sort` | every type goes to the right side |
| `tb_ahb_sram` | byte, halfword and word writes; reads |
| `tb_config_regs` | writes, readback, reset values |
| `tb_packetizer` | messages and registers against a model; one-cycle write latency; a transfer held behind a pending request |
| `tb_depacketizer` | the exact bus transfer log; 8 writes plus 8 responses in 40 cycles; random wait states |
| `tb_depacketizer2` | read latency; CAS success and failure; memory afterwards; lock coverage; router back-pressure |
| `tb_net_if` | one interface on a behavioural bus; messages from both routers; answers on the opposite network; loopback write, read and CAS; receive conflicts |
| `tb_wsp_tile` | four full-size tiles on a 2x2 mesh: remote and looped-back writes, reads and CAS, config and private memory, then a random stress phase with routers refusing messages |
| `tb_workloads` | a 3x3 mesh of full-size tiles running three system programs: a mailbox, read/CAS traffic and a BFS (see below) |

`tb_wsp_tile` counts every mechanism and fails if any never happened:

* loopback;
* traffic on each network;
* arbiter conflicts;
* queueing;
* depacketizer2 router wait;
* packetizer stall;
* a pending bus transfer;
* locked transfers;
* CAS success and failure.

`tb_workloads` runs three system programs:

* **Mailbox.** A circular-queue mailbox carries 48 words between opposite
  corners.
* **Read/CAS traffic.** Uniform and hot-spot phases run with 4 requests in
  flight per core. CAS swaps equal their compares, and some CAS operations
  fail on purpose. During the hot spot, responses get strict priority on the
  transmit arbiters and the receive arbiter runs in relaxed mode.
* **BFS.** A parallel breadth-first search over 45 vertices claims each
  vertex with a remote CAS. The result is compared with a reference BFS.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_workloads \
    -y rtl -y tb +libext+.sv rtl/wsp_pkg.sv tb/tb_workloads.sv
./obj_dir/Vtb_workloads +verilator+rand+reset+2
```

`+verilator+rand+reset+2` starts every register that reset does not reach at
a random value. This includes memory contents, which the tests therefore
never rely on.

The `tb/` helpers are simulation models, not design IP:

| Helper | What it models |
|---|---|
| `ahb_matrix_model` | address decode, round-robin grant, master lock |
| `dor_router_model` | 5-port XY or YX router with one-message input buffers |
| `mesh_model` | any NX x NY array of tiles |
| `ahb_seq_master` | a pipelined master that plays a list of transfers |
| `ahb_mem_model` | sparse memory with random wait states |
