# Mesh on-chip network with reordering network interfaces and an order-sensitive SDRAM controller

This design is a 5x5 two-dimensional mesh network that connects 10 AXI master cores to
15 SDRAM memories. A master may send many transactions with the same AXI ID to different
memories at once. The AXI rules require that it get the answers for one ID back in issue
order. Two mechanisms make this cheap:

* **Dynamic reordering in the master interface.** Each response carries a small sequence
  number within its ID. Responses that arrive early wait in one shared reorder buffer, kept
  as linked lists, instead of in buffers fixed per ID. A request enters the network only if
  its response is sure to find room (admission by *ReservedSize*). So the buffer can never
  overflow, and no deadlock can come from it.
* **An order-sensitive (OS) memory controller in the slave interface.** Each SDRAM bank has
  its own request queue. Inside a bank queue a request ranks higher when its master needs it
  sooner, which means a lower sequence number. A request that has waited gains rank (aging).
  The bank arbiter still prefers row hits. Between banks, a round-robin scheduler interleaves
  commands.

Everything is synthesizable SystemVerilog. The SDRAM devices and the master cores are not part
of the RTL. The testbenches stand in for them: `tb/sdram_model.sv` models the SDRAM, and the
testbench processes act as AXI masters.

## Topology, node numbering and address map

* Node `n = y*NX + x`. Port numbers are N=0, E=1, S=2, W=3, Local=4. `y` grows toward S.
* Masters sit in the odd rows (y = 1, 3). Memories sit in the even rows (y = 0, 2, 4). Every
  master therefore has a memory directly above and below it, one hop away.
  * Master index `M = (y/2)*NX + x`. Memory index `S = (y/2)*NX + x`, counted among the
    memory rows.
  * `noc_pkg::master_node` and `noc_pkg::slave_node` convert between an index and a node.
* The memory of address `a` is `a[31:28] mod 15` (`noc_pkg::map_addr`). This is the
  *mapping unit* of the packetizer.
* Inside a memory, a 32-bit word is found by column `a[11:2]`, bank `a[13:12]` and row
  `a[26:14]`.

## Packets and flits

A flit is 32 bits of data plus a head mark and a tail mark, which travel as sideband bits.
A link carries one flit per cycle with a valid bit and a VC number. Credits go back one per
cycle (`link_t`, `credit_t`).

The head flit holds these fields (`noc_pkg::head_t`):

| bits  | field | meaning |
|-------|-------|---------|
| 31:27 | dst   | destination node |
| 26:22 | src   | source node |
| 21:20 | type  | read request, write request, read response, write response |
| 19:16 | tid   | AXI transaction ID (4 bits) |
| 15:13 | seq   | sequence number within the ID (3 bits) |
| 12:10 | len   | burst length − 1 (1..8 beats) |
| 9:8   | resp  | AXI response code |

Packet lengths follow the message, unlike a fixed-size packet format:

| message        | flits |
|----------------|-------|
| read request   | head + address |
| write request  | head + address + 1..8 data |
| read response  | head + 1..8 data |
| write response | head only |

## Master network interface (`master_ni`)

The interface has a forward path and a reverse path.

**Forward path** (`axi_queue` → admission → `packetizer`):

* `axi_queue` takes one AW or AR address per cycle, choosing round-robin. It buffers reads,
  writes and write data in 8-entry FIFOs.
* It offers a write only once all of its data beats have arrived, so a write packet never
  stalls halfway through the network.
* Before the packetizer builds a request, the reorder unit must admit it, and the admission
  gives the request its sequence number.
* Request flits go out on VC 0, limited by credits for the router's 5-flit buffer.

**Reverse path** (Packet-Queue → `reorder_unit` → `depacketizer`). The Packet-Queue is an
8-flit FIFO. Each flit that leaves it returns a credit to the router.

### The reorder unit: the hard part

The reorder unit has three parts.

**`status_table`: per-ID bookkeeping.**

* Data held:
  * *S_Reg*, one bit per ID, says "this ID has messages outstanding".
  * A 4-row table holds `{v, T-ID, N-M, E-S}`. N-M is the number of outstanding messages.
    E-S is the sequence number expected next.
  * *ReservedSize* counts the reorder-buffer words promised to outstanding reads.
* Admitting a request of ID `t` that needs `size` words:
  * A: `S_Reg[t]` is 0. Set it. The sequence number is 0.
  * B: `S_Reg[t]` is 1 and `t` has no row. Fill a free row with N-M=2, E-S=0. The sequence
    number is 1.
  * C: `t` has a row. The sequence number is N-M + E-S, and N-M is incremented.
  * In every case ReservedSize grows by `size`.
* Admission is refused in any of these cases:
  * The buffer would be over-reserved.
  * Case B with no free row.
  * 8 messages of the ID are already outstanding (the sequence field is 3 bits).
  * 8 messages are outstanding in total.
* Delivering a response (procedure D): N-M is decremented, E-S is incremented, and the
  reservation is released. When N-M reaches 0, the row and the S_Reg bit are freed.
* A read reserves `len+1` words. A write reserves nothing, because its one-flit response
  never needs buffer space.

**`reorder_unit`: sorting response packets.**

* When a packet's head arrives, its `(tid, seq)` is compared with the expected number of its
  ID.
* **In order:** the packet goes straight on to the depacketizer, one flit per cycle.
* **Out of order:** the packet is stored.
  * A free row of the 8-row reorder table records `{tid, seq, type, len, resp, src}` and the
    pointer to the first stored word.
  * The payload flits go into the shared buffer. The head flit is not stored; it is rebuilt
    from the row later.
* **Release:** when nothing is passing or being stored, the table is searched for a row whose
  seq equals the current expected number of its ID. That packet is then released:
  * its head flit is rebuilt;
  * its words are read along the list and freed;
  * procedure D runs.
* A release goes before a new packet. Several waiting packets may unblock one another in turn.
* Space always exists, because admission reserved it.

**`ll_buffer`: the shared reorder buffer.**

* 48 words of 32 bits, each with a next pointer.
* A write takes the lowest free slot and links it behind the previous word of the same
  packet.
* A read follows the pointers and frees each slot as it goes.
* 48 words hold six 8-beat reads, or any mix of lengths that adds up to 48.

The `depacketizer` turns read-response packets into R beats. RLAST is set on the tail flit.
It turns write-response packets into single B beats.

## Slave network interface and OS controller (`slave_ni`, `os_mem_ctrl`, `bank_queue`)

**Request path.** Request flits enter an 8-flit Packet-Queue. From there a small depacketizer
reads the head flit and the address flit and turns them into a memory request:

* bank, row and column from the address;
* source node, tid, seq and len, kept for the response.

It waits until the controller can take the request. For a write, this means room in the bank
queue and room for the data in the 8-word linked-list write queue. It then moves the write
data and pushes the request.

**`bank_queue`** (one per bank, 8 entries):

* *Input process:* a new request gets priority `7 − seq`. Every request already waiting
  gains +1, saturating at 15.
* *Arbiter:* among the requests that hit the bank's open row, take the highest priority. If
  none hits, take the highest priority overall.
* When a row hit wins over a request of higher priority, this is reported as a *bypass*.

**`os_mem_ctrl`:**

* Each idle bank takes its arbiter's pick.
* Each cycle, a round-robin scheduler picks one bank whose next command is allowed and issues
  that command. So one bank can activate a row while another waits out tRCD (*interleave*).
* The command sequence depends on the row state:

  | row state | commands                    | first data after issue |
  |-----------|-----------------------------|------------------------|
  | hit       | RD/WR                       | tCL                    |
  | empty     | ACT, RD/WR                  | tRCD + tCL             |
  | conflict  | PRE, ACT, RD/WR             | tRP + tRCD + tCL       |

  These totals are 2, 4 and 6 cycles at the default 2-2-2 timing.
* A request's `len+1` column commands are issued back to back on consecutive columns. Rows
  stay open after use.
* Read data come back `tCL` cycles after RD. They are queued, and each read starts only when
  its words are sure to fit.
* Response descriptors leave in the order the memory serves the requests. An adapter turns
  each one into a response head: the request's source becomes the destination, and the type
  becomes a response. The response packet goes out on VC 1.

## Router (`router`)

* 5 ports, with 2 VCs per input and a 5-flit buffer per VC.
* Requests always use VC 0 and responses VC 1. The two message classes therefore never block
  each other.
* Routing is XY with wormhole switching: an output VC belongs to one packet from its head
  flit to its tail flit.
* Switch allocation is separable round-robin. First each input picks one of its VCs, then
  each output picks one of the inputs.
* Flow control uses credits.
* A flit at the head of its buffer crosses the router in one cycle.

## Parameters and what comes from where

| parameter | default | module | note |
|-----------|---------|--------|------|
| NX, NY | 5, 5 | noc_top, router | mesh size |
| BUF_DEPTH | 5 | router, NIs | flits per VC |
| FLIT_W | 32 | noc_pkg | flit data width |
| TID_W, SEQ_W | 4, 3 | noc_pkg | ID and sequence widths |
| RB_DEPTH | 48 | master_ni | reorder buffer words |
| RT_ROWS, ST_ROWS | 8, 4 | master_ni | reorder-table and status-table rows (own choice) |
| PQ_DEPTH, DEPTH, QDEPTH, WQ_DEPTH | 8 | queues | all queues are 8 x 32 bits |
| NBANK | 4 | os_mem_ctrl | banks per memory |
| T_RP, T_RCD | 2, 2 | os_mem_ctrl | SDRAM timing in cycles; tCL = 2 lives in the device |

**Own choices, where the original design leaves a point open:**

* the placement of masters and memories, and the address map;
* the head-flit bit layout;
* credit flow control and the one-cycle router;
* the sizes of the status table and reorder table;
* the rule that a write is sent only with all its data;
* the rule that a bank keeps its request until all its column commands are out;
* the command encoding on `sd_cmd`.

**Places where this design departs from, or narrows, the original:**

* *Priority direction.* The priority of a new request could also be read as equal to its
  sequence number. Here a message with more messages ahead of it ranks lower (`7 − seq`), so
  the earliest-needed message is served first.
* *Response order in the slave interface.* The plain slave interface keeps the response
  headers in a FIFO. With the OS controller, requests are served out of arrival order, so the
  header fields travel with each request through the bank queue instead.
* *Not built:*
  * the slave interface without the OS controller, which sits in front of a commercial AXI
    memory controller;
  * the SDRAM devices and their physical interface;
  * the processor cores.
* *Not modelled:* SDRAM refresh and timing rules other than tRP, tRCD and tCL.

## Verification

Every block has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

* `tb_noc_top` runs the full 5x5 network at its default parameters. It drives 10 AXI master
  models and 15 SDRAM models.
  * Phase 1: random reads (4 IDs, bursts of 1–8) to all memories, plus writes into a row
    region private to each master.
  * Phase 2: each master reads back everything it wrote.
  * Checks:
    * every R beat and every B arrives per ID in issue order, with the right data;
    * the SDRAM model sees no timing violation.
  * It fails unless all of these happened at least once: reorder-buffer store, release,
    admission stall, row hit, row empty, row conflict, bypass and bank interleave.
* `tb_noc_nonuniform` is the same test under non-uniform traffic. 70% of each master's
  requests go to one of the two memories one hop away, and the other 30% to the remaining
  memories. It also prints the average read latency.
* `tb_os_mem_ctrl` checks exact latencies:
  * ACT→RD = tRCD;
  * data at ACT+4 for a row empty;
  * data at RD+2 for a hit;
  * data at PRE+6 for a conflict.
* `tb_os_mem_ctrl` also checks a four-request example that completes in 14 cycles, with the
  row hit served ahead of an older conflicting request.
* `tb_router` checks XY ports, VC keeping, wormhole integrity and credits, and the one-cycle
  traversal.
* `tb_master_ni` acts as an out-of-order network, so responses return in random order.

To simulate one testbench with Verilator 5 (from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/noc_pkg.sv tb/tb_pkg.sv tb/tb_noc_top.sv --top-module tb_noc_top -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Replace `tb_noc_top` with any other `tb_*` module. The simulator is two-state, and every
register that is read is reset, so random initial values (`+verilator+rand+reset+2`) are
safe. `tb_noc_top` takes about a minute and a half, most of it compiling.

## Files

* `rtl/noc_pkg.sv`: types, field layout, address map and placement functions.
* `rtl/noc_top.sv`: the mesh.
* `rtl/router.sv`, `rtl/rr_arbiter.sv`: the router and its round-robin arbiter.
* Master interface: `rtl/master_ni.sv`, `rtl/axi_queue.sv`, `rtl/packetizer.sv`,
  `rtl/reorder_unit.sv`, `rtl/status_table.sv`, `rtl/ll_buffer.sv`, `rtl/depacketizer.sv`.
* Slave interface: `rtl/slave_ni.sv`, `rtl/os_mem_ctrl.sv`, `rtl/bank_queue.sv`.
* `rtl/ni_fifo.sv`: the FIFO used by the queues.
* `tb/`: one testbench per block, plus `tb/sdram_model.sv` and `tb/tb_pkg.sv` (the initial
  memory contents: `mem_init(id, bank, row, col)`).
