# On-demand memory system for a wireless video entertainment platform

A multimedia SoC that runs a wireless baseband (WPU), a MAC, a link/transport
layer engine (LT) and a scalable-video (SVC) decoder side by side has two
memory problems. Each engine needs a small, fast local memory. The shared
on-chip cache and the DRAM must also be divided between engines whose demand
changes over time. This RTL is a memory hierarchy that gives out memory on
demand at every level:

- **Local level: distributed MMU (d-MMU) per node.** Each node has a 64 KB
  L1 cache. Its network interface (NI) can borrow free L1 blocks as overflow
  packet buffers when the on-chip network is congested.
- **Shared level: centralized MMU (c-MMU).** A 2 MB L2 is built from 16 SRAM
  banks. Each bank is one *way*. A bank allocation table (BAT) gives every
  node its own set of banks for the current time interval. Banks no node
  needs are powered down.
- **Prefetch: inter-layer prefetch.** A command generator predicts the
  base-layer residuals and motion vectors that the SVC decoder will need for
  its next macroblock. It preloads them into the decoder's L1.
- **Off-chip: DRAM controller.** Two DDR3-1333 x16 devices share one bus. A
  command scheduler reorders requests across banks. An SVC-aware address map
  places reference frames, residuals and motion vectors in different banks,
  so those accesses do not conflict on rows.

```
 PE0..PE3 ──pe_*──► dmmu ◄──bw/br── ni ──net_*──► (on-chip network, not included)
                     │  ▲ pf_*                      ▲ tx_*/rx_*
                     │  └──────── pcg (node 3)      PE
                     ▼ m_*  (32-byte lines)
                   cmmu ── 16 × sram_bank, bat
                     ▼ d_*  (64-byte lines)
                   dram_ctrl = addr_translator + emi ──ddr_*──► 2 × DDR3 x16
```

The top module is `odms_top`, with 4 nodes. Node 3 is the SVC decoder. The
whole design runs on one clock, the DDR3 clock (tCK = 1.5 ns).

## d-MMU: L1 cache with buffer borrowing (`dmmu`, `borrow_addr_gen`)

**Cache organisation**
- The L1 has two banks of 256 sets × 4 ways, with 32-byte lines and write-back.
- Addressing is by word. Consecutive lines alternate between the two banks.
- A PE burst of up to 8 words therefore touches at most one line in each bank.
  Both tag checks happen in the same clock.

**PE burst protocol**
- The PE holds `pe_req` with an address and a burst length of 1..8.
- `pe_gnt` pulses once every line the burst needs is present.
- The data phase then runs for BL clocks, starting on the next clock:
  - reads: `pe_rvalid`/`pe_rdata`;
  - writes: `pe_wready`, and `pe_wdata` is sampled.
- Misses are resolved before the grant. A dirty victim is first written to
  the c-MMU, then the line is fetched.

**Buffer borrowing.** Only way 3 of each bank is lent out.
- `borrow_addr_gen` keeps one valid bit per lendable block.
- It scans a 128-block window of those bits per clock, steered by a search
  counter, so all 512 blocks are covered in 4 clocks.
- A priority encoder returns the first empty block.
- On `bw_req`, the d-MMU marks that block *borrowed* and pulses `bw_gnt`.
  A borrowed block is neither a hit nor a victim for the cache.
- The NI then writes the whole packet payload in one clock (`bw_wvalid`,
  answered by `bw_wack`). The block address joins an 8-entry FIFO.
- `br_req` reads back and frees the oldest borrowed block.
- `bw_release` cancels a borrow that has not been written yet. The NI uses
  it when head-of-line blocking clears on its own.

**Prefetch port.** A `pf_addr` is accepted only when no PE request is
waiting. The line is fetched on a miss, and nothing is returned to the PE.

**Status storage**
- Valid, dirty and LRU age bits are kept in a status RAM with one write port
  per bank.
- After reset, this RAM is swept clear for 2×SETS clocks before the first
  request is accepted.

## Network interface (`ni`)
**Packet format**
- A flit is `{head, tail, data[31:0]}`.
- A packet is one header flit `{src, dest, len}` followed by 8 payload words.

**Sending.** The PE's words collect in an 8-word payload buffer. When the
packet is complete:
- **direct path:** if the 16-flit output queue has room for the whole packet,
  it is sent directly;
- **borrow path:** otherwise the NI asks its d-MMU for a block, parks the
  payload there, and queues the header in an 8-entry borrowing header queue.
  Once the output queue drains, parked packets are read back (`br_req`) and
  sent in order;
- **release:** if the queue frees up while a borrow is still pending and
  nothing is parked, the request is released and the packet goes out directly.

**Receiving.** Incoming flits are unpacked to the PE on `rx_*` with a
`last` marker.

With borrowing, a blocked PE does not stall on the NI: the L1 absorbs the
burst. The counters `stat_direct`, `stat_borrow`, `stat_release` and
`stat_stall` show which path each packet took.

## c-MMU: banks as ways, handed out per interval (`cmmu`, `bat`, `sram_bank`)
This is the part that takes most care to follow.

**Banks as ways**
- Each of the 16 L2 banks is one way of a 2048-set cache with 64-byte lines.
- The BAT holds, for each node and each of three *intervals*, a 16-bit mask
  of the banks the node may use.
  - The masks are programmed through `cfg_*`.
  - `cfg_sel` selects the current interval.
- A node that holds N banks sees a private N-way cache. Tags include the
  node number, because every node has its own address space.

**Lazy transitioning.** When the interval changes, lines are not flushed or
moved in bulk. For each request, the steps are:

1. **Look up** the node's current banks.
2. **Second check.** On a miss, check the banks the node held in the other
   intervals (`old_mask`, which excludes the current banks). This is
   the *lazy* check.
3. **Move on a lazy hit.** The line moves into the LRU way of the current
   banks. A dirty victim is written back first. The old copy is invalidated.
   The request is then served, and counted in `stat_l2_lazy_hit`.
4. **Fill on a true miss.** A dirty victim is written back to DRAM, then the
   64-byte line is read from DRAM.

**Access.** The request is a 32-byte half-line. A read-modify-write of the
bank line either returns that half or merges the write data and sets dirty.

**Power**
- `bank_power` is the OR of all masks in all intervals. A bank no node can
  reach is switched off, and its contents are lost.
- When a bank comes back on, its tags are swept clear. The sweep covers one
  set per clock (2048 clocks). The same sweep runs after reset.

**Request handling**
- Requests from the four d-MMUs are taken round-robin, one at a time.
- `n_ack` pulses once per request.
- A hit costs 4 clocks.
- Tags, dirty bits, owner and 4-bit LRU ages for all 16 banks of a set form
  one word of a tag RAM.

## Inter-layer prefetch (`pcg`)
When the SVC decoder reports the enhancement-layer macroblock it is working
on (`mb_valid`, `mb_x`, `mb_y`), `pcg` computes the *next* macroblock.

**Residual window.** It issues line prefetches for the co-located base-layer
residuals:
- the window is 10 columns × 9 rows of 16-bit residuals;
- it has one extra column on each side and one row below, for bilinear
  upsampling;
- the base frame is half size in each direction (dyadic scaling);
- residuals are stored in raster order, two per 32-bit word.

**Motion vectors.** It then issues two lines of the motion-vector plane (one
32-bit MV per 4×4 block).

**Duplicate lines.** A line already requested for the current macroblock is
skipped. A macroblock costs at most 18 residual lines (9 rows, each crossing at most one line boundary) plus the 2 MV lines.

## DRAM controller (`dram_ctrl`, `addr_translator`, `emi`)
`dram_ctrl` splits a 64-byte line into four BL8 bursts, which stay in one
row. Write requests are acknowledged once they are queued.

**Address map** (`addr_translator`)
- **Device 0 (chip select 0)** holds nodes 0..2 in 32 MB regions. It uses a
  conventional map: byte offset, then column, then bank, then row.
- **Device 1** belongs to the SVC decoder. With `svc_map_en`, the SVC
  address fields (data type, quality layer, spatial layer, POC within the
  GOP, offset) are placed as follows:
  - luma goes to banks 0–2;
  - chroma goes to banks 3–5;
  - residuals go to bank 6;
  - motion vectors go to bank 7.
- `gop_bank` chooses the luma/chroma bank of each picture so that a picture
  never shares a bank with the pictures it references.
- A 2 KB row holds 8 luma or 16 chroma macroblocks.

**External memory interface** (`emi`)
- **Request queue:** 32 entries.
- **Bank FSMs:** one per device and bank (16), tracking open rows.
- **Timing counters:** every DDR3-1333 (CL9) constraint in `odms_pkg`, from
  tRCD to tFAW.
- **Command FSM:** power-up (200 µs reset, 500 µs CKE, mode registers, ZQCL),
  and refresh every 7.8 µs.
- **I/O control:** write data CWL clocks after the WR, read data captured CL
  clocks after the RD.

The scheduler issues one command per clock, in this order of preference:

1. a ready RD/WR, preferring the same direction as the previous one;
2. an ACT for the oldest request to a closed bank;
3. a PRE for a row conflict that no older request still needs.

A request never passes an older one to the same address when either is a
write. `SCHED_EN=0` gives strict in-order issue for comparison.

## Where this departs from the reference design
- **c-MMU**
  - It serves one request at a time. The reference pipelines requests from
    different nodes to different banks, with per-bank pending buffers,
    read/write queues and a bank arbiter.
  - Dirty lines in a bank that is being powered down are dropped, not
    written back. Reprogram the BAT only after those lines are no longer
    needed.
- **d-MMU.** A miss is handled before the burst is granted, so a miss is not
  hidden behind the previous burst's data phase.
- **Handshakes and formats are this design's own choices.** This covers:
  - all handshakes;
  - the flit and header format;
  - the payload length of 8 words;
  - the queue depths other than the 16-flit output queue and the 32-entry
    DRAM queue;
  - the SVC address field positions;
  - the prefetch window placement;
  - the reset contents of the BAT (4 banks per node).
- **Not included.** The on-chip network (routers), the processing engines,
  the wrapper and the power management unit are not included.
  `net_*`, `tx_*`/`rx_*` and `bank_power` are the hooks for them.

## Parameters (defaults are the reference sizes)
| module | parameter | default | meaning |
|---|---|---|---|
| odms_top | NODES / SVC_NODE | 4 / 3 | nodes, index of the SVC decoder |
| odms_top, dmmu | L1_SETS / SETS | 256 | 2 × 256 × 4 × 32 B = 64 KB per node |
| odms_top, cmmu | L2_SETS / SETS | 2048 | 16 × 2048 × 64 B = 2 MB |
| ni | OQ_DEPTH, BHQ, PAYLOAD | 16, 8, 8 | output queue flits, parked headers, words per packet |
| dmmu | BQ, WINDOW | 8, 128 | borrowed-block FIFO, search window |
| emi | QDEPTH, SCHED_EN | 32, 1 | request queue, reordering on/off |
| emi | INIT_RESET, INIT_CKE, REFI | 133334, 333334, 5200 | 200 µs, 500 µs, 7.8 µs at 1.5 ns |

`L1_SETS=16, L2_SETS=512` gives a 4 KB L1 and a 512 KB L2, the small
configuration used for cache studies.

## Simulation
Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. Three behavioural
models serve the testbenches:
- `tb/ddr3_model.sv`: a DDR3 model that checks every timing rule and counts
  violations;
- `tb/l1_mem_model.sv`: a memory behind the L1;
- `tb/line_mem_model.sv`: a memory behind the L2.

Build and run any of them with plain Verilator 5 (`odms_pkg.sv` first):

```
verilator --binary --timing -j 0 -Wno-MULTITOP --top-module tb_odms_top \
    rtl/odms_pkg.sv $(ls rtl/*.sv | grep -v odms_pkg) tb/*.sv
./obj_dir/Vtb_odms_top
```

`tb_odms_top` runs the full-size design at its default parameters, about
1 M clocks in a few seconds. It includes the real DDR3 power-up wait. The
traffic has four nodes:
- write-then-read-back with bank-spread addresses;
- packets into a stalled network;
- SVC macroblock reports.

It also switches BAT intervals, including a bank power-down. Every read is checked against a reference model. The testbench
requires that each mechanism actually happened:
- L1 hits and misses;
- L2 hits, lazy hits, misses and write-backs;
- borrowed and released packets;
- prefetch commands and fills;
- DRAM refreshes and reordered commands;
- zero DDR3 timing violations.

## Tool notes
- `rst_n` is also used in the `disable iff` of concurrent assertions, which
  some linters report as a signal used both synchronously and
  asynchronously. This is intended.
- Some inputs are wider than a block uses. For example, `dmmu` ignores the
  low address bits of a line. They are kept for uniform interfaces.
- `yosys` elaborates the full-size `dmmu` slowly, because of its wide status
  and tag memories. It finishes at small `SETS`.
