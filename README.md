# MP3NOC: a 16-tile multiprocessor joined by packet networks

This design connects sixteen processor tiles to shared memory through
networks-on-chip instead of a bus. Each tile and each network runs on its own
clock: the system is globally asynchronous, locally synchronous (GALS).
Three networks have three separate jobs:

* the **Data NoC** carries bulk traffic from the tiles to four DDR2 banks;
* the **Synchronization NoC** carries short accesses to a 64 KByte on-chip
  shared memory, with two ways of doing atomic updates ("locked" and "lazy");
* the **service network** lets one tile (the monitoring tile) reconfigure the
  Data NoC's switches and collectors at run time.

Statistic collectors listen on every Data NoC connection point. They send
their counts as frames to the monitoring tile, so the traffic can be
measured without disturbing it.

The RTL covers everything between the processors and the memory chips: the
clock-domain crossings, the protocol adapters, the network interfaces, the
switches, the shared memory and its reservation logic, the monitoring path and
the service network. The processors, the DDR2 controllers, the DRAM and the
clock generators are not part of it. Their connections are ports of the top
module `mp3noc_top`. The top also carries, unconnected to the rest, four
coprocessors: 3x3 mean and median image filters, a 256-point FFT and the
grid-walking core of a ray caster.

## How a tile talks to the system

A processor tile has only FSL links: 32-bit FIFO channels with one control bit
per word. Each tile gets an `ocp_adapter` for each network it uses. An adapter
has two `bisync_fifo`s, one for requests and one for responses. It also has a
small kernel in the network's clock domain that turns the FSL word stream into
OCP transfers.

| Adapter | Width | OCP features | Used by |
|---|---|---|---|
| data | 64-bit | bursts, MFlag | every tile, into the Data NoC |
| synchronization | 32-bit | single transfers, ReadLinked / WriteConditional passed through | every tile, into the Synchronization NoC |
| service | 32-bit | single transfers only | the monitoring tile (tile 15) |

The FSL message format is this design's own:

```
request   word 0 (control=1): [12:11] MFlag  [10:3] BurstLen  [2:0] MCmd
          word 1 (control=0): byte address
          writes: BurstLen beats, each DW/32 words, low word first
response  word 0 (control=1): [1:0] SResp (1 DVA, 2 FAIL, 3 ERR)
          reads: BurstLen beats, each DW/32 words, low word first
```

The OCP command codes are IDLE=0, WR=1, RD=2, RDEX=3, WRNP=4, RDL=5, WRC=6 and
BCST=7. A BurstLen of 0 means 1.

The `bisync_fifo` uses Gray-coded pointers with two-flop synchronisers. Its
output is first-word fall-through. A written word is seen by the reader 2–3
reader clocks later.

Every adapter carries one OCP transfer at a time. The same rule holds in
every OCP link of the system:

* the command is held until SCmdAcc;
* write beats are held until SDataAcc;
* every command is answered: a read with BurstLen beats, a write with one beat;
* each response beat is held until MRespAcc.

## NTTP packets

Inside the networks, transfers travel as wormhole packets of cells. A link
carries `vld/rdy/head/tail/press/data`, and a cell moves when `vld && rdy`.

* **Request:** a header cell, then a *necker* cell holding the offset inside
  the target, then one data cell per write beat.
* **Response:** a header cell carrying the status, then one data cell per read
  beat.

The header uses the low 32 bits of a cell. The types are in `mp3noc_pkg`:

```
[2:0] op   (0 LOAD, 1 STORE, 2 LOCK, 3 UNLOCK, 4 RESP)
[7:3] dst  target id        [12:8] src  initiator id
[20:13] len  data cells     [22:21] press
[23] excl  (lazy sync)      [25:24] status     [28:26] reserved
```

`ocp_master_niu` builds these packets on the initiator side. It splits the
OCP address at bit `SLV_LSB` (28). The bits above it give the target id, so
bank = address[29:28]. The bits below it go into the necker cell. The
initiator's MFlag becomes the packet's Press level.

`ocp_slave_niu` replays the packet on the target side as an OCP transfer, and
sends the answer back to `src`:

* LOAD becomes RD, or RDL when `excl` is set.
* STORE becomes WR, or WRC when `excl` is set.
* The initiator id goes out on `MReqInfo`.

## The switch

Every network is built from one module, `nttp_switch`, with `NIN` inputs and
`NOUT` outputs:

* **Routing.** Each input has a route table indexed by the header's `dst`.
  The tables reset to `(dst >> ROUTE_SHIFT) % NOUT` and can be rewritten
  through the register port.
* **Wormhole.** An output, once granted, stays with its input until the tail
  cell.
* **Arbitration.** Among packet heads waiting for the same free output, the
  highest Press wins. Ties go round-robin. An output whose enable bit is
  cleared grants nothing.
* **Lock.** A LOCK packet keeps its output reserved for its input after the
  packet ends. The reservation lasts until an UNLOCK from that same input has
  passed. This is what makes the locked read-modify-write atomic.
* **Timing.** There is one output register. A cell accepted in one cycle
  leaves in the next.

Register port (word addresses):

| Address | Access | Contents |
|---|---|---|
| 0x000 | RO | [15:0] outputs currently owned, [31:16] outputs locked |
| 0x001 | RW | arbitration enable per output |
| 0x100 + 32·in + dst | RW | route-table entry |

## Data NoC (`data_noc`)

The Data NoC is a two-stage multistage network with a mirrored response path.
With the defaults, 16 masters reach 4 banks:

```
request : 16 master NIUs -> 4 stage-1 switches (4x4) -> 4 stage-2 switches (4x1) -> 4 slave NIUs -> DDR2 controllers
response: 4 slave NIUs   -> 4 stage-A switches (1x4) -> 4 stage-B switches (4x4) -> 16 master NIUs
```

Masters 4g..4g+3 share stage-1 switch g. Output j of every stage-1 switch
feeds the stage-2 switch of bank j. Stage-A switches route on `dst >> 2`, the
master's group; stage-B switches route on `dst % 4`. Any tile can reach any
bank, and tiles of different groups meet only at the stage-2 switch of the
bank. That is where Press decides who goes first.

## Synchronization (`sync_noc`)

Every tile has a 32-bit master NIU. These feed a 16x1 request switch, which
leads to a single slave NIU. Answers return through a 1x16 response switch.
Behind the slave NIU sit the `exclusive_access_manager` and the
`shared_memory` (64 KByte, one word per cycle).

Two synchronization modes are offered.

* **Locked.** ReadExclusive makes the master NIU send a LOCK packet before
  its LOAD. The request switch then serves only that tile. The tile's next
  write is sent as STORE followed by UNLOCK, which releases the switch. No
  other tile can touch the memory in between. The top brings this state out
  as `sync_locked`.
* **Lazy.** ReadLinked and WriteConditional travel as ordinary packets with
  the `excl` bit set. The exclusive access manager keeps one reservation tag
  per initiator:
  * ReadLinked sets the tag.
  * Any write to the same word clears all tags on that word.
  * A WriteConditional whose tag is gone is not performed. It is answered
    FAIL, and software retries.

  Nothing is locked, so a failed attempt costs one round trip.

## Performance monitoring

A probe point is the request link and the response link of one NIU. There
are 20 probe points: 16 master NIUs and 4 slave NIUs. Five
`statistic_collector`s watch them: collectors 0–3 take four master NIUs each,
and collector 4 takes the slave NIUs. The probes only listen.

Each collector works in stages:

1. **Event detection, per probe.** The event is one of: request packets,
   latency (request header to response header), wait cycles, payload cells,
   or idle cycles.
2. **Filtering.** A request counts only if `(header & FMASK) == FMATCH`.
3. **Counting.** Each probe has a 32-bit packet counter and a 32-bit event
   counter.
4. **Dump.** A frame is sent when the PERIOD counter expires, or when
   software sets the send bit. In clear mode the counters restart after each
   dump; in cumulative mode they keep counting.

Frame layout: `{16'hC011, 8'd collector_id, 8'd probes}`, then a packet count
and an event count per probe. The last word is marked.

Registers:

| Word | Name | Contents |
|---|---|---|
| 0 | CTRL | [0] enable, [1] send (self-clearing), [2] cumulative mode |
| 1 | EVENT | event type |
| 2 | PERIOD | dump period in cycles; 0 means manual only |
| 3 | FMASK | filter mask |
| 4 | FMATCH | filter match value |
| 5 | STATUS | [0] frame in flight, [1] a dump was dropped |
| 8+2p | | packet count of probe p |
| 9+2p | | event count of probe p |

`pm_switch` merges the five frame streams without interleaving them, taking
inputs in round-robin order. A last FIFO brings the frames into the
monitoring tile's clock domain, on the top's `pm_s_*` port. On that port the
control bit marks the last word of a frame.

Latency is measured with one outstanding request per probe, which matches the
one-transfer rule of the interfaces.

## Service network (`service_noc`)

The service network is built from two rings of stops:

* `service_host_bridge` takes single OCP transfers from the monitoring tile's
  service adapter. Each transfer becomes one ring word `{resp, wr, addr[15:0],
  data[31:0]}`.
* The main ring runs through the bridge, a `service_node` and the five
  collector stops.
* The node diverts words addressed to switches onto a secondary ring, which
  holds one stop per switch pair and one for the PM switch.
* The `service_ring_stop` that owns an address performs the access. It then
  sends the answer on around the ring to the bridge.
* A word that comes back unclaimed is answered ERR.

Each hop takes one cycle.

Ring address = OCP byte address bits [15:0]. Bits [15:11] name the stop and
bits [10:0] the register:

| Stop | Unit |
|---|---|
| 0–3 | collectors of master groups 0–3 |
| 4 | collector of the slave NIUs |
| 16–19 | stage-1 switch k; with bit 10 set, stage-B switch k |
| 20–23 | stage-2 switch k; with bit 10 set, stage-A switch k |
| 24 | PM switch (word 0: input enable mask) |

## Coprocessors (`image_filter_3x3`, `fft_radix4_256`, `rcpg_traversal`)

Separate from the multiprocessor, the top also holds the kind of coprocessor
a tile could attach on an FSL link: two streaming image filters, an FFT and
the stepping core of a ray caster. They sit side by side with their own ports
(`cop_*`, `fft_*`, `rc_*`) and share one
clock, `cop_clk`.

### 3x3 filters

A filter takes one 32-bit word from each of three neighbouring image lines
per cycle: four 8-bit pixels per line, pixel 0 in the low byte. It keeps the
last two pixels of every line, so it holds a 6 x 3 pixel window. From that
window it returns four results per cycle, one per 3x3 neighbourhood centred
on window columns 1..4. The first result goes in the high byte.

| Parameter | Variant | Result |
|---|---|---|
| `MEDIAN=0` | mean | `floor(sum / 9)`, computed as `(sum * 7282) >> 16`, which is exact for all 8-bit inputs |
| `MEDIAN=1` | median | the fifth of the nine sorted values, using a bubble sort |

The result is registered. Latency is one cycle, the filter accepts a new
word every cycle, and its streams use valid/ready.

### 256-point radix-4 FFT

The FFT computes the forward DFT of 256 complex samples, 16 bits per part,
scaled by 1/256. It works in place on one 256-entry store, in three phases:

1. **Load.** It takes 256 samples in natural order, one per valid/ready
   transfer.
2. **Compute.** It runs four decimation-in-frequency radix-4 stages of 64
   butterflies, one butterfly per cycle, so 256 cycles in all. A butterfly
   of span L does the following:
   * reads points a, a+L, a+2L and a+3L;
   * forms their 4-point DFT and halves it twice, so values never grow;
   * rotates outputs 1–3 by the twiddles W^(m·j·256/4L);
   * writes the four points back.
3. **Unload.** It returns the 256 results in natural order, reading the
   store at base-4 digit-reversed addresses. `out_last` marks the final
   result.

At full rate a block takes 3 × 256 cycles. The twiddles are Q1.14 values of
cos and −sin, computed at elaboration. Products are truncated, so results are
within a few LSB of the exact scaled DFT. Inputs must have a magnitude
(|re + j·im|) below 2^15. Under that condition nothing can overflow, because
the 1/4 scaling and the rotations never increase the magnitude.

### Ray traversal

The ray caster walks a ray through a 16 × 16 × 16 grid, one cell per cycle.
For each axis it keeps two numbers:

* `t_max`, the ray parameter at which the ray crosses the next face on that
  axis;
* `t_delta`, the distance in the ray parameter between two faces.

Each step picks the axis with the smallest `t_max`, the face the ray leaves
through. It moves the cell index by one on that axis, in the direction given
by `dir_neg`, and adds `t_delta` to that axis's `t_max`. This is the cost
minimisation of the design. Ties go to x, then y, then z.

The block shows the current cell on `occ_cell`, and the caller answers on
`occ_hit` in the same cycle. Every visited cell goes out as one transfer with
the axis it was entered through (3 for the start cell). The walk ends at the
first occupied cell or when the next step would leave the grid. `out_last`
marks the final cell.

## Clocks and reset

| Clock | Domain |
|---|---|
| `pe_clk[t]` | tile t |
| `data_clk` | Data NoC, collectors, PM switch and service network |
| `sync_clk` | Synchronization NoC and shared memory |

The system was run with the Data NoC at 200 MHz and the Synchronization NoC at
250 MHz; the RTL makes no assumption about the ratios. There is one
asynchronous reset input, `rst_n`. It is released into every domain through a
two-flop synchroniser.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `mp3noc_top` | `N_TILES` | 16 | processor tiles (a multiple of 4, at most 32) |
| `mp3noc_top` | `N_BANKS` | 4 | DDR2 banks, 256 MByte address window each |
| `mp3noc_top` | `PPC_TILE` | 15 | the monitoring tile |
| `mp3noc_top` | `SHM_BYTES` | 65536 | shared memory size |
| `ocp_adapter` | `FIFO_DEPTH` | 16 | words per clock-crossing FIFO |
| `image_filter_3x3` | `MEDIAN` | 0 | 0 mean filter, 1 median filter |

## Departures and limits

* **Outside the RTL.** The MicroBlaze and PowerPC processors, the DDR2
  controllers and DRAM, the PCIe host link and the FPGA clock managers are
  vendor parts. They appear only as ports. The testbenches use a behavioural
  OCP memory, `tb/ocp_mem_model.sv`, in place of a DDR2 controller.
* **This design's own choices.** The original system's network IP is
  described only by its features. The following are therefore this design's
  own:
  * the header bit layout;
  * the FSL message format;
  * the register maps;
  * the service address map;
  * the frame format;
  * round-robin as the tie-break policy, among the several the original
    allows.
* **Stage-2 switch shape.** The second Data NoC stage is built as four
  4-input, 1-output switches, one per bank.
* **Position of the reservation tags.** The exclusive access manager sits on
  the OCP side of the shared memory's NIU, not inside the packet layer.
* **Host entry to the service network.** In the original system, the service
  rings are entered from the Data NoC through a packet-to-ring converter.
  Here, the monitoring tile reaches them through its own service adapter and
  an OCP-to-ring bridge. The ring side (Vld/Data/Rdy words, main ring,
  node, secondary ring with nine switch stops) is as described.
* **One outstanding transfer.** Adapters and NIUs keep one transfer in
  flight. This limits how much each tile can pipeline, but keeps ordering
  trivial.
* **Coprocessor case studies.** Only some variants are built:
  * the filters in their register-pipeline form only;
  * the FFT in its sequential form only.

  * the ray caster as a single-level grid walk only.

  The memory-based and sequential filters, the pipelined FFT and the
  pipelined ray caster are not built. The ray caster does not descend into
  higher-resolution sub-grids (the octree levels), because the layout of the
  cell pointers is not specified; the caller supplies the occupancy.

## Simulating

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and stops, and a watchdog ends a run that
hangs. With Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_sync_noc \
    rtl/mp3noc_pkg.sv -y rtl -y tb tb/tb_sync_noc.sv
./obj_dir/Vtb_sync_noc
```

Replace `tb_sync_noc` with any testbench below. The package must come first;
`-y` lets Verilator find the other modules by file name.

| Testbench | What it checks |
|---|---|
| `tb_bisync_fifo` | ordering, full/empty and back-pressure across unrelated clocks |
| `tb_ocp_adapter` | the FSL to OCP kernel, in 64-bit burst and 32-bit lazy variants |
| `tb_ocp_master_niu` | packet formats, LOCK/UNLOCK, excl bit, Broadcast ERR |
| `tb_ocp_slave_niu` | packet to OCP replay and response packets |
| `tb_nttp_switch` | routing, wormhole integrity, Press priority, lock, registers |
| `tb_exclusive_access_manager` | ReadLinked / WriteConditional success and FAIL |
| `tb_shared_memory` | bursts and the memory contents |
| `tb_statistic_collector` | counters and frames against a reference model |
| `tb_pm_switch` | frame merging without interleaving |
| `tb_service_noc` | every stop and node reached, ERR for unowned addresses |
| `tb_data_noc` | 16 masters to 4 banks with bursts and monitoring |
| `tb_sync_noc` | 16 tiles incrementing counters in the locked and lazy modes |
| `tb_image_filter_3x3` | both filter variants against a reference, with stalls |
| `tb_fft_radix4_256` | impulse, tone and random blocks against a direct DFT; 768-cycle block time |
| `tb_rcpg_traversal` | random rays through a sparse grid against a reference walk, with stalls |
| `tb_mp3noc_top` | the whole system at its default size (see below) |
| `tb_matmul_workload` | the monitored matrix-multiplication workload (see below) |

`tb_mp3noc_top` drives all 16 tiles, each on its own clock, through their FSL
links only. It checks every read against what was written, and checks that
both shared counters end at the right value. It also counts how often each
mechanism occurred, and fails if any never did:

* bursts;
* Press-decided arbitration;
* locked cycles;
* lazy FAIL answers;
* monitoring frames;
* service accesses and service ERR answers;
* FSL back-pressure;
* use of every bank;
* words through both filters;
* one FFT block: an impulse, which must give a flat spectrum;
* one ray walk: eight cells along x up to an occupied cell.

`tb_matmul_workload` runs a parallel matrix product, C = A·B, on tiles 0–14.
Each tile computes one row of C: it reads its row of A, reads each column of
B, and writes its row of C. A is 15x8 and B is 8x4. The product runs once for
each of three data layouts:

| Scheme | Layout | Read order of B's columns |
|---|---|---|
| matrix per bank | A, B and C each in their own bank | 0, 1, 2, 3 |
| line interleaved | B column j in bank j; rows of A and C spread over the banks | 0, 1, 2, 3 |
| shift access | as line interleaved | tile t starts at column t % 4 |

The statistic collectors measure the request latency of every scheme. After
each scheme the monitoring tile reads their frames and checks the request
count of every tile and every bank. The testbench also checks C.

Average request latency at this size, in Data NoC cycles:

| Scheme | Latency |
|---|---|
| matrix per bank | 70 |
| line interleaved | 36 |
| shift access | 37 |

Spreading the matrices over the banks halves the latency. At this small size
with 4 columns, shifting the start column gains nothing over plain
interleaving, because all tiles start by reading A. The testbench checks
only that both spread schemes beat one matrix per bank.
