# Shared instruction caches for an ultra-low-power 8-core cluster

In a cluster of small processors that run the same parallel kernel, each
core usually has a private instruction cache. Those caches all hold the same
code, and when the cores miss together they each fetch the same line from L2.
This RTL implements two **shared** instruction caches that remove the duplicate
copies and the duplicate refills while keeping a single-cycle hit:

* **SP (single-port shared).** Eight cache banks are shared by all cores
  through a read-only crossbar. A one-line buffer (L0) in front of each core
  absorbs most fetches, so cores seldom contend for a bank. Each bank is
  non-blocking: it keeps serving hits while several refills are pending.
* **MP (multi-port shared).** Only the TAG and DATA storage is shared. Each
  bank has one read port per core, so each core keeps a private controller
  with a contention-free lookup path. All misses go to one *master cache
  controller*. It merges misses to the same line into one refill, writes the
  line into the banks and tells the waiting cores to look again. It also
  provides the global services: flush, enable and bypass.

The architecture follows the PULP cluster study "The Quest for
Energy-Efficient I$ Design in Ultra-Low-Power Clustered Many-Cores" (Loi et
al.). That work gives the structure, widths, sizes and main latencies. The
micro-architecture inside each block (state machines, handshakes, victim
choice, queue depths) is this implementation's own. The choices are listed
below.

## Common geometry and interfaces

| Item | Value |
|---|---|
| Cores | 8 (`NB_CORES`; 2 and 4 also simulated) |
| Banks | 8 (`NB_BANKS`), line-interleaved |
| Ways | 4, pseudo-random replacement |
| Line | 32 bytes = 256 bits = 8 instructions |
| Refill | AXI4, 64-bit data, 4-beat INCR burst per line |
| Default capacity | SP 8 kB (8 x 1 kB banks), MP 4 kB (8 x 512 B banks) |

Address split (byte address):

```
 31                5+B+S   5+B      5 4     2 1 0
 |       ...          | set | bank | instr | 00 |
 |<------------- tag (31 : 5+B) -------->|
```

`B = log2(NB_BANKS)` and `S = log2(sets per bank)`. The stored tag is the
whole address above the bank bits, so it includes the set bits. The same bank
module therefore works at any size.

**Fetch port** (one per core): request/grant, then a response. The core holds
`fetch_req_i` and `fetch_addr_i` until `fetch_gnt_o`. The instruction comes
later on `fetch_rvalid_o` and `fetch_rdata_o`, one response per grant and in
order. A hit is answered in the cycle after the grant. A core may present its
next fetch in the response cycle.

**Refill port**: only the AXI4 AR and R channels (`axi_ar_t`: addr, id, len;
`axi_r_t`: 64-bit data, id, last). `r_ready` is always 1. Responses are
always assumed OKAY.

Everything is synchronous to one clock with an active-low asynchronous reset.

## SP: single-port shared cache (`sp_icache`)

```
core0..7 -> sp_l0_buffer x8 -> sp_ro_xbar (8x8, 256-bit) -> sp_cache_bank x8 -> axi_instr_bus -> AXI
```

**L0 buffer (`sp_l0_buffer`).** Each core has a buffer that holds the last line
it received.
* A fetch inside that line is granted at once and answered in the next cycle.
* Any other fetch is forwarded to the crossbar in the same cycle, so the buffer
  adds no latency. The returned line replaces the buffer contents.
* A fetch that falls in the line arriving in this cycle also counts as a
  buffer hit.
* Each core has at most one forwarded request outstanding.

**Crossbar (`sp_ro_xbar`).** Address bits `[5 +: B]` select the bank. Each bank
has its own round-robin arbiter (`rr_arbiter`), and the losers stall;
`conflict_o` flags them. A bank response carries a core mask, and the 256-bit
line goes to every core in that mask. It is written as a full crossbar, not as
logarithmic trees; the function is the same.

**Cache bank (`sp_cache_bank`)** is the hardest part of SP.
* *Lookup.* A granted request is registered and looked up in the next cycle in
  an `scm_bank` with one read port. A hit returns the line with the requester's
  mask bit.
* *Miss.* The bank allocates one of `NB_MSHR` (4) miss entries and issues an
  AXI read. The AXI ID is the entry index, so beats can be matched to entries
  in any order. The bank does not block: later requests still hit, and a
  later miss to a line that is already pending is *merged*. Merging only adds
  the core to that entry's mask and issues no second read.
* *Victim.* An invalid way is taken first, otherwise a 16-bit LFSR picks one.
  A way that has a refill in flight is never chosen.
* *Refill.* The first beat invalidates the way. Each beat is written as its
  64-bit chunk, and the last beat writes the tag and sets the valid bit. The
  line then goes to all cores in the mask in one response, read from the
  array in a cycle when the lookup stage is free.
* *Flow control.* A request is granted only while there is room for its
  possible miss and no completed refill is waiting to respond.

**AXI instruction bus (`axi_instr_bus`).** AR requests from the 8 banks are
arbitrated round-robin. The master index goes into the top ID bits, and R beats
are routed back by those bits. The bus is combinational, so it adds no cycle to
the refill path.

SP latency, from grant to response:
* L0 hit: 1 cycle.
* Bank hit: 1 cycle.
* Cold miss: `L + 6` cycles, where `L` is the number of cycles from AR accept
  to the first R beat. With `L = 8` this is the 14 cycles the reference
  architecture quotes.

## MP: multi-port shared cache (`mp_icache`)

```
core c -> mp_cache_ctrl c --read port c--> scm_bank x8 (8 read ports, 1 write port)
                 | miss / bypass                     ^ write tag / write data / flush
                 v                                   |
          mp_ro_interco (8x1) ---> mp_master_cc (FIFO + CAM) ---> AXI
                 ^-------- retry / bypass data ------|
```

**Private controller (`mp_cache_ctrl`).** The controller has six states: IDLE,
LOOKUP, MISS, WAIT, BYP and BWAIT.
* It grants a fetch when idle and registers it. In the next cycle it compares
  the tag on its own read port of every bank. On a hit, the instruction returns
  in that cycle, and a new fetch can be granted in the same cycle.
* On a miss, it raises `miss_req_o` in the same cycle and waits for `retry_i`.
  It then looks the line up again, which now hits.
* When the cache is disabled (`enable_i` low), a fetch becomes a bypass
  request. The single word from L2 is returned and nothing is cached.

**Storage (`scm_bank`).** Each bank has `NB_WAYS` ways of valid bit, tag and
256-bit line.
* `NB_RPORTS` read ports are combinational (tag compare plus line out).
* One write port can invalidate a way, write one 64-bit chunk, or write the tag
  and set the valid bit.
* `flush_i` clears every valid bit.

SP uses one read port per bank and MP uses eight. The arrays are written as
flip-flops; the reference builds them from latches (standard-cell memory).

**Interconnect (`mp_ro_interco`).** A round-robin multiplexer takes the misses
of the 8 controllers into the master. The pointer moves past the winner when
the master accepts.

**Master cache controller (`mp_master_cc`)** is the hardest part of MP.
* *Queue.* Incoming misses enter a FIFO (`sync_fifo`). The FIFO head is matched
  against a CAM of pending refills, keyed by line address. Each entry holds the
  address, the mask of waiting cores, the chosen way and the beat count. The
  entry index is the AXI ID.
* *Merge.* If the line is already in the CAM, the core is added to the mask and
  no read is issued.
* *Allocate.* Otherwise the first free entry is allocated, a victim way is
  chosen and a 4-beat read is issued. The victim rule is the same as in SP.
* *Refill.* Beats drive the write channel: first beat invalidate, each beat
  writes its chunk, last beat writes the tag and sets valid. On the last beat
  every core in the mask gets `retry_o`. This includes a core merged into the
  entry in that same cycle.
* *Bypass.* A bypass request is a single-beat read of the aligned 64-bit word.
  Bit 2 of the address selects the 32-bit half, which goes back on
  `byp_rdata_o` with a per-core valid.
* *Flush.* While a flush is requested, no new miss is taken. When no refill is
  in flight, all valid bits are cleared in one cycle and `flush_ack_o` pulses
  once.
* *Enable.* The enable input is registered and sent to all private
  controllers.
* CAM and FIFO depth equal the core count, because each core has at most one
  miss pending.

MP latency, from grant to response:
* Hit: 1 cycle.
* Miss: `L + 7` cycles, that is 15 with `L = 8`. This is one more than SP
  because of the lookup after the retry.

## Parameters

| Module | Parameter | Default | Notes |
|---|---|---|---|
| `icache_cluster_top` | `NB_CORES`, `NB_BANKS`, `NB_WAYS` | 8, 8, 4 | shared by both caches |
| | `SP_CACHE_BYTES`, `MP_CACHE_BYTES` | 8192, 4096 | any power of two with at least 1 set per bank |
| `sp_icache` | `CACHE_BYTES`, `NB_MSHR` | 8192, 4 | refills pending per bank |
| `mp_icache` | `CACHE_BYTES` | 4096 | |
| `icache_pkg` | line 32 B, AXI data 64 bit, ID 8 bit | | the ID must hold `log2(NB_BANKS)` routing bits plus `log2(NB_MSHR)` |

Both caches were simulated with 8 cores at 1, 2, 4, 8 and 16 kB, and with 2
and 4 cores at 1 and 2 kB, using the cache testbenches with their parameters
changed. All passed, with one exception: the MP flush check at 1 kB. That check
expects a line to still be cached when the flush comes, but at that size the
line has already been evicted.

## How well the benchmark code fits

The reference evaluates seven programs with code sizes of 1.8 to 31.1 kB.
Code always runs, since it is fetched from L2. Whether it fits decides only
whether capacity misses remain after warm-up.

`tb_icache_workloads` runs a synthetic program for each benchmark, with the
same code size and control-flow class:
* Short loops: BFS, MD.
* Long loops with far jumps: CT, FAST, SLIC.
* Library calls: HOG, SRAD.

All 8 cores run the same program on both caches at their default sizes, with
an L2 latency of 8 cycles. Each program runs two passes from a cold cache. The
table gives the cycles and refills of the second pass:

| Program | Code | 8 kB SP, pass 2 | 4 kB MP, pass 2 |
|---|---|---|---|
| BFS | 1.8 kB | fits: 1865 cycles, 0 refills | fits: 1858, 0 |
| MD | 5.0 kB | fits: 5129, 0 | does not fit: 5976, 61 |
| CT | 2.9 kB | fits: 2241, 0 | fits: 2234, 0 |
| FAST | 2.7 kB | fits: 2097, 0 | fits: 2090, 0 |
| SLIC | 26.1 kB | does not fit: 23811, 802 | does not fit: 25082, 836 |
| HOG | 31.1 kB | does not fit: 33180, 1247 | does not fit: 35848, 1349 |
| SRAD | 30.2 kB | does not fit: 32217, 1212 | does not fit: 34738, 1306 |

The testbench checks three things:
* Every instruction is correct.
* A program that fits refills no line in its second pass, and one that does
  not fit does refill.
* In the first pass, the SP cache refills each line of a fitting program
  exactly once, although eight cores miss on it.

These are synthetic programs, not the benchmarks, so the cycle counts only
show the trend.

## Departures from the reference architecture

* **Storage.** The SCM arrays are flip-flop arrays, not latch arrays with
  clock gating. Timing and function are the same, but area and power are not
  representative.
* **Crossbar.** It is a full crossbar with per-bank arbiters rather than
  logarithmic trees.
* **Merging in SP.** The SP banks merge misses to a pending line. The
  reference only says that a bank tracks several pending refills.
* **MP miss latency.** It is one cycle longer than SP (15 instead of 14 cycles
  with the same L2) because of the lookup after the retry.
* **Cluster bus.** The AXI cluster bus with its dual-clock FIFOs (about 3
  cycles) is not included. The refill port connects directly to L2 or to such
  a bus.
* **SP services.** Only MP has flush, enable and bypass; the SP cache has
  none.
* **Duplicate line in MP.** A rare race can load the same line into two ways
  of a set. It happens when a core looks a line up after another core's retry
  but before the tag is visible. Both copies hold the same data, so fetches
  stay correct; one way is wasted until it is replaced.
* **Not included.** The private-cache baseline, the processors, the data
  memory and the rest of the SoC are not part of this RTL.

## Files

* `rtl/`: synthesizable SystemVerilog, one module or package per file.
  * `icache_cluster_top` puts the SP and MP caches side by side, each with its
    own ports.
  * Helpers: `rr_arbiter` and `sync_fifo`.
* `tb/`: self-checking testbenches `tb_<module>`, plus behavioural models.
  * `axi_l2_model` is an L2 behind AXI with a fixed latency and answers in
    order.
  * `tb_fetch_core` is a fetch stage that runs a loop with library calls and
    checks every instruction.
  * `tb_prog_core` is the same kind of fetch stage, running a program shape
    chosen at run time. `tb_icache_workloads` uses it.
  * `tb_icache_pkg` provides the instruction pattern stored in the L2 model.

Each testbench prints `TB_RESULT checks=<n> failures=<m>`. Each has a
watchdog, and assertions in the RTL check the handshakes.
`tb_icache_cluster_top` runs both caches at their default sizes with 8 cores.
It checks every fetched instruction and the refill counts. It also requires
each mechanism to occur: L0 hits, bank conflicts, refills, merges, hits under
a pending refill, MP hits and misses, a flush and bypass fetches. The SP and MP
testbenches also check the latencies above.

## Simulating

With Verilator 5. It simulates two-state logic; the RTL resets every valid bit
and all control state, so array contents are never used before they are
written.

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
  rtl/icache_pkg.sv tb/tb_icache_pkg.sv tb/tb_icache_cluster_top.sv \
  --top-module tb_icache_cluster_top -o sim
./obj_dir/sim
```

Replace `tb_icache_cluster_top` with any other testbench name.

Under `-Wall` the RTL gives only the following warnings. Unused-signal and unused-parameter warnings appear
because not every module uses every package constant. SYNCASYNCNET warnings
appear because the asynchronous reset also disables the assertions.
