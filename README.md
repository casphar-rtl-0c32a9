# CASPHAr: a last-level cache that stages data between CPU and accelerator

When a CPU prepares data for an on-chip accelerator (and later picks up the
results), the two usually exchange it through the shared last-level cache
(LLC). With coarse-grain synchronization the consumer waits until the whole
buffer has been written. If the buffer is bigger than the LLC, the early
lines are spilled to DRAM before anyone reads them and must be fetched back.

CASPHAr moves the synchronization into the LLC and does it per 64-byte line.
The producer marks each line as ready as soon as it has written it. A
consumer that reads a line too early sees an ordinary (long) cache miss, and
it is released the moment the line is produced. Consumed lines are the first
to be evicted. A shared line's useful life in the cache therefore shrinks
from "the whole staging phase" to "from produce to consume". The CPU
pre-processing, the accelerator kernel and the CPU post-processing then
overlap like a pipeline, with no software tiling.

This repository holds synthesizable SystemVerilog for that LLC: tag and data
stores, the CASPHAr controller with its per-line metadata, the
synchronization-miss wait table, the Min/Max eviction range registers, the
CASPHAr-aware LRU replacement and the memory-mapped configuration registers.
It also holds self-checking testbenches for every block and for the whole
cache. Everything is in `rtl/` and `tb/`. The default geometry is a 4 MB,
16-way LLC with 64-byte lines (4096 sets).

## Shared regions and who produces what

Software puts all exchanged data into two physically contiguous regions and
writes their bounds into the LLC's configuration registers:

* **C2A**: the CPU produces, the accelerator consumes (input staging).
* **A2C**: the accelerator produces, the CPU consumes (results).

Accesses outside both regions are ordinary cached accesses. Inside them, the
existing traffic carries the produce and consume marks, so neither the
accelerator nor the cache interface changes:

| Event at the LLC | Region | Effect |
|---|---|---|
| CPU `clflush` (carries the line's data) | C2A | line written into the LLC and **kept** (not invalidated), `Syn_C`=1: produced |
| CPU `clflush` of a line with `Syn_A`=1 | A2C | `Syn_A`=0, `Cons`=1: consumed. Resetting `Syn_A` wins over setting `Syn_C` |
| CPU `clflush` | none | conventional: merged, written back to memory, invalidated |
| accelerator write | A2C | `Syn_A`=1: produced |
| accelerator read, `Syn_C`=1 | C2A | data returned, `Syn_C`=0, `Cons`=1: consumed (the accelerator reads each line once) |
| CPU read, `Syn_A`=1 | A2C | data returned, `Cons`=1 (the later `clflush` consumes it) |
| consumer read, line not ready | C2A/A2C | **synchronization miss**: parked until produced |

Producers may read and write their own region freely. A CPU write-back
(`OP_WRITE`) to a C2A line does not produce it; only the `clflush` does.

## Per-line metadata

Each way of the tag store holds, besides tag, valid and dirty bits:

* `Sh`: the line lies in a shared region. It is recomputed for every
  resident line whenever a region register is written, and set on every fill.
* `Syn_C` / `Syn_A`: produced and not yet consumed, for C2A and A2C lines.
* `Cons`: a ready line has been read by its consumer. The replacement
  policy uses it.
* a 4-bit LRU age.

A region write starts a walk over all sets (two cycles per set, 8192 cycles
at the default size). The walk recomputes `Sh` and clears `Syn_C`, `Syn_A`
and `Cons`; the eviction range is emptied as well. Requests wait while it
runs. The status register's busy bit shows the walk, and also the clearing
of the tag store after reset (one cycle per set).

## Synchronization misses and wake-up

A consumer read that finds its line resident but not ready, or (see below)
known not to have been produced, is not answered. It is parked in
`casphar_wait_table`, and the agent receives `ready`, exactly as for an
outstanding miss. The controller is then free to serve other requests. In
particular it serves the producer's, so the consumer can keep issuing
independent reads.

When a request makes a line ready, the controller presents the line address
to the wait table. Every waiting read for that line becomes replayable. The
arbiter (`casphar_req_arb`) gives replays priority over new requests. A
replay is an ordinary lookup, which now hits: it consumes the line and sends
the response with the original id. If a replay misses again, its entry is
re-armed.

Each agent may occupy at most `WAIT_DEPTH-1` entries. A read that finds no
room for its agent is refused (no `ready`) and stays at the port; the
arbiter then serves the other agent. The cap matters because each agent has
a single in-order port. Without it, the CPU's next consumer read could sit
refused in front of the very `clflush` that the accelerator's parked reads
are waiting for, and neither side would move.

A line that is never produced leaves its consumer waiting forever. Only use
the regions for data that really has a producer.

## Evicted lines: F/E bits and the eviction range

Shared lines can be evicted before they are produced or before they are
consumed. When a victim is dirty, or produced-but-unconsumed, it is written
back. The write carries a **full/empty (F/E) bit**: 1 for produced, not yet
consumed. The memory side is expected to store one such bit per line. When
a shared line is filled, the returned F/E bit re-initialises `Syn_C` or
`Syn_A`. Consuming a line sets its dirty bit, so when it is evicted, F/E=0
is written back to memory. Without this, a spilled line that was fetched
back clean and then consumed would leave F/E=1 in memory. The consumer of
the next staging round at that address would then be released before the
new data was written.

For each eviction of a produced, unconsumed shared line, the two 64-bit
**eviction range registers** Min and Max are widened to include its address.
A consumer read that misses in the LLC is then handled as follows:

| eviction-range enable | address vs. [Min, Max] | action |
|---|---|---|
| 1 (default) | outside, or nothing recorded | cannot have been produced: park without any memory access |
| 1 | inside | fetch the line; its F/E bit decides: ready (answer) or not (park) |
| 0 (basic variant) | n/a | always fetch; the F/E bit decides |

An address inside the range may still be unproduced (a false positive of
the range). The F/E bit catches that case, so the range is only an
optimisation. It works best when lines are produced roughly in address
order.

A write or `clflush` that misses first fills the line from memory
(write-allocate), which also brings in its F/E bit. It then merges its bytes
and applies the rules above.

## Replacement

`casphar_repl` picks the victim from one set, in this order:

1. an invalid way;
2. the least recently used **consumed** line (its life is over);
3. in the extended mode only: the least recently used line that is **not**
   produced-and-waiting, so that staged data stays resident as long as
   possible;
4. the least recently used line.

The control register selects the mode: `POL_LRU` (steps 1 and 4 only, the
unmodified policy), `POL_CONSUMED` (the default, adds step 2) or `POL_EXT`
(all steps). LRU is kept as per-way ages that always form a permutation.

## Configuration registers

64-bit registers at `cfg_addr`. A write takes effect at the clock edge;
reads are combinational.

| addr | name | access | meaning |
|---|---|---|---|
| 0 | C2A start | RW | first byte of the C2A region |
| 1 | C2A end | RW | first byte after it (`[start, end)`, empty if end <= start) |
| 2 | A2C start | RW | |
| 3 | A2C end | RW | |
| 4 | control | RW | bit 0 eviction-range enable (reset 1); bits 2:1 policy (reset 1 = `POL_CONSUMED`) |
| 5 | Min | RO | eviction range low bound |
| 6 | Max | RO | eviction range high bound |
| 7 | status | RO | bit 0 busy (reset clear or reconfiguration walk), bit 1 range valid |

Any write to registers 0 to 3 triggers the metadata walk. After reset, both
regions are empty and the cache behaves as a plain LLC.

A typical use: start the accelerator first. Write the four region registers
and wait for busy to clear. Then let the CPU stage its input, issuing a
`clflush` per finished line, while the accelerator reads and writes
concurrently. The CPU reads each result line and consumes it with a
`clflush`. Finally, clear the regions.

## Interfaces and timing

`casphar_llc` (the top) has:

* `cpu_req*` / `acc_req*`: one request port per agent. A request is a
  `req_t`: `op` (`OP_READ`, `OP_WRITE`, `OP_FLUSH`), a 64-bit byte `addr`, a
  64-byte `wdata`, a byte mask `wmask` and a 4-bit `id`. The agent holds
  `valid` and the request stable until `ready`. `ready` is a one-cycle pulse
  when the request is answered or parked.
* `cpu_rsp*` / `acc_rsp*`: a one-cycle response pulse with `op`, `id` and,
  for reads, the line. There is no back-pressure.
* `cfg_*`: the register port above.
* `mem_*`: a line-wide port to the memory controller. Requests use
  valid/ready; writes carry `mem_req_fe`. Read responses are a
  `mem_rsp_valid` pulse with the data and `mem_rsp_fe`.
* `events`: one-cycle pulses (hit, miss, synchronization miss, range skip,
  F/E release/stall, produce, consume, wake, replay, write-back, eviction of
  a ready line, victim reasons, refused read, conventional flush,
  reconfiguration). They can feed performance counters.

The controller serves one request at a time. A parked read frees it.

* A hit: the request is granted in cycle 0, the tags are read in cycle 1,
  and `ready` and the response come in cycle 2.
* A miss adds the victim write-back (if needed), the fill (memory latency)
  and a second lookup.

The tag store reads a whole set per access, so all tags, synchronization
bits and ages of a set are compared in one cycle. Both arrays are
synchronous single-cycle memories written as SystemVerilog arrays. A real
implementation would map them onto SRAM macros.

Reset is asynchronous and active low. Assertions check the port handshakes,
the arbiter's one-hot grant and the wait table's usage rules.

## Files

| file | contents |
|---|---|
| `rtl/casphar_pkg.sv` | widths, request/response/region structs, opcodes, policy modes, register map, event struct |
| `rtl/casphar_llc.sv` | top: controller FSM, lookup, fill/evict paths, reconfiguration walk |
| `rtl/casphar_cfg_regs.sv` | configuration registers |
| `rtl/casphar_region_match.sv` | C2A/A2C/unshared classification (Sh) |
| `rtl/casphar_evict_range.sv` | Min/Max eviction range registers |
| `rtl/casphar_repl.sv` | CASPHAr-aware LRU victim choice and age update |
| `rtl/casphar_wait_table.sv` | parked synchronization misses |
| `rtl/casphar_req_arb.sv` | replay / CPU / accelerator arbitration |
| `rtl/casphar_tag_array.sv`, `rtl/casphar_data_array.sv` | tag and data stores |
| `tb/tb_<module>.sv` | self-checking test per module |
| `tb/tb_casphar_llc.sv` | end-to-end test on an 8-set, 4-way cache (four phases) |
| `tb/tb_casphar_llc_full.sv` | one staging pass on the default 4 MB geometry |
| `tb/tb_casphar_patterns.sv` | producer/consumer orders of the evaluated workloads: spills, memory reads, lifetimes |
| `tb/tb_casphar_pipeline.sv` | CPU → accelerator (4 × 4 GEMM per line) → CPU chain, pipelined versus coarse |
| `tb/tb_casphar_policy_study.sv` | replacement modes under a slow consumer with competing private traffic |
| `tb/tb_dram_model.sv` | behavioural memory with F/E bits used by the five system tests |

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/casphar_pkg.sv tb/tb_casphar_llc.sv --top-module tb_casphar_llc
    ./obj_dir/Vtb_casphar_llc

Replace `tb_casphar_llc` with any other testbench name. Every testbench
prints `TB_RESULT checks=N failures=M` and has a watchdog.

The end-to-end test drives a CPU model and an accelerator model through
staging passes of 48 lines per direction. That is larger than its 32-line
cache, so evictions happen. The passes cover the consumed-first, extended
and plain LRU modes and both settings of the eviction range. Every line the
accelerator or the CPU consumes is checked against a reference memory, and
also checked to have been produced before it was delivered. Unshared
traffic is checked the same way. The hit latency is measured. Each event
kind must have occurred at least once. The full-size test runs a 256-line
pass per direction on the 4 MB configuration in well under a second of
simulation time.

## Access-pattern results

`tb_casphar_patterns` stages 96 CPU-to-accelerator lines through the 32-line
test cache. The orders are those of the evaluated kernels. The producer
paces one line per few cycles, and the accelerator keeps up to three reads
outstanding. A spill is a produced line evicted before it was consumed.
Typical output:

| order | like | spills | memory reads | produce-to-consume (cycles) |
|---|---|---|---|---|
| both ascending | kmp, md | 0 | 96 | 3 |
| consumer random | spmv, stencil, nw | 52-62 | 148-158 | about 1400-1600 |
| consumer descending | fft | 64 | 160 | about 1660 |
| consumer after all production | coarse-grain staging | 72 | 168 | about 1000 |

The test checks the qualitative claims:

* There are no spills while the number of lines alive at once stays below
  the capacity.
* There are at least N minus capacity spills when every line is alive at
  once.
* Lifetimes in the matching order are far shorter than with coarse staging.

The random consumer order is also replayed with the eviction range
disabled (the basic variant). That costs 5 to 8 more memory reads, because
a consumer miss on a line that was never produced is fetched instead of
simply parked. The test checks that the basic variant reads more.

A final round writes new data, in random order on both sides, to the
addresses of the coarse run. It checks that no stale F/E bit releases a
consumer early. These are cycle counts for this blocking controller and
behavioural memory. They are not the performance figures of the described
system.

## A pipelined kernel chain

`tb_casphar_pipeline` runs a CPU → accelerator → CPU chain on 48 lines in
each direction. The CPU pre-processes the input. The accelerator multiplies
each input line, taken as a 4 × 4 matrix of 32-bit words, by a fixed
matrix. The CPU then post-processes and consumes the results. Compute times
are 20, 12 and 16 cycles per line. On the 32-line test cache:

| synchronization | cycles | memory reads + writes | spills |
|---|---|---|---|
| per line, everything started together | 4086 | 208 | 24 |
| coarse: accelerator after all input, CPU after accelerator | 5952 | 336 | 72 |

The CPU thread runs pre-processing and post-processing one after the other.
Result lines therefore pile up while the CPU is still producing input, and
this causes the remaining spills of the pipelined run. The test checks:

* every result;
* the pipelined run takes at most 3/4 of the coarse run's cycles;
* the pipelined run has less memory traffic and fewer spills.

## Replacement under a slow consumer

`tb_casphar_policy_study` runs the case where the replacement mode matters.
The accelerator consumes more slowly than the CPU produces, so staged lines
pile up beyond the cache. Meanwhile the CPU keeps reading 12 private lines.
The test stages 64 lines through the 32-line cache at consumer rates of 1:4
and 1:8, once per replacement mode:

| rate | mode | spills | memory reads |
|---|---|---|---|
| 1:4 | LRU | 56 | 132 |
| 1:4 | consumed-first | 44 | 120 |
| 1:4 | extended | 29 | 198 |
| 1:8 | LRU | 61 | 137 |
| 1:8 | consumed-first | 49 | 125 |
| 1:8 | extended | 35 | 212 |

Under plain LRU, a consumed line becomes most-recently-used at the moment
it is consumed, so LRU keeps it. The line LRU evicts instead is the oldest
waiting line, which the consumer needs next. Consumed-first removes this
problem. The extended mode goes further and gives up the CPU's private
lines to keep staged lines resident. That saves spills, but the private
lines then miss, so there are more memory reads in total. Which mode is
better depends on how much the private traffic costs. The test checks these
orderings:

* consumed-first spills fewer lines than LRU;
* extended spills no more than consumed-first;
* a slower consumer spills more in every mode.

## How far to trust it, and where it departs

What follows the described architecture:

* the metadata bits and their set/reset rules;
* `clflush` as the produce/consume mark, with `Syn_A` reset taking priority;
* synchronization misses that look like ordinary misses and complete when
  the line is produced;
* F/E bits written on eviction and used on refill;
* the Min/Max range and its two consumer-miss cases;
* the consumed-first and not-ready-before-ready replacement extensions on
  LRU;
* re-initialisation on region writes;
* the 4 MB / 16-way / 64 B geometry.

Choices made here, where the architecture leaves the detail open:

* 64-bit addresses, so the eviction registers total 128 bits.
* The request/response format and the two per-agent ports. The interconnect
  between L2s and the LLC is not modelled.
* A blocking controller, with a 2-cycle hit after grant.
* The wait table: depth 8, the per-agent cap, and the controller replaying a
  woken read itself instead of the agent retrying it.
* Write-allocate fills for partial writes and flushes that miss.
* Half-open region bounds, the register map and reset values, and the
  run-time policy field.
* The range is emptied on every region write. Parked reads survive a
  reconfiguration.
* Memory F/E bits are cleared by writing back consumed lines through the
  dirty bit. This costs one write-back for a line that was fetched back
  clean.

Not provided:

* the TRRIP and Hawkeye base policies (only LRU-based modes are built);
* counters in place of the `Syn` bits for broadcasts to several consumers;
* the eviction bit-vector and Bloom-filter alternatives to Min/Max;
* any coherence handling (accelerators are assumed non-coherent);
* the memory controller and DRAM, whose F/E storage is modelled only in the
  testbench.

Each shared line is assumed to be read and written once by the accelerator.
An accelerator that reads a C2A line twice will take a synchronization miss
on the second read.
