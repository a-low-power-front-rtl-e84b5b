# A low-power instruction front-end for a block-aware instruction set

Small instruction caches and small branch-target tables save a lot of area
and power in an embedded core. For example, a 2 KB cache uses a few percent
of the area of a 32 KB one. The cost is more misses, and on a conventional
core those misses cost performance. This front-end keeps the small arrays
and hides most of the misses. It relies on an instruction set in which the
program tells the hardware, ahead of time, where every basic block starts,
how long it is and how it ends.

In such a *block-aware* instruction set (BLISS), a program has two parts:

* **Basic block descriptors (BBDs).** One 32-bit word per basic block. It
  gives the block's type (how it ends), its branch offset, its length, a
  pointer to its instructions, and three bits of compiler hints.
* **Plain instructions.** These contain no branches. The descriptor carries
  all control flow.

The program counter only ever points at descriptors. Prediction can
therefore run ahead of instruction fetch, one *block* at a time, without
reading any instruction. The blocks it predicts wait in a small queue. That
queue does three jobs:

1. It separates prediction from the slow two-cycle instruction cache.
2. It tells instruction fetch exactly which words to read, and how many.
3. It shows a prefetcher which instruction lines will be needed next.

Three further techniques recover the performance lost to the small arrays:

* **Unified storage.** Descriptors and instructions share one cache and its
  single port.
* **Prefetching.** Lines are fetched into a side buffer, driven by the queue.
* **Hint-directed placement.** Compiler hints in the descriptor change the
  cache set index.

All three are on in the default configuration.

The RTL is SystemVerilog-2017. All of it is synthesizable except the testbenches.

## Descriptors and addresses

Descriptor word. The bit order is this design's choice; the field widths are
BLISS's:

| bits    | field  | meaning                                              |
|---------|--------|------------------------------------------------------|
| [31:28] | type   | FT, B, J, JAL, JR, JALR, RET, LOOP (codes 0–7)       |
| [27:20] | offset | signed displacement of the target, in descriptors    |
| [19:16] | length | number of instructions in the block, 0–15            |
| [15:3]  | iptr   | word address bits [14:2] of the first instruction    |
| [2:0]   | hints  | compiler hints                                       |

All addresses inside the design are 30-bit word addresses (byte address
bits [31:2]).

* A PC-relative target is `pc + sext(offset)`. The descriptor cache stores it
  already computed.
* A block's first instruction is at `{pc[29:13], iptr}`. The upper bits come
  from the descriptor's own address, so a block and its instructions must lie
  in the same 32 KB window.
* Fall-through is `pc + 1`, the next descriptor.

How each type picks the next PC (`next_pc.sv`):

| type      | next PC                                          | RAS  |
|-----------|--------------------------------------------------|------|
| FT        | fall-through                                     |      |
| B, LOOP   | target if the bimodal predictor says taken       |      |
| J, JAL    | target                                           | JAL pushes pc+1 |
| JR, JALR  | stored target (a guess, corrected by redirect)   | JALR pushes pc+1 |
| RET       | top of the return address stack                  | pops |

## How a block moves through the front-end

```
            redirect / predictor training from the back-end
                         |
   PC --> descriptor lookup --> next_pc --> PC          (prediction)
                |   bimodal predictor, RAS
                v
              BBQ (4 blocks) ----------------> prefetcher -> prefetch buffer
                |                                  |  probes in idle port cycles
                v                                  |
          fetch_unit --> shared cache port <-------+-- desc_fetch (unified mode)
                |              |
                v              v
     packets to the back-end   L2 arbiter --> one L2 port
```

**1. Prediction.** The descriptor at `pc` is found. The next PC is
chosen by the rules above. The block is pushed into the basic block queue
(BBQ) together with:

* its instruction address, length and hints;
* the predicted direction;
* the predicted next PC.

If the queue is full, or the descriptor is not yet available, the PC holds.

**2. Fetch.** `fetch_unit` takes the oldest block in the BBQ and reads its
instructions from the cache, one 32-byte line (8 words) per access.

* Each line's share of the block goes to the back-end as one packet. A
  packet carries the descriptor PC, the address of its first word, a word
  count, a `last` flag and the predicted next PC.
* A block that crosses a line boundary becomes two packets.
* A block of length 0 becomes one empty packet with `last` set, so the
  back-end still sees it.
* The block leaves the queue with its last packet.
* The last line delivered is kept in a one-line buffer. Short sequential
  blocks often share a line; when the next block starts in the buffered
  line, its packet is built from the buffer in one cycle, with no cache
  access. The buffer never goes stale, because instructions are never
  written.

**3. Resolution.** This happens in the back-end, outside this design.

* The back-end executes the block and compares the real next PC with
  `pkt.pred_next`.
* If they differ, it raises `redirect_valid` for one cycle with the correct
  PC. That flushes the queue and the fetch unit, and restarts prediction.
* For conditional blocks it also sends the outcome on `bp_upd_*`.

## Where descriptors come from: `UNIFIED`

**`UNIFIED=1` (default).** There is no separate descriptor cache. A 32-byte
line in the shared cache holds either eight descriptors or eight
instructions. The two never share a line, because they live in different
sections of the program.

* `desc_fetch` reads the line holding `pc` through the shared port. It does
  so only in cycles where instruction fetch is not using the port.
* Two cycles later it presents the decoded descriptor to `next_pc` for
  exactly one cycle.
* On a miss it reads the whole line from L2 and writes it into the cache.
  Then it looks up again.
* Each lookup is a full trip through the two-cycle cache, so prediction runs
  at most one block every three cycles. A single-issue back-end executing
  blocks of three or more instructions needs no more than that; a run of
  shorter blocks leaves the back-end waiting.
* The gain is flexibility. A program that needs many descriptors and few
  instructions, or the reverse, uses the same 2 KB as it needs.

**`UNIFIED=0`.** There is a separate small BB-cache, `bb_cache`: 16 sets by
2 ways, one descriptor per entry.

* It is read combinationally every cycle, so prediction can advance one
  block per cycle.
* On a miss, a small FSM in the top reads the descriptor's L2 line. Only the
  one descriptor is written.

The front-end's ports and behaviour are the same in both modes. Only the
timing and the miss behaviour differ.

## The shared cache port (the subtle part)

`icache` has one port and a two-stage pipeline:

* **Cycle t:** the request is registered.
* **Cycle t+1:** all tags of the set are compared, and the hitting way is
  registered.
* **Cycle t+2:** only that way's data array is read, and the response
  appears.

Reading the data of one way only is where the energy saving comes from.
There are three operations:

* `READ`
* `PROBE`: tags only, no data.
* `FILL`: writes a line in the request cycle, with no response.

Up to three units want the port each cycle. They get it in fixed priority
order:

1. **`fetch_unit`.** It owns the port whenever it requests.
2. **`desc_fetch`.** Unified mode only. It uses the cycles fetch leaves free.
3. **`prefetcher`.** It probes only when neither of the others requests.

Every unit checks for its response exactly two cycles after it issued. Issue
is exclusive, so a response always belongs to the unit that issued it.

Hazard with more than one user. Consider a READ whose tag compare has
already picked a way. A FILL from another unit can land in that same way one
cycle later, before the READ's data stage. The cache detects this case and
reports the READ as a miss, rather than returning the wrong line. The
requester then takes its normal miss path. `tb_icache` checks this case.

## Prefetching

`prefetcher` scans the BBQ entries behind the head, oldest first. Each entry
carries a *checked* flag, so it is examined only once. For the line holding
the block's first instruction:

* If the line is already in the prefetch buffer, it does nothing.
* Otherwise it sends a `PROBE` to the cache in an idle port cycle.
* On a probe miss it reads the line from L2 into the prefetch buffer.

About the prefetch buffer:

* It holds 4 lines, fully associative, with the oldest replaced first.
* Prefetched lines stay out of the cache, so a wrong prefetch cannot evict
  anything.
* On a demand miss, `fetch_unit` looks in the buffer first. If the line is
  there, it moves it into the cache and delivers it without going to L2.

## Compiler hints (`HINT_MODE`)

* **`HINTS_REDISTRIBUTE` (default).** The three hint bits are XORed into the
  top three bits of the 5-bit set index. With hint 0, indexing is the usual
  one. A compiler can give hot blocks whose addresses collide different
  hints, which spreads them over the sets.
  * The tag is the whole line address, so a lookup is exact whatever the
    hint.
  * The same line fetched with two different hints would occupy two sets.
    The hints are a fixed property of the block, so this does not happen
    for instruction lines.
  * Descriptor lines always use hint 0.
* **`HINTS_EXCLUDE`.** Hint bit 0 set means "do not cache this block".
  * Its lines are never filled into the cache.
  * The prefetcher fetches them into the buffer directly, with no probe,
    because it knows they cannot be in the cache.
* **`HINTS_OFF`.** The hints are ignored.

## Misses and L2

`l2_arbiter` shares the single L2 port in this priority order:

1. demand instruction miss;
2. descriptor miss;
3. prefetch.

One request is outstanding at a time, and the response is routed back to
whoever asked.

L2 protocol:

* A request is a `l2_req_valid` / `l2_req_ready` handshake with the word
  address of a 32-byte line.
* L2 returns exactly one `l2_resp_valid` pulse with the line, any number of
  cycles later.

After a redirect, an L2 read that is already under way still completes into
its cache or buffer. Only the wrong-path instructions are dropped.

## Top-level interface (`bliss_frontend`)

| port                         | dir | meaning |
|------------------------------|-----|---------|
| `clk`, `rst_n`               | in  | clock, asynchronous active-low reset (PC resets to `RESET_PC`) |
| `pkt_valid`, `pkt`, `pkt_ready` | out/out/in | instruction packets (`fetch_pkt_t`), held until accepted |
| `redirect_valid`, `redirect_pc` | in | one-cycle restart after a misprediction |
| `bp_upd_valid`, `bp_upd_pc`, `bp_upd_taken` | in | train the bimodal predictor |
| `l2_req_valid`, `l2_req_addr`, `l2_req_ready` | out/out/in | line request to L2 |
| `l2_resp_valid`, `l2_resp_line` | in | 256-bit line from L2 |
| `ev`                         | out | one-cycle event strobes (`fe_events_t`), for counting |

Timing rules for the back-end:

* Drive `redirect_valid` for one cycle. In that cycle the front-end ignores
  its own prediction.
* Any packet offered after the redirect belongs to the new path.

Parameters and their defaults:

| parameter    | default | meaning |
|--------------|---------|---------|
| `UNIFIED`    | 1       | descriptors in the shared cache (1) or in a separate BB-cache (0) |
| `HINT_MODE`  | `HINTS_REDISTRIBUTE` | see above |
| `IC_SIZE`, `IC_WAYS` | 2048, 2 | shared/instruction cache bytes and ways (32 B lines) |
| `BBC_SETS`, `BBC_WAYS` | 16, 2 | separate BB-cache (used when `UNIFIED=0`) |
| `BBQ_DEPTH`  | 4       | basic block queue (power of two) |
| `BP_ENTRIES` | 256     | bimodal predictor counters |
| `RAS_DEPTH`  | 8       | return address stack (power of two) |
| `PB_ENTRIES` | 4       | prefetch buffer lines |
| `RESET_PC`   | 0       | first descriptor address |

The regular, large configuration is `IC_SIZE=32768, IC_WAYS=32,
BBC_SETS=64, BBC_WAYS=4`. It runs with the same RTL.

## Files

| file | what it is |
|------|------------|
| `rtl/bliss_pkg.sv` | descriptor, queue-entry, packet and event types; address helpers |
| `rtl/bliss_frontend.sv` | top: PC register, wiring, port and L2 sharing, separate-BB-cache refill FSM |
| `rtl/next_pc.sv` | next-PC selection, RAS control, BBQ entry formation |
| `rtl/bb_cache.sv` | separate descriptor cache (`UNIFIED=0`) |
| `rtl/desc_fetch.sv` | descriptor lookup through the shared cache (`UNIFIED=1`) |
| `rtl/bimod_predictor.sv`, `rtl/ras.sv` | direction and return prediction |
| `rtl/bbq.sv` | basic block queue with prefetch flags |
| `rtl/icache.sv` | two-stage cache with READ/PROBE/FILL and hint indexing |
| `rtl/fetch_unit.sv` | instruction fetch and miss handling |
| `rtl/prefetcher.sv` | BBQ-driven prefetcher and prefetch buffer |
| `rtl/l2_arbiter.sv` | L2 port sharing |
| `tb/tb_<module>.sv` | one self-checking unit test per module |
| `tb/frontend_harness.sv`, `tb/l2_model.sv` | end-to-end harness: program, back-end model, behavioural L2 |
| `tb/tb_bliss_frontend*.sv` | end-to-end runs: default, `_split` (UNIFIED=0), `_exclude` (exclusion hints), `_regular` (large arrays) |

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself.
A watchdog ends a run that hangs and counts it as a failure. With Verilator
5, run from the top directory:

```
verilator --binary --timing -Irtl -y rtl rtl/bliss_pkg.sv \
    tb/l2_model.sv tb/frontend_harness.sv tb/tb_bliss_frontend.sv \
    --top-module tb_bliss_frontend
./obj_dir/Vtb_bliss_frontend
```

For a unit test, name its file and top, and add `tb/l2_model.sv` if the test
uses it. For example, `tb_prefetcher` and `tb_desc_fetch` need it. Each run
takes well under a second.

### What the end-to-end test does

`frontend_harness` places a small BLISS program in the behavioural L2:

* a nested loop;
* a call to a function containing a branch whose direction alternates;
* a return, jumps and an empty block;
* blocks that cross cache lines;
* three hot blocks whose lines collide in one cache set. They share a hint
  value, so hints do not separate them.

Its back-end model works as follows:

* It runs the program's control flow itself.
* It accepts packets with random stalls.
* It checks every word of every block, in program order.
* It trains the predictor and redirects on every wrong `pred_next`.

At the end it counts how often each mechanism fired:

* descriptor hits, misses and refills;
* BBQ-full stalls;
* redirects;
* RAS pushes and pops;
* taken predictions;
* cache misses;
* prefetch-buffer hits;
* probes;
* prefetches;
* blocks served from the one-line buffer.

A mechanism that never fired counts as a failure. With `_regular`, the
program fits in the large cache, so only cold misses are allowed. The
default run takes about 2500 cycles for 345 blocks and 69 mispredictions.

## Design choices beyond the source description

The architecture follows the published BLISS front-end:

* descriptor format and block types;
* decoupling through a 4-entry BBQ;
* two-cycle tag-then-data cache;
* BBQ-driven prefetching that probes only in idle port cycles, into a
  separate buffer;
* unified storage with instruction fetch having priority on the shared port;
* exclusion and redistribution hints;
* array sizes.

The following are this implementation's own decisions:

* **Descriptor word.** The bit order and the type codes.
* **Address arithmetic.**
  * Offsets count descriptors from the branch's own descriptor.
  * Upper instruction-address bits come from the descriptor address, giving
    a 32 KB window per block. There is no TLB.
* **Indirect jumps (JR, JALR).** They are predicted to a stored target and
  rely on redirects. There is no indirect predictor.
* **Hints in the set index.** In redistribution mode the hints are XORed
  into the top index bits. Simply concatenating them would need a larger
  cache.
* **Unified cache size.** It is taken equal to the small instruction cache
  (2 KB). It fills whole descriptor lines and delivers one descriptor per
  lookup.
* **Fetch.** One cache line per access, without overlapping accesses.
  Sequential blocks that share a line are merged through a one-line buffer
  of the last line delivered.
* **Prefetcher.** It examines only a block's first line. One prefetch is
  outstanding at a time. The buffer holds 4 entries.
* **Replacement.** Victim-pointer replacement everywhere, which is LRU for
  two ways.
* **Predictor.** Counters reset weakly not-taken.
* **RAS.** It wraps on overflow and is not repaired after a misprediction.
* **Shared interfaces.** Fixed L2 priority with one outstanding request, and
  the valid/ready L2 protocol.
* **Redirects.** A one-cycle flush, and in-flight refills are allowed to
  complete.

Not included:

* **Tagless instruction cache and its victim cache.** This is an alternative
  organisation in which the descriptor cache entry selects the instruction
  line directly.
* **Compiler side.** Block re-ordering and hint selection.
* **Rest of the core.** The L2 cache itself, the data cache, the execution
  pipeline and main memory. These are outside the front-end, and their
  signals are ports.
* **Circuit-level savings.** Segmented word lines are not modelled. The
  cache returns whole lines.

## Lint notes

Verilator's `-Wall` reports these; none is a circuit problem:

* **Unused signals.** Fields of shared structs that a given module does not
  need.
* **SYNCASYNCNET.** Raised because the concurrent assertions (BBQ pop on
  empty, L2 response without request) use `rst_n` in `disable iff` while the
  flops use it as an asynchronous reset. This is intended.
