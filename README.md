# Time-stride prefetching for conflict misses

In a direct-mapped cache, two lines that map to the same set keep evicting
each other. Prefetchers that follow spatial patterns (next line, constant
address stride) do little for these conflict misses. The misses do follow a
pattern in *time*, though. A line caught in a conflict inside a loop misses
again after about the same number of other misses, every iteration.

This design measures that interval and uses it. The **time-stride** of a miss
is the number of cache misses since the previous miss to the same line. The
design predicts that the line will miss again one time-stride later. Shortly
before then, it fetches the line from L2 into a small buffer beside the L1.
When the predicted miss comes, the L1 refills from that buffer instead of
from L2.

The RTL is SystemVerilog (IEEE 1800-2017). It covers the L1 cache, the
prefetch buffer and the whole prefetch engine. The processor and the L2 cache
are outside the design and connect through ports.

## The parts

```
 processor ──req/resp──> l1_cache ──demand reads, stores──> L2
                          │   ▲                              ▲
              miss address│   │ refill on MPB hit            │ prefetch reads
                          ▼   │                              │
                 ┌──────── tsp ─────────────────────┐        │
                 │ mht ─ts─> tsp_scheduler ─> prt ──┼─> prefetcher
                 └──────────────────────────────────┘        │
                              mpb <──── prefetched lines ────┘
```

| module | role |
|---|---|
| `l1_cache` | 32KB direct-mapped L1 with 32-byte lines. On a miss it searches the MPB, then L2. It reports every miss address. |
| `mpb` | Miss prefetch buffer: 8 fully-associative line entries, FIFO replacement, searched on every L1 miss. |
| `mht` | Miss history table: the last N miss line addresses in a circular table (N = 1024). Gives the time-stride. |
| `tsp_scheduler` | Picks the slot in the request table that makes the prefetch arrive on time. |
| `prt` | Prefetch request table: N slots of pending prefetches, indexed by the same head pointer as the MHT. |
| `prefetcher` | Sends due requests to L2 and writes the answers into the MPB. |
| `tsp` | The engine: `mht`, `tsp_scheduler`, `prt` and `prefetcher` around one head pointer. |
| `tsp_system` | Top level: `l1_cache`, `mpb` and `tsp`, plus event counters. |
| `tsp_pkg` | Shared widths and types, and the `tsp_stats_t` counter struct. |

## Time is counted in misses

The engine has no clock of its own. Its notion of time is the **miss
count**: the head pointer shared by the MHT and the PRT moves on by one for
every L1 miss. Misses served by the MPB count too, since from the cache's
side they are still misses. Counting misses, not cycles or instructions,
makes the prediction independent of the processor. It also lets the engine
sit outside the processor chip, where the only thing it sees is the miss
address stream.

On every miss to line `addr`, in one clock cycle, `tsp` does four things:

1. It writes `addr` into the MHT at `head`. This overwrites the oldest entry.
2. It compares `addr` with the other N-1 entries and finds the most recent
   earlier miss to it, at entry `last`.
3. If there is one, it computes `ts = head - last` (mod N). The scheduler
   then picks a PRT slot `en`, and `addr` is stored there.
4. It issues the request in PRT slot `head`, if any, to the prefetcher, and
   empties that slot.

Then `head` moves on. A request in the slot at offset `d` from `head` is
therefore issued `d` misses from now.

## Scheduling: when to prefetch

This is the step that needs the most care. Suppose a line's next miss is
expected `ts` misses from now. The MPB keeps a prefetched line only until
MPB_SIZE more lines have been prefetched after it, and each miss issues at
most one prefetch. A request issued at offset `d` is therefore still useful
if `ts - MPB_SIZE <= d <= ts - 1`. That range is the **scheduling window**.

- The scheduler first tries the **optimal** slot, `head + ts - MPB_SIZE/2`,
  the middle of the window. From there the real next miss may come up to
  MPB_SIZE/2 misses early or late and still find the line.
- If that slot is taken, it uses the **nearest empty slot** in the window.
  On a tie it takes the earlier slot.
- If every slot in the window is taken, the new request **overwrites** the
  optimal slot. The old request there is lost.

For short strides (`ts <= MPB_SIZE`) part of the window lies before `head`,
in the past. This design clips the window and the optimal slot at `head`.
The `head` slot is issued in the same cycle, so such a line is prefetched at
once. This is what makes tight loops work. In `a[i] = b[i] + c[i]`, with
`b` and `c` evicting each other, each line of `b` misses every 2-3 misses.
After its first two misses, the remaining six misses to each 8-word line
are served by the MPB.

## Miss path and stores

`l1_cache` handles one access at a time:

- **Hit:** a load is answered in the cycle after the request is taken.
- **Miss, MPB hit:** the line is copied from the MPB into the L1 (one extra
  cycle). The miss address still goes to the MHT. That yields a fresh
  time-stride and issues the next due request.
- **Miss, MPB miss:** the line is fetched from L2 and the miss address goes
  to the MHT.

Stores write through to L2 and allocate on a miss. While a store is offered
to L2, its line address is broadcast on a snoop signal. Any MPB copy of that
line is dropped. Any prefetch of it still queued or in flight is marked
stale, and its answer is thrown away. This keeps the MPB from ever returning
data older than L2.

## Interfaces

All channels are valid/ready. Addresses below the L1 are 27-bit line
addresses, lines are 256 bits, and processor words are 32 bits.

- Processor: `req_valid/req_ready/req_we/req_addr/req_wdata`, answered by
  `resp_valid/resp_rdata`. `resp_valid` also pulses once a store has been
  taken by L2.
- L2 demand read: `l2_rd_req_*`, answered by `l2_rd_resp_valid/data`.
- L2 store: `l2_wr_valid/ready/addr/data`.
- L2 prefetch read: `l2_pf_req_*`, answered by `l2_pf_resp_valid/data`.
  Answers must come back in request order. Several may be outstanding, up
  to PF_DEPTH.
- `stats` (`tsp_stats_t`): counters since reset. They cover accesses, hits,
  misses, MPB hits, L2 fetches, strides found, the three scheduler outcomes,
  prefetches issued, dropped, filled and discarded as stale, and stores.
  MPB hit rate is `mpb_hits / pf_issued`. Miss elimination rate is
  `mpb_hits / l1_misses`.

## Parameters

| parameter (`tsp_system`) | default | meaning |
|---|---|---|
| `L1_BYTES` | 32768 | L1 size; 32-byte lines, direct-mapped |
| `MHT_SIZE` | 1024 | entries of the MHT and of the PRT; need not be a power of two |
| `MPB_SIZE` | 8 | MPB lines; also sets the scheduling window |
| `PF_DEPTH` | 4 | prefetcher queue (waiting plus in flight) |

The reference configuration is a 32KB L1, a 1024-entry table and an 8-line
MPB. Studies of this scheme sweep the table from 64 to 4096 entries and the
MPB from 1 to 64 lines. All of those points are reachable through the two
parameters. Storage cost is one 27-bit address per MHT entry plus one
address and a valid bit per PRT entry: about 7KB at 1024 entries.

## What follows the scheme and what is this design's own

These follow the time-stride scheme as described:

- the five components and their connections;
- the FIFO MHT and PRT, which share a head pointer and have the same size;
- the time-stride in misses, `ts = head - last`, found with N-1 comparators;
- the window, the optimal slot, the nearest-empty rule and overwriting when
  the window is full;
- the miss flow: L1, then MPB, then L2, with the miss address sent to the
  MHT on MPB hits too;
- the sizes: 32KB/32B direct-mapped L1, 1024-entry tables, 8-line MPB.

These are choices made here, where the scheme says nothing:

- Each miss is handled completely in one cycle.
- Short-stride windows are clipped at `head`, and ties go to the earlier
  slot.
- When the window is full, the slot overwritten is the optimal one.
- The prefetcher has a 4-deep queue, drops requests when it is full, and
  expects in-order answers from L2.
- The L1 is write-through with write-allocate, and stores invalidate the
  MPB and the prefetcher's stale entries.
- The L1 is blocking.
- The tables store line addresses, not full byte addresses.
- The L2 channels are separate, where the reference system has one shared
  bus.
- There are no tail pointers. The tables are always full after warm-up, so
  the tail equals the head.

Not included: the processor and the L2 cache. Also left out are the stride
prefetcher and the victim cache that the scheme is usually compared against.

## Timing and size

The MHT search is the long path: 1023 comparators of 27 bits, then a
priority pick relative to `head`. The whole design is flip-flops. The MHT
and PRT hold about 56 Kbit at the default size, and the L1 data array is a
256 Kbit register array. A real implementation would put the L1 data into
SRAM. It might also take several cycles per miss, since misses are far
apart.

## Simulating

Each module in `rtl/` has a self-checking testbench in `tb/` named
`<module>_tb`. Each one ends by printing
`TB_RESULT checks=N failures=M`. `tb/l2_model.sv` is a behavioural L2/memory
model, not synthesizable. `tb/tb_mem_pkg.sv` gives the initial memory
contents as a function of the address.

```
verilator --binary --timing --assert --top-module tsp_system_tb \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/tsp_pkg.sv tb/tb_mem_pkg.sv tb/tsp_system_tb.sv
./obj_dir/Vtsp_system_tb
```

`tsp_system_tb` runs the top level at its default sizes. It runs three
phases:

- matrix addition with two conflicting source arrays;
- the same loop with all three arrays conflicting, so stores hit lines with
  prefetches in flight;
- random conflicting traffic with back-pressure on the prefetch channel.

It checks every loaded word against a reference memory, and checks that
every counted mechanism happened: MPB hits, all three scheduler outcomes,
queue overflow and stale discards. In the matrix-addition phase 70% of the
misses are eliminated. The figure expected from the analysis is 75% for
eight words per line, less the misses where a new line starts.

How far the blocks are checked: each unit testbench compares its block,
cycle by cycle, with an independent reference model fed the same random
stimulus. For example, the MHT is checked against a full miss history, the
scheduler against a brute-force search of the window, and the prefetcher
against a queue model. `tsp_tb` checks the exact sequence of prefetch
addresses that the engine sends for cyclic miss streams. Assertions check
that L2 requests are held until taken and that L2 never answers a prefetch
that was not asked for.

`matmul_tb` runs the matrix-multiply loop nest on 127 x 127 integer
matrices at the default sizes, which takes about half a minute. The three
arrays start 64KB apart, so they share L1 sets. The testbench checks the
product. It reports an 8.2% miss rate, 19% of misses eliminated and an MPB
hit rate of 83%. The hit rate is close to the value published for this
configuration (1024-entry table, 8-line MPB). The elimination rate depends
on where the arrays sit relative to each other.

`tsp_sweep_tb` runs eight configurations side by side on a 64 x 64
multiply: a 256-, 1024- and 4096-entry table with an 8-line MPB, and MPBs of
1, 2, 4, 16 and 64 lines with a 1024-entry table. On this small problem all
strides are short, so the table size makes no difference, and an 8-line MPB
does best: it eliminates 65% of misses. MPBs of 16 and 64 lines eliminate
55-56%, and MPBs of 1 to 4 lines eliminate 54-61%. With a larger MPB the
window reaches further back and is clipped at `head` for more strides. This
trend has not been studied further here.

The L2 model's latencies and prefetch back-pressure are parameters of
`l2_model`. Elimination rates depend on them: a prefetch must come back
before its line's next miss.
