# Adaptive instruction memory hierarchy: predicted L0 bypass and run-time L2 fetch size

A fixed cache organisation is tuned for an average program. Programs differ, and one
program changes as it runs. This RTL is a cache hierarchy that adapts to the running
program in two ways, each driven by a small hardware predictor, with no compiler or
ISA support:

* **For power, a predicted L0 bypass.** A tiny L0 instruction cache (256 bytes) in
  front of the L1 saves energy: every L0 hit is an L1 access avoided. Each L0 miss,
  though, costs one extra cycle before L1 is tried. Hits and misses in the L0 come in
  runs, usually one basic block long. So the fetch unit predicts, fetch by fetch,
  whether to look in L0 or to go straight to L1. The rule is: go to L0 if the
  previous fetch hit in L0, go to L1 if it missed.
* **For performance, a run-time L2 fetch size.** The L2 keeps its 64-byte line, but
  one miss can bring in 1, 2, 4 or 8 consecutive lines (64 to 512 bytes). A profiler
  tries each size for a short interval and counts the misses. It then uses the best
  size for an interval 100 times longer, and starts over.

```
 CPU fetch (16B blocks)                        data side (32B line reads)
        |                                               |
 +------v--------------------------------------+        |
 | ifetch_unit                                 |        |
 |  l0l1_selector --sel--+                     |        |
 |  l0_tag_array  --hit--+   l0_data_array     |        |
 |        bypass mux <---------+-----------+   |        |
 +----------|------------------|-----------|---+        |
            |             l1_icache (32KB, 4-way, 32B lines, 1 cycle)
            |                  |                        |
            |             l2_arbiter (round robin) <----+
            |                  |
            |             l2_cache (512KB, 4-way, 64B lines, 8 cycles)
            |                  |   ^ fetch size
            |                  |   fetch_size_profiler  <- access/miss pulses
            |             memory port: bursts of 1, 2, 4 or 8 lines
```

The top module is `adaptive_mem_hier`. The processor, the L1 data cache and main
memory are outside it.

## Predicted L0 bypass

### The prediction and why the tag array stands apart

The selector (`l0l1_selector`) holds one bit: where the next fetch goes. It is
updated once per fetch with that fetch's L0 outcome. A fetch that goes to L1 still
needs an L0 outcome, or the prediction could never swing back to L0. So the L0 tag
array (`l0_tag_array`) is separate from the L0 data array (`l0_data_array`), and
every fetch looks up the tag, whichever cache serves it. The data array is read only
when the fetch is predicted to L0. A bypassed fetch that finds its line in the L0
tag array (`ev_bypass_l0hit`) is a misprediction in the cheap direction: it costs
energy, not time. It also turns the prediction back to L0.

### Fetch timing

A fetch is accepted in cycle *t* (`cpu_req_valid && cpu_req_ready`). With L1 hits:

| predicted | L0 tag | data returned | L1 accessed | L0 written |
|-----------|--------|---------------|-------------|------------|
| L0        | hit    | *t*+1, from L0 | no         | no         |
| L0        | miss   | *t*+2, from L1 | yes, in *t*+1 | yes      |
| L1        | hit    | *t*+1, from L1 | yes, in *t* | no         |
| L1        | miss   | *t*+1, from L1 | yes, in *t* | yes        |

A new fetch can be accepted in the cycle a result is returned, so L0 hits and
bypassed L1 hits both stream at one fetch per cycle. An L1 miss adds the L2 time
(8 cycles on an L2 hit) and, on an L2 miss, the memory burst. The selector forwards
the outcome being reported in a cycle to a fetch accepted in that same cycle, so
back-to-back fetches always use the newest outcome. After reset the prediction is
L1, because the L0 is empty.

Both L0 arrays read synchronously and are write-first. A fetch accepted in the cycle
its line is written into L0 therefore sees the new line. This is what lets refill
and the next fetch overlap.

### Refill policy

An L0 line is written whenever the L1 returns a block whose L0 tag missed. This
includes bypassed fetches. Without that, a run of bypassed fetches would never load
the L0, and the predictor would have no hits to switch back on.

## Run-time L2 fetch size

### Profiling schedule

`fetch_size_profiler` works in L2 accesses, not cycles:

1. **Profiling.** 64B, 128B, 256B and 512B are applied in turn, each for
   `PROFILE_LEN` (1,000) accesses. The misses in each interval go into that size's
   miss record register.
2. **Stable.** The size with the fewest recorded misses is applied for `STABLE_LEN`
   (100,000) accesses. On a tie the smaller size wins. All profiling intervals have
   the same number of accesses, so comparing miss counts is the same as comparing
   miss rates.
3. Then profiling starts again.

The registers are: the current fetch size, two interval length registers (loaded at
reset from the parameters, and writable at run time through `cfg_we`,
`cfg_profile_len` and `cfg_stable_len`), a profiling interval counter and a stable
interval counter (both count L2 accesses), a miss counter and four miss records. New
interval lengths apply at once: the running interval ends when its count reaches the
new length. The L2 raises `access_o` and `miss_o` together at the end of each
lookup, so every miss is counted in the interval of its access.

Profiling costs something: while the wrong sizes are being tried, the miss rate is
higher. That is why the stable interval is much longer than a profiling interval.

### Multi-line miss-fetch in the L2

On a miss, `l2_cache` takes the fetch size in force at that moment. It requests
N = 2^fsize lines from memory, starting at the missed line's address rounded down to
a multiple of N lines, so the block always contains the missed line. Each returned
line goes into its own set, because consecutive lines map to consecutive sets. A line
that is already present is left alone. Otherwise the line goes into an invalid way,
or else into the way named by that set's round-robin pointer. After the last beat,
the requested half line is returned to the L1. The line size never changes, so
changing the fetch size never needs a flush.

The L2 handles one request at a time. A hit answers exactly `LATENCY` (8) cycles
after it is accepted.

## Interfaces of `adaptive_mem_hier`

All handshakes are valid/ready. A request is taken on a rising edge where both are
high. A response is a one-cycle `*_resp_valid` pulse, and each port has at most one
request outstanding.

| port | width | meaning |
|------|-------|---------|
| `cpu_req_valid/ready`, `cpu_req_addr` | 1/1/28 | fetch of the 16-byte block at byte address `{addr, 4'b0}` |
| `cpu_resp_valid`, `cpu_resp_data` | 1/128 | four instructions, lowest address in bits [31:0] |
| `d_req_*`, `d_resp_*` | 27 / 256 | 32-byte line reads from L2 for a data cache |
| `mem_req_valid/ready`, `mem_req_addr`, `mem_req_lines` | 1/1/26/4 | burst of 1, 2, 4 or 8 64-byte lines from line address `mem_req_addr` |
| `mem_resp_valid`, `mem_resp_data` | 1/512 | one line per beat, in address order |
| `cfg_we`, `cfg_profile_len`, `cfg_stable_len` | 1/32/32 | load new interval lengths (they apply at once) |
| `fetch_sel` | 1 | current L0/L1 prediction (`SEL_L0`/`SEL_L1`) |
| `fetch_size`, `profiling`, `prof_miss_rec[4]` | 2/1/4x32 | profiler state |
| `ev_l0_hit`, `ev_l0_miss`, `ev_bypass`, `ev_bypass_l0hit`, `ev_l0_fill` | 1 each | one pulse per event in the L0 path |
| `ev_l1_hit`, `ev_l1_miss`, `ev_l2_access`, `ev_l2_miss` | 1 each | one pulse per lookup |

The event pulses exist so that accesses can be counted per level. For example,
energy can be estimated as the number of L0 tag, L0 data and L1 accesses, each times
its cost per access.

After reset, L1 and L2 clear their valid bits one set per cycle: 256 cycles for L1
and 2,048 for L2 at the default sizes. Neither cache accepts a request during that
sweep. Valid bits and replacement pointers are kept in per-set memories, not in
resettable flip-flops. Every array in L1 and L2 is a RAM with a registered read
port, read at the clock edge that accepts the request (or, during an L2 burst, one
edge before the beat that needs it), so the caches map onto SRAM macros.

## Parameters

| parameter | default | where |
|-----------|---------|-------|
| `L0_BYTES` | 256 (512 is the other size of interest) | top, `ifetch_unit`, L0 arrays |
| `L1_BYTES`, `L1_WAYS` | 32768, 4 | top, `l1_icache` |
| `L2_BYTES`, `L2_WAYS`, `L2_LATENCY` | 524288, 4, 8 | top, `l2_cache` |
| `PROFILE_LEN`, `STABLE_LEN` | 1000, 100000 | top, profiler (reset values of the length registers) |
| `CNT_W` | 32 | counter and register width of the profiler |

The sizes must be powers of two. The line sizes (16B L0, 32B L1, 64B L2) and the
16-byte fetch block are fixed in `mem_hier_pkg`. The 16-byte block is four 32-bit
instructions, for a 4-wide fetch.

## What follows the original proposal, and what is this design's own

These follow the proposal:

* the prediction rule;
* the decoupled L0 tag and data arrays;
* the multiplexer that lets L1 answer the CPU directly;
* the profiling procedure, its register set, the four fetch sizes and the two
  interval lengths;
* all cache sizes, associativities, line sizes and latencies;
* the 30-cycle memory latency of the test model.

These are this design's own choices:

* the handshakes and the exact cycle at which each thing happens;
* write-first L0 arrays;
* refilling L0 on bypassed fetches;
* round-robin replacement (invalid ways first);
* aligned fetch blocks that skip lines already present;
* answering an L2 miss only after the whole burst;
* ties going to the smaller fetch size;
* counting intervals in L2 accesses;
* the reset sweep;
* the round-robin arbiter that shares the L2 between the instruction and data sides.

Known limits:

* The L2 serves **reads only**. The proposal's L2 is unified, but no write or
  write-back behaviour of the data side is defined, so none is modelled.
* One request is outstanding per cache, and the memory port carries one burst at a
  time. Contention on a shared memory bus is not modelled.
* The processor, the L1 data cache and main memory are not part of the RTL.
* The comparison configurations (no L0; an L0 that is always accessed first) are not
  built. With the prediction forced to L0 the hierarchy would behave like the latter,
  but no such mode exists.
* Fetch size profiling is built for the L2 only.

## Verification

Each testbench in `tb/` is self-checking and ends with
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_l0l1_selector` | prediction rule, forwarding, reset value |
| `tb_l0_tag_array`, `tb_l0_data_array` | random lookups and writes against a reference store, write-first |
| `tb_ifetch_unit` | with a model L1: data, the prediction of every fetch, and the cycle count of each path in the table above |
| `tb_l1_icache` | with a model L2: data, 1-cycle hits streaming one per cycle, full 32KB/4-way capacity with no misses on re-read |
| `tb_l2_cache` | with a model memory (8KB L2): data, 8-cycle hits, burst size and alignment for each fetch size, every line of a burst present afterwards |
| `tb_l2_arbiter` | one request outstanding, answers routed to the right side, alternation under contention |
| `tb_fetch_size_profiler` | the schedule cycle by cycle, the miss records, ties, run-time interval lengths |
| `tb_adaptive_mem_hier` | whole hierarchy with the 512B L0 and reduced sizes (L1 4KB, L2 16KB, intervals 40/400) with CPU and data-side traffic; all data checked; cycle counts of fetches that hit L1; every mechanism must occur (L0 hit, predicted L0 miss, bypass, bypass of an L0-resident line, L0 refill, L1 and L2 hits and misses, all four burst sizes, a switch to a stable interval, contention at the L2) |
| `tb_adaptive_mem_hier_full` | the same at full default size: runs until all four sizes have been profiled for 1,000 L2 accesses each, the stable size has been applied for 1,000 more, and checks that the applied size is the one with the fewest recorded misses |
| `tb_workload_l0_pred` | at default size, 24 segments of a tight loop (2 to 16 blocks, up to 40 iterations) followed by straight-line code: the exact number of L0 hits, predicted-L0 misses and bypasses in every loop and every straight run (worked out from the prediction rule), and fewer miss penalties than a hierarchy that always tries the L0 first would pay; typical result: about 75% of fetches served by L0 with one penalty per segment |
| `tb_workload_fetch_size` | two program phases with the 1,000-access profiling interval (L1 4KB, L2 16KB, stable interval 3,000): straight-line code must select 512B (recorded misses 500/250/125/63 for 64B..512B), then random reuse of 300 scattered lines, a little more than the L2 holds, must select 64B (typically about 450/530/840/940) |

`tb/main_memory_model.sv` is the behavioural memory used by the testbenches of the whole hierarchy. It has a
30-cycle first-line latency, then one line per cycle, and each line's contents are a
fixed function of its address.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/mem_hier_pkg.sv \
    tb/tb_adaptive_mem_hier_full.sv --top-module tb_adaptive_mem_hier_full -o sim
./obj_dir/sim
```

Use the same command for the other testbenches, with their names swapped in.
Verilator finds the modules through `-Irtl -Itb`. Each full-size run takes well
under a second.
