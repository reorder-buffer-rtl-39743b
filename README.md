# Reorder-buffer multithreading for a MIMD ray traversal unit

A hardware ray traversal unit walks each ray through an acceleration
structure one node at a time: fetch the node from a cache, run it through a
fixed pipeline, and either finish the ray or send it round again for the next
node. In a MIMD unit every ray goes its own way, so cache misses are frequent
and long. When a miss stalls the pipeline, the whole unit waits on DRAM.

Earlier designs hid that latency in two ways. One parks missed rays in a
large dedicated buffer grouped by address. The other marks a missed ray
invalid and lets it ride through the pipeline doing nothing until it can try
the cache again. The first costs tens of kilobytes of SRAM. The second burns
energy on every useless trip through the pipeline.

This RTL implements the alternative known as the *reorder buffer*. The input
buffer the pipeline already has is extended so that it can keep a missed ray
where it is. Each entry gains three fields:

| field   | width | meaning |
|---------|-------|---------|
| valid   | 1     | 1: the ray is new and has not yet looked in the cache |
| ready   | 1     | for a ray that missed (valid=0): 0 = still waiting, 1 = its data has arrived |
| address | 26    | the node address the ray needs, used for lookups and for searching the buffer |

Nothing else is added: no second buffer, no bypass path and no pipeline stall.
Rays simply leave the buffer in a different order from the one they came in.
That reordering also groups rays that need the same node, so the cache is
used better.

## How a ray moves

```
 new rays ──► ┌──────────────────┐  lookup (1/cycle)  ┌───────────────┐ mem_req ──► L2/DRAM
 feedback ──► │  reorder_buffer  │ ─────────────────► │   nb_cache    │
    ▲         │  valid/ready/addr│ ◄── hit/miss ───── │ non-blocking  │ ◄── mem_rsp
    │         │  + rob_select    │ ◄── fill (addr) ── │   L1, MSHRs   │
    │         └────────┬─────────┘                    └──────┬────────┘
    │          ray on hit                              node data
    │                  └──────────────┬──────────────────────┘
    │                          ┌──────▼───────┐
    └──── not finished ─────── │ trv_pipeline │ ───► finished rays (out_*)
                               └──────────────┘
```

1. A ray enters an entry with valid=1.
2. The selector picks it, and its address goes to the L1 cache. The entry is
   marked busy for the one cycle the lookup takes.
3. On a **hit**, the ray leaves the buffer in the answer cycle and enters the
   pipeline together with the node record the cache returned.
4. On a **miss**, the ray stays in its entry with valid=0, ready=0. The cache
   fetches the line without blocking and keeps serving lookups.
5. When the line arrives, the cache broadcasts its address. Every waiting
   entry with that address gets ready=1.
6. A ready ray is picked before any new ray. Its data is now in the cache, so
   it hits.
7. At the end of the pipeline the ray either leaves finished or comes back to
   the buffer as a new ray (valid=1) with its next node address.

### Selection priority (`rob_select`)

Each cycle one entry may look in the cache. The order is:

1. **invalid and ready**: the ray missed, and its data has since arrived;
2. **valid**: a new ray, which may or may not hit.

Waiting rays (valid=0, ready=0) and rays whose lookup is in flight are never
picked. Within each level the choice is round-robin, starting from the entry
after the previous grant, so no entry can starve. The two-level order belongs
to the scheme; the round-robin is this implementation's choice.

### Redundancy control

Suppose a ray arrives needing an address that a retained ray is already
waiting for. The data is already on its way from memory, so a lookup would
only miss again. The buffer compares the arriving address with all waiting
entries. On a match it stores the ray directly as valid=0, ready=0, without a
lookup, and increments `merge_cnt`. The same fill then wakes both rays, and
they go through the pipeline back to back. That adjacency is the coherence
gain.

This design extends the rule in two ways. Both are its own choices:

* It applies the rule to rays fed back from the pipeline as well as to new
  rays.
* A ray whose address matches an entry whose data has *already* arrived is
  stored as valid=0, ready=1, so that it leaves together with that entry.

The cache also merges misses to one address into a single memory request.
That covers two new rays with the same address that both look up before
either has been marked as waiting.

### Feedback never stalls

The buffer has two write ports, one for new rays and one for rays coming back
from the pipeline. The pipeline must never stall, so a fed-back ray must
always find a free entry. The buffer counts the rays that are in the pipeline
(`in_pipe`: +1 per dispatch, −1 per feedback or finished ray). It admits a
new ray only while

    occupancy + in_pipe < DEPTH

As a result, a completely empty buffer may still refuse new rays when DEPTH
rays are in the pipeline. This credit rule is the design's own. The scheme
assumes feedback into the input buffer but does not say how overflow is
avoided.

## Blocks

| file | role |
|------|------|
| `rtl/rt_pkg.sv` | widths, `ray_t`, `ray_req_t` (ray + node address), node-record helpers |
| `rtl/rob_select.sv` | combinational two-level round-robin selector |
| `rtl/reorder_buffer.sv` | the extended input buffer: entries, wake-up, redundancy control, credit, dispatch |
| `rtl/nb_cache.sv` | non-blocking direct-mapped L1 with miss-status registers (MSHRs) |
| `rtl/trv_pipeline.sv` | non-stalling latch chain with exit and feedback outputs |
| `rtl/mimd_trv_unit.sv` | top: the three parts wired as above, plus statistics counters |

### `nb_cache`

The scheme needs a lockup-free L1. It must answer one lookup per cycle with a
latency of one cycle, keep going while misses are outstanding, and report when
a miss has completed. This implementation is the simplest cache that does
that:

* **Organisation:** direct mapped, SETS lines, one 64-bit node record per
  line.
* **Misses:** MSHRs are merged by address. Pending requests are issued lowest
  MSHR first, over a valid/ready request port.
* **Responses:** they may return in any order. Each carries its address.
* **Fills:** a response is written into the line, frees its MSHR and appears
  on `fill_*` in the same cycle.
* **Same-cycle arrival:** if a lookup finds its line arriving in that same
  cycle, it is answered as a hit with the arriving data. Without this, a ray
  could be marked waiting just after its fill had passed, and it would never
  wake.

The top sets MSHRS = DEPTH. Every live MSHR has at least one ray waiting on it
in the buffer, so MSHRs cannot run out. An assertion checks this.

### `trv_pipeline`: what is a stand-in

The latch chain is real, and so is its timing. A ray entering on cycle t
leaves on cycle t + STAGES + 1. The pipeline never stalls, and it splits its
output into finished and fed-back rays.

The traversal arithmetic itself is **not** modelled: no ray/box or
ray/triangle tests and no stack. In its place the logic walks a node record,
whose layout is defined in `rt_pkg`:

| bits | meaning |
|------|---------|
| `[25:0]` | next node address |
| `[26]` | terminal flag |
| `[63:27]` | node contents |

Level 1 decodes the next address and the terminal flag. Level 2 counts the
visit in the ray. That is enough to drive the buffer and cache with a
realistic stream of dependent accesses. A real traversal step would replace
the `level` function.

## Interface of `mimd_trv_unit`

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `in_valid`, `in_ready`, `in_req` | in/out/in | new ray (`ray_req_t`: ray + first node address), valid/ready |
| `out_valid`, `out_ray` | out | finished ray; no backpressure, it must be taken in that cycle |
| `mem_req_valid`, `mem_req_ready`, `mem_req_addr` | out/in/out | line request to the next level |
| `mem_rsp_valid`, `mem_rsp_addr`, `mem_rsp_data` | in | line response, any order, at most one per cycle |
| `cnt_exec` | out | cycles in which a ray entered the pipeline |
| `cnt_idle` | out | cycles with rays buffered but none entering |
| `cnt_retain` | out | misses kept in the buffer |
| `cnt_wake` | out | rays woken by fills |
| `cnt_sel_ready` | out | lookups granted to woken rays |
| `cnt_merge` | out | lookups avoided by redundancy control |
| `cnt_mem_req` | out | misses sent to memory |
| `cnt_mshr_merge` | out | misses merged in the cache |
| `cnt_pipe_busy` | out | cycles with any ray in the pipeline |
| `cnt_full` | out | cycles a new ray was refused |
| `cnt_done` | out | finished rays |
| `rays_buffered`, `rays_in_pipe` | out | current load |

Timing from arrival to dispatch, with no contention:

* **Hit:** a ray written into the buffer at edge t is looked up in the cycle
  after it and dispatched one cycle later, so it enters the pipeline two
  cycles after it arrives.
* **Miss:** the ray waits until its fill. It is then chosen ahead of any new
  ray on the next cycle, and dispatched one cycle after that.

## Parameters

| name | default | where it comes from |
|------|---------|---------------------|
| `ADDR_W` (package) | 26 | the scheme's address field |
| `DEPTH` | 16 | own choice: buffer entries, also MSHRs |
| `SETS` | 256 | own choice: L1 lines |
| `STAGES` | 4 | own choice: logic levels; the scheme's drawings show a short latch chain |
| `PAYLOAD_W` (package) | 192 | own choice: origin and direction as six fp32 values |
| `RID_W`, `VISIT_W`, `DATA_W` (package) | 16, 8, 64 | own choices |

The scheme was evaluated with a 1-cycle L1, a 20-cycle L2 and DRAM latencies
of 10, 100, 200 and 300 cycles at 500 MHz. The L2 and DRAM are outside this
RTL. The testbenches model them as a latency (`tb/l2_dram_model.sv`).

## Simulation

Each testbench is self-checking and ends by printing
`TB_RESULT checks=N failures=M`. Run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/rt_pkg.sv \
    tb/tb_mimd_trv_unit.sv --top-module tb_mimd_trv_unit
./obj_dir/Vtb_mimd_trv_unit
```

| testbench | what it checks |
|-----------|----------------|
| `tb_rob_select` | 5000 random entry states against a plain reference scan |
| `tb_reorder_buffer` | the scheme's worked example, step by step (see below), plus the credit rule on every cycle |
| `tb_nb_cache` | random lookups against a shadow copy of the cache lines; memory answers out of order with random delays |
| `tb_trv_pipeline` | exact latency and the exit/feedback split with fields for random rays |
| `tb_mimd_trv_unit` | the whole unit at default parameters, 400 rays per DRAM latency (see below) |

`tb_reorder_buffer` follows the example in order:

1. Rays R0–R3 arrive, and three of them miss.
2. R4 merges with R0.
3. The fill of 0x1 wakes R0 and R4, and they are picked ahead of the newly
   arrived R10 and R11.
4. R2 returns from the pipeline and merges with R1.
5. The buffer fills up, and new rays are refused until credits return.

`tb_nb_cache` also checks that hit data is correct, that there is never a
second request for a pending address, that same-cycle forwarding happens, and
that every miss is eventually filled.

`tb_mimd_trv_unit` runs 400 rays per DRAM latency (10, 100, 200 and 300
cycles) through a levelled test scene. It checks:

* each ray leaves exactly once, with the right visit count and its payload
  intact;
* the pipeline is entered once per node visit;
* every mechanism (miss retention, wake-up, woken-first selection, redundancy
  control, MSHR merge, feedback, refusal when full) occurs at least once.

The test scene has 6 levels of 64 nodes. With the default 16-entry buffer the
run prints the following:

| DRAM latency | cycles for 400 rays | pipeline busy |
|--------------|---------------------|---------------|
| 10 | ≈2.1 k | ≈93 % |
| 300 | ≈9.6 k | ≈40 % |

The drop shows how much latency 16 entries can cover on this scene. It is not
a measurement of the published results.

## Trust and departures

The following match the scheme:

* the entry fields and their meanings;
* the retention of missed rays in place;
* the wake-up by address;
* the two-level selection order;
* redundancy control with a counter;
* the organisation of buffer, cache and pipeline with feedback.

The following are this implementation's own:

* buffer depth, cache organisation and every width except the 26-bit address;
* the round-robin order within a priority level;
* the credit rule that keeps feedback from stalling;
* treating fed-back rays like new ones for redundancy control;
* storing a ray that matches an already-woken entry as ready;
* reset behaviour;
* the node-record format.

The scheme does not say what its "counter" counts. Here it is the number of
merged rays.

The traversal pipeline is a stand-in that walks node records instead of
intersecting geometry, so the unit is complete as a latency-hiding mechanism
but not as a ray tracer.

Only the 26-bit node address limits scene size. With one 64-bit record per
address, 512 MiB can be addressed. That covers scenes up to a few million
triangles. If an address named a 64-byte line instead, the space would be
4 GiB.
