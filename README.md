# A stream-aware last-level cache for 3D rendering on a GPU

A GPU renders a frame through a pipeline. Each stage reads and writes its own kind of data: depth (Z),
hierarchical depth (HiZ), stencil, render targets (pixel colour), textures, vertices and vertex
indices. Each stream has a small render cache of its own. Behind those caches sits one large shared
last-level cache (LLC). The streams reuse data very differently. Z blocks are often dead once written.
Texture blocks are usually read once or twice. Render targets are frequently written by the colour
ROPs and then read back as textures a little later ("render to texture"). A replacement policy that
treats all blocks alike, such as RRIP, throws away much of that reuse.

This RTL implements an 8 MB, 16-way graphics LLC whose replacement policy is **GSPC** (graphics
stream-aware probabilistic caching). Replacement is ordinary two-bit RRIP: every block has a
re-reference prediction value (RRPV) from 0 (keep) to 3 (evict first), and the victim is always a
block at RRPV 3. What changes is the RRPV a block receives when it is filled or hit. That value
depends on the stream and on reuse probabilities the cache measures while it runs. A few *sample
sets* always run plain SRRIP and count how often each kind of block is reused. The remaining
*follower sets* use those counts to decide insertion.

## Block state: RRPV plus two state bits

Every block carries its tag, valid and dirty bits, a two-bit RRPV and two state bits:

| state | meaning |
|-------|---------|
| `ST_E0`  | texture block that has had no texture hit since it became texture (epoch E0) |
| `ST_E1`  | texture block with one texture hit (epoch E1) |
| `ST_E2P` | texture block with two or more hits, or any non-texture block |
| `ST_RT`  | render-target block written by the colour ROPs and not yet read by a sampler |

A block's *epochs* are the stretches of its life between LLC hits. Most texture hits fall in E0 and
E1. Blocks that reach E2 are nearly always live, so only E0 and E1 need their reuse probability
learned.

### Decisions in a follower set (`gspc_policy`)

| event | new RRPV | new state |
|-------|----------|-----------|
| Z fill | 3 if `8*HIT(Z) < FILL(Z)`, else 2 | E2P |
| texture fill | 3 if `8*HIT(TEX,E0) < FILL(TEX,E0)`, else 0 | E0 |
| texture hit on an E0 block | 3 if `8*HIT(TEX,E1) < FILL(TEX,E1)`, else 0 | E1 |
| texture hit on an E1 block | 0 | E2P |
| texture hit on an RT block (render-to-texture consumption) | 0 | E0 |
| render-target write fill | 3 if `PROD > 16*CONS`; 2 if `PROD > 8*CONS`; else 0 | RT |
| render-target write hit | 0 | RT |
| any other fill | 2 (as SRRIP) | E2P |
| any other hit | 0 (as SRRIP) | unchanged |

`8*HIT < FILL` is the test "reuse probability below 1/(t+1)" with threshold t = 8, where the reuse
probability is HIT/(HIT+FILL). Because t and the factors 8 and 16 are powers of two, every test is
a shift and a compare. No multiplier is needed.

In a **sample set** every fill gets RRPV 2 and every hit RRPV 0, whatever the stream. The state bits
change exactly as in the table, so that epochs can be observed there.

## Learning (`gspc_rprob_learner`)

Only accesses to sample sets change the counters:

| counter | incremented by (sample sets only) |
|---------|-----------------------------------|
| FILL(Z), HIT(Z) | Z fill, Z hit |
| FILL(TEX,E0), HIT(TEX,E0) | texture fill (block enters E0); texture hit on an E0 block |
| FILL(TEX,E1), HIT(TEX,E1) | texture hit on an E0 block (block enters E1); texture hit on an E1 block |
| PROD | render-target write to a block not already in state RT (fill or hit) |
| CONS | texture hit on a block in state RT |

So FILL(TEX,Ek) counts the blocks that entered epoch Ek, and HIT(TEX,Ek) counts those that went on
to the next epoch. The counters are `CNT_W` bits wide (16 by default). When one counter of a pair
would overflow, both counters of that pair are halved in the same cycle. This keeps their ratio and
lets old behaviour fade. After reset all counters are zero, so every "low reuse" test is false and
render targets are inserted at RRPV 0.

By default 32 of the 8192 sets sample: the first set of every group of 256.

## Victim selection (`rrip_victim`)

An invalid way is filled first, and the set is then not aged. Otherwise SRRIP would add one to every
RRPV until some way reaches 3. The unit does this in one step by adding `3 - max(RRPV)` to every way,
which gives the same result. It then evicts the lowest-numbered way at 3. The aged RRPVs are written
back together with the new block.

## Uncached displayable colour

With the `ucd_en` input high, a write flagged `req_disp` (the frame that will be displayed) that
misses in the LLC goes straight to DRAM and allocates nothing. Such data is never read back by the
GPU, so it only pollutes the cache. A displayable write that hits updates the resident copy. With
`ucd_en` low, such writes are treated like any other render-target write. This combination is the
best-performing variant of the policy (GSPC+UCD); plain GSPC is the default behaviour.

## The cache and its controller (`gspc_llc`)

```
 render caches (7 ports)        gspc_llc
 Z STC HIZ RT VTXIDX TEX VTX ─► llc_stream_arb ─► controller FSM ─► DRAM port
                                                   │  ├ tag/state array  llc_sram  8192 x (16 x 23 b)
                                                   │  ├ data array       llc_sram  131072 x 512 b
                                                   │  ├ rrip_victim
                                                   │  └ gspc_policy ◄── gspc_rprob_learner
```

- **Organisation:** `NUM_SETS` x `NUM_WAYS` x `BLOCK_BYTES` = 8192 x 16 x 64 B = 8 MB. The byte address
  is `ADDR_W` = 36 bits: 6 offset bits, 13 set bits and a 17-bit tag. One tag-array row holds all 16
  ways of a set, so one read compares them all.
- **Inclusion:** the LLC is neither inclusive nor exclusive of the render caches. An eviction sends
  nothing back up.
- **Ports:** each render cache has a port with `req_valid/req_ready`, a byte address, a write flag, a
  displayable flag and a 512-bit write block. The port's index is its stream (`llc_pkg::stream_e`).
  A round-robin arbiter chooses among the ports. The response is a one-cycle `rsp_valid` on the
  requesting port, with `rsp_rdata` and `rsp_hit`. Writes are acknowledged the same way.
- **Writes** are whole 64-byte blocks, as render caches write back. A write miss allocates without
  fetching from DRAM. The cache is write-back, with a dirty bit per block.
- **DRAM port:** `mem_req_*` is a valid/ready request carrying a block address. A read is answered
  later by one `mem_rsp_valid` pulse.
- **Reset:** after `rst_n` is released, the controller clears the tag array one set per cycle
  (8192 cycles). It then raises `init_done` and starts accepting requests.

The controller handles one request at a time:

| step | states |
|------|--------|
| accept, read the set's tag row | `S_IDLE` |
| compare; on a hit update RRPV/state/dirty and access the data | `S_LOOK` → `S_DRD` (read) |
| on a miss, choose a victim; read a dirty victim and write it to DRAM | `S_LOOK` → `S_VRD` → `S_WB` |
| read miss: fetch the block from DRAM | `S_MRD` → `S_MWAIT` |
| write the new block, its tag entry and the aged RRPVs; apply the fill policy | `S_FILL` |
| displayable write miss with UCD on: write it to DRAM only | `S_BYP` |
| respond | `S_RSP` |

A read hit responds 3 cycles after the request is accepted, and a write hit 2. A miss adds the DRAM
time, plus the write-back of a dirty victim. Assertions check that a DRAM request is held until it is
taken, and that at most one response is given per cycle.

**Storage:** the policy's only per-block cost over two-bit RRIP is the two state bits, which is
2/512 = 0.39 % of the data-array bits. On top of that come eight 16-bit counters.

## What comes from the policy description and what is this design's own

These follow the described design: the stream set, 8 MB / 16 ways, non-inclusive operation, two-bit
RRPV with eviction at 3, all the insertion and promotion rules above, t = 8, the four block states,
SRRIP in the sample sets, the PROD/CONS levels, and UCD as an option.

These are this design's own choices, because the description does not give them:

- the 64-byte block and the 36-bit address;
- 32 sample sets and where they sit;
- the 16-bit counters and the halving rule;
- the state encoding;
- the exact counting rules for PROD, CONS and the epoch counters;
- a render-target block consumed by the sampler going to E0 at RRPV 0;
- render-target *read* fills not counting as production;
- the E0→E1 hit taking the E1 rule rather than "all hits to 0";
- the blocking one-request controller, its latencies and all handshakes;
- whole-block write-allocate;
- the reset sweep;
- the round-robin arbiter;
- the lowest-way tie-break;
- UCD as a run-time input.

Not included: the render caches themselves, the GPU pipeline and the DRAM, whose organisation is
outside the cache. The policies the design was measured against (NRU, DRRIP, SHiP-mem, GS-DRRIP) are
not included either. There is no pipelining or overlap of misses. The 16 MB configuration that was
also evaluated needs `NUM_SETS = 16384`.

## Files

| file | content |
|------|---------|
| `rtl/llc_pkg.sv` | stream and state enums, RRPV constants, learner interface structs |
| `rtl/gspc_llc.sv` | top: controller, arrays, wiring |
| `rtl/llc_stream_arb.sv` | round-robin arbiter of the render-cache ports |
| `rtl/gspc_policy.sv` | RRPV/state decision and sample-set detection |
| `rtl/gspc_rprob_learner.sv` | reuse-probability counters and comparisons |
| `rtl/rrip_victim.sv` | victim choice and ageing |
| `rtl/llc_sram.sv` | single-port synchronous array (tag and data arrays) |
| `tb/dram_model.sv` | fixed-latency DRAM model for simulation |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_gspc_llc_full` |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/llc_pkg.sv tb/tb_gspc_llc.sv \
          --top-module tb_gspc_llc --Mdir obj_tb && obj_tb/Vtb_gspc_llc
```

- `tb_gspc_policy` checks every input combination against the rule table.
- `tb_gspc_rprob_learner` checks the thresholds at their exact boundaries, plus 20 000 random cycles
  against a reference counter model, with saturation and halving.
- `tb_rrip_victim` compares against a step-by-step SRRIP ageing loop.
- `tb_llc_sram` and `tb_llc_stream_arb` check the array and the round-robin order.
- `tb_gspc_llc` runs a 64-set, 4-way cache. Every read is checked against a reference memory. Directed
  phases train each counter and check the RRPV chosen in follower sets: Z and texture distant
  insertion, the E0→E1 promotion, all three render-target levels, consumption, UCD bypass, dirty
  write-back and SRRIP eviction order, arbitration order, counter halving, and the 3- and 2-cycle hit
  latencies. 3000 random accesses follow. It also counts how often each mechanism occurred, and fails
  if one never did.
- `tb_gspc_llc_full` runs the cache at its full default size (8 MB). It covers the reset sweep, hits
  and misses, a 17-block conflict in one sample set with write-back, render-to-texture consumption,
  Z and texture learning, render-target insertion at RRPV 0 and 3, the UCD bypass, and 3000 random
  accesses. It takes well under a second of simulation time.

All testbenches pass. The measured trace workloads (frames from DirectX games and benchmarks) are
not available here, so no miss-rate or frame-rate figure has been reproduced. Only the cache's
function and the policy's decisions are verified.
