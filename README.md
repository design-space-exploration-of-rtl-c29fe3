# MVPX: an out-of-order vector unit with a masked multi-banked cache

Multimedia kernels run on vectors that are often short: 32, 64 or 79 elements
instead of the thousands a classic vector machine is built for. With short
vectors, two costs dominate. The first is the exposed memory latency of each
vector load. The second is cache energy: a banked cache either fetches long
lines that are mostly unused, or pays for many tag lookups on short lines.
MVPX attacks both costs, and adds a way to size itself:

* **Out-of-order vector issue.** Vector instructions are renamed onto physical
  registers and wait in two reorder buffers, one for arithmetic and one for
  memory instructions. Any instruction whose operands are ready may leave,
  ahead of older ones that still wait. A load can then start while earlier
  arithmetic is still running, so its latency is hidden. Dependent
  arithmetic instructions are chained group by group.
* **MVP-cache.** A multi-banked cache in which one tag array serves several
  independent data arrays of 8-byte lines. One tag lookup covers a 64-byte
  block. A per-array *masked bit* lets only the words that are needed cross
  the crossbar to the register file.
* **PPoM, the configuration search.** After one profiling run, an analytic
  model estimates cycles and energy for other numbers of parallel pipelines
  and cache ports. It uses the enqueue and dequeue rates of the two issue
  queues, and greedily picks the most power-efficient configuration.

This repository holds synthesizable SystemVerilog for all three, in the
configuration shown below, together with self-checking testbenches.

| Quantity | Value |
|---|---|
| Vector lanes (parallel pipelines per functional unit) | 8 |
| Architectural / physical vector registers | 16 / 96 |
| Elements per register | 128 × 64 bit |
| Arithmetic and memory instruction buffers (VAIB, VMIB) | 128 entries each |
| Functional-unit latency: ALU / multiplier / divider | 10 / 15 / 20 cycles |
| MVP-cache capacity | 2 MB |
| MVP-cache organisation | 4 sub-caches × 8 data arrays of 8-byte lines |
| Cache ports | 8 (64 bytes per cycle) |
| Cache access latency | 20 cycles |
| Main memory (testbench model) | 100-cycle latency, 32 bytes per cycle |

## Instruction flow

```
 decoded vector instr ──► vrename ──┬─► VAIB ──► VAIQ ──► ALU / MUL / DIV ──┐
  (in_valid/in_inst)   (RAT, free   │  (vinst_buffer)  (viq)    (vfu ×3)      ├─► vrf ◄─┐
                        list, commit)└─► VMIB ──► VMIQ ──► vlsu (AGU) ──► mvp_cache ──────┘
                               ▲                                   │
                               └──────── completions ◄─────────────┘
```

1. **Rename** (`vrename`).
   * Each instruction maps its sources through the register alias table.
   * It receives a fresh physical destination, the lowest free one.
   * It gets a slot in an in-order commit buffer, which remembers the mapping
     the destination had before.
   * Dispatch stalls when no physical register is free or the commit buffer
     is full (`ev_stall_dispatch`).
2. **Reorder buffers** (`vinst_buffer`, VAIB and VMIB).
   * Every cycle each buffer is scanned from its oldest entry.
   * The first entry whose source registers are ready moves to its issue
     queue, even if older entries are still waiting.
   * The memory buffer adds one rule: an access may not pass an older waiting
     access whose address range may overlap, when either of the two is a
     store. The older ranges are kept as one conservative hull for stores and
     one for loads.
   * `ev_ooo_arith` and `ev_ooo_mem` pulse when an instruction leaves ahead of
     an older one.
3. **Issue queues** (`viq`). These are small FIFOs. Their enqueue and dequeue
   events are the raw material of the configuration search.
4. **Execution.**
   * Each functional unit (`vfu`) takes one group of 8 elements per cycle
     from the register file, one element per lane.
   * It writes the group back LAT cycles later.
   * It reports completion after the last group.
   * **Chaining.** An arithmetic instruction need not wait for its producer
     to finish. A destination register becomes *chain-ready* as soon as the
     functional unit producing it takes its instruction from VAIQ, and VAIB
     treats chain-ready sources as ready. The top counts the groups written
     to each physical register. A chained consumer reads group g only after
     the producer has written it; until then its unit holds its place and
     sends a bubble (`rd_ok` low). `ev_chain` pulses for each chained start.
     Loads and stores still wait for complete registers.
5. **Commit.**
   * Completions set the destination's ready bit.
   * The oldest finished instruction commits, and only then is its old
     physical register returned to the free list.
   * No precise exceptions or squashes are modelled.

## Memory path: the MVP-cache

### Address split and request entries

A vector memory instruction reaches `vlsu`. There the address generation unit
forms the addresses of 8 elements per cycle:
`base + element × stride × 8`, with the stride counted in elements.
`mvp_req_gen` splits each address as follows:

| Bits | Field |
|---|---|
| [2:0] | byte in the 8-byte line |
| [5:3] | data array |
| [7:6] | sub-cache |
| [20:8] | set (8192 sets) |
| [31:21] | tag |

Accesses that hit the same block are merged into one *request entry*, as long
as each uses a different data array. An entry holds:

* **Address Info**: the block address, used for the tag check.
* **Masked Bits**: one bit per data array, set when that array's word is
  wanted.
* **Request Info**: for each data array, the cache port that wants the word.
* The store data and the element index of each word, returned with the data.

Merging is first-fit in port order. Two accesses to the same data array go
into separate entries, so repeated addresses in one group are served in port
order. Each entry is appended to the request queue of its sub-cache
(`mvp_req_queue`).

### Tag lookup and tag-array conflicts

Each sub-cache (`mvp_subcache`) has one tag array for its 8 data arrays, and
looks up one entry per cycle. An entry for another set must wait in the queue
even if it would hit. This is the price of sharing the tag array, and it is
counted as `ev_conflict`.

* **Hit.** The masked data arrays request their ports.
* **Miss.** The block is handled as a unit:
  1. A dirty victim is written back as one 64-byte block.
  2. The new block is read.
  3. The entry is looked up again.

  The cache is direct mapped, write-allocate and write-back.

### Crossbar allocation

`mvp_xbar_alloc` builds the request matrix R over all 32 data arrays × 8 ports:
`r[i][j] = mask[i] && rinfo[i] == j`. A data array therefore asks for at most
one port. A round-robin arbiter per port then makes a legal grant matrix G,
and `mvp_crossbar` moves the granted words. Data arrays that were not granted
keep their masked bit and try again next cycle. An entry is done when its mask
is empty.

### Fixed access latency

The words leaving the crossbar pass a delay line. An uncontended hit therefore
returns exactly `ACCESS_LAT` = 20 cycles after its group was accepted. The
testbenches check this. Load words return with their element index and are
written straight into the destination register, one element write port per
cache port. Store acknowledgements are counted the same way. The instruction
completes when every element has come back.

### Ownership with the scalar L1 (early eviction)

Every block has one state bit (`mvp_coh_fsm`):

* **STATE0**: only the MVP-cache holds the latest data.
* **STATE1**: the scalar core's L1 data cache also holds a copy.

A scalar load or store (`l1_valid`, `l1_store`, `l1_addr`) receives the whole
64-byte block on `l1_line` and moves the block to STATE1. A later vector load
or store to a STATE1 block first asks the L1 to return and invalidate its copy
(`ev_req`, `ev_blk`, `ev_ack`, `ev_line`). The block is then updated and goes
back to STATE0. This is the early eviction. The same hand-back is used when a
STATE1 block is chosen as a miss victim.

## The configuration search (PPoM)

`ppom_engine` starts from the measurements of one run. `mvpx_top` collects them
with counters:

| Symbol | Meaning |
|---|---|
| EA, DA | enqueue and dequeue rates of the arithmetic queue, per active cycle |
| EM, DM | the same for the memory queue |
| HR | cache hit rate |
| S | share of stores among memory instructions |
| K, AL, ML | dependency ratios, given as inputs |

The search starts at 4 pipes and 4 ports and repeats these steps:

1. **Find the bottleneck.** If `EM/DM > EA/DA`, the memory side is the
   bottleneck: its queue fills faster than it drains. Otherwise the arithmetic
   side is.
2. **Double the scarce resource and revise the rates.**
   * More pipes: `DA' = 2·DA`, `EA' = EA·(1+K)`, `EM' = EM·(1+S)`.
   * More ports: `DM' = DM·(1+HR)`, `EA' = EA·(1+AL·HR)`, `EM' = EM·(1+ML·HR)`.
3. **Estimate cycles.** Cycles = instructions of the bottleneck queue ÷ its
   dequeue rate.
4. **Estimate energy.** Energy = cycles × peak power. The peak power comes from
   a 5×5 table for 4…64 pipes and ports:

   | pipes \ ports | 4 | 8 | 16 | 32 | 64 |
   |---|---|---|---|---|---|
   | 4 | 5.18 | 5.63 | 7.06 | 12.09 | 31.41 |
   | 8 | 6.91 | 7.36 | 8.78 | 13.82 | 33.14 |
   | 16 | 10.36 | 10.81 | 12.23 | 17.27 | 36.59 |
   | 32 | 17.26 | 17.71 | 19.14 | 24.17 | 43.49 |
   | 64 | 32.78 | 33.23 | 34.66 | 39.69 | 59.01 |

   The table is in W. It is stored in mW in `mvp_pkg::TDP_MW`.
5. **Keep or stop.** Keep the new configuration while the energy falls. Stop
   when it does not, or when the resource is already at 64.

Number formats:

* Rates are unsigned Q16.16.
* Ratios are Q0.16.
* Each estimate takes two clock cycles, so a search lasts `2·n_est + 3`
  cycles.

The result appears on `ppom_pipe_idx` and `ppom_port_idx`, where pipes or
ports = `4 << idx`.

**Important limitation.** The search only reports a configuration. The built
datapath stays at 8 lanes and 8 ports: nothing is reconfigured.

## Top-level interface (`mvpx_top`)

| Port group | Direction | Use |
|---|---|---|
| `in_valid`, `in_inst` (`vinst_t`), `in_ready` | in/out | Decoded vector instructions from the scalar core. `vinst_t` = op, vd, vs1, vs2, base, stride, vl. |
| `l1_*`, `ev_*` | both | Scalar L1 data cache side: block requests and early evictions. |
| `m_req_valid`, `m_req` (`mreq_t`), `m_req_ready`, `m_resp_*` | both | Main memory: one 64-byte block per request. Reads return in order, tagged with the sub-cache id. |
| `ppom_start`, `ppom_k`, `ppom_al`, `ppom_ml` → `ppom_done`, `ppom_pipe_idx`, `ppom_port_idx`, `ppom_n_est` | both | Configuration search. |
| `idle`, `ev_*` | out | Status and one-cycle event pulses. |

The instruction set is small:

* `VADD`, `VSUB`, `VAND`, `VOR`, `VXOR`, `VMUL` and `VDIV` on 64-bit
  integers.
* `VLD` and `VST` with base, stride and vector length 1…128.

A store names its data register in `vs1`. Longer vectors are strip-mined by
the program into pieces of at most 128 elements.

Parameters of `mvpx_top`:

| Parameter | Default | Meaning |
|---|---|---|
| `CACHE_BYTES` | 2 MB | cache capacity |
| `ACCESS_LAT` | 20 | cache access latency in cycles |
| `QDEPTH` | 128 | per-sub-cache request queue; four queues give 512 entries |
| `IBUF_DEPTH` | 128 | depth of VAIB and VMIB |
| `IQ_DEPTH` | 8 | depth of each issue queue |
| `ALU_LAT`, `MUL_LAT`, `DIV_LAT` | 10, 15, 20 | functional-unit latencies |

Lanes, ports, sub-caches, data arrays and register counts are constants in
`mvp_pkg`, because the request structs are shaped by them.

## Where this RTL departs from the original design

* **Chaining is this design's own scheme.** The original names a chaining
  mechanism but does not describe it. Here it works group by group on renamed
  registers, as described above, and only between functional units.
* **Integer arithmetic only.** The original design works on double-precision
  data; floating point is not built.
* **No reconfiguration after PPoM.** The configuration search reports a result
  but does not change the datapath width.
* **The AGU sits in the load/store unit.** In the original flow, address
  generation is scheduled through the arithmetic issue queue.
* **Only one memory instruction is in the load/store unit at a time.**
* **Rename and commit serve the vector unit alone.** The original shares them
  with the scalar core, which is outside this design. So is its L1 cache.
  Both appear only as ports.
* **Choices made here, where the original gives no detail.** These are: cache
  associativity and write policy, the allocator's arbitration policy, the
  memory-order rule in VMIB, queue depths, number formats and port counts.
* **Two descriptions of the out-of-order rule.** One says only the oldest
  buffered instruction may issue; the other says any ready instruction may.
  The RTL follows the second.
* **Configuration tables.** The evaluated configuration here is 8 ports and a
  20-cycle cache. Another table lists 16 ports and 30 cycles. The PPoM
  baseline of 4 lanes and 4 ports is used only as the search's start point.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=<n> failures=<n>`, and each has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_mvp_req_gen` | Field split and merging against a first-fit reference, for all access patterns |
| `tb_mvp_req_queue` | Multi-push in port order, sub-cache filtering, full condition |
| `tb_mvp_xbar_alloc` | R follows the mask rule; G legal (≤1 grant per port and per array, no grant without request, a grant for every port that is wanted); fairness |
| `tb_mvp_crossbar` | Grant-driven routing |
| `tb_mvp_coh_fsm` | All state/request pairs |
| `tb_mvp_subcache` | Random traffic with partial grants against a memory reference; hits, misses, write-backs |
| `tb_mvp_cache` | 20-cycle hit latency; random groups against a reference; merging, conflicts, write-backs, L1 access and early eviction |
| `tb_ppom_engine` | A hand-worked case; the cycle count `2·n_est+3`; 300 random cases against a real-number model |
| `tb_vrename` | RAT, free list, ready bits and in-order commit against a model; free-list stalls |
| `tb_vinst_buffer` | Oldest-ready pick, out-of-order flag, memory-order safety, full buffer |
| `tb_viq`, `tb_vrf` | FIFO behaviour and events; group and element ports |
| `tb_vfu` | All operations, tail elements untouched, completion after `ceil(vl/8)+LAT` cycles; random `rd_ok` stalls (chaining) give the same results |
| `tb_vlsu` | Element addresses, store data, out-of-order load returns, completion timing |
| `tb_mvpx_top` | The whole unit at its default sizes (2 MB cache); see below |
| `tb_mvpx_kernels` | The whole unit at its default sizes running the vector lengths of the nine evaluated benchmarks (4096, 173, 1080, 79, 64, 32, 33, 1000, 1000) as a strip-mined kernel Z = X·Y + X; results read back and cycle counts printed |

**The end-to-end test (`tb_mvpx_top`).** It runs a random program of about 540
instructions on an architectural reference model and on the RTL:

* The program mixes strided loads and stores (negative and zero strides
  included), all arithmetic operations, and random lengths.
* Its addresses lie in windows 2 MB apart, so they collide in the cache.
* Between segments, scalar loads and stores go through the L1 port.
* At the end every register is stored and read back through the L1 port. A
  sample of the blocks the program wrote is read back too. Both are compared
  with the reference.
* The configuration search is then run on the collected profile.

The test counts every mechanism and fails if one never occurs: out-of-order
picks in both buffers, dispatch stalls, commits, chained starts, hits, misses,
tag conflicts, merges, write-backs, early evictions and a completed search. It runs in
seconds.

To run any testbench with Verilator from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/mvp_pkg.sv tb/tb_mvpx_top.sv \
          --top-module tb_mvpx_top -Mdir obj -o sim && obj/sim
```

`tb/mem_model.sv` is a behavioural main memory, and is not part of the design.
Blocks that were never written read as a fixed function of their address.

## Files

| File | Contents |
|---|---|
| `rtl/mvp_pkg.sv` | Sizes, instruction and request structs, peak-power table |
| `rtl/mvpx_top.sv` | Top level, profiling counters |
| `rtl/vrename.sv`, `rtl/vinst_buffer.sv`, `rtl/viq.sv` | Out-of-order issue |
| `rtl/vfu.sv`, `rtl/vrf.sv`, `rtl/vlsu.sv` | Execution, register file, load/store unit with AGU |
| `rtl/mvp_cache.sv` | MVP-cache top |
| `rtl/mvp_req_gen.sv`, `rtl/mvp_req_queue.sv` | Request generation and queues |
| `rtl/mvp_subcache.sv`, `rtl/mvp_coh_fsm.sv` | Sub-cache controller, L1 ownership |
| `rtl/mvp_xbar_alloc.sv`, `rtl/mvp_crossbar.sv` | Crossbar allocator and crossbar |
| `rtl/ppom_engine.sv` | Configuration search |
