# HSU: a GPU ray-tracing unit that also does hierarchical search

A GPU ray-tracing (RT) unit is a fixed-function engine inside each SM. For
every active thread of a warp it fetches one node of a search tree from
memory, runs a handful of floating-point tests on it, and returns a small
result to the register file. Nearest-neighbour search (graphs, k-d trees,
BVHs over point clouds) and B-tree lookup have the same shape: fetch a node,
compute, decide where to go next. Only the arithmetic differs.

The Hierarchical Search Unit (HSU) keeps the RT unit's structure: warp
buffer, memory queues, one pipelined single-lane datapath and result buffer.
It adds a few adders to the datapath so that the same functional units can
also compute:

| instruction     | node fetched              | per-thread result (4 words)                     |
|-----------------|---------------------------|-------------------------------------------------|
| `RAY_INTERSECT` | box node (4 children)     | child pointers of hit boxes, nearest first, 0 = miss |
| `RAY_INTERSECT` | triangle node             | `{hit, triangle id, t_num, t_denom}`           |
| `POINT_EUCLID`  | 16 candidate coordinates  | `sum (q_i - c_i)^2`                            |
| `POINT_ANGULAR` | 8 candidate coordinates   | `q.c` and `c.c` (software finishes the cosine) |
| `KEY_COMPARE`   | up to 36 B-tree separators| bit vector: bit j = 1 when key >= separator j  |

Points wider than 16 (Euclidean) or 8 (angular) elements take several
instructions. All but the last have the **accumulate** bit set, and the
datapath adds their partial sums into a per-lane accumulator. The last beat
returns the total. A 960-dimension Euclidean distance is 60 chained
instructions. A 200-dimension angular distance is 25.

This repository is a synthesizable SystemVerilog model of that unit at its
nominal size:
- 4 sub-cores share one unit;
- 8 warp-buffer entries;
- warps of 32 threads;
- a 9-stage datapath.

Testbenches and reference models are included.

## Block structure

```
 sub-cores ──sc_valid/sc_instr──► subcore_arbiter ──► warp_buffer ──req──► sync_fifo (memory access queue) ──mem_req──► L1 / interconnect
                                    (round robin,        ▲   │                                                              │
                                     accumulate lock)    │   │ ready entries                                                │
                                                         │   ▼                                                              │
                                     sync_fifo (response queue) ◄────────────────────────────mem_resp───────────────────────┘
                                                             │
                                                     dp_scheduler ──1 thread/cycle──► hsu_datapath (9 stages) ──► result_buffer ──wb──► register file
```

| file | role |
|---|---|
| `rtl/hsu_pkg.sv` | sizes, opcodes, instruction/tag/packet structs |
| `rtl/hsu_rt_unit.sv` | top level: wires the blocks below |
| `rtl/subcore_arbiter.sv` | round-robin arbitration between the 4 sub-cores, with the accumulate lock |
| `rtl/warp_buffer.sv` | 8 entries: masks, operands, node pointers, fetched nodes, age matrix |
| `rtl/sync_fifo.sv` | memory access queue (16 deep) and response queue (8 deep) |
| `rtl/dp_scheduler.sv` | picks a ready entry and issues its active threads one per cycle |
| `rtl/hsu_datapath.sv` | the unified 9-stage floating-point pipeline |
| `rtl/result_buffer.sv` | corner-turn buffer: collects lane results, writes back whole warps |
| `rtl/fp32_add.sv`, `rtl/fp32_mul.sv`, `rtl/fp32_cmp.sv` | single-precision functional units |

The L1 cache, the interconnect, the sub-cores and the register file are not
part of the unit. Their handshakes are the top-level ports.

## Life of a warp instruction

1. **Dispatch.** A sub-core holds `sc_valid` with an `hsu_instr_t` until
   `sc_ready`. The bundle carries:
   - the opcode and the accumulate bit;
   - the warp id and the destination register;
   - the 32-bit active mask;
   - per thread, a node address and 16 operand words.

   The arbiter grants one sub-core per cycle, round robin. It grants only
   when the warp buffer has a free entry.
2. **Gather.** The instruction takes a free warp-buffer entry. Every cycle,
   the lowest-numbered entry that still has an active thread without a
   request pushes one `{entry, lane, address}` into the memory access queue.
   The queue presents one request per cycle to the L1 port. Answers may come
   back in any order, through the response queue. Each answer carries a
   whole node: 36 words.

   Each entry keeps three masks: *active*, *requested* and *valid* (data
   arrived). The entry is **ready** when valid equals active.
3. **Issue.** The scheduler picks the oldest ready entry. It takes a
   result-buffer slot and feeds the entry's active lanes into the datapath,
   one per cycle, skipping inactive lanes. The entry is freed in the cycle
   its last lane issues. The next entry can issue in the following cycle, so
   there is no bubble between instructions.
4. **Compute.** Each thread takes exactly 9 cycles through the datapath.
   Threads of different modes follow each other without gaps. Box and
   triangle threads of the same warp may be mixed, since the mode comes from
   each thread's fetched node.
5. **Write back.** The result buffer collects the lane results in the slot.
   When every active lane has arrived, it offers the whole warp on `wb_*`:
   - the tag;
   - 4 words per lane.

   Slots complete and drain in any order.

## Ordering of accumulate chains

A chained distance is correct only if its beats reach the datapath in order
and nothing else uses that lane's accumulator in between. Three rules
guarantee this.

- **Arbiter lock.** After the arbiter grants an instruction with the
  accumulate bit set, it grants only that sub-core. The lock releases after
  the closing beat (accumulate = 0) is granted. This only works if the
  sub-core sends the whole chain back to back, which is what a
  greedy-then-oldest warp scheduler does. `hsu_rt_unit` asserts that a
  granted sub-core never changes while the lock is held.
- **Chain flag.** The warp buffer flags an entry as part of a chain when:
  - its own accumulate bit is set; or
  - the instruction granted just before it had the bit set. This covers
    the closing beat.

  An age matrix records, for every pair of entries, which one is older.
- **Scheduler rule.** A chain entry issues only when no older entry is
  still in the buffer. While a chain entry waits, no younger entry may
  issue. Without this rule, a younger non-chain entry whose data arrived
  early could overtake the chain. It could then slip between beats and
  read a partial accumulator, or an older chain could be split. Each
  point is covered by its own testbench check.

The datapath keeps one accumulator per lane: a Euclidean sum and an angular
pair (dot product, norm). A beat with accumulate = 1 adds its partial result.
The result buffer then writes back that beat's tag with `acc = 1` and zero
data, so the issuing sub-core can retire the instruction. The closing beat
adds its part, returns the total and clears the accumulator. Euclidean
partials accumulate in stage 9. Angular partials accumulate in stage 8,
which has the two adders the pair needs.

## The unified datapath

The datapath is one lane wide and processes one thread per cycle. Every stage
has a fixed set of floating-point units. The mode of each thread steers
their operands, so the provisioned count per stage is the maximum over all
modes:

| stage | units | box (4 children) | triangle (watertight) | Euclid (16) | angular (8) | key (36) |
|---|---|---|---|---|---|---|
| 1 | 24 add | `min/max - o` (24) | `A,B,C - o` (9) | `q - c` (16) | – | – |
| 2 | 24 mul | `× invdir` (24) | `Sx·pz, Sy·pz, Sz·pz` per vertex after axis permutation (9) | squares (16) | `q_i·c_i`, `c_i·c_i` (16) | – |
| 3 | 8 add, 36 cmp | per child 9 cmp: 3 near/far swaps, max of near and tmin, min of far and tmax | `px - Sx·pz`, `py - Sy·pz` (6 add) | pairwise sums (8) | pairwise sums (4+4) | key vs. 36 separators (36 cmp) |
| 4 | 6 mul, 4 cmp | `tnear <= tfar` per child (4 cmp) | edge products (6) | – | – | – |
| 5 | 4 add | – | `U, V, W` (3) | sums (4) | sums (4) | – |
| 6 | 3 mul | – | `U·Az, V·Bz, W·Cz` | – | – | – |
| 7 | 2 add | – | `det = U+V+W`, partial `T` | sums (2) | sums (2) | – |
| 8 | 2 add | – | `det`, `T` | final sum | accumulate `q.c`, `c.c` | – |
| 9 | 5 cmp, 1 add, 4-sort | sort hit children by `tnear` | `U,V,W` vs. 0, `det` vs. 0, sign of `T` vs. `det` | Euclidean accumulate | – | – |

Box test:
- It is the slab test. `tnear` is the maximum over the axes of the near
  plane distances and `tmin`. `tfar` is the minimum of the far distances
  and `tmax`.
- A child hits when `tnear <= tfar`.
- Stage 9 sorts the four `(tnear, pointer)` pairs with a 5-exchange
  sorting network. Misses get key +inf and return pointer 0.
- On equal keys the lower child index comes first.

Triangle test:
- It is the watertight algorithm on pre-sheared coordinates:
  - the ray's axis permutation `kx, ky, kz` and shear constants
    `Sx, Sy, Sz` are computed once per ray by software;
  - they are passed as operands.
- The tie-breaking fallback to double precision is left out.
- A hit means:
  - the edge functions `U, V, W` do not have mixed signs;
  - `det != 0`;
  - `T` does not have the opposite sign of `det` (the hit is not
    behind the origin).
- The unit returns `T` and `det`, not the division `t = T/det`.
- Checking `t` against the ray's `[tmin, tmax]` is left to software, which
  has both values.

Key compare:
- It uses stage 3's comparators.
- Separators at index `j >= count` return 0.
- Keys and separators are compared as FP32 numbers.
- The 36 result bits come back in result words 0 (bits 0-31) and 1
  (bits 32-35).

### Word layouts (this design's choice)

Operand words (16 per thread, from registers):

| mode | words |
|---|---|
| ray | 0-2 origin, 3-5 inverse direction, 6 tmin, 7 tmax, 8-10 Sx Sy Sz, 11 `{kz[5:4], ky[3:2], kx[1:0]}` |
| Euclid | 0-15 query |
| angular | 0-7 query |
| key | 0 key, 1 separator count |

Node words (36 per thread, from memory):

| node | words |
|---|---|
| box | child c at 7c: min xyz, max xyz, child pointer; word 31 = 0 (type box) |
| triangle | 0-2 A, 3-5 B, 6-8 C, 9 triangle id; word 31 = 1 (type triangle) |
| Euclid / angular | 0-15 / 0-7 candidate |
| key | 0-35 separators |

A box node fills words 0-27, so word 31 is free to carry the node type. For
`POINT_*` and `KEY_COMPARE` the opcode decides the mode, and word 31 is
ignored.

## Arithmetic

All units are IEEE-754 single precision:
- round to nearest even at every unit output;
- subnormal inputs and outputs flushed to (signed) zero;
- NaN results are `0x7FC00000`;
- `+0` compares equal to `-0`, and NaN compares neither less nor equal.

Rounding at every stage costs area, but it gives bit-exact results that a
reference can reproduce one operation at a time.

The adder and multiplier are small, readable combinational units:
- the adder aligns with a sticky bit;
- the multiplier uses a full 24×24 product.

The stage registers of the datapath supply all the pipelining.

## Where this model departs from the published design

- The original design takes its floating-point units from Berkeley
  Hardfloat. Here they are written from scratch and flush subnormals to
  zero, so results on subnormal data differ from a full-IEEE unit.
- The following are this design's own choices and are not given by the
  original design:
  - warp width 32;
  - result-buffer slot count 8;
  - queue depths 16 and 8;
  - all word layouts;
  - the node-type word;
  - the oldest-first issue order.
- "Two quad sorts" in the last stage is built as one 4-input sorting
  network over the four box children.
- The triangle `t` range check is not done in hardware.
- The arbiter lock relies on each sub-core sending a whole accumulate chain
  back to back.
- The original datapath is fixed-latency, keeps separate stage registers
  for each operating mode, and rounds at the end of every stage. This model
  keeps the fixed latency and the per-stage rounding. Its stage registers,
  however, are one shared 40-word record per stage, and the mode decides
  what each word holds. The results are the same, with fewer flip-flops.
  A reservation-table pipeline with variable latency is not used.
- Every node fetch returns a full 36-word node, whatever the opcode. In the
  original design a Euclidean fetch is 64 bytes (16 words) and an angular
  one 32 bytes (8 words). The size of a fetch is left to the memory side:
  the request carries only the address, and `mem_req.entry` and `lane`
  identify the thread.

## Simulation

Every testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<n>`. The reference values come from
`tb/hsu_ref_pkg.sv`. It computes each FP operation in double precision and
rounds once to single, which is exact for one add or multiply, so the
reference follows the same operation order as the hardware but shares none
of its code.

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/hsu_pkg.sv tb/hsu_tb_pkg.sv tb/hsu_ref_pkg.sv tb/tb_hsu_rt_unit.sv \
    --top tb_hsu_rt_unit -Mdir obj
./obj/Vtb_hsu_rt_unit
```

Replace the testbench name for the others. The `fp32_*`, `sync_fifo` and
`subcore_arbiter` testbenches need only `rtl/hsu_pkg.sv` and
`tb/hsu_tb_pkg.sv` (or nothing).

| testbench | what it checks |
|---|---|
| `tb_fp32_add`, `tb_fp32_mul` | tens of thousands of random and corner-case operands (zeros, infinities, NaN, subnormals, carries, cancellation) against the double-rounded reference |
| `tb_hsu_datapath` | random threads of all five modes back to back, chained accumulations, exact 9-cycle latency |
| `tb_sync_fifo` | random push/pop against a queue model, full/empty flags |
| `tb_subcore_arbiter` | round-robin fairness, one-hot grants, the accumulate lock |
| `tb_warp_buffer` | request order, out-of-order node returns, ready = (valid == active), age matrix, chain flags |
| `tb_dp_scheduler` | 1 thread/cycle, lane skipping, oldest-first and chain rules, back-to-back issue |
| `tb_result_buffer` | out-of-order lane results, write-back back-pressure, accumulate-beat tags |
| `tb_hsu_rt_unit` | the whole unit at full size (no parameter overrides), 150 random instructions per sub-core of all opcodes including multi-beat chains, against `tb/l1_mem_model.sv`, a random-latency cache that answers out of order and stalls. Every write-back is compared lane by lane. It also counts, and requires at least once, each of these: arbitration between sub-cores, the accumulate lock, a full warp buffer, a full memory queue, out-of-order returns, lane skipping, sparse completion, mixed box/triangle warps, a chain waiting for older entries, back-to-back issue, a full result buffer and write-back stalls |
| `tb_hsu_workloads` | the whole unit at full size on real workload shapes: one warp of distances for each benchmark dimension (96, 784, 960, 200, 65, 256, 128 and 3; Euclidean or angular as the data set uses), sent as accumulate chains of up to 60 beats from all four sub-cores at once, plus B-tree node searches. The results are checked bit-exactly against the reduction order and within 1e-4 of the exact real-valued distance |

Every testbench has a watchdog that reports a failure if the run hangs.

## Sizing against search workloads

The unit holds no dataset; it holds only warps in flight. Any dimension is
supported through accumulate chains. Instructions per distance:

| data | dimension | instructions |
|---|---|---|
| SIFT | 128-D, Euclidean | 8 |
| GIST | 960-D, Euclidean | 60 |
| MNIST | 784-D, Euclidean | 49 |
| GloVe | 200-D, angular | 25 |
| Deep1B | 96-D, angular | 12 |
| Last.fm | 65-D, angular | 9 |
| NYTimes | 256-D, angular | 32 |
| 3-D point clouds | 3-D | 1 instruction with zero padding, plus box tests for BVH traversal |

A B-tree node with up to 37 children needs one `KEY_COMPARE`.

Throughput is at most one thread-test per cycle. Full 32-thread warps
therefore take 32 cycles each in the datapath.
