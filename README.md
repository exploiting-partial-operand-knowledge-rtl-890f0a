# Bit-slice out-of-order execution core with partial operands

A deeply pipelined processor normally treats a register value as a single
unit: nothing downstream may use any bit of a result until all 32 bits exist.
If the adder is split over two pipeline stages, a chain of dependent adds
slows to one add every two cycles, even though the low half of each result was
ready after the first stage.

This design cuts the execution datapath into **bit slices**: two 16-bit slices
by default, or four 8-bit slices. Each slice of each instruction is scheduled
on its own, and each slice of a result is written to the register file as soon
as it is computed. A dependent instruction can therefore start on the low half
of an operand while the high half is still being produced. With one cycle per
slice, a chain of dependent adds again runs at one add per cycle.

The same partial results are then used where a conventional machine would wait
for the full value:

* **Branches.** A `bne`/`beq` whose low halves already differ is decided, and a
  misprediction flagged, before the high half exists.
* **Load/store ordering.** A load whose address differs from every older store
  in the low bits already known can go ahead without waiting for the full
  address compare.
* **The data cache.** The low 16 address bits give the cache index and two tag
  bits. A *partial tag match* picks a way and returns data one cycle before the
  address is complete. If the guess is wrong, the load is replayed.

The RTL is the execution back end of an out-of-order processor: slice issue
queues, slice ALUs, a sliced physical register file, a branch unit, a
load/store queue and a 64KB 4-way L1 data cache. It takes renamed instructions
at a dispatch port. Fetch, decode, renaming, branch prediction and commit are
left to the surrounding processor; the testbench stands in for them.

## How an instruction moves through the slices

At dispatch a renamed instruction is written into every slice issue queue
(`slice_issue_queue`, one per slice). The entries in the different queues are
copies of the same instruction, each responsible for one slice of it.

Slice *k* of an instruction may issue when:

1. slice *k* of each source register is ready, and
2. its **inter-slice dependency** is met, if the operation has one:

| operation | slice *k* also needs | why |
|---|---|---|
| add, sub (and address generation) | slice *k-1* of the same instruction | carry in |
| sll | slice *k-1* | bits shifted in from below |
| srl, sra | slice *k+1* | bits shifted in from above (and the sign) |
| and, or, xor, nor, lui, branch compare | nothing | slices are independent |

Condition 2 is checked through the destination register's ready bits. Slice
*k-1* of the same instruction has run exactly when slice *k-1* of its
destination is ready. The queue therefore needs no extra state for it.

For logic operations nothing orders the slices. If the slice-0 queue is busy,
or slice 1 of the operands arrives first, the high slice simply runs first.

The issued slice reads its operand slices from the sliced register file
(`sliced_regfile`) and runs in its slice ALU (`slice_alu`). At the clock edge
it writes its result slice and sets that slice's ready bit. Together with the
result it stores a **link record**, which holds:

* the carry out, and
* the source bits this slice has seen.

The next slice of the same instruction reads the link from the register file
entry of the destination register, from the neighbouring slice. Through this
record a carry crosses slices, and a shift by any amount gets the bits that
cross the slice boundary. Nothing needs a direct wire between slice queues
that may issue in different cycles.

A slice written in cycle *t* is visible to a consumer issuing in cycle *t+1*.
For a chain of adds this gives the staircase below. Each add takes two cycles
from first to last slice, but a new add finishes every cycle:

```
cycle        1     2     3     4
add A      s0    s1
add B=A+x        s0    s1
add C=B+y              s0    s1
```

Register 0 is constant zero and always ready. At dispatch the destination's
ready bits are cleared. A load's destination is written all at once by the
load/store queue, which sets all of its ready bits together.

## Early branch resolution

A branch is an instruction slice like any other: its compare slice computes,
per slice, whether `rs == rt` on that slice, whether `rs` is zero there, and
the sign bit of the top slice. `early_branch_unit` keeps these per-slice
facts for every branch in flight and decides the branch as soon as they
settle it:

* **beq/bne:** decided by the first slice that differs, or by all slices
  equal. A `bne` predicted not-taken whose low half differs is flagged as
  mispredicted after one slice. This is the common case of a pointer or
  counter compared with zero.
* **bltz/bgez:** decided by the sign, which is known once the top slice has
  run.
* **blez/bgtz:** decided by a negative sign, or by a non-zero slice once the
  sign is known to be positive, or by all slices being zero.

Each branch reports once, on `br_valid`. The report carries:

* `br_taken`: the actual direction
* `br_mispredict`: whether the dispatch-time prediction was wrong
* `br_early`: set when the decision came before all slices had run

The tag stays busy (`br_busy`) until all slices have been seen, so the caller
knows when the tag can be reused.

Only `beq`/`bne` are usually early when the slices run in order. The sign
tests can only be early when the top slice runs ahead of the lower ones. That
happens here, because compare slices have no inter-slice dependency. The
design does not act on a misprediction (no flush or redirect): it reports it,
and recovery belongs to the front end.

## Loads and stores: partial addresses

This is the least obvious part of the design. It spans two modules,
`lsq_disambig` and `ptag_cache`.

### Dispatch

A load or store is dispatched as a single renamed instruction. Its address
generation is an ordinary add:

* `src1` is the base register and the offset is an immediate.
* It writes the address into a destination register of its own.
* `mem` says load or store, and `mem_data` names the register the load writes
  or the store reads.

The add goes into the slice queues like any other instruction. The entry in
the load/store queue (32 entries, program order) remembers the address
register's number.

### Capturing partial addresses

The queue watches the slice write ports. When slice *k* of an address register
is written, every queue entry waiting on it copies that slice and marks it
known. Each entry therefore holds a partially known address, which fills in
slice by slice.

### Disambiguation

A load must not read memory ahead of an older store to the same word. An older
store is **ruled out** as soon as some address slice known for both differs;
bits 1:0 are ignored because all accesses are words.

* If every older store is ruled out, the load may proceed even though neither
  address is complete.
* If some older store is not ruled out, the load waits until its own address
  and those stores' addresses are complete. Then either:
  * the youngest older store with the same address **forwards** its data
    (once that data is ready), or
  * no store matches, and the load goes to the cache.

Forwarding is never done on a partial match.

### Early cache access with a partial tag

The cache is 64KB, 4-way, with 64-byte lines, which gives 256 sets:

| address bits | use |
|---|---|
| 5:0 | byte in the line |
| 13:6 | set index |
| 15:14 | two low tag bits: the **partial tag** |
| 31:14 | full tag |

A load goes to the cache early when all three of these hold:

* its low 16 address bits are known;
* the rest of the address is being written in this very cycle;
* all older stores are already ruled out.

The cache compares only the partial tag against the four ways of the set:

* **No way matches:** the load certainly misses.
* **Some ways match:** the cache returns the most recently used way among
  them, or the lowest-numbered matching way if the MRU way does not match.

The returned word is written to the load's destination at once, so dependent
instructions can issue in the next cycle. That is one cycle earlier than
waiting for the full address.

In the next cycle the full address is known and the cache **verifies** the
guess against the full tags:

* **Right way:** nothing more happens, and that way becomes the MRU way of
  the set.
* **Wrong way, or the line is not present at all:** the queue raises `replay`
  for one cycle, which does three things:
  * the load's destination loses its ready bits;
  * every slice issued in that cycle is cancelled: no register, branch or
    address-capture write, and the queue entries stay and issue again later;
  * the load tries again, by full tag if the line is there, or through a line
    fetch if it is not.

Because the early access only happens in the cycle the last address slice is
written, the only instructions that can have consumed the wrong data are those
issuing in the verify cycle. Cancelling that one cycle is therefore exact.

A load whose full address is known before it accesses the cache uses the full
tag and is never replayed.

### Misses and stores

There is one outstanding line fetch at a time, on `mem_req_*`, and the line
returns on `fill_*`. The fill goes into an invalid way, or otherwise into the
way after the MRU one, and becomes the MRU way.

Stores leave from the head of the queue once their address and data are
complete. They update the cache line if it is present and always write
through to memory (`mem_wr_*`). Stores do not allocate lines.

## The top: `bitslice_core`

`bitslice_core` wires these parts together.

Dispatch port: one renamed instruction (`uop_t`, see `pok_pkg`) per cycle when
`disp_ready` is high. The caller must:

* choose physical registers (1 to `NPREG-1`; register 0 is zero);
* choose branch tags not shown in `br_busy`;
* reuse a physical register only when no instruction in flight still reads or
  writes it. The core has no commit stage. The testbench reuses registers only
  when `idle` is high.

Shift amounts come from `imm[4:0]`, and `lui` takes `imm[15:0]`. Branches
compare `src1` with `src2`. For the kinds that compare against zero, `src2`
is register 0.

Observation:

* `dbg_preg` / `dbg_data` / `dbg_ready` read any register and its slice
  ready bits.
* `ev` pulses once per occurrence of each mechanism: partial-operand issue,
  inter-slice link use, out-of-order slice, early/late misprediction, early
  cache access, early disambiguation past stores, waiting for a full compare,
  store forwarding, partial-tag replay and cache miss.

### Parameters

| parameter | default | meaning |
|---|---|---|
| `NSLICES` | 2 | slices per 32-bit word (4 gives 8-bit slices) |
| `IQ_DEPTH` | 64 | entries per slice issue queue |
| `LSQ_DEPTH` | 32 | load/store queue entries |
| `NPREG` | 128 | physical registers |
| `NBR` | 8 | branches in flight |
| `DC_BYTES`, `DC_WAYS`, `LINE_BYTES` | 65536, 4, 64 | L1 data cache |
| `EARLY_BITS` | 16 | address bits needed for the early cache access |

The queue depths, cache geometry and 16-bit early access match the machine
this organisation was evaluated on. That machine had a 64-entry instruction
window, a 32-entry load/store queue and a 64KB 4-way L1. The register and
branch counts are this design's own choice.

## Where this departs from the evaluated machine

* **Width.** The evaluated core was 4-wide. This one dispatches one
  instruction per cycle and issues one slice per slice queue per cycle. That
  changes throughput, not behaviour.
* **Replay.** The evaluated machine recovered selectively, replaying only
  dependents of a mis-scheduled load. Here, a partial-tag replay cancels
  everything issued in the single verify cycle. Ordinary misses need no
  replay, because a load writes its destination only when the data is known
  to be right.
* **Forwarding.** Store-to-load forwarding waits for a full address match. A
  partial match was noted to be almost always a true match, so forwarding
  could be done speculatively. That is not done here.
* **Instruction set.** It covers add, sub, the logic ops, lui, shifts, six
  compare-and-branch kinds, and word loads and stores. Multiply, divide and
  floating point would need full-width units that gather all slices first.
  They are not included, and neither are sub-word loads and stores or
  set-less-than.
* **Memory.** There is no L2 or TLB. The cache is virtually indexed and
  tagged, stores write through without allocating, and there is one
  outstanding miss.
* **Storage.** The cache arrays and the register file are plain register
  arrays. A real implementation would use SRAM macros.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_slice_alu` | slices chained by 2 and by 4 against a 32-bit reference, including carries, borrows and shifts across the boundary |
| `tb_sliced_regfile` | slice writes, ready bits, clears, links and full-width ports against a model |
| `tb_slice_issue_queue` | wake-up on source slices and inter-slice dependences, cancel, capacity |
| `tb_early_branch_unit` | all six branch kinds with slices delivered in random order; direction, mispredict and "early" flags |
| `tb_ptag_cache` | partial-tag candidates, MRU choice, verification, fills and stores; a directed case of two lines sharing index and partial tag |
| `tb_lsq_disambig` | the queue with the real cache, a register model and a memory with a 6-cycle fill; loads checked against program-order memory |
| `tb_bitslice_core` | the whole core at default parameters |

`tb_bitslice_core` generates random programs and renames them. It runs the
programs through the core and compares every register written, every memory
word and every branch outcome with an in-order reference model. It also:

* checks that 16 dependent adds finish within 20 cycles;
* runs a short sequence of a shift, a `lui`, an add and a load;
* fails if any of the mechanisms listed under `ev` never happened.

The same testbench with `NSLICES` set to 4 also passes.

To simulate, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_bitslice_core \
    -y rtl -y tb +libext+.sv rtl/pok_pkg.sv tb/tb_bitslice_core.sv
./obj_dir/Vtb_bitslice_core
```

Replace the top module and file for the other testbenches.

## Files

* `rtl/pok_pkg.sv`: shared types: operations, branch kinds, the renamed
  instruction, link record and event bundle.
* `rtl/slice_alu.sv`, `rtl/sliced_regfile.sv`, `rtl/slice_issue_queue.sv`:
  the slice datapath and scheduling.
* `rtl/early_branch_unit.sv`: branch resolution from partial compares.
* `rtl/lsq_disambig.sv`, `rtl/ptag_cache.sv`: the load/store queue and the
  partial-tag L1 data cache.
* `rtl/bitslice_core.sv`: the top.
* `tb/`: one testbench per module.
