# Tolerating the processor-memory gap: three add-on units for an out-of-order core

A fast core loses time to memory in three ways. It waits for data it never asked for early enough. It wakes up instructions that depend on a load that will miss. And it pays for the speed of its storage cells with more soft errors. This RTL gives three add-on units, one for each problem. All three sit next to a superscalar out-of-order core and do not change the core's pipeline:

* **Partial-address Bloom filter (BF).** It says "this load certainly misses in L1" one cycle after address generation, two cycles before the tag compare knows. The scheduler can then stop waking the load's dependents and can send the L2 request early.
* **Pointer-Element Prefetch Unit (PEPU).** It finds the loads that walk linked data structures. For each one it remembers which node address followed which. When the walk comes around again, it prefetches the next node into a small prefetch cache before the pointer itself has been loaded.
* **Ditto.** It is a soft-error checker. Each committed instruction goes into a delay buffer and is executed a second time by a "clone" stream that uses spare issue slots. A mismatch flushes the unverified state, and the core restarts at the oldest unverified instruction.

The top module `tolerating_gap_top` places the three units side by side. They share no hardware. Each unit's ports are brought out with the prefix `bf_`, `pe_` or `dt_`. The core, caches, memory, TLB and branch predictor are not part of this RTL. Their signals are ports, and the testbenches model them.

## 1. Bloom filter miss prediction

### What the filter holds

The L1 data cache is 16 KB, 4-way, with 32-byte lines and 128 sets. The filter is a bit vector of 2^13 = 8192 bits (`bf_partial_array`). That is 16 bits per cache line, and this size is called "Partial-16x". It is indexed by the low 13 bits of the line address, `vaddr[17:5]`, so no hash is needed. These bits come from the virtual address, and the cache is virtually indexed and physically tagged with 4 KB pages. The filter can therefore be read as soon as the address is generated, before the TLB answers.

A bit is set when a line with that partial address is allocated. One bit can stand for several resident lines. The filter may only say "absent" when no resident line maps to that bit, so a bit may be cleared only when the last such line leaves. Lines that share a bit are tracked by the **Collision and Update Table** (`bf_cut`):

* The low 7 bits of the partial address are the set index. A line in set *s* can only share a filter bit with another line in set *s*.
* The CUT keeps the 6 upper partial bits (p2) of each of the 512 lines. It has the same geometry as the tag array.
* When a victim is replaced, the collision detector compares the victim's p2 with the p2 of the other valid ways in the same set.
* If any of them match, the bit stays set. Otherwise it is cleared.

A set and a clear of the same filter bit can happen in the same cycle. The new line's partial address may equal the old one's. In that case the set wins.

### Pipeline and the two recovery windows

`bf_miss_filter` wires the filter, the CUT and `l1_tag_array` into a three-stage pipeline:

| cycle | what happens |
|---|---|
| c (issue) | load issues with its virtual and physical address |
| c+1 (s1) | filter read; `pred_valid`, `pred_miss`. A filtered miss raises `cancel_dep` (dependents woken in the 1-cycle window are cancelled) and `l2_early` (the L2 request goes out now) |
| c+2 (s2) | travelling |
| c+3 (s3) | tag compare, LRU victim; on a miss the line is allocated: filter bit set, CUT written, victim bit cleared unless a collision; an *unfiltered* miss raises `flush_window` (everything woken in the 3-cycle window is replayed) |

**The guarantee and its hazard.** The unit promises that `pred_miss` is never wrong: a load it calls a miss does miss. Bits are only written at s3. So a load that misses and is still in s2 or s3 has not set its bit yet. A younger load to the same line would see the bit clear and would be called a miss, but the older load is already bringing that line in. To close this gap, the filter compares the query with the partial addresses of misses in s2 and s3. On a match the load is reported as a maybe-hit. The testbench checks the guarantee on every load, as an assertion and as a counted check.

The tag array uses true LRU with an age counter per line, and fills invalid ways first. A line is allocated at the time of the miss. It is not allocated when the data returns. This keeps the tag array, the CUT and the filter in the same state at all times.

## 2. Pointer-Element Prefetch Unit

### Finding pointer loads

A load whose base register was written by another load is a *pointer load* (`lw r4,4(r4)`). The **Target Register Bitmap** (`trb`) has one bit per architectural register, and decode updates it:

* a load sets the bit of its destination;
* a move copies the source's bit to the destination;
* any other register write clears it;
* stores and branches leave it alone.

A load is a pointer load if its base register's bit is set. The TRB is changed speculatively, so every decoded branch pushes a copy of it into the **Bitmap Stack** (`bitmap_stack`, 64 entries, half of a 128-entry ROB). Branches may resolve out of order, so the stack is a circular buffer. Each branch carries its slot number. A misprediction restores that slot's copy and drops all younger slots. A correct resolution frees the slot, which is reclaimed once it reaches the oldest end. Decode stalls on `bs_full`.

Not every pointer load is worth remembering. `pload_classifier` keeps three bits per ROB entry, and each consumer marks its producer load:

| pload | dload | aload | type | used for |
|---|---|---|---|---|
| 1 | 1 | 0 | data load | prefetch only |
| 1 | 0 | 1 | address load | address cache update |
| 1 | 1 | 1 | data-address load | address cache update |

A load that uses the pointer as its base sets *aload*. An ALU operation that uses the value sets *dload*. A per-register producer table finds the producer, and moves copy its entries.

### Remembering the next node

The **Address Cache** (`address_cache`) is direct-mapped, with 256 entries of 4 bytes. It is indexed by the virtual address of a pointer load, and it holds the value that load returned, which is the address of the next node. Address loads, data-address loads and stores write it. A store only updates an entry that is already present. From the moment a store's address is known until its data arrives, it locks the matching entry. A load that indexes a locked entry gets no prediction.

The **Prefetch Cache** (`prefetch_cache`) is 1 KB: 32 direct-mapped lines of 32 bytes. Prefetches fill it, so the L1 is left alone. Loads look it up next to the L1, and a store that hits it updates it.

### The controller flow (`pepu_ctrl`)

Each pointer load takes one of two paths:

* **Source ready at decode (cycle c).**
  * T1 (c+1) register read.
  * T2 (c+2) address generation and store-queue dependency check.
  * T3 (c+3) prefetch into the PFC and index the AC with the load's own address.
  * T4 (c+4) the predicted next address goes to the load's dependents on the forward bus (`fwd_*`).
  * If the store queue reports a dependency, the load retries in the next cycle.
* **Source not ready.** The load waits in a 16-entry pending table. When the producer's predicted value appears at cycle p:
  * T5 (p+1) address from the predicted base.
  * T6 (p+2) speculative prefetch.
  * When the real base arrives, the load leaves the table. A wrong prediction is counted and costs nothing more.

One prefetch leaves per cycle. The source-ready path has priority. A line already in the PFC is not fetched again. A misprediction clears the pending table and the AC locks, and restores the TRB.

The testbench walks a 150-node linked list in the loop `lw r4,4(r4); beq; lw r3,8(r4); addi; sw; jmp`, with a 12-cycle memory. On a cold AC the walk takes 13406 cycles. After one training pass it takes 10103 cycles. The prefetched nodes hit in the PFC.

## 3. Ditto: checking by re-execution

### The streams

The original stream commits through `ditto_commit`, which holds two copies of the commit logic (`ditto_commit_lane`). Both copies decide whether the ROB head commits and build its record: PC, instruction, destination, result, check value and a sequence number. If the two disagree, that is a fault.

Committed records enter `delay_buffer`, a FIFO of 128 slots. A long-latency instruction (multiply, divide, load) takes two slots. The second slot holds its source operand values, so the clone does not recompute the long operation. Instead, the second execution of the long operation is compared against the first, which is a *dual-execution* check. The clone fetch walks the buffer with its own pointer (`cf_pc`). The clones pass through the core's cloned half of fetch and decode, and its lower ROB (LP-ROB, 16 entries), in program order.

### The checks (`ditto_verify`)

| where | checks | fault kind |
|---|---|---|
| commit | the two commit copies agree | commit |
| commit | the two executions of a long-latency operation agree | dual |
| clone register read (m1) | clone instruction and destination equal the record's | front end |
| clone register read (m1) | operands of a long-latency clone equal the stored operands | operand |
| clone writeback (m2) | clone result equals the record's, via the LP-ROB result field | result |

A short instruction with a renaming error reads wrong operands and computes a wrong result, so the writeback check catches it. Records are verified in order. A record is popped from the delay buffer once the clone check that finishes it has passed.

### Register status and recovery (`ditto_regstatus`)

Each architectural register has a value, a 2-bit status (invalid, transient, verified), the sequence number of its newest write, and a shadow copy of its last verified value.

* A commit writes the value and marks the register transient.
* When the record with the matching sequence number is verified, the register becomes verified, and its shadow copy takes the value.
* An older verification does not touch a register that has been written again since.

When any check fails:

1. `ditto_checker` raises `recover` one cycle after the detection.
2. It flushes the delay buffer and the LP-ROB state.
3. Every transient register is restored to its shadow copy.
4. The restart PC is the oldest unverified instruction: the oldest of the LP-ROB head and the delay buffer head.

The core refetches from that PC. The checker testbench runs 3000 instructions with faults of all five kinds injected at random, and 70 recoveries. Every instruction ends up verified with the right architectural state.

## 4. Where this RTL departs from the source design

* **Register status is 2 bits plus a shadow copy.** The description asks for one extra bit per register but also uses three states and flushes transient values. With one value per register, a flush would have nothing to return to. So each register keeps a verified copy and a sequence number.
* **The Bloom filter's in-flight bypass** (s2/s3 compare) is added. Without it, the "certain miss" guarantee fails for back-to-back misses to the same line.
* **Tag allocation at the miss**, not at data return.
* **The BF recovery windows** are taken as 1 cycle (filtered) and 3 cycles (unfiltered). The interface to the scheduler is plain pulses.
* **One instruction per cycle** at the decode-side interfaces of the PEPU and Ditto. The source machine is 8-wide.
* **Sizes chosen where none is given:**
  * a 16-entry PEPU pending table;
  * 32-byte prefetch-cache lines;
  * 32 architectural registers for Ditto.
* **Recovery clears the PEPU's pending loads and AC locks** on a misprediction.
* **Not built.** These are taken as given and exist only as ports and testbench models:
  * the core (scheduler, ROB, LSQ, functional units);
  * the cloned fetch/decode and the LP-ROB storage;
  * the cache data arrays, L2 and memory;
  * the TLB and the branch predictor.

  The benchmark runs behind the source's performance figures need that whole core, so these results cannot be reproduced here. The testbenches check behaviour and timing, not speedups.

## 5. Files and simulation

`rtl/` has one module or package per file. `pepu_pkg` and `ditto_pkg` hold the shared types, and every other file is named after its module. `tb/tb_<module>.sv` is a self-checking testbench for each unit. Each one prints `TB_RESULT checks=N failures=M` and has a watchdog. `tb_tolerating_gap_top` runs all three units through the top at its default sizes, in about 15 s. It counts 22 mechanisms, such as filtered misses, collisions, bypasses, AC locks, T6 prefetches and each fault kind. A mechanism that never happens counts as a failure.

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl --top-module tb_bf_miss_filter \
    rtl/pepu_pkg.sv rtl/ditto_pkg.sv -y rtl tb/tb_bf_miss_filter.sv -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. All parameters have the source's sizes as defaults. `BF_SETS` / `P_BITS` scale the filter: keep `P_BITS = log2(SETS) + 6` for 16 bits per line. `PE_ROB` and `PE_BS_DEPTH` should keep `BS_DEPTH = ROB/2`. Verilator's remaining lint warnings are about unused bits of wide records (a module reads only the fields it needs) and the tag array's victim-tag output, which the filter leaves open.
