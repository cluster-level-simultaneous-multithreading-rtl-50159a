# CSMT: cluster-level simultaneous multithreading for a clustered VLIW core

A clustered VLIW machine is wide, but most programs are not. A compiler
packs a low-ILP program into as few clusters as it can, nearly always
starting with cluster 0, to keep inter-cluster copies rare. The other
clusters then sit idle. Cache misses also leave the whole machine idle
while the thread waits.

Cluster-level simultaneous multithreading (CSMT) fills those idle clusters
with other threads at little hardware cost. The unit of sharing is the
**bundle**: the operations of one instruction that run on one cluster.
Every cycle the core merges whole instructions from several threads into
one execution packet, as long as they need different clusters. Two cheap
mechanisms make this work:

* **Static cluster renaming.** Each thread gets a fixed *shift* when it
  starts. Its logical cluster `l` runs on physical cluster
  `(l + shift) mod NC`. Threads that all prefer logical cluster 0 therefore
  land on different physical clusters.
* **Collision detection with round-robin priority.** A small combinational
  circuit, placed in its own pipeline stage, takes threads in priority
  order. It takes a thread's whole instruction only if none of its physical
  clusters is already taken. The priority moves to the next thread every
  cycle.

A thread blocked by a cache miss simply stops offering instructions, so
the other threads use its clusters. With one thread running, the whole
machine is available to it.

This repository holds synthesizable SystemVerilog for such a core: 4
threads, 4 clusters, 4 issue slots per cluster and a 20-cycle miss
latency, together with self-checking testbenches.

## Instruction format and partial decode

Instructions are variable length, with no NOPs stored. Every 32-bit
operation (syllable) carries two sequencing bits:

| bits    | field | meaning |
|---------|-------|---------|
| 31      | S     | instruction-stop: last operation of the instruction |
| 30      | CS    | cluster-start: this operation opens a new bundle |
| 29:28   | CID   | logical cluster of the bundle (read where a bundle opens) |
| 27:23   | OPC   | opcode |
| 22:17   | D     | destination (or store data / branch register) |
| 16:11   | S1    | source 1 (or branch register for BR/BRF) |
| 10:5 / 10:0 | S2 / IMM | source 2, or signed 11-bit immediate |

The S and CS bits follow the VEX scheme. The CID field, the field layout
and the opcode set are this design's own (`rtl/csmt_pkg.sv`):

* ALU operations: ADD, SUB, AND, OR, XOR, SHL, SHR, ADDI and SHLI.
* Compares: CMPLT, CMPEQ, CMPLTI and CMPEQI. They write branch registers.
* MPY and LDW, both with a 2-cycle latency.
* STW, BR and BRF (branch if the branch register is true or false), GOTO
  and HALT.
* XCP, the inter-cluster copy: `r[D]` of cluster `imm[1:0]` gets the value
  of `S1`.

All other operations take one cycle.

`inst_predecode` scans a window of 16 syllables up to the stop bit. It
produces the bundle of each logical cluster, the mask of used clusters,
the length, and an illegal flag. An instruction is illegal if it has:

* no stop bit within the window,
* a bundle of more than 4 operations,
* a cluster opened twice,
* an unknown opcode,
* a bundle with more than 2 multiplies, more than 1 memory operation, more
  than 1 branch or more than 1 copy,
* or branches in two bundles.

Only these bits have to be decoded before the merge stage. That is why
collision detection is cheap.

## Renaming

`shift_table` computes a thread's shift when the thread starts, from its
id `t` and the number `N` of running threads:

    shift = t * floor(NC / N)   if NC >= N
    shift = t                   if NC <  N        (then mod NC)

With 2 threads on 4 clusters the shifts are 0 and 2. With 4 threads they
are 0, 1, 2 and 3. The shift never changes while the thread runs, because
the thread's registers live in the physical clusters its mapping names.

`cluster_rename` rotates the bundles and the usage mask by the shift. It
also rewrites the one operand that names a cluster, the target of XCP.
Register numbers stay the same: every thread has a private register file
in every cluster.

## Merge stage

`merge_select` forms the packet, combinationally and greedily:

    used = 0
    for i in 0..NT-1:  t = (prio + i) mod NT
        if req[t] and (pmask[t] & used) == 0:  grant t; used |= pmask[t]
    prio <= prio + 1 every cycle     (or prio = fixed_top when fixed_prio = 1)

`exec_packet` holds the multiplexers and the extra pipeline register. Each
physical cluster receives the bundle of its owner, tagged with the thread
id and the instruction address. Everything that happens later is
attributed to a thread through these tags: branch redirects, halts,
cache-miss blocking and register writes.

Worked example (`tb/tb_csmt_fig5.sv`): four threads of four instructions
each. Their bundles use the logical clusters below:

| thread | instr 0 | instr 1 | instr 2 | instr 3 |
|--------|---------|---------|---------|---------|
| T0     | {0,1}   | {1}     | {0}     | {0,2,3} |
| T1     | {0,1}   | {1,2}   | {0}     | {0,3}   |
| T2     | {0}     | {1,2,3} | {0,1}   | {0,3}   |
| T3     | {0}     | {0,1}   | {0,1,2} | {0,3}   |

Run one thread at a time, these need 16 cycles. Merged with shifts 0 to 3,
they need 9 cycles. In cycle 0, T0 takes physical clusters 0 and 1. T1
wants physical 1 and 2, so it collides and waits. T2 and T3 take
clusters 2 and 3. In cycle 1, T1 has top priority.

The same bench repeats the example on a second core with real caches and
a 3-cycle miss latency. Thread 0's first instruction also carries a load
that misses. Thread 0 stalls for 3 cycles, and in each of them the other
threads issue into its clusters. The stream takes 11 cycles instead of 9:
most of the miss is hidden. Where the miss costs the most depends on which
bundle misses.

## Pipeline and timing

| stage | work |
|-------|------|
| F  | Read the fetch window into the thread's one-instruction buffer; ICache tag lookup. |
| M  | Partial decode, renaming, collision detection and merge; register the packet. |
| E1 | Read registers and execute. ALU results, compares, copies and stores complete. Branches and HALT resolve. DCache lookup. |
| E2 | Write multiply and load results. |

* **Throughput.** A thread can issue one instruction per cycle. Its buffer
  refills in the cycle its instruction is merged.
* **Latencies are exposed.** There are no interlocks or bypasses. A result
  written at the end of a cycle is read in the next cycle. Code must space
  dependent instructions by the latency: 1 for most operations, 2 for MPY
  and LDW. Because a thread never issues faster than one instruction per
  cycle, code scheduled this way is correct whatever the other threads do.
* **Taken branch.** The branch resolves in E1. That cycle, the thread's
  buffered fall-through instruction is squashed and withdrawn from the
  merge. The target is fetched in the next cycle. The thread loses two
  issue cycles, and the other threads lose nothing. There is no branch
  predictor; fall-through is the assumed path.
* **Cache misses.** An ICache miss delays that thread's fetch by MISS_LAT
  cycles (default 20). A DCache miss found in E1 stops the thread's
  requests for MISS_LAT cycles. The caches are tag/LRU models only: the
  access itself completes from the flat memories. A miss therefore costs
  time but never changes a result. `perfect_mem = 1` turns all misses off.
* **Exceptions.** An illegal instruction is caught when it reaches the
  head of its thread's buffer, before it is merged, so it never executes.
  Only that thread's buffer is flushed. The address of the illegal
  instruction is kept in `epc[t]`, and the thread continues at `EXC_VEC`
  (default 0).

## Clusters

Each `cluster` has:

* 4 ALUs, one per slot.
* 2 fully pipelined multipliers (`mul_unit`), which take the first and
  second MPY of the bundle.
* 1 load/store unit, which takes the bundle's memory operation.
* A branch unit. Every cluster has one, because CSMT needs all clusters to
  be identical.
* A copy sender.
* NT register files (`regfile`). Each holds 64 × 32-bit registers, with r0
  always reading 0, and 8 one-bit branch registers.

The thread tag of the bundle selects which register file is read.

Write ports of each register file:

* 4 ALU ports.
* 2 multiplier ports.
* 1 load port.
* One copy port per source cluster.

The copy network (`xcopy_net`) is point-to-point, so copies never compete.
A copy is written at the end of E1.

## Top level (`csmt_top`)

| parameter | default | note |
|-----------|---------|------|
| NT | 4 | hardware threads |
| NC | 4 | clusters |
| ISSUE | 4 | operations per bundle and ALUs per cluster |
| MISS_LAT | 20 | ICache/DCache miss latency |
| IMEM_WORDS | 4096 | instruction memory, in syllables; this design's choice |
| DMEM_WORDS | 4096 | data memory, in 32-bit words; this design's choice |
| EXC_VEC | 0 | exception handler address |

The caches are 64 KB, 4-way, with 64-byte lines. There is one ICache port
per thread and one DCache port per cluster.

Ports:

* Memory access: `imem_we/waddr/wdata` load programs at syllable
  addresses. `dmem_we/waddr/wdata` and `dmem_raddr/rdata` access data at
  byte addresses.
* Thread control: `start[t]` starts thread t at `start_pc[t]`.
  `start_nthreads` gives N for the shift equation. `fixed_prio` and
  `fixed_top` select fixed merge priority.
* Status outputs: `thread_active`, `exc` and `epc`.
* Observation outputs: `issue_grant`, `ex_valid`, `ex_tid`, `redirect` and
  `blocked`.

## Where this departs from, or adds to, the CSMT scheme

* The operation encoding beyond the S and CS bits, the opcode set, the
  register counts (64 general and 8 branch registers, as in VEX) and the
  memory sizes are this design's own choices.
* Issue width is read as 4 operations per cluster, 16 per instruction.
* The caches hold no data and have no refill path. They model hit and miss
  timing only.
* A branch unit reads only the branch registers of its own cluster. VEX
  also lets a branch read registers of other clusters; that is not built.
* The inter-cluster copy is a single XCP operation in the sending bundle,
  not a send/receive pair.
* Exceptions come only from illegal instructions, detected before issue.
  The handler entry (`EXC_VEC`, `epc`) and the HALT/start interface are
  this design's own.
* Fixed priority is an option beside round robin. With `fixed_prio = 1`,
  the thread `fixed_top` leads the merge order, and the other threads
  follow it in thread-number order. This is meant for a real-time thread
  whose priority the operating system sets. The exact form of the
  priority levels is this design's own.
* In the 4-thread example, the published merged stream places thread 0's
  third instruction in cycle 6. The stated rule ("the next priority thread
  is selected if it does not collide") places it in cycle 5, where its
  cluster is free. This design follows the rule. The stream still takes 9
  cycles.
* The benchmark mixes used to evaluate the scheme (SPECint and MediaBench
  programs, in 2- and 4-thread mixes) cannot run here. They need a
  compiler for this instruction set and far more memory than the flat
  16 KB memories.

## Testbenches and simulation

Every testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=M`. The unit benches are `tb_<module>.sv`.
The two core-level benches are:

* `tb_csmt_top`: four threads run loops with loads, multiplies, branches,
  copies between clusters and one illegal instruction. Five runs are made:
  4 threads with real memory, 4 threads with perfect memory, 2 threads,
  1 thread, and 4 threads with fixed priority. Every result is checked.
  The bench also counts that merging, collisions, renamed execution,
  taken branches, ICache and DCache misses, exceptions and HALT each
  happen at least once. Under fixed priority, the top thread must never
  lose a collision.
* `tb_csmt_fig5`: the worked example above. It checks the grant and owner
  pattern in every cycle, and the 9-cycle total. Then it runs the
  3-cycle-miss variant on a second core with `MISS_LAT = 3`.

Both run the core at its default parameters, apart from that second core's
miss latency.

Example with plain Verilator:

    verilator --binary --timing --assert -Wno-fatal -y rtl +libext+.sv -Irtl \
        rtl/csmt_pkg.sv tb/tb_csmt_top.sv --top-module tb_csmt_top -o sim
    ./obj_dir/sim

Every block is simulated with two-state logic. All state that is read is
reset, except the instruction and data memories, which the testbench
loads.
