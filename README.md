# smt_core: simultaneous multithreading on an in-order superscalar pipeline

A conventional in-order superscalar core leaves most of its issue slots empty,
because one instruction stream rarely has enough independent work. This core
runs several hardware threads at once and fills those slots with instructions
from all of them in the same cycle. What makes it cheap is that each thread is
still handled in order: its instructions issue in program order and write
their results in program order. There is no register renaming, no reorder
buffer and no out-of-order recovery. Recovering from a branch misprediction or
an exception means dropping the younger instructions of one thread and
restarting that thread. The other threads keep running.

The RTL implements the architecture described in "A Simultaneous
Multithreading Processor Architecture with Minimal Hardware Overhead". It
follows that architecture's block structure, pipeline stages and thread
policies. Where the architecture leaves a choice open, the choice made here is
noted below, and in the opening comment of each source file.

## Organisation

```
          +-----------------------------+
          | fetch_unit                  |   PC per thread, round-robin thread_selector,
          |  PCs  thread_selector  BTB  |-- branch_predictor (thread-tagged BTB, per-thread
          +-------------+---------------+   history) --> icache (M ports, N/M words each)
                        | N instructions / cycle from M threads
                  fetch_queue (K entries, circular)
                        | N / cycle, in order
                  decode_unit (N decoders)
                        |
                  issue_queue (L entries, compressing) <--> issue_unit <--> scoreboard
                        | up to ISSUE_W / cycle, to any free lane
    +----------+----------+----------+----------+------------+----------+----------+
    | fu_lane  | fu_lane  | fu_lane  | fu_lane  | fu_lane    | fu_lane  | fu_lane  |
    | ALU 0    | ALU 1    | ALU 2    | ALU 3    | multiplier | LSU 0    | LSU 1    |
    +----------+----------+----------+----------+------------+----------+----------+
        |  register_file (one register set per thread)         |  dcache (2 ports)
```

Everything is shared between threads except the program counters, the
branch-history tables and the register sets. Every queued or in-flight
instruction carries its thread id (`tid`).

| Module | Role |
|---|---|
| `smt_core` | top level: wiring, flush distribution, per-cycle event outputs |
| `fetch_unit` | select and fetch stages: PCs, thread selection, prediction, redirects |
| `thread_selector` | round-robin choice of up to M threads per cycle |
| `branch_predictor` | direct-mapped BTB with a thread id per entry, 2-bit counters per thread |
| `icache` | non-blocking instruction cache, M ports of one N/M-word block each |
| `fetch_queue` | K-entry circular queue between fetch and decode |
| `decode_unit`, `decoder` | decode stage, N instructions per cycle |
| `issue_queue` | L-entry shared queue, compressed every cycle |
| `issue_unit` | chooses the instructions to issue and assigns them to lanes |
| `scoreboard` | per-thread, per-register result-availability countdown |
| `register_file` | T × 16 × 32-bit registers, 2 read ports and 1 write port per lane |
| `fu_lane` | register read buffer, functional unit and result buffers of one lane |
| `int_alu`, `int_multiplier`, `ls_unit` | the functional units |
| `dcache` | data store shared by the two load/store units |
| `smt_pkg` | types, opcodes and encoding helpers |

## Pipeline

| Stage | Work |
|---|---|
| select | choose up to M threads, look up the predictor, send the block addresses to the cache, advance those PCs to the predicted next PC |
| fetch | blocks arrive from the cache and are written at the fetch-queue tail |
| decode | up to N instructions leave the fetch-queue head and are decoded into the issue queue |
| issue | up to ISSUE_W instructions go to free lanes and register in the scoreboard |
| read | operands come from the forwarding network or the register file |
| execute | ALU operation and branch condition; first multiply step; load/store address |
| memory | second multiply step; data-cache access; misprediction, exception and halt checks |
| write | result to the register file |

All lanes have the same four stages after issue, including the ALU lanes,
which do nothing in the memory stage. Instructions of one thread therefore
leave the pipeline in the order they were issued. Per-thread in-order
completion comes from this equal lane length, not from a separate
completion buffer.

## Issue: the heart of the design

The issue unit is the most involved part. It is purely combinational and runs
once per cycle over the whole issue queue.

**Thread order.** Threads are served in order of how many instructions each has
in the read, execute and memory stages, fewest first. Ties go to the lower
thread id. A thread that occupies the functional units lightly therefore gets
first pick of the free lanes.

**In order within a thread.** Entry 0 of the queue is the oldest. For each
thread in turn, the unit walks the queue from entry 0 and issues that thread's
instructions until the first one that cannot go. Later instructions of that
thread then wait, even if they are independent. An instruction cannot go when:

* a source register is not ready in the scoreboard;
* a source or destination register is written by an instruction of the same
  thread that was issued earlier in the same cycle;
* no lane of its kind is free (4 ALU, 1 multiplier, 2 load/store), or
  ISSUE_W instructions have already issued this cycle.

**Groups.** A branch, a store, a HALT or an undefined instruction is the last
instruction its thread issues in a cycle. As a result, when a redirect fires in
the memory stage, every younger instruction of that thread is in the read or
execute stage or still queued, never in the memory stage beside it. Also, a
load never shares the memory stage with an older store of its own thread,
which matters because the cache reads combinationally and writes at the clock
edge.

**Scoreboard and forwarding.** Each register of each thread has a 2-bit
countdown. Issuing an instruction that writes a register sets its countdown to:

* 1 for an ALU result, which can be forwarded from the memory-stage result
  buffer;
* 2 for a multiply or load result, which can only be forwarded from the
  write-stage result buffer.

A register is ready when its count is 0. With this, a dependent ALU
instruction issues two cycles after its producer, and a dependent of a
multiply or load issues three cycles after it. In the read stage, operands are
taken from the youngest match among:

1. the memory-stage results of the ALU lanes;
2. the write-stage results of all lanes;
3. the register file.

The write stage is forwarded because a register-file read in the same cycle as
the write returns the old value.

## Recovery: per-thread flush

A lane's memory stage raises a redirect in three cases:

* a misprediction: the actual next PC differs from the PC predicted at fetch.
  This is checked for every instruction, not only for branches.
* an undefined opcode (exception): the thread continues at `EXC_VEC` and
  `epc[t]` records the faulting PC.
* a HALT: the thread stops.

The redirect flushes the thread, and only that thread, everywhere younger than
the memory stage:

* the fetch stage;
* the fetch queue, where entries are marked dead in place and dropped when
  they reach the decoder;
* the instructions being decoded;
* the issue queue;
* the instructions being issued;
* the read and execute stages.

The PC is reloaded in the same cycle. Squashed instructions keep their
scoreboard countdowns, which only delays later readers by a cycle or two.
Mispredicted branches and taken branches train the predictor in the memory
stage.

## Fetch

Each cycle the selector takes up to M runnable threads, in round-robin order
starting after the last thread it picked. It does so only when the fetch queue
has at least 2N free entries: one fetch group is already in the fetch stage,
and the new one needs room too.

For every selected thread, the predictor is looked up on the N/M consecutive
PCs of its block, and the block ends after the first one predicted taken. A
prediction is "taken" only when two conditions hold:

* the BTB entry at that index carries the same thread id and PC tag;
* the thread's own 2-bit counter for that PC is 2 or 3.

The thread's PC moves to the predicted next PC immediately, so the same thread
can be selected again in the next cycle.

The instruction cache is non-blocking. When a thread's block misses, the
following happens:

* its fetch slots are dropped;
* its PC goes back to the first PC of the block;
* the thread leaves the selection until the cache reports a completed refill.

Meanwhile the other threads keep fetching and hitting. One refill is in
flight at a time: a direct-mapped line of 4 words, loaded from the instruction
store in 6 cycles. Every waiting thread retries after each refill. If a
thread's line was not the one refilled, it simply misses again and waits for
the next refill.

## Issue queue compression

Threads leave the issue queue out of fetch order and can be flushed, so holes
appear. Every cycle, the surviving entries slide down to the lowest positions
in age order, and the newly decoded instructions are appended behind them. The
queue is always packed from entry 0. Age order then equals program order
within every thread, which is what the in-order walk of the issue unit relies
on.

## Instruction set

The architecture was evaluated with the ARM instruction set. This core instead
uses a small 32-bit encoding of its own, with 16 registers per thread. All
registers are general purpose and reset to 0.

```
[31:26] opcode  [25:22] ra  [21:18] rb  [17:14] rc   imm18 = [17:0], sign-extended
00 NOP      01 ADD  02 SUB  03 AND  04 OR  05 XOR  06 SLL  07 SRL  08 SLT   ra <- rb op rc
09 ADDI  ra <- rb + imm     0A LUI  ra <- imm << 14     0B MUL  ra <- rb * rc (low 32 bits)
0C LD    ra <- mem[rb+imm]  0D ST   mem[rb+imm] <- ra
0E BEQ / 0F BNE  if (ra ==/!= rb) pc <- pc + 4*imm      10 JMP  pc <- pc + 4*imm
11 HALT  thread stops       any other opcode: undefined-instruction exception
```

`smt_pkg::enc_r` and `smt_pkg::enc_i` build instruction words.

## Parameters (`smt_core`)

| Parameter | Default | Origin |
|---|---|---|
| `T` threads | 4 | the architecture's example configuration; the tid is 3 bits, so up to 8 |
| `N` fetch width | 4 | four-issue configuration |
| `M` threads fetched per cycle | 2 | own choice (N/M = 2 instructions per thread) |
| `K` fetch-queue entries | 16 | own choice |
| `L` issue-queue entries | 16 | own choice |
| `ISSUE_W` | 4 | four-issue configuration |
| `NUM_ALU`, `NUM_MUL`, `NUM_LSU` | 4, 1, 2 | the architecture's example configuration |
| `IWORDS`, `DWORDS` | 1024 each | own choice |
| `EXC_VEC` | 0x0F00 | own choice |
| `icache` `LINE_WORDS`, `SETS`, `MISS_LAT` | 4, 64, 6 | own choice |

`N` must be a multiple of `M`. Predictor sizes (64-entry BTB, 64 counters per
thread) are parameters of `branch_predictor`.

## Interface (`smt_core`)

* `clk`, `rst_n`: asynchronous active-low reset.
* `imem_we/imem_addr/imem_wdata`: write the instruction store, one word per
  cycle. The address is a byte address.
* `dmem_we/dmem_addr/dmem_wdata/dmem_rdata`: write and read the data store.
* `start` (one cycle): loads `start_pc[t]` into each PC and starts the threads
  set in `thread_en`. `thread_active[t]` falls when thread t retires HALT.
* `dbg_tid/dbg_reg/dbg_rdata`: read any register of any thread
  (combinational).
* `epc[t]`: PC of thread t's last undefined instruction.
* `ev_*`: what happened this cycle, for performance counting:
  * `ev_issued`: instructions issued;
  * `ev_issue_threads`, `ev_fetch_threads`: threads that issued or fetched;
  * `ev_retired`: register writes;
  * `ev_mispredict`, `ev_exception`, `ev_halt`: redirects raised;
  * `ev_dep_stall`, `ev_res_stall`: issue held by a dependency or by lanes
    and width;
  * `ev_fq_full`: fetch blocked for lack of queue room;
  * `ev_iq_hole`: issue-queue compression closed a hole;
  * `ev_forward`: an operand was forwarded;
  * `ev_icache_wait`: some thread is waiting for an instruction-cache refill.

## What is simplified

* **Instruction cache.** The architecture builds the instruction cache from
  M banks and assumes no bank conflicts. Here it is a multi-ported array, so
  conflicts cannot occur. Its organisation is this design's own: 64 lines of
  4 words, direct-mapped, one refill at a time, 6-cycle refill. The
  instruction store behind it stands in for main memory.
* **Data cache.** `dcache` is an on-chip array with one port per load/store
  unit that always hits in one cycle. The architecture does not describe its
  organisation or misses, so there is no miss path and no backing memory.
* **TLBs.** The instruction and data TLBs are not built. Addresses are
  physical, and all threads share one data address space, so programs must
  use disjoint regions.
* **Exceptions.** The only exception is an undefined opcode. There is no
  privilege state and no return-from-exception instruction.
* **Memory accesses.** Loads and stores are word-sized and the low address
  bits are ignored.
* **Ports.** The register file has two read ports and one write port per lane,
  plus one read port for debugging.
* **Flushed instructions.** They keep their scoreboard countdowns. This is
  always safe, but can delay a reader by up to two cycles.

## Verification

Every module has a self-checking testbench in `tb/`, named `tb_<module>`. Each
prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog. Most compare
against a reference model written in the testbench, such as:

* a queue model for `fetch_queue` and `issue_queue`;
* a countdown array for `scoreboard`;
* an instruction decoding table for `decode_unit`.

`tb_issue_unit` uses directed scenarios with hand-worked results.

* `tb_smt_core` runs the full core at its default parameters. Four different
  programs run concurrently, twice: first with an empty instruction cache,
  then with the code cached. The programs are: a loop with loads, a multiply chain with
  store-to-load, straight-line ALU code with jumps, and an undefined
  instruction followed by its handler. An instruction-level interpreter inside
  the testbench executes the same programs. The testbench then compares:
  * every register of every thread;
  * the stored words;
  * the exception PC.

  It also requires that each mechanism occurred at least once:
  * misprediction, exception and halt;
  * dependency stall and resource stall;
  * full fetch queue and issue-queue hole;
  * multi-thread issue and multi-thread fetch;
  * forwarding;
  * an instruction-cache wait during which other threads fetched.
* `tb_smt_workload` runs a load/multiply/add loop kernel on a growing number
  of threads and checks the results and the throughput trend. It runs three
  configurations side by side. Each run is measured after a warm-up run that
  fills the instruction cache. The eight-issue unit mix (6 ALU, 2 multiplier,
  3 load/store lanes, 32-entry queues) is an assumption.
  Measured instructions per cycle:

  | threads | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 |
  |---|---|---|---|---|---|---|---|---|
  | four-issue, T=4 | 0.86 | 1.72 | 2.32 | 2.81 | | | | |
  | four-issue, T=8 | 0.86 | 1.72 | 2.32 | 2.81 | 3.21 | 3.53 | 3.60 | 3.47 |
  | eight-issue, T=8 | 0.86 | 1.72 | 2.56 | 3.25 | 3.85 | 4.22 | 4.88 | 5.52 |

  The checks:
  * IPC must rise with each added thread up to the issue width.
  * Past the issue width, IPC must hold within 10 %.
  * The full thread count must give at least twice the single-thread IPC.
  * The eight-issue core must beat the four-issue core at eight threads.

  The architecture's own evaluation used SPEC2000 programs. It reports about
  1.5, 2.9 and 3.5 instructions per cycle for 1, 4 and 8 threads on the
  four-issue machine. On the eight-issue machine it reports about 1.7, 4.3 and
  5.7. The kernels here are much smaller and differ in parallelism, so only
  the trend is comparable: a steep rise up to the issue width, then
  saturation.

To simulate with Verilator (the package first):

```
verilator --binary --timing --assert rtl/smt_pkg.sv \
    $(ls rtl/*.sv | grep -v smt_pkg) tb/tb_smt_core.sv --top-module tb_smt_core
./obj_dir/Vtb_smt_core
```

Replace `tb_smt_core` with any other testbench name to run it. All testbenches
finish in seconds.
