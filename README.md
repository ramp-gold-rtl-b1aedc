# RAMP Gold: a 64-core multiprocessor simulator in one FPGA pipeline

RAMP Gold is not a processor. It is a hardware simulator of a processor: it
runs a 64-core shared-memory machine (the *target*) on one FPGA (the *host*)
and reports how many target clock cycles a program takes. Two ideas keep it
small enough to fit.

* **Functional/timing split.** A *functional model* executes the SPARC
  instructions and keeps the architected state. A separate *timing model*
  decides how many target cycles each instruction costs and when each core
  may run its next one. The timing model holds only what affects time (cache
  tags, MSHRs, DRAM queue state), never data, so it can model caches much
  larger than any buffer on the host.
* **Host multithreading.** The 64 target cores are not 64 pipelines. They are
  64 hardware threads of one in-order pipeline. One thread simulates one core.
  A thread never has more than one instruction in flight, so the pipeline has
  no bypass network, no interlocks and no branch predictor.

This RTL implements both models, the host caches and TLBs, the crossbar to
host memory, the configurable cache and DRAM timing models, the 657
performance counters and a command injector for control. The functional model
runs an integer subset of SPARC V8. The parts that are missing are listed in
[What is not here](#what-is-not-here).

## How a target cycle is simulated

This part is the hardest to follow in the code, so it is described first.

The timing model owns the target clock. Its `thread_scheduler` keeps three
things:

* `target_cycle`, the count of simulated target cycles;
* a scoreboard with one `stall_until` value per core;
* a `pending` mask of cores that still have to run an instruction in the
  current target cycle.

A target cycle is simulated like this:

1. At the start of the cycle, `pending` becomes the set of cores that are not
   halted and whose `stall_until` has been reached.
2. Each host cycle, the scheduler picks one pending core that has nothing in
   flight, in round-robin order, and issues its thread into the functional
   pipeline.
3. Four to five host cycles later the functional model reports one of two
   outcomes on `wb_valid`/`wb_ev`:
   * **Replay.** The instruction could not finish in one pass. Nothing was
     committed. The core stays pending and will be issued again.
   * **Retire.** The instruction committed. The event carries the physical
     instruction address and data address.
4. A retired event goes into a 64-entry queue. A sequencer then takes the
   event through these lookups, one step per host cycle:
   * the core's L1 instruction tags;
   * on an L1 I miss, the L2 bank;
   * for a load or store, the L1 data tags;
   * if the L1 D victim is dirty, an L2 write-back;
   * on an L1 D miss, the L2 bank.

   An L2 miss goes to that bank's DRAM channel model. The result is `acc`,
   the extra target cycles this instruction costs. The core then leaves
   `pending`, and its `stall_until` becomes `target_cycle + 1 + acc`.
5. The target cycle advances only when every pending core has retired and
   nothing is left in the pipeline or in the retire queue.

Step 5 is the timing synchronization: no core starts target cycle *t+1*
before every core has finished *t*. So every core's delays are measured against
the same target clock, however long host cache misses, replays or host DRAM
responses take. Host timing can still change one thing: the order in which
requests from the same target cycle reach an L2 bank or a DRAM queue. Host cycles spent
waiting for that barrier are counted as `GC_SYNC`. A target cycle in which no
core was ready counts as `GC_IDLE`: every core was stalled, so the pipeline
had nothing to do.

A target core thus runs at one instruction per target cycle, except when an
instruction misses in its L1 caches. The target is in-order and single-issue.
The scheduler does not skip idle target cycles. Each one takes one host cycle.

### Replays

The functional pipeline never stalls. Anything it cannot finish in one pass
is replayed. `replay_e` in `rg_pkg` lists the causes:

| cause | when |
|---|---|
| `RP_ICACHE` | the thread's host I$ line is missing; a fill is requested |
| `RP_DCACHE` | the host D$ line is missing, or its fill is still awaited |
| `RP_TLB` | ITLB or DTLB miss while the MMU is on; a miss is sent out for the walker |
| `RP_MULDIV` | multiply or divide started or still running in the shared unit |
| `RP_MEM` | the host memory request could not be sent this cycle |
| `RP_STORE3` | first pass of a store whose address uses two registers: the address is kept, and the second pass reads the data register |

Replays cost host cycles only. They never cost target cycles.

## Functional model (`func_model`)

The functional model has five registered stages and a registered writeback
event:

| stage | work |
|---|---|
| S0 | issue: read the thread's PC, nPC, annul flag, icc and Y (`arch_state`) |
| S1 | ITLB translate (`host_tlb`); look up the host I$ (`host_icache`) |
| S2 | I$ answer; decode; read the register file (`arch_regfile`, synchronous read) |
| S3 | ALU and condition codes (`int_alu`); branch resolution; address generation; DTLB; host D$ request (`host_dcache`); multiply/divide (`imul_idiv`) |
| S4 | D$ answer; commit (register, PC/nPC, icc, Y) or replay |

**Instructions.** The implemented instructions are:

* SETHI;
* Bicc, including the annul bit;
* CALL and JMPL;
* RDY and WRY;
* ADD, ADDX, SUB and SUBX, with and without `cc`;
* AND, ANDN, OR, ORN, XOR and XNOR, with and without `cc`;
* SLL, SRL and SRA;
* UMUL, SMUL, UDIV and SDIV;
* LD, LDUB, LDSB, LDUH and LDSH; ST, STB and STH;
* Ticc.

Each thread has one register window. A taken Ticc halts its thread. So does
an unimplemented instruction, a misaligned access, or a divide by zero.
Traps are not modelled.

**Host caches.** The host caches only speed up the simulator. They never
change target timing.

* **I$ (`host_icache`):** private to each thread, 8 direct-mapped lines of
  32 bytes.
* **D$ (`host_dcache`):** 16 KB, direct-mapped, shared by all threads. It is
  write-through and allocates on a miss.
  * Each thread has one MSHR. A second thread that misses on a line already
    being fetched joins that MSHR.
  * A hit is refused while a fill for the same line is still awaited, so the
    late fill cannot overwrite a newer store.
* **TLBs (`host_tlb`):** 16 sets × 2 ways per thread, with round-robin fill.
  The page-table walker is outside: misses and fills are top-level `tlb_*`
  ports. With `mmu_en` low, addresses are physical.

**Host memory.** `mem_xbar` merges the I$ and D$ request streams onto one
host memory port, with round-robin arbitration. An assertion checks that at
most one port is granted per cycle.

* **Reads** fetch a 32-byte line. Word 0 is in `data[255:224]`.
* **Writes** are a single word with byte enables. `wmask[3]` is the byte at
  the lowest address, because SPARC is big-endian.
* **Tags:** `tag[7]` is 0 for the I$ and 1 for the D$. `tag[5:0]` is the
  thread.

## Timing model (`timing_model`)

* **`l1_tm`.** Tag-only L1 models, one for instructions and one for data,
  for each core.
  * At most 64 sets × 4 ways per core. Replacement is LRU.
  * Each entry keeps the whole line address as its tag. So the set count,
    way count and line size can be changed at runtime by masking the index.
* **`l2_bank_tm`.** Four L2 banks, each with at most 1024 sets × 16 ways and
  8 MSHRs.
  * A miss to a line already being fetched merges with that MSHR: it is
    ready when that fill arrives.
  * When all MSHRs are busy, the miss is handed to DRAM only when the
    earliest MSHR frees.
  * An L1 write-back marks the L2 line dirty and costs the L2 latency.
* **`dram_tm`.** One DRAM channel per bank, first-come first-served, kept as
  a next-free time.
  * A request starts at `max(arrival, next_free)` and is done `latency`
    cycles later.
  * It holds the channel for `service` cycles, or twice that when a dirty
    line goes out first.

All these times are absolute target cycles, 64 bits wide. A stall is
`ready - target_cycle`.

**Configuration registers (`tm_config`).** The timing model is configured
through 12 registers on the `io_*` port. They reset to the target of the
original evaluation: 64 cores at 1 GHz; 32 KB 4-way L1s with 128-byte lines;
an 8 MB 16-way L2 in 4 banks with 10-cycle latency; 70-cycle DRAM at
3.2 GB/s per channel, which is 40 cycles per 128-byte line. Writing a
geometry register (0 to 8) flushes all tag models.

| addr | register | reset |
|---|---|---|
| 0 | L1 I sets, log2 | 6 |
| 1 | L1 I ways | 4 |
| 2 | L1 D sets, log2 | 6 |
| 3 | L1 D ways | 4 |
| 4 | L1 line bytes, log2 | 7 |
| 5 | L2 sets per bank, log2 | 10 |
| 6 | L2 ways | 16 |
| 7 | L2 line bytes, log2 | 7 |
| 8 | L2 banks, log2 | 2 |
| 9 | L2 latency (cycles) | 10 |
| 10 | DRAM latency (cycles) | 70 |
| 11 | DRAM service per line (cycles) | 40 |

## Performance counters (`perf_counters`)

There are 657 64-bit counters. Each core has 10; the other 17 are global.
They are read through a ring of 65 nodes, one cycle per node. Send
`perf_rd_addr` with `perf_rd_valid`. The answer appears on `perf_rsp_*`
NCORES+1 cycles later, and one read can be started every cycle.

* **Core counters.** Core `c`, counter `k` is at address `c*10 + k`. The
  counters, in order from `k = 0`:
  * instructions;
  * loads;
  * stores;
  * control transfers;
  * L1 I misses;
  * L1 D hits;
  * L1 D misses;
  * L1 D write-backs;
  * L2 hits;
  * L2 misses.
* **Global counters.** Global counter `g` is at address `640 + g`. The
  counters, in order from `g = 0`:
  * target cycles;
  * host cycles;
  * issues;
  * retirements;
  * replays by cause: I$, D$, TLB, mul/div and memory port;
  * synchronization host cycles;
  * idle target cycles;
  * L1 write-backs into the L2;
  * DRAM reads;
  * DRAM writes;
  * L2 MSHR merges;
  * injector commands;
  * three-register-store replays.

## Control (`injector`)

The front-end drives `inj_cmd` (`inj_cmd_t`) with a valid/ready handshake.
The commands are:

* `INJ_RUN` and `INJ_STOP` start and stop target time.
* `INJ_WRREG`, `INJ_WRPC` and `INJ_RDREG` write a register, write a PC and
  read a register. They are accepted only while the simulation is stopped and
  no instruction is in flight or queued, so they never change target timing.
  A read answers on `inj_rsp_*` one cycle after it is accepted.

Programs are placed in host memory by whoever drives the memory port.

## Top level (`ramp_gold`)

| ports | purpose |
|---|---|
| `clk`, `rst_n` | one clock; active-low asynchronous reset |
| `reset_pc`, `mmu_en` | start PC of every thread; TLB translation on or off |
| `inj_*` | control commands (above) |
| `io_*` | configuration registers |
| `perf_*` | counter reads |
| `mem_*` | host memory: `mem_req_t` requests, `mem_resp_t` line responses tagged by source and thread |
| `tlb_*` | TLB miss out; fill and flush in, for an external page-table walker |
| `target_cycle`, `halted`, `all_halted`, `running` | status |

`rg_pkg` holds every shared type and number: thread count, request and
response structs, the replay causes, the writeback event, the configuration
struct and its reset value, the counter numbers and the injector commands.

## What is not here

These are missing, and a run differs from the original machine because of
them:

* **Instruction set.** No floating point, no register windows beyond one, no
  traps or interrupts, no atomics, no microcode engine. The original runs the
  full SPARC V8 ISA and boots an operating system. This one runs
  integer-only, bare-metal programs.
* **Missing units.** No MMU page-table walker, timers, interrupt controllers,
  Ethernet front-end link, DDR2 controller, or the bandwidth QoS between L2
  and DRAM. The walker and the memory controller are ports.
* **Pipeline depth.** The original pipeline is 13 stages, tuned to the
  FPGA's BRAM and DSP placement. This one has five stages and plain logic.
  The function is the same; only the clock rate differs. Memories are not
  double-clocked.
* **Tag lookups.** The original looks up all tags of an instruction in
  parallel in one host cycle. This timing model makes them one after another,
  over up to six host cycles per retired instruction. Target timing is the
  same. Host speed is lower when many instructions retire back to back.
* **L2 inclusion** is not enforced (no back-invalidation of L1 tags).
* **Crossbar contention** between L1s and L2 banks is not modelled. Stores
  are timed like loads: write-allocate in the L1.
* **Choices of this design.** These are not taken from the original:
  * the MSHR count (8 per L2 bank);
  * all replacement policies;
  * the host cache line size (32 bytes);
  * the D$ write policy;
  * the configuration register map;
  * the counter event lists.
* **BRAM protection.** No ECC or parity on the memories.

## Simulating

Every file holds one module or package, named after the file. Compile
`rtl/rg_pkg.sv` first, then `tb/tb_sparc_pkg.sv` (the testbenches' SPARC
instruction encoders), then the rest. For example, for the end-to-end test:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
      rtl/rg_pkg.sv tb/tb_sparc_pkg.sv rtl/*.sv tb/dram_model.sv \
      tb/tb_ramp_gold.sv --top-module tb_ramp_gold -o tb
    ./obj_dir/tb

(`rtl/*.sv` lists `rg_pkg.sv` a second time. Drop it from the glob if your
verilator objects.)

Each testbench checks against values it works out itself. It ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/dram_model.sv` is a
behavioural host memory with a fixed latency and random back-pressure.

* **`tb_ramp_gold`** loads a 34-instruction program into host memory. It
  gives every thread its id through the injector, runs all 64 cores, and
  checks memory, registers and counters.
  * The program uses loops with annulled delay slots, multiply and divide,
    three-register stores, byte accesses, call/return and a strided store
    loop.
  * Before the run it shrinks the target caches through the configuration
    registers, so that write-backs and full MSHRs happen.
  * It requires every replay cause, both kinds of MSHR merge, MSHR-full
    waits, idle and synchronization cycles, and L1 and L2 write-backs to
    occur at least once.
* **`tb_ramp_gold_full`** runs the same program at every default, with the
  configuration left at reset. About 10,600 target cycles.
* **Per-block testbenches:**
  * `tb_func_model`: pipeline plus crossbar, with its own issue loop;
  * `tb_timing_model`: exact stall gaps for hits and DRAM misses, then
    counter consistency under random traffic from 64 cores;
  * `tb_l1_tm`: against an LRU reference model;
  * `tb_l2_bank_tm`, `tb_dram_tm`, `tb_thread_scheduler`,
    `tb_host_dcache`, `tb_host_icache`, `tb_host_tlb`, `tb_mem_xbar`,
    `tb_injector`, `tb_tm_config`, `tb_perf_counters`, `tb_int_alu`,
    `tb_imul_idiv`, `tb_arch_regfile` and `tb_arch_state`.

## Changing it

* **Thread count.** `NTHREADS` in `rg_pkg` sets the number of threads, and so
  the number of target cores. `TID_W` must be its log2.
* **Maximum timing-model geometry.** Set it with the `timing_model`
  parameters `L1_SETS`, `L1_WAYS`, `L2_SETS`, `L2_WAYS`, `L2_BANKS` and
  `L2_MSHRS`. The runtime registers can only select up to these.
* **A different target core or memory system.** Change the sequencer in
  `timing_model`, which turns a retired event into a stall. The functional
  model does not need to change. Its only contract with the timing model is
  the issue port and the `wb_event_t` stream.
