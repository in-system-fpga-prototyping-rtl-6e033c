# An in-order Itanium (IA-64) core with its cache hierarchy, in SystemVerilog

This is a cycle-level model of a first-generation Itanium-style processor,
written as synthesizable SystemVerilog. It is the kind of model you put on
an FPGA to run real IA-64 machine code against a realistic memory system and
study microarchitecture. The core executes a subset of the IA-64 instruction
set using the **architectural bit encodings**, so an assembler's output for
that subset runs unchanged. It keeps the features that set IA-64 apart from
a plain RISC pipeline:

* **128-bit bundles.** Each holds three 41-bit instructions. A 5-bit template
  names the execution-unit type of each slot and marks *stops*, the ends of
  instruction groups.
* **Group-at-a-time issue**, in order, to seven ports: two memory/integer
  (M0, M1), two integer (I0, I1) and three branch (B0–B2).
* **Predication.** Every instruction has a qualifying predicate. The bypass
  network forwards a result only when its predicate is true. A compare can
  feed a branch in the same group.
* **A register stack.** Registers r32–r127 form a circular file addressed
  relative to a frame base. A register stack engine spills and fills frames
  to memory when calls nest deeper than the file.
* **Three cache levels** with the first-generation Itanium's sizes and
  latencies. The third level is modelled with tags only.

A host starts the processor by writing a start address to a snooped memory
location. It reads the performance counters and registers afterwards.

## Block diagram

```
           host write (snooped)                     performance counters
                 |                                          ^
            host_ctrl  <----------- events ---------------- |
                 | start                                    |
   +-------------v--------------------------------------------------------+
   | ia64_core                                                             |
   |  fetch_unit --> dispersal --> stack_rename --> REG --> EXE --> DET --> WB
   |  (branch_predictor)  (6x ia64_decoder)     gr_file  int_alu x4         |
   |                                             bypass_net, branch_unit x3 |
   |                                                  rse (spill/fill)      |
   +----+-------------------------------------------+----------------------+
        | line requests                              | 2 x 8-byte ports
   sa_cache (L1I 16 KB)                        sa_cache (L1D 16 KB, 2 ports)
        +-------------------> l2_arbiter <-----------+   (data side first)
                                   |
                         sa_cache (L2 96 KB, 6-way)
                                   |
                         l3_tag_cache (4 MB of tags: 21 / 100 cycles)
                                   |
                        mem_* port (512-bit lines) -> main memory
```

| Module | Role |
|---|---|
| `ia64_pkg` | uop and instruction types, template decoding, slot extraction |
| `ia64_system` | top level: core, caches, arbiter, host control |
| `ia64_core` | the pipeline, scoreboard, control and memory ports |
| `fetch_unit` | predicted fetch of 32-byte lines; queue of bundles |
| `branch_predictor` | two-level adaptive predictor and BTB |
| `dispersal` | decode of two bundles; group issue to ports |
| `ia64_decoder` | one 41-bit slot to a uop |
| `stack_rename` | frame-relative to physical register number |
| `rse` | frame marker, ar.pfs, spills and fills |
| `gr_file` | 128 x 64-bit register file, 9 read and 5 write ports |
| `bypass_net` | predicated operand forwarding |
| `int_alu` | add, sub, logic, shladd, compare, 64-bit multiply |
| `branch_unit` | branch outcome, target, mispredict detection |
| `sa_cache` | set-associative cache used for L1I, L1D and L2 |
| `l3_tag_cache` | tag-only L3 with fixed hit and miss latencies |
| `l2_arbiter` | shares the L2 between the two L1s |
| `host_ctrl` | start on snooped write; performance counters; state dump to memory at halt |

## The issue rule, and why the core tops out at 3 instructions per cycle

This is the part of the design that most affects performance, and it is
easy to get wrong when you change it.

The dispersal stage holds a **window of up to two bundles** (six slots).
Each cycle it walks the window in program order and gives each instruction
the next free port of its type. M slots go to M0/M1. I, F and X slots go to
I0/I1; the only F-slot operation supported is the integer multiply. B slots
go to B0–B2. The walk stops at:

* a stop bit, because an instruction group never issues together with the
  next one;
* the end of the window;
* the first instruction with no free port left. This is a *split issue*:
  the rest of the group goes next cycle.

The window is **refilled only when every slot in it has issued**.
Instructions decoded in different cycles never issue together. Take an
endless stream of MII bundles with no stops. The first cycle issues
M, I, I, M (4 instructions) and runs out of I ports. The second cycle issues
the remaining I, I (2) and empties the window. The average is therefore 3.0
instructions per cycle even though four integer ports exist. `tb_ia64_core`
checks exactly this: 72 independent adds retire in 24 cycles.

When a queued bundle was predicted taken at slot *s*, the slots after *s*
are dropped and the next bundle is not loaded with it. After a redirect to
slot *s* of a bundle, the slots before *s* are dropped.

## Pipeline and hazards

`FET → DISP → STK → REG → EXE → DET → WB`

Decode and dispersal share one stage.

* **STK.** A stacked register name r32–r127 becomes physical register
  `32 + (r − 32 + bof) mod 96`, where `bof` is the current frame base.
  Registers r0–r31 are not renamed.
* **REG.** Operands are read from the register file. Writes in WB are
  visible in the same cycle, because the file writes through. An
  instruction waits here when it reads the destination of a load in the
  group directly ahead. Load data only exists in WB, so that hazard cannot
  be bypassed. Every other read-after-write between groups is covered by
  the bypass.
* **EXE.** Operands are forwarded from the DET and WB stages by
  `bypass_net`. The youngest producer wins, and only producers whose
  predicate was true count. An instruction predicated off therefore never
  hides an older true value.
  * Predicates, branch registers and `ar.pfs` are written as an instruction
    leaves EXE. Inside a group they are forwarded in age order, so a branch
    can use a compare from the same group.
  * Memory operations send their request to the two-port L1D here.
* **DET / WB.** The load response arrives and is sized. General registers
  are written.

Control is decided among the instructions in EXE. The oldest of these
events wins and kills the younger instructions of the group:

* **Branch mispredict.** The predictor said taken and the branch was not,
  or the reverse, or the target was wrong. The front end is flushed and
  fetch is redirected to the correct bundle and slot.
* **Frame change.** `alloc`, a taken `br.call` or a taken `br.ret` updates
  the frame through the register stack engine. The pipeline then refetches
  behind the instruction, so younger instructions are renamed with the new
  frame.
* **`break` or an unsupported encoding.** The core halts. Younger work in
  the pipeline is dropped, and the host control block then writes the
  processor state to memory (see below).

The predictor is trained by every resolved branch.

A memory request that is not accepted, or a load or store whose response
has not come back, freezes the back end. Responses are buffered two deep
per port, so none is lost while the back end is frozen.

## Register stack engine

The engine keeps the current frame marker (`sof`, `sol`), the frame base
`bof`, `ar.pfs`, the backing-store pointer, and `ndirty`, the number of
caller registers still held in physical registers.

* **`br.call`** saves the frame in `ar.pfs`. The caller's output registers
  become the callee's frame.
* **`alloc`** sets the new frame. If `ndirty + sof > 96`, the engine first
  **spills** the oldest caller registers, one 8-byte store each, through
  L1D port 0.
* **`br.ret`** restores the frame from `ar.pfs`. If the caller's locals were
  spilled, the engine **fills** them back first.

While it works, the whole pipeline is blocked. Only these compulsory spills
and fills are made. There is no background spilling, no NaT collection and
no register rotation.

## Caches

| Level | Size | Ways | Line | Hit latency | Built as |
|---|---|---|---|---|---|
| L1I | 16 KB | 4 | 32 B | 2 cycles | `sa_cache`, 1 port, line-wide responses |
| L1D | 16 KB | 4 | 32 B | 2 cycles | `sa_cache`, 2 ports of 8 bytes |
| L2 | 96 KB | 6 | 64 B | 6 cycles | `sa_cache`, 1 port of 32 bytes |
| L3 | 4 MB | 4 | 64 B | 21 cycles | `l3_tag_cache`, tags only |
| memory | — | — | 64 B | 100 cycles | outside the design |

How `sa_cache` works:

* Hits that arrive together on all ports are accepted together and flow
  through a response pipeline of `HIT_LAT` stages. This sustains one access
  per port per cycle.
* Misses and stores go one at a time through a small engine.
* Stores are **write-through with no write-allocate**. The lower levels
  always hold current data and no dirty line is ever evicted.
* Replacement is round robin per set.
* Each response carries back the request's tag. The core uses the tag to
  tell stack-engine traffic from its own, and the fetch unit uses it to drop
  lines requested before a redirect.

`l3_tag_cache` looks up its tags to decide hit or miss. It then always reads
the line from main memory and holds the answer until 21 cycles (hit) or 100
cycles (miss) after the request was accepted. Main memory must therefore
answer within 21 cycles for hits to show the nominal latency.

**Latency convention.** A latency of *n* means that a request accepted at
clock edge *t* has its answer sampled at edge *t + n*.

## Instruction subset

Formats and instructions decoded, all with the standard encodings:

* **A-type** (in M or I slots): `add`, `sub`, `and`, `andcm`, `or`, `xor`,
  `shladd`, their imm8 forms, `adds` (imm14) and `addl` (imm22).
* **Compares:** `cmp`/`cmp4` `.eq`/`.lt`/`.ltu`, in normal and `.unc`
  forms, against a register or an imm8.
* **M-type:** `ld1/2/4/8`, `st1/2/4/8` (no post-increment, no speculation
  or hints), `alloc`, `mov ar.pfs`.
* **I-type:** `mov` to and from b-registers, `mov ar.pfs`.
* **X-type:** `movl`.
* **F-type:** `xma.l` with f2 = f0 (`xmpy.l`). It runs on the integer
  multiplier, with the register numbers read as general registers.
* **B-type:** `br.cond` (IP-relative and indirect), `br.call`, `br.ret`.
* **`nop` and `break`** in every unit.

Anything else decodes as illegal and halts the core. This is less than the
compiler-level subset a stock-compiled integer benchmark such as Dhrystone
needs. Missing pieces include shifts, extract and deposit, more compare
types, predicate and application-register moves, and post-increment
addressing.

## Simulating

Each testbench is self-checking. It prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog if
something hangs. To build and run one with plain Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ia64_pkg.sv tb/ia64_asm.sv \
          tb/tb_ia64_system.sv --top-module tb_ia64_system -o sim
./obj_dir/sim
```

Testbenches that do not use the assembler can leave out `tb/ia64_asm.sv`.
Verilator finds the other modules through `-y`/`-I` by file name.

| Testbench | What it shows |
|---|---|
| `tb_ia64_system` | **Full system at default sizes.** It runs a program from main memory and checks 26 registers, two memory words and that every counter moved, then compares the memory state dump with the halt address, predicates, counters and all 128 registers. The program has arithmetic, `movl`, multiply, several load and store sizes, a load-use stall, bypasses, a predicated-off producer, a compare-to-branch in one group, a learnt loop, a split issue and a recursive function that spills and fills. It runs about 5,500 cycles. |
| `tb_ia64_core` | Issue-rate cap: 72 adds in 24 cycles. Also a store/load round trip and the halt. Uses ideal memories. |
| `tb_dispersal` | Random programs come out in order, never cross stops and use legal ports. Directed checks of the 4+2 pattern and of slot dropping. |
| `tb_fetch_unit` | The predicted path, resume slots and stale-line dropping across random redirects. |
| `tb_branch_predictor` | Matches a reference model. A period-4 pattern is learnt perfectly. |
| `tb_rse` | Random call chains up to 10 deep. Frame state and every local survive spills and fills. |
| `tb_sa_cache` | Random two-port traffic against a reference memory. Exact 2-cycle hits and one hit per port per cycle. |
| `tb_mem_stride` | **Memory-stride workload** on the full system at default sizes. Regions of 8 KB, 64 KB, 1 MB and 8 MB are walked with strides chosen so that each is held by L1, L2, L3 or nothing. Measured steady state: 2.7, 9.2, 31.1 and 110 cycles per load, i.e. +6.5, +28.4 and +107 over an L1 hit. The latencies above plus the loop's own cost. |
| `tb_l3_tag_cache` | Exact 21- and 100-cycle answers. Hit and miss events match a reference tag model. |
| others | The decoder against the assembler; ALU, bypass, rename, register file, branch unit, arbiter and host control against reference models. |

`tb/ia64_asm.sv` is a small assembler package: one function per instruction
form, plus `bundle(template, s0, s1, s2)`. Use it to write new test
programs. `tb/main_mem_model.sv` is a behavioural main memory with a fixed
latency.

## Parameters worth changing

* `branch_predictor`: `BHT_ENTRIES`, `BHT_WAYS`, `HIST_BITS`, `NUM_PHT`,
  `BTB_ENTRIES`.
* `sa_cache`: `SETS`, `WAYS`, `LINE_BYTES`, `HIT_LAT`, `NPORTS`.
* `l3_tag_cache`: `SETS`, `HIT_LAT`, `MEM_LAT`.
* `ia64_system` and `ia64_core`: `PHYS_STACKED`, the number of stacked
  physical registers. The rename is modulo this value. It may be lowered
  (frames must then fit in it) but not raised above 96, since physical
  register numbers are 7 bits.
* `ia64_system`: `START_ADDR`, the snooped start location, and `DUMP_ADDR`,
  where the state dump goes.

All defaults are the first-generation Itanium figures above.

## Where this model departs from a real Itanium and from the FPGA prototype it follows

* **One clock.** The FPGA prototype ran its L1 at twice the core clock to
  get a dual-ported data cache. Here the L1D simply has two ports in the
  one clock domain.
* **No front-side bus.** There is no bus interface and no external SRAM.
  Main memory is reached through a plain valid/ready line port.
* **Host control.**
  * The host starts the core through a snooped write.
  * At halt the processor state is written to physical memory at
    `DUMP_ADDR` (0xFFFE0000) as 18 lines of 64 bytes. Line 0 holds the
    halting bundle's address, the predicates and counters 0-5. Line 1
    holds counters 6-11. Lines 2-17 hold the 128 physical general
    registers. `dump_done` rises when the last line is acknowledged. The
    layout is this design's choice.
  * The dump borrows the main memory port once the L3 has nothing
    outstanding. While it runs, it also drives the register read address,
    so `dbg_ra` reads are valid only before the halt or after `dump_done`.
  * Counters and registers can also be read through ports.
  * The counter set and its numbering are this design's choice: cycles,
    retired instructions, branches, mispredicts, register-read stalls,
    bypasses, predicate forwards, split issues, spills, fills, L3 hits and
    L3 misses.
* **Branch prediction.** Only the primary two-level predictor is built:
  * one predicted branch per bundle;
  * a direct-mapped BTB;
  * no target address registers, multi-way prediction table or static
    hints.
* **Serialisation.** `alloc`, calls and returns flush and refetch, which
  costs a few cycles per call.
* **Memory ordering.** The back end freezes on any cache miss. There is no
  miss-under-miss.
* **Not modelled:** exceptions, floating point, NaT bits, speculation and
  advanced loads, register rotation, and privileged state.
* **Bypass variants.** Only the full bypass network is built. Partial
  networks, where each pipeline forwards only to itself or to its
  neighbours, are not.

## Tool notes

Lint is clean apart from the following notices:

* unused package constants, unused bits of wide helper arguments, and a
  few submodule outputs the level above does not need (the flush event,
  the frame base, the L2 response tag, some predictor and stack-engine
  status);
* a `SYNCASYNCNET` notice. The reset is asynchronous in the logic and also
  appears in assertion `disable iff` clauses.

Synthesis of the full system is slow because every cache array is written
as flip-flops with a reset loop. On an FPGA they would map to block RAM.
