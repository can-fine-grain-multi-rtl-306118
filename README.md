# SLA: a Synchronized Lane Architecture processor in SystemVerilog

A VLIW processor fetches one wide word per cycle, holding one operation per
functional unit. When the compiler has nothing for a slot, it pads the slot with
a no-op. Those no-ops cost code size, instruction-cache space and fetch energy.

An SLA processor runs the same statically scheduled code as N separate
instruction streams instead. These are called *lanes*. Each lane has:

- its own program counter;
- its own small L1 instruction cache;
- its own decoder.

All lanes share one register file and move in lock-step. In each cycle every
running lane issues one instruction, and together these form a *pack*, the
equivalent of one VLIW word. Because the lanes never drift apart, operations in
one pack may depend on results of the previous pack, exactly as in a VLIW
schedule.

A lane with nothing to do does not fetch a no-op. It suspends itself and waits
until the schedule needs it again.

This repository is a synthesizable RTL model of such a processor:

- four lanes by default, up to eight;
- a MIPS-like integer instruction set extended with the lane-control
  instructions below;
- a branch predictor in lane 0;
- one shared, pipelined port to an external L2 cache.

## How lanes are kept in step

### The sr bit and lane status

Bit 31 of every instruction is the **sr** (suspend/resume) bit. Its meaning
depends on the lane:

- **In lanes 1..N-1**, sr means *suspend this lane after this instruction*.
- **In lane 0**, sr means *resume every suspended lane for the next pack*.

If a lane's own sr and lane 0's resume arrive in the same pack, the lane's own
suspend wins.

Each nonzero lane has a 2-bit lane status register, LS:

| LS | state     | meaning                                        |
|----|-----------|------------------------------------------------|
| 11 | active    | fetches and executes an instruction every pack |
| 10 | suspended | fetches nothing; wakes up on lane 0's sr       |
| 00 | inactive  | fetches nothing; ignores lane 0's sr           |

Lane 0 is always active. Suspended and inactive lanes do not access their
instruction cache at all.

Lock-step is enforced by one rule: **if any fetching lane misses in its
I-cache, every lane stalls** until the line arrives.

### Control flow lives in lane 0

Only lane 0 may hold these instructions:

- `beqz` and `bnez` (branches);
- `j` and `jr` (jumps);
- `call`, `callr` and `callm`;
- `return`;
- `colane`.

With every pack, lane 0 sends the other lanes a *branch-type message*: none,
taken, call, callm, return, or colane with a lane number and an address. The
other lanes react to that message:

- **taken branch or jump:** every active or suspended lane loads its PC from its
  own **PB** (prepare-branch) register. The compiler fills PB beforehand with a
  `pb target` instruction in that lane. A `pb` is a jump word: jumps are
  illegal outside lane 0, so in lanes 1+ a `j` means `pb`. A separate `pb`
  opcode does the same. Each lane therefore has its own branch
  target. `pb` writes PB as soon as it is fetched, so a `pb` one pack before the
  branch is early enough. A `pb` may not share a pack with the branch that uses it.
- **colane k, addr:** lane k becomes active at `addr`. This is how a function
  starts its helper streams.
- **call / callr:** the return PC of every lane goes into that lane's **RT**
  register. Every lane status goes into the **PLS** register. Lane 0 jumps, and
  lanes 1+ become inactive.
- **callm:** a call that does not save lane states. Lane 0 jumps and lanes 1+
  become inactive, as for `call`. Only lane 0's RT is written; PLS and the
  other RT registers keep their values.
- **return:** every lane reloads its PC from RT and its status from PLS.

A lane leaves a function with `halt`. `halt` carries sr, so the lane suspends at
fetch. When `halt` executes, the lane becomes inactive. From then on, lane 0's sr
bits no longer wake it.

A non-leaf function saves and restores the RT and PLS registers through memory:

- `swrt k, (rs)` stores RT[k];
- `lwrt k, (rs)` loads RT[k];
- `sas (rs)` stores PLS;
- `las (rs)` loads PLS.

Loads and stores have no displacement. The address is always a register.

## Pipeline

The pipeline has three stages: IF, EX and WB.

```
IF : active lanes read their I-caches (combinational lookup)
     lane 0 looks up BTB, gshare and RAS -> predicted next PC + branch-type message
     sr bits and the message give every lane its next PC and LS
EX : decode, register read with WB bypass, ALU, branch resolution in lane 0,
     data-memory access (loads return in WB)
WB : register file, RT and PLS writes; results forwarded to EX of the next pack
```

There are no delay slots and no interlocks: every result can be used by the
next pack.

The increment control (`increment_control`) does three things each cycle:

- it decides which lanes fetch;
- it raises `stall` if a fetching lane misses;
- it turns the sr bits into per-lane suspend signals and lane 0's resume.

### Prediction and rollback

This is the subtle part of the design. A taken branch, a call, a return or a
colane changes the PC **and the status** of several lanes at once. So lane 0's
prediction is really a prediction of the whole machine state.

**Lane 0's predictors:**

- a direct-mapped BTB. Each entry holds the control class, the target and, for
  a colane, the lane it starts.
- a gshare predictor for conditional branches.
- a return address stack (RAS).

**What each lane remembers at fetch:**

- the *sequential* state: the PC and LS the lane would have after this pack with
  no control transfer, sr bits included;
- the *predicted* state it actually moved to.

**What happens in EX:**

1. Lane 0 resolves the real control transfer.
2. Every lane computes the state the real message would have produced from its
   sequential state.
3. If any lane's predicted state differs from that, the younger pack in IF is
   flushed.
4. Every lane's PC and LS are rewritten from the recomputed state, and fetch
   restarts.

Some things need no repair:

- PB registers: a `pb` always comes before the branch that uses it.
- RT and PLS: they are written only in WB of packs that were not flushed.

Nonzero lanes also keep a RAS, with 34-bit entries holding the return PC and
the lane status to restore. It predicts the return state at fetch. The RT and
PLS values reaching EX are authoritative, and a wrong prediction is rolled back
like any other.

BTB, gshare and the RAS are trained when the instruction executes. The
misprediction penalty is one pack.

### Instruction cache and L2 port

Each lane's cache is set-associative with round-robin replacement. It keeps one
fill in flight and always finishes it, even if fetch has moved on.

All lane caches share a single L2 request port, which `l2_arbiter` drives:

- it accepts one request per cycle, granted round-robin;
- each request is tagged with the lane number;
- fills come back on `l2_resp_*` with that tag.

Several lanes that miss together therefore pipeline their requests through the
one port.

With an L2 that answers 10 cycles after accepting a request, a lone miss costs
12 cycles: one cycle to issue the request, ten in the L2, one to refill and
retry.

## Instruction encoding

The encoding is this design's own. Only the sr bit's position is fixed by the
architecture. Bit 31 is sr and bits [30:26] are the opcode (see
`rtl/sla_pkg.sv`).

| format | fields | used by |
|--------|--------|---------|
| R  | rd[25:21] rs[20:16] rt[15:11] shamt[10:6] funct[5:0] | add sub and or xor nor seq slt sltu sll srl sra |
| I  | rd[25:21] rs[20:16] imm[15:0] | addi andi ori xori slti sltiu lui, lw lb lbu (address = rs), lwrt (k = rd[2:0]), las |
| S  | rs[20:16] = address, rt[15:11] = data | sw sb, swrt (k = rt[2:0]), sas |
| B  | rs[20:16] off[15:0], in words from PC+4 | beqz bnez |
| J  | target[25:0], word address in the current 256 MiB region | j call callm pb (in lanes 1+, j is pb) |
| JR | rs[20:16] | jr callr |
| CL | lane[25:23] disp[22:0], in words from the colane's own PC | colane |
| -  | opcode only | return halt |

Word `0x00000000` is a no-op (`sll r0,r0,0`). `0x80000000` is the same no-op
with sr set. The package provides encoder functions (`enc_r`, `enc_i`, `enc_s`,
`enc_b`, `enc_j`, `enc_jr`, `enc_colane`, `enc_op`) for writing test programs.

## Modules

| module | role |
|--------|------|
| `sla_core` | top: lanes, pipeline registers, bypass, lane-0 resolution, rollback, counters |
| `sla_pkg` | types, opcodes, decoded-instruction struct, branch-type message, encoders |
| `increment_control` | which lanes fetch, global stall, sr suspend/resume |
| `lane0_frontend` | lane-0 PC, BTB, gshare, RAS, prediction and its check |
| `laneN_frontend` | PC, LS, PB and RAS of one nonzero lane; follows lane 0's message |
| `btb`, `gshare`, `ras` | predictor structures |
| `icache` | per-lane L1 instruction cache with fill FSM |
| `l2_arbiter` | round-robin merge of I-cache fills onto one L2 port |
| `decoder`, `exec_unit` | per-lane decode and execute |
| `regfile` | shared 32x32 register file, 2 reads + 1 write per lane |
| `rt_pls` | RT registers and PLS register |
| `dmem` | data memory, one port per lane, synchronous read |

## Parameters of `sla_core`

| parameter | default | meaning |
|-----------|---------|---------|
| `NLANES` | 4 | lanes, 1..8 |
| `IC_BYTES_L[8]` | 8192 each | I-cache size of lane l |
| `IC_LINE_L[8]` | 64 each | I-cache line size of lane l (at most `LINE_BYTES`) |
| `IC_WAYS` | 4 | I-cache associativity |
| `LINE_BYTES` | 64 | width of the L2 fill port |
| `BTB_ENTRIES` | 4096 | direct-mapped BTB entries |
| `GHR_BITS` | 17 | gshare history length; the table has 2^17 counters |
| `RAS_DEPTH` | 8 | return-stack entries |
| `DMEM_BYTES` | 32768 | data memory |
| `RESET_PC` | 0 | lane-0 start address |

The defaults are the symmetric four-lane configuration: 4 x 8 KiB of
instruction cache, 4-way, 64-byte lines. The per-lane arrays also express:

- **an asymmetric four-lane setup:**
  `IC_BYTES_L = '{16384, 8192, 4096, 4096, ...}`;
- **eight lanes of 4 KiB:** `NLANES = 8`;
- **an eight-lane asymmetric setup:** 8/4/4/4/4/4/2/2 KiB, with 32-byte lines in
  the two 2 KiB caches.

Other ports of `sla_core`:

- `lane_status`: the LS of every lane.
- `packs`, `stall_cycles`, `mispredicts`: event counters.

## Where this model departs from the architecture as published

- **Pipeline depth.** The reference machine has five stages (IF, ID, RF, EX,
  WB). This model folds decode and register read into EX. The misprediction
  penalty is therefore one pack rather than three.
- **PB timing.** The published proposal pre-decodes `pb` instructions when a
  line is filled into the I-cache and marks them with a PB-target bit. Here the
  lane writes PB directly when it fetches a `pb`. The effect is the same: PB is
  current by the end of fetch. The difference is that the cache stores no extra
  bit.
- **Data cache.** The data side is a plain 32 KiB multi-port memory with no
  tags, misses or refills. Program and data memories are separate: programs are
  fetched through the L2 port, and data lives only in `dmem`.
- **L2 cache.** The L2 (1 MiB, 16-way in the reference configuration) is not
  part of the RTL. `sla_core` exposes its port, and the testbench supplies a
  fixed-latency model.
- **No exceptions.** There are no interrupts and no multiply, divide or
  floating point.
- **Own choices where the architecture is silent:**
  - the instruction encoding;
  - the gshare details: 2-bit counters, trained at resolution, counters not
    reset;
  - the BTB tag;
  - round-robin replacement and arbitration;
  - RAS wrap-around on overflow;
  - same-register writes by several lanes in one pack: the highest lane wins;
  - one outstanding miss per I-cache.

## Simulating

Every testbench in `tb/` is self-checking and prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/sla_pkg.sv tb/tb_sla_core.sv \
          --top-module tb_sla_core -o sim && ./obj_dir/sim
```

For a unit test, replace `tb_sla_core` with `tb_icache`, `tb_btb` and so on.

`tb_sla_core` runs the core at its default size against `tb/l2_model.sv`, a
behavioural L2 with a 10-cycle latency. The program:

1. Starts three helper lanes with `colane`.
2. Runs a 24-iteration loop. In it:
   - lane 1 works every pack;
   - lane 2 suspends itself and is woken by lane 0's sr;
   - lanes 1 and 2 follow the loop branch through PB;
   - lane 3 stores a result and halts.
3. Calls a function that:
   - starts a lane;
   - saves RT and PLS;
   - makes a nested `callr`;
   - restores RT and PLS;
   - returns.
4. Jumps so that three lanes miss in their caches together.

The testbench checks:

- data-memory results and registers;
- the final lane states;
- the 12-cycle cost of a lone I-cache miss;
- that each mechanism happened at least once: stall, back-to-back L2 requests,
  suspend, resume, colane, halt, pb, predicted and mispredicted branches,
  call/return, swrt/lwrt/sas/las and bypass.

`tb_sla_configs` runs one generated program on three more configurations in
parallel:

- four lanes with 16/8/4/4 KiB caches;
- eight lanes of 4 KiB;
- eight lanes of 8/4/4/4/4/4/2/2 KiB, with 32-byte lines in the 2 KiB caches.

In that program, lane 0 starts every other lane, and each lane k adds k to its
own register in the branch pack of a 20-iteration loop. Each lane then stores
its sum and halts. The testbench checks:

- every sum;
- the final lane states;
- the number of cache fills per lane, which shows the per-lane line size at
  work.

The program and checks are in `tb/sla_prog_run.sv`.

To write another program, use the `enc_*` functions of `sla_pkg` and store words
into `u_l2.mem` before releasing reset, as `tb_sla_core` does.

Each unit testbench overrides parameters to keep runs short, for example a
64-entry BTB or a 10-bit gshare.
