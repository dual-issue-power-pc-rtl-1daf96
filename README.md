# PUMA dual-issue PowerPC fixed point unit

This is a PowerPC integer core (a "fixed point unit") that fetches, decodes,
schedules and commits **two instructions per clock cycle** and executes them
**out of order**, Tomasulo style. It is a dual-issue version of the
single-issue PUMA core. Widening it to two touched four places:

- the decoder: two decoders plus a selection state machine;
- scheduling: a dispatch unit that fills two slots per cycle;
- the execution core: two ALUs and two completion buses;
- commit: two instructions per cycle into a register file with two write ports.

The caches were also made larger.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017). Its parts are:

- the complete pipeline;
- level-1 instruction and data caches;
- the instruction stream (prefetch) buffer;
- the two memory access queues to the external MMU / L2 port;
- a branch target buffer;
- a gshare branch predictor.

It runs a subset of the PowerPC user instruction set, listed below.

## Pipeline

| Stage | Work done | RTL |
|---|---|---|
| ICA | Next-PC selection. Instruction cache, BTB and predictor are read. | `pc_select`, `icache`, `btb`, `bp` |
| ICH | Hit check against the cache tag. On a miss, the stream buffer is asked. | `fetch_latch`, `stream` |
| IB | The 128-bit line is split into instructions. At most two leave per cycle. | `instr_buffer` |
| D1 | Each instruction is translated into unit operations (uops). | `idecode`, `udecode`, `decoder` |
| D2 | Up to two uops are selected and registered. | `decode_issue` |
| S | Schedule: registers and ROB are read, a ROB entry is allocated, uops go to stations. | `dispatch`, `rob`, `regfile` |
| X | Execute in ALU1, ALU2, the branch unit (BRU) or the load/store unit (LSU). | `alu`, `bru`, `lsu` |
| W1 | Up to two results broadcast on the completion buses to the stations and the ROB. | `cdb_arb` |
| W2 | Up to two oldest finished uops commit to the register file. | `writeback`, `regfile` |

Each stage takes one cycle when there are no misses. A taken branch that the
BTB predicts costs no bubble. Fetch continues at the target in the next
cycle.

`puma_fxu` is the top. `exec_core` groups the four reservation stations, the
four functional units and the completion-bus arbiter. `fetch` groups
`pc_select`, `fetch_latch` and `instr_buffer`.

## Decoding and issue (D1/D2)

An instruction is either:

- **simple**: one uop;
- **multicycle**: several uops. In this subset that is load/store with update
  (2 uops) and load/store multiple word (32 − rS uops).

Each of the two decoders has two parts:

- a primary decoder (`idecode`) that yields the first uop;
- a micro decoder (`udecode`) that yields uop *k* of a multicycle instruction
  from an index counter.

The selection state machine in `decode_issue` applies three rules:

1. **Two simple instructions** go out together, one uop each.
2. **A simple and a multicycle instruction**: the oldest is handled first.
   A simple instruction goes out alone. A multicycle one goes out two uops per
   cycle, until it is finished.
3. **Two multicycle instructions**: the first is issued completely, two uops per
   cycle, before the second starts.

The output register (`d_i1`, `d_i2`) holds the two uops offered to dispatch.
If dispatch takes only the first, the second moves into slot 1 and is offered
again. `decode1_hold` and `decode2_hold` report that the slots are still
occupied, so the decoders stall.

## Dispatch, reservation stations and the reorder buffer

**Dispatch** is combinational, in stage S. For each offered uop it:

- reads the register file, which has four read ports;
- looks the source registers up in the ROB's register alias table (RAT);
- allocates a ROB entry;
- pushes the uop with its operands into the station of its unit.

Each operand is either a value or the ROB tag that will produce it. If the
second uop reads a register the first one writes, it gets the first uop's new
tag.

Dispatch rules:

- Two uops need **two free ROB entries**. With one free entry only the first
  goes.
- Two ALU uops go **one to each ALU**.
- Two uops for the BRU, or two for the LSU, go one per cycle.
- A full station stops that uop and every uop after it.

**Reservation stations** have 4 entries each, one station per functional unit.
They issue **in order**: only the oldest entry may leave, once both operands
are ready. The stations watch both completion buses, including in the cycle
a uop is pushed.

**Result registers**:

- Each functional unit holds its result in a result register until it wins a
  completion bus.
- There are two buses, with fixed priority LSU > BRU > ALU1 > ALU2.
- A unit whose result register is still full does not take new work.
- Execute and write back are therefore separate cycles.

**Reorder buffer (`rob`)**:

- It is a 12-entry circular FIFO. Its entries double as the physical
  registers that hold speculative values.
- A RAT with one V bit per architectural register (48 of them) records which
  registers have an in-flight producer, and which ROB tag that is. An entry's
  R bit says that its value is there.
- A lookup returns, in this order of preference:
  - the ROB value (when R is set);
  - a value being broadcast on a completion bus in the same cycle (a bypass);
  - the tag;
  - "not mapped", in which case dispatch uses the register-file value.
- The two oldest entries go to the write back unit.

**Write back (`writeback`)**:

- It commits up to two finished entries per cycle, in order.
- Commit writes the register file on the falling clock edge, the second half
  of the cycle. The later of two writes to the same register wins.
- It updates the predictor with the first committed branch. A second branch
  waits for the next cycle.
- An entry flagged with an exception is committed, then everything younger is
  flushed and fetch restarts at the redirect address. This covers a
  mispredicted branch, or a non-branch that the BTB wrongly predicted taken.

## Branches

**BTB (`btb`)**:

- 64 entries, direct mapped by fetch line (PC bits [9:4]) with tag PC[31:10].
- An entry names the instruction slot of the branch in the line, its target,
  and whether it is unconditional.

**Predictor (`bp`)**:

- gshare: 1024 two-bit counters, indexed by PC[11:2] XOR a 10-bit global history.
- The counters start at weakly not-taken.

**Prediction rules**:

- A BTB hit on an unconditional branch, or a hit with the counter saying
  taken, redirects fetch to the target. The rest of the line is dropped.
- The counters are trained at every committed conditional branch.
- The history register shifts only when a conditional branch commits
  mispredicted, i.e. when the core flags an exception.
- The BTB is written when a taken branch was mispredicted.
- The BTB entry is removed when a BTB hit turns out not to be a branch.

**Branch unit**:

- It computes the direction and target, and writes the link value.
- It compares these with the prediction carried by the uop. A difference sets
  the exception flag in the ROB.

## Memory side

**Instruction cache (`icache`)**:

- direct mapped, 8192 lines of 128 bits (128 KB);
- asynchronous read, written only by the stream unit.

**Stream unit (`stream`)**:

- It holds 8 lines.
- On an icache miss that hits a line in the stream buffer, the line goes to
  fetch and is written into the icache in the same cycle.
- A miss that also misses the stream buffer empties the buffer. The unit then
  requests the missing line and the seven lines after it, missing line first.
- A miss on a line that was already requested waits for it.

**IMAQ (`imaq`)**:

- An 8-deep queue that carries stream requests to the DMAQ.
- It returns each line with the address it belongs to.
- It has separate clocks for the stream side, the request side and the
  response side. Each crossing adds two cycles of the receiving clock.

**DMAQ (`dmaq`)**:

- It owns the single MMU port: 32-bit address, 32-bit write data with byte
  enables, 128-bit read data.
- Data requests beat instruction requests.
- It keeps an 8-entry FIFO of outstanding reads, so each returning line goes to
  the data cache or the IMAQ. The MMU must answer reads in order; an assertion
  checks this.

**Data cache (`dcache`)**:

- direct mapped, 8192 lines of 128 bits (128 KB);
- byte write enables, big-endian byte order;
- write-through with no allocate on a store miss.

**Load/store unit (`lsu`)**:

- It has one miss status holding register (MSHR). Loads that hit keep
  completing while one miss is outstanding ("hit under miss").
- A store is performed only when it is the oldest uop in the ROB and no miss is
  outstanding. It then writes the cache (on a hit) and the MMU.
- Loads are not reordered past older stores, because a store is always
  non-speculative and oldest when it goes.

**Start-up**: after reset, the stream unit clears the icache and the DMAQ
clears the dcache, one line per cycle each. That takes 8192 cycles at the
default size. `running` rises when both are done, and fetch starts at
`RESET_PC`.

## Instruction subset

| Class | Instructions |
|---|---|
| Arithmetic and logic | `addi addis ori xori andi. add subf and or xor slw srw` |
| Compare (CR0 only) | `cmpw cmplw cmpwi cmplwi` |
| Loads and stores | `lwz lbz stw stb` |
| Loads and stores with update (2 uops) | `lwzu lbzu stwu stbu` |
| Load/store multiple (32 − rS uops) | `lmw stmw` |
| Branches | `b ba bl bla`; `bc` and `bclr` with BO forms that do not use the count register (BO[2] ignored) |

Notes:

- Any other encoding executes as a no-op.
- `andi.` does not set CR0.
- The SO bit is not modelled.
- Registers 32–47 are the miscellaneous registers: 32 = CR, 33 = LR,
  34 = CTR, 35 = XER, 36–47 = scratch.

## Top-level interface

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `mmu_req_valid/we/addr/wdata/be` | out | 1/1/32/32/4 | memory request: line read (`we=0`) or byte-enabled word write |
| `mmu_req_ready` | in | 1 | request accepted |
| `mmu_resp_valid`, `mmu_resp_data` | in | 1, 128 | read line returned, in request order |
| `running` | out | 1 | cache initialisation finished |
| `retired` | out | 2 | uops committed this cycle |
| `events` | out | 16 | one pulse per mechanism, for counting |

The `events` bits:

| Bit | Event | Bit | Event |
|---|---|---|---|
| 0 | icache miss | 8 | dual dispatch |
| 1 | stream hit | 9 | dcache miss |
| 2 | stream refill | 10 | hit under miss |
| 3 | dual decode | 11 | completion-bus contention |
| 4 | multi-uop issue | 12 | dual commit |
| 5 | ROB-full stall | 13 | misprediction flush |
| 6 | station-full stall | 14 | predicted-taken fetch |
| 7 | unit conflict | 15 | decode hold |

Parameters of `puma_fxu` (the defaults are the design's sizes):

| Parameter | Default |
|---|---|
| `IC_LINES` | 8192 |
| `DC_LINES` | 8192 |
| `SB_ENTRIES` | 8 |
| `BTB_ENTRIES` | 64 |
| `RS_DEPTH` | 4 |
| `RESET_PC` | 0 |

The ROB size (12), register count (48) and predictor size (1024 counters,
10-bit history) are constants in `puma_pkg`.

## Where this design departs from, or adds to, the original PUMA description

- **Clocking.** The IMAQ keeps the original's three clock domains: stream
  side, MMU request side and MMU response side. It crosses them with two
  Gray-pointer FIFOs (`async_fifo`). The top level drives all three from
  `clk`, because the DMAQ and the memory port are built in the core clock
  domain.
- **Arrays, not SRAM macros.** The caches are plain arrays read
  asynchronously. The original used compiled SRAMs, and inserted nine partial
  scan chains during synthesis; none are included.
- **Cache sizes.** The instruction cache is 8192 × 128-bit lines (128 KB) and
  the data cache the same. One summary figure of the original gives 64 KB for
  the instruction cache; the line count is followed here.
- **Predictor size.** 1024 two-bit counters, i.e. 2 Kbit.
- **Instruction set.** The original handles about 130 PowerPC instructions.
  This design decodes the subset above. Beyond the original's description,
  the following are this design's own choices:
  - the uop encoding;
  - the misc-register numbering;
  - the BTB entry format;
  - the gshare hash;
  - the write-through data cache;
  - the store-at-ROB-head rule;
  - the single MSHR;
  - the in-order MMU protocol.
- **Dispatch with one free ROB entry** issues one uop. Two uops need two free
  entries.
- **Exceptions** other than branch mispredictions (interrupts, alignment,
  illegal instruction) are not modelled.
- **No CTR-decrementing branches**, and no `mtspr`/`mfspr`.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. Directed cases come first.
Some testbenches then add a random phase against a small model:

- the reservation station, ROB, dispatch, write back, decode/issue and DMAQ
  testbenches;
- `tb_imaq`, which runs the IMAQ with three unrelated clocks.

- `tb_puma_fxu` runs the whole core at its default sizes, against
  `mmu_model`. `mmu_model` is a behavioural memory with a 12-cycle read latency
  and in-order replies.
- The test program covers:
  - a counted loop with load-with-update, stores, compares and a conditional
    branch;
  - `lmw`/`stmw`;
  - a call and return through LR;
  - a jump to a distant code region, which misses the stream buffer;
  - load misses followed by independent loads.
- An instruction-level reference model inside the testbench runs the same
  program. At the end, GPRs, CR, LR and a 12 KB data region are compared with
  the reference.
- The testbench also checks that each of the 16 event counters fired at least
  once.
- After the 8192-cycle start-up, the program runs for about 300 cycles.

`tb_puma_random` runs 40 random programs with 64-line caches, about 400
executed instructions each. After each program it compares the registers and
the data region with the same kind of reference model. The programs mix:

- ALU and compare operations;
- word and byte memory operations, including update forms;
- `lmw`/`stmw`;
- forward conditional branches;
- counted loops;
- calls and returns.

Every other program draws its registers from only r0–r9, to stress
dependencies and renaming. About 3000 misprediction flushes and 500
stream-buffer refills occur over the run.
- `ppc_asm_pkg` holds small encoder functions used to write test programs.

To simulate with Verilator (5.x), replacing `tb_alu` with any testbench:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_alu -Irtl -Itb \
  rtl/puma_pkg.sv tb/ppc_asm_pkg.sv $(ls rtl/*.sv | grep -v puma_pkg) \
  tb/mmu_model.sv tb/tb_alu.sv -Mdir obj_tb_alu
./obj_tb_alu/Vtb_alu
```

The package files must come first. Assertions in `rob` and `dmaq` check:

- the ROB never overflows;
- only finished entries commit;
- MMU replies arrive in order.

## Known limitations

- Timing, area and power have not been characterised.
- The reference model checks only end-of-program state, not each retired
  instruction. Only the instruction subset above is exercised.
- The 8192-cycle start-up clear dominates simulation time at the default
  size. The caches can be made smaller through `IC_LINES` / `DC_LINES` for
  quicker experiments; the block testbenches do this.
