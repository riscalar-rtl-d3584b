# Riscalar: an out-of-order RV32IM core built on Tomasulo's algorithm

Riscalar runs RV32I plus the M extension (multiply and divide) out of order. Instructions enter in program order and wait in reservation stations until their operands exist. They then execute on whichever functional unit is free, and a reorder buffer (ROB) retires them in program order. Conditional branches are predicted by a tournament predictor. Instructions after a prediction run speculatively. A wrong prediction is repaired when the branch reaches the head of the ROB, before any wrong-path instruction has changed the register file or memory.

The core is small on purpose:

- one instruction fetched, dispatched and retired per cycle at most;
- an 8-entry ROB (its 3-bit entry number is the rename tag everywhere);
- five 8-row reservation stations;
- one result bus;
- 2048-word instruction and data memories built from two-cycle block RAMs.

## Pipeline at a glance

```
 inst BRAM ─► fetch_unit ─► instruction_queue (16) ─► dispatch (in riscalar_top)
     ▲            │  ▲                                  │ decoder, register_file, ROB alloc
     │            ▼  │                                  ▼
     │    branch_predictor          ┌──────────┬──────────┬──────────┬──────────┐
     │      (trained at commit)     rs_alu     rs_mul     rs_br      rs_load    rs_store
     │                               │          │          │          │          │
     │                              alu     muldiv_unit branch_alu address_unit  │
     │                               │    (multiplier,     │          │          │
     │                               │     divider)        │      load_buffer    │
     │                               │          │          │          │          │
     │                               │          │          │     memory_unit ◄───┼── stores at commit
     │                               ▼          ▼          ▼          ▼          ▼
     │                        ════════════ common data bus (cdb_arbiter) ════════════
     │                                               │
     └──── redirect on mispredict / jalr ◄──── reorder_buffer (8) ──► register_file
```

| Unit | Latency | Notes |
|---|---|---|
| ALU | 1 cycle | registered result; also computes lui, auipc and the link value of jal |
| Branch ALU | 0 cycles | combinational; the result goes on the bus in the cycle of issue |
| Multiplier | 6 cycles | pipelined, one new multiply per cycle |
| Divider | 33 cycles | restoring, one quotient bit per cycle; not pipelined |
| Memory unit | 2 cycles (load), 1 cycle (store) | block RAM with byte write enables |

## Fetch: two cycles ahead of the PC

The instruction memory answers two cycles after it is addressed. `fetch_unit` therefore keeps two reads in flight and pipelines the address two instructions ahead. Each arriving instruction is pre-decoded. A conditional branch is looked up in the predictor. A jal, or a branch predicted taken, restarts fetch at its target, and the read already in flight is thrown away. Each such jump therefore costs exactly two empty cycles. A redirect from the ROB costs the same.

Each queue entry holds four things:

- the instruction;
- its PC;
- the prediction;
- the alternate PC, meaning where execution goes if the prediction is wrong.

jalr is not predicted. Fetch simply continues at PC+4, and the ROB redirects when the jalr retires.

When the instruction queue is full, the arriving instruction cannot be written. The fetch unit then discards both reads in flight. Once the queue has room, it re-reads from the dropped instruction's PC (a *replay*). This is how the PC is "held" while the back end is stalled.

## Dispatch and renaming

The head of the queue is decoded (`decoder`) and sent to one of five stations (`reservation_station`). Dispatch needs a free ROB row and a free row in that station, and takes one cycle. Each source register is resolved in this order:

1. **Register file.** It is used if no instruction in flight will write the register (its busy bit is clear).
2. **ROB.** If the producing entry has already finished, its value is read there.
3. **CDB.** If the producer's result is on the bus in this very cycle, it is taken from there (a dispatch-time bypass).
4. **Otherwise** the station row records the producer's ROB number (Qi/Qj) and watches the bus.

The destination register is then renamed. Its busy bit is set and its tag becomes the new ROB number. At commit the busy bit is cleared only if the tag still matches, so a younger writer of the same register keeps it renamed. A flush clears every busy bit.

A station row has the fields OP, ROB#, Qi, Qj, Vi, Vj, i, j and B: 4+3+3+3+32+32+1+1+1 = 80 bits. There is no immediate field. An immediate, or the PC, rides in the operand slot that the instruction does not use:

- OP-IMM and loads: rs1 and the immediate.
- lui: 0 and imm.
- auipc: PC and imm.
- jal: PC and 4, so the ALU produces the link value.
- Branches: rs1 and rs2.
- jalr: rs1 and the immediate.

The branch target and the return address are not in the station. They are already in the ROB row, as described next.

## The reorder buffer and how it reuses its fields

Each ROB row has four fields: type (4 bits), value (32), destination (32) and ready (1), 69 bits in all. Several instruction kinds need more than a register number and a result, so the fields are reused:

| Type | `dest` | `value` |
|---|---|---|
| register result | rd | result from the bus |
| store (sb/sh/sw) | offset at dispatch; the full address once the store station broadcasts | store data |
| conditional branch | the alternate PC | {PC[31:2], taken, mispredict}; bit 0 holds the prediction until the branch resolves |
| jalr | {(PC+4)[26:0], rd} | jump target from the branch unit |

The store station has no functional unit. When its base and data are ready it puts the data on the bus's value field and the base on the bus's destination field. The ROB adds the base to the offset it already holds. The store then waits in the ROB and is sent to memory only when it retires.

A branch row compares the broadcast outcome with the stored prediction. At commit a wrong prediction flushes everything and restarts fetch at the alternate PC. A jalr always flushes and restarts at its target. A jalr writes its link value to rd at commit. Dispatch of a later reader treats a jalr row as "already computed" and takes the link value from `dest[31:5]`. So a jalr must sit below byte address 2^27, which any program in the 8 KiB instruction memory does.

The flush is total: the queue, all stations, the units, the load buffer, the ROB and the rename state. The design has no partial recovery.

## Loads, stores and the memory hazard check

A load's address is computed by `address_unit` as it leaves its station. The load then waits in `load_buffer` (4 rows). A load may go to memory only when no *older* store in the ROB is unsafe. A store is unsafe if its address is still unknown, or if it targets the same 32-bit word as the load. Age is measured as distance from the ROB head. Because stores write memory only at commit, a load that passes this check reads the right value from memory. Loads that pass may go in any order.

`memory_unit` wraps the data BRAM. A committing store always wins over a load in the same cycle. The store takes one cycle, a load takes two. Byte and halfword loads are extracted and sign- or zero-extended in the second cycle. The memory is write-first, so a load that follows a store to the same word reads the new data.

## One bus, fixed priority

`cdb_arbiter` grants one of five requesters per cycle, in this fixed order:

1. memory unit
2. multiply/divide
3. ALU
4. branch unit
5. store station

The memory unit has no output buffer, so it must always win. An assertion in `riscalar_top` checks this. The other units simply hold their result until granted: the ALU and divider keep their output register, and the multiplier pipeline stalls.

## Branch predictor

`branch_predictor` is a tournament predictor in the style of the Alpha 21264:

- **local:** a 64×6 history table indexed by PC[7:2]. The 6-bit history selects one of 64 two-bit counters.
- **global:** an 8-bit history of recent outcomes selects one of 256 two-bit counters.
- **choice:** 256 two-bit counters under the same global history pick local or global.

All tables are trained when a branch retires, so they only ever see committed outcomes. The chooser moves toward the component that was right when the two disagree. At reset every counter is weakly not-taken (or weakly local) and the histories are zero.

## Where this RTL departs from, or adds to, the original design

- **Instruction memory depth.** Both memories are 2048×32 (2^11 words), as the block diagram shows. The prose mentions a 1024-entry instruction memory.
- **Station row width.** Station rows are 80 bits, the sum of the fields listed for a row. The block diagram prints a different total.
- **Branch value packing and jalr.** The {PC, taken, mispredict} packing of a branch's value field and the whole jalr mechanism (packing, always-flush, no prediction) are this design's own.
- **Predictor details.** The training policy, reset values and the way the global history is formed are assumptions.
- **Load buffer depth.** The depth (4) is assumed. The hazard compare works on word addresses.
- **Added ports.** The program-load port, the debug register read port and the commit trace outputs were added so that the core can be run without a host.
- **Divider.** The algorithm is assumed. Its 33-cycle latency comes from one bit per cycle plus result formatting.
- **Fixed sizes.** The rename tag width is fixed at 3 bits, so the ROB depth cannot be changed by parameter alone.
- **Full stations cannot happen at the default sizes.** Every occupied station row also holds a ROB row, so the 8-entry ROB always fills first. Full-station stalls are tested in the station's own testbench instead.
- **Left out on purpose.** The single-cycle and five-stage pipelined comparison processors, the assembler toolchain and any FPGA board I/O are not part of this RTL.

Measured on the benchmarks in `tb/tb_riscalar_bench.sv`, the core sustains an IPC of about 0.4–0.5 on dependent ALU code and about 0.3 on the multiply/add/load/store mix.

## Files

- `rtl/riscalar_pkg.sv`: shared types. It defines the CDB word, the ROB instruction types, the station selectors, the decoded-instruction struct and the opcodes.
- `rtl/riscalar_top.sv`: the core. It wires all units and holds the dispatch logic.
- `rtl/*.sv`: one unit per file, named as in the diagram above. `bram.sv` is the two-cycle block RAM used for both memories.
- `tb/tb_<unit>.sv`: a self-checking testbench per unit. Each compares against an independent model and checks latencies.
- `tb/tb_riscalar_top.sv`: the end-to-end test at default sizes. It covers directed programs and seeded random programs. Every committed register write and the final register file are compared with a reference instruction-set model (`tb/rv_asm.svh`). It also counts queue-full, ROB-full, bus contention, dispatch bypass, predicted-taken branches, flushes, load hazards, store priority, fetch replay and divider use, and fails if any never happens.
- `tb/tb_riscalar_bench.sv`: ALU and multiply/add/load/store programs of about 10, 20 and 100 instructions, with cycle counts.

Every testbench ends by printing `TB_RESULT checks=<n> failures=<n>`.

## Simulating

With Verilator 5 (the testbenches use timing control), from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/riscalar_pkg.sv \
    $(ls rtl/*.sv | grep -v riscalar_pkg) tb/tb_riscalar_top.sv --top-module tb_riscalar_top
./obj_dir/Vtb_riscalar_top
```

Substitute any other `tb/tb_*.sv` and its module name to run a unit test. The data memory is not cleared at reset, so programs must store before they load. Loading a program: hold `rst` high, then write one instruction per cycle with `prog_we`/`prog_addr`/`prog_data`. Execution starts at address 0 when `rst` falls.
