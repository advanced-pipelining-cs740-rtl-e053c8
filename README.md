# A five-stage pipelined Alpha-subset processor

This is a classic in-order five-stage pipeline (IF, ID, EX, MEM, WB) that
executes a small subset of the 64-bit Alpha instruction set. It shows the
standard ways a pipeline stays correct and fast:

- forwarding (bypass) paths, plus the single stall that forwarding cannot remove;
- two ways of handling branches: stall until the branch resolves, or predict
  not taken and cancel the wrong-path instructions;
- precise exceptions and interrupts;
- an eight-stage integer multiplier beside the one-cycle EX stage. Instructions
  issue in order, but a multiply completes out of order.

Everything is synthesizable SystemVerilog in `rtl/`. Self-checking testbenches
are in `tb/`. The whole processor is checked against a sequential instruction-set
model, on directed and random programs, including the exact number of cycles
each run takes.

## Instruction subset and encoding

All instructions are 32 bits. The fields are `op` = IR[31:26], `ra` = IR[25:21]
and `rb` = IR[20:16]. Register-register (RR) forms use the function code
IR[11:5] and `rc` = IR[4:0]. Register-literal (RI) forms set IR[12] and take an
8-bit unsigned literal from IR[20:13] in place of `rb`. Register r31 always
reads as zero, and writes to it are dropped.

| instruction | op | function | effect |
|---|---|---|---|
| addq, subq, cmplt | 0x10 | 0x20, 0x29, 0x4D | rc ← ra op rb/lit (cmplt: signed less-than, 0/1) |
| addq/v, subq/v | 0x10 | 0x60, 0x69 | as addq/subq; signed overflow raises an exception |
| bis, xor, cmoveq | 0x11 | 0x20, 0x40, 0x24 | rc ← ra or/xor rb/lit; cmoveq: if ra = 0 then rc ← rb/lit |
| mulq | 0x13 | 0x20 | rc ← low 64 bits of ra × rb/lit (8-stage multiplier) |
| ldq | 0x29 | | ra ← Mem[rb + sext(IR[15:0])] |
| stq | 0x2D | | Mem[rb + sext(IR[15:0])] ← ra |
| beq, bne | 0x39, 0x3D | | if ra = 0 (≠ 0): PC ← PC+4 + 4·sext(IR[20:0]) |
| br, bsr | 0x30, 0x34 | | ra ← PC+4; PC ← PC+4 + 4·sext(IR[20:0]) |
| jmp (jsr, ret) | 0x1A | | ra ← PC+4; PC ← rb with the low two bits cleared |
| call_pal 0 | 0x00 | IR[25:0] = 0 | halt |
| call_pal n ≠ 0 | 0x00 | | exception (system call) |
| rei | 0x1E | | return from exception |

`bis r31,r31,r31` (0x47FF041F) is the canonical no-op. Any other opcode, or a
function code not listed, is an illegal instruction. Memory accesses are whole
quadwords, so the low three address bits are ignored.

## The pipeline

| stage | work |
|---|---|
| IF | fetch at PC, compute PC+4 (`incr_pc`) |
| ID | decode (`decoder`); read registers ASrc and BSrc (`reg_file`) |
| EX | ALU (`alu`), branch condition and target (`branch_unit`), forwarding muxes (`fwd_unit`); multiplies start in `mul_unit` |
| MEM | data memory (`dmem`); a taken branch or jump, halt, exception or rei redirects the PC |
| WB | register write |

Each pipeline register (`pipe_reg`) is a packed struct. It obeys one of three
commands per clock:

- **transfer**: load the next value;
- **stall**: keep the current value;
- **bubble**: clear to zero.

All-zero is a bubble: its `valid` and write-enable bits are 0, so every stage
treats it as a no-op. The commands for all four registers, and whether the PC
advances, come from a single combinational block, `hazard_unit`.

## Stall control

This is the core of the design. In every cycle `hazard_unit` picks one action,
in this priority order.

1. **Redirect.** The instruction in MEM changes the flow: a taken branch or
   jump, a halt, an exception or rei. The PC loads the new address. IF/ID,
   ID/EX and EX/MEM become bubbles, which cancels the three younger
   instructions. For an exception, MEM/WB is also bubbled, so the faulting
   instruction never writes. Nothing else matters in that cycle, because every
   younger instruction is being discarded.
2. **Data stall.** The instruction in ID cannot yet get a correct operand.
   The PC and IF/ID hold, and ID/EX receives a bubble. The instruction retries
   in the next cycle, while everything ahead of it keeps moving.
   - With forwarding (the default), this happens in one case only. The
     instruction in EX is a load, and the instruction in ID reads the load's
     destination as an ALU operand or as an address base. A load result exists
     only at the end of MEM, one cycle too late for the EX of the next
     instruction.
   - One exception to that case: a store whose *data* register is the loaded
     value does not stall. It receives the value by MEM-to-MEM forwarding
     (see below).
   - Without forwarding (`FORWARDING=0`), the instruction in ID waits whenever
     either register it reads is the destination of an instruction in EX or
     MEM. One instruction behind a producer costs 2 cycles; two behind costs 1.
     The register file passes a value being written in WB straight to a read
     of the same register in ID in that cycle, so a producer in WB no longer
     causes a wait.
3. **Multiply stall.** The action is the same as for a data stall, but it is
   counted separately. The instruction in ID waits in two cases:
   - it reads or writes a register that a multiply still in flight will write.
     Both read-after-write and write-after-write are covered, and r31 never
     matches;
   - it would arrive in MEM in the same cycle as a finished multiply. The
     multiply needs that cycle's path into MEM/WB.
4. **Branch stall** (`BRANCH_STALL=1` only). While a branch or jump is in ID
   or EX, the PC holds and a bubble enters ID. Fetching resumes once the
   branch has resolved in MEM.

| event | cycles lost (default) | cycles lost (`FORWARDING=0, BRANCH_STALL=1`) |
|---|---|---|
| load, then a use of its result in the next instruction | 1 | 2 |
| ALU result used by the next instruction | 0 | 2 |
| ALU result used two instructions later | 0 | 1 |
| load, then a store of the loaded value | 0 | 2 |
| taken branch or jump | 3 | 3 |
| not-taken branch | 0 | 2 |
| mulq, then a use of its product in the next instruction | 9 | 9 |
| mulq followed only by independent instructions | 1 | 1 |

Counting cycles: a program of *n* executed instructions (the halt included)
raises `halted` *n* + 3 cycles after reset is released. Each stall cycle and
each branch penalty adds to that. The end-to-end testbenches check this
formula exactly on every run. There is one correction: a multiply stall costs
nothing if the redirect in the next cycle cancels the stalled instruction.

## Forwarding

`fwd_unit` chooses each EX operand from one of three places:

- the register value read in ID;
- **EX-EX**: `MEM_in.ALUout`, the result of the instruction one ahead;
- **MEM-EX**: the `WB_in` result, which is the ALU result or the load data of
  the instruction two ahead.

When both sources write the register, the nearer (younger) producer wins. A
load in MEM is never an EX-EX source, because its data does not exist yet;
that case is the load-use stall above.

**MEM-MEM** is a separate path. When a store is in MEM and the instruction in
WB is a load of the store's data register, the store writes the loaded value.
This removes the stall for copy loops of the form `ldq r1; stq r1`.

A multiply's product is not forwarded. Readers of it wait in ID until the
product reaches WB, where the register file's write-before-read passes it on.

## Branches

Conditional branches test `ra` against zero with a zero test. The target is
`incr_pc + (sext(disp) << 2)`. The branch decision (`taken`) and the target
travel to MEM, where the PC mux uses them.

- **Default: predict not taken.** The pipeline keeps fetching in sequence.
  A taken branch in MEM cancels the three instructions behind it. Those
  instructions never write a register or memory, because the earliest write
  is in MEM.
- **`BRANCH_STALL=1`.** No instruction behind a branch is fetched until the
  branch resolves.

Halt (call_pal 0) acts like a taken branch to nowhere. When it reaches MEM,
the younger instructions are cancelled, the PC freezes and `halted` rises.
Older instructions still finish, and so does a multiply in flight.

## Exceptions and interrupts

`exc_unit` looks at the instruction in MEM. Nothing architectural changes
before MEM, so handling exceptions there makes them precise: everything older
has completed, and nothing younger has written anything. The causes, with
their `exc_sum` codes:

| code | cause | EXC_ADDR |
|---|---|---|
| 1 | call_pal with a nonzero function | next instruction |
| 2 | overflow of addq/v or subq/v | next instruction |
| 3 | illegal instruction | the instruction itself |
| 4 | `irq` input, only while interrupts are enabled | the instruction in MEM, which will be re-executed |

An internal cause takes priority over an interrupt in the same cycle. Taking
an exception does the following:

1. It cancels the instruction in MEM (an overflowing instruction writes no
   result) and the three younger ones.
2. It records EXC_ADDR and EXC_SUM.
3. It switches to kernel mode with interrupts disabled.
4. It fetches from `EXC_VECTOR` (0x800).

`rei` returns to EXC_ADDR in user mode with interrupts enabled. EXC_ADDR,
EXC_SUM, the mode and the interrupt enable are output ports. No instruction
reads them.

Multiplies keep this guarantee. A multiply older than the faulting
instruction has already passed MEM, so it is allowed to complete. It may
complete after the handler has started. A handler instruction that uses its
register waits through the multiply stall, so it sees the product. A multiply
younger than the faulting instruction has not yet started: it is cancelled in
EX before it enters the multiplier.

## Integer multiplier

`mul_unit` is fully pipelined. It can accept a new multiply every cycle.

- A multiply enters it from EX.
- Each of the eight stages adds the product of A and one 8-bit slice of B.
- After stage 8, the product takes the MEM slot for one cycle and is written
  in WB.
- The multiply instruction itself carries on down the normal pipeline without
  a register write, and retires there. This is why its result appears after
  younger instructions have finished.
- If an interrupt is taken on the multiply instruction in MEM, the multiplier
  drops the matching operation in stage 1 (`kill1`). The instruction is then
  re-executed after `rei`.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| alpha_pipe | FORWARDING | 1 | bypass paths on; 0 = stall until the producer reaches WB |
| alpha_pipe | BRANCH_STALL | 0 | 0 = predict not taken with cancel; 1 = stall fetch behind branches |
| alpha_pipe | IMEM_WORDS, DMEM_WORDS | 1024 | instruction words, data quadwords |
| alpha_pipe | RESET_PC | 0 | first fetch address |
| alpha_pipe | EXC_VECTOR | 0x800 | exception handler address |
| mul_unit | STAGES, DW | 8, 64 | multiplier depth, operand width |

## Ports of the top (`alpha_pipe`)

| group | ports |
|---|---|
| clock and reset | `clk`; `rst` (synchronous, active high; clears pipe registers and registers, PC ← RESET_PC) |
| program load | `imem_we`, `imem_waddr`, `imem_wdata` |
| data memory host port | `dmem_we`, `dmem_addr`, `dmem_wdata`, `dmem_rdata`; a host write takes priority over the pipeline in that cycle |
| register debug read | `dbg_reg` → `dbg_reg_data` |
| exception state | `irq` in; `exc_addr`, `exc_sum`, `kernel_mode`, `int_enable` out |
| status | `halted`, `pc_out`, `retire` (one pulse per instruction leaving WB) |
| event pulses for counting | `ev_data_stall`, `ev_mul_stall`, `ev_branch_stall`, `ev_taken`, `ev_not_taken`, `ev_fwd_exex`, `ev_fwd_memex`, `ev_fwd_memmem`, `ev_exception`, `ev_mul_done`; `ev_cancelled` gives the number of instructions cancelled in that cycle |

Both memories have an asynchronous read and are written on the clock edge.
Load programs and data while `rst` is high.

## Files

| file | content |
|---|---|
| `rtl/alpha_pkg.sv` | opcodes, function codes, pipeline-register structs, enums |
| `rtl/alpha_pipe.sv` | top: the stages and their wiring |
| `rtl/pipe_reg.sv` | transfer/stall/bubble register |
| `rtl/reg_file.sv` | 32 × 64 register file, r31 = 0, write-before-read |
| `rtl/decoder.sv` | instruction → control struct and immediates |
| `rtl/alu.sv` | ALU with the cmoveq condition and overflow |
| `rtl/fwd_unit.sv` | forwarding selects |
| `rtl/hazard_unit.sv` | stall, bubble and redirect control |
| `rtl/branch_unit.sv` | branch condition and target |
| `rtl/imem.sv`, `rtl/dmem.sv` | instruction and data memories |
| `rtl/exc_unit.sv` | exception and interrupt control, EXC_ADDR/EXC_SUM, mode |
| `rtl/mul_unit.sv` | 8-stage multiplier and its hazard outputs |

## Verification

`tb/alpha_tb_pkg.sv` holds instruction encoders, a random program generator
and a sequential reference model of the instruction set. The model executes
one instruction at a time, with no notion of a pipeline.

- `alpha_pipe_tb`: the top at its default parameters. It runs:
  - branch examples (taken, not taken, bsr/jmp);
  - a chain of dependent adds;
  - multiply cases;
  - all 36 combinations of 3 producer kinds × 6 consumer operand kinds × distance 1 and 2, each with its exact stall count;
  - 150 random programs.

  It checks the final registers and memory, the number of retired
  instructions, the number of branches and the exact cycle count. It also
  checks that every mechanism happened at least once.
- `alpha_pipe_stall_tb`: the same tests with `FORWARDING=0, BRANCH_STALL=1`.
- `alpha_pipe_exc_tb`: exceptions and interrupts.
  - Directed tests cover overflow, call_pal, illegal instructions, and stores
    just before and just after a faulting instruction.
  - 60 random programs run under random interrupts, with a handler that
    counts them.
- `branch_cpi_tb`: the cost of a typical integer branch mix, with 16%
  branches of which two thirds are taken. A 300-instruction program with this
  mix runs on two copies of the pipeline: predict-not-taken and branch-stall.
  CPI rises by 0.32 and 0.43 respectively, and the testbench checks both.
- One testbench per block (`*_unit_tb`, `pipe_reg_tb`, `reg_file_tb`,
  `alu_tb`, `decoder_tb`, `imem_tb`, `dmem_tb`). Each compares the block with
  a model written in the testbench.

Every testbench ends by printing `TB_RESULT checks=<n> failures=<n>`. Each
also has a watchdog. To run one with Verilator:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/alpha_pkg.sv tb/alpha_tb_pkg.sv rtl/*.sv tb/alpha_pipe_tb.sv \
        --top-module alpha_pipe_tb
    ./obj_dir/Valpha_pipe_tb

Replace `alpha_pipe_tb` with any other testbench name. The block testbenches
that do not use the package ignore it.

## Choices made in this design

The pipeline structure, the three pipe-register commands, the forwarding
paths, the one-cycle load-use stall, both branch schemes, the branch
penalties, the exception causes and EXC_ADDR rules, and the eight multiply
stages all follow the classic textbook description of this pipeline. The
following are this design's own choices:

- the opcodes of ldq, stq, bne, br, bsr, jmp, mulq and the trapping adds;
  these are the standard Alpha values;
- 64-bit data, 1024-word memories, the memory load ports, and reset behaviour;
- halt as call_pal 0, resolved in MEM like a taken branch;
- the exception vector 0x800, the EXC_SUM codes and the rei opcode;
- call_pal recording the next address;
- internal causes taking priority over interrupts;
- the multiplier's inside (one 8-bit slice per stage) and its hazard rules:
  stall on any register conflict with a multiply in flight, no forwarding of
  the product, one MEM slot per cycle;
- a fixed multiply latency of 8 stages, although a real Alpha 21264 takes 8
  to 16 cycles depending on the operands.

## Not built

- Floating-point units (4-stage add/subtract/multiply, 10- and 23-cycle divide)
  and the FP register file and control register.
- Integer divide (none exists in this instruction subset).
- Imprecise arithmetic traps and the barrier instruction that waits for them.
- Instructions for reading EXC_ADDR and EXC_SUM in software.
- Other exception sources: address and parity errors, page faults (there is
  no memory management), hard and soft reset as interrupts. The external
  `rst` input is the only reset.
