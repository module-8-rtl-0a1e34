# Precise exceptions in three reduced RISC-V processors

A processor that hits an error in the middle of a program must stop in a state
that software can make sense of. It needs to record which instruction failed
and why, and jump to a service routine. Then it must continue as if nothing had
happened, or abort. This design adds that mechanism to three classic
implementations of the same small RISC-V subset:

* a **single-cycle** processor (`sc_cpu`), where every instruction finishes in one clock;
* a **multicycle** processor (`mc_cpu`), built around a controller FSM with one shared memory;
* a **five-stage pipelined** processor (`pl_cpu`). Here the hard part is to keep the exceptions
  *precise* while five instructions are in flight at once.

The single-cycle and multicycle processors also accept an external interrupt.
The top module `exc_cpus_top` places the three processors side by side. They
share the clock and reset, and each has its own memories and ports.

## The architecture they implement

Instructions: `lw`, `sw`, `addi`, `andi`, `ori`, `slti`, `add`, `sub`, `and`,
`or`, `slt`, `beq` and `jal`, plus two privileged instructions with reduced
function:

* `mret`: return from the trap routine, `PC <- mepc`;
* `csrrw rd, csr, rs1`: only for `mepc` (0x341) and `mcause` (0x342). `rd <- csr`.
  `mepc <- rs1` applies only to `mepc`, because `mcause` is read-only to software.

Control and status registers:

| CSR      | number | here |
|----------|--------|------|
| `mepc`   | 0x341  | address of the faulting instruction, or of the next one after an interrupt |
| `mcause` | 0x342  | the cause code below; written only by hardware |
| `mtvec`  | 0x305  | constant `0x1c000000`: every trap jumps there (direct mode) |

Exceptions, with their `mcause` values:

| cause | event | detected by |
|-------|-------|-------------|
| 0 | instruction address not a multiple of 4 | instruction memory (`instr_mem.e`) |
| 2 | illegal instruction: unknown opcode (`lui`, `auipc`, `jalr`, `mul`, ...) | `illegal_detector` |
| 2 | illegal instruction: ALU operation not implemented (`xor`, `sll`, `sra`, `xori`, ...) | `alu.e` |
| 4 | `lw` address not a multiple of 4 | data memory (`data_mem.e`) |
| 6 | `sw` address not a multiple of 4 (the write is suppressed) | data memory |
| 0x8000000b | external interrupt (single-cycle and multicycle only) | `int_i` pin |

Taking a trap always does three things: `PC <- mtvec`, `mepc <- PC` and
`mcause <- cause`. For an exception, the failing instruction writes neither a
register nor memory.

## Where errors come from

Four small units raise the error flags. `cause_encoder` combines them.

* **Memories** (`instr_mem`, `data_mem`). The error flag is `a[1] | a[0]`. In
  `data_mem` the flag also gates the write enable, so a misaligned store
  changes nothing.
* **ALU** (`alu`). It has a 3-bit operation code: 000 add, 001 sub, 010 and,
  011 or, 101 signed set-less-than. Codes 100, 110 and 111 are unused, and the
  ALU flags them with `E = op1·op2 + op2·!op0`. `alu_decoder` maps every
  arithmetic `funct3` that is not implemented (xor, shifts, ...) to code 111.
  So those instructions fail in the ALU, not in the decoder.
* **Illegal-instruction detector** (`illegal_detector`). It is a truth table
  over the opcode, `funct3` and the 12-bit CSR field. Loads, stores, OP-IMM,
  R-type, `beq` and `jal` pass. In the system opcode, only `mret` (`funct3`
  000, field 0x302) and `csrrw` on 0x341 or 0x342 pass. Everything else is
  illegal. In addition, an R-type instruction is legal only if its `funct7`
  is 0000000 or 0100000. Without this check `mul` (`funct7` 0000001) would run
  as an `add`, although it is meant to be illegal. This check is this design's
  addition.
* **Cause encoder** (`cause_encoder`). It applies a fixed priority: fetch
  error (0), then illegal instruction from the detector or the ALU (2), then a
  data-memory error (4 for a load, 6 for a store). This is the order in which
  an instruction passes the units, so when several flags are raised together
  the earliest error wins.

## Single-cycle processor (`sc_cpu`)

All four flags are valid within the one cycle of an instruction. When `exc`
is high, the register-file write enable and the memory write enable are forced
low. The clock edge then loads `PC` with mtvec, `mepc` with the PC and
`mcause` with the encoded cause.

An interrupt is handled differently. The current instruction is allowed to
finish, and the processor traps at the same clock edge:

* `mepc` receives the address that would have come next (PC+4, or the
  branch, jump or mret target), so `mret` resumes after the finished
  instruction;
* `mcause` receives 0x8000000b.

If an exception and an interrupt arrive in the same cycle, the exception wins.
The interrupt is not masked, so a device must release `int_i` once it sees
`trap_o`.

## Multicycle processor (`mc_cpu`, `mc_main_fsm`)

The data path has one memory for both instructions and data. It keeps the
usual registers (PC, OldPC, IR, MDR, A, B, ALUOut). The controller has the
states S0 to S10 of the base design, and adds:

| state | role |
|-------|------|
| S11 | `mret`: `PC <- mepc` |
| S12 | `csrrw` on `mcause`: `rd <- mcause` |
| S13 | `csrrw` on `mepc`: `rd <- mepc`, `mepc <- A` |
| SE  | exception: `PC <- mtvec`, `mepc <- OldPC`, `mcause <- cause` |
| SI  | interrupt: `PC <- mtvec`, `mepc <- PC` (already the next instruction), `mcause <- 0x8000000b` |

An error sends the FSM to SE from the state where it shows up:

* a fetch error from S0;
* an illegal opcode or field from S1;
* an ALU error from S6 or S8;
* a memory error from S3 (load) or S5 (store).

Each instruction checks `int_i` in its last state (S4, S5, S7, S10). If it is
set, the FSM goes to SI instead of S0.

`mepc` takes its input from the ALU's A-operand multiplexer: OldPC in SE, PC
in SI and register A in S13. The result multiplexer gains three inputs: mtvec
(011), mepc (100) and mcause (101).

The cause is computed from the flags of the state where the error appeared.
SE comes one cycle later. A register (`cause_q`) therefore carries the cause
into SE. That register is this design's choice.

Cycle counts: `lw` 5 cycles, `sw` and ALU instructions 4, `jal` 4, `beq` 3,
`mret` and `csrrw` 3. A trap costs 1 more cycle (SE or SI) on top of the states
already spent.

## Pipelined processor (`pl_cpu`, `pl_hazard_unit`, `pl_forward_unit`)

This is the part that takes the most care.

### Precise exceptions: handle everything in MEM

Errors arise in four different stages: misaligned fetch in IF, illegal opcode
in ID, ALU error in EX, misaligned data in MEM. Acting on each one where it
appears would break ordering. Take a younger `mul` that fails in ID while an
older `lw` is still on its way to MEM: trapping at once would blame the wrong
instruction. The rule here is therefore:

1. Each error flag is stored in the pipeline register and **travels with its
   instruction**. The flags are `mi_err` from IF, `op_err` from ID and
   `alu_err` from EX.
2. Exceptions are acted on **only in MEM**. There the cause encoder combines
   the instruction's stored flags with the data memory's flag.
3. On an exception in MEM the hazard unit flushes IF/ID, ID/EX, EX/MEM and
   MEM/WB. The faulting instruction and all younger ones vanish. IF/ID holds a
   valid bit, so a flushed slot (all-zero word) is not decoded as an illegal
   instruction; the other registers clear to all-zero controls, which raise
   nothing. The faulting instruction's memory write is blocked (the data
   memory's write enable is gated by the exception). mepc gets its PC, mcause
   the cause, and PC gets mtvec.
4. The older instruction in WB completes normally.

Instructions reach MEM in program order. So the oldest failing instruction is
always the one handled, whatever order the errors were detected in. The
examples below assume the program starts at `0x0000d400` and the instruction
at `0x0000d404` fails:

* a misaligned `lw` at d404 is in MEM in cycle 5. mepc = 0xd404,
  mcause = 4, and the word at mtvec is fetched in cycle 6;
* a `mul` flagged in ID waits until it reaches MEM before it traps (cause 2);
* a `lw` in MEM and a `mul` in ID fail at the same time: the `lw` wins;
* a `mul` flagged in ID one cycle *before* an older `lw` fails in MEM: the
  `lw` still wins, and the `mul` is flushed;
* an `xor` followed by an `sra`, both failing in EX: the `xor` wins.

In every case the fetch from mtvec follows one cycle after the exception
reaches MEM. The testbench `tb_pl_cpu` checks exactly this: each trap is
taken three cycles after the faulting instruction was fetched, and the next
fetch address is mtvec.

### mret and csrrw in the pipeline

* **`mret`** is a jump resolved in EX: `PC <- mepc`. Like a taken `beq` or
  `jal`, it flushes IF/ID and ID/EX. With predict-not-taken that costs two
  cycles.
* **`csrrw`** reads the CSR in EX. The value rides through EX/MEM and MEM/WB
  and is written to `rd` in WB. The new `mepc` value (rs1, forwarded if
  needed) is written in MEM.

### Hazards

| hazard | solution |
|--------|----------|
| a result needed by the next instructions | forwarding from MEM (priority) or WB into EX (`pl_forward_unit`); the register file writes on the falling clock edge, so ID reads what WB writes in the same cycle |
| `lw` followed by a user of its result | one-cycle stall (PC and IF/ID held, ID/EX cleared) |
| `csrrw` followed by a user of its `rd` | same one-cycle stall: the CSR value is known only at the end of EX |
| `csrrw mepc` followed directly by `mret` | `mepc` is written on the **falling** edge. When `csrrw` is in MEM, the new value is in `mepc` by mid-cycle, and `mret` in EX reads it before the rising edge |
| branch, `jal`, `mret` taken in EX | flush IF/ID and ID/EX |
| exception in MEM | flush all four pipeline registers; this overrides any stall |

The stall condition is

```
stall = ((ResSrcE == load & RegWriteE) | isCsrrwE) & (Rs1D == RdE | Rs2D == RdE)
```

It deliberately has no `x0` test, so a `csrrw x0, ...` stalls a following
instruction that names `x0`. The trap routine in the testbenches therefore
uses `x31` as the scratch destination of its `csrrw` before `mret`.

From MEM, forwarding passes the ALU result, or PC+4 when the instruction in
MEM is a `jal`. The PC+4 path is this design's addition. A `csrrw` result is
never taken from MEM: the one-cycle stall makes its consumer reach EX when
the `csrrw` is in WB, where the forwarded value is the CSR value.

## Interfaces

All three processors use active-high synchronous reset, which loads the PC
with `RESET_PC`. Ports:

| port | meaning |
|------|---------|
| `int_i` | level interrupt request (not on `pl_cpu`) |
| `pc_o` | current PC |
| `trap_o` | high in the cycle a trap is taken (single-cycle: the cycle of the failing instruction; multicycle: state SE or SI; pipeline: instruction in MEM) |
| `mem_we`, `mem_addr`, `mem_wdata` | the data-memory write of the cycle |

Parameters:

| parameter | default | meaning |
|-----------|---------|---------|
| `RESET_PC` | `32'h0000d400` | first instruction |
| `IMEM_WORDS`, `DMEM_WORDS` | 1024 | memory sizes of `sc_cpu` and `pl_cpu` |
| `MEM_WORDS` | 1024 | unified memory of `mc_cpu` (and of each processor in `exc_cpus_top`) |

Memories decode only the low address bits, so the memory image repeats every
`4*WORDS` bytes. With 1024 words, the program at `0xd400` sits at word 256,
and the trap routine at `0x1c000000` sits at word 0. Memories and registers
have no reset. Software, or the testbench, initialises them.

Shared types and constants live in `rtl/rv_pkg.sv`: opcodes, CSR numbers,
cause codes, the ALU and ImmSrc encodings, the decoder's control struct
`ctrl_t` and the multicycle state enum.

## Where this design departs from the description it follows

* The `mtvec` mode table writes "PC <- PC + Base" for direct mode. This design
  loads PC with mtvec itself, which is what every other description of the
  trap sequence says.
* The CSR field that feeds the illegal-instruction detector is instruction
  bits 31:20. A 12-bit CSR number occupies exactly those bits.
* `mul` is rejected through the `funct7` check described above. The detector's
  own table lets every R-type pass.
* `mret` is recognised only with the field 0x302, as in the main decoder's
  table. The detector's table lists that field as "don't care".
* One of the pipeline examples places the mtvec fetch two cycles after the
  exception reaches MEM. All the others place it one cycle after, and this
  design does the same.
* The interrupt cause code 0x8000000b (machine external interrupt) is this
  design's choice.
* In the single-cycle processor, an interrupt saves the *next* address in
  mepc, matching the multicycle SI state.
* The pipelined processor has no interrupt support. Its interrupt handling is
  not specified in enough detail to build.
* Table entries given as "don't care" are driven as 0.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* Unit benches (`tb_alu`, `tb_alu_decoder`, `tb_illegal_detector`,
  `tb_cause_encoder`, `tb_imm_extend`, `tb_main_decoder`, `tb_regfile`,
  `tb_csr_unit`, `tb_data_mem`, `tb_instr_mem`, `tb_pl_hazard_unit`,
  `tb_pl_forward_unit`, `tb_mc_main_fsm`) compare with reference functions
  written independently in the bench. They use exhaustive sweeps where the
  input space is small, and random vectors otherwise.
* `tb/rv_tb_pkg.sv` holds three things:
  * an instruction encoder;
  * a test program that exercises every instruction and nine exceptions of
    all four causes, including the simultaneous, out-of-order and in-order
    cases above;
  * a trap routine that counts traps, records cause and mepc in memory, and
    returns to the faulting instruction + 4. After an interrupt it returns
    to `mepc`, and after a misaligned jump to the return address in `x1`.

  It also holds `rv_iss`, an instruction-level reference model.
* `tb_sc_cpu`, `tb_mc_cpu` and `tb_pl_cpu` run the program on one processor
  each and compare with the reference model:
  * single-cycle: the PC every cycle;
  * multicycle: each instruction's cycle count and states;
  * pipeline: the order of traps, the trap and mret timing, and how often each
    hazard mechanism occurred.

  Each also compares the final registers, CSRs and memory. Interrupts are
  injected into the single-cycle and multicycle processors.
* `tb_pl_exc_scenarios` replays the five pipeline cases listed under
  "Precise exceptions" cycle by cycle, using the pipelined processor at its
  default parameters. For each case it checks five things:
  * the trap cycle (5, counting the fetch of 0xd400 as cycle 1);
  * that the fetch from mtvec comes in cycle 6;
  * that mepc is 0xd404, and the cause;
  * which younger instruction was in flight, with its own error flag;
  * which registers were and were not written.
* `tb_exc_cpus_top` runs all three processors in the top module at the
  default sizes. It fails if any mechanism never occurs: each cause in each
  processor, both interrupts, `mret` and both `csrrw` forms in the
  single-cycle and multicycle processors, load and csrrw stalls, branch and
  mret flushes, forwarding, the mepc bypass, and simultaneous exceptions. It
  also compares every processor's final registers, CSRs and memory with the
  reference model.

To run a bench with Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/rv_pkg.sv tb/rv_tb_pkg.sv \
    tb/tb_exc_cpus_top.sv --top-module tb_exc_cpus_top
./obj_dir/Vtb_exc_cpus_top
```

Unit benches need only `rtl/rv_pkg.sv` and their own file. Benches load their
programs into the memory arrays hierarchically, so no data files are needed.
To load a program from a hex file instead, set `instr_mem`'s `INIT_FILE`.

## Files

`rtl/`: `rv_pkg`, `alu`, `alu_decoder`, `illegal_detector`, `cause_encoder`,
`imm_extend`, `main_decoder`, `regfile`, `csr_unit`, `instr_mem`, `data_mem`,
`sc_cpu`, `mc_main_fsm`, `mc_cpu`, `pl_hazard_unit`, `pl_forward_unit`,
`pl_cpu`, `exc_cpus_top`. There is one module or package per file, and each
file opens with a comment on its function, timing, and which parts follow the
description and which are choices of this design.

`tb/`: `rv_tb_pkg`, one `tb_<module>.sv` per module, and `tb_pl_exc_scenarios`.
