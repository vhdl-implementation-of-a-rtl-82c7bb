# A five-stage pipelined MIPS-32 core

This is a small MIPS-32 integer processor split into the classic five pipeline
stages: instruction fetch (IF), instruction decode (ID), execute (EX), memory
access (MEM) and write-back (WB). One instruction enters per clock. Most data
dependences between neighbouring instructions cost nothing: results are
forwarded straight to the ALU inputs. Only two situations cost a cycle: a
load whose result is used by the very next instruction, and a taken branch or
jump.

The core is meant as a compact, readable pipeline. Instruction and data
memories are tiny on-chip arrays (32 instructions, 128 bytes of data) that
answer within one cycle. A host port loads programs and a debug port reads
registers. There are no caches, exceptions, interrupts or coprocessors.

The structure follows a published description of such a pipeline: its block
diagram, stage contents, hazard and forwarding rules, memory sizes and the
instruction classes it was tested with. Where that description is silent,
the choices here are marked as this design's own: the exact instruction set,
encodings, reset, byte order, branch delay slot and debug ports.

## The pipeline

```
        +-------+  IF/ID  +--------+  ID/EX  +--------+  EX/MEM +--------+  MEM/WB +------+
  PC -->| fetch |-------->| decode |-------->|execute |-------->| memory |-------->| wb   |--+
   ^    +-------+         +--------+         +--------+         +--------+         +------+  |
   |        ^  hold/flush   | hazard   ^ branch taken  |  ^ forward (EX/MEM)  ^ forward (MEM/WB)
   +--------+---------------+          +---------------+  +-----------------------------------+
                                        register bank write port  <-----------------------------+
```

Each stage module holds its own output register, so the top level
`mips_cpu` is only wiring:

| Stage | Module | Contents | Output register |
|---|---|---|---|
| IF | `if_stage` | `program_counter`, `pc_adder` (PC + 4), `instr_mem` | IF/ID: instruction, PC + 4 |
| ID | `id_stage` | `control_unit`, `hazard_unit`, `sign_extender`, `register_bank` | ID/EX: control bundle, rs/rt values, immediates, register numbers |
| EX | `ex_stage` | `forwarding_unit`, `alu` (with HI/LO), `branch_unit`, branch target adder | EX/MEM: MEM and WB controls, ALU result, store data, destination |
| MEM | `mem_stage` | `data_mem` | MEM/WB: WB controls, ALU result, loaded data, destination |
| WB | `wb_stage` | write-back multiplexer | (drives the register bank) |

The pipeline-register contents and the control bundle are `typedef`ed structs
in `mips_pkg`. The control bundle `ctrl_t` has three parts: `ex` (ALU
operation, immediate operand, rd-or-rt destination, branch type), `mem`
(read, write, byte access, unsigned byte) and `wb` (register write,
memory-to-register). Each part is dropped once its stage has used it.

## Hazards: what stalls, what is forwarded, what is free

This is the part of the design that needs the most care. Four mechanisms work
together.

**1. Register bank: write, then read, in one cycle.** The register bank
behaves as if it were written in the first half of a cycle and read in the
second. An instruction in ID therefore sees a value that the instruction three
ahead of it writes back in the same cycle. The RTL uses one rising-edge
write. A combinational bypass returns the write data to any read port whose
address matches the register being written. `$0` always reads as zero.

**2. Forwarding into EX.** For each ALU operand, `forwarding_unit` picks one
of three values:

| select | source | used when |
|---|---|---|
| `10` | EX/MEM ALU result (previous instruction) | it writes a register, destination ≠ `$0`, destination = operand register |
| `01` | MEM/WB write-back value (instruction before that: ALU result or loaded data) | same test, and EX/MEM did not match |
| `00` | value read from the register bank in ID | otherwise |

EX/MEM wins over MEM/WB because it holds the newer value. The forwarded rt
operand is also what a store writes to memory, so `sub $4,..` followed at
once by `sw $4,..` stores the right value.

**3. Load-use stall (one cycle).** A loaded word exists only at the end of
MEM. It is too late for an instruction that needs it in EX one cycle after
the load. `hazard_unit` compares the load's target (ID/EX rt, when ID/EX
reads memory) with the rs and rt fields in IF/ID. On a match it:

- holds the PC (`pc_write = 0`),
- holds IF/ID (`ifid_write = 0`),
- clocks all-zero control lines into ID/EX (a bubble: no register write,
  no memory access, no branch).

One cycle later the load is in WB and its data reaches the dependent
instruction through the MEM/WB forwarding path. The rs/rt fields are compared
even when an instruction does not read them, for example the rt of an
immediate add. That can add an unneeded stall, but it never causes a wrong
result. A load to `$0` never stalls.

**4. Branches and jumps: decided in EX, one lost cycle.** Conditional
branches make the ALU compute rs − rt. For BLEZ and BGTZ the rt field is
`$0`, so the result is rs itself. `branch_unit` then decides from the ALU's
zero and negative flags:

| instruction | taken when |
|---|---|
| BEQ | zero |
| BNE | not zero |
| BLEZ | zero or negative |
| BGTZ | neither zero nor negative |
| J | always |

The target is PC + 4 + (sign-extended offset × 4) for a branch, and
{PC+4[31:28], index, 00} for J. Both are computed in EX.

When the branch is in EX, two younger instructions are already in the
pipeline:

- The one in ID is the **branch delay slot**. It always completes, as in the
  MIPS-32 architecture.
- The one just fetched is replaced by a no-op in IF/ID. The PC takes the
  target.

A taken branch therefore costs exactly one bubble. The target instruction
reaches ID two cycles after the branch decision. Software (or an assembler)
must fill the delay slot, with a NOP if nothing useful fits.

A branch in EX can never also be a load, so a redirect and a load-use stall
never coincide. `hazard_unit` still gives the redirect priority.

## Instruction set

Standard MIPS-32 encodings. Unknown opcodes or function codes execute as
no-ops.

| class | instructions |
|---|---|
| arithmetic | ADD, ADDU, SUB, SUBU, ADDI, ADDIU |
| multiply | MULT, MULTU (64-bit product into HI/LO), MFHI, MFLO |
| logic | AND, OR, XOR, NOR, ANDI, ORI, XORI (immediates zero-extended), LUI |
| compare | SLT, SLTU, SLTI, SLTIU |
| shift | SLL, SRL, SRA (by the shamt field) |
| memory | LW, SW, LB (sign-extended), LBU (zero-extended), SB |
| control | BEQ, BNE, BLEZ, BGTZ, J |

ADD, ADDI and SUB do not trap on overflow: there is no exception mechanism,
so signed and unsigned forms give the same result. MULT/MULTU write HI and LO
at the end of their EX cycle, so an MFHI or MFLO right after them reads the
new product; no stall is needed. Not implemented: JAL, JR, JALR,
division, halfword loads/stores, MTHI/MTLO, SYSCALL/BREAK, coprocessor
instructions.

## Memories and outside access

- **Instruction memory** (`instr_mem`): `IMEM_WORDS` = 32 words of 32 bits
  (1 kbit). It is read asynchronously at the PC, and upper address bits are
  ignored. The host writes it through `imem_we`, `imem_addr` (a byte
  address) and `imem_wdata`. The usual flow is to load the program while
  `rst_n` is low, then release reset. Execution starts at address 0.
- **Data memory** (`data_mem`): `DMEM_BYTES` = 128 bytes (1 kbit), kept as
  32-bit words. Loads are asynchronous and stores happen at the clock edge,
  so both finish within the MEM cycle. Bytes are little-endian within a word
  (byte address 0 is bits 7:0). Word accesses ignore the two low address
  bits, and addresses wrap at the memory size. Memory contents are not
  cleared by reset.
- **Register monitor**: `dbg_reg_addr` selects any register, and
  `dbg_reg_data` returns its value combinationally, including a value being
  written in that same cycle.
- **Status outputs**: `pc`, `stall` (a load-use bubble this cycle),
  `branch_taken` (a redirect this cycle), and `fwd_a`/`fwd_b` (forwarding
  selects of the two ALU operands).

`rst_n` is active low and asynchronous. It clears the PC, all pipeline
registers (which then hold no-ops), HI/LO and the 32 registers.

## Top-level ports (`mips_cpu`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `imem_we`, `imem_addr`, `imem_wdata` | in | 1, 32, 32 | instruction memory write |
| `dbg_reg_addr` / `dbg_reg_data` | in / out | 5 / 32 | register monitor |
| `pc` | out | 32 | fetch address |
| `stall`, `branch_taken` | out | 1, 1 | pipeline events |
| `fwd_a`, `fwd_b` | out | 2, 2 | forwarding selects (00 register bank, 10 EX/MEM, 01 MEM/WB) |

Parameters: `IMEM_WORDS` (default 32) and `DMEM_BYTES` (default 128). Both
must be powers of two.

## Verification

Every module has a self-checking testbench in `tb/` named `tb_<module>`. Each
one prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog.
The leaf tests compare against independent reference models: integer
arithmetic for the ALU, byte arrays for the memories, rule tables for the
decoder, branch unit, hazard and forwarding units. The stage tests drive
hand-built pipeline-register contents.

`tb_mips_cpu` runs the whole core at its default sizes. It assembles a
30-instruction program inside the testbench and loads it through the host
port. The program covers:

- register and immediate adds and subtracts,
- a store and a reload of −1,
- signed and unsigned multiply of that value, read back with MFHI/MFLO,
- a byte store with LB/LBU reads,
- a counted loop that runs three times, leaves through a taken BEQ, and
  jumps back to address 0 with J,
- delay-slot counters,
- a second load-use case and a register-bank bypass case.

At the end it reads 21 registers and compares them with hand-computed
values. During the run it counts each mechanism, and a mechanism that never
occurs is an error:

- load-use stalls (exactly 4 expected),
- taken and not-taken branches,
- forwarding from EX/MEM and from MEM/WB,
- same-cycle register-bank bypass,
- HI/LO reads.

It also checks timing in two ways:

- After every taken branch, the target instruction must sit in decode
  exactly two cycles later, which means one bubble.
- The halt address must first be fetched exactly 75 clock edges after
  reset. That number is derived in the testbench from the instruction
  count, one cycle per load-use stall and one per taken branch.

`tb_mips_cpu_random` adds breadth. It runs 300 rounds. Each round is a random
28-instruction program over the whole instruction set, including forward
conditional branches with their delay slots. The programs use only registers
`$1`..`$6`, so dependences between neighbouring instructions are dense. After
each round the test compares all 32 registers and the whole data memory with
an instruction-at-a-time reference model inside the testbench. About 20,000
comparisons are made. This test also catches deliberately broken versions of
the forwarding, hazard, decode-stage bubble, store-data forwarding and
register-bypass logic.

To run a test with plain Verilator (5.x), from the folder that holds `rtl/` and
`tb/`:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/mips_pkg.sv tb/tb_mips_cpu.sv --top-module tb_mips_cpu
./obj_dir/Vtb_mips_cpu
```

Replace `tb_mips_cpu` with any other testbench name to run that block alone.
The end-to-end run takes about 100 clock cycles. To run your own program,
change the `prog[]` table in `tb_mips_cpu.sv`, which uses the small `R`, `I`
and `J` encoding helpers there. Remember the delay slot after each branch and
jump.

## How far to trust it, and where it departs from the reference

Tested:

- every instruction listed above at unit level,
- the pipeline hazards in the end-to-end program,
- random programs against the reference model in `tb_mips_cpu_random`.

Not tested:

- timing or area: no synthesis against a cell library was run,
- backward branches in random programs (the directed test covers loops),
- programs longer than the 32-word instruction memory.

Departures from, and additions to, the reference description:

- **Branch delay slot.** The reference decides branches in EX and reports a
  single stall cycle for a jump, but does not describe a delay slot. Keeping
  the delay slot is the reading that gives one lost cycle with an EX-stage
  decision. If you want no delay slot, flush IF/ID *and* insert a bubble into
  ID/EX on a taken branch (in `hazard_unit`/`id_stage`). A taken branch then
  costs two cycles.
- **Load-use stall holds IF/ID.** The reference text speaks of clearing the
  fetch register on a stall, while its hazard diagram shows a write-enable
  on IF/ID. Holding is the version that does not lose the dependent
  instruction. Clearing is used only for taken branches.
- **ALU control folded into the main decoder.** The reference diagram has a
  separate ALU-control block driven by an ALUOp signal. Here `control_unit`
  produces the ALU operation directly.
- **Where the branch is decided.** The reference block diagram draws the
  branch AND gate after the EX/MEM register, but its text places the
  branch decision in the execute stage and feeds it back to the hazard unit.
  This core follows the text: the decision is made in EX.
- **Register-bank timing.** The reference writes the register bank in the
  first half-cycle and reads it in the second. This core uses a single edge
  plus a bypass, which behaves the same at the pipeline level.
- **Data memory size.** The reference gives "1k" without a unit. It is read
  here as 1 kbit, the same as the instruction memory. Change `DMEM_BYTES`
  for more.
- **Instruction set, reset values, byte order, debug and status ports** are
  this design's own choices.
- **Comparisons in `hazard_unit`.** It compares both source fields whether or
  not they are used, so it can stall once more than strictly necessary.
