# MIPS-lite: a single-cycle processor

This is a 32-bit processor that runs every instruction in exactly one clock
cycle. In one cycle it fetches the instruction, reads the registers,
computes, accesses memory and writes the result. Nothing is pipelined and
nothing is held over from one instruction to the next, except the PC, the
registers and the data memory. The price is the clock period. It must cover
the slowest instruction, the load, even when a faster instruction is running.

It implements six MIPS instructions. That is enough to show every kind of
datapath path: register-register arithmetic, an immediate operation, a load,
a store and a conditional branch. The design follows the single-cycle MIPS
datapath and controller taught in the Berkeley CS 61C lecture "Single Cycle
MIPS CPU". The structure, the encodings and the control equations are the
lecture's. Memory sizes, reset, the program-load port and a few edge cases are
choices made here. They are listed under "Departures and choices" below.

## Instruction set

| Instruction | Format | Opcode | Funct | Effect |
|---|---|---|---|---|
| `addu rd,rs,rt` | R | 00 0000 | 10 0000 | R[rd] = R[rs] + R[rt] |
| `subu rd,rs,rt` | R | 00 0000 | 10 0010 | R[rd] = R[rs] - R[rt] |
| `ori rt,rs,imm16` | I | 00 1101 | – | R[rt] = R[rs] OR ZeroExt(imm16) |
| `lw rt,imm16(rs)` | I | 10 0011 | – | R[rt] = MEM[R[rs] + SignExt(imm16)] |
| `sw rt,imm16(rs)` | I | 10 1011 | – | MEM[R[rs] + SignExt(imm16)] = R[rt] |
| `beq rs,rt,imm16` | I | 00 0100 | – | if R[rs] == R[rt]: PC = PC + 4 + SignExt(imm16)·4 |

Every instruction except a taken branch also sets PC = PC + 4. R-format fields
are op<31:26>, rs<25:21>, rt<20:16>, rd<15:11>, shamt<10:6> and funct<5:0>.
I-format replaces rd, shamt and funct with imm16<15:0>. Add and subtract wrap
around and never trap, as `addu`/`subu` require. The funct codes are the ones
in the lecture's truth table (10 0000, 10 0010). Standard MIPS gives those two
codes to the trapping `add`/`sub`.

Any other instruction word runs as a no-op: no register write, no memory
write, PC + 4. The jump opcode 00 0010 is recognised: the controller raises
the `jump` output. There is no jump path in the datapath, so the PC still
advances by 4.

## The datapath

```
            +-----------------------------+
  imm16 --> | ifetch: PC, +4, PC Ext,     | --> Instruction<31:0> --> control
  zero  --> | branch adder, nPC mux,      |                             |
nPC_sel --> | instruction memory          |            control points <-+
            +-----------------------------+
 rs,rt --> regfile --busA--------------------> ALU --+--> data_mem Adr
                   --busB--+--> ALUSrc mux -->       |    data_mem Data In <-- busB
 imm16 --> extender -------+                         |
                                                     +--> MemtoReg mux --> busW --> regfile
 rt,rd --> RegDst mux --> Rw                   data_mem out -^
```

| Unit | Module | Behaviour |
|---|---|---|
| Instruction fetch | `ifetch` | Holds the PC and the instruction memory. Chooses the next PC. |
| Register file | `regfile` | 32 × 32 bits. Reads busA = R[rs] and busB = R[rt] combinationally. Writes R[Rw] = busW on the rising edge when RegWr is high. R0 always reads 0. |
| Extender | `extender` | imm16 to 32 bits. ExtOp 0 extends with zeros, ExtOp 1 with the sign. |
| ALU | `alu` | ALUctr 00 ADD, 01 SUB, 10 OR. `zero` is high when the result is 0. |
| Data memory | `data_mem` | Reads combinationally at Adr. Writes Data In on the rising edge when MemWr is high. |
| Multiplexers | `mux2` | RegDst (0 = rt, 1 = rd), ALUSrc (0 = busB, 1 = immediate), MemtoReg (0 = ALU, 1 = memory), next PC (0 = PC+4, 1 = branch target). |

All state changes at the one rising clock edge that ends the instruction. At
that edge the PC, the register file and the data memory are written together.
Every read (instruction, registers, data) is combinational within the cycle.
So an instruction sees exactly the state left by the one before it. No
forwarding or hazard logic is needed.

### Choosing the next PC

The PC register holds only bits 31:2. Its two low bits are wired to 00, so
`pc[1:0]` is always zero at the top-level port. Two adders compute the
candidates:

- `PC + 4`
- `PC + 4 + (SignExt(imm16) << 2)`. The "PC Ext" step sign-extends the
  offset and appends 00.

The mux takes the branch target only when `nPC_sel AND zero` is true.
`nPC_sel` therefore means "this instruction is a branch", not "take the
branch". For `beq` the controller sets ALUctr to SUB, and the ALU's `zero`
flag reports whether R[rs] − R[rt] = 0. The AND of the two is the branch
decision, so the outcome never leaves the datapath. A `beq $0,$0,-1` branches
to itself and makes a one-instruction halt loop.

## The controller

The controller (`control`) is combinational. It looks only at op<31:26> and
funct<5:0>. It is built as two levels, like a PLA:

1. **AND plane** (`ctrl_and`): one product term per instruction over the six
   opcode bits, plus the six funct bits for the R-type instructions. For a
   valid instruction exactly one of `add sub ori lw sw beq jump` is high.
   For any other word none is.
2. **OR plane** (`ctrl_or`): each control point is an OR of those terms.

```
RegDst   = add + sub            ALUSrc    = ori + lw + sw
MemtoReg = lw                   RegWrite  = add + sub + ori + lw
MemWrite = sw                   nPC_sel   = beq
ExtOp    = lw + sw              Jump      = jump
ALUctr[0] = sub + beq           ALUctr[1] = ori
```

The resulting settings, per instruction:

| | add | sub | ori | lw | sw | beq |
|---|---|---|---|---|---|---|
| RegDst | 1 | 1 | 0 | 0 | (0) | (0) |
| ALUSrc | 0 | 0 | 1 | 1 | 1 | 0 |
| MemtoReg | 0 | 0 | 0 | 1 | (0) | (0) |
| RegWrite | 1 | 1 | 1 | 1 | 0 | 0 |
| MemWrite | 0 | 0 | 0 | 0 | 1 | 0 |
| nPC_sel | 0 | 0 | 0 | 0 | 0 | 1 |
| ExtOp | (0) | (0) | 0 | 1 | 1 | (0) |
| ALUctr | ADD | SUB | OR | ADD | ADD | SUB |

Entries in parentheses are don't-cares: the instruction does not use that
path. The equations happen to set them to 0. An unknown instruction gets
every signal 0. That means no write and PC + 4.

The control points travel to the datapath as one packed struct, `ctrl_t`,
defined in `mips_pkg` with the opcode constants and the ALU control enum.

## Timing

The lecture's delay estimate is 200 ps for instruction fetch, ALU and memory
access, and 100 ps for a register read or write. Under that estimate the
paths are:

| Instruction | Fetch | Reg read | ALU | Memory | Reg write | Total |
|---|---|---|---|---|---|---|
| lw | 200 | 100 | 200 | 200 | 100 | 800 ps |
| sw | 200 | 100 | 200 | 200 | – | 700 ps |
| R-format | 200 | 100 | 200 | – | 100 | 600 ps |
| beq | 200 | 100 | 200 | – | – | 500 ps |

The clock period must be at least 800 ps (1.25 GHz), because the load sets
it. Every other instruction then wastes part of its cycle. That waste is the
weakness of the single-cycle design. The RTL has no delays. What it
guarantees, and what the end-to-end test checks, is one instruction per
cycle (CPI = 1).

## Top level and interface

`mips_lite_cpu` (parameters `IMEM_WORDS = 1024`, `DMEM_WORDS = 1024`,
`RESET_PC = 0`):

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst` | in | 1 | synchronous, active high. Sets PC = RESET_PC and clears all registers. |
| `ld_we`, `ld_addr`, `ld_data` | in | 1, 32, 32 | writes one instruction-memory word (`ld_addr` is a word index). Use while `rst` is high. |
| `pc`, `instr` | out | 32, 32 | the instruction executing this cycle |
| `wb_we`, `wb_addr`, `wb_data` | out | 1, 5, 32 | this cycle's register write (RegWr, Rw, busW) |
| `mw_we`, `mw_addr`, `mw_data` | out | 1, 32, 32 | this cycle's memory write (MemWr, Adr, Data In) |
| `jump` | out | 1 | the jump opcode was decoded |

To run a program: hold `rst`, write the words through the load port, then
release `rst`. The first instruction executes in the cycle after the release.
The `wb_*`/`mw_*` outputs are the datapath's own nets, brought out for tracing.

## Departures and choices

Taken from the lecture: the instruction formats, opcodes and functs, the
datapath structure and mux numbering, the PC with its two constant low bits,
the branch rule `nPC_sel AND zero`, the two-bit ALU encoding (00/01/10), and
the AND/OR controller equations.

Choices made here, where the lecture says nothing:

- Memories are 1024 words each (4 KiB). Addresses select a word with
  `adr[11:2]`. The two low bits are ignored and higher bits wrap around.
  There are no byte or halfword accesses.
- Register 0 is hard-wired to zero, as in the MIPS architecture.
- Reset is synchronous. It clears the PC and the register file. Memory
  contents are not reset.
- The instruction memory has a load port, because a program has to get in.
- ALUctr = 11 is never produced. If it were, the ALU would output 0.
- The jump opcode is decoded but not executed, as described above.

Resolved inconsistencies in the lecture material:

- The lecture labels the ALU control `ALUctr<2:0>` in one place. Its
  equations use two bits. The two-bit version is built.
- One summary gives `sw` as storing R[rs] and `ori` as an add. The
  register-transfer definitions and the datapath figures show R[rt] and OR.
  Those are built.
- One summary writes the branch target as `PC + SignExt(imm16)·4`. The
  definition and the fetch-unit figure give `PC + 4 + SignExt(imm16)·4`.
  The latter is built.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

- `tb_mips_lite_cpu` is the end-to-end test, at the default sizes. It loads
  programs through the load port and runs them in lockstep with an
  instruction-set reference model (`tb/mips_iss_pkg.sv`). Every cycle it
  compares the PC, the register write, the memory write and the jump flag.
  - The hand-written program swaps two array elements with `lw lw sw sw`,
    uses a zero-extended `ori` of 0xBEEF and a negative load/store offset,
    writes to R0, and sums 5+4+3+2+1 in a loop with forward and backward
    branches.
  - That program must reach its halt loop in exactly 40 cycles, its dynamic
    instruction count.
  - Twenty random 300-instruction programs follow.
  - The test counts how often each mechanism occurred: each instruction,
    taken forward and backward branches, untaken branches, zero and sign
    extension, R0 writes and the jump opcode. It fails if any count is zero.
- `tb_datapath` drives the datapath's control points from its own copy of the
  truth table (`tb/ctrl_ref_pkg.sv`). It runs the same programs, so it tests
  the datapath separately from the controller.
- `tb_control`, `tb_ctrl_and` and `tb_ctrl_or` check the controller
  exhaustively or per row against the truth table.
- `tb_ifetch`, `tb_regfile`, `tb_alu`, `tb_extender`, `tb_mux2`,
  `tb_inst_mem` and `tb_data_mem` compare each unit against a model, with
  random stimulus.

Each of these testbenches fails when a relevant bug is put into its module.

To simulate with Verilator 5 from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/mips_pkg.sv tb/mips_iss_pkg.sv tb/ctrl_ref_pkg.sv \
  tb/tb_mips_lite_cpu.sv --top-module tb_mips_lite_cpu
./obj_dir/Vtb_mips_lite_cpu
```

Replace `tb_mips_lite_cpu` with any other testbench name. The simulator is
two-state, so every register that is read is reset or initialised. Unwritten
memory words start random, and the test programs store before they load.

## Files

- `rtl/mips_pkg.sv`: shared types: instruction formats, opcodes, `ctrl_t`,
  the ALU control enum.
- `rtl/mips_lite_cpu.sv`: the top: `control` + `datapath`.
- `rtl/control.sv`, `rtl/ctrl_and.sv`, `rtl/ctrl_or.sv`: the controller.
- `rtl/datapath.sv`, `rtl/ifetch.sv`, `rtl/inst_mem.sv`, `rtl/regfile.sv`,
  `rtl/extender.sv`, `rtl/alu.sv`, `rtl/mux2.sv`, `rtl/data_mem.sv`: the
  datapath.
- `tb/`: one testbench per module, the reference model and assembler
  (`mips_iss_pkg.sv`), and the reference truth table (`ctrl_ref_pkg.sv`).
