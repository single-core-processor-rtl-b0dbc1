# A one-instruction-per-cycle RISC-V processor

This is a single-cycle RV32 processor. Each instruction is fetched, decoded,
executed, given its memory access and written back within **one clock
cycle**. The five steps are not pipeline stages. They are five stretches of one
combinational path that starts at the PC register and ends at the inputs of the
state elements. All the state (PC, register file, data memory) changes together
at the next rising clock edge. There are no hazards, no stalls and no
forwarding. The cost is that the clock period must cover the slowest
instruction, a load: PC → instruction memory → register read → ALU → data
memory → load extender → register-file input.

The RTL follows a reference single-cycle datapath, which is built up one
instruction class at a time. That reference fixes the units, how they connect,
the names of the control signals and their values per instruction class. The
memory sizes, the reset, the program-load port, the trace output and the
encodings of the multi-bit control signals are choices made for this RTL. They
are marked as such below and in each file's header.

## Instructions executed

| class | instructions | effect |
|---|---|---|
| R-format ALU | add sub sll slt sltu xor srl sra or and | `R[rd] = R[rs1] op R[rs2]` |
| I-format ALU | addi slti sltiu xori ori andi slli srli srai | `R[rd] = R[rs1] op imm` |
| loads | lb lh lw lbu lhu | `R[rd] = ext(M[R[rs1] + imm])` |
| store | sw | `M[R[rs1] + imm] = R[rs2]` |
| branches | beq bne blt bge bltu bgeu | `PC = cond ? PC + imm : PC + 4` |

All encodings are standard RV32I. The following are **not** implemented:
`jal`, `jalr`, `lui`, `auipc`, `sb`, `sh`, `fence` and system instructions. The
reference datapath does not cover them. Any encoding outside the table runs as
a no-op: no register write, no memory write, and the PC advances by 4. There
are no traps.

## The datapath

```
 PC ──► IMEM ──inst──┬─► rs1 ─► Reg file ─► R[rs1] ──┬─► Branch comp ─► BrEq, BrLT
  ▲                  ├─► rs2 ─►          ─► R[rs2] ──┤      (BrUn)
  │                  ├─► rd  ─► (write address)      │
  │                  └─► Imm.Gen ─► imm              │
  │                                                  │
  │   A = ASel ? PC  : R[rs1]                        │
  │   B = BSel ? imm : R[rs2]                        │
  │   alu = A (ALUSel) B ─────────────► DMEM addr    │
  │                         R[rs2] ───► DMEM DataW ◄─┘
  │                         DMEM DataR ─► load extender ─► mem
  │   R[rd] ◄── WBSel ? alu : mem          (at the rising edge, if RegWEn)
  └── PCSel ? alu : PC + 4                 (at the rising edge)
```

The four two-input multiplexers are the whole routing of the design:

| mux | select = 0 | select = 1 |
|---|---|---|
| PCSel | PC + 4 | ALU result (branch target) |
| ASel | R[rs1] | PC |
| BSel | R[rs2] | immediate |
| WBSel | loaded data | ALU result |

The ALU is the only arithmetic unit apart from the PC+4 adder. It therefore
also computes load/store addresses (`R[rs1] + imm`) and branch targets
(`PC + imm`, with ASel = 1). A separate **branch comparator** compares R[rs1]
with R[rs2] at the same time, so the condition and the target are ready in the
same cycle.

## Control

`control_logic` is purely combinational. It reads the instruction word and the
comparator flags and produces:

| class | PCSel | ImmSel | RegWEn | ASel | BSel | ALUSel | MemRW | WBSel |
|---|---|---|---|---|---|---|---|---|
| R-format | 0 | – | 1 | 0 | 0 | funct3/funct7 | read | 1 (alu) |
| I-format | 0 | I | 1 | 0 | 1 | funct3 (+inst[30] for srai) | read | 1 (alu) |
| load | 0 | I | 1 | 0 | 1 | add | read | 0 (mem) |
| sw | 0 | S | 0 | 0 | 1 | add | write | – |
| branch | taken | B | 0 | 1 | 1 | add | read | – |

**Branch decision.** The comparator gives two flags. BrEq is `A == B`. BrLT is
`A < B`, compared as unsigned numbers when BrUn = 1 and as signed numbers
otherwise. The control drives BrUn from funct3[1], which is 1 exactly for
bltu/bgeu. Each branch then tests one flag:

| branch | taken when |
|---|---|
| beq | BrEq |
| bne | !BrEq |
| blt, bltu | BrLT |
| bge, bgeu | !BrLT |

So `bge` is "not less than", and no separate ≥ comparator is needed.

**Encodings (own choice).** ALUSel is a 4-bit enum that keeps `add = 0`,
`sub = 1` and numbers the other operations after them (`riscv_pkg::alu_sel_t`).
ImmSel is a 2-bit enum with I, S and B.

## Immediates

The immediate generator wires each immediate bit from a fixed instruction bit.
Bit 31 of the instruction is always the sign.

| imm bits | I | S | B |
|---|---|---|---|
| 31..12 | inst[31] | inst[31] | inst[31] |
| 11 | inst[31] | inst[31] | inst[7] |
| 10..5 | inst[30:25] | inst[30:25] | inst[30:25] |
| 4..1 | inst[24:21] | inst[11:8] | inst[11:8] |
| 0 | inst[20] | inst[7] | 0 |

The I and S formats differ only in where the low five bits come from, so that
difference is a 5-bit mux. The B format has the same layout as S with
everything moved up one place. Its bit 0 is implicitly 0 and the old S sign
position (inst[7]) supplies imm[11]. A branch offset is therefore always even
and lies between −4096 and +4094 bytes.

## Loads and memory

Both memories are `magic_mem`: an array of 32-bit words. A read is
combinational: the address selects the word on the output. A write happens at
the rising edge when the write enable is 1. Addresses are byte addresses. A
memory uses address bits `[2 +: log2(WORDS)]` to select a word and ignores the
bits above them (addresses wrap). `load_ext` handles the narrow loads. From
the word read, it takes the byte (`addr[1:0]`) or halfword (`addr[1]`) named
by the address, little-endian, and sign- or zero-extends it as funct3 requires.

Choices made here:

- **Sizes.** IMEM and DMEM have 1024 words (4 KiB) each, set by
  `IMEM_WORDS` and `DMEM_WORDS`.
- **Initial contents.** Both memories are cleared at time zero.
- **Misaligned access.** No alignment checking. A misaligned `lw` or `sw` uses
  the aligned word, and a halfword at `addr[1:0] = 3` reads bytes 3..2 of the
  aligned word.
- **Stores.** Only word stores exist, so no byte enables are needed.

## Timing

Within one cycle, starting from the rising edge that loads PC:

1. PC settles, and IMEM returns `inst` after its access time.
2. The register file returns R[rs1] and R[rs2]. Its reads are combinational,
   and the clock only matters for writes. The immediate, the control signals
   and the comparator flags settle.
3. The ALU result settles. This is the memory address or the branch target.
4. DMEM returns read data, and the load extender and WBSel mux settle.
5. At the next rising edge, PC takes the PCSel mux output, R[rd] takes the
   WBSel output (if RegWEn = 1 and rd ≠ x0), and DMEM takes R[rs2] (if
   MemRW = write).

While an instruction executes, its destination register still holds the old
value. The new value is visible right after the edge that ends the cycle.
Register x0 reads as zero and ignores writes.

## Module hierarchy

```
riscv_single_cycle          top: processor + IMEM + DMEM, load port, trace
├── datapath                PC, register file and the units between them
│   ├── register_we         PC register (write enable tied to 1)
│   ├── adder               PC + 4
│   ├── mux2 ×4             PCSel, ASel, BSel, WBSel
│   ├── regfile             32 × 32, 2 read ports, 1 write port
│   ├── imm_gen             I / S / B immediates
│   ├── branch_comp         BrEq, BrLT (BrUn)
│   ├── alu                 10 operations
│   └── load_ext            byte/halfword select and extend
├── control_logic           instruction → control signals
├── magic_mem (u_imem)      instructions
└── magic_mem (u_dmem)      data
riscv_pkg                   opcodes, funct3 codes, enums, trace_t
```

## Top-level interface

| port | dir | meaning |
|---|---|---|
| `clk` | in | every state change happens on its rising edge |
| `rst_n` | in | synchronous, active low. Loads PC with `RESET_PC` (default 0) and blocks register and data-memory writes |
| `prog_we`, `prog_addr`, `prog_wdata` | in | writes one instruction word per cycle into IMEM. Use only while `rst_n` is low; an assertion checks this |
| `trace` | out | `riscv_pkg::trace_t`, described below |

`trace` describes the instruction executing in the current cycle: `valid`,
`pc`, `inst`, `reg_we`/`rd`/`reg_wdata`, `mem_we`/`mem_addr`/`mem_wdata` and
`next_pc`. Everything it reports takes effect at the next rising edge. The
load port, the trace and the reset are additions for use and testing. The
datapath itself has no notion of them.

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench ends by
printing `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_adder`, `tb_mux2`, `tb_alu`, `tb_branch_comp`, `tb_load_ext`, `tb_imm_gen` | corner cases and random operands against arithmetic references |
| `tb_register_we` | load only at the edge with enable, hold otherwise, reset value |
| `tb_regfile` | combinational reads, write only at the edge, x0 |
| `tb_magic_mem` | combinational read, write only at the edge with enable |
| `tb_control_logic` | every instruction kind against the control table, both flag values, unsupported opcodes |
| `tb_datapath` | random control settings and instruction words against a datapath model |
| `tb_riscv_single_cycle` | end-to-end run at the default sizes, described below |
| `tb_worked_examples` | the add timing sequence and the `lw`/`sw x14, 8(x2)` encodings, described below |

**`tb_riscv_single_cycle`.** This testbench loads a program of about 650
instructions. The program sets all registers, runs a counted loop with a
backward branch, then runs 600 random instructions (all classes, x0
destinations and unsupported opcodes) and ends on a branch to itself. Every
cycle, the testbench compares the trace against an instruction-set model
written in the testbench. At the end it compares the final registers and all
of data memory with the model. It also checks that the number of cycles equals
the number of instructions (one per cycle). It counts how often each kind of
event happened and fails if any never did. The events are each instruction
kind, taken and not-taken branches, backward branches, writes to x0 and
no-ops.

**`tb_worked_examples`.** This testbench places `add x1,x2,x3` at address
1000 and `add x6,x7,x9` at 1004. It checks that PC steps 1000 → 1004 → 1008
one cycle at a time, and that x1 keeps its old value through the whole cycle
and holds x2+x3 right after the edge. It then runs the encoded words
`0x00E12423` (`sw x14, 8(x2)`) and `0x00812703` (`lw x14, 8(x2)`).

To run a testbench with plain Verilator (from the folder that holds `rtl/`
and `tb/`):

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/riscv_pkg.sv tb/tb_riscv_single_cycle.sv --top-module tb_riscv_single_cycle
./obj_dir/Vtb_riscv_single_cycle
```

To lint the design:

```
verilator --lint-only -Wall -Wno-fatal -Irtl -y rtl rtl/riscv_pkg.sv rtl/riscv_single_cycle.sv
```

The warnings that remain are unused package constants and unused bits, and
they are harmless. The unused bits are the PC adder's carry out, the
instruction bits a decoder does not look at, and the memory address bits
outside the word index.

## Changing the design

- **Memory size.** Set `IMEM_WORDS`/`DMEM_WORDS` (powers of two) on
  `riscv_single_cycle`.
- **Start address.** Set `RESET_PC`.
- **Adding an instruction.** An instruction that fits the existing muxes needs
  only a new case in `control_logic` (and an ALU operation in `alu` and
  `riscv_pkg`, if it needs one). `jal`/`jalr`/`lui`/`auipc` need more: a third
  WBSel input (PC+4), more immediate formats in `imm_gen`, and a PCSel path
  for `jalr`.
- **Byte and halfword stores.** `sb`/`sh` need byte write enables on
  `magic_mem` and lane replication of R[rs2].
