# A single-cycle MIPS-subset processor

This is a processor in which every instruction starts and finishes within one
clock period. Nothing is pipelined and nothing is shared across cycles. On the
clock edge the program counter, one register and at most one memory word change
together. Between two edges everything is combinational. The PC selects an
instruction, the instruction's fields select registers and control settings, the
ALU and the data memory produce a result, and that result waits at the register
file's input for the next edge. CPI is exactly 1. The clock period has to cover
the slowest instruction (a load).

The design follows the classic textbook single-cycle datapath for six MIPS
instructions:

| instruction        | register transfer                                   |
|--------------------|-----------------------------------------------------|
| `addu rd, rs, rt`  | R[rd] = R[rs] + R[rt]                               |
| `subu rd, rs, rt`  | R[rd] = R[rs] - R[rt]                               |
| `ori  rt, rs, imm` | R[rt] = R[rs] \| ZeroExt(imm16)                      |
| `lw   rt, imm(rs)` | R[rt] = Mem[R[rs] + SignExt(imm16)]                 |
| `sw   rt, imm(rs)` | Mem[R[rs] + SignExt(imm16)] = R[rt]                 |
| `beq  rs, rt, imm` | if R[rs] == R[rt]: PC = PC + 4 + SignExt(imm16)*4   |

Every other instruction goes to PC + 4 and writes nothing. The usual nop (`sll $0,$0,0`)
is one of them.

## Instruction formats

```
R-format:  op[31:26] rs[25:21] rt[20:16] rd[15:11] shamt[10:6] funct[5:0]
I-format:  op[31:26] rs[25:21] rt[20:16] immediate[15:0]
```

The encodings are the standard MIPS ones: `addu` and `subu` are op 0x00 with funct
0x21 and 0x23; `ori` 0x0D, `lw` 0x23, `sw` 0x2B, `beq` 0x04. `shamt` is ignored.

## Block structure

```
single_cycle_cpu
├── ideal_mem  u_imem        instruction memory (256 words)
├── control    u_control     main decoder
├── datapath   u_datapath
│   ├── ifetch   u_ifetch    PC and next-address logic
│   │   ├── adder  x2        PC+4, branch target
│   │   ├── mux2             nPC_sel
│   │   └── register_we      30-bit PC
│   ├── mux2 (5 bit)         RegDst
│   ├── regfile              32 x 32
│   ├── extender             ExtOp
│   ├── mux2                 ALUSrc
│   ├── alu                  ALUctr
│   ├── eq_cmp               Equal
│   └── mux2                 MemtoReg
└── ideal_mem  u_dmem        data memory (256 words)
```

`mips_pkg` holds the opcodes, the `alu_ctr_e` enum and the `ctrl_t` struct. That
struct carries all control points from `control` to `datapath`.

## The datapath, following one instruction through a cycle

**Fetch.** The PC addresses the instruction memory. The memory's read is
combinational, so the instruction word appears after the memory's access time.
`ifetch` computes both possible successors in parallel. One adder makes PC + 4. A
second adder adds the branch offset to PC + 4. The branch offset is SignExt(imm16)
shifted left by two, because branch offsets count words. `nPC_sel` picks the
successor (1 = branch target), and the PC loads it at the next edge. The two low
PC bits are always 00, so the PC register stores only bits 31:2.

**Operands.** `rs` drives read port A and `rt` drives read port B. Register reads
are combinational: the clock matters only for writes. The write address is `rd`
for R-format and `rt` for I-format, chosen by the `RegDst` multiplexer (1 = rd).
This is why `ori` and `lw` cannot write through `rd`: their `rd` bits are part of
the immediate.

**Execute.** busA always goes to the ALU's A input. The `ALUSrc` multiplexer gives
the B input either busB (0) or the 32-bit extended immediate (1). The `extender`
zero-extends for `ori` (`ExtOp` = 0) and sign-extends for `lw`/`sw` (`ExtOp` = 1).
The ALU adds, subtracts or ORs. A separate comparator computes Equal = (busA == busB)
for `beq`. So the ALU is never used for the branch condition.

**Memory.** The ALU result is the data memory address, and busB is its write data.
With `MemWr` = 1 (`sw`), the word is written at the edge that ends the cycle.

**Write-back.** The `MemtoReg` multiplexer sends the ALU result (0) or the data
memory output (1) to busW. With `RegWr` = 1 the register file stores busW at the
same edge.

Register 0 is special: writes to it are dropped, and reads of it return 0.

## Control

`control` is a pure decoder of `op`, `funct` and the Equal condition. It has no
state. Don't-care entries below are driven as 0.

| instr | RegDst | RegWr | ExtOp | ALUSrc | ALUctr | MemWr | MemtoReg | nPC_sel |
|-------|:------:|:-----:|:-----:|:------:|:------:|:-----:|:--------:|:-------:|
| addu  | 1 | 1 | - | 0 | add | 0 | 0 | 0 |
| subu  | 1 | 1 | - | 0 | sub | 0 | 0 | 0 |
| ori   | 0 | 1 | 0 | 1 | or  | 0 | 0 | 0 |
| lw    | 0 | 1 | 1 | 1 | add | 0 | 1 | 0 |
| sw    | - | 0 | 1 | 1 | add | 1 | - | 0 |
| beq   | - | 0 | - | 0 | sub | 0 | - | Equal |

`ALUctr` is 2 bits: 00 add, 01 subtract, 10 OR. The branch decision is made in
control: `nPC_sel` = (op is beq) AND Equal.

## Timing

The rising clock edge updates all state: the PC, the register file and the data
memory. Everything else settles during the cycle. The delays add up in this order:

1. PC clock-to-Q
2. instruction memory access
3. control decode, in parallel with the register file read
4. ALU
5. data memory read (for `lw`)
6. MemtoReg multiplexer
7. register file setup

The longest of these paths sets the clock period. A read from a register that is
written in the same cycle returns the old value; the new value appears after the
edge.

Reset (`rst`) is synchronous and active high. It affects only the PC, which it
sets to `RESET_PC` (0).

The register file and the data memory have no reset, like real register-file and
SRAM arrays. A program must write a register before it reads it. Register 0 is
the exception.

## Memories

Both memories are instances of `ideal_mem`. Each is 256 words of 32 bits (1 KiB),
byte-addressed, with only whole-word accesses:

- The word is chosen by address bits [9:2]: byte address 0x0 is word 0, 0x4 is
  word 1, and so on.
- The two low address bits are ignored, so accesses are assumed to be aligned.
- Bits above bit 9 are also ignored, so each memory repeats every 1 KiB through
  the address space.

Both memories are "ideal": the read is combinational, and the write happens at
the clock edge.

`ideal_mem` has separate read and write addresses. The data memory drives both
from the ALU result. The instruction memory uses its write port only to load the
program, through the top-level `imem_load_we/addr/data` port, normally while `rst`
is held.

## Top-level interface (`single_cycle_cpu`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk | in | 1 | clock, rising edge |
| rst | in | 1 | synchronous reset of the PC |
| dump | in | 1 | a rising edge prints all 32 registers to the simulator console (no hardware effect) |
| imem_load_we, imem_load_addr, imem_load_data | in | 1, 32, 32 | write a word into the instruction memory |
| pc | out | 32 | address of the current instruction |
| instr | out | 32 | current instruction |
| reg_wr, reg_rw, bus_w | out | 1, 5, 32 | register write of this cycle (takes effect at the next edge) |
| mem_wr, mem_addr, mem_wdata | out | 1, 32, 32 | data memory write of this cycle |

Parameters: `MEM_WORDS` (256) sets the size of each memory; `RESET_PC` (0) sets
the PC after reset.

## Where this RTL makes its own choices

The original description gives the datapath structure, the register transfers, the
control-point names, the register file and register behaviour, and the 256-word
memory geometry. The following are this implementation's own choices:

- **Clock edge.** Storage is written on the rising edge, matching the behavioural
  register description and the register-transfer timing diagram. The block
  diagrams, however, draw every clock input with an inversion bubble. If you want
  falling-edge storage, change the `posedge` in `register_we`, `regfile` and
  `ideal_mem`.
- **Control encodings.** The numeric opcodes, the `ALUctr` code and the polarity
  of `ExtOp` and `nPC_sel` are not given by the source material. Standard MIPS
  opcodes are used. The control unit as a whole is derived here from the register
  transfers; the original only names its outputs.
- **Equal.** The branch condition comes from a separate comparator on busA and
  busB. One of the original diagrams draws it as an output of the ALU instead.
  The function is the same.
- **Register 0** is forced to read as zero, rather than relying on its storage
  never being written.
- **Added ports.** The program-load port and the observation outputs were added
  for loading and testing.
- **Reset.** Only the PC has a reset, and its reset value (0) was chosen here.
- **Unknown instructions** behave as no-ops.
- **ALU.** Arithmetic wraps modulo 2^32 (unsigned `addu`/`subu`), so there is no
  overflow detection. Byte loads are not supported.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends with a line
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_register_we` | load/hold/reset against a model register |
| `tb_regfile` | all 32 registers; random reads and writes; register 0 stays 0; old value before the edge, new after |
| `tb_alu` | add/sub/or corner cases and random operands |
| `tb_extender` | all 65536 immediates in both modes |
| `tb_mux2`, `tb_adder`, `tb_eq_cmp` | random operands |
| `tb_ideal_mem` | all 256 words; random aligned and unaligned addresses with junk upper bits, to check that only bits [9:2] select the word |
| `tb_ifetch` | PC after reset, PC + 4, taken branches with positive and negative offsets |
| `tb_control` | every control point of the six instructions, with random don't-care fields and both Equal values; unknown opcodes and functs must do nothing |
| `tb_datapath` | the datapath driven by a testbench-side decoder and memory models, running a random program |
| `tb_single_cycle_cpu` | end-to-end test, described below |

`tb_single_cycle_cpu` runs the whole processor at its default size. It loads a
program and runs 5000 cycles. Every cycle, it compares the PC, the instruction,
the register write and the memory write against an instruction-level reference
model (`tb/mips_tb_pkg.sv`). That model executes the register transfers directly.
Matching the PC every cycle shows that exactly one instruction completes per
clock. At the end, the whole data memory is compared with the model's.

The program has two parts:

- A directed prefix: a counted loop closed by a backward `beq`, a store followed
  by a load of the same word, a write to `$0`, and a nop.
- Random instructions filling the rest of the memory.

The test counts each instruction type and each of these events, and fails if any
of them never occurred: forward and backward taken branches, fall-through
branches, loads of previously stored words, discarded `$0` writes, and no-ops.

### Running with Verilator

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/mips_pkg.sv tb/mips_tb_pkg.sv tb/tb_single_cycle_cpu.sv \
    --top-module tb_single_cycle_cpu -Mdir obj_cpu
./obj_cpu/Vtb_single_cycle_cpu
```

`-y` lets Verilator find each module in the file of the same name. For a unit
test, replace the last source and the top module, for example with
`tb/tb_regfile.sv --top-module tb_regfile`. With `rtl/mips_pkg.sv` listed first,
every module in `rtl/` lints on its own under `verilator --lint-only -Wall`. The
only warnings are for address and instruction bits that are intentionally unused,
and for package constants that a given module does not use.

### Changing it

- **Adding an instruction.** Add its opcode to `mips_pkg`, add a row to the
  `case` in `control.sv` and, if needed, a new `alu_ctr_e` value and ALU case. If
  the instruction needs a new data path, add a control field to `ctrl_t` and a
  multiplexer in `datapath.sv`. Then extend `step()` in `tb/mips_tb_pkg.sv` so
  the reference model knows the new instruction.
- **Changing the memory size.** `MEM_WORDS` sets the size of both memories. The
  index bits follow automatically as [log2(MEM_WORDS)+1 : 2]. The testbenches
  assume 256 words.
