# Single-cycle RV32I processor core

A small 32-bit RISC-V processor that fetches, decodes, executes and writes back
one instruction per clock cycle. There is no pipeline, so there are no hazards,
no forwarding and no stalls. Each instruction's whole path runs through
combinational logic between two clock edges:

    PC -> instruction memory -> decoder / register file / immediate extender
       -> ALU -> data memory -> result multiplexer -> register file (at the edge)

This keeps the core easy to understand and verify. It suits small embedded
uses where simplicity and low area count for more than clock rate. The RTL
follows a published description of a single-cycle RV32I core built for a
Xilinx Spartan-7 (Arty S7) FPGA: its block diagram, its control-signal names
and encodings, its memory sizes and its sample program. Where that
description is silent or contradicts itself, the choices made here are listed
below in "Where this RTL departs from, or adds to, the original description".

## Datapath

```
              +-------------------------------(PCTarget = PC + ImmExt)----+
              v                                                           |
 PCPlus4 -> [mux2 PCSrc] -> [pc_reg] -PC-> [instr_mem] -Instr->            |
              ^                |                                          |
              +--[adder +4]<---+                                          |
                                                                          |
 Instr[19:15] -> A1  [reg_file] RD1 ----------------- SrcA -> [alu] -ALUResult-> A [data_mem] RD -+
 Instr[24:20] -> A2             RD2 --+-> [mux2 ALUSrc] SrcB ->  |  Zero -> control_unit       |
 Instr[11:7]  -> A3                   |        ^                 |                             |
 Result       -> WD3                  +--------|---- WriteData ----------> WD                  |
 Instr[31:7]  -> [extender] ImmExt ------------+--> [adder PC+ImmExt] -> PCTarget              |
                                                                                               |
 Result = [mux3 ResultSrc]( 00: ALUResult, 01: ReadData, 10: PCPlus4 ) <-----------------------+
```

- **Program counter (`pc_reg`)**: a 32-bit register. It loads PCNext at every
  rising edge. Reset (active high, asynchronous) sets it to 0.
- **Next-PC logic**: two `adder`s compute PC+4 and PC+ImmExt. A `mux2`,
  selected by PCSrc, picks one of them as PCNext.
- **Instruction memory (`instr_mem`)**: a ROM of 32-bit words, read
  combinationally at PC[9:2]. It holds 256 words by default, loaded from a hex
  file at start-up.
- **Register file (`reg_file`)**: 32 x 32 bits. It has two combinational read
  ports and one write port, which writes at the clock edge when RegWrite is
  high. x0 always reads 0. Reset clears all registers.
- **Immediate extender (`extender`)**: gathers the immediate bits of the I, S,
  B or J format and sign-extends them to 32 bits.
- **ALU (`alu`)**: add, sub, and, or, xor, slt, sltu, sll, srl and sra. It also
  gives a Zero flag.
- **Data memory (`data_mem`)**: 2048 x 32 bits, word access only. Reads are
  combinational. Writes happen at the clock edge when MemWrite is high.
- **Result multiplexer (`mux3`)**: chooses the write-back value.

Everything is combinational except the PC, the register file and the data
memory writes. The critical path of a load is therefore: instruction read,
register read, address add, data memory read, result mux, then register-file
setup.

## Control

The control unit (`control_unit`) has two decoders and one gate equation.

### Main decoder (`main_decoder`), from the opcode

| instruction | opcode | RegWrite | ImmSrc | ALUSrc | MemWrite | ResultSrc | Branch | ALUOp | Jump |
|---|---|---|---|---|---|---|---|---|---|
| lw       | 0x03 | 1 | I (0) | 1 | 0 | ReadData (1) | 0 | 0 add    | 0 |
| sw       | 0x23 | 0 | S (1) | 1 | 1 | –            | 0 | 0 add    | 0 |
| R-type   | 0x33 | 1 | –     | 0 | 0 | ALU (0)      | 0 | 2 funct  | 0 |
| I-type   | 0x13 | 1 | I (0) | 1 | 0 | ALU (0)      | 0 | 2 funct  | 0 |
| branches | 0x63 | 0 | B (2) | 0 | 0 | –            | 1 | 1 branch | 0 |
| jal      | 0x6f | 1 | J (3) | – | 0 | PC+4 (2)     | 0 | –        | 1 |

Entries marked "–" are driven as 0. Any other opcode gives all-zero controls,
so it acts as a no-op: no register or memory write, and the PC advances by 4.

### ALU decoder (`alu_decoder`) and ALUControl codes

| ALUControl | operation | used by |
|---|---|---|
| 4'h5 | ADD  | add, addi, lw/sw address |
| 4'hA | SUB  | sub, beq, bne |
| 4'h2 | AND  | and, andi |
| 4'h3 | OR   | or, ori |
| 4'h4 | XOR  | xor, xori |
| 4'h1 | SLT  | slt, slti, blt, bge |
| 4'h8 | SLTU | sltu, sltiu, bltu, bgeu |
| 4'h0 | SLL  | sll, slli |
| 4'h6 | SRL  | srl, srli |
| 4'h7 | SRA  | sra, srai |

The codes for ADD, SUB, AND and OR are the ones the original design uses. The
other six codes were chosen for this RTL. funct3 = 000 means SUB only when the
opcode is R-type (bit 5 set) and Instr[30] is set. Otherwise, an addi whose
negative immediate sets bit 30 would subtract. funct3 = 101 means SRA whenever
Instr[30] is set, for both srl/sra and srli/srai.

### Branch decision using only the Zero flag

In the block diagram, the only status signal the ALU sends back to the
control unit is Zero. This RTL therefore decides all six RV32I branches from
Zero alone. The ALU decoder picks the comparison:

| branch | ALU op | branch taken when |
|---|---|---|
| beq  | SUB  | Zero = 1 |
| bne  | SUB  | Zero = 0 |
| blt  | SLT  | Zero = 0 (SLT gave 1) |
| bge  | SLT  | Zero = 1 |
| bltu | SLTU | Zero = 0 |
| bgeu | SLTU | Zero = 1 |

In funct3, the rows that branch on Zero = 0 are 001, 100 and 110. They are
exactly the ones where funct3[0] XOR funct3[2] is 1. So:

    PCSrc = Jump | (Branch & (Zero ^ (funct3[0] ^ funct3[2])))

Branch and jal targets are both PC + ImmExt, computed by the second adder.
jal writes PC+4 into rd through input 10 of the result multiplexer.

## Instructions executed

There are 28 instructions from RV32I:

- R-type: add, sub, sll, slt, sltu, xor, srl, sra, or, and
- I-type ALU: addi, slti, sltiu, xori, ori, andi, slli, srli, srai
- lw, sw
- beq, bne, blt, bge, bltu, bgeu
- jal

The original description claims 30 instructions but does not list them. Its
datapath has:

- a two-input next-PC multiplexer, so no register-relative target for jalr;
- a two-bit immediate select with I/S/B/J only, so no U-type for lui and auipc;
- a data memory without byte enables, so no lb/lh/lbu/lhu/sb/sh.

This RTL keeps that datapath. Those instructions, and fence/ecall/ebreak, run
as no-ops.

## Memories and their contents

`instr_mem` (parameters `DEPTH` = 256, `INIT_FILE`) and `data_mem`
(`DEPTH` = 2048, `INIT_FILE`) load their contents with `$readmemh` at
start-up. Words the file does not cover start at 0. The file paths are
relative to the directory the simulator runs in, which is the project root.
The top-level parameters `IMEM_FILE` and `DMEM_FILE` pass the paths down.
Pass `""` to start a memory all-zero.

- `rtl/sample_program.hex` (the default program) is a seven-instruction
  sample program:

      0x00: lw   t1, 0(x0)      00002303
      0x04: lw   t2, 4(x0)      00402383
      0x08: bne  t2, t1, +8     00639463
      0x0c: ori  t3, x0, 4      00406e13
      0x10: and  t4, t2, x0     0003feb3
      0x14: sw   t3, 8(x9)      01c4a423
      0x18: jal  t1, +8         0080036f

- `rtl/sample_data.hex` (the default data) puts 0x30303030, 0x20202020,
  0x40404040 and 0 at byte addresses 0, 4, 8 and 12.

Both memories ignore address bits [1:0], and address bits beyond the
array's size wrap around. Unaligned or sub-word data accesses are not
detected. There is no misaligned-fetch exception either: an assertion in
`rv32i_top` reports a PC that is not word aligned, which a branch or jal
offset that is not a multiple of 4 would cause.

## Where this RTL departs from, or adds to, the original description

- **The sample program's branch.** The original account lists the third
  instruction as "beq t2, t1, 16" and reports that the branch was not taken.
  Its printed machine code, 0x00639463, actually encodes **bne** t2, t1, +8.
  This core executes the machine code as RV32I defines it, so the branch is
  taken and ori is skipped. The reported behaviour (not taken, t3 = 4,
  M[8] = 4, t1 = 28, PC ends at 32) is reproduced by the beq encoding
  0x00638463. `tb_sample_program` runs both versions.
- **Immediates are always sign-extended.** The original text says unsigned
  operations use zero extension. RV32I sign-extends every immediate (sltiu
  compares against the sign-extended value), and the two-bit ImmSrc has no
  spare code. RV32I is followed.
- **Reset.** The original description does not mention reset. Here an active
  high, asynchronous `reset` clears the PC and all 32 registers. The memories
  are not reset.
- **Instruction memory depth** (256 words) is this RTL's choice. The original
  only says it is a parameter.
- **Branch comparisons** for blt/bge/bltu/bgeu, the PCSrc equation and six of
  the ten ALUControl codes are this RTL's own choices (see "Control").
- **Top-level ports.** The FPGA build reported 34 I/O pins but does not say
  which signals they were. This top brings out clk, reset and observation
  buses: pc, instr, alu_result, write_data, mem_write and result.
- The ALU also implements xor and the three shifts, which the RV32I R- and
  I-type instructions need. The original names only add, subtract, AND, OR
  and comparisons.

The original reports 1814 LUTs and 160 flip-flops on the Spartan-7. This RTL
has not been through an FPGA flow. In a generic synthesis, the register file
alone is 1024 flip-flops plus 32 for the PC. The data memory is 64 Kibit of
memory, which an FPGA would map to block or distributed RAM.

## Files

| file | contents |
|---|---|
| `rtl/rv32i_pkg.sv` | opcodes and the enums for ALUControl, ImmSrc, ResultSrc, ALUOp |
| `rtl/rv32i_top.sv` | the processor, wiring all blocks |
| `rtl/pc_reg.sv`, `rtl/adder.sv`, `rtl/mux2.sv`, `rtl/mux3.sv` | PC register, adders, multiplexers |
| `rtl/instr_mem.sv`, `rtl/data_mem.sv` | the two memories |
| `rtl/reg_file.sv`, `rtl/extender.sv`, `rtl/alu.sv` | register file, immediate extender, ALU |
| `rtl/main_decoder.sv`, `rtl/alu_decoder.sv`, `rtl/control_unit.sv` | control |
| `rtl/sample_program.hex`, `rtl/sample_data.hex` | default memory contents |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_rv32i_top.sv` | end-to-end test against an instruction-set model |
| `tb/tb_sample_program.sv` | the sample program, both branch encodings |
| `tb/rv32i_asm_pkg.sv` | instruction encoders used by the processor tests |

## Verification

Every testbench checks its block against values computed independently, for
example a 64-bit integer model for the ALU and a field-by-field integer
decode for the extender. Each ends by printing
`TB_RESULT checks=N failures=M`.

`tb_rv32i_top` runs the processor with all parameters at their defaults. It
assembles this program into the instruction memory:

- a three-pass countdown loop (a backward branch);
- 220 pseudo-random instructions that use all 28 opcodes, with forward
  branches and jumps, writes to x0, and stores followed by loads of the same
  word;
- a jump-to-self at the end.

An instruction-set model in the testbench executes the same program. The
testbench compares against the model:

- the PC and the fetched word, every cycle;
- all 32 registers, after every edge;
- every store's address and data;
- at the end, the reachable data words.

It also counts each mechanism (each instruction, taken and not-taken
branches, backward branches, x0 writes, store-to-load reuse). A mechanism
that never occurs is counted as a failure. A typical run retires 195
instructions in 195 cycles.

## Simulating

From the project root, with Verilator 5:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb rtl/rv32i_pkg.sv \
        tb/tb_rv32i_top.sv --top-module tb_rv32i_top -o sim
    ./obj_dir/sim

To run another test, replace `tb_rv32i_top` with its name, for example
`tb_sample_program` or `tb_alu`. To run your own program, write one 32-bit
hex word per line and set the `IMEM_FILE` parameter of `rv32i_top` to that
file, or use `-GIMEM_FILE='"prog.hex"'` when `rv32i_top` itself is the
Verilator top. The testbenches also reach the memory arrays
hierarchically (`dut.u_imem.rom`, `dut.u_dmem.ram`, `dut.u_rf.regs`) to load
programs and inspect state.
