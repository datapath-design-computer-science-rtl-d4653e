# A 16-bit single-cycle MIPS-style datapath

This is the datapath of a small single-cycle processor. It is a reduced MIPS
with 16-bit instructions, 16-bit registers and a 16-bit program counter. In
every clock cycle it does four things. It fetches the instruction at the PC,
reads two registers, puts them (or one register and a small constant) through
the ALU, and writes the result back. In the same cycle it works out where the
next instruction is. It is the datapath only: the control lines that a
decoder would set for each instruction are inputs.

Nine instructions are meant to run on it:

- the R-type ADD, SUB, AND, OR and SLT
- the memory instructions LW and SW
- the branch BEQ
- (the ninth is not named)

The datapath has the register, ALU and branch paths these need. It has no data
memory and no decoder (see *What is not here*).

## Instruction fields

An instruction is four 4-bit fields:

| bits   | 15..12 | 11..8 | 7..4 | 3..0          |
|--------|--------|-------|------|---------------|
| field  | opcode | Rs    | Rt   | Rd / offset   |

The offset of BEQ, LW and SW is the same 4 bits as Rd. It is a signed number
from -8 to +7. The offset in bits 3..0 and the order Rs, Rt, Rd are fixed. The
opcode in the top four bits is this design's assumption. The datapath never
looks at the opcode; it only brings it out as the `opcode` port.

## Next-PC logic (`fetch_unit`)

Instructions are two bytes and the PC is a byte address, so the PC normally
steps by 2. BEQ Rs, Rt, offset branches when Rs = Rt:

    next PC = PC + 2 + 2 * sext(offset)   if Branch and Zero
    next PC = PC + 2                      otherwise

The offset counts instructions from the *following* instruction, not from the
BEQ itself. So offset 0 is a no-op branch and offset -1 (hex F) branches to
itself. The hardware to do this is:

- one adder for PC + 2
- a 4-to-16-bit sign extender and a shift left by one (words to bytes)
- a second adder for the branch target
- an AND of the Branch line with the ALU's Zero output
- a 2-way multiplexer: input 0 is PC + 2, input 1 is the branch target

For BEQ the ALU is set to subtract. Zero is then high exactly when the two
registers are equal.

A worked sequence from reset (PC = 0):

| step | Branch | Zero | offset | next PC |
|------|--------|------|--------|---------|
| 1    | 1      | 1    | 3      | 0x0008  |
| 2    | 1      | 0    | 3      | 0x000A  |
| 3    | 0      | 1    | 3      | 0x000C  |
| 4    | 1      | 1    | C (-4) | 0x0006  |
| 5    | 1      | 1    | 5      | 0x0012  |
| 6    | 1      | 1    | 2      | 0x0018  |
| 7    | 1      | 1    | 9 (-7) | 0x000C  |

The instruction memory holds 128 instructions. It is addressed by the low 8
bits of the PC, and bit 0 is ignored. PC values above 0xFF therefore wrap
around the memory. The PC is always even; an assertion in `fetch_unit`
checks this. The memory reads combinationally. A separate load port
(`prog_we`, `prog_addr`, `prog_data`) writes it on the clock edge before a
program runs. Reset does not clear it.

## Register and ALU path (`reg_alu_unit`)

- **Register file.** 16 registers of 16 bits, with two combinational read
  ports and one write port. Rs addresses Read data 1 and Rt addresses Read
  data 2. When RegWrite is high, the register is written on the rising edge.
- **ALU inputs.** A is always Read data 1. B comes from the ALUSrc
  multiplexer: 0 gives Read data 2 (R-type, BEQ); 1 gives the sign-extended
  offset (LW/SW address = Rs + offset).
- **Write register.** It comes from the RegDst multiplexer. **RegDst = 0
  selects Rd, and RegDst = 1 selects Rt.** This is the reverse of the usual
  MIPS textbook convention, so take care when you write a decoder. R-type
  instructions use RegDst = 0. LW uses RegDst = 1 and writes Rt.
- **Write data.** In `datapath16` the value written is always the ALU result.

ALUop codes (4 bits):

| ALUop | function                                          |
|-------|---------------------------------------------------|
| 0     | a AND b                                           |
| 1     | a OR b                                            |
| 2     | a + b                                             |
| 6     | a - b                                             |
| 7     | set on less than: 1 if a < b (signed), else 0     |
| other | 0                                                 |

Zero is high when the result is 0.

The four register/ALU checks below start from reset, with the ALU result
written back. All use ALUop 2:

| # | Rs | Rt | Rd | RegWrite | RegDst | ALUSrc | result | effect                      |
|---|----|----|----|----------|--------|--------|--------|-----------------------------|
| 1 | 1  | 1  | 6  | 1        | 0      | 0      | 2      | r6 = r1 + r1                |
| 2 | 6  | 6  | 3  | 1        | 0      | 0      | 4      | r3 = r6 + r6                |
| 3 | 6  | 1  | 7  | 0        | 1      | 1      | 9      | SW: store r1 (1) to addr 9  |
| 4 | 3  | 6  | 5  | 1        | 1      | 1      | 9      | LW: address 9, into r6      |

## Reset and timing

`reset` is active high and asynchronous. It sets the PC to 0 and every
register to 0, except register 1, which becomes 1. That gives a program
a constant 1 to build other values from. Register 0 is an ordinary register
and is not fixed at zero.

The only state is the PC and the register file. Both update on the rising edge
of `clk`, and everything between them is combinational. One instruction
finishes per cycle. The outputs `pc`, `instr`, `read_data1`, `read_data2`,
`alu_result`, `zero` and `take_branch` are valid for the current instruction
before the edge that ends it.

## What is not here

- **Decoder / control unit.** There are no opcodes for the instructions, so
  there is no decoder. Branch, RegWrite, RegDst, ALUSrc and ALUop are top-level
  inputs. A decoder would set them as follows:

  | instr  | Branch | RegWrite | RegDst | ALUSrc | ALUop |
  |--------|--------|----------|--------|--------|-------|
  | R-type | 0      | 1        | 0      | 0      | function |
  | LW     | 0      | 1        | 1      | 1      | 2     |
  | SW     | 0      | 0        | 1 (any)| 1      | 2     |
  | BEQ    | 1      | 0        | any    | 0      | 6     |

- **Data memory.** The LW/SW address (`alu_result`) and the SW store value
  (`read_data2`) are outputs. Because write-back is always the ALU result, an
  LW here writes its *address* into Rt. To make LW load real data, add a data
  memory and a multiplexer between the memory output and the ALU result, in
  front of the register file's write-data input.

## Choices made where the source design is open

- The PC is 16 bits. The instruction memory sees only its low 8 bits.
- The instruction memory is byte-addressed, holds 128 words and has a load
  port.
- The PC and the registers reset asynchronously. There is no PC load enable.
- SLT compares signed numbers. Unused ALUop codes give 0.
- Register 0 can be written.
- Write-back is always the ALU result.
- The field layout uses bits 15..12 for the opcode.

## Files

`rtl/` (one module or package per file):

| file              | contents                                                    |
|-------------------|-------------------------------------------------------------|
| `dp_pkg.sv`       | widths, ALUop enum, instruction field struct                |
| `datapath16.sv`   | top: fetch unit + register/ALU unit, write-back, field split|
| `fetch_unit.sv`   | PC, instruction memory, PC+2 and branch adders, next-PC mux |
| `reg_alu_unit.sv` | register file, RegDst and ALUSrc muxes, sign extend, ALU    |
| `pc_register.sv`  | 16-bit register with asynchronous clear                     |
| `instr_mem.sv`    | 128 x 16 instruction memory, combinational read, load port  |
| `regfile.sv`      | 16 x 16 register file, 2 read / 1 write                     |
| `alu.sv`          | ALU and Zero flag                                           |
| `adder16.sv`, `sign_extend.sv`, `shift_left1.sv`, `mux2.sv` | small parts |

`tb/` has one self-checking testbench per module, `tb_<module>.sv`. Each ends by
printing `TB_RESULT checks=N failures=M`. Testbenches for particular modules:

- **`tb_fetch_unit`.** Runs the branch sequence above, then random Branch, Zero
  and offset values.
- **`tb_reg_alu_unit`.** Runs the four register/ALU checks above, then random
  operations.
- **`tb_datapath16`.** Runs the whole datapath at its default size. The
  testbench acts as the decoder, using its own opcode encoding: 0 AND, 1 OR,
  2 ADD, 3 SUB, 4 SLT, 8 LW, 9 SW, A BEQ. The program has three parts: the four
  register/ALU checks, a counting loop closed by a backward BEQ, and random
  instructions. A reference model checks the PC, the register reads, the ALU
  result and the branch decision every cycle. The testbench counts every
  mechanism: R-type write, Rt write, store, each ALU function, BEQ taken,
  backward and not taken, and reset. Any mechanism that never occurs is
  reported as a failure.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb rtl/dp_pkg.sv \
        tb/tb_datapath16.sv --top-module tb_datapath16 -o sim
    ./obj_dir/sim

To run another testbench, replace `tb_datapath16` with its name. Lint a module
with `verilator --lint-only -Wall -Irtl rtl/dp_pkg.sv rtl/<module>.sv`.
Verilator prints three kinds of warning, and all are expected:

- unused address bit 0 in the instruction memory
- the shifted-out top bit in the shifter
- three deliberately open observation outputs in `datapath16`

To change the size of the instruction memory, set `IMEM_ADDR_W` on
`datapath16`. The PC stays 16 bits.
