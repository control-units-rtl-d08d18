# A single-cycle Harvard processor whose control unit is almost all wiring

This is a small 16-bit processor that runs every instruction in one clock. It
has eight registers, an ALU with status flags, a data RAM and a separate
instruction memory. The design's main idea sits in the control unit. The
instruction encoding was laid out so that the decoder barely has to decode:

- the register addresses, the ALU function code, the branch condition and
  the jump offset are fields cut straight out of the instruction word;
- the four remaining datapath controls (MB, MD, WR, MW) are one-line
  Boolean functions of the top three opcode bits.

The control unit then has four parts:

- a program counter;
- the instruction memory;
- a combinational decoder;
- a small branch unit that adds a signed offset to the PC when a jump or a
  taken branch asks for it.

## One instruction, one clock

Within one cycle:

1. The PC addresses the instruction memory. The instruction appears
   combinationally.
2. The decoder turns it into the datapath control word (DA, AA, BA, MB, FS,
   MD, WR, MW) and into the branch inputs (J, B, BC, AD).
3. The register file reads R[AA] onto bus A and R[BA] onto bus B.
4. Mux B picks the ALU's second operand: bus B (MB = 0) or the instruction's
   3-bit constant (MB = 1).
5. The ALU computes F and the status bits V, C, N, Z.
6. The data RAM reads the word at address A, or prepares to write Mux B's
   output there (MW = 1).
7. Mux D picks the value to write back: F (MD = 0) or the RAM output (MD = 1).
8. Branch control looks at J, B, BC and the status bits of this same cycle.
   It sets LOAD and DATA = PC + AD.

At the rising edge, three things happen together:

- the register file writes R[DA] if WR = 1;
- the RAM writes if MW = 1;
- the PC takes PC + 1 or DATA.

No state exists besides the PC, the registers and the two memories. There is
no pipeline, stall or status register. The clock period must cover the whole
chain: instruction memory, decoder, register read, ALU, branch adder, PC.

## Instruction encoding

Every instruction is 16 bits. Bits 15..9 are a 7-bit opcode. There are three
formats:

| format      | 15..9  | 8..6     | 5..3 | 2..0     |
|-------------|--------|----------|------|----------|
| register    | opcode | DR       | SA   | SB       |
| immediate   | opcode | DR       | SA   | OP       |
| jump/branch | opcode | AD[5:3]  | SA   | AD[2:0]  |

The opcode map (instruction bits 15..9):

| opcode      | instruction                 | effect                                 |
|-------------|-----------------------------|----------------------------------------|
| `00 FFFFF`  | register ALU                | R[DR] <- R[SA] op(FFFFF) R[SB]          |
| `10 FFFFF`  | immediate ALU               | R[DR] <- R[SA] op(FFFFF) OP             |
| `1010000`   | immediate load (`LD R,#k`)  | R[DR] <- OP (ALU passes B)              |
| `0100xxx`   | `ST (Ra), Rb`               | M[R[SA]] <- R[SB]                       |
| `0110xxx`   | `LD Rd, (Ra)`               | R[DR] <- M[R[SA]]                       |
| `110x BBB`  | conditional branch          | if cond(BBB) on R[SA]: PC <- PC + AD    |
| `111xxxx`   | `JMP`                       | PC <- PC + AD                           |

- `OP` is an unsigned constant from 0 to 7. It is zero-extended.
- `AD` is a signed offset from -32 to +31.
- The target is the branch's own address plus AD, not the next address.
  So `JMP 0` is a one-instruction endless loop, which is a convenient halt.

The branch conditions (BBB = bits 11..9):

| BC  | branch | taken when | BC  | branch | taken when |
|-----|--------|------------|-----|--------|------------|
| 000 | BC     | C = 1      | 100 | BNC    | C = 0      |
| 001 | BN     | N = 1      | 101 | BNN    | N = 0      |
| 010 | BV     | V = 1      | 110 | BNV    | V = 0      |
| 011 | BZ     | Z = 1      | 111 | BNZ    | Z = 0      |

## The decoder

`instruction_decoder` is pure wiring plus five gates:

```
DA = I[8:6]   AA = I[5:3]   BA = I[2:0]       FS = I[13:9]  (but 00000 for I15 I14 = 11)
MB = I15      MD = I14      WR = ~I14 | (~I15 & I13)       MW = ~I15 & I14 & ~I13
J  = I15 & I14 & I13        B  = I15 & I14 & ~I13
BC = I[11:9]  AD = {I[8:6], I[2:0]}
```

Why this works, category by category:

| category       | I15..13 | MB | MD | WR | MW |
|----------------|---------|----|----|----|----|
| register ALU   | 00x     | 0  | 0  | 1  | 0  |
| ST             | 010     | 0  | x  | 0  | 1  |
| LD             | 011     | x  | 1  | 1  | 0  |
| immediate ALU  | 10x     | 1  | 0  | 1  | 0  |
| branch / JMP   | 11x     | x  | x  | 0  | 0  |

The don't-cares (x) are what let MB = I15 and MD = I14 work. The register
fields can also always be passed through. When a format does not use a field,
the matching control is harmless:

- an immediate instruction's OP lands on BA, but nothing reads bus B;
- a branch's offset bits land on DA, but WR is 0.

Only the ALU code needs a special case. The ALU instructions carry their FS
code in bits 13..9. A branch carries `0 x BC` there instead, and a branch
still needs the ALU to copy R[SA] to F so that N and Z describe that
register. The decoder therefore forces FS to 00000 (F = A) for the whole
11x category. The same 00000 is harmless for JMP.

Two immediate assertions in the decoder check the categories stay
exclusive: WR and MW are never both set, and neither are J and B.

### A consequence worth knowing: BC and BV

During a branch the ALU passes A and adds nothing, so C and V are always 0.
As a result:

- `BC` and `BV` never branch;
- `BNC` and `BNV` always branch, so they act as unconditional jumps;
- only the N and Z conditions test the register.

This follows from passing A through the ALU for branches. Testing carry or
overflow of an earlier operation would need a status register, and this
processor has none.

## ALU function codes

The instruction set fixes only a few codes:

- 00000 and 00111 pass A;
- 01100 is XOR;
- 10000 passes B.

The instruction set also needs an add and a subtract, but does not give
their codes. The rest of the table below, including 00010 for A + B and
00101 for A - B, was chosen here to fit around the fixed codes.

| FS4..3 | meaning                                                        |
|--------|----------------------------------------------------------------|
| 00     | F = A + Y + FS0, with Y = 0, B, ~B, all-ones for FS2..1 = 00..11 |
| 01     | FS2..1: 00 AND, 01 OR, 10 XOR, 11 NOT A                        |
| 1x     | FS3..2: 00 F = B, 01 B >> 1, 10 B << 1, 11 F = B               |

So the arithmetic group is:

| FS    | function  | FS    | function   |
|-------|-----------|-------|------------|
| 00000 | A         | 00100 | A + ~B     |
| 00001 | A + 1     | 00101 | A - B      |
| 00010 | A + B     | 00110 | A - 1      |
| 00011 | A + B + 1 | 00111 | A          |

The status bits work as follows:

- N is the top bit of F.
- Z is set when F = 0.
- C is the adder's carry out. After a subtraction, C = 1 means no borrow.
- V is signed overflow.
- C and V are 0 for the logic and shift codes.

## Datapath wiring

Bus A, from register port A, drives two inputs:

- the ALU's A input;
- the data RAM address.

Mux B's output also drives two inputs:

- the ALU's B input;
- the RAM's write data.

For that reason a store has MB = 0, so that the data comes from register SB.
An immediate load is an ordinary immediate ALU instruction: the constant goes
through Mux B, the ALU passes B, and Mux D returns the result to the register
file.

## Modules

| file | role |
|------|------|
| `rtl/cpu_pkg.sv` | types shared by all modules: control word, branch inputs, status, FS and BC codes |
| `rtl/processor.sv` | top: `control_unit` + `datapath` |
| `rtl/control_unit.sv` | `program_counter`, `instruction_memory`, `instruction_decoder`, `branch_control` |
| `rtl/program_counter.sv` | PC: +1, or load DATA when LOAD = 1 |
| `rtl/instruction_memory.sv` | 2^IMEM_AW x 16 program store, combinational read, load port |
| `rtl/instruction_decoder.sv` | the equations above |
| `rtl/branch_control.sv` | LOAD = J \| (B & cond); DATA = PC + sign-extended AD |
| `rtl/datapath.sv` | `register_file`, two `mux2`, `alu`, `data_ram` |
| `rtl/register_file.sv` | 8 x DATA_W, two combinational reads, one clocked write |
| `rtl/alu.sv` | function table above |
| `rtl/data_ram.sv` | 2^DMEM_AW x DATA_W, combinational read, clocked write |
| `rtl/mux2.sv` | word multiplexer used as Mux B and Mux D |

Parameters of `processor`, with their defaults:

| parameter | default | meaning |
|-----------|---------|---------|
| `DATA_W`  | 16 | data word width |
| `PC_W`    | 16 | PC width |
| `IMEM_AW` | 16 | instruction memory address bits: 64 K instructions |
| `DMEM_AW` | 16 | data memory address bits: 64 K words |

The register count (8), the 3-bit constant and the 6-bit offset are fixed by
the instruction format. The data width, the PC width and the two memory
depths are choices made here.

The top-level ports:

- `clk`;
- `rst`, a synchronous, active-high reset that clears the PC and all
  registers;
- `imem_we`, `imem_waddr` and `imem_wdata`, which write the program;
- `pc`, `instr`, `ctrl`, `status` and `d_bus`, outputs that show what the
  current cycle does.

The instruction memory is meant to be loaded while `rst` is held and left
alone while the program runs. A concurrent assertion in `processor` flags a
write outside reset. The data RAM has no reset, and its contents start
undefined.

## Choices made in this implementation

The instruction set above fixes these things: the formats, the opcode map,
the decoder equations, the BC table, the PC-relative target PC + AD and the
datapath connections. The following were chosen here:

- 16-bit data, 16-bit PC, 64 K-word memories.
- The constant OP is zero-extended.
- The ALU codes not listed above, and the rules for C and V.
- FS = 00000 for every branch and JMP.
- Branch conditions are tested on the status bits of the branch's own cycle.
- Reset clears the PC and the registers. Register R0 is an ordinary
  register.
- Both memories have a combinational read and a clocked write. The
  instruction memory has a load port.

## Simulation

Each testbench in `tb/` checks itself. It prints
`TB_RESULT checks=N failures=M` and stops. The shared assembler and the
instruction-level reference model are in `tb/cpu_tb_pkg.sv`. That model is
written from what each instruction means, not from the decoder's equations.
For example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/cpu_pkg.sv tb/cpu_tb_pkg.sv tb/tb_processor.sv --top-module tb_processor
./obj_dir/Vtb_processor
```

What each testbench covers:

| testbench | covers |
|-----------|--------|
| `tb_processor` | default sizes. (1) A short program with a multiply loop (ADD, SUB #1, BNZ back), ST/LD through a register, XOR, BZ, forward and backward JMP, BN. It checks the final state and that 27 instructions take 27 clocks. (2) The full 64 K instruction memory filled with a random program, run for 200,000 cycles in lockstep with the reference model, comparing PC, instruction, write-back, registers and stores every cycle. Jump and branch offsets are forward-only in this part, so the PC sweeps memory. |
| `tb_examples` | the instruction set's example instructions, each checked in the cycle it executes, including MB/MD/WR/MW |
| `tb_control_unit` | random program and random status bits; PC sequence, constant, register fields, write enables |
| `tb_instruction_decoder` | all 65,536 instruction words against the category table |
| `tb_branch_control` | random inputs; every condition taken and not taken |
| `tb_alu` | all 32 FS codes with corner and random operands, against integer arithmetic |
| `tb_datapath`, `tb_register_file`, `tb_data_ram`, `tb_mux2`, `tb_program_counter`, `tb_instruction_memory` | the single units against small models |

Every testbench runs in well under a second.
