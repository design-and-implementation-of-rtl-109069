# 32-bit five-stage pipelined RISC processor

A small 32-bit RISC processor meant for real-time embedded control. It has
eight registers, a nine-function ALU and a classic five-stage pipeline
(fetch, decode, execute, memory, write-back). The pipeline lets one instruction
finish every clock once it is full. The processor reaches the outside world
through three input registers (A, B, S) and one output register (Z). The example
application is an automatic newspaper vending machine. A keypad selection arrives
on S. The program checks it against a stock table in data memory, then either
delivers a paper or rejects the request on Z.

The design follows a published description of such a processor. That
description fixes the stage structure, the ALU function table and the behaviour
of the register bank. Everything it leaves open is this design's own choice and
is marked as such below: the instruction encoding, the hazard handling, the
branch scheme, memory sizes and I/O access.

## Block structure

```
 IF                 ID                     EX                MEM               WB
 program_counter    instruction_decoder    operand muxes     data_memory       write-back mux
   +4 adder, mux      (ALU decoder,          alu              OUT -> Z           -> register_bank
 instruction_memory    reg-bank decoder,     zero test        branch taken
   (read reg = IR)     sign extend)          IN <- A, B, S      -> PC mux
                    register_bank read
        |  IF/ID  |             |  ID/EX  |         | EX/MEM |          | MEM/WB |
 hazard_unit: forwards EX/MEM and MEM/WB values into the EX operand muxes,
              stalls IF and ID for one cycle on a load-use dependency
```

| Module | Role |
|---|---|
| `risc_pkg` | Shared widths, ALU select codes, opcodes, the control bundle `ctrl_t`, forwarding selects |
| `risc_processor` | Top level: pipeline registers, operand multiplexers, I/O registers, wiring |
| `program_counter` | Fetch address; +4 adder; loads a branch target; holds on a stall |
| `instruction_memory` | 256 x 32 instruction store with a one-cycle registered read and a load port |
| `instruction_decoder` | Two decoders (ALU side and register-bank side) and the immediate sign extender |
| `register_bank` | 8 x 32 D-flip-flop registers, two read ports, one write port, reset clears |
| `alu` | 32-bit, nine functions on a 4-bit select line |
| `hazard_unit` | Forwarding selects for the two ALU operands and the load-use stall |
| `data_memory` | 256 x 32 data store, synchronous write, combinational read |

## The ALU

The ALU is purely combinational. Its select codes are part of the instruction
(bits [27:24]) for register and immediate ALU instructions:

| S | Result |
|---|---|
| 0000 | A AND B |
| 0001 | A NAND B |
| 0010 | A OR B |
| 0011 | A NOR B |
| 0100 | A XOR B |
| 0101 | A XNOR B |
| 0110 | NOT A |
| 0111 | A + B |
| 1000 | A − B |

Codes 1001–1111 are unused and give 0. No carry, overflow or condition flags
exist. Add and subtract wrap modulo 2^32. There is no shifter, and no
compare instruction. A program tests a sign by subtracting and then ANDing the
result with a mask of high bits (see the vending program).

## Instruction set (this design's encoding)

The original description gives only the ALU select codes, so the word layout is
this design's own:

```
 31   28 27   24 23 21 20 18 17 15 14             0
+-------+-------+-----+-----+-----+----------------+
|  op   |  sel  | rd  | rs  | rt  |  imm (signed)  |
+-------+-------+-----+-----+-----+----------------+
```

| op | Mnemonic | Effect |
|---|---|---|
| 0 | ALU sel rd, rs, rt | rd = rs ⟨sel⟩ rt |
| 1 | ALUI sel rd, rs, imm | rd = rs ⟨sel⟩ sext(imm) |
| 2 | LW rd, imm(rs) | rd = mem[rs + sext(imm)] |
| 3 | SW rt, imm(rs) | mem[rs + sext(imm)] = rt |
| 4 | BEQZ rs, off | if rs == 0: pc = pc + 4 + sext(off) |
| 5 | BNEZ rs, off | if rs != 0: pc = pc + 4 + sext(off) |
| 6 | IN rd, port | rd = A (port 0), B (1), zero-extended S (2), 0 (3) |
| 7 | OUT rt | Z = rt, out_z_valid pulses |

Addresses are byte addresses. Memories ignore bits [1:0], so every access is a
whole word. Both memories wrap addresses modulo their size. Register 0 always
reads zero. `ALUI OR rd, r0, imm` therefore loads a constant, and `BEQZ r0, off`
is an unconditional branch. The all-zero word (`ALU AND r0, r0, r0`) is a NOP.
Opcodes 8–15 decode as NOPs. Branch offsets are in bytes and count from
the instruction after the branch. `tb/risc_asm_pkg.sv` has small
functions that assemble each form.

## The pipeline

```
cycle     1    2    3    4    5    6
i1        IF   ID   EX   MEM  WB
i2             IF   ID   EX   MEM  WB
i3                  IF   ID   EX   MEM ...
```

* **IF**: `program_counter` presents the fetch address to `instruction_memory`.
  The memory read takes one cycle, so the word arrives in the memory's output
  register. That register is the instruction register of IF/ID. IF/ID also holds
  a valid bit and PC+4.
* **ID**: `instruction_decoder` builds a `ctrl_t` bundle. Its ALU decoder sets the
  select, the operand sources, branch, memory and port controls. Its register-bank
  decoder sets the source and destination registers and the write enable.
  `register_bank` is read at the same time and the immediate is sign-extended.
* **EX**: two multiplexers pick each ALU operand: the register value, a forwarded
  value, PC+4 (for branch targets) or the immediate. The ALU result is the
  arithmetic result, the memory address or the branch target. A zero test on the
  rs operand gives the branch condition. IN replaces the ALU result with an input
  register.
* **MEM**: `data_memory` is read or written. OUT writes Z. A branch in this stage
  whose condition holds redirects the PC.
* **WB**: a multiplexer picks the ALU result or the loaded word and writes it to
  the register bank. The bank passes a value written in this cycle straight to
  its read ports, so WB and ID can share a cycle without a hazard.

### Hazards: the part to understand before changing anything

**Forwarding.** `hazard_unit` compares the source registers of the instruction in
EX with the destinations of the two instructions ahead of it:

* the instruction in MEM (EX/MEM register), if it writes a register and is not a
  load, gives `FWD_EXMEM`;
* otherwise the instruction in WB (MEM/WB register) gives `FWD_MEMWB`, which
  carries the write-back value, so loads are included;
* register 0 is never forwarded.

EX/MEM wins because it is the younger result. The forwarded rs value also feeds
the zero test. The forwarded rt value is also the store data and the OUT data.

**Load-use stall.** A load's data exists only at the end of MEM. If the
instruction in ID reads the register that a load in EX will write, `stall` holds
the PC and IF/ID for one cycle and puts a bubble into ID/EX. Next cycle the
load is in MEM/WB and its value is forwarded. This costs exactly one cycle.

**Branches.** Branches are resolved from the EX/MEM register, as in the
reference pipeline diagram. Fetch continues sequentially after a branch. When
the branch is taken, the three younger instructions are squashed: IF/ID and
ID/EX are cleared, and the instruction leaving EX does not enter EX/MEM. The PC
then loads the target. A taken branch costs three cycles and a not-taken branch
costs nothing. There are no delay slots and no prediction. The original mentions
a "PC predictor" but does not describe one.

Measured cycle costs (checked by `tb_risc_processor`):

| Situation | Cycles |
|---|---|
| independent instructions | 1 each |
| load followed directly by a user of its result | +1 |
| taken branch | +3 |

Three assertions in `risc_processor` guard these rules during simulation. A
stall needs a valid instruction in ID, and it lasts one cycle. A taken branch
leaves IF/ID, ID/EX and EX/MEM empty in the next cycle.

## Register bank

There are eight 32-bit registers built from flip-flops. On a rising clock edge:

| rst | wr_rd | Effect |
|---|---|---|
| 1 | x | all registers cleared |
| 0 | 1 | `wdata` stored at `waddr` (ignored for register 0) |
| 0 | 0 | nothing stored, read only |

The original calls the bank "8-bit". This design reads that as eight registers,
because the data path and the ALU are 32 bits wide. Change `NUM_REGS` and
`WIDTH` to build another size. The processor takes the register-address width
from `risc_pkg::REG_AW`.

## Memories and I/O

* Instruction memory: 256 words. The program is loaded through `prog_we`,
  `prog_addr` (word index) and `prog_wdata` while `rst` is held. Execution starts
  at address 0 when `rst` is released.
* Data memory: 256 words. It is not reset, so a program must initialise what it
  reads.
* `in_a`, `in_b` and `in_s` are sampled into input registers every clock.
  A program reads them with IN one cycle later. `out_z` holds the last
  OUT value, and `out_z_valid` is high for the cycle after each OUT.

The symbol of the original processor shows data pins labelled 32:0. Here they
are 32 bits wide, like the rest of the data path.

## Vending machine application

`tb/tb_vending.sv` holds a 27-instruction program for the newspaper vending
machine. The program follows the machine's flow:

1. It stocks four papers with two copies each.
2. It displays the options (Z = 0xD00).
3. It waits for a key on S.
4. It checks that the key is a paper number from 1 to 4 that is still in stock.
   The check uses `S − 5` and a mask on the sign bits, then a stock load.
5. It either delivers (Z = 0x100 | paper, stock decremented) or rejects
   (Z = 0xE00 | key).
6. It waits for the key to be released and shows the options again.

The keypad, display and delivery mechanism are outside the processor. Their
only connection here is the S input and the Z output. The program uses 27 of
256 instruction words, 5 of 256 data words and 7 of 8 registers.

## Trust and departures

Taken from the original description:

* the five stages and their order;
* the PC +4 adder and multiplexer;
* the branch target computed by the ALU and the zero test;
* the write-back multiplexer and the forwarding path;
* the ALU's nine functions and their codes;
* the register bank's reset, write and read behaviour;
* the two decoders, one for the ALU and one for the register bank;
* the one-cycle instruction fetch;
* the A, B, S, CLK and Z pins.

This design's own choices:

* the instruction encoding and the instruction set;
* the 8 × 32 reading of the register bank and the constant-zero register 0;
* the forwarding priorities and the load-use interlock;
* the branch scheme (sequential fetch, 3-cycle taken penalty);
* memory sizes (256 words each), word-only access and the program load port;
* how the program reaches A, B, S and Z (IN/OUT);
* synchronous active-high reset.

Not built:

* a PC predictor (named, never described);
* a barrel shifter (named as typical of an execute stage, but absent from the
  ALU table);
* separate register banks per processor mode (mentioned, no modes defined);
* an instruction cache with tags or misses (the instruction store is a plain
  memory with the one-cycle fetch delay);
* the vending machine's keypad, display and delivery hardware.

## Simulation

Every testbench is self-checking. Each prints `TB_RESULT checks=N failures=M`
and has a cycle watchdog. Run one with plain Verilator from the directory that
holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/risc_pkg.sv tb/risc_asm_pkg.sv rtl/*.sv tb/tb_risc_processor.sv \
    --top-module tb_risc_processor -o sim
./obj_dir/sim
```

| Testbench | What it checks |
|---|---|
| `tb_alu` | all 16 select codes on corner and random operands |
| `tb_register_bank` | reset, write, read-only, bypass, register 0, random traffic |
| `tb_program_counter` | +4, stall hold, branch load, branch-over-stall priority |
| `tb_instruction_memory` | one-cycle read latency, hold with `en` low, load port |
| `tb_data_memory` | write enable, read-back against a model |
| `tb_instruction_decoder` | every control field and the immediate for random words |
| `tb_hazard_unit` | forwarding selects and stall against a reference |
| `tb_risc_processor` | at default sizes: the cycle costs above, then 40 random programs compared with an instruction-level reference model (OUT sequence, registers, data memory); fails if any mechanism (both forwarding paths, stall, taken and not-taken branch, load, store, IN, OUT, each ALU function) never occurs |
| `tb_vending` | the vending program: every Z word and the final stock |

The random programs use all ALU functions in both forms, plus loads, stores, IN,
OUT, forward branches and a counted backward loop. To add instructions, extend
`opcode_e` and `ctrl_t` in `risc_pkg`, both decoders in `instruction_decoder`,
the reference model in `tb_risc_processor` and the helpers in `risc_asm_pkg`.
