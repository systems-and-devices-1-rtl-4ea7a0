# SimpleCPU_v1a: an 8-bit accumulator computer with hard-wired three-phase control

This is a minimal stored-program computer of the kind used to teach how a processor
is controlled. It has one 8-bit accumulator (ACC), an 8-bit program counter (PC), a
16-bit instruction register (IR), an 8-bit ALU and one memory of 256 sixteen-bit words
that holds both the program and its data. Control is hard-wired rather than
microcoded. A three-bit ring counter steps through the phases FETCH, DECODE and
EXECUTE. A one-hot decoder turns the opcode into one select line per instruction. A
small set of AND/OR equations then combines the phase, the select lines and the zero
flag into every control line of the datapath. Each instruction takes exactly three
clock cycles.

## Instruction set

Each instruction is one 16-bit word: `OOOO xxxx DDDDDDDD`. The top four bits are the
opcode and bits 11:8 are ignored. The low byte is an immediate constant (KK) or a
memory address (AA), depending on the opcode.

| Opcode | Mnemonic | Effect |
|---|---|---|
| 0 | MOVE KK   | ACC <- KK |
| 1 | ADD KK    | ACC <- ACC + KK |
| 2 | SUB KK    | ACC <- ACC - KK |
| 3 | AND KK    | ACC <- ACC & KK |
| 4 | LOAD AA   | ACC <- M[AA] |
| 5 | STORE AA  | M[AA] <- ACC |
| 6 | ADDM AA   | ACC <- ACC + M[AA] |
| 7 | SUBM AA   | ACC <- ACC - M[AA] |
| 8 | JUMPU AA  | PC <- AA |
| 9 | JUMPZ AA  | if ACC == 0 then PC <- AA, else PC <- PC + 1 |
| 10 | JUMPNZ AA | if ACC != 0 then PC <- AA, else PC <- PC + 1 |

Opcodes 11 to 15 are unused. The decoder still produces their select lines, which are
left free for new instructions. An unused opcode executes as a no-op: the PC advances
and nothing else changes. All arithmetic is modulo 256. There are no carry, overflow or
sign flags. The only flag is Z, which is high when ACC is zero.

## Data in a 16-bit memory

Instructions are 16 bits wide but data is 8 bits wide. This design keeps one word per
address and uses only the low byte of a word for data:

- LOAD, ADDM and SUBM read bits 7:0 of the word and ignore bits 15:8.
- STORE writes the whole word as `{8'h00, ACC}`, so the high byte becomes zero.

Each variable therefore occupies a full 16-bit word. Program and data share the one
array, so a STORE can overwrite an instruction. The overwritten word then runs as a
MOVE of the stored value, because its opcode bits are now zero. This is self-modifying
code. It works, and the end-to-end testbench exercises it, but it is not a technique to
rely on.

## How an instruction runs: the three phases

The ring counter holds one of three one-hot states. It advances every clock and wraps
from EXECUTE back to FETCH. Reset puts it in FETCH.

| Phase | Address bus | What happens at the end of the cycle |
|---|---|---|
| FETCH   | PC | IR <- M[PC] |
| DECODE  | PC; IR operand for LOAD, STORE, ADDM, SUBM | PC <- PC + 1, unless the instruction is a jump that will be taken |
| EXECUTE | IR operand for LOAD, STORE, ADDM, SUBM | ACC <- ALU result (data instructions); M[AA] <- ACC (STORE); PC <- AA (taken jump) |

The jump decision J is made in DECODE and again in EXECUTE from the same Z. This is
safe because no instruction changes ACC between those two cycles. A taken jump skips
the increment in DECODE and loads the target in EXECUTE. A jump that is not taken
behaves like any other instruction: the PC increments in DECODE.

### Control equations

These are implemented in `decode_logic`. `|` is OR, `&` is AND and `!` is NOT. Each
instruction name stands for its one-hot decoder line.

```
J        = JUMPU | (JUMPZ & Z) | (JUMPNZ & !Z)
ROM_EN   = FETCH                      IR_EN  = FETCH
RAM_EN   = (DECODE | EXECUTE) & (LOAD | STORE | ADDM | SUBM)
ADDR_SEL = (DECODE | EXECUTE) & (LOAD | STORE | ADDM | SUBM)
RAM_WR   = STORE & EXECUTE
DATA_SEL = LOAD | ADDM | SUBM
ACC_CTL0 = SUB | SUBM      ACC_CTL1 = AND      ACC_CTL2 = MOVE | LOAD
ACC_EN   = (MOVE | ADD | SUB | AND | LOAD | ADDM | SUBM) & EXECUTE
PC_LD    = EXECUTE & J
PC_EN    = (DECODE & !J) | (EXECUTE & J)
```

Three things here are easy to misread:

- **J is an OR of three terms.** JUMPZ and JUMPNZ can never both be active, so a
  product of their terms would never jump on JUMPNZ.
- **ACC_CTL selects the ALU function.** CTL2 passes operand B, CTL1 ANDs, CTL0
  subtracts, and all lines low adds. The ALU gives CTL2 priority over CTL1 over CTL0.
  That priority never matters in practice, because the control logic raises at most
  one of the lines.
- **PC_EN enables the PC and PC_LD chooses how it changes.** With PC_EN high, the PC
  loads the target if PC_LD is high and increments if PC_LD is low. With PC_EN low, the
  PC holds.

## Datapath

```
           +------------ ADDR_SEL ------------+
  PC ------|0                                 |
  IR[7:0] -|1  mux --> address --> MEMORY 256x16 --> rdata -+--> IR (IR_EN)
           +----------------------------------+             |
                                                            | rdata[7:0]
  IR[7:0] (KK) --|0                                         |
                 |   DATA_SEL mux --> ALU B <---------------+ (input 1)
  ACC ---------------------------------> ALU A
  ALU (ACC_CTL) --> ACC (ACC_EN) --> Z = (ACC == 0)
  ACC --> {8'h00, ACC} --> memory write data (RAM_WR)
```

The memory reads combinationally and writes on the clock edge. Reading
combinationally lets the IR capture the addressed word at the end of the FETCH cycle,
and lets the ACC capture a memory operand at the end of EXECUTE. The memory enable is
ROM_EN OR RAM_EN. While the memory is disabled, its read data is zero.

## Files

| File | Contents |
|---|---|
| `rtl/simple_cpu_pkg.sv` | Widths, opcode and ALU enums, the phase struct and the control-word struct `ctl_t` |
| `rtl/simple_cpu.sv` | Top level: the datapath wired to the control unit |
| `rtl/control_unit.sv` | Ring counter + opcode decoder + control logic |
| `rtl/ring_counter.sv` | FETCH/DECODE/EXECUTE one-hot ring counter |
| `rtl/opcode_decoder.sv` | 4-to-16 one-hot decoder |
| `rtl/decode_logic.sv` | The control equations above |
| `rtl/alu.sv`, `rtl/accumulator.sv`, `rtl/instruction_register.sv`, `rtl/program_counter.sv`, `rtl/mux2.sv`, `rtl/memory.sv` | Datapath parts |
| `rtl/code.dat` | Default memory image: the MULx3 program |
| `tb/*_tb.sv` | One self-checking testbench per module |
| `tb/ctl_model_pkg.sv` | Reference control word, derived from what each instruction does rather than from the equations |
| `tb/cpu_ref_pkg.sv` | Instruction-level reference model of the whole processor |
| `tb/cpu_test.dat` | Instruction-coverage program for `simple_cpu_tb` |

## Top-level interface

`simple_cpu` has a clock `clk` and a synchronous, active-high reset `rst`. Reset clears
PC, IR and ACC and enters FETCH. Execution starts at address 0 in the first cycle after
reset is released.

The other ports are outputs for observing the machine:

- the registers `pc`, `ir`, `acc` and `z`;
- the one-hot `phase`;
- the memory bus: `mem_addr`, `mem_en`, `mem_wr`, `mem_rdata` and `mem_wdata`.

The upper byte of `mem_wdata` is always zero.

The machine has no external memory interface and no halt instruction. A program is
loaded through the `INIT_FILE` parameter, a `$readmemh` image whose path is relative to
the simulator's working directory; the default is `rtl/code.dat`. A program stops by
jumping to itself.

### Example program: MULx3

The default image multiplies 10 by 3 by repeated addition. The product is kept in word
0x0D and the loop count in word 0x0E:

```
00 MOVE 0x00   01 STORE 0x0D   02 MOVE 0x03   03 STORE 0x0E
04 JUMPZ 0x0C  05 SUB 0x01     06 STORE 0x0E  07 LOAD 0x0D
08 ADD 0x0A    09 STORE 0x0D   0A LOAD 0x0E   0B JUMPU 0x04
0C JUMPU 0x0C  (stop)          0D product     0E count
```

The program reaches the stop loop after 29 instructions, which is 87 cycles. At that
point word 0x0D holds 0x1E, which is 30.

## Simulating

Run from the repository root, because the memory image paths are relative to it. For
example, the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/simple_cpu_pkg.sv tb/cpu_ref_pkg.sv tb/simple_cpu_tb.sv \
  --top-module simple_cpu_tb -o sim && obj_dir/sim
```

The testbenches that import `ctl_model_pkg` need `tb/ctl_model_pkg.sv` on the command
line; these are `decode_logic_tb` and `control_unit_tb`. Every testbench ends by
printing `TB_RESULT checks=N failures=M`. Each one also has a watchdog that counts a
failure if the test hangs.

- **`simple_cpu_tb`** runs `tb/cpu_test.dat` in step with the reference model.
  - At every FETCH it checks PC, ACC, Z and the fetched word.
  - At every EXECUTE it checks the memory write.
  - It checks that every instruction takes three cycles.
  - It counts these events and fails if any of them never happens: each of the 11
    opcodes, a taken and a not-taken JUMPZ, a taken and a not-taken JUMPNZ, 8-bit
    wrap-around, a data word with a non-zero high byte, and execution of an instruction
    that a STORE wrote.
- **`simple_cpu_mulx3_tb`** runs the default build unchanged, on the MULx3 image.
  - It checks all eight stores and their values.
  - It checks that the stop loop is reached at exactly cycle 87.
- **The unit testbenches** compare each module with an independent model. They use
  exhaustive inputs where the input space is small and random stimulus otherwise.

## Design choices and limits

These choices are this implementation's own:

- synchronous active-high reset and the reset values;
- the combinational memory read;
- zero-extension on STORE;
- which input each multiplexer select value picks;
- the ALU's priority among the ACC_CTL lines;
- the bit order of the phase vector;
- the assertions:
  - the ring counter stays one-hot;
  - memory is written only in EXECUTE, at the operand address.

The ring counter does not recover from an illegal state on its own; only reset restores
it.

Some variants are not part of this design:

- **Byte-addressable memory**, which would store each instruction in two bytes in a
  chosen byte order.
- **A 16-bit ACC and ALU.**
- **New instructions**, such as an immediate multiply.

Changing the word or data width means changing `simple_cpu_pkg`. The control equations
assume the opcode assignment shown above.
