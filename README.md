# RISC AR4: an 8-bit accumulator processor

The RISC AR4 is a small teaching processor: an 8-bit accumulator machine
with 16-bit instructions, eight general purpose registers, a 256-byte memory
that holds both program and data, a 4-bit multiply-accumulate unit and two
memory-mapped devices, a keyboard and a four-character ASCII display. Its
instruction set has 21 instructions. It was specified for a computer
architecture course (ICOM 4215), where students write a simulator for it
that can run a program to its end or step through it one instruction at a
time. This repository is a synthesizable SystemVerilog implementation of
that processor. It has the same run and step modes, and it exposes all the
state such a simulator would show.

The specification gives the programmer's view: registers, memory map,
instruction formats, opcodes and what each instruction does. It does not
give the microarchitecture, the flag rules per instruction or the
hardware interfaces. Those were chosen here and are listed in
[Choices made where the specification is silent](#choices-made-where-the-specification-is-silent).

## Programmer's model

| State | Width | Notes |
|---|---|---|
| A (accumulator) | 8 | source and destination of every ALU/MAC operation |
| R0..R7 | 8 each | general purpose; R7 holds the target of every branch |
| PC | 8 | starts at 0, advances by 2 |
| IR | 16 | the instruction being executed |
| SR | 4 | `ZCNO`: zero, carry, negative, overflow (Z is bit 3) |

**Memory map (one byte per address)**

| Address | Contents |
|---|---|
| 0..127 | program (instructions, big-endian: high byte at the even address) |
| 128..249 | data |
| 250, 251 | keyboard input, 16 bits (250 = high byte); writes are ignored |
| 252..255 | display, one ASCII character per byte (252 leftmost); reads return the last byte written |

Addresses 250..255 are served by the I/O block and are not backed by memory.

**Instruction format.** The opcode is bits 15..11. Register f is bits 10..8.
The immediate operand or direct address is bits 7..0. Fields an
instruction does not use are ignored.

```
 15      11 10   8 7             0
+----------+------+---------------+
|  opcode  |  f   | imm / address |
+----------+------+---------------+
```

**Instruction set**

| Opcode | Mnemonic | Operation | Flags written |
|---|---|---|---|
| 00000 | AND rf  | A ← A & rf | Z N |
| 00001 | OR rf   | A ← A \| rf | Z N |
| 00010 | XOR rf  | A ← A ^ rf | Z N |
| 00011 | ADDC rf | A ← A + rf + C | Z C N O |
| 00100 | SUB rf  | A ← A − rf (C = borrow) | Z C N O |
| 00101 | MAC rf  | A ← A[3:0] × rf[3:0] + rf | Z C N |
| 00110 | NEG     | A ← −A (C = borrow, i.e. A ≠ 0) | Z C N O |
| 00111 | NOT     | A ← ~A | Z N |
| 01000 | RLC     | {C, A} ← {A, C} rotated left | Z C N |
| 01001 | RRC     | {A, C} ← {C, A} rotated right | Z C N |
| 01010 | LDA rf  | A ← rf | – |
| 01011 | STA rf  | rf ← A | – |
| 01100 | LDA addr | A ← mem[addr] | – |
| 01101 | STA addr | mem[addr] ← A | – |
| 01110 | LDI imm | A ← imm | – |
| 10000 | BRZ | if Z: PC ← R7 | – |
| 10001 | BRC | if C: PC ← R7 | – |
| 10010 | BRN | if N: PC ← R7 | – |
| 10011 | BRO | if O: PC ← R7 | – |
| 11000 | NOP | – | – |
| 11111 | STOP | halt until reset | – |

The processor executes every other opcode as a NOP. O is two's-complement
overflow. The "Flags written" column is this implementation's own rule (see
below). A flag an instruction does not write keeps its value.

An example program, one instruction word per entry:
`7019 5900 70F4 5A00 7002 5B00 7028 5F00 6880 1900 F800`. It reads as
LDI 0x19; STA R1; LDI 0xF4; STA R2; LDI 2; STA R3; LDI 0x28; STA R7;
STA 0x80; ADDC R1; STOP. It ends with A = 0x41 and mem[0x80] = 0x28.

## How an instruction runs

The memory has a single port with a synchronous read: the byte comes out one
clock after its address goes in. An instruction is two bytes, so the control
unit (`ar4_control`) needs several clocks per instruction:

| Clock | State | Memory address | What happens at the end of the clock |
|---|---|---|---|
| 1 | FETCH0 | PC | (wait here in step mode or during an external access) |
| 2 | FETCH1 | PC+1 | IR[15:8] ← byte at PC |
| 3 | FETCH2 | – | IR[7:0] ← byte at PC+1, PC ← PC+2 |
| 4 | EXEC | addr for LDA/STA addr | A, SR, a register or memory is written, or PC ← R7 |
| 5 | MEMRD | – | LDA addr only: A ← byte read |

So every instruction takes 4 clocks, and LDA addr takes 5. `retire` is high
in the last clock of each instruction. A branch decides in EXEC, after
the PC has already moved past the branch, so a branch that is not taken
just falls through. STOP moves the machine to HALT, and it stays there
until `rst`.

There is no pipeline, so there are no hazards. Every instruction reads the
state left by the one before it.

**Memory-mapped I/O.** `ar4_io` sits between the bus and the memory. It
decodes the address, blocks writes to 250..255 from the memory and stores
display writes in its own registers. For reads, it registers both the
device byte and a "this was a device address" bit, so that the device byte
comes back with the same one-clock latency as a memory byte. That way the
control unit does not need to know which addresses are devices. The
keyboard value is sampled when the read is issued.

**Datapath wiring (`ar4_cpu`).** Register f (IR[10:8]) feeds both the ALU
and the MAC as the second operand. Their results, register f, the memory
byte and the immediate go into the accumulator through its source selector.
The ALU or the MAC also delivers a new flag value and a per-flag write mask
to the status register. R7 is wired straight to the PC's load input. A is
the write data for both the register file and the memory.

## Run mode, step mode and the external memory port

- `run_mode = 1`: after reset the processor fetches from address 0 and runs
  until STOP.
- `run_mode = 0`: the processor waits in FETCH0. Each rising edge of `step`
  lets exactly one instruction run. An edge that arrives while an
  instruction is executing is remembered, and it starts the next one.
- External port (`ext_en`, `ext_we`, `ext_addr`, `ext_wdata`, `ext_rdata`,
  `ext_grant`): for loading a program and reading memory. The port is
  granted only at an instruction boundary (FETCH0 or HALT). While `ext_en`
  stays high, the processor is held and each clock performs one access: a
  write when `ext_we` is 1, or a read whose byte appears on `ext_rdata` one
  clock later. Accesses to 250..255 reach the devices, as they do for the
  processor. Reset does not clear the memory, so the usual sequence is: hold
  `rst` and `ext_en`, write the program two bytes per instruction with the
  high byte first, then release both.
- `dbg_pc`, `dbg_ir`, `dbg_a`, `dbg_sr`, `dbg_regs`, `dbg_state`, `halted`
  expose everything a front end needs to show the machine.

## Files

| File | Block |
|---|---|
| `rtl/ar4_pkg.sv` | widths, I/O addresses, opcode/ALU/state enums, `flags_t` (ZCNO) |
| `rtl/ar4_cpu.sv` | top level: wiring, memory-bus multiplexer |
| `rtl/ar4_control.sv` | fetch/execute state machine, decoder, run/step, external-port grant |
| `rtl/ar4_alu.sv` | AND, OR, XOR, ADDC, SUB, NEG, NOT, RLC, RRC with flags |
| `rtl/ar4_mac.sv` | 4×4 multiplier plus 8-bit adder |
| `rtl/ar4_memory.sv` | 256 × 8 single-port synchronous RAM |
| `rtl/ar4_regfile.sv` | R0..R7, with a dedicated R7 read port |
| `rtl/ar4_acc.sv` | accumulator and its source selector |
| `rtl/ar4_ir.sv` | 16-bit IR, loaded a byte at a time, and its fields |
| `rtl/ar4_pc.sv` | program counter (+2, load from R7) |
| `rtl/ar4_sr.sv` | status register with per-flag write enable |
| `rtl/ar4_io.sv` | keyboard/display decode and registers |

`tb/tb_<module>.sv` is a self-checking testbench for each module. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ar4_cpu \
  -y rtl -y tb +libext+.sv -Irtl rtl/ar4_pkg.sv tb/tb_ar4_cpu.sv
./obj_dir/Vtb_ar4_cpu
```

Replace `tb_ar4_cpu` with any other testbench name to run a unit test.
`tb_ar4_cpu` runs the processor at its only size, with no parameters
overridden. It checks the processor against a reference model of the
instruction set written inside the testbench, and compares PC, A, SR,
R0..R7 and the display after every instruction. It also reads back the
whole memory through the external port after each program that reaches
STOP. The programs it runs:

- the example program above, with its final values checked by hand;
- a keyboard-to-display program;
- 40 random programs, some run in step mode and some with external reads
  injected while the processor runs.

The test fails if any of these never happens: an instruction of the
set, a branch taken or not taken, carry out, overflow, a keyboard read, a
display write, a step-mode wait, an external-access hold, or STOP. In run
mode it also checks the clock count of every instruction (4, or 5 for LDA
addr). The whole run takes about a second.

`tb_ar4_step_hex` shows the processor the way a step-mode simulator
does. It reads a program from `tb/ar4_example.hex` with `$readmemh`. The
file has one instruction per line as four hex digits, the AR4's usual
program format. The testbench loads the program through the external port,
high byte first from address 0, then issues one `step` edge per
instruction. After each step it prints PC, IR, A, SR and R0..R7 and checks
them against hand-worked values. To single-step your own program, replace
the hex file (up to 64 words, ending in STOP, `F800`) and drop the
example-specific checks.

The RTL also holds concurrent assertions, which Verilator checks with
`--assert`:

- the external port is granted only at an instruction boundary;
- the processor never writes memory while the port is granted;
- an instruction starts only in run mode or after a step edge;
- addresses 250..255 are never written into the memory array.

## Choices made where the specification is silent

The specification leaves these points open. They are the places to check
first if this RTL has to match another AR4 implementation.

- **Flags.** The specification defines the four flags but not which
  instructions change them. Here the logic instructions write Z and N.
  ADDC, SUB and NEG write all four flags. MAC, RLC and RRC write Z, C and
  N. Loads, stores and branches leave SR alone. So to branch on a value
  you have just loaded, first apply an operation that sets the flags,
  e.g. `OR` with a register holding 0.
- **Carry after a subtraction** is a borrow: C = 1 when A < rf as unsigned
  numbers. NEG sets C unless A = 0.
- **MAC.** It is built as printed in the instruction table: the low nibbles of
  A and rf are multiplied and all of rf is added, giving
  A ← A[3:0]·rf[3:0] + rf, 8-bit, with the carry out in C. It is not
  A ← A + A·rf.
- **NOT** is the one's complement, as its operation is given. The two's
  complement is NEG.
- **Register-direct addressing.** The operand is the content of register f.
  One passage of the specification calls this mode "register indirect", but
  the instruction table defines its operation on the register's content.
- **Field positions.** The specification labels the fields loosely. The
  positions used here (opcode 15..11, f 10..8, operand 7..0) are the only
  ones under which its example program makes sense.
- **Unused opcodes** (01111, 10100..10111, 11001..11110) run as NOP.
- **Reset.** All registers, A, SR, PC and IR go to 0, and the display goes
  to spaces. The memory is not reset. Reset is synchronous and active high.
- **The program area** (0..127) is a convention, not something the hardware
  enforces. The PC can run to any address and wraps at 256.
- **Byte order of the keyboard word** is big-endian, like instructions.
- **Timing, the single synchronous memory port, the external port and the
  step-edge capture** are all this design's own. The specification
  describes run and step as simulator features; here they are hardware
  inputs.

The graphical front end of the original simulator, with its register
panes, RUN and STEP buttons and file loading, is host software and is not
part of this RTL. The `dbg_*` outputs, `run_mode`, `step` and the external
port are what such a front end would connect to.
