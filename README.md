# Mano basic computer

A complete, synthesizable SystemVerilog model of the "basic computer" from
M. Morris Mano's *Computer System Architecture*: a 16-bit accumulator machine
with a 4096-word memory, one shared 16-bit bus and hardwired control. Every
instruction runs as a short, fixed sequence of register transfers, one per
clock cycle. A 4-bit sequence counter times these transfers, and a small
AND-OR network turns each (instruction, time step) pair into register-load,
bus-select and memory strobes. The RTL keeps that structure visible. Each
register, the bus, the memory, the one-bit ALU slice, the adder and the
control unit is its own module, and the control equations are written term
by term, so a simulation can be followed one clock at a time.

## Machine state

| Register | Bits | Role |
|----------|------|------|
| AR  | 12 | address register; the only memory address source |
| PC  | 12 | program counter |
| DR  | 16 | data register, the second ALU operand |
| AC  | 16 | accumulator |
| IR  | 16 | instruction register |
| TR  | 16 | temporary register; holds PC during an interrupt |
| INPR | 8 | input character from the input device |
| OUTR | 8 | output character to the output device |
| E   | 1 | carry / link bit of AC |
| I   | 1 | indirect bit of the current instruction |
| SC  | 4 | sequence counter, decoded to T0..T15 |
| S   | 1 | run flip-flop; HLT clears it |
| R   | 1 | interrupt-cycle flip-flop |
| IEN | 1 | interrupt enable |
| FGI, FGO | 1 | input-ready and output-ready flags |

All registers except INPR and OUTR sit on the common bus. The bus source is
chosen by a 3-bit code: 1 = AR, 2 = PC, 3 = DR, 4 = AC, 5 = IR, 6 = TR,
7 = memory. Code 0 drives zero. AR and PC drive the low 12 bits. Every
register loads from the bus, except AC, which loads from the adder-and-logic
unit. Memory is always addressed by AR.

## Instructions

Bits 14..12 hold the opcode and bit 15 is the I bit.

* Opcodes 0 to 6 are memory-reference instructions: AND, ADD, LDA, STA, BUN,
  BSA and ISZ. Bits 11..0 hold the address. When I = 1 the address is
  indirect.
* Opcode 7 with I = 0 is a register-reference instruction. Each bit of 11..0
  selects one operation: CLA 7800, CLE 7400, CMA 7200, CME 7100, CIR 7080,
  CIL 7040, INC 7020, SPA 7010, SNA 7008, SZA 7004, SZE 7002, HLT 7001.
* Opcode 7 with I = 1 is an input-output instruction: INP F800, OUT F400,
  SKI F200, SKO F100, ION F080, IOF F040.

## Timing: what happens in each clock cycle

The most important thing to grasp is the schedule of register transfers.
SC counts up by one each clock, and every instruction ends by clearing it.
T*i* is high during the cycle in which SC = *i*. D0..D7 decode IR(14:12).
R' marks a normal cycle and R an interrupt cycle.

| Step | Condition | Transfer |
|------|-----------|----------|
| fetch | R'T0 | AR <- PC |
| | R'T1 | IR <- M[AR], PC <- PC + 1 |
| decode | R'T2 | AR <- IR(11:0), I <- IR(15) |
| indirect | D7'IT3 | AR <- M[AR] |
| AND | D0T4 / D0T5 | DR <- M[AR] / AC <- AC and DR, end |
| ADD | D1T4 / D1T5 | DR <- M[AR] / AC <- AC + DR, E <- carry, end |
| LDA | D2T4 / D2T5 | DR <- M[AR] / AC <- DR, end |
| STA | D3T4 | M[AR] <- AC, end |
| BUN | D4T4 | PC <- AR, end |
| BSA | D5T4 / D5T5 | M[AR] <- PC, AR <- AR + 1 / PC <- AR, end |
| ISZ | D6T4 / T5 / T6 | DR <- M[AR] / DR <- DR + 1 / M[AR] <- DR, skip if DR = 0, end |
| register ref. | D7I'T3 | bit-selected operations, end |
| input-output | D7IT3 | bit-selected operations, end |
| interrupt | RT0 | AR <- 0, TR <- PC |
| | RT1 | M[AR] <- TR, PC <- 0 |
| | RT2 | PC <- PC + 1, IEN <- 0, R <- 0, end |

"End" means SC <- 0. Every memory-reference instruction passes through T3,
whether or not it is indirect, so an instruction takes the same number of
cycles in both address modes:

| Instruction class | Clock cycles |
|-------------------|--------------|
| register reference, input-output | 4 |
| STA, BUN | 5 |
| AND, ADD, LDA, BSA | 6 |
| ISZ | 7 |
| interrupt cycle | 3 |

A memory read is combinational. In T1 the word at M[AR] is already on the bus,
and IR takes it at the rising edge that ends T1. A write takes place at the
edge that ends its cycle.

**Skips** are a single PC increment in the execute cycle. The register-
reference skips test AC(15), AC = 0 or E = 0. The I/O skips test FGI and FGO.
ISZ tests DR = 0 in T6, after DR has been incremented in T5.

**Interrupts.** When IEN = 1 and FGI or FGO is set, R is set at the end of
any cycle that is not T0, T1 or T2. The current instruction therefore
finishes first, and the next T0 starts the interrupt cycle instead of a fetch.
That cycle saves the return address in word 0 and continues at word 1 with
IEN cleared. A service routine usually starts at word 1 with a BUN to its
handler and returns with `BUN 0 I`.

**Halt.** HLT clears S. The timing signals are ANDed with S, so after a halt
every control line stays low and all registers hold their values. `start`
restarts the machine.

## Control unit

`control_unit` holds the sequence counter, the opcode decoder and all the
one-bit state. Every data-path control line is written as the OR of the table
entries that use that register or bus source. For example:

```
ldAR  = R'T0 + R'T2 + D7'IT3
ldDR  = (D0 + D1 + D2 + D6) T4
incPC = R'T1 + RT2 + D6T6(DR=0) + r B4 AC15' + r B3 AC15 + r B2 (AC=0)
      + r B1 E' + p B9 FGI + p B8 FGO            (r = D7I'T3, p = D7IT3)
clrSC = RT2 + (D0+D1+D2+D5)T5 + (D3+D4)T4 + D6T6 + r + p + start
```

The control unit sets one request line per bus source and encodes the seven
lines into the 3-bit select. An assertion checks that no two sources are
requested in the same cycle. All control lines travel to the data path in
one packed struct, `mano_pkg::ctrl_t`.

## Adder and logic unit

The next AC value is built one bit at a time (`alu_slice`). Seven AND terms
feed one OR gate, and each term is enabled by one operation select:

* AND: AC(i) and DR(i)
* ADD: sum(i)
* LDA: DR(i)
* INP: INPR(i)
* CMA: not AC(i)
* CIR: AC(i+1)
* CIL: AC(i-1)

`mano_alu` instantiates sixteen slices. It closes the shift chain through E,
so E enters bit 15 on CIR and bit 0 on CIL. It takes the sum from `adder16`,
a ripple chain of four 4-bit adders with carry-in 0. Only bits 0..7 have an
INPR term, so INP loads zeros into AC(15:8). CLA and INC use the
accumulator register's own clear and increment inputs.

## Memory, start-up and devices

* `mano_mem` is a 4096 x 16 array with a combinational read and a clocked
  write. Its output reads zero unless `read` is high. A second write port
  (`load_we`, `load_addr`, `load_data`) lets a host place a program before the
  run. That port wins if both ports write in the same cycle. All words start
  at zero.
* `start` is a synchronous reset. It clears every register and flag, sets S,
  and the machine begins fetching at address 0 on the next cycle.
* Input device: pulse `in_strobe` with a character on `in_char`. INPR takes
  the character and FGI is set. INP clears FGI.
* Output device: `out_load` pulses when OUT loads OUTR. OUT also clears FGO.
  The device raises `out_ack` once it has taken the character, which sets FGO
  again. FGO starts at 0 after `start`.

## Files

| File | Contents |
|------|----------|
| `rtl/mano_pkg.sv` | widths, bus-select enum, ALU-select and control structs |
| `rtl/mano_machine.sv` | top level: wires all blocks as the data path |
| `rtl/control_unit.sv` | hardwired control, flip-flops I R IEN S E FGI FGO |
| `rtl/seq_counter.sv` | 4-bit SC and T0..T15 decoder |
| `rtl/instr_decoder.sv` | IR(14:12) to D0..D7 |
| `rtl/mano_reg.sv` | LD / INR / CLR register, width parameter |
| `rtl/common_bus.sv` | 7-source bus multiplexer |
| `rtl/mano_mem.sv` | 4096 x 16 memory with host load port |
| `rtl/mano_alu.sv`, `rtl/alu_slice.sv` | adder-and-logic unit and its bit slice |
| `rtl/adder16.sv`, `rtl/adder4.sv` | 16-bit adder from 4-bit adders |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Example for
the whole machine:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/mano_pkg.sv \
    tb/tb_mano_machine.sv --top-module tb_mano_machine -Mdir obj
./obj/Vtb_mano_machine
```

Replace the testbench name to run any other one. The testbenches use only
`$urandom` and plain procedural code.

`tb_mano_machine` runs the machine at full size with two programs:

1. **Add ten numbers.** The program adds ten numbers (25, 50, 75, 100 and
   repeat) through an indirect pointer and an ISZ loop counter. It ends with
   AC and word 10FH equal to 023FH (575) and the pointer at 015AH. It takes
   exactly **285 clock cycles** from start to halt, and the testbench checks
   that count. It compares the final program area 100H..10FH word by word.
   It also checks the first fetch cycle by cycle. In T1, the memory read and
   the IR load are active and 4100H is on the bus. In T2, IR holds 4100H and
   its load is off.
2. **Every instruction.** A program executes every instruction at least once,
   direct and indirect, with skips both taken and not taken. It includes a
   BSA call with a `BUN I` return, and an interrupt raised by a character
   from the input device, read with SKI/INP in a service routine. It prints
   the character with OUT and waits on SKO. The testbench counts indirect
   cycles, interrupt cycles, skips, ISZ skips, BSA calls, carries into E,
   circulates, INP, OUT and halts, and fails if any of them never happens.

`tb_control_unit` runs the control unit alone against a reference model
written step by step from the timing table. It uses random instruction
streams, random AC and DR values and random device flags (about 13,000
instructions and several hundred interrupts). Each cycle it compares every
control line, the counter and every flip-flop, and it also checks the cycle
count of each instruction.

## Design choices and limits

The instruction set, the timing table, the bus numbering, the register widths,
the bit-slice ALU and the four-adder chain follow the classic description of
the machine. These points are choices of this implementation:

* **Bus.** The bus is a multiplexer, not tri-state buffers with one enable
  per source. Select 0 drives zero.
* **Reset.** Reset is the synchronous `start` input. It clears all registers
  and flags, including FGO, and sets S.
* **Halt.** HLT stops the machine by gating the timing signals with S, not
  by stopping the clock. A halted machine takes no interrupts.
* **Register priority.** A register gives CLR priority over LD, and LD over
  INR. The control unit never raises two of them at once.
* **Flags.** A device setting FGI or FGO in the same cycle as an instruction
  that clears it wins.
* **Host and devices.** The host load port and the device handshake
  (`in_strobe`, `out_load`, `out_ack`) are additions for simulation and
  integration.
* **Left out.** The registers cannot count down. That function is never used
  by the machine.
* **INP.** INP clears the upper byte of AC. The classic transfer only names
  AC(0-7) as the destination.
* **No devices or clock.** The keyboard, the printer and the clock source
  are not modelled as RTL. Their signals are ports of `mano_machine`.
