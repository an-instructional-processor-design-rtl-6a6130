# A teaching processor: 16-bit, three buses, hardwired control

This is a deliberately small 16-bit processor meant to show every part of a
CPU at once: a register-transfer data path built around three buses, and a
hardwired controller that walks each instruction through numbered control
steps. It is complete enough to run real programs (counting, indexing,
looping, reading switches and driving LEDs) and small enough that each
control signal in each step can be listed in a table. With two memory-mapped
8-bit ports, one for switches and one for LEDs, it becomes a small
microcontroller for an FPGA board.

The architecture follows the instructional processor published by
R. J. Hayne ("An Instructional Processor Design using VHDL and an FPGA",
ASEE Annual Conference, 2011): its bus structure, register set, instruction
format, published opcodes, fetch sequence and the one execute sequence it
spells out. Everything that publication leaves open (most execute sequences,
the encodings of the later instructions, port addresses, flag rules, reset)
is filled in here and listed under [Departures and choices](#departures-and-choices).

## The data path

```
   BUS A          BUS B                                   BUS C (ALU result)
     |              |<------ PC (6 bit) <---------------------|  load / +1
     |              |                                         |
     |              |        IR <-----------------------------|
     |              |        | A1 = IR[10:9], A2 = IR[7:6]    |
     |<---- port 1 -|------ REGS R0..R3 <------- write (A2) --|
     |              |<-port 2                                 |
     |              |                                         |
   [MUX]<- sign-extended IR[5:0]                              |
     |  A           | B                                       |
     +----------> [ ALU ] --- R ----------------------------->|
                      \--> STATUS  N Z V C                    |
     |<------------ MDR <------------------------------------|
     |              |<-- MDR <-> MEM 64 x 16 (+ PORTA/PORTB)  |
                         MAR (6 bit) <------------------------|
```

* BUS A is driven by register-file read port 1 or by MDR.
* BUS B is driven by PC (zero-extended), register-file read port 2 or MDR.
* BUS C is always the ALU output and can be loaded into PC, MAR (low 6 bits),
  IR, a register (the one named by the destination field) or MDR.
* ALU input A comes through a multiplexer that can substitute the 6-bit VALUE
  field of the instruction, sign-extended. That path carries immediates,
  absolute addresses and branch displacements.
* Memory is addressed only by MAR and written only from MDR. Reads are
  combinational, so "MDR <- MEM(MAR)" takes one control step.

The buses are built as multiplexers, not tri-state lines. An undriven bus
reads 0. Assertions in `buses.sv` check that no bus ever has two drivers.

## Instruction word

```
 15 14 13 | 12 11 | 10 9 |  8  | 7 6 | 5 4 3 2 1 0
    OP    | SMODE | SREG |DMODE| DREG|    VALUE
```

| Source mode | Syntax   | Operand                  |
|-------------|----------|--------------------------|
| 00 (S0)     | `Rn`     | register Rn              |
| 01 (S1)     | `(Rn)`   | MEM[Rn]                  |
| 10 (S2)     | `#Value` | sign-extended VALUE      |
| 11 (S3)     | `Value`  | MEM[VALUE]               |

| Dest. mode  | Syntax   | Destination              |
|-------------|----------|--------------------------|
| 0 (D0)      | `Rn`     | register Rn              |
| 1 (D1)      | `Value`  | MEM[VALUE]               |

| OP  | Mnemonic | Effect                                   | Flags |
|-----|----------|------------------------------------------|-------|
| 000 | MOVE     | DST <- SRC                               | N Z, V=C=0 |
| 001 | ADD      | DST <- SRC + DST                         | N Z V C |
| 010 | AND      | DST <- SRC & DST                         | N Z, V=C=0 |
| 011 | INV      | DST <- ~SRC                              | N Z, V=C=0 |
| 100 | ROTL     | DST <- SRC rotated left one bit          | N Z, C = old bit 15 |
| 101 | BRA      | PC <- PC + DISP                          | unchanged |
| 110 | BGTZ     | if N=0 and Z=0: PC <- PC + DISP          | unchanged |
| 111 | HALT     | stop until reset                         | unchanged |

There is one VALUE field. An instruction with an absolute destination and
an immediate or absolute source uses that same VALUE for both. `ADD 5,5`
therefore doubles the word at address 5. DISP is VALUE, sign-extended
(-32..+31), and is added to the PC after the fetch has incremented it, so
`BGTZ -1` is a tight loop on itself. Addresses are 6 bits. A register used as
a pointer contributes only its low 6 bits.

Example encodings: `MOVE #3,R1` = `1043`, `MOVE R1,R2` = `0280`,
`HALT` = `E000`.

## How an instruction runs: the control steps

This is the part to understand. The controller contains no microcode and no
state-transition table. A 3-bit **step counter** counts T0, T1, T2, ... on
every clock. Four one-hot decoders present the current step (T0..T7), the
opcode (I0..I7), the source mode (S0..S3) and the destination mode (D0..D1).
A purely combinational **encoder** ORs these lines together into the control
word for the present step. The last step of every instruction raises
**Clear**, which sends the counter back to T0 for the next fetch. HALT raises
**Stop** instead, which freezes the counter (held in a `halted` flip-flop)
until reset. Each step is one clock cycle. All registers update on the
rising edge at the end of the step whose control word enabled them.

Fetch, identical for every instruction:

| Step | Transfer                    | Control signals                      |
|------|-----------------------------|--------------------------------------|
| T0   | MAR <- PC, PC <- PC + 1     | PC onto BUS B, Pass_B, Load_MAR, Inc_PC |
| T1   | MDR <- MEM(MAR)             | MEM_Read, Load_MDR                   |
| T2   | IR <- MDR                   | MDR onto BUS B, Pass_B, Load_IR      |

Execute. Here *f* is the instruction's ALU operation, with A = source operand
and B = destination operand (Pass_A for MOVE). Every data instruction loads
STATUS in the step that computes *f*.

| Instruction form | Steps | Cycles |
|------------------|-------|--------|
| `op Rs,Rd`       | T3: REGS_Read1 (+ REGS_Read2 for ADD/AND), *f*, REGS_Write, Clear | 4 |
| `op #V,Rd`       | T3: Extend (+ REGS_Read2), *f*, REGS_Write, Clear | 4 |
| `op (Rs),Rd` / `op V,Rd` | T3: MAR <- Rs or V · T4: MDR <- MEM · T5: MDR onto A, *f*, REGS_Write, Clear | 6 |
| `op Rs,V` / `op #V,V` / `op V,V` | T3: MAR <- V · T4: MDR <- MEM (old destination) · T5: MDR <- *f*(src, MDR) · T6: MEM_Write, Clear | 7 |
| `MOVE/INV/ROTL (Rs),V` | T3: MAR <- Rs · T4: MDR <- MEM · T5: MDR <- *f*(MDR) · T6: MAR <- V · T7: MEM_Write, Clear | 8 |
| `ADD/AND (Rs),V` | T3: Clear (no operation, see below) | 4 |
| `BRA d`, `BGTZ d` | T3: Extend, PC onto BUS B, ADD, Load_PC (BGTZ only if N=0 and Z=0), Clear | 4 |
| `HALT`           | T3: Stop | - |

`MOVE Rs,Rd` is thus REGS_Read1, Pass_A, Load_STATUS, REGS_Write and Clear in
T3. The longest form needs exactly T0..T7, which is what the 3-bit counter
provides. ADD and AND with a register-indirect source and a memory
destination are left as no-ops. They need two memory operands at once, and
the data path has only MDR to hold one. A new instruction means new lines in
`ctrl_encoder.sv` for its steps, and nothing else changes. This is the
exercise the processor was designed for.

## Memory map and ports

| Address | Contents |
|---------|----------|
| 0..61   | RAM: program (from address 0) and data |
| 62      | PORTA: read returns the 8 switch inputs in bits 7:0 (bits 15:8 read 0); writes ignored |
| 63      | PORTB: write stores bits 7:0 to the 8 LED outputs; read returns them |

Port accesses never reach the RAM words behind them. The switch inputs pass
through one register stage. Ordinary MOVEs do all I/O: `MOVE 62,R0` reads
the switches, `MOVE R3,63` drives the LEDs.

## Files

| File | Block |
|------|-------|
| `rtl/processor.sv` | top: data path + control unit; ports `clk`, `reset`, `porta_in[7:0]`, `portb_out[7:0]`, `halted` |
| `rtl/datapath.sv` | the three-bus data path and its wiring |
| `rtl/control_unit.sv` | step counter + decoders + encoder |
| `rtl/step_counter.sv`, `rtl/ctrl_decoders.sv`, `rtl/ctrl_encoder.sv` | the controller's parts |
| `rtl/alu.sv`, `rtl/alu_a_mux.sv`, `rtl/status_reg.sv` | ALU, its A-input multiplexer, NZVC register |
| `rtl/regs.sv`, `rtl/pc_reg.sv`, `rtl/ir_reg.sv`, `rtl/mar_reg.sv`, `rtl/mdr_reg.sv` | registers |
| `rtl/mem64.sv`, `rtl/io_ports.sv`, `rtl/buses.sv` | memory, ports, bus selection |
| `rtl/ip_pkg.sv` | widths, opcodes, ALU operations, the control-word struct `ctrl_t` |
| `rtl/led_demo.hex` | default power-up program |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_move_trace.sv` | cycle-by-cycle trace of the three-instruction MOVE program |

Reset is synchronous and active high. It clears PC, the step counter, the
registers, STATUS, IR, MAR, MDR and PORTB. It does not clear memory. The
memory's power-up contents come from the `INIT_FILE` parameter: a hex file
with one 16-bit word per line, starting at address 0. The default, for the
top, is the LED demo.

## Default program: LED demo

```
00  MOVE #1,R3        ; pattern
01  LOOP: MOVE 62,R0  ; switches
02  AND  #1,R0
03  BGTZ INVL         ; switch 0 on -> invert
04  ROTL R3,R3
05  BRA  SHOW
06  INVL: INV R3,R3
07  SHOW: MOVE R3,63  ; LEDs
08  MOVE 32,R1        ; delay count, word 32 = 7FFF
09  WAIT: ADD #-1,R1
0A  BGTZ WAIT
0B  BRA  LOOP
```

With switch 0 off, a single lit LED walks left. Because ROTL rotates all 16
bits, the LEDs stay dark for eight passes in sixteen. With switch 0 on, the
pattern blinks between a value and its complement. Each pass costs about
8·32767 cycles, so 5 ms per step at 50 MHz. Change word 32 to change the
speed.

The array-sum program below adds N numbers. With N at 40, the numbers from
41 and the sum at 39, it takes 25 + 18·N cycles:

```
MOVE 40,R1 ; MOVE #41,R2 ; MOVE #0,R0
LOOP: ADD (R2),R0 ; ADD #1,R2 ; ADD #-1,R1 ; BGTZ LOOP
MOVE R0,39 ; HALT
```

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. Run
them from the repository root, because the default program is read as
`rtl/led_demo.hex`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_processor \
    -y rtl -y tb +libext+.sv -Irtl rtl/ip_pkg.sv tb/tb_processor.sv
./obj_dir/Vtb_processor
```

`tb_processor` runs the whole design at its default parameters. It includes
an instruction-level reference model that predicts registers, all 64 memory
words, PORTB, the flags and the exact cycle count to HALT. The runs are:

* the three-instruction MOVE program (12 cycles);
* the array sum for 1, 7, 13 and 19 elements;
* 60 random programs that use every opcode, every addressing-mode
  combination, forward branches and both ports;
* the LED demo, rotating and then inverting.

It counts how often each mechanism happened: each source and destination
mode, each ALU operation, BGTZ taken and not taken, BRA, HALT, PORTA reads,
PORTB writes, memory writes and the indirect-to-memory no-op. A mechanism
that never happens fails the test.

`tb_move_trace` follows the three-instruction MOVE program cycle by cycle.
In every cycle it checks the step number, PC, IR, the increment, load and
write strobes, and the ALU A input. It then checks that the processor
freezes after 12 cycles.

The unit testbenches check their modules against independent models:

* ALU results and flags are computed with integer arithmetic.
* The encoder is checked for all 256 combinations of opcode, mode and flags.
  The check covers the fetch control words, the MOVE word, instruction
  lengths and single writes.
* The control unit is checked for the cycle counts of each instruction form.

## Departures and choices

Taken from the published design: the three-bus structure and register set;
the 16-bit word, 4 registers, 64 x 16 memory and 6-bit PC/MAR; the
instruction format and mode encodings; the MOVE, ADD, BGTZ and HALT opcodes;
the fetch sequence; the MOVE Rs,Rd execute step; the controller structure; 8-bit PORTA
input and PORTB output; and the AND, INV and ROTL instructions.

Chosen here:

* **Instruction encodings and semantics.** AND, INV, ROTL and BRA sit on
  opcodes 010..101. INV and ROTL take a source and a destination. ROTL
  rotates by one bit. BRA was described as a replacement for HALT; here it
  is kept alongside HALT.
* **Execute sequences.** All execute sequences except MOVE Rs,Rd, and the
  one-VALUE rule for memory-to-memory forms, are this implementation's own.
* **ADD/AND (Rs),V.** These do nothing, for the reason given above.
* **Flags.** V and C are defined as above.
* **BGTZ.** It tests N=0 and Z=0 of the most recent data instruction.
* **ALU input multiplexer.** Its second input is the sign-extended VALUE
  field.
* **Ports.** They sit at addresses 62 and 63, with the byte in bits 7:0.
  PORTB reads back, and the switch input is registered.
* **Buses.** They are multiplexers, and MDR can drive both BUS A and BUS B.
* **Reset.** It is synchronous, clears all registers and PORTB, and starts at
  address 0. A `halted` output is added.
* **Memory timing.** Reads are combinational and writes synchronous. On an
  FPGA this maps to distributed RAM initialised at configuration.
* **Board.** No board pin constraints are included.
