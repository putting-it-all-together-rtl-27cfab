# An 8-bit single-bus accumulator computer

This is a small teaching computer built around a single 8-bit data bus. An
accumulator (ACCA), an index register (X), a program counter (PC), a memory
address register (MAR) and an instruction register all hang on that bus. So do
an external 256 x 8 RAM, one input port and one output port. A simple ALU adds
the bus to ACCA, or compares the bus with X. A timing-state control unit runs
each instruction in two or three clock cycles. A memory loader sits next to the
processor. It writes a demonstration program into the RAM while the processor
is held in reset. When reset is released, the program starts at address 0.

The RTL follows the block structure and wiring of the original design
description: the module list, which register feeds which multiplexer, the
2-bit timing-state loop, the active-low control strobes, the I/O address and
the loader's write protocol. That description does not give the control unit's
microprogram, most opcode values, or the ALU. Those parts, and the signal
polarities needed to make the wiring consistent, are this design's own choices.
The section "Where this design makes its own choices" lists them.

## Memory map and pins

| Address     | Read                                   | Write                               |
|-------------|----------------------------------------|-------------------------------------|
| 0x00 - 0xFE | external RAM (`MEM_CS` low, `M_R` low) | external RAM (`MEM_CS` low, `M_W` low) |
| 0xFF        | `INPUT_PORT` driven onto the bus       | `OUTPUT_PORT` register loads the bus |

`MEM_CS` is low for every address except 0xFF, so the RAM never sees I/O
cycles. The RAM must drive `DATA` combinationally while `MEM_CS` and `M_R` are
low. It must store `DATA` at the rising clock edge that ends a cycle in which
`MEM_CS` and `M_W` are low. An asynchronous SRAM whose write ends on the rising
edge of its write strobe meets that timing.

`RESN` low holds the processor in reset. In reset the PC and the timing state
clear, no strobe is asserted, and the address bus and memory strobes follow the
external-access inputs (`EXT_ADDR`, `EXT_W`, `EXT_R`, all active low). Whoever
drives `DATA` can then read or write the RAM. `RESN` high runs the program.

## Instruction set and timing

Every instruction starts with a fetch cycle T0: address = PC, read, load the
instruction register, PC + 1. The remaining cycles are:

| Opcode | Instruction | Bytes | Cycles | Execute cycles |
|-------:|-------------|------:|------:|----------------|
| 0x01 | `LDAA addr`  | 2 | 3 | T1: MAR <- M[PC], PC+1. T2: ACCA <- M[MAR], Z |
| 0x02 | `LDAA #imm`  | 2 | 2 | T1: ACCA <- M[PC], Z, PC+1 |
| 0x03 | `STAA addr`  | 2 | 3 | T1: MAR <- M[PC], PC+1. T2: M[MAR] <- ACCA |
| 0x04 | `ADAA addr`  | 2 | 3 | T1: MAR <- M[PC], PC+1. T2: ACCA <- ACCA + M[MAR], Z, C |
| 0x05 | `LDAA 0,X`   | 1 | 2 | T1: ACCA <- M[X], Z |
| 0x06 | `INX`        | 1 | 2 | T1: X <- X + 1 (flags unchanged) |
| 0x07 | `CPX #imm`   | 2 | 2 | T1: Z <- (X == imm), C <- borrow of X - imm, PC+1 |
| 0x08 | `JEQ addr`   | 2 | 2 | T1: if Z then PC <- M[PC] else PC+1 |
| 0x09 | `LDX #imm`   | 2 | 2 | T1: X <- M[PC], PC+1 |
| 0x0A | `JMP addr`   | 2 | 2 | T1: PC <- M[PC] |
| 0x0B | `JCS addr`   | 2 | 2 | T1: if C then PC <- M[PC] else PC+1 |
| other | no operation | 1 | 2 | T1: nothing |

`LDAA` sets Z from the loaded value and leaves C unchanged. Opcodes
0x02, 0x03, 0x04 and 0x09 are fixed by the original example programs. The
others are this design's own numbering.

Because T0 does not depend on the opcode, the control unit decodes only from
the registered instruction. So the opcode is needed one cycle after it is on
the bus, and there is no combinational path from `DATA` into the control
unit. The timing state leaves the control unit as `TOUT` and comes back in as
`TIN`. The processor connects the two directly and brings both out for
observation.

### Worked example

RAM holds `02 2A 04 F0 03 F1`, with 0xEB at 0xF0:

* cycles 0-1: `LDAA #0x2A`; ACCA = 0x2A after cycle 1.
* cycles 2-4: `ADAA 0xF0`; 0x2A + 0xEB = 0x115, so ACCA = 0x15 and C = 1.
* cycles 5-7: `STAA 0xF1`; in cycle 7 the processor drives 0x15 on `DATA`,
  `ADDR` = 0xF1, and `MEM_CS` and `M_W` are low.

## The data bus and the strobe polarities

`DATA` is a real three-state bus. The processor drives it through
`tristate_buf` only in two cases: during a store, with ACCA, or during a read
of 0xFF, with the input port. The multiplexer in front of the driver (MUXIN)
selects with `{INMUX1, store}`. `E` is high while the processor drives the bus.
The RAM and the memory loader drive the same wires at other times. Two
assertions in `processor` check the bus rules in simulation: the processor
never drives `DATA` while the RAM is being read, and `M_R` and `M_W` are never
low together.

Inside the processor, the control unit's strobes are active low (`*_n`). The
processor inverts them into the active-high enables of the registers and
counters. Outside the processor, `MEM_CS`, `M_R`, `M_W`, `EXT_W`, `EXT_R`,
`STORE` and the loader's `CS`/`WE`/`OE` are active low. `RESN` is low for
reset.

`combina` turns the processor's read and store into the memory strobes, and
turns the external requests into them while in reset. It also raises `INMUX1`
for a read of 0xFF and loads the output port on a store to 0xFF.

## Loading the RAM: `memory_loader`

The loader counts clock cycles with the same `counter` used for X and PC. At
odd count 2i+1 it writes byte i of its image: `cs_n` and `we_n` go low, and it
drives `addr` = i and `data` = image[i]. The even counts are idle cycles with
the bus released. After 17 bytes (0x00-0x10), from count 35 onwards, `done`
is high and the counter stops. In `computer`, the loader's address and write
strobe go to the processor's `EXT_ADDR` and `EXT_W`, so the writes reach the
RAM while `RESN` is low. The image is this program:

```
0x00  09 0A   J1: LDX  #0x0A
0x02  05      J2: LDAA 0,X
0x03  06          INX
0x04  07 10       CPX  #0x10
0x06  08 00       JEQ  J1
0x08  0A 02       JMP  J2
0x0A  81 42 24 18 24 42   table
0x10  00
```

It reads the six table bytes into ACCA forever, one every 10 clock cycles.
`LDAA`, `INX`, `CPX`, `JEQ` and `JMP` (or `LDX` at the wrap) take 2 cycles
each.

## Files

| File | Contents |
|------|----------|
| `rtl/cpu_pkg.sv` | widths, opcodes, ALU operations, address-select and timing-state enums |
| `rtl/computer.sv` | top: processor plus memory loader; the RAM is external |
| `rtl/processor.sv` | the processor, wiring all blocks below |
| `rtl/control.sv` | timing-state register and instruction decoder |
| `rtl/alu.sv` | pass / add / compare-X with zero and carry |
| `rtl/combina.sv` | memory, input-port and output-port strobes |
| `rtl/decoder.sv` | address 0xFF detection; memory chip select |
| `rtl/mux1.sv` | 4-to-1 multiplexer (MUXIN, MUXMEM) |
| `rtl/tristate_buf.sv` | three-state bus driver |
| `rtl/counter.sv` | loadable counter (X, PC, loader count) |
| `rtl/register8.sv`, `rtl/register1bit.sv`, `rtl/latch1.sv` | MAR, ACCA, output port, flags, instruction register |
| `rtl/memory_loader.sv` | RAM loader |
| `tb/sram_model.sv` | behavioural 256 x 8 RAM used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. It
also has a cycle watchdog. For example, the end-to-end test:

```
verilator --binary --timing --assert -y rtl -y tb rtl/cpu_pkg.sv tb/tb_computer.sv --top-module tb_computer
./obj_dir/Vtb_computer
```

`tb_computer` runs the whole design at its default parameters, in three
phases:

1. It lets the loader fill the RAM and compares the RAM with the image.
2. It runs the table program for three passes. It checks every table address,
   every ACCA value and the 10-cycle spacing.
3. It runs the worked example, then `LDAA 0xFF` and `STAA 0xFF`.

It also counts each mechanism and fails if one never happened: external
write, fetch, three-cycle instruction, LDX, indexed load, INX, compare equal
and unequal, JEQ taken and not taken, JMP, carry out, memory store, input-port
read and output-port write.

`tb_processor` runs a program that uses every instruction, including JCS taken
and not taken. It checks the cycle of every opcode fetch, and it tests the
external read and write path in reset. The simulator has two states, so
registers without reset start at random values. The tests write every
register before they read it.

## Where this design makes its own choices

* **Polarities.** As written in the original, the bus-multiplexer select, the
  three-state enable and the memory-strobe equations contradict each other.
  For example, the multiplexer never selects ACCA during a store, and the
  write strobe stays asserted whenever the computer runs. This design keeps
  every block and connection but uses one consistent set of polarities, as
  described above.
* **Output-port strobe.** The output-port strobe is decoded in `combina` from
  store and address 0xFF. The original makes it a control-unit output, but the
  control unit never sees the address.
* **Microprogram and opcodes.** The microprogram, and the opcodes other than
  0x02, 0x03, 0x04 and 0x09, are this design's own. `LDAA 0,X` is one byte, so
  the test program ends exactly where its table starts.
* **JCS.** `JCS` is added. The carry flag is wired into the control unit, and
  no other instruction uses it.
* **CPX bound.** `CPX #10` compares with 0x10, the address after the table's
  last entry. One description of the instruction says 0x0F, which would stop
  one entry early.
* **Table order.** The table contents are 81 42 24 18 24 42. A second listing
  of the loader used a rotated order.
* **ALU.** The ALU has only the three operations the instructions need.
* **Instruction register.** The "latch" that holds the instruction is an
  edge-triggered register.
* **Registers without reset.** X, MAR, ACCA, the flags and the output port
  have no reset, as in the original. Only PC and the timing state are reset.
* **Loader.** The loader has a reset input and stops counting when done. The
  original free-runs and wraps around.
* **Loader connection.** Joining the loader to the processor's
  external-access inputs, in `computer`, is this design's choice. Originally
  the loader was a separate FPGA configuration that wrote the same RAM.

* **Showing the table on the output port.** The original asks that the table
  values also be shown, on LEDs through the output register or on a logic
  analyser. Here the output register loads only on a store to 0xFF. The
  table program as given stores nothing, so its values are visible in ACCA
  and as the sequence of addresses 0x0A-0x0F on `ADDR`. Adding `STAA 0xFF`
  after `LDAA 0,X` would show them on `OUTPUT_PORT`, at 13 cycles per value.

The RAM chip and the FPGA board, including its LEDs, are not part of the RTL.
