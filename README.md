# A 16-bit accumulator computer, its memory and the circuits behind RAM

This is a small stored-program computer. A single processor is connected to a
64K x 16 memory that holds both the program and its data. The processor has one
working register, the accumulator (ACC). Every instruction reads at most one
memory operand, combines it with ACC or moves it to or from ACC, and sets the
program counter (PC) for the next instruction. The memory is built from
asynchronous static RAM chips. Asynchronous means the chips have no clock: they
respond to enable, read/write' and address levels. So the processor must shape
every memory cycle itself. That shaping is the heart of the design: the
processor updates its registers on the rising clock edge, and drives the
memory lines on the falling edge.

Three small circuits come from the same material and stand beside the computer
in the top level, with their own ports:

- three registers that exchange data over one shared bus;
- a 4-word by 4-bit RAM drawn at gate level;
- an 8-word by 2-bit RAM laid out as a 4x4 cell array with row and column
  decoders.

All of it is synthesizable SystemVerilog. Only the memory chip's write is
triggered by a data signal (the rising edge of r/w'), as an asynchronous SRAM
part is.

## Instruction set

A word is 16 bits. An instruction has a 4-bit opcode in bits 15:12 and a
12-bit operand `xxx` in bits 11:0. Direct operands reach addresses
0x000-0xfff. Pointers are full 16-bit words, so indirect loads and stores reach
the whole 64K memory.

| Code   | Instruction        | Effect                                         |
|--------|--------------------|------------------------------------------------|
| `0000` | halt               | stop; the controller stays in `halt`           |
| `0001` | negate             | ACC := -ACC (two's complement)                 |
| `1xxx` | immediate load     | ACC := xxx sign-extended from bit 11           |
| `2xxx` | direct load        | ACC := M[xxx]                                  |
| `3xxx` | indirect load      | ACC := M[M[xxx]]                               |
| `4xxx` | direct store       | M[xxx] := ACC                                  |
| `5xxx` | indirect store     | M[M[xxx]] := ACC                               |
| `6xxx` | branch             | PC := xxx                                      |
| `7xxx` | branch if zero     | if ACC = 0, PC := xxx                          |
| `8xxx` | branch if positive | if ACC > 0 (signed), PC := xxx                 |
| `9xxx` | branch if negative | if ACC < 0 (signed), PC := xxx                 |
| `axxx` | add                | ACC := ACC + M[xxx] (modulo 2^16)              |

The other `0xxx` words and opcodes `b`-`f` also halt.

## How an instruction runs: state and tick

The controller (`cpu`) has two registers of its own:

- `state` names the phase in progress: `fetch`, or one state per instruction.
- `tick` (t0..t7) counts clock cycles within that state.

Each state follows a fixed schedule of ticks and then returns to `fetch` at t0.
There is no handshake with the memory. The schedule simply leaves the
asynchronous RAM enough time to answer: one full clock cycle between applying
an address and sampling the data.

Two clock edges share the work:

- **Rising edge.** PC, IREG, IAR, ACC, `state` and `tick` change.
- **Falling edge, half a cycle later.** `mem_en`, `mem_rw`, the address bus
  and the processor's data-bus driver change. They act on the state and tick
  that the rising edge just set.

This ordering gives the memory's setup and hold rules for free. The address is
stable before the memory is enabled. A write's r/w' pulse starts a cycle after
the address and ends a cycle before the address is removed. The data is held
until after r/w' rises.

The table shows what happens at each tick. "F" is the falling edge within that
tick and "R" the rising edge that ends it.

| State (cycles) | t0 | t1 | t2 | t3 | t4 | t5 | t6 | t7 |
|---|---|---|---|---|---|---|---|---|
| fetch (3) | F: en, A=PC | R: IREG := bus | F: en off; R: decode, PC+1 | | | | | |
| negate, imm. load, branches (1) | R: update ACC or PC | | | | | | | |
| direct load, add (3) | F: en, A=xxx | R: ACC := bus or ACC+bus | F: en off | | | | | |
| indirect load (6) | F: en, A=xxx | R: IAR := bus | F: en off | F: en, A=IAR | R: ACC := bus | F: en off | | |
| direct store (5) | F: en, A=xxx | F: rw low, drive ACC | | F: rw high | F: en off, release | | | |
| indirect store (8) | F: en, A=xxx | R: IAR := bus | F: en off | F: en, A=IAR | F: rw low, drive ACC | | F: rw high | F: en off, release |

Adding the 3-cycle fetch gives the instruction times: 4 cycles for negate,
immediate load and branches, 6 for direct load and add, 8 for direct store, 9
for indirect load and 11 for indirect store. Reset is synchronous. It clears
every register and sends the controller through `reset_state` into `fetch`.

The ALU (`cpu_alu`) is combinational and has only two operations: negate ACC,
and add ACC to the data bus. It has a whole clock cycle to settle before ACC
loads its result.

## The memory

`sram` models one asynchronous RAM chip:

- **Read.** While `en` is high and `rw` is high, the chip drives
  `mem[addr]` onto its data pins.
- **Write.** While `rw` is low, the chip stops driving. It stores the data
  when `rw` rises again with `en` still high.
- **Reset.** While `reset` is high, the chip neither drives nor writes.

Storing at the end of the write pulse matches the chip's timing rule: data
must be stable before r/w' rises, and the address must stay valid after it
rises. The default size is 64 words of 16 bits. Words 0 and 1 start out as
0xAAAA and 0x5555.

`ram_bank` builds the 64K x 16 memory from four 16K x 16 chips. The chips share
read/write', the low 14 address bits and the data lines. A 2-to-4 decoder on
address bits 15:14, gated by the memory enable, enables exactly one chip. The
program image (parameter `PROGRAM` of the top) is loaded into chip 0 at
power-up.

## The data bus

Tri-state buffers are written as enable-gated drivers feeding `data_bus`. The
bus carries the value of the enabled source. With no source enabled it reads
zero. Its `conflict` output goes high when two enabled sources drive different
values.

One overlap is part of the design's timing, and it is harmless. For one cycle
after a store raises r/w', the processor still drives ACC, and the memory (now
in read mode) drives the word it has just stored. The two values are equal, so
no conflict is raised. The processor is source 0, so during that overlap it
also wins the bus in simulation, which keeps the memory's write free of races.
The top level asserts, at every rising clock edge, that the bus never has a
conflict.

## The side circuits

- `bus_regs`: three 16-bit registers. Each register's D input is on the bus,
  and its Q output reaches the bus through a tri-state buffer. Moving data
  from register i to register j takes one clock: set `oe[i]` and `ld[j]`. An
  outside source (`ext_data`, `ext_oe`) can drive the bus too.
- `ram4x4`: a 2-bit address goes through a row decoder. Each row's write
  strobe is the row line ANDed with the inverted r/w'. Each cell is a
  transparent latch. Reading ANDs each cell with its row line and ORs the
  results down each column.
- `sram_array_8x2`: eight 2-bit words stored in four rows of four cells.
  Address bits 2:1 select the row and bit 0 the column. A column
  decoder/demultiplexer enables the column drivers of the addressed column
  pair for a write. A column multiplexer per output bit selects the addressed
  column for a read.

## Where this RTL makes its own choices

- **Add and indirect store timing.** The tick schedule of `add` and the bus
  actions of indirect store were reconstructed from timing diagrams. The
  result is the direct-load pattern for add, and the direct-store pattern
  shifted by three ticks for indirect store. Branch-if-negative tests bit 15.
- **Write instant.** The SRAM chip stores at the rising edge of r/w'. It does
  not write continuously while r/w' is low. The stored result is the same
  whenever the write rules above are met.
- **Preset contents.** Memory contents are preset at power-up. A later reset
  does not reload them.
- **Address aliasing.** Addresses above a chip's depth wrap around.
- **Bus model.** The inout data bus is split into input, output and
  output-enable signals, resolved as described above.
- **Processor memory.** The processor's memory is the 64K x 16 bank, not a
  single 64-word chip.
- **Side-circuit details.** Widths, bit order and the reset of the side
  circuits are choices of this RTL. So are the address bit that selects the
  column in the 8x2 array and the 16-bit register width.

### Scope

Transistor-level parts are not modelled: the six-transistor SRAM cell with its
sense amplifier, the CMOS tri-state buffer, and dynamic RAM (storage
capacitor, RAS/CAS address strobes, refresh). Their logic behaviour appears
only where the RTL needs it, as latch cells and enable-gated bus drivers.

## Files

| File | Contents |
|---|---|
| `rtl/cpu_pkg.sv` | opcodes, states, ticks, ALU ops, the test program image |
| `rtl/cpu.sv`, `rtl/cpu_alu.sv` | processor controller and datapath, ALU |
| `rtl/sram.sv`, `rtl/ram_bank.sv` | asynchronous RAM chip, 64K x 16 bank |
| `rtl/data_bus.sv` | shared bus with tri-state sources |
| `rtl/bus_regs.sv`, `rtl/ram4x4.sv`, `rtl/sram_array_8x2.sv` | side circuits |
| `rtl/computer.sv` | top level |
| `tb/*_tb.sv` | one self-checking testbench per module |
| `tb/cpu_model.sv`, `tb/cpu_checker.sv` | instruction-level reference model and the monitor that compares the processor with it |

## Simulating

With Verilator 5, from the project root:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/cpu_pkg.sv tb/cpu_model.sv tb/computer_tb.sv --top-module computer_tb
./obj_dir/Vcomputer_tb
```

Replace `computer_tb` with any other testbench name (for example `cpu_tb`,
`computer_prog_tb` or `ram_bank_tb`). Each testbench ends by printing
`TB_RESULT checks=N failures=M`.

- `computer_tb` runs the top level with default parameters. It executes the
  built-in test program, which runs every instruction, takes and skips
  branches, and ends at the halt at 0x19. The run is compared instruction by
  instruction with the reference model: PC, ACC, cycle count, and the address
  and data of every store. On every write it also checks the RAM's
  write-cycle rules, each with at least one clock period of margin: address
  and enable set up before r/w' falls, data stable before r/w' rises, and
  address and enable held after it rises. It also exercises the three side
  circuits.
- `computer_prog_tb` runs two more programs: a loop that sums the words at
  0x20-0x2f into 0x10, and a program that stores to and loads from all four
  memory chips through pointers.

To run your own program, set the top's `PROGRAM` and `PROG_WORDS` parameters
to a memory image starting at address 0.

## How far it has been checked

Every testbench passes under Verilator. Each was also run against a
deliberately broken copy of its module, and each caught the fault. The
processor's timing follows a cycle-by-cycle controller description for most
instructions. The exceptions, reconstructed from timing diagrams, are add,
indirect store and branch-if-negative. No gate-level timing or electrical
behaviour of the RAMs is modelled.
