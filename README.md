# μToad: a PDP-10-subset microcontroller

The μToad is a small embedded controller that runs a subset of the PDP-6/PDP-10
instruction set. Code built and debugged with ordinary PDP-10 tools runs unchanged
on it, as long as it keeps to that subset. It was designed first as a fan
controller, so it is simple rather than fast. It has 36-bit words, an 18-bit
address space and sixteen accumulators. There are no flags, no interrupts and no
traps. A few new instructions drive sixteen register-based IO buses. Every
instruction takes three clocks.

This repository holds synthesizable SystemVerilog for the proof-of-concept system.
That is the processor (`datapath`), one dual-port memory, two UARTs, an interrupt
controller and the three trace buffers used to debug it. Each module has a
self-checking testbench in `tb/`.

## The three-clock instruction cycle

The processor is not pipelined. A one-hot phase register (`cycle_out`) walks
every instruction through three phases. The PC changes only at the end of the
third phase.

| phase | what happens | registered at its end |
|---|---|---|
| **Decode / EA calc** | The fetched word arrives from the instruction port. The register file reads the AC named by the AC field and the index register named by X. The adder forms E = Y + right half of C(X), or Y alone when X = 0. E goes to the data port as a read address. | instruction, C(AC), E, PC |
| **Execute** | C(E) arrives from the data port. All twelve instruction-class units see the instruction, C(AC), C(E) and E at once. Only the unit that owns the opcode answers, with four requests: write AC, write memory, jump, skip. | every unit's requests and results |
| **Store / Fetch** | The requests are ORed and the results muxed. The next PC is E on a jump, PC+2 on a skip, else PC+1, and it goes to the instruction port. The AC result goes to the register file and the memory result to the data port. COUT/DOUT load the IO output registers. | PC, register file, memory, IO outputs |

The memory read latency is therefore hidden in the phase boundaries. Fetch is
issued in Store/Fetch and used in Decode. The data read is issued in Decode and
used in Execute. The ports also carry ready flags (`instruction_ready`,
`data_ready`). Decode waits for the first and Execute for the second, so a
memory that needs N clocks stretches each of those two phases to N clocks. With
the built-in single-clock memory there are never any waits: 3 clocks per
instruction, or 45 ns at 66 MHz.

After reset the machine sits in Store/Fetch with no instruction. That phase only
fetches `START_ADDRESS`, which is 40 octal, the console handler's address.

### The accumulators are memory locations 0–17

As on the PDP-10, a data reference whose E is below 20 octal means an
accumulator. In Execute such an operand comes from a third read port of the
register file instead of from memory. In Store/Fetch a memory result for such an
E is written into the register file instead of the memory. The register file has
one write port. An instruction that writes both its AC and an E that is an AC
(for example `EXCH 1,2`) is therefore rejected as an *illegal dual register
write*. Instruction fetches always come from the instruction memory.

### Stopping

The illegal opcode and halt detector (`opdecode`) looks at the instruction in
Decode. Four things stop the machine:

* an unsupported opcode (every one is a UUO, and UUO trapping is not enabled)
* a set indirect bit (indirect addressing is not implemented)
* `JRST 4,` (HALT)
* the dual register write above, detected in Execute

The stopping instruction still passes through all three phases, but its requests
are cleared, so it changes nothing. At the end of its Store/Fetch the machine
freezes. One of `halt_out` or `error_out` then stays high until reset.
`error_opcode_out` and `error_address_out` hold the instruction's opcode and
address.

## Instruction set

All instructions behave as on a single-section PDP-10, except that no flags
exist. The Add, Move and Compare classes therefore record no overflow or carry.
Each class has its own combinational unit:

| octal | instructions | unit |
|---|---|---|
| 200–217 | MOVE, MOVS, MOVN, MOVM × (basic, I, M, S) | `moves` |
| 250 | EXCH | `exchs` |
| 252, 253 | AOBJP, AOBJN | `aobjs` |
| 254 | JRST (AC 4 = HALT; all other AC values act as JRST 0,) | `jrsts` |
| 265 | JSP: saves 0,,PC+1 (the left half would hold flags) | `jsps` |
| 270–277 | ADD, SUB × (basic, I, M, B) | `addsubs` |
| 300–317 | CAI, CAM with the eight conditions | `compares` |
| 320–377 | JUMP, SKIP, AOJ, AOS, SOJ, SOS | `jumpskips` |
| 400–477 | the 16 Boolean functions × (basic, I, M, B) | `logics` |
| 500–577 | the 64 halfword moves | `halfwords` |
| 600–677 | the 64 test instructions | `tests` |
| 770–775 | CIN, COUT, DIN, DOUT, CINSZ, CINSO | `ios` |

Everything else halts with an illegal opcode error. That covers floating point,
doubleword, byte, multiply/divide, shift/rotate, BLT, JFCL, XCT, stack
instructions, JSR, JSA/JRA, and the I/O and APR instructions of other PDP-10
models. PUSHJ/POPJ are missing, so subroutines are called with `JSP ac,sub` and
return with `JRST (ac)`.

Two implementation points are worth knowing when changing a unit. The Boolean
unit takes its function straight from opcode bits 3–6, used as a truth table:
result = f[{~m,~a}]. The halfword and test units decode their four sub-fields
directly from the low six opcode bits; the header comment of each file gives the
field layout.

## IO buses

There are 16 buses. Each has a control port and a data port, 16 bits wide in this
build (`io_bus`). Each port has an input register and an output register:

* The input registers capture the peripheral's signals on every clock.
* The output registers are loaded in Store/Fetch and hold their value.

A port's bit k is bit 20+k of a 36-bit word (PDP numbering), so values are
right-justified. All IO instructions put the bus number B in the AC field:

| octal | name | effect |
|---|---|---|
| 770 | CIN B,E | control input → C(E), zero-filled |
| 771 | COUT B,E | control output ← E (immediate) |
| 772 | DIN B,E | data input → C(E), zero-filled |
| 773 | DOUT B,E | data output ← C(E) (memory operand) |
| 774 | CINSZ B,E | skip if (control input ∧ E) = 0 |
| 775 | CINSO B,E | skip if (control input ∧ E) ≠ 0 |

Bus assignment in `utoad`:

| bus | device |
|---|---|
| 0 | control and data outputs looped back to the inputs, for testing |
| 1 | UART A, the console |
| 2 | UART B |
| 3 | interrupt controller |
| 4–15 | brought out to the `io_*` ports |

UART bits, using word bit numbers:

| bits | direction | meaning |
|---|---|---|
| 24 | COUT | TX write enable; a rising edge sends data-out bits 28–35 |
| 25 | COUT | RX read; a rising edge drops one character from the 16-byte receive buffer |
| 26 | CIN | TX ready |
| 27 | CIN | RX buffer not empty |
| 28–35 | CIN and DIN | the character at the front of the buffer |

Bits 24 and 25 also read back through CIN. The edge detectors make a pulse of any
length act only once.

To send a character, a program loops on CINSO with mask 1000 octal (bit 26)
until the transmitter is ready. It then stores the character with DOUT, and
writes 4000 octal (bit 24) and then 0 with two COUTs. Receiving works the same
way:

1. Loop on CINSO with mask 400 octal (bit 27) until a character waits.
2. Fetch it with DIN.
3. Pulse bit 25 (200 octal) to remove it from the buffer.

The interrupt controller takes one line per bus and synchronizes it. It masks the
lines with bus 3's control output register, which is written by COUT and read
back by CIN. A DIN on bus 3 returns the raw lines. The controller drives
`irq_out`. The processor's interrupt inputs are not used: interrupt handling is
not part of this design, so `irq_out` is only a pin. The line of bus 1 is UART A's
RX-not-empty and the line of bus 2 is UART B's. Buses 4–15 take their lines from
`io_irq_in`.

## Trace buffers

Three `trace_engine` instances, one per phase, keep the last 16 instructions:

* **Decode** stores PC,,E.
* **Execute** stores a condition word. Bits 0–3 are zero. Then come 4 console
  interrupt, 5 UUO, 6 IO interrupt, 7 E is an AC, 8 halt, 9 illegal indirection,
  10 illegal dual register write and 11 illegal opcode. Bits 12–15 are the skips
  of compare, jump/skip, test and IO. Bits 16–19 are the jumps of JRST, JSP,
  AOBJ and jump/skip. Bits 20–28 are the AC writes of move, EXCH, AOBJ, JSP,
  add/sub, jump/skip, logic, halfword and test. Bits 29–35 are the memory writes
  of move, EXCH, add/sub, jump/skip, logic, halfword and IO.
* **Store/Fetch** stores the AC result when an AC is written, otherwise the
  memory result.

Each engine is a circular buffer with a write counter and an error input. The
entry of the instruction that stops the machine is stored with its error bit set,
and then the write counter stops.

The read side runs on `debug_clk` (tied to the main clock in `utoad`). It shows
one buffer's registered output at a time on `debug_data_out`/`debug_error_out`.
`debug_cycle_out` (one-hot) says which buffer: it rotates every clock, and all
three read addresses step after the third. A logic analyzer therefore sees the
stored entries again and again, Decode/Execute/Store in turn. The entry with
`debug_error_out` high is the last one. Reading never disturbs a stopped trace.

## Files

| file | role |
|---|---|
| `rtl/utoad_pkg.sv` | word, instruction, unit-interface types; condition helper |
| `rtl/utoad.sv` | top: processor, memory, UARTs, interrupt controller, bus map, reset register |
| `rtl/datapath.sv` | processor: phases, PC, EA adder, units, IO buses, traces |
| `rtl/regfile.sv` | 16 × 36 ACs, three read ports, one write port |
| `rtl/opdecode.sv` | illegal opcode / indirect / halt detector |
| `rtl/moves.sv` … `rtl/ios.sv` | the twelve instruction-class units |
| `rtl/io_bus.sv` | the four registers of one IO bus |
| `rtl/dpram.sv` | dual-port memory with ready flags |
| `rtl/trace_engine.sv` | circular trace buffer that stops on error |
| `rtl/uart.sv`, `uart_transmitter.sv`, `uart_receiver.sv` | serial port on an IO bus |
| `rtl/intctl.sv` | interrupt controller |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

Parameters, with their defaults:

* `utoad`: `MEM_WORDS` = 32768 (32K words), `START_ADDRESS` = 'o40,
  `FIRST_BAUD_DIVISOR` = 18, `SECOND_BAUD_DIVISOR` = 16.
* `datapath`: `N_IO` = 16, `IO_CTRL_W` = `IO_DATA_W` = 16, `TRACE_DEPTH` = 16.

One serial bit lasts FIRST × SECOND clocks. The defaults give 288 clocks per bit,
about 115200 baud at 33 MHz. The memory can also be built with 512 words, the
smallest configuration the original system ran. The top's IO ports stay 16 bits
wide, the width of the UART port mapping.

## Simulating

From the repository root (the testbenches include `tb/tb_check.svh` by that
path):

    verilator --binary --timing --assert -Wno-fatal --top-module tb_utoad \
        -y rtl -y tb +libext+.sv -Irtl rtl/utoad_pkg.sv tb/tb_utoad.sv -o sim
    obj_dir/sim

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog if it hangs. The other testbenches run the same way with their own top
module name.

* `tb_utoad` runs the whole system at its default sizes. It plays the serial
  terminals and an interrupting peripheral. The program polls UART A and sends
  "X", waits for a received character, echoes it on UART B, enables a bus in the
  interrupt controller and polls for its line, uses the bus 0 loopback, and
  halts. The testbench checks the characters, the stored words, `irq_out`, the
  halt and the 3-clock cycle.
* `tb_datapath` runs a 41-instruction program that touches every unit, E-in-AC
  reads and writes, indexing, skips, jumps and loops. It runs once with
  single-clock memory (3 clocks per instruction) and once with three-clock memory
  (7 clocks per instruction). It then triggers all three error stops and reads
  back the trace buffers.
* The unit testbenches compare against hand-worked PDP-10 results.

Programs are put into memory by writing `the_memory.mem` from the testbench.
To run your own code, assemble it to 36-bit words and load it the same way;
user code would normally start at 1000 octal.

## Choices made here, and limits

These follow the original design description closely: the instruction classes,
the three phases, E-in-AC, the IO instructions, the bus 0 loopback, the UART bit
map with its edge detectors and 16-byte buffer, and the trace word layout. The
following are this implementation's own:

* AOBJN/AOBJP increment the two halves independently, as on the KL10.
* The dual-register-write rule, and the third register-file read port for
  operands in the ACs.
* The stop sequence: the instruction is carried through all three phases with no
  effect.
* The details of the ready handshake.
* The trace error timing and the read-side rotation.
* UART framing (8N1) and the meaning and values of the two baud divisors.
* What happens on RX overflow (new characters are dropped) and on a TX write
  while busy (ignored).
* UART B on bus 2 and the interrupt controller on bus 3.
* Reset clears the ACs and the IO registers.

Not included:

* interrupt and UUO trap sequencing (disabled in the original as well)
* flags
* the clock manager and pad cells
* the loader that turns PDP-10 `.EXE` files into memory images
* the resident micro-debugger program

Timing has not been checked on any FPGA.
