# MIPS150: a three-stage MIPS processor with a memory-mapped serial console

MIPS150 is a small MIPS system for an FPGA board. A pipelined MIPS processor runs out of
its own instruction memory and data memory. It talks to a terminal through a UART whose
registers appear at fixed addresses in the data address space. The processor is built
around one rule: **the pipeline never stalls**. Every hazard is either made the
software's responsibility (one branch delay slot, one load delay slot) or removed by a
single forwarding path. The result is one instruction per clock cycle, with very little
hazard logic.

```
                 +-----------+        +------------------+      +------+   serial_out
   +-------+     |           | dreq   |  uart_cpu_adapter|      |      |------------->
   | imem  |<--->|mips150_cpu|------->|  0xFFFF0000..0C  |<---->| uart |
   +-------+     |  I  X  M  |        +------------------+      |      |<-------------
                 |           |------->+------------------+      +------+   serial_in
                 +-----------+        |      dmem        |         (to the board's
                                      +------------------+        RS-232 transceiver)
```

The Ethernet interface, the video interface with its 2-D graphics accelerator, and the
RS-232 level shifter on the board are part of the complete system. They are not included
here; see "Not included" below.

## The three stages

The slowest parts of a MIPS datapath are the instruction memory, the ALU and the data
memory. Each of them gets a stage of its own:

| stage | name              | work                                                                    |
|-------|-------------------|-------------------------------------------------------------------------|
| I     | instruction fetch | The PC register addresses the instruction memory. The word is captured in the instruction register on the edge that ends I. |
| X     | execute           | Decode, register-file read, ALU. The ALU produces a result, a memory address, or a branch comparison. The next PC is chosen here. |
| M     | memory            | Data memory or I/O access. The loaded or computed value is written to the register file on the edge that ends M. |

Only rising clock edges are used. The two edges around M do different jobs:

* **Leading edge of M** (the X to M edge). The X stage presents its data request: address,
  store data already placed on its byte lanes, byte enables, read and write strobes.
  The data memory and the I/O adapter both act on this edge. A store is written, and a
  load's word is captured in a register that is valid for all of M.
* **Trailing edge of M** (the edge that ends M). The register file is written.

### Branches: one architected delay slot

A branch or jump is decoded, compared and given its target in X. The comparison is an
ALU subtraction of rs − rt, or of rs − 0 for blez/bgtz/bltz/bgez. While the branch is in
X, the instruction after it is already being fetched. That instruction is the **branch
delay slot** and always executes. At the end of the branch's X stage the PC is loaded
with the target, or with PC+4 if the branch is not taken:

```
beq  $1,$2,L1   I  X  M
delay slot         I  X  M
L1: ...               I  X  M        <- fetched from the target, no bubble
```

So branches cost nothing and need no extra logic. `jal` and `jalr` link PC+8, which is
the address after the delay slot.

### ALU results: one forwarding path

An ALU result is computed in X but is written to the register file only at the end of M.
The next instruction needs it at the start of its own X stage, which falls in that same
cycle:

```
add $5,$3,$4   I  X  M         result sits in the M-stage result register
add $7,$6,$5      I  X  M      reads $5 during this X: forwarded
```

`forward_unit` compares the X-stage source registers with the M-stage destination. It
then switches the operand from the register-file output to the M-stage result register.
The forwarded value feeds both ALU inputs, the store data and the `jr` target. `$0` is
never forwarded.

### Loads: one architected delay slot

A load's value exists only during M, too late for the instruction right behind it.
That instruction is the **load delay slot**: it reads the register's old value. Loads
are deliberately left out of the forwarding logic. The next instruction after that
reads the register file after the write edge and gets the new value. No bypass inside
the register file is needed, because the write happens on the clock edge before the
read.

```
lw  $5,0($4)    I  X  M          value written to $5 on this edge ─┐
add $7,$6,$5       I  X  M       reads OLD $5 (load delay slot)    │
add $9,$8,$5          I  X  M    reads NEW $5  <──────────────────┘
```

If the delay-slot instruction itself writes the loaded register, its own write comes one
edge later and wins.

### What this means for software

A compiler or assembler for this machine must:

* fill each branch/jump delay slot (with a nop if nothing useful fits), and never put a
  branch in a delay slot;
* not expect a loaded value in the instruction right after the load.

Polling code written for a machine without delay slots does not run unchanged. A
`lw $t1,0($t0)` followed directly by `andi $t1,$t1,1` masks the stale `$t1`. The `lw` of
the data register placed right after the polling `beq` would run every time round the
loop, in the branch delay slot, and consume the character. The programs in the
testbenches put a nop after each such `lw` and `beq`.

## Instructions

`control_decoder` decodes this integer subset of MIPS I:

* ALU: addu/add, subu/sub, and, or, xor, nor, slt, sltu
* shifts: sll, srl, sra, sllv, srlv, srav
* immediate: addiu/addi, slti, sltiu, andi, ori, xori, lui
* loads: lb, lbu, lh, lhu, lw
* stores: sb, sh, sw
* branches: beq, bne, blez, bgtz, bltz, bgez
* jumps: j, jal, jr, jalr

Which instructions count as the common ones is this design's choice. There are no
exceptions: add/addi/sub behave like their unsigned forms. Multiply/divide, syscall and
coprocessor words decode as no-operations. Byte and halfword accesses use little-endian
lanes (byte 0 is bits 7:0). Address bits that would make an access unaligned are
ignored.

## Memory map and the serial registers

Every data address whose bits 31:16 are `0xFFFF` goes to `uart_cpu_adapter`. All other
addresses go to `dmem`, wrapped to its size.

| address      | register             | contents                                                                 |
|--------------|----------------------|---------------------------------------------------------------------------|
| `0xFFFF0000` | receiver control     | bit 0 Ready: a character waits in the receiver data register; bit 1 (interrupt enable) not implemented, reads 0 |
| `0xFFFF0004` | receiver data        | bits 7:0 the last received character, rest 0. Reading it clears Ready (1 ⇒ 0) |
| `0xFFFF0008` | transmitter control  | bit 0 Ready: the transmitter can take a character; 0 while still sending  |
| `0xFFFF000C` | transmitter data     | a store with byte lane 0 enabled sends bits 7:0                           |

Software polls a control register until Ready is 1, then loads or stores the data
register. Two cases are left to software:

* A store to the transmitter data register while the transmitter is busy is dropped.
* A character that arrives before the previous one was read replaces it. There is no
  overrun flag.

Both register accesses follow the M-stage timing above. In particular, the byte of a
store goes to the transmitter on the leading edge of M. A control read by the very next
instruction therefore already sees Ready = 0.

## The UART

`uart` combines `uart_transmitter` and `uart_receiver`. They share only the bit time,
`CLOCK_FREQ / BAUD_RATE` clock cycles (434 at the defaults). The frame is:

```
idle(1) | start(0) | b0 b1 b2 b3 b4 b5 b6 b7 | stop(1) | idle(1)
```

It has eight data bits, LSB first, one stop bit and no parity. For example, ASCII 'K'
(0x4B) goes out as the data bits 1 1 0 1 0 0 1 0.

* **Transmitter.** It takes a byte on a ready/valid handshake. Ready stays low for
  exactly 10 bit times.
* **Receiver.** The input first passes through two flip-flops. A falling edge starts a
  frame. Half a bit later the line is checked again: a shorter low pulse is ignored.
  Each of the eight data bits and the stop bit is then sampled one bit time after the
  previous sample, which is mid-bit. A frame whose stop bit is low is dropped. A good
  frame gives a one-cycle `data_out_valid`.

## Files

| file                        | role |
|-----------------------------|------|
| `rtl/mips150_pkg.sv`        | opcodes, ALU/branch enums, the `ctrl_t` control word, the `mem_req_t` data request, I/O addresses, instruction-encoding helpers |
| `rtl/mips150_top.sv`        | the system: CPU, memories, adapter, UART; ports `clk`, `rst`, `serial_in`, `serial_out` |
| `rtl/mips150_cpu.sv`        | the three-stage pipeline |
| `rtl/control_decoder.sv`    | instruction word → control word |
| `rtl/alu.sv`                | ALU, including the branch subtraction |
| `rtl/regfile.sv`            | 32 × 32 register file, write at the end of M |
| `rtl/forward_unit.sv`       | forwarding hazard detection |
| `rtl/imem.sv`, `rtl/dmem.sv`| synchronous instruction and data memories |
| `rtl/uart_cpu_adapter.sv`   | the four memory-mapped serial registers |
| `rtl/uart.sv`, `rtl/uart_transmitter.sv`, `rtl/uart_receiver.sv` | the UART |

Top-level parameters:

| parameter    | default      | note |
|--------------|--------------|------|
| `CLOCK_FREQ` | 50 000 000   | the target lies between 50 and 100 MHz; the lower end is used |
| `BAUD_RATE`  | 115 200      | design choice |
| `IMEM_WORDS` | 4096         | 16 KiB, design choice |
| `DMEM_WORDS` | 4096         | 16 KiB, design choice |

Reset is synchronous and active high. It starts fetching at address 0 (`RESET_PC` of
`mips150_cpu`) and empties the X and M stages. Registers and memories are not cleared.
The instruction memory has no write port, because the processor never writes it. Fill
it either through `imem`'s `INIT_FILE` parameter (a `$readmemh` image) or by writing
`u_imem.mem[]` from the test environment before releasing reset. When no image is given,
synthesis sees an empty instruction memory and removes it. Give an image for a real
build.

## Simulating

Each testbench is self-checking and ends by printing `TB_RESULT checks=N failures=M`.
Build one with plain Verilator 5, for example the whole system:

```
verilator --binary --timing --assert -Wno-fatal --top-module mips150_top_tb \
    -y rtl -y tb +libext+.sv rtl/mips150_pkg.sv tb/mips150_top_tb.sv
./obj_dir/Vmips150_top_tb
```

Replace the top module and file to run any other testbench. They run in seconds.

| testbench                 | what it establishes |
|---------------------------|---------------------|
| `mips150_top_tb`          | Runs the whole system at its default parameters. A polling echo program receives characters from a simulated terminal, stores them, and sends each back plus one. The test checks every echoed frame and the bit period (434 cycles), plus a buffer filled from the load delay slot, which must hold the previous character. It also counts forwarding, taken branches, load-delay-slot reads, polls of an empty receiver and of a busy transmitter, and Ready clears, and requires each to happen. |
| `mips150_cpu_tb`          | Runs one hand-written program and 40 random 300-instruction programs. Each is compared against an instruction-level reference model that follows the delay-slot rules. The fetch address is compared on every cycle, which confirms one instruction per cycle with the delay slots taken. All registers and all data memory are compared at the end. |
| `alu_tb`, `control_decoder_tb`, `forward_unit_tb`, `regfile_tb`, `imem_tb`, `dmem_tb` | Each unit against an independent reference, with corner cases and random stimulus. |
| `uart_transmitter_tb`, `uart_receiver_tb`, `uart_tb`, `uart_cpu_adapter_tb` | Frame format, bit timing, framing error, glitch rejection, loopback, and the register semantics of the adapter. |

The unit and UART testbenches use 16 clock cycles per bit to stay short. The CPU
testbench uses small memories.

## Design choices and limits

The following are this design's own decisions, not fixed by the system's description:
the instruction subset, the absence of exceptions and overflow traps, little-endian byte
lanes, the I/O decode on address bits 31:16, and the memory sizes. The same goes for the
clock and baud defaults, the UART handshake, mid-bit sampling with a synchroniser, and
the framing-error rule. The rule that a received byte overwrites an unread one, and that
a store to a busy transmitter is dropped, is also this design's own.

Interrupts are not implemented. The interrupt-enable bit of the serial control registers
always reads 0.

## Not included

* **Ethernet interface** and **video interface / 2-D graphics accelerator**. Their
  registers, protocols and algorithms are not specified, so there is nothing to build
  them from. No ports are reserved for them.
* **RS-232 transceiver** and the **DB-9 connector**. These are analog and mechanical
  parts on the board. `serial_in` and `serial_out` are the logic-level pins that connect
  to the transceiver.
* **The classic five-stage pipeline** (IF, ID, EX, DM, WB). It is the reference point the
  three-stage organisation is measured against: it needs branch resolution in ID,
  forwarding from two stages and a register-file bypass. It is not part of this design.
