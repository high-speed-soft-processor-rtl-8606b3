# Octavo: an eight-thread soft processor for FPGA overlays

Octavo is a processor built to run at the clock rate of the FPGA block RAMs
themselves. It does this by never stalling and never forwarding: eight
independent threads take turns issuing one instruction per cycle in fixed
order, so an instruction from a given thread issues only once every eight
cycles. Each instruction has eight pipeline stages to finish before its thread
issues again. No hazard logic is needed and every stage can be one register
deep. Memory is used directly as the register file: each instruction names two
source addresses and one destination address in 1024-word memories, so there
are no loads or stores.

This repository holds synthesizable SystemVerilog for:

* the scalar core: thread counter, instruction memory, controller, A/B data
  memories, four-stage ALU with a pipelined multiplier;
* SIMD cores: one control path driving any number of identical data paths
  ("lanes");
* two accelerators attached to every lane's I/O ports: an accumulator and an
  array reversal channel;
* I/O predication: an instruction whose I/O ports are not ready is
  annulled and re-issued on its thread's next turn;
* a two-dimensional mesh of such cores that talk to their north, east, south
  and west neighbours through I/O ports.

## Instruction set

A word is 36 bits. An instruction uses 34 of them:

| bits  | 35:34  | 33:30  | 29:20 | 19:10 | 9:0 |
|-------|--------|--------|-------|-------|-----|
| field | unused | opcode | D     | A     | B   |

| opcode | name | action |
|--------|------|--------|
| 0000 | XOR | D = A ^ B |
| 0001 | AND | D = A & B |
| 0010 | OR  | D = A \| B |
| 0011 | SUB | D = A - B |
| 0100 | ADD | D = A + B |
| 0101-0111 | - | reserved, no effect |
| 1000 | MHS | D = upper 36 bits of the signed 72-bit product A*B |
| 1001 | MLS | D = lower 36 bits of A*B |
| 1010 | MHU | D = upper 36 bits of the unsigned product A*B |
| 1011 | JMP | PC = D |
| 1100 | JZE | if A == 0, PC = D |
| 1101 | JNZ | if A != 0, PC = D |
| 1110 | JPO | if A >= 0 (signed), PC = D |
| 1111 | JNE | if A < 0 (signed), PC = D |

A and B are addresses in the A and B memories; the operands are the words
stored there. The encodings 0000-1100 follow the original Octavo. The three
branches 1101-1111 are this design's choice: the opcode space leaves three
codes and these three conditions complete the set of tests on one operand.
Branches and reserved opcodes write nothing. Compute instructions write their
result R to address D of the A memory, the B memory and the instruction
memory at once. That lets a program build constants in both data memories
with one instruction, and it is how a program modifies its own instructions.
There is no indirect addressing in the base machine: code that walks through
an array rewrites the address fields of its own instructions.

Because R also goes to the instruction memory, programs can use arithmetic to
form instruction words. `octavo_pkg::mk_instr(op, d, a, b)` builds one.

## Threads and the pipeline

The thread counter counts 0..7 and wraps; the thread it names fetches its
instruction. Each thread has its own program counter in the controller. After
reset, thread *t* starts at address *t*, so words 0-7 of the instruction memory
are an entry table, normally eight `JMP` instructions. Thread 0 fetches in the
first cycle after reset is released.

An instruction fetched in cycle *n* moves through these stages:

| cycle | control path | data path (each lane) |
|-------|--------------|-----------------------|
| n     | instruction memory read, address = PC | |
| n+1   | register (empty stage) | |
| n+2   | register; word sent to the lanes | instruction register |
| n+3   | register (empty stage) | instruction register |
| n+4   | | A/B memory read, stage RD0 (address A, B) |
| n+5   | | RD1: operands ready at the end |
| n+6   | controller CTL0: branch condition from lane 0's A | ALU stage 0 |
| n+7   | controller CTL1: next PC written for the thread | ALU stage 1 |
| n+8   | thread fetches its next instruction | ALU stage 2 |
| n+9   | | ALU stage 3 |
| n+10  | R written into instruction memory at end of cycle | result R on `wb_r`, WR0 |
| n+11  | | WR1: R written into A and B memories |

Two things follow from this table, and programs must respect both:

* **Next instruction sees the old instruction word.** When a thread
  writes its own next instruction, that instruction is fetched in cycle n+8
  but the write only lands at the end of n+10. The thread runs the old word
  once. The instruction after that sees the new one.
* **Data results are visible to the next instruction of the same thread.** The
  thread's next instruction reads its operands in cycle n+12, after the A/B
  write at the end of n+11, so data memory needs no forwarding.

One result per cycle leaves each lane, and each thread completes one
instruction every eight cycles. A branch costs nothing beyond its own issue
slot.

## Memories and I/O ports

Each lane has a 1024-word A memory and B memory. The control path has one
1024-word instruction memory. All three are synchronous block-RAM style
arrays. The instruction memory reads in one cycle. The data memories read in
two cycles (RD0, RD1) and write in two (WR0, WR1). A read and a write of the
same address in the same cycle return the old word.

Sixteen addresses at the top of the address space are I/O ports, eight in
each data memory:

| memory | addresses | use in a core |
|--------|-----------|---------------|
| A | 1008-1015 | ports 0-7; in the mesh ports 0-3 are the N, E, S, W links |
| B | 1016 | accumulator |
| B | 1017 | array reversal channel |
| B | 1018-1023 | read as zero |

Reading a port address returns the port's input word and gives a one-cycle
`io_rd` pulse in RD0; this is how a port knows it was read. A compute
instruction whose D is a port address writes R to the memory location as
usual and also drives the port's `io_wr` pulse with `io_wdata` in WR1. R
always goes to both memories, so the A and B port windows are placed at
different addresses: a D in 1008-1015 drives an A port, a D in 1016-1023 a B
port, never both. Whether a port may be used at all is decided by I/O
predication, described below.

The accumulator adds each word written to it. A read returns the sum and
clears it. A read and a write in the same cycle return the old sum and restart
the sum from the new word. The array reversal channel is a stack of 1024
words. Writes push, reads pop, so an array written in order is read back
reversed. In a core, I/O predication makes a pop wait while the stack is
empty and a push wait while it is full. On its own, the stack returns 0 for
a pop when empty and drops a push when full.

The number of ports, their addresses, the handshake, and how both accelerators
work are this design's own choices. The original only names the two
accelerators and says that they sit on I/O ports.

## I/O predication

Every I/O port has a readiness bit. An input port is ready when it holds a
word. An output port is ready when it can take one. In RD0, each lane's
`octavo_io_pred` checks every port the instruction addresses: operand A in
the A window, operand B in the B window, and D in either window if the opcode
writes. The core ANDs the lanes' answers. If any port is not ready, the
instruction is annulled in every lane:

* it pops no input port and writes nothing;
* the controller leaves the thread's PC unchanged, so the thread fetches the
  same instruction again on its next turn, eight cycles later.

A thread that waits for I/O therefore takes one issue slot per turn and
needs no polling loop. The other threads run at full speed.

An output port's readiness is sampled in RD0, but the write happens seven
cycles later in WR1. Another thread could see the same free one-word slot in
between. So each lane also counts a committed write to an A port as "full"
until it lands. B ports are not tracked this way, so back-to-back
accumulator writes keep full speed. The accumulator and the unused B ports
are always ready. The reversal channel is ready from its empty/full flags.
In-flight pushes to a stack one word from full can still be dropped.

Readiness for the A ports of a core comes from the `a_io_in_valid` and
`a_io_out_ready` inputs. In the mesh these are the link registers' full
bits.

## The multiplier

`octavo_mult` takes four stages, matching the four ALU stages. It splits B
into an unsigned low half of 18 bits and a signed high half. It forms the two
partial products with A in two parallel pipelines, then shifts and adds them.
Setting `is_signed` sign-extends both operands (MHS); otherwise both are zero
extended (MHU, MLS). The low word is the same either way. The ALU computes
logic, add and subtract in its first stage and carries the result beside the
multiplier, so every instruction takes the same four cycles.

## SIMD cores

`octavo_core #(.LANES(L))` has one control path and L data paths. Every lane
executes the same instruction on its own A and B memories, accumulator and
reversal channel. Branch conditions come from lane 0's A operand. The
instruction memory is written by lane 0's result; the other lanes' results
only reach their own data memories. All lanes load the same initial image.

## The mesh

`octavo_mesh #(.ROWS, .COLS, .LANES)` places ROWS x COLS cores on a grid.
The default is 4 x 8 scalar cores, which is 32 data paths. Each core has its
own thread counter. Lane *l* of a core connects to lane *l* of its four
neighbours through A ports 0 (north, 1008), 1 (east, 1009), 2 (south, 1010)
and 3 (west, 1011). Each direction has a one-word register at the receiving
core. Writing to one's own east port loads the east neighbour's west
register, and so on, and sets that register's full bit. Reading the port
clears the bit. The full bit is the port's readiness for I/O predication.
A link is therefore a one-word channel with back-pressure: a reader waits
for a word, and a writer waits until the previous word has been taken.

Ports on the edge of the grid are brought out as the `n_`, `e_`, `s_` and
`w_` ports of the mesh, with `*_in_valid` and `*_out_ready` inputs for their
readiness. The `obs_*` outputs give one pulse per core for branches taken
and not taken, link writes, accelerator reads and annulled instructions.
They are meant for monitoring.

The link registers and the port numbering are this design's choice. One
consequence matters for programs: a thread that writes a link nobody reads
stalls on its second write. The test program shows this in the inner cores,
whose north and west reports are never read.

## Files

| file | content |
|------|---------|
| `rtl/octavo_pkg.sv` | widths, opcodes, instruction struct, I/O addresses, `mk_instr` |
| `rtl/octavo_thread_ctr.sv` | round-robin thread counter |
| `rtl/octavo_delay.sv` | register chain used for the empty stages |
| `rtl/octavo_imem.sv` | instruction memory |
| `rtl/octavo_controller.sv` | per-thread PCs and branch decisions (CTL0/CTL1) |
| `rtl/octavo_cp.sv` | control path |
| `rtl/octavo_dmem.sv` | A/B data memory with I/O window |
| `rtl/octavo_mult.sv` | four-stage multiplier |
| `rtl/octavo_alu.sv` | four-stage ALU |
| `rtl/octavo_io_pred.sv` | I/O predication check (per lane) |
| `rtl/octavo_dp.sv` | data path (one lane) |
| `rtl/octavo_accumulator.sv`, `rtl/octavo_reverse_channel.sv` | accelerators |
| `rtl/octavo_core.sv` | scalar or SIMD core |
| `rtl/octavo_mesh.sv` | mesh of cores (top) |

Every memory takes an `INIT_FILE` parameter: a `$readmemh` image loaded into
the instruction memory and into every A and B memory. With the default
empty name, the memories start at zero.

## Simulation

Each module has a self-checking testbench `tb/tb_<module>.sv` that prints
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5, for example:

    verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl \
        rtl/octavo_pkg.sv tb/tb_octavo_core.sv --top-module tb_octavo_core
    ./obj_dir/Vtb_octavo_core

`-y rtl` lets Verilator find each module in `rtl/<name>.sv`; only the
package must be named first. `-Wno-fatal` keeps width warnings in the
testbenches' arithmetic from stopping the build.

Run this from the repository root, because testbenches open
`tb/prog_octavo.hex` by that relative path.

`tb/prog_octavo.hex` is a test program. It gives each of the eight threads a
different job:

| thread | job | expected output |
|--------|-----|-----------------|
| 0 | reads the west port, adds 1, writes east | east = west + 1 per core |
| 1 | reads north, adds 2, writes south | south = north + 2 per core |
| 2 | three writes to the accumulator, two pushes to and pops from the reversal channel, MLS/MHS/SUB/ADD | writes 22 to the north port |
| 3 | count-down loop with JNZ, taken JZE and JPO, untaken JNE, and self-modifying code that checks both halves of the instruction-memory hazard | writes 3 to the west port |
| 4 | XOR, AND, OR, SUB, ADD, MHS, MLS, MHU on two fixed words | results at A/B 920-927 |
| 5 | multiplies input port 4 by 3 | written to port 5 |
| 6, 7 | idle loops | - |

`tb_octavo_mesh` runs a 2 x 3 mesh of 2-lane cores. `tb_octavo_mesh_full`
runs the default 4 x 8 mesh with no parameter overrides. Both check that a
word entering from the west edge leaves the east edge increased by the
number of columns, and that a word from the north leaves the south edge
increased by twice the number of rows. They also check the other threads'
outputs on every edge and check that every mechanism happened: taken and
untaken branches, link writes, accumulator and reversal reads, and annulled
instructions. Halfway through, the east edge refuses words for 300 cycles.
No word may leave in that time, and afterwards the chains must drain with
the new inputs. The full-size run takes under a minute in Verilator.

`tb_octavo_workloads` runs three benchmark kernels on a 2-lane core, with
the program `tb/prog_workloads.hex`. Thread 0 increments 16 words in place.
Thread 1 pushes 16 words into the reversal channel and pops them into a
second array. Thread 2 applies one Collatz (hailstone) step to 8 words: 3x+1
for odd x, and x/2 for even x, computed as the upper word of x * 2^35. The
loops walk their arrays by adding 1<<10 (A field) or 1<<20 (D field) to their
own load and store instructions, which is how the base machine does indirect
addressing. The testbench also checks the rate: 16 elements x 4
instructions x 8 cycles = 512 cycles for the Increment loop.

## Departures from the original and limits

* The three branch encodings 1101-1111, the I/O addresses, the accelerator
  behaviour, the multiplier's internal split, the reset PCs and the mesh link
  registers are choices made here. See the sections above.
* Not included are the original's later overhead-removing extensions: the
  branch trigger module (branches computed beside the pipeline, folded into
  other instructions, cancelling and multi-way), the address offset module
  (per-thread indirect addressing with post-increment), and the wider write
  address space that uses the two spare instruction bits.
* Where predication checks ports, how SIMD lanes combine their readiness,
  and the in-flight write tracking are this design's choices.
* Reset is synchronous and active high. Memory contents are not cleared by
  reset; they come from `INIT_FILE` or start at zero.
