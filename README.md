# Task flow multiprocessor

A small shared-bus multiprocessor built to run programs written as *task
flow*: a program is cut into tasks of a few tens of instructions, each task
names the data it needs, and all tasks wait on a heap in shared memory until
their data is ready. Any idle processor may pick up any ready task, copy it
into its own local memory, run it there without touching the bus, and then
write its results back. There is no master processor. Scheduling is done by
the processors themselves through tables in main memory, so the loss of a
node only slows the machine down.

The hardware that makes this work is modest, and it is what this RTL
describes:

* four identical processing nodes, each an 8086-class CPU with 16 KiB of
  private RAM, joined to one system bus through transceivers;
* a control board with a fixed-priority bus arbiter for eight requesters, a
  "token" signal that wakes exactly one idle node when the bus is released,
  a control latch that sequences power-up, the host serial link and a
  diagnostic display;
* a main memory board with 64 KiB of RAM, an 8 KiB boot ROM and a DMA circuit
  that moves blocks between main memory and local memory.

The CPUs, the 8251A serial controller and its RS232 driver, the HDSP-2112
display and the 8284 clock chip are bought parts and are not modelled. Their
signals are ports of the top module `tf_system`.

## Files

| File | Contents |
|---|---|
| `rtl/tf_pkg.sv` | bus structs, address map, port numbers |
| `rtl/tf_system.sv` | top: four nodes, control board, memory board |
| `rtl/proc_node.sv` | one node: `node_busif` + `local_memory` |
| `rtl/node_busif.sv` | node glue: decode, BRQ/IU latch, HOLD, transceivers, token chain |
| `rtl/local_memory.sv` | node RAM, reachable from the CPU or from the bus |
| `rtl/bus_arbiter.sv` | priority arbiter, boot/real grant modes, token pulse |
| `rtl/ctrl_regs.sv` | control-board I/O decode and the Real/Boot control latch |
| `rtl/baud_gen.sv` | serial clock divider with the four jumper rates |
| `rtl/main_memory.sv` | main RAM and boot ROM, plus the DMA's private port |
| `rtl/dma_engine.sv` | block-move DMA with two address counters |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## The system bus model

On the boards the bus is tri-state wiring. Here it is a request/response pair
of packed structs (`sbus_req_t`: cycle, write, memory/IO, 20-bit address,
16-bit data, two byte enables; `sbus_rsp_t`: ack and read data). Exactly one
master drives a cycle: the running DMA if there is one, otherwise the node
whose transceivers are on. Every slave answers with `ack` and zero read data
unless it is the one answering, and the top ORs all answers together. All
slaves in this design acknowledge one clock after the cycle starts.

Everything runs on one clock, the 4.9152 MHz CPU clock, with a synchronous
active-low reset.

### Address map

| Address | Target |
|---|---|
| memory, A19:A18 = 00 | the node's own local memory (8 Ki words, repeated) |
| memory, A19 = 1, A18..A16 = 111 | boot ROM (4 Ki words, repeated) |
| any other memory address | main RAM (32 Ki words, repeated every 64 KiB) |
| I/O 0x00-0x0F | serial controller (C/D on A1) |
| I/O 0x10-0x1F | control latch: bit A3..A1 is set to D0 |
| I/O 0x20-0x2F | arbiter software grant byte |
| I/O 0x30-0x3F | display, character address on A4..A1 |
| I/O 0x40-0x4F | DMA registers |
| I/O with A7 = 1 | node-local latch and status, never on the bus |

The split at A19:A18 and the ROM position follow the board decoders; the
port numbers and the main RAM placement are this design's own.

## A node and its transceivers

`node_busif` holds most of the subtle behaviour.

**Bus request and in-use.** Software writes a node-local port to set bit
A3..A1 of an 8-bit addressable latch to D0. Bit 0 is the node's bus request,
bit 1 its *in use* flag. A node therefore asks for the bus with one I/O
write and keeps it until it clears the bit. Reading a node-local port returns
the node's grant in bit 0 and the latch in bits 15..8, so software can poll
for the grant.

**Cycles.** Local memory cycles and node-local I/O finish in two clocks and
never wait. Any other cycle needs the bus: READY stays low until the node
holds a grant, then the cycle goes out and ends when the slave acknowledges.

**Transceivers.** While the node has a grant and its CPU is not in hold,
*every* cycle of its CPU is copied onto the bus, local ones too. While the
CPU is held and the node has a grant, the transceivers point the other way
and the node's local memory becomes a bus slave for addresses with
A19:A18 = 00. These two rules together give the boot broadcast below.

**HOLD.** A flip-flop drives the CPU's HOLD pin. On every node except the
boot node (a jumper, `IS_BOOT_NODE`) it is set while Boot is high. It is also
set while the DMA asks for the bus and the node holds a grant.

**Token chain.** The arbiter's token pulse enters node 0. A node that is in
use passes it on; the first idle node keeps it and gets an interrupt
(`cpu_nmi`). So after each release only the highest-priority idle node goes
to the heap to look for work, and idle nodes do not poll the bus.

## Arbitration

`bus_arbiter` has eight request lines, line 0 highest. The grant is
registered. It is reloaded with the highest-priority request only when the
current owner drops its request, so an owner keeps the bus for a whole heap
transaction and nobody is pre-empted. When the owner releases, the token
output gives a three-clock positive pulse. The board uses a monostable of
about 0.5 µs here.

Two control inputs override the priority logic:

| Boot | Real | Grants |
|---|---|---|
| 0 | x | priority logic |
| 1 | 0 | line 0 only (the board's pull-up/pull-down resistors) |
| 1 | 1 | the byte last written to the grant port, any number of lines at once |

## Power-up and the kernel broadcast

This is the part of the machine that is easiest to get wrong.

1. Reset clears the control latch, which gives Real = 0 and Boot = 1 (Boot is
   the inverse of latch bit 1). The arbiter grants node 0 alone; the
   HOLD flip-flops of nodes 1..3 set, and those CPUs float their buses.
2. Node 0 runs from the boot ROM, talks to the host over the serial link and
   receives the kernel into main memory.
3. Node 0 writes 0x0F to the grant port and sets Real. Now every node is
   granted. Node 0 is not held, so its transceivers drive. Nodes 1..3 are held
   and granted, so theirs point inwards.
4. Node 0 block-moves the kernel from main memory into its own local memory.
   Each local write also appears on the bus and lands in every held node's
   local memory in the same clock.
5. Node 0 raises its own bus request, writes 0x01 to the grant port and
   sets latch bit 1, which lowers Boot. The priority logic takes over with
   node 0 as owner, so node 0 keeps the bus. HOLD drops on nodes 1..3 and
   they start the kernel from their local memory.

`tb_tf_system` plays the CPUs through these steps and then checks that all
four local memories hold the kernel.

## DMA

The DMA sits on the main memory board and has a private path into the RAM
chips. While it runs, the buffer between the system address bus and the RAM
is turned off. One counter (`ca`) then addresses main memory directly and the
other (`cb`) drives the system bus. A main memory read and a local memory
write (or the reverse) happen in the same clock at different addresses, one
word per clock after a one-clock fill: n words take n + 1 clocks.

To reach a node's local memory the DMA borrows the bus from the node that
owns it. It raises `hold`. Every granted node then holds its CPU, and the
transfer starts once all of them have answered HLDA. The held, granted nodes'
transceivers point inwards, so with several nodes granted (in the Boot/Real
mode) one DMA block lands in all of them at once.

Registers at I/O 0x40 + offset: 0 main word address, 2 and 4 bus byte
address (bits 15..0, 19..16), 6 word count, 8 control (write bit 0 start,
bit 1 direction: 0 main to bus, 1 bus to main; read bit 0 busy).

## Serial clock

`baud_gen` divides the CPU clock by two to get the peripheral clock and
counts it with a 4-bit counter. The jumper picks one counter output as the
serial controller's clock: 1.2288 MHz, 614.4, 307.2 or 153.6 kHz. In the
controller's x64 mode these give 19200, 9600, 4800 and 2400 baud.

## Departures and choices

* Active-high BRQ, BG, HOLD and Boot signals in place of the board's
  active-low ones.
* A synchronous single-clock model of the bus; no wait-state timing of the
  real memory chips.
* The token pulse is a counter of `TOKEN_CYCLES` clocks, not a monostable.
* An idle node that keeps the token gets an interrupt. How the board routes
  the kept token to the CPU is an assumption.
* The grant is also reloaded when nobody owns the bus.
* The node-local status read, the port numbers, the DMA register map and the
  DMA's use of HOLD are this design's own. The DMA's control logic is not
  specified beyond its counters and buffer, so it is the simplest controller
  that does the job.
* The boot ROM is blank unless `ROM_INIT` names a `$readmemh` image.

## Parameters of `tf_system`

| Parameter | Default | Meaning |
|---|---|---|
| `NODES` | 4 | processing nodes (arbiter lines above are `brq_ext`) |
| `LM_AW` | 13 | local memory word-address bits (16 KiB) |
| `RAM_AW` | 15 | main RAM word-address bits (64 KiB) |
| `ROM_AW` | 12 | boot ROM word-address bits (8 KiB) |
| `ROM_INIT` | "" | optional hex image for the ROM |
| `TOKEN_CYCLES` | 3 | token pulse width in clocks |

## How software uses the hardware: a task-flow job

The hardware gives the scheduler three primitives: exclusive ownership of
the bus for as long as a node wants it, the IU flag, and the token
interrupt. `tb_task_flow` shows them working together on a small job with a
mother task A, daughters AA, AB and AC (AB and AC need AA's data), AA's
daughters AAA, AAB and AAC, and a second AAA started from inside AB.

The heap is one state word per task in main memory: absent, listed,
running, finished but waiting for daughters, removed. Each node loops:

1. Sleep until the token interrupt arrives.
2. Set BRQ. The first heap read stalls on READY until the grant comes, and
   from then on no other node can touch the heap.
3. Look for a listed task whose dependency has been removed. Mark it
   running, list its daughters, set IU and drop BRQ. Dropping BRQ fires a
   token. Because this node is now in use, the token passes it by and wakes
   the next idle node, which can pick up one of the new daughters.
4. Run the task out of local memory without using the bus.
5. Take the bus again and store the result. Remove the task if all its
   daughters are gone, or leave it waiting. On each removal, check whether
   the mother was waiting only for this task and remove her too. Clear IU
   and drop BRQ.

A node that searched and found nothing ignores the token caused by its own
release. Otherwise it would keep searching the heap, which is exactly the
bus traffic the token exists to avoid. The testbench checks that every task
runs once, in dependency order, that mothers leave the heap after their
daughters, that every result is right, and that only one node is ever inside
the heap. With four nodes the eight tasks are spread over all of them.

## Verification

Each module has a self-checking testbench that prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. `tb_bus_arbiter`
compares the arbiter against a reference model under random requests.
`tb_tf_system` runs the top at its default parameters through the whole
power-up sequence, a kernel broadcast to four nodes, contention between nodes
for a shared counter in main memory, the token chain and DMA moves in both
directions. It counts how often each mechanism happened and fails if any
never did. `tb_task_flow` runs the job described above, also at the default
parameters.

Run one testbench with plain Verilator, from the directory above `rtl/`:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl +libext+.sv \
        rtl/tf_pkg.sv tb/tb_tf_system.sv --top-module tb_tf_system -Mdir obj
    ./obj/Vtb_tf_system

Replace `tb_tf_system` with any other testbench name. `tb_main_memory` reads
`tb/tb_main_memory_rom.hex` by a path relative to that directory.
