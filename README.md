# NDMA: a network-driven multiprocessor on a mesh

NDMA (network driven microprocessor architecture) is a multiprocessor in which
processors do not exchange data messages to be interpreted by software. Instead,
one processor **writes code straight into another processor's instruction
memory** over the network, then tells it to jump there. Each node is a small
single-cycle MIPS-like core. A few extra instructions let a core send bytes
across a 2-D mesh. The receiving node's hardware assembles those bytes into
instructions and stores them. A special jump lets the sender take over the
receiver's control flow. The interconnect is a router-less mesh: messages spread
through it as a "wave". The mesh also adapts itself: a bus that keeps carrying
traffic through a node turns from a registered hop into a plain wire
("register-thru").

This repository holds synthesizable SystemVerilog for the whole processing
system: the nodes, the mesh, the serial bootloader of the master node, and the
master's two peripherals, a pixel-plotting graphics unit with VGA output and a
PS/2 keyboard buffer. Each block has a self-checking testbench. A six-node
end-to-end testbench boots the master over RS232 and has it dispatch a program
to the far corner of the mesh, which runs it and sends code back. The master
then plots a pixel and reads a key.

## 1. The system

```
          col 0           col 1        col 2
 row 0  [ 1 master ] ==  [ 2 ]   ==   [ 5 ]
             ||            ||           ||
 row 1  [ 6 ]        ==  [ 3 ]   ==   [ 4 ]
```

`ndma_top` builds a `ROWS x COLS` mesh (default 2 x 3). With the default size,
the node IDs are those of the original six-core system, shown above. Any other
size numbers the nodes 1, 2, 3, ... row by row. Each `==` or `||` is a pair of
32-bit buses, one in each direction. Buses at the edge of the mesh are tied
idle.

The master (row 0, column 0) is the only node the host talks to. While
`boot_mode` is high, `ndma_uart_rx` (8N1, 115200 baud) receives bytes and `ndma_bootloader` packs them into words. The bootloader
writes those words into the master's instruction memory from address 0 and holds
the master's core in reset. When `boot_mode` drops, the master starts at
address 0. Every other node powers up running a four-word start-up image:

```
0: sid  <its ID>     ; set the node ID (allowed once)
1: nop
2: nop
3: j    1            ; idle loop, waiting to be driven by the network
```

`clk` is the 27 MHz board clock. `ndma_clock_divider` counts it to
`CLK_DIV = 9` and makes the 3 MHz core clock. The nodes, the UART, the
bootloader and the command sides of both peripherals all run on the core clock,
so no signal crosses between clocks there. Only the VGA scan-out has its own
clock, `vga_clk`. `rst` is sampled on core clock edges, so hold it for at least
two core periods. Set `CLK_DIV = 1` to run everything on `clk`.

The master's peripherals hang on its in/out ports, at the port numbers the
original graphics and keyboard routines use:

| master port | direction | block             | use                                           |
|-------------|-----------|-------------------|-----------------------------------------------|
| 5           | out       | `ndma_gpu`        | [15:0] command, [16] valid                    |
| 1           | in        | `ndma_gpu`        | [0] complete                                  |
| 6           | out       | `ndma_ps2_buffer` | [0] request                                   |
| 2           | in        | `ndma_ps2_buffer` | [7:0] ASCII character, [8] complete, [9] empty |

Both use the same four-phase handshake, driven by software. The core sets the
command or request, polls until complete is set, and clears it again. All other
in/out ports of every node are top-level ports. Status outputs show each node's
ID, PC, halt and stall state, received messages, collisions and which buses are
cut through.

Hierarchy:

```
ndma_top
 ├─ ndma_clock_divider                     (board clock -> core clock)
 ├─ ndma_uart_rx, ndma_bootloader           (master only)
 ├─ ndma_gpu, ndma_ps2_buffer               (on the master's ports)
 └─ ndma_node  x ROWS*COLS
     ├─ ndma_imem      1024 x 32, async read, one write port
     ├─ ndma_dmem      1024 x 32
     ├─ ndma_cpu
     │   ├─ ndma_regfile, ndma_alu, ndma_io
     │   ├─ ndma_net_ctrl       sends messages, owns the node ID
     │   ├─ ndma_net_rx         4 received bytes -> 1 instruction
     │   └─ ndma_net_mem_ctrl   stores it, or SNIP / JALNET / NDJR
     └─ ndma_net_layer
         └─ ndma_reg_thru x 4   one per outgoing bus
```

Shared types and the instruction encoding are in `ndma_pkg`.

## 2. Messages and the wave

A message fills one 32-bit bus (`ndma_pkg::msg_t`), most significant field
first:

| bits  | field            | meaning                                   |
|-------|------------------|-------------------------------------------|
| 31:24 | destination ID   | 0x00 = bus idle, 0xFF = broadcast         |
| 23:16 | data             | the one byte a message carries            |
| 15:8  | origination ID   | sender                                    |
| 7:4   | age              | hops travelled                            |
| 3:2   | origination dir. | side the sender put this copy out on      |
| 1:0   | last direction   | direction of the last hop                 |

Directions are N=0, E=1, S=2, W=3. IDs are 8 bits wide: 0x00 and 0xFF are
reserved, so up to 254 nodes can be addressed.

There are no routing tables. `ndma_net_layer` applies one fixed rule at every
node:

* The sender drives its message on **all four** outgoing buses.
* A message moving **east or west** continues straight and also **branches
  north and south**.
* A message moving **north or south** only continues straight.
* At the edge of the mesh a message simply disappears.

The east/west "spine" through the sender's row sends a column of copies up and
down every column. So the message sweeps the mesh like a wave crest and reaches
each node exactly once, by a shortest path. A node that is the destination
**absorbs** the message: it delivers it to its core and forwards nothing. That
leaves a hole behind the receiver, so no further copies spread from there. A
broadcast is delivered **and** forwarded. The age field goes up by one per hop,
and a message that reaches age 15 is dropped. The age limit only matters in
meshes larger than 16 hops across.

A registered hop costs one clock per node. On the default 2 x 3 mesh, node 1
reaches node 4 in three hops: east 1 → 2 → 5, then the southward branch 5 → 4.
Node 3 gets its own copy from node 2's southward branch and, since that copy
travels south, it goes no further. Node 6 gets the copy the master sent south.

**Collisions.** The architecture has no message queue. When two messages want
the same outgoing bus in the same cycle, one wins, in this order:

1. a message going straight on;
2. a branch from the west input;
3. a branch from the east input;
4. the node's own new message.

The node's own send is not dropped: it waits, and the core stalls (see §4). A
forwarded message that loses is dropped, and the node's `collision` output
pulses. Software in this style sends one message at a time and waits for the
reply, and under that discipline collisions do not occur. The end-to-end
testbench counts collisions and sees none.

**Timing of a send.** `tx_ready` is high when all four output registers are
empty and no forwarded traffic needs them. The message is then loaded on that
rising edge and appears on the buses in the next cycle. A node never sends two
of its own messages in consecutive cycles. Forwarded messages can follow each
other back to back.

## 3. Register-thru: the mesh adapts

Each outgoing bus (`ndma_reg_thru`) has an output register **and** a wire from
the incoming bus on the opposite side, with a 2:1 multiplexer between them. A
small counter per bus chooses which one drives the bus:

* A message that passes straight through the node along this bus counts **up**,
  saturating at `THRESH` (8).
* A message on this bus that is addressed to this node counts **down**. The node
  "wakes up".
* A broadcast arriving at the node clears the counters of **all four** of its
  buses.

While the counter is below `THRESH`, the bus is a normal registered hop with one
cycle of latency. At `THRESH` the bus switches to the wire. A message then
crosses the node in the same cycle it arrives, so a path that is used a lot turns
from packet switching into something close to a circuit. The node still sees
every message on a cut bus. It can therefore still receive, and it still counts
down, so the cut opens again if the node starts being addressed. While the wire
is idle, the register still drives the bus, so a node can send and branch
messages onto a cut bus.

Two details are this implementation's own. Both came out of running the
six-node program.

* **Switch only when idle.** The multiplexer changes to the wire one cycle after
  the counter reaches `THRESH`, and only in a cycle where the output register is
  empty and the incoming bus is idle. If it switched in the middle of a stream,
  one message would overtake the one before it by a cycle. Two messages would
  then arrive at the next node in the same cycle, and one would be lost.
* **Broadcast clears the whole node.** The wave never sends a broadcast west
  from the sender's column, and never back toward the sender. If each bus were
  cleared only by a broadcast travelling along it, the buses that carry replies
  *toward* a master could never be reset.

`ndma_mesh9_tb` shows the effect on a 3 x 3 mesh. The corner node 1 streams
messages to the opposite corner, node 9: east along row 0, then south down
column 2. Each message takes 4 cycles until the two buses it crosses straight
have each counted 8 passing messages. After that it takes 2 cycles. After a
broadcast it takes 4 cycles again.

The same test also sets up a collision. Node 3 sends one message in the same
cycle as node 1's first send. At node 2, both messages turn south in the same
cycle. The message from the west wins, so node 3's message is lost. The test
checks that exactly one collision is flagged, at node 2.

When the register holds the node's own message and a message arrives on the cut
wire in the same cycle, the wire wins and `collision` pulses. Set `ADAPT = 0`
to disable the cut-through entirely. In the original hardware tests the
adaptive part was switched off.

## 4. Network-driven execution

This is the part that makes NDMA unusual.

**Sending.** Five instructions reach the network, all decoded by `ndma_net_ctrl`:

| instruction            | effect                                                  |
|------------------------|---------------------------------------------------------|
| `sid imm8`             | set this node's ID (once after reset; not 0x00 or 0xFF) |
| `bcst imm8`            | broadcast the byte imm8                                 |
| `smsg $rs, imm8`       | send imm8 to the node whose ID is in `$rs`              |
| `smsgr $rs, $rt, k`    | send byte k of `$rt` (k = 3 is the most significant)    |
| `bcstr $rs, k`         | broadcast byte k of `$rs`                               |

Until the network layer takes the message (`tx_ready`), the core **stalls**: the
PC and all state are held.

**Receiving.** A message addressed to the node, or a broadcast, carries one byte.
`ndma_net_rx` shifts four of them together, most significant byte first, into one
32-bit instruction. So it takes four sends to transfer one instruction. A typical
routine loads the instruction into a register with `lui`/`ori` and sends its four
bytes with `smsgr ..., 3` down to `..., 0`.

**Storing or acting.** `ndma_net_mem_ctrl` looks at each assembled instruction:

* `snip p` (set network instruction pointer): the pointer and the write position
  both become p. Nothing is stored.
* `jalnet`: the core jumps to the pointer, and `$ra` receives the PC of the
  instruction that was about to run. Nothing is stored.
* `ndjr $r`: the core jumps to the address held in its own register `$r`.
  Nothing is stored.
* Anything else is written into instruction memory at the write position, which
  then advances by one. The pointer stays where it was, so a later `jalnet`
  enters the code at its start.

**Precedence.** A network-driven jump wins over whatever the core was doing in
that cycle. The core's own instruction in that cycle is not executed, and
because `$ra` holds its address, `jr $ra` or `ndjr $ra` resumes exactly where
the core was interrupted. A network jump also restarts a core stopped at
`break`. A core stopped at `break` can still receive and store code, since the
network side does not depend on it running.

**The master convention** (exercised end to end by `ndma_top_tb`), with master = 1 and
worker = 4:

1. The master sends `snip 42`, then the worker's program one instruction at a
   time, then `jalnet`.
2. Stored at 42, the program counts to 170 and ends with code that sends three
   instructions back to the master: `snip 511`, `j complete` and `jalnet`. It
   then stops at `break`.
3. Meanwhile the master waits in a loop. The reply stores `j complete` at 511,
   and the `jalnet` pulls the master out of its loop to `complete`.
4. The master sends `ndjr $ra` to the worker, which returns to its ID loop.
   The master then broadcasts, which clears every adapted bus. It plots a pixel
   and reads a key, marks completion on an output port, and stops at `break`.

## 5. The core

`ndma_cpu` is a single-cycle, non-pipelined 32-bit core. It fetches, decodes,
executes, accesses memory and writes back in one clock.

* **Word addressing.** The PC and data addresses count 32-bit words. A branch
  goes to PC+1+offset, and `j`/`jal` take an absolute word address.
* **No delay slots.** There are no branch or load delay slots. A load's value
  can be used by the next instruction.
* **Supported instructions.** The supported MIPS subset keeps the MIPS opcode
  and function-code values:
  - add, addu, sub, subu, and, or, xor, slt, sltu
  - sll, srl, sra, jr
  - addi, addiu, slti, sltiu, andi, ori, xori, lui
  - beq, bne, blez, bgtz, bltz, bgez, j, jal
  - lw, lb, lbu, lh, lhu, sw, sb, sh
  - break
* **Not supported.** Multiply and divide are absent. Overflow does not trap.
* **Sub-word access.** Memory is word-wide, and byte and halfword accesses use
  the low bits of the addressed word. `sb`/`sh` store the value zero-extended.
* **Network and I/O opcodes.** The network and in/out instructions use opcodes
  0x30-0x3A, which MIPS leaves free. The values are in `ndma_pkg::opcode_e`.
  - `in $rt, $rs` reads input port number rs.
  - `out $rs, $rt` and `outi $rs, imm16` write output port register rs.
  - Port numbers are register fields used as numbers, as in `out $5, $t1`.
* **Break.** `break` halts the core. The `resume` input or a network jump starts
  it again.

`ndma_regfile` has 32 x 32 bits and `$0` reads zero. `ndma_io` has 8 output
registers, which reset to 0, and 8 input ports that are read directly.

## 6. Where this RTL departs from the original design

* **One clock.** The original network layer was self-timed. There, a send flag
  was set on the falling clock edge and pipelined to avoid double sends. Here
  everything is synchronous: a `tx_valid`/`tx_ready` handshake with a core
  stall. Like the original, the CPU runs at 27 MHz / 9. Unlike the original,
  the UART, bootloader and peripheral command sides share that core clock.
  The UART divisor is computed from `CLK_HZ / CLK_DIV`.
* **8-bit IDs.** The reserved broadcast ID 0xFF needs eight bits, and the
  message layout gives each ID an 8-bit field.
* **Own choices where the original is silent:**
  - memory depths (1024 words each);
  - port count (8);
  - `THRESH` (8);
  - the collision priority;
  - the age limit;
  - the opcode values of the new instructions;
  - the bootloader protocol (bytes most significant first, loaded from word 0);
  - the one-time `sid`;
  - the register-thru idle rule and node-wide broadcast clearing (§3).
* **No message queue.** As in the original hardware, there is no queue, and
  colliding messages are dropped and flagged.

## 7. Peripherals

**Graphics unit (`ndma_gpu`).**
* **Commands.** A command is a 6-bit operation over a 10-bit value:
  - `0x0000+x` sets X;
  - `0x0400+y` sets Y;
  - `0x1C00+color` plots the pixel (X, Y).
* **Frame buffer.** It holds 640 x 480 bytes. It is written on the system clock
  and scanned out on its own `vga_clk` with standard 640x480 timing: 800 x 525
  clocks and negative syncs. The 8-bit color goes out as 3-3-2 RGB.
* **Character commands.** The original API also has character commands
  (`0x1000+char`, `0x1400+color`). No font or character generator is
  specified, so these commands complete without drawing.

**Keyboard buffer (`ndma_ps2_buffer`).**
* **Receiving.** It receives PS/2 frames and checks the start, parity and stop
  bits.
* **Translation.** Make codes of letters, digits, space and enter become
  lower-case ASCII. Key releases, the `E0` prefix and other keys are ignored.
* **Buffer.** One character is held. A key pressed while it is full is lost.

Not built:

* the audio codec and LCD;
* character drawing in the graphics unit;
* the NACK and RMSG network instructions, which the original design planned but
  never completed.

The end-to-end testbench runs an equivalent of the original master-dispatch
program, assembled within the testbench. The single-core PONG
game uses the same ports, but its text output needs character drawing.

## 8. Simulating

Each block has a testbench `tb/<module>_tb.sv` that prints
`TB_RESULT checks=N failures=M` and has a watchdog. The common macros are in
`tb/ndma_tb.svh`. With verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
  --top-module ndma_top_tb rtl/ndma_pkg.sv tb/ndma_top_tb.sv -o sim
obj_dir/sim
```

Replace `top` with `cpu`, `net_layer`, `reg_thru` and so on to test a single
block.

`ndma_top_tb` runs the full default system with no parameter overrides. It
runs in a few seconds. Most of the simulated time is spent sending the
master's 90-word program over the serial line. It checks the following:

* that the core clock period is 9 board clocks;
* every node's ID;
* the bootloaded image;
* that the worker counted to 170;
* the worker's loop takes exactly 344 cycles from its `jalnet` to its first
  reply. That is 3 set-up instructions, 170 passes of a 2-instruction loop, and
  the single-cycle timing;
* the code written back at word 511;
* the master's final output;
* that the worker was released;
* that every adapted bus was cleared;
* the key the master read;
* the plotted pixel, in the frame buffer and on the VGA output.

It also counts how often each network mechanism occurred and fails if one never
did. A typical run prints:

```
INFO stalls=86 net_jumps=3 forwarded=84 cut_throughs=8 cleared=8 collisions=0 ...
INFO gpu_commands=3 key_reads=1
```

`ndma_mesh9_tb` builds the top at 3 x 3 and measures the latency of every
message of a corner-to-corner stream. It checks 4 cycles before adaptation,
2 cycles after, and 4 cycles again after a broadcast (see §3). It also
checks one staged collision.

`ndma_cpu_tb` runs a self-checking program through every instruction class, and
checks the cycle count to its first `break`. `ndma_net_layer_tb` checks the
wave rule on each side, absorption, broadcasts, aging, collisions and
cut-through.

The default top synthesizes (yosys, coarse) to about 2,500 word-level cells,
2,900 flip-flops and 2.86 Mbit of memory. Of that memory, 393 Kbit is in the six
nodes, each with (1024 + 1024) x 32 bits, and 2.46 Mbit is the 640 x 480 x 8
frame buffer.

**Lint note.** Verilator reports `UNOPTFLAT` on the mesh bus array in
`ndma_top`. A cut-through bus connects a node's input to its opposite output
combinationally. The chain always runs in one direction and ends at the mesh
edge, so there is no real loop.
