# Data flow prototype building blocks: 2x2 packet router and microprogrammed PE

A data flow machine is a collection of units that exchange packets: instruction
cells send *operation packets* (opcode, operands, destinations) to functional
units, and those send *result packets* (value, destination) back to waiting
instructions. To build experimental machines of this kind without committing
to any instruction set, two building blocks are enough:

* a **2x2 packet router**, from which routing networks of any size are made;
* a **processing element (PE)**, a small microprogrammed byte-wide computer
  with packet ports, which can be programmed to behave like any unit that
  sends and receives packets.

This repository holds synthesizable SystemVerilog for both blocks, for the two
network classes built from routers (rectangular and triangular), and for the
first prototype machine: four PEs connected through a 4x4 rectangular network
of four routers, each PE's output fed back through the network to the PE
inputs. Every module has a self-checking testbench.

The original router and PE were designed around self-timed logic and
off-the-shelf bit-slice chips. This RTL is synchronous, single-clock, and
keeps the interfaces, structure and behaviour; where the source design left
something unspecified (microinstruction format, buffer sizes, arbitration
policy, supervisor bus) this implementation makes its own choice, as listed
in [Departures and own choices](#departures-and-own-choices).

## Module connections

Every connection between units, inside a network or at a PE, is the same
bundle (`dfp_pkg::link_fwd_t` plus one wire back):

| wire | direction | meaning |
|------|-----------|---------|
| `data[7:0]` (D7..D0) | forward | one packet byte |
| `last` | forward | *lastbyte*: set only on the final byte of a packet |
| `ready` | forward | a byte is offered |
| `ack` | backward | acknowledge |

Packets are variable length and travel one byte at a time; the lastbyte bit
is the only packet delimiter. The handshake is four-phase: the sender raises
`ready` with stable data, the receiver raises `ack` when it has taken the
byte, the sender drops `ready`, the receiver drops `ack`, and only then may
the next byte be offered. Assertions in `link_rx` check the two rules a
sender must follow (hold the byte until acknowledged; do not offer a new byte
while `ack` is still high). With a receiver that answers at once a byte takes
four clock cycles on a connection (checked by `tb_link`).

`link_tx` and `link_rx` are the two ends as used inside the routers: they
turn the connection into an internal valid/ready stream.

## The 2x2 router

`router2x2` is two input modules (`router_im`) and two output modules
(`router_om`), each input module connected to both output modules.

**Input module.** Received bytes go into an 8-byte FIFO (`BUF_BYTES`). When a
packet's first byte reaches the FIFO head, its bit D0 selects the output
(0 or 1); the module raises a request to that output module and, once
granted, streams the packet to it, lastbyte included. Packet buffering makes
an input module able to accept bytes while its packet waits for an output.

**Output module.** An arbiter and a multiplexer in front of one outgoing
connection. With a single request it grants at once (registered, one cycle
later); with two simultaneous requests it grants the input that was not
served last. The grant lasts until the packet's last byte has been taken, so
packets are never interleaved on a connection.

So two packets headed for different outputs pass through the router at the
same time, and two packets headed for the same output are sent one after the
other, the second waiting in its input module.

**First-byte suppression.** The `strip_first` input, meant to be tied high
permanently on selected routers, makes every input module drop the first
byte of each packet after using it for its own switching decision. Large
networks whose tags need more than eight bits use this so that later routers
switch on the next header byte. `rect_net` sets it on the routers of stages
7, 15, ... when it has more than eight stages (more than 256 ports); no
network that large has been simulated, so the mechanism is tested on the
router alone.

**Timing.** Through an idle router a byte needs about six cycles from
`ready` at the input to `ready` at the output (receive handshake, FIFO,
request/grant, send). Throughput per connection is one byte per four-phase
handshake.

## Routing networks

Each router switches on D0 of the first byte. Successive routers on a path
must look at successive bits of the destination tag, which is achieved purely
by wiring: on every router-to-router connection the data wires are permuted
cyclically, so that the wire that was D1 becomes D0 (`dfp_pkg::rot_next`).
All bytes of a packet, not only the header, are permuted by this wiring.

### Rectangular network (`rect_net`)

An N x N rectangular network is built recursively: a column of N/2 routers
whose upper outputs feed one N/2 x N/2 network and whose lower outputs feed
another. Unrolled, it has log2 N stages of N/2 routers, (N/2) log2 N routers
in all (four for the prototype's N = 4, twelve for N = 8). Source j enters
first-stage router j/2 on input j%2.

Every path has log2 N routers, and the tag depends only on the receiver:
stage k switches on tag bit k, which is bit (log2 N - 1 - k) of the receiver
number, since the first stage chooses between the upper and lower half of
the receivers. `dfp_pkg::rect_tag(dst, log2N)` builds it. The network's
outputs undo the accumulated permutation (log2 N - 1 steps), so a packet
leaves exactly as it entered, header included.

With more than eight stages the tag spans several header bytes (tag bit k
in byte k/8, bit k%8; `rect_tag(dst, log2N, j)` gives byte j). Eight
permutations bring a byte's wires back into order, so the routers of stage 7
(and 15, ...) suppress the header byte they have just used and the next
stage switches on bit 0 of the next one. Such a packet leaves the network
without its leading header bytes; only the last one arrives. This case
(N > 256) is written but has not been simulated.

### Triangular network (`tri_net`, `tri_tree`)

A triangular network keeps neighbouring units close. It is a root router over
two (1, N/2) trees; a (1, M) tree is two routers over two (1, M/2) trees, and
a (1, 1) tree is a leaf (a unit's connection pair). In each tree:

* the **up router** takes the packets climbing out of the two subtrees and
  sends each either further up to the parent (output 0) or across to the down
  router (output 1);
* the **down router** takes packets from the parent (input 0) or from the up
  router (input 1) and sends each into the left (output 0) or right
  (output 1) subtree.

The root takes the packets climbing out of both halves and sends them down
into either half. The network uses 2N - 3 routers (13 for N = 8). Leaf i is
both source i and receiver i.

A packet climbs only to the smallest subtree containing both its source and
its receiver, turns there, and descends. Routers on a path: 2l when the
smallest common subtree has 2^l leaves, 2 log2 N - 1 when the path crosses
the root. Between leaves 0 and 1 that is 2 routers, between 0 and 7 (N = 8)
5 routers. The tag therefore depends on source and receiver
(`dfp_pkg::tri_tag(src, dst, log2N)`):

* each up router below the turning point: 0 (climb); at the turning point: 1 (turn);
* the root (if the path crosses it) and each down router: the receiver's
  address bit for that level, 0 = left, 1 = right, most significant first.

Because paths differ in length, the number of wire permutations a packet
crosses is not fixed: a packet through h routers arrives with every byte
rotated by h - 1 places (`dfp_pkg::tri_hops`). A sender that wants its bytes
to arrive unchanged pre-rotates every byte after the header with
`rot_back(b, h - 1)`; the header itself arrives as `rot_fwd(tag, h - 1)`.
N may be 2 to 16 (the longest tag, 2 log2 N - 1 bits, must fit in one byte).

## The processing element (`pe`)

A conventional byte-wide microprogrammed machine extended with two packet
input ports and two packet output ports.

```
 input port 0/1 --data, status--> B bus --+--> ALU S operand (DB)
 data memory ----------------------------> |
 port status byte / machine status ------> |
 microinstruction direct data -----------------> ALU R operand (DA)
 ALU + 16 registers --> Y bus --> DMAR low/high, data memory, output port 0/1
 ALU flags / B bus --> status unit --> branch condition --> microsequencer
 supervisor bus <--> microstore, data memory, registers, MPC, DMAR, status
```

### Microinstruction

One horizontal microinstruction (`dfp_pkg::uinst_t`, 50 bits, stored as
64-bit words in a 4K-word writable control store) executes per clock. Every
control point has its own field:

| field | bits | meaning |
|-------|------|---------|
| `seq` | 3 | CONT, JMP, JCT (branch if condition true), JCF (if false), CALL, RET, HALT |
| `cond` | 3 | Z, N, C, V of the machine status, or TRUE |
| `next` | 12 | branch target |
| `alu` | 3 | ADD R+S+cin, SUBR S-R-1+cin, AND, OR, XOR, pass R, pass S, shift S right (cin into bit 7) |
| `r_imm` | 1 | R operand: 1 = `imm` (direct data), 0 = register `a` |
| `s_bus` | 1 | S operand: 1 = B bus, 0 = register `b` |
| `a`, `b` | 4, 4 | register addresses; results are written to register `b` |
| `cin` | 1 | carry in |
| `wr_reg` | 1 | write the ALU result into register `b` |
| `ld_status` | 1 | load the machine status |
| `st_bus` | 1 | with `ld_status`: load it from B bus bits 3:0 instead of the ALU flags |
| `bsrc` | 3 | B bus source: none, input 0, input 1, memory, port status, machine status |
| `ydst` | 3 | Y bus destination: none, DMAR low, DMAR high, memory, output 0, output 1 |
| `y_last` | 1 | lastbyte bit loaded with an output byte |
| `imm` | 8 | direct data |

A branch tests the status as loaded by an earlier microinstruction, so a
test is two microinstructions: one that puts something through the ALU with
`ld_status`, one that branches. CALL/RET use a 4-entry return stack. HALT
stops the PE; only the supervisor restarts it.

### Packet ports

The ports are deliberately minimal and are driven by polling, not interrupts
or DMA. The B bus can carry the **port status byte**:

| bit | meaning |
|-----|---------|
| 0 | input 0 has a byte |
| 1 | lastbyte bit of that byte |
| 2 | input 1 has a byte |
| 3 | lastbyte bit of that byte |
| 4 | output 0 free |
| 5 | output 1 free |

*Input port* (`pe_in_port`): a bus driver and control logic. Selecting the
port as B bus source reads the byte on the connection's data wires and raises
`ack`; the port drops `ack` itself once the sender has withdrawn `ready`. The
lastbyte bit must be tested from the status byte before the byte is read.

*Output port* (`pe_out_port`): a data buffer, a lastbyte flip-flop and
control. One microinstruction with `ydst` = output loads both and raises
`ready`; the port clears `ready` when `ack` arrives and reports itself free
when `ack` has fallen again. A load while the port is busy is ignored.

The `ready` of each input and the `ack` of each output come from other
modules and are each passed through one flip-flop before use, so status lags
the connection by one cycle.

A typical receive step is therefore: test status (AND with a mask, load
status), branch, test lastbyte, branch, then one microinstruction that reads
the port straight through the ALU into memory (`bsrc` = input, `alu` = pass
S, `ydst` = memory).

### Data memory

32K bytes (`DMEM_AW` = 15), addressed by the 16-bit DMAR, which is loaded a
byte at a time from the Y bus (bit 15 is not used by this size). Reads are
combinational onto the B bus, so a microinstruction can read the byte that
DMAR (loaded by an earlier microinstruction) points to.

### Supervisor interface (`pe_sup_if`)

Many PEs share one supervisor bus; each answers only commands carrying its
own device number (`dev_id`, meant to be set by switches). A command is one
cycle with `sb_valid` high; the addressed PE answers the next cycle with
`sb_ack` and read data on `sb_rdata`, and every other PE drives zeros, so the
answers can be ORed.

| `sb_space` | `sb_addr` | access |
|------------|-----------|--------|
| 0 control | 0 | write 1 = run, 0 = halt, 2 = single step; read bit 0 = running |
| 0 control | 1, 2, 3 | MPC, DMAR, machine status (read/write) |
| 0 control | 4 | port status byte (read) |
| 1 data memory | byte address | read/write |
| 2 microstore | {word[11:0], 2'b00, chunk[1:0]} | 16-bit chunk of a microinstruction word |
| 3 registers | 0..15 | general register |

Everything except the run/halt/step control is reachable only while the PE
is halted; while it runs, such writes are ignored and reads return zero (the
command is still acknowledged). A single step executes exactly one
microinstruction.

## The prototype (`proto_top`)

`proto_top` holds NPE = 4 PEs and a 4x4 `rect_net`. Output port 0 of PE i
feeds network source i, network receiver i feeds input port 0 of PE i. Port 1
of every PE in both directions is brought out (`ext_*`) for test equipment
or a further network. All PEs share the supervisor bus; PE i has device
number DEV_BASE + i. An independent 8x8 `tri_net` sits alongside with its
leaf connections brought out (`tri_*`); it is not connected to the PEs.

The PEs come out of reset halted with empty microstores; the supervisor
loads a program and starts them.

## Simulating

Any simulator for IEEE 1800-2017 works; with Verilator 5, from the directory
holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/dfp_pkg.sv tb/tb_uasm_pkg.sv tb/tb_proto_top.sv --top-module tb_proto_top
./obj_dir/Vtb_proto_top
```

Replace `tb_proto_top` with any other testbench. Each prints
`TB_RESULT checks=N failures=M` and stops; a watchdog ends a hung run with a
failure.

| testbench | what it shows |
|-----------|---------------|
| `tb_link` | bytes cross a connection once, in order, under random back-pressure; four cycles per byte |
| `tb_router_im` | switching on D0, request/grant, first-byte suppression |
| `tb_router_om` | alternating arbitration, packets never interleaved |
| `tb_router2x2` | random traffic; concurrent outputs and output conflicts both occur; suppression |
| `tb_rect_net` | 8x8 network: delivery, per-pair order, equal latency on all paths |
| `tb_tri_net` | 8x8 network: source-dependent tags, pre-rotation, shorter neighbour paths |
| `tb_pe_in_port`, `tb_pe_out_port` | port handshakes with synchronisers |
| `tb_pe_alu`, `tb_pe_status`, `tb_pe_dmem`, `tb_pe_seq`, `tb_pe_sup_if` | PE units against reference models |
| `tb_pe` | a loaded microprogram forwards and stores packets; halt, read back, single step; status saved and restored over the B bus |
| `tb_proto_top` | the whole prototype at its default size, end to end |

`tb_uasm_pkg` is a small microassembler (one function per kind of
microinstruction) and holds the test program used by `tb_pe` and
`tb_proto_top`: packets arriving on input 1 are forwarded to output 0, and
packets arriving on input 0 are stored in data memory from 0x0100 with a
packet count in register 3. Input 0 is always served first and the program
never waits on a busy output; a version that served input 1 first and
spun on a busy output deadlocked the prototype, because blocked PEs stopped
draining the network. Any microprogram for this machine must keep draining
its inputs in the same way.

In `tb_proto_top` each PE receives 12 packets on port 1 and sends them into
the network (some to itself, an early burst all to PE 0); the test then
halts the PEs and checks every stored byte through the supervisor bus. It
also sends packets between neighbouring and distant leaves of the
triangular network. It runs in a few seconds.

## Departures and own choices

Follows the source design:
* connection wiring (8 data, lastbyte, ready, acknowledge) and packets
  delimited only by lastbyte;
* router made of two input modules and two output modules, each an arbiter
  plus multiplexer; switching on D0 of the first byte; first-byte suppression
  control; packet buffering in the router;
* rectangular network construction, router count, tag bits examined stage by
  stage and cyclic wire permutation; triangular network construction and
  router count 2N - 3;
* PE data paths: two input and two output ports with the listed contents,
  B and Y buses, an 8-bit ALU with general registers fed by direct data and
  the B bus, a 4-bit status unit, byte-wide data memory with a 16-bit DMAR
  loaded in two bytes, a 4K-word writable microstore with horizontal
  microinstructions, synchronising flip-flops on incoming handshake signals,
  a status-polled port design, byte-only operations, and a supervisor
  interface that loads memories, halts, single-steps, reaches all registers
  and answers only its own switch-set address;
* the prototype: four PEs on a 4x4 network of four routers, outputs fed back
  to inputs.

Own choices (the source design leaves these open):
* synchronous single-clock logic instead of self-timed circuits, Muller
  C-elements and asynchronous arbiters; a four-phase handshake;
* FIFO of 8 bytes per router input; alternating-priority arbitration;
* restoring the bit order at the rectangular network's outputs; pre-rotation
  of bytes for the triangular network; the triangular tag encoding and router
  port assignment;
* the whole microinstruction format, the ALU operation set and 16 registers
  (modelled on the usual 4-bit ALU slice, not taken from a specification),
  the condition set, the return stack, the HALT microinstruction, the port
  status byte layout, combinational memory read, data memory size taken as
  32K bytes;
* the supervisor bus protocol and address map, and access only while halted;
* port 1 of each PE left external in the prototype; synchronous active-low
  reset everywhere (memories and registers are not reset).

Simplified against the original PE data paths:
* the ALU never drives the B bus: register contents leave the ALU only
  through the Y bus, which reaches memory, DMAR and the output ports;
* incoming `ready`/`ack` pass one synchronising flip-flop and are used in
  the next clock cycle, rather than strobed at the start of a cycle and used
  at its end.

Not included: the Cell Block and functional-unit emulation microcode that
the prototype is meant to run, the functional units and arbitration network
of the larger machine organisation, and the supervisory computer itself.
The largest networks simulated are 8 x 8 (rectangular and triangular); the
prototype's 4 x 4 network runs at its default size.

## Files

`rtl/`: `dfp_pkg` (types, microinstruction, tag functions), `link_tx`,
`link_rx`, `byte_fifo`, `router_im`, `router_om`, `router2x2`, `rect_net`,
`tri_tree`, `tri_net`, `pe_in_port`, `pe_out_port`, `pe_alu`, `pe_status`,
`pe_dmem`, `pe_seq`, `pe_sup_if`, `pe`, `proto_top`.

`tb/`: one testbench per module as listed above, plus `tb_link_src` and
`tb_link_sink` (randomly stalling connection models) and `tb_uasm_pkg`.
