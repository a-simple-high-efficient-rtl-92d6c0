# Register-mapped inter-core communication for a 32-core SIMD system

Most multi-core chips treat the network as a peripheral: a core stores a result
to a memory-mapped port address, and the receiving core loads it back before it
can compute with it. Here the network FIFOs are reached through the register
file instead. After one configure instruction, writing register `$25` sends a
word into the network, and reading `$24` takes the next word that has arrived.
A result leaves the ALU and goes straight into a packet. An incoming word is an
ALU operand, with no load, no store and no port-address arithmetic:

```
source core                        destination core
  cfgrf 0x10                         cfgrf 0x10
  addu  $25, $8, $0   # header       addu  $9, $24, $7   # received word + a2
  addu  $25, $4, $5   # a0 + a1
```

The register file is also doubled by a shadow file. This gives software more
registers without widening the 5-bit register fields. Each core is a MIPS-like
five-stage processor whose ALU, shifter and multiplier work on packed 8- and
16-bit data. There are 32 such cores and four shared memories, in four clusters
on a 2-D mesh with wormhole routers.

This RTL is an implementation of the architecture described in *A Simple
High-Efficient Inter-Core Communication Mechanism for Multi-Core Systems*. That
description gives the register-file scheme, the SIMD units and the system
organisation. It does not give instruction encodings, the network protocol or
the memory sizes: those were chosen here and are listed in the last section.

## System organisation (`mc_top`)

```
 x:   0    1    2    3    4    5
y=0  C0   C1   C2 | C3   C4   C5      C = core tile, M = shared memory
y=1  C6   M0   C7 | C8   M1   C9      each 3x3 block is one cluster:
y=2  C10  C11  C12| C13  C14  C15     8 cores around 1 shared memory
     -------------+--------------
y=3  C16  C17  C18| C19  C20  C21
y=4  C22  M2   C23| C24  M3   C25
y=5  C26  C27  C28| C29  C30  C31
```

* Every node has a five-port `mesh_router` (local, north, east, south, west).
  `y` grows southwards.
* Cores are numbered 0..31 in row-major order, skipping the memory nodes.
  Memories are numbered 0..3 by cluster.
* System I/O uses two dual-clock `async_fifo`s in the `io_clk` domain. Flits
  written to `io_in_*` enter the west port of node (0,0). Packets addressed to
  (x=6, y=5) leave the east port of node (5,5) through `io_out_*`. Any other
  flit routed off the mesh edge is discarded.
* A host port (`load_*`) fills instruction memories, data memories and shared
  memories while `run` is low. `peek_*` reads data and shared memory back.
  `halted`, `stall_rx`, `stall_tx`, `stall_dep` (per core) and `smem_busy`
  (per memory) are status outputs.

## The configurable register file (`ext_regfile`)

There are 64 physical registers in eight groups of eight. Groups #1..#4 are the
standard file. Groups #5..#8 are the shadow file. They pair up as (#1,#5) for
`$0-$7`, (#2,#6) for `$8-$15`, (#3,#7) for `$16-$23` and (#4,#8) for `$24-$31`.
The configure instruction loads a 5-bit configuration word:

| bit | effect while set |
|-----|------------------|
| 0..3 | logical registers `$8g..$8g+7` use shadow group #(g+5) instead of #(g+1) |
| 4 | a read of `$24` returns the head of the receive FIFO; a write of `$25` goes to the send FIFO |

Details worth knowing before writing software:

* The mapping is applied in the decode stage. Each instruction carries its
  *physical* destination down the pipeline, so changing the configuration
  never redirects a write that is already in flight.
* A receive word is popped only when the instruction that reads it leaves
  decode. An instruction that names `$24` in both sources sees the same word
  and pops it once.
* While bit 4 is set, writes to `$24` and reads of `$25` still reach the
  registers (of whichever group is selected). `$0` reads zero in both groups.
* A value written back in W is bypassed to a read in E in the same cycle.

## Sending and receiving packets (`core_tile`)

A tile is a core, a send FIFO, a receive FIFO (`sync_fifo`, 8 entries each) and
the flit tagging between them and the router. Flits are 34 bits:
`{kind[1:0], data[31:0]}`, where `kind` is HEAD, BODY or TAIL.

**Send.** The first word written to `$25` after a completed packet is the
header:

```
[7:0] payload length in words (0 means 256)   [18:16] dest x   [21:19] dest y
```

The tagger counts the payload words that follow and marks the last as TAIL, so
software writes the header once and then just writes results. A packet can be
opened before its payload is computed. Its wormhole path is then held open
until the tail passes.

**Receive.** Header flits are dropped at the receive FIFO's output. `$24` sees
only payload words, in order. Packets from different senders arrive whole,
never interleaved, but their order is not fixed.

**Flow control is in the pipeline.** An instruction waits in E when:

* it reads a mapped `$24` and the receive FIFO is empty (`stall_rx`), or
* it writes a mapped `$25` and the send FIFO has no free slot beyond the pushes
  already in M, A and W (`stall_tx`).

So a core can neither lose nor overrun network data, and no polling code is
needed.

## Core pipeline (`simd_core`)

| stage | work |
|-------|------|
| I | fetch from the local instruction memory (1024 words) |
| E | decode, register read through `ext_regfile`, SIMD ALU or shifter, branch resolution (one delay slot), multiplier Booth encoding |
| M | local data memory (1024 words), multiplier row compression |
| A | load alignment (byte and halfword extraction, sign or zero extension), multiplier accumulation |
| W | register write-back; multiplier result into HI/LO |

There is no forwarding; interlocks stall E instead. An instruction waits while:

* a source register is still being produced in M or A,
* it reads HI/LO while a product is outstanding, or
* it starts a product while the multiplier issues the second pass of a 32x32
  product.

A dependent ALU instruction therefore waits two cycles. The core starts at
address 0 when `run` is high. `break` stops fetching, and `halted` rises once
the pipeline has drained.

Instructions: `addu subu and or xor nor slt sltu sll srl sra sllv srlv srav jr
mult multu mfhi mflo break addiu slti sltiu andi ori xori lui lb lbu lh lhu lw sb sh sw
beq bne j jal`
in their MIPS32 encodings (memory accesses must be naturally aligned), plus two
added groups:

| instruction | encoding |
|-------------|----------|
| configure register file | opcode `0x1F`, configuration word in bits 4:0 |
| packed ops | opcode `0x1C`, `rs`, `rt`, `rd`; funct `0x00` padd, `0x01` psub, `0x02` padds, `0x03` psubs, `0x04` psll, `0x05` psrl, `0x06` psra, `0x08` pmul |

In the packed ops, `sa[1:0]` is the lane width (0 = 32, 1 = 16, 2 = 8, 3 = 4
bits). For `pmul` it is the multiplier mode instead (0 = 8x8, 1 = 16x16,
2 = 32x16, 3 = 32x32). `sa[2]` selects *scalar* mode, where lane 0 of `rt` is
used by every lane, for example four bytes times one byte. `sa[3]` selects
signed operation. Packed shifts take the source from `rt` and the amount from
the `rs` field. For example, `psll.o $d, $s, 3` (four bytes, each shifted left
by 3) is `{0x1C, rs=3, rt=$s, rd=$d, sa=2, 0x04}`. `tb/tb_asm_pkg.sv` has
encoder functions for all of these.

## SIMD units

**`simd_alu`** splits its adder into eight 4-bit groups:

* Each group has a propagate/generate unit and forms its sum for carry-in 0
  and for carry-in 1.
* A carry generator turns the eight (P,G) pairs into the carry entering each
  group. That carry only selects one of the two ready sums (carry-select).
* At lane boundaries (every 1, 2, 4 or 8 groups) the chain is cut, and the
  lane's own carry-in enters (1 when subtracting).

Saturating forms clamp each lane: signed lanes to the most positive or most
negative value, unsigned lanes to all-ones or zero. The scalar MIPS operations
(logic, `slt`, `lui`) are in the same unit.

**`simd_shifter`** does SLL, SRL and SRA on 8-, 16- or 32-bit lanes. Bits never
cross a lane, and the amount is taken modulo the lane width.

**`simd_mdu`** is a radix-4 Booth multiplier with nine partial-product rows:

* The modes are four 8x8, two 16x16 or one 32x16 product. In the SIMD modes
  each row holds all lanes side by side, and the row sums are cut at the lane
  fields.
* A 32x32 product is two 32x16 passes: the low half of the multiplier
  (unsigned), then the high half. They are combined as `p0 + (p1 << 16)`.
* Timing: a start in cycle t gives `res_valid` in t+3, or t+4 for 32x32.
  `busy` blocks a new start during the second pass.
* Products are packed into HI:LO as follows:
  * 8x8: lane i in bits `[16i+15:16i]`.
  * 16x16: lane i in bits `[32i+31:32i]`.
  * 32x16 and 32x32: one 64-bit value.

## Network and shared memory

**`mesh_router`**: each input port has a 4-flit buffer. A header is routed
x-first, then y. When a header wins an output, that output stays locked to the
header's input until the tail has passed (wormhole switching). Competing
headers are served round-robin. Every output moves at most one flit per
cycle, and an idle router passes a flit on the cycle after it was written.

**`shared_mem_node`** (4096 words) serves request packets. The payload is a
command word, a word address and, for writes, the data:

```
command [31] 1 = write, 0 = read   [18:16] reply x   [21:19] reply y   [7:0] count
```

A write stores `count` words and sends no reply. A read returns one packet of
`count` words to the reply node. Requests are served one at a time, one word
per cycle. For example, a core reads four words from memory 0 (node (1,1)) with
a 2-word request packet. Its reply arrives at the core's `$24`.

## Simulating

Each testbench checks its results and prints `TB_RESULT checks=N failures=M`.
To build and run one, for example the full system:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/mc_pkg.sv tb/tb_asm_pkg.sv tb/tb_mc_top.sv --top-module tb_mc_top
./obj_dir/Vtb_mc_top
```

Building the full system takes a few minutes. The run itself takes well under
a second.

| testbench | what it shows |
|-----------|---------------|
| `tb_ext_regfile` | all 16 group configurations, random traffic against a 64-register model, FIFO mapping, bypass |
| `tb_sync_fifo`, `tb_async_fifo` | ordering, full and empty flags, one-cycle fall-through, two unrelated clocks |
| `tb_simd_alu`, `tb_simd_shifter` | every lane width and operation against lane-by-lane integer models |
| `tb_simd_mdu` | all modes, signed and unsigned, back-to-back issue, exact 3/4-cycle latency |
| `tb_mesh_router` | five inputs under random back pressure: route, completeness, no interleaving, contention |
| `tb_simd_core` | a program using interlocks, branches, packed ops, 32x32 multiply, shadow registers, FIFO waits |
| `tb_core_tile` | flit tagging and header removal, with the two-core addition exchange |
| `tb_shared_mem_node` | write and read packets against a model memory |
| `tb_mc_top` | the full-size system running eight programs at once (below) |

`tb_mc_top` runs at the default size. It starts a four-core chain:

1. one core reads shared memory and does a packed byte add,
2. the next does a saturating byte add,
3. the next shifts the 16-bit lanes,
4. the last collects the words in shadow registers and sends them to the
   system output and into another shared memory.

At the same time, one core sums a packet that entered through the system
input, and two cores stream 40-word packets into a third core. The second of
those packets waits behind the first, and its sender waits for FIFO space. The
test checks that receive waits, send waits, shared-memory service and both
clock crossings each happened.

## What is modelled, and what is not

These follow the original architecture:

* the 64-entry register file with four switchable group pairs and the 5-bit
  configuration word;
* `$24`/`$25` as FIFO ports;
* synchronous FIFOs between core and router, asynchronous ones at the system
  boundary;
* the I/E/M/A/W pipeline;
* 4/8/16/32-bit saturating packed addition built from 4-bit P/G units, a carry
  generator and carry-select adders;
* SLL/SRL/SRA on 8/16-bit lanes;
* the four Booth multiplier modes, with 32x32 taking one extra cycle, in three
  pipelined steps;
* scalar and vector SIMD modes;
* 32 cores and 4 shared memories in 4 clusters on a wormhole 2-D mesh.

These are this design's own choices:

* which of `$24`/`$25` receives and which sends;
* all instruction encodings of the added instructions;
* the flit, header and memory-request formats and the 255-word packet limit;
* XY routing, buffer depths and round-robin arbitration;
* the 6x6 placement and the edge I/O ports;
* interlocks instead of forwarding;
* memory sizes (4 KB instruction and 4 KB data per core, 16 KB per shared
  memory);
* the host load port.

The original carry generator description mentions 16 P/G pairs. A 32-bit
adder of 4-bit groups has eight, and eight are used here.

Not modelled:

* the MIPS32 4KE's caches, coprocessor 0, exceptions, unaligned accesses and
  the remaining MIPS32 instructions;
* the Galois-field instructions and the RS(255,239) decoder software used to
  evaluate the original system;
* the 65 nm timing targets (830 MHz system, about 850 MHz multiplier), which
  are properties of a physical implementation.
