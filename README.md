# MBP-light: a DSM controller built around packet buffer registers

JUMP-1 is a massively parallel machine built from up to 256 clusters. Each
cluster has four processors with L2 caches on a shared bus. The clusters are
linked by the RDT (Recursive Diagonal Torus) network. Memory is distributed
but shared and kept cache-coherent (CC-NUMA). Each cluster has one controller
chip, MBP-light, that runs the coherence protocol. It takes requests from the
L2 caches, reads and updates the cluster memory, sends invalidations and
requests to other clusters, and collects their acknowledgments.

MBP-light does not use a fixed hardwired protocol engine. It runs the protocol
in software on a small 16-bit core, the MBP core. What makes this core fast is
its **buffer-register architecture**. Incoming and outgoing packets live in 112
*packet buffer registers* (PBRs) of 68 bits, and instructions take their
operands straight from the packet bytes. There is no load/store step between
a packet buffer and a register. Only the time-critical parts are hardwired,
namely generating and counting acknowledgment packets.

This repository is synthesizable SystemVerilog for that chip: the core, the
PBR file, the memory/bus controller (MMC) and the RDT interface. It comes with
self-checking testbenches, including an end-to-end protocol run.

```
        cluster memory             RDT router chip
              |                          |
        +-----+------+  +----------+  +--+--------+
        |    MMC     |--| MBP core |--|  RDT I/F  |
        +-----+------+  +----+-----+  +-----------+
              |    \         |           /
              |     +--- PBR file (112 x 68 bit) ---+
        cluster bus          |
        (L2 caches)   local memory & I/O
```

## Packet buffer registers: the central idea

A PBR holds one packet image: eight bytes plus a 4-bit field.

```
 bit 67       60 59      52         ...          11       4 3    0
    | byte 0    | byte 1    | ... | byte 7                  | tag  |
      offset 0    offset 1          offset 7                 offset 8
```

The core never names a PBR directly. A GPR holds a *pointer* (the PBR number
in its low 7 bits), and the instruction adds an offset from 0 to 7. Word
operations read two consecutive bytes, with the byte at the offset in the high
half. For example, with 0x31 at offset 1 and 0x41 at offset 2, the word at
offset 1 is 0x3141. The word at offset 7 pairs byte 7 with the 4-bit field,
zero-extended.

Three instruction forms use this:

* **GPR op PBR word** (class WPG): `ADDPG R1, R2(0)` adds the word at
  offsets 0–1 of the PBR that R2 points to into R1. With R1 = 0x4321 and
  bytes 0x12, 0x34, the result is 0x5555.
* **PBR byte op immediate** (BPI): changes one packet byte in place, for
  example to rewrite the packet type.
* **PBR to PBR** (MPP): `MVLPP R1, R2` copies the whole 68-bit register, tag
  included. `MVPP` copies one 16-bit word.

The MMC and the RDT interface write received packets straight into PBRs and
send packets straight out of them. The core then works on a request where it
arrived.

## The MBP core

* 21-bit instructions, 16 GPRs of 16 bits, 14 instruction classes.
* Four stages: **IF**, **RF**, then one of **LM / EX / GM** chosen by the
  class, then **WB**.
  * IF sends the fetch address to the (synchronous) instruction memory.
  * RF decodes and reads two GPRs.
  * The third stage is LM, EX or GM:
    * LM does local-memory (LMA) and internal-memory (IMA) accesses.
    * EX does ALU work, PBR reads and writes, and branches.
    * GM hands commands to the MMC or the RDT interface.
  * WB writes the GPR. Load data arrives here.
* Hazards:
  * A result in WB is forwarded into the third stage.
  * The GPR file passes a value being written straight through to RF.
  * So dependent instructions, loads included, run back to back.
  * PBR writes happen in the third stage, so the next instruction already
    sees them.
  * A taken branch, jump or RETI costs one bubble. The target is fetched in
    the same cycle the branch resolves.
  * A GM command stalls IF, RF and the third stage until its unit accepts it.

### Instruction encoding

| bits    | 20:17 | 16:14 | 13:10 | 9:6 | 5:3    | 2:0 |
|---------|-------|-------|-------|-----|--------|-----|
| default | class | func  | ra    | rb  | offset | –   |
| WGI, Branch, TJ | class | func | ra | imm10 (9:0) | | |
| BPI     | class | func  | ra (pointer) | offset (9:7), imm7 (6:0) | | |
| LMA, IMA | class | func | ra    | rb  | disp6 (5:0) | |

| class (code) | instructions (func) |
|---|---|
| NOP (0) | – |
| WGG (1) GPR-GPR | ADD SUB AND OR XOR SLL SRL MOV: `ra = ra op rb` |
| WGI (2) GPR-imm | same operations with zero-extended imm10; MOV is LI |
| WPG (3) PBR-GPR | `ra = ra op P[rb](off)` (ADDPG, SUBPG, …); func 7 LDPG; func 5 STPG `P[rb](off) = ra` |
| BPI (4) PBR-imm | MOV ADD AND OR XOR on byte `P[ra](off)` with imm7; func 5 sets the tag |
| MPP (5) PBR-PBR | MVLPP `P[ra] = P[rb]`; MVPP copies word `off` |
| Branch (6) | BR, BEQZ ra, BNEZ ra, BLTZ ra (absolute imm10); JAL ra; JR ra |
| TJ (7) table jump | `pc = imm10 + (ra & (2^(func+1) − 1))` |
| LMA (8) / IMA (9) | LD `ra = M[rb + disp6]`, ST `M[rb + disp6] = ra` |
| MMC (10) | REPLY, MWR, MRD, REL, with PBR pointer ra and argument rb |
| RDT (11) | SEND, MCAST, ACK, REL, with PBR pointer ra and argument rb |
| INT (12) | EI, DI, RETI |
| SPE (13) | MFIR `ra = {cause, 7'b0, PBR}`, MFID (cluster id), MFAC (acks awaited), HALT |

`tb/mbp_asm_pkg.sv` has one encoder function per form. Use it to write
programs for the core.

### Interrupts

There are three sources, each with a fixed vector:

| source | vector | priority |
|---|---|---|
| all awaited acks collected (RDT interface) | 0x030 | highest |
| packet arrived from the network (RDT interface) | 0x020 | middle |
| L2 request arrived (MMC) | 0x010 | lowest |

When interrupts are enabled, the core takes one at an instruction boundary:

* The instruction in the third stage completes. The one in RF is squashed
  and its address goes to EPC.
* Interrupts are disabled.
* The cause and the PBR holding the packet are latched, and `MFIR` reads them.
* `irq_take` tells the source, which moves on to its next packet.

`RETI` returns to EPC and re-enables interrupts. `HALT` parks the core until
an interrupt arrives, which is the idle loop of a protocol handler.

## MMC and RDT interface

Both units keep a **receive ring** of PBRs:

* RDT interface: PBRs 80–95. MMC: PBRs 96–111. PBRs 0–79 are free for
  software.
* Each arriving packet goes into the next free PBR of the ring and raises one
  interrupt naming that PBR.
* The core hands buffers back with `REL`, oldest first.
* A full ring holds off its input (ready low).

Packets are one PBR image. The header is byte 0 = type, byte 1 = source
cluster, byte 2 = destination cluster. Bytes 3–7 carry address and payload.
The types are defined in `mbp_pkg`.

**MMC commands:**

* `REPLY`: send a PBR to the L2 caches.
* `MWR`: write a PBR's eight bytes to cluster-memory line `rb`.
* `MRD`: read a line into a PBR. The tag is kept.
* `REL`: release the oldest receive buffer.

**RDT commands:**

* `SEND`: unicast a PBR to the cluster in its byte 2.
* `MCAST`: send one copy to every cluster whose bit is set in the 16-bit
  bitmap `rb`.
  * Each target cluster number is `{high nibble of byte 2, bit number}`.
  * Byte 2 of each copy is rewritten to that cluster's number.
  * The ack counter is loaded with the number of copies.
  * A new MCAST waits until the acks of the previous one are all in.
* `ACK`: answer the packet in a PBR. The hardware builds the ack packet
  itself: type ACK, source this cluster, destination the packet's source,
  rest copied.
* `REL`: release the oldest receive buffer.

Incoming ACK packets never reach a PBR. They decrement the counter, and the
last one raises the ack interrupt. The core therefore handles a whole
invalidation round with one multicast command and one interrupt.

## A protocol run

`tb/tb_mbp_light.sv` holds a complete handler program. It shows how the parts
work together:

1. An L2 write request arrives at the MMC, which interrupts the core.
2. The core reads the packet type straight from the PBR and dispatches with a
   table jump.
3. The core writes the update data to cluster memory (`MWR`).
4. It reads the sharer bitmap from internal memory.
5. It copies the request into an outgoing PBR and rewrites two bytes in place.
6. It issues one `MCAST`.
7. The acks return and are counted in hardware. Then the ack interrupt fires
   and the core sends the reply with `MMC REPLY`.

A read request that arrives while acks are still outstanding is served in
between (`MRD` then `REPLY`). An invalidation from another cluster is answered
with `RDT ACK`.

`tb/tb_mbp_protocol.sv` runs the published transactions with a second
handler program. That program keeps a small directory in internal memory: a
sharer bitmap per line, and an owner word per line for a line whose only
valid copy is in another cluster. The remote clusters are modelled, and they
answer after 30 cycles.

* **Read miss, home copy valid.** `MRD` the line into a PBR, then `REPLY`.
* **Read miss, home copy invalid.**
  * The core forwards the request to the owner with `SEND`, after rewriting
    the source and destination bytes.
  * When the owner's data packet arrives, the core writes it to cluster
    memory as update data.
  * It then turns the packet into the reply for the waiting L2 cache and
    marks the home copy valid again.
* **Invalidation.** The same steps as the write above.
* **L3 cache hit.** The line's home is another cluster, but a copy sits in
  the part of cluster memory used as an L3 cache. The program keeps one tag
  per set in internal memory. On a match it serves the line like a home read.
* **Update policy.** A line can be marked for update instead of
  invalidation. The write itself is then multicast to the sharers, and they
  stay sharers. The hardware is the same; only the program differs.

Time spent inside the chip, from request in to reply out, with the modelled
network delay left out:

| transaction | cycles | instructions | at 50 MHz | published whole transaction |
|---|---|---|---|---|
| read miss, home valid | 23 | 17 | 0.46 µs | 5.9 µs |
| read miss, home invalid | 46 | 38 | 0.92 µs | 14.0 µs |
| invalidation, 3 sharers | 44 | 33 | 0.88 µs | 11.0 µs |
| L3 cache hit | 29 | 22 | 0.58 µs | 0.76 µs |
| update of 2 sharers | 42 | 31 | 0.84 µs | – |

The published figures also include the cluster bus, the network, the remote
clusters and a real protocol. Their breakdown is not given, so the test checks
only that the chip's share stays below them.

The test also prints its dynamic instruction mix by class, next to the
published mix of the original handlers on five SPLASH-2 programs:

| class | this test % | published % |
|---|---|---|
| WGI | 23.7 | 26.8 |
| WPG | 8.6 | 15.0 |
| MPP | 1.5 | 10.4 |
| MMC | 9.1 | 9.3 |
| BPI | 3.0 | 6.0 |
| RDT | 2.0 | 5.2 |
| Branch | 20.2 | 7.9 |
| IMA | 11.1 | 0.2 |
| INT + SPE | 14.2 | 1.1 |

The test handlers are short, one interrupt per packet, so entry and return
(MFIR, RETI, the idle HALT loop and dispatch branches) weigh far more than in
the original. The original also hardly touches internal memory, which
suggests that it keeps its directory elsewhere. In both mixes the
immediate-operand and PBR-operand classes (WGI, WPG, BPI, MPP) are heavily
used.

## Where this design comes from and where it departs

The following come from the published description of the chip:

* the block structure (MMC, MBP core, RDT interface; what each one connects
  to)
* 16 GPRs of 16 bits, 112 PBRs of 68 bits, and the PBR layout (8 bytes by 8
  offsets plus a 4-bit field)
* GPR-pointer-plus-offset addressing and the word order shown in the examples
* 21-bit instructions, the 14 class names, and the four pipeline stages with
  parallel LM/EX/GM
* the ADDPG and MVLPP examples, and their values
* interrupts from the MMC and the RDT interface
* multicast of invalidations, and ack generation and collection in hardware
* 256 clusters
* 50 MHz on a 0.4 µm gate array

Everything else is this design's own choice and should be read as such:

* **Instruction set.** The original has about 85 instructions, published by
  class and count only. Here 59 instructions cover all 14 classes, and
  the binary encoding is invented.
* **Interrupt scheme.** Vectors, priority, EPC/RETI and HALT are invented.
* **Packets.** Packet and header format, one PBR per packet, and receive
  rings with in-order release are invented. The original distinguishes header
  and data flits, but their format is not known.
* **Multicast.** The original's directory-based multicast scheme (a reduced
  hierarchical bitmap) is replaced by a flat 16-bit bitmap within a group of
  16 clusters. Invalidating across all 256 clusters takes up to 16 MCAST
  commands.
* **Cluster memory.** It is a one-cycle synchronous port with 64-bit lines.
  The original's line size and DRAM timing are not given.
* **Memories.** Internal memory is 256×16. The instruction memory is external
  with a 10-bit address. Neither size is published.

The following are **not built** because they are not described:

* the original's L3-cache organisation of the cluster memory (the test
  program above uses its own)
* the page-level directory
* the cluster-bus snooping protocol
* the STAFF-Link I/O
* the router itself

As a result, the published timings (for example 6.9 µs for a read miss to a
valid home line) cannot be reproduced cycle for cycle. The protocol code
behind them is not available either. The handler programs in the testbenches
are examples written for this design.

## How far it is verified

* Each block has a directed testbench.
  * The core testbench runs both published instruction examples and checks
    their values.
  * The PBR file is compared with a reference array under random multi-port
    traffic.
  * The MMC and RDT testbenches check every command, ring overflow and
    release, and the ack counting.
* `tb_mbp_core_random` runs twelve random 300-instruction programs on the
  core, with random unit back-pressure. Half of them also get random
  interrupts from all three sources.
  * The interrupt handlers return without touching anything.
  * An instruction lost or executed twice around an interrupt, a forwarding
    error, or a stall that drops an operand therefore shows up as a
    difference from the reference model in GPRs, PBRs, memories or the
    command stream.
* The end-to-end test checks every packet that leaves the chip. It also
  requires each mechanism to occur: the three interrupt kinds, multicast,
  hardware ack counting and generation, stalls, operand bypass, table jumps,
  and an interrupt taken while acks are outstanding.
* `tb_mbp_protocol` checks the packets and directory state of the four
  published transactions and of an update-policy write. It bounds their time in the chip by the published
  totals.
* Not verified: the published latencies themselves (they need the network
  and the original protocol code), and synthesis to a gate count.

## Files

| file | contents |
|---|---|
| `rtl/mbp_pkg.sv` | widths, instruction classes and functions, command and packet types, PBR byte/word helpers |
| `rtl/mbp_light.sv` | top: PBR file, core, MMC, RDT interface |
| `rtl/mbp_core.sv` | the pipelined core |
| `rtl/mbp_pbr_file.sv` | PBR file, NRD read / NWR write ports |
| `rtl/mbp_gpr_file.sv` | GPR file with write-through |
| `rtl/mbp_sram.sv` | internal memory |
| `rtl/mbp_mmc.sv`, `rtl/mbp_rdt_if.sv` | the two units |
| `rtl/mbp_rx_ring.sv` | receive-ring bookkeeping shared by both units |
| `tb/tb_*.sv` | one self-checking testbench per block; `tb_mbp_light` is the end-to-end run at default size |
| `tb/tb_mbp_protocol.sv` | the published coherence transactions, timed, and an update-policy write |
| `tb/tb_mbp_core_random.sv` | random programs on the core, compared with an instruction-set reference model |
| `tb/mbp_asm_pkg.sv` | instruction encoders for test programs |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M`. Each has a watchdog.
With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_mbp_light \
  rtl/mbp_pkg.sv tb/mbp_asm_pkg.sv rtl/mbp_gpr_file.sv rtl/mbp_sram.sv \
  rtl/mbp_pbr_file.sv rtl/mbp_rx_ring.sv rtl/mbp_mmc.sv rtl/mbp_rdt_if.sv \
  rtl/mbp_core.sv rtl/mbp_light.sv tb/tb_mbp_light.sv
./obj_dir/Vtb_mbp_light
```

For a single block, list `rtl/mbp_pkg.sv`, the block and whatever it
instantiates, then its testbench. For example, `tb_mbp_core` needs the asm
package, GPR file, SRAM and PBR file. All of them take well under a second.

To change the machine:

* The receive-ring placement and sizes are parameters of `mbp_light`.
* The PBR count is `NPBR` in `mbp_pkg`.
* New instructions go into the class `case` of `mbp_core`'s third stage, with
  an encoder added to `mbp_asm_pkg`.
