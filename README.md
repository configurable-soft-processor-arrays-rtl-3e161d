# OpenFire processor arrays in SystemVerilog

A signal-processing job that splits into many independent pieces can run on an
array of small processors instead of on custom hardware. Each processor in the
array can then be trimmed to its task. This design is such an array. It is built
from the **OpenFire**, a small 32-bit RISC soft processor that runs MicroBlaze
machine code. The OpenFire keeps only what a node in an array needs:

- a three-stage pipeline;
- a local memory joined to the core by a plain one-cycle port;
- one pair of **Fast Simplex Links** (FSL), the MicroBlaze's FIFO channels, to
  talk to its neighbours.

There is no cache, no memory bus and no peripheral bus.

The main configuration knob is the **datapath width**. The 32-bit default matches
the MicroBlaze. A 16-bit OpenFire still runs unmodified MicroBlaze code, as long as
every value the code handles fits in 16 bits, and its core is much smaller. The
area saved can go into more processors. The multiplier and the comparator are
optional.

The reference system is a **ring**. A master processor (a MicroBlaze with access
to external DDR memory) sends image blocks around the ring. Each OpenFire applies a
3x3 median filter to its block and passes the result back round to the master.
The ring's throughput grows nearly linearly with the number of nodes.

## What is here

| module | role |
|---|---|
| `openfire_array` (top) | ring of `NUM_NODES` nodes (processor + local memory), joined by `NUM_NODES+1` FSL FIFOs; the master's two FSL ports are the top-level ports |
| `openfire_cpu` | one OpenFire: fetch, decode, execute |
| `openfire_fetch` | program counter, instruction address, redirect and flush |
| `openfire_decode` | MicroBlaze instruction word to control word (`openfire_pkg::ctrl_t`) |
| `openfire_execute` | decode/execute register, register read, ALU, carry, IMM prefix, branches, loads and stores, multiply, FSL get/put, stall generation |
| `openfire_regfile` | 32 general-purpose registers, r0 = 0 |
| `openfire_alu` | add/reverse-subtract with carry, logic, shift right by one, sign extension, optional compare |
| `openfire_multiplier` | pipelined multiplier with a latency of 5 cycles |
| `openfire_local_memory` | dual-port block RAM for code and data, one-cycle reads, byte writes |
| `fsl_fifo` | one FSL channel: first-word-fall-through FIFO with data, control bit, write/full and read/exists |
| `openfire_pkg` | opcodes, enums, control-word struct |

The master processor, the DDR memory and the master's timer are not part of the
RTL. In the testbenches the master is `tb/median_master.sv`, a behavioural model
that also holds the image and checks the results.

## The pipeline and its timing

```
          +--------+  imem_addr   +--------------+  instr   +--------+  ctrl_t  +---------------------------+
  PC ---> | fetch  | -----------> | local memory | -------> | decode | -------> | execute (regfile, ALU,    |
          +--------+   (1 cycle)  |  (port I)    |          +--------+          |  mul, load/store, FSL)    |
              ^                   +--------------+                            +---------------------------+
              |  branch_taken / branch_target / stall                                   |       |
              +-------------------------------------------------------------------------+   port D, FSL
```

*Fetch.* The PC addresses the block RAM. The RAM's output register is the
fetch/decode pipeline register, so fetch takes one cycle and no prefetch buffer is
needed. The PC, a valid bit and the word travel together into decode.

*Decode.* Decode is combinational. Its control word is registered at the input of
execute.

*Execute.* Execute reads the register file, so an instruction always sees the
result of the one before it and no bypass is needed. It writes results at the end
of its last cycle. While an instruction needs more cycles, `stall` holds fetch,
decode and the RAM's instruction port.

Cycles each instruction occupies in execute:

| instruction | cycles |
|---|---|
| ALU, logic, shifts, `imm`, branch not taken | 1 |
| taken branch, no delay slot | 1 + 2 discarded slots = 3 |
| taken branch with delay slot (`brd`, `beqid`, `rtsd`, ...) | 1; the delay-slot instruction follows at once, the target 2 cycles after it |
| `lw/lhu/lbu`, `sw/sh/sb` (register and immediate forms) | 2 |
| `mul`, `muli` | 5 (`MUL_LATENCY`; a MicroBlaze needs 3) |
| `get`, `put` (blocking) | 1 once the link has data / room; until then the instruction waits in execute |
| `nget`, `nput`, `ncget`, `ncput` | 1; carry = 1 if the link was empty / full |

Apart from the multiply, these are the MicroBlaze's own cycle counts. That is why
code timed on one processor times the same on the other.

### Instruction subset

Implemented: `add rsub addc rsubc addk rsubk addkc rsubkc` and their immediate forms,
`cmp cmpu`, `mul muli`, `or and xor andn` and immediates, `sra src srl sext8 sext16`,
`imm`, `br bra brd brad brld brald` and `bri...`, `beq bne blt ble bgt bge` with
optional `d` and `i`, `rtsd`, `lbu lhu lw sb sh sw` and immediates, and
`get put nget nput cget cput ncget ncput`.

Not implemented, as in the OpenFire: barrel shifts, division, `mts/mfs/msrset/msrclr`,
cache instructions, `rtid/rtbd/rted`, exceptions and interrupts. Such words execute as
no-ops. Carry is the only machine-status bit kept.

Encodings are the MicroBlaze ones. Instruction bit 31 here is MicroBlaze bit 0. Memory
is big-endian: the byte at the lowest address is bits 31:24 of the word.

## FSL links and the ring

`fsl_fifo` is first-word-fall-through. A word written in cycle *t* is readable in cycle
*t+1*. So a `put` in one node and a `get` in the next move a value from register to
register in two clock cycles.

The writer must not write while `full`, and the reader must not read unless
`exists`. Both rules are assertions in the FIFO.

In `openfire_array`:

- link 0 runs from the master (`m2r_*`) to node 0;
- link *k* runs from node *k-1* to node *k*;
- link `NUM_NODES` runs from the last node back to the master (`r2m_*`).

Only one link number (FSL 0) exists, so a node can sit in a ring but not in a 2-D mesh.

Every node runs the same program. The nodes differ only in the number each one
learns at start-up (see below).

## Datapath width

`DATA_WIDTH` sets the width of the registers, the PC, the ALU, the addresses and the
FSL words. Instructions and memory words stay 32 bits wide.

- **Immediates.** They are sign-extended (or completed by `imm`) and then cut to the
  width.
- **Carry.** It comes out of bit `DATA_WIDTH`.
- **Word loads and stores.** A word load keeps the low `DATA_WIDTH` bits of the memory
  word. A word store writes the register zero-extended.
- **Addresses.** Registers hold every address, so a 16-bit OpenFire reaches at most
  64 KiB (16 K words). An 8-bit one reaches 256 bytes (64 words). The 8-bit case is
  simulated too.

Code must keep its values within the width. Code that uses the upper bytes of a
word, such as the C library's word-wise string routines, will not work.

## The median-filter application and its protocol

The node program is in `tb/median_w8.hex` and `tb/median_w64.hex`. The two files
differ only in the block width `W`. The master
model follows the same protocol:

1. **Numbering the ring.** The master sends the node count *N*. Each node keeps the
   value it receives as its number *m* and sends *m-1* on. The last node returns 0
   to the master.
2. **Handing out blocks.** The master sends *N* blocks of W x W 8-bit pixels, one pixel
   per FSL word, the block for the farthest node first. Node *m* forwards *m-1*
   blocks and keeps the next.
3. **Filtering.** Border pixels are copied. Each inner pixel gathers its 3x3
   neighbourhood into a small window and sorts it by insertion sort with `cmp`,
   which is the comparator's main use. The median is the fifth element.
4. **Returning results.** After the blocks, the master sends the end marker
   `0xFFFFFFFF`. Each node forwards upstream results until it sees the marker, then
   sends its own block and a new marker. The master therefore receives the blocks of
   nodes *N, N-1, ..., 1* and then a marker.
5. **Next round.** The nodes loop back to step 2.

Local-memory layout of a node:

| bytes | contents |
|---|---|
| `0x0000` | code |
| `0x1000` | input block |
| `0x2000` | output block |
| `0x3000` | 9-word window |

A 64x64 block therefore needs 8.6 KB of the 16 KiB default memory.

The hex files hold one 32-bit instruction word per line. Below is the program in
MicroBlaze assembly. `W`, `IN=0x1000`, `OUT=0x2000` and `WIN=0x3000` are
assembly-time constants. To change the program, assemble it with a MicroBlaze
assembler and write one hex word per line.

```
start:
  addik r2, r0, W
  mul   r3, r2, r2          ; pixels per block
  get   r1, rfsl0           ; my number in the ring
  addik r4, r1, -1
  put   r4, rfsl0           ; pass on the decremented count
  addik r5, r1, -1          ; blocks to forward downstream
fwd_blk:
  beqi  r5, recv
  addk  r6, r3, r0
fwd_px:
  get   r7, rfsl0
  put   r7, rfsl0
  addik r6, r6, -1
  bnei  r6, fwd_px
  brid  fwd_blk
  addik r5, r5, -1          ; delay slot
recv:
  addik r8, r0, IN
  addk  r6, r3, r0
rx_px:
  get   r7, rfsl0
  sbi   r7, r8, 0
  addik r8, r8, 1
  addik r6, r6, -1
  bnei  r6, rx_px
  addk  r10, r0, r0         ; y
  addik r13, r2, -1         ; W-1
yloop:
  addk  r11, r0, r0         ; x
xloop:
  mul   r12, r10, r2
  addk  r12, r12, r11       ; idx
  beqi  r10, copy
  beqi  r11, copy
  rsubk r14, r10, r13
  beqi  r14, copy
  rsubk r14, r11, r13
  beqi  r14, copy
  rsubk r16, r2, r12        ; idx - W
  addk  r18, r16, r2
  addk  r19, r18, r2
  lbui  r17, r16, IN-1
  swi   r17, r0, WIN+0
  lbui  r17, r16, IN
  swi   r17, r0, WIN+4
  lbui  r17, r16, IN+1
  swi   r17, r0, WIN+8
  lbui  r17, r18, IN-1
  swi   r17, r0, WIN+12
  lbui  r17, r18, IN
  swi   r17, r0, WIN+16
  lbui  r17, r18, IN+1
  swi   r17, r0, WIN+20
  lbui  r17, r19, IN-1
  swi   r17, r0, WIN+24
  lbui  r17, r19, IN
  swi   r17, r0, WIN+28
  lbui  r17, r19, IN+1
  swi   r17, r0, WIN+32
  addik r20, r0, 1          ; insertion sort of the 3x3 window
outer:
  addk  r21, r20, r20
  addk  r21, r21, r21
  lwi   r22, r21, WIN       ; key
  addik r23, r21, -4
inner:
  blti  r23, place
  lwi   r24, r23, WIN
  cmp   r25, r24, r22       ; MSB set when win[j] > key
  bgei  r25, place
  swi   r24, r23, WIN+4
  brid  inner
  addik r23, r23, -4
place:
  swi   r22, r23, WIN+4
  addik r20, r20, 1
  addik r26, r20, -9
  bnei  r26, outer
  lwi   r27, r0, WIN+16     ; median
  bri   store
copy:
  lbui  r27, r12, IN
store:
  sbi   r27, r12, OUT
  addik r11, r11, 1
  rsubk r14, r11, r2
  bnei  r14, xloop
  addik r10, r10, 1
  rsubk r14, r10, r2
  bnei  r14, yloop
ret_fwd:                    ; forward upstream results until the end marker
  get   r7, rfsl0
  addik r28, r7, 1
  beqi  r28, send_own
  put   r7, rfsl0
  bri   ret_fwd
send_own:
  addik r8, r0, OUT
  addk  r6, r3, r0
tx_px:
  lbui  r7, r8, 0
  put   r7, rfsl0
  addik r8, r8, 1
  addik r6, r6, -1
  bnei  r6, tx_px
  addik r7, r0, -1
  put   r7, rfsl0           ; end marker
  brid  fwd_blk             ; next round of blocks
  addik r5, r1, -1
```

`tb/isa_test.hex` is a separate instruction-set test for one processor. It sends
each result out over FSL, and `tb/tb_openfire_cpu.sv` explains what each value
checks.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NUM_NODES` | 3 | OpenFires in the ring (the reference system draws three; it was measured with 1, 2, 4 and 8) |
| `DATA_WIDTH` | 32 | datapath width; 16 is the reduced variant |
| `MEM_WORDS` | 4096 | local memory per node, 32-bit words (16 KiB); this design's choice |
| `FIFO_DEPTH` | 16 | words per FSL link; this design's choice |
| `ENABLE_MUL` | 1 | hardware multiplier; without it `mul` is a no-op |
| `ENABLE_CMP` | 1 | comparator; without it `cmp/cmpu` act as `rsubk` |
| `MUL_LATENCY` | 5 | multiply cycles |
| `INIT_FILE` | "" | `$readmemh` image loaded into every node's memory |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends. Hex files are
opened by paths relative to the project root, so run the simulation from there:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_openfire_array \
  -y rtl -y tb +libext+.sv -Irtl rtl/openfire_pkg.sv tb/tb_openfire_array.sv -o sim
./obj_dir/sim
```

| testbench | what it runs |
|---|---|
| `tb_openfire_array` | 3-node ring, 8x8 blocks; checks every pixel, each node's number, and that each mechanism occurred: get waiting on an empty link, put waiting on a full link, the master finding the ring full, multiplies, loads/stores, taken branches with and without delay slot, compares |
| `tb_openfire_array_full` | the top at its defaults, 64x64 blocks (about 1.7 M cycles, a few seconds) |
| `tb_openfire_array_dw16` | the same ring with a 16-bit datapath, two rounds |
| `tb_openfire_array_dw8` | one node with an 8-bit datapath and 64 words of memory: add and carry, `cmpu`, `mul`, byte and word store/load at the top of the 256-byte space, signed branch |
| `tb_median_speedup` | rings of 1, 2, 4, 8 nodes on the same eight 64x64 blocks; prints speedup (about 30 s) |
| `tb_openfire_cpu` | instruction-set program on one core, with cycle counts of mul, load and branches |
| `tb_openfire_execute`, `_decode`, `_fetch`, `_alu`, `_regfile`, `_multiplier`, `_local_memory`, `tb_fsl_fifo` | unit tests |

Measured speedup on eight 64x64 blocks, against the speedups published for the
original system (read off its plot):

| nodes | cycles | speedup here | published |
|---|---|---|---|
| 1 | 12.4 M | 1 | 1 |
| 2 | 6.48 M | 1.92 | about 1.95 |
| 4 | 3.50 M | 3.55 | about 3.75 |
| 8 | 2.01 M | 6.18 | about 6.9 |

The gap at 8 nodes is 23% here, against about 15% in the original. In this program
each node forwards other nodes' pixels one at a time with a `get`/`put` loop. That
costs 6 cycles per pixel per hop, and a ring of 8 passes up to 7 hops of traffic
through its first node. The model master also pauses at random while it reads
results.

## How far to trust it, and where it departs from the OpenFire

- **Not checked against the real thing.** The design was written from a description
  of the OpenFire and from the MicroBlaze architecture, not from OpenFire source code.
  It is checked only by the testbenches above, not against a MicroBlaze or the
  original RTL.
- **Register read in execute.** Registers are read in the execute stage, and the
  decode/execute register sits in `openfire_execute`. The MicroBlaze's internal
  arrangement may differ, although the cycle counts above are the same.
- **Cycle counts for loads, stores and branches.** These follow the MicroBlaze
  (load/store 2, taken branch 3 or 2 with delay slot). They were not measured on an
  OpenFire.
- **FSL control bit.** A `get` whose control bit does not match the incoming word
  does not raise the FSL error flag, because the status register is left out.
- **Unimplemented instructions.** They are silent no-ops. No exception is raised.
- **Address range at 16 bits.** At 16 bits the original is quoted as addressing
  16 kB. Here a 16-bit register holds a byte address, which reaches 64 KiB (16 K
  words). The 8-bit value quoted with it, 64 words, agrees with byte addressing.
- **Chosen sizes.** The memory size, FIFO depth, narrow-datapath load/store rule and
  reset behaviour were chosen here. The sizes are parameters.
- **No reset for registers or memories.** A program must initialise what it reads.
  Reset clears the pipeline's valid bits and also masks them while it is held. So
  whatever the pipeline registers hold at power-up cannot store to memory or move a
  word on a link.
- **Programs are loaded before reset.** They come through `INIT_FILE` or by writing
  the memory array. There is no run-time loader.
- **Area and clock speed not reproduced.** The published OpenFire reached 100 MHz in
  a Virtex-II Pro and took 641 slices at 32 bits and 402 at 16 bits. Synthesising
  this RTL for an FPGA is left to the user.
