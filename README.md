# Wave-PIM: a processing-in-memory chip for wave simulation

Wave simulations, such as discontinuous-Galerkin solvers for acoustic and
elastic waves, run out of memory bandwidth long before they run out of
arithmetic. Each element of the mesh is updated with a few dozen
multiply-adds per variable, and then has to exchange face values with up to
six neighbours. On a GPU most of the time goes to moving those numbers between
DRAM and the cores.

This design brings the arithmetic to the data. The chip is built from memory
blocks of 1024 x 1024 memristor-style bits that can compute in place. One mesh
element lives in one block, with one mesh node per row. Every row of a block
performs the same operation at the same time. Because of that, a block
processes up to 1024 nodes in parallel, and all blocks of the chip work at
once.

The blocks are joined by an H-tree of small switches. This is a tree of
four-child routers that moves words between neighbouring elements. Transfers
in disjoint subtrees run in parallel. A central controller turns a compact
host instruction stream into block commands. It has one special instruction,
LUT, that fetches a table entry chosen by an index stored in memory. It is
used for the pre-computed material constants that the solver needs.

## Hierarchy and sizes

| level   | contents                                     | default size              |
|---------|----------------------------------------------|---------------------------|
| block   | `pim_block`: 1024 x 1024 bit crossbar, decoder | 128 KiB                 |
| tile    | `pim_tile`: 256 blocks, 85-switch H-tree (4 levels) | 32 MiB             |
| chip    | `wave_pim_top`: 16 tiles, 2 more H-tree levels, controller | 512 MiB (4096 blocks) |

The block size, the 256 blocks and 85 switches per tile are those of the
design being reproduced. Its main chip is 2 GiB, 64 tiles, which is
`CHIP_LEVELS = 3`. The default here is its smaller 512 MiB configuration,
`CHIP_LEVELS = 2`. At 2 GiB, Verilator needs about 13 GB just to lint the top,
and logic synthesis of it ran out of 16 GB on its own. The tile has
1 + 4 + 16 + 64 = 85 switches. Joining the tiles with more levels of the
same switch (5 switches for 16 tiles, 21 for 64) is this implementation's own choice; the design only
describes the tree inside a tile.

## Data layout: one row, 32 words

A block is stored column-major: `crossbar_array` holds `COLS` words of `ROWS`
bits. Reading or writing one column therefore touches every row at once, as a
bit-line of a real crossbar does.

A row holds 32 words of 32 bits. Bit `i` of word `w` is column `32*w + i`. So
"word `w` of row `r`" is a value that belongs to mesh node `r`, and an
operation on word columns acts on all nodes together. The last nine columns
(word 31 in part) are used as scratch by the adder. Software must not keep
data in columns `COLS-9 .. COLS-1` while an ADD runs.

## Arithmetic from NOR

The only logic operation a block has is a row-parallel NOR:

    column d := NOR(column a, column b)      for every row in the active range

`BC_NOR` takes two cycles: both columns are read in the first, and the result
is written in the second. The row range comes from the controller's SETROWS
register. Rows outside it keep their old value, because the write uses a bit
mask.

Everything else is a sequence of NORs. `nor_sequencer` generates a ripple-carry
add of two unsigned `width`-bit operands in columns `ca..`, `cb..` into
`cd..`, with nine NORs per bit:

    n1 = NOR(a, b)    n2 = NOR(a, n1)   n3 = NOR(b, n1)   t = NOR(n2, n3)   -- t = a xor b
    m1 = NOR(t, c)    m2 = NOR(t, m1)   m3 = NOR(c, m1)   s = NOR(m2, m3)   -- s = t xor c
    cout = NOR(n1, m1)

Two more NORs clear the carry at the start. An ADD of `w` bits is therefore
`2 + 9w` NOR commands. The carry alternates between two scratch columns, so
that `cout` never overwrites the `c` it is computed from. The result
is `w` bits modulo `2^w`; no carry-out is kept.

Floating-point multiply and add, which the solver uses, are not built. They
would be longer NOR sequences of the same kind, generated by further sequencer
states.

## Moving data: the H-tree

A `htree_switch` has four child ports and one parent port. Each input has a
two-entry FIFO with a registered `ready`. Each output chooses round-robin
among the inputs that want it. A packet carries its destination block, row,
word offset and data, so the route is computed at every node:

* a node at level `L` with index `n` covers blocks `n*4^(L+1)` to
  `(n+1)*4^(L+1) - 1`;
* a packet for a block in that range goes down to child `(dst >> 2L) & 3`;
* any other packet goes up to the parent.

One hop costs one cycle. Block 0 to block 5 of a tile crosses S0, S1 and S0
again, so it takes three switch hops. Block 0 to 2 and block 5 to 7 use
different S0 switches, so they move in the same cycles. `htree_net` builds a
full tree of `LEVELS` levels from flat arrays. It is used inside each tile
(`LEVELS = 4`) and above the tiles (`LEVELS = CHIP_LEVELS`, `BASE_LEVEL = 4`). A packet
that leaves the root of the chip has no destination on the chip and is
dropped. This happens with relative sends from the last blocks.

In the design being reproduced, a transfer is a read into the block's buffer,
a series of memcpy steps along the tree, and a write at the far end. Here the
same three steps are done by the blocks and the switches themselves. The
sending block reads the word (33 cycles), the packet finds its own path, and
the receiving block writes it (32 cycles) as soon as it is idle. The host
issues one SEND instead of one instruction per hop.

## Instruction set

The host writes 64-bit instructions with `ins_valid`/`ins_ready`. WRITE also
takes a 32-bit `ins_data`. The opcode is always bits `[63:57]`.

| opcode | name    | fields (high to low after the opcode)                                                      |
|--------|---------|--------------------------------------------------------------------------------------------|
| 0x00   | NOP     | none                                                                                       |
| 0x01   | SETROWS | unused[56:20], row_hi[19:10], row_lo[9:0]: active rows for NOR, ADD and WRITE             |
| 0x02   | NOR     | width_m1[56:52] (unused), bcast, block[15:0], cd, ca, cb (10 bits each), unused[4:0]       |
| 0x03   | ADD     | as NOR; width = width_m1 + 1 bits, operands from columns ca.. and cb.., result to cd..     |
| 0x04   | WRITE   | bcast, block, row (unused), off[4:0]: `ins_data` into word `off` of every active row      |
| 0x05   | READ    | bcast (ignored), block, row, off: the word comes back on `resp_valid`/`resp_data`         |
| 0x06   | SEND    | bcast, rel, src, dst, row, src_off, dst_off: copy one word from block to block            |
| 0x40   | LUT     | row_id[56:31], offset_s[30:26], lut_block[25:5], offset_d[4:0]                              |

The exact field layouts are the `ins_*_t` structs in `rtl/wavepim_pkg.sv`.
With `bcast`, NOR, ADD and WRITE act on every block of the chip. With `bcast`,
SEND makes every block send its word. With `rel`, the destination is
`sender + dst` (modulo 2^16). One instruction then moves every element's face
value to its neighbour `dst` blocks away, and all the transfers run in
parallel through the tree.

Only the LUT layout comes from the reproduced design. The other opcodes,
field positions and the SETROWS register are this implementation's own.

## The LUT instruction

A look-up table is laid out in memory as consecutive 32-bit entries, starting
at block `lut_block`, row 0, word 0. It continues row by row, and then into the
following blocks. The instruction has three steps, each a command to one
block. Addresses are global bit addresses (`block * ROWS*COLS + row*COLS +
column`):

1. R1: read the index at `row_id * COLS + offset_s * 32`. `row_id` is the global
   row, `block * ROWS + row`.
2. R2: read the entry at `lut_block * ROWS*COLS + index * 32`.
3. W1: write that entry to `row_id * COLS + offset_d * 32`.

`lut_unit` computes the addresses and steps through R1, R2 and W1, using the
controller's READ and WRITE commands. With 1024 x 1024 blocks, one table block
holds 32768 entries, and larger tables continue into the next blocks.

## Timing

All logic uses one clock and an active-low asynchronous reset. The bit array
itself is not reset.

| action                                         | cycles (block busy)         |
|------------------------------------------------|-----------------------------|
| NOR                                            | 2 (+1 accept)               |
| WRITE of one word (any number of rows)         | 32 (+1)                     |
| READ / start of SEND                           | 33 (+1)                     |
| packet write at the receiver                   | 32                          |
| switch hop                                     | 1                           |
| read response at the host                      | about 35 after the command  |

Reads and writes go one bit column per cycle, because the array is organised
by columns. The controller issues one command and waits `SETTLE` (3) cycles,
because the busy and empty flags come back through registers. It then waits
until no block is busy and the H-tree is empty. Every instruction, including
all packets it launched, is therefore finished before the next starts. This
is simple and safe, but it serialises work that the hardware could overlap.
For example, NOR commands to different blocks could be pipelined.

## Files

| file                         | contents                                                       |
|------------------------------|----------------------------------------------------------------|
| `rtl/wavepim_pkg.sv`         | widths, opcodes, instruction structs, block command, packet    |
| `rtl/crossbar_array.sv`      | ROWS x COLS bit array, column-wide read ports and masked write |
| `rtl/pim_block.sv`           | one memory block: NOR, WRITE, READ, SEND, packet receive       |
| `rtl/htree_switch.sv`        | four-child router with FIFOs and round-robin outputs           |
| `rtl/htree_net.sv`           | a full tree of switches with leaf ports and a root port        |
| `rtl/pim_tile.sv`            | 256 blocks and their H-tree; busy/empty/response gathering     |
| `rtl/nor_sequencer.sv`       | expands ADD into the 9-NOR-per-bit sequence                    |
| `rtl/lut_unit.sv`            | R1/R2/W1 address generation and stepping for LUT               |
| `rtl/central_controller.sv`  | instruction decoder and command issue                          |
| `rtl/wave_pim_top.sv`        | controller, tiles and the tree between tiles                   |

Each file in `tb/` is a self-checking testbench. It prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog. All the
testbenches use random data from `$urandom`.

## Simulating

With Verilator 5, for example for the end-to-end test:

    verilator --binary --timing --assert -Irtl rtl/wavepim_pkg.sv \
      rtl/crossbar_array.sv rtl/pim_block.sv rtl/htree_switch.sv rtl/htree_net.sv \
      rtl/pim_tile.sv rtl/nor_sequencer.sv rtl/lut_unit.sv \
      rtl/central_controller.sv rtl/wave_pim_top.sv \
      tb/tb_wave_pim_top.sv --top-module tb_wave_pim_top -o sim
    ./obj_dir/sim

For a single block, list the package, the block's file and the files of any
modules it instantiates, followed by its testbench.

The memory is large. A crossbar has 1 Mbit, so the 512 MiB default chip has
4 Gbit of state, and the 2 GiB chip 16 Gbit. A software simulator cannot hold
either of them. These
simulations were run:

* `tb_wave_pim_top`: 16 blocks of 64 x 128, in four tiles, with every
  instruction type. It counts the mechanisms it exercises: broadcast, ADD,
  transfers between tiles, a receiver stalling the tree, packets dropped past
  the root, and a LUT entry found in the block after the table's first block.
* `tb_wave_pim_full`: full-size 1024 x 1024 blocks, 4 tiles of 64 blocks
  (256 blocks, 32 MiB). This is the largest configuration simulated. It takes
  a few minutes to build.
* One testbench per block, at reduced sizes where the block is large.

No simulation of the default 512 MiB chip, or of the 2 GiB chip, exists.

## Departures from the reproduced design

* Only integer addition is built as a NOR sequence. The floating-point
  multiply and add of the solver, and the multiply used by the Volume and
  Flux kernels, are missing.
* The bus interconnect, an alternative to the H-tree, is not built. The
  H-tree is the interconnect of the main configuration.
* Packets route themselves by destination address instead of being steered
  by one memcpy instruction per switch.
* The tree above the tiles, the instruction encodings apart from LUT, the row
  range register, FIFO depths, arbitration and all cycle counts are choices of
  this implementation.
* There is no command that copies a word from one row of a block into a range
  of rows of the same block, the step that spreads an element's constants from
  its storage rows to its computation rows. The host can do it with a READ
  followed by a WRITE over the active row range.
* The host CPU and the off-chip HBM2 memory are outside the chip. The host is
  the instruction port of `wave_pim_top`.
* Batching (mesh larger than the chip) and expansion (one element over four
  blocks) are ways to map software onto the chip. Nothing in the hardware
  prevents them: they only use SEND, WRITE and the row range.

## Capacity for the evaluated meshes

A mesh at refinement level `r` has `8^r` elements of 512 nodes each. An acoustic
element needs one block, or four blocks when its four variables are spread
out so they are processed in parallel. An elastic element needs four blocks.

* At level 4 there are 4096 elements. The acoustic mesh uses 4096 blocks,
  which exactly fills the 4096-block default chip. Spread out over 16384
  blocks, it needs the 2 GiB chip (`CHIP_LEVELS = 3`), as do the elastic
  meshes. On the default chip they need 4 batches.
* At level 5 there are 32768 elements, which needs 32768 blocks (acoustic) or
  131072 (elastic). That means 8 or 32 batches on the default chip, with the
  host reloading the blocks between batches.

Only the capacity is checked here: the floating-point kernels themselves are
not built.
