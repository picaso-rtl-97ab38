# PiCaSO: a processor-in-memory overlay built from block RAMs

PiCaSO turns the block RAMs of an ordinary FPGA into a processor-in-memory
array without changing the silicon. Each block RAM becomes the register file
of 16 bit-serial processing elements (PEs), one per RAM column. The PEs sit
in fabric logic right next to the RAM. The goal is a memory-bound design:
the array runs as fast as the block RAM can be clocked, it has as many PEs
as the device has RAM, and it uses as little logic as possible per block.
The RAM column layout turns every arithmetic operation into a sequence of
one-bit steps. For example, a 16-bit addition in all PEs takes 16 steps, and
all PE-blocks of the array perform the same step at the same time (SIMD).

This repository holds synthesizable SystemVerilog for the PE-block, its
parts, and a tile of 4 × 4 PE-blocks (256 PEs). It also holds testbenches
that act as the array controller and run complete programs on the tile:
Booth multiplication, and reduction of all 256 results to one sum.

## Data layout: one RAM row is one bit of every PE

The register file is a 1024 × 16 RAM (an 18 Kb block RAM in its 16-bit mode).
Column *i* belongs to PE *i*, so a q-bit number of PE *i* occupies q
consecutive rows in column *i*. One row read gives the same bit of 16
numbers, one per PE. A bit-serial operation walks through the rows with the
least significant bit first. Each PE keeps its carry in a flip-flop between
steps.

Data enters and leaves the array in this transposed form, one row at a time.
A corner-turning buffer at the array edge would do the transposition; it is
not part of this RTL.

## The PE-block

```
             +---------------- network node ----------------+
 NEWS in --> | RX mux -> Capture --+--> TX mux --> NEWS out  |
             | Conf(3b) -> decoder |        ^ A[0]           |
             | shift register (Shift-In / Shift-Out)         |
             +-----------------------|-------------------------+
                                     | NET
  instr --> BRAM --A--+--> [RF reg] --> OpMux --> [Op reg] --> ALU (16 PEs) --> [ALU reg] --R--+
            (1024x16) B ------------->   X,Y                                                    |
                ^------------------------------- write-back through port B ---------------------+
```

| Module | Role |
|---|---|
| `picaso_regfile` | Two-port RAM. Port A only reads; port B reads *or* writes in a cycle. Reads are synchronous (one clock). |
| `picaso_opmux` | Makes the ALU operands X and Y out of A, B and NET, including the folding patterns. |
| `picaso_alu` | 16 PEs: a full adder with a carry flip-flop, the bitwise operations, and a Booth multiplier-pair register per PE. |
| `picaso_netnode` | Node of the binary-hopping network, plus a word shift register chained through a column of blocks. |
| `picaso_pe_block` | Wires the four parts together and adds the optional pipeline registers. |
| `picaso_tile` | ROWS × COLS PE-blocks on a mesh; the top level. |
| `picaso_pkg` | Sizes, enums and the instruction word `pim_instr_t`. |

## Instruction word and pipeline timing

An external controller broadcasts one `pim_instr_t` per clock to every
PE-block. The instruction holds the fields of every pipeline stage:
- read addresses and enables for ports A and B;
- the write address and write enable;
- the OpMux mode and fold level;
- the ALU operation and the `first` flag, which marks the least significant bit;
- the network-node controls.

Each block delays the fields along with the data, so every stage acts on the
fields of the instruction whose data it holds. The controller issues one
instruction per cycle and never waits for a result.

There are three optional pipeline registers: after the RAM (`RF_PIPE`),
after the OpMux (`OP_PIPE`) and after the ALU (`ALU_PIPE`). They give the
four configurations:

| Configuration | RF_PIPE | OP_PIPE | ALU_PIPE | write-back latency LAT |
|---|---|---|---|---|
| Single-Cycle | 0 | 0 | 0 | 1 |
| RF-Pipe | 1 | 0 | 0 | 2 |
| Op-Pipe | 0 | 1 | 0 | 2 |
| Full-Pipe (default) | 1 | 1 | 1 | 4 |

Take an instruction issued in cycle *t*:
- It reads the RAM in cycle *t*.
- It is at the OpMux and the network node in cycle *t + 1 + RF_PIPE* (the operand stage).
- It is in the ALU one `OP_PIPE` later.
- It writes port B in cycle *t + LAT*, where LAT = 1 + RF_PIPE + OP_PIPE + ALU_PIPE.

A read issued in cycle *t + LAT + 1* or later sees the result. A read issued
in cycle *t + LAT* still sees the old value, because the RAM reads before it
writes on a collision. Full-Pipe is the configuration the published design
reports as running at the block RAM's maximum clock. Single-Cycle still takes
two clocks from read to write, because the RAM read is synchronous.

## Port B: why a binary operation costs two cycles per bit

A block RAM has two ports, and the write-back uses port B. An operation with
two register operands (A op B) needs both ports to read and port B again to
write, so it runs at one bit per two cycles. The controller must never issue
a port-B read in a cycle in which a write-back lands. An assertion in
`picaso_pe_block` checks this; if both happen, the write wins.

The testbench controller issues such operations in bursts of LAT
instructions, each followed by LAT cycles that carry only write-backs or
port-A work. Operations that read a single row run at one bit per cycle,
because port A reads while port B writes:
- copies;
- folds;
- network transfers;
- the Booth-pair load.

This is why multiplication is the slow operation and accumulation the fast
one.

## OpMux and folding: reduction inside a block without copies

X is always A. Y is B (`OPM_AB`), NET (`OPM_A_NET`) or A folded onto itself.
At fold level *f*, PE *i* receives the bit of a partner PE from the same row
and adds it to its own:

- **Pattern a** (`OPM_FOLD_A`), by halves: distance D = 16 >> f. PEs 0..D-1
  receive PEs D..2D-1. For 16 PEs, level 1 folds 8→0 … 15→7, and level 4
  folds 1→0.
- **Pattern b** (`OPM_FOLD_B`), by neighbours: distance D = 2^(f-1). PE *i*
  with *i* mod 2D = 0 receives PE *i+D*. Level 1 folds 1→0, 3→2, …; level 4
  folds 8→0.

PEs that receive nothing get Y = 0, so an addition leaves them unchanged.
Four levels leave the sum of all 16 PEs in PE 0. Folds of w-bit values run
back to back, so the sum of 16 values takes 4·(w + 4) cycles plus a drain of
LAT. Here w + 4 is the width of the accumulator, with 4 growth bits for 16
values. For 8-bit values that is 48 cycles, the published (N + 4)·log2 q.

## Binary-hopping network: reduction across blocks

Each PE-block has one network node, and the nodes form a NEWS mesh. A
reduction across blocks runs in levels. At level L, along a row (or a
column), the node at position *p* has one of three roles:

| role | rule | what it does |
|---|---|---|
| receiver R | p mod 2^(L+1) = 0 | delivers the captured stream as NET bit 0 |
| transmitter T | p mod 2^(L+1) = 2^L | drives bit 0 of its A word |
| pass P | otherwise | forwards its captured bit |

For 8 positions this gives `RTRTRTRT`, `RPTPRPTP` and `RPPPTPPP` for levels
0, 1 and 2. Data moves towards position 0: westwards along rows, northwards
along columns.

Node internals:
- The 3-bit Conf register holds L, and the decoder combines it with the
  node's fixed row or column number (8 bits per axis, enough for 256 × 256
  blocks, or 1M PEs).
- The RX multiplexer picks the east neighbour for row transfers and the south
  neighbour for column transfers.
- A Capture flip-flop samples that input. The TX multiplexer drives either
  the block's own bit (T) or the captured bit (P and R) to all four
  neighbours.

Every hop passes a flip-flop, so a level-L transfer arrives 2^L cycles after
it was sent.

A cross-block reduction level therefore has two steps:
1. **Transfer.** Stream the w-bit field through port A with `hop_en` set, and
   let every block write NET into a scratch field, the write address trailing
   the read address by 2^L. In receivers NET holds the transmitter's value;
   elsewhere it is 0.
2. **Add.** Add the scratch field to the accumulator (A op B).

Non-receivers add zero, so their values survive. The tile testbench checks
that transmitters and pass nodes are left unchanged.

## Shift chains

Each node also holds a 16-bit shift register. The shift registers of a block
column form a chain: `shift_in[c]` enters block row 0, and every `sh_en`
moves every word one block row down. To load a RAM row into all blocks, shift
ROWS words in and write NET (shift-register mode, `net_hop = 0`) with
`OPM_A_NET` / `ALU_CPY`. To read a row, `sh_load` copies the A word into the
shift register and ROWS shifts bring the words out at `shift_out[c]`.

## Booth multiplication

Each PE keeps a multiplier-bit pair (cur, prev):
- `ALU_BLD` shifts in the next multiplier bit from X (port A only).
- `ALU_BOOTH` adds the multiplicand for pair 01, subtracts it for 10, and
  passes the partial product otherwise. The `first` flag sets the carry-in to
  1 for a subtraction.

Every PE thus multiplies by its own multiplier under a common instruction
stream.

The sequence in `tb/picaso_prog_pkg.sv` (`booth_clear`, `booth_mul`) works as
follows:
- Iteration *s* adds the multiplicand, sign-extended to N+1 bits, at bit *s*
  of the partial product.
- The partial-product row above the top bit does not exist yet. It is
  replaced by a second read of the sign row, which must come before the first
  read's write-back lands. The schedule keeps the two reads within LAT cycles
  of each other.
- With Single-Cycle (LAT = 1) the two reads cannot both come before the
  write-back. Instead, each iteration but the last ends with a one-cycle-per-bit
  copy of its top row one row up. The next iteration reads that copy as the
  sign extension.
- Instructions are placed in the first cycle free of port-B collisions.

An N × N multiply issues in 41, 147 and 551 cycles for N = 4, 8 and 16. The
closed form of two cycles per bit operation, 2N² + 2N, gives 40, 144 and
544.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `ROWS`, `COLS` (tile) | 4, 4 | PE-blocks per column and row |
| `W` | 16 | PEs per block (RAM width) |
| `DEPTH` | 1024 | rows per PE |
| `RF_PIPE`, `OP_PIPE`, `ALU_PIPE` | 1, 1, 1 | pipeline registers (Full-Pipe) |
| `NODE_ID_W` (package) | 8 | position bits per axis |
| `NET_LVL_W` (package) | 3 | hop-level register width |

The `fold` field is 2 bits, enough for 16 PEs. A wider `W` would need a wider
`FOLD_W`.

A device-filling array is a larger `ROWS × COLS`. Its size equals the number
of 18 Kb RAM halves. For example, a device with 750 36 Kb RAMs gives
1500 blocks, or 24K PEs, and one with 2688 gives 86K PEs. The node positions
allow up to 256 blocks per axis.

## What follows the published design and what is this design's own

These parts follow the published design:
- 16 PEs per block RAM;
- the BRAM → OpMux → ALU → write-back dataflow, with A also feeding the
  network node and NET entering the OpMux;
- the A/B/NET → X/Y operand multiplexer and both folding patterns;
- the binary-hopping mesh with its receiver/transmitter/pass roles, the node
  structure (Conf and decoder, RX multiplexer, Capture flip-flop, TX
  multiplexer, shift register) and the 8-bit reach;
- the three pipeline points and four configurations;
- the 4 × 4 tile;
- Booth support, and the latency forms 2N² + 2N for multiplication and
  (N + 4)·log2 q for accumulation.

These are choices of this implementation:
- the RAM depth (1024, from the 18 Kb RAM);
- the instruction word and its encodings, and the ALU operation set;
- the port-A-read / port-B-read-or-write model;
- how the Booth pair is held;
- NET delivering the hop stream on PE 0 only, and zero elsewhere;
- one flip-flop per hop, including pass nodes;
- the direction of data flow (towards row/column 0);
- the shift-chain direction and its parallel load, used for unloading;
- reset values, and RAM contents starting at zero.

The shift chain has its own instruction fields (`sh_en`, `sh_load`). A
program can therefore stream the next operands into the shift registers while
the ALUs compute, overlapping data movement with computation.

In this RTL the network latency (2^L cycles per level) is the same in every
pipeline configuration. The hop bit is taken after the RAM-output register,
so the capture flip-flop lines up with the operand stage. The published
design reports that Op-Pipe gives the lowest network latency; that
difference is not modelled here.

The published Full-Pipe PE-block uses about 112 flip-flops. This RTL carries
a delayed copy of the instruction word in every block, so it uses more.
Sharing that delay line between blocks would bring it closer.

The controller, the control distribution network, the corner-turning buffer
and the activation buffer of the full accelerator are not included. The tile
takes their place through its `instr`, `shift_in` and `shift_out` ports. The
testbench package `tb/picaso_prog_pkg.sv` plays the controller; its functions
build the instruction sequences described above.

## Simulation

All testbenches are self-checking and end with a line
`TB_RESULT checks=<n> failures=<m>`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/picaso_pkg.sv tb/picaso_prog_pkg.sv tb/tb_picaso_tile.sv \
    --top-module tb_picaso_tile
./obj_dir/Vtb_picaso_tile
```

| Testbench | What it runs |
|---|---|
| `tb_picaso_tile` | Default 4×4 tile, Full-Pipe: load, add, subtract, Booth multiply in 256 PEs, fold (pattern a), row and column hopping to one total, fold (pattern b); counts each mechanism |
| `tb_picaso_pipe_configs` | The same kind of program on 2×4 tiles in all four pipeline configurations |
| `tb_picaso_mac` | Multiply-accumulate at 4, 8 and 16 bits on one PE-block, with cycle-count checks |
| `tb_picaso_pe_block` | One PE-block: all ALU operations, Booth multiply, both folds, write-back latency |
| `tb_picaso_netnode` | Eight-node rows and columns: roles per level, 2^L arrival delay, shift chain |
| `tb_picaso_opmux`, `tb_picaso_alu`, `tb_picaso_regfile` | Unit tests against reference models |
