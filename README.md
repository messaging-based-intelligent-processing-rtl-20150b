# m-IPU: a message-driven grid of floating-point sites

The m-IPU (messaging-based Intelligent Processing Unit) is an accelerator with no
fixed dataflow. It is a large grid of small IEEE 754 single-precision compute sites
(SiteOs). The host programs them and drives them only with 64-bit messages. Each
message names a destination SiteO, an operation and a value. It also carries a
"next" operation and destination, which the receiving SiteO keeps. A SiteO executes
the messages addressed to it and passes all others on to a neighbour. So a matrix
multiply or a convolution is laid onto the grid at run time just by choosing which
messages to send. A stationary operand sits in a SiteO, the streamed operands arrive
as messages, and the products travel on to the SiteO that sums them.

This repository has synthesizable SystemVerilog for that grid at the size the m-IPU
is evaluated at: one Block of 4096 SiteOs. It follows the m-IPU publication
("Messaging-based Intelligent Processing Unit (m-IPU) for next generation AI
computing"). That publication gives the message format, the instruction names, the
hierarchy and the SiteO's parts, but much of the detail is left open. Every place
where this RTL fills a gap is listed under [Departures and open points](#departures-and-open-points).

## Hierarchy and addresses

| level | contents | module |
|---|---|---|
| SiteO | FPU, Left and Top FIFOs, decoder, stationary register, 8-entry next-instruction buffer | `siteo` (with `fpu`, `msg_fifo`, `site_ibuf`) |
| SiteM | 4 x 4 SiteOs, one vertical bus per column, one horizontal bus per row | `sitem` |
| Tile | 4 x 4 SiteMs (256 SiteOs) | `tile` |
| Block | 4 x 4 Tiles (4096 SiteOs) | `mipu` (top) |

The 12-bit destination of a message addresses exactly the 4096 SiteOs of a Block:

```
 11 10 | 9  8 | 7  6 | 5  4 | 3  2 | 1  0
 Tile  | Tile | SiteM| SiteM| SiteO| SiteO
 row   | col  | row  | col  | row  | col
```

All levels are 4 x 4 grids joined edge to edge, so the Block is one 64 x 64 grid of
SiteOs:

- The global row is `{d[11:10], d[7:6], d[3:2]}`.
- The global column is `{d[9:8], d[5:4], d[1:0]}`.

`mipu_pkg` has `global_row`, `global_col` and `make_addr` for converting between the
two.

## Messages and instructions

A message is the packed struct `mipu_pkg::msg_t`:

| bits | field |
|---|---|
| 3:0 | present opcode |
| 15:4 | present destination |
| 47:16 | value (IEEE 754 single) |
| 51:48 | next opcode |
| 63:52 | next destination |

There are ten instructions. In the table below, R is the SiteO's stationary register
and v is the message value. The encodings are this design's own choice.

| code | name | effect in the addressed SiteO |
|---|---|---|
| 0 | PROG | R = v. The next-instruction list becomes the single entry {next opcode, next destination}. |
| 1 | UPDATE | Appends {next opcode, next destination} to the list (8 entries at most). R is unchanged. |
| 2, 4, 6, 8 | A_ADD, A_SUB, A_MUL, A_DIV | R = R op v, in place. Nothing is sent. |
| 3, 5, 7, 9 | A_ADDS, A_SUBS, A_MULS, A_DIVS | Streams a new message {entry opcode, entry destination, value = R op v} and moves to the next list entry, wrapping after the last. R is kept. |

The "S" (stream) variants are how a stationary operand is reused. For example, a SiteO
holding A[i][k] gets B[k][j] as an A_MULS message and sends the product, tagged A_ADD,
to the SiteO that accumulates row i.

When the list holds several entries, successive results go to successive destinations.

Accumulators are drained and cleared with two idioms:

- A_ADDS with value 0 sends the accumulated sum (the *offload*).
- A_MUL with value 0 clears it and keeps the route.

Compute messages that reach a SiteO that was never programmed are dropped. So are
opcodes 10 to 15.

## Inside a SiteO

Messages come in from the left neighbour, or from the row's horizontal bus, into the
**Left FIFO**. Messages from the
SiteO above, or from the column's vertical bus, go into the **Top FIFO**. Each FIFO
is 4 deep and shows its oldest message at its head. Each cycle, both heads are
examined:

1. **Destination is this SiteO.** The message is decoded and executed. At most one
   message is executed per cycle. When both heads want to execute, Left and Top
   alternate.
2. **Any other destination.** The message is forwarded unchanged:
   - to the right if the destination is in the same global row;
   - downward otherwise.

Results that the SiteO generates follow the same rule, except that results for a
SiteO further right in the same SiteM row take the horizontal bus (see below).
Messages therefore only move right or down. A message whose destination is above or to the left of it, or outside
the grid, leaves at the right or bottom edge. This is how results reach the host: a
SiteO labels its result with any destination in its own row to the left of it, and
the result comes out on that row's right edge.

A streamed result waits in a one-message output register. It has priority over
forwarded traffic for the output it needs. The Left and Top heads may both be
forwarded in the same cycle if they leave by different sides.

Timing:

| path | cycles |
|---|---|
| forward, FIFOs empty (message accepted at edge t, offered to the next SiteO after t, taken at t+1) | 1 per SiteO |
| add / sub / mul with streamed result (executed at t+1, leaves at t+2) | 2 |
| divide (restoring divider, 25 quotient bits) | 28, of which the FPU is busy for 26 |

A SiteO does not execute further messages while a divide is running, but it keeps
forwarding.

**Back-pressure.** A FIFO's `ready` is simply "not full", taken from its occupancy
register. When a FIFO fills, the sender holds its message and its own FIFOs fill in
turn, so a stall spreads upstream one SiteO at a time. No combinational path crosses
from one SiteO to the next through `ready`. The cost is that a full FIFO takes its
next message one cycle after it was popped.

The **FPU** (`fpu`) computes IEEE 754 single precision with round to nearest even:

- add, subtract and multiply are combinational and finish in the cycle they start;
- divide produces one quotient bit per cycle;
- subnormals are flushed to zero, and every NaN result is 0x7fc00000.

## Vertical buses

Each SiteO column of a SiteM has a vertical bus. A message on it reaches all four
SiteOs of the column in the same cycle instead of hopping. **Every programmed SiteO of
the column executes it**, as if the message were addressed to that SiteO. Unprogrammed
SiteOs ignore it.

This broadcast is how a column of matrix B, or a pixel, goes to every SiteO that
multiplies with it. The bus takes a message only when all programmed SiteOs of the
column can accept it. A hop message arriving from above has priority over the bus for
a SiteO's Top FIFO.

At Block level there is one bus port per SiteO column (64). A message on port c goes,
in the same cycle, to the SiteM in column c/4 whose Tile row is destination bits
[11:10] and whose SiteM row is bits [7:6]. There it is broadcast on SiteM bus c % 4.

So a mapping that uses the buses should keep the roles within a SiteM column uniform:
all multipliers, or all adders.

## Horizontal buses

Each SiteO row of a SiteM has a horizontal bus. It carries results from the
multipliers of a row to the row's adder. A SiteO offers its streamed result on the
bus, instead of hopping it, when the result is addressed to a SiteO further right in
the same SiteM row. The bus delivers it straight into that SiteO's Left FIFO.

Rules:

- One transfer per row per cycle.
- Competing senders are served in rotating order.
- A hop arriving from the left neighbour has priority over the bus for the Left FIFO.
- A result addressed to the left of its sender still hops. This keeps the "label it
  to the left and it leaves at the right edge" idiom working.
- Results for other SiteMs, or for other rows, hop as before.

In the matrix-multiply examples all products reach the adders this way. The three
products of a row are serialised on the bus. This costs about as much as hopping
them, so the measured latencies below are the same with or without the bus.

## Mapping a matrix multiply

C = A x B with A of size N x M and B of size M x P. The mapping:

- SiteO (i,k) holds A[i][k]. Its single list entry is {A_ADD, adder of row i}.
- The adder of row i is a SiteO programmed with 0. Its list entry points to any
  destination to its left in the same row, so the sum leaves on the right edge.
- For each column j of B, B[k][j] goes out as A_MULS on the vertical bus of column k.
  The products go over the row buses into the row adders.
- The host then offloads the adders (A_ADDS 0 on the adder column's bus) and clears
  them (A_MUL 0).

This uses {(N x M) + N} SiteOs per column of B. There are two ways to handle the P
columns:

- **One SiteM, reused P times.** This is the 4x3 by 3x3 example and `tb_sitem`. B is
  broadcast at cycle t, and the offload is sent at t+5. The results leave at t+7.
- **P copies in parallel**, one per column of B, for {(N x M) + N} x P SiteOs. This is
  `tb_mipu`: three SiteMs that straddle a Tile boundary. All columns of B are
  broadcast in the same cycle. The last of the 12 results leaves 15 cycles later,
  because the sums of the left SiteMs hop through the right ones to reach the edge.

The m-IPU publication gives N + P + 2 cycles for this operation, which is 9 for the
example. This design needs more because the host must offload the adders explicitly
and because results queue behind one another on their way to the edge. The published
latency formula is not reproduced.

## Mapping a 2D convolution

`tb_tile` uses the three-SiteM mapping for a 5x5 image and a 3x3 filter:

1. SiteM s is programmed with filter row s in each of its SiteO rows 0 to 2.
2. For output column x, pixel I[i+s][x+k] is streamed to SiteO (i,k) of SiteM s.
3. Each row's products go over the row bus and are summed in that row's adder.
4. The row sums of SiteMs 0 and 1 are offloaded into the adders of SiteM 2. Those
   adders then give column x of the result.

Every output column takes 54 cycles with the testbench's fixed host schedule, which
is not optimised.

For large batches, the m-IPU evaluation streams the data through the 64 x 64 grid in
4096-value partitions and models the time as:

- 2D: (64 + F) x N_D + 2 cycles;
- 3D: (64 + N_F x F) x N_D + 2 cycles.

That gives, at 100 MHz:

- 702.5 ms for 32 x 128 images of 1024 x 1024 with a 3 x 3 filter;
- 49.2 ms for 256 x 256 images with an 11 x 11 filter;
- 503.3 ms for 3D with 64 filters.

These numbers come from that model. They were not measured on this RTL.

## Departures and open points

Not built:

- The separate Tile/Local/Block message channels. In the m-IPU a SiteM sorts its
  outgoing messages into 12 outputs: 4 for its own Tile, 4 for other Tiles in the
  same row, and 4 for other columns or Blocks. Here a SiteM has only its 4 right-edge
  and 4 bottom-edge outputs, and the Tile and Block simply join the edges.
- The distributed instruction memories of a Block.
- The buses between Blocks, and the Quad (4 Blocks). A 12-bit destination cannot
  address beyond one Block, and no inter-Block protocol is given.
- The **weight SRAM** of a SiteO. It is a single stationary register here.

This design's own choices:

- the opcode encoding and the exact meaning of each instruction (above);
- the operand order R op v;
- the bus broadcast rule, and which results take a horizontal bus and how it
  arbitrates;
- the use of the 8-word buffer as a round-robin list of next instructions;
- the FIFO depth of 4;
- the output priorities;
- the address split;
- the edge I/O;
- the asynchronous active-low reset that clears all state.

Generated messages carry next opcode PROG and next destination 0.

## Files

`rtl/`:

- `mipu_pkg.sv`: message type, opcodes and address helpers.
- `msg_fifo.sv`, `fpu.sv`, `site_ibuf.sv`: the SiteO's parts.
- `siteo.sv`, `sitem.sv`, `tile.sv`, `mipu.sv`: the hierarchy, bottom up.

`mipu` has parameters:

- `TR` and `TC`: Tiles per row and column.
- `MR` and `MC`: SiteMs per Tile row and column.
- `FIFO_DEPTH` and `IBUF_DEPTH`.

All default to the 4096-SiteO Block. Smaller values give a partial Block with the same
address map. Edge port k then serves the k-th SiteO column or row that is present:
global column 16*(k / (4*MC)) + k % (4*MC).

`tb/`: each testbench is self-checking and prints `TB_RESULT checks=N failures=M`.

| testbench | what it does |
|---|---|
| `tb_fpu` | 3000 random operations against a double-precision reference rounded to single (`tb_fp_pkg`), special values, and the divider's latency |
| `tb_msg_fifo` | random push and pop against a queue model |
| `tb_site_ibuf` | round-robin list behaviour |
| `tb_siteo` | forwarding and one-cycle turnout, PROG/UPDATE, streaming, in-place accumulation and offload, divide latency, vertical bus, back-pressure, both sides of the horizontal bus |
| `tb_sitem` | the one-SiteM matrix multiply, with latency; all 36 products must cross a horizontal bus |
| `tb_tile` | the three-SiteM convolution |
| `tb_mipu` | end to end on a Block reduced to 1 x 2 Tiles of 2 x 2 SiteMs (128 SiteOs). It runs the parallel matrix multiply across a Tile boundary, divides through two list entries, and stalls a full row to check that no message is lost. It counts each of these mechanisms. |

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert --top-module tb_mipu -Wno-fatal \
  rtl/mipu_pkg.sv tb/tb_fp_pkg.sv rtl/msg_fifo.sv rtl/site_ibuf.sv rtl/fpu.sv \
  rtl/siteo.sv rtl/sitem.sv rtl/tile.sv rtl/mipu.sv tb/tb_mipu.sv
./obj_dir/Vtb_mipu
```

**Size limits.** The full 4096-SiteO Block lints and elaborates with Verilator and
Yosys/slang. Verilator's lint of it takes a few minutes and several GB of memory.
Compiling a full-size simulation model takes much longer. The largest configuration
simulated is the 128-SiteO Block of `tb_mipu`, together with the 96-SiteO Tile of
`tb_tile`. No testbench exercises the full-size Block.
