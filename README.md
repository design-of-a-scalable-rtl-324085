# Systolic synchronous memory

A RAM built as an N x N grid of small SRAM blocks, with an access time set by one small
block instead of by the whole array. Each block is a pipeline stage. An access moves one block
per clock cycle, always down one diagonal of the grid, and reads or writes its word in exactly
one block on the way. A new read or write can start every cycle. Read data appears a fixed
**N + 3 cycles** after the address, whatever the address. To make the memory larger, you make
the grid larger. The blocks, and so the cycle time, stay the same.

The default configuration is the 4 Kb test chip of the original design:

| | |
|---|---|
| array | 4 x 4 blocks |
| block | 16 word lines x 4 columns x 4-bit words = 256 b |
| total | 1024 words x 4 b = 4 Kb, 10-bit address |
| latency | 7 cycles from the address to the read data |
| throughput | one 4-bit read or write per cycle (800 Mb/s at the original 200 MHz) |

## Steering an access through the grid

The address is split from the top:

| bits (default) | field | use |
|---|---|---|
| `[9:8]` | x | grid row of the target block |
| `[7:6]` | y | grid column of the target block |
| `[5:4]` | B | upper half of the in-block row, decoded one-hot to 4 lines |
| `[3:2]` | A | lower half of the in-block row, decoded one-hot to 4 lines |
| `[1:0]` | col | in-block column, decoded one-hot to CSEL |

The grid has no direct path to block (x, y). Two chains of decoder stages feed it instead.
*Row decoders* run down the left edge, one per grid row. *Column decoders* run along the top
edge, one per grid column. Each decoder stage adds one register. An access therefore reaches
row decoder r r cycles after row decoder 0, and column decoder c c cycles after column decoder 0.

The primary decoder turns (x, y) into three small counters:

```
if x >= y:  RBA = x - y,  CBA = 0,      PD = x
else:       RBA = 0,      CBA = y - x,  PD = y
```

- **RBA** (row branch address) counts down by one per row decoder. The row decoder where it
  is zero raises **RBT** (row branch trigger) for its grid row.
- **CBA** (column branch address) does the same along the column decoders, and raises **CBT**
  in one grid column.
- **PD** (pipeline depth) counts the blocks left to the target.

The access enters the grid where RBT and CBT meet. That block is (x-y, 0) on the left edge when
x >= y, and (0, y-x) on the top edge otherwise. From there it follows the diagonal through
(x, y). Before it enters:

- **Left-edge entry.** Grid column 0 passes the column signals (CBT, CSEL, WEB, data) down,
  block by block, to the entry row.
- **Top-edge entry.** Grid row 0 passes the row signals (RBT, word line, PD, CE) to the right,
  to the entry column.

Each block lowers PD by one. PD reaches zero at block (x, y) in both cases. Example: x = 3, y = 1.

- The primary decoder gives RBA = 2, CBA = 0 and PD = 3.
- Row decoder 2 raises RBT. It also hands PD = 3 - 2 = 1 to block (2, 0).
- CBT has come down column 0 and meets RBT at block (2, 0). That block is the entry.
- The access moves diagonally to block (3, 1) with PD = 0, and the access happens there.

Each block decides what to forward from its two triggers:

| RBT | CBT | block action |
|---|---|---|
| 1 | 0 | forward to the right (used only in grid row 0) |
| 0 | 1 | forward downward (used only in grid column 0) |
| 1 | 1 | forward diagonally. If PD = 0 and CE = 1, also read or write its cells |
| 0 | 0 | nothing valid (the fields still advance) |

The access happens only at (x, y), because every other block on the diagonal has a non-zero PD.
On a read, the block puts its word onto the data field of the column signals. The word then
follows the rest of the diagonal to a block on the right or bottom edge. The output buffer of
that block drives the shared output bus.

## Why every access takes N + 3 cycles

The decoder chains hold an access back in the same way the grid moves it. Count one cycle for
the primary decoder and one per decoder or block register:

- Row decoder r has an access r + 1 cycles after it was sampled.
- Block (i, j) has it at 2 + max(i, j). This holds whether the access came from the left, from
  above, or along a diagonal.
- Every diagonal ends in the last row or the last column, where max(i, j) = N - 1.
- Adding the output buffer, data is on the bus N + 2 clock edges after the sampling edge.
  Counted from the cycle in which the address is presented, that is N + 3 cycles.

All in-flight accesses sit on different L-shaped fronts (max(i, j) = constant). So they never
collide, and at most one output buffer drives the bus in a cycle. A read after a write to the
same address always sees the new data, because both follow the same path at the same delay.

## Blocks (files in `rtl/`)

| module | role |
|---|---|
| `ssm_pkg` | default sizes, address-field widths |
| `primary_decoder` | input flip-flops; subtractor with borrow, two's complement for CBA, selection of RBA/CBA/PD; three one-hot partial decoders (PRA A, PRA B, PCA) |
| `row_decoder` | one per grid row: RBT = (RBA == 0), word line = PRA B x PRA A, PD and CE to its block; RBA-1, PD-1, PRA, CE to the next row |
| `col_decoder` | one per grid column: CBT = (CBA == 0), CSEL = PCA, WEB and data to its block; CBA-1, PCA, WEB, data to the next column |
| `mem_block` | access control (CE & RBT & CBT & PD == 0), PD decrementer, read/pass multiplexer, direction of the triggers, output registers; asserts one-hot selects on an access |
| `mem_cell_array` | the ROWS x COLS x K cells of one block; one-hot word line and column select; write on the clock edge, read in the same cycle |
| `output_buffer` | one per edge block (2N-1 of them): registers data and an enable RBT & CBT & WEB & CE |
| `output_data_bus` | combines the output buffers; asserts that at most one drives |
| `ssm_top` | connects everything as described above |

## Interface of `ssm_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | all registers use the rising edge |
| `rst_n` | in | 1 | asynchronous, active low; clears triggers and CE in every stage |
| `ce` | in | 1 | chip enable; an operation is issued in every cycle with `ce` high |
| `web` | in | 1 | 1 = read, 0 = write |
| `addr` | in | 2·log2 N + log2 ROWS + log2 COLS | address, fields as above |
| `idat` | in | K | write data |
| `odat_valid` | out | 1 | an output buffer drives the bus (low = bus floating) |
| `odat` | out | K | read data; 0 while `odat_valid` is low |

Parameters: `N` (grid size, power of two, at least 2), `ROWS` (word lines per block, power
of two, at least 4), `COLS` (columns per block, power of two, at least 2) and `K` (word width).
The defaults are 4, 16, 4 and 4. Total capacity is N² · ROWS · COLS · K bits. Latency depends
only on N.

## Choices not fixed by the original design

These are this implementation's own choices. Change them if your target differs.

- **Registers.** Each decoder stage and each block registers its outputs. The original text
  requires the stage counts (one for the primary decoder, one for the decoders, N in the grid,
  one for the output buffer) but does not say where the flip-flops sit in a block.
- **Clocking.** The original SRAM column latches input data on the falling edge and precharges
  in the low phase. It senses or writes on the rising edge. This model uses the rising edge
  only: it writes at the edge and reads combinationally within the cycle, and the block's
  output register captures the result.
- **CBA sign.** In the negative case CBA is y - x, the two's complement of x - y. Only this
  makes the column chain reach zero at the entry column.
- **Trigger gating.** The per-direction triggers (right only if CBT is low, down only if RBT is
  low, diagonal only if both are high) are one way to realise "RBT steers horizontally, CBT
  vertically, both diagonally".
- **CE.** CE travels with the row signals. It is required both for a cell access and for an
  output-buffer enable.
- **Word-line order.** The word line is WL[4·b + a] = B[b] & A[a]. So the row index is simply
  `addr[5:2]`.
- **Output bus.** The tri-state output bus is modelled as an AND-OR of the enabled buffers,
  with `odat_valid` in place of the floating state.
- **Reset.** Reset values are chosen so that nothing is accessed and the bus is idle while the
  pipeline fills.

Not modelled:

- The transistor-level column (6-T cells, sense amplifier, precharge).
- The pads.
- Clock gating of inactive blocks. It was only proposed for power, and in any cycle at most N
  of the N² blocks do useful work.

`mem_block` exposes its `validmem` (access this cycle) for observation. The top level leaves
those outputs, and the right/down outputs of blocks outside the first row and column, unused.
Lint reports them as unused signals. Lint also reports that `rst_n` is used both as an
asynchronous reset and as the synchronous disable of the assertions in `output_data_bus`
and `mem_block`. This is intentional.

## Verification

Each testbench is self-checking, has a watchdog, and ends with a `TB_RESULT checks=… failures=…`
line.

- `tb_ssm_top`: the full-size memory at its default parameters. It runs the
  write 1, write 2, read 1, read 2 sequence and measures 7 cycles of latency. Then it writes
  and reads all 1024 words back to back, then runs 6000 random reads, writes and CE-low cycles.
  A reference memory predicts the bus in every cycle. It counts, and requires at least once:
  - entry from the left edge, entry from the top edge, and entry at block (0, 0);
  - downward and rightward propagation;
  - an access of each of the 16 blocks, and a read through each of the 7 output buffers;
  - back-to-back read results, read-after-write inside the pipeline, and idle cycles.
- `tb_ssm_workloads`: 4 x 4 and 8 x 8 grids from 4 Kb to 4 Mb, all running at once through
  `ssm_harness`. Each writes and reads up to 4096 distinct addresses (every address up to
  16 Kb), runs random traffic, and checks a latency of 7 (4 x 4) or 11 (8 x 8) cycles. Blocks of
  larger memories have 2^r rows x 2^c columns of 4-bit words, with c = max(2, (log2 words − 2)/2).
- One unit testbench per module: `tb_primary_decoder` (all 1024 addresses), `tb_row_decoder`,
  `tb_col_decoder`, `tb_mem_block`, `tb_mem_cell_array`, `tb_output_buffer` and
  `tb_output_data_bus`.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/ssm_pkg.sv tb/tb_ssm_top.sv \
          --top-module tb_ssm_top -Mdir obj_top -o sim
./obj_top/sim
```

Replace `tb_ssm_top` with any other testbench name. Verilator finds the other modules through
`-Irtl -Itb`. `-Wno-fatal` keeps width warnings of the testbenches' random stimulus from stopping
the build.
