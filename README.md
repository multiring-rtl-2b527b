# MultiRing: a ring-memory accelerator for design rule checking

MultiRing checks layout design rules (minimum width, minimum spacing,
extension, enclosure) on a rasterised mask layout. The layout is a bit map
with one bit plane per mask layer. Instead of giving every pixel its own
processor (too much hardware) or streaming the whole map through one
processor pixel by pixel (too slow), MultiRing keeps the map in a **ring
memory** and gives each *row* of the map one small processor. Every row of
every layer is a closed shift register, so the whole map rotates past a
single column of processors, one column per clock. One full turn of the
ring, a **ring cycle**, applies one basic instruction to the whole map.
A design rule is a short program of such instructions, so rules can be
changed or added without touching the hardware.

This repository holds synthesizable SystemVerilog for the complete
accelerator (ring memory, row processors, serial I/O, instruction
decoder), a behavioural model of the dynamic shift-register cell meant
for the ring memory in silicon, and self-checking testbenches. Among them
are testbenches that run the four rule-checking programs end to end.

## The ring

```
            +---------------------- ring memory -----------------------+
  from PE ->| stage 0 -> stage 1 -> ...                  -> stage D-1 |-> I/O unit -> processor array (6 stages) -+
            +----------------------------------------------------------+                                          |
      ^                                                                                                           |
      +-----------------------------------------------------------------------------------------------------------+
```

* There are `NUM_LAYERS` = 4 planes, `ROWS` rows per plane and `COLS` bits per
  row ring. All of them shift together by one column per clock while `adv`
  is high.
* The ring memory has `D = COLS - 6` stages. The other 6 positions of each
  ring are the pipeline registers inside the row processor. So a column
  leaving the memory comes back to the same place after exactly `COLS`
  clocks, and a ring cycle is `COLS` clocks.
* The I/O unit sits in the ring just before the processors and has no
  register of its own. It sees each column once per ring cycle, as the
  processors do.
* The controller counts columns (`col_ptr`, modulo `COLS`) as they pass
  the I/O/processor input. Every instruction starts when column 0 is
  there. If the host issues an instruction in the middle of a turn, the
  controller waits, with the ring still turning, until column 0 comes
  round. That wait is at most `COLS - 1` clocks.
* Orientation used throughout: row 0 is the top (north) row, column 0 is
  the left (west) column. Columns enter the processors in increasing order.

Because the map sits in the ring, nothing is addressed. An instruction
reads the whole map and writes the whole map in one pass.

## The row processor and its 3x3 window

This is the part that needs the most care. Each row processor
(`mr_unit_processor`) sees the four layer bits C1..C4 of its own row, one
column per clock. It has to compute, for the pixel in the *current*
column, a function of a 3x3 neighbourhood:

```
  U-  U0  U+      U = row above (north), from the processor above
  C-  C0  C+      C = own row
  L-  L0  L+      L = row below (south), from the processor below
  -: column before (west)   0: current column   +: column after (east)
```

The processor gets the column neighbours from time. A 4x1 switch picks
the window's layer, and its bit goes through a 3-stage shift register.
The newest bit is `C+`, the one before it `C0`, the oldest `C-`. The rows
above and below are handled in space: each processor sends its
`(C-, C0, C+)` to both neighbours, and all rows run in lock-step under the
same control word.

Pipeline of one column, in enabled clocks (`adv` high) after it leaves
the ring memory:

| clock | window path | Boolean path | data path |
|------:|-------------|--------------|-----------|
| 0 | input register C1..C4 | 4x2 switch + Boolean module (comb.) | input register |
| 1 | column in `C+` | Boolean result, reg 1 | delay 1 |
| 2 | column in `C0`, window complete; resize/detect (comb.) | reg 2 | delay 2 |
| 3 | window result registered | reg 3 | delay 3 |
| 4 | 2x1 switch output registered = **Po** | | delay 4; merge Po into dest (comb.) |
| 5 | | | output register C'1..C'4, to ring memory |

The four-clock delay of C1..C4 brings the unchanged layers into phase with
Po, as the output stage needs. Po then replaces the destination layer
(**write**) or is ORed into it (**paint**); the other three layers pass
unchanged.

A control word (`mr_ctl_t`) enters with every column and travels down the
pipeline with it. Two instructions can therefore follow each other with no
gap: the last columns of one are still in the pipeline while the first
columns of the next enter.

**Map edges.** A pixel outside the map reads as 0. For rows this is
structural: row 0 gets zeros for U, and the last row gets zeros for L.
For columns, the controller flags column 0 and column `COLS-1`. When a
window is centred on one of them, the processor clears `C-` or `C+` in its
own window and in the copy it sends to its neighbours. Without this, the
right neighbour of the last column would be column 0 of the *next* pass,
already rewritten.

**Why writing back in place is safe.** An instruction may read and write
the same layer, for example `SHR_NE(2,2,0)`. The window always holds the
values as they were read. Results go only to the ring memory, which
returns them a full ring cycle later, and they never reach the window
registers of the same pass. So every instruction behaves as if it worked
on a snapshot of the map.

## Instruction set

Host instruction word `mr_instr_t`, 11 bits:

| bits | field | meaning |
|------|-------|---------|
| 10:7 | `op` | opcode, table below |
| 6:5 | `src1` | first source layer; window layer; mr-OUT layer |
| 4:3 | `src2` | second source layer (AND, OR) |
| 2:1 | `dest` | destination layer; mr-IN layer |
| 0 | `paint` | 1: OR result into dest; 0: overwrite dest |

| code | op | result per pixel (window on `src1`) |
|-----:|----|--------------------------------------|
| 0 | AND | src1 & src2 |
| 1 | OR | src1 \| src2 |
| 2 | NOT | ~src1 |
| 3 | COPY | src1 |
| 4 | SHR_NE | C0 & C- & L0 & L- |
| 5 | SHR_NW | C0 & C+ & L0 & L+ |
| 6 | SHR_SE | C0 & C- & U0 & U- |
| 7 | SHR_SW | C0 & C+ & U0 & U+ |
| 8 | EXP_NE | C0 \| C- \| L0 \| L- |
| 9 | EXP_NW | C0 \| C+ \| L0 \| L+ |
| 10 | EXP_SE | C0 \| C- \| U0 \| U- |
| 11 | EXP_SW | C0 \| C+ \| U0 \| U+ |
| 12 | INDTC | C0 & (~U0~L0 + ~C-~C+ + L-U+~U-~L+ + U-L+~L-~U+) |
| 13 | EXDTC | ~C0 & (U0L0 + C-C+ + L-U+~U-~L+ + U-L+~L-~U+) |
| 14 | IN | load layer `dest` from the host |
| 15 | OUT | send layer `src1` to the host |

**Resizing.** An exact expansion by one grid unit would push every edge
out by half a unit, which a pixel grid cannot represent. So each
instruction moves by a whole unit, toward one corner. `EXP_NE` grows a
shape by one pixel to the north and to the east. `SHR_NE` removes one
pixel from the south and west edges, which leaves the shrunk shape shifted
toward the north-east. Pairing an NE operation with an SW one gives a
symmetric result. For example, `EXP_NE` then `EXP_SW` grows a shape by one
pixel on all four sides.

**Detection.** `INDTC` marks a set pixel that belongs to a feature less
than two pixels wide. The terms cover the vertical, horizontal and both
diagonal directions; two squares touching only at a corner are caught by
the diagonal terms. A pixel at the outside corner of a polygon is not
marked. `EXDTC` marks a clear pixel in a gap less than two pixels wide.
Wider rules are checked by repeating a shrink (or an expansion) and a
detection.

## Host interface and timing (`multiring`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset (clears the map) |
| `instr_valid`, `instr`, `instr_ready` | in, in, out | instruction handshake; taken on a clock where valid and ready are both high |
| `busy` | out | an instruction is running |
| `sin_valid`, `sin_data`, `sin_ready` | in, in, out | serial bit stream for mr-IN |
| `sout_valid`, `sout_data`, `sout_ready` | out, out, in | serial bit stream for mr-OUT |

* **Processor instructions** take one ring cycle, `COLS` clocks, once
  column 0 arrives. `instr_ready` rises in the last column, so an
  instruction offered ahead of time starts in the very next clock. A
  stream of instructions therefore runs at one instruction per `COLS`
  clocks, whatever the map height.
* **mr-IN** sends the map column by column, from column 0, and within a
  column from row 0. The ring stops while the `ROWS` bits of a column
  come in. It then moves one clock, and in that clock the I/O unit writes
  the bits into the destination layer of the passing column.
* **mr-OUT** works the other way. The ring moves one clock while a column
  of the source layer is captured, then stops while its `ROWS` bits go
  out.
* If the host never waits, either transfer takes `COLS * (ROWS + 1)`
  clocks. Host gaps on either handshake only stretch the transfer.

## Design-rule programs

The rule checks are instruction sequences sent by the host. Layers 2 and 3
are scratch layers, and errors collect in layer 3.

* **Width, n lambda, layer A.** `INDTC(A,3,0)`; `COPY(A,2,0)`; then n-2
  times `SHR_NE(2,2,0)`, `INDTC(2,3,1)`. Features narrower than n are
  marked.
* **Spacing within a layer, n lambda.** The same program with `EXDTC` and
  `EXP_NE`.
* **Spacing between layers A and B, n lambda.** First `EXP_NE` both
  layers, AND them into layer 2 and run `INDTC` into layer 3; this marks
  zero spacing. Then `EXP_NE` each layer n-1 more times and `SHR_SW` each
  n times, which fills bays narrower than n inside each layer. Then OR the
  layers into layer 2 and run the intra-layer spacing check on it. That
  check begins with a write-mode `EXDTC` into layer 3, so as written the
  zero-spacing marks are overwritten. To keep them, paint instead.
* **Extension of B over A by n (and enclosure).** `EXP_NE(B,B,0)`;
  `EXP_SW(B,B,0)`; `NOT(A,A,0)`; `AND(B,A,2,0)`; then the width check with
  n+1 on layer 2.

These programs change layers A and B, so reload them before the next rule.

## Parameters and size

| parameter | default | where | notes |
|-----------|--------:|-------|-------|
| `NUM_LAYERS` | 4 | `mr_pkg` | fixed: the 4x1 and 4x2 switches select among four layers |
| `ROWS` | 64 | `multiring` | map height = number of row processors |
| `COLS` | 64 | `multiring` | map width = ring length; must exceed 6 |

The map size is this design's choice; the architecture puts no limit on
it. Cost grows as `4 * ROWS * COLS` flip-flops for the map, plus a row
processor per row: about 33 flip-flops and 75 word-level cells each, once
synthesis has merged the control registers that all rows share. The
default build has about 17,000 flip-flops. Processing time grows with `COLS` only. A real
layout of 1000 x 1000 pixels or more needs much larger parameters, or
tiling of the layout.

## Where this RTL makes its own choices

The architecture, the processor's block structure, the instruction set,
the detection equations and the rule programs follow the published
design. The following were not specified there and were decided here:

* Flip-flops with a shift enable in the ring memory, where the intended
  silicon uses two-phase dynamic shift registers. Dynamic cells cannot be
  stopped for long, because the charge leaks. A version that must not
  stop would transfer one column per ring cycle instead. The cell itself is
  modelled in `mr_dyn_shift_cell`, but it is not instantiated in the top.
* Where the I/O unit taps the ring (in series, before the processors), its
  width (one column), the serial bit order and both handshakes.
* The pipeline registers inside the row processor and the control word
  that travels with each column.
* Zeros outside the map, including at the first and last column.
* The orientation of the resize instructions: `EXP_NE` grows north and
  east, as its name says.
* The opcode numbers and the instruction word layout.
* Reset to zero of all state and of the map.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|-----------|----------------|
| `tb_mr_boolean` | all opcodes, all operand pairs |
| `tb_mr_resize_detect` | all 512 windows under all 16 opcodes, plus named patterns (isolated pixel, diagonal contact, polygon corner, one-pixel hole) |
| `tb_mr_output_stage` | five-clock alignment, write/paint/pass, holding while `adv` is low |
| `tb_mr_unit_processor` | random column, control and neighbour streams with random stalls; window and result against a model |
| `tb_mr_processor_array` | 60 random 8x12 maps, one instruction each, back to back; every pixel against a 2-D model |
| `tb_mr_ring_memory` | delay of `DEPTH` enabled clocks, holding, closed-ring recirculation |
| `tb_mr_io_unit` | serial in, load into one layer only, capture, serial out |
| `tb_mr_controller` | write-back windows aligned to column 0, back-to-back issue, mr-IN and mr-OUT sequencing under host gaps |
| `tb_mr_dyn_shift_cell` | 8-cell ring of the dynamic cell under a two-phase clock |
| `tb_multiring` | full size (64 x 64): random programs of all 14 processor instructions in both modes, the four rule programs, all layers read back and compared with a model of the instruction set; one instruction per `COLS` clocks; `COLS*(ROWS+1)` clocks per transfer; host gaps, ring stalls, alignment waits and map-edge windows all exercised |
| `tb_multiring_drc` | full size: each rule program on hand-drawn layouts, with known legal and illegal cases, checked by region |

Run one with Verilator 5 from the repository root, for example:

```
verilator --binary --timing --assert -Irtl rtl/mr_pkg.sv tb/tb_multiring.sv --top tb_multiring -Mdir obj -o sim
./obj/sim
```

The block testbenches run in well under a second. The two full-size ones
need under a minute to compile and about a second to run. Verilator has no X state, so all
state in the design is reset.

## Files

* `rtl/mr_pkg.sv` – layer count, opcodes, instruction and control types.
* `rtl/multiring.sv` – top level.
* `rtl/mr_ring_memory.sv` – ring memory.
* `rtl/mr_io_unit.sv` – serial/parallel I/O unit.
* `rtl/mr_controller.sv` – instruction decoder and controller.
* `rtl/mr_processor_array.sv` – one row processor per map row, neighbour wiring.
* `rtl/mr_unit_processor.sv` – row processor: switches, window register, pipeline.
* `rtl/mr_resize_detect.sv` – resizing and detection on the 3x3 window.
* `rtl/mr_boolean.sv` – AND, OR, NOT, COPY.
* `rtl/mr_output_stage.sv` – four-clock delay and write/paint merge.
* `rtl/mr_dyn_shift_cell.sv` – behavioural model of the two-phase dynamic
  shift-register cell (not synthesizable logic).
