# Bit-serial SIMD arrays for low-level vision

This RTL describes three massively parallel image-processing machines. Each is
built from the same tiny bit-serial processing element (PE): one PE per pixel,
one bit of arithmetic per clock, with every PE obeying the same
micro-instruction. The machines differ only in how PEs talk to each other:

- **4NN**: a plain mesh. Each PE reads its north, south, east and west neighbours.
- **CAAPP**: the mesh is cut into 4 x 4 submeshes. Inside a submesh the PEs
  form a mesh whose edges wrap as a double spiral. Neighbouring submeshes are
  joined by a single link through a corner PE, so the inter-chip wiring drops
  from 32 lines to 8.
- **Pyramid**: a stack of layers of 1, 2x2, 4x4, ... PEs. Inside a layer each PE
  has eight neighbours. It also has one parent in the layer above and four
  children in the layer below, giving 13 links in all.

The machines were designed to fit superquadric models (a family of 3-D shapes)
to range images. That workload is a long run of bit-serial multiplies,
divides and square roots on every pixel at once. The design here is the
hardware only: the PE, the networks, the edge switches, image I/O, the
responder logic and a microcoded sequencer. The vision algorithms themselves
are not included.

## The processing element (`bsp_pe`)

A PE has five one-bit registers, A to E, and a 512 x 1 bit memory. Each clock
it executes one micro-instruction, 27 bits wide (`bsp_pkg::uinstr_t`):

| field | bits | meaning |
|---|---|---|
| `ia` | 1 | ignore activity: write even if A = 0 |
| `src_j`, `src_i` | 3 + 3 | operand sources: none, M, A, B, C, D, E, broadcast comparand |
| `fcn` | 5 | result: i, j, i XNOR j (compare), i+j+C, NAND, NOR, or a neighbour's E bit (N S E W, then NE NW SE SW, parent and four children on the pyramid) |
| `neg_i`, `neg_j`, `neg_r` | 3 | invert operand i, operand j, or the result |
| `dest` | 3 | none, A and C, A, B, C, D, E, M |
| `addr` | 9 | memory bit address |

Register A is the **activity bit**. A PE with A = 0 ignores every write unless
`ia` is set, which is how data-dependent work is done in SIMD form. Under ADD,
C holds the carry and is reloaded with the carry out every clock.
Subtraction is an ADD with C preset to 1 and one operand inverted. A
neighbour read returns the neighbour's E register, so E is the register that
moves data across the array.

Memory reads are combinational and writes take effect at the clock edge. This
gives the clock counts used throughout: copying a p-bit field takes 2p clocks
(one clock moves a bit into E, one writes it back), and a two-operand add
takes 2p+1 clocks.

## Edges, image I/O and responders

**Edge switches** (`edge_switch`) decide what a PE on the array edge reads
when it looks off the array. There are four modes:

- **wired-0** and **wired-1** return a constant.
- **torus** wraps each row and column onto itself.
- **spiral** joins the end of each row to the start of the next one, so that
  the whole array forms one long chain. Columns are joined the same way.

On the CAAPP the switches act on the grid of submeshes. On the pyramid each
layer has its own switches. The spiral wiring in detail, and the way diagonal
pyramid links wrap, are this design's choices.

**The border register** (`border_reg`) has one bit per PE along one edge:

| machine | edge | width |
|---|---|---|
| 4NN | south edge | COLS |
| CAAPP | east edge | one bit per row of submeshes |
| pyramid | south edge of the base | one bit per base column |

When `border_sel` is set, the register replaces that edge's input.

- **Image input:** an image bit plane enters by loading a row into the
  register from the device while the array reads its south neighbour. One
  clock moves one row. After ROWS clocks the plane sits in E and is stored
  in memory.
- **Image output:** this runs the other way. The array reads north, and the
  register captures the row leaving the south edge each clock.
- **On the CAAPP:** each register bit feeds a chain that snakes through a
  4-row band of the array, so a plane takes 4 x COLS clocks. The
  testbenches show the exact order (`ca_chain`).

**Responders** (`response_unit`) give two outputs, one clock after the E
bits settle:

- SOME/NONE, the OR of every E bit.
- COUNT RESPONDERS, the number of E bits that are set.

The count is written as a population count, which synthesis builds as an
adder tree. The original tree was a separate design, described only by its
latency (2.5 µs for 512 x 512 PEs).

## The array controller (`array_controller`)

A host sends routine calls, not micro-instructions. The controller holds up
to UC_DEPTH microcode words. Each word carries:

- a micro-instruction;
- a flag that adds the current pass number to its memory address;
- a choice of broadcast bit: a fixed value, or bit `pass` of a per-call
  pattern;
- an end-of-pass flag.

A call gives a start word, a loop word and a number of passes, normally the
operand width p:

- The first pass runs from the start word to the first end-of-pass word.
- Every later pass runs from the loop word.

In this way a routine such as "clear carry, then for each bit: M->E, E+M->M"
is written once for any p.

Handshake: `cmd_valid` is taken when `cmd_ready` is high. The first word
appears on `ui_o` one clock after that edge and executes in the PEs at the
next edge. `busy_o` falls as the last word is put on `ui_o`, so the routine
has fully taken effect one clock after `busy_o` falls. The host's
instruction set, the microcode format and the looping scheme are this
design's own. The original controller was described only as a microcoded
sequencer.

## Top level (`bsp_vision_system`)

The top places the three machines side by side. Each machine has its own
controller, and its ports carry the prefix `nn_`, `ca_` or `py_`. The
pyramid root's parent link is brought out as `py_parent_i` / `py_root_o`.
The defaults are as follows:

| parameter | built | original |
|---|---|---|
| array size (ROWS x COLS) | 64 x 64 | 512 x 512 |
| pyramid levels (LEVELS) | 7 | 10 |
| memory per PE (MEM_BITS) | 512 bits | 512 bits |

The parameters accept the full size. The defaults are smaller because a
full array holds 262144 PEs and 128 Mbit of flip-flop memory per machine,
more than the open-source compilers elaborate in reasonable time and memory.

## Where this departs from the original design

- Array sizes are reduced, as described above.
- **Micro-instruction field widths:** the field order and codes follow the
  original format, but its widths were not given, and this design chooses 27
  bits.
- **Carry under ADD:** every ADD reloads C with its carry, whatever the
  destination. Destination "A,C" writes the result to A and, outside ADD,
  also to C.
- **Eight-nearest-neighbour packaging:** the original relays diagonal links
  between chips through a small buffer, which is not built. The flat
  machines here are 4NN and CAAPP. The pyramid's in-layer diagonals are
  direct wires.
- **Memory for superquadric fitting:** the worst case needs 722 bits per PE
  (64-bit operands, 2 x 2 region), more than the 512 bits built. This gap is
  also present in the original.
- **Proposed later improvements are not built:** these are two activity bits,
  source-selectable communication and a double-buffered external memory.
- **Reset:** synchronous. It clears registers A to E and the controller, but
  not the PE memories.

## Simulating

Every block has a self-checking testbench in `tb/`, named `tb_<module>`. Each
prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wno-fatal -Wno-UNUSEDPARAM \
  rtl/bsp_pkg.sv rtl/*.sv tb/tb_bsp_vision_system.sv \
  --top-module tb_bsp_vision_system
./obj_dir/Vtb_bsp_vision_system
```

`bsp_pkg.sv` must come first, and the duplicate that `rtl/*.sv` adds is
harmless.

`tb_bsp_vision_system` is the end-to-end test. It drives 8 x 8 flat machines
and a 3-layer pyramid only through the top's ports, and covers:

- image input and output;
- broadcast writes;
- ADD2, checking the sums and the 2p+1 clock count;
- SELECT with the responder count and SOME/NONE;
- edge modes;
- pyramid parent and child reads.

It fails if any of these mechanisms never ran. The unit testbenches run the
networks at sizes from 4 x 6 to 8 x 12 against independent reference models,
and run the PE against a 4000-step random model.

There is no simulation of the top at its default size: three arrays of
13653 PEs with 512-bit memories build too slowly for a useful test. The
largest size simulated end to end is the one above. The networks are fully
parameterised, so the same code was checked at several small sizes.
