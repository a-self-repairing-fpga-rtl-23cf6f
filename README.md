# MUXTREE: a self-testing, self-repairing fine-grained FPGA

MUXTREE is an FPGA whose logic element is a single two-input multiplexer
with one flip-flop. Each element checks itself all the time while the array
runs. When an element fails, the array repairs itself without a central
controller and without losing the state of the running circuit. The faulty
element is switched out, and the configurations of the elements to its right,
flip-flop contents included, slide one place east into a spare column.

Where the spare columns go, and how the array is cut into identical blocks,
is not hard-wired. Before configuration, a small cellular automaton grows
across the array from one corner and marks both. Each block then receives
the same bitstream in parallel. The intended use is an array of identical
small processors, one per block. More spare columns buy more robustness and
leave fewer elements for the application.

This repository holds synthesizable SystemVerilog for the FPGA layer: the
element, its self-test, its configuration register, the bus switch block, the
colonizing automaton and the array that ties them together with the repair
logic. The processor that runs in each block (its program interpreter and
program memory) is itself a configuration of the fabric, chosen by the
application, and is not part of this RTL.

## Files

| file | what it is |
|---|---|
| `rtl/muxtree_pkg.sv` | configuration word layout, encodings, mode and automaton types |
| `rtl/mux_unit.sv` | functional part of an element (M1 / M2): input selection, multiplexer, flip-flop, NOUT select |
| `rtl/self_test.sv` | TEST block: comparator, third flip-flop copy, majority vote |
| `rtl/creg.sv` | configuration register (shift register) with its test-sequence checker |
| `rtl/switch_block.sv` | bus switch block (SB) |
| `rtl/muxtree_element.sv` | one complete element, including its share of the repair protocol |
| `rtl/colonizer_cell.sv` | one cell of the colonizing automaton |
| `rtl/muxtree_array.sv` | top: `ROWS x COLS` array (default 4 x 5) |
| `tb/*_tb.sv` | one self-checking testbench per module |

## The element

```
            NOUT (north)            FAULT
              ^                       ^
   WIN --> [ M1 ] --FF_IN,NOUT--> [ TEST: COMP, D3, MAJ ] <--FF_IN,NOUT-- [ M2 ] <-- EIN
  WOUT <-- (M1 NOUT)                       |                    (M2 NOUT) --> EOUT
                                           v  majority
   buses N/E/S/W <--> [ SB ]            [ CREG: 17 config bits + 1 state bit ]
```

Each of M1 and M2 contains:
- a multiplexer whose two data inputs are picked from WIN, EIN, SIN, its own
  flip-flop, SIBUS, EIBUS, 0 or 1;
- a select line taken from one of the bus wires SIBUS, SOBUS, EIBUS or EOBUS;
- a flip-flop D1;
- an output multiplexer that shows either the flip-flop (sequential element)
  or the multiplexer (combinational element) on NOUT.

M1 drives NOUT, WOUT and the switch block. M2 drives EOUT. When both are
healthy they are identical.

**Self-test.** The functional part is duplicated. TEST compares the two
copies' NOUT and FF_IN (the multiplexer output) every clock and raises a
fault on any difference. A third flip-flop, D3, follows M1's FF_IN. The
majority of the three stored flip-flop values is the state that survives a
repair. The connections and the switch block are not tested at this level.

**Configuration word** (`elem_cfg_t`, 17 bits, MSB first):

| bits | field | meaning |
|---|---|---|
| 16:15 | `sb_n` | NOBUS source: 0 NOUT, 1 EIBUS, 2 SIBUS, 3 WIBUS |
| 14:13 | `sb_e` | EOBUS source: 0 NOUT, 1 NIBUS, 2 SIBUS, 3 WIBUS |
| 12:11 | `sb_s` | SOBUS source: 0 NOUT, 1 NIBUS, 2 EIBUS, 3 WIBUS |
| 10:9 | `sb_w` | WOBUS source: 0 NOUT, 1 NIBUS, 2 EIBUS, 3 SIBUS |
| 8 | `out_q` | NOUT = flip-flop (1) or multiplexer (0) |
| 7:6 | `sel_src` | select line: SIBUS, SOBUS, EIBUS, EOBUS |
| 5:3 | `in1_src` | input taken when select = 1 |
| 2:0 | `in0_src` | input taken when select = 0: WIN, EIN, SIN, Q, SIBUS, EIBUS, 0, 1 |

The CREG holds one **frame** of `FRAME = 18` bits: `{config, state}`. The
state bit is the initial flip-flop value after configuration, and the
carrier of the flip-flop value during a repair. Bits enter at the top and
leave from bit 0, so a frame is sent LSB (the state bit) first.

**CREG test.** The CREG cannot be checked by duplication. Instead, before
configuration, every CREG receives the same test sequence in parallel:
`FRAME` ones, `FRAME` zeros, then `FRAME` ones. A local counter in each
element checks that ones come out during the second third and zeros during
the last third. A stage stuck at either value breaks one of the two, and
`creg_fault` latches until reset. The fault is reported but not repaired.

## Colonization: blocks and spare columns

Every element also holds one cell of an automaton (`colonizer_cell`).
In mode `M_COLONIZE` a wave starts at the south-west corner. An element
becomes valid one clock after its west and south neighbours are. The whole
array is therefore covered in `ROWS + COLS - 1` clocks, and no element needs
to know the array size. Each element works out from its neighbours:

- `cx`, its place in the column pattern: `gap` active columns, then one
  spare. `gap = 0` means no spare columns.
- `bx`, its column within a block, counted over active columns only. A
  block may straddle a spare column.
- `by`, its row within a block.

From these follow the block boundaries (`w_bound_map`, `s_bound_map`) and
each element's place on its block's configuration path. The path enters at
the block's south-west element. It runs west to east on even block rows and
east to west on odd ones, and climbs one row at the block's edge. Spare
elements are not on the path; they pass it through. In mode `M_CONFIG`,
`cfg_in` feeds the entry element of every block at once. So a stream of
`bw * bh` frames configures every block identically. Within a block, the
frame sent first lands in the element at the end of the path.

With the default test set-up (`bw = 2, bh = 2, gap = 3`, 4 x 5 array),
columns 0, 1, 2 and 4 are active and column 3 is spare. The second block
uses columns 2 and 4. Its path is (0,0) -> (1,0) -> (1,1) -> (0,1), so the
stream carries the frames for (0,1), (1,1), (1,0), (0,0) in that order.

## Self-repair

This is the least obvious part of the design. It lives in
`muxtree_element.sv` (the protocol) and `muxtree_array.sv` (the rerouting).

**Rule.** Between two spare columns, each row can absorb one faulty element.

**Request and grant.** In `M_RUN`, an element whose comparator fires
asserts `fault_det`. A request travels combinationally east along the row
(`rep_e_out` -> `rep_w_in`) and stops at the next spare column. A grant
travels west from that spare column (`grant_w_out` -> `grant_e_in`). It is 1
only while the spare is still unused. Without a grant, for example on a
second fault in the same row segment or a fault right of the last spare,
the element raises `kill`. `kill` is sticky at the top. It is the hand-over
point to a coarser, block-level repair, which is not part of this RTL.

**Repair sequence.** Every element from the faulty one up to the spare takes
part, and all start in the same clock:

1. *capture*: the majority of the three flip-flop copies goes into the CREG
   state bit;
2. *shift*: `FRAME` clocks of shifting east over the configuration links, so
   every frame moves exactly one element to the right. The faulty element
   takes in zeros;
3. *reload*: each element loads its flip-flops from the state bit it
   received.

The faulty element is then `dead`. The others, the spare included, are
`shifted`: each now does the job of its west neighbour. A dead element and
an unused spare are transparent. They wire WIN to EOUT, EIN to WOUT, WIBUS to
EOBUS and EIBUS to WOBUS, so horizontal links need no other change.

**Keeping state.** A fault is seen combinationally in the clock it appears.
The top ORs every `fault_det` and every `busy` into `freeze`, which holds all
functional flip-flops of the array. The wrong value is therefore never
stored, and the majority vote sees clean copies. The run stops for one
detection clock plus `FRAME + 1` busy clocks (20 clocks by default). It then
resumes exactly where it stopped; `muxtree_array_tb` checks this clock by
clock.

**Vertical rerouting.** After a repair, the elements of one row sit one
column further east than their logical position. Vertical links (SIN from
the NOUT below, SIBUS/NIBUS from the buses below and above) therefore join
*logical* neighbours. An element at column `c` works as logical column
`L = c - shifted`. In the neighbouring row, logical column `L` sits at `L`,
or at `L + 1` if that row's element at `L` is dead or shifted. Each vertical
input is therefore a 3:1 choice among columns `c-1`, `c` and `c+1`, driven by
the dead/shifted flags. The edge ports `n_out`, `n_obus`, `s_obus`, `s_in`,
`s_ibus` and `n_ibus` are indexed by logical column, so the outside world
sees no change after a repair. Outputs of a spare column read 0: an unused
spare is transparent, and a used one no longer has a logical place.

## Modes and timing

`mode` (type `mode_e`) is driven from outside:

| mode | clocks | what happens |
|---|---|---|
| `M_COLONIZE` | `ROWS + COLS - 1` | automaton grows; `colonized` rises when done |
| `M_CTEST` | `3 * FRAME` (54) | CREG test sequence on `test_in` |
| `M_CONFIG` | `bw * bh * FRAME` | bitstream on `cfg_in`; flip-flops follow each frame's state bit |
| `M_RUN` | - | operation; repair costs `FRAME + 2` clocks of freeze |
| `M_IDLE` | - | nothing moves |

Outside `M_RUN`, and during a repair shift, the functional logic sees the
all-zero configuration. Half-loaded configurations therefore cannot close a
combinational loop. As in any FPGA, the fabric has structural combinational
loops: EOUT to the east neighbour's WIN and back through its WOUT, or NOUT
to the switch block and back into the select line. Lint tools report these
loops. A configuration must not close one with an odd number of inversions.

Two inputs exist to exercise the self-test and repair in simulation; tie
them to zero otherwise:
- `inject[r][c]` flips M1's multiplexer output in one element. The
  comparator sees it in the same clock.
- `upset[r][c]` inverts the value M1's flip-flop stores at one clock, like a
  radiation hit. The comparator sees it one clock later, provided NOUT shows
  the flip-flop. The majority of the three copies then restores the correct
  state during the repair.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself.
For example, the whole array:

```
verilator --binary --timing -Irtl rtl/muxtree_pkg.sv rtl/*.sv \
          tb/muxtree_array_tb.sv --top-module muxtree_array_tb -Mdir obj
./obj/Vmuxtree_array_tb
```

`muxtree_array_tb` runs the array at its default size. It colonizes, runs a
failing and a passing CREG test, and configures two designs: rows of shift
registers, then columns of shift registers, then combinational elements
with buses passed straight through. It injects faults that are repaired,
one that cannot be repaired (kill), and a flip-flop upset whose state is
recovered by the majority vote. A reference model of the
logical array predicts every output bit while the array is not frozen. At
the end it prints how often each mechanism happened. The leaf testbenches
(`mux_unit_tb`, `self_test_tb`, `creg_tb`, `switch_block_tb`,
`colonizer_cell_tb`, `muxtree_element_tb`) compare against independent
reference models with random stimulus. `fig1_colonize_tb` checks the
colonizing wave step by step: after step `t` exactly the elements with
`row + column + 1 <= t` are colonized, so a 4 x 4 region is covered after 7
steps.

## Faithfulness and own choices

These parts follow the published architecture:
- the two-level idea;
- the duplicated multiplexer and flip-flop with a comparator;
- the third flip-flop with a majority vote that keeps the state;
- the shift-register CREG, tested by a sequence loaded in parallel before
  configuration;
- spare columns set by the automaton, one repair per row between spares;
- the repair as a shift of the CREG to the right, carrying the majority
  result and using the configuration links;
- the automaton growing from one corner and the block-parallel bitstream.

These are this implementation's own choices:
- the configuration word (its fields, width and encodings);
- the switch-block routing options;
- the automaton's rules and the serpentine configuration path;
- the test sequence and its checker;
- the request/grant handshake and the global freeze;
- the exact 3:1 vertical rerouting;
- the array size of 4 x 5.

Only where the published drawing shows the majority voter fed by the
multiplexer outputs does this RTL knowingly differ: it votes over the three
stored flip-flop values, which is what keeps the state. Treat the encodings
as one consistent realisation, not as a bit-compatible reproduction.
