# A parameterised, statically scheduled CGRA

This is the RTL of a coarse-grained reconfigurable array (CGRA): a grid of
small processing elements (PEs), each holding an ALU, that are wired to
their neighbours and configured word by word at run time. A kernel is
mapped by telling each PE which operation to perform, where its operands
come from, how long to hold each operand back, and where to send its result.
Data then streams through the array, one new input set per clock, with no
handshakes: the schedule is fixed when the array is configured.

The design is *orthogonal*. Five concerns wrap each other around the ALU and
are set independently:

1. **ALU**: the operation set (`pe_alu`).
2. **Elastic queues**: a programmable delay in front of each ALU operand
   (`elastic_queue`).
3. **Routing**: what goes out of the PE, the ALU result or a passing neighbour
   value (`pe_router`).
4. **Interconnect**: which PEs are neighbours: mesh, one-hop, diagonal or
   hexagonal (`hpcgra`).
5. **Configuration**: a pipelined bus that reaches every PE (`cfg_bus`), plus
   each PE's configuration registers (`pe`).

Array size, data width, neighbour pattern, routing style and queue depth are
separate parameters of the top module `hpcgra`. They combine freely, and the
same PE wrapper serves every combination.

## Files

| file | content |
|---|---|
| `rtl/cgra_pkg.sv` | operation codes, pattern and routing enums, configuration word `pe_cfg_t`, neighbour-offset functions |
| `rtl/pe_alu.sv` | combinational ALU with a per-PE operation mask |
| `rtl/elastic_queue.sv` | 0..DEPTH-cycle delay line |
| `rtl/pe_router.sv` | no / one / full routing with registered outputs |
| `rtl/pe.sv` | PE wrapper: config registers, operand select, queues, ALU, router |
| `rtl/cfg_bus.sv` | row/column configuration pipeline |
| `rtl/hpcgra.sv` | top: PE grid, neighbour wiring, external ports |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_hpcgra_full` |

## The processing element

```
            nb_in[0..N-1], ext_in ("load"), constant register
                 |            |            |
            src[0] mux   src[1] mux   src[2] mux       (per operand)
                 |            |            |
           queue dly[0]  queue dly[1]  queue dly[2]    0..EQ_DEPTH cycles
                 a            b            c
                  \           |           /
                        pe_alu (op)                   combinational
                             |
              ALU result + nb_in[0..N-1]
                             |
                     pe_router (route)                registered outputs
                             |
              nb_out[0..N-1], ext_out ("store")
```

**Operations.** These are the codes of `cgra_pkg::alu_op_e`. All arithmetic wraps
modulo 2^DW, so signed and unsigned data give the same bits.

| op | result | | op | result |
|---|---|---|---|---|
| `add` | a+b | | `madd` | a*b+c |
| `sub` | a-b | | `addadd` | a+b+c |
| `mul` | a*b (low DW bits) | | `subsub` | a-b-c |
| `and` | a&b | | `addsub` | a+b-c |
| `or` | a\|b | | `mux` | c≠0 ? b : a |
| `not` | ~a | | `pass` | a |
| `nop` | 0 | | | |

The parameter `ISA` of `pe`/`pe_alu` is a bit mask over these codes. A code
whose bit is clear yields 0, and synthesis removes its logic. The top's
`HALF_MUL=1` uses this to remove `mul` and `madd` from every PE where r+c is
odd, which leaves half the PEs, in a checkerboard, with a multiplier.

**Operand sources.** Each operand selects one of these:
- a neighbour input slot, 0..N-1;
- `SRC_LOAD` (14), the external input. This exists only in input PEs and reads 0 elsewhere;
- `SRC_CONST` (15), the PE's constant register, written along with its configuration.

**Routing styles.** The parameter `ROUTE` sets how a PE's outputs are driven:
- `ROUTE_NONE`: every output carries the ALU result.
- `ROUTE_ONE`: a single multiplexer picks the ALU result or any one neighbour
  input, and drives all outputs. Its select is `route[0]`.
- `ROUTE_FULL`: a crossbar. Output j picks its own source with `route[j]`, so the
  PE can compute and forward unrelated values at the same time.

A route select of 0 means the ALU result, and k+1 means neighbour input k. Output
slots 0..N-1 go to the neighbours. Slot 8 (`STORE_SLOT`) is the external output
of an output PE.

## Timing: how a schedule is built

This is the part that matters when mapping a kernel by hand.

- The ALU is combinational. **Every PE output is a register.** A value therefore
  takes exactly one clock per PE it leaves, whether that PE computed it or only
  routed it through. This also means no configuration can close a
  combinational loop between PEs.
- An operand delayed by `dly` cycles in its queue is the selected source from
  `min(dly, EQ_DEPTH)` cycles earlier. A `dly` of 0 is a direct path. On a PE
  built with `EQ_DEPTH=0` a requested delay is silently dropped, and the
  operands of that PE stay misaligned.
- For a value entering at input PE (r,0) on cycle t, the external output of an
  output PE shows a result at t + (number of PEs passed) + (the queue
  delays on the way).

The queues exist to balance paths of different length. Take the vector sum
`c = a + b` on a 2x2 array (PE ids 0 1 / 2 3):

```
PE0: pass  a = load                 route alu -> south (to PE2)
PE2: add   a = load, delay 1        b = north (PE0)     route alu -> east
PE3: pass  a = west (PE2)           route alu -> store
```

`a[i]` enters PE0 and `b[i]` enters PE2 in the same cycle. PE0's result
reaches PE2 one cycle later, so PE2 holds its own `load` back by one cycle.
After that PE3 emits `a[i]+b[i]` three cycles after the inputs. On a wider
array, route-through PEs in the same row add one cycle each. In the 9x9
testbench the sum arrives COLS+1 = 10 cycles after its inputs.

## Configuration

A configuration word is `{cfg_valid, cfg_id, cfg_word, cfg_const}`:

| field | bits | meaning |
|---|---|---|
| `cfg_id` | clog2(ROWS·COLS) | target PE, id = r·COLS + c (row 0 at the top) |
| `cfg_word.op` | 4 | operation |
| `cfg_word.src[2:0]` | 3×4 | operand sources for c, b, a |
| `cfg_word.dly[2:0]` | 3×3 | queue delays for c, b, a |
| `cfg_word.route[8:0]` | 9×4 | route select per output slot (slot 8 = store) |
| `cfg_const` | DW | constant register |

`cfg_bus` puts one register beside every PE. A word entering the bus goes
down column 0 and, from each column-0 register, along that row, so rows and
columns are covered in parallel. The register beside PE (r,c) holds the word
r+c+1 clock edges after it entered. The PE whose id matches loads the word on
the next edge. The farthest PE is thus configured ROWS+COLS edges after its
word was presented (18 on 9x9).

A new word can enter every cycle, so a whole array is configured with
ROWS·COLS words in ROWS·COLS cycles, plus that pipeline depth. A single PE can
be rewritten at any time while the rest of the array keeps streaming. The
testbench does this to switch one PE from `add` to `sub` mid-run.

After reset every PE is a `nop` (all route selects 0). Its outputs then carry 0.

An assertion in `hpcgra` flags a configuration word whose id is outside the array.

## Neighbour patterns

Every PE has one input and one registered output per neighbour slot. The
slots are fixed per pattern, and slots 0..3 are always north, east, south, west.

| `PATTERN` | slots | extra slots |
|---|---|---|
| `PAT_MESH` | 4 | none |
| `PAT_ONE_HOP` | 6 | 4: two columns east, 5: two columns west |
| `PAT_DIAGONAL` | 8 | 4: NE, 5: NW, 6: SE, 7: SW |
| `PAT_HEXAGONAL` | 6 | 4: up-diagonal, 5: down-diagonal. They point west in even rows and east in odd rows (an offset-row honeycomb) |

Links that would leave the array read 0. The PEs of column 0 are input PEs,
with `in_data[r]` as their `load`. The PEs of the last column are output PEs,
with `out_data[r]` as their `store`.

## Parameters of `hpcgra`

| parameter | default | meaning |
|---|---|---|
| `ROWS`, `COLS` | 9, 9 | array size |
| `DW` | 16 | data width |
| `PATTERN` | `PAT_MESH` | neighbour pattern |
| `ROUTE` | `ROUTE_FULL` | routing style of every PE |
| `EQ_DEPTH` | 2 | largest queue delay (0 removes the queues) |
| `HALF_MUL` | 0 | remove the multiplier from half the PEs |
| `PE_ROUTE` | all `ROUTE` | per-PE routing style, indexed by id |
| `PE_EQ` | all `EQ_DEPTH` | per-PE queue depth |
| `PE_ISA` | all operations | per-PE operation mask (`HALF_MUL` applies on top) |

The default is the smallest array size of the published evaluation, in its
16-bit form. The evaluated configurations map onto the parameters as follows:
- sizes 9x9, 18x18 and 36x36;
- every combination of pattern, routing style and queue depth 0, 2 and 4;
- a 46x66 array of 4-bit PEs in which half the PEs multiply: `ROWS=46 COLS=66 DW=4 HALF_MUL=1`.

The 46x66 configuration passes verilator lint.

## Where this RTL goes beyond, or departs from, its source description

The original is a generator that emits one Verilog netlist per JSON description. Every
PE there can have its own type, neighbour list, routing style, queue size and
operation list. This RTL is instead one parameterised array:
- Routing style, queue depth and operation set can differ per PE, through the
  array parameters `PE_ROUTE`, `PE_EQ` and `PE_ISA`, indexed by PE id.
- The neighbour pattern, the input and output columns and the data width are
  shared by all PEs.
- Arbitrary neighbour lists would need a new wiring table.

The following are this design's own choices, not given by the source:
- the configuration word layout and the operation encodings;
- three ALU operands;
- the operand order of the ternary operations and the meaning of `mux`;
- the register at every PE output;
- which two extra neighbours one-hop uses (descriptions of one-hop differ: "neighbours'
  adjacent neighbours", that is 8, versus six neighbours. Six are used here);
- the hexagonal slot layout;
- the checkerboard for `HALF_MUL`;
- the reset behaviour;
- the clamping of queue delays above `EQ_DEPTH`.

Two parts of the original are not included:
- the JSON front end and the assembler, which are software. Configuration
  words are written directly here; the testbenches build them with small
  helper functions;
- a memory (AXI) interface, which the original names only as future work.

The "elastic" queues are fixed-latency delay lines set at configuration time.
Nothing stalls, and there is no valid or back-pressure signal. Results are
meaningful only on the cycles the schedule says.

## Verification

Every module has a self-checking testbench that computes its expected values
independently and ends with one `TB_RESULT checks=N failures=M` line:

- `tb_pe_alu`: every operation code on random operands, and with and without a multiplier.
- `tb_elastic_queue`: depths 0, 2 and 4, every delay 0..7, against an input history.
- `tb_pe_router`: the three routing styles side by side, with random selects including out-of-range ones.
- `tb_cfg_bus`: a 5x7 bus. It checks the r+c+1 latency of every register on every cycle and the corner latency.
- `tb_pe`: 60 random configurations of a full-routing PE with random data.
  - Neighbour, load and constant sources with delays 0..3.
  - Every output is compared with a reference model.
  - Words for another id must be ignored.
- `tb_hpcgra`, end to end.
  - A default 9x9 array is fully configured over the bus and runs the vector sum and `a*a + K1 - K2`, with route-through, on random data.
  - One PE is reconfigured mid-run while the other kernel keeps producing results.
  - The configuration latency of the corner PE is measured.
  - Four 5x6 arrays (mesh/full, one-hop/one, diagonal/none with `HALF_MUL`, hexagonal/full) check every neighbour link of every PE against an independent table of the patterns. They also check the removed multipliers.
  - Each mechanism is counted, and one that never occurs is a failure.
- `tb_hpcgra_examples`: the two published 2x2 examples.
  - The vector-sum program runs instruction for instruction on a 2x2 mesh.
  - A heterogeneous 2x2 runs with its own routing, queue depth and operation set per PE. One PE is then asked for an operation it lacks, and its result must be 0.
- `tb_hpcgra_sweep`: one kernel on twelve 3x4 arrays.
  - The arrays cover every pattern with every routing style, at queue depths 0, 2 and 4.
  - With depth 0 the requested one-cycle delay cannot be applied. The test then checks the predicted one-cycle misalignment of the two operands.
- `tb_hpcgra_full`: the 9x9 part of `tb_hpcgra` alone, with the top at its default parameters.

Each testbench was also run against a deliberately broken copy of its module,
and it failed.

Not verified: clock frequency, area, and arrays larger than 9x9 in simulation.
Sizes up to 46x66 were only elaborated and linted.

## Simulating

With verilator 5 (the package file must come first):

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_hpcgra \
    rtl/cgra_pkg.sv rtl/pe_alu.sv rtl/elastic_queue.sv rtl/pe_router.sv \
    rtl/pe.sv rtl/cfg_bus.sv rtl/hpcgra.sv tb/tb_hpcgra.sv
./obj_dir/Vtb_hpcgra
```

Use the same command for the other testbenches, with their module and the files they need.
Building `tb_hpcgra` takes about two minutes, because it elaborates five arrays.
The simulation itself finishes in well under a second.
