# MUXTREE: a self-testing, self-repairing multiplexer FPGA array

MUXTREE is a fine-grained programmable array. Each element is one node of a
binary decision tree: a 2-to-1 multiplexer with an optional flip-flop. The
array is meant to sit under a higher "cellular" layer that copies living
tissue: the array is cut into cells, and every cell runs the same program.
This RTL covers the layer below the cells. The array finds its own faults and
works around them, so that small defects never reach the cellular level:

* **On-line self-test.** Each element holds two copies of its logic. The
  copies are compared every clock.
* **Off-line test of configuration storage.** A test pattern is shifted
  through every configuration register, and a small detector at each end
  catches any stuck bit.
* **Self-repair with spare columns.** When an element fails, its
  configuration and its flip-flop state move one column to the right, up to
  the next spare column. The failed element then becomes transparent. While
  this shift runs, the array is off-line for 21 clocks.
* **Colonization.** A symbol stream sets up a small cellular automaton. The
  automaton decides where the cell boundaries and the spare columns are, so
  they are not fixed in silicon. The configuration stream then weaves
  through each cell and skips the spares.

If a row cannot absorb a fault, it raises `kill`. This signal is meant for
the cellular level, which would repair the fault at its own, coarser scale.
That level is not part of this RTL.

## The MUXTREE element

Functionally, an element (`mt_func`) looks like this:

```
            LEFT (CREG[18:16])  ┐
 8 sources                      ├─ 2:1 ── FF_IN ──┬── F ── FF_OUT
            RIGHT (CREG[14:12]) ┘   ^              │          │
                                    │              └─ REG ────┴── NOUT
                      EB: EIBUS or EOBUS       (R: FF_OUT or FF_IN)
```

* **Input selectors.** Two 8-to-1 selectors pick the two data inputs of the
  decision multiplexer. Both choose from the same eight sources: constant 0,
  constant 1, SIN, EIN, WIN, FF_OUT, SIBUS and SOBUS.
* **Decision multiplexer.** It takes LEFT when its control is 1 and RIGHT
  when it is 0. The control is a bus: EIBUS or the element's own EOBUS, as
  chosen by the EB bit.
* **Output.** NOUT is either the multiplexer output itself or flip-flop F,
  as chosen by the R bit.
* **INIT.** F loads its preset value P whenever INIT is high.
* **Neighbour links.** NOUT goes north, into the SIN of the element above.
  EOUT and WOUT both repeat SIN sideways. So a node reads its children in the
  decision tree through SIN, WIN and EIN.

The switch block (`mt_switch_block`) routes four one-bit buses. Each outgoing
bus is a 4-to-1 multiplexer over the three other incoming buses plus NOUT:

| output | select      | 0     | 1     | 2     | 3    |
|--------|-------------|-------|-------|-------|------|
| NOBUS  | CREG[11:10] | SIBUS | EIBUS | WIBUS | NOUT |
| SOBUS  | CREG[9:8]   | NIBUS | EIBUS | WIBUS | NOUT |
| EOBUS  | CREG[7:6]   | WIBUS | NIBUS | SIBUS | NOUT |
| WOBUS  | CREG[5:4]   | EIBUS | NIBUS | SIBUS | NOUT |

The 20-bit configuration word (`mt_pkg::creg_pack` builds one):

| bits  | 19 | 18:16 | 15 | 14:12 | 11:10 | 9:8 | 7:6 | 5:4 | 3 | 2 | 1 | 0  |
|-------|----|-------|----|-------|-------|-----|-----|-----|---|---|---|----|
| field | 0  | LEFT  | 0  | RIGHT | N     | S   | E   | W   | 0 | P | R | EB |

8:1 source codes: 0 = `0`, 1 = `1`, 2 = SIN, 3 = EIN, 4 = WIN, 5 = FF_OUT,
6 = SIBUS, 7 = SOBUS.

## Self-test inside an element

`mt_element` contains five parts:

* the switch block;
* two identical functional copies, M1 and M2;
* a TEST unit (`mt_test_unit`);
* the configuration register CREG (`mt_creg`);
* the chain detector (`mt_chain_check`).

How the test works:

* **Comparison.** M1 and M2 see the same inputs and the same
  configuration. Only M1 drives the outputs. Every clock, the TEST unit
  compares the copies' NOUT and FF_IN values (FF_IN is the value about to
  enter the flip-flop). A mismatch raises `func_fault`. Because FF_IN is
  compared too, a fault on the path into the flip-flop is caught even when
  NOUT is taken straight from the multiplexer.
* **Third flip-flop.** The TEST unit holds a third flip-flop, D3. It loads
  like the other two.
* **Configuration chain.** One serial shift chain runs through each element:

```
chain_in -> F(M1), F(M2), D3  ->  majority  ->  CREG[19] ... CREG[0]  -> chain_out
```

  A configuration word therefore loads CREG[0] first and the flip-flops
  last (21 bits per element, `mt_pkg::CHAIN_W`). The same chain moves an
  element's contents into its neighbour during a repair. Because the word
  passes through the majority of the three flip-flops, the correct state
  survives when one copy has failed. That is why on-line repair keeps the
  computation going.

* **Quiet outputs while shifting.** While an element shifts, its NOUT and
  bus outputs are held at 0. A partly shifted configuration could otherwise
  close an oscillating loop through the array.

## Testing the configuration registers

Most of an element is configuration storage, and a stuck bit there changes
what the element computes without making M1 and M2 disagree. Such faults are
found off-line, before configuration:

* **The pattern.** In TEST mode, every element (spares included) shifts in
  the 22-bit pattern `1 0 0 … 0 1 1` in parallel.
* **What the detector watches.** `mt_chain_check` looks at two points of the
  chain:
  * the chain input and the first stage ("tail");
  * the last two stages ("head").
* **Healthy chain.** On the clock where `11` sits at the tail, the first `1`
  has just reached the head, so the head reads `01`.
* **Stuck chain.** A stuck bit anywhere in CREG makes the head read `00` or
  `11` at that moment.
* **Blind spot.** The detector cannot see the first stage stuck at 0. That
  stage is the majority of the three flip-flops, so one failing flip-flop is
  outvoted anyway.
* **The flag.** The detector computes
  `(in AND first) XOR (NOT second_last AND last)`. The result is held in a
  sticky `creg_fault` flag for as long as TEST lasts.
* **Repair.** When TEST ends, each flagged element is repaired like any
  other faulty element.

The TEST mode must last exactly `CHAIN_W + 1` clocks.

## Spare columns, repair and logical columns

This is the part of the design that takes the most care.

**Which elements count.** Each row has a repair controller
(`mt_row_repair`). It knows which physical columns are spare. An element is
*active* if it is not spare, or is a spare already taken into use, and it is
not dead. The active elements of a row, read left to right, are that row's
*logical columns* 0 … n−1. All routing in `muxtree_array` is done between
logical positions:

* **East–west.** Logical column c talks east–west with logical columns c−1
  and c+1 of its own row.
* **North–south.** Logical column c of row r talks north–south with logical
  column c of rows r±1, wherever that element physically is.
* **Transparency.** A dead element, or an unused spare, is simply not a
  logical column, so it is transparent in both directions. This stays true
  when neighbouring rows were repaired at different columns.
* **Array edges.** The edges of the array are logical too. For example,
  `n_out[c]` is logical column c of the top row.

**Repair sequence.** When active element k of a row reports a fault, the
repair runs in four steps:

1. The controller finds s, the first spare column to the right of k.
2. `online` falls, and every flip-flop of the array holds its value.
3. The chains of elements k … s are joined left to right and shifted for 21
   clocks. Each of these elements hands its full configuration and its
   flip-flop state to its right-hand neighbour.
4. k is marked dead and s is marked in use. The logical column that was k
   now lives in k+1, and so on up to s.

The whole repair takes `CHAIN_W + 1` clocks from the fault to `online`
rising. The array is frozen for exactly `CHAIN_W` of them.

When a repair is not possible:

* **Limit.** Only one repair fits between two spare columns.
* **Kill.** A second fault in the same segment, or a fault with no spare to
  its right, sets the row's sticky `kill`. The row then stops repairing.

Which faults count:

* **Functional faults** count only in RUN mode.
* **Chain-test faults** count once TEST is over.
* **Inactive elements** are ignored.
* **Several faults at once** are served one at a time, lowest column first.

## Colonization and cells

`mt_colonizer` has one automaton element per array position, with (0,0) at
the lower left. A stream of 2-bit symbols (`NONE`, `INTERIOR`, `BOUNDARY`,
`SPARE`) enters at (0,0), one symbol per clock:

* **Symbol placement.** The first symbol to reach a bottom-row position
  becomes that column's symbol, and later symbols move one step right. In
  the same way, the left column keeps the first symbol that reaches each row
  and passes later symbols upward. Column symbols then spread up their
  columns and row symbols along their rows. The result is that column x
  carries stream symbol x and row y carries stream symbol y.
* **Tiling.** If the stream repeats a pattern, the pattern tiles the array
  with identical cells. For example, `BOUNDARY INTERIOR INTERIOR SPARE`
  repeated gives cells three logical columns wide, with a spare column after
  each one.
* **Outputs.**
  * `spare_map`: the spare columns;
  * `cell_w_map`: the west edges of cells (column symbol is `BOUNDARY`);
  * `cell_s_map`: the south edges of cells (row symbol is `BOUNDARY`);
  * `colonized`: every element has been reached.

**Configuration path.** In CONFIG mode the stream for a cell follows this
path:

* It enters at the cell's lower-left element.
* It climbs the cell's first logical column, then drops back beside that
  column to enter the bottom of the next one, and so on.
* It skips spare columns, which stay unconfigured until a repair claims
  them.

Which stream feeds which cell:

* **Shared input.** All cells whose bottom row is r share the input
  `cfg_in[r]`. Identical cells therefore receive identical configurations,
  and a narrower cell at the array edge ends up with the first words of the
  path.
* **Word order.** The element at path position k holds the k-th word from
  the end of the stream. Send the word for the last path position first.
* **Cells are logical.** Cell edges are attached to logical columns, not
  physical ones. A repair made before configuration therefore does not move
  a cell.

## Operating the array

The `mode` input (`mt_pkg::mode_t`) selects what the array does. The usual
order is:

| mode     | what happens | duration |
|----------|--------------|----------|
| COLONIZE | the automaton takes `sym_in`, one symbol per clock | until `colonized` |
| TEST     | all chains shift `test_in`, `1 0…0 1 1` | exactly 22 clocks |
| (any)    | chain-test faults are repaired | 22 clocks per fault, while `online` is low |
| CONFIG   | the active elements shift their cell's stream | 21 × path length clocks |
| RUN      | the array computes; `init` loads every flip-flop with its P bit; functional faults trigger on-line repair | — |

General rules:

* **Clocking.** Everything runs on one clock. `rst_n` is an asynchronous,
  active-low reset.
* **State while idle.** Outside RUN, or while any row repairs, the
  flip-flops F and D3 hold their values.
* **Parameters.** `ROWS` (default 4) and `PCOLS` (default 5, physical
  columns including spares) set the array size.

## Choices made in this implementation

The original description leaves these points open; each is filled in as
follows:

* **Automaton rules.** Only the automaton's behaviour is given: it grows
  from the lower-left corner, forms squares, and marks spare columns. The
  transition rules above are this design's.
* **Repair control.** Repair is run by one small controller per row.
  Spreading the logic over the elements themselves would give the same
  behaviour.
* **Routing around dead elements.** This is done with multiplexers indexed
  by logical column. The alternative is bypass multiplexers on the sides of
  every element. The effect is the same: north–south links move right and
  east–west links skip the dead element.
* **Repairing chain-test faults.** Configuration registers that fail the
  chain test are replaced by the ordinary column shift. This is cheap here
  because the test runs before any configuration is loaded. A register that
  fails later, during operation, is neither detected nor repaired at this
  level.
* **Sequencing.** Modes are selected by an external `mode` input.
* **Off-line hold.** The off-line period is a global clock enable.
* **INIT.** INIT is a synchronous load.
* **Chain order.** The bit order inside CREG (serial input at bit 19) and
  the chain order F → D3 → majority → CREG are this design's.
* **Output gating.** Outputs are held at 0 while an element shifts.
* **Array size.** The 4 × 5 default, with one spare column in five, matches
  the size of the example arrays; no real array size is specified.

## Not included

* **Connection test.** There is no test of the wires between elements. It is
  left open in the original description, and the repair scheme assumes the
  wires are fault-free.
* **Cellular layer.** The cellular processor and its cell-level repair are
  outside this RTL. `kill` and the colonizer maps are brought out as ports
  for it.

## Combinational loops

A programmable array can be configured into a loop: NOUT into the switch
block, SOBUS or EOBUS back into the decision multiplexer, and so on through
neighbours. Verilator therefore reports `UNOPTFLAT` on the element and the
top-level routing. This is inherent in the interconnect. A loop exists only
when the configuration selects one, and no configuration used in the
testbenches selects one.

## Files

| file | content |
|------|---------|
| `rtl/mt_pkg.sv` | widths, field positions, `mode_t`, `sym_t`, `creg_pack` |
| `rtl/mt_switch_block.sv` | switch block |
| `rtl/mt_func.sv` | one functional copy (M1 or M2) |
| `rtl/mt_test_unit.sv` | comparison, D3, majority |
| `rtl/mt_creg.sv` | 20-bit configuration shift register |
| `rtl/mt_chain_check.sv` | stuck-bit detector for the chain test |
| `rtl/mt_element.sv` | one self-testing element |
| `rtl/mt_row_repair.sv` | repair controller for one row |
| `rtl/mt_colonizer.sv` | colonization automaton |
| `rtl/muxtree_array.sv` | top level: array, routing, configuration path |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops, and has a
watchdog. To build and run the end-to-end test with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_muxtree_array \
  rtl/mt_pkg.sv rtl/mt_switch_block.sv rtl/mt_creg.sv rtl/mt_func.sv \
  rtl/mt_test_unit.sv rtl/mt_chain_check.sv rtl/mt_element.sv \
  rtl/mt_row_repair.sv rtl/mt_colonizer.sv rtl/muxtree_array.sv \
  tb/tb_muxtree_array.sv
./obj_dir/Vtb_muxtree_array
```

What each module's testbench covers:

* `tb_mt_switch_block`: every input combination.
* `tb_mt_func` and `tb_mt_test_unit`: random stimulus against a model.
* `tb_mt_creg`: shifting and holding.
* `tb_mt_chain_check`: the test pattern with a stuck-at-0 and a stuck-at-1
  fault at every chain position.
* `tb_mt_element`: loading, operation, and faults injected into one copy.
* `tb_mt_row_repair`: repairs, the 21-clock shift, and kill.
* `tb_mt_colonizer`: the maps produced by a repeated pattern.

`tb_muxtree_array` runs the default 4 × 5 array through a complete life
cycle:

1. **Colonization.** Column 3 becomes the spare column.
2. **Chain test.** One stuck configuration bit is planted; the test finds it
   and the element is repaired.
3. **Configuration.** The array is configured along the cell paths as a
   4 × 4 two-way shift register. The direction is chosen per row by
   `e_ibus`.
4. **Operation.** 400 clocks with random inputs against a model, including
   INIT.
5. **On-line repair.** One repair, which must take the array off-line for
   exactly 21 clocks without losing state.
6. **Kill.** A second fault in the same row segment, which must raise
   `kill`.

The test counts how often each mechanism happens and fails if any never
does.

`tb_muxtree_array_cfg` covers the configuration path in more detail. It
colonizes the array with `BOUNDARY INTERIOR SPARE`, which gives two bands of
cells: rows 0–2 fed by `cfg_in[0]` and row 3 fed by `cfg_in[3]`. One row is
repaired before configuration. The test then checks three things:

* every active element holds the word of its path position, in CREG and in
  all three flip-flops;
* the unused spares are left untouched;
* the dead element is left untouched. Faults are injected by writing a stuck value into one storage bit of
one element at every falling clock edge. Verilator reports this as
`MULTIDRIVEN`; the warning comes from the fault injection only.
