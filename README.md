# One-hot regular-expression and Automata Network engine

Regular-expression matchers in hardware are either memory-based (a DFA table
walked one symbol at a time) or logic-based. This RTL is the logic-based
kind. Every state of a non-deterministic automaton gets its own flip-flop.
All active states advance together on each input symbol, so one symbol is
consumed per clock however many states are active. The automaton model is
the *Automata Network*: an NFA whose states carry their symbol sets, extended
with two more element kinds. **Counters** count events up to a target.
**Boolean elements** are combinational gates over other elements' outputs.
With those elements the same fabric also runs cellular automata, and two of
them are included: a rule-110 line and Conway's Game of Life.

The design follows a published FPGA mapping of Automata Networks: the
alphabet-translator / decoder / one-hot-network chain, the element semantics,
the counter targets of the Game-of-Life cell and the evaluated sizes. Where
that mapping leaves something open, the choice made here is marked in each
file's header comment and listed under "Departures and open points" below.

## Data path of the matcher

```
 sym (8 bit) --> alphabet_tx --class--> alphabet_decoder --one-hot--> automata_network --> match
                (256-entry table)        (NUM_CLASSES lines)          (STEs, counters,
 init ------------------------------------------------------------->   booleans)
```

* **Alphabet reduction.** Bytes that every state treats alike are merged into
  one class. `alphabet_tx` is a constant 256-entry byte-to-class table
  (combinational LUT logic). `alphabet_decoder` turns the class index into one
  line per class. An STE that accepts a set of bytes then only ORs a few class
  lines, instead of decoding 8 bits.
* **`init`** marks the first symbol of a new input stream. On that symbol all
  state left from the previous stream is dropped.
* **`valid`** qualifies a symbol. When it is low, every flip-flop holds.

## The one-hot network (`automata_network`, `ste`, `anml_counter`, `anml_boolean`)

This is the part that needs the most care. The key points are the timing
convention, and the fact that the whole network is described by parameter
tables.

### Timing convention

Symbol *t* is presented in cycle *t*.

| element | what happens in cycle *t* | visible from cycle *t+1* |
|---|---|---|
| STE *i* | **fires** (`match_o`) if it is enabled and symbol *t*'s class is in its set | `active_o` (its flip-flop) |
| counter | counts if a source STE fired on symbol *t*; the reset port wins | `out_o` (registered) |
| boolean | combinational over the STE flip-flops and counter outputs | same cycle as its inputs, i.e. it stands for symbol *t* |
| report | — | `match_o` = OR of reporting elements |

An STE is **enabled** for symbol *t+1* when any STE, counter or boolean wired
to it shows activity for symbol *t*. So a chain `x -> y` matches the text
"xy" and reports one cycle after the `y`. Counter outputs and boolean outputs
enable their successors on the next symbol too, so all three element kinds
cost the same one-symbol step. This matches the generated-code pattern of
the mapping: a counter's count input is the *next-state* signal of its source
STE, and a boolean is built from *registered* STE outputs.

Start modes (`ste_start_e`):

* `START_ALL_INPUT`: the STE is enabled on every symbol, so a match may begin
  anywhere. This is the `.*` prefix.
* `START_OF_DATA`: the STE is enabled only on the `init` symbol, so the
  pattern is anchored to the start of the stream.

A **latched** STE stays active from the first time it fires until the next
`init`.

### Counters (`anml_counter`)

A counter has a count port and a reset port, a `TARGET` and a `TYPE`:

* `CNT_ROLL`: the output is high for one symbol when the target is reached,
  and the count returns to 0 so it can reach the target again.
* `CNT_PULSE`: the output is high for one symbol, then the count holds at the
  target with the output low.
* `CNT_LATCH`: the count holds at the target and the output stays high until
  a reset or `init`.

### Boolean elements (`anml_boolean`)

`TYPE` uses the network format's numbering:

| code | type |
|---|---|
| 2 | inverter |
| 3 | OR |
| 4 | AND |
| 5 | NAND |
| 6 | NOR |
| 7 | sum of products |
| 8 | product of sums |
| 9 | NOT sum of products |
| 10 | NOT product of sums |

`TERM_MASK` says which inputs feed which product or sum term. The simple
gates use term 0.

### Describing a network with parameters

`automata_network` is a generic container. A network compiler would emit
one parameter set per pattern set:

| parameter | shape | meaning |
|---|---|---|
| `STE_CLASS` | `N_STE` x `N_CLASSES` | classes accepted by STE *i* (bits `[i*N_CLASSES +: N_CLASSES]`) |
| `STE_START`, `STE_LATCH`, `STE_REPORT` | per STE | start mode (2 bits), latch, reporting |
| `STE_FROM_STE` | `N_STE` x `N_STE` | row *i*: STEs whose activity enables STE *i* |
| `STE_FROM_CNT`, `STE_FROM_BOOL` | rows per STE | counters / booleans that enable STE *i* |
| `CNT_TARGET`, `CNT_TYPE`, `CNT_REPORT` | per counter | 16-bit target, `cnt_type_e`, reporting |
| `CNT_COUNT_FROM`, `CNT_RESET_FROM` | `N_CNT` x `N_STE` | STEs driving the count / reset port |
| `BOOL_TYPE`, `BOOL_REPORT` | per boolean | type code, reporting |
| `BOOL_TERM_MASK` | per boolean, `BOOL_TERMS` masks | terms over `{counter outputs, STE activity}` |

A network may have no counters or no booleans. Their vectors are then sized
1 and tied off.

The default parameters give this example network:

```
  a+ (all-input, self loop) --> b --\
                                     OR --> [cd] --> e (reports)
  f  (all-input)            --> g --/
```

Its classes are `a`..`g` = 0..6, and every other byte is class 7. It matches
`a+b[cd]e` or `fg[cd]e` anywhere in the stream.

## K symbols per clock (`nfa_stride_engine`)

For classical NFAs, which have no counters or booleans, the transition logic
can be repeated. Level *j* takes the state vector produced by level *j-1*,
enables each STE from its predecessors and ANDs in symbol *j*'s class lines.
Only the last level is stored. The flip-flop count stays the same while the
throughput becomes K symbols per clock; the cost is K levels of logic in the
clock path. `match_o[j]` reports a match that ends on symbol *j* of the
group.

The default is K = 2 with the NFA `.*a[a-z][b-z]*A[B-Z]` over its reduced
alphabet:

| bytes | class |
|---|---|
| `a` | 0 |
| `b`..`z` | 1 |
| `A` | 2 |
| `B`..`Z` | 3 |
| anything else | 4 |

In STE form it has five STEs. State `[a-z][b-z]*` is split in two STEs: one
for its first symbol and one for the self loop.

## Cellular automata on the same elements

### Rule 110 (`ca1d_cell`, `ca1d_array`)

Each cell has a state bit and passes it to both neighbours in dual-rail form,
as an alive line and a dead line. The dead line comes from an inverter
element. The next state is a three-term sum-of-products element:

```
next = self & right_dead  |  self_dead & right_alive  |  left_dead & self
```

This is rule 110: the patterns 110, 101, 011, 010 and 001 live. Beyond both
ends sits a permanently dead neighbour. `step_i` advances one generation.
The default is 256 cells, the largest size evaluated.

### Game of Life (`ca2d_cell`, `ca2d_grid`)

A counter can add only one per symbol, so a cell cannot count its eight
neighbours at once. Instead, a generation takes nine symbols:

1. **Count phases 0..7.** In phase *k*, every live cell drives only its
   direction-*k* output: 0 N, 1 NE, 2 E, 3 SE, 4 S, 5 SW, 6 W, 7 NW. The
   grid wires that output to the neighbour in that direction. So in every
   phase each cell receives exactly one neighbour's state on `nbr_i`, and
   feeds it to three latch counters with targets 2, 3 and 4 (`ge2`, `ge3`,
   `ge4`).
2. **Update phase 8.** The new state is taken as
   `next = ge3 & !ge4 | alive & ge2 & !ge4`, which is the Life rule (survive
   with 2 or 3 neighbours, birth with exactly 3). The counters are reset in
   the same clock.

Cells beyond the border are dead. The `ca2d_grid` sequencer is a 0..8 phase
counter advanced by every valid symbol. `gen_done_o` is high on the update
symbol. The default is 16 x 18 cells, the largest size evaluated.

## Top level (`anfa_fpga_top`)

The four engines stand side by side, each with its own ports:

* `an_*`: the Automata Network path, one byte per clock.
* `nfa_*`: the stride path, `NFA_K` bytes per clock, byte 0 (low bits) first.
* `ca1_*`: the rule-110 line.
* `ca2_*`: the Game of Life grid.

Clock `clk_i` is shared. Reset `rst_ni` is asynchronous and active low.
Every output is registered: a match on the symbols of cycle *t* appears in
cycle *t+1*.

| parameter | default | |
|---|---|---|
| `NFA_K` | 2 | symbols per clock on the stride path |
| `CA1_CELLS` | 256 | rule-110 cells |
| `CA2_ROWS` x `CA2_COLS` | 16 x 18 | Game of Life grid |

At the default sizes the top comes to about 3,400 flip-flops.

## Sizes against the evaluated workloads

| workload | needed | built by default |
|---|---|---|
| Rule 110, 8..256 cells | ≤ 256 cells | 256 cells: fits |
| Game of Life, 3x3..16x18 | ≤ 288 cells, 3 counters each | 16x18: fits |
| Synthetic NFAs, 1000 states, out-degree 2..6 | 1000 STEs | 6-STE example network; the same module with `N_STE=1000` is simulated in `tb_workload_synthetic_nfa` |
| Synthetic NFAs, 500..4000 states | ≤ 4000 STEs | by parameters only; the adjacency table grows as `N_STE²` bits |
| Real rule sets (spyware, backdoor) | unknown | the rule sets are not part of this RTL |

## Simulation

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog. To
build and run one with plain Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/anfa_pkg.sv \
          tb/tb_anfa_fpga_top.sv --top-module tb_anfa_fpga_top -Mdir obj
./obj/Vtb_anfa_fpga_top
```

| testbench | what it checks |
|---|---|
| `tb_anfa_fpga_top` | All four engines at default size against models written in the testbench. It counts each mechanism: a match through each branch of the OR, a match lost to a stream restart, stride matches on both lanes, idle cycles, 1D generations, 2D births, survivals and deaths. |
| `tb_automata_network` | The example network, plus networks with a roll counter and a latch counter, against suffix checks of the stream. |
| `tb_nfa_stride_engine` | K = 2 and K = 3 engines against a backwards scan of the text; this also checks the two-symbols-per-clock rate. |
| `tb_workload_synthetic_nfa` | Two random 1000-state NFAs (out-degree 2 and 6) against a set-based NFA simulation. It takes about two minutes to build. |
| `tb_ste`, `tb_anml_counter`, `tb_anml_boolean`, `tb_alphabet_tx`, `tb_alphabet_decoder`, `tb_ca1d_cell`, `tb_ca1d_array`, `tb_ca2d_cell`, `tb_ca2d_grid` | Each element against a reference model. The counter and boolean tests are exhaustive; the 2D grid is compared with a software Game of Life. |

## Departures and open points

* **Start state.** The reference mapping drives its start transitions from a
  flip-flop that `INIT` sets. Here all-input start STEs are enabled on every
  symbol, the `init` symbol included, so a match may begin on the very first
  byte.
* **Valid qualifier and reset.** Both are additions. A stream restart drops
  all state, and a latched STE clears only at `init`.
* **Counter templates.** The reference uses three counter templates (roll,
  pulse, latch). Here one module takes a `TYPE` parameter. Reset beats count
  when both arrive in the same symbol.
* **Allowed wiring.** Booleans take only STE and counter outputs, and
  counters count only STE firings: boolean-to-boolean chains and
  boolean-driven counters are not supported.
* **Stride.** The stride engine handles classical NFAs only; counters and
  booleans are not stride-multiplied. K = 2 is a choice of this design.
* **Game of Life sequencing.** The phase order, the direction numbering, the
  extra update symbol and the latch type of the counters are this design's
  reading of the cell macro. The original cell steps its phases with a chain
  of STEs inside each cell; here a shared sequencer in the grid does it.
  Initial patterns are loaded through seed ports rather than by start
  symbols in the input stream.
* **LUT-level optimisations.** An STE whose symbol set holds more than half
  of the classes is written as the negation of the classes it rejects (the
  threshold of one half is this design's choice). The single-input form (the
  negated symbol on the flip-flop's reset) is the same function and is left to
  logic synthesis. The NFA-reduction and algorithmic stride-doubling steps of a
  network compiler change the network and therefore only its parameter
  tables; they are not part of the RTL.
* **Not included.** The GPU DFA engine and the Automata Processor chip are a
  software kernel and a vendor device respectively. The network compiler
  (parser, generator, optimisations) is software; its output corresponds to
  the parameter tables above.
