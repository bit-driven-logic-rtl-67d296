# Bit-driven logic in SystemVerilog

Bit-driven logic (BDL) builds arithmetic out of single-bit tokens instead of
words. Every bit of every operand lives in its own small storage element, a
*place*, which is either empty or holds a token with the value 0 or 1. The
logic is made of *transitions*. A transition fires as soon as all of its
input places hold tokens and all of its output places are empty. It removes
the input tokens and puts the result tokens into its outputs. Nothing waits
for a word to be complete. The low bits of the next operand can enter an
adder while the carry of the previous one is still rippling toward the top,
so every circuit is pipelined down to the single bit without any pipeline
design effort.

The payoff is throughput that does not depend on word length. A ripple-carry
adder of this kind accepts a new operand pair every two firing times, whether
it is 4 or 64 bits wide. A conventional registered ripple adder can only take
a new pair once the carry has crossed all N bits. The same holds for the
4 x 4 array multiplier here: it delivers one product every two cycles.

This repository contains:

- the token primitives;
- the adders, the multiplier and the small control structures of the BDL
  style;
- the shims that balance path lengths;
- a programmable *G-SLA* array, a storage/logic array onto which any such net
  can be mapped.

Every design is synthesizable, has a self-checking testbench, and is placed
side by side with the others in `bdl_top`.

## Tokens, places and transitions as clocked logic

The original style is clockless. Here it is emulated synchronously, with one
transition firing per clock edge. That keeps the behaviour of the token net
exactly and gives an ordinary single-clock design.

- **`token_t`** (in `bdl_pkg`) is the content of a place: `full` (a token is
  present) and `val` (its value).
- **`bdl_place`** is one place as a register. `put` and `put_val` deposit a
  token, and `take` removes it at the next clock edge. Synchronous active-low
  reset loads the initial marking, which is empty unless the `INIT_*`
  parameters say otherwise. Assertions flag a put into a full place and a
  take from an empty one. Both break the firing rule and never happen in the
  nets here.
- **`bdl_transition`** is the combinational firing rule. Each input arc has a
  kind (`arc_t`):
  - `ARC_PLAIN`: takes any token; all plain inputs must agree.
  - `ARC_ZERO`, `ARC_ONE`: demand a token of that value.
  - `ARC_INV`: an inverting input.

  The transition's value is:
  1. the value of its plain inputs if it has any;
  2. otherwise the complement of its inverting inputs;
  3. otherwise 1.

  Output arcs use the same kinds: plain outputs copy the value, marked outputs
  produce a constant, and inverting outputs produce the complement. `fire` is
  high when every input is full and matches its arc and every output is
  empty. Note the indexing: `out_full[o]` and `out_val[o]` belong to
  `OUT_ARC[o]`, and index 0 is the first element of the parameter's `'{...}`
  pattern.

**Module boundaries.** A module owns the places on its outputs
(`output token_t x_o`, `input logic x_take`). It reads the places on its
inputs, which belong to whoever drives them (`input token_t x_i`,
`output logic x_take`). A line between two modules therefore holds exactly
one place. An environment that wants to stall a design just leaves a token
where it is. A source may refill an input place in the same cycle its
`*_take` is high.

**Timing.** A token moves one place per clock. The firing rule says a place
must be empty before the next token can enter. A steady stream through a
chain therefore alternates: full, empty, full, and so on. This is where the
rate of one token every 2 cycles comes from. The delay through a net is its
depth in transitions, counted in cycles.

## Why the ripple adder keeps up

`bdl_ripple_adder` is a half adder on bit 0 followed by full adders. Each
adder is four transitions, each covering a group of input combinations:

- **`bdl_half_adder`** uses marked input arcs.
- **`bdl_full_adder`** uses plain and inverting arcs. One transition handles
  "all inputs equal" and three handle "one input differs"; each produces its
  sum and carry directly from the arc marks.

Once the pipe is full:

- the even bit positions fire in one cycle and the odd ones in the next;
- each bit's carry place is emptied by its upper neighbour one cycle after it
  was filled;
- the bit can fire again one cycle later.

So every bit position, and hence the whole adder, handles one operand pair
every 2 cycles, independent of `N`. The default is `N = 64`, the size used
in the original comparison with a registered adder: there the BDL adder is
32 times faster. The `NB` parameter lets the top bits add only a carry; the
three-operand adder uses this.

## Thickness, skew and shims

A composite operator is described by two numbers:

- **thickness**: how many transitions a bit crosses from input to output;
- **skew**: how much later bit i may arrive than bit i-1.

Two paths that split and join again only reach the full rate of 1/2 when
they have the same thickness. With thicknesses M and N, the join can do no
better than M/(M+N) tokens per cycle.

- **`bdl_chain`** is a linear chain of `DEPTH` identity transitions (a FIFO).
  `DEPTH = 0` is a plain connection.
- **`bdl_parallel_chains`** forks a token into two chains, of `N-1` and `M-1`
  transitions, and joins them again. It exists to show the bound. Measured
  with M = 2 and N = 6, the rate is exactly 2/8 (gaps of 2 and 6 cycles
  alternating); with equal chains it is 1/2.
- **`bdl_flat_shim`** adds the same thickness to every bit of a word.
  **`bdl_skew_shim`** gives bit i a thickness of `SKEW*i`. A negative `SKEW`
  gives `|SKEW|*(W-1-i)`. Each shim changes the skew between two operators
  whose skews differ.
- **`bdl_add3`** adds three `N`-bit operands with two ripple adders. The top
  sum bit of the first adder skips a level on its way into the second adder.
  That makes a short path parallel to a long one, and the three-operand adder
  slows to one result every 3 cycles. `BALANCE = 1` (default) inserts one
  identity transition on that bit, which restores one result every 2 cycles.
  The testbench checks both settings.

## The array multiplier

`bdl_multiplier` computes the `2W`-bit product of two `W`-bit unsigned
token streams by left shift and add. It is built from `W` levels of
`bdl_ab_row` (the "A.b module"), each a row of `W` `bdl_ab_cell`s (the "a.b
macro transition").

- **The cell.** A cell takes p, a, b and carry c in one firing. It produces:
  - the sum bit p' and carry c' of `p + c + a*b`;
  - copies a' and b'.

  b' and c' go to the next cell of the same row, and a' goes down to the next
  level. Cells on the edges lack inputs or outputs, selected by the `HAS_*`
  parameters. A missing input counts as 0.
- **The levels.** Level k adds `A*b_k` to the partial result of level k-1,
  shifted down one bit. Its lowest sum bit is product bit `z_k`. The last
  level delivers `z_{W-1} .. z_{2W-1}`. The copy of A, and the top carry of
  each row, pass one identity transition before leaving the row; this keeps
  every path through a level equally thick.
- **Rate.** Every level works on a different product at the same time, and
  within a level every bit position may too. Measured with ideal sources and
  sinks: one product every 2 cycles, with three or more products in flight
  at once.
- **Skews.** A arrives fastest with skew 1 and B with skew 2. Any other
  arrival order gives the same products, only later.

The first level has no partial-result input. Its most significant cell still
emits a carry, which is always 0, so that the top partial-result bit of level
1 has a token to consume. This is the choice made here for a connection the
original leaves implicit.

## Control structures

- **`bdl_gate`**: `W` data tokens are held until a control token with value 1
  arrives. The control token is copied to one control place per bit, and each
  bit's transition needs both tokens. A control token of value 0 is never
  consumed; the original only shows the 1-marked case.
- **`bdl_switch`**: a data token goes to output x when the control token is
  1 and to y when it is 0. The routing uses two transitions with
  opposite-marked control arcs.
- **`bdl_par_to_ser`**: turns a `W`-bit word into a serial stream, bit 0
  first. A single sequencing token (initially beside bit 0) circulates in a
  ring of places. Bit i can only leave while it holds the sequencing token,
  so bits may arrive in any order and still leave in order.

## The G-SLA array

`bdl_gsla` is a programmable array of `R` rows and `C` columns (default
36 x 20):

- **Columns.** A column is a three-state storage element (empty, 0, 1), that
  is, one place.
- **Rows.** A row is one firing of a transition. A transition that can fire
  with either value needs two rows.
- **Cells.** Each cell (`gsla_cell_t`, programmed through `prog_i`) holds a
  test of its column and an action on it:

| test  | meaning            | action | effect when the row fires |
|-------|--------------------|--------|---------------------------|
| `GT_ANY` | don't care      | `GA_NONE` | none                   |
| `GT_E` | column empty      | `GA_X` | empty the column           |
| `GT_0` | column holds 0    | `GA_R` | put a 0                    |
| `GT_1` | column holds 1    | `GA_S` | put a 1                    |

The usual cells have shorthands:

- `GC_IN0` / `GC_IN1`: consume an input of that value.
- `GC_OUTR` / `GC_OUTS`: write a 0 or 1 into an empty output.
- `GC_EMPTY`: no connection.

A row fires when all its tests hold, and its actions land at the next clock
edge.

**Mapping a net onto the array.** Give each place a column. For each
transition and each value it can fire with, give it a row. Put an input cell
at each input column and an output cell at each output column.

**Example: the adder program.** The testbenches program the array as a
five-bit ripple adder. Bit 0 takes 4 rows and each higher bit 8 rows, one row
per combination of a, b and carry-in. Each bit uses four columns (a, b, sum,
carry), and the last carry is sum bit 5. This runs at one sum every 2 cycles,
like the hard-wired adder.

**Conflicts.** Two rows that touch a common column are not allowed to fire in
the same cycle. The lowest-numbered one wins. Nets that are well formed only
meet this where two transitions compete for a place.

**Environment access.** The environment sees every column on `col_o`. It
writes empty columns with `put` and `put_val` and empties full ones with
`take`. Rows touching a column that is being accessed wait that cycle.
`init_i` is the marking loaded at reset.

The program is a port, held static while the array runs; a mask-programmed
array would fix it in silicon instead. Splitting rows and columns, which the
original uses to pack programs densely, is a layout matter: here a split
column is just another column. The default size holds the five-bit adder.
The 4 x 4 multiplier, mapped from the same net as `bdl_multiplier`, needs
216 rows and 80 columns, so it requires overriding `R` and `C`. It then runs
at one product every 2 cycles, exactly like the hard-wired version.

## Top level

`bdl_top` instantiates every design side by side. They share only clock and
reset. Each design has its own group of token ports:

| prefix | design |
|--------|--------|
| `mul_*` | 4 x 4 multiplier |
| `add_*` | 64-bit adder |
| `add3_*` | 4-bit three-operand adder |
| `gate_*` | 3-bit gate |
| `sw_*` | switch |
| `p2s_*` | 3-bit parallel-to-serial converter |
| `ch_*` | 7-place chain |
| `par_*` | parallel chains, 4 and 4 |
| `flat_*` | 4-bit flat shim, thickness 2 |
| `skew_*` | 3-bit skewed shim, skew 1 |
| `gsla_*` | G-SLA array, 36 x 20 |

All parameters default to the sizes above.

## Simulating

Each testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<n>`, ends with `$finish`, and has a watchdog.
With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/bdl_pkg.sv tb/tb_bdl_top.sv --top-module tb_bdl_top
./obj_dir/Vtb_bdl_top
```

Replace `tb_bdl_top` with any other testbench in `tb/`. `tb_src_lane` and
`tb_sink_lane` are shared helpers: a token source and a token sink that take
an optional stall input.

| testbench | what it checks |
|-----------|----------------|
| `tb_bdl_top` | all designs at default size, end to end. Checks every result and counts the key mechanisms (multiplier and adder overlap, back-pressure, gate waiting, both switch routes, out-of-order serial input, G-SLA rows firing concurrently); it fails if any never happens |
| `tb_bdl_multiplier` | all 256 products, ideal and stalling ends, rate 1 per 2 cycles |
| `tb_bdl_ripple_adder` | 64 random 64-bit sums, ideal and stalling ends, rate 1 per 2 cycles |
| `tb_bdl_add3` | random sums with and without stalls; 2 cycles balanced, 3 unbalanced |
| `tb_bdl_ab_row`, `tb_bdl_ab_cell` | middle-level and first-level rows; a complete cell and a first-level top cell |
| `tb_bdl_half_adder`, `tb_bdl_full_adder` | sum and carry of random inputs, rate 1 per 2 cycles |
| `tb_bdl_transition` | every input marking and output occupancy of a transition using all arc kinds, against the firing rule |
| `tb_bdl_place` | put and take of both values, initial marking after reset |
| `tb_bdl_chain`, `tb_bdl_flat_shim`, `tb_bdl_skew_shim` | order, latency (thickness per lane), rate |
| `tb_bdl_parallel_chains` | token values and the M/(M+N) rate bound |
| `tb_bdl_gate`, `tb_bdl_switch`, `tb_bdl_par_to_ser` | holding, routing, ordering |
| `tb_bdl_gsla` | five-bit adder program (200 sums, rate) and switch program |
| `tb_bdl_gsla_mul` | the 4 x 4 multiplier as a 216 x 80 G-SLA program: all 256 products, rate |

## Where this departs from the original style

- **Clocked.** The original is self-timed, and a transition fires whenever it
  is enabled. Here every firing takes exactly one clock. The token behaviour
  and all rates hold; absolute speed is set by the clock, not by gate delays.
- **The a.b cell is one firing.** The original describes the cell's function
  but not its inner net. Here it is written directly as one firing rule.
- **G-SLA.** The original gives no size, and its layout tricks (split rows and
  columns, storage element placement) are not modelled. The conflict rule and
  the environment ports are choices made here. The standard two-column SLA
  mapping it also describes is not provided: it needs an SLA cell design that
  the original takes from elsewhere.
- **Gate control of value 0.** Such a token is not consumed (see above).
- **Unused signals.** Lint reports a few unused signals. They are inputs and
  outputs that parameters remove on edge cells (for example `a_otake` on the
  last multiplier level), and the clock of a zero-depth chain. They are
  intentional.
