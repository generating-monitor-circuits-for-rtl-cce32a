# Non-symbolic monitor circuits for GSTE assertion graphs

A GSTE assertion graph is a temporal specification: a graph whose edges carry a
boolean *antecedent* and *consequent*, read one edge per clock cycle. Any path from the
initial vertex that ends on a *terminal* edge is a claim: "if every antecedent along
the path held on its cycle, then every consequent must have held too". Formal GSTE
uses *symbolic constants* in those formulas, for example "in0 = A and in1 = B" now
and "sum = A + B" later. These only work with a symbolic engine.

This RTL builds monitors that a plain two-state simulator can run. In the graphs used
here a symbolic constant is given its value by an explicit assignment on an edge
(`assign A = in0`) and read on later edges. A monitor is a synthesizable circuit with
the same shape as the graph. It watches the signals of the circuit under test without
driving them and reports every cycle:

* `accept`: no path has failed on a terminal edge in this cycle;
* `overflow`: the monitor ran out of storage for the assigned values. From then on,
  `accept` can no longer be trusted.

The repository holds a small library of building blocks and three complete monitors
assembled from them. `gste_monitor_top` puts the three side by side.

## Tokens

Paths are not enumerated. Each edge carries a *token*, two wires named `happy` and
`condemned` (`token_t` in `gste_pkg`):

| token arriving | antecedent | consequent | token leaving (next cycle) |
|---|---|---|---|
| happy | holds | holds | happy |
| happy | holds | fails | condemned |
| condemned | holds | any | condemned |
| any | fails | any | none: the path is *blessed* (vacuously true) |

A token on an edge in a cycle means that at least one path ends on that edge in that
cycle. Paths that reach the same edge in the same cycle with the same history share
their future, so their tokens simply merge (OR). `accept` is low in any cycle where a
terminal edge *forms* a condemned token (`condemned_now`).

Once a path is condemned it stays condemned: it keeps going round loops and rejects
again at every later terminal edge it reaches, until reset. The stallable-adder
monitor below shows this. After one wrong sum it rejects every later addition of the
same trace. This is the meaning of the specification, not a fault in the monitor.

The initial vertex emits a happy token on the first cycle after reset. A self-loop on
v0 with antecedent `true` keeps re-issuing the token every cycle. That makes the graph
start a new check in every cycle.

## Instance ids and the instance manager

This is the part that takes the most care.

A token that has passed an assigning edge must remember the values it was given. Two
tokens with different values must not merge. Edges whose future reads a constant
before reassigning it are *instance edges*. They, and the vertices they leave from
(*instance vertices*), are built K times over. Copy *i* carries the tokens of
instance id *i* and reads bank *i* of the stored constants. Edges that are not
instance edges are *simple*: one token pair, no stored values. Which edges are
instance edges is found by a backward search from every edge that reads a constant.
The search stops at edges that assign that constant. It was done by hand for the
example graphs.

`gste_instance_manager` owns the K banks and hands out ids.

* **In use.** Id *j* is busy if any instance vertex holds a token with id *j* in this
  cycle.
* **Requests.** Every token formed on an assigning edge asks for a new id. An
  assigning simple edge (ASE) makes one request. An assigning instance edge (AIE) makes
  one request per source id *i*.
* **Priority.** Requests are served in a fixed order: ASEs by index, then AIEs by
  index, and within one AIE by source id from 0 up. Each request takes the lowest id
  that is neither busy nor already granted in this cycle.
* **Tokens.** The granted id re-labels the token (`ase_next` / `aie_next`). The
  assigning edge registers it, so one cycle later it reaches the next vertex under its
  new id. The new id is then busy because a vertex holds it.
* **Values.** For each constant *c* and bank *j*:
  * an edge granted *j* that assigns *c* writes its new value;
  * an AIE granted *j* for a token of id *i* that does *not* assign *c* copies bank
    *i* into bank *j*, so the token keeps its other constants;
  * an ASE that does not assign *c* leaves bank *j* of *c* alone.
  At most one request gets a given id in a cycle, so the writes never collide.
* **Overflow.** A request that finds no free id sets that edge's overflow flag, and
  its token is dropped.
* **Checks.** Two concurrent assertions inside the manager check the allocation
  rules: no id is granted twice in one cycle, and no id is granted while in use. They
  fire in any simulation run with assertions enabled.

Where an assigning edge's own label uses the constant it assigns, the monitor uses
the assigned signal directly in the label. This also means nothing is stored when the
antecedent fails, because no token is formed and so no request is made.

**Choosing K.** When the antecedents on the edges leaving each vertex exclude each
other, only one token exists at a time and K = 1. Otherwise, count how many tokens
the assigning edges can emit during the lifetime of one token. Groups of assigning
edges whose tokens can be alive together add up. If K is too small, the monitor does
not give a wrong answer silently: it raises `overflow`.

**K = 1 without a manager.** With one instance and exclusive antecedents, the manager
has nothing to decide. The stallable-adder monitor can be built in a reduced form
(`LIGHT = 1`): one register per constant, loaded whenever the assigning edge forms a
token, and `overflow` tied low.

## The monitors

### `gste_pipe_adder_monitor`: 2-stage pipelined, stallable adder (K = 3)

```
eL : v0 -> v0  ant true                       new check every cycle
e0 : v0 -> v1  ant !stall ; assign A=in0, B=in1   (assigning simple edge)
e1 : v1 -> v1  ant stall                      hold while stalled
e2 : v1 -> v2  ant !stall                     second stage advances
e3 : v2 -> v3  cons sum == A+B                terminal
```

e1, e2 and e3 are instance edges; v1 and v2 are instance vertices. An operand pair
taken on a non-stalled cycle must appear on `sum` one cycle after the next
non-stalled cycle. A token holds its id on v1 and v2. No new token enters during a
stall. So at most three ids are busy or requested at once, and K = 3. With K = 2 the
monitor overflows on three back-to-back issues, and the testbenches check this.

### `gste_stall_adder_monitor`: unpipelined stallable adder (K = 1)

```
e0 : v0 -> v1  ant !stall ; assign A=in0, B=in1
e1 : v1 -> v1  ant stall
e2 : v1 -> v2  ant !stall ; cons sum == A+B   terminal
e3 : v2 -> v0  ant true                       ready for the next addition
```

One addition at a time, with one cycle minimum latency. v2 is a simple vertex that
merges e2's instance tokens. A stall while the token waits at v0 blesses the path,
and checking then stops until the next reset. `LIGHT = 1` (the default) leaves out
the instance manager. `LIGHT = 0` builds the general form with a one-id manager.

### `gste_pair_sum_monitor`: two-tap adder (K = 4)

```
eL : v0 -> v0  ant true
f0 : v0 -> v1  assign A = x                   (assigning simple edge)
f1 : v1 -> v2  assign B = x                   (assigning instance edge)
f2 : v2 -> v3  cons y == A+B                  terminal
```

This graph says that `y`, two cycles after `x(t)`, must equal `x(t) + x(t+1)`. It is
this design's own example. It exists because it contains an assigning *instance*
edge: on f1 each token gets a new id, and A is copied from its old bank into its new
one. In every cycle two ids are held (at v1 and v2) and two are requested (f0 and f1),
so K = 4. With K = 3, f1, the lower-priority request, overflows.

## Building blocks

| module | role |
|---|---|
| `gste_pkg` | `token_t`, the edge rule `edge_eval`, token helpers |
| `gste_simple_vertex` | OR of incoming tokens, with instance inputs merged over ids; `INITIAL` adds the start token |
| `gste_instance_vertex` | per-id OR of incoming instance tokens |
| `gste_simple_edge` | edge rule, `now_tok` in the same cycle, `out_tok` one cycle later |
| `gste_instance_edge` | K parallel simple edges, one per id |
| `gste_assign_simple_edge` | edge rule; `now_tok` is the request; registers the re-labelled tokens from the manager |
| `gste_assign_instance_edge` | the same for K source ids |
| `gste_instance_manager` | id allocation, K banks per constant, copy rule, per-edge overflow |
| `gste_monitor_output` | `accept` and `overflow` from the terminal edges and the overflow flags |

Labels (antecedent and consequent) are not part of the blocks. The enclosing monitor
computes them from the observed signals and, for instance edges, from bank *i* of
`const_q`, and feeds them in as one bit per edge (per id).

To build a monitor for a new graph:

1. Mark the instance edges by the backward search described above.
2. Instantiate one vertex module per vertex and one edge module per edge, of the
   matching kind.
3. Wire each assigning edge's `now_tok` and its values into the manager, and the
   manager's `*_next` back to the edge.
4. Give the manager the instance vertices' tokens as `iv_tok` and `ASE_ASSIGNS` /
   `AIE_ASSIGNS` masks that say which edge assigns which constant.
5. Feed the terminal edges' `now_tok` into `gste_monitor_output`.

The three monitors follow exactly this pattern.

## Timing and interface

* One clock, one graph edge per cycle. Reset is synchronous and active high. The
  first cycle with `rst` low is the first cycle of a trace. Reset clears all tokens
  and the value banks.
* `accept` and `overflow` are combinational and refer to the current cycle. A
  testbench samples them before the clock edge that ends the cycle. They are not
  sticky; latch them outside if a whole-trace verdict is wanted.
* Each example monitor observes operands of `W` bits (default 8) and a `W+1`-bit
  sum, so no carry is lost.

## Interpretations and choices

These points follow a reading of the method that is not fully pinned down, or are
this design's own choices:

* **Allocation.** The allocation order (all ASEs before AIEs, then by index, then by
  source id) and "lowest free id first" are one valid reading of the fixed-priority
  rule. Within one AIE, two source ids are kept from receiving the same new id.
* **Condemned tokens in the manager.** They are re-labelled exactly like happy
  tokens.
* **Storage.** The value store uses edge-triggered registers. The token delay
  registers sit in the edge modules, including those of assigning edges.
* **Graph shapes.** The exact pipelined-adder graph and the return edge of the
  stallable-adder graph are this design's reading of those two standard examples.
  The two-tap adder graph is new.
* **Reduced K = 1 form.** It keeps an `overflow` port tied to 0, so both forms have
  the same interface.
* **Widths.** `W = 8` and the id numbering 0..K-1 are arbitrary. All constants
  handled by one manager share one width `CW`.

Not provided: the program that generates monitors from graph descriptions. Labels and
instance-edge marking are written by hand here. Also missing are the monitors for the
FIFO and memory specifications used to measure monitor size, because their graphs are
not available.

## Simulation

All files are SystemVerilog-2017, checked with Verilator 5 (lint with `-Wall`) and
Yosys/slang. Each testbench prints one line `TB_RESULT checks=N failures=M` and ends
with `$finish`. To run the end-to-end test, for example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_gste_monitor_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/gste_pkg.sv tb/tb_gste_monitor_top.sv
./obj_dir/Vtb_gste_monitor_top +verilator+rand+reset+2
```

| testbench | what it does |
|---|---|
| `tb_gste_monitor_top` | whole top twice: at default sizes, and with one id fewer (plus `SA_LIGHT = 0`) to force overflow; counts every mechanism |
| `tb_gste_monitor_top_full` | whole top at default parameters, 20 000 cycles |
| `tb_gste_pipe_adder_monitor`, `tb_gste_pair_sum_monitor`, `tb_gste_stall_adder_monitor` | each monitor at two sizes or forms |
| `tb_gste_instance_manager` | random requests against a list-based allocation model, including copies and overflow |
| `tb_gste_*_edge`, `tb_gste_*_vertex`, `tb_gste_monitor_output` | random tests of the blocks against the token table |

The monitor testbenches use `tb_pa_env`, `tb_ps_env` and `tb_sa_env`. Each of these
models the circuit under observation, including injected wrong sums and random
stalls. Each also walks the assertion graph in behavioural code and predicts
`accept` and `overflow` every cycle. The end-to-end tests fail if any of these
mechanisms never occurs:

* a completed check;
* a detected wrong sum;
* a stall that holds an addition;
* overflow when there is one id too few;
* a second assignment on an instance edge;
* a blessed token;
* a condemned token carried round a loop.
