# A regular-expression hardware compiler and the observers that check it

A hardware compiler turns a high-level description into a circuit. A bug in
the compiler gives a wrong circuit even when the description is right. This
design makes such a compiler small enough to check with finite-state means.
The compiler turns a simplified regular expression into gates. Each check is
a *synchronous observer*: a separate circuit that reads another circuit's
inputs and outputs and drives one bit that must stay high.

There are three groups of circuits:

* **The compiler.** `regex_circuit` elaborates a regular expression, given as
  a parameter, into a start/match circuit. It can also build an invariant
  check into every node of the compiled structure.
* **Observers that check the compiler.** `prove_structural_induction` holds
  the inductive step of a proof over all expressions. `regex_equiv_obs`
  compares two expressions, for example the two sides of an algebraic law.
* **The basic cells and their observers.** A gate-level multiplexer, a delay
  element, a one-bit register with load enable, a register array, a delay
  chain, the register's observer, and the "always" observer.

`lava_examples_top` puts all of them side by side. They share only the clock
and reset.

## The start/match protocol

Every compiled expression has one input `start` and one output `match`:

* Pulsing `start` in cycle *s* tells the circuit to begin reading the input
  signals in that cycle.
* `match` is high in cycle *t* when the signals sampled in cycles *s* .. *t*-1
  form a word of the language, for some earlier cycle *s* in which `start` was
  high.

A "character" is an input signal, and the character is present when its
signal is high. Several signals may be high at once, so one cycle can stand
for several characters. Starts may overlap: a new start while an earlier one
is still being matched simply adds one more attempt. The expressions have no
empty word, so a circuit never matches in the cycle it is started.

The compiler builds each operator as follows:

| expression  | start of the parts                       | match                    |
|-------------|------------------------------------------|--------------------------|
| `Input a`   | —                                        | `start AND a`, delayed by one cycle |
| `e :>: f`   | e gets `start`; f gets e's `match`      | f's `match`              |
| `e :+: f`   | both get `start`                         | e's `match` OR f's `match` |
| `Plus e`    | e gets `start` OR e's own `match`       | e's `match`              |
| `Circuit k` | `start` leaves on `circ_start[k]`        | taken from `circ_match[k]` |

Only `Input` holds state: one flip-flop per character position in the
expression. The latency is exactly the length of the word: a word of *n*
characters that starts in cycle *s* is reported in cycle *s*+*n*. No
combinational path runs from `start` to `match` except through `Circuit`
leaves, so the `Plus` feedback loop always passes through a flip-flop.

Example: the default expression is `a(b+c)+`, with `sig = {c, b, a}`.

```
cycle    0  1  2  3  4  5
start    1  0  0  0  0  0
a        1  0  0  0  0  0
b        0  1  0  1  0  0
c        0  0  1  0  0  0
match    0  0  1  1  1  0      "ab", "abc", "abcb", each one cycle after its last character
```

### Circuit leaves

A `Circuit` leaf is a hole in the expression. The hole is filled by a
sub-circuit outside the compiler: the node sends its start out on
`circ_start[k]` and takes its match from `circ_match[k]`. If `circ_match` is
driven from free inputs, the enclosing operator sees every behaviour that any
sub-expression could have. This is how the observers below make claims about
*all* expressions while checking only one operator at a time.

## Writing an expression

An expression is the parameter `PROG`, a packed array of `regex_pkg::re_node_t`
of length `NODES`. Node 0 is the root. Each node gives:

* `op`: one of `RE_INPUT`, `RE_SEQ`, `RE_ALT`, `RE_PLUS` or `RE_CIRCUIT`
* `left` and `right`: the node indices of its sub-expressions
* `sig`: the signal index of an `Input`, or the port index of a `Circuit`

The package has one constructor function per node kind. A packed-array literal
lists the nodes from the highest index down to index 0. For example, this is
`(a :>: b)+ :+: c`:

```systemverilog
import regex_pkg::*;
regex_circuit #(
  .NODES(6), .NSIG(3),
  .PROG({re_input(8'd2),        // 5: c
         re_input(8'd1),        // 4: b
         re_input(8'd0),        // 3: a
         re_seq(8'd3, 8'd4),    // 2: a :>: b
         re_plus(8'd2),         // 1: Plus (a :>: b)
         re_alt(8'd1, 8'd5)})   // 0: ... :+: c
) u_re (...);
```

Rules:

* Each node except the root must be the sub-expression of exactly one other
  node.
* `Input` indices must be below `NSIG`, and `Circuit` indices below `NCIRC`.

Elaboration stops with an error for an unreachable node or an index out of
range. `NCIRC` must be at least 1 even when no `Circuit` leaf is used. An
unused `circ_start` bit is driven low.

Inside, each node is one generate block, `node[i]`, holding the node's
`st`, `mt` and `okn` wires. A node finds its parent with a constant function
over `PROG`. It takes its start from the parent and computes its match from
its own operator. The index of a node's parent is known at elaboration time,
so the compiled circuit is plain gates and flip-flops, with nothing to look
up at run time.

## Invariant checks inside the compiled circuit

The compiler can also build a proof obligation into the circuit it produces.
Every node checks the invariant *noEmptyString*: `start ==> NOT match`, built
as `no_empty_string`. The node's `ok` then means the following:

* A leaf (`Input` or `Circuit`) reports the invariant on its own start and
  match.
* An operator reports "my sub-expressions' `ok` ==> the invariant holds here".

The root's `ok` is the output `ok`. The parameter `TEMPORAL` chooses how
strong the hypothesis is:

* `TEMPORAL = 0` (plain structural induction). An operator uses its
  children's `ok` of the same cycle.
* `TEMPORAL = 1` (temporal induction). The children's `ok` first passes
  through an `always_obs`. An operator only has to keep the invariant while
  its children have kept theirs in every *earlier* cycle. The reason: a
  sub-circuit that fails for a while and then recovers may have left its
  parent in a bad state, and plain induction would wrongly expect the parent
  to recover at once. The "always" observer is a delay element that starts
  high and is fed with `s AND ok`, so it does not look at the current cycle.

The check only reports. It changes nothing in the matching logic.

**What the check reports in practice.** The invariant is checked cycle by
cycle. At a node it is violated whenever a new start arrives while an
earlier start is matching. At a `Plus` body it is violated every time the
body matches, because the match is fed back as a start. The root's `ok` is a
chain of such implications, and it falls on ordinary traffic with
overlapping starts. The tests count these falls and
compare every one with an independent calculation.

## The compiler's observers

### `prove_structural_induction`

This is the inductive step of a proof over all expressions. It contains four
instances of the compiler, one per operator, with `Circuit` leaves driven
from the free inputs `o1` and `o2`:

* sequence: `Circuit 0 :>: Circuit 1`
* alternative: `Circuit 0 :+: Circuit 1`
* Plus: `Plus (Circuit 0)`
* a single `Input a`

Each instance reports its `ok_*`, and `ok` is the AND of the four. If `ok`
were high for every input sequence, the invariant would hold for every
expression by induction.

With the construction above and fully free inputs, the cases behave as
follows (I(s, m) = NOT(s AND m)):

| case        | `ok_*` (plain form)                        | can fail? |
|-------------|--------------------------------------------|-----------|
| alternative | (I(s,o1) ∧ I(s,o2)) ⇒ I(s, o1∨o2)          | no        |
| Plus        | I(s∨o1, o1) ⇒ I(s, o1)                     | no        |
| sequence    | (I(s,o1) ∧ I(o1,o2)) ⇒ I(s, o2)            | yes: start and o2 high, o1 low |
| Input       | I(s, previous(s ∧ a))                      | yes: start in two consecutive cycles |

So with this construction, the cycle-by-cycle *noEmptyString* is inductive
for `:+:` and `Plus` but not for `:>:` or `Input`. The observer reports that
as it is. It has no environment constraint that would forbid overlapping
starts. Anyone who wants to use the observer as a proof obligation has to add
such a constraint, or a stronger invariant. The temporal form
(`TEMPORAL = 1`) can fail in the alternative and Plus cases too, because the
"always" guard does not cover the current cycle.

The starts each case hands to its sub-circuits (`*_start*`) and each case's
match are outputs as well. An environment can use them to model sub-circuits
that react to their starts.

### `regex_equiv_obs`

This observer compiles two expressions, `PROG_A` and `PROG_B`, side by side.
Both get the same start, the same signals and the same sub-circuit matches.
`ok` is high while the two `match` outputs agree. By default it checks
commutativity, `e :+: f` against `f :+: e`, over two free sub-circuits. Its
test also checks associativity of `:>:` over three sub-circuits, which needs
`NODES_A = NODES_B = 5` and `NCIRC = 3`. It also checks that the pair `a`
and `a+` is caught as different. Finally, it checks that two rewriting rules
of an expression simplifier keep the language the same: `Plus e :>: Plus e`
becomes `e :>: Plus e`, and `Plus (Plus e)` becomes `Plus e`.

## Basic cells

| module               | behaviour |
|----------------------|-----------|
| `lava_mux`           | `(case0 ∧ ¬sel) ∨ (case1 ∧ sel)`, from single gates |
| `lava_delay`         | one-cycle delay. `INIT` is the initial value, which the synchronous reset restores |
| `set_register`       | `now = set ? new_in : old`, with `old` a delay of `now` that starts low. The output follows `new_in` *in the same cycle* while `set` is high |
| `set_register_array` | `N` set registers (default 8) sharing one `set` line |
| `delay_n`            | `N` delays in series (default 4). `N = 0` gives a wire |
| `check_register`     | observer of a `set_register`: `¬set ⇒ (current = previous current)` |
| `always_obs`         | `ok(t)` = AND of `s` over cycles 0 .. t-1 |

`lava_examples_top` connects them like this. The register observer also
drives an `always_obs`, so `chk_always_ok` says "the register has behaved in
every cycle so far". The top level instantiates both forms of the induction
observer.

## Size

After coarse synthesis, at the defaults:

* `regex_circuit` with `a(b+c)+`: 28 cells and 3 flip-flops.
* The whole top level: 117 cells and 21 flip-flops.

Some of the top's outputs are constant, such as the alternative and Plus
induction cases, which cannot fail. Synthesis reduces those outputs to
constants.

## Choices made in this implementation

* **Construction of each operator.** The start/match behaviour, the operator
  set and the `Circuit` leaf are given. The gates that realise each operator
  (the table above) are the simplest ones with that behaviour. They are this
  implementation's choice.
* **Expressions as parameters.** An expression is a node table fixed at
  elaboration, not a value in a host language. Expression-building functions
  such as repeated sequence ("power") or rewriting ("simplify") act before
  compilation. Any expression they produce can be written as a node table,
  but the functions themselves are not provided.
* **Register observer.** It compares the register's output with the register's
  output of the *previous cycle* whenever `set` is low. That is, "the stored
  value does not change". Comparing with `new_in` instead would not hold for a
  correct register.
* **The invariant is fixed** to *noEmptyString* rather than passed in as a
  parameter. For an `Input` leaf the check is the invariant itself, as for a
  `Circuit` leaf.
* **Reset.** Delay elements have only an initial value in the original
  formulation. Here a synchronous, active-high `rst` restores it in every
  delay element, including the "always" observers, which reset to high.
* **Widths.** Node indices are 8 bits, so expressions may have up to 256
  nodes. The register array width (8) and delay length (4) are defaults of
  this implementation.

Not built:

* A generic "program satisfies property" observer for arbitrary programming
  languages.
* The observer that adds an environment condition to a verified property.
* The model checker that proves an observer's output constant. Instead, the
  testbenches use long random and directed runs, compared against closed-form
  or history-based references. `bounded_verify_tb` also tries every input
  sequence up to a small depth.

## Simulating

All files are SystemVerilog-2017. The package `rtl/regex_pkg.sv` must come
first on the command line. For example:

```
verilator --binary --timing -Wno-fatal -Irtl -y rtl -y tb \
    rtl/regex_pkg.sv tb/lava_examples_top_tb.sv --top-module lava_examples_top_tb
./obj_dir/Vlava_examples_top_tb
```

Each testbench prints one line `TB_RESULT checks=N failures=M` and stops.
Each has a watchdog that counts a failure if the run hangs.

| testbench                        | what it checks |
|----------------------------------|----------------|
| `lava_examples_top_tb`           | whole top at default sizes, 1500 random cycles. Every example is compared with a reference, and each mechanism must occur: loads, holds, matches through b and through c, Plus repetition, overlapping starts, invariant violations, each failing induction case |
| `regex_circuit_tb`               | `a(b+c)+` (plain and temporal), `(a:>:b)+ :+: c`, and an expression with Circuit leaves. Match is checked against the language of each expression over the recorded history. `ok` is checked against a node-by-node calculation |
| `prove_structural_induction_tb`  | all four cases, plain and temporal, against the closed forms above |
| `regex_equiv_obs_tb`             | commutativity, associativity, `a` against `a+`, and the two simplifier rewrites `e+ e+ = e e+` and `(e+)+ = e+` |
| `bounded_verify_tb`              | exhaustive bounded check from reset. The register observer is checked over all input sequences of depth 6, and commutativity over all of depth 5; both must hold. The induction observer is compared with its closed forms over all sequences of depth 4: 27 120 of the 65 536 sequences break the sequence case and 19 968 break the Input case |
| `check_register_tb`, `set_register_tb`, `set_register_array_tb`, `delay_n_tb`, `always_obs_tb`, `lava_delay_tb`, `lava_mux_tb`, `no_empty_string_tb` | each cell against a reference model |

To try another expression, override `PROG`, `NODES` and `NSIG` on
`regex_circuit`. Extend the reference function in `regex_circuit_tb` with the
new expression's language.
