# Reversible logic for asynchronous control automata

Control logic for safety-related systems, such as railway interlocking, is
often specified as an asynchronous automaton: a state table that reacts to
input changes without a clock, in the style of the relay circuits it replaces.
Two things make such an automaton hard to put into logic:

1. **Critical races.** When a change of state flips more than one state
   variable, unequal delays make the variables switch one at a time. The
   circuit then passes through intermediate codes. If one of those codes
   leads somewhere else, the automaton ends in the wrong state.
2. **The reversible form.** Reversible gates (Feynman, Toffoli, Fredkin,
   Peres) map their inputs one-to-one onto their outputs, which makes them
   attractive for robust and low-power logic. They compute AND and XOR
   naturally, not AND/OR. The next-state equations must therefore be
   rewritten as AND/XOR (Reed-Muller) polynomials before they can be built
   from those gates.

This RTL shows the whole path on a small example. It takes a four-state
automaton and its race-free state coding, turns the next-state functions
into Reed-Muller polynomials at elaboration time, and builds them only from
Toffoli and Feynman gates. A stand-alone Reed-Muller transform unit and the
complete reversible gate library come with it.

## The example automaton

The automaton has four states and four input vectors X1..X4. Its successor
table (present state down the side, input vector across):

| state | X1 | X2 | X3 | X4 |
|-------|----|----|----|----|
| 1     | 1  | 4  | 1  | 2  |
| 2     | 2  | 2  | 1  | 2  |
| 3     | 1  | 2  | 3  | 4  |
| 4     | 2  | 4  | 3  | 4  |

Every column has at least one stable state. The table is coded with three
state variables `y[2:0]`:

| state | code `y[2:0]` |
|-------|---------------|
| 1     | 111           |
| 2     | 100           |
| 3     | 001           |
| 4     | 010           |

These codes come from the *method of elementary conditions*. Take one input
vector and two transitions in its column that go to different target states.
For that pair, some state variable must be 0 for both states of one
transition and 1 for both states of the other. Such a variable does not
change during either transition, so it keeps the two transitions apart
whatever order the other variables switch in. All such conditions are
gathered, and compatible ones are merged. The result is one column of the
code per surviving condition. Here three conditions survive, so there are
three state variables.

### Transient codes

In this coding, every one of the eight changes of state flips two variables. An
example is 3 → 1 under X1 (001 → 111). With unequal delays the automaton
briefly holds 011 or 101. The four unused codes (000, 011, 101, 110) are
therefore given next-state values. Each unused code, under each input vector,
maps to the target of the one transition that can pass through it. "Pass
through" means the code agrees with the transition's start code in every bit
that does not change. The race-free coding makes that target unique. Every
one of the 32 (input, code) pairs then has a defined next code:

| x (vector) | 000 | 001 | 010 | 011 | 100 | 101 | 110 | 111 |
|------------|-----|-----|-----|-----|-----|-----|-----|-----|
| 0 (X1)     | 100 | 111 | 100 | 111 | 100 | 111 | 100 | 111 |
| 1 (X2)     | 100 | 100 | 010 | 010 | 100 | 100 | 010 | 010 |
| 2 (X3)     | 001 | 001 | 001 | 001 | 111 | 111 | 111 | 111 |
| 3 (X4)     | 010 | 010 | 010 | 010 | 100 | 100 | 100 | 100 |

Input vector X*k* is applied as the binary number `x = k-1`. That encoding is
this design's choice. The table above is not typed into the RTL.
`rev_pkg::next_code` derives it from the successor table and the state codes.

## From truth table to reversible gates

### Reed-Muller polynomials

A positive-polarity Reed-Muller polynomial is an XOR of AND terms of plain
variables, plus an optional constant 1. Every Boolean function has exactly
one. Take the truth vector `W_p`, where entry *i* is f(*i*). The coefficient
vector is

    W_RM = (F_n · W_p) mod 2,    F_n = [1 0; 1 1] ⊗ [1 0; 1 1] ⊗ ... (n times)

Entry *k* of `W_RM` is the coefficient of the product of the variables whose
bits are set in *k*. Over GF(2), `F_n` is its own inverse, so the same
transform takes coefficients back to a truth vector.

The multiplication is done as *n* butterfly stages, one per variable. A pair
of entries (f0, f1) that differ only in variable *j* becomes:

- (f0, f0 ⊕ f1) for the positive Davio expansion, f = f0 ⊕ x·(f0 ⊕ f1);
- (f1, f0 ⊕ f1) for the negative Davio expansion, f = f1 ⊕ x̄·(f0 ⊕ f1).

Choosing a polarity per variable gives a fixed-polarity ("mixed")
polynomial. Terms then use x̄ in place of x for the negative variables.

Here is a worked 4-variable example. X1 is the most significant index bit,
and vectors are written first entry first. The truth vector
`0110100010001101`, expanded negatively in X1, X2, X3 and positively in X4,
gives the coefficients `0111010001001001`. These are the terms
X4, X̄3, X4X̄3, X4X̄2, X4X̄1, X̄2X̄1 and X4X̄3X̄2X̄1. Both testbenches check this
example.

`rm_transform` is this butterfly as a combinational block of `N` XOR levels,
with `N = 4`. The `pol` input chooses the polarity per variable. The package
function `rev_pkg::rm_pos` computes the same positive-polarity transform at
elaboration time.

### Mapping a polynomial onto gates

`rm_reversible_net` builds one polynomial, given as a parameter, from
reversible gates alone:

- **Product term.** A Feynman gate copies the term's first variable onto an
  ancilla line that starts at 0, since Q = A ⊕ 0 = A. Each further variable
  is ANDed in by a Toffoli gate. Its controls are the partial product and the
  variable, and its target is a new 0 ancilla, since R = AB ⊕ 0.
- **Sum.** An output line starts at 0. Each term is XORed onto it with a
  Feynman gate whose control is the term line.
- **Constant 1.** A Feynman gate with its control tied to 1.

The unused gate outputs are the network's garbage lines and are not brought
out. With its default parameters the module builds Y1 below. No gate is shared between terms. This is the plainest mapping, not a
minimal one.

For the example automaton, the excitation functions over
`{x1, x0, y2, y1, y0}` are:

    Y0 = y0 ⊕ y0x0 ⊕ x1 ⊕ y0x1 ⊕ x0x1 ⊕ y0x0x1
    Y1 = y0 ⊕ y0x0 ⊕ y1x0 ⊕ y0x1 ⊕ y2x1 ⊕ x0x1 ⊕ y0x0x1 ⊕ y1x0x1
    Y2 = 1 ⊕ y1x0 ⊕ x1 ⊕ y2x1 ⊕ y1x0x1

Together they take 18 Toffoli and 37 Feynman gates. Y0 does not depend on
y1 or y2, so lint reports those inputs of its network as unused. That is a
property of the function, not a wiring error.

`automaton_excitation` computes these polynomials itself at elaboration. It
runs the package's truth-vector function and then `rm_pos`. Change the
successor table or the codes in `rev_pkg`, and the gate network follows.

## Feedback and timing

`race_free_automaton` closes the loop. The three state variables sit in
flip-flops that stand in for the feedback delays of an asynchronous circuit.
Variable *b* loads its next value on a rising clock edge only when
`fb_en[b]` is 1.

- With `fb_en = 3'b111`, all variables switch together. A change of state
  takes exactly one clock after the input vector is applied.
- With any other pattern, the variables switch in the order the enables
  allow. This reproduces unequal feedback delays. The automaton may sit on a
  transient code for a few clocks (`is_state = 0`). It never reaches the
  code of a third state, and it always ends in the table's successor.

The outputs are:

- `y`: the present code;
- `state_id`: the state number minus 1, valid while `is_state` is 1;
- `stable`: 1 when the next code equals the present one.

Reset is asynchronous and active low, and puts the automaton in state 1
(code 111).

The clocked feedback elements are a modelling choice. They make the race
behaviour observable and synthesizable. A clockless version would replace
each flip-flop with a delay element in the loop. Everything else is
combinational with no latency: the gates, `rm_transform` and the excitation
logic.

## The gate library

| module         | lines   | function                                   |
|----------------|---------|--------------------------------------------|
| `feynman_gate` | A B     | P = A, Q = A ⊕ B                           |
| `toffoli_gate` | A B C   | P = A, Q = B, R = AB ⊕ C                   |
| `fredkin_gate` | A B C   | P = A; Q, R = B, C if A = 0, else C, B     |
| `peres_gate`   | A B C   | P = A, Q = A ⊕ B, R = AB ⊕ C               |

The Fredkin gate is written as Q = Ā B ⊕ A C and R = A B ⊕ Ā C. The two
products in each equation are never 1 together, so ⊕ and OR agree. Only a
logic-level Fredkin gate is given here; a transistor-level (MOS switch)
version is not modelled.

## Top level

`reversible_traffic_top` places the parts side by side. Each has its own
ports:

| ports                                                   | part                               |
|---------------------------------------------------------|------------------------------------|
| `clk`, `rst_n`, `x`, `fb_en`, `y`, `state_id`, `is_state`, `stable` | the automaton          |
| `rm_wp`, `rm_pol`, `rm_wrm`                              | Reed-Muller transform, `RM_VARS` = 4 |
| `fk_in`, `fk_out`                                        | Fredkin gate                       |
| `pg_in`, `pg_out`                                        | Peres gate                         |

`fk_*` and `pg_*` are `rev_pkg::lines3_t` structs. Fields `a`, `b` and `c`
are lines A, B and C in, and lines P, Q and R out. The Feynman and Toffoli
gates are used inside the automaton's excitation logic.

## What is specified and what is chosen

These parts follow directly from the source material:

- the successor table;
- the state codes and their bit order;
- the gate functions;
- the Reed-Muller transform;
- the worked transform example.

Two readings were inferred rather than stated: which condition gives the
most significant state bit, and that X1 is the most significant variable in
the transform example. Both reproduce every published value: the four
state codes, and every intermediate node of the example's expansion tree.

These are this design's own choices:

- the binary input encoding;
- the next-state values at unused codes;
- positive polarity for the excitation polynomials;
- the one-ancilla-per-AND gate mapping;
- clocked feedback with per-variable enables;
- the reset state;
- all outputs of the automaton;
- run-time polarity on `rm_transform`;
- placing the parts side by side in one top.

## Files

| file                             | contents                                            |
|----------------------------------|-----------------------------------------------------|
| `rtl/rev_pkg.sv`                 | types, state table, codes, elaboration-time functions |
| `rtl/feynman_gate.sv` ... `peres_gate.sv` | the four reversible gates                  |
| `rtl/rm_transform.sv`            | truth vector → Reed-Muller coefficients             |
| `rtl/rm_reversible_net.sv`       | Reed-Muller polynomial as a Toffoli/Feynman network |
| `rtl/automaton_excitation.sv`    | next-state logic of the example automaton           |
| `rtl/race_free_automaton.sv`     | automaton with feedback elements                    |
| `rtl/reversible_traffic_top.sv`  | top level                                           |
| `tb/tb_<module>.sv`              | self-checking testbench per module                  |

## Simulation

Each testbench checks against values worked out independently. These are
typed-in truth tables, a sum-over-subsets reference for the transform, and a
state-number model of the automaton. Each prints
`TB_RESULT checks=N failures=M`. To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/rev_pkg.sv \
        tb/tb_reversible_traffic_top.sv --top-module tb_reversible_traffic_top
    ./obj_dir/Vtb_reversible_traffic_top

`tb_reversible_traffic_top` runs the whole design at its default sizes. It
does the following:

- a directed walk through all eight unstable table entries;
- 400 random input vectors, alternating all-enabled and random-enable
  switching, with a one-clock check on the former;
- the worked Reed-Muller example, and 200 forward-and-back transforms;
- random Fredkin and Peres inputs.

It counts each mechanism and fails if one never happened: single-clock
change, change through a transient code, input that keeps the state,
mixed-polarity transform, inverse transform, Fredkin swap, Fredkin pass.
`tb_automaton_excitation` checks every transient code of every transition
exhaustively. `tb_race_free_automaton` runs 600 input vectors, half of them
under random enables.

Verilator's `-Wall` reports two harmless kinds of warning. Gate outputs left
open on purpose (garbage lines) show as empty pin connections. Y0's network
shows the unused inputs noted above.
