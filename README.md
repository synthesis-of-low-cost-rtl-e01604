# Partial parity prediction: a low-cost partially self-checking circuit

Concurrent error detection by parity prediction compares the parity of a
circuit's outputs with a parity predicted, from the same inputs, by a separate
piece of logic. For irregular multilevel logic that predictor is expensive,
often half to all of the area of the circuit it protects. The idea shown here
is to give up checking on a small, cheaply recognised part of the input space:

* a **characteristic function** `cf`, the OR of two input literals, says when
  checking is on (`cf = 1`) and when it is off (`cf = 0`);
* the inputs with `cf = 0` become don't-cares for the predictor, which can then
  be minimised much further;
* both error indication lines are forced to their error-free value while
  `cf = 0`, so the don't-cares never show up as false alarms.

The circuit is therefore only *partially* self-checking: an error that happens
while checking is off goes unseen, and a fault that keeps producing errors is
caught on a later input instead. In exchange the checking logic shrinks. Because
`cf` is an OR of two literals, both selected inputs still toggle freely while
checking is enabled, so the checking logic stays well exercised in normal
operation.

The RTL implements the scheme on a small four-input example and is written so
that its generic parts (parity tree, characteristic function, E1 gating) can be
reused for other circuits.

## The example circuit

Inputs are `A, B, C, D`. The parity of the function outputs is

    PP = A.B' + B'.C + A.B.C.D

The lone minterm `A.B.C.D` is what makes a full predictor costly. Choosing the
characteristic function

    cf = A' + C'          (checking off only when A = C = 1)

turns the four inputs with `A = C = 1` into don't-cares. The predictor then
reduces to `A.B' + B'.C`, and gating it by `cf` gives the partial parity
prediction

    E2 = PPP = A.B'.C' + A'.B'.C

which does not need `D` at all. Inside the disabled cube `A.C`, the full
predictor would be 1 on three of the four inputs. The partial predictor gives 0
on all four.

The function logic itself is this design's own three-output netlist. It was
chosen so that its outputs XOR to `PP` and so that internal nodes fan out to
several outputs:

    N1 = A | C      -> O1
    N2 = B & N1     -> O2
    N3 = A & C
    N4 = N3 & D
    N5 = N2 & N4    -> O3   (= A.B.C.D)

Because of the fan-out, a stuck-at fault on `N1` or `N2` can flip two outputs
at once. Parity cannot see such an even-multiplicity error, with or without the
partial scheme.

## The two error indication lines

| line | computed as | from |
|------|-------------|------|
| `E1` | `(O1 ^ O2 ^ O3) & cf` | parity tree, gated by its own `cf` copy |
| `E2` | `A.B'.C' + A'.B'.C`   | partial predictor, `cf` merged into it |

A fault-free circuit always gives `E1 == E2`, and both are 0 while checking is
off. **An error is signalled by `E1 != E2`.** The characteristic function is
built twice, once inside each line. If one shared `cf` gate drove both lines, a
stuck-at fault on that gate could silence both at once and could not itself be
found. With two copies, a single fault on either copy shows up on the pair.
The pair is brought out as it is. Whatever observes it does the comparison.

What a single stuck-at fault in the function logic does, for one input:

| output error | `cf` | result |
|--------------|------|--------|
| none | any | `E1 == E2` |
| odd number of bits | 1 | detected, `E1 != E2` |
| odd number of bits | 0 | missed (checking disabled); full parity prediction would have caught it |
| even number of bits | any | missed, as with full parity prediction |

## Coverage of the example

Coverage is measured against full parity prediction. It is the share of the
errors that a full predictor would detect that the partial scheme also
detects. Each of the 10 internal single stuck-at faults (five gate outputs,
stuck at 0 or 1) is applied on every input. Exhaustively, over all 16 inputs:

* 48 (fault, input) pairs give an error that full parity prediction detects;
* the partial scheme detects 36 of them, a coverage of 75 %.
* The sensitization probability per fault is the fraction of inputs giving a
  detectable error. Over the eight intervals of width 1/8, the faults are
  distributed 3, 2, 2, 1, 1, 0, 0, 1 under full parity. The undetected part
  `Delta_SP` lies entirely in the two lowest intervals, as 8, 2. The fault with
  the highest sensitization probability, `N5` stuck-at-1 (15/16), loses only
  3/16.

The end-to-end testbench also repeats the measurement with 32,000
pseudorandom input patterns and gets the same 75 %.

## Blocks

All blocks are combinational. There is no clock and no reset.

| file | module | role |
|------|--------|------|
| `rtl/ppsc_pkg.sv` | package | `ex_in_t` (inputs, `A` in bit 3), fault-site enum, `stuck_at_t`, `FAULT_NONE` |
| `rtl/function_logic.sv` | `function_logic` | example circuit, with an optional stuck-at fault on one internal node |
| `rtl/parity_tree.sv` | `parity_tree #(M)` | balanced XOR tree over `M` outputs |
| `rtl/char_function.sv` | `char_function #(N, IDX_I, IDX_J, NEG_I, NEG_J)` | `cf = lit_i | lit_j`, each literal in a chosen phase |
| `rtl/e1_indicator.sv` | `e1_indicator` | `E1 = parity & cf` with a private `char_function` |
| `rtl/partial_parity_predictor.sv` | `partial_parity_predictor` | `E2 = A.B'.C' + A'.B'.C` |
| `rtl/ppsc_top.sv` | `ppsc_top` | function logic, parity tree, E1 and E2 wired together |

Top-level ports of `ppsc_top`:

| port | dir | width | meaning |
|------|-----|-------|---------|
| `x` | in | 4 | `{A,B,C,D}` |
| `fault` | in | 5 | `{en, node[2:0], value}`; tie to `ppsc_pkg::FAULT_NONE` in normal use |
| `o` | out | 3 | `{O3,O2,O1}` |
| `e1`, `e2` | out | 1 each | error indication pair; error when they differ |

The `fault` port exists only to run the coverage measurement in simulation. A
circuit built from this RTL would tie it to `FAULT_NONE`, and synthesis then
removes the fault multiplexers.

### Reusing the generic parts

`parity_tree`, `char_function` and `e1_indicator` are parameterised. For
another circuit:

1. Instantiate the new function logic.
2. Set `M` of the parity tree to its output count.
3. Set `N`, `IDX_I`, `IDX_J`, `NEG_I` and `NEG_J` of `e1_indicator` to the
   chosen characteristic function.

The partial predictor has to be written anew. It is the circuit's parity
function, minimised with the OFF-set of `cf` as don't-care and then ANDed with
`cf`. Choosing the two literals is a design-time search:

1. Cofactor the parity function on each literal `I_k` or `I_k'`. Keep the
   literals that simplify it most.
2. Among pairs of kept literals, choose the one that gives the smallest
   predictor while still meeting the coverage wanted.

That search is not part of the RTL.

## Departures and open points

* The example's function logic is an assumed netlist. Only its output parity
  `PP` is defined by the method's example. Any circuit whose outputs XOR to
  `PP` would serve, but the coverage figures above belong to this netlist.
* The error-free state of the pair is `E1 == E2`, with both lines 0 while
  checking is off. Conventional checkers often use two-rail (complementary)
  indication instead. A two-rail pair is obtained by inverting `E2`.
* The larger benchmark circuits on which the method was evaluated (10 to 51
  inputs, 3 to 35 outputs) are not included, since their logic is not
  available here. The parity tree is tested up to 35 outputs.

## Simulation

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

    verilator --binary --timing --assert -Irtl \
        rtl/ppsc_pkg.sv rtl/function_logic.sv rtl/parity_tree.sv \
        rtl/char_function.sv rtl/e1_indicator.sv \
        rtl/partial_parity_predictor.sv rtl/ppsc_top.sv \
        tb/ppsc_top_tb.sv --top-module ppsc_top_tb
    ./obj_dir/Vppsc_top_tb

`ppsc_top_tb` runs three steps:

1. Fault-free check on all inputs.
2. Exhaustive fault run. It prints each fault's sensitization probabilities
   and the interval distribution.
3. The 32,000-pattern pseudorandom run.

It checks the outputs and that `E1 != E2` occurs exactly for odd errors with
`cf = 1`. It also checks the exact counts (48 / 36), and that each of the
following happens at least once: checking disabled, an error detected, an odd
error missed while disabled, and an even error. The block testbenches
(`function_logic_tb`, `parity_tree_tb`, `char_function_tb`,
`e1_indicator_tb`, `partial_parity_predictor_tb`) build the same way, with
their own module as top.
