# A SAT solver split into fixed search chips and instance-specific implication chips

This is synthesizable SystemVerilog for a hardware Boolean-satisfiability solver. It is
built after Chan et al., *Reducing Compilation Time of Zhong's FPGA-based SAT solver*. That
paper takes Zhong's solver, where every problem instance becomes its own multi-FPGA design,
and reorganises it. Most of the hardware then never changes between problems.

The solver answers one question: given a formula in conjunctive normal form, is there an
assignment that makes every clause true? It runs a Davis-Putnam style backtracking search.
There is one *search block* per variable, and the blocks form a chain in a fixed variable
order. Only one block is active at a time. Every variable has an *implication circuit*. The
implication circuits all work at once: they derive the values that are forced by the
decisions made so far.

The main idea is to cut each search block in two:

* **The FSM part** is the controller, the value flip-flops and the contradiction and change
  detection. It is the same for every problem, so whole chips of them are built once.
* **The implication circuits** are all given one fixed canonical form. The formula is
  normalised to clauses of at most three literals, and each literal may occur in at most `S`
  clauses. A new problem then changes only *which* signals feed the gates, that is, the
  routing. In this RTL the routing is an input port, `route`.

## Value encoding and implication circuits

Each variable `x` is held as two bits `(x_out, xbar_out)`:

| x_out | xbar_out | meaning        |
|-------|----------|----------------|
| 0     | 0        | unassigned     |
| 1     | 0        | value 1        |
| 0     | 1        | value 0        |
| 1     | 1        | contradiction  |

A clause `(x + y + z)` forces `x = 1` once `y` and `z` are both 0. So each clause in which
the literal `x` appears adds one product term `ybar_out & zbar_out` to `x_imp`. The same holds
for `~x` and `xbar_imp`. `implication_circuit` therefore computes:

    x_imp    = OR over S terms of (a AND b)
    xbar_imp = OR over S terms of (c AND d)

Each AND input is picked by a literal select of `SELW = $clog2(2N+2)` bits. The encoding
comes from `sat_pkg`:

| select   | source                                              |
|----------|-----------------------------------------------------|
| 0        | constant 0: unused term                             |
| 1        | constant 1: pads two- and one-literal clauses        |
| 2 + 2j   | `x_out[j]`: variable j is 1                         |
| 3 + 2j   | `xbar_out[j]`: variable j is 0                      |

`route[v][p][t][i]` is the select for variable `v`, output `p` (0 = `x_imp`, 1 =
`xbar_imp`), term `t` and AND input `i`.

Worked example: `(a+b+c)(~a+d+~e)(a+e)(~a+~c)`.

* `a_imp = bbar·cbar + ebar`
* `abar_imp = dbar·e + c`

The second term of each output has its other input tied to constant 1.

To translate a clause list:

1. For every occurrence of literal `l` of variable `v` in clause `C`, take the next free term
   of `route[v][neg(l)]`.
2. For each other literal `m` of `C`, set one input to the select of `m` being false. That
   is `3+2u` for a positive `m = u`, and `2+2u` for `m = ~u`.
3. Pad with 1.

A variable the instance does not use gets `x_imp` forced by a term of (1, 1). Its search
block then skips it, so a board with `N` blocks also solves smaller problems. Longer clauses
must first be cut into 3-literal clauses with extra variables. A literal occurring more than
`S` times must first be split as well. Put the extra variables at the end of the chain:
their values are implied and cost no search. `tb/tb_sat_board_hole.sv` shows the clause
cutting (`gen_hole`), and `tb/tb_sat_board.sv` shows the route building (`build_route`).

## The search: rounds, fixpoints and the controller

Time is divided into **rounds**. A round is one step of implication: every value flip-flop
loads `x_imp | x_state` (and `xbar_imp | xbar_state`) at the same time. `var_value_reg`
computes two flags for this step:

* `lchange`: the flip-flop inputs differ from its outputs.
* `lcontra`: both bits are 1.

The board ORs these over all variables into the global lines `g_change` and `g_contra`. A
round with `g_change` low means implication has reached its fixpoint. Only then does the
active controller judge `g_contra`. Values only grow during implication. Going back on a
decision therefore needs a global clear (`g_clear`): all value flip-flops empty, and the
remaining decisions re-derive their implications over the following rounds.

`search_ctrl` (one-hot states, all changes on the round boundary `en`):

| state | x_state / xbar_state | leaves when | to |
|-------|----------------------|-------------|----|
| IDLE  | 0 / 0 | `e_il` (control from the left) | CHECK |
| CHECK | 0 / 0 | fixpoint: contradiction / already implied / free | IDLE + `e_ol` / SKIP + `e_or` / TRY1 |
| TRY1  | 1 / 0 | fixpoint: contradiction / none | CLR0 / HOLD1 + `e_or` |
| CLR0  | 0 / 1, `clr_req` | next round (global clear happens) | TRY0 |
| TRY0  | 0 / 1 | fixpoint: contradiction / none | IDLE + `e_ol` / HOLD0 + `e_or` |
| HOLD1 | 1 / 0 | `e_ir` (control back from the right) | CLR0 |
| HOLD0 | 0 / 1 | `e_ir` | IDLE + `e_ol` |
| SKIP  | 0 / 0 | `e_ir` | IDLE + `e_ol` |

`e_or` and `e_ol` are one-round pulses into the neighbour's `e_il` and `e_ir`. The search
ends in one of two ways:

* **SAT:** control leaves the last block to the right (`done`).
* **UNSAT:** control leaves the first block to the left (`giveup`).

Every used variable then holds either a decision or an implied value, with no contradiction.
Because every clause has at most three literals, an all-false clause would have forced a
contradiction. The values therefore satisfy the formula.

Two points make the timing safe:

* Entering TRY1 or TRY0 always makes the variable's own `lchange` high in the next round.
  So the controller never mistakes a stale quiet round for a fixpoint.
* The clear round CLR0 already asserts value 0. The round after the clear therefore starts
  from the remaining decisions alone.

## The shared, multiplexed bus

The FSM chips and the implication chips are linked by one bus of `2N/M` wires, where `M` is
the degree of pin multiplexing. Each FSM chip owns a slice of `2·NV/M` wires. A round has
`2M` clock slots, counted by a `mux_counter` in every chip. All the counters leave reset
together.

| slots        | driver          | content |
|--------------|-----------------|---------|
| 0 .. M-1     | FSM chips       | `{xbar_out, x_out}` of the chip, one slice per slot (M=2: all `x_out`, then all `xbar_out`) |
| M .. 2M-1    | implication chips | `{xbar_imp, x_imp}` of the chip's variables, likewise |

The FSM chip's search blocks update in the last slot (`en`). Its `pin_demux` passes that
last slice straight from the pins. The implication chip uses only the registered slices, so
no combinational path runs from the bus back onto the bus. One implication step therefore
takes `2M` clocks: 4 at the default `M=2`. The bus is modelled without tri-states: each
slice is the OR of the two enabled drivers, and an assertion checks that only one drives.

## Board organisation and parameters

`sat_board` is the top:

* `K` FSM chips (`fsm_chip`) are chained into one search chain of `N = K·NV` variables.
* `NIMP` implication chips (`imp_chip`) each listen to every FSM chip's slice and drive back
  the implied values of `K/NIMP` FSM chips.
* The chips' local change, contradiction and clear lines are ORed into the global lines.
* A `host_port` starts solves and reports results.

| parameter | default | meaning |
|-----------|---------|---------|
| `K`    | 2  | FSM chips |
| `NV`   | 16 | variables per FSM chip |
| `M`    | 2  | degree of pin multiplexing (`2·NV` must divide by `M`) |
| `S`    | 4  | terms per implication output (literal occurrence bound) |
| `NIMP` | 1  | implication chips (`K` must divide by `NIMP`) |

The defaults are the 32-variable solver with two 16-variable FSM chips, one implication chip
and `M = 2`. `S = 4` is the occurrence bound of the implication circuit the paper draws; the
paper does not give `S` for its built solvers. The setting `K=4, NV=47, M=2, S=11, NIMP=1`
is the board the paper proposes for the 187-variable normalised `hole10` benchmark. It
elaborates and simulates (see below).

## Host interface

1. Pulse `start` while `busy` is low. The host port spends one round on *init*: every
   controller returns to IDLE and the values are cleared. It then spends one round on *go*:
   the first block is activated. After that it waits.
2. `busy` falls when the answer arrives. Exactly one of `sat` and `unsat` is then high.
   `cycles` holds the clock cycles from `start` to the answer.
3. Pulse `load`, then read `sdo` and pulse `shift` `N` times. The bits come out with variable
   0 first, and a 1 means the variable is 1.

`route` must stay stable while the solver is busy.

## Files

| file | contents |
|------|----------|
| `rtl/sat_pkg.sv` | controller state type, literal-select helpers |
| `rtl/sat_board.sv` | top: chips, shared bus, global lines, host port |
| `rtl/fsm_chip.sv` | chain of search blocks, chip ORs, mux/demux |
| `rtl/search_ctrl.sv` | per-variable search controller |
| `rtl/var_value_reg.sv` | value flip-flops, contradiction and change detection |
| `rtl/imp_chip.sv` | implication chip: demux, implication circuits, mux |
| `rtl/implication_circuit.sv` | canonical sum of products with routed inputs |
| `rtl/pin_mux.sv`, `rtl/pin_demux.sv`, `rtl/mux_counter.sv` | pin multiplexing |
| `rtl/host_port.sv` | start, answer, cycle count, serial readout |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the board tests below |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself. It has a
watchdog. For example:

    verilator --binary --timing --assert -Wall -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/sat_pkg.sv tb/tb_sat_board.sv --top-module tb_sat_board -o sim
    ./obj_dir/sim

Board-level tests:

* **`tb_sat_board`**, at the default parameters. It runs:
  * the two worked examples. Their answers are known: `x1 = x2 = 1`, and
    `a b c d e = 1 1 0 1 1`.
  * a crafted instance whose contradiction, found in the second chip, must backtrack across
    a chip boundary and through skipped variables.
  * 300 random instances of 6 to 32 variables with 1- to 3-literal clauses.

  A software backtracking search in the testbench decides each random instance
  independently. Every SAT answer's values are checked against every clause. The test also
  checks the cycle counter and the round length. It counts each mechanism and fails if one
  never happens: clear-and-try-0, skipped implied variables, backtracking and forward
  passing between chips, contradictions, SAT and UNSAT answers.
* **`tb_sat_board_m4`**: the same test on four 8-variable FSM chips, two implication chips
  and `M = 4`.
* **`tb_sat_board_hole`**: the 188-variable `hole10` board. It runs pigeonhole formulas from
  3 pigeons in 2 holes up to 7 pigeons in 6 holes, all of which must be UNSAT. It also runs
  the matching n-in-n formulas, which must be SAT. Clocks to answer grow nine- to tenfold per
  added hole: 39 033 clocks for 6 pigeons in 5 holes, and 402 593 for 7 pigeons in 6. `hole10` itself is far
  beyond what can be simulated.

The module tests compare against models written in the testbench, with random stimulus.
The controller, for example, is compared clock by clock with a behavioural model of the
rules in the table above.

## What is and is not here, and where it departs from the paper

Follows the paper:

* the two-bit value encoding;
* the value flip-flops with an OR of implied and asserted values, a global clear, AND-style
  contradiction and input-versus-output change detection;
* the forward and backward control chain with `start`, `giveup` and `Done` at its ends;
* the global change, contradiction and clear OR lines;
* the canonical 2-input-AND / S-input-OR implication form;
* the partitioning into FSM chips and implication chips;
* pin multiplexing with mux, demux and a counter that holds the FSMs during transfers;
* the board with every implication chip listening to all FSM chips;
* a host port that reports the answer, the clock count and the values shifted out.

Choices of this design, where the paper gives the function but not the details:

* the controller's states, including the CHECK wait and the CLR0 clear round before trying
  0;
* what a block does when control returns from the right: chronological backtracking;
* the slot order on the bus, and the reading of the `2n/m` pin count as one bus shared by
  both directions;
* modelling the instance routing as literal-select inputs;
* the host handshake (init/go rounds, load/shift);
* synchronous active-high reset everywhere.

Not included:

* the software flow from CNF to 3-SAT and 3,s-SAT and on to FPGA routing files;
* place and route;
* the FPGA devices, the prototyping board and the host PC.

The paper's 32-variable demonstration run (281 clocks) cannot be repeated: its clauses are
not given.
