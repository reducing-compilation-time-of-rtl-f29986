// sat_pkg: types and helper functions shared by the SAT-solver blocks.
//
// The solver keeps every variable's value as a two-bit code (x_out, xbar_out):
// 00 unassigned, 10 one, 01 zero, 11 contradiction. The implication circuits
// pick their product-term inputs from these 2N signals plus the constants 0
// and 1 through a literal select (see lit_sel): 0 selects constant 0, 1
// selects constant 1, 2+2j selects x_out of variable j and 3+2j selects
// xbar_out of variable j. That numbering and the controller state encoding
// are this design's own choices.
package sat_pkg;

  // Controller states of one search block. One-hot, as the paper's FSM
  // estimate assumes one-hot encoding.
  typedef enum logic [7:0] {
    S_IDLE  = 8'b0000_0001,  // not active, variable not decided
    S_CHECK = 8'b0000_0010,  // activated from the left, waiting for a fixpoint
    S_TRY1  = 8'b0000_0100,  // asserting value 1, waiting for a fixpoint
    S_CLR0  = 8'b0000_1000,  // one round of global clear before trying 0
    S_TRY0  = 8'b0001_0000,  // asserting value 0, waiting for a fixpoint
    S_HOLD1 = 8'b0010_0000,  // value 1 decided, control passed right
    S_HOLD0 = 8'b0100_0000,  // value 0 decided, control passed right
    S_SKIP  = 8'b1000_0000   // value was implied, control passed right
  } ctrl_state_e;

  // Width of a literal select for N variables: 2N+2 sources.
  function automatic int sel_width(input int n);
    return $clog2(2 * n + 2);
  endfunction

  // Literal select of variable j; neg=1 selects xbar_out (variable is 0).
  function automatic int lit_sel(input int j, input bit neg);
    return 2 + 2 * j + (neg ? 1 : 0);
  endfunction

  localparam int SEL_ZERO = 0;
  localparam int SEL_ONE  = 1;

endpackage
