// search_ctrl: the search controller ("FSM") of one variable's search block.
//
// The blocks form a chain in a fixed variable order and only one of them is
// active at a time. Activation arrives from the left (e_il) or, when a block
// further right has exhausted its choices, from the right (e_ir). The active
// block waits until implication has settled (gchange low). If its variable is
// already implied it passes control on (e_or) without deciding anything.
// Otherwise it asserts 1 (x_state); if that ends in a contradiction (gcontra)
// it asks for one round of global clear (clr_req), asserts 0 and waits again;
// if 0 also fails it gives up its value and returns control left (e_ol).
// A block that passed right and is handed control back from the right tries 0
// if it was holding 1, and otherwise passes control further left.
//
// All state changes happen on en, once per communication round. e_or and
// e_ol are one-round pulses. init forces the block back to idle.
// The paper gives this behaviour in words; the states, the clear round
// before trying 0, the fixpoint wait on activation and init are this design's
// own choices.
module search_ctrl
  import sat_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        en,        // round boundary
  input  logic        init,      // return to idle (new problem)
  input  logic        x_imp,     // variable implied 1
  input  logic        xbar_imp,  // variable implied 0
  input  logic        gchange,   // some value still changing
  input  logic        gcontra,   // some variable in contradiction
  input  logic        e_il,      // activation from the left (forward)
  input  logic        e_ir,      // activation from the right (backtrack)
  output logic        x_state,
  output logic        xbar_state,
  output logic        e_or,      // pass control right
  output logic        e_ol,      // pass control left
  output logic        clr_req,   // request a global clear this round
  output ctrl_state_e state
);
  ctrl_state_e nxt;
  logic        nxt_or, nxt_ol;

  always_comb begin
    nxt    = state;
    nxt_or = 1'b0;
    nxt_ol = 1'b0;
    unique case (state)
      S_IDLE:  if (e_il) nxt = S_CHECK;
      S_CHECK: if (!gchange) begin
                 if (gcontra) begin
                   nxt = S_IDLE;  nxt_ol = 1'b1;
                 end else if (x_imp || xbar_imp) begin
                   nxt = S_SKIP;  nxt_or = 1'b1;
                 end else begin
                   nxt = S_TRY1;
                 end
               end
      S_TRY1:  if (!gchange) begin
                 if (gcontra) nxt = S_CLR0;
                 else begin
                   nxt = S_HOLD1; nxt_or = 1'b1;
                 end
               end
      S_CLR0:  nxt = S_TRY0;
      S_TRY0:  if (!gchange) begin
                 if (gcontra) begin
                   nxt = S_IDLE;  nxt_ol = 1'b1;
                 end else begin
                   nxt = S_HOLD0; nxt_or = 1'b1;
                 end
               end
      S_HOLD1: if (e_ir) nxt = S_CLR0;
      S_HOLD0: if (e_ir) begin
                 nxt = S_IDLE;  nxt_ol = 1'b1;
               end
      S_SKIP:  if (e_ir) begin
                 nxt = S_IDLE;  nxt_ol = 1'b1;
               end
      default: nxt = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      e_or  <= 1'b0;
      e_ol  <= 1'b0;
    end else if (en) begin
      if (init) begin
        state <= S_IDLE;
        e_or  <= 1'b0;
        e_ol  <= 1'b0;
      end else begin
        state <= nxt;
        e_or  <= nxt_or;
        e_ol  <= nxt_ol;
      end
    end
  end

  assign x_state    = (state == S_TRY1) || (state == S_HOLD1);
  assign xbar_state = (state == S_CLR0) || (state == S_TRY0) || (state == S_HOLD0);
  assign clr_req    = (state == S_CLR0);

  // Control is handed on only as a one-round pulse, never in both directions.
  a_one_way: assert property (@(posedge clk) disable iff (rst) !(e_or && e_ol));
  a_state_onehot: assert property (@(posedge clk) disable iff (rst) $onehot(state));

endmodule
