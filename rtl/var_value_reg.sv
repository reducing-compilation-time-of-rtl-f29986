// var_value_reg: the value store of one search block.
//
// Two flip-flops hold the variable's code (x_out, xbar_out). Each loads the OR
// of the implied value from the implication circuit and the value the search
// controller asserts (x_state, xbar_state), and a global clear (gclear) empties
// both. LContra is the AND of the two outputs (the variable is both 1 and 0).
// LChange compares each flip-flop's input with its output and ORs the two
// comparisons: it is high while the next update would change the value, so
// its global OR going low marks the fixpoint of implication.
// This structure follows the search block figure of Zhong's solver. The
// flip-flops only load when en is high (the round boundary of the pin
// multiplexing) and have a synchronous reset; both are this design's choices.
module var_value_reg (
  input  logic clk,
  input  logic rst,
  input  logic en,          // round boundary: load the flip-flops
  input  logic gclear,      // global clear, sampled with en
  input  logic x_imp,       // implied 1
  input  logic xbar_imp,    // implied 0
  input  logic x_state,     // controller asserts 1
  input  logic xbar_state,  // controller asserts 0
  output logic x_out,
  output logic xbar_out,
  output logic lcontra,
  output logic lchange
);
  logic d_x, d_xbar;

  assign d_x    = x_imp | x_state;
  assign d_xbar = xbar_imp | xbar_state;

  always_ff @(posedge clk) begin
    if (rst) begin
      x_out    <= 1'b0;
      xbar_out <= 1'b0;
    end else if (en) begin
      if (gclear) begin
        x_out    <= 1'b0;
        xbar_out <= 1'b0;
      end else begin
        x_out    <= d_x;
        xbar_out <= d_xbar;
      end
    end
  end

  assign lcontra = x_out & xbar_out;
  assign lchange = (d_x ^ x_out) | (d_xbar ^ xbar_out);

endmodule
