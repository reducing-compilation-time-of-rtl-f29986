// mux_counter: slot counter of the pin-multiplexed bus.
//
// With multiplexing degree M the bus between the FSM chips and the
// implication-circuit chips carries a round of 2*M slots: slots 0..M-1 carry
// the variables' values from the FSM chips (out_phase high), slots M..2M-1 carry
// the implied values back. en is high in the last slot of each round and is
// the enable of every search block, so the search blocks stay idle while the
// bus is being multiplexed and demultiplexed. Every chip holds its own copy;
// all copies leave reset together and stay in step.
// The paper asks for such a counter; the slot order is this design's own.
module mux_counter #(
  parameter int M  = 2,                  // degree of pin multiplexing
  parameter int CW = $clog2(2 * M)
) (
  input  logic          clk,
  input  logic          rst,
  output logic [CW-1:0] slot,
  output logic          out_phase,       // FSM side drives the bus
  output logic          en               // last slot of the round
);
  always_ff @(posedge clk) begin
    if (rst)                        slot <= '0;
    else if (int'(slot) == 2*M - 1) slot <= '0;
    else                            slot <= slot + 1'b1;
  end

  assign out_phase = int'(slot) < M;
  assign en        = int'(slot) == 2*M - 1;

endmodule
