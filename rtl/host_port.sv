// host_port: the solver's connection to the host computer.
//
// A start pulse (any cycle, ignored while busy) begins a new problem: for one
// round the port raises init, which returns every search block to idle and
// clears all values, then for one round go, which activates the first search
// block. The port then waits for the chain to finish: done (control left the
// last block going right) sets sat, giveup (control left the first block going
// left) sets unsat. While busy it counts clock cycles in cycles, so the host
// can read how many clocks the answer took. load copies the variables' values
// x_out into a shift register and each shift pulse moves it one place, the
// variable with the lowest index first on sdo.
// The paper gives the functions (answer, clock count, values shifted out);
// the handshake and register layout are this design's own.
module host_port #(
  parameter int N  = 32,
  parameter int CW = 32
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,       // round boundary
  input  logic          start,
  input  logic          done,
  input  logic          giveup,
  input  logic [N-1:0]  x_out,
  input  logic          load,
  input  logic          shift,
  output logic          init,
  output logic          go,
  output logic          busy,
  output logic          sat,
  output logic          unsat,
  output logic [CW-1:0] cycles,
  output logic          sdo
);
  typedef enum logic [1:0] {H_IDLE, H_INIT, H_GO, H_RUN} host_state_e;

  host_state_e  st;
  logic [N-1:0] sh;

  always_ff @(posedge clk) begin
    if (rst) begin
      st     <= H_IDLE;
      sat    <= 1'b0;
      unsat  <= 1'b0;
      cycles <= '0;
    end else begin
      if (st != H_IDLE) cycles <= cycles + 1'b1;
      unique case (st)
        H_IDLE: if (start) begin
                  st     <= H_INIT;
                  sat    <= 1'b0;
                  unsat  <= 1'b0;
                  cycles <= '0;
                end
        H_INIT: if (en) st <= H_GO;
        H_GO:   if (en) st <= H_RUN;
        H_RUN:  if (en && (done || giveup)) begin
                  st    <= H_IDLE;
                  sat   <= done;
                  unsat <= giveup;
                end
        default: st <= H_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst)        sh <= '0;
    else if (load)  sh <= x_out;
    else if (shift) sh <= sh >> 1;
  end

  assign init = (st == H_INIT);
  assign go   = (st == H_GO);
  assign busy = (st != H_IDLE);
  assign sdo  = sh[0];

  a_one_answer: assert property (@(posedge clk) disable iff (rst) !(sat && unsat));

endmodule
