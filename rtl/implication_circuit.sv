// implication_circuit: implied values x_imp and xbar_imp of one variable.
//
// Each output is a canonical sum of products: an OR of S two-input AND terms.
// One term stands for one clause in which the literal occurs; with at most
// three literals per clause the term is the AND of "the other two literals are
// false", e.g. the clause (a + b + c) contributes bbar_out & cbar_out to a_imp.
// The gates are the same for every problem instance: only which signals feed
// the AND inputs depends on the instance. That routing is the route input, one
// literal select per AND input (encoding in sat_pkg: constant 0, constant 1,
// x_out[j] or xbar_out[j]). An unused term has a constant-0 input; a clause of
// two literals ties its second input to 1; a constant-1 term forces the value,
// which is how an unused variable is kept implied so its search block skips it.
// Purely combinational. The select encoding is this design's own choice; the
// document's chips realise the same choice with FPGA routing.
module implication_circuit
  import sat_pkg::*;
#(
  parameter int N    = 32,            // variables in the whole solver
  parameter int S    = 4,             // terms per output (occurrence bound s)
  parameter int SELW = sel_width(N)
) (
  input  logic [N-1:0]                     x_out,
  input  logic [N-1:0]                     xbar_out,
  // route[p][t][i]: p=0 feeds x_imp, p=1 feeds xbar_imp; term t; AND input i
  input  logic [1:0][S-1:0][1:0][SELW-1:0] route,
  output logic                             x_imp,
  output logic                             xbar_imp
);
  logic [2*N+1:0]          src;
  logic [1:0][S-1:0]       term;

  always_comb begin
    src[SEL_ZERO] = 1'b0;
    src[SEL_ONE]  = 1'b1;
    for (int j = 0; j < N; j++) begin
      src[2 + 2 * j] = x_out[j];
      src[3 + 2 * j] = xbar_out[j];
    end
  end

  function automatic logic pick(input logic [2*N+1:0] v, input logic [SELW-1:0] sel);
    return (int'(sel) < 2 * N + 2) ? v[sel] : 1'b0;
  endfunction

  always_comb begin
    for (int p = 0; p < 2; p++)
      for (int t = 0; t < S; t++)
        term[p][t] = pick(src, route[p][t][0]) & pick(src, route[p][t][1]);
  end

  assign x_imp    = |term[0];
  assign xbar_imp = |term[1];

endmodule
