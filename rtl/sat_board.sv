// sat_board: the board-level SAT solver (top).
//
// The solver searches for a satisfying assignment of a 3-SAT instance in
// which every literal occurs in at most S clauses. K FSM chips, each with NV
// search blocks, are chained into one chain of N = K*NV variables; the chips
// never change between problems. NIMP implication-circuit chips compute the
// implied values; chip j serves FSM chips j*K/NIMP .. (j+1)*K/NIMP-1 and
// listens to all of them. The problem instance lives only in route, the
// literal selects of the implication circuits (see implication_circuit).
// Variables the instance does not use should have a constant-1 term in their
// x_imp so that their search blocks skip them.
//
// Between the two kinds of chip runs a shared bus of 2*N/M pins, one slice of
// 2*NV/M pins per FSM chip, time-multiplexed in rounds of 2*M clocks (FSM
// chips drive in the first M slots, implication chips in the last M). The
// global OR lines g_change, g_contra and g_clear join all FSM chips.
//
// Host side: pulse start, wait until busy falls, read sat / unsat and cycles,
// then load and shift to read the values of the N variables on sdo.
// Defaults are the 32-variable solver with two 16-variable FSM chips, one
// implication chip and pin multiplexing of degree 2; S=4 is the occurrence
// bound of the paper's implication circuit drawing.
module sat_board
  import sat_pkg::*;
#(
  parameter int K    = 2,          // FSM chips
  parameter int NV   = 16,         // variables per FSM chip
  parameter int M    = 2,          // degree of pin multiplexing
  parameter int S    = 4,          // occurrence bound s
  parameter int NIMP = 1,          // implication-circuit chips
  parameter int N    = K * NV,
  parameter int SELW = sel_width(N)
) (
  input  logic                                   clk,
  input  logic                                   rst,
  input  logic [N-1:0][1:0][S-1:0][1:0][SELW-1:0] route,
  input  logic                                   start,
  output logic                                   busy,
  output logic                                   sat,
  output logic                                   unsat,
  output logic [31:0]                            cycles,
  input  logic                                   load,
  input  logic                                   shift,
  output logic                                   sdo
);
  localparam int W   = 2 * NV / M;
  localparam int CPI = K / NIMP;     // FSM chips per implication chip

  logic [K-1:0][W-1:0]   fsm_tx, bus;
  logic [K-1:0]          fsm_oe;
  logic [NIMP-1:0][CPI-1:0][W-1:0] imp_tx;
  logic [NIMP-1:0]       imp_oe;
  logic [K:0]            chain_fwd, chain_bwd;
  logic [K-1:0]          l_change, l_contra, l_clear, chip_en;
  logic                  g_change, g_contra, g_clear, g_init, go;
  logic [K-1:0][NV-1:0]  x_out, xbar_out;

  initial begin
    assert (K % NIMP == 0) else $fatal(1, "K must be a multiple of NIMP");
  end

  // ---- global lines ----
  assign g_change = |l_change;
  assign g_contra = |l_contra;
  assign g_clear  = (|l_clear) | g_init;

  // ---- FSM chips ----
  assign chain_fwd[0] = go;
  assign chain_bwd[K] = 1'b0;

  for (genvar i = 0; i < K; i++) begin : g_fsm
    fsm_chip #(.NV(NV), .M(M)) u_fsm (
      .clk, .rst,
      .e_il    (chain_fwd[i]),
      .e_ir    (chain_bwd[i+1]),
      .e_or    (chain_fwd[i+1]),
      .e_ol    (chain_bwd[i]),
      .g_change, .g_contra, .g_clear, .g_init,
      .l_change(l_change[i]),
      .l_contra(l_contra[i]),
      .l_clear (l_clear[i]),
      .bus_tx  (fsm_tx[i]),
      .bus_oe  (fsm_oe[i]),
      .bus_rx  (bus[i]),
      .x_out   (x_out[i]),
      .xbar_out(xbar_out[i]),
      .en      (chip_en[i])
    );
  end

  // ---- implication-circuit chips ----
  for (genvar j = 0; j < NIMP; j++) begin : g_imp
    imp_chip #(.K(K), .NV(NV), .M(M), .S(S), .CHIPS(CPI),
               .SELW(SELW)) u_imp (
      .clk, .rst,
      .bus_rx(bus),
      .bus_tx(imp_tx[j]),
      .bus_oe(imp_oe[j]),
      .route (route[j*CPI*NV +: CPI*NV])
    );
  end

  // ---- shared bus: each slice has one driver per slot ----
  for (genvar i = 0; i < K; i++) begin : g_bus
    assign bus[i] = (fsm_oe[i] ? fsm_tx[i] : '0)
                  | (imp_oe[i / CPI] ? imp_tx[i / CPI][i % CPI] : '0);

    a_one_driver: assert property (@(posedge clk) disable iff (rst)
                                   !(fsm_oe[i] && imp_oe[i / CPI]));
  end

  // ---- rules of the whole board ----
  for (genvar i = 1; i < K; i++) begin : g_step
    // every chip's slot counter runs in step with the first one
    a_rounds_in_step: assert property (@(posedge clk) disable iff (rst) chip_en[i] == chip_en[0]);
  end

  // when control leaves the last block, every variable has exactly one value
  a_done_all_assigned: assert property (@(posedge clk) disable iff (rst)
                                        (chain_fwd[K] && chip_en[0]) |-> ((x_out ^ xbar_out) == '1));

  // ---- host ----
  host_port #(.N(N)) u_host (
    .clk, .rst,
    .en    (chip_en[0]),
    .start,
    .done  (chain_fwd[K]),
    .giveup(chain_bwd[0]),
    .x_out (x_out),
    .load, .shift,
    .init  (g_init),
    .go,
    .busy, .sat, .unsat, .cycles, .sdo
  );

endmodule
