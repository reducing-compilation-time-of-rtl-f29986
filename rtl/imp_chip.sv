// imp_chip: an implication-circuit chip.
//
// The chip listens to the bus slices of all K FSM chips. In the first M slots
// of a round it collects every variable's value (x_out, xbar_out) of the whole
// solver. In the last M slots it drives back, on the slices of the CHIPS FSM
// chips it serves, the implied values
// {xbar_imp, x_imp} that its implication circuits compute from the collected
// values. The implication logic is the same canonical form for every variable
// and every instance; only the literal selects in route depend on the problem,
// standing for the instance-specific routing of the chip.
// route[v] belongs to the v-th variable of the served chips.
// Collection order and slot timing match fsm_chip; the partitioning of
// variables among several implication chips is this design's own choice.
module imp_chip
  import sat_pkg::*;
#(
  parameter int K     = 2,            // FSM chips on the board
  parameter int NV    = 16,           // variables per FSM chip
  parameter int M     = 2,            // degree of pin multiplexing
  parameter int S     = 4,            // occurrence bound s
  parameter int CHIPS = 2,            // FSM chips served
  parameter int N     = K * NV,
  parameter int W     = 2 * NV / M,
  parameter int SELW  = sel_width(N)
) (
  input  logic                                          clk,
  input  logic                                          rst,
  input  logic [K-1:0][W-1:0]                           bus_rx,
  output logic [CHIPS-1:0][W-1:0]                       bus_tx,
  output logic                                          bus_oe,
  input  logic [CHIPS*NV-1:0][1:0][S-1:0][1:0][SELW-1:0] route
);
  localparam int CW = $clog2(2 * M);
  localparam int IW = (M > 1) ? $clog2(M) : 1;

  logic [CW-1:0]              slot;
  logic [IW-1:0]              idx;
  logic                       out_phase, en_unused;
  logic [M-1:0][K*W-1:0]      rx_slices;
  logic [N-1:0]               x_all, xbar_all;
  logic [CHIPS*NV-1:0]        x_imp, xbar_imp;

  mux_counter #(.M(M)) u_cnt (
    .clk, .rst, .slot, .out_phase, .en(en_unused)
  );

  assign idx    = out_phase ? IW'(slot) : IW'(int'(slot) - M);
  assign bus_oe = !out_phase;

  pin_demux #(.SLICE(K*W), .NSLICE(M)) u_demux (
    .clk, .rst, .capture(out_phase), .idx, .pins(bus_rx), .held(rx_slices), .data()
  );

  // Reassemble each FSM chip's {xbar_out, x_out} vector from its slices.
  always_comb begin
    for (int i = 0; i < K; i++) begin
      logic [2*NV-1:0] v;
      for (int s = 0; s < M; s++)
        v[s*W +: W] = rx_slices[s][i*W +: W];
      x_all[i*NV +: NV]    = v[NV-1:0];
      xbar_all[i*NV +: NV] = v[2*NV-1:NV];
    end
  end

  for (genvar v = 0; v < CHIPS*NV; v++) begin : g_imp
    implication_circuit #(.N(N), .S(S), .SELW(SELW)) u_ic (
      .x_out(x_all), .xbar_out(xbar_all), .route(route[v]),
      .x_imp(x_imp[v]), .xbar_imp(xbar_imp[v])
    );
  end

  for (genvar c = 0; c < CHIPS; c++) begin : g_tx
    logic [M-1:0][W-1:0] tx_slices;
    assign tx_slices = {xbar_imp[c*NV +: NV], x_imp[c*NV +: NV]};
    pin_mux #(.SLICE(W), .NSLICE(M)) u_mux (
      .data(tx_slices), .idx, .pins(bus_tx[c])
    );
  end

endmodule
