// fsm_chip: the instance-independent chip holding the search blocks.
//
// NV search blocks (value register plus controller) form a chain: control
// enters the first block from e_il and leaves the last through e_or; going
// back it enters the last block from e_ir and leaves the first through e_ol.
// The chip ORs its blocks' change, contradiction and clear-request lines into
// l_change, l_contra and l_clear; the board ORs these over all chips into the
// global lines g_change, g_contra and g_clear that every block reads.
//
// Towards the implication-circuit chips the chip has a bus slice of
// W = 2*NV/M pins. In the first M slots of a round it drives the values
// {xbar_out, x_out} on it, one W-bit slice per slot (bus_oe high); in the
// last M slots it reads the implied values {xbar_imp, x_imp} back. Its search
// blocks only update in the last slot (en), so one round of 2*M clocks is one
// step of implication. With M=2 the slots carry x_out, xbar_out, x_imp and
// xbar_imp of all NV variables in turn.
// The chain, the global OR lines and the mux/demux follow the paper; the
// slot order and the init input are this design's own choices.
module fsm_chip
  import sat_pkg::*;
#(
  parameter int NV = 16,            // variables on this chip
  parameter int M  = 2,             // degree of pin multiplexing
  parameter int W  = 2 * NV / M     // bus pins of this chip
) (
  input  logic          clk,
  input  logic          rst,
  // chain of control
  input  logic          e_il,
  input  logic          e_ir,
  output logic          e_or,
  output logic          e_ol,
  // global lines
  input  logic          g_change,
  input  logic          g_contra,
  input  logic          g_clear,
  input  logic          g_init,
  output logic          l_change,
  output logic          l_contra,
  output logic          l_clear,
  // multiplexed bus slice
  output logic [W-1:0]  bus_tx,
  output logic          bus_oe,
  input  logic [W-1:0]  bus_rx,
  // values of this chip's variables and round boundary
  output logic [NV-1:0] x_out,
  output logic [NV-1:0] xbar_out,
  output logic          en
);
  localparam int CW = $clog2(2 * M);
  localparam int IW = (M > 1) ? $clog2(M) : 1;

  logic [CW-1:0]       slot;
  logic [IW-1:0]       idx;
  logic [NV-1:0]       x_imp, xbar_imp, x_state, xbar_state;
  logic [NV-1:0]       lcontra, lchange, clr_req, skipped;
  logic [NV:0]         fwd;   // fwd[j] activates block j from the left
  logic [NV:0]         bwd;   // bwd[j+1] activates block j from the right
  logic [M-1:0][W-1:0] tx_slices, rx_slices;

  initial begin
    assert ((2 * NV) % M == 0) else $fatal(1, "2*NV must be a multiple of M");
  end

  mux_counter #(.M(M)) u_cnt (
    .clk, .rst, .slot, .out_phase(bus_oe), .en
  );

  assign idx = bus_oe ? IW'(slot) : IW'(int'(slot) - M);

  // ---- search blocks ----
  assign fwd[0]  = e_il;
  assign bwd[NV] = e_ir;
  assign e_or    = fwd[NV];
  assign e_ol    = bwd[0];

  for (genvar j = 0; j < NV; j++) begin : g_blk
    ctrl_state_e st;

    var_value_reg u_val (
      .clk, .rst, .en,
      .gclear    (g_clear),
      .x_imp     (x_imp[j]),
      .xbar_imp  (xbar_imp[j]),
      .x_state   (x_state[j]),
      .xbar_state(xbar_state[j]),
      .x_out     (x_out[j]),
      .xbar_out  (xbar_out[j]),
      .lcontra   (lcontra[j]),
      .lchange   (lchange[j])
    );

    search_ctrl u_ctrl (
      .clk, .rst, .en,
      .init      (g_init),
      .x_imp     (x_imp[j]),
      .xbar_imp  (xbar_imp[j]),
      .gchange   (g_change),
      .gcontra   (g_contra),
      .e_il      (fwd[j]),
      .e_ir      (bwd[j+1]),
      .x_state   (x_state[j]),
      .xbar_state(xbar_state[j]),
      .e_or      (fwd[j+1]),
      .e_ol      (bwd[j]),
      .clr_req   (clr_req[j]),
      .state     (st)
    );

    assign skipped[j] = (st == S_SKIP);
  end

  assign l_change = |lchange;
  assign l_contra = |lcontra;
  assign l_clear  = |clr_req;

  // ---- pin multiplexing ----
  assign tx_slices = {xbar_out, x_out};

  pin_mux #(.SLICE(W), .NSLICE(M)) u_mux (
    .data(tx_slices), .idx, .pins(bus_tx)
  );

  pin_demux #(.SLICE(W), .NSLICE(M)) u_demux (
    .clk, .rst, .capture(!bus_oe), .idx, .pins(bus_rx), .held(), .data(rx_slices)
  );

  assign {xbar_imp, x_imp} = rx_slices;

endmodule
