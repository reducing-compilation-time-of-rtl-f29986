// pin_demux: collects the slices of a multiplexed transfer.
//
// While capture is high, the slice on pins is stored in register idx at the
// clock edge. held shows the stored slices. data shows the same, except that
// the slice being captured in the current cycle is taken straight from the
// pins, so a transfer is complete in the cycle of its last slice. A side that
// drives the bus from what it receives must use held, or the bus would feed
// back into itself. Registers reset to 0.
module pin_demux #(
  parameter int SLICE  = 16,
  parameter int NSLICE = 2,
  parameter int IW     = (NSLICE > 1) ? $clog2(NSLICE) : 1
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic                         capture,
  input  logic [IW-1:0]                idx,
  input  logic [SLICE-1:0]             pins,
  output logic [NSLICE-1:0][SLICE-1:0] held,
  output logic [NSLICE-1:0][SLICE-1:0] data
);

  always_ff @(posedge clk) begin
    if (rst) held <= '0;
    else if (capture)
      for (int k = 0; k < NSLICE; k++)
        if (int'(idx) == k) held[k] <= pins;
  end

  always_comb begin
    data = held;
    for (int k = 0; k < NSLICE; k++)
      if (capture && int'(idx) == k) data[k] = pins;
  end
endmodule
