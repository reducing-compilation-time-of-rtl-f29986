// pin_mux: puts one slice of a wide vector on the pins.
//
// data is cut into NSLICE slices of SLICE bits; idx selects the slice that
// appears on pins. Combinational. Together with pin_demux on the far side it
// trades pins for time: NSLICE times fewer pins, NSLICE slots per transfer.
module pin_mux #(
  parameter int SLICE  = 16,
  parameter int NSLICE = 2,
  parameter int IW     = (NSLICE > 1) ? $clog2(NSLICE) : 1
) (
  input  logic [NSLICE-1:0][SLICE-1:0] data,
  input  logic [IW-1:0]                idx,
  output logic [SLICE-1:0]             pins
);
  always_comb begin
    pins = '0;
    for (int k = 0; k < NSLICE; k++)
      if (int'(idx) == k) pins = data[k];
  end
endmodule
