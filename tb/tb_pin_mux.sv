// tb_pin_mux: every slice index of random data must show that slice.
module tb_pin_mux;
  localparam int SLICE = 8, NSLICE = 4;
  logic [NSLICE-1:0][SLICE-1:0] data;
  logic [1:0] idx;
  logic [SLICE-1:0] pins;
  int checks = 0, failures = 0;

  pin_mux #(.SLICE(SLICE), .NSLICE(NSLICE)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      data = 32'($urandom);
      idx = 2'($urandom);
      #1;
      checks++;
      if (pins !== data[idx]) begin
        failures++; $display("FAIL idx %0d", idx);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
