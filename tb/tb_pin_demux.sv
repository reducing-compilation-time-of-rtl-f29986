// tb_pin_demux: sends random 4-slice transfers, one slice per clock, with
// random idle cycles in between. held must show every slice once captured;
// data must show the finished transfer already in the cycle of its last slice.
module tb_pin_demux;
  localparam int SLICE = 8, NSLICE = 4;
  logic clk = 1'b0, rst = 1'b1, capture = 1'b0;
  logic [1:0] idx = '0;
  logic [SLICE-1:0] pins = '0;
  logic [NSLICE-1:0][SLICE-1:0] held, data, word;
  int checks = 0, failures = 0;

  pin_demux #(.SLICE(SLICE), .NSLICE(NSLICE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    checks++;
    if (held !== '0) begin failures++; $display("FAIL reset"); end
    for (int i = 0; i < 300; i++) begin
      word = 32'($urandom);
      for (int s = 0; s < NSLICE; s++) begin
        capture = 1'b1; idx = 2'(s); pins = word[s];
        #1;
        if (s == NSLICE - 1) begin
          checks++;
          if (data !== word) begin failures++; $display("FAIL bypass %0d", i); end
        end
        @(negedge clk);
      end
      capture = 1'b0; pins = 8'($urandom);
      repeat ($urandom_range(0, 2)) @(negedge clk);
      checks++;
      if (held !== word || data !== word) begin failures++; $display("FAIL held %0d", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
