// tb_mux_counter: for M = 2 and M = 4 the slot must count 0..2M-1 and wrap,
// out_phase must be high exactly in the first M slots and en exactly in the
// last, so en comes every 2M clocks.
module tb_mux_counter;
  logic clk = 1'b0, rst = 1'b1;
  logic [1:0] slot2;
  logic [2:0] slot4;
  logic op2, en2, op4, en4;
  int checks = 0, failures = 0;

  mux_counter #(.M(2)) dut2 (.clk, .rst, .slot(slot2), .out_phase(op2), .en(en2));
  mux_counter #(.M(4)) dut4 (.clk, .rst, .slot(slot4), .out_phase(op4), .en(en4));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int last2 = -1, last4 = -1;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int c = 0; c < 200; c++) begin
      checks++;
      if (int'(slot2) != c % 4 || op2 !== (c % 4 < 2) || en2 !== (c % 4 == 3) ||
          int'(slot4) != c % 8 || op4 !== (c % 8 < 4) || en4 !== (c % 8 == 7)) begin
        failures++; $display("FAIL cycle %0d slot2=%0d slot4=%0d", c, slot2, slot4);
      end
      if (en2) begin
        checks++;
        if (last2 >= 0 && c - last2 != 4) begin failures++; $display("FAIL en2 spacing"); end
        last2 = c;
      end
      if (en4) begin
        checks++;
        if (last4 >= 0 && c - last4 != 8) begin failures++; $display("FAIL en4 spacing"); end
        last4 = c;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
