// tb_var_value_reg: random test of the value store of one search block.
// A model in the test keeps the two expected flip-flop values: on en they
// load implied OR asserted value, or 0 under gclear. Every cycle the outputs,
// the contradiction flag (both values 1) and the change flag (some input
// differs from its stored value) are compared with the model.
module tb_var_value_reg;
  logic clk = 1'b0, rst = 1'b1, en, gclear, x_imp, xbar_imp, x_state, xbar_state;
  logic x_out, xbar_out, lcontra, lchange;
  logic mx, mxb;
  int checks = 0, failures = 0;

  var_value_reg dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    {en, gclear, x_imp, xbar_imp, x_state, xbar_state} = '0;
    mx = 1'b0; mxb = 1'b0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      en = $urandom_range(0, 2) != 0;
      gclear = $urandom_range(0, 7) == 0;
      x_imp = $urandom_range(0, 3) == 0;
      xbar_imp = $urandom_range(0, 3) == 0;
      x_state = $urandom_range(0, 2) == 0;
      xbar_state = $urandom_range(0, 2) == 0;
      #1;
      checks++;
      if (lchange !== (((x_imp | x_state) != mx) || ((xbar_imp | xbar_state) != mxb))) begin
        failures++; $display("FAIL lchange at %0d", i);
      end
      @(posedge clk);
      if (en) begin
        mx  = gclear ? 1'b0 : (x_imp | x_state);
        mxb = gclear ? 1'b0 : (xbar_imp | xbar_state);
      end
      #1;
      checks++;
      if (x_out !== mx || xbar_out !== mxb || lcontra !== (mx & mxb)) begin
        failures++; $display("FAIL values at %0d: %b%b vs %b%b", i, x_out, xbar_out, mx, mxb);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
