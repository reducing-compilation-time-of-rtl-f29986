// tb_search_ctrl: the search controller against a model in the test.
// The model follows the rules in words: activated from the left, wait for a
// fixpoint; pass on if implied, give up if in contradiction, else try 1; a
// failed 1 is followed by one clear round and a try of 0; a failed 0, or a
// return from the right to a block holding 0 or one that was skipped, passes
// control left; a return to a block holding 1 makes it try 0. Inputs are
// random (en, init and the activations rarer), and all outputs are compared
// every clock. Each kind of outcome must occur at least once.
module tb_search_ctrl;
  import sat_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic en = 1'b0, init = 1'b0, x_imp = 1'b0, xbar_imp = 1'b0;
  logic gchange = 1'b0, gcontra = 1'b0, e_il = 1'b0, e_ir = 1'b0;
  logic x_state, xbar_state, e_or, e_ol, clr_req;
  ctrl_state_e state;
  int checks = 0, failures = 0;

  search_ctrl dut (.*);

  always #5 clk = ~clk;

  // model: 0 idle, 1 wait-after-activation, 2 one, 3 clear, 4 zero,
  //        5 hold one, 6 hold zero, 7 passed-implied
  int m, m_or, m_ol;
  int seen [8];
  int n_or, n_ol;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m = 0; m_or = 0; m_ol = 0; n_or = 0; n_ol = 0;
    foreach (seen[i]) seen[i] = 0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < 40000; i++) begin
      @(negedge clk);
      en = $urandom_range(0, 1);
      init = $urandom_range(0, 99) == 0;
      x_imp = $urandom_range(0, 3) == 0;
      xbar_imp = $urandom_range(0, 3) == 0;
      gchange = $urandom_range(0, 2) == 0;
      gcontra = $urandom_range(0, 2) == 0;
      e_il = $urandom_range(0, 3) == 0;
      e_ir = $urandom_range(0, 3) == 0;
      @(posedge clk);
      if (en) begin
        int nm, no, nl;
        nm = m; no = 0; nl = 0;
        if (init) nm = 0;
        else case (m)
          0: if (e_il) nm = 1;
          1: if (!gchange) begin
               if (gcontra) begin nm = 0; nl = 1; end
               else if (x_imp || xbar_imp) begin nm = 7; no = 1; end
               else nm = 2;
             end
          2: if (!gchange) begin
               if (gcontra) nm = 3; else begin nm = 5; no = 1; end
             end
          3: nm = 4;
          4: if (!gchange) begin
               if (gcontra) begin nm = 0; nl = 1; end
               else begin nm = 6; no = 1; end
             end
          5: if (e_ir) nm = 3;
          6, 7: if (e_ir) begin nm = 0; nl = 1; end
          default: nm = 0;
        endcase
        m = nm; m_or = no; m_ol = nl;
        seen[m]++;
        n_or += no; n_ol += nl;
      end
      #1;
      checks++;
      if (x_state !== (m == 2 || m == 5) || xbar_state !== (m == 3 || m == 4 || m == 6) ||
          clr_req !== (m == 3) || e_or !== m_or[0] || e_ol !== m_ol[0]) begin
        failures++;
        if (failures < 10) $display("FAIL step %0d: model %0d state %b", i, m, state);
      end
    end
    for (int s = 0; s < 8; s++) begin
      checks++;
      if (seen[s] == 0) begin failures++; $display("FAIL model state %0d never reached", s); end
    end
    checks++;
    if (n_or == 0 || n_ol == 0) begin failures++; $display("FAIL no pass right or left"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
