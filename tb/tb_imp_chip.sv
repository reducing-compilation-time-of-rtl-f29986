// tb_imp_chip: an implication chip serving two 4-variable FSM chips (M = 2,
// S = 2). In each round the test drives random values on both bus slices in
// slots 0 (x_out) and 1 (xbar_out), then checks that the chip drives, in
// slots 2 and 3, the x_imp and xbar_imp computed in the test from random
// literal selects, and that it drives only in those slots.
module tb_imp_chip;
  import sat_pkg::*;
  localparam int K = 2, NV = 4, M = 2, S = 2, N = K * NV, W = 2 * NV / M;
  localparam int SELW = sel_width(N);

  logic clk = 1'b0, rst = 1'b1;
  logic [K-1:0][W-1:0] bus_rx;
  logic [K-1:0][W-1:0] bus_tx;
  logic bus_oe;
  logic [N-1:0][1:0][S-1:0][1:0][SELW-1:0] route;
  logic [N-1:0] xv, xbv, ex, exb;
  int checks = 0, failures = 0;

  imp_chip #(.K(K), .NV(NV), .M(M), .S(S), .CHIPS(K)) dut (.*);

  always #5 clk = ~clk;

  function automatic logic src(input int sel);
    if (sel == SEL_ZERO) return 1'b0;
    if (sel == SEL_ONE) return 1'b1;
    if (sel >= 2 * N + 2) return 1'b0;
    return ((sel - 2) % 2 == 1) ? xbv[(sel - 2) / 2] : xv[(sel - 2) / 2];
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bus_rx = '0;
    foreach (route[v, p, t, k]) route[v][p][t][k] = SELW'($urandom_range(0, 2 * N + 1));
    @(negedge clk);
    @(negedge clk);
    rst = 1'b0;   // slot 0 starts now
    for (int r = 0; r < 400; r++) begin
      if (r % 50 == 0)
        foreach (route[v, p, t, k]) route[v][p][t][k] = SELW'($urandom_range(0, 2 * N + 1));
      xv = N'($urandom); xbv = N'($urandom);
      // slot 0: x_out of each chip; slot 1: xbar_out
      bus_rx = xv;
      #1 checks++;
      if (bus_oe) begin failures++; $display("FAIL drives in slot 0"); end
      @(negedge clk);
      bus_rx = xbv;
      #1 checks++;
      if (bus_oe) begin failures++; $display("FAIL drives in slot 1"); end
      @(negedge clk);
      bus_rx = N'($urandom);  // not read in slots 2 and 3
      for (int v = 0; v < N; v++) begin
        ex[v] = 1'b0; exb[v] = 1'b0;
        for (int t = 0; t < S; t++) begin
          ex[v]  = ex[v]  | (src(int'(route[v][0][t][0])) & src(int'(route[v][0][t][1])));
          exb[v] = exb[v] | (src(int'(route[v][1][t][0])) & src(int'(route[v][1][t][1])));
        end
      end
      #1 checks++;
      if (!bus_oe || bus_tx !== ex) begin
        failures++; $display("FAIL slot 2 round %0d: %h vs %h", r, bus_tx, ex);
      end
      @(negedge clk);
      #1 checks++;
      if (!bus_oe || bus_tx !== exb) begin
        failures++; $display("FAIL slot 3 round %0d: %h vs %h", r, bus_tx, exb);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
