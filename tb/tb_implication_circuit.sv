// tb_implication_circuit: checks the canonical sum-of-products implication.
// First the worked example: for the clauses (a+b+c)(~a+d+~e)(a+e)(~a+~c)
// variable a is implied 1 by bbar*cbar + ebar and implied 0 by dbar*e + c;
// all 3^5 codes (unassigned, 1, 0) of b..e are tried against those formulas.
// Then random literal selects and random inputs are compared with a sum of
// products worked out in the test.
module tb_implication_circuit;
  import sat_pkg::*;
  localparam int N = 8, S = 4, SELW = sel_width(N);

  logic [N-1:0] x_out, xbar_out;
  logic [1:0][S-1:0][1:0][SELW-1:0] route;
  logic x_imp, xbar_imp;
  int checks = 0, failures = 0;

  implication_circuit #(.N(N), .S(S)) dut (.*);

  function automatic logic src(input int sel);
    if (sel == SEL_ZERO) return 1'b0;
    if (sel == SEL_ONE) return 1'b1;
    if (sel >= 2 * N + 2) return 1'b0;
    return ((sel - 2) % 2 == 1) ? xbar_out[(sel - 2) / 2] : x_out[(sel - 2) / 2];
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // a=0 b=1 c=2 d=3 e=4
    route = '0;
    route[0][0][0] = SELW'(lit_sel(1, 1)); route[0][0][1] = SELW'(lit_sel(2, 1)); // bbar cbar
    route[0][1][0] = SELW'(lit_sel(4, 1)); route[0][1][1] = SELW'(SEL_ONE);       // ebar
    route[1][0][0] = SELW'(lit_sel(3, 1)); route[1][0][1] = SELW'(lit_sel(4, 0)); // dbar e
    route[1][1][0] = SELW'(lit_sel(2, 0)); route[1][1][1] = SELW'(SEL_ONE);       // c
    for (int code = 0; code < 81; code++) begin
      int c;
      c = code;
      x_out = '0; xbar_out = '0;
      for (int v = 1; v <= 4; v++) begin
        if (c % 3 == 1) x_out[v] = 1'b1;
        if (c % 3 == 2) xbar_out[v] = 1'b1;
        c = c / 3;
      end
      #1;
      checks++;
      if (x_imp !== ((xbar_out[1] & xbar_out[2]) | xbar_out[4]) ||
          xbar_imp !== ((xbar_out[3] & x_out[4]) | x_out[2])) begin
        failures++; $display("FAIL example code %0d", code);
      end
    end
    for (int i = 0; i < 3000; i++) begin
      logic ex, exb;
      for (int p = 0; p < 2; p++)
        for (int t = 0; t < S; t++)
          for (int k = 0; k < 2; k++)
            route[p][t][k] = SELW'($urandom_range(0, (1 << SELW) - 1));
      x_out = N'($urandom); xbar_out = N'($urandom);
      #1;
      ex = 1'b0; exb = 1'b0;
      for (int t = 0; t < S; t++) begin
        ex  = ex  | (src(int'(route[0][t][0])) & src(int'(route[0][t][1])));
        exb = exb | (src(int'(route[1][t][0])) & src(int'(route[1][t][1])));
      end
      checks++;
      if (x_imp !== ex || xbar_imp !== exb) begin
        failures++; $display("FAIL random %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
