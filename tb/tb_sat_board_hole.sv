// tb_sat_board_hole: pigeonhole formulas on the board configuration sized
// for the 110-variable benchmark hole10: four FSM chips of 47 variables
// (188 in all), one implication chip, multiplexing degree 2 and occurrence
// bound 11. hole10 itself (11 pigeons, 10 holes, 187 variables after cutting
// its 10-literal clauses into 3-literal ones) takes far too many search steps
// to simulate; the test runs the same family from 3 pigeons in 2 holes up to
// HMAX+1 pigeons in HMAX holes, built and cut into 3-literal clauses the
// same way, and expects UNSAT for each. It also runs h pigeons in h holes,
// which must be SAT with values that satisfy every clause.
module tb_sat_board_hole;
  import sat_pkg::*;

  localparam int K = 4, NV = 47, M = 2, S = 11, NIMP = 1;
  localparam int N = K * NV;
  localparam int SELW = sel_width(N);
  localparam int MAXC = 700;
  localparam int HMAX = 6;

  logic clk = 1'b0, rst = 1'b1;
  logic [N-1:0][1:0][S-1:0][1:0][SELW-1:0] route;
  logic start = 1'b0, load = 1'b0, shift = 1'b0;
  logic busy, sat, unsat, sdo;
  logic [31:0] cycles;

  sat_board #(.K(K), .NV(NV), .M(M), .S(S), .NIMP(NIMP)) dut (
    .clk, .rst, .route, .start, .busy, .sat, .unsat, .cycles,
    .load, .shift, .sdo
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---- instance store ----
  int nclause, nused;
  int clen [MAXC];
  int cvar [MAXC][3];
  bit cneg [MAXC][3];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---- routing from clauses ----
  task automatic build_route();
    int nterm [N][2];
    route = '0;
    foreach (nterm[v, p]) nterm[v][p] = 0;
    for (int c = 0; c < nclause; c++)
      for (int k = 0; k < clen[c]; k++) begin
        int v = cvar[c][k];
        int p = cneg[c][k] ? 1 : 0;
        int t = nterm[v][p];
        int q = 0;
        nterm[v][p]++;
        route[v][p][t][0] = SELW'(SEL_ONE);
        route[v][p][t][1] = SELW'(SEL_ONE);
        for (int o = 0; o < clen[c]; o++)
          if (o != k) begin
            // the other literal is false: select the opposite polarity
            route[v][p][t][q] = SELW'(lit_sel(cvar[c][o], !cneg[c][o]));
            q++;
          end
      end
    for (int v = nused; v < N; v++) begin
      route[v][0][0][0] = SELW'(SEL_ONE);
      route[v][0][0][1] = SELW'(SEL_ONE);
    end
  endtask

  int n_sat, n_unsat, n_busy_clk;
  logic [N-1:0] used_mask;

  always @(posedge clk) if (!rst && busy) n_busy_clk++;

  // ---- run one instance on the hardware ----
  task automatic run(output bit hw_sat, output logic [N-1:0] vals, output int cyc_used);
    int t = 0;
    build_route();
    used_mask = '0;
    for (int v = 0; v < nused; v++) used_mask[v] = 1'b1;
    @(negedge clk);
    n_busy_clk = 0;
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (busy && t < 3000000) begin
      @(negedge clk);
      t++;
    end
    check(!busy, "solver finished");
    if (busy) begin
      $display("solver still busy after %0d clocks, stopping", t);
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    check(sat ^ unsat, "exactly one answer");
    check(cycles == 32'(n_busy_clk), $sformatf("cycle count %0d vs %0d", cycles, n_busy_clk));
    cyc_used = int'(cycles);
    hw_sat = sat;
    if (sat) n_sat++;
    if (unsat) n_unsat++;
    load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    for (int v = 0; v < N; v++) begin
      vals[v] = sdo;
      shift = 1'b1;
      @(negedge clk);
      shift = 1'b0;
    end
  endtask

  function automatic bit satisfies(input logic [N-1:0] vals);
    for (int c = 0; c < nclause; c++) begin
      bit any = 1'b0;
      for (int k = 0; k < clen[c]; k++)
        if (vals[cvar[c][k]] != cneg[c][k]) any = 1'b1;
      if (!any) return 1'b0;
    end
    return 1'b1;
  endfunction

  // Pigeonhole formula: P pigeons, H holes, variable p(i,j) = i*H + j says
  // pigeon i sits in hole j. Each pigeon sits somewhere (one clause of H
  // literals, cut into 3-literal clauses with H-3 new variables placed after
  // all original ones); no hole holds two pigeons (two-literal clauses).
  task automatic gen_hole(input int P, input int H);
    int d = P * H;
    nclause = 0;
    for (int i = 0; i < P; i++) begin
      if (H <= 3) begin
        clen[nclause] = H;
        for (int j = 0; j < H; j++) begin
          cvar[nclause][j] = i * H + j; cneg[nclause][j] = 1'b0;
        end
        nclause++;
      end else begin
        // (l0 + l1 + d0)(~d0 + l2 + d1) ... (~d(H-4) + l(H-2) + l(H-1))
        clen[nclause] = 3;
        cvar[nclause][0] = i * H;     cneg[nclause][0] = 1'b0;
        cvar[nclause][1] = i * H + 1; cneg[nclause][1] = 1'b0;
        cvar[nclause][2] = d;         cneg[nclause][2] = 1'b0;
        nclause++;
        for (int j = 2; j < H - 2; j++) begin
          clen[nclause] = 3;
          cvar[nclause][0] = d;         cneg[nclause][0] = 1'b1;
          cvar[nclause][1] = i * H + j; cneg[nclause][1] = 1'b0;
          cvar[nclause][2] = d + 1;     cneg[nclause][2] = 1'b0;
          nclause++;
          d++;
        end
        clen[nclause] = 3;
        cvar[nclause][0] = d;                 cneg[nclause][0] = 1'b1;
        cvar[nclause][1] = i * H + H - 2;     cneg[nclause][1] = 1'b0;
        cvar[nclause][2] = i * H + H - 1;     cneg[nclause][2] = 1'b0;
        nclause++;
        d++;
      end
    end
    for (int j = 0; j < H; j++)
      for (int i = 0; i < P; i++)
        for (int k = i + 1; k < P; k++) begin
          clen[nclause] = 2;
          cvar[nclause][0] = i * H + j; cneg[nclause][0] = 1'b1;
          cvar[nclause][1] = k * H + j; cneg[nclause][1] = 1'b1;
          nclause++;
        end
    nused = d;
  endtask

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit hw_sat;
    logic [N-1:0] vals;
    int cu;
    n_sat = 0; n_unsat = 0; n_busy_clk = 0;
    used_mask = '0;
    route = '0;
    repeat (5) @(negedge clk);
    rst = 1'b0;
    repeat (3) @(negedge clk);
    for (int h = 2; h <= HMAX; h++) begin
      // h+1 pigeons in h holes: unsatisfiable
      gen_hole(h + 1, h);
      run(hw_sat, vals, cu);
      $display("hole%0d: %0d variables, %0d clauses, answer %s after %0d clocks",
               h, nused, nclause, hw_sat ? "SAT" : "UNSAT", cu);
      check(!hw_sat, $sformatf("hole%0d must be unsatisfiable", h));
      // h pigeons in h holes: satisfiable
      gen_hole(h, h);
      run(hw_sat, vals, cu);
      check(hw_sat, $sformatf("%0d pigeons in %0d holes must be satisfiable", h, h));
      if (hw_sat) begin
        check(satisfies(vals), $sformatf("%0d-pigeon values satisfy all clauses", h));
        check(&(vals | used_mask), "unused variables read 1");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
