// tb_sat_board_m4: the end-to-end test of tb_sat_board run on a board of
// four 8-variable FSM chips, two implication chips each serving two of them,
// and multiplexing degree 4 (a round of 8 clocks, bus of 2N/4 pins).
//
// The test turns clause lists into literal selects for the implication
// circuits, starts the solver through the host port, waits for the answer,
// shifts the values out and checks them:
//  * the two worked examples of 2- and 5-variable formulas, whose satisfying
//    assignments under the search order (try 1 first) are known by hand;
//  * random instances with 1-, 2- and 3-literal clauses, every literal used at
//    most 4 times, on 6 to 32 variables. A software backtracking search decides
//    each instance independently; a SAT answer must agree with it and its
//    values must satisfy every clause, an UNSAT answer must agree with it.
// It also checks that the reported cycle count equals the clocks the test
// saw the solver busy, that the round is 2*M clocks, that unused variables
// read back as 1, and counts each mechanism: decisions undone by a clear,
// skipped (implied) variables, backtracking and forward passing between the
// two FSM chips, contradictions, SAT and UNSAT answers. A mechanism that
// never happens counts as a failure.
module tb_sat_board_m4;
  import sat_pkg::*;

  localparam int K = 4, NV = 8, M = 4, S = 4, NIMP = 2;
  localparam int N = K * NV;
  localparam int SELW = sel_width(N);
  localparam int MAXC = 200;

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

  // ---- software reference ----
  function automatic bit clause_false(input int c, input bit val[N], input bit asg[N]);
    for (int k = 0; k < clen[c]; k++) begin
      int v = cvar[c][k];
      if (!asg[v]) return 1'b0;
      if (val[v] != cneg[c][k]) return 1'b0;  // literal true
    end
    return 1'b1;
  endfunction

  function automatic bit sw_solve(input int v, input bit val[N], input bit asg[N]);
    bit vv[N], aa[N];
    if (v == nused) return 1'b1;
    for (int b = 1; b >= 0; b--) begin
      bit bad = 1'b0;
      vv = val; aa = asg;
      vv[v] = b[0]; aa[v] = 1'b1;
      for (int c = 0; c < nclause; c++)
        if (clause_false(c, vv, aa)) bad = 1'b1;
      if (!bad && sw_solve(v + 1, vv, aa)) return 1'b1;
    end
    return 1'b0;
  endfunction

  // ---- random instance ----
  task automatic gen_instance(input int nv, input int ncl);
    int occ [N][2];
    foreach (occ[v, p]) occ[v][p] = 0;
    nused = nv;
    nclause = 0;
    for (int tries = 0; tries < 20 * ncl && nclause < ncl; tries++) begin
      int r = $urandom_range(0, 19);
      int len = (r == 0) ? 1 : (r < 9) ? 2 : 3;
      bit ok = 1'b1;
      if (len > nv) len = nv;
      for (int k = 0; k < len; k++) begin
        int v;
        bit n;
        bit dup;
        do begin
          v = $urandom_range(0, nv - 1);
          dup = 1'b0;
          for (int o = 0; o < k; o++) if (cvar[nclause][o] == v) dup = 1'b1;
        end while (dup);
        n = $urandom_range(0, 1) == 1;
        cvar[nclause][k] = v;
        cneg[nclause][k] = n;
        if (occ[v][n] >= S) ok = 1'b0;
      end
      if (ok) begin
        for (int k = 0; k < len; k++) occ[cvar[nclause][k]][cneg[nclause][k]]++;
        clen[nclause] = len;
        nclause++;
      end
    end
  endtask

  // ---- mechanism counters ----
  int n_clear0, n_skip, n_back_chip, n_fwd_chip, n_contra, n_sat, n_unsat;
  int n_busy_clk, n_round_bad, last_en_cyc, cyc;
  logic [N-1:0] used_mask, skipped_all;

  for (genvar i = 0; i < K; i++) begin : g_skip
    assign skipped_all[i*NV +: NV] = dut.g_fsm[i].u_fsm.skipped;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (!rst) begin
      if (busy) n_busy_clk++;
      if (dut.chip_en[0]) begin
        if (last_en_cyc >= 0 && cyc - last_en_cyc != 2 * M) n_round_bad++;
        last_en_cyc = cyc;
        if (dut.g_clear && !dut.g_init) n_clear0++;
        if (|(skipped_all & used_mask)) n_skip++;
        if (dut.chain_bwd[1]) n_back_chip++;
        if (dut.chain_fwd[1]) n_fwd_chip++;
        if (dut.g_contra) n_contra++;
      end
    end
  end

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
    while (busy && t < 200000) begin
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

  // ---- watchdog ----
  initial begin
    repeat (30000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit hw_sat, sw_sat;
    logic [N-1:0] vals;
    int cu;
    bit val0[N], asg0[N];
    n_clear0 = 0; n_skip = 0; n_back_chip = 0; n_fwd_chip = 0; n_contra = 0;
    n_sat = 0; n_unsat = 0; n_busy_clk = 0; n_round_bad = 0; last_en_cyc = -1; cyc = 0;
    used_mask = '0;
    foreach (val0[v]) begin val0[v] = 1'b0; asg0[v] = 1'b0; end
    route = '0;
    repeat (5) @(negedge clk);
    rst = 1'b0;
    repeat (3) @(negedge clk);

    // Example: (x1 + ~x2)(~x1 + x2); answer x1 = x2 = 1.
    nused = 2; nclause = 2;
    clen[0] = 2; cvar[0][0] = 0; cneg[0][0] = 0; cvar[0][1] = 1; cneg[0][1] = 1;
    clen[1] = 2; cvar[1][0] = 0; cneg[1][0] = 1; cvar[1][1] = 1; cneg[1][1] = 0;
    run(hw_sat, vals, cu);
    check(hw_sat && vals[1:0] == 2'b11, $sformatf("example 1: sat=%0b vals=%b", hw_sat, vals[1:0]));
    check(&vals[N-1:2], "unused variables read 1");

    // Example: (a+b+c)(~a+d+~e)(a+e)(~a+~c); a..e = 0..4.
    // Search order a,b,c,d,e trying 1 first gives a=1 b=1 c=0 (implied) d=1 e=1.
    nused = 5; nclause = 4;
    clen[0] = 3; cvar[0][0] = 0; cneg[0][0] = 0; cvar[0][1] = 1; cneg[0][1] = 0; cvar[0][2] = 2; cneg[0][2] = 0;
    clen[1] = 3; cvar[1][0] = 0; cneg[1][0] = 1; cvar[1][1] = 3; cneg[1][1] = 0; cvar[1][2] = 4; cneg[1][2] = 1;
    clen[2] = 2; cvar[2][0] = 0; cneg[2][0] = 0; cvar[2][1] = 4; cneg[2][1] = 0;
    clen[3] = 2; cvar[3][0] = 0; cneg[3][0] = 1; cvar[3][1] = 2; cneg[3][1] = 1;
    run(hw_sat, vals, cu);
    check(hw_sat && vals[4:0] == 5'b11011, $sformatf("example 2: sat=%0b vals=%b", hw_sat, vals[4:0]));

    // Crafted: the rest of the first chip's variables are forced to 1 by unit
    // clauses, and with x0 = 1 the four clauses on the first two variables of
    // the second chip cannot all hold. The contradiction found there must
    // travel back through the skipped variables to x0, which then takes 0:
    // x0 = 0, every other used variable 1.
    nused = NV + 2; nclause = 0;
    for (int v = 1; v < NV; v++) begin
      clen[nclause] = 1; cvar[nclause][0] = v; cneg[nclause][0] = 0; nclause++;
    end
    for (int q = 0; q < 4; q++) begin
      clen[nclause] = 3;
      cvar[nclause][0] = 0;  cneg[nclause][0] = 1;
      cvar[nclause][1] = NV;     cneg[nclause][1] = q[0];
      cvar[nclause][2] = NV + 1; cneg[nclause][2] = q[1];
      nclause++;
    end
    run(hw_sat, vals, cu);
    check(hw_sat && vals[NV+1:0] == {{(NV+1){1'b1}}, 1'b0},
          $sformatf("crafted: sat=%0b vals=%h", hw_sat, vals[NV+1:0]));

    // Random instances.
    for (int i = 0; i < 300; i++) begin
      int nv, ncl;
      nv = (i < 60) ? $urandom_range(6, NV) : $urandom_range(NV + 1, N);
      ncl = $urandom_range(nv, 3 * nv);
      gen_instance(nv, ncl);
      sw_sat = sw_solve(0, val0, asg0);
      run(hw_sat, vals, cu);
      check(hw_sat == sw_sat, $sformatf("instance %0d (%0d vars, %0d clauses): hw %0b sw %0b",
                                        i, nv, nclause, hw_sat, sw_sat));
      if (hw_sat) check(satisfies(vals), $sformatf("instance %0d values satisfy all clauses", i));
      if (hw_sat) check(cu >= 2 * M * N, "at least one round per variable");
    end

    $display("mechanisms: clear-and-try-0=%0d skip=%0d chip-backtrack=%0d chip-forward=%0d contra=%0d sat=%0d unsat=%0d",
             n_clear0, n_skip, n_back_chip, n_fwd_chip, n_contra, n_sat, n_unsat);
    check(n_round_bad == 0, "every round is 2*M clocks");
    check(n_clear0 > 0, "clear before trying 0 happened");
    check(n_skip > 0, "implied variable skipped");
    check(n_back_chip > 0, "backtrack across FSM chips happened");
    check(n_fwd_chip > 0, "forward pass across FSM chips happened");
    check(n_contra > 0, "contradiction seen");
    check(n_sat > 0, "a SAT answer");
    check(n_unsat > 0, "an UNSAT answer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
