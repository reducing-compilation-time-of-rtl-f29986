// tb_fsm_chip: one FSM chip of 5 search blocks (M = 2) with the test acting
// as the implication chip and closing the global OR lines. The test reads the
// chip's values from the bus in slots 0 and 1, computes the implied values
// of a clause list and drives them back in slots 2 and 3.
//  * (a+b+c)(~a+d+~e)(a+e)(~a+~c): control must leave on the right with
//    a=1 b=1 c=0 d=1 e=1 (search order a..e, 1 tried first);
//  * (a+b)(a+~b)(~a+b)(~a+~b): control must come back out on the left;
//  * the bus slots must carry x_out and xbar_out as the chip holds them.
module tb_fsm_chip;
  localparam int NV = 5, M = 2, W = 2 * NV / M;

  logic clk = 1'b0, rst = 1'b1;
  logic e_il = 1'b0, e_ir = 1'b0, e_or, e_ol;
  logic g_change, g_contra, g_clear, g_init = 1'b0;
  logic l_change, l_contra, l_clear;
  logic [W-1:0] bus_tx, bus_rx;
  logic bus_oe, en;
  logic [NV-1:0] x_out, xbar_out, rx, rxb, ix, ixb;
  int checks = 0, failures = 0, cyc = 0;

  fsm_chip #(.NV(NV), .M(M)) dut (.*);

  assign g_change = l_change;
  assign g_contra = l_contra;
  assign g_clear  = l_clear | g_init;

  always #5 clk = ~clk;

  int nclause;
  int clen [8];
  int cvar [8][3];
  bit cneg [8][3];

  // implied values of every variable from the values seen on the bus
  always_comb begin
    ix = '0; ixb = '0;
    for (int c = 0; c < nclause; c++)
      for (int k = 0; k < clen[c]; k++) begin
        logic all_false;
        all_false = 1'b1;
        for (int o = 0; o < clen[c]; o++)
          if (o != k) all_false &= cneg[c][o] ? rx[cvar[c][o]] : rxb[cvar[c][o]];
        if (all_false) begin
          if (cneg[c][k]) ixb[cvar[c][k]] = 1'b1;
          else            ix[cvar[c][k]]  = 1'b1;
        end
      end
  end

  // the test's side of the bus, in step with the chip's slot counter
  always @(posedge clk) begin
    if (rst) cyc <= 0;
    else cyc <= cyc + 1;
  end
  always_comb begin
    case (cyc % 4)
      2: bus_rx = ix;
      3: bus_rx = ixb;
      default: bus_rx = '0;
    endcase
  end
  always @(posedge clk) begin
    if (!rst && cyc % 4 == 0) begin
      rx <= bus_tx;
      checks++;
      if (!bus_oe || bus_tx !== x_out) begin failures++; $display("FAIL slot 0 data"); end
    end
    if (!rst && cyc % 4 == 1) begin
      rxb <= bus_tx;
      checks++;
      if (!bus_oe || bus_tx !== xbar_out) begin failures++; $display("FAIL slot 1 data"); end
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_chip(output bit right, output bit left);
    int t = 0;
    // one round of init, then one round of activation
    @(negedge clk);
    while (!en) @(negedge clk);
    g_init = 1'b1;
    @(negedge clk);
    while (!en) @(negedge clk);
    g_init = 1'b0;
    e_il = 1'b1;
    @(negedge clk);
    while (!en) @(negedge clk);
    e_il = 1'b0;
    @(negedge clk);
    right = 1'b0; left = 1'b0;
    while (!right && !left && t < 10000) begin
      if (en) begin right = e_or; left = e_ol; end
      if (!(right || left)) @(negedge clk);
      t++;
    end
  endtask

  initial begin
    bit r, l;
    rx = '0; rxb = '0;
    nclause = 4;
    clen[0] = 3; cvar[0][0] = 0; cneg[0][0] = 0; cvar[0][1] = 1; cneg[0][1] = 0; cvar[0][2] = 2; cneg[0][2] = 0;
    clen[1] = 3; cvar[1][0] = 0; cneg[1][0] = 1; cvar[1][1] = 3; cneg[1][1] = 0; cvar[1][2] = 4; cneg[1][2] = 1;
    clen[2] = 2; cvar[2][0] = 0; cneg[2][0] = 0; cvar[2][1] = 4; cneg[2][1] = 0;
    clen[3] = 2; cvar[3][0] = 0; cneg[3][0] = 1; cvar[3][1] = 2; cneg[3][1] = 1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    run_chip(r, l);
    checks++;
    if (!r || l || x_out !== 5'b11011 || xbar_out !== 5'b00100) begin
      failures++; $display("FAIL example: r=%0b l=%0b x=%b xb=%b", r, l, x_out, xbar_out);
    end
    nclause = 4;
    for (int q = 0; q < 4; q++) begin
      clen[q] = 2;
      cvar[q][0] = 0; cneg[q][0] = q[1];
      cvar[q][1] = 1; cneg[q][1] = q[0];
    end
    run_chip(r, l);
    checks++;
    if (r || !l) begin failures++; $display("FAIL unsat: r=%0b l=%0b", r, l); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
