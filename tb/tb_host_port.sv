// tb_host_port: host-side sequencing of a solve.
// A round boundary en comes every 4 clocks. After start the port must hold
// init for exactly one round boundary, then go for one, then stay busy until
// done or giveup arrives with en, and report sat or unsat accordingly. The
// cycle count must equal the clocks the test saw it busy. A start while busy
// is ignored. load and shift must deliver the values lowest variable first.
module tb_host_port;
  localparam int N = 12;
  logic clk = 1'b0, rst = 1'b1, en, start = 1'b0, done = 1'b0, giveup = 1'b0;
  logic load = 1'b0, shift = 1'b0;
  logic [N-1:0] x_out = '0;
  logic init, go, busy, sat, unsat, sdo;
  logic [31:0] cycles;
  int checks = 0, failures = 0, cyc = 0, busy_clk;

  host_port #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  assign en = (cyc % 4) == 3;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int trial = 0; trial < 20; trial++) begin
      int n_init, n_go, rounds;
      bit ans;
      n_init = 0; n_go = 0;
      rounds = $urandom_range(1, 6);
      ans = 1'($urandom_range(0, 1));
      repeat ($urandom_range(0, 5)) @(negedge clk);
      start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      busy_clk = 1;
      check(busy && init && !go, "init follows start");
      // count init and go round boundaries
      while (!go) begin
        if (init && en) n_init++;
        @(negedge clk);
        busy_clk++;
      end
      while (go) begin
        if (en) n_go++;
        check(!init, "init and go never together");
        @(negedge clk);
        busy_clk++;
      end
      check(n_init == 1 && n_go == 1, "one round of init, one of go");
      start = 1'b1;  // ignored while busy
      // let the search run some rounds, then answer on a round boundary
      for (int r = 0; r < rounds; r++) begin
        do begin @(negedge clk); busy_clk++; start = 1'b0; end while (!en);
      end
      check(busy, "still busy while searching");
      done = ans; giveup = !ans;
      x_out = N'($urandom);
      @(negedge clk);
      done = 1'b0; giveup = 1'b0;
      check(!busy && sat == ans && unsat == !ans, "answer reported");
      check(cycles == 32'(busy_clk), $sformatf("cycles %0d vs %0d", cycles, busy_clk));
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      for (int v = 0; v < N; v++) begin
        check(sdo == x_out[v], $sformatf("value of variable %0d", v));
        shift = 1'b1;
        @(negedge clk);
        shift = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
