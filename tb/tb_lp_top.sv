// tb_lp_top: end-to-end testbench of the three-starting-point simplex engine.
//
// Runs with a 16-bit, 8-fraction-bit number format and a 2 x 4 problem so
// that the production-planning example can be solved exactly:
//   minimise -x1 - 2 x2  s.t.  x1 + x2 + x3 = 40,  2 x1 + x2 + x4 = 60.
// Expected (worked out by hand): optimum -80 at x2 = 40, x4 = 20. Controller
// 1, which leaves the start vertex along x2, reaches it after one pivot and
// is reported in slot 5; controller 0 (first negative reduced cost) would
// need the three pivots of the textbook iteration. A second run loads a
// problem whose only improving column has no positive entry and must end
// UNBOUNDED. The testbench counts the mechanisms of the engine and fails if
// one never happens: all three switching patterns, two and three modules
// busy at once, an OPTIMAL end, an UNBOUNDED end and a win by a controller
// other than controller 0. The returned basic solution is checked against
// A x = b0. The multi-chip engine in the same top is run on the example
// (one starting point: 3 pivots to -80) and on the unbounded problem.
// The production-planning example and its optimum come from the published
// example; the unbounded problem and the mechanism counts are this
// testbench's own.
module tb_lp_top;
  localparam int M = 2, N = 4, W = 16, FRAC = 8;
  localparam int ONE = 1 << FRAC;
  logic clk = 1'b0;
  logic rst_n, mem_we, start, busy, done, optimal, unbounded;
  logic [1:0] mem_sel, winner, pattern;
  logic [0:0] mem_row;
  logic [1:0] mem_col;
  logic [W-1:0] mem_wdata, objective;
  logic [M-1:0][1:0] x_col;
  logic [M-1:0][W-1:0] x_val;
  logic [7:0] pivots;
  logic [15:0] slots;
  logic [2:0] mod_busy;
  logic cs_start, cs_busy, cs_done, cs_end, cs_unbounded;
  logic [M-1:0][1:0] cs_x_col;
  logic [M-1:0][W-1:0] cs_x_val;
  logic [W-1:0] cs_objective;
  logic [7:0] cs_pivots;
  logic [3:0] cs_step;
  int checks = 0, failures = 0;
  int seen_pat [3];
  int n_two = 0, n_three = 0, n_opt = 0, n_unb = 0, n_other_win = 0;
  int a_ex [M][N] = '{'{1, 1, 1, 0}, '{2, 1, 0, 1}};
  int b_ex [M] = '{40, 60};
  int c_ex [N] = '{-1, -2, 0, 0};
  int a_un [M][N] = '{'{1, -1, 1, 0}, '{1, -1, 0, 1}};
  int b_un [M] = '{4, 6};
  int c_un [N] = '{0, -1, 0, 0};

  lp_top #(.M(M), .N(N), .W(W), .FRAC(FRAC)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (busy) begin
      seen_pat[pattern]++;
      if ($countones(mod_busy) >= 2) n_two++;
      if (mod_busy == 3'b111) n_three++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic wr(input int sel, input int row, input int col, input int val);
    @(negedge clk);
    mem_we = 1'b1; mem_sel = 2'(sel); mem_row = 1'(row); mem_col = 2'(col);
    mem_wdata = W'(val * ONE);
    @(negedge clk);
    mem_we = 1'b0;
  endtask

  task automatic load(input int a [M][N], input int b [M], input int c [N]);
    for (int i = 0; i < M; i++) begin
      for (int j = 0; j < N; j++) wr(0, i, j, a[i][j]);
      wr(1, i, 0, b[i]);
    end
    for (int j = 0; j < N; j++) wr(2, 0, j, c[j]);
  endtask

  task automatic run();
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (!done) @(negedge clk);
    if (optimal) n_opt++;
    if (unbounded) n_unb++;
    if (winner != 2'd0) n_other_win++;
  endtask

  task automatic run_cs();
    @(negedge clk); cs_start = 1'b1;
    @(negedge clk); cs_start = 1'b0;
    while (!cs_done) @(negedge clk);
  endtask

  initial begin
    int ax;
    rst_n = 1'b0; mem_we = 1'b0; start = 1'b0; cs_start = 1'b0; mem_sel = '0; mem_row = '0;
    mem_col = '0; mem_wdata = '0;
    #12 rst_n = 1'b1;

    load(a_ex, b_ex, c_ex);
    run();
    check(int'(optimal), 1, "example optimal");
    check(int'(unbounded), 0, "example bounded");
    check($signed(objective), -80 * ONE, "example objective -80");
    check(int'(winner), 1, "example winner");
    check(int'(pivots), 1, "example pivots of winner");
    check(int'(slots), 6, "example slots");
    for (int i = 0; i < M; i++) begin
      if (x_col[i] == 2'd1) check($signed(x_val[i]), 40 * ONE, "x2 = 40");
      if (x_col[i] == 2'd3) check($signed(x_val[i]), 20 * ONE, "x4 = 20");
    end
    // A x = b0 with the returned basic solution
    for (int r = 0; r < M; r++) begin
      ax = 0;
      for (int i = 0; i < M; i++) ax += a_ex[r][x_col[i]] * $signed(x_val[i]);
      check(ax, b_ex[r] * ONE, "A x = b0");
    end

    // the multi-chip engine on the same loaded problem: one starting point,
    // three pivots to the same optimum
    run_cs();
    check(int'(cs_end), 1, "chipset example END");
    check(int'(cs_pivots), 3, "chipset example pivots");
    check($signed(cs_objective), -80 * ONE, "chipset example objective -80");

    load(a_un, b_un, c_un);
    run();
    run_cs();
    check(int'(cs_unbounded), 1, "chipset unbounded problem");
    check(int'(unbounded), 1, "unbounded problem");
    check(int'(optimal), 0, "unbounded problem not optimal");
    check(int'(slots), 2, "unbounded found in slot 1");

    // the example again, to see that start re-initialises the controllers
    load(a_ex, b_ex, c_ex);
    run();
    check($signed(objective), -80 * ONE, "rerun objective");

    for (int s = 0; s < 3; s++) check(int'(seen_pat[s] > 0), 1, $sformatf("pattern %0d used", s));
    check(int'(n_two > 0), 1, "two modules busy at once");
    check(int'(n_three > 0), 1, "three modules busy at once");
    check(int'(n_opt > 0), 1, "OPTIMAL end");
    check(int'(n_unb > 0), 1, "UNBOUNDED end");
    check(int'(n_other_win > 0), 1, "win by another starting point");
    $display("mechanisms: patterns %0d/%0d/%0d cycles, 2-busy %0d, 3-busy %0d, optimal %0d, unbounded %0d, other-winner %0d",
             seen_pat[0], seen_pat[1], seen_pat[2], n_two, n_three, n_opt, n_unb, n_other_win);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
