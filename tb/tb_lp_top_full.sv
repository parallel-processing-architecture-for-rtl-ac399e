// tb_lp_top_full: lp_top at its default size (M = 3 constraints, N = 9
// columns, 8-bit integers) solving two complete problems end to end.
//
// The problems have 0/1/2 coefficients and three slack columns. Their optima
// were found independently by enumerating every basis of the 3 x 9 system
// with exact rational arithmetic:
//   problem 1: optimum -44 (x2 = 5, x3 = 8, slack 3 = 18), reached first by
//              controller 2 after 2 pivots, reported in slot 7
//   problem 2: optimum -72, reached first by controller 0 after 3 pivots,
//              reported in slot 9
// The same loaded problems are then solved by the multi-chip engine at its
// default chip sizes (one chip A, two chip Cs), which follows a single
// starting point and needs 3 pivots for each.
// Besides the objective and the reporting controller, the basic solution is
// checked against A x = b0 and x >= 0, and the testbench fails if a
// switching pattern, two or three modules busy at once or an OPTIMAL end
// never occurred.
module tb_lp_top_full;
  localparam int M = 3, N = 9;
  logic clk = 1'b0;
  logic rst_n, mem_we, start, busy, done, optimal, unbounded;
  logic [1:0] mem_sel, winner, pattern, mem_row;
  logic [3:0] mem_col;
  logic [7:0] mem_wdata, objective;
  logic [M-1:0][3:0] x_col;
  logic [M-1:0][7:0] x_val;
  logic [7:0] pivots;
  logic [15:0] slots;
  logic [2:0] mod_busy;
  logic cs_start, cs_busy, cs_done, cs_end, cs_unbounded;
  logic [M-1:0][3:0] cs_x_col;
  logic [M-1:0][7:0] cs_x_val;
  logic [7:0] cs_objective;
  logic [7:0] cs_pivots;
  logic [3:0] cs_step;
  int checks = 0, failures = 0;
  int seen_pat [3];
  int n_two = 0, n_three = 0, n_opt = 0;
  int a1 [M][N] = '{'{1, 1, 0, 0, 2, 2, 1, 0, 0}, '{1, 1, 1, 2, 1, 2, 0, 1, 0}, '{1, 0, 0, 1, 1, 0, 0, 0, 1}};
  int b1 [M] = '{5, 13, 18};
  int c1 [N] = '{-3, -4, -3, -1, -4, -3, 0, 0, 0};
  int a2 [M][N] = '{'{1, 0, 1, 0, 0, 2, 1, 0, 0}, '{0, 1, 2, 0, 2, 0, 0, 1, 0}, '{0, 0, 1, 1, 0, 0, 0, 0, 1}};
  int b2 [M] = '{6, 17, 5};
  int c2 [N] = '{-5, -1, -2, -5, -1, -5, 0, 0, 0};

  lp_top dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (busy) begin
      seen_pat[pattern]++;
      if ($countones(mod_busy) >= 2) n_two++;
      if (mod_busy == 3'b111) n_three++;
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
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
    mem_we = 1'b1; mem_sel = 2'(sel); mem_row = 2'(row); mem_col = 4'(col);
    mem_wdata = 8'(val);
    @(negedge clk);
    mem_we = 1'b0;
  endtask

  task automatic solve_lp(input int a [M][N], input int b [M], input int c [N],
                       input int exp_obj, input int exp_win, input int exp_piv,
                       input int exp_slots);
    int ax;
    for (int i = 0; i < M; i++) begin
      for (int j = 0; j < N; j++) wr(0, i, j, a[i][j]);
      wr(1, i, 0, b[i]);
    end
    for (int j = 0; j < N; j++) wr(2, 0, j, c[j]);
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    while (!done) @(negedge clk);
    if (optimal) n_opt++;
    check(int'(optimal), 1, "optimal");
    check($signed(objective), exp_obj, "objective");
    check(int'(winner), exp_win, "winning controller");
    check(int'(pivots), exp_piv, "pivots");
    check(int'(slots), exp_slots, "slots");
    for (int r = 0; r < M; r++) begin
      ax = 0;
      for (int i = 0; i < M; i++) ax += a[r][x_col[i]] * $signed(x_val[i]);
      check(ax, b[r], "A x = b0");
      check(int'($signed(x_val[r]) >= 0), 1, "x >= 0");
    end
    // the multi-chip engine on the same loaded problem (one starting point)
    @(negedge clk); cs_start = 1'b1;
    @(negedge clk); cs_start = 1'b0;
    while (!cs_done) @(negedge clk);
    check(int'(cs_end), 1, "chipset END");
    check($signed(cs_objective), exp_obj, "chipset objective");
    check(int'(cs_pivots), 3, "chipset pivots");
  endtask

  initial begin
    rst_n = 1'b0; mem_we = 1'b0; start = 1'b0; cs_start = 1'b0; mem_sel = '0; mem_row = '0;
    mem_col = '0; mem_wdata = '0;
    #12 rst_n = 1'b1;
    solve_lp(a1, b1, c1, -44, 2, 2, 8);
    solve_lp(a2, b2, c2, -72, 0, 3, 10);
    for (int s = 0; s < 3; s++) check(int'(seen_pat[s] > 0), 1, $sformatf("pattern %0d used", s));
    check(int'(n_two > 0), 1, "two modules busy at once");
    check(int'(n_three > 0), 1, "three modules busy at once");
    check(int'(n_opt == 2), 1, "OPTIMAL ends");
    $display("mechanisms: patterns %0d/%0d/%0d cycles, 2-busy %0d, 3-busy %0d, optimal %0d",
             seen_pat[0], seen_pat[1], seen_pat[2], n_two, n_three, n_opt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
