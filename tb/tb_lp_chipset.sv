// tb_lp_chipset: end-to-end test of the multi-chip engine.
//
// Two engines solve the same 3 x 9 problems in 8-bit integers side by side:
//   dut_a  the default chip sizes (S = 5, Q = 11: one chip A, two chip Cs)
//   dut_b  small chips (S = 2, Q = 3: three chip As, five chip Cs), so the
//          arrays run across chip boundaries and the streams pass through
//          chips with Select = 0
// Both must give the same answers, which were worked out independently by a
// bit-accurate model of the method (first negative reduced cost, largest
// d_i/b_i, 8-bit wrapping products) and agree with the exact optima found
// by enumerating every basis:
//   problem 1: END after 3 pivots, basis (1, 2, 8), values (5, 8, 18), -44
//   problem 2: END after 3 pivots, basis (0, 1, 3), values (6, 17, 5), -72
//   problem 3: column 0 has no positive entry and a negative cost, so the
//              first pricing picks it and step 5 reports UNBOUNDED, 0 pivots
// The testbench also counts the steps it sees (1, 2, 4, 6, pivot-row read, 8)
// and the END and UNBOUNDED endings, and fails if one never happened.
// The chip split follows the published multi-chip design; the problems and
// the chip sizes used here are this testbench's own.
module tb_lp_chipset;
  localparam int M = 3, N = 9;
  logic clk = 1'b0;
  logic rst_n, mem_we, start;
  logic [1:0] mem_sel, mem_row;
  logic [3:0] mem_col;
  logic [7:0] mem_wdata;

  logic              busy_a, done_a, end_a, unb_a, busy_b, done_b, end_b, unb_b;
  logic [M-1:0][3:0] xc_a, xc_b;
  logic [M-1:0][7:0] xv_a, xv_b;
  logic [7:0]        obj_a, obj_b, piv_a, piv_b;
  logic [3:0]        step_a, step_b;

  int checks = 0, failures = 0;
  int seen_step [16];
  int n_end = 0, n_unb = 0;

  int a1 [M][N] = '{'{1, 1, 0, 0, 2, 2, 1, 0, 0}, '{1, 1, 1, 2, 1, 2, 0, 1, 0}, '{1, 0, 0, 1, 1, 0, 0, 0, 1}};
  int b1 [M] = '{5, 13, 18};
  int c1 [N] = '{-3, -4, -3, -1, -4, -3, 0, 0, 0};
  int a2 [M][N] = '{'{1, 0, 1, 0, 0, 2, 1, 0, 0}, '{0, 1, 2, 0, 2, 0, 0, 1, 0}, '{0, 0, 1, 1, 0, 0, 0, 0, 1}};
  int b2 [M] = '{6, 17, 5};
  int c2 [N] = '{-5, -1, -2, -5, -1, -5, 0, 0, 0};
  int a3 [M][N] = '{'{-1, 1, 0, 0, 2, 2, 1, 0, 0}, '{0, 1, 1, 2, 1, 2, 0, 1, 0}, '{-1, 0, 0, 1, 1, 0, 0, 0, 1}};
  int b3 [M] = '{5, 13, 18};
  int c3 [N] = '{-1, 4, 3, 1, 4, 3, 0, 0, 0};

  lp_chipset dut_a (
    .clk, .rst_n, .mem_we, .mem_sel, .mem_row, .mem_col, .mem_wdata, .start,
    .busy(busy_a), .done(done_a), .end_opt(end_a), .unbounded(unb_a),
    .x_col(xc_a), .x_val(xv_a), .objective(obj_a), .pivots(piv_a), .step(step_a)
  );
  lp_chipset #(.S(2), .Q(3)) dut_b (
    .clk, .rst_n, .mem_we, .mem_sel, .mem_row, .mem_col, .mem_wdata, .start,
    .busy(busy_b), .done(done_b), .end_opt(end_b), .unbounded(unb_b),
    .x_col(xc_b), .x_val(xv_b), .objective(obj_b), .pivots(piv_b), .step(step_b)
  );

  always #5 clk = ~clk;

  always @(posedge clk) if (busy_a) seen_step[step_a]++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
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

  task automatic load(input int a [M][N], input int b [M], input int c [N]);
    for (int i = 0; i < M; i++)
      for (int j = 0; j < N; j++) wr(0, i, j, a[i][j]);
    for (int i = 0; i < M; i++) wr(1, i, 0, b[i]);
    for (int j = 0; j < N; j++) wr(2, 0, j, c[j]);
  endtask

  task automatic run();
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    wait (done_a && done_b);
    @(negedge clk);
    if (end_a) n_end++;
    if (unb_a) n_unb++;
  endtask

  task automatic expect_opt(input string tag, input int col [M], input int val [M], input int obj);
    check(int'(end_a), 1, {tag, " END (A)"});
    check(int'(end_b), 1, {tag, " END (B)"});
    check(int'(piv_a), 3, {tag, " pivots (A)"});
    check(int'(piv_b), 3, {tag, " pivots (B)"});
    check(int'($signed(obj_a)), obj, {tag, " objective (A)"});
    check(int'($signed(obj_b)), obj, {tag, " objective (B)"});
    for (int i = 0; i < M; i++) begin
      check(int'(xc_a[i]), col[i], {tag, " basic column (A)"});
      check(int'(xc_b[i]), col[i], {tag, " basic column (B)"});
      check(int'($signed(xv_a[i])), val[i], {tag, " basic value (A)"});
      check(int'($signed(xv_b[i])), val[i], {tag, " basic value (B)"});
    end
  endtask

  initial begin
    rst_n = 1'b0; mem_we = 1'b0; start = 1'b0; mem_sel = '0; mem_row = '0;
    mem_col = '0; mem_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    load(a1, b1, c1);
    run();
    expect_opt("problem 1", '{1, 2, 8}, '{5, 8, 18}, -44);

    load(a2, b2, c2);
    run();
    expect_opt("problem 2", '{0, 1, 3}, '{6, 17, 5}, -72);

    load(a3, b3, c3);
    run();
    check(int'(unb_a), 1, "problem 3 UNBOUNDED (A)");
    check(int'(unb_b), 1, "problem 3 UNBOUNDED (B)");
    check(int'(end_a), 0, "problem 3 not END (A)");
    check(int'(piv_a), 0, "problem 3 pivots (A)");
    check(int'(piv_b), 0, "problem 3 pivots (B)");

    // a rerun of problem 1 starts again from the slack basis
    load(a1, b1, c1);
    run();
    expect_opt("problem 1 again", '{1, 2, 8}, '{5, 8, 18}, -44);

    $display("mechanisms: step1 %0d, step2 %0d, step4 %0d, step6 %0d, row read %0d, step8 %0d cycles, END %0d, UNBOUNDED %0d",
             seen_step[1], seen_step[2], seen_step[4], seen_step[6], seen_step[7], seen_step[8], n_end, n_unb);
    foreach (seen_step[k]) begin
      if (k == 1 || k == 2 || k == 4 || k == 6 || k == 7 || k == 8) begin
        checks++;
        if (seen_step[k] == 0) begin
          failures++;
          $display("FAIL step %0d never ran", k);
        end
      end
    end
    checks += 2;
    if (n_end == 0) begin failures++; $display("FAIL END never happened"); end
    if (n_unb == 0) begin failures++; $display("FAIL UNBOUNDED never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
