// tb_lp_chipset_large: the multi-chip engine on an 8 x 24 problem, the
// largest size simulated for it, on chips of two sizes.
//
//   dut_a  S = 13 unified cells and cell 3s per chip A (the count that fits
//          the smallest chip size considered for the design) and Q = 24
//          cell 1s per chip C: chip As -1, 0, 1 and chip Cs -1, 0
//   dut_b  the default chip sizes S = 5, Q = 11: chip As -1, 0, 1 and chip Cs
//          -2 .. 1
// The problem has 16 structural columns and 8 slack columns (the last 8,
// which form the starting basis). Its data come from a linear congruential
// generator, x <- (1103515245 x + 12345) mod 2^31, value x >> 16, seeded
// with 17193, taken in this order: A(i, j) = value mod 3 row by row over the
// structural columns, b_i = 10 + value mod 20, c_j = -(value mod 4).
// For this seed every pivot of the path (first negative reduced cost,
// smallest b_i / d_i, lowest row on a tie) has d_p = 1, so the 8-bit integer
// arithmetic is exact, and the path was followed independently with exact
// fractions: it ends after 5 pivots with no negative reduced cost, basis
// (0, 10, 18, 8, 20, 21, 22, 7), values (2, 6, 7, 5, 6, 16, 10, 4) and
// objective -41, which is therefore the true optimum.
// The chip split follows the published multi-chip design; the chip sizes
// picked for dut_b and the problem are this testbench's own.
module tb_lp_chipset_large;
  localparam int M = 8, N = 24;
  logic clk = 1'b0;
  logic rst_n, mem_we, start;
  logic [1:0] mem_sel;
  logic [2:0] mem_row;
  logic [4:0] mem_col;
  logic [7:0] mem_wdata;

  logic              busy_a, done_a, end_a, unb_a, busy_b, done_b, end_b, unb_b;
  logic [M-1:0][4:0] xc_a, xc_b;
  logic [M-1:0][7:0] xv_a, xv_b;
  logic [7:0]        obj_a, obj_b, piv_a, piv_b;
  logic [3:0]        step_a, step_b;

  int checks = 0, failures = 0;
  int n_step8 = 0;
  int am [M][N], bv [M], cv [N];
  int exp_col [M] = '{0, 10, 18, 8, 20, 21, 22, 7};
  int exp_val [M] = '{2, 6, 7, 5, 6, 16, 10, 4};

  lp_chipset #(.M(M), .N(N), .S(13), .Q(24)) dut_a (
    .clk, .rst_n, .mem_we, .mem_sel, .mem_row, .mem_col, .mem_wdata, .start,
    .busy(busy_a), .done(done_a), .end_opt(end_a), .unbounded(unb_a),
    .x_col(xc_a), .x_val(xv_a), .objective(obj_a), .pivots(piv_a), .step(step_a)
  );
  lp_chipset #(.M(M), .N(N)) dut_b (
    .clk, .rst_n, .mem_we, .mem_sel, .mem_row, .mem_col, .mem_wdata, .start,
    .busy(busy_b), .done(done_b), .end_opt(end_b), .unbounded(unb_b),
    .x_col(xc_b), .x_val(xv_b), .objective(obj_b), .pivots(piv_b), .step(step_b)
  );

  always #5 clk = ~clk;

  always @(posedge clk) if (busy_a && step_a == 4'd8) n_step8++;

  initial begin
    repeat (200000) @(posedge clk);
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
    mem_we = 1'b1; mem_sel = 2'(sel); mem_row = 3'(row); mem_col = 5'(col);
    mem_wdata = 8'(val);
    @(negedge clk);
    mem_we = 1'b0;
  endtask

  initial begin
    longint x;
    int cyc, s;
    rst_n = 1'b0; mem_we = 1'b0; start = 1'b0; mem_sel = '0; mem_row = '0;
    mem_col = '0; mem_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    x = 17193;
    for (int i = 0; i < M; i++) begin
      for (int j = 0; j < N - M; j++) begin
        x = (x * 1103515245 + 12345) % (64'd1 << 31);
        am[i][j] = int'((x >> 16) % 3);
      end
      for (int j = N - M; j < N; j++) am[i][j] = (j - (N - M) == i) ? 1 : 0;
    end
    for (int i = 0; i < M; i++) begin
      x = (x * 1103515245 + 12345) % (64'd1 << 31);
      bv[i] = 10 + int'((x >> 16) % 20);
    end
    for (int j = 0; j < N; j++) begin
      if (j < N - M) begin
        x = (x * 1103515245 + 12345) % (64'd1 << 31);
        cv[j] = -int'((x >> 16) % 4);
      end else cv[j] = 0;
    end

    for (int i = 0; i < M; i++)
      for (int j = 0; j < N; j++) wr(0, i, j, am[i][j]);
    for (int i = 0; i < M; i++) wr(1, i, 0, bv[i]);
    for (int j = 0; j < N; j++) wr(2, 0, j, cv[j]);

    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    cyc = 1;
    while (!(done_a && done_b)) begin @(negedge clk); cyc++; end
    @(negedge clk);

    check(int'(end_a), 1, "END (A)");
    check(int'(end_b), 1, "END (B)");
    check(int'(unb_a), 0, "not UNBOUNDED (A)");
    check(int'(unb_b), 0, "not UNBOUNDED (B)");
    check(int'(piv_a), 5, "pivots (A)");
    check(int'(piv_b), 5, "pivots (B)");
    check(int'($signed(obj_a)), -41, "objective (A)");
    check(int'($signed(obj_b)), -41, "objective (B)");
    for (int i = 0; i < M; i++) begin
      check(int'(xc_a[i]), exp_col[i], $sformatf("basic column %0d (A)", i));
      check(int'(xc_b[i]), exp_col[i], $sformatf("basic column %0d (B)", i));
      check(int'($signed(xv_a[i])), exp_val[i], $sformatf("basic value %0d (A)", i));
      check(int'($signed(xv_b[i])), exp_val[i], $sformatf("basic value %0d (B)", i));
    end
    // A x = b with x from dut_a
    for (int i = 0; i < M; i++) begin
      s = 0;
      for (int k = 0; k < M; k++) s += am[i][int'(xc_a[k])] * int'($signed(xv_a[k]));
      check(s, bv[i], $sformatf("row %0d of A x = b", i));
    end
    $display("mechanisms: run of %0d cycles, step-8 cycles %0d", cyc, n_step8);
    checks++;
    if (n_step8 == 0) begin
      failures++;
      $display("FAIL step 8 never ran");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
