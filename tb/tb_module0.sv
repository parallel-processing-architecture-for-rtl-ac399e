// tb_module0: self-checking testbench for module0 (steps 1-3).
// For random 8-bit B^-1, cb, A and c it compares w, r, q and the OPTIMAL flag
// with a direct matrix computation (w_j = sum_i cb_i B^-1(i,j),
// r_j = c_j - sum_i w_i A(i,j), all mod 256), for pick = 0, 1 and 2, and
// checks the run length (4M-1 cycles for step 1 plus 3N+M-2 for step 2). It
// also runs the first pricing of the worked example, where r = (-1,-2,0,0,..)
// and q must be column 0 (pick 0) or 1 (pick 1), and a case with no negative
// r_j, which must report OPTIMAL.
// The worked-example pricing comes from the published example; the random
// cases and the cycle-count formula belong to this implementation.
module tb_module0;
  localparam int M = 3, N = 9, W = 8;
  logic clk = 1'b0;
  logic rst_n, start, busy, done, optimal;
  logic [1:0] pick;
  logic [M-1:0][M-1:0][W-1:0] binv;
  logic [M-1:0][W-1:0] cb, w;
  logic [M-1:0][N-1:0][W-1:0] a_mat;
  logic [N-1:0][W-1:0] c_vec, r;
  logic [3:0] q;
  int checks = 0, failures = 0;

  module0 dut (.clk, .rst_n, .start, .pick, .binv, .cb, .a_mat, .c_vec,
               .busy, .done, .optimal, .q, .w, .r);

  always #5 clk = ~clk;

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

  task automatic run_and_check();
    int ew [M];
    int er [N];
    int negs [$];
    int cyc, eq;
    for (int j = 0; j < M; j++) begin
      ew[j] = 0;
      for (int i = 0; i < M; i++) ew[j] += $signed(cb[i]) * $signed(binv[i][j]);
      ew[j] = int'($signed(8'(ew[j])));
    end
    negs.delete();
    for (int j = 0; j < N; j++) begin
      er[j] = $signed(c_vec[j]);
      for (int i = 0; i < M; i++) er[j] -= ew[i] * $signed(a_mat[i][j]);
      er[j] = int'($signed(8'(er[j])));
      if (er[j] < 0) negs.push_back(j);
    end
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc, (4*M - 1) + (3*N + M - 2), "cycles start->done");
    for (int j = 0; j < M; j++) check($signed(w[j]), ew[j], $sformatf("w[%0d]", j));
    for (int j = 0; j < N; j++) check($signed(r[j]), er[j], $sformatf("r[%0d]", j));
    check(int'(optimal), int'(negs.size() == 0), "optimal");
    if (negs.size() != 0) begin
      eq = (int'(pick) < negs.size()) ? negs[pick] : negs[0];
      check(int'(q), eq, "q");
    end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; pick = '0;
    binv = '0; cb = '0; a_mat = '0; c_vec = '0;
    #12 rst_n = 1'b1;
    // worked example (padded to 3 x 9): B^-1 = I, cb = 0, c = (-1,-2,0,...)
    for (int i = 0; i < M; i++) binv[i][i] = 8'd1;
    a_mat[0][0] = 8'd1; a_mat[0][1] = 8'd1; a_mat[0][2] = 8'd1;
    a_mat[1][0] = 8'd2; a_mat[1][1] = 8'd1; a_mat[1][3] = 8'd1;
    c_vec[0] = -8'sd1; c_vec[1] = -8'sd2;
    pick = 2'd0; run_and_check(); check(int'(q), 0, "example q pick0");
    pick = 2'd1; run_and_check(); check(int'(q), 1, "example q pick1");
    // nothing negative -> OPTIMAL
    c_vec = '0; c_vec[4] = 8'd3; run_and_check(); check(int'(optimal), 1, "optimal case");
    for (int n = 0; n < 40; n++) begin
      for (int i = 0; i < M; i++) begin
        for (int j = 0; j < M; j++) binv[i][j] = 8'($urandom_range(0, 8) - 4);
        cb[i] = 8'($urandom_range(0, 10) - 5);
        for (int j = 0; j < N; j++) a_mat[i][j] = 8'($urandom_range(0, 6) - 3);
      end
      for (int j = 0; j < N; j++) c_vec[j] = 8'($urandom_range(0, 20) - 10);
      pick = 2'(n % 3);
      run_and_check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
