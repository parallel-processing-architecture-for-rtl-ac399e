// tb_module1: self-checking testbench for module1 (steps 4-6).
// Random 8-bit B^-1, A, b >= 0 and entering column q: d must equal
// B^-1 A_q (mod 256), p must be the row with the smallest b_i / d_i among
// d_i > 0 (lowest row on a tie, computed here with real division), and
// UNBOUNDED must be set exactly when no d_i is positive. It also runs step 4-6
// of the worked example (d = (1,2), p = row 1) and checks the run length
// (4M-2 cycles for step 4, M for step 6, plus the start cycle).
// The worked-example pivot comes from the published example; the random
// cases and the cycle-count formula belong to this implementation.
module tb_module1;
  localparam int M = 3, N = 9, W = 8;
  logic clk = 1'b0;
  logic rst_n, start, busy, done, unbounded;
  logic [M-1:0][M-1:0][W-1:0] binv;
  logic [M-1:0][N-1:0][W-1:0] a_mat;
  logic [M-1:0][W-1:0] b, d;
  logic [3:0] q;
  logic [1:0] p;
  int checks = 0, failures = 0;
  int n_unb = 0;

  module1 dut (.clk, .rst_n, .start, .binv, .a_mat, .b, .q, .busy, .done, .unbounded, .p, .d);

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
    int ed [M];
    int ep, cyc;
    real best, ratio;
    ep = -1; best = 0.0;
    for (int i = 0; i < M; i++) begin
      ed[i] = 0;
      for (int j = 0; j < M; j++) ed[i] += $signed(binv[i][j]) * $signed(a_mat[j][q]);
      ed[i] = int'($signed(8'(ed[i])));
      if (ed[i] > 0) begin
        ratio = real'($signed(b[i])) / real'(ed[i]);
        if (ep < 0 || ratio < best) begin ep = i; best = ratio; end
      end
    end
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc, (4*M - 2) + M + 1, "cycles start->done");
    for (int i = 0; i < M; i++) check($signed(d[i]), ed[i], $sformatf("d[%0d]", i));
    check(int'(unbounded), int'(ep < 0), "unbounded");
    if (ep >= 0) check(int'(p), ep, "p");
    else n_unb++;
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; binv = '0; a_mat = '0; b = '0; q = '0;
    #12 rst_n = 1'b1;
    for (int i = 0; i < M; i++) binv[i][i] = 8'd1;
    a_mat[0][0] = 8'd1; a_mat[1][0] = 8'd2; b[0] = 8'd40; b[1] = 8'd60; b[2] = 8'd100;
    q = 4'd0;
    run_and_check();
    check(int'(p), 1, "example p");
    for (int n = 0; n < 60; n++) begin
      for (int i = 0; i < M; i++) begin
        for (int j = 0; j < M; j++) binv[i][j] = 8'($urandom_range(0, 6) - 3);
        for (int j = 0; j < N; j++) a_mat[i][j] = 8'($urandom_range(0, 6) - 3);
        b[i] = 8'($urandom_range(0, 30));
      end
      q = 4'($urandom_range(0, N - 1));
      run_and_check();
    end
    check(int'(n_unb > 0), 1, "an unbounded case occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
