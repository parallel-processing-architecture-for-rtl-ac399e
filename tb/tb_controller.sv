// tb_controller: self-checking testbench for controller.
// Checks the starting state loaded by init (B^-1 = I, b = b0, cb and basis
// from the last M columns), the activate bit, the first-pricing pick (K, then
// 0 after the first module-0 result), and that each of the three result
// words is unpacked into the right fields only when its valid bit is high,
// with the pivot counter advancing on module-2 results.
// What a controller stores follows the published design; the write
// sequences and expected contents are this testbench's own.
module tb_controller;
  localparam int M = 3, N = 9, W = 8, IW = 4, PW = 2;
  localparam int UW = M*M*W + 2*M*W + M*IW;
  logic clk = 1'b0;
  logic rst_n, init, activate, up_v;
  logic [1:0] up_src, pick;
  logic [UW-1:0] up;
  logic [M-1:0][W-1:0] b0;
  logic [N-1:0][W-1:0] c_vec;
  logic [M-1:0][M-1:0][W-1:0] binv;
  logic [M-1:0][W-1:0] b, cb, d;
  logic [M-1:0][IW-1:0] basis;
  logic [IW-1:0] q;
  logic [PW-1:0] p;
  logic active, optimal, unbounded;
  logic [7:0] iters;
  int checks = 0, failures = 0;

  controller #(.K(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
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

  task automatic send(input logic [1:0] src, input logic [UW-1:0] word, input logic v);
    @(negedge clk);
    up_src = src; up = word; up_v = v;
    @(negedge clk);
    up_v = 1'b0;
  endtask

  initial begin
    logic [M-1:0][M-1:0][W-1:0] nb;
    logic [M-1:0][W-1:0] nbv, ncb, nd;
    logic [M-1:0][IW-1:0] nbas;
    rst_n = 1'b0; init = 1'b0; activate = 1'b0; up_v = 1'b0; up_src = '0; up = '0;
    for (int i = 0; i < M; i++) b0[i] = 8'(10 + i);
    for (int j = 0; j < N; j++) c_vec[j] = 8'(j * 3 - 20);
    #12 rst_n = 1'b1;
    @(negedge clk); init = 1'b1;
    @(negedge clk); init = 1'b0;
    for (int i = 0; i < M; i++) begin
      for (int j = 0; j < M; j++) check(int'(binv[i][j]), (i == j) ? 1 : 0, "B^-1 = I");
      check(int'(b[i]), 10 + i, "b = b0");
      check($signed(cb[i]), (N - M + i) * 3 - 20, "cb");
      check(int'(basis[i]), N - M + i, "basis");
    end
    check(int'(active), 0, "inactive after init");
    check(int'(pick), 2, "first pick = K");
    @(negedge clk); activate = 1'b1;
    @(negedge clk); activate = 1'b0;
    check(int'(active), 1, "active");
    // module 0 result without valid: ignored
    send(2'd0, UW'({1'b0, 4'd7}), 1'b0);
    check(int'(q), 0, "q unchanged without valid");
    send(2'd0, UW'({1'b0, 4'd7}), 1'b1);
    check(int'(q), 7, "q");
    check(int'(optimal), 0, "not optimal");
    check(int'(pick), 0, "pick 0 after first pricing");
    // module 1 result
    nd[0] = 8'd3; nd[1] = -8'sd2; nd[2] = 8'd5;
    send(2'd1, UW'({1'b0, 2'd2, nd}), 1'b1);
    check(int'(p), 2, "p");
    for (int i = 0; i < M; i++) check(int'(d[i]), int'(nd[i]), "d");
    check(int'(unbounded), 0, "bounded");
    // module 2 result
    for (int i = 0; i < M; i++) begin
      for (int j = 0; j < M; j++) nb[i][j] = 8'($urandom);
      nbv[i] = 8'($urandom); ncb[i] = 8'($urandom); nbas[i] = 4'($urandom_range(0, 8));
    end
    send(2'd2, UW'({nb, nbv, ncb, nbas}), 1'b1);
    for (int i = 0; i < M; i++) begin
      for (int j = 0; j < M; j++) check(int'(binv[i][j]), int'(nb[i][j]), "B^-1 update");
      check(int'(b[i]), int'(nbv[i]), "b update");
      check(int'(cb[i]), int'(ncb[i]), "cb update");
      check(int'(basis[i]), int'(nbas[i]), "basis update");
    end
    check(int'(iters), 1, "one pivot");
    check(int'(p), 2, "p kept");
    send(2'd1, UW'({1'b1, 2'd0, nd}), 1'b1);
    check(int'(unbounded), 1, "unbounded flag");
    send(2'd0, UW'({1'b1, 4'd0}), 1'b1);
    check(int'(optimal), 1, "optimal flag");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
