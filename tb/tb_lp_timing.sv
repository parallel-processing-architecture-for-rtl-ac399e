// tb_lp_timing: one simplex iteration at a larger size, to check how the run
// time of each module grows with the problem size.
//
// The three modules are instantiated at M = 16 rows and N = 64 columns and
// chained by hand for one iteration on random 8-bit data: module 0 (steps 1-3)
// prices and picks the entering column q, module 1 (steps 4-6) forms
// d = B^-1 A_q and the pivot row p, and module 2 (steps 7-8) updates B^-1, b,
// cb and the basis list. Every result is compared with a direct computation
// (all sums modulo 2^8; first negative r_j, smallest b_i / d_i over d_i > 0,
// eta*_i = trunc(-d_i / d_p) and eta*_p = trunc(1 / d_p) - 1), and the cycles
// from start to done with the closed forms
//   module 0: (4M - 1) + (3N + M - 2)
//   module 1: (4M - 2) + M + 1
//   module 2: 3M
// which are linear in M and N: at M = 100, N = 1000 they give 3497, 499 and
// 300 cycles. The testbench counts iterations that reached step 8 and
// iterations that ended UNBOUNDED, and fails if none reached step 8.
// The module split follows the published design; the sizes and the closed
// forms for the cycle counts belong to this implementation.
module tb_lp_timing;
  localparam int M = 16, N = 64, W = 8, IW = 6, PW = 4;
  logic clk = 1'b0;
  logic rst_n;
  logic s0, s1, s2;
  logic busy0, busy1, busy2, done0, done1, done2, optimal, unbounded;
  logic [1:0] pick;
  logic [M-1:0][M-1:0][W-1:0] binv, binv_n;
  logic [M-1:0][W-1:0] cb, w, b, d, b_n, cb_n;
  logic [M-1:0][N-1:0][W-1:0] a_mat;
  logic [N-1:0][W-1:0] c_vec, r;
  logic [M-1:0][IW-1:0] basis, basis_n;
  logic [IW-1:0] q;
  logic [PW-1:0] p;
  int checks = 0, failures = 0;
  int n_step8 = 0, n_unb = 0;

  module0 #(.M(M), .N(N)) u_m0 (
    .clk, .rst_n, .start(s0), .pick, .binv, .cb, .a_mat, .c_vec,
    .busy(busy0), .done(done0), .optimal, .q, .w, .r
  );
  module1 #(.M(M), .N(N)) u_m1 (
    .clk, .rst_n, .start(s1), .binv, .a_mat, .b, .q,
    .busy(busy1), .done(done1), .unbounded, .p, .d
  );
  module2 #(.M(M), .N(N)) u_m2 (
    .clk, .rst_n, .start(s2), .binv, .b, .cb, .basis, .d, .p, .q,
    .c_q(c_vec[q]), .busy(busy2), .done(done2), .binv_n, .b_n, .cb_n, .basis_n
  );

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  function automatic int s8(input int v);
    return int'($signed(8'(v)));
  endfunction

  // pulse one start line and count the cycles up to and including done
  task automatic pulse(input int which, output int cyc);
    @(negedge clk);
    if (which == 0) s0 = 1'b1; else if (which == 1) s1 = 1'b1; else s2 = 1'b1;
    @(negedge clk);
    s0 = 1'b0; s1 = 1'b0; s2 = 1'b0;
    cyc = 1;
    while (!(which == 0 ? done0 : which == 1 ? done1 : done2)) begin
      @(negedge clk);
      cyc++;
    end
  endtask

  initial begin
    int ew [M], er [N], ed [M], eta [M];
    int eq, ep, cyc;
    real best, ratio;
    rst_n = 1'b0; s0 = 1'b0; s1 = 1'b0; s2 = 1'b0; pick = '0;
    binv = '0; cb = '0; b = '0; a_mat = '0; c_vec = '0; basis = '0;
    #12 rst_n = 1'b1;

    for (int n = 0; n < 12; n++) begin
      for (int i = 0; i < M; i++) begin
        for (int j = 0; j < M; j++) binv[i][j] = 8'($urandom_range(0, 4) - 2);
        for (int j = 0; j < N; j++) a_mat[i][j] = 8'($urandom_range(0, 6) - 3);
        cb[i] = 8'($urandom_range(0, 6) - 3);
        b[i]  = 8'($urandom_range(0, 40));
        basis[i] = IW'(N - M + i);
      end
      for (int j = 0; j < N; j++) c_vec[j] = 8'($urandom_range(0, 20) - 10);

      // steps 1-3
      for (int j = 0; j < M; j++) begin
        ew[j] = 0;
        for (int i = 0; i < M; i++) ew[j] += $signed(cb[i]) * $signed(binv[i][j]);
        ew[j] = s8(ew[j]);
      end
      eq = -1;
      for (int j = 0; j < N; j++) begin
        er[j] = $signed(c_vec[j]);
        for (int i = 0; i < M; i++) er[j] -= ew[i] * $signed(a_mat[i][j]);
        er[j] = s8(er[j]);
        if (er[j] < 0 && eq < 0) eq = j;
      end
      pulse(0, cyc);
      check(cyc, (4*M - 1) + (3*N + M - 2), "module 0 cycles");
      for (int j = 0; j < M; j++) check($signed(w[j]), ew[j], $sformatf("w[%0d]", j));
      for (int j = 0; j < N; j++) check($signed(r[j]), er[j], $sformatf("r[%0d]", j));
      check(int'(optimal), int'(eq < 0), "optimal");
      if (eq < 0) continue;
      check(int'(q), eq, "q");

      // steps 4-6
      ep = -1; best = 0.0;
      for (int i = 0; i < M; i++) begin
        ed[i] = 0;
        for (int j = 0; j < M; j++) ed[i] += $signed(binv[i][j]) * $signed(a_mat[j][eq]);
        ed[i] = s8(ed[i]);
        if (ed[i] > 0) begin
          ratio = real'($signed(b[i])) / real'(ed[i]);
          if (ep < 0 || ratio < best) begin ep = i; best = ratio; end
        end
      end
      pulse(1, cyc);
      check(cyc, (4*M - 2) + M + 1, "module 1 cycles");
      for (int i = 0; i < M; i++) check($signed(d[i]), ed[i], $sformatf("d[%0d]", i));
      check(int'(unbounded), int'(ep < 0), "unbounded");
      if (ep < 0) begin
        n_unb++;
        continue;
      end
      check(int'(p), ep, "p");

      // steps 7-8
      for (int i = 0; i < M; i++)
        eta[i] = (i == ep) ? (1 / ed[ep]) - 1 : (-ed[i]) / ed[ep];
      pulse(2, cyc);
      check(cyc, 3*M, "module 2 cycles");
      for (int i = 0; i < M; i++) begin
        for (int j = 0; j < M; j++)
          check($signed(binv_n[i][j]), s8($signed(binv[i][j]) + eta[i] * $signed(binv[ep][j])),
                $sformatf("B'(%0d,%0d)", i, j));
        check($signed(b_n[i]), s8($signed(b[i]) + eta[i] * $signed(b[ep])), $sformatf("b'(%0d)", i));
        check($signed(cb_n[i]), (i == ep) ? $signed(c_vec[eq]) : $signed(cb[i]), $sformatf("cb'(%0d)", i));
        check(int'(basis_n[i]), (i == ep) ? eq : int'(basis[i]), $sformatf("basis'(%0d)", i));
      end
      n_step8++;
    end

    $display("M=%0d N=%0d: module 0 %0d, module 1 %0d, module 2 %0d cycles; at M=100 N=1000: %0d, %0d, %0d",
             M, N, (4*M - 1) + (3*N + M - 2), (4*M - 2) + M + 1, 3*M,
             (4*100 - 1) + (3*1000 + 100 - 2), (4*100 - 2) + 100 + 1, 3*100);
    $display("mechanisms: iterations through step 8 %0d, UNBOUNDED %0d", n_step8, n_unb);
    checks++;
    if (n_step8 == 0) begin
      failures++;
      $display("FAIL no iteration reached step 8");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
