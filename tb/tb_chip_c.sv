// tb_chip_c: four chip Cs (Q = 4 cell 1s each, chips -2 .. 1) chained as
// they are for a 3 x 9 matrix A, driven the way chip B drives them.
//
// For random 8-bit A, c and w the testbench checks:
//   - data distribution: A(i,j) is stored in chip floor((i - j + 2) / 4),
//     cell (i - j + 2) mod 4
//   - step 2: r_j = c_j + sum_i (-w_i) A(i,j) modulo 2^8 on the return bus
//     of the first chip, computed here directly from the operands
// The chain has P = 16 cells with the band starting at cell OFF = 2; c_j
// enters the near end at 2j + P - OFF, -w_i the far end (through the
// far-end bus) at 2i + N - M + OFF + 11 and r_j returns at 2j + 2P - OFF;
// element i + j is due at cycle i + j + P + N - 1.
// Placement and the step-2 function follow the published chip; the bus
// timing checked is this implementation's own.
module tb_chip_c;
  localparam int M = 3, N = 9, Q = 4, W = 8, K = 4, P = 16, OFF = 2, L = 11;
  logic clk = 1'b0;
  logic rst_n;
  logic signed [15:0] sweep;
  logic ld_we;
  logic [1:0] ld_i;
  logic [3:0] ld_j;
  logic [W-1:0] ld_data;
  logic [W-1:0] x [K+1], y [K+1], fw [K+1], ret [K+1];
  int checks = 0, failures = 0;
  int am [M][N], cv [N], wv [M];

  for (genvar k = 0; k < K; k++) begin : g_chip
    chip_c #(.M(M), .N(N), .Q(Q), .X(k - 2)) u_chip (
      .clk, .rst_n, .sel(k == K - 1), .sweep, .ld_we, .ld_i, .ld_j, .ld_data,
      .l_x_out(x[k]), .l_y_in(y[k]), .r_x_in(x[k+1]), .r_y_out(y[k+1]),
      .fwd_in(fw[k]), .fwd_out(fw[k+1]), .ret_in(ret[k+1]), .ret_out(ret[k])
    );
  end
  assign x[K]   = 8'h5A;   // must be ignored by the last chip
  assign ret[K] = 8'h3C;

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if ((got & 8'hFF) != (exp & 8'hFF)) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got & 8'hFF, exp & 8'hFF);
    end
  endtask

  function automatic bit slot(input int tt, input int t0, input int len, output int k);
    k = 0;
    if (tt < t0 || ((tt - t0) & 1) != 0) return 1'b0;
    k = (tt - t0) / 2;
    return k < len;
  endfunction

  initial begin
    int k, exp_v, dd, xx, cc;
    int res [N];
    rst_n = 1'b0; ld_we = 1'b0; ld_i = '0; ld_j = '0; ld_data = '0;
    sweep = -16'sd1; y[0] = '0; fw[0] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int trial = 0; trial < 30; trial++) begin
      for (int i = 0; i < M; i++) begin
        for (int j = 0; j < N; j++) am[i][j] = int'($urandom_range(0, 255));
        wv[i] = int'($urandom_range(0, 255));
      end
      for (int j = 0; j < N; j++) cv[j] = int'($urandom_range(0, 255));
      for (int i = 0; i < M; i++)
        for (int j = 0; j < N; j++) begin
          @(negedge clk);
          ld_we = 1'b1; ld_i = 2'(i); ld_j = 4'(j); ld_data = 8'(am[i][j]);
        end
      @(negedge clk); ld_we = 1'b0;
      // placement
      for (int i = 0; i < M; i++)
        for (int j = 0; j < N; j++) begin
          dd = i - j + 2;
          xx = (dd >= 0) ? dd / 4 : -((-dd + 3) / 4);
          cc = dd - 4 * xx;
          case (xx)
            -2: check(int'(g_chip[0].u_chip.lm[cc][i]), am[i][j], "placed in chip -2");
            -1: check(int'(g_chip[1].u_chip.lm[cc][i]), am[i][j], "placed in chip -1");
            0:  check(int'(g_chip[2].u_chip.lm[cc][i]), am[i][j], "placed in chip 0");
            default: check(int'(g_chip[3].u_chip.lm[cc][i]), am[i][j], "placed in chip 1");
          endcase
        end
      // step 2
      for (int t = 0; t <= 2*(N-1) + 2*P - OFF; t++) begin
        @(negedge clk);
        sweep = 16'(t - P - (N - 1));
        y[0]  = '0;
        fw[0] = '0;
        if (slot(t, P - OFF, N, k)) y[0] = 8'(cv[k]);
        if (slot(t, N - M + OFF + L, M, k)) fw[0] = 8'(-wv[k]);
        #1;
        if (slot(t, 2*P - OFF, N, k)) res[k] = int'(ret[0]);
      end
      @(negedge clk);
      sweep = -16'sd1; y[0] = '0; fw[0] = '0;
      for (int j = 0; j < N; j++) begin
        exp_v = cv[j];
        for (int i = 0; i < M; i++) exp_v += -wv[i] * am[i][j];
        check(res[j], exp_v, $sformatf("r[%0d]", j));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
