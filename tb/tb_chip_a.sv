// tb_chip_a: three chip As (S = 3 cells each, chips -1, 0 and 1) chained as
// they are for a 3 x 3 B^-1, driven the way chip B drives them.
//
// For random 8-bit B^-1, cb, A_q, pivot row p and eta* the testbench checks:
//   - data distribution: each element is stored in chip
//     floor((i - j + 1) / 3), cell (i - j + 1) mod 3 (chip 0 keeps the main
//     diagonal in its middle cell), and reads back through the read chain
//   - step 1 (Ctrl1 Ctrl2 = 00): w_j = sum_i cb_i B(i,j) on the return bus
//   - step 4 (01): d_i = sum_j B(i,j) A_q(j) at the near end
//   - step 8 (1x): B(i,j) + eta*_i B(p,j) written back into local memory
// all modulo 2^8, computed here directly from the operands. The chain has
// P = 9 cells with the band starting at cell OFF = 2; the feeding times are
// those of chip B (near-end stream at 2k + P - OFF, far-end stream at
// 2k + OFF + 5, returning stream at 2k + 2P - OFF, near-end output at
// 2k + 5 + P + OFF, element i + j due at cycle i + j + P + 2).
// Placement and the Ctrl1/Ctrl2 steps follow the published chip; the bus
// timing checked is this implementation's own.
module tb_chip_a;
  localparam int M = 3, S = 3, W = 8, P = 9, OFF = 2, L = 5;
  logic clk = 1'b0;
  logic rst_n, ctrl1, ctrl2;
  logic signed [15:0] sweep;
  logic ld_we;
  logic [1:0] ld_i, ld_j, rd_i, rd_j;
  logic [W-1:0] ld_data, l_w_in, l_aq_in, l_bp_in, fwd;
  logic [W-1:0] cb [4], w [4], aq [4], d [4], eta [4], bp [4], fw [4], ret [4], rd [4];
  logic [W-1:0] unused_eta;
  int checks = 0, failures = 0;

  int bm [M][M], cbv [M], aqv [M], etav [M];

  chip_a #(.M(M), .S(S), .X(-1)) u0 (
    .clk, .rst_n, .ctrl1, .ctrl2, .sel(1'b0), .sweep, .ld_we, .ld_i, .ld_j, .ld_data,
    .rd_i, .rd_j, .rd_in(rd[1]), .rd_out(rd[0]),
    .l_cb_out(cb[0]), .l_w_in(l_w_in), .l_aq_in(l_aq_in), .l_d_out(d[0]),
    .l_eta_out(unused_eta), .l_bp_in(l_bp_in),
    .r_cb_in(cb[1]), .r_w_out(w[1]), .r_aq_out(aq[1]), .r_d_in(d[1]), .r_eta_in(eta[1]), .r_bp_out(bp[1]),
    .fwd_in(fwd), .fwd_out(fw[1]), .ret_in(ret[1]), .ret_out(ret[0])
  );
  chip_a #(.M(M), .S(S), .X(0)) u1 (
    .clk, .rst_n, .ctrl1, .ctrl2, .sel(1'b0), .sweep, .ld_we, .ld_i, .ld_j, .ld_data,
    .rd_i, .rd_j, .rd_in(rd[2]), .rd_out(rd[1]),
    .l_cb_out(cb[1]), .l_w_in(w[1]), .l_aq_in(aq[1]), .l_d_out(d[1]),
    .l_eta_out(eta[1]), .l_bp_in(bp[1]),
    .r_cb_in(cb[2]), .r_w_out(w[2]), .r_aq_out(aq[2]), .r_d_in(d[2]), .r_eta_in(eta[2]), .r_bp_out(bp[2]),
    .fwd_in(fw[1]), .fwd_out(fw[2]), .ret_in(ret[2]), .ret_out(ret[1])
  );
  chip_a #(.M(M), .S(S), .X(1)) u2 (
    .clk, .rst_n, .ctrl1, .ctrl2, .sel(1'b1), .sweep, .ld_we, .ld_i, .ld_j, .ld_data,
    .rd_i, .rd_j, .rd_in(8'hAA), .rd_out(rd[2]),
    .l_cb_out(cb[2]), .l_w_in(w[2]), .l_aq_in(aq[2]), .l_d_out(d[2]),
    .l_eta_out(eta[2]), .l_bp_in(bp[2]),
    .r_cb_in(8'h55), .r_w_out(w[3]), .r_aq_out(aq[3]), .r_d_in(8'h55), .r_eta_in(8'h55), .r_bp_out(bp[3]),
    .fwd_in(fw[2]), .fwd_out(fw[3]), .ret_in(8'h33), .ret_out(ret[2])
  );

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

  function automatic bit slot(input int tt, input int t0, output int k);
    k = 0;
    if (tt < t0 || ((tt - t0) & 1) != 0) return 1'b0;
    k = (tt - t0) / 2;
    return k < M;
  endfunction

  task automatic idle_inputs();
    sweep = -16'sd1; l_w_in = '0; l_aq_in = '0; l_bp_in = '0; fwd = '0;
  endtask

  // one step of the chained array; mode 1, 4 or 8
  task automatic run_step(input int mode, input int p, output int res [M]);
    int k, tend;
    ctrl1 = (mode == 8);
    ctrl2 = (mode == 4);
    tend  = (mode == 1) ? 2*(M-1) + 2*P - OFF : (mode == 4) ? 2*(M-1) + L + P + OFF : 3*M - 2 + P;
    for (int t = 0; t <= tend; t++) begin
      @(negedge clk);
      idle_inputs();
      sweep = 16'(t - P - (M - 1));
      if (mode == 1 && slot(t, OFF + L, k)) fwd = 8'(cbv[k]);
      if (mode == 4 && slot(t, P - OFF, k)) l_aq_in = 8'(aqv[k]);
      if (mode == 8 && slot(t, P - OFF, k)) l_bp_in = 8'(bm[p][k]);
      if (mode == 8 && slot(t, OFF + L, k)) fwd = 8'(etav[k]);
      #1;
      if (mode == 1 && slot(t, 2*P - OFF, k)) res[k] = int'(ret[0]);
      if (mode == 4 && slot(t, L + P + OFF, k)) res[k] = int'(d[0]);
    end
    @(negedge clk);
    idle_inputs();
    ctrl1 = 1'b0;
    ctrl2 = 1'b0;
  endtask

  initial begin
    int res [M];
    int exp_v, p, dd;
    rst_n = 1'b0; ctrl1 = 1'b0; ctrl2 = 1'b0; ld_we = 1'b0; ld_i = '0; ld_j = '0;
    ld_data = '0; rd_i = '0; rd_j = '0;
    idle_inputs();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int trial = 0; trial < 30; trial++) begin
      for (int i = 0; i < M; i++) begin
        for (int j = 0; j < M; j++) bm[i][j] = int'($urandom_range(0, 255));
        cbv[i]  = int'($urandom_range(0, 255));
        aqv[i]  = int'($urandom_range(0, 255));
        etav[i] = int'($urandom_range(0, 255));
      end
      p = int'($urandom_range(0, M - 1));
      // load B^-1 through the load port
      for (int i = 0; i < M; i++)
        for (int j = 0; j < M; j++) begin
          @(negedge clk);
          ld_we = 1'b1; ld_i = 2'(i); ld_j = 2'(j); ld_data = 8'(bm[i][j]);
        end
      @(negedge clk); ld_we = 1'b0;
      // placement and read-back
      for (int i = 0; i < M; i++)
        for (int j = 0; j < M; j++) begin
          rd_i = 2'(i); rd_j = 2'(j);
          #1;
          check(int'(rd[0]), bm[i][j], "read chain");
          dd = i - j;
          case (dd + 1 >= 3 ? 1 : (dd + 1 < 0 ? -1 : 0))
            -1: check(int'(u0.lm[(dd + 1 + 3) % 3][i]), bm[i][j], "placed in chip -1");
            0:  check(int'(u1.lm[dd + 1][i]), bm[i][j], "placed in chip 0");
            default: check(int'(u2.lm[dd + 1 - 3][i]), bm[i][j], "placed in chip 1");
          endcase
        end
      for (int i = 0; i < M; i++) check(int'(u1.lm[1][i]), bm[i][i], "main diagonal in chip 0 cell 1");

      run_step(1, 0, res);
      for (int j = 0; j < M; j++) begin
        exp_v = 0;
        for (int i = 0; i < M; i++) exp_v += cbv[i] * bm[i][j];
        check(res[j], exp_v, $sformatf("step 1 w[%0d]", j));
      end
      run_step(4, 0, res);
      for (int i = 0; i < M; i++) begin
        exp_v = 0;
        for (int j = 0; j < M; j++) exp_v += bm[i][j] * aqv[j];
        check(res[i], exp_v, $sformatf("step 4 d[%0d]", i));
      end
      run_step(8, p, res);
      for (int i = 0; i < M; i++)
        for (int j = 0; j < M; j++) begin
          rd_i = 2'(i); rd_j = 2'(j);
          #1;
          check(int'(rd[0]), bm[i][j] + etav[i] * bm[p][j], $sformatf("step 8 B(%0d,%0d)", i, j));
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
