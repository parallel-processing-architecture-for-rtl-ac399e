// tb_module2: self-checking testbench for module2 (steps 7-8).
// Part 1 uses a 16-bit format with 8 fraction bits and the first pivot of the
// worked example (d = (1,2), pivot row 1, entering column 0): the result must
// be eta* = (-1/2, -1/2), B^-1 = [1 -1/2; 0 1/2], b = (10, 30), cb = (0, -1).
// Part 2 uses the 8-bit integer format with random B^-1, b, d and p, and
// compares B^-1, b, cb and the basis list with
//   eta*_i = trunc(-d_i / d_p) (i != p), eta*_p = trunc(1 / d_p) - 1,
//   B^-1(i,j) += eta*_i B^-1(p,j), b_i += eta*_i b_p   (mod 256).
// The run length (3M-1 cycles plus the start cycle) is checked in both parts.
// The first pivot of the worked example comes from the published example;
// the random cases and the cycle count belong to this implementation.
module tb_module2;
  localparam int M = 3, N = 9;
  logic clk = 1'b0;
  logic rst_n;
  int checks = 0, failures = 0;

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

  // ---- part 1: 2 x 4 example in Q8.8
  logic fs, fbusy, fdone;
  logic [1:0][1:0][15:0] fbinv, fbinv_n;
  logic [1:0][15:0] fb, fcb, fd, fb_n, fcb_n;
  logic [1:0][1:0] fbasis, fbasis_n;
  logic [0:0] fp;
  logic [1:0] fq;
  logic [15:0] fcq;
  module2 #(.M(2), .N(4), .W(16), .FRAC(8)) dut_f (
    .clk, .rst_n, .start(fs), .binv(fbinv), .b(fb), .cb(fcb), .basis(fbasis),
    .d(fd), .p(fp), .q(fq), .c_q(fcq), .busy(fbusy), .done(fdone),
    .binv_n(fbinv_n), .b_n(fb_n), .cb_n(fcb_n), .basis_n(fbasis_n));

  // ---- part 2: 3 x 9, 8-bit integers
  logic s, busy, done;
  logic [M-1:0][M-1:0][7:0] binv, binv_n;
  logic [M-1:0][7:0] b, cb, d, b_n, cb_n;
  logic [M-1:0][3:0] basis, basis_n;
  logic [1:0] p;
  logic [3:0] q;
  logic [7:0] cq;
  module2 dut (.clk, .rst_n, .start(s), .binv, .b, .cb, .basis, .d, .p, .q,
               .c_q(cq), .busy, .done, .binv_n, .b_n, .cb_n, .basis_n);

  initial begin
    int cyc, eta [M];
    rst_n = 1'b0; fs = 1'b0; s = 1'b0;
    fbinv = '0; fb = '0; fcb = '0; fd = '0; fbasis = '0; fp = '0; fq = '0; fcq = '0;
    binv = '0; b = '0; cb = '0; d = '0; basis = '0; p = '0; q = '0; cq = '0;
    #12 rst_n = 1'b1;
    fbinv[0][0] = 16'h0100; fbinv[1][1] = 16'h0100;
    fb[0] = 16'(40 * 256); fb[1] = 16'(60 * 256);
    fcb = '0; fbasis[0] = 2'd2; fbasis[1] = 2'd3;
    fd[0] = 16'h0100; fd[1] = 16'h0200; fp = 1'b1; fq = 2'd0; fcq = -16'sd256;
    @(negedge clk); fs = 1'b1;
    @(negedge clk); fs = 1'b0;
    cyc = 1;
    while (!fdone) begin @(negedge clk); cyc++; end
    check(cyc, 3*2 - 1 + 1, "example cycles");
    check($signed(fbinv_n[0][0]), 256, "B'(1,1) = 1");
    check($signed(fbinv_n[0][1]), -128, "B'(1,2) = -1/2");
    check($signed(fbinv_n[1][0]), 0, "B'(2,1) = 0");
    check($signed(fbinv_n[1][1]), 128, "B'(2,2) = 1/2");
    check($signed(fb_n[0]), 10 * 256, "b'(1) = 10");
    check($signed(fb_n[1]), 30 * 256, "b'(2) = 30");
    check($signed(fcb_n[0]), 0, "cb'(1) = 0");
    check($signed(fcb_n[1]), -256, "cb'(2) = -1");
    check(int'(fbasis_n[1]), 0, "basis row 2 = column 1");
    check(int'(fbasis_n[0]), 2, "basis row 1 unchanged");

    for (int n = 0; n < 60; n++) begin
      for (int i = 0; i < M; i++) begin
        for (int j = 0; j < M; j++) binv[i][j] = 8'($urandom_range(0, 8) - 4);
        b[i] = 8'($urandom_range(0, 20));
        cb[i] = 8'($urandom_range(0, 10) - 5);
        d[i] = 8'($urandom_range(0, 12) - 6);
        basis[i] = 4'($urandom_range(0, N - 1));
      end
      p = 2'($urandom_range(0, M - 1));
      d[p] = 8'($urandom_range(1, 3));
      q = 4'($urandom_range(0, N - 1));
      cq = 8'($urandom_range(0, 10) - 5);
      for (int i = 0; i < M; i++)
        eta[i] = (i == int'(p)) ? (1 / $signed(d[p])) - 1 : (-$signed(d[i])) / $signed(d[p]);
      @(negedge clk); s = 1'b1;
      @(negedge clk); s = 1'b0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      check(cyc, 3*M - 1 + 1, "cycles");
      for (int i = 0; i < M; i++) begin
        for (int j = 0; j < M; j++)
          check($signed(binv_n[i][j]), int'($signed(8'($signed(binv[i][j]) + eta[i] * $signed(binv[p][j])))),
                $sformatf("B'(%0d,%0d)", i, j));
        check($signed(b_n[i]), int'($signed(8'($signed(b[i]) + eta[i] * $signed(b[p])))), $sformatf("b'(%0d)", i));
        check($signed(cb_n[i]), (i == int'(p)) ? $signed(cq) : $signed(cb[i]), $sformatf("cb'(%0d)", i));
        check(int'(basis_n[i]), (i == int'(p)) ? int'(q) : int'(basis[i]), $sformatf("basis'(%0d)", i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
