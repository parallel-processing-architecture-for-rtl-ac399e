// tb_main_memory: self-checking testbench for main_memory.
// Writes random words to every A(i,j), b0(i) and c(j), including writes with
// out-of-range indices and with we low that must change nothing, and checks
// the parallel read ports against a model array. Reset must clear the store.
// The stored data follow the published design; the write and read
// sequences are this testbench's own.
module tb_main_memory;
  localparam int M = 3, N = 9;
  logic clk = 1'b0;
  logic rst_n, we;
  logic [1:0] sel, row;
  logic [3:0] col;
  logic [7:0] wdata;
  logic [M-1:0][N-1:0][7:0] a_mat;
  logic [M-1:0][7:0] b0;
  logic [N-1:0][7:0] c_vec;
  logic [7:0] ma [M][N];
  logic [7:0] mb [M];
  logic [7:0] mc [N];
  int checks = 0, failures = 0;

  main_memory dut (.clk, .rst_n, .we, .sel, .row, .col, .wdata, .a_mat, .b0, .c_vec);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
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

  task automatic compare();
    for (int i = 0; i < M; i++) begin
      for (int j = 0; j < N; j++) check(int'(a_mat[i][j]), int'(ma[i][j]), "A");
      check(int'(b0[i]), int'(mb[i]), "b0");
    end
    for (int j = 0; j < N; j++) check(int'(c_vec[j]), int'(mc[j]), "c");
  endtask

  initial begin
    rst_n = 1'b0; we = 1'b0; sel = '0; row = '0; col = '0; wdata = '0;
    foreach (ma[i, j]) ma[i][j] = '0;
    foreach (mb[i]) mb[i] = '0;
    foreach (mc[j]) mc[j] = '0;
    #12 rst_n = 1'b1;
    compare();
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      we = 1'($urandom_range(0, 3) != 0);
      sel = 2'($urandom_range(0, 3));
      row = 2'($urandom_range(0, 3));
      col = 4'($urandom_range(0, 10));
      wdata = 8'($urandom);
      if (we) begin
        if (sel == 2'd0 && row < M && col < N) ma[row][col] = wdata;
        if (sel == 2'd1 && row < M) mb[row] = wdata;
        if (sel == 2'd2 && col < N) mc[col] = wdata;
      end
      @(posedge clk); #1;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
