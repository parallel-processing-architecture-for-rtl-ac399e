// tb_unified_cell: self-checking testbench for unified_cell.
// Uses the operand sets of the reference timing diagram (ctrl = 0:
// 5*2+6 = 16 and 4*5+2 = 22; ctrl = 1: 4*2+3 = 11 and 3*5+6 = 21) and 400
// random sets in both modes. One clock after the operands are applied:
//   ctrl = 0: out_2_1 = in_1_1*in_3 + in_2_1, out_2_2 = 0
//   ctrl = 1: out_2_2 = in_1_2*in_3 + in_2_2, out_2_1 = 0
// and out_1_1 = in_1_1, out_1_2 = in_1_2 in both modes. ctrl is not
// registered, so switching it changes the outputs at once.
// The two modes and their coding follow the published cell; the stimulus
// and the hand-worked pairs are this testbench's own.
module tb_unified_cell;
  logic clk = 1'b0;
  logic rst_n, ctrl;
  logic signed [7:0] i11, i12, i21, i22, i3, o11, o12, o21, o22;
  int checks = 0, failures = 0;

  unified_cell dut (.clk, .rst_n, .ctrl, .in_3(i3), .in_1_1(i11), .in_1_2(i12),
                    .in_2_1(i21), .in_2_2(i22), .out_1_1(o11), .out_1_2(o12),
                    .out_2_1(o21), .out_2_2(o22));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic apply(input int a11, input int a12, input int a21, input int a22, input int a3);
    @(negedge clk);
    i11 = 8'(a11); i12 = 8'(a12); i21 = 8'(a21); i22 = 8'(a22); i3 = 8'(a3);
    @(posedge clk); #1;
    ctrl = 1'b0; #1;
    check(o21, 8'(a11 * a3 + a21), "out_2_1 (ctrl 0)");
    check(o22, 8'd0, "out_2_2 idle (ctrl 0)");
    check(o11, 8'(a11), "out_1_1");
    check(o12, 8'(a12), "out_1_2");
    ctrl = 1'b1; #1;
    check(o22, 8'(a12 * a3 + a22), "out_2_2 (ctrl 1)");
    check(o21, 8'd0, "out_2_1 idle (ctrl 1)");
    check(o11, 8'(a11), "out_1_1");
  endtask

  initial begin
    rst_n = 1'b0; ctrl = 1'b0;
    i11 = '0; i12 = '0; i21 = '0; i22 = '0; i3 = '0;
    #12 rst_n = 1'b1;
    apply(5, 4, 6, 3, 2);   // 16 / 11
    apply(4, 3, 2, 6, 5);   // 22 / 21
    for (int n = 0; n < 400; n++)
      apply(int'($urandom_range(0, 255)), int'($urandom_range(0, 255)),
            int'($urandom_range(0, 255)), int'($urandom_range(0, 255)),
            int'($urandom_range(0, 255)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
