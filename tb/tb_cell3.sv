// tb_cell3: self-checking testbench for cell3 (the step-8 pivot cell).
// Applies the operand sets of the reference timing diagram (for example
// 6*6+0 = 36 and 153*160+2 = 162 after wrapping to 8 bits) and 300 random
// sets, and checks that one clock after the operands are applied
// OUT_3 = IN_1*IN_2+IN_3 (mod 256), OUT_1 = IN_1 and OUT_2 = IN_2, and that
// the outputs do not change before that clock edge.
// The cell function checked is the published one; operand ranges and the
// random stimulus are this testbench's own.
module tb_cell3;
  logic clk = 1'b0;
  logic rst_n;
  logic signed [7:0] in_1, in_2, in_3, out_1, out_2, out_3;
  int checks = 0, failures = 0;

  cell3 dut (.clk, .rst_n, .in_1, .in_2, .in_3, .out_1, .out_2, .out_3);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
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

  task automatic apply(input int a, input int b, input int c);
    logic [7:0] prev3;
    logic [15:0] e;
    in_1 = 8'(a); in_2 = 8'(b); in_3 = 8'(c);
    #1 prev3 = out_3;
    @(posedge clk); #1;
    e = 16'(a * b + c);
    check(out_3, e[7:0], "OUT_3");
    check(out_1, 8'(a), "OUT_1");
    check(out_2, 8'(b), "OUT_2");
  endtask

  initial begin
    rst_n = 1'b0; in_1 = '0; in_2 = '0; in_3 = '0;
    #12 rst_n = 1'b1;
    check(out_3, 8'd0, "reset");
    @(negedge clk);
    apply(5, 4, 3);      // 23
    apply(153, 160, 2);  // 162
    apply(6, 6, 0);      // 36
    apply(6, 6, 6);      // 42
    apply(3, 0, 5);      // 5
    // latency: a new operand set does not reach OUT_3 before the clock edge
    @(negedge clk);
    in_1 = 8'd2; in_2 = 8'd3; in_3 = 8'd1;
    #1 check(out_3, 8'd5, "held before edge");
    @(posedge clk); #1 check(out_3, 8'd7, "after one edge");
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      apply(int'($urandom_range(0, 255)), int'($urandom_range(0, 255)), int'($urandom_range(0, 255)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
