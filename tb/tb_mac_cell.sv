// tb_mac_cell: self-checking testbench for mac_cell (cell 0 / cell 1).
// Random operands; one clock after they are applied the cell must give
// y_out = y_in + x_in * a_in (mod 256) and x_out = x_in. A second pass with
// FRAC = 4 checks the fixed-point product shift, and a short chain of three
// cells checks that a partial sum collects one product per cell per clock.
// The cell function checked is the published one; operand ranges and the
// random stimulus are this testbench's own.
module tb_mac_cell;
  logic clk = 1'b0;
  logic rst_n;
  logic signed [7:0] a, x, y, xo, yo;
  logic signed [7:0] fa, fx, fy, fxo, fyo;
  int checks = 0, failures = 0;

  mac_cell dut (.clk, .rst_n, .a_in(a), .x_in(x), .y_in(y), .x_out(xo), .y_out(yo));
  mac_cell #(.W(8), .FRAC(4)) dutf (.clk, .rst_n, .a_in(fa), .x_in(fx), .y_in(fy), .x_out(fxo), .y_out(fyo));

  // chain of three cells: y flows right, x flows left
  logic signed [7:0] ca [3];
  logic signed [7:0] cx [4];
  logic signed [7:0] cy [4];
  for (genvar k = 0; k < 3; k++) begin : g_chain
    mac_cell u (.clk, .rst_n, .a_in(ca[k]), .x_in(cx[k+1]), .y_in(cy[k]),
                .x_out(cx[k]), .y_out(cy[k+1]));
  end

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
      $display("FAIL %s: got %0d expected %0d", what, $signed(got), $signed(exp));
    end
  endtask

  initial begin
    int va, vx, vy, p;
    rst_n = 1'b0; a = '0; x = '0; y = '0; fa = '0; fx = '0; fy = '0;
    for (int k = 0; k < 3; k++) ca[k] = '0;
    cx[3] = '0; cy[0] = '0;
    #12 rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      va = $signed(8'($urandom)); vx = $signed(8'($urandom)); vy = $signed(8'($urandom));
      a = 8'(va); x = 8'(vx); y = 8'(vy);
      fa = 8'(va); fx = 8'(vx); fy = 8'(vy);
      @(posedge clk); #1;
      check(yo, 8'(vy + vx * va), "y_out");
      check(xo, 8'(vx), "x_out");
      p = (vx * va) >>> 4;
      check(fyo, 8'(vy + p), "y_out frac");
    end
    // chain: x = 3 at the right end, partial sum 1 at the left end, a = 2,5,7
    // x_2 meets y at cell 2 only if timed: feed y at t0, x so that both meet
    // in cell 1 one cycle later: y reg in cell1 at t0+2, x reg in cell1 at t+2
    @(negedge clk);
    cy[0] = 8'sd1; cx[3] = 8'sd3;           // both enter registers at next edge
    @(negedge clk);
    cy[0] = '0; cx[3] = '0;
    ca[1] = 8'sd5;                           // y and x meet in cell 1 one edge later
    @(negedge clk);
    ca[1] = '0;
    #1 check(cy[2], 8'(1 + 3 * 5), "chain meet");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
