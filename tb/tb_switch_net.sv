// tb_switch_net: self-checking testbench for switch_net.
// For each of the three patterns it checks every downward and upward path
// against the pattern table (pattern 0: M0-C0 M1-C1 M2-C2, pattern 1:
// M0-C2 M1-C0 M2-C1, pattern 2: M0-C1 M1-C2 M2-C0) with distinct random
// words, and that a valid bit reaches only the connected controller.
module tb_switch_net;
  logic [1:0] pattern;
  logic [2:0][15:0] ctrl_down, mod_down;
  logic [2:0][11:0] mod_up, ctrl_up;
  logic [2:0] mod_up_v, ctrl_up_v;
  logic [2:0][1:0] ctrl_up_src;
  int checks = 0, failures = 0;
  // table[s][j] = controller connected to module j in pattern s
  int table_c [3][3] = '{'{0, 1, 2}, '{2, 0, 1}, '{1, 2, 0}};

  switch_net #(.DW(16), .UW(12)) dut (.*);

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 20; n++) begin
      for (int s = 0; s < 3; s++) begin
        pattern = 2'(s);
        for (int k = 0; k < 3; k++) ctrl_down[k] = 16'($urandom);
        for (int j = 0; j < 3; j++) mod_up[j] = 12'($urandom);
        mod_up_v = 3'($urandom);
        #1;
        for (int j = 0; j < 3; j++) begin
          int k;
          k = table_c[s][j];
          check(int'(mod_down[j]), int'(ctrl_down[k]), $sformatf("down s%0d M%0d", s, j));
          check(int'(ctrl_up[k]), int'(mod_up[j]), $sformatf("up s%0d C%0d", s, k));
          check(int'(ctrl_up_v[k]), int'(mod_up_v[j]), $sformatf("valid s%0d C%0d", s, k));
          check(int'(ctrl_up_src[k]), j, $sformatf("src s%0d C%0d", s, k));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
