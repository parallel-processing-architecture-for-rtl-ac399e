// switch_net: the switching network between the three modules and the three
// controllers.
//
// The network has three patterns. In pattern s, module j is connected to
// controller (j - s) mod 3, i.e.
//   pattern 0: M0-C0, M1-C1, M2-C2
//   pattern 1: M0-C2, M1-C0, M2-C1
//   pattern 2: M0-C1, M1-C2, M2-C0
// Stepping the pattern 0, 1, 2, 0, ... after every pipeline slot moves each
// controller's problem from module 0 to module 1 to module 2 and back, so the
// three modules always work on three different starting points.
// Downward (controller to module) the network forwards a DW-bit state word;
// upward it forwards a UW-bit result word with its valid bit and tells the
// controller which module the result came from. The network is purely
// combinational. The patterns are those of the design; the bundling of the
// signals into two words is a choice of this implementation.
module switch_net #(
  parameter int unsigned DW = 8,
  parameter int unsigned UW = 8
) (
  input  logic [1:0]          pattern,
  input  logic [2:0][DW-1:0]  ctrl_down,   // state of controller k
  output logic [2:0][DW-1:0]  mod_down,    // state seen by module j
  input  logic [2:0][UW-1:0]  mod_up,      // result of module j
  input  logic [2:0]          mod_up_v,
  output logic [2:0][UW-1:0]  ctrl_up,     // result delivered to controller k
  output logic [2:0]          ctrl_up_v,
  output logic [2:0][1:0]     ctrl_up_src  // module that controller k is connected to
);
  function automatic logic [1:0] mod3(input int v);
    return 2'(v % 3);
  endfunction

  always_comb begin
    for (int j = 0; j < 3; j++)
      mod_down[j] = ctrl_down[mod3(j + 3 - int'(pattern))];
    for (int k = 0; k < 3; k++) begin
      ctrl_up_src[k] = mod3(k + int'(pattern));
      ctrl_up[k]     = mod_up[ctrl_up_src[k]];
      ctrl_up_v[k]   = mod_up_v[ctrl_up_src[k]];
    end
  end
endmodule
