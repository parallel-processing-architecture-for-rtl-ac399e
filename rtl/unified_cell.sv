// unified_cell: one cell that works as cell 0 (step 1) or cell 2 (step 4).
//
// Cell 0 computes w = cb^T B^-1 with cb moving left and w moving right; cell 2
// computes d = B^-1 A_q with A_q moving right and d moving left. Both read the
// same B^-1 element from the top, so the two are merged with two 2:1
// multiplexers and a 1:2 decoder steered by ctrl:
//   ctrl = 0 (cell 0): out_2_1 = in_1_1 * in_3 + in_2_1, sent right
//   ctrl = 1 (cell 2): out_2_2 = in_1_2 * in_3 + in_2_2, sent left
// The multiplier lines pass through unchanged (out_1_1 = in_1_1 to the left,
// out_1_2 = in_1_2 to the right) in either mode. Every data input is
// registered once; ctrl is not. Port names follow the cell specification
// (in_1_1 = cb, in_1_2 = A_q, in_2_1 = w, in_2_2 = d, in_3 = B^-1).
// The decoder output that is not selected is driven to zero and the
// asynchronous active-low reset is added; both are choices of this
// implementation. Arithmetic as in mac_cell (W bits, FRAC fraction bits,
// wrapping).
module unified_cell #(
  parameter int unsigned W    = 8,
  parameter int unsigned FRAC = 0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ctrl,     // 0: cell 0 (step 1), 1: cell 2 (step 4)
  input  logic signed [W-1:0] in_3,     // B^-1 element, from the top
  input  logic signed [W-1:0] in_1_1,   // cb, from the right
  input  logic signed [W-1:0] in_1_2,   // A_q, from the left
  input  logic signed [W-1:0] in_2_1,   // w partial sum, from the left
  input  logic signed [W-1:0] in_2_2,   // d partial sum, from the right
  output logic signed [W-1:0] out_1_1,  // cb, to the left
  output logic signed [W-1:0] out_1_2,  // A_q, to the right
  output logic signed [W-1:0] out_2_1,  // w partial sum, to the right
  output logic signed [W-1:0] out_2_2   // d partial sum, to the left
);
  logic signed [W-1:0]   b_d, cb_d, aq_d, w_d, d_d;
  logic signed [W-1:0]   mul_sel, acc_sel, sum;
  logic signed [2*W-1:0] prod;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_d  <= '0;
      cb_d <= '0;
      aq_d <= '0;
      w_d  <= '0;
      d_d  <= '0;
    end else begin
      b_d  <= in_3;
      cb_d <= in_1_1;
      aq_d <= in_1_2;
      w_d  <= in_2_1;
      d_d  <= in_2_2;
    end
  end

  always_comb begin
    mul_sel = ctrl ? aq_d : cb_d;            // 2:1 mux on the multiplier
    acc_sel = ctrl ? d_d  : w_d;             // 2:1 mux on the addend
    prod    = (2*W)'(mul_sel) * (2*W)'(b_d);
    prod    = prod >>> FRAC;
    sum     = prod[W-1:0] + acc_sel;
    out_1_1 = cb_d;
    out_1_2 = aq_d;
    out_2_1 = ctrl ? '0  : sum;              // 1:2 decoder
    out_2_2 = ctrl ? sum : '0;
  end
endmodule
