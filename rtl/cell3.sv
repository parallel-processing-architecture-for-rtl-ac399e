// cell3: the pivot cell of step 8 (B^-1 update) and of the b update.
//
// The eta* element enters from the right (IN_1) and leaves to the left, the
// pivot-row element (B^-1)_p enters from the left (IN_2) and leaves to the
// right, and the element of B^-1 (or of b) to be updated enters from the top
// (IN_3). Each input is registered once (the D boxes of the cell drawing) and
// the cell emits
//   OUT_1 = IN_1, OUT_2 = IN_2, OUT_3 = IN_1 * IN_2 + IN_3
// from those registers, so OUT_3 is the updated element
// B^-1(i,j) + eta*_i * B^-1(p,j) one clock after the operands are applied.
// Ports and the operation follow the cell specification; W = 8 is the
// specified bus width. FRAC (fraction bits of the fixed-point format, 0 =
// plain integers) and the asynchronous active-low reset are choices of this
// implementation. Results wrap to W bits.
module cell3 #(
  parameter int unsigned W    = 8,
  parameter int unsigned FRAC = 0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] in_1,   // eta*, from the right
  input  logic signed [W-1:0] in_2,   // pivot row element, from the left
  input  logic signed [W-1:0] in_3,   // element to update, from the top
  output logic signed [W-1:0] out_1,  // eta*, to the left
  output logic signed [W-1:0] out_2,  // pivot row element, to the right
  output logic signed [W-1:0] out_3   // updated element, to the bottom
);
  logic signed [W-1:0]   r1, r2, r3;
  logic signed [2*W-1:0] prod;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1 <= '0;
      r2 <= '0;
      r3 <= '0;
    end else begin
      r1 <= in_1;
      r2 <= in_2;
      r3 <= in_3;
    end
  end

  always_comb begin
    prod  = (2*W)'(r1) * (2*W)'(r2);
    prod  = prod >>> FRAC;
    out_1 = r1;
    out_2 = r2;
    out_3 = prod[W-1:0] + r3;
  end
endmodule
