// mac_cell: "cell 0 / cell 1" of the revised-simplex systolic arrays.
//
// One multiply-accumulate processing element of a linear systolic array. The
// matrix element a enters from the top, the multiplier x travels right-to-left
// and the partial sum y travels left-to-right. Every input passes through one
// register (the D boxes of the cell drawing); the cell then emits
//   x_out = x            (to the left neighbour)
//   y_out = y + x * a    (to the right neighbour, combinational from the registers)
// so a value advances one cell per clock. Step 1 (w = cb^T B^-1: a = B^-1,
// x = cb, y = 0) and step 2 (r = c - (w^T A)^T: a = A, x = -w, y = c) both use
// this cell, as the design specifies. Arithmetic is W-bit two's complement
// with FRAC fraction bits; the product is shifted right by FRAC and truncated
// to W bits (FRAC = 0 keeps the low 8 bits of an 8-bit product, as specified).
// The asynchronous active-low reset that clears the registers is a choice of
// this implementation.
module mac_cell #(
  parameter int unsigned W    = 8,
  parameter int unsigned FRAC = 0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] a_in,   // matrix element from the top
  input  logic signed [W-1:0] x_in,   // multiplier, arrives from the right
  input  logic signed [W-1:0] y_in,   // partial sum, arrives from the left
  output logic signed [W-1:0] x_out,  // multiplier, leaves to the left
  output logic signed [W-1:0] y_out   // partial sum, leaves to the right
);
  logic signed [W-1:0]   a_d, x_d, y_d;
  logic signed [2*W-1:0] prod;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_d <= '0;
      x_d <= '0;
      y_d <= '0;
    end else begin
      a_d <= a_in;
      x_d <= x_in;
      y_d <= y_in;
    end
  end

  always_comb begin
    prod  = (2*W)'(x_d) * (2*W)'(a_d);
    prod  = prod >>> FRAC;
    x_out = x_d;
    y_out = y_d + prod[W-1:0];
  end
endmodule
