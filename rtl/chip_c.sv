// chip_c: one slice of the step-2 array in the multi-chip engine.
//
// A chip C holds Q cell 1s (multiply-accumulate cells) and a local memory
// with its share of the constraint matrix A. Chip Cs are chained into one
// long array for step 2, r = c - (w^T A)^T: the cost c_j enters at the chip-B
// end and collects -w_i * A(i,j) on its way out, -w enters at the far end.
// Chip number X (which may be negative) holds the diagonals
//   i - j = Q*X + c - floor(Q/2),   c = 0 .. Q-1
// of A; the local memory keeps lm[c][i] = A(i, i - dd). A chain is numbered
// upward from the chip next to chip B.
//
// Select = 0: the right-hand array lines go to the next chip and the
// far-end bus (fwd) and return bus (ret) pass through. Select = 1: last
// chip; -w arrives on fwd and enters the right end, and the r stream that
// leaves the right end is turned back onto ret towards chip B (the 1:2
// decoder of the chip).
//
// Timing: chip B broadcasts `sweep`, the value of i + j whose elements are
// due in this cycle (negative: none); each cell whose diagonal matches
// presents lm[c][(sweep + dd) / 2] on its top input when the parity fits.
// The load port writes A(i, j) into the chip and cell that own it.
//
// Follows the document: cell 1s and local memory A per chip, Select, and
// the data distribution over chips and cells. Own choices: the sweep
// broadcast and the fwd/ret buses.
module chip_c #(
  parameter int unsigned M    = 3,
  parameter int unsigned N    = 9,
  parameter int unsigned Q    = 11,
  parameter int unsigned W    = 8,
  parameter int unsigned FRAC = 0,
  parameter int          X    = 0,
  parameter int unsigned IW   = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned PW   = (M > 1) ? $clog2(M) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               sel,       // Select: 1 = last chip
  input  logic signed [15:0] sweep,     // i + j due this cycle
  input  logic               ld_we,
  input  logic [PW-1:0]      ld_i,
  input  logic [IW-1:0]      ld_j,
  input  logic [W-1:0]       ld_data,
  // left side (towards chip B)
  output logic [W-1:0]       l_x_out,
  input  logic [W-1:0]       l_y_in,
  // right side (towards the next chip C)
  input  logic [W-1:0]       r_x_in,
  output logic [W-1:0]       r_y_out,
  // far-end and return buses
  input  logic [W-1:0]       fwd_in,
  output logic [W-1:0]       fwd_out,
  input  logic [W-1:0]       ret_in,
  output logic [W-1:0]       ret_out
);
  localparam int H = Q / 2;

  logic [Q-1:0][M-1:0][W-1:0] lm;
  logic signed [W-1:0] top [Q];
  logic signed [W-1:0] x_l [Q+1], y_l [Q+1];

  always_comb begin
    for (int c = 0; c < Q; c++) begin
      int dd, sum, ii, jj;
      dd     = int'(Q) * X + c - H;
      sum    = int'(sweep);
      ii     = (sum + dd) / 2;
      jj     = (sum - dd) / 2;
      top[c] = '0;
      if ((sum >= 0) && (((sum + dd) & 1) == 0) && (sum + dd >= 0) && (sum - dd >= 0)
          && (ii < int'(M)) && (jj < int'(N)))
        top[c] = lm[c][PW'(ii)];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lm <= '0;
    end else if (ld_we) begin
      int dd;
      dd = int'(ld_i) - int'(ld_j);
      if (lp_pkg::chip_of(dd, int'(Q)) == X)
        lm[lp_pkg::cell_of(dd, int'(Q))][ld_i] <= ld_data;
    end
  end

  for (genvar k = 0; k < Q; k++) begin : g_cell
    mac_cell #(.W(W), .FRAC(FRAC)) u_cell (
      .clk, .rst_n,
      .a_in(top[k]), .x_in(x_l[k+1]), .y_in(y_l[k]),
      .x_out(x_l[k]), .y_out(y_l[k+1])
    );
  end

  assign l_x_out = x_l[0];
  assign y_l[0]  = l_y_in;
  assign x_l[Q]  = sel ? fwd_in : r_x_in;
  assign r_y_out = y_l[Q];
  assign fwd_out = fwd_in;
  assign ret_out = sel ? y_l[Q] : ret_in;
endmodule
