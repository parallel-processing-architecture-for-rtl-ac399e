// chip_a: one slice of the B^-1 arrays in the multi-chip engine.
//
// A chip A holds S unified cells (steps 1 and 4) and S cell 3s (step 8)
// side by side, a local memory with its share of B^-1 and the steering
// logic around them. Several chip As are chained into one long linear array:
// chip number X (which may be negative) holds the diagonals
//   i - j = S*X + c - floor(S/2),   c = 0 .. S-1
// of B^-1, so that chip 0 carries the main diagonal in its middle cell. A
// chain is numbered upward from the chip next to chip B. The local memory
// keeps one word per cell and row, lm[c][i] = B^-1(i, i - dd).
//
// Function (Ctrl1, Ctrl2):  00 step 1 (unified cells as cell 0, w = cb^T B^-1)
//                           01 step 4 (unified cells as cell 2, d = B^-1 A_q)
//                           1x step 8 (cell 3s, B^-1 <- B^-1 + eta* (B^-1)_p)
// Per cell, a 1:2 decoder driven by Ctrl1 sends the memory word to the
// unified cell or to the cell 3; the cell 3 result is written back into the
// same memory word one cycle later.
//
// Select = 0: this chip passes its right-hand array lines to the next chip
// and forwards the far-end bus (fwd) and the return bus (ret) unchanged.
// Select = 1: this is the last chip. The value on fwd enters the right end
// of its arrays (cb in step 1, zero in step 4, eta* in step 8) and the w
// stream leaving its right end is turned back onto ret towards chip B.
//
// Timing: chip B broadcasts `sweep`, the value of i + j whose elements are
// due in this cycle (negative: none). Every cell whose diagonal matches
// presents lm[c][(sweep + dd) / 2] on its top input when the parity fits.
// The read port (rd_i, rd_j) answers combinationally along the rd chain:
// the owning chip drives its word, others pass what comes from the right.
// The load port (ld_*) writes B^-1(i, j) into the chip that owns it.
//
// Follows the document: the cell content of a chip, Ctrl1/Ctrl2 coding,
// Select, and the data distribution over chips and cells. Own choices: the
// sweep broadcast, the fwd/ret buses that take the place of the far-end
// turnaround, the read chain for the pivot row, and write-back timing.
module chip_a #(
  parameter int unsigned M    = 3,
  parameter int unsigned S    = 5,
  parameter int unsigned W    = 8,
  parameter int unsigned FRAC = 0,
  parameter int          X    = 0,
  parameter int unsigned PW   = (M > 1) ? $clog2(M) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   ctrl1,
  input  logic                   ctrl2,
  input  logic                   sel,        // Select: 1 = last chip
  input  logic signed [15:0]     sweep,      // i + j due this cycle
  // load and read ports of the local memory
  input  logic                   ld_we,
  input  logic [PW-1:0]          ld_i,
  input  logic [PW-1:0]          ld_j,
  input  logic [W-1:0]           ld_data,
  input  logic [PW-1:0]          rd_i,
  input  logic [PW-1:0]          rd_j,
  input  logic [W-1:0]           rd_in,      // from the chip on the right
  output logic [W-1:0]           rd_out,     // towards chip B
  // left side (towards chip B)
  output logic [W-1:0]           l_cb_out,
  input  logic [W-1:0]           l_w_in,
  input  logic [W-1:0]           l_aq_in,
  output logic [W-1:0]           l_d_out,
  output logic [W-1:0]           l_eta_out,
  input  logic [W-1:0]           l_bp_in,
  // right side (towards the next chip A)
  input  logic [W-1:0]           r_cb_in,
  output logic [W-1:0]           r_w_out,
  output logic [W-1:0]           r_aq_out,
  input  logic [W-1:0]           r_d_in,
  input  logic [W-1:0]           r_eta_in,
  output logic [W-1:0]           r_bp_out,
  // far-end and return buses
  input  logic [W-1:0]           fwd_in,
  output logic [W-1:0]           fwd_out,
  input  logic [W-1:0]           ret_in,
  output logic [W-1:0]           ret_out
);
  localparam int H = S / 2;

  logic [S-1:0][M-1:0][W-1:0] lm;

  logic signed [W-1:0] mem_q [S];
  logic [S-1:0]        mem_v;
  logic [PW-1:0]       mem_i [S];
  logic signed [W-1:0] u_top [S], c_top [S], c_bot [S];
  logic [S-1:0]        wb_v;
  logic [PW-1:0]       wb_i [S];

  // array lines, index k enters/leaves cell k on its left, k+1 on its right
  logic signed [W-1:0] cb_l [S+1], aq_l [S+1], w_l [S+1], d_l [S+1];
  logic signed [W-1:0] eta_l [S+1], bp_l [S+1];

  // ------------------------------------------------------- memory read
  always_comb begin
    for (int c = 0; c < S; c++) begin
      int dd, sum, ii, jj;
      dd       = int'(S) * X + c - H;
      sum      = int'(sweep);
      ii       = (sum + dd) / 2;
      jj       = (sum - dd) / 2;
      mem_v[c] = (sum >= 0) && (((sum + dd) & 1) == 0) && (sum + dd >= 0) && (sum - dd >= 0)
                 && (ii < int'(M)) && (jj < int'(M));
      mem_i[c] = mem_v[c] ? PW'(ii) : '0;
      mem_q[c] = mem_v[c] ? lm[c][mem_i[c]] : '0;
      // 1:2 decoder per cell, steered by Ctrl1
      u_top[c] = ctrl1 ? '0 : mem_q[c];
      c_top[c] = ctrl1 ? mem_q[c] : '0;
    end
  end

  // ------------------------------------------------------- memory write
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lm   <= '0;
      wb_v <= '0;
      for (int c = 0; c < S; c++) wb_i[c] <= '0;
    end else begin
      for (int c = 0; c < S; c++) begin
        wb_v[c] <= ctrl1 && mem_v[c];
        wb_i[c] <= mem_i[c];
        if (wb_v[c]) lm[c][wb_i[c]] <= c_bot[c];
      end
      if (ld_we) begin
        int dd;
        dd = int'(ld_i) - int'(ld_j);
        if (lp_pkg::chip_of(dd, int'(S)) == X)
          lm[lp_pkg::cell_of(dd, int'(S))][ld_i] <= ld_data;
      end
    end
  end

  // ------------------------------------------------------- read chain
  always_comb begin
    int dd;
    dd     = int'(rd_i) - int'(rd_j);
    rd_out = sel ? '0 : rd_in;
    if (lp_pkg::chip_of(dd, int'(S)) == X)
      rd_out = lm[lp_pkg::cell_of(dd, int'(S))][rd_i];
  end

  // ------------------------------------------------------- the cells
  for (genvar k = 0; k < S; k++) begin : g_cell
    unified_cell #(.W(W), .FRAC(FRAC)) u_uni (
      .clk, .rst_n, .ctrl(ctrl2),
      .in_3(u_top[k]), .in_1_1(cb_l[k+1]), .in_1_2(aq_l[k]),
      .in_2_1(w_l[k]), .in_2_2(d_l[k+1]),
      .out_1_1(cb_l[k]), .out_1_2(aq_l[k+1]),
      .out_2_1(w_l[k+1]), .out_2_2(d_l[k])
    );
    cell3 #(.W(W), .FRAC(FRAC)) u_c3 (
      .clk, .rst_n,
      .in_1(eta_l[k+1]), .in_2(bp_l[k]), .in_3(c_top[k]),
      .out_1(eta_l[k]), .out_2(bp_l[k+1]), .out_3(c_bot[k])
    );
  end

  // left edge
  assign l_cb_out  = cb_l[0];
  assign w_l[0]    = l_w_in;
  assign aq_l[0]   = l_aq_in;
  assign l_d_out   = d_l[0];
  assign l_eta_out = eta_l[0];
  assign bp_l[0]   = l_bp_in;

  // right edge: next chip, or the far-end bus on the last chip
  assign cb_l[S]  = sel ? fwd_in : r_cb_in;
  assign d_l[S]   = sel ? fwd_in : r_d_in;
  assign eta_l[S] = sel ? fwd_in : r_eta_in;
  assign r_w_out  = w_l[S];
  assign r_aq_out = aq_l[S];
  assign r_bp_out = bp_l[S];
  assign fwd_out  = fwd_in;
  assign ret_out  = sel ? w_l[S] : ret_in;
endmodule
