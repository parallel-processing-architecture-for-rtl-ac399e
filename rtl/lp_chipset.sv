// lp_chipset: the multi-chip revised-simplex engine for problems of any size.
//
// The fixed-size engine is cut into three kinds of chips: chip As carry the
// B^-1 arrays (unified cells for steps 1 and 4, cell 3s for step 8), chip Cs
// carry the step-2 array of cell 1s, and one chip B carries everything else
// and the sequencing. Chip As are chained on one side of chip B and chip Cs
// on the other; a larger problem only needs more chips of kind A and C.
//
// Every chip A holds S cells of each kind and every chip C holds Q cell 1s.
// The diagonal i - j of a matrix goes to chip floor((i - j + floor(r/2)) / r)
// and cell (i - j + floor(r/2)) mod r (r = S or Q), so the number of chips
// follows from the range of i - j: for B^-1 (M x M) it runs from -(M-1) to
// M-1, for A (M x N) from -(N-1) to M-1. The chip nearest to chip B has the
// lowest number; the farthest one gets Select = 1 and turns the streams back.
// With the defaults (M = 3, N = 9, S = 5, Q = 11) that is one chip A
// (chip 0) and two chip Cs (chips -1 and 0).
//
// Host interface and timing as chip_b: write A, b and c through mem_* while
// idle, pulse start, wait for done; end_opt (END) or unbounded tells how it
// ended, x_col/x_val/objective/pivots hold the result. One simplex path is
// followed, starting from the slack basis in the last M columns.
module lp_chipset #(
  parameter int unsigned M    = 3,
  parameter int unsigned N    = 9,
  parameter int unsigned W    = 8,
  parameter int unsigned FRAC = 0,
  parameter int unsigned S    = 5,
  parameter int unsigned Q    = 11,
  parameter int unsigned IW   = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned PW   = (M > 1) ? $clog2(M) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 mem_we,
  input  logic [1:0]           mem_sel,
  input  logic [PW-1:0]        mem_row,
  input  logic [IW-1:0]        mem_col,
  input  logic [W-1:0]         mem_wdata,
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  output logic                 end_opt,
  output logic                 unbounded,
  output logic [M-1:0][IW-1:0] x_col,
  output logic [M-1:0][W-1:0]  x_val,
  output logic [W-1:0]         objective,
  output logic [7:0]           pivots,
  output logic [3:0]           step
);
  import lp_pkg::*;

  // chip numbers covering the diagonals of B^-1 and of A
  localparam int XA_LO = chip_of(-(int'(M) - 1), int'(S));
  localparam int XA_HI = chip_of(int'(M) - 1, int'(S));
  localparam int KA    = XA_HI - XA_LO + 1;
  localparam int OFFA  = cell_of(-(int'(M) - 1), int'(S));
  localparam int XC_LO = chip_of(-(int'(N) - 1), int'(Q));
  localparam int XC_HI = chip_of(int'(M) - 1, int'(Q));
  localparam int KC    = XC_HI - XC_LO + 1;
  localparam int OFFC  = cell_of(-(int'(N) - 1), int'(Q));

  logic                ctrl1, ctrl2;
  logic signed [15:0]  sweep_a, sweep_c;
  logic                lda_we, ldc_we;
  logic [PW-1:0]       lda_i, lda_j, ldc_i, rd_i, rd_j;
  logic [IW-1:0]       ldc_j;
  logic [W-1:0]        lda_data, ldc_data;

  // chain wiring: index k is the left side of chip k, k+1 its right side
  logic [W-1:0] a_cb [KA+1], a_w [KA+1], a_aq [KA+1], a_d [KA+1];
  logic [W-1:0] a_eta [KA+1], a_bp [KA+1], a_fwd [KA+1], a_ret [KA+1], a_rd [KA+1];
  logic [W-1:0] c_x [KC+1], c_y [KC+1], c_fwd [KC+1], c_ret [KC+1];

  chip_b #(.M(M), .N(N), .W(W), .FRAC(FRAC), .PA(KA * S), .OFFA(OFFA),
           .PC(KC * Q), .OFFC(OFFC), .IW(IW), .PW(PW)) u_chip_b (
    .clk, .rst_n, .mem_we, .mem_sel, .mem_row, .mem_col, .mem_wdata,
    .start, .busy, .done, .end_opt, .unbounded, .x_col, .x_val, .objective,
    .pivots, .step,
    .ctrl1, .ctrl2, .sweep_a, .lda_we, .lda_i, .lda_j, .lda_data,
    .rd_i, .rd_j, .rd_data(a_rd[0]),
    .a_w_out(a_w[0]), .a_aq_out(a_aq[0]), .a_d_in(a_d[0]), .a_bp_out(a_bp[0]),
    .a_fwd(a_fwd[0]), .a_ret(a_ret[0]),
    .sweep_c, .ldc_we, .ldc_i, .ldc_j, .ldc_data,
    .c_c_out(c_y[0]), .c_fwd(c_fwd[0]), .c_ret(c_ret[0])
  );

  for (genvar k = 0; k < KA; k++) begin : g_chip_a
    chip_a #(.M(M), .S(S), .W(W), .FRAC(FRAC), .X(XA_LO + k), .PW(PW)) u_chip (
      .clk, .rst_n, .ctrl1, .ctrl2, .sel(k == KA - 1), .sweep(sweep_a),
      .ld_we(lda_we), .ld_i(lda_i), .ld_j(lda_j), .ld_data(lda_data),
      .rd_i, .rd_j, .rd_in(a_rd[k+1]), .rd_out(a_rd[k]),
      .l_cb_out(a_cb[k]), .l_w_in(a_w[k]), .l_aq_in(a_aq[k]), .l_d_out(a_d[k]),
      .l_eta_out(a_eta[k]), .l_bp_in(a_bp[k]),
      .r_cb_in(a_cb[k+1]), .r_w_out(a_w[k+1]), .r_aq_out(a_aq[k+1]), .r_d_in(a_d[k+1]),
      .r_eta_in(a_eta[k+1]), .r_bp_out(a_bp[k+1]),
      .fwd_in(a_fwd[k]), .fwd_out(a_fwd[k+1]), .ret_in(a_ret[k+1]), .ret_out(a_ret[k])
    );
  end
  // nothing beyond the last chip A
  assign a_cb[KA]  = '0;
  assign a_d[KA]   = '0;
  assign a_eta[KA] = '0;
  assign a_ret[KA] = '0;
  assign a_rd[KA]  = '0;

  for (genvar k = 0; k < KC; k++) begin : g_chip_c
    chip_c #(.M(M), .N(N), .Q(Q), .W(W), .FRAC(FRAC), .X(XC_LO + k), .IW(IW), .PW(PW)) u_chip (
      .clk, .rst_n, .sel(k == KC - 1), .sweep(sweep_c),
      .ld_we(ldc_we), .ld_i(ldc_i), .ld_j(ldc_j), .ld_data(ldc_data),
      .l_x_out(c_x[k]), .l_y_in(c_y[k]),
      .r_x_in(c_x[k+1]), .r_y_out(c_y[k+1]),
      .fwd_in(c_fwd[k]), .fwd_out(c_fwd[k+1]), .ret_in(c_ret[k+1]), .ret_out(c_ret[k])
    );
  end
  assign c_x[KC]   = '0;
  assign c_ret[KC] = '0;
endmodule
