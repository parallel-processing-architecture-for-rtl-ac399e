// module2: pivoting - steps 7 and 8.
//
//   step 7  eta*_i = -d_i / d_p           (i != p)
//           eta*_p = 1 / d_p - 1
//   step 8  B^-1 <- B^-1 + eta* (B^-1)_p   array of 2M-1 cell3
//           b    <- b    + eta* b_p        one more cell3
//           cb_p <- c_q  (and the basis list records column q in row p)
//
// The step-8 array follows the chosen space-time map t = k+i+j,
// cell = i-j: eta*_i enters the right end in cycle 2i, the pivot row
// (B^-1)_p,j enters the left end in cycle 2j, B^-1(i,j) enters cell i-j+M-1
// from the top in cycle i+j+M-1 and its updated value leaves the bottom of
// that cell one cycle later. The b cell is fed one row per cycle (b_i, b_p,
// eta*_i in cycle i). The eta* element is produced by a divider just before
// it enters the array; the division is done at double width
// ((d_i << FRAC) / d_p), truncating toward zero. The whole module takes
// 3M-1 cycles after the start cycle (3M counted like modules 0 and 1).
//
// Interface: pulse `start` with operands stable until `done`; results held.
module module2 #(
  parameter int unsigned M    = 3,
  parameter int unsigned N    = 9,
  parameter int unsigned W    = 8,
  parameter int unsigned FRAC = 0,
  parameter int unsigned IW   = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned PW   = (M > 1) ? $clog2(M) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic [M-1:0][M-1:0][W-1:0] binv,
  input  logic [M-1:0][W-1:0]        b,
  input  logic [M-1:0][W-1:0]        cb,
  input  logic [M-1:0][IW-1:0]       basis,
  input  logic [M-1:0][W-1:0]        d,
  input  logic [PW-1:0]              p,
  input  logic [IW-1:0]              q,
  input  logic [W-1:0]               c_q,      // cost of the entering column
  output logic                       busy,
  output logic                       done,
  output logic [M-1:0][M-1:0][W-1:0] binv_n,
  output logic [M-1:0][W-1:0]        b_n,
  output logic [M-1:0][W-1:0]        cb_n,
  output logic [M-1:0][IW-1:0]       basis_n
);
  import lp_pkg::*;

  localparam int L1     = 2*M - 1;
  localparam int T8_END = 3*M - 2;   // cycle of the last updated element

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_t;
  state_t state;
  logic [15:0] t;

  logic signed [W-1:0] top  [L1];
  logic signed [W-1:0] el   [L1+1];  // eta* line, el[k+1] enters cell k from the right
  logic signed [W-1:0] pr   [L1+1];  // pivot row line, pr[k] enters cell k from the left
  logic signed [W-1:0] bot  [L1];    // updated elements
  logic signed [W-1:0] bc_eta, bc_bi, bc_bp, bc_out, bc_o1, bc_o2;

  // step 7: eta* of row i
  function automatic logic signed [W-1:0] eta_of(input int i);
    logic signed [2*W-1:0] num, den, quo;
    logic signed [W-1:0]   dp;
    dp  = d[p];
    den = (2*W)'(dp);
    if (i == int'(p)) num = (2*W)'(1) <<< (2*FRAC);
    else              num = -((2*W)'($signed(d[i])) <<< FRAC);
    if (den == 0) quo = '0;
    else          quo = num / den;
    if (i == int'(p)) return quo[W-1:0] - W'(1 << FRAC);
    else              return quo[W-1:0];
  endfunction

  always_comb begin
    int ii, jj;
    for (int k = 0; k < L1; k++) begin
      top[k] = '0;
      if (state == S_RUN && band_ij(int'(t), k, M, M, ii, jj))
        top[k] = binv[ii][jj];
    end
    el[L1] = '0;
    if (state == S_RUN && t[0] == 1'b0 && int'(t) < 2*M)
      el[L1] = eta_of(int'(t) / 2);
    pr[0] = '0;
    if (state == S_RUN && t[0] == 1'b0 && int'(t) < 2*M)
      pr[0] = binv[p][t >> 1];
    // b update cell, one row per cycle
    bc_eta = '0;
    bc_bi  = '0;
    bc_bp  = '0;
    if (state == S_RUN && int'(t) < M) begin
      bc_eta = eta_of(int'(t));
      bc_bi  = b[t];
      bc_bp  = b[p];
    end
  end

  for (genvar k = 0; k < L1; k++) begin : g_s8
    cell3 #(.W(W), .FRAC(FRAC)) u_cell (
      .clk, .rst_n,
      .in_1(el[k+1]), .in_2(pr[k]), .in_3(top[k]),
      .out_1(el[k]), .out_2(pr[k+1]), .out_3(bot[k])
    );
  end

  cell3 #(.W(W), .FRAC(FRAC)) u_bcell (
    .clk, .rst_n,
    .in_1(bc_eta), .in_2(bc_bp), .in_3(bc_bi),
    .out_1(bc_o1), .out_2(bc_o2), .out_3(bc_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      t       <= '0;
      done    <= 1'b0;
      binv_n  <= '0;
      b_n     <= '0;
      cb_n    <= '0;
      basis_n <= '0;
    end else begin
      case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            state   <= S_RUN;
            t       <= '0;
            done    <= 1'b0;
            cb_n    <= cb;
            basis_n <= basis;
          end
        end
        S_RUN: begin
          // element (i,j) presented in cycle t-1 leaves cell i-j+M-1 now
          for (int k = 0; k < L1; k++) begin
            int ii, jj;
            if (t != 0 && band_ij(int'(t) - 1, k, M, M, ii, jj))
              binv_n[ii][jj] <= bot[k];
          end
          if (t != 0 && int'(t) <= M)
            b_n[t - 1] <= bc_out;
          if (int'(t) == T8_END) begin
            state       <= S_DONE;
            done        <= 1'b1;
            cb_n[p]     <= c_q;
            basis_n[p]  <= q;
          end else begin
            t <= t + 16'd1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state == S_RUN);
endmodule
