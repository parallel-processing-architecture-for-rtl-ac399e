// module0: pricing - steps 1, 2 and 3 of the revised simplex method.
//
//   step 1  w^T = cb^T B^-1          array of 2M-1 unified cells (ctrl = 0)
//           w is negated on its way to step 2
//   step 2  r = c - (w^T A)^T        array of M+N-1 mac cells (cell 1)
//   step 3  q = index of a negative r_j; none negative -> OPTIMAL
//
// Both arrays are band matrix-vector arrays: the matrix element (i,j) enters
// cell i-j+C-1 from the top in cycle i+j+C-1 (see lp_pkg::band_ij); the
// multiplier vector enters the right end one element every second cycle
// (cb_i in cycle 2i, -w_i in cycle 2i+N-M), and the partial sums enter the
// left end every second cycle (zeros for step 1, c_j in cycle 2j for step 2).
// Result j leaves the right end in cycle 2j + (number of cells). The two
// arrays run one after the other: step 1 takes 4M-1 cycles, step 2 takes
// 2N+M+N-2 cycles, then done is raised.
//
// Step 3 watches r as it leaves the array. `pick` selects which negative
// entry becomes q: pick = k takes the k-th negative entry (counting from 0),
// or the first one when there are fewer; this lets the three controllers
// start from different entering variables. With pick = 0 the first negative
// r_j is taken, which is the choice made in the worked example.
//
// Interface: pulse `start` for one cycle with the operands stable until
// `done`; `done` stays high until the next start, results are held.
//
// The split into steps 1-3, the cell types and the array sizes 2M-1 (step 1)
// and M+N-1 (step 2) follow the design; its published cell count for step 2
// (N-1) is too small for a band array of an M x N matrix. The cycle-level
// schedule, the pick input and the asynchronous reset are choices of this
// implementation.
module module0 #(
  parameter int unsigned M    = 3,
  parameter int unsigned N    = 9,
  parameter int unsigned W    = 8,
  parameter int unsigned FRAC = 0,
  parameter int unsigned IW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            start,
  input  logic [1:0]                      pick,
  input  logic [M-1:0][M-1:0][W-1:0]      binv,    // B^-1 (row, column)
  input  logic [M-1:0][W-1:0]             cb,      // basic costs
  input  logic [M-1:0][N-1:0][W-1:0]      a_mat,   // constraint matrix A
  input  logic [N-1:0][W-1:0]             c_vec,   // cost vector c
  output logic                            busy,
  output logic                            done,
  output logic                            optimal, // no r_j < 0
  output logic [IW-1:0]                   q,       // entering column
  output logic [M-1:0][W-1:0]             w,       // pricing vector
  output logic [N-1:0][W-1:0]             r        // reduced costs
);
  import lp_pkg::*;

  localparam int L1 = 2*M - 1;
  localparam int L2 = M + N - 1;
  localparam int T1_END = 2*(M-1) + L1;   // cycle of the last w_j
  localparam int T2_END = 2*(N-1) + L2;   // cycle of the last r_j

  typedef enum logic [1:0] {S_IDLE, S_STEP1, S_STEP2, S_DONE} state_t;
  state_t state;
  logic [15:0] t;

  // step 1 array wiring
  logic signed [W-1:0] s1_a   [L1];
  logic signed [W-1:0] s1_x   [L1+1];  // s1_x[k] enters cell k from the right
  logic signed [W-1:0] s1_y   [L1+1];  // s1_y[k] enters cell k from the left
  logic signed [W-1:0] s1_xr  [L1];    // unused A_q line
  logic signed [W-1:0] s1_dl  [L1];    // unused d line
  // step 2 array wiring
  logic signed [W-1:0] s2_a   [L2];
  logic signed [W-1:0] s2_x   [L2+1];
  logic signed [W-1:0] s2_y   [L2+1];

  logic [1:0]    neg_cnt;
  logic          have_first, have_pick;
  logic [IW-1:0] q_first, q_pick;

  // ---------------------------------------------------------------- feeders
  always_comb begin
    int ii, jj;
    for (int k = 0; k < L1; k++) begin
      s1_a[k] = '0;
      if (state == S_STEP1 && band_ij(int'(t), k, M, M, ii, jj))
        s1_a[k] = binv[ii][jj];
    end
    s1_x[L1] = '0;
    if (state == S_STEP1 && t[0] == 1'b0 && int'(t) < 2*M)
      s1_x[L1] = cb[t >> 1];
    s1_y[0] = '0;                              // zero vector

    for (int k = 0; k < L2; k++) begin
      s2_a[k] = '0;
      if (state == S_STEP2 && band_ij(int'(t), k, M, N, ii, jj))
        s2_a[k] = a_mat[ii][jj];
    end
    s2_x[L2] = '0;
    if (state == S_STEP2 && int'(t) >= int'(N - M) && ((int'(t) - int'(N - M)) % 2) == 0
        && (int'(t) - int'(N - M)) < 2*M)
      s2_x[L2] = -$signed(w[(int'(t) - int'(N - M)) / 2]);   // -w
    s2_y[0] = '0;
    if (state == S_STEP2 && t[0] == 1'b0 && int'(t) < 2*N)
      s2_y[0] = c_vec[t >> 1];
  end

  // ------------------------------------------------------------ the arrays
  for (genvar k = 0; k < L1; k++) begin : g_s1
    unified_cell #(.W(W), .FRAC(FRAC)) u_cell (
      .clk, .rst_n, .ctrl(1'b0),
      .in_3(s1_a[k]), .in_1_1(s1_x[k+1]), .in_1_2('0),
      .in_2_1(s1_y[k]), .in_2_2('0),
      .out_1_1(s1_x[k]), .out_1_2(s1_xr[k]),
      .out_2_1(s1_y[k+1]), .out_2_2(s1_dl[k])
    );
  end

  for (genvar k = 0; k < L2; k++) begin : g_s2
    mac_cell #(.W(W), .FRAC(FRAC)) u_cell (
      .clk, .rst_n,
      .a_in(s2_a[k]), .x_in(s2_x[k+1]), .y_in(s2_y[k]),
      .x_out(s2_x[k]), .y_out(s2_y[k+1])
    );
  end

  // ------------------------------------------------ sequencing and step 3
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      t          <= '0;
      done       <= 1'b0;
      w          <= '0;
      r          <= '0;
      neg_cnt    <= '0;
      have_first <= 1'b0;
      have_pick  <= 1'b0;
      q_first    <= '0;
      q_pick     <= '0;
    end else begin
      case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            state      <= S_STEP1;
            t          <= '0;
            done       <= 1'b0;
            neg_cnt    <= '0;
            have_first <= 1'b0;
            have_pick  <= 1'b0;
          end
        end
        S_STEP1: begin
          // w_j leaves the right end in cycle 2j + L1
          if (int'(t) >= L1 && ((int'(t) - L1) % 2) == 0)
            w[(int'(t) - L1) / 2] <= s1_y[L1];
          if (int'(t) == T1_END) begin
            state <= S_STEP2;
            t     <= '0;
          end else begin
            t <= t + 16'd1;
          end
        end
        S_STEP2: begin
          if (int'(t) >= L2 && ((int'(t) - L2) % 2) == 0) begin
            r[(int'(t) - L2) / 2] <= s2_y[L2];
            if (s2_y[L2][W-1]) begin                 // r_j < 0
              if (!have_first) begin
                have_first <= 1'b1;
                q_first    <= IW'((int'(t) - L2) / 2);
              end
              if (!have_pick && neg_cnt == pick) begin
                have_pick <= 1'b1;
                q_pick    <= IW'((int'(t) - L2) / 2);
              end
              if (neg_cnt != 2'd3) neg_cnt <= neg_cnt + 2'd1;
            end
          end
          if (int'(t) == T2_END) begin
            state <= S_DONE;
            t     <= '0;
          end else begin
            t <= t + 16'd1;
          end
        end
        default: state <= S_IDLE;
      endcase

      // Results of step 3, one cycle after the last r_j was seen
      if (state == S_STEP2 && int'(t) == T2_END) begin
        done <= 1'b1;
      end
    end
  end

  // q and the OPTIMAL flag settle once the last r_j has been examined; they
  // are produced combinationally from the held step-3 bookkeeping.
  always_comb begin
    optimal = !have_first;
    q       = have_pick ? q_pick : q_first;
  end

  assign busy = (state == S_STEP1) || (state == S_STEP2);
endmodule
