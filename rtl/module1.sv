// module1: entering column and ratio test - steps 4, 5 and 6.
//
//   step 4  d = B^-1 A_q       array of 2M-1 unified cells (ctrl = 1, cell 2)
//   step 5  no d_i > 0         -> UNBOUNDED
//   step 6  p = argmin { b_i / d_i : d_i > 0 }
//
// The step-4 array is the mirror image of the step-1 array: A_q enters the
// left end (element j in cycle 2j), zeros enter the right end as the initial
// partial sums, and d_i leaves the left end in cycle 2i + 2M-1. B^-1 is fed
// exactly as for step 1 (element (i,j) into cell i-j+M-1 in cycle i+j+M-1),
// which is why one unified cell serves both steps.
//
// Step 6 looks for the largest d_i / b_i among d_i > 0 rather than the
// smallest b_i / d_i, which needs no "infinite" start value: a running best
// starts at "none", and a candidate replaces it when d_i * b_best >
// d_best * b_i. The comparison is done by cross-multiplying at double width
// instead of dividing; that exact comparison is a choice of this
// implementation. Ties keep the lower row. One row is examined per clock
// after the array has finished; done rises after the last row.
//
// Interface: pulse `start` with operands stable until `done`; results held.
module module1 #(
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
  input  logic [M-1:0][N-1:0][W-1:0] a_mat,
  input  logic [M-1:0][W-1:0]        b,
  input  logic [IW-1:0]              q,
  output logic                       busy,
  output logic                       done,
  output logic                       unbounded,
  output logic [PW-1:0]              p,
  output logic [M-1:0][W-1:0]        d
);
  import lp_pkg::*;

  localparam int L1     = 2*M - 1;
  localparam int T4_END = 2*(M-1) + L1;

  typedef enum logic [1:0] {S_IDLE, S_STEP4, S_STEP6, S_DONE} state_t;
  state_t state;
  logic [15:0] t;

  logic signed [W-1:0] a_top [L1];
  logic signed [W-1:0] xr    [L1+1];   // A_q line, xr[k] enters cell k from the left
  logic signed [W-1:0] yl    [L1+1];   // d line, yl[k+1] enters cell k from the right
  logic signed [W-1:0] cbl   [L1];     // unused cb line
  logic signed [W-1:0] wr    [L1];     // unused w line

  logic                  have;
  logic [PW-1:0]         row;
  logic signed [W-1:0]   d_best, b_best, d_row, b_row;
  logic signed [2*W-1:0] lhs, rhs;

  always_comb begin
    int ii, jj;
    for (int k = 0; k < L1; k++) begin
      a_top[k] = '0;
      if (state == S_STEP4 && band_ij(int'(t), k, M, M, ii, jj))
        a_top[k] = binv[ii][jj];
    end
    xr[0] = '0;
    if (state == S_STEP4 && t[0] == 1'b0 && int'(t) < 2*M)
      xr[0] = a_mat[t >> 1][q];
    yl[L1] = '0;                                 // zero vector
  end

  for (genvar k = 0; k < L1; k++) begin : g_s4
    unified_cell #(.W(W), .FRAC(FRAC)) u_cell (
      .clk, .rst_n, .ctrl(1'b1),
      .in_3(a_top[k]), .in_1_1('0), .in_1_2(xr[k]),
      .in_2_1('0), .in_2_2(yl[k+1]),
      .out_1_1(cbl[k]), .out_1_2(xr[k+1]),
      .out_2_1(wr[k]), .out_2_2(yl[k])
    );
  end

  // step 5/6 comparison for the row under examination
  always_comb begin
    d_row = d[row];
    b_row = b[row];
    lhs   = (2*W)'(d_row) * (2*W)'(b_best);
    rhs   = (2*W)'(d_best) * (2*W)'(b_row);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      t         <= '0;
      done      <= 1'b0;
      unbounded <= 1'b0;
      p         <= '0;
      d         <= '0;
      have      <= 1'b0;
      row       <= '0;
      d_best    <= '0;
      b_best    <= '0;
    end else begin
      case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            state <= S_STEP4;
            t     <= '0;
            done  <= 1'b0;
          end
        end
        S_STEP4: begin
          if (int'(t) >= L1 && ((int'(t) - L1) % 2) == 0)
            d[(int'(t) - L1) / 2] <= yl[0];
          if (int'(t) == T4_END) begin
            state <= S_STEP6;
            row   <= '0;
            have  <= 1'b0;
          end else begin
            t <= t + 16'd1;
          end
        end
        S_STEP6: begin
          if (d_row > 0 && (!have || lhs > rhs)) begin
            have   <= 1'b1;
            p      <= row;
            d_best <= d_row;
            b_best <= b_row;
          end
          if (int'(row) == M - 1) begin
            state     <= S_DONE;
            done      <= 1'b1;
            unbounded <= !(have || d_row > 0);
          end else begin
            row <= row + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state == S_STEP4) || (state == S_STEP6);
endmodule
