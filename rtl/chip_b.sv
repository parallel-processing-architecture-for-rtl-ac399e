// chip_b: sequencer and scalar logic of the multi-chip engine.
//
// Chip B sits between the chain of chip As (B^-1 arrays) and the chain of
// chip Cs (step-2 array). It keeps A, b, cb and c in its local memory and
// runs one simplex path, one iteration after the other:
//   step 1  chip As in mode 00: cb goes out on the far-end bus, zeros enter
//           the near end, w comes back on the return bus
//   step 2  chip Cs: c enters the near end, -w goes out on the far-end bus,
//           r comes back on the return bus
//   step 3  the first r_j < 0 becomes q; none negative -> END (optimal)
//   step 4  chip As in mode 01: A_q enters the near end, zeros go out on the
//           far-end bus, d leaves the near end
//   step 5/6 no d_i > 0 -> UNBOUNDED; otherwise p maximises d_i / b_i
//           (compared by cross-multiplication)
//           the pivot row (B^-1)_p is read from the chip As, one word a cycle
//   step 7  eta*_i = -d_i / d_p (i != p), eta*_p = 1 / d_p - 1
//   step 8  chip As in mode 1x: eta* goes out on the far-end bus, (B^-1)_p
//           enters the near end, the chips update B^-1 in place; a cell 3
//           here updates b, and cb_p <- c_q
// The host writes A, b and c through mem_* while idle (A is copied into the
// chip Cs through their load port as it is written); start sets B^-1 = I in
// the chip As through their load port and takes the last M columns as the
// starting basis.
//
// Timing: a chain of P cells whose band starts OFF cells from chip B runs
// every step with a delay of P cycles: elements with i + j = s are due in
// cycle s + P + (C-1) (C: columns of the matrix, the broadcast `sweep` is
// this s), a stream entering the near end at 2k + P - OFF, a stream
// entering the far end at 2k + OFF + L (L = band length) and a stream
// returning from the far end at 2k + 2P - OFF.
//
// Follows the document: the split of the steps over the chips, Ctrl1/Ctrl2,
// UNBOUNDED and END outputs, the cell 3 for b and the cb update. Own
// choices: the sequencing, the bus protocol, reading the pivot row over a
// read chain, the first negative r_j as q, and a single starting point.
module chip_b #(
  parameter int unsigned M    = 3,
  parameter int unsigned N    = 9,
  parameter int unsigned W    = 8,
  parameter int unsigned FRAC = 0,
  parameter int unsigned PA   = 5,    // cells in the chip-A chain
  parameter int unsigned OFFA = 0,    // first band cell of that chain
  parameter int unsigned PC   = 22,   // cells in the chip-C chain
  parameter int unsigned OFFC = 8,
  parameter int unsigned IW   = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned PW   = (M > 1) ? $clog2(M) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // host side
  input  logic                   mem_we,
  input  logic [1:0]             mem_sel,
  input  logic [PW-1:0]          mem_row,
  input  logic [IW-1:0]          mem_col,
  input  logic [W-1:0]           mem_wdata,
  input  logic                   start,
  output logic                   busy,
  output logic                   done,
  output logic                   end_opt,    // END: optimal solution found
  output logic                   unbounded,  // UNBOUNDED
  output logic [M-1:0][IW-1:0]   x_col,
  output logic [M-1:0][W-1:0]    x_val,
  output logic [W-1:0]           objective,
  output logic [7:0]             pivots,
  output logic [3:0]             step,       // step being executed (0 idle)
  // chip-A chain
  output logic                   ctrl1,
  output logic                   ctrl2,
  output logic signed [15:0]     sweep_a,
  output logic                   lda_we,
  output logic [PW-1:0]          lda_i,
  output logic [PW-1:0]          lda_j,
  output logic [W-1:0]           lda_data,
  output logic [PW-1:0]          rd_i,
  output logic [PW-1:0]          rd_j,
  input  logic [W-1:0]           rd_data,
  output logic [W-1:0]           a_w_out,    // w partial sums (zero)
  output logic [W-1:0]           a_aq_out,   // A_q
  input  logic [W-1:0]           a_d_in,     // d
  output logic [W-1:0]           a_bp_out,   // (B^-1)_p
  output logic [W-1:0]           a_fwd,      // cb / zero / eta*
  input  logic [W-1:0]           a_ret,      // w
  // chip-C chain
  output logic signed [15:0]     sweep_c,
  output logic                   ldc_we,
  output logic [PW-1:0]          ldc_i,
  output logic [IW-1:0]          ldc_j,
  output logic [W-1:0]           ldc_data,
  output logic [W-1:0]           c_c_out,    // c
  output logic [W-1:0]           c_fwd,      // -w
  input  logic [W-1:0]           c_ret       // r
);
  localparam int LA = 2*M - 1;
  localparam int LC = M + N - 1;
  localparam int T1_END = 2*(M-1) + 2*PA - OFFA;
  localparam int T2_END = 2*(N-1) + 2*PC - OFFC;
  localparam int T4_END = 2*(M-1) + LA + PA + OFFA;
  localparam int T8_END = 3*M - 2 + PA;

  typedef enum logic [3:0] {
    S_IDLE, S_INIT, S_STEP1, S_STEP2, S_STEP4, S_STEP6, S_RDP, S_STEP8, S_DONE
  } state_t;
  state_t state;

  logic [15:0] t;

  // local memory
  logic [M-1:0][N-1:0][W-1:0] a_mat;
  logic [M-1:0][W-1:0]        b0, b, cb, w, d, bp;
  logic [N-1:0][W-1:0]        c_vec;
  logic [M-1:0][IW-1:0]       basis;
  logic [IW-1:0]              q;
  logic [PW-1:0]              p, row;
  logic                       have_q, have_p;
  logic signed [W-1:0]        d_best, b_best, d_row, b_row, b_piv;
  logic signed [2*W-1:0]      lhs, rhs;
  logic signed [W-1:0]        bc_eta, bc_bi, bc_bp, bc_out, bc_o1, bc_o2;

  // step 7: eta* of row i
  function automatic logic signed [W-1:0] eta_of(input int i);
    logic signed [2*W-1:0] num, den, quo;
    den = (2*W)'($signed(d[p]));
    if (i == int'(p)) num = (2*W)'(1) <<< (2*FRAC);
    else              num = -((2*W)'($signed(d[i])) <<< FRAC);
    if (den == 0) quo = '0;
    else          quo = num / den;
    if (i == int'(p)) return quo[W-1:0] - W'(1 << FRAC);
    else              return quo[W-1:0];
  endfunction

  // index k when cycle tt carries element k of a stream that starts at t0
  // and moves one element every second cycle
  function automatic bit slot(input int tt, input int t0, input int len, output int k);
    k = 0;
    if (tt < t0 || ((tt - t0) & 1) != 0) return 1'b0;
    k = (tt - t0) / 2;
    return k < len;
  endfunction

  // ----------------------------------------------------------- data paths
  always_comb begin
    int k;
    k        = 0;
    ctrl1    = (state == S_STEP8);
    ctrl2    = (state == S_STEP4);
    sweep_a  = (state == S_STEP1 || state == S_STEP4 || state == S_STEP8)
               ? 16'(int'(t) - int'(PA) - int'(M - 1)) : -16'sd1;
    sweep_c  = (state == S_STEP2) ? 16'(int'(t) - int'(PC) - int'(N - 1)) : -16'sd1;
    a_w_out  = '0;
    a_aq_out = '0;
    a_bp_out = '0;
    a_fwd    = '0;
    c_c_out  = '0;
    c_fwd    = '0;
    case (state)
      S_STEP1: if (slot(int'(t), OFFA + LA, M, k)) a_fwd = cb[k];
      S_STEP2: begin
        if (slot(int'(t), PC - OFFC, N, k)) c_c_out = c_vec[k];
        if (slot(int'(t), int'(N - M) + OFFC + LC, M, k)) c_fwd = -$signed(w[k]);
      end
      S_STEP4: if (slot(int'(t), PA - OFFA, M, k)) a_aq_out = a_mat[k][q];
      S_STEP8: begin
        if (slot(int'(t), PA - OFFA, M, k)) a_bp_out = bp[k];
        if (slot(int'(t), OFFA + LA, M, k)) a_fwd = eta_of(k);
      end
      default: ;
    endcase

    // chip-A load port: identity during S_INIT
    lda_we   = (state == S_INIT);
    lda_i    = PW'(int'(t) / int'(M));
    lda_j    = PW'(int'(t) % int'(M));
    lda_data = (lda_i == lda_j) ? W'(1 << FRAC) : '0;
    // chip-C load port: copy of the host's writes of A
    ldc_we   = mem_we && mem_sel == 2'd0 && !busy;
    ldc_i    = mem_row;
    ldc_j    = mem_col;
    ldc_data = mem_wdata;
    // pivot row read
    rd_i     = p;
    rd_j     = row;

    // step 5/6 comparison for the row under examination
    d_row = d[row];
    b_row = b[row];
    lhs   = (2*W)'(d_row) * (2*W)'(b_best);
    rhs   = (2*W)'(d_best) * (2*W)'(b_row);

    // b update cell, one row per cycle
    bc_eta = '0;
    bc_bi  = '0;
    bc_bp  = '0;
    if (state == S_STEP8 && int'(t) < M) begin
      bc_eta = eta_of(int'(t));
      bc_bi  = b[t];
      bc_bp  = b_piv;
    end
  end

  cell3 #(.W(W), .FRAC(FRAC)) u_bcell (
    .clk, .rst_n,
    .in_1(bc_eta), .in_2(bc_bp), .in_3(bc_bi),
    .out_1(bc_o1), .out_2(bc_o2), .out_3(bc_out)
  );

  // ----------------------------------------------------------- sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      t         <= '0;
      a_mat     <= '0;
      b0        <= '0;
      b         <= '0;
      cb        <= '0;
      c_vec     <= '0;
      w         <= '0;
      d         <= '0;
      bp        <= '0;
      basis     <= '0;
      q         <= '0;
      p         <= '0;
      row       <= '0;
      have_q    <= 1'b0;
      have_p    <= 1'b0;
      d_best    <= '0;
      b_best    <= '0;
      b_piv     <= '0;
      done      <= 1'b0;
      end_opt   <= 1'b0;
      unbounded <= 1'b0;
      pivots    <= '0;
    end else begin
      if (mem_we && !busy) begin
        case (mem_sel)
          2'd0: if (int'(mem_row) < M && int'(mem_col) < N) a_mat[mem_row][mem_col] <= mem_wdata;
          2'd1: if (int'(mem_row) < M) b0[mem_row] <= mem_wdata;
          2'd2: if (int'(mem_col) < N) c_vec[mem_col] <= mem_wdata;
          default: ;
        endcase
      end
      case (state)
        S_IDLE, S_DONE: if (start) begin
          state     <= S_INIT;
          t         <= '0;
          done      <= 1'b0;
          end_opt   <= 1'b0;
          unbounded <= 1'b0;
          pivots    <= '0;
          b         <= b0;
          for (int i = 0; i < M; i++) begin
            cb[i]    <= c_vec[N - M + i];
            basis[i] <= IW'(N - M + i);
          end
        end
        S_INIT: begin
          if (int'(t) == M*M - 1) begin
            state <= S_STEP1;
            t     <= '0;
          end else t <= t + 16'd1;
        end
        S_STEP1: begin
          int k;
          if (slot(int'(t), 2*PA - OFFA, M, k)) w[k] <= a_ret;
          if (int'(t) == T1_END) begin
            state  <= S_STEP2;
            t      <= '0;
            have_q <= 1'b0;
          end else t <= t + 16'd1;
        end
        S_STEP2: begin
          int k;
          if (slot(int'(t), 2*PC - OFFC, N, k) && $signed(c_ret) < 0 && !have_q) begin
            have_q <= 1'b1;
            q      <= IW'(k);
          end
          if (int'(t) == T2_END) begin
            t <= '0;
            if (!have_q && !(slot(int'(t), 2*PC - OFFC, N, k) && $signed(c_ret) < 0)) begin
              end_opt <= 1'b1;
              done    <= 1'b1;
              state   <= S_DONE;
            end else state <= S_STEP4;
          end else t <= t + 16'd1;
        end
        S_STEP4: begin
          int k;
          if (slot(int'(t), LA + PA + OFFA, M, k)) d[k] <= a_d_in;
          if (int'(t) == T4_END) begin
            state  <= S_STEP6;
            t      <= '0;
            row    <= '0;
            have_p <= 1'b0;
          end else t <= t + 16'd1;
        end
        S_STEP6: begin
          if (d_row > 0 && (!have_p || lhs > rhs)) begin
            have_p <= 1'b1;
            p      <= row;
            d_best <= d_row;
            b_best <= b_row;
          end
          if (int'(row) == M - 1) begin
            row <= '0;
            if (!(have_p || d_row > 0)) begin
              unbounded <= 1'b1;
              done      <= 1'b1;
              state     <= S_DONE;
            end else state <= S_RDP;
          end else row <= row + 1'b1;
        end
        S_RDP: begin
          bp[row] <= rd_data;
          if (int'(row) == M - 1) begin
            state <= S_STEP8;
            t     <= '0;
            b_piv <= b[p];
          end else row <= row + 1'b1;
        end
        S_STEP8: begin
          if (t != 0 && int'(t) <= M) b[t - 1] <= bc_out;
          if (int'(t) == T8_END) begin
            cb[p]    <= c_vec[q];
            basis[p] <= q;
            pivots   <= pivots + 8'd1;
            state    <= S_STEP1;
            t        <= '0;
          end else t <= t + 16'd1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE) && (state != S_DONE);

  always_comb begin
    logic signed [2*W-1:0] acc, prod;
    acc = '0;
    for (int i = 0; i < M; i++) begin
      prod = (2*W)'($signed(cb[i])) * (2*W)'($signed(b[i]));
      acc  = acc + (prod >>> FRAC);
    end
    objective = acc[W-1:0];
    x_col     = basis;
    x_val     = b;
    case (state)
      S_STEP1: step = 4'd1;
      S_STEP2: step = 4'd2;
      S_STEP4: step = 4'd4;
      S_STEP6: step = 4'd6;
      S_RDP:   step = 4'd7;
      S_STEP8: step = 4'd8;
      default: step = 4'd0;
    endcase
  end
endmodule
