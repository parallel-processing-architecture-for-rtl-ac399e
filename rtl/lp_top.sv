// lp_top: systolic revised-simplex engine with three starting points.
//
// Solves   minimise c^T x   subject to   A x = b0, x >= 0
// for an M x N problem in standard form whose last M columns are an identity
// (slack) block, so that B = I is a feasible starting basis.
//
// One simplex iteration is split over three hardware modules:
//   module0  steps 1-3: w = cb^T B^-1, r = c - (w^T A)^T, pick q or OPTIMAL
//   module1  steps 4-6: d = B^-1 A_q, UNBOUNDED test, ratio test -> p
//   module2  steps 7-8: eta*, B^-1 and b update, cb_p <- c_q
// Three controllers each hold one simplex path (one starting point) and a
// switching network with three patterns connects module j to controller
// (j - s) mod 3 during pipeline slot s. After every slot the pattern advances,
// so the three modules work concurrently on three different paths, each path
// visiting module 0, 1, 2, 0, ... A controller joins the pipeline the first
// time it is connected to module 0 (slots 0, 1, 2 start controllers 0, 2, 1),
// and on that first pricing it takes the 0th, 1st or 2nd negative reduced
// cost, so the paths leave the starting vertex along different edges.
//
// A slot begins by starting every module whose controller is running, waits
// until all of them are done (module 0 is the slowest), writes each result
// back through the network in one cycle and then checks the controllers. The
// run ends as soon as one controller reaches OPTIMAL (its solution is
// reported; the lowest-numbered one wins a tie) or one finds the problem
// UNBOUNDED.
//
// Host interface: with the engine idle, write A, b0 and c through mem_* (sel
// 0 = A(row,col), 1 = b0(row), 2 = c(col)), then pulse start. busy is high
// during the run; done rises at the end and holds the result (optimal or
// unbounded, the winning controller, the basic columns x_col with values
// x_val, the objective c^T x, the winner's pivot count and the number of
// slots) until the next start.
//
// Beside it sits the multi-chip form of the same method (lp_chipset: chip
// As, one chip B and chip Cs, S and Q cells per chip), which follows a single
// starting point. It shares the problem load port, so one write sequence
// loads both; it has its own start (cs_start) and result (cs_*) signals.
//
// Numbers are W-bit two's complement with FRAC fraction bits (W = 8,
// FRAC = 0 gives the 8-bit integer format of the cell specification).
//
// Follows the design: the three modules, three controllers, the switching
// network with its three patterns, the order in which controllers join the
// pipeline and the end on OPTIMAL. Choices of this implementation: the slot
// handshake (start all, wait for all, write back in one cycle), the
// tie-break between controllers, the result ports and the host load port.
module lp_top #(
  parameter int unsigned M    = 3,
  parameter int unsigned N    = 9,
  parameter int unsigned W    = 8,
  parameter int unsigned FRAC = 0,
  parameter int unsigned S    = 5,    // cells of each kind per chip A
  parameter int unsigned Q    = 11,   // cell 1s per chip C
  parameter int unsigned IW   = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned PW   = (M > 1) ? $clog2(M) : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // problem loading
  input  logic                   mem_we,
  input  logic [1:0]             mem_sel,
  input  logic [PW-1:0]          mem_row,
  input  logic [IW-1:0]          mem_col,
  input  logic [W-1:0]           mem_wdata,
  // run control and result
  input  logic                   start,
  output logic                   busy,
  output logic                   done,
  output logic                   optimal,
  output logic                   unbounded,
  output logic [1:0]             winner,
  output logic [M-1:0][IW-1:0]   x_col,
  output logic [M-1:0][W-1:0]    x_val,
  output logic [W-1:0]           objective,
  output logic [7:0]             pivots,
  output logic [15:0]            slots,
  // observation of the pipeline
  output logic [1:0]             pattern,
  output logic [2:0]             mod_busy,
  // multi-chip engine: same problem load port, own start and result
  input  logic                   cs_start,
  output logic                   cs_busy,
  output logic                   cs_done,
  output logic                   cs_end,
  output logic                   cs_unbounded,
  output logic [M-1:0][IW-1:0]   cs_x_col,
  output logic [M-1:0][W-1:0]    cs_x_val,
  output logic [W-1:0]           cs_objective,
  output logic [7:0]             cs_pivots,
  output logic [3:0]             cs_step
);
  localparam int unsigned DW = M*M*W + 3*M*W + M*IW + IW + PW + 2;
  localparam int unsigned UW = M*M*W + 2*M*W + M*IW;

  typedef enum logic [2:0] {S_IDLE, S_INIT, S_START, S_WAIT, S_WRITE, S_CHECK, S_DONE} state_t;
  state_t state;

  // ------------------------------------------------------------ main memory
  logic [M-1:0][N-1:0][W-1:0] a_mat;
  logic [M-1:0][W-1:0]        b0;
  logic [N-1:0][W-1:0]        c_vec;

  main_memory #(.M(M), .N(N), .W(W), .IW(IW), .PW(PW)) u_mem (
    .clk, .rst_n, .we(mem_we && !busy), .sel(mem_sel), .row(mem_row),
    .col(mem_col), .wdata(mem_wdata), .a_mat, .b0, .c_vec
  );

  // ------------------------------------------------------------ controllers
  logic [2:0][M-1:0][M-1:0][W-1:0] c_binv;
  logic [2:0][M-1:0][W-1:0]        c_b, c_cb, c_d;
  logic [2:0][M-1:0][IW-1:0]       c_basis;
  logic [2:0][IW-1:0]              c_q;
  logic [2:0][PW-1:0]              c_p;
  logic [2:0][1:0]                 c_pick;
  logic [2:0]                      c_active, c_opt, c_unb;
  logic [2:0][7:0]                 c_iters;
  logic [2:0]                      c_activate;
  logic                            c_init;

  logic [2:0][DW-1:0] ctrl_down, mod_down;
  logic [2:0][UW-1:0] mod_up, ctrl_up;
  logic [2:0]         mod_up_v, ctrl_up_v;
  logic [2:0][1:0]    ctrl_up_src;

  for (genvar k = 0; k < 3; k++) begin : g_ctrl
    controller #(.K(k), .M(M), .N(N), .W(W), .FRAC(FRAC), .IW(IW), .PW(PW), .UW(UW)) u_ctrl (
      .clk, .rst_n, .init(c_init), .activate(c_activate[k]),
      .b0, .c_vec,
      .up(ctrl_up[k]), .up_v(ctrl_up_v[k]), .up_src(ctrl_up_src[k]),
      .binv(c_binv[k]), .b(c_b[k]), .cb(c_cb[k]), .basis(c_basis[k]),
      .d(c_d[k]), .q(c_q[k]), .p(c_p[k]), .pick(c_pick[k]),
      .active(c_active[k]), .optimal(c_opt[k]), .unbounded(c_unb[k]),
      .iters(c_iters[k])
    );
    assign ctrl_down[k] = {c_binv[k], c_b[k], c_cb[k], c_basis[k], c_q[k], c_p[k], c_d[k], c_pick[k]};
  end

  // ------------------------------------------------------ switching network
  switch_net #(.DW(DW), .UW(UW)) u_switch (
    .pattern, .ctrl_down, .mod_down, .mod_up, .mod_up_v,
    .ctrl_up, .ctrl_up_v, .ctrl_up_src
  );

  // state words as seen by the three modules
  logic [2:0][M-1:0][M-1:0][W-1:0] m_binv;
  logic [2:0][M-1:0][W-1:0]        m_b, m_cb, m_d;
  logic [2:0][M-1:0][IW-1:0]       m_basis;
  logic [2:0][IW-1:0]              m_q;
  logic [2:0][PW-1:0]              m_p;
  logic [2:0][1:0]                 m_pick;
  for (genvar j = 0; j < 3; j++) begin : g_unpack
    assign {m_binv[j], m_b[j], m_cb[j], m_basis[j], m_q[j], m_p[j], m_d[j], m_pick[j]} = mod_down[j];
  end

  // ---------------------------------------------------------------- modules
  logic [2:0] m_start, m_done, started;

  logic                       m0_opt;
  logic [IW-1:0]              m0_q;
  logic [M-1:0][W-1:0]        m0_w;
  logic [N-1:0][W-1:0]        m0_r;
  module0 #(.M(M), .N(N), .W(W), .FRAC(FRAC), .IW(IW)) u_mod0 (
    .clk, .rst_n, .start(m_start[0]), .pick(m_pick[0]),
    .binv(m_binv[0]), .cb(m_cb[0]), .a_mat, .c_vec,
    .busy(mod_busy[0]), .done(m_done[0]), .optimal(m0_opt), .q(m0_q),
    .w(m0_w), .r(m0_r)
  );

  logic                       m1_unb;
  logic [PW-1:0]              m1_p;
  logic [M-1:0][W-1:0]        m1_d;
  module1 #(.M(M), .N(N), .W(W), .FRAC(FRAC), .IW(IW), .PW(PW)) u_mod1 (
    .clk, .rst_n, .start(m_start[1]),
    .binv(m_binv[1]), .a_mat, .b(m_b[1]), .q(m_q[1]),
    .busy(mod_busy[1]), .done(m_done[1]), .unbounded(m1_unb), .p(m1_p), .d(m1_d)
  );

  logic [M-1:0][M-1:0][W-1:0] m2_binv;
  logic [M-1:0][W-1:0]        m2_b, m2_cb;
  logic [M-1:0][IW-1:0]       m2_basis;
  module2 #(.M(M), .N(N), .W(W), .FRAC(FRAC), .IW(IW), .PW(PW)) u_mod2 (
    .clk, .rst_n, .start(m_start[2]),
    .binv(m_binv[2]), .b(m_b[2]), .cb(m_cb[2]), .basis(m_basis[2]),
    .d(m_d[2]), .p(m_p[2]), .q(m_q[2]), .c_q(c_vec[m_q[2]]),
    .busy(mod_busy[2]), .done(m_done[2]),
    .binv_n(m2_binv), .b_n(m2_b), .cb_n(m2_cb), .basis_n(m2_basis)
  );

  assign mod_up[0] = UW'({m0_opt, m0_q});
  assign mod_up[1] = UW'({m1_unb, m1_p, m1_d});
  assign mod_up[2] = UW'({m2_binv, m2_b, m2_cb, m2_basis});

  // ---------------------------------------------------------- slot control
  logic [2:0] eligible;
  logic [1:0] conn [3];          // controller connected to module j

  always_comb begin
    for (int j = 0; j < 3; j++) begin
      conn[j]     = 2'((j + 3 - int'(pattern)) % 3);
      eligible[j] = !c_opt[conn[j]] && !c_unb[conn[j]] && (j == 0 || c_active[conn[j]]);
    end
    m_start    = (state == S_START) ? eligible : 3'b000;
    mod_up_v   = (state == S_WRITE) ? started  : 3'b000;
    c_activate = '0;
    if (state == S_START && eligible[0]) c_activate[conn[0]] = 1'b1;
    c_init     = (state == S_INIT);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      pattern   <= '0;
      started   <= '0;
      slots     <= '0;
      done      <= 1'b0;
      optimal   <= 1'b0;
      unbounded <= 1'b0;
      winner    <= '0;
    end else begin
      case (state)
        S_IDLE: if (start) begin
          done  <= 1'b0;
          state <= S_INIT;
        end
        S_INIT: begin
          pattern   <= '0;
          slots     <= '0;
          done      <= 1'b0;
          optimal   <= 1'b0;
          unbounded <= 1'b0;
          state     <= S_START;
        end
        S_START: begin
          started <= eligible;
          state   <= S_WAIT;
        end
        S_WAIT: if ((m_done & started) == started) state <= S_WRITE;
        S_WRITE: state <= S_CHECK;
        S_CHECK: begin
          slots <= slots + 16'd1;
          if (|c_opt) begin
            optimal <= 1'b1;
            winner  <= c_opt[0] ? 2'd0 : (c_opt[1] ? 2'd1 : 2'd2);
            done    <= 1'b1;
            state   <= S_DONE;
          end else if (|c_unb) begin
            unbounded <= 1'b1;
            winner    <= c_unb[0] ? 2'd0 : (c_unb[1] ? 2'd1 : 2'd2);
            done      <= 1'b1;
            state     <= S_DONE;
          end else begin
            pattern <= (pattern == 2'd2) ? 2'd0 : pattern + 2'd1;
            state   <= S_START;
          end
        end
        S_DONE: if (start) begin
          done  <= 1'b0;
          state <= S_INIT;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE) && (state != S_DONE);

  // ---------------------------------------------------- multi-chip engine
  lp_chipset #(.M(M), .N(N), .W(W), .FRAC(FRAC), .S(S), .Q(Q), .IW(IW), .PW(PW)) u_chipset (
    .clk, .rst_n, .mem_we, .mem_sel, .mem_row, .mem_col, .mem_wdata,
    .start(cs_start), .busy(cs_busy), .done(cs_done), .end_opt(cs_end),
    .unbounded(cs_unbounded), .x_col(cs_x_col), .x_val(cs_x_val),
    .objective(cs_objective), .pivots(cs_pivots), .step(cs_step)
  );

  // --------------------------------------------------------------- result
  always_comb begin
    logic signed [2*W-1:0] acc, prod;
    acc = '0;
    for (int i = 0; i < M; i++) begin
      prod = (2*W)'($signed(c_cb[winner][i])) * (2*W)'($signed(c_b[winner][i]));
      acc  = acc + (prod >>> FRAC);
    end
    objective = acc[W-1:0];
    x_col     = c_basis[winner];
    x_val     = c_b[winner];
    pivots    = c_iters[winner];
  end
endmodule
