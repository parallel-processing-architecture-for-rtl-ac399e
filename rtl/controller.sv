// controller: local memory of one starting point of the simplex search.
//
// Each of the three controllers keeps the state of one independent simplex
// path: B^-1, b, cb, the entering index q and the leaving row p. This
// implementation also keeps d (module 1 hands it to module 2), the list of
// basic columns (so the solution can be read out), a count of completed
// pivots and three status bits (active, OPTIMAL, UNBOUNDED).
//
// init loads the starting basis: B^-1 = I, b = b0, and the basis made of the
// last M columns of A, which must be an identity (slack) block, with
// cb = their costs. activate marks the controller as running (the top sets it
// when the controller is first connected to module 0). The first time module
// 0 prices for this controller, `pick` = K asks it for the K-th negative
// reduced cost, so the three controllers leave the starting vertex along
// different edges; afterwards pick = 0.
//
// Results arrive through the switching network as one word `up` with
// `up_v` and the source module `up_src`:
//   src 0: {optimal, q}
//   src 1: {unbounded, p, d}
//   src 2: {B^-1, b, cb, basis}   (low bits of the word, higher bits unused)
// and are stored at the clock edge where up_v is high.
//
// The stored set B^-1, b, cb, p, q and the three-controller arrangement
// follow the design; keeping d and the basis list, the slack starting basis
// and the pick rule for the three starting points are choices of this
// implementation, as is the asynchronous active-low reset.
module controller #(
  parameter int unsigned K    = 0,
  parameter int unsigned M    = 3,
  parameter int unsigned N    = 9,
  parameter int unsigned W    = 8,
  parameter int unsigned FRAC = 0,
  parameter int unsigned IW   = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned PW   = (M > 1) ? $clog2(M) : 1,
  parameter int unsigned UW   = M*M*W + 2*M*W + M*IW
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       init,
  input  logic                       activate,
  input  logic [M-1:0][W-1:0]        b0,
  input  logic [N-1:0][W-1:0]        c_vec,
  input  logic [UW-1:0]              up,
  input  logic                       up_v,
  input  logic [1:0]                 up_src,
  output logic [M-1:0][M-1:0][W-1:0] binv,
  output logic [M-1:0][W-1:0]        b,
  output logic [M-1:0][W-1:0]        cb,
  output logic [M-1:0][IW-1:0]       basis,
  output logic [M-1:0][W-1:0]        d,
  output logic [IW-1:0]              q,
  output logic [PW-1:0]              p,
  output logic [1:0]                 pick,
  output logic                       active,
  output logic                       optimal,
  output logic                       unbounded,
  output logic [7:0]                 iters
);
  localparam int unsigned W0 = 1 + IW;
  localparam int unsigned W1 = 1 + PW + M*W;
  localparam int unsigned W2 = M*M*W + 2*M*W + M*IW;

  logic first;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      binv      <= '0;
      b         <= '0;
      cb        <= '0;
      basis     <= '0;
      d         <= '0;
      q         <= '0;
      p         <= '0;
      active    <= 1'b0;
      optimal   <= 1'b0;
      unbounded <= 1'b0;
      first     <= 1'b1;
      iters     <= '0;
    end else if (init) begin
      for (int i = 0; i < M; i++) begin
        for (int j = 0; j < M; j++)
          binv[i][j] <= (i == j) ? W'(1 << FRAC) : '0;
        b[i]     <= b0[i];
        cb[i]    <= c_vec[N - M + i];
        basis[i] <= IW'(N - M + i);
      end
      d         <= '0;
      q         <= '0;
      p         <= '0;
      active    <= 1'b0;
      optimal   <= 1'b0;
      unbounded <= 1'b0;
      first     <= 1'b1;
      iters     <= '0;
    end else begin
      if (activate) active <= 1'b1;
      if (up_v) begin
        case (up_src)
          2'd0: begin
            {optimal, q} <= up[W0-1:0];
            first        <= 1'b0;
          end
          2'd1: {unbounded, p, d} <= up[W1-1:0];
          2'd2: begin
            {binv, b, cb, basis} <= up[W2-1:0];
            iters <= iters + 8'd1;
          end
          default: ;
        endcase
      end
    end
  end

  assign pick = first ? 2'(K) : 2'd0;
endmodule
