// main_memory: problem store holding A (M x N), b0 (M) and c (N).
//
// The memory is shared by all modules and controllers. It is written one
// word at a time by the host before a run (we, sel, row, col, wdata; sel 0 =
// A(row,col), 1 = b0(row), 2 = c(col)) and read in parallel: every word is
// visible on the read ports at all times, because the systolic feeders of
// the three modules pick a different element every cycle. Writes take
// effect on the next clock edge; the contents are cleared by reset. Only the
// contents (A, b0, c) come from the design; the port arrangement is a choice
// of this implementation.
module main_memory #(
  parameter int unsigned M  = 3,
  parameter int unsigned N  = 9,
  parameter int unsigned W  = 8,
  parameter int unsigned IW = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned PW = (M > 1) ? $clog2(M) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       we,
  input  logic [1:0]                 sel,
  input  logic [PW-1:0]              row,
  input  logic [IW-1:0]              col,
  input  logic [W-1:0]               wdata,
  output logic [M-1:0][N-1:0][W-1:0] a_mat,
  output logic [M-1:0][W-1:0]        b0,
  output logic [N-1:0][W-1:0]        c_vec
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_mat <= '0;
      b0    <= '0;
      c_vec <= '0;
    end else if (we) begin
      case (sel)
        2'd0: if (int'(row) < M && int'(col) < N) a_mat[row][col] <= wdata;
        2'd1: if (int'(row) < M)                  b0[row]         <= wdata;
        2'd2: if (int'(col) < N)                  c_vec[col]      <= wdata;
        default: ;
      endcase
    end
  end
endmodule
