// sa_array: N x N grid of systolic cells (sa_cell) laid out like the board.
//
// Two kinds of wiring connect the cells:
//  * the load chain, which visits the cells row by row from (1,1) to (N,N);
//    with `init` high one U value (and V = 0) enters at `u_in`/`v_in` per
//    clock and the last cell's registers appear at `u_out`/`v_out`, so N*N
//    clocks load or read back the whole array;
//  * four rings of one-bit V tokens. Row tokens move to the right, column
//    tokens downward, diagonal tokens down-right and anti-diagonal tokens
//    down-left, each from a cell to one of its eight neighbours. The last cell
//    of every line feeds the first one of the same line, which closes the
//    ring. Each cell is told the length of its own diagonal and
//    anti-diagonal so it can stop those rings at the right move.
//
// `all_ok` is the AND of the cells' `ok` flags: after the N-th move of an
// iteration it is high exactly when the current outputs place one queen in
// every row and column with no two on a diagonal. `v_mat[i*N+j]` is V of
// square (i,j), for the board's LED display.
//
// The eight-neighbour layout follows the source design; the row-major chain
// order and the wrap-around links are this design's choices.
module sa_array #(
  parameter int N   = 9,
  parameter int U_W = 7,
  parameter int UTP = 0,
  parameter int LTP = 0,
  localparam int CW = $clog2(N + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  init,
  input  logic signed [U_W-1:0] u_in,
  input  logic                  v_in,
  output logic signed [U_W-1:0] u_out,
  output logic                  v_out,
  input  logic                  tok_load,
  input  logic                  tok_move,
  input  logic [CW-1:0]         move_cnt,
  input  logic                  upd,
  input  logic                  c_hi,
  output logic [N*N-1:0]        v_mat,
  output logic                  all_ok
);

  function automatic int iabs(int x);
    return (x < 0) ? -x : x;
  endfunction
  function automatic int imin(int a, int b);
    return (a < b) ? a : b;
  endfunction
  function automatic int imax(int a, int b);
    return (a > b) ? a : b;
  endfunction

  logic signed [U_W-1:0] u_chain [N*N];
  logic                  v_chain [N*N];
  logic                  t_row [N][N], t_col [N][N], t_dia [N][N], t_ant [N][N];
  logic [N*N-1:0]        ok_vec;

  for (genvar i = 0; i < N; i++) begin : g_r
    for (genvar j = 0; j < N; j++) begin : g_c
      // predecessors on the four rings
      localparam int RJ = (j > 0) ? j - 1 : N - 1;
      localparam int CI = (i > 0) ? i - 1 : N - 1;
      localparam int DM = N - 1 - imax(i, j);
      localparam int DI = (i > 0 && j > 0) ? i - 1 : i + DM;
      localparam int DJ = (i > 0 && j > 0) ? j - 1 : j + DM;
      localparam int AM = imin(N - 1 - i, j);
      localparam int ANI = (i > 0 && j < N - 1) ? i - 1 : i + AM;
      localparam int ANJ = (i > 0 && j < N - 1) ? j + 1 : j - AM;
      localparam int K  = i * N + j;

      logic signed [U_W-1:0] u_prev;
      logic                  v_prev;
      if (K == 0) begin : g_head
        assign u_prev = u_in;
        assign v_prev = v_in;
      end else begin : g_body
        assign u_prev = u_chain[K-1];
        assign v_prev = v_chain[K-1];
      end

      sa_cell #(
        .N(N), .U_W(U_W), .UTP(UTP), .LTP(LTP),
        .DIA_LEN(N - iabs(i - j)),
        .ANT_LEN(N - iabs(i + j - (N - 1)))
      ) u_cell (
        .clk, .rst_n, .init,
        .u_in (u_prev), .v_in (v_prev),
        .u_out(u_chain[K]), .v_out(v_chain[K]),
        .tok_load, .tok_move, .move_cnt, .upd, .c_hi,
        .tin_row (t_row[i][RJ]), .tin_col (t_col[CI][j]),
        .tin_dia (t_dia[DI][DJ]), .tin_ant (t_ant[ANI][ANJ]),
        .tout_row(t_row[i][j]),  .tout_col(t_col[i][j]),
        .tout_dia(t_dia[i][j]),  .tout_ant(t_ant[i][j]),
        .ok(ok_vec[K])
      );
      assign v_mat[K] = v_chain[K];
    end
  end

  assign u_out  = u_chain[N*N-1];
  assign v_out  = v_chain[N*N-1];
  assign all_ok = &ok_vec;

endmodule
