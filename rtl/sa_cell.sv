// sa_cell: one cell of the systolic N-queens array, i.e. one hysteresis binary
// neuron standing for square (i,j) of the board.
//
// The cell holds the neuron input U (U_Reg) and output V (V_Reg). While `init`
// is high both registers take the values of the previous cell in the load
// chain, so the host can shift initial U values in (and V = 0) and shift the
// final state out. During computation the neuron outputs travel through four
// one-bit token registers, one per line direction (row, column, diagonal,
// anti-diagonal). On `tok_load` every cell copies V into its four tokens and
// clears its sums; on each `tok_move` it takes the tokens of its predecessors
// and adds them to the matching sum. Every line is a ring, so after N moves
// the row and column sums include all N outputs of the line (the cell's own
// included). A diagonal ring is shorter (DIA_LEN / ANT_LEN cells): its Stop_Reg
// sets once DIA_LEN-1 moves have brought every other cell's output, after which
// the token neither moves nor is summed, so the cell's own V is never counted.
//
// On `upd` the HYS block applies the N^2-parallel motion equation
//   dU = -(row-1) - (col-1) - (dia+ant) + C*(h(row)+h(col)),  h(x) = (x == 0)
// with C = 4 when `c_hi` is set and 1 otherwise, saturates U to U_W bits and
// sets V by a hysteresis threshold: V=1 if U>UTP, V=0 if U<LTP, else unchanged.
// `ok` says that the sums just gathered satisfy the N-queens constraints at
// this square (row and column hold one queen, and a queen here has no
// diagonal neighbour); it is valid after the N-th move.
//
// From the source design: U_Reg, V_Reg, the load selectors, the stop signal on
// the diagonals, one-directional V movement to four neighbours, N moves for
// rows and columns, the motion equation and its hill-climbing schedule. This
// design's choices: ring closure of every line, the thresholds UTP = LTP = 0,
// saturation of U, and the per-cell Stop_Reg computed from the move index.
module sa_cell #(
  parameter int N       = 9,
  parameter int U_W     = 7,
  parameter int UTP     = 0,
  parameter int LTP     = 0,
  parameter int DIA_LEN = N,   // cells on this cell's diagonal (i-j constant)
  parameter int ANT_LEN = N,   // cells on this cell's anti-diagonal (i+j constant)
  localparam int CW     = $clog2(N + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // serial load / unload chain (INT)
  input  logic                  init,
  input  logic signed [U_W-1:0] u_in,
  input  logic                  v_in,
  output logic signed [U_W-1:0] u_out,
  output logic                  v_out,
  // sequencing
  input  logic                  tok_load,
  input  logic                  tok_move,
  input  logic [CW-1:0]         move_cnt,   // 1..N during tok_move
  input  logic                  upd,
  input  logic                  c_hi,
  // systolic V tokens
  input  logic                  tin_row, tin_col, tin_dia, tin_ant,
  output logic                  tout_row, tout_col, tout_dia, tout_ant,
  output logic                  ok
);

  logic signed [U_W-1:0] u_q;
  logic                  v_q;
  logic [CW-1:0]         row_s, col_s, dia_s, ant_s;
  logic                  stop_dia, stop_ant;

  localparam int UMAX = (1 << (U_W - 1)) - 1;
  localparam int UMIN = -(1 << (U_W - 1));

  // HYS: motion equation and hysteresis output function
  int                    du, c_coef, u_sum;
  logic signed [U_W-1:0] u_new;
  logic                  v_new;

  always_comb begin
    c_coef = c_hi ? 4 : 1;
    du = -(int'(row_s) - 1) - (int'(col_s) - 1) - (int'(dia_s) + int'(ant_s))
         + c_coef * (int'(row_s == '0) + int'(col_s == '0));
    u_sum = int'(u_q) + du;
    if (u_sum > UMAX)      u_new = U_W'(UMAX);
    else if (u_sum < UMIN) u_new = U_W'(UMIN);
    else                   u_new = U_W'(u_sum);
    if (int'(u_new) > UTP)      v_new = 1'b1;
    else if (int'(u_new) < LTP) v_new = 1'b0;
    else                        v_new = v_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u_q <= '0; v_q <= 1'b0;
      tout_row <= 1'b0; tout_col <= 1'b0; tout_dia <= 1'b0; tout_ant <= 1'b0;
      row_s <= '0; col_s <= '0; dia_s <= '0; ant_s <= '0;
      stop_dia <= 1'b1; stop_ant <= 1'b1;
    end else if (init) begin
      // selectors: load path
      u_q <= u_in;
      v_q <= v_in;
    end else if (tok_load) begin
      tout_row <= v_q; tout_col <= v_q; tout_dia <= v_q; tout_ant <= v_q;
      row_s <= '0; col_s <= '0; dia_s <= '0; ant_s <= '0;
      stop_dia <= (DIA_LEN <= 1);
      stop_ant <= (ANT_LEN <= 1);
    end else if (tok_move) begin
      tout_row <= tin_row;
      tout_col <= tin_col;
      row_s    <= row_s + CW'(tin_row);
      col_s    <= col_s + CW'(tin_col);
      if (!stop_dia) begin
        tout_dia <= tin_dia;
        dia_s    <= dia_s + CW'(tin_dia);
        if (int'(move_cnt) >= DIA_LEN - 1) stop_dia <= 1'b1;
      end
      if (!stop_ant) begin
        tout_ant <= tin_ant;
        ant_s    <= ant_s + CW'(tin_ant);
        if (int'(move_cnt) >= ANT_LEN - 1) stop_ant <= 1'b1;
      end
    end else if (upd) begin
      // selectors: computation path
      u_q <= u_new;
      v_q <= v_new;
    end
  end

  assign u_out = u_q;
  assign v_out = v_q;
  assign ok    = (row_s == CW'(1)) && (col_s == CW'(1)) &&
                 (!v_q || ((dia_s == '0) && (ant_s == '0)));

endmodule
