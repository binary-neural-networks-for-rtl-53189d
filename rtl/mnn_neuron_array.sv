// mnn_neuron_array: N x N array of logical-synapse PEs (mnn_pe) on a
// chessboard.
//
// Column cascades run between vertical neighbours, diagonal cascades between
// (i,j) and (i+1,j+1), anti-diagonal cascades between (i,j) and (i+1,j-1);
// cascade inputs at the board edge are 0. The array is written one row at a
// time: with `row_we` high the N outputs of row `row_sel` take `row_v`.
// `row_conflict[j]` is the conflict bit of square (row_sel, j), i.e. whether
// any other queen attacks it along a column or diagonal. `solved` is high when
// every row holds a queen and no queen is attacked. `v_mat[i*N+j]` = V_ij.
// Everything here is combinational except the PEs' flip-flops.
// The chessboard array of PEs follows the source design; the edge handling
// and the solved test are this design's.
module mnn_neuron_array #(
  parameter int N = 31,
  localparam int RW = $clog2(N)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [RW-1:0]  row_sel,
  input  logic           row_we,
  input  logic [N-1:0]   row_v,
  output logic [N-1:0]   row_conflict,
  output logic [N*N-1:0] v_mat,
  output logic           solved
);
  // Cascade signals leaving each PE live in the PE's own generate scope and
  // neighbours are reached by name, so each wire is a separate signal.
  logic conf [N][N];
  logic [N-1:0] row_has, attacked;

  for (genvar i = 0; i < N; i++) begin : g_r
    for (genvar j = 0; j < N; j++) begin : g_c
      logic c_dn, c_up, d_dn, d_up, a_dn, a_up;   // outputs of this PE
      logic cu, cd, du, dd, au, ad;               // inputs of this PE
      if (i > 0)              begin : g_cu assign cu = g_r[i-1].g_c[j].c_dn;   end
      else                    begin : g_cu0 assign cu = 1'b0; end
      if (i < N-1)            begin : g_cd assign cd = g_r[i+1].g_c[j].c_up;   end
      else                    begin : g_cd0 assign cd = 1'b0; end
      if (i > 0 && j > 0)     begin : g_du assign du = g_r[i-1].g_c[j-1].d_dn; end
      else                    begin : g_du0 assign du = 1'b0; end
      if (i < N-1 && j < N-1) begin : g_dd assign dd = g_r[i+1].g_c[j+1].d_up; end
      else                    begin : g_dd0 assign dd = 1'b0; end
      if (i > 0 && j < N-1)   begin : g_au assign au = g_r[i-1].g_c[j+1].a_dn; end
      else                    begin : g_au0 assign au = 1'b0; end
      if (i < N-1 && j > 0)   begin : g_ad assign ad = g_r[i+1].g_c[j-1].a_up; end
      else                    begin : g_ad0 assign ad = 1'b0; end

      mnn_pe u_pe (
        .clk, .rst_n,
        .v_we(row_we && (int'(row_sel) == i)), .v_d(row_v[j]), .v(v_mat[i*N+j]),
        .col_from_up(cu), .col_from_dn(cd),
        .dia_from_up(du), .dia_from_dn(dd),
        .ant_from_up(au), .ant_from_dn(ad),
        .col_to_dn(c_dn), .col_to_up(c_up),
        .dia_to_dn(d_dn), .dia_to_up(d_up),
        .ant_to_dn(a_dn), .ant_to_up(a_up),
        .conflict(conf[i][j])
      );
    end
  end

  always_comb begin
    row_conflict = '0;
    row_has      = '0;
    attacked     = '0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        if (int'(row_sel) == i) row_conflict[j] = conf[i][j];
        row_has[i]  |= v_mat[i*N+j];
        attacked[i] |= v_mat[i*N+j] & conf[i][j];
      end
    solved = (&row_has) && !(|attacked);
  end
endmodule
