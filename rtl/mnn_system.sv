// mnn_system: logical synaptic connection architecture for the maximum
// neural network with reinforced self-feedback, solving N queens.
//
// Parts: the N x N neuron array (V flip-flops and OR synapses), N processing
// units (one per column), the row maximum selector, the U/T state RAM and the
// controller. During a row update the RAM word of row i supplies U and T, the
// array supplies V and the conflict bits of row i, the processing units form
// the new U and T, the maximum selector turns the new U into the row's
// one-hot V, and all three are written back in the same clock.
//
// Loading: with `busy` low, write each row i once with `init_we`, `init_row`
// = i and the row's initial U values on `init_u` (signed fixed point, W bits,
// FRAC fraction bits, element j = column j). T starts at omega and V at the
// row maximum, which places one queen per row. Then pulse `start`; at `done`,
// `success` tells whether a solution was reached within MAX_STEPS sweeps,
// `steps` how many sweeps were run, and `v_mat[i*N+j]` is the board.
//
// The default of N = 31 is the problem size the source design sizes its
// three-chip implementation for; r = 0.125, dT ~ 0.001 and the 100-step
// limit are its simulation settings.
// The split into array, processing units and RAM follows the source design;
// the fixed-point format, the tie rule and the row schedule are this design's.
module mnn_system #(
  parameter int N         = 31,
  parameter int W         = 24,
  parameter int FRAC      = 20,
  parameter int R_SHIFT   = 3,
  parameter int DT        = 1049,
  parameter int OMEGA     = 0,
  parameter int MAX_STEPS = 100,
  localparam int RW       = $clog2(N),
  localparam int SW       = $clog2(MAX_STEPS + 1)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       init_we,
  input  logic [RW-1:0]              init_row,
  input  logic signed [N-1:0][W-1:0] init_u,
  input  logic                       start,
  output logic                       busy,
  output logic                       done,
  output logic                       success,
  output logic [SW-1:0]              steps,
  output logic [N*N-1:0]             v_mat
);
  logic [RW-1:0]              row, a_row;
  logic                       row_we, solved;
  logic [N-1:0]               conflict, vmax, v_row;
  logic signed [N-1:0][W-1:0] ru, rt, nu, nt, wu, wt, sel_u;

  mnn_ctrl #(.N(N), .MAX_STEPS(MAX_STEPS)) u_ctrl (
    .clk, .rst_n, .start, .solved, .row, .row_we, .busy, .done, .success, .steps
  );

  assign a_row = init_we ? init_row : row;

  mnn_ram #(.N(N), .W(W)) u_ram (
    .clk, .we(row_we || init_we), .waddr(a_row), .wu, .wt,
    .raddr(row), .ru, .rt
  );

  mnn_neuron_array #(.N(N)) u_array (
    .clk, .rst_n, .row_sel(a_row), .row_we(row_we || init_we), .row_v(vmax),
    .row_conflict(conflict), .v_mat, .solved
  );

  always_comb
    for (int j = 0; j < N; j++) v_row[j] = v_mat[int'(row)*N + j];

  for (genvar j = 0; j < N; j++) begin : g_pu
    mnn_proc_unit #(.W(W), .FRAC(FRAC), .R_SHIFT(R_SHIFT), .DT(DT), .OMEGA(OMEGA)) u_pu (
      .u(ru[j]), .t(rt[j]), .v(v_row[j]), .c(conflict[j]), .u_n(nu[j]), .t_n(nt[j])
    );
  end

  always_comb begin
    sel_u = init_we ? init_u : nu;
    wu    = sel_u;
    wt    = init_we ? {N{W'(OMEGA)}} : nt;
  end

  mnn_max_select #(.N(N), .W(W)) u_max (.u(sel_u), .onehot(vmax));
endmodule
