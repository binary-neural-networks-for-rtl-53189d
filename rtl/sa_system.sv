// sa_system: the systolic-array N-queens engine (array of cells + sequencer).
//
// Use: with `busy` low, hold `init` high for N*N clocks while presenting one
// initial neuron input per clock on `u_in` (negative random values, last
// square (N,N) first since the chain is a shift register ending there); the
// cells' V registers fill with zeros. Pulse `start`. When `done` rises,
// `solved` tells whether a solution was reached within MAX_STEPS updates,
// `steps` how many updates were applied, and `v_mat` (one bit per square,
// index i*N+j) shows the queens. Holding `init` again shifts the final U and
// V out of `u_out`/`v_out`, square (N,N) first. `init` must stay low while
// `busy` is high.
//
// One iteration costs N+2 clocks (see sa_ctrl). The serial load path, the
// 500-step limit and the N^2-parallel update follow the source design.
// The three-phase step and the handling of `init` are this design's choices.
module sa_system #(
  parameter int N         = 9,
  parameter int U_W       = 7,
  parameter int MAX_STEPS = 500,
  localparam int SW       = $clog2(MAX_STEPS + 1)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  init,
  input  logic signed [U_W-1:0] u_in,
  output logic signed [U_W-1:0] u_out,
  output logic                  v_out,
  input  logic                  start,
  output logic                  busy,
  output logic                  done,
  output logic                  solved,
  output logic [SW-1:0]         steps,
  output logic [N*N-1:0]        v_mat
);

  localparam int CW = $clog2(N + 1);
  logic          tok_load, tok_move, upd, c_hi, all_ok;
  logic [CW-1:0] move_cnt;

  sa_array #(.N(N), .U_W(U_W)) u_array (
    .clk, .rst_n, .init, .u_in, .v_in(1'b0), .u_out, .v_out,
    .tok_load, .tok_move, .move_cnt, .upd, .c_hi, .v_mat, .all_ok
  );

  sa_ctrl #(.N(N), .MAX_STEPS(MAX_STEPS)) u_ctrl (
    .clk, .rst_n, .start, .all_ok, .tok_load, .tok_move, .move_cnt, .upd, .c_hi,
    .busy, .done, .solved, .steps
  );

endmodule
