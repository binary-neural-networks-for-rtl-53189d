// bnn_nqueens_top: three hardware engines for the N-queens binary neural
// network, side by side, each with its own ports (prefixes bus_, sa_, mnn_)
// and sharing only the clock and the active-low reset.
//
//  bus_  bus-connected network: 5 boards x 8 neurons on a wired-OR
//        arbitration bus; active neurons broadcast their IDs one at a time and
//        every neuron accumulates its motion-equation terms (bus_system).
//        Host access through neuron address, local address and data buses.
//  sa_   systolic array: 9 x 9 hysteresis neurons updated all at once; neuron
//        outputs circulate through the array in four directions (sa_system).
//        Host access through a serial load/unload chain.
//  mnn_  logical-synapse maximum neural network: 31 x 31 neurons whose
//        synapses are OR gates, updated a row at a time with reinforced
//        self-feedback (mnn_system). Host loads one row of inputs per clock.
//
// See each subsystem for the protocol of its ports.
// The three engines are the three architectures of the source design; placing
// them in one top with prefixed ports is only this design's packaging.
module bnn_nqueens_top
  import bnn_pkg::*;
#(
  parameter int BUS_NB   = 5,
  parameter int BUS_NPB  = 8,
  parameter int BUS_MAXS = 500,
  parameter int SA_N     = 9,
  parameter int SA_UW    = 7,
  parameter int SA_MAXS  = 500,
  parameter int MNN_N    = 31,
  parameter int MNN_W    = 24,
  parameter int MNN_MAXS = 100,
  localparam int MNN_RW  = $clog2(MNN_N)
) (
  input  logic                            clk,
  input  logic                            rst_n,
  // bus-connected network
  input  logic [BUS_ID_W-1:0]             bus_h_naddr,
  input  logic [BUS_LA_W-1:0]             bus_h_laddr,
  input  logic [BUS_DATA_W-1:0]           bus_h_wdata,
  input  logic                            bus_h_we,
  output logic [BUS_DATA_W-1:0]           bus_h_rdata,
  input  logic                            bus_start,
  output logic                            bus_busy,
  output logic                            bus_done,
  output logic                            bus_local_min,
  output logic [$clog2(BUS_MAXS+1)-1:0]   bus_steps,
  output logic [15:0]                     bus_bcasts,
  output logic [BUS_NB*BUS_NPB-1:0]       bus_v,
  output logic [BUS_ID_W-1:0]             bus_arb_n,
  // systolic array
  input  logic                            sa_init,
  input  logic signed [SA_UW-1:0]         sa_u_in,
  output logic signed [SA_UW-1:0]         sa_u_out,
  output logic                            sa_v_out,
  input  logic                            sa_start,
  output logic                            sa_busy,
  output logic                            sa_done,
  output logic                            sa_solved,
  output logic [$clog2(SA_MAXS+1)-1:0]    sa_steps,
  output logic [SA_N*SA_N-1:0]            sa_leds,
  // logical-synapse maximum neural network
  input  logic                            mnn_init_we,
  input  logic [MNN_RW-1:0]               mnn_init_row,
  input  logic signed [MNN_N-1:0][MNN_W-1:0] mnn_init_u,
  input  logic                            mnn_start,
  output logic                            mnn_busy,
  output logic                            mnn_done,
  output logic                            mnn_success,
  output logic [$clog2(MNN_MAXS+1)-1:0]   mnn_steps,
  output logic [MNN_N*MNN_N-1:0]          mnn_board
);

  bus_system #(.NB(BUS_NB), .NPB(BUS_NPB), .MAX_STEPS(BUS_MAXS)) u_bus (
    .clk, .rst_n,
    .h_naddr(bus_h_naddr), .h_laddr(bus_h_laddr), .h_wdata(bus_h_wdata), .h_we(bus_h_we),
    .h_rdata(bus_h_rdata), .start(bus_start), .busy(bus_busy), .done(bus_done),
    .local_min(bus_local_min), .steps(bus_steps), .bcasts(bus_bcasts), .v_all(bus_v),
    .arb_bus_n(bus_arb_n)
  );

  sa_system #(.N(SA_N), .U_W(SA_UW), .MAX_STEPS(SA_MAXS)) u_sa (
    .clk, .rst_n, .init(sa_init), .u_in(sa_u_in), .u_out(sa_u_out), .v_out(sa_v_out),
    .start(sa_start), .busy(sa_busy), .done(sa_done), .solved(sa_solved), .steps(sa_steps),
    .v_mat(sa_leds)
  );

  mnn_system #(.N(MNN_N), .W(MNN_W), .MAX_STEPS(MNN_MAXS)) u_mnn (
    .clk, .rst_n, .init_we(mnn_init_we), .init_row(mnn_init_row), .init_u(mnn_init_u),
    .start(mnn_start), .busy(mnn_busy), .done(mnn_done), .success(mnn_success),
    .steps(mnn_steps), .v_mat(mnn_board)
  );
endmodule
