// bus_neuron_board: one neuron board of the bus-connected network, carrying
// NPB (eight) binary neurons. Neuron k of the board in slot s has the ID
// s*NPB + k. The board passes the host buses and the sequencer's commands to
// every neuron and ORs the neurons' open-collector style outputs onto the
// backplane: arbitration drives, host read data, "someone participates" and
// "someone is not yet stable". `v` gives the eight outputs for observation.
// Eight neurons per board follows the source design.
// The OR-ing of the neurons' outputs onto shared lines is this design's model
// of the open-collector backplane.
module bus_neuron_board
  import bnn_pkg::*;
#(
  parameter int NPB    = 8,
  parameter int ID_W   = 9,
  parameter int LA_W   = 10,
  parameter int DATA_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ID_W-1:0]   slot,
  input  logic [ID_W-1:0]   h_naddr,
  input  logic [LA_W-1:0]   h_laddr,
  input  logic [DATA_W-1:0] h_wdata,
  input  logic              h_we,
  output logic [DATA_W-1:0] h_rdata,
  input  bus_cmd_t          cmd,
  input  logic [ID_W-1:0]   master_id,
  input  logic [ID_W-1:0]   arb_bus_or,
  output logic [ID_W-1:0]   arb_drive,
  output logic              any_part,
  output logic              any_unstable,
  output logic [NPB-1:0]    v
);
  logic [DATA_W-1:0] rd   [NPB];
  logic [ID_W-1:0]   drv  [NPB];
  logic [NPB-1:0]    part, unst;

  for (genvar k = 0; k < NPB; k++) begin : g_n
    bus_neuron #(.ID_W(ID_W), .LA_W(LA_W), .DATA_W(DATA_W)) u_neuron (
      .clk, .rst_n, .my_id(ID_W'(slot * ID_W'(NPB) + ID_W'(k))),
      .h_naddr, .h_laddr, .h_wdata, .h_we, .h_rdata(rd[k]),
      .cmd, .master_id, .arb_bus_or, .arb_drive(drv[k]),
      .part(part[k]), .v(v[k]), .unstable(unst[k])
    );
  end

  always_comb begin
    h_rdata = '0; arb_drive = '0;
    for (int k = 0; k < NPB; k++) begin
      h_rdata   |= rd[k];
      arb_drive |= drv[k];
    end
  end
  assign any_part     = |part;
  assign any_unstable = |unst;
endmodule
