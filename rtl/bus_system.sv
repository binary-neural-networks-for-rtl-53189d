// bus_system: the bus-connected binary neural network system.
//
// NB neuron boards (NPB neurons each, IDs 0 .. NB*NPB-1) share
//  * the arbitration bus: ID_W wired-OR lines, active low, so an idle bus
//    reads all ones and a settled bus holds the inverse of the master's ID;
//  * the buffer and address bus, which carry the master's ID back to every
//    neuron (inside bus_sequencer);
//  * the host's neuron address, local address and data buses.
// The sequencer runs the rounds of arbitration and broadcast described in
// bus_sequencer. The host loads every neuron's synaptic memory, term-unit
// registers and initial U while `busy` is low, pulses `start`, and waits for
// `done`; `local_min` says the network came to rest (rather than timing
// out), `steps` counts iteration steps, `bcasts` broadcasts, `v_all` shows
// every neuron's output (bit n = neuron ID n). Host reads return one clock
// after the address on `h_rdata`.
//
// The default of five boards of eight neurons (40 neurons) is the size of the
// built prototype; the 9-bit ID follows the board's bus widths.
// The one-clock arbitration with combinational settling of the wired-OR lines
// and the deferred (once per round) update are this design's choices; see
// bus_local_arbiter and bus_neuron.
//
// `arb_bus_or` is the OR of every arbiter's drive, and each drive depends on
// `arb_bus_or`: a lint tool that treats the vector as one signal reports a
// combinational loop here. Bit k of every drive depends only on bits above k,
// so the loop does not exist at bit level; it is the settling of the wired-OR
// arbitration lines and is intended.
module bus_system
  import bnn_pkg::*;
#(
  parameter int NB        = 5,
  parameter int NPB       = 8,
  parameter int ID_W      = BUS_ID_W,
  parameter int LA_W      = BUS_LA_W,
  parameter int DATA_W    = BUS_DATA_W,
  parameter int MAX_STEPS = 500,
  localparam int SW       = $clog2(MAX_STEPS + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ID_W-1:0]   h_naddr,
  input  logic [LA_W-1:0]   h_laddr,
  input  logic [DATA_W-1:0] h_wdata,
  input  logic              h_we,
  output logic [DATA_W-1:0] h_rdata,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic              local_min,
  output logic [SW-1:0]     steps,
  output logic [15:0]       bcasts,
  output logic [NB*NPB-1:0] v_all,
  output logic [ID_W-1:0]   arb_bus_n
);
  bus_cmd_t          cmd;
  logic [ID_W-1:0]   master_id, arb_bus_or;
  logic [ID_W-1:0]   drv [NB];
  logic [DATA_W-1:0] rd  [NB];
  logic [NB-1:0]     part, unst;

  for (genvar b = 0; b < NB; b++) begin : g_board
    bus_neuron_board #(.NPB(NPB), .ID_W(ID_W), .LA_W(LA_W), .DATA_W(DATA_W)) u_board (
      .clk, .rst_n, .slot(ID_W'(b)),
      .h_naddr, .h_laddr, .h_wdata, .h_we, .h_rdata(rd[b]),
      .cmd, .master_id, .arb_bus_or, .arb_drive(drv[b]),
      .any_part(part[b]), .any_unstable(unst[b]), .v(v_all[b*NPB +: NPB])
    );
  end

  // wired-OR backplane lines
  always_comb begin
    arb_bus_or = '0; h_rdata = '0;
    for (int b = 0; b < NB; b++) begin
      arb_bus_or |= drv[b];
      h_rdata    |= rd[b];
    end
  end
  assign arb_bus_n = ~arb_bus_or;

  bus_sequencer #(.ID_W(ID_W), .MAX_STEPS(MAX_STEPS)) u_seq (
    .clk, .rst_n, .start, .any_part(|part), .arb_bus_n, .any_unstable(|unst),
    .cmd, .master_id, .busy, .done, .local_min, .steps, .bcasts
  );
endmodule
