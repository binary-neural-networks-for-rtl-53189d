// bnn_pkg: constants and types shared by the three N-queens binary neural
// network engines (bus-connected, systolic and logical-synapse).
//
// The bus-connected engine uses the host buses of the neuron board: a 9-bit
// neuron address, a 10-bit local address and an 8-bit data bus (the widths
// printed on the board's block diagram). The local address map below is this
// design's own choice.
package bnn_pkg;

  // ---- bus-connected engine -------------------------------------------
  localparam int BUS_ID_W   = 9;   // neuron ID / arbitration bus width
  localparam int BUS_LA_W   = 10;  // local address bus width
  localparam int BUS_DATA_W = 8;   // data bus, U and term width
  localparam int BUS_NTERM  = 5;   // term-generation units per neuron

  // Local address map of one neuron.
  localparam logic [BUS_LA_W-1:0] LA_MEM_LAST = 10'h1FF;  // 0x000..0x1FF synaptic memory
  localparam logic [BUS_LA_W-1:0] LA_U        = 10'h200;  // neuron input U
  localparam logic [BUS_LA_W-1:0] LA_STAT     = 10'h201;  // {.., part, V} read only
  localparam logic [BUS_LA_W-1:0] LA_TERM0    = 10'h210;  // 0x210 + 4*k + reg

  // Registers of a term-generation unit.
  typedef enum logic [1:0] {
    TREG_COEF_LO = 2'd0,   // coefficient in ordinary steps
    TREG_COEF_HI = 2'd1,   // coefficient in boosted steps (C = 4 phase)
    TREG_OFFSET  = 2'd2,   // subtracted from the count (linear mode)
    TREG_MODE    = 2'd3    // bit 0: 1 = hill-climbing h(count)
  } treg_e;

  // Phase strobes the sequencer sends to every neuron of the bus engine.
  typedef struct packed {
    logic grant;   // round start: every active neuron gets the right to arbitrate
    logic take;    // the current winner has been latched as bus master
    logic rd;      // read synaptic memory at the master ID
    logic acc;     // term units count the broadcast
    logic upd;     // apply the motion equation and output function
    logic boost;   // hill-climbing coefficient phase (t mod 20 < 5)
  } bus_cmd_t;

  // Hill-climbing schedule of the N^2-parallel / sequential networks:
  // C = 4 while (t mod 20) < 5, else C = 1.
  localparam int C_PERIOD   = 20;
  localparam int C_HI_STEPS = 5;

endpackage
