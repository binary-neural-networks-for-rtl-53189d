// bus_syn_mem: synaptic connection memory of one neuron of the bus-connected
// network. Word m tells what a broadcast of neuron ID m means to this neuron:
// bit k set means "the master is connected to term-generation unit k"
// (bits 4..0 feed the five term units; bits 7..5 are free for the host).
//
// One port, 2^ID_W words of DATA_W bits, like the static RAM on the board.
// A write happens at the clock edge when `we` is high; the read data of
// `addr` appears one clock later on `rdata`. The contents are not reset:
// the host loads every word that a master ID can address.
// The memory itself follows the source design; the meaning of each data bit
// and the depth of 2^ID_W words are this design's choices.
module bus_syn_mem #(
  parameter int ID_W   = 9,
  parameter int DATA_W = 8
) (
  input  logic              clk,
  input  logic [ID_W-1:0]   addr,
  input  logic              we,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);
  logic [DATA_W-1:0] mem [2**ID_W];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end
endmodule
