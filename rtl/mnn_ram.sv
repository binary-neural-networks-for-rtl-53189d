// mnn_ram: state memory of the maximum neural network. Word i holds the N
// neuron inputs U and the N self-feedback gains T of board row i. One write
// port and one read port; the read data of `raddr` appears one clock later.
// Contents are not reset; every row is written before it is read.
// A RAM for U and T is part of the source design; its one-row-per-word
// organisation and the registered read are this design's choice.
module mnn_ram #(
  parameter int N = 31,
  parameter int W = 24,
  localparam int RW = $clog2(N)
) (
  input  logic                       clk,
  input  logic                       we,
  input  logic [RW-1:0]              waddr,
  input  logic signed [N-1:0][W-1:0] wu,
  input  logic signed [N-1:0][W-1:0] wt,
  input  logic [RW-1:0]              raddr,
  output logic signed [N-1:0][W-1:0] ru,
  output logic signed [N-1:0][W-1:0] rt
);
  logic [2*N*W-1:0] mem [N];
  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= {wu, wt};
    {ru, rt} <= mem[raddr];
  end
endmodule
