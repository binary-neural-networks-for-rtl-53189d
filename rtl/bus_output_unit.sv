// bus_output_unit: output-generation unit of a bus-connected binary neuron.
//
// Holds the neuron input U (signed, DATA_W bits) and output V. On `upd` it adds
// the NTERM term values to U (saturating) and sets V by the McCulloch-Pitts
// function V = 1 if U > 0 else 0. It also records whether the neuron is at
// rest: `stable` is high when the applied change dU = sum of terms cannot move
// V away from its value (V = 1 and dU >= 0, or V = 0 and dU <= 0). When every
// neuron is stable the network sits in a local minimum and iteration stops.
// The host sets U (and V with it) by writing `u_wdata` with `u_we`.
//
// The adder and output function follow the source design; the stability test
// is this design's reading of "if the state converges to a local minimum,
// terminate the iteration".
module bus_output_unit #(
  parameter int DATA_W = 8,
  parameter int NTERM  = 5
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     u_we,
  input  logic [DATA_W-1:0]        u_wdata,
  input  logic                     upd,
  input  logic signed [DATA_W-1:0] terms [NTERM],
  output logic signed [DATA_W-1:0] u,
  output logic                     v,
  output logic                     stable
);
  localparam int UMAX = (1 << (DATA_W - 1)) - 1;
  localparam int UMIN = -(1 << (DATA_W - 1));

  int du, s;
  logic signed [DATA_W-1:0] u_new;
  always_comb begin
    du = 0;
    for (int k = 0; k < NTERM; k++) du += int'(terms[k]);
    s = int'(u) + du;
    if (s > UMAX)      u_new = DATA_W'(UMAX);
    else if (s < UMIN) u_new = DATA_W'(UMIN);
    else               u_new = DATA_W'(s);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u <= '0; v <= 1'b0; stable <= 1'b1;
    end else if (u_we) begin
      u <= u_wdata;
      v <= ($signed(u_wdata) > 0);
      stable <= 1'b1;
    end else if (upd) begin
      u <= u_new;
      v <= (u_new > 0);
      stable <= v ? (du >= 0) : (du <= 0);
    end
  end
endmodule
