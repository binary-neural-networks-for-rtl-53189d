// mnn_pe: processing element of the logical-synapse neuron array, one per
// board square (i,j) of the maximum neural network.
//
// A D flip-flop holds the neuron output V_ij; it is rewritten when the
// controller writes the PE's row (`v_we`). The synapses are plain OR gates:
// the PE needs only to know whether any other neuron on its column, its
// diagonal or its anti-diagonal is active. Each of those lines is built as
// two OR cascades running through the array, one from the top and one from
// the bottom; a PE passes on "my V or anything before me" in both directions
// and combines what reaches it from both sides, so its own V is excluded:
//   LUT1 = col_from_up | col_from_dn
//   LUT2 = dia_from_up | dia_from_dn
//   LUT3 = ant_from_up | ant_from_dn
//   conflict = LUT1 | LUT2 | LUT3
// `conflict` is the logical sum that the motion equation subtracts.
// Rows are not part of the sum: the maximum neuron already keeps exactly one
// active neuron per row. The DFF and the three OR look-up tables follow the
// source design; the two-way cascade is this design's way of wiring them.
module mnn_pe (
  input  logic clk,
  input  logic rst_n,
  input  logic v_we,
  input  logic v_d,
  output logic v,
  input  logic col_from_up, col_from_dn,
  input  logic dia_from_up, dia_from_dn,
  input  logic ant_from_up, ant_from_dn,
  output logic col_to_dn,  col_to_up,
  output logic dia_to_dn,  dia_to_up,
  output logic ant_to_dn,  ant_to_up,
  output logic conflict
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    v <= 1'b0;
    else if (v_we) v <= v_d;
  end

  logic lut1, lut2, lut3;
  assign lut1 = col_from_up | col_from_dn;
  assign lut2 = dia_from_up | dia_from_dn;
  assign lut3 = ant_from_up | ant_from_dn;
  assign conflict = lut1 | lut2 | lut3;

  assign col_to_dn = v | col_from_up;
  assign col_to_up = v | col_from_dn;
  assign dia_to_dn = v | dia_from_up;
  assign dia_to_up = v | dia_from_dn;
  assign ant_to_dn = v | ant_from_up;
  assign ant_to_up = v | ant_from_dn;
endmodule
