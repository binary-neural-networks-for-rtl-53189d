// mnn_max_select: the maximum neuron of one row. Outputs a one-hot vector
// marking the largest of the N signed inputs; on a tie the lowest index wins,
// so each row always holds exactly one active neuron. Combinational,
// a chain of N-1 compare-and-select stages.
// The maximum rule comes from the source design; the tie rule is this
// design's choice.
module mnn_max_select #(
  parameter int N = 31,
  parameter int W = 24
) (
  input  logic signed [N-1:0][W-1:0] u,
  output logic [N-1:0]               onehot
);
  logic [$clog2(N)-1:0] best;
  logic signed [W-1:0] best_u;
  always_comb begin
    best   = '0;
    best_u = u[0];
    for (int j = 1; j < N; j++)
      if ($signed(u[j]) > best_u) begin
        best   = $clog2(N)'(j);
        best_u = u[j];
      end
    onehot = '0;
    onehot[best] = 1'b1;
  end
endmodule
