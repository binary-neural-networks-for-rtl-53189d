// mnn_proc_unit: processing unit of the maximum neural network with
// reinforced self-feedback; computes the next state of one neuron.
//
//   U' = r*U + T*V - c          (logical-synapse motion equation)
//   T' = T - dT  if V = 1       (reinforced self-feedback gain control)
//      = omega   if V = 0
// where c is the neuron's conflict bit (logical sum of attacking outputs).
// U and T are signed fixed-point numbers of W bits with FRAC fraction bits;
// r = 2^-R_SHIFT is an arithmetic shift (r = 0.125 for R_SHIFT = 3), dT is
// DT units of 2^-FRAC (1049/2^20 ~ 0.001) and omega is OMEGA units. Results
// saturate. Purely combinational.
//
// The equations, r = 0.125, dT ~ 0.001 and omega = 0 come from the source
// design; the number format is this design's choice. With W = 24 and FRAC =
// 20 (Q3.20) the range of +-8 covers U >= -1.2 and T >= -0.1 at the 100-step
// limit. Fewer fraction bits hurt: U of a conflict-free square shrinks by 8
// each step, and once such values reach the last bits many squares of a row
// tie, so the maximum neuron's tie rule, not the random start, picks the
// queen. With 10 fraction bits this cut the solved share of 31-queens runs
// from about 98% to about 72% in a model of this datapath.
module mnn_proc_unit #(
  parameter int W       = 24,
  parameter int FRAC    = 20,
  parameter int R_SHIFT = 3,
  parameter int DT      = 1049,
  parameter int OMEGA   = 0
) (
  input  logic signed [W-1:0] u,
  input  logic signed [W-1:0] t,
  input  logic                v,
  input  logic                c,
  output logic signed [W-1:0] u_n,
  output logic signed [W-1:0] t_n
);
  localparam int MAXV = (1 << (W - 1)) - 1;
  localparam int MINV = -(1 << (W - 1));
  localparam int ONE  = 1 << FRAC;

  function automatic logic signed [W-1:0] sat(int x);
    if (x > MAXV) return W'(MAXV);
    if (x < MINV) return W'(MINV);
    return W'(x);
  endfunction

  always_comb begin
    u_n = sat((int'(u) >>> R_SHIFT) + (v ? int'(t) : 0) - (c ? ONE : 0));
    t_n = v ? sat(int'(t) - DT) : W'(OMEGA);
  end
endmodule
