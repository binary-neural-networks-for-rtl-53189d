// bus_term_unit: term-generation unit of a bus-connected binary neuron.
//
// During a round of broadcasts the unit counts the bus masters whose
// synaptic-memory flag `conn` is set (`acc` strobes once per broadcast, `clr`
// clears the count at the start of a round). Its output is one term of the
// motion equation, in one of two forms chosen by the host:
//   linear         term = coef * (count - offset)
//   hill-climbing  term = coef * h(count),  h(x) = 1 if x == 0 else 0
// where coef is coef_hi while `boost` is high and coef_lo otherwise. With
// coef = -1, offset = 1 a unit gives -(sum V - 1); with coef_lo = 1,
// coef_hi = 4 in hill-climbing mode it gives C*h(sum V) of the N-queens
// motion equation. The term is signed and saturates to DATA_W bits.
//
// Host registers (written with `cfg_we`, selected by `cfg_sel`): coef_lo,
// coef_hi, offset (all signed 8 bit) and mode (bit 0 = hill-climbing).
// The counting-and-weighting scheme is this design's way of realising the
// source's "each unit calculates one term in the motion equation".
module bus_term_unit
  import bnn_pkg::*;
#(
  parameter int CNT_W  = 8,
  parameter int DATA_W = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     cfg_we,
  input  treg_e                    cfg_sel,
  input  logic [DATA_W-1:0]        cfg_wdata,
  input  logic                     clr,
  input  logic                     acc,
  input  logic                     conn,
  input  logic                     boost,
  output logic signed [DATA_W-1:0] term
);
  logic signed [DATA_W-1:0] coef_lo, coef_hi, offset;
  logic                     hill;
  logic [CNT_W-1:0]         cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      coef_lo <= '0; coef_hi <= '0; offset <= '0; hill <= 1'b0;
    end else if (cfg_we) begin
      unique case (cfg_sel)
        TREG_COEF_LO: coef_lo <= cfg_wdata;
        TREG_COEF_HI: coef_hi <= cfg_wdata;
        TREG_OFFSET:  offset  <= cfg_wdata;
        TREG_MODE:    hill    <= cfg_wdata[0];
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        cnt <= '0;
    else if (clr)                      cnt <= '0;
    else if (acc && conn && !(&cnt))   cnt <= cnt + 1'b1;   // saturating
  end

  localparam int TMAX = (1 << (DATA_W - 1)) - 1;
  localparam int TMIN = -(1 << (DATA_W - 1));
  int coef, prod;
  always_comb begin
    coef = boost ? int'(coef_hi) : int'(coef_lo);
    if (hill) prod = (cnt == '0) ? coef : 0;
    else      prod = coef * (int'(cnt) - int'(offset));
    if (prod > TMAX)      term = DATA_W'(TMAX);
    else if (prod < TMIN) term = DATA_W'(TMIN);
    else                  term = DATA_W'(prod);
  end
endmodule
