// bus_neuron: one binary neuron of the bus-connected network.
//
// Parts: synaptic connection memory, NTERM (five) term-generation units, the
// output-generation unit, the local arbiter, and the address decoder /
// controller for host access.
//
// Operation, driven by the sequencer's command strobes (`cmd`):
//   grant  start of a round: term counts clear, an active neuron (V = 1)
//          gets the right to arbitrate
//   (arbitration) the local arbiter contends on the arbitration bus; the
//          sequencer latches the winner into `master_id` and raises `take`
//   rd     the memory is read at `master_id`
//   acc    each term unit counts the broadcast if its connection flag is set
//   upd    after the last broadcast of the round, U += sum of the five terms,
//          V = (U > 0), and the stability flag is recomputed
//   boost  selects the second coefficient set (hill-climbing C = 4 phase)
// The host may access the neuron only while the sequencer is idle; reads
// return data one clock after the address (`h_rdata` is 0 when this neuron is
// not addressed, so several neurons' read data can be ORed).
//
// The part list follows the source design. Deferring the update to the end of
// the round, and the two-clock read/count per broadcast, are this design's.
module bus_neuron
  import bnn_pkg::*;
#(
  parameter int ID_W   = 9,
  parameter int LA_W   = 10,
  parameter int DATA_W = 8,
  parameter int NTERM  = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ID_W-1:0]   my_id,
  // host access
  input  logic [ID_W-1:0]   h_naddr,
  input  logic [LA_W-1:0]   h_laddr,
  input  logic [DATA_W-1:0] h_wdata,
  input  logic              h_we,
  output logic [DATA_W-1:0] h_rdata,
  // computation
  input  bus_cmd_t          cmd,
  input  logic [ID_W-1:0]   master_id,
  input  logic [ID_W-1:0]   arb_bus_or,
  output logic [ID_W-1:0]   arb_drive,
  output logic              part,
  output logic              v,
  output logic              unstable
);
  logic              mem_we, u_we, stable;
  logic [NTERM-1:0]  term_we;
  treg_e             term_reg;
  logic [1:0]        rd_src, rd_src_q;
  logic [DATA_W-1:0] mem_q;
  logic signed [DATA_W-1:0] u;
  logic signed [DATA_W-1:0] terms [NTERM];

  bus_neuron_ctrl #(.ID_W(ID_W), .LA_W(LA_W), .NTERM(NTERM)) u_ctrl (
    .my_id, .naddr(h_naddr), .laddr(h_laddr), .we(h_we),
    .mem_we, .u_we, .term_we, .term_reg, .rd_src
  );

  bus_syn_mem #(.ID_W(ID_W), .DATA_W(DATA_W)) u_mem (
    .clk, .addr(cmd.rd ? master_id : h_laddr[ID_W-1:0]),
    .we(mem_we), .wdata(h_wdata), .rdata(mem_q)
  );

  for (genvar k = 0; k < NTERM; k++) begin : g_term
    bus_term_unit #(.DATA_W(DATA_W)) u_term (
      .clk, .rst_n, .cfg_we(term_we[k]), .cfg_sel(term_reg), .cfg_wdata(h_wdata),
      .clr(cmd.grant), .acc(cmd.acc), .conn(mem_q[k]), .boost(cmd.boost), .term(terms[k])
    );
  end

  bus_output_unit #(.DATA_W(DATA_W), .NTERM(NTERM)) u_out (
    .clk, .rst_n, .u_we, .u_wdata(h_wdata), .upd(cmd.upd), .terms, .u, .v, .stable
  );

  bus_local_arbiter #(.ID_W(ID_W)) u_arb (
    .clk, .rst_n, .my_id, .v, .grant(cmd.grant), .take(cmd.take),
    .bus_or(arb_bus_or), .drive(arb_drive), .win(), .part
  );

  // registered host read data (memory has one clock of read latency)
  logic signed [DATA_W-1:0] u_q;
  logic [1:0]               stat_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_src_q <= 2'd0; u_q <= '0; stat_q <= '0;
    end else begin
      rd_src_q <= rd_src; u_q <= u; stat_q <= {part, v};
    end
  end
  always_comb begin
    unique case (rd_src_q)
      2'd1:    h_rdata = mem_q;
      2'd2:    h_rdata = u_q;
      2'd3:    h_rdata = DATA_W'(stat_q);
      default: h_rdata = '0;
    endcase
  end

  assign unstable = !stable;
endmodule
