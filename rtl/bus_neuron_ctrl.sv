// bus_neuron_ctrl: address decoder and controller of one bus-connected neuron.
//
// The host reaches a neuron through the neuron address bus (its ID) and a
// local address bus; this block turns a host cycle into strobes for the
// neuron's parts. Local address map (this design's choice):
//   0x000-0x1FF  synaptic connection memory word (read and write)
//   0x200        neuron input U (write sets U and V, read returns U)
//   0x201        status, read only: bit 0 = V, bit 1 = participation right
//   0x210+4k+r   register r of term-generation unit k (write only)
// Strobes are active only when the neuron address matches this neuron; `rd_src` says
// which value the neuron returns for a read. Purely combinational.
// An address decoder and controller per neuron is part of the source design;
// what it decodes is this design's.
module bus_neuron_ctrl
  import bnn_pkg::*;
#(
  parameter int ID_W  = 9,
  parameter int LA_W  = 10,
  parameter int NTERM = 5
) (
  input  logic [ID_W-1:0] my_id,
  input  logic [ID_W-1:0] naddr,
  input  logic [LA_W-1:0] laddr,
  input  logic            we,
  output logic            mem_we,
  output logic            u_we,
  output logic [NTERM-1:0] term_we,
  output treg_e           term_reg,
  output logic [1:0]      rd_src       // 0 none, 1 memory, 2 U, 3 status
);
  logic sel, mem_acc;
  always_comb begin
    sel      = (naddr == my_id);
    mem_acc  = (laddr <= LA_MEM_LAST);
    mem_we   = sel && we && mem_acc;
    u_we     = sel && we && (laddr == LA_U);
    term_reg = treg_e'(laddr[1:0]);
    term_we  = '0;
    for (int k = 0; k < NTERM; k++)
      if (sel && we && (laddr[LA_W-1:2] == (LA_TERM0[LA_W-1:2] + (LA_W-2)'(k))))
        term_we[k] = 1'b1;
    if (!sel)                  rd_src = 2'd0;
    else if (mem_acc)          rd_src = 2'd1;
    else if (laddr == LA_U)    rd_src = 2'd2;
    else if (laddr == LA_STAT) rd_src = 2'd3;
    else                       rd_src = 2'd0;
  end
endmodule
