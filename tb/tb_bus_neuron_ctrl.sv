// tb_bus_neuron_ctrl: checks the address decoder of a neuron: strobes only
// for its own neuron address and only on writes, the memory range, the U
// register, the term-unit register blocks and the read-source selection.
// The address map checked is this design's own (see bus_neuron_ctrl).
module tb_bus_neuron_ctrl;
  import bnn_pkg::*;
  logic [8:0] my_id = 9'd37, naddr = '0;
  logic [9:0] laddr = '0;
  logic we = 0, mem_we, u_we;
  logic [4:0] term_we;
  treg_e term_reg;
  logic [1:0] rd_src;
  int checks = 0, failures = 0;

  bus_neuron_ctrl dut (.*);

  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 4000; it++) begin
      automatic int na = (it % 2) ? 37 : $urandom % 512;
      automatic int la = (it % 3 == 0) ? 'h200 + ($urandom % 48) : $urandom % 1024;
      automatic bit w = $urandom % 2;
      automatic bit me = (na == 37);
      automatic logic [4:0] et = '0;
      int es;
      naddr = 9'(na); laddr = 10'(la); we = w; #1;
      chk(mem_we == (me && w && la < 'h200), $sformatf("mem_we la=%h", la));
      chk(u_we == (me && w && la == 'h200), "u_we");
      for (int k = 0; k < 5; k++) if (me && w && la >= 'h210 + 4*k && la < 'h214 + 4*k) et[k] = 1;
      chk(term_we == et, $sformatf("term_we la=%h", la));
      if (et != '0) chk(int'(term_reg) == la % 4, "term register select");
      es = !me ? 0 : la < 'h200 ? 1 : la == 'h200 ? 2 : la == 'h201 ? 3 : 0;
      chk(int'(rd_src) == es, $sformatf("rd_src la=%h", la));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
