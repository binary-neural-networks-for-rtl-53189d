// tb_bus_neuron: one complete bus-connected neuron (ID 5) driven by hand.
// The host programs random synaptic words and term-unit settings, sets U,
// then the test plays rounds of broadcasts of random master IDs followed by
// an update. It checks the participation right and arbitration drive, the
// new U, V and stability flag against the motion equation computed here, and
// host read-back of U, status and memory.
// The expected values follow this design's neuron model (see bus_neuron).
module tb_bus_neuron;
  import bnn_pkg::*;
  localparam int ID = 5;
  logic clk = 0, rst_n = 0, h_we = 0;
  logic [8:0] my_id = 9'(ID), h_naddr = 9'(ID), master_id = '0, arb_drive;
  logic [9:0] h_laddr = '0;
  logic [7:0] h_wdata = '0, h_rdata;
  bus_cmd_t cmd = '0;
  logic part, v, unstable;
  int checks = 0, failures = 0;

  bus_neuron dut (.*, .arb_bus_or(arb_drive));

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask
  task automatic hw(int la, int d);
    h_laddr = 10'(la); h_wdata = 8'(d); h_we = 1; @(negedge clk); h_we = 0;
  endtask
  task automatic hr(int la, output int d);
    h_laddr = 10'(la); @(negedge clk); d = int'(h_rdata);
  endtask

  int mem [16];
  int lo [5], hi [5], off [5], hill [5];

  initial begin
    int u, rd, cnt [5], du, t, ev;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 60; it++) begin
      for (int m = 0; m < 16; m++) begin mem[m] = $urandom % 256; hw(m, mem[m]); end
      for (int k = 0; k < 5; k++) begin
        lo[k] = int'($urandom % 7) - 3; hi[k] = int'($urandom % 7) - 3;
        off[k] = $urandom % 3; hill[k] = $urandom % 2;
        hw('h210 + 4*k, lo[k]); hw('h211 + 4*k, hi[k]); hw('h212 + 4*k, off[k]); hw('h213 + 4*k, hill[k]);
      end
      for (int m = 0; m < 16; m++) begin hr(m, rd); chk(rd == mem[m], "memory read-back"); end
      u = int'($urandom % 40) - 20;
      hw('h200, u);
      for (int r = 0; r < 4; r++) begin
        int nb;
        ev = u > 0;
        cmd = '0; cmd.grant = 1; @(negedge clk); cmd = '0;
        chk(part == ev[0], "participation right follows V");
        chk(arb_drive == (part ? my_id : '0), "arbitration drive is own ID");
        for (int k = 0; k < 5; k++) cnt[k] = 0;
        nb = $urandom % 6;
        for (int b = 0; b < nb; b++) begin
          automatic int m = $urandom % 16;
          master_id = 9'(m);
          cmd = '0; cmd.rd = 1; @(negedge clk);
          cmd = '0; cmd.acc = 1; @(negedge clk); cmd = '0;
          for (int k = 0; k < 5; k++) if (mem[m][k]) cnt[k]++;
        end
        cmd = '0; cmd.take = 1; @(negedge clk); cmd = '0;
        chk(!part, "take removes the right of the winner");
        cmd.boost = $urandom % 2; cmd.upd = 1;
        du = 0;
        for (int k = 0; k < 5; k++) begin
          automatic int c = cmd.boost ? hi[k] : lo[k];
          t = hill[k] ? (cnt[k] == 0 ? c : 0) : c * (cnt[k] - off[k]);
          du += t;
        end
        @(negedge clk); cmd = '0;
        chk(unstable == !(ev ? du >= 0 : du <= 0), "stability flag");
        u = u + du; if (u > 127) u = 127; if (u < -128) u = -128;
        chk(v == (u > 0), "V after update");
        hr('h200, rd); chk(int'($signed(8'(rd))) == u, $sformatf("U %0d exp %0d", $signed(8'(rd)), u));
        hr('h201, rd); chk(rd[0] == (u > 0), "status V");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
