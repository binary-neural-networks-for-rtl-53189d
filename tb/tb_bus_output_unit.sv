// tb_bus_output_unit: loads random U values, applies random term sets and
// checks the saturated sum, the output V = (U > 0) and the stability flag
// (V = 1 with dU >= 0, or V = 0 with dU <= 0) against values computed here.
// V = (U > 0) is the source design's; the stability rule is this design's.
module tb_bus_output_unit;
  logic clk = 0, rst_n = 0, u_we = 0, upd = 0;
  logic [7:0] u_wdata = '0;
  logic signed [7:0] terms [5];
  logic signed [7:0] u;
  logic v, stable;
  int checks = 0, failures = 0;

  bus_output_unit dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    int eu, ev, du;
    for (int k = 0; k < 5; k++) terms[k] = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 1000; it++) begin
      eu = int'($urandom % 256) - 128;
      u_wdata = 8'(eu); u_we = 1; @(negedge clk); u_we = 0;
      chk(int'(u) == eu && v == (eu > 0), "host write U/V");
      ev = eu > 0;
      for (int s = 0; s < 3; s++) begin
        du = 0;
        for (int k = 0; k < 5; k++) begin
          terms[k] = (it % 4 == 0) ? 8'($urandom) : 8'(int'($urandom % 9) - 4);
          du += int'(terms[k]);
        end
        upd = 1; @(negedge clk); upd = 0;
        chk(stable == (ev ? du >= 0 : du <= 0), $sformatf("stable v=%0d du=%0d", ev, du));
        eu = eu + du; if (eu > 127) eu = 127; if (eu < -128) eu = -128;
        ev = eu > 0;
        chk(int'(u) == eu, $sformatf("U %0d exp %0d", u, eu));
        chk(v == ev[0], "V");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
