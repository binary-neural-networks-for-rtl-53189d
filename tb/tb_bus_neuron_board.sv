// tb_bus_neuron_board: one eight-neuron board in slot 3 (IDs 24..31). The
// host writes U of every neuron; after a grant the board's OR-ed arbitration
// drive, settled against itself, must select the largest active ID, and
// successive takes must walk through the active IDs in descending order.
// Also checks host read-back through the board's OR-ed data lines and the
// board's OR-ed 'unstable' flag after an update.
// Eight neurons per board is the source design's; the checks are this test's.
module tb_bus_neuron_board;
  import bnn_pkg::*;
  logic clk = 0, rst_n = 0, h_we = 0;
  logic [8:0] slot = 9'd3, h_naddr = '0, master_id = '0, arb_drive;
  logic [9:0] h_laddr = '0;
  logic [7:0] h_wdata = '0, h_rdata, v;
  bus_cmd_t cmd = '0;
  logic any_part, any_unstable;
  int checks = 0, failures = 0;

  bus_neuron_board dut (.*, .arb_bus_or(arb_drive));

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

  initial begin
    int u [8], rd;
    bit exp_unst;
    int n_unst = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 200; it++) begin
      for (int k = 0; k < 8; k++) begin
        u[k] = int'($urandom % 20) - 10;
        h_naddr = 9'(24 + k); h_laddr = 10'h200; h_wdata = 8'(u[k]); h_we = 1; @(negedge clk); h_we = 0;
      end
      for (int k = 0; k < 8; k++) begin
        h_naddr = 9'(24 + k); h_laddr = 10'h200; @(negedge clk);
        chk(int'($signed(h_rdata)) == u[k], "read-back through board");
        chk(v[k] == (u[k] > 0), "V of each neuron");
      end
      h_naddr = 9'd100; h_laddr = 10'h200; @(negedge clk);
      chk(h_rdata == '0, "no read data for a foreign ID");
      cmd = '0; cmd.grant = 1; @(negedge clk); cmd = '0;
      for (int k = 7; k >= 0; k--) if (u[k] > 0) begin
        #1;
        chk(any_part && int'(arb_drive) == 24 + k, $sformatf("winner %0d exp %0d", arb_drive, 24 + k));
        cmd.take = 1; @(negedge clk); cmd = '0;
      end
      #1;
      chk(!any_part && arb_drive == '0, "round ends with no participant");
      // term 0 of each neuron in hill mode with coefficient -1, 0 or +1: with
      // the counter cleared it adds that coefficient, and the neuron is
      // unstable when the change points away from its V
      exp_unst = 0;
      for (int k = 0; k < 8; k++) begin
        automatic int c = int'($urandom % 3) - 1;
        h_naddr = 9'(24 + k); h_we = 1;
        h_laddr = LA_TERM0 + 10'(TREG_COEF_LO); h_wdata = 8'(c); @(negedge clk);
        h_laddr = LA_TERM0 + 10'(TREG_MODE);    h_wdata = 8'd1;  @(negedge clk);
        h_we = 0;
        if ((u[k] > 0 && c < 0) || (u[k] <= 0 && c > 0)) exp_unst = 1;
      end
      cmd.upd = 1; @(negedge clk); cmd = '0;
      chk(any_unstable == exp_unst, "board unstable flag is the OR of its neurons");
      if (exp_unst) n_unst++;
    end
    chk(n_unst > 0 && n_unst < 200, "both stable and unstable rounds seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
