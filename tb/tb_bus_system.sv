// tb_bus_system: end-to-end test of the bus-connected network at its default
// size (5 boards x 8 neurons) solving the 6-queens problem with 36 of the 40
// neurons. Through the host buses it loads every neuron's synaptic memory
// (row, column and diagonal connections), the five term units (row and
// column -(sum-1), diagonals -sum, row and column hill-climbing 1 or 4) and
// random negative initial inputs, then runs the network. The result (local
// minimum or time-out, steps, broadcasts, run time of 3a+4 clocks per step
// with a active neurons, final V and U read back over the host bus) is
// compared with a behavioural model of the same network. It also counts how
// often multi-way arbitration, empty rounds, boosted steps, stops on a local
// minimum and solutions occurred.
// The network setup follows the source design's motion equation; the model
// and the stop rule it compares against are this design's.
module tb_bus_system;
  import bnn_pkg::*;
  localparam int Q = 6, NN = 40, ID_W = 9, MAXS = 500, RUNS = 10;

  logic clk = 0, rst_n = 0, h_we = 0, start = 0;
  logic [ID_W-1:0] h_naddr = '0;
  logic [9:0] h_laddr = '0;
  logic [7:0] h_wdata = '0, h_rdata;
  logic busy, done, local_min;
  logic [$clog2(MAXS+1)-1:0] steps;
  logic [15:0] bcasts;
  logic [NN-1:0] v_all;
  logic [ID_W-1:0] arb_bus_n;
  int checks = 0, failures = 0;
  int n_multi = 0, n_empty = 0, n_boost = 0, n_lmin = 0, n_solved = 0, n_timeout = 0;

  bus_system dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  task automatic hw(int n, int la, int d);
    h_naddr = ID_W'(n); h_laddr = 10'(la); h_wdata = 8'(d); h_we = 1;
    @(negedge clk); h_we = 0;
  endtask
  task automatic hr(int n, int la, output int d);
    h_naddr = ID_W'(n); h_laddr = 10'(la);
    @(negedge clk); d = int'(h_rdata);
  endtask

  function automatic bit same_row(int a, int b); return a/Q == b/Q; endfunction
  function automatic bit same_col(int a, int b); return a%Q == b%Q; endfunction
  function automatic bit same_diag(int a, int b);
    return a != b && ((a/Q - a%Q) == (b/Q - b%Q) || (a/Q + a%Q) == (b/Q + b%Q));
  endfunction
  function automatic int sat8(int x); return x > 127 ? 127 : x < -128 ? -128 : x; endfunction

  int mu [NN], mv [NN], mst [NN];
  int act [NN];

  // model of one run: returns local-minimum flag, steps, broadcasts, cycles
  task automatic model(output bit lmin, output int st, output int bc, output int cyc);
    int r, c, d, du, cc;
    bit all_stable;
    st = 0; bc = 0; cyc = 1;
    forever begin
      int a = 0;
      for (int n = 0; n < NN; n++) begin act[n] = mv[n]; a += mv[n]; end
      if (a >= 2) n_multi++;
      if (a == 0) n_empty++;
      cc = ((st % 20) < 5) ? 4 : 1;
      if (cc == 4) n_boost++;
      bc += a; cyc += 3*a + 4;
      all_stable = 1;
      for (int n = 0; n < Q*Q; n++) begin
        r = 0; c = 0; d = 0;
        for (int m = 0; m < Q*Q; m++) if (act[m]) begin
          r += same_row(n, m); c += same_col(n, m); d += same_diag(n, m);
        end
        du = -(r-1) - (c-1) - d + cc*((r == 0) + (c == 0));
        mst[n] = mv[n] ? (du >= 0) : (du <= 0);
        mu[n] = sat8(mu[n] + du);
        mv[n] = mu[n] > 0;
        if (!mst[n]) all_stable = 0;
      end
      st++;
      if (all_stable) begin lmin = 1; return; end
      if (st == MAXS) begin lmin = 0; return; end
    end
  endtask

  function automatic bit is_solution();
    for (int n = 0; n < Q*Q; n++) begin
      int r = 0, c = 0, d = 0;
      for (int m = 0; m < Q*Q; m++) if (mv[m]) begin
        r += same_row(n, m); c += same_col(n, m); d += same_diag(n, m);
      end
      if (r != 1 || c != 1 || (mv[n] && d != 0)) return 0;
    end
    return 1;
  endfunction

  initial begin
    int rd, cyc, mcyc, mst_, mbc;
    bit mlmin;
    repeat (3) @(negedge clk); rst_n = 1;
    // static configuration: synaptic memories and term units
    for (int n = 0; n < NN; n++) begin
      for (int m = 0; m < NN; m++) begin
        automatic int w = 0;
        if (n < Q*Q && m < Q*Q) begin
          w = {27'd0, same_col(n, m), same_row(n, m), same_diag(n, m), same_col(n, m), same_row(n, m)};
        end
        hw(n, m, w);
      end
      if (n < Q*Q) begin
        hw(n, 'h210, -1); hw(n, 'h211, -1); hw(n, 'h212, 1); hw(n, 'h213, 0);  // row
        hw(n, 'h214, -1); hw(n, 'h215, -1); hw(n, 'h216, 1); hw(n, 'h217, 0);  // column
        hw(n, 'h218, -1); hw(n, 'h219, -1); hw(n, 'h21a, 0); hw(n, 'h21b, 0);  // diagonals
        hw(n, 'h21c, 1);  hw(n, 'h21d, 4);  hw(n, 'h21e, 0); hw(n, 'h21f, 1);  // row hill-climbing
        hw(n, 'h220, 1);  hw(n, 'h221, 4);  hw(n, 'h222, 0); hw(n, 'h223, 1);  // column hill-climbing
      end
    end
    // read back a few memory words
    for (int k = 0; k < 20; k++) begin
      automatic int n = $urandom % (Q*Q), m = $urandom % (Q*Q);
      hr(n, m, rd);
      chk(rd == {27'd0, same_col(n, m), same_row(n, m), same_diag(n, m), same_col(n, m), same_row(n, m)},
          "synaptic memory read-back");
    end
    for (int rn = 0; rn < RUNS; rn++) begin
      for (int n = 0; n < NN; n++) begin
        mu[n] = (n < Q*Q) ? -1 - int'($urandom % 8) : -128;
        mv[n] = 0;
        hw(n, 'h200, mu[n]);
      end
      model(mlmin, mst_, mbc, mcyc);
      start = 1; @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      chk(local_min == mlmin, $sformatf("run %0d local_min %0d exp %0d", rn, local_min, mlmin));
      chk(int'(steps) == mst_, $sformatf("run %0d steps %0d exp %0d", rn, steps, mst_));
      chk(int'(bcasts) == mbc, $sformatf("run %0d broadcasts %0d exp %0d", rn, bcasts, mbc));
      chk(cyc == mcyc, $sformatf("run %0d cycles %0d exp %0d", rn, cyc, mcyc));
      for (int n = 0; n < NN; n++) begin
        chk(v_all[n] == mv[n][0], $sformatf("run %0d V[%0d]", rn, n));
        hr(n, 'h200, rd);
        chk(int'($signed(8'(rd))) == mu[n], $sformatf("run %0d U[%0d]=%0d exp %0d", rn, n, $signed(8'(rd)), mu[n]));
        hr(n, 'h201, rd);
        chk(rd[0] == mv[n][0], "status V");
      end
      if (mlmin) n_lmin++; else n_timeout++;
      if (mlmin && is_solution()) n_solved++;
      $display("run %0d: local_min=%0d solution=%0d steps=%0d broadcasts=%0d cycles=%0d",
               rn, local_min, is_solution(), steps, bcasts, cyc);
    end
    $display("multi-way arbitrations %0d, empty rounds %0d, boosted steps %0d, local minima %0d, solutions %0d, time-outs %0d",
             n_multi, n_empty, n_boost, n_lmin, n_solved, n_timeout);
    chk(n_multi > 0, "no multi-way arbitration");
    chk(n_empty > 0, "no empty round");
    chk(n_boost > 0, "no boosted step");
    chk(n_lmin > 0, "no stop on a local minimum");
    chk(n_solved > 0, "no solution found");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
