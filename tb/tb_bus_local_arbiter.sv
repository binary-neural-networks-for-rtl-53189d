// tb_bus_local_arbiter: six local arbiters with random distinct IDs share a
// wired-OR arbitration bus modelled here. For random sets of active neurons
// the test checks that each arbitration picks the largest participating ID
// (the bus then equals that ID), that exactly that arbiter reports `win`, and
// that after `take` the round continues with the next smaller ID until
// nobody participates.
// Largest-ID-wins is the source design's rule; the scenario is this test's.
module tb_bus_local_arbiter;
  localparam int K = 6, ID_W = 9;
  logic clk = 0, rst_n = 0, grant = 0, take = 0;
  logic [ID_W-1:0] my_id [K];
  logic [K-1:0] v = '0, win, part;
  logic [ID_W-1:0] drive [K];
  logic [ID_W-1:0] bus_or;
  int checks = 0, failures = 0;

  always_comb begin
    bus_or = '0;
    for (int k = 0; k < K; k++) bus_or |= drive[k];
  end
  for (genvar k = 0; k < K; k++) begin : g_a
    bus_local_arbiter dut (.clk, .rst_n, .my_id(my_id[k]), .v(v[k]), .grant, .take,
                           .bus_or, .drive(drive[k]), .win(win[k]), .part(part[k]));
  end

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
    bit used [2**ID_W];
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      int prev;
      foreach (used[a]) used[a] = 0;
      for (int k = 0; k < K; k++) begin
        int a;
        do a = $urandom % 2**ID_W; while (used[a]);
        used[a] = 1; my_id[k] = ID_W'(a);
      end
      v = K'($urandom);
      grant = 1; @(negedge clk); grant = 0;
      chk(part == v, "grant gives the right to active neurons only");
      prev = 2**ID_W;
      for (int r = 0; r <= K; r++) begin
        int best, bk;
        best = -1; bk = -1;
        for (int k = 0; k < K; k++) if (part[k] && int'(my_id[k]) > best) begin best = my_id[k]; bk = k; end
        #1;
        if (best < 0) begin
          chk(bus_or == '0 && win == '0, "idle bus when nobody participates");
          break;
        end
        chk(int'(bus_or) == best, $sformatf("bus %0d exp %0d", bus_or, best));
        chk(win == K'(1 << bk), "only the largest ID wins");
        chk(best < prev, "masters in descending ID order");
        prev = best;
        take = 1; @(negedge clk); take = 0;
        chk(!part[bk], "winner loses its right after take");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
