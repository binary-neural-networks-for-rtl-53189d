// tb_mnn_system: end-to-end test of the maximum neural network engine at its
// default size (31 queens). Each run loads random initial inputs U in
// [-1, 0) row by row, starts the engine and compares the outcome (success or
// time-out, number of sweeps, run time of 2N+1 clocks per sweep, final board)
// with a behavioural model of the same fixed-point algorithm: rows updated in
// order, U' = U/8 + T*V - conflict, T' = T - dT or omega, V = row maximum
// (lowest column on a tie). Found boards are also checked to be N-queens
// solutions. Counts runs that hit the self-feedback going negative, solved
// runs and time-outs, and reports the convergence rate and mean sweeps over
// 100 random starts.
// r, dT, omega, N = 31 and the 100-step limit are the source design's; the
// fixed-point model is this design's.
module tb_mnn_system;
  localparam int N = 31, W = 24, FRAC = 20, DT = 1049, MAXS = 100, RUNS = 100;
  localparam int RW = $clog2(N);

  logic clk = 0, rst_n = 0, init_we = 0, start = 0;
  logic [RW-1:0] init_row = '0;
  logic signed [N-1:0][W-1:0] init_u = '0;
  logic busy, done, success;
  logic [$clog2(MAXS+1)-1:0] steps;
  logic [N*N-1:0] v_mat;
  int checks = 0, failures = 0, n_ok = 0, n_to = 0, n_negt = 0, sum_steps = 0;

  mnn_system dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  int U [N][N], T [N][N], V [N][N];

  function automatic int sat(int x);
    return x > (1 << (W-1)) - 1 ? (1 << (W-1)) - 1 : x < -(1 << (W-1)) ? -(1 << (W-1)) : x;
  endfunction
  function automatic int conflict(int i, int j);
    for (int k = 0; k < N; k++) if (k != i && V[k][j]) return 1;
    for (int k = -N; k <= N; k++) if (k != 0) begin
      if (i+k >= 0 && i+k < N && j+k >= 0 && j+k < N && V[i+k][j+k]) return 1;
      if (i+k >= 0 && i+k < N && j-k >= 0 && j-k < N && V[i+k][j-k]) return 1;
    end
    return 0;
  endfunction
  function automatic bit solved();
    for (int i = 0; i < N; i++) begin
      int q = 0;
      for (int j = 0; j < N; j++) if (V[i][j]) begin q++; if (conflict(i, j)) return 0; end
      if (q != 1) return 0;
    end
    return 1;
  endfunction
  function automatic void set_row_max(int i, int u [N]);
    int b = 0;
    for (int j = 1; j < N; j++) if (u[j] > u[b]) b = j;
    for (int j = 0; j < N; j++) V[i][j] = (j == b);
  endfunction
  task automatic model(output bit ok, output int st, inout bit negt);
    int nu [N], c;
    st = 0;
    forever begin
      if (solved()) begin ok = 1; return; end
      if (st == MAXS) begin ok = 0; return; end
      for (int i = 0; i < N; i++) begin
        for (int j = 0; j < N; j++) begin
          c = conflict(i, j);
          nu[j] = sat((U[i][j] >>> 3) + (V[i][j] ? T[i][j] : 0) - (c ? (1 << FRAC) : 0));
          T[i][j] = V[i][j] ? sat(T[i][j] - DT) : 0;
          if (T[i][j] < 0) negt = 1;
          U[i][j] = nu[j];
        end
        set_row_max(i, nu);
      end
      st++;
    end
  endtask

  initial begin
    int cyc, mst;
    bit mok, negt;
    int row_u [N];
    repeat (3) @(negedge clk); rst_n = 1;
    for (int rn = 0; rn < RUNS; rn++) begin
      for (int i = 0; i < N; i++) begin
        for (int j = 0; j < N; j++) begin
          U[i][j] = -1 - int'($urandom % (1 << FRAC));
          T[i][j] = 0;
          init_u[j] = W'(U[i][j]);
          row_u[j] = U[i][j];
        end
        set_row_max(i, row_u);
        init_we = 1; init_row = RW'(i); @(negedge clk); init_we = 0;
      end
      for (int k = 0; k < N*N; k++) chk(v_mat[k] == V[k/N][k%N][0], "initial board");
      negt = 0;
      model(mok, mst, negt);
      if (negt) n_negt++;
      start = 1; @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      chk(success == mok, $sformatf("run %0d success %0d exp %0d", rn, success, mok));
      chk(int'(steps) == mst, $sformatf("run %0d steps %0d exp %0d", rn, steps, mst));
      chk(cyc == 2 + mst * (2*N + 1), $sformatf("run %0d cycles %0d exp %0d", rn, cyc, 2 + mst*(2*N+1)));
      for (int k = 0; k < N*N; k++) chk(v_mat[k] == V[k/N][k%N][0], $sformatf("run %0d V[%0d]", rn, k));
      if (success) begin
        chk(solved(), "reported board is a solution");
        n_ok++;
      end else n_to++;
      if (success) sum_steps += int'(steps);
      if (rn < 10) $display("run %0d: success=%0d steps=%0d cycles=%0d", rn, success, steps, cyc);
    end
    $display("solved %0d, timed out %0d, runs with negative self-feedback %0d", n_ok, n_to, n_negt);
    $display("convergence %0d of %0d runs, average %0d.%0d sweeps over the solved runs",
             n_ok, RUNS, sum_steps / (n_ok > 0 ? n_ok : 1), (10 * sum_steps / (n_ok > 0 ? n_ok : 1)) % 10);
    chk(n_ok > 0, "no run solved");
    // the source reports 99.9% convergence in about 30 sweeps for this
    // algorithm; a far lower rate would point at a datapath error
    chk(n_ok * 100 >= 90 * RUNS, "convergence rate below 90%");
    chk(n_negt > 0, "self-feedback gain never went negative");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
