// tb_sa_system: end-to-end test of the systolic N-queens engine at its
// default size (9 x 9). For a series of random negative initial inputs it
// shifts the values in through the load chain, starts the engine, and
// compares the outcome (solved or timed out, number of updates, final queen
// pattern, final U read back through the chain) with the behavioural model
// in tb_sa_ref_pkg. It also checks the run time of N+2 clocks per iteration.
// The 500-step limit and 9 x 9 size are the source design's.
module tb_sa_system;
  import tb_sa_ref_pkg::*;
  localparam int N = 9, UW = 7, MAXS = 500, RUNS = 12;

  logic clk = 0, rst_n = 0, init = 0, start = 0;
  logic signed [UW-1:0] u_in = '0, u_out;
  logic v_out, busy, done, solved;
  logic [$clog2(MAXS+1)-1:0] steps;
  logic [N*N-1:0] v_mat;
  int checks = 0, failures = 0, n_solved = 0, n_timeout = 0;

  sa_system dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  mat_t u0, v0, mu, mv;
  bit mok; int msteps, cyc;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int rn = 0; rn < RUNS; rn++) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          u0[i][j] = -1 - int'($urandom % 8);
          v0[i][j] = 0;
        end
      // shift in: the first value shifted ends at square (N-1,N-1)
      @(negedge clk);
      init = 1;
      for (int p = 0; p < N*N; p++) begin
        automatic int k = N*N-1-p;
        u_in = UW'(u0[k/N][k%N]);
        @(negedge clk);
      end
      init = 0;
      mu = u0; mv = v0;
      run(N, UW, MAXS, mu, mv, mok, msteps);
      start = 1; @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      chk(solved == mok, $sformatf("run %0d solved %0d exp %0d", rn, solved, mok));
      chk(int'(steps) == msteps, $sformatf("run %0d steps %0d exp %0d", rn, steps, msteps));
      chk(cyc == (msteps + 1) * (N + 2) + 1, $sformatf("run %0d cycles %0d exp %0d", rn, cyc, (msteps+1)*(N+2)+1));
      for (int k = 0; k < N*N; k++)
        chk(v_mat[k] == mv[k/N][k%N][0], $sformatf("run %0d V[%0d]", rn, k));
      if (mok) n_solved++; else n_timeout++;
      // read back through the chain, square (N-1,N-1) first
      init = 1;
      for (int p = 0; p < N*N; p++) begin
        automatic int k = N*N-1-p;
        chk(int'(u_out) == mu[k/N][k%N], $sformatf("run %0d readback U[%0d]=%0d exp %0d", rn, k, u_out, mu[k/N][k%N]));
        @(negedge clk);
      end
      init = 0;
      $display("run %0d: solved=%0d steps=%0d cycles=%0d", rn, solved, steps, cyc);
    end
    $display("solved runs %0d, timed-out runs %0d", n_solved, n_timeout);
    chk(n_solved > 0, "no run reached a solution");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
