// tb_sa_table1_run: helper of tb_sa_table1. Runs one systolic engine of size
// N on RUNS random starts (initial U uniform in -8..-1, V = 0, loaded through
// the serial chain), with the source design's 500-step limit. Every run is
// compared with the behavioural model of tb_sa_ref_pkg (solved or not, number
// of updates, final board) and its clock count with (steps+1)(N+2)+1; solved
// boards are checked to be N-queens solutions. Reports the solved count and
// the summed updates of the solved runs; `fin` rises when all runs are done.
// The stimulus and the model are this testbench's own.
module tb_sa_table1_run import tb_sa_ref_pkg::*; #(
  parameter int N    = 8,
  parameter int RUNS = 100
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   n_solved,
  output int   sum_steps,
  output bit   fin
);
  localparam int UW = 7, MAXS = 500;
  logic init = 0, start = 0;
  logic signed [UW-1:0] u_in = '0, u_out;
  logic v_out, busy, done, solved;
  logic [$clog2(MAXS+1)-1:0] steps;
  logic [N*N-1:0] v_mat;

  sa_system #(.N(N), .U_W(UW), .MAX_STEPS(MAXS)) dut (.*);

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL N=%0d: %s", N, msg); end
  endtask

  mat_t u0, mu, mv;
  bit mok;
  int msteps, cyc;

  initial begin
    checks = 0; failures = 0; n_solved = 0; sum_steps = 0; fin = 0;
    @(posedge rst_n);
    for (int rn = 0; rn < RUNS; rn++) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          u0[i][j] = -1 - int'($urandom % 8);
          mv[i][j] = 0;
        end
      @(negedge clk);
      init = 1;
      for (int p = 0; p < N*N; p++) begin
        automatic int k = N*N-1-p;
        u_in = UW'(u0[k/N][k%N]);
        @(negedge clk);
      end
      init = 0;
      mu = u0;
      run(N, UW, MAXS, mu, mv, mok, msteps);
      start = 1; @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      chk(solved == mok && int'(steps) == msteps,
          $sformatf("run %0d: solved %0d steps %0d, model %0d %0d", rn, solved, steps, mok, msteps));
      chk(cyc == (msteps + 1) * (N + 2) + 1, $sformatf("run %0d: %0d clocks", rn, cyc));
      for (int k = 0; k < N*N; k++)
        chk(v_mat[k] == mv[k/N][k%N][0], $sformatf("run %0d V[%0d]", rn, k));
      if (solved) begin
        chk(tb_sa_ref_pkg::solved(N, mv), "reported board is a solution");
        n_solved++;
        sum_steps += int'(steps);
      end
    end
    fin = 1;
  end
endmodule
