// tb_sa_table1: the N^2-parallel update mode, as the systolic array computes
// it, on the two smallest board sizes of the source design's convergence
// table: 8 and 10 queens, 100 random starts each, 500-step limit. Both
// engines run at the same time (two tb_sa_table1_run instances), each
// checked run by run against the behavioural model and the N+2 clocks per
// step. Prints the convergence rate and mean steps next to the published
// software figures for this mode (54% in 66 steps at N = 8, 26% in 88 steps
// at N = 10); those are not checked, because this array's hysteresis
// thresholds and U saturation are its own choices. Requires only that some
// runs converge at each size.
module tb_sa_table1;
  logic clk = 0, rst_n = 0;
  int c8, f8, s8, st8, c10, f10, s10, st10;
  bit fin8, fin10;
  int checks, failures;

  tb_sa_table1_run #(.N(8),  .RUNS(100)) u_n8  (.clk, .rst_n, .checks(c8),  .failures(f8),
                                                .n_solved(s8),  .sum_steps(st8),  .fin(fin8));
  tb_sa_table1_run #(.N(10), .RUNS(100)) u_n10 (.clk, .rst_n, .checks(c10), .failures(f10),
                                                .n_solved(s10), .sum_steps(st10), .fin(fin10));

  always #5 clk = ~clk;
  initial begin
    repeat (3_000_000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c8 + c10, f8 + f10 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (fin8 && fin10);
    checks = c8 + c10 + 2;
    failures = f8 + f10;
    if (s8 == 0)  begin failures++; $display("FAIL: no 8-queens run converged"); end
    if (s10 == 0) begin failures++; $display("FAIL: no 10-queens run converged"); end
    $display("N=8 : %0d of 100 converged, mean %0d steps (published software figure 54%%, 66 steps)",
             s8, st8 / (s8 > 0 ? s8 : 1));
    $display("N=10: %0d of 100 converged, mean %0d steps (published software figure 26%%, 88 steps)",
             s10, st10 / (s10 > 0 ? s10 : 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
