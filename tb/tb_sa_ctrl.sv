// tb_sa_ctrl: checks the systolic sequencer alone. It counts the load, move
// and update strobes of each iteration, the move index, the hill-climbing
// schedule (C = 4 for t mod 20 < 5), the stop on a solution at a chosen step
// and the time-out after MAX_STEPS updates.
// The hill-climbing schedule is the source design's; the N+2-clock step is
// this design's. Run with N = 4 and 45 steps.
module tb_sa_ctrl;
  localparam int N = 4, MAXS = 45, CW = $clog2(N+1);
  logic clk = 0, rst_n = 0, start = 0, all_ok = 0;
  logic tok_load, tok_move, upd, c_hi, busy, done, solved;
  logic [CW-1:0] move_cnt;
  logic [$clog2(MAXS+1)-1:0] steps;
  int checks = 0, failures = 0;

  sa_ctrl #(.N(N), .MAX_STEPS(MAXS)) dut (.*);

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

  // run until done; all_ok is raised in the check cycle of iteration `sol_at`
  task automatic go(int sol_at);
    int t, loads, moves, mv;
    t = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) begin
      chk(tok_load, $sformatf("load at t=%0d", t));
      @(negedge clk);
      for (int k = 1; k <= N; k++) begin
        chk(tok_move && int'(move_cnt) == k && !upd, $sformatf("move %0d", k));
        @(negedge clk);
      end
      all_ok = (t == sol_at);
      #1;
      chk(upd == (t != sol_at && t != MAXS), $sformatf("upd strobe t=%0d", t));
      chk(c_hi == ((t % 20) < 5), $sformatf("c_hi t=%0d", t));
      @(negedge clk);
      all_ok = 0;
      if (t == sol_at || t == MAXS) break;
      t++;
    end
    chk(done && !busy, "done");
    chk(solved == (sol_at <= MAXS), "solved flag");
    chk(int'(steps) == ((sol_at <= MAXS) ? sol_at : MAXS), "steps");
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    go(0);
    go(7);
    go(26);
    go(MAXS + 10);  // never solved: time-out
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
