// tb_mnn_ctrl: checks the row schedule of the maximum-network controller:
// an initial check, then per sweep N read/write pairs with rows 0..N-1 in
// order and one check; stop with success when `solved` is high at a check,
// or after MAX_STEPS sweeps without it.
// The 100-step limit is the source design's; the 2N+1-clock sweep is this
// design's schedule. Run here with N = 5 and 12 steps to keep it short.
module tb_mnn_ctrl;
  localparam int N = 5, MAXS = 12;
  logic clk = 0, rst_n = 0, start = 0, solved = 0;
  logic [2:0] row;
  logic row_we, busy, done, success;
  logic [$clog2(MAXS+1)-1:0] steps;
  int checks = 0, failures = 0;

  mnn_ctrl #(.N(N), .MAX_STEPS(MAXS)) dut (.*);

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

  task automatic go(int sol_at);
    int s = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    forever begin
      // check cycle
      chk(busy && !row_we, "check cycle");
      solved = (s == sol_at);
      @(negedge clk); solved = 0;
      if (s == sol_at || s == MAXS) break;
      for (int i = 0; i < N; i++) begin
        chk(!row_we && int'(row) == i, $sformatf("read of row %0d", i));
        @(negedge clk);
        chk(row_we && int'(row) == i, $sformatf("write of row %0d", i));
        @(negedge clk);
      end
      s++;
      chk(int'(steps) == s, "sweep counter");
    end
    chk(done && !busy, "done");
    chk(success == (sol_at <= MAXS), "success flag");
    chk(int'(steps) == ((sol_at <= MAXS) ? sol_at : MAXS), "steps");
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    go(0); go(3); go(MAXS); go(99);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
