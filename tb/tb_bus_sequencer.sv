// tb_bus_sequencer: drives the sequencer with a model of the neurons (a
// random number of active neurons per step, an arbitration bus showing the
// inverted ID of a made-up master, and a "not yet stable" line). Checks the
// strobe order GRANT, (ARB, RD, ACC) per broadcast, ARB, UPD, CHECK, the
// buffer's latching of the master ID, the boost schedule t mod 20 < 5, the
// step and broadcast counters, the stop on a local minimum and the time-out.
// The 3a+4 clocks per step are this design's schedule for the source's
// 100 ns arbitration plus 200 ns computation per broadcast.
module tb_bus_sequencer;
  import bnn_pkg::*;
  localparam int MAXS = 30;
  logic clk = 0, rst_n = 0, start = 0, any_part = 0, any_unstable = 1;
  logic [8:0] arb_bus_n = '1, master_id;
  bus_cmd_t cmd;
  logic busy, done, local_min;
  logic [$clog2(MAXS+1)-1:0] steps;
  logic [15:0] bcasts;
  int checks = 0, failures = 0;

  bus_sequencer #(.MAX_STEPS(MAXS)) dut (.*);

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

  task automatic go(int stable_at);
    int t = 0, nb = 0, exp_steps;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    forever begin
      int a = $urandom % 4;
      chk(cmd.grant && busy, "grant");
      chk(cmd.boost == ((t % 20) < 5), $sformatf("boost at t=%0d", t));
      @(negedge clk);
      for (int b = 0; b < a; b++) begin
        int id = $urandom % 512;
        any_part = 1; arb_bus_n = ~9'(id); #1;
        chk(cmd.take && !cmd.rd && !cmd.upd, "take during arbitration");
        @(negedge clk); any_part = 0; arb_bus_n = '1;
        chk(cmd.rd && int'(master_id) == id, "memory read at latched master ID");
        @(negedge clk);
        chk(cmd.acc, "count strobe");
        @(negedge clk);
        nb++;
      end
      #1; chk(!cmd.take && !cmd.upd, "empty arbitration ends the round");
      @(negedge clk);
      chk(cmd.upd, "update strobe");
      any_unstable = (t != stable_at);
      @(negedge clk);
      t++;
      chk(int'(steps) == t, "step counter");
      @(negedge clk);
      any_unstable = 1;
      if (t - 1 == stable_at || t == MAXS) break;
    end
    exp_steps = (stable_at < MAXS) ? stable_at + 1 : MAXS;
    chk(done && !busy, "done");
    chk(local_min == (stable_at < MAXS), "local minimum flag");
    chk(int'(steps) == exp_steps && int'(bcasts) == nb, "counters at the end");
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    go(0); go(4); go(22); go(1000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
