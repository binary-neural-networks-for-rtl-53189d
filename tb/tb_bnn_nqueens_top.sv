// tb_bnn_nqueens_top: end-to-end test of the top level at its default sizes,
// with the three engines working at the same time:
//  * bus-connected network (40 neurons) on 6 queens, configured over the host
//    buses;
//  * systolic array (9 x 9) on 9 queens, loaded through the serial chain;
//  * maximum neural network (31 x 31) on 31 queens, loaded row by row.
// Each engine runs several random initial states. Checks made independently
// of the RTL: every board reported as solved is a valid N-queens solution;
// run times follow the documented schedules (bus: 4 clocks per step plus 3 per
// broadcast; systolic: N+2 per step; maximum network: 2N+1 per sweep); U read
// back from the systolic chain and the bus neurons agrees with the output V.
// It also counts that each mechanism occurred: multi-way bus arbitration,
// empty broadcast rounds, boosted hill-climbing steps, stops on a local
// minimum, systolic solutions and time-outs, diagonal stop events,
// maximum-network solutions and negative self-feedback gains.
// The problem sizes (6, 9 and 31 queens) are those of the source design's
// three prototypes; the seeds, run counts and checks are this testbench's.
module tb_bnn_nqueens_top;
  import bnn_pkg::*;
  localparam int Q = 6, NN = 40;
  localparam int SN = 9, MN = 31, MW = 24;

  logic clk = 0, rst_n = 0;
  logic [BUS_ID_W-1:0] bus_h_naddr = '0;
  logic [BUS_LA_W-1:0] bus_h_laddr = '0;
  logic [BUS_DATA_W-1:0] bus_h_wdata = '0, bus_h_rdata;
  logic bus_h_we = 0, bus_start = 0, bus_busy, bus_done, bus_local_min;
  logic [8:0] bus_steps;
  logic [15:0] bus_bcasts;
  logic [NN-1:0] bus_v;
  logic [BUS_ID_W-1:0] bus_arb_n;
  logic sa_init = 0, sa_start = 0, sa_v_out, sa_busy, sa_done, sa_solved;
  logic signed [6:0] sa_u_in = '0, sa_u_out;
  logic [8:0] sa_steps;
  logic [SN*SN-1:0] sa_leds;
  logic mnn_init_we = 0, mnn_start = 0, mnn_busy, mnn_done, mnn_success;
  logic [4:0] mnn_init_row = '0;
  logic signed [MN-1:0][MW-1:0] mnn_init_u = '0;
  logic [6:0] mnn_steps;
  logic [MN*MN-1:0] mnn_board;

  int checks = 0, failures = 0;
  int ev_multi = 0, ev_empty = 0, ev_boost = 0, ev_lmin = 0, ev_bus_sol = 0;
  int ev_sa_sol = 0, ev_sa_to = 0, ev_stop = 0, ev_mnn_sol = 0, ev_negt = 0;

  bnn_nqueens_top dut (.*);

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

  // ---- mechanism monitors (observation only) -------------------------------
  always @(posedge clk) if (rst_n) begin
    if (dut.u_bus.cmd.grant && $countones(bus_v) >= 2) ev_multi++;
    if (dut.u_bus.cmd.grant && bus_v == '0) ev_empty++;
    if (dut.u_bus.cmd.upd && dut.u_bus.cmd.boost) ev_boost++;
    if (dut.u_sa.tok_move && dut.u_sa.u_array.g_r[0].g_c[SN-1].u_cell.stop_dia == 1'b0
        && int'(dut.u_sa.move_cnt) == 1) ev_stop++;   // length-1 diagonal never moves
    if (dut.u_sa.tok_move && !dut.u_sa.u_array.g_r[1].g_c[0].u_cell.stop_dia
        && int'(dut.u_sa.move_cnt) == SN - 2) ev_stop++;   // stops after N-2 moves
    if (dut.u_mnn.row_we) for (int j = 0; j < MN; j++) if ($signed(dut.u_mnn.nt[j]) < 0) begin ev_negt++; break; end
  end

  // generic N-queens check of a board given as a bit vector
  function automatic bit queens_ok(int n, logic [MN*MN-1:0] b);
    for (int i = 0; i < n; i++) begin
      int r = 0, c = 0;
      for (int j = 0; j < n; j++) begin r += b[i*n+j]; c += b[j*n+i]; end
      if (r != 1 || c != 1) return 0;
    end
    for (int i1 = 0; i1 < n; i1++) for (int j1 = 0; j1 < n; j1++) if (b[i1*n+j1])
      for (int i2 = i1+1; i2 < n; i2++) for (int j2 = 0; j2 < n; j2++) if (b[i2*n+j2])
        if (i2 - i1 == j2 - j1 || i2 - i1 == j1 - j2) return 0;
    return 1;
  endfunction

  // ---- bus-connected engine ----------------------------------------------
  task automatic bw(int n, int la, int d);
    @(negedge clk);
    bus_h_naddr = BUS_ID_W'(n); bus_h_laddr = BUS_LA_W'(la); bus_h_wdata = 8'(d); bus_h_we = 1;
    @(negedge clk); bus_h_we = 0;
  endtask
  function automatic int conn(int n, int m);
    bit r = n/Q == m/Q, c = n%Q == m%Q;
    bit d = n != m && ((n/Q - n%Q) == (m/Q - m%Q) || (n/Q + n%Q) == (m/Q + m%Q));
    return {c, r, d, c, r};
  endfunction
  task automatic run_bus();
    for (int n = 0; n < NN; n++) begin
      for (int m = 0; m < NN; m++) bw(n, m, (n < Q*Q && m < Q*Q) ? conn(n, m) : 0);
      if (n < Q*Q) begin
        bw(n, 'h210, -1); bw(n, 'h211, -1); bw(n, 'h212, 1); bw(n, 'h213, 0);
        bw(n, 'h214, -1); bw(n, 'h215, -1); bw(n, 'h216, 1); bw(n, 'h217, 0);
        bw(n, 'h218, -1); bw(n, 'h219, -1); bw(n, 'h21a, 0); bw(n, 'h21b, 0);
        bw(n, 'h21c, 1);  bw(n, 'h21d, 4);  bw(n, 'h21e, 0); bw(n, 'h21f, 1);
        bw(n, 'h220, 1);  bw(n, 'h221, 4);  bw(n, 'h222, 0); bw(n, 'h223, 1);
      end
    end
    for (int rn = 0; rn < 8; rn++) begin
      int cyc;
      logic [MN*MN-1:0] b;
      for (int n = 0; n < NN; n++) bw(n, 'h200, (n < Q*Q) ? -1 - int'($urandom % 8) : -128);
      @(negedge clk); bus_start = 1; @(negedge clk); bus_start = 0; cyc = 1;
      while (!bus_done) begin @(negedge clk); cyc++; end
      chk(cyc == 1 + 4*int'(bus_steps) + 3*int'(bus_bcasts),
          $sformatf("bus run %0d: %0d clocks for %0d steps, %0d broadcasts", rn, cyc, bus_steps, bus_bcasts));
      b = '0;
      for (int n = 0; n < Q*Q; n++) b[n] = bus_v[n];
      chk(bus_v[NN-1:Q*Q] == '0, "unused bus neurons stay inactive");
      for (int n = 0; n < Q*Q; n += 7) begin
        bus_h_naddr = BUS_ID_W'(n); bus_h_laddr = 10'h200; @(negedge clk);
        chk(($signed(bus_h_rdata) > 0) == bus_v[n], "bus U read-back agrees with V");
      end
      if (bus_local_min) ev_lmin++;
      if (bus_local_min && queens_ok(Q, b)) ev_bus_sol++;
      chk(bus_local_min || int'(bus_steps) == 500, "bus stops only on local minimum or time-out");
      $display("bus run %0d: local_min=%0d solution=%0d steps=%0d", rn, bus_local_min, queens_ok(Q, b), bus_steps);
    end
  endtask

  // ---- systolic engine -------------------------------------------------------
  task automatic run_sa();
    logic [SN*SN-1:0] snap;
    for (int rn = 0; rn < 8; rn++) begin
      int cyc;
      @(negedge clk); sa_init = 1;
      for (int p = 0; p < SN*SN; p++) begin sa_u_in = 7'(-1 - int'($urandom % 8)); @(negedge clk); end
      sa_init = 0;
      sa_start = 1; @(negedge clk); sa_start = 0; cyc = 1;
      while (!sa_done) begin @(negedge clk); cyc++; end
      chk(cyc == (int'(sa_steps) + 1) * (SN + 2) + 1, $sformatf("systolic run %0d: %0d clocks", rn, cyc));
      snap = sa_leds;
      if (sa_solved) begin chk(queens_ok(SN, {{(MN*MN-SN*SN){1'b0}}, snap}), "systolic solution valid"); ev_sa_sol++; end
      else begin chk(int'(sa_steps) == 500, "systolic time-out at 500"); ev_sa_to++; end
      snap = sa_leds;
      sa_init = 1;
      for (int p = 0; p < SN*SN; p++) begin
        automatic int k = SN*SN-1-p;
        chk(sa_v_out == snap[k] && (sa_u_out > 0 ? sa_v_out : 1'b1) && (sa_u_out < 0 ? !sa_v_out : 1'b1),
            "systolic read-back U/V consistent");
        @(negedge clk);
      end
      sa_init = 0;
      $display("systolic run %0d: solved=%0d steps=%0d", rn, sa_solved, sa_steps);
    end
  endtask

  // ---- maximum neural network engine -------------------------------------------
  task automatic run_mnn();
    for (int rn = 0; rn < 4; rn++) begin
      int cyc;
      for (int i = 0; i < MN; i++) begin
        @(negedge clk);
        for (int j = 0; j < MN; j++) mnn_init_u[j] = MW'(-1 - int'($urandom % (1 << 20)));
        mnn_init_we = 1; mnn_init_row = 5'(i);
        @(negedge clk); mnn_init_we = 0;
      end
      for (int i = 0; i < MN; i++) chk($countones(mnn_board[i*MN +: MN]) == 1, "one queen per row after load");
      mnn_start = 1; @(negedge clk); mnn_start = 0; cyc = 1;
      while (!mnn_done) begin @(negedge clk); cyc++; end
      chk(cyc == 2 + int'(mnn_steps) * (2*MN + 1), $sformatf("mnn run %0d: %0d clocks", rn, cyc));
      chk(mnn_success == queens_ok(MN, mnn_board), "mnn success flag matches board check");
      if (mnn_success) ev_mnn_sol++;
      else chk(int'(mnn_steps) == 100, "mnn time-out at 100 sweeps");
      $display("mnn run %0d: success=%0d steps=%0d", rn, mnn_success, mnn_steps);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    fork
      run_bus();
      run_sa();
      run_mnn();
    join
    $display("events: bus multi-way arbitration %0d, empty rounds %0d, boosted steps %0d, local minima %0d, bus solutions %0d",
             ev_multi, ev_empty, ev_boost, ev_lmin, ev_bus_sol);
    $display("        systolic solutions %0d, time-outs %0d, diagonal stops %0d, mnn solutions %0d, negative gains %0d",
             ev_sa_sol, ev_sa_to, ev_stop, ev_mnn_sol, ev_negt);
    chk(ev_multi > 0, "multi-way arbitration never happened");
    chk(ev_empty > 0, "empty round never happened");
    chk(ev_boost > 0, "boosted step never happened");
    chk(ev_lmin > 0, "bus local minimum never happened");
    chk(ev_bus_sol > 0, "bus solution never happened");
    chk(ev_sa_sol > 0, "systolic solution never happened");
    chk(ev_sa_to > 0, "systolic time-out never happened");
    chk(ev_stop > 0, "diagonal stop never exercised");
    chk(ev_mnn_sol > 0, "mnn solution never happened");
    chk(ev_negt > 0, "negative self-feedback gain never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
