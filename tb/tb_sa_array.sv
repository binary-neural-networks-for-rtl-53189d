// tb_sa_array: checks the 9 x 9 systolic array with its interconnect, driven
// directly (no sequencer). Arbitrary U and V patterns, including known
// 9-queens solutions and near-solutions, are shifted in; after the token load
// and N moves `all_ok` must match the solution test of the reference model,
// and after one update every square's V and U must match one model step.
// The ring wiring checked is this design's reading of the source's
// eight-neighbour array.
module tb_sa_array;
  import tb_sa_ref_pkg::*;
  localparam int N = 9, UW = 7, CW = $clog2(N+1);
  logic clk = 0, rst_n = 0, init = 0, v_in = 0, tok_load = 0, tok_move = 0, upd = 0, c_hi = 0;
  logic signed [UW-1:0] u_in = '0, u_out;
  logic v_out, all_ok;
  logic [CW-1:0] move_cnt = '0;
  logic [N*N-1:0] v_mat;
  int checks = 0, failures = 0, n_ok = 0;

  sa_array #(.N(N), .U_W(UW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  int sol [N] = '{0, 2, 5, 7, 1, 3, 8, 6, 4};
  mat_t u, v;

  task automatic one(mat_t uu, mat_t vv, bit chi);
    @(negedge clk); init = 1;
    for (int p = 0; p < N*N; p++) begin
      automatic int k = N*N-1-p;
      u_in = UW'(uu[k/N][k%N]); v_in = vv[k/N][k%N][0];
      @(negedge clk);
    end
    init = 0;
    for (int k = 0; k < N*N; k++) chk(v_mat[k] == vv[k/N][k%N][0], "loaded V");
    tok_load = 1; @(negedge clk); tok_load = 0;
    for (int k = 1; k <= N; k++) begin tok_move = 1; move_cnt = CW'(k); @(negedge clk); end
    tok_move = 0;
    chk(all_ok == solved(N, vv), $sformatf("all_ok %0d exp %0d", all_ok, solved(N, vv)));
    if (all_ok) n_ok++;
    c_hi = chi; upd = 1; @(negedge clk); upd = 0;
    step(N, UW, chi, uu, vv);
    for (int k = 0; k < N*N; k++) chk(v_mat[k] == vv[k/N][k%N][0], $sformatf("V[%0d] after update", k));
    init = 1;
    for (int p = 0; p < N*N; p++) begin
      automatic int k = N*N-1-p;
      chk(int'(u_out) == uu[k/N][k%N], $sformatf("U[%0d] after update", k));
      @(negedge clk);
    end
    init = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) begin
        u[i][j] = int'($urandom % 40) - 20;
        v[i][j] = 0;
      end
      case (t % 4)
        0: for (int i = 0; i < N; i++) v[i][sol[i]] = 1;                 // a solution
        1: begin for (int i = 0; i < N; i++) v[i][sol[i]] = 1;           // solution + extra queen
                 v[$urandom % N][$urandom % N] = 1; end
        2: for (int i = 0; i < N; i++) v[i][sol[(i + t) % N]] = 1;       // permutation, mostly attacked
        default: for (int i = 0; i < N; i++) for (int j = 0; j < N; j++) v[i][j] = ($urandom % 6) == 0;
      endcase
      one(u, v, t[0]);
    end
    chk(n_ok > 0, "no solution pattern recognised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
