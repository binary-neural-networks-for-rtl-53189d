// tb_sa_cell: checks one systolic cell on its own. Random U/V are loaded
// through the chain, random token streams are fed in for N moves, and the
// test checks the token outputs (including the diagonal stop), the ok flag
// and the U/V after the motion-equation update against values computed here.
// Run with N = 5 and short diagonals; the motion equation is the source
// design's, the ring and stop timing this design's.
module tb_sa_cell;
  localparam int N = 5, UW = 7, DL = 3, AL = 5, CW = $clog2(N+1);
  logic clk = 0, rst_n = 0, init = 0, v_in = 0, tok_load = 0, tok_move = 0, upd = 0, c_hi = 0;
  logic signed [UW-1:0] u_in = '0, u_out;
  logic v_out, ok;
  logic [CW-1:0] move_cnt = '0;
  logic tin_row = 0, tin_col = 0, tin_dia = 0, tin_ant = 0;
  logic tout_row, tout_col, tout_dia, tout_ant;
  int checks = 0, failures = 0;

  sa_cell #(.N(N), .U_W(UW), .DIA_LEN(DL), .ANT_LEN(AL)) dut (.*);

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

  int u, v, r, c, d, a, du, nu, nv;
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      u = int'($urandom % 128) - 64; v = $urandom % 2;
      init = 1; u_in = UW'(u); v_in = v[0]; @(negedge clk); init = 0;
      chk(int'(u_out) == u && v_out == v[0], "load");
      tok_load = 1; @(negedge clk); tok_load = 0;
      chk(tout_row == v[0] && tout_col == v[0] && tout_dia == v[0] && tout_ant == v[0], "token load");
      r = 0; c = 0; d = 0; a = 0;
      // bias streams so that sums of 0 and 1 are common
      for (int k = 1; k <= N; k++) begin
        logic pd;
        pd = tout_dia;
        tin_row = ($urandom % 4) == 0; tin_col = ($urandom % 4) == 0;
        tin_dia = ($urandom % 5) == 0; tin_ant = ($urandom % 5) == 0;
        r += tin_row; c += tin_col;
        if (k <= DL-1) d += tin_dia;
        if (k <= AL-1) a += tin_ant;
        tok_move = 1; move_cnt = CW'(k); @(negedge clk);
        chk(tout_row == tin_row && tout_col == tin_col, "row/col token moves");
        chk(tout_dia == ((k <= DL-1) ? tin_dia : pd), $sformatf("diag token at move %0d", k));
      end
      tok_move = 0; move_cnt = '0;
      chk(ok == (r == 1 && c == 1 && (v == 0 || d + a == 0)), $sformatf("ok r=%0d c=%0d d=%0d a=%0d v=%0d", r, c, d, a, v));
      c_hi = $urandom % 2;
      du = -(r-1) - (c-1) - (d+a) + (c_hi ? 4 : 1) * ((r == 0) + (c == 0));
      nu = u + du; if (nu > 63) nu = 63; if (nu < -64) nu = -64;
      nv = (nu > 0) ? 1 : (nu < 0) ? 0 : v;
      upd = 1; @(negedge clk); upd = 0;
      chk(int'(u_out) == nu, $sformatf("U after update %0d exp %0d", u_out, nu));
      chk(v_out == nv[0], "V after update (hysteresis)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
