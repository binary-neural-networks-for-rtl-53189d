// tb_mnn_proc_unit: random fixed-point states through one processing unit,
// compared with U' = floor(U/8) + T*V - c and T' = T - dT (V = 1) or 0, with
// saturation at the 24-bit limits (Q3.20, one = 2^20, dT = 1049 LSB).
// r = 1/8 and dT ~ 0.001 are the source design's; the Q3.20 format is this
// design's.
module tb_mnn_proc_unit;
  localparam int W = 24, ONE = 1 << 20, DT = 1049;
  localparam int MAXV = (1 << (W-1)) - 1, MINV = -(1 << (W-1));
  logic signed [W-1:0] u, t, u_n, t_n;
  logic v, c;
  int checks = 0, failures = 0;

  mnn_proc_unit dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic int sat(int x);
    return x > MAXV ? MAXV : x < MINV ? MINV : x;
  endfunction
  initial begin
    int eu, et, uu, tt;
    for (int it = 0; it < 20000; it++) begin
      uu = (it % 10 == 0) ? int'($urandom % (1 << W)) + MINV : int'($urandom % (4 * ONE)) - 2 * ONE;
      tt = (it % 10 == 1) ? MINV : (it % 10 == 2) ? MAXV : int'($urandom % (4 * ONE)) - 3 * ONE;
      u = W'(uu); t = W'(tt); v = $urandom % 2; c = $urandom % 2;
      #1;
      eu = sat(((uu - (((uu % 8) + 8) % 8)) / 8) + (v ? tt : 0) - (c ? ONE : 0));
      et = v ? sat(tt - DT) : 0;
      checks++;
      if (int'(u_n) != eu || int'(t_n) != et) begin
        failures++;
        $display("FAIL u=%0d t=%0d v=%0d c=%0d: u'=%0d t'=%0d exp %0d %0d", uu, tt, v, c, u_n, t_n, eu, et);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
