// tb_bus_term_unit: programs random coefficients, offsets and modes into a
// term-generation unit, feeds it random broadcast sequences and checks the
// term (linear, hill-climbing, boosted coefficient, saturation) against the
// formula computed here.
// The term formulas checked are this design's (see bus_term_unit).
module tb_bus_term_unit;
  import bnn_pkg::*;
  logic clk = 0, rst_n = 0, cfg_we = 0, clr = 0, acc = 0, conn = 0, boost = 0;
  treg_e cfg_sel = TREG_COEF_LO;
  logic [7:0] cfg_wdata = '0;
  logic signed [7:0] term;
  int checks = 0, failures = 0;

  bus_term_unit dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic wr(treg_e r, int d);
    cfg_sel = r; cfg_wdata = 8'(d); cfg_we = 1; @(negedge clk); cfg_we = 0;
  endtask

  initial begin
    int lo, hi, off, hill, cnt, n, exp_t, c;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 400; it++) begin
      lo  = (it % 3 == 0) ? int'($urandom % 256) - 128 : int'($urandom % 9) - 4;
      hi  = int'($urandom % 9) - 4;
      off = int'($urandom % 5) - 1;
      hill = $urandom % 2;
      wr(TREG_COEF_LO, lo); wr(TREG_COEF_HI, hi); wr(TREG_OFFSET, off); wr(TREG_MODE, hill);
      clr = 1; @(negedge clk); clr = 0;
      cnt = 0; n = $urandom % 8;
      for (int k = 0; k < n; k++) begin
        conn = $urandom % 2; acc = 1; if (conn) cnt++;
        @(negedge clk); acc = 0;
        conn = $urandom % 2; @(negedge clk);   // conn without acc must not count
      end
      for (int b = 0; b < 2; b++) begin
        boost = b[0]; #1;
        c = b ? hi : lo;
        exp_t = hill ? (cnt == 0 ? c : 0) : c * (cnt - off);
        if (exp_t > 127) exp_t = 127;
        if (exp_t < -128) exp_t = -128;
        checks++;
        if (int'(term) != exp_t) begin
          failures++; $display("FAIL lo=%0d hi=%0d off=%0d hill=%0d cnt=%0d boost=%0d: %0d exp %0d", lo, hi, off, hill, cnt, b, term, exp_t);
        end
      end
      boost = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
