// tb_mnn_pe: exhaustive check of one logical-synapse PE: for both stored
// outputs and all 64 combinations of cascade inputs it checks the conflict
// bit (OR of the six inputs, own V excluded) and the six cascade outputs
// (own V OR the matching input); also checks the DFF write enable.
// The OR synapse is the source design's; the cascade ports are this design's.
module tb_mnn_pe;
  logic clk = 0, rst_n = 0, v_we = 0, v_d = 0, v;
  logic [5:0] in;
  logic col_to_dn, col_to_up, dia_to_dn, dia_to_up, ant_to_dn, ant_to_up, conflict;
  int checks = 0, failures = 0;

  mnn_pe dut (.clk, .rst_n, .v_we, .v_d, .v,
    .col_from_up(in[0]), .col_from_dn(in[1]), .dia_from_up(in[2]), .dia_from_dn(in[3]),
    .ant_from_up(in[4]), .ant_from_dn(in[5]),
    .col_to_dn, .col_to_up, .dia_to_dn, .dia_to_up, .ant_to_dn, .ant_to_up, .conflict);

  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(bit c, string m);
    checks++; if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  initial begin
    in = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int vv = 0; vv < 2; vv++) begin
      v_d = vv[0]; v_we = 1; @(negedge clk); v_we = 0;
      v_d = !vv[0]; @(negedge clk);
      chk(v == vv[0], "DFF holds without write enable");
      for (int k = 0; k < 64; k++) begin
        in = 6'(k); #1;
        chk(conflict == (in != 0), "conflict = OR of other neurons");
        chk(col_to_dn == (v | in[0]) && col_to_up == (v | in[1]), "column cascades");
        chk(dia_to_dn == (v | in[2]) && dia_to_up == (v | in[3]), "diagonal cascades");
        chk(ant_to_dn == (v | in[4]) && ant_to_up == (v | in[5]), "anti-diagonal cascades");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
