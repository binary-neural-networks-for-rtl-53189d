// tb_mnn_neuron_array: fills an 8 x 8 array with random boards (one queen per
// row, sometimes a known solution, sometimes empty rows), then for every row
// compares the conflict bits with a direct column/diagonal scan and checks
// the solved flag.
// Run at N = 8, a size of the source's simulations; the board patterns are
// this test's.
module tb_mnn_neuron_array;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, row_we = 0;
  logic [2:0] row_sel = '0;
  logic [N-1:0] row_v = '0, row_conflict;
  logic [N*N-1:0] v_mat;
  logic solved;
  int checks = 0, failures = 0, n_sol = 0;

  mnn_neuron_array #(.N(N)) dut (.*);

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

  int B [N][N];
  int sol [N] = '{0, 4, 7, 5, 2, 6, 1, 3};
  function automatic int conf(int i, int j);
    for (int k = 0; k < N; k++) if (k != i && B[k][j]) return 1;
    for (int k = -N; k <= N; k++) if (k != 0) begin
      if (i+k >= 0 && i+k < N && j+k >= 0 && j+k < N && B[i+k][j+k]) return 1;
      if (i+k >= 0 && i+k < N && j-k >= 0 && j-k < N && B[i+k][j-k]) return 1;
    end
    return 0;
  endfunction

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int it = 0; it < 300; it++) begin
      bit es;
      es = 1;
      for (int i = 0; i < N; i++) begin
        for (int j = 0; j < N; j++) B[i][j] = 0;
        if (it % 5 == 0)       B[i][sol[i]] = 1;
        else if (it % 7 != 1)  B[i][$urandom % N] = 1;
        for (int j = 0; j < N; j++) row_v[j] = B[i][j][0];
        row_sel = 3'(i); row_we = 1; @(negedge clk); row_we = 0;
      end
      for (int i = 0; i < N; i++) begin
        automatic int q = 0;
        row_sel = 3'(i); #1;
        for (int j = 0; j < N; j++) begin
          chk(row_conflict[j] == conf(i, j)[0], $sformatf("conflict (%0d,%0d)", i, j));
          chk(v_mat[i*N+j] == B[i][j][0], "stored V");
          q += B[i][j];
          if (B[i][j] && conf(i, j)) es = 0;
        end
        if (q == 0) es = 0;
      end
      chk(solved == es, "solved flag");
      if (es) n_sol++;
      @(negedge clk);
    end
    chk(n_sol > 0, "a solution was seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
