// tb_mnn_max_select: random rows of 31 signed values, many with ties, through
// the maximum neuron; the output must be one-hot at the first index holding
// the largest value.
// The maximum rule is the source design's; the tie rule is this design's.
module tb_mnn_max_select;
  localparam int N = 31;
  logic signed [N-1:0][23:0] u;
  logic [N-1:0] onehot;
  int checks = 0, failures = 0;

  mnn_max_select dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int it = 0; it < 5000; it++) begin
      int b;
      for (int j = 0; j < N; j++)
        u[j] = (it % 2) ? 24'(int'($urandom % 5) - 2) : 24'($urandom);
      #1;
      b = 0;
      for (int j = 1; j < N; j++) if ($signed(u[j]) > $signed(u[b])) b = j;
      checks++;
      if (onehot != N'(1) << b) begin failures++; $display("FAIL: got %h exp index %0d", onehot, b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
