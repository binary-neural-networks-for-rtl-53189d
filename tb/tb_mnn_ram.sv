// tb_mnn_ram: writes random rows of U and T into the state RAM and reads
// them back with the one-clock read latency, including a read of one row in
// the same clock as a write to another.
// The RAM organisation tested is this design's.
module tb_mnn_ram;
  localparam int N = 31;
  logic clk = 0, we = 0;
  logic [4:0] waddr = '0, raddr = '0;
  logic signed [N-1:0][23:0] wu = '0, wt = '0, ru, rt;
  int checks = 0, failures = 0;
  logic [N-1:0][23:0] su [N], st [N];

  mnn_ram dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic logic [N-1:0][23:0] rnd();
    logic [N-1:0][23:0] x;
    for (int j = 0; j < N; j++) x[j] = 24'($urandom);
    return x;
  endfunction
  initial begin
    for (int i = 0; i < N; i++) begin
      @(negedge clk); we = 1; waddr = 5'(i); wu = rnd(); wt = rnd(); su[i] = wu; st[i] = wt;
    end
    @(negedge clk); we = 0;
    for (int it = 0; it < 2000; it++) begin
      automatic int r = $urandom % N, w = $urandom % N;
      raddr = 5'(r);
      we = (w != r) && ($urandom % 2);
      waddr = 5'(w); wu = rnd(); wt = rnd();
      @(negedge clk);
      if (we) begin su[w] = wu; st[w] = wt; end
      we = 0;
      checks++;
      if (ru != su[r] || rt != st[r]) begin failures++; $display("FAIL row %0d", r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
