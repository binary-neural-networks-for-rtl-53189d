// tb_bus_syn_mem: writes random words to random addresses of the synaptic
// memory and checks every read against a shadow copy, including the one-clock
// read latency and read-during-write of another address.
// The stimulus and shadow model are this test's own.
module tb_bus_syn_mem;
  localparam int ID_W = 9;
  logic clk = 0, we = 0;
  logic [ID_W-1:0] addr = '0;
  logic [7:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  logic [7:0] shadow [2**ID_W];
  bit valid [2**ID_W];

  bus_syn_mem dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int a = 0; a < 2**ID_W; a++) begin
      @(negedge clk); we = 1; addr = ID_W'(a); wdata = 8'($urandom); shadow[a] = wdata; valid[a] = 1;
    end
    @(negedge clk); we = 0;
    for (int k = 0; k < 3000; k++) begin
      automatic int a = $urandom % 2**ID_W;
      if ($urandom % 3 == 0) begin
        we = 1; addr = ID_W'(a); wdata = 8'($urandom);
        @(negedge clk); shadow[a] = wdata; we = 0;
      end else begin
        addr = ID_W'(a);
        @(negedge clk);
        checks++;
        if (rdata !== shadow[a]) begin failures++; $display("FAIL addr %0d: %h exp %h", a, rdata, shadow[a]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
