// tb_instr_mem: writes random words and reads them back, checking the
// one-cycle read latency.
module tb_instr_mem;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic we;
  logic [9:0] waddr, raddr;
  logic [31:0] wdata, rdata;
  logic [31:0] ref_mem [1024];

  instr_mem #(.DEPTH(1024)) dut (.*);

  initial begin
    #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk); we = 1; waddr = 10'(i); wdata = $urandom; ref_mem[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 300; i++) begin
      automatic int a = $urandom_range(0, 1023);
      @(negedge clk); raddr = 10'(a);
      @(posedge clk); #1;
      checks++;
      if (rdata !== ref_mem[a]) begin failures++; $display("FAIL: addr %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
