// tb_loopbody: checks the affine sequence y(n) = y(n-1)*m + i, restart
// priority and the active configuration registers of the Loopbody unit.
module tb_loopbody;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic load, restart, step;
  logic [15:0] cfg_mult, cfg_inc;
  logic [31:0] restart_addr, addr;

  loopbody #(.ADDR_W(32)) dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    automatic int unsigned y;
    load = 0; restart = 0; step = 0; cfg_mult = 1; cfg_inc = 1; restart_addr = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int trial = 0; trial < 8; trial++) begin
      automatic int unsigned m = (trial < 4) ? 1 : $urandom_range(0, 5);
      automatic int inc = int'($urandom_range(0, 2000)) - 1000;
      automatic int unsigned s = $urandom;
      @(negedge clk);
      cfg_mult = 16'(m); cfg_inc = 16'(inc); load = 1; restart = 1; restart_addr = s;
      @(negedge clk); load = 0; restart = 0;
      cfg_mult = 16'hDEAD; cfg_inc = 16'hBEEF;   // shadow changes must not matter
      y = s;
      check(addr === y, "restart address");
      for (int n = 0; n < 12; n++) begin
        step = ($urandom_range(0, 3) != 0);
        @(negedge clk);
        if (step) y = y * m + 32'(inc);
        check(addr === y, $sformatf("trial %0d step %0d: got %h exp %h", trial, n, addr, y));
      end
      step = 1; restart = 1; restart_addr = 32'h1234;
      @(negedge clk); step = 0; restart = 0;
      check(addr === 32'h1234, "restart wins over step");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
