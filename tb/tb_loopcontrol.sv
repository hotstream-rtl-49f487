// tb_loopcontrol: checks counting, completion interrupt, reload and the
// start-address bookkeeping of one Loopcontrol unit.
module tb_loopcontrol;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic load, en, irq, upd;
  logic [15:0] cfg_reset, cfg_inc;
  logic [31:0] load_start, next_start, upd_start;

  loopcontrol #(.CNT_W(16), .ADDR_W(32)) dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    load = 0; en = 0; upd = 0; cfg_reset = 0; cfg_inc = 0; load_start = 0; upd_start = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int trial = 0; trial < 6; trial++) begin
      automatic int n = (trial == 0) ? 0 : $urandom_range(1, 9);
      automatic int eff = (n == 0) ? 1 : n;
      automatic int inc = (trial % 2) ? -int'($urandom_range(1, 300)) : int'($urandom_range(0, 300));
      automatic int unsigned st = $urandom_range(1000, 100000);
      @(negedge clk);
      cfg_reset = 16'(n); cfg_inc = 16'(inc); load_start = st; load = 1;
      @(negedge clk); load = 0;
      check(next_start === st + 32'(inc), "next_start after load");
      for (int rep = 0; rep < 2; rep++)
        for (int i = 1; i <= eff; i++) begin
          @(negedge clk); en = 1; #1;
          check(irq === (i === eff), $sformatf("irq at count %0d of %0d", i, eff));
          @(negedge clk); en = 0; #1;
          check(irq === 0, "irq only with enable");
        end
      // start-address update
      @(negedge clk); upd = 1; upd_start = st + 77;
      @(negedge clk); upd = 0; #1;
      check(next_start === st + 77 + 32'(inc), "next_start after update");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
