// tb_rr_arbiter: random requests; checks one-hot grant, work conservation
// (a grant whenever anyone requests) and round-robin order.
module tb_rr_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [N-1:0] req, grant;
  logic [2:0]   grant_idx;
  logic         advance, any;
  int           ptr;

  rr_arbiter #(.N(N)) dut (.*);

  initial begin
    #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    req = 0; advance = 0; ptr = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      automatic int exp_i = -1;
      @(negedge clk);
      req = N'($urandom); advance = ($urandom_range(0, 3) != 0);
      #1;
      for (int k = 0; k < N; k++) if (exp_i < 0 && req[(ptr + k) % N]) exp_i = (ptr + k) % N;
      checks++;
      if ((exp_i < 0) ? (any || grant != 0)
                      : (!any || grant != N'(1 << exp_i) || grant_idx != 3'(exp_i))) begin
        failures++; $display("FAIL: req %b ptr %0d grant %b", req, ptr, grant);
      end
      @(posedge clk);
      if (advance && exp_i >= 0) ptr = (exp_i + 1) % N;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
