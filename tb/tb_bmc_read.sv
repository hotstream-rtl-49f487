// tb_bmc_read: feeds address streams to the read unit and checks the data
// stream against the memory contents, the merging of consecutive addresses
// into bursts (a linear run of 64 words = 4 bursts of 16), the prefetch
// into the buffer while the consumer is stalled, and random back-pressure.
module tb_bmc_read;
  import hs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  addr_t   addr_i;
  logic    addr_valid, addr_ready, data_valid, data_ready, idle;
  data_t   data_o;
  mm_req_t mm_req;
  mm_rsp_t mm_rsp;
  logic    rand_ready, hold;

  bmc_read #(.MAX_BURST(16), .BUF_DEPTH(32)) dut (.*);
  mm_mem_model #(.WORDS(4096), .LAT(3), .STALL(0)) mem (.clk, .rst_n, .req(mm_req), .rsp(mm_rsp));

  function automatic logic [15:0] f(int unsigned a); return 16'(a * 40503 + 7); endfunction

  int unsigned exp_q [$];
  int unsigned got;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) data_ready = !hold && (rand_ready ? ($urandom_range(0, 2) != 0) : 1'b1);
  // handshakes are sampled after the falling edge: inputs change only on
  // the falling edge and the unit only on the rising one
  always @(negedge clk) #2 if (rst_n && data_valid && data_ready) begin
    got++;
    checks++;
    if (exp_q.size() == 0) begin
      failures++; $display("FAIL: unexpected data %h", data_o);
    end else begin
      automatic int unsigned a = exp_q.pop_front();
      if (data_o != f(a)) begin failures++; $display("FAIL: data %h for address %0d", data_o, a); end
    end
  end

  task automatic send(int unsigned a);
    @(negedge clk); addr_i = a; addr_valid = 1; exp_q.push_back(a);
    #1; while (!addr_ready) begin @(negedge clk); #1; end
    @(negedge clk); addr_valid = 0;
  endtask

  task automatic send_run(int unsigned a, int n);
    @(negedge clk);
    for (int i = 0; i < n; i++) begin
      addr_i = a + i; addr_valid = 1; exp_q.push_back(a + i);
      #1; while (!addr_ready) begin @(negedge clk); #1; end
      @(negedge clk);
    end
    addr_valid = 0;
  endtask

  initial begin
    for (int i = 0; i < 4096; i++) mem.mem[i] = f(i);
    addr_valid = 0; addr_i = 0; rand_ready = 0; hold = 0; got = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // 1) a linear run of 64: four 16-beat bursts
    send_run(100, 64);
    wait (exp_q.size() == 0); repeat (3) @(negedge clk);
    check(mem.n_rd_bursts === 4, $sformatf("64 linear words in %0d bursts", mem.n_rd_bursts));
    // 2) prefetch: consumer stalled, buffer fills to its 32 entries
    hold = 1;
    fork send_run(1000, 40); join_none
    repeat (200) @(negedge clk);
    check(dut.fcount === 32, $sformatf("prefetched %0d words while stalled", dut.fcount));
    hold = 0;
    wait (exp_q.size() == 0); repeat (3) @(negedge clk);
    // 3) broken increments: stride-2 addresses give one burst each
    begin
      automatic int unsigned b0 = mem.n_rd_bursts;
      send_run(2000, 1); send_run(2002, 1); send_run(2004, 1);
      wait (exp_q.size() == 0); repeat (3) @(negedge clk);
      check(mem.n_rd_bursts === b0 + 3, "non-consecutive addresses split bursts");
    end
    // 4) random runs with random back-pressure
    rand_ready = 1;
    for (int r = 0; r < 40; r++) send_run($urandom_range(0, 4000), $urandom_range(1, 30));
    wait (exp_q.size() == 0); repeat (5) @(negedge clk);
    check(idle, "idle at the end");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
