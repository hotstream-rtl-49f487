// tb_bmc_write: drives the write unit with independent address and data
// streams and checks that the synchronizer pairs them in order, that the
// memory receives exactly the data at the right addresses, and that
// consecutive addresses are merged into bursts.
module tb_bmc_write;
  import hs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  addr_t   addr_i;
  data_t   data_i;
  logic    addr_valid, addr_ready, data_valid, data_ready, idle;
  mm_req_t mm_req;
  mm_rsp_t mm_rsp;

  bmc_write #(.MAX_BURST(16)) dut (.*);
  mm_mem_model #(.WORDS(4096), .LAT(1), .STALL(1)) mem (.clk, .rst_n, .req(mm_req), .rsp(mm_rsp));

  int unsigned aq [$];
  logic [15:0] dq [$];
  logic [15:0] expect_mem [4096];
  logic        written [4096];

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // address producer and data producer run at independent random paces
  // handshakes are sampled after the falling edge (inputs change only on
  // the falling edge, the unit only on the rising one)
  logic a_x, d_x;
  always @(negedge clk) begin #2; a_x = addr_valid && addr_ready; d_x = data_valid && data_ready; end
  always @(negedge clk) if (rst_n) begin
    if (!addr_valid || a_x) begin
      if (aq.size() > 0 && $urandom_range(0, 3) != 0) begin addr_i = aq.pop_front(); addr_valid = 1; end
      else addr_valid = 0;
    end
    if (!data_valid || d_x) begin
      if (dq.size() > 0 && $urandom_range(0, 2) != 0) begin data_i = dq.pop_front(); data_valid = 1; end
      else data_valid = 0;
    end
  end
  // an address is only taken together with a data word
  always @(negedge clk) if (rst_n) begin
    #2;
    if (addr_ready != data_ready) begin failures++; $display("FAIL: synchronizer out of step"); end
  end

  initial begin
    automatic int unsigned b0;
    addr_valid = 0; data_valid = 0; addr_i = 0; data_i = 0; a_x = 0; d_x = 0;
    for (int i = 0; i < 4096; i++) written[i] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // linear run of 48 words, then random runs
    for (int i = 0; i < 48; i++) begin
      automatic logic [15:0] v = 16'($urandom);
      aq.push_back(500 + i); dq.push_back(v); expect_mem[500 + i] = v; written[500 + i] = 1;
    end
    for (int r = 0; r < 30; r++) begin
      automatic int unsigned a = $urandom_range(1000, 4000), n = $urandom_range(1, 20);
      for (int i = 0; i < n; i++) begin
        automatic logic [15:0] v = 16'($urandom);
        aq.push_back(a + i); dq.push_back(v); expect_mem[a + i] = v; written[a + i] = 1;
      end
    end
    wait (aq.size() == 0 && dq.size() == 0);
    repeat (10) @(negedge clk);
    wait (idle); repeat (3) @(negedge clk);
    for (int i = 0; i < 4096; i++)
      if (written[i]) check(mem.mem[i] === expect_mem[i], $sformatf("word %0d", i));
    b0 = mem.n_wr_bursts;
    check(b0 < mem.n_beats / 2, $sformatf("%0d beats merged into %0d bursts", mem.n_beats, b0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
