// tb_dma_controller: a chain of three descriptors against a host-memory
// model: a 2D read (4 blocks of 20 words, 64 apart), a linear read of 37
// words (split into 16-word bursts), and a 2D write of stream data back
// to host memory. Checks the outbound stream, the written memory, the
// burst count and that busy falls at the end of the chain.
module tb_dma_controller;
  import hs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        desc_we, start, busy, out_valid, out_ready, in_valid, in_ready;
  logic [3:0]  desc_idx;
  logic [2:0]  desc_field;
  logic [31:0] desc_wdata;
  data_t       out_data, in_data;
  mm_req_t     mm_req;
  mm_rsp_t     mm_rsp;

  dma_controller #(.DESC_N(16), .MAX_BURST(16), .BUF_DEPTH(32)) dut (.*);
  mm_mem_model #(.WORDS(16384), .LAT(4), .STALL(1)) mem (.clk, .rst_n, .req(mm_req), .rsp(mm_rsp));

  function automatic logic [15:0] f(int unsigned a); return 16'(a * 2654 + 11); endfunction

  int unsigned exp_q [$];
  int in_n;
  logic out_x, in_x;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic wdesc(int idx, int field, int unsigned v);
    @(negedge clk); desc_we = 1; desc_idx = 4'(idx); desc_field = 3'(field); desc_wdata = v;
    @(negedge clk); desc_we = 0;
  endtask
  task automatic set_desc(int idx, int unsigned off, hs, st, vs, bit to_host, bit last);
    wdesc(idx, 0, off); wdesc(idx, 1, hs); wdesc(idx, 2, st); wdesc(idx, 3, vs);
    wdesc(idx, 4, {30'd0, last, to_host});
  endtask

  always @(negedge clk) begin
    #2;
    out_x = out_valid && out_ready;
    in_x  = in_valid && in_ready;
    if (out_x) begin
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL: extra word"); end
      else begin
        automatic int unsigned a = exp_q.pop_front();
        if (out_data != f(a)) begin failures++; $display("FAIL: word for host address %0d", a); end
      end
    end
  end
  always @(posedge clk) if (in_x) in_n <= in_n + 1;
  always @(negedge clk) begin
    out_ready = ($urandom_range(0, 3) != 0);
    in_valid  = rst_n && ($urandom_range(0, 3) != 0);
    in_data   = 16'(in_n ^ 16'h5A5A);
  end

  initial begin
    for (int i = 0; i < 16384; i++) mem.mem[i] = f(i);
    desc_we = 0; desc_idx = 0; desc_field = 0; desc_wdata = 0; start = 0;
    in_n = 0; out_x = 0; in_x = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    set_desc(0, 100, 20, 64, 4, 0, 0);
    set_desc(1, 2000, 37, 0, 1, 0, 0);
    set_desc(2, 9000, 24, 100, 3, 1, 1);
    set_desc(3, 0, 5, 0, 1, 0, 1);         // beyond the end of the chain: not run
    for (int b = 0; b < 4; b++) for (int i = 0; i < 20; i++) exp_q.push_back(100 + b * 64 + i);
    for (int i = 0; i < 37; i++) exp_q.push_back(2000 + i);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    check(busy, "busy after start");
    wait (!busy); repeat (5) @(negedge clk);
    check(exp_q.size() === 0, $sformatf("%0d words not delivered", exp_q.size()));
    for (int b = 0; b < 3; b++) for (int i = 0; i < 24; i++)
      check(mem.mem[9000 + b * 100 + i] === 16'((b * 24 + i) ^ 16'h5A5A), $sformatf("written word %0d/%0d", b, i));
    check(mem.mem[9024] === f(9024), "gap between blocks untouched");
    // bursts: 4 + 3 reads (20 = 16 + 4 per block -> 8; 37 -> 3) and 6 writes
    check(mem.n_rd_bursts === 11, $sformatf("%0d read bursts", mem.n_rd_bursts));
    check(mem.n_wr_bursts === 6, $sformatf("%0d write bursts", mem.n_wr_bursts));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
