// tb_bmc: runs the read and the write channel of a Bus Master Controller at
// the same time against one memory model. The read channel streams a
// preloaded region in a strided order; the write channel stores a data
// stream into another region. Checks data on both sides and that the two
// channels shared the single bus (bursts of both kinds completed).
module tb_bmc;
  import hs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  addr_t   rd_addr, wr_addr;
  data_t   rd_data, wr_data;
  logic    rd_addr_valid, rd_addr_ready, rd_data_valid, rd_data_ready;
  logic    wr_addr_valid, wr_addr_ready, wr_data_valid, wr_data_ready, idle;
  mm_req_t mm_req;
  mm_rsp_t mm_rsp;

  bmc #(.MAX_BURST(16), .BUF_DEPTH(32)) dut (.*);
  mm_mem_model #(.WORDS(8192), .LAT(2), .STALL(1)) mem (.clk, .rst_n, .req(mm_req), .rsp(mm_rsp));

  function automatic logic [15:0] f(int unsigned a); return 16'(a * 977 + 3); endfunction

  localparam int NR = 400, NW = 300;
  int ra_i, rd_i, wa_i, wd_i;
  logic ra_x, rd_x, wa_x, wd_x;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // read addresses: rows of 20 words, 64 apart (row-wise runs)
  function automatic int unsigned raddr(int i); return 1000 + (i / 20) * 64 + (i % 20); endfunction

  always @(negedge clk) begin
    #2;
    ra_x = rd_addr_valid && rd_addr_ready; rd_x = rd_data_valid && rd_data_ready;
    wa_x = wr_addr_valid && wr_addr_ready; wd_x = wr_data_valid && wr_data_ready;
    if (rd_x) begin
      checks++;
      if (rd_data != f(raddr(rd_i))) begin failures++; $display("FAIL: read %0d", rd_i); end
    end
  end
  always @(posedge clk) if (rst_n) begin
    if (ra_x) ra_i <= ra_i + 1;
    if (rd_x) rd_i <= rd_i + 1;
    if (wa_x) wa_i <= wa_i + 1;
    if (wd_x) wd_i <= wd_i + 1;
  end
  always @(negedge clk) begin
    rd_addr_valid = rst_n && ra_i < NR && ($urandom_range(0, 5) != 0);
    rd_addr       = raddr(ra_i);
    rd_data_ready = ($urandom_range(0, 2) != 0);
    wr_addr_valid = rst_n && wa_i < NW && ($urandom_range(0, 5) != 0);
    wr_addr       = 5000 + wa_i;
    wr_data_valid = rst_n && wd_i < NW && ($urandom_range(0, 3) != 0);
    wr_data       = 16'(wd_i * 31 + 5);
  end

  initial begin
    for (int i = 0; i < 8192; i++) mem.mem[i] = f(i);
    ra_i = 0; rd_i = 0; wa_i = 0; wd_i = 0;
    ra_x = 0; rd_x = 0; wa_x = 0; wd_x = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    wait (rd_i == NR && wd_i == NW);
    repeat (20) @(negedge clk);
    wait (idle); repeat (3) @(negedge clk);
    for (int i = 0; i < NW; i++) check(mem.mem[5000 + i] === 16'(i * 31 + 5), $sformatf("written word %0d", i));
    check(mem.n_rd_bursts > 0 && mem.n_wr_bursts > 0, "both channels used the bus");
    check(mem.n_rd_bursts < NR / 4, $sformatf("reads merged: %0d bursts", mem.n_rd_bursts));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
