// tb_dss: exercises the four routes of the Data Stream Switch:
// host -> backplane, host -> shared memory (at a base address),
// shared memory -> host (count words from a base) and backplane -> host.
module tb_dss;
  import hs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic    in_to_mem, out_from_mem, wr_start, rd_start, busy;
  addr_t   wr_base, rd_base, rd_count;
  data_t   host_in_data, host_out_data, bp_out_data, bp_in_data;
  logic    host_in_valid, host_in_ready, host_out_valid, host_out_ready;
  logic    bp_out_valid, bp_out_ready, bp_in_valid, bp_in_ready;
  mm_req_t mm_req;
  mm_rsp_t mm_rsp;

  dss #(.MAX_BURST(16), .BUF_DEPTH(32)) dut (.*);
  mm_mem_model #(.WORDS(8192), .LAT(2), .STALL(1)) mem (.clk, .rst_n, .req(mm_req), .rsp(mm_rsp));

  int hin_n, hin_max, bpo_n, hout_n, bpi_n, bpi_max, mode;
  logic hin_x, bpo_x, hout_x, bpi_x;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) begin
    #2;
    hin_x  = host_in_valid && host_in_ready;
    bpo_x  = bp_out_valid && bp_out_ready;
    hout_x = host_out_valid && host_out_ready;
    bpi_x  = bp_in_valid && bp_in_ready;
    if (bpo_x) check(bp_out_data === 16'(hin_n + 100), "host -> backplane word");
    if (hout_x) begin
      if (mode === 2) check(host_out_data === 16'(hout_n + 100), "shared memory -> host word");
      else           check(host_out_data === 16'(hout_n * 3), "backplane -> host word");
    end
  end
  always @(posedge clk) begin
    if (hin_x)  hin_n  <= hin_n + 1;
    if (hout_x) hout_n <= hout_n + 1;
    if (bpi_x)  bpi_n  <= bpi_n + 1;
  end
  always @(negedge clk) begin
    host_in_valid  = rst_n && hin_n < hin_max && ($urandom_range(0, 3) != 0);
    host_in_data   = 16'(hin_n + 100);
    bp_out_ready   = ($urandom_range(0, 2) != 0);
    host_out_ready = ($urandom_range(0, 2) != 0);
    bp_in_valid    = rst_n && bpi_n < bpi_max && ($urandom_range(0, 2) != 0);
    bp_in_data     = 16'(bpi_n * 3);
  end

  initial begin
    in_to_mem = 0; out_from_mem = 0; wr_start = 0; rd_start = 0;
    wr_base = 0; rd_base = 0; rd_count = 0;
    hin_n = 0; hin_max = 0; hout_n = 0; bpi_n = 0; bpi_max = 0; mode = 0;
    hin_x = 0; bpo_x = 0; hout_x = 0; bpi_x = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // 1) host -> backplane, 50 words
    mode = 1; hin_max = 50;
    wait (hin_n == 50); repeat (3) @(negedge clk);
    // 2) host -> shared memory at 3000, 70 words
    @(negedge clk); in_to_mem = 1; wr_base = 3000; wr_start = 1; hin_n = 0; hin_max = 70;
    @(negedge clk); wr_start = 0;
    wait (hin_n == 70); repeat (10) @(negedge clk); wait (!busy); repeat (2) @(negedge clk);
    for (int i = 0; i < 70; i++) check(mem.mem[3000 + i] === 16'(i + 100), $sformatf("memory word %0d", i));
    // 3) shared memory -> host, the same 70 words
    @(negedge clk); mode = 2; out_from_mem = 1; rd_base = 3000; rd_count = 70; rd_start = 1; hout_n = 0;
    @(negedge clk); rd_start = 0;
    wait (hout_n == 70); repeat (5) @(negedge clk);
    check(!busy, "read finished");
    // 4) backplane -> host, 40 words
    @(negedge clk); mode = 3; out_from_mem = 0; hout_n = 0; bpi_max = 40;
    wait (hout_n == 40); repeat (3) @(negedge clk);
    check(bpi_n === 40, "backplane words all taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
