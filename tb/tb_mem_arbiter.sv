// tb_mem_arbiter: four masters issue random read and write bursts through
// the arbiter to a memory model. Checks data integrity per master (each
// owns a region), that every burst completes, that the port is held for a
// whole burst, and that grants rotate (no master starves).
module tb_mem_arbiter;
  import hs_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  mm_req_t m_req [N];
  mm_rsp_t m_rsp [N];
  mm_req_t s_req;
  mm_rsp_t s_rsp;

  mem_arbiter #(.N(N)) dut (.*);
  mm_mem_model #(.WORDS(4096), .LAT(2), .STALL(1)) mem (.clk, .rst_n, .req(s_req), .rsp(s_rsp));

  int done_bursts [N];
  logic [15:0] shadow [N][256];

  initial begin
    #2ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  for (genvar i = 0; i < N; i++) begin : g_m
    initial begin
      m_req[i] = '0;
      done_bursts[i] = 0;
      wait (rst_n);
      // first fill the region with writes, then random mixes
      for (int b = 0; b < 40; b++) begin
        automatic bit wr = (b < 16) || $urandom_range(0, 1);
        automatic int len = $urandom_range(1, 16);
        automatic int off = (b < 16) ? b * 16 : $urandom_range(0, 256 - len);
        @(negedge clk);
        m_req[i].cmd_valid = 1; m_req[i].cmd.write = wr;
        m_req[i].cmd.addr = addr_t'(i * 1024 + off); m_req[i].cmd.len = 8'(len - 1);
        if (b < 16) begin m_req[i].cmd.len = 8'd15; len = 16; end
        #1; while (!m_rsp[i].cmd_ready) begin @(negedge clk); #1; end
        @(negedge clk); m_req[i].cmd_valid = 0;
        for (int k = 0; k < len; k++) begin
          if (wr) begin
            automatic logic [15:0] v = 16'($urandom);
            m_req[i].wvalid = 1; m_req[i].wdata = v; m_req[i].wlast = (k == len - 1);
            #1; while (!m_rsp[i].wready) begin @(negedge clk); #1; end
            shadow[i][off + k] = v;
            @(negedge clk); m_req[i].wvalid = 0;
          end else begin
            #1; while (!m_rsp[i].rvalid) begin @(negedge clk); #1; end
            checks++;
            if (m_rsp[i].rdata != shadow[i][off + k] || m_rsp[i].rlast != (k == len - 1)) begin
              failures++; $display("FAIL: master %0d word %0d", i, off + k);
            end
            @(negedge clk);
          end
        end
        done_bursts[i]++;
      end
    end
  end

  // a read beat must only reach the master that owns the port
  always @(negedge clk) if (rst_n) begin
    automatic int n = 0;
    #2;
    for (int i = 0; i < N; i++) n += m_rsp[i].rvalid;
    if (n > 1) begin failures++; $display("FAIL: read beat to %0d masters", n); end
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    wait (done_bursts[0] == 40 && done_bursts[1] == 40 && done_bursts[2] == 40 && done_bursts[3] == 40);
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
