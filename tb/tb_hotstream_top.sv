// tb_hotstream_top: end-to-end run of the accelerator at its default size
// (16 Cores), with behavioural models of host memory, shared memory and the
// PEs of four Cores. All configuration goes through the host register port.
//
//   1. DMA 2D descriptor: an 8 x 8 block out of a 32-word-wide host matrix
//      -> data stream switch -> shared memory at 0x1000.
//   2. Core 0 reads the block column by column (transpose), its PE computes
//      3x+1, the write DFC stores the results at 0x2000. At the same time
//      Core 2 reads the block linearly in two parameter sets (double-
//      buffered ERF), its PE adds 5, results to 0x3000 (contention on the
//      shared-memory arbiter, reuse of the same data).
//   3. Core 1 reads 0x2000 and its PE forwards the words to the backplane,
//      which routes them to the switch and on to the DMA, which writes them
//      into host memory as a 2D block (4 rows of 16, 32 apart).
//   4. The switch reads 0x3000 from shared memory and the DMA writes it to
//      host memory at 0x5000.
//   5. Host -> backplane: 16 host words routed to the PE of Core 3.
// Every result is compared with values computed here from the inputs, and
// each mechanism is counted; one that never happened is a failure.
module tb_hotstream_top;
  import hs_pkg::*;
  import m16_asm_pkg::*;
  localparam int NC = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic           cfg_we;
  logic [23:0]    cfg_addr;
  logic [31:0]    cfg_wdata;
  logic           dma_busy, dss_busy;
  logic [NC-1:0]  core_busy;
  mm_req_t        host_req, sm_req;
  mm_rsp_t        host_rsp, sm_rsp;
  data_t          pe_in_data [NC], pe_out_data [NC], bp_tx_data [NC], bp_rx_data [NC];
  logic [NC-1:0]  pe_in_valid, pe_in_ready, pe_out_valid, pe_out_ready;
  logic [NC-1:0]  bp_tx_valid, bp_tx_ready, bp_rx_valid, bp_rx_ready;

  hotstream_top dut (.*);

  mm_mem_model #(.WORDS(65536), .LAT(6), .STALL(1)) hmem (.clk, .rst_n, .req(host_req), .rsp(host_rsp));
  mm_mem_model #(.WORDS(65536), .LAT(3), .STALL(0)) smem (.clk, .rst_n, .req(sm_req), .rsp(sm_rsp));

  function automatic logic [15:0] f(int unsigned a); return 16'(a * 313 + 17); endfunction

  // ------------------------------------------------------------ PE models
  // Core 0: 3x+1, Core 2: x+5 (memory in -> memory out)
  // Core 1: memory in -> backplane out; Core 3: backplane in (checked)
  logic [NC-1:0] full_q;
  data_t         val_q [NC];
  logic          pe_stall;
  always @(negedge clk) pe_stall = ($urandom_range(0, 3) == 0);
  for (genvar c = 0; c < NC; c++) begin : g_pe
    logic out_rdy;
    assign out_rdy = (c == 1) ? bp_tx_ready[c] : pe_out_ready[c];
    assign pe_in_ready[c]  = (c <= 2) && (!full_q[c] || out_rdy) && !pe_stall;
    assign pe_out_valid[c] = (c == 0 || c == 2) && full_q[c];
    assign pe_out_data[c]  = val_q[c];
    assign bp_tx_valid[c]  = (c == 1) && full_q[c];
    assign bp_tx_data[c]   = val_q[c];
    assign bp_rx_ready[c]  = 1'b1;
    always @(posedge clk or negedge rst_n)
      if (!rst_n) full_q[c] <= 1'b0;
      else if (pe_in_valid[c] && pe_in_ready[c]) begin
        full_q[c] <= 1'b1;
        val_q[c]  <= (c == 0) ? pe_in_data[c] * 3 + 1 : (c == 2) ? pe_in_data[c] + 5 : pe_in_data[c];
      end else if (out_rdy) full_q[c] <= 1'b0;
  end

  // ------------------------------------------------------ mechanism counts
  int n_dma_bursts, n_sm_merged, n_contention, n_prefetch, n_sync_wait, n_wrap,
      n_dbuf, n_bp_to_dss, n_bp_to_pe3, n_dss_rd;
  int bp3_n;
  always @(posedge clk) if (rst_n) begin
    automatic int req_n = 0;
    if (host_req.cmd_valid && host_rsp.cmd_ready) n_dma_bursts++;
    if (sm_req.cmd_valid && sm_rsp.cmd_ready && sm_req.cmd.len != 0) n_sm_merged++;
    for (int i = 0; i <= NC; i++) req_n += dut.m_req[i].cmd_valid;
    if (req_n > 1) n_contention++;
    if (pe_in_valid[0] && !pe_in_ready[0]) n_prefetch++;
    if (dut.g_core[0].u_core.u_bmc.u_wr.addr_valid && !dut.g_core[0].u_core.u_bmc.u_wr.data_valid) n_sync_wait++;
    if (dut.g_core[0].u_core.u_rdfc.u_agc.state_q == 2'd2) n_wrap++;
    if (dut.g_core[2].u_core.u_rdfc.u_agc.busy_o && !dut.g_core[2].u_core.u_rdfc.u_agc.wait_o &&
        dut.g_core[2].u_core.u_rdfc.u_mcu.running && dut.g_core[2].u_core.u_rdfc.addr_valid) n_dbuf++;
    if (dut.n_out_valid[NC] && dut.n_out_ready[NC]) n_bp_to_dss++;
    if (dut.u_dss.rd_ar) n_dss_rd++;
    if (bp_rx_valid[3] && bp_rx_ready[3]) begin
      n_bp_to_pe3++;
      checks++;
      if (bp_rx_data[3] != f(bp3_n)) begin failures++; $display("FAIL: backplane word %0d to Core 3", bp3_n); end
      bp3_n++;
    end
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (200000) @(posedge clk); failures++; $display("FAIL: watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ------------------------------------------------------ host driver
  task automatic cfg(logic [23:0] a, logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask
  function automatic logic [23:0] reg_a(int region, int idx); return 24'(region * 4096 + idx); endfunction
  task automatic load_prog(int core, bit sel, prog_t p);
    for (int i = 0; i < p.size(); i++) cfg({1'b1, 12'(core), sel, 10'(i)}, p[i]);
  endtask
  task automatic dma_desc(int unsigned off, hs, st, vs, bit to_host);
    cfg(reg_a(0, 0), off); cfg(reg_a(0, 1), hs); cfg(reg_a(0, 2), st); cfg(reg_a(0, 3), vs);
    cfg(reg_a(0, 4), {30'd0, 1'b1, to_host});
  endtask
  task automatic dma_run();
    cfg(reg_a(0, 2048), 1);
    wait (!dma_busy); repeat (2) @(negedge clk);
  endtask
  task automatic wait_cores(); repeat (4) @(negedge clk); wait (core_busy == '0); repeat (2) @(negedge clk); endtask

  initial begin
    cfg_we = 0; cfg_addr = 0; cfg_wdata = 0; bp3_n = 0;
    {n_dma_bursts, n_sm_merged, n_contention, n_prefetch, n_sync_wait, n_wrap, n_dbuf,
     n_bp_to_dss, n_bp_to_pe3, n_dss_rd} = '0;
    for (int i = 0; i < 65536; i++) begin hmem.mem[i] = f(i); smem.mem[i] = 16'hDEAD; end
    repeat (3) @(posedge clk); rst_n = 1;

    // 1. host 8 x 8 block -> shared memory 0x1000
    cfg(reg_a(1, 0), 32'b01);                 // host -> memory
    cfg(reg_a(1, 1), 32'h1000);               // write base
    dma_desc(0, 8, 32, 8, 0);
    dma_run();
    repeat (20) @(negedge clk); wait (!dss_busy);
    for (int k = 0; k < 64; k++)
      check(smem.mem[32'h1000 + k] === f((k / 8) * 32 + k % 8), $sformatf("block word %0d in shared memory: %h", k, smem.mem[32'h1000 + k]));

    $display("step 2 at %0t", $time);
    // 2. Core 0 (transpose, 3x+1) and Core 2 (two sets, x+5) in parallel
    load_prog(0, 0, '{LDI(E_MULT, 1), LDI(E_INC, 8), LDI(E_INIT_LO, 16'h1000),
                      LDI(e_lc_reset(0), 8), LDI(e_lc_inc(0), 1), LDI(e_lc_reset(1), 8), DONE(), HALT()});
    load_prog(0, 1, '{LDI(E_INIT_LO, 16'h2000), LDI(e_lc_reset(0), 64), DONE(), HALT()});
    load_prog(2, 0, '{LDI(E_INIT_LO, 16'h1000), LDI(e_lc_reset(0), 32), DONE(), WAIT(),
                      ADDI(E_INIT_LO, E_INIT_LO, 32), DONE(), HALT()});
    load_prog(2, 1, '{LDI(E_INIT_LO, 16'h3000), LDI(e_lc_reset(0), 64), DONE(), HALT()});
    cfg(reg_a(3, 0), 3);
    cfg(reg_a(3, 2), 3);
    wait_cores();
    for (int k = 0; k < 64; k++) begin
      check(smem.mem[32'h2000 + k] === 16'(f((k % 8) * 32 + k / 8) * 3 + 1), $sformatf("Core 0 result %0d", k));
      check(smem.mem[32'h3000 + k] === 16'(f((k / 8) * 32 + k % 8) + 5), $sformatf("Core 2 result %0d", k));
    end

    $display("step 3 at %0t", $time);
    // 3. Core 1: 0x2000 -> backplane -> switch -> DMA -> host 0x4000 (2D)
    cfg(reg_a(1, 0), 32'b00);                 // backplane -> host
    cfg(reg_a(2, NC), 32'h8000_0000 | 1);     // switch node <- Core 1
    load_prog(1, 0, '{LDI(E_INIT_LO, 16'h2000), LDI(e_lc_reset(0), 64), DONE(), HALT()});
    cfg(reg_a(3, 1), 1);
    dma_desc(32'h4000, 16, 32, 4, 1);
    dma_run();
    wait_cores();
    for (int k = 0; k < 64; k++)
      check(hmem.mem[32'h4000 + (k / 16) * 32 + k % 16] === 16'(f((k % 8) * 32 + k / 8) * 3 + 1),
            $sformatf("host result %0d via backplane", k));
    check(hmem.mem[32'h4010] === f(32'h4010), "host gap between rows untouched");

    $display("step 4 at %0t", $time);
    // 4. shared memory 0x3000 -> switch -> DMA -> host 0x5000
    cfg(reg_a(1, 0), 32'b10);                 // memory -> host
    cfg(reg_a(1, 2), 32'h3000);
    cfg(reg_a(1, 3), 64);                     // starts the read
    dma_desc(32'h5000, 64, 0, 1, 1);
    dma_run();
    for (int k = 0; k < 64; k++)
      check(hmem.mem[32'h5000 + k] === 16'(f((k / 8) * 32 + k % 8) + 5), $sformatf("host result %0d from memory", k));

    $display("step 5 at %0t", $time);
    // 5. host -> backplane -> PE of Core 3
    cfg(reg_a(1, 0), 32'b00);                 // host -> backplane
    cfg(reg_a(2, NC), 32'h0);                 // close the previous route
    cfg(reg_a(2, 3), 32'h8000_0000 | NC);     // Core 3 <- switch
    dma_desc(0, 16, 0, 1, 0);
    dma_run();
    repeat (10) @(negedge clk);
    check(bp3_n === 16, $sformatf("%0d words reached Core 3", bp3_n));

    $display("mechanisms: dma bursts %0d, merged memory bursts %0d, arbiter contention %0d cycles,",
             n_dma_bursts, n_sm_merged, n_contention);
    $display("  prefetched-while-stalled %0d, synchronizer waits %0d, loop-level changes %0d,",
             n_prefetch, n_sync_wait, n_wrap);
    $display("  double-buffered overlap %0d, backplane->switch %0d, backplane->Core 3 %0d, switch memory reads %0d",
             n_dbuf, n_bp_to_dss, n_bp_to_pe3, n_dss_rd);
    check(n_dma_bursts > 4,  "DMA 2D descriptor bursts");
    check(n_sm_merged > 0,   "burst merging on the shared memory");
    check(n_contention > 0,  "arbitration between masters");
    check(n_prefetch > 0,    "prefetch while the PE stalls");
    check(n_sync_wait > 0,   "synchronizer holding addresses for data");
    check(n_wrap > 0,        "AGC loop-level changes");
    check(n_dbuf > 0,        "double-buffered ERF update");
    check(n_bp_to_dss === 64, "backplane route to the switch");
    check(n_bp_to_pe3 === 16, "backplane route to a Core");
    check(n_dss_rd === 64,    "switch reads from shared memory");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
