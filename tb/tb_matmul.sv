// tb_matmul: block matrix multiplication C = A x B through the whole
// accelerator at its default size, in the structure of the evaluation
// case study: sub-block products by one kernel, their accumulation by a
// second, operands and partial results kept in the shared memory.
//   N = 64, sub-blocks of S = 32 (the size the multiplication cores take),
//   16-bit elements, arithmetic modulo 2^16.
//   1. DMA: A and B (row-major, N x N each) from host memory into shared
//      memory at A_SM and B_SM, through the switch.
//   2. Core 0 (multiplier PE model): its read DFC program walks, for each
//      (i, j, k), the 32 x 32 tile A[i][k] and then B[k][j] (2D tiles of
//      row pitch N, one parameter set each, double buffered); the PE returns
//      the product block, which the write DFC stores linearly at P_SM.
//   3. Core 1 (accumulator PE model) reads the partial products linearly,
//      adds the two partial blocks of each (i, j) and its write DFC stores
//      C block by block at C_SM.
//   4. The switch reads C back and four 2D DMA descriptors (32 words per
//      row, stride N, 32 rows) place each block into host memory row-major.
// The result is compared with a product computed here.
module tb_matmul;
  import hs_pkg::*;
  import m16_asm_pkg::*;
  localparam int NC = 16;
  localparam int N = 64, S = 32, NB = N / S;
  localparam int unsigned A_H = 0, B_H = 4096, C_H = 8192;          // host
  localparam int unsigned A_SM = 0, B_SM = 4096, P_SM = 8192, C_SM = 24576;
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

  mm_mem_model #(.WORDS(32768), .LAT(6), .STALL(1)) hmem (.clk, .rst_n, .req(host_req), .rsp(host_rsp));
  mm_mem_model #(.WORDS(32768), .LAT(3), .STALL(0)) smem (.clk, .rst_n, .req(sm_req), .rsp(sm_rsp));

  function automatic logic [15:0] fa(int r, int c); return 16'((r * 7 + c * 3) % 23); endfunction
  function automatic logic [15:0] fb(int r, int c); return 16'((r * 5 + c * 11 + 1) % 19); endfunction

  // ----------------------------------------------------- PE models
  // Core 0: takes 2*S*S words (tile A then tile B), returns the S x S product
  // Core 1: takes 2*S*S words (two partial blocks), returns their sum
  logic [15:0] in_buf [2][2*S*S];
  int          in_n [2];
  logic [15:0] out_q [2][$];
  for (genvar c = 0; c < NC; c++) begin : g_pe
    if (c < 2) begin : g_act
      assign pe_in_ready[c]  = 1'b1;
      assign pe_out_valid[c] = out_q[c].size() != 0;
      assign pe_out_data[c]  = out_q[c].size() != 0 ? out_q[c][0] : '0;
    end else begin : g_idle
      assign pe_in_ready[c]  = 1'b0;
      assign pe_out_valid[c] = 1'b0;
      assign pe_out_data[c]  = '0;
    end
    assign bp_tx_valid[c] = 1'b0;
    assign bp_tx_data[c]  = '0;
    assign bp_rx_ready[c] = 1'b1;
  end
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < 2; c++) begin
      if (pe_out_valid[c] && pe_out_ready[c]) void'(out_q[c].pop_front());
      if (pe_in_valid[c] && pe_in_ready[c]) begin
        in_buf[c][in_n[c]] = pe_in_data[c];
        in_n[c]++;
        if (in_n[c] == 2 * S * S) begin
          for (int r = 0; r < S; r++)
            for (int q = 0; q < S; q++) begin
              automatic logic [15:0] v = '0;
              if (c == 0) for (int k = 0; k < S; k++) v += in_buf[0][r*S + k] * in_buf[0][S*S + k*S + q];
              else v = in_buf[1][r*S + q] + in_buf[1][S*S + r*S + q];
              out_q[c].push_back(v);
            end
          in_n[c] = 0;
        end
      end
    end
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (400000) @(posedge clk); failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ----------------------------------------------------- host driver
  task automatic cfg(logic [23:0] a, logic [31:0] d);
    @(negedge clk); cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_we = 0;
  endtask
  function automatic logic [23:0] reg_a(int region, int idx); return 24'(region * 4096 + idx); endfunction
  task automatic load_prog(int core, bit sel, prog_t p);
    for (int i = 0; i < p.size(); i++) cfg({1'b1, 12'(core), sel, 10'(i)}, p[i]);
  endtask
  task automatic dma_desc(int idx, int unsigned off, hs, st, vs, bit to_host, bit last);
    cfg(reg_a(0, idx*8 + 0), off); cfg(reg_a(0, idx*8 + 1), hs); cfg(reg_a(0, idx*8 + 2), st);
    cfg(reg_a(0, idx*8 + 3), vs); cfg(reg_a(0, idx*8 + 4), {30'd0, last, to_host});
  endtask
  task automatic dma_run();
    cfg(reg_a(0, 2048), 1);
    wait (!dma_busy); repeat (2) @(negedge clk);
  endtask

  // Core 0 read program: for each (i, j, k) the tile A[i][k], then B[k][j]
  function automatic prog_t prog_mult();
    prog_t p;
    p = '{LDI(E_MULT, 1), LDI(E_INC, 1), LDI(e_lc_reset(0), S), LDI(e_lc_inc(0), N),
          LDI(e_lc_reset(1), S)};
    for (int i = 0; i < NB; i++)
      for (int j = 0; j < NB; j++)
        for (int k = 0; k < NB; k++) begin
          p.push_back(LDI(E_INIT_LO, 16'(A_SM + i*S*N + k*S))); p.push_back(DONE()); p.push_back(WAIT());
          p.push_back(LDI(E_INIT_LO, 16'(B_SM + k*S*N + j*S))); p.push_back(DONE()); p.push_back(WAIT());
        end
    p.push_back(HALT());
    return p;
  endfunction
  function automatic prog_t prog_lin(int unsigned base, int unsigned n);
    return '{LDI(E_INIT_LO, 16'(base)), LDI(e_lc_reset(0), 16'(n)), DONE(), HALT()};
  endfunction

  logic [15:0] cref;
  initial begin
    cfg_we = 0; cfg_addr = 0; cfg_wdata = 0; in_n = '{0, 0};
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        hmem.mem[A_H + r*N + c] = fa(r, c);
        hmem.mem[B_H + r*N + c] = fb(r, c);
        hmem.mem[C_H + r*N + c] = 16'hDEAD;
      end
    for (int i = 0; i < 32768; i++) smem.mem[i] = 16'hBEEF;
    repeat (3) @(posedge clk); rst_n = 1;

    // 1. A and B into shared memory (one contiguous 2*N*N stream)
    cfg(reg_a(1, 0), 32'b01);
    cfg(reg_a(1, 1), A_SM);
    dma_desc(0, A_H, 2*N*N, 0, 1, 0, 1);
    dma_run();
    repeat (20) @(negedge clk); wait (!dss_busy);
    check(smem.mem[B_SM + N*N - 1] === fb(N-1, N-1), "operands in shared memory");

    // 2. + 3. multiplication kernel and accumulation kernel run together
    load_prog(0, 0, prog_mult());
    load_prog(0, 1, prog_lin(P_SM, NB*NB*NB*S*S));
    load_prog(1, 0, prog_lin(P_SM, NB*NB*NB*S*S));
    load_prog(1, 1, prog_lin(C_SM, NB*NB*S*S));
    cfg(reg_a(3, 0), 3);
    wait (core_busy[0] == 1'b0);
    repeat (4) @(negedge clk);
    cfg(reg_a(3, 1), 3);
    repeat (4) @(negedge clk);
    wait (core_busy[1:0] == 2'b00);
    repeat (4) @(negedge clk);
    $display("kernels done at cycle %0t", $time / 10);

    // 4. C back to the host, one 2D descriptor per block
    cfg(reg_a(1, 0), 32'b10);
    cfg(reg_a(1, 2), C_SM);
    cfg(reg_a(1, 3), N*N);
    for (int i = 0; i < NB; i++)
      for (int j = 0; j < NB; j++)
        dma_desc(i*NB + j, C_H + i*S*N + j*S, S, N, S, 1, (i == NB-1) && (j == NB-1));
    dma_run();

    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        cref = '0;
        for (int k = 0; k < N; k++) cref += fa(r, k) * fb(k, c);
        check(hmem.mem[C_H + r*N + c] === cref, $sformatf("C[%0d][%0d] = %0d, expected %0d", r, c, hmem.mem[C_H + r*N + c], cref));
      end
    $display("finished at cycle %0t", $time / 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
