// tb_core: one Core with a behavioural PE (y = 3x + 1, random stalls) and a
// shared-memory model. The read DFC walks an 8 x 8 block column by column
// (a transposing pattern); the write DFC stores the results linearly.
// Checks every result word and that the Core goes idle.
module tb_core;
  import hs_pkg::*;
  import m16_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        imem_we, imem_sel, start_rd, start_wr, busy;
  logic [9:0]  imem_waddr;
  logic [31:0] imem_wdata;
  data_t       pe_in_data, pe_out_data;
  logic        pe_in_valid, pe_in_ready, pe_out_valid, pe_out_ready;
  mm_req_t     mm_req;
  mm_rsp_t     mm_rsp;

  core #(.N_LOOPS(3), .IMEM_DEPTH(1024), .MAX_BURST(16), .BUF_DEPTH(32)) dut (.*);
  mm_mem_model #(.WORDS(4096), .LAT(3), .STALL(1)) mem (.clk, .rst_n, .req(mm_req), .rsp(mm_rsp));

  // behavioural PE: one-word pipeline register
  logic pe_full;
  always @(posedge clk or negedge rst_n)
    if (!rst_n) pe_full <= 0;
    else begin
      if (pe_in_valid && pe_in_ready) begin pe_out_data <= pe_in_data * 3 + 1; pe_full <= 1; end
      else if (pe_out_ready) pe_full <= 0;
    end
  assign pe_out_valid = pe_full;
  logic stall;
  always @(negedge clk) stall = ($urandom_range(0, 4) == 0);
  assign pe_in_ready = (!pe_full || pe_out_ready) && !stall;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic load(bit sel, prog_t p);
    for (int i = 0; i < p.size(); i++) begin
      @(negedge clk); imem_we = 1; imem_sel = sel; imem_waddr = 10'(i); imem_wdata = p[i];
    end
    @(negedge clk); imem_we = 0;
  endtask

  initial begin
    for (int i = 0; i < 4096; i++) mem.mem[i] = 16'(i * 7 + 2);
    imem_we = 0; imem_sel = 0; imem_waddr = 0; imem_wdata = 0; start_rd = 0; start_wr = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    load(0, '{LDI(E_MULT, 1), LDI(E_INC, 8), LDI(E_INIT_LO, 16'h100),
              LDI(e_lc_reset(0), 8), LDI(e_lc_inc(0), 1), LDI(e_lc_reset(1), 8), DONE(), HALT()});
    load(1, prog_linear(64));
    // the write program's linear pattern starts at 0; move it to 0x400
    load(1, '{LDI(E_MULT, 1), LDI(E_INC, 1), LDI(E_INIT_LO, 16'h400), LDI(e_lc_reset(0), 64), DONE(), HALT()});
    @(negedge clk); start_rd = 1; start_wr = 1; @(negedge clk); start_rd = 0; start_wr = 0;
    repeat (5) @(negedge clk);
    wait (!busy); repeat (3) @(negedge clk);
    for (int k = 0; k < 64; k++) begin
      automatic int src = 16'h100 + (k % 8) * 8 + k / 8;
      check(mem.mem[16'h400 + k] === 16'((src * 7 + 2) * 3 + 1), $sformatf("result %0d", k));
    end
    check(mem.mem[16'h440] === 16'(16'h440 * 7 + 2), "nothing written past the result");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
