// tb_micro16: runs small programs on the Micro16 with a model of the
// instruction memory (synchronous read) and of the ERF, and checks ALU
// results, carry, branches, the WAIT stall, DONE pulses, HALT and the
// one-instruction-per-cycle rate.
module tb_micro16;
  import hs_pkg::*;
  import m16_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        start, running, erf_we, done_o, wait_i;
  logic [9:0]  imem_addr;
  logic [31:0] imem_data;
  logic [15:0] erf_q [ERF_N];
  logic [3:0]  erf_waddr;
  logic [15:0] erf_wdata;
  logic [31:0] prog [1024];
  int          n_done, cycles;

  micro16 #(.IMEM_AW(10)) dut (.*);

  always_ff @(posedge clk) imem_data <= prog[imem_addr];
  always_ff @(posedge clk) begin
    if (erf_we) erf_q[erf_waddr] <= erf_wdata;
    if (done_o) n_done <= n_done + 1;
    if (running && rst_n) cycles <= cycles + 1;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run_prog();
    @(negedge clk); start = 1; @(negedge clk); start = 0;
  endtask

  initial begin
    for (int i = 0; i < 1024; i++) prog[i] = HALT();
    for (int i = 0; i < ERF_N; i++) erf_q[i] = 16'h5555;
    start = 0; wait_i = 0; n_done = 0; cycles = 0;
    // program 1: arithmetic into the ERF, 9 instructions + HALT = 10 cycles
    prog[0] = LDI(5'd1, 16'hFFF0);
    prog[1] = LDI(5'd2, 16'h0020);
    prog[2] = ADD(5'd16, 5'd1, 5'd2);         // 0x0010, carry 1
    prog[3] = ADCI(5'd17, 5'd0, 16'd5);       // 0 + 5 + 1 = 6
    prog[4] = SUB(5'd18, 5'd2, 5'd1);         // 0x0030
    prog[5] = XOR_(5'd19, 5'd1, 5'd2);        // 0xFFD0
    prog[6] = SLL(5'd20, 5'd2, 4'd3);         // 0x0100
    prog[7] = SRL(5'd21, 5'd1, 4'd4);         // 0x0FFF
    prog[8] = ADDI(5'd22, 5'd16, 16'd1);      // ERF source: 0x0011
    prog[9] = HALT();
    repeat (2) @(posedge clk); rst_n = 1;
    check(!running, "halted after reset");
    run_prog();
    wait (!running); @(negedge clk);
    check(erf_q[0] === 16'h0010, "ADD");
    check(erf_q[1] === 16'd6,    "ADCI with carry");
    check(erf_q[2] === 16'h0030, "SUB");
    check(erf_q[3] === 16'hFFD0, "XOR");
    check(erf_q[4] === 16'h0100, "SLL");
    check(erf_q[5] === 16'h0FFF, "SRL");
    check(erf_q[6] === 16'h0011, "ERF as source");
    check(cycles === 10, $sformatf("one instruction per cycle (%0d cycles)", cycles));

    // program 2: loop of 5 DONE/WAIT pairs with a counter, WAIT held
    for (int i = 0; i < 1024; i++) prog[i] = HALT();
    prog[0] = LDI(5'd1, 16'd0);
    prog[1] = LDI(5'd2, 16'd5);
    prog[2] = DONE();
    prog[3] = WAIT();
    prog[4] = ADDI(5'd1, 5'd1, 16'd1);
    prog[5] = ADD(5'd23, 5'd1, 5'd0);        // ERF[7] = counter
    prog[6] = BNE(5'd1, 5'd2, 16'd2);
    prog[7] = BLT(5'd2, 5'd1, 16'd9);        // 5 < 5: not taken
    prog[8] = BEQ(5'd1, 5'd2, 16'd10);       // taken
    prog[9] = LDI(5'd24, 16'hBAD0);          // skipped
    prog[10] = HALT();
    n_done = 0; cycles = 0; wait_i = 1;
    run_prog();
    repeat (20) @(negedge clk);
    check(running && n_done === 1, "stalled at WAIT");
    check(erf_q[7] === 16'h5555, "nothing executed past WAIT");
    wait_i = 0;
    wait (!running); @(negedge clk);
    check(n_done === 5, $sformatf("5 DONE pulses (%0d)", n_done));
    check(erf_q[7] === 16'd5, "loop counter");
    check(erf_q[8] === 16'h5555, "branch skipped an instruction");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
