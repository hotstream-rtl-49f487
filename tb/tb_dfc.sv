// tb_dfc: loads the benchmark pattern programs into a Data Fetch Controller
// through its program port, runs them, and checks every generated address
// against the pattern geometry and the generation rate (addresses per
// cycle) against the timing of the AGC: one address per cycle and one idle
// cycle per loop-level change or parameter-set change.
module tb_dfc;
  import hs_pkg::*;
  import m16_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  logic        imem_we, start, busy, addr_valid, addr_ready;
  logic [9:0]  imem_waddr;
  logic [31:0] imem_wdata, addr_o;
  logic        rand_ready;

  dfc #(.N_LOOPS(3), .ADDR_W(32), .IMEM_DEPTH(1024)) dut (.*);

  uq_t exp_q;
  int unsigned got, bad;
  longint first_cyc, last_cyc;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #20ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) addr_ready = rand_ready ? ($urandom_range(0, 3) != 0) : 1'b1;
  always @(posedge clk) if (rst_n && addr_valid && addr_ready) begin
    if (got == 0) first_cyc = cyc;
    last_cyc = cyc;
    got++;
    if (exp_q.size() == 0) bad++;
    else if (addr_o != exp_q.pop_front()) bad++;
  end

  task automatic run(input prog_t p, input string name, input longint exp_cycles);
    automatic int unsigned n = exp_q.size();
    // each program relies on the ERF reset values for what it leaves unset
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    for (int i = 0; i < p.size(); i++) begin
      @(negedge clk); imem_we = 1; imem_waddr = 10'(i); imem_wdata = p[i];
    end
    @(negedge clk); imem_we = 0; got = 0; bad = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    wait (!busy);
    repeat (3) @(negedge clk);
    check(bad === 0 && got === n && exp_q.size() === 0,
          $sformatf("%s: %0d addresses, %0d wrong, %0d missing", name, got, bad, exp_q.size()));
    $display("%-9s code %4d bytes  %7d addresses in %7d cycles  %.3f addr/cycle",
             name, 4 * p.size(), got, last_cyc - first_cyc + 1,
             real'(got) / real'(last_cyc - first_cyc + 1));
    if (exp_cycles > 0)
      check(last_cyc - first_cyc + 1 === exp_cycles,
            $sformatf("%s: %0d cycles, expected %0d", name, last_cyc - first_cyc + 1, exp_cycles));
    exp_q.delete();
  endtask

  initial begin
    imem_we = 0; imem_waddr = 0; imem_wdata = 0; start = 0; rand_ready = 0; got = 0; bad = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    check(!busy && !addr_valid, "idle after reset");
    ref_linear(exp_q, 1024);         run(prog_linear(1024), "linear", 1024);
    ref_tiled(exp_q, 128, 72, 512);  run(prog_tiled(128, 72, 512), "tiled", 9216 + 71);
    ref_diagonal(exp_q, 32);         run(prog_diagonal(32), "diagonal", 0);
    ref_zigzag(exp_q);               run(prog_zigzag(), "zigzag", 176);
    ref_cross(exp_q, 4);             run(prog_cross(4), "cross", 8*128 + 8*15 + 7);
    rand_ready = 1;
    ref_diagonal(exp_q, 20);         run(prog_diagonal(20), "diag/bp", 0);
    ref_cross(exp_q, 2);             run(prog_cross(2), "cross/bp", 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
