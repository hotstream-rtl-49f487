// tb_agc: drives the ERF and Done directly, compares the address stream of
// the AGC with a nested-loop reference, and checks the timing: one address
// per cycle, one idle cycle when a loop level completes or a new parameter
// set is taken, and Wait released as soon as the pending set is taken
// (double buffering: the next set is written while the AGC runs).
module tb_agc;
  import hs_pkg::*;
  import m16_asm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  logic [15:0] erf_q [ERF_N];
  logic        erf_we, done_i, wait_o, busy_o, addr_valid, addr_ready;
  logic [3:0]  erf_waddr;
  logic [15:0] erf_wdata;
  logic [31:0] addr_o;
  logic        rand_ready;

  agc #(.N_LOOPS(3), .ADDR_W(32)) dut (.*);

  uq_t exp_q;
  int unsigned got, stalls_seen;
  longint first_cyc, last_cyc;
  int idle_cycles;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // consumer
  always @(negedge clk) addr_ready = rand_ready ? ($urandom_range(0, 2) != 0) : 1'b1;
  always @(posedge clk) if (rst_n) begin
    if (addr_valid && addr_ready) begin
      if (got == 0) first_cyc = cyc;
      last_cyc = cyc;
      got++;
      if (exp_q.size() == 0) begin
        checks++; failures++; $display("FAIL: unexpected address %0d", addr_o);
      end else begin
        automatic int unsigned e = exp_q.pop_front();
        checks++;
        if (addr_o != e) begin failures++; $display("FAIL: addr %0d exp %0d", addr_o, e); end
      end
    end else if (got > 0 && exp_q.size() > 0) idle_cycles++;
  end

  task automatic erf_write(int unsigned idx, logic [15:0] v);
    @(negedge clk); erf_we = 1; erf_waddr = 4'(idx); erf_wdata = v;
    @(negedge clk); erf_we = 0;
  endtask

  task automatic set_params(int unsigned m, int inc, int unsigned init,
                            int unsigned r[3], int li[3]);
    erf_write(ERF_LB_MULT, 16'(m));
    erf_write(ERF_LB_INC, 16'(inc));
    erf_write(ERF_LB_INIT_LO, init[15:0]);
    erf_write(ERF_LB_INIT_HI, init[31:16]);
    for (int k = 0; k < 3; k++) begin
      erf_write(erf_lc_reset(k), 16'(r[k]));
      erf_write(erf_lc_inc(k), 16'(li[k]));
    end
    agc_ref(exp_q, m, inc, init, r, li);
  endtask

  task automatic pulse_done();
    @(negedge clk); done_i = 1; @(negedge clk); done_i = 0;
  endtask

  task automatic wait_release();
    while (wait_o) @(negedge clk);
  endtask

  initial begin
    automatic int unsigned r[3];
    automatic int li[3];
    erf_we = 0; done_i = 0; erf_waddr = 0; erf_wdata = 0; rand_ready = 0;
    got = 0; idle_cycles = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // ERF reset values: mult 1, inc 1, every level one iteration
    check(erf_q[ERF_LB_MULT] === 1 && erf_q[ERF_LB_INC] === 1 && erf_q[erf_lc_reset(2)] === 1, "ERF reset values");

    // 1) linear, 64 addresses: 64 cycles, no idle
    r = '{64, 1, 1}; li = '{0, 0, 0};
    set_params(1, 1, 100, r, li);
    pulse_done();
    wait (exp_q.size() == 0); @(negedge clk);
    check(last_cyc - first_cyc === 63, $sformatf("linear: 64 addresses in %0d cycles", last_cyc - first_cyc + 1));
    check(idle_cycles === 0, "linear: no idle cycle");
    wait (!busy_o);

    // 2) tiled 8 x 5 with row stride 40: 4 row changes -> 4 idle cycles
    got = 0; idle_cycles = 0;
    r = '{8, 5, 1}; li = '{40, 0, 0};
    set_params(1, 1, 32'h0001_0000, r, li);
    pulse_done();
    wait (exp_q.size() == 0); @(negedge clk);
    check(last_cyc - first_cyc + 1 === 40 + 4, $sformatf("tiled: 40 addresses in %0d cycles", last_cyc - first_cyc + 1));
    wait (!busy_o);

    // 3) 3 levels, signed increments and a multiplier, then a second set
    //    prepared while the first runs (double buffering)
    got = 0; idle_cycles = 0;
    r = '{3, 4, 2}; li = '{-100, 1000, 0};
    set_params(2, -1, 5000, r, li);
    pulse_done();
    wait_release();
    check(busy_o && !wait_o, "ERF released while the AGC runs");
    r = '{5, 2, 3}; li = '{7, 64, 0};
    set_params(1, 3, 200, r, li);
    check(exp_q.size() > 30, "second set prepared before the first finished");
    pulse_done();
    wait (exp_q.size() == 0); @(negedge clk);
    // 24 + 30 addresses; idle: (8 rows - 1) + 1 handover + (6 rows - 1)
    check(last_cyc - first_cyc + 1 === 54 + 7 + 1 + 5,
          $sformatf("back-to-back sets: %0d cycles", last_cyc - first_cyc + 1));
    wait (!busy_o);

    // 4) random back-pressure, random parameters
    rand_ready = 1;
    for (int t = 0; t < 6; t++) begin
      r = '{$urandom_range(0, 6), $urandom_range(1, 4), $urandom_range(1, 3)};
      li = '{int'($urandom_range(0, 200)) - 100, int'($urandom_range(0, 2000)) - 1000, 0};
      set_params($urandom_range(1, 2), int'($urandom_range(0, 10)) - 5, $urandom, r, li);
      pulse_done();
      wait_release();
    end
    wait (exp_q.size() == 0);
    repeat (5) @(negedge clk);
    check(!busy_o, "idle after last pattern");
    check(exp_q.size() === 0, "all addresses seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
