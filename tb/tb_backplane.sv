// tb_backplane: a 5-port crossbar with a unicast route, a multicast route
// (one input to two outputs) and an unrouted input, under random valid and
// ready. Every output must see its source's words in order, and an input
// with no route must never be taken.
module tb_backplane;
  import hs_pkg::*;
  localparam int P = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [2:0]   route_src [P];
  logic [P-1:0] route_en, in_valid, in_ready, out_valid, out_ready;
  data_t        in_data [P], out_data [P];
  int           sent [P], recv [P];
  logic [P-1:0] in_x, out_x;

  backplane #(.P(P), .IW(3)) dut (.*);

  initial begin
    #1ms; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic data_t word(int src, int n); return data_t'(src * 4096 + n); endfunction

  always @(negedge clk) begin
    #2;
    for (int i = 0; i < P; i++) begin
      in_x[i]  = in_valid[i] && in_ready[i];
      out_x[i] = out_valid[i] && out_ready[i];
      if (out_x[i]) begin
        checks++;
        if (out_data[i] != word(int'(route_src[i]), recv[i])) begin
          failures++; $display("FAIL: out %0d word %0d = %h", i, recv[i], out_data[i]);
        end
      end
    end
    if (in_x[4]) begin failures++; $display("FAIL: unrouted input taken"); end
  end
  always @(posedge clk) for (int i = 0; i < P; i++) begin
    if (in_x[i])  sent[i] <= sent[i] + 1;
    if (out_x[i]) recv[i] <= recv[i] + 1;
  end
  always @(negedge clk) for (int i = 0; i < P; i++) begin
    if (!in_valid[i] || in_x[i]) in_valid[i] = rst_n && ($urandom_range(0, 3) != 0) && sent[i] < 300;
    in_data[i]   = word(i, sent[i]);
    out_ready[i] = ($urandom_range(0, 3) != 0);
  end

  initial begin
    for (int i = 0; i < P; i++) begin sent[i] = 0; recv[i] = 0; route_src[i] = 0; end
    in_valid = 0; out_ready = 0; in_x = 0; out_x = 0;
    // out0 <- in2, out1 <- in2 (multicast), out3 <- in0, out2 <- in1
    route_src[0] = 2; route_src[1] = 2; route_src[3] = 0; route_src[2] = 1;
    route_en = 5'b01111;
    repeat (3) @(posedge clk); rst_n = 1;
    wait (sent[0] == 300 && sent[1] == 300 && sent[2] == 300);
    repeat (30) @(negedge clk);
    checks++;
    if (!(recv[0] == 300 && recv[1] == 300 && recv[3] == 300 && recv[2] == 300 && recv[4] == 0)) begin
      failures++; $display("FAIL: counts %0d %0d %0d %0d %0d", recv[0], recv[1], recv[2], recv[3], recv[4]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
