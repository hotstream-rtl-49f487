// loopbody: the AGC's address generator for the body of the loop nest.
//
// It holds the current address and produces the next one as
//     y(n) = y(n-1) * mult + inc
// (an affine sequence; mult = 1 gives a plain stride). `restart` loads a
// new start address (the first address of a new loop iteration chosen by
// the Loopcontrol units); `step` advances the sequence by one; restart
// wins if both are raised. `load` copies a new mult/inc pair into the
// active registers (the AGC's double-buffered configuration). The address
// is a register, so `addr` changes the cycle after `step` or `restart`.
// The product is truncated to the address width.
module loopbody #(
  parameter int unsigned ADDR_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [15:0]       cfg_mult,     // unsigned
  input  logic [15:0]       cfg_inc,      // signed
  input  logic              restart,
  input  logic [ADDR_W-1:0] restart_addr,
  input  logic              step,
  output logic [ADDR_W-1:0] addr
);
  logic [15:0]       mult_q, inc_q;
  logic [ADDR_W-1:0] addr_q;
  logic [ADDR_W-1:0] mult_ext, inc_ext;

  assign mult_ext = ADDR_W'(mult_q);
  assign inc_ext  = ADDR_W'($signed(inc_q));
  assign addr     = addr_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mult_q <= 16'd1;
      inc_q  <= 16'd1;
      addr_q <= '0;
    end else begin
      if (load) begin
        mult_q <= cfg_mult;
        inc_q  <= cfg_inc;
      end
      if (restart)   addr_q <= restart_addr;
      else if (step) addr_q <= addr_q * mult_ext + inc_ext;
    end
  end
endmodule
