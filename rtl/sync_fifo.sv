// sync_fifo: single-clock FIFO used as the data buffer of the BMC and DMA.
//
// DEPTH entries of WIDTH bits; push when `push` (caller ensures not full),
// pop when `pop` (caller ensures not empty). `count` is the fill level.
// The head entry is readable combinationally on `rdata` (first-word
// fall-through), so a stream can be driven straight from it.
module sync_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 32,
  parameter int unsigned CW    = $clog2(DEPTH+1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic [CW-1:0]    count,
  output logic             full,
  output logic             empty
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    wp_q, rp_q;
  logic [CW-1:0]    cnt_q;

  function automatic logic [PW-1:0] inc_ptr(input logic [PW-1:0] p);
    return (p == PW'(DEPTH-1)) ? '0 : p + PW'(1);
  endfunction

  assign rdata = mem[rp_q];
  assign count = cnt_q;
  assign full  = (cnt_q == CW'(DEPTH));
  assign empty = (cnt_q == '0);

  always_ff @(posedge clk) if (push) mem[wp_q] <= wdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp_q <= '0; rp_q <= '0; cnt_q <= '0;
    end else begin
      if (push) wp_q <= inc_ptr(wp_q);
      if (pop)  rp_q <= inc_ptr(rp_q);
      cnt_q <= cnt_q + CW'(push) - CW'(pop);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty));
endmodule
