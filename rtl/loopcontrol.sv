// loopcontrol: one level of the AGC's nested-loop emulation.
//
// The unit counts enable pulses down from its reset value; the pulse that
// completes the count raises `irq` (combinationally, in the same cycle) and
// reloads the counter, so the level restarts by itself. In a chain, the
// `irq` of level k is the enable of level k+1, and level 1 is enabled once
// per generated address: the chain then behaves like nested for-loops.
//
// Besides the counter the unit keeps `start`, the address at which the
// current iteration of its level began, and its own signed increment. The
// address the AGC continues at when this level completes is start + inc,
// offered on `next_start`; the AGC writes the chosen value back to every
// level that completed through `upd`/`upd_start`.
//
// Both the reset value and the increment are the "active" copy of the
// configuration: they change only on `load`, which the AGC raises when it
// takes a new parameter set from the ERF (double buffering). A reset value
// of 0 is treated as 1 (one iteration); that is this design's choice.
module loopcontrol #(
  parameter int unsigned CNT_W  = 16,
  parameter int unsigned ADDR_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // configuration transfer
  input  logic              load,
  input  logic [CNT_W-1:0]  cfg_reset,
  input  logic [15:0]       cfg_inc,      // signed
  input  logic [ADDR_W-1:0] load_start,
  // counting
  input  logic              en,
  output logic              irq,
  // start-address bookkeeping
  output logic [ADDR_W-1:0] next_start,
  input  logic              upd,
  input  logic [ADDR_W-1:0] upd_start
);
  logic [CNT_W-1:0]  cnt_q, reset_q;
  logic [15:0]       inc_q;
  logic [ADDR_W-1:0] start_q;

  assign irq        = en && (cnt_q <= CNT_W'(1));
  assign next_start = start_q + ADDR_W'($signed(inc_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q   <= CNT_W'(1);
      reset_q <= CNT_W'(1);
      inc_q   <= '0;
      start_q <= '0;
    end else if (load) begin
      cnt_q   <= cfg_reset;
      reset_q <= cfg_reset;
      inc_q   <= cfg_inc;
      start_q <= load_start;
    end else begin
      if (en) cnt_q <= irq ? reset_q : cnt_q - CNT_W'(1);
      if (upd) start_q <= upd_start;
    end
  end
endmodule
