// agc: Address Generation Core of a Data Fetch Controller.
//
// N_LOOPS Loopcontrol units are chained so that level 1 is enabled by each
// issued address and level k+1 by the completion interrupt of level k; a
// Loopbody unit produces the addresses inside the innermost loop. The result
// is the address sequence of an N-level nested loop whose body is the affine
// sequence y(n) = y(n-1)*mult + inc:
//
//   for each iteration of level N .. level 1:
//     y = start of the innermost level; emit y; y = y*mult + inc ...
//   when the levels 1..j complete together, the next start is
//   start_j + inc_j, and it becomes the start of levels 1..j.
//
// Configuration is double buffered. The External Register File (ERF, 16
// registers of 16 bits, map in hs_pkg) is the shadow copy that the Micro16
// reads and writes. `done_i` marks the ERF contents as a complete parameter
// set; `wait_o` stays high until the AGC has copied that set into its active
// registers, after which the Micro16 may prepare the next one while the
// current pattern is still being generated.
//
// Timing: one address per cycle while addr_ready is high. When a loop level
// completes, the interrupt is registered and the start-address mux is
// applied in the following cycle, so the next start address leaves two
// cycles after the previous address (one idle cycle). The same holds when a
// pattern ends and a pending parameter set is taken. The single idle cycle
// is this design's reading of the two-cycle delay that the architecture
// gives for computing the next start address.
module agc
  import hs_pkg::*;
#(
  parameter int unsigned N_LOOPS = 3,
  parameter int unsigned ADDR_W  = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  // ERF access for the Micro16
  output logic [15:0]       erf_q [ERF_N],
  input  logic              erf_we,
  input  logic [3:0]        erf_waddr,
  input  logic [15:0]       erf_wdata,
  // Wait / Done
  input  logic              done_i,
  output logic              wait_o,
  output logic              busy_o,
  // address stream
  output logic [ADDR_W-1:0] addr_o,
  output logic              addr_valid,
  input  logic              addr_ready
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_WRAP} state_t;
  state_t state_q;

  logic [15:0] erf [ERF_N];
  logic        pending_q;

  logic [N_LOOPS-1:0] irq;
  logic [ADDR_W-1:0]  next_start [N_LOOPS];
  logic [N_LOOPS-1:0] upd;
  logic [ADDR_W-1:0]  upd_start;
  logic [$clog2(N_LOOPS+1)-1:0] sel_q, sel_d;  // highest completed level
  logic fire, load, pattern_end;
  logic [ADDR_W-1:0] init_addr;

  assign erf_q     = erf;
  assign wait_o    = pending_q;
  assign busy_o    = pending_q || (state_q != S_IDLE);
  assign fire      = addr_valid && addr_ready;
  assign init_addr = ADDR_W'({erf[ERF_LB_INIT_HI], erf[ERF_LB_INIT_LO]});
  assign load      = (state_q == S_IDLE) && pending_q;
  assign pattern_end = fire && irq[N_LOOPS-1];
  assign addr_valid  = (state_q == S_RUN);

  // ---------------------------------------------------------------- ERF
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ERF_N; i++) erf[i] <= 16'd0;
      erf[ERF_LB_MULT] <= 16'd1;
      erf[ERF_LB_INC]  <= 16'd1;
      for (int k = 0; k < N_LOOPS; k++) erf[erf_lc_reset(k)] <= 16'd1;
    end else if (erf_we) begin
      erf[erf_waddr] <= erf_wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      pending_q <= 1'b0;
    else if (load)   pending_q <= 1'b0;
    else if (done_i) pending_q <= 1'b1;
  end

  // ------------------------------------------------------ loop levels
  for (genvar k = 0; k < N_LOOPS; k++) begin : g_lc
    logic en;
    if (k == 0) begin : g_first
      assign en = fire;
    end else begin : g_next
      assign en = irq[k-1];
    end
    loopcontrol #(.CNT_W(16), .ADDR_W(ADDR_W)) u_lc (
      .clk, .rst_n,
      .load       (load),
      .cfg_reset  (erf[erf_lc_reset(k)]),
      .cfg_inc    (erf[erf_lc_inc(k)]),
      .load_start (init_addr),
      .en         (en),
      .irq        (irq[k]),
      .next_start (next_start[k]),
      .upd        (upd[k]),
      .upd_start  (upd_start)
    );
  end

  // highest level that completes with this address (irq[k] implies irq[k-1])
  always_comb begin
    sel_d = '0;
    for (int k = 0; k < N_LOOPS; k++)
      if (irq[k]) sel_d = ($clog2(N_LOOPS+1))'(k);
  end

  // start-address mux, applied in the WRAP cycle
  assign upd_start = next_start[sel_q];
  always_comb begin
    for (int k = 0; k < N_LOOPS; k++)
      upd[k] = (state_q == S_WRAP) && (k <= int'(sel_q));
  end

  loopbody #(.ADDR_W(ADDR_W)) u_lb (
    .clk, .rst_n,
    .load         (load),
    .cfg_mult     (erf[ERF_LB_MULT]),
    .cfg_inc      (erf[ERF_LB_INC]),
    .restart      (load || state_q == S_WRAP),
    .restart_addr (load ? init_addr : upd_start),
    .step         (fire && !irq[0]),
    .addr         (addr_o)
  );

  // ---------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      sel_q   <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: if (load) state_q <= S_RUN;
        S_RUN:
          if (pattern_end) state_q <= S_IDLE;
          else if (fire && irq[0]) begin
            state_q <= S_WRAP;
            sel_q   <= sel_d;
          end
        S_WRAP: state_q <= S_RUN;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // The Micro16 must wait for the ERF to be released before changing it.
  a_erf_free: assert property (@(posedge clk) disable iff (!rst_n) !(erf_we && pending_q))
    else $error("agc: ERF written while a parameter set is pending");
endmodule
