// mem_arbiter: shares one memory-mapped burst port among N masters.
//
// Used for the shared-memory port of the whole engine (one master per
// Core BMC plus the Data Stream Switch) and inside each BMC to merge its
// read and write units. A work-conserving round-robin arbiter picks among
// the masters whose command is valid; the winner's command is passed to
// the slave, and when the slave accepts it the port is locked to that
// master until the transaction's last beat (the last read beat returned,
// or the last write beat accepted). Requests are served with equal
// priority and none starves.
//
// Timing: the command path is combinational (no added cycle); the next
// command can be granted in the cycle after the last beat.
module mem_arbiter
  import hs_pkg::*;
#(
  parameter int unsigned N = 2
) (
  input  logic    clk,
  input  logic    rst_n,
  input  mm_req_t m_req [N],
  output mm_rsp_t m_rsp [N],
  output mm_req_t s_req,
  input  mm_rsp_t s_rsp
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0]  cmd_req, grant;
  logic [IW-1:0] gidx, owner_q, sel;
  logic          any, locked_q, lock_wr_q, cmd_fire, done;

  for (genvar i = 0; i < N; i++) begin : g_req
    assign cmd_req[i] = m_req[i].cmd_valid;
  end

  rr_arbiter #(.N(N)) u_rr (
    .clk, .rst_n, .req(cmd_req), .advance(cmd_fire),
    .grant, .grant_idx(gidx), .any
  );

  assign sel      = locked_q ? owner_q : gidx;
  assign cmd_fire = !locked_q && any && s_rsp.cmd_ready;
  assign done     = locked_q && (lock_wr_q
                    ? (s_req.wvalid && s_rsp.wready && s_req.wlast)
                    : (s_rsp.rvalid && s_rsp.rlast));

  always_comb begin
    s_req           = m_req[sel];
    s_req.cmd_valid = !locked_q && any;
    s_req.wvalid    = locked_q && lock_wr_q && m_req[sel].wvalid;
    for (int i = 0; i < N; i++) begin
      m_rsp[i]           = '0;
      m_rsp[i].rdata     = s_rsp.rdata;
      m_rsp[i].rlast     = s_rsp.rlast;
      m_rsp[i].cmd_ready = !locked_q && grant[i] && s_rsp.cmd_ready;
      m_rsp[i].wready    = locked_q && lock_wr_q && (owner_q == IW'(i)) && s_rsp.wready;
      m_rsp[i].rvalid    = locked_q && !lock_wr_q && (owner_q == IW'(i)) && s_rsp.rvalid;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      locked_q  <= 1'b0;
      lock_wr_q <= 1'b0;
      owner_q   <= '0;
    end else if (cmd_fire) begin
      locked_q  <= 1'b1;
      lock_wr_q <= m_req[gidx].cmd.write;
      owner_q   <= gidx;
    end else if (done) begin
      locked_q  <= 1'b0;
    end
  end
endmodule
