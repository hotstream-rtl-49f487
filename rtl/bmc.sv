// bmc: Bus Master Controller of a Core.
//
// Converts between the stream interfaces of the DFCs and PE and the
// memory-mapped burst port of the shared memory. It holds one read unit
// (MM-to-Stream, with prefetch buffer) and one write unit (Stream-to-MM,
// with synchronizer); a round-robin arbiter lets only one of the two
// channels use the bus at a time, one whole burst at a time.
module bmc
  import hs_pkg::*;
#(
  parameter int unsigned MAX_BURST = 16,
  parameter int unsigned BUF_DEPTH = 32
) (
  input  logic    clk,
  input  logic    rst_n,
  // read channel
  input  addr_t   rd_addr,
  input  logic    rd_addr_valid,
  output logic    rd_addr_ready,
  output data_t   rd_data,
  output logic    rd_data_valid,
  input  logic    rd_data_ready,
  // write channel
  input  addr_t   wr_addr,
  input  logic    wr_addr_valid,
  output logic    wr_addr_ready,
  input  data_t   wr_data,
  input  logic    wr_data_valid,
  output logic    wr_data_ready,
  // shared-memory master port
  output mm_req_t mm_req,
  input  mm_rsp_t mm_rsp,
  output logic    idle
);
  mm_req_t ch_req [2];
  mm_rsp_t ch_rsp [2];
  logic    rd_idle, wr_idle;

  bmc_read #(.MAX_BURST(MAX_BURST), .BUF_DEPTH(BUF_DEPTH)) u_rd (
    .clk, .rst_n,
    .addr_i(rd_addr), .addr_valid(rd_addr_valid), .addr_ready(rd_addr_ready),
    .data_o(rd_data), .data_valid(rd_data_valid), .data_ready(rd_data_ready),
    .mm_req(ch_req[0]), .mm_rsp(ch_rsp[0]), .idle(rd_idle)
  );

  bmc_write #(.MAX_BURST(MAX_BURST)) u_wr (
    .clk, .rst_n,
    .addr_i(wr_addr), .addr_valid(wr_addr_valid), .addr_ready(wr_addr_ready),
    .data_i(wr_data), .data_valid(wr_data_valid), .data_ready(wr_data_ready),
    .mm_req(ch_req[1]), .mm_rsp(ch_rsp[1]), .idle(wr_idle)
  );

  mem_arbiter #(.N(2)) u_arb (
    .clk, .rst_n, .m_req(ch_req), .m_rsp(ch_rsp), .s_req(mm_req), .s_rsp(mm_rsp)
  );

  assign idle = rd_idle && wr_idle;
endmodule
