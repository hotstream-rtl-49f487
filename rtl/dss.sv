// dss: Data Stream Switch between the host DMA and the engine.
//
// The inbound host stream goes either to the backplane (straight to a
// Core) or into the shared memory; the outbound host stream comes either
// from the backplane or from the shared memory. Shared-memory transfers
// use linear addresses: the host sets a base address and, for reads, a
// word count, and the switch writes or reads consecutive words through
// its own Bus Master Controller (so they are burst transfers).
//
// Configuration (held in the top-level register block):
//   in_to_mem   0: host -> backplane, 1: host -> shared memory at wr_base
//   out_from_mem 0: backplane -> host, 1: shared memory from rd_base
//   rd_start    pulse: begin reading rd_count words from rd_base
//   wr_start    pulse: restart the write address counter at wr_base
module dss
  import hs_pkg::*;
#(
  parameter int unsigned MAX_BURST = 16,
  parameter int unsigned BUF_DEPTH = 32
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_to_mem,
  input  logic    out_from_mem,
  input  addr_t   wr_base,
  input  logic    wr_start,
  input  addr_t   rd_base,
  input  addr_t   rd_count,
  input  logic    rd_start,
  output logic    busy,
  // host side (from / to the DMA controller)
  input  data_t   host_in_data,
  input  logic    host_in_valid,
  output logic    host_in_ready,
  output data_t   host_out_data,
  output logic    host_out_valid,
  input  logic    host_out_ready,
  // backplane node
  output data_t   bp_out_data,
  output logic    bp_out_valid,
  input  logic    bp_out_ready,
  input  data_t   bp_in_data,
  input  logic    bp_in_valid,
  output logic    bp_in_ready,
  // shared-memory master port
  output mm_req_t mm_req,
  input  mm_rsp_t mm_rsp
);
  addr_t wr_addr_q, rd_addr_q, rd_left_q;
  logic  wr_av, wr_ar, wr_dv, wr_dr, rd_av, rd_ar, rd_dv, rd_dr, bmc_idle;
  data_t rd_d;

  // write side: the address counter runs whenever inbound data is routed
  // to memory; the BMC's synchronizer pairs it with the data
  assign wr_av = in_to_mem && !wr_start;
  assign wr_dv = in_to_mem && !wr_start && host_in_valid;
  // read side
  assign rd_av = (rd_left_q != '0);

  bmc #(.MAX_BURST(MAX_BURST), .BUF_DEPTH(BUF_DEPTH)) u_bmc (
    .clk, .rst_n,
    .rd_addr(rd_addr_q), .rd_addr_valid(rd_av), .rd_addr_ready(rd_ar),
    .rd_data(rd_d), .rd_data_valid(rd_dv), .rd_data_ready(rd_dr),
    .wr_addr(wr_addr_q), .wr_addr_valid(wr_av), .wr_addr_ready(wr_ar),
    .wr_data(host_in_data), .wr_data_valid(wr_dv), .wr_data_ready(wr_dr),
    .mm_req, .mm_rsp, .idle(bmc_idle)
  );

  assign bp_out_data   = host_in_data;
  assign bp_out_valid  = !in_to_mem && host_in_valid;
  assign host_in_ready = in_to_mem ? wr_dr : bp_out_ready;

  assign host_out_data  = out_from_mem ? rd_d : bp_in_data;
  assign host_out_valid = out_from_mem ? rd_dv : bp_in_valid;
  assign rd_dr          = out_from_mem && host_out_ready;
  assign bp_in_ready    = !out_from_mem && host_out_ready;

  assign busy = !bmc_idle || rd_av;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_addr_q <= '0; rd_addr_q <= '0; rd_left_q <= '0;
    end else begin
      if (wr_start)   wr_addr_q <= wr_base;
      else if (wr_ar) wr_addr_q <= wr_addr_q + addr_t'(1);
      if (rd_start) begin
        rd_addr_q <= rd_base;
        rd_left_q <= rd_count;
      end else if (rd_ar) begin
        rd_addr_q <= rd_addr_q + addr_t'(1);
        rd_left_q <= rd_left_q - addr_t'(1);
      end
    end
  end
endmodule
