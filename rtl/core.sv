// core: one Core of the engine, without its Processing Element.
//
// A Core pairs a PE with the data-management units that feed it: a read
// DFC generating the addresses of the PE's input stream, a write DFC
// generating the addresses of its output stream, and the Bus Master
// Controller that turns both into shared-memory bursts. The PE itself is
// application specific and sits outside this module; it sees only streams
// (pe_in_* it consumes, pe_out_* it produces) and never the addresses.
//
// Host access: imem_we/imem_sel/imem_waddr/imem_wdata load the program of
// the read DFC (imem_sel = 0) or the write DFC (imem_sel = 1);
// start_rd / start_wr run them. busy is high while either DFC is active
// or the BMC still holds data.
module core
  import hs_pkg::*;
#(
  parameter int unsigned N_LOOPS    = 3,
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter int unsigned IMEM_AW    = $clog2(IMEM_DEPTH),
  parameter int unsigned MAX_BURST  = 16,
  parameter int unsigned BUF_DEPTH  = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               imem_we,
  input  logic               imem_sel,
  input  logic [IMEM_AW-1:0] imem_waddr,
  input  logic [31:0]        imem_wdata,
  input  logic               start_rd,
  input  logic               start_wr,
  output logic               busy,
  // PE streams
  output data_t              pe_in_data,
  output logic               pe_in_valid,
  input  logic               pe_in_ready,
  input  data_t              pe_out_data,
  input  logic               pe_out_valid,
  output logic               pe_out_ready,
  // shared-memory master port
  output mm_req_t            mm_req,
  input  mm_rsp_t            mm_rsp
);
  addr_t ra, wa;
  logic  rav, rar, wav, war, rbusy, wbusy, bidle;

  dfc #(.N_LOOPS(N_LOOPS), .ADDR_W(HS_ADDR_W), .IMEM_DEPTH(IMEM_DEPTH), .IMEM_AW(IMEM_AW)) u_rdfc (
    .clk, .rst_n,
    .imem_we(imem_we && !imem_sel), .imem_waddr, .imem_wdata,
    .start(start_rd), .busy(rbusy),
    .addr_o(ra), .addr_valid(rav), .addr_ready(rar)
  );

  dfc #(.N_LOOPS(N_LOOPS), .ADDR_W(HS_ADDR_W), .IMEM_DEPTH(IMEM_DEPTH), .IMEM_AW(IMEM_AW)) u_wdfc (
    .clk, .rst_n,
    .imem_we(imem_we && imem_sel), .imem_waddr, .imem_wdata,
    .start(start_wr), .busy(wbusy),
    .addr_o(wa), .addr_valid(wav), .addr_ready(war)
  );

  bmc #(.MAX_BURST(MAX_BURST), .BUF_DEPTH(BUF_DEPTH)) u_bmc (
    .clk, .rst_n,
    .rd_addr(ra), .rd_addr_valid(rav), .rd_addr_ready(rar),
    .rd_data(pe_in_data), .rd_data_valid(pe_in_valid), .rd_data_ready(pe_in_ready),
    .wr_addr(wa), .wr_addr_valid(wav), .wr_addr_ready(war),
    .wr_data(pe_out_data), .wr_data_valid(pe_out_valid), .wr_data_ready(pe_out_ready),
    .mm_req, .mm_rsp, .idle(bidle)
  );

  assign busy = rbusy || wbusy || !bidle;
endmodule
