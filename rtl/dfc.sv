// dfc: Data Fetch Controller.
//
// The unit that turns a small program into a stream of shared-memory
// addresses. It holds an instruction memory (written by the host), a
// Micro16 microcontroller and an Address Generation Core (AGC); the two
// processors meet in the AGC's External Register File. The Micro16 fills
// the ERF with the parameters of one regular (1D/2D/3D) sub-pattern,
// issues DONE, and after WAIT prepares the next sub-pattern while the AGC
// is still generating the current one, so complex patterns are built from
// a sequence of regular ones without gaps in the address stream.
//
// `start` runs the program from address 0; `busy` is high while the
// program runs or the AGC still has addresses to issue. The address stream
// is a valid/ready handshake: an address is taken when both are high.
module dfc
  import hs_pkg::*;
#(
  parameter int unsigned N_LOOPS    = 3,
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter int unsigned IMEM_AW    = $clog2(IMEM_DEPTH)
) (
  input  logic               clk,
  input  logic               rst_n,
  // program load from the host
  input  logic               imem_we,
  input  logic [IMEM_AW-1:0] imem_waddr,
  input  logic [31:0]        imem_wdata,
  // control
  input  logic               start,
  output logic               busy,
  // address stream
  output logic [ADDR_W-1:0]  addr_o,
  output logic               addr_valid,
  input  logic               addr_ready
);
  logic [IMEM_AW-1:0] imem_raddr;
  logic [31:0]        imem_rdata;
  logic [15:0]        erf_q [ERF_N];
  logic               erf_we, done, wait_s, running, agc_busy;
  logic [3:0]         erf_waddr;
  logic [15:0]        erf_wdata;

  instr_mem #(.DEPTH(IMEM_DEPTH), .AW(IMEM_AW)) u_imem (
    .clk, .we(imem_we), .waddr(imem_waddr), .wdata(imem_wdata),
    .raddr(imem_raddr), .rdata(imem_rdata)
  );

  micro16 #(.IMEM_AW(IMEM_AW)) u_mcu (
    .clk, .rst_n, .start, .running,
    .imem_addr(imem_raddr), .imem_data(imem_rdata),
    .erf_q, .erf_we, .erf_waddr, .erf_wdata,
    .done_o(done), .wait_i(wait_s)
  );

  agc #(.N_LOOPS(N_LOOPS), .ADDR_W(ADDR_W)) u_agc (
    .clk, .rst_n,
    .erf_q, .erf_we, .erf_waddr, .erf_wdata,
    .done_i(done), .wait_o(wait_s), .busy_o(agc_busy),
    .addr_o, .addr_valid, .addr_ready
  );

  assign busy = running || agc_busy;
endmodule
