// instr_mem: instruction memory of a Data Fetch Controller.
//
// A simple dual-port RAM: the host writes 32-bit Micro16 instructions
// through the write port; the Micro16 reads with one cycle of latency
// (synchronous read, as a block RAM does). The default depth of 1024
// words of 32 bits fills one 36 Kb FPGA block RAM.
module instr_mem #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [31:0]   wdata,
  input  logic [AW-1:0] raddr,
  output logic [31:0]   rdata
);
  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
