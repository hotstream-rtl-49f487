// bmc_read: read control unit of the Bus Master Controller (MM-to-Stream).
//
// It consumes the read DFC's address stream and merges addresses into an
// incrementing burst for as long as each address is the previous one plus
// one. The burst is closed and issued as one read command when the
// increment pattern breaks, when it reaches MAX_BURST beats, when the
// buffer could not hold another beat, or when the address stream pauses.
// The returned beats are buffered in a BUF_DEPTH-entry FIFO and handed to
// the PE as a valid/ready stream, so data is prefetched until the PE is
// ready for it. Buffer space is reserved when a command is issued, which
// is why read beats never need back-pressure.
//
// Timing: an address is taken per cycle while a burst is being collected;
// issuing a command costs one cycle in which no address is taken.
module bmc_read
  import hs_pkg::*;
#(
  parameter int unsigned MAX_BURST = 16,
  parameter int unsigned BUF_DEPTH = 32,
  parameter int unsigned FLUSH_WAIT = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  // address stream from the read DFC
  input  addr_t   addr_i,
  input  logic    addr_valid,
  output logic    addr_ready,
  // data stream to the PE
  output data_t   data_o,
  output logic    data_valid,
  input  logic    data_ready,
  // memory-mapped master port
  output mm_req_t mm_req,
  input  mm_rsp_t mm_rsp,
  output logic    idle
);
  localparam int unsigned CW = $clog2(BUF_DEPTH+1);

  addr_t         bstart_q;
  logic [CW-1:0] blen_q, resv_q, fcount;
  logic          issue_q, fempty, contig, can_take, take, close, cmd_fire, pop;
  logic [CW:0]   free_space;
  logic [$clog2(FLUSH_WAIT+1)-1:0] wait_q;

  assign free_space = (CW+1)'(BUF_DEPTH) - (CW+1)'(fcount) - (CW+1)'(resv_q);
  assign contig     = (blen_q == '0) || (addr_i == bstart_q + addr_t'(blen_q));
  assign can_take   = !issue_q && (blen_q < CW'(MAX_BURST)) &&
                      ((CW+1)'(blen_q) + 1 <= free_space);
  assign take       = addr_valid && contig && can_take;
  assign addr_ready = take;
  // close the burst being collected when nothing more can join it
  assign close      = !issue_q && (blen_q != '0) && !take &&
                      (addr_valid || !can_take || (int'(wait_q) >= FLUSH_WAIT - 1));

  assign mm_req.cmd_valid = issue_q;
  assign mm_req.cmd.write = 1'b0;
  assign mm_req.cmd.addr  = bstart_q;
  assign mm_req.cmd.len   = HS_LEN_W'(blen_q - CW'(1));
  assign mm_req.wvalid    = 1'b0;
  assign mm_req.wdata     = '0;
  assign mm_req.wlast     = 1'b0;
  assign cmd_fire         = issue_q && mm_rsp.cmd_ready;

  assign pop        = data_valid && data_ready;
  assign data_valid = !fempty;
  assign idle       = fempty && !issue_q && (blen_q == '0) && (resv_q == '0);

  sync_fifo #(.WIDTH(HS_DATA_W), .DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst_n, .push(mm_rsp.rvalid), .wdata(mm_rsp.rdata), .pop,
    .rdata(data_o), .count(fcount), .full(), .empty(fempty)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bstart_q <= '0;
      blen_q   <= '0;
      issue_q  <= 1'b0;
      resv_q   <= '0;
      wait_q   <= '0;
    end else begin
      if (take || close) wait_q <= '0;
      else if (blen_q != '0) wait_q <= wait_q + 1'b1;
      if (take) begin
        if (blen_q == '0) bstart_q <= addr_i;
        blen_q <= blen_q + CW'(1);
      end
      if (close) issue_q <= 1'b1;
      if (cmd_fire) begin
        issue_q <= 1'b0;
        blen_q  <= '0;
      end
      resv_q <= resv_q + (cmd_fire ? blen_q : '0) - CW'(mm_rsp.rvalid);
    end
  end
endmodule
