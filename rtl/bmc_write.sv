// bmc_write: write control unit of the Bus Master Controller
// (Stream-to-MM), with the synchronizer in front of it.
//
// The synchronizer takes an address from the write DFC and a data word
// from the PE only together, so both streams advance at the same pace and
// no address runs ahead of data the PE has not produced. Pairs whose
// addresses increment by one are collected in a MAX_BURST-word buffer;
// the burst is closed when the increment breaks, when it is full, or when
// no pair has arrived for FLUSH_WAIT cycles, and is then written with one command followed by its
// beats. While a burst is being written no new pair is taken.
module bmc_write
  import hs_pkg::*;
#(
  parameter int unsigned MAX_BURST  = 16,
  parameter int unsigned FLUSH_WAIT = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  // address stream from the write DFC
  input  addr_t   addr_i,
  input  logic    addr_valid,
  output logic    addr_ready,
  // data stream from the PE
  input  data_t   data_i,
  input  logic    data_valid,
  output logic    data_ready,
  // memory-mapped master port
  output mm_req_t mm_req,
  input  mm_rsp_t mm_rsp,
  output logic    idle
);
  localparam int unsigned CW = $clog2(MAX_BURST+1);
  typedef enum logic [1:0] {W_COLLECT, W_CMD, W_DATA} wstate_t;

  wstate_t       st_q;
  addr_t         bstart_q;
  logic [CW-1:0] blen_q, beat_q;
  data_t         buf_q [MAX_BURST];
  logic          pair, contig, take, close, wfire;
  logic [$clog2(FLUSH_WAIT+1)-1:0] wait_q;

  assign pair   = addr_valid && data_valid;             // synchronizer
  assign contig = (blen_q == '0) || (addr_i == bstart_q + addr_t'(blen_q));
  assign take   = (st_q == W_COLLECT) && pair && contig && (blen_q < CW'(MAX_BURST));
  assign close  = (st_q == W_COLLECT) && (blen_q != '0) && !take &&
                  (pair || (blen_q == CW'(MAX_BURST)) || (int'(wait_q) >= FLUSH_WAIT - 1));
  assign addr_ready = take;
  assign data_ready = take;

  assign mm_req.cmd_valid = (st_q == W_CMD);
  assign mm_req.cmd.write = 1'b1;
  assign mm_req.cmd.addr  = bstart_q;
  assign mm_req.cmd.len   = HS_LEN_W'(blen_q - CW'(1));
  assign mm_req.wvalid    = (st_q == W_DATA);
  assign mm_req.wdata     = buf_q[beat_q[$clog2(MAX_BURST)-1:0]];
  assign mm_req.wlast     = (beat_q == blen_q - CW'(1));
  assign wfire            = mm_req.wvalid && mm_rsp.wready;
  assign idle             = (st_q == W_COLLECT) && (blen_q == '0);

  always_ff @(posedge clk) if (take) buf_q[blen_q[$clog2(MAX_BURST)-1:0]] <= data_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q     <= W_COLLECT;
      bstart_q <= '0;
      blen_q   <= '0;
      beat_q   <= '0;
      wait_q   <= '0;
    end else begin
      if (take || close) wait_q <= '0;
      else if (st_q == W_COLLECT && blen_q != '0) wait_q <= wait_q + 1'b1;
      unique case (st_q)
        W_COLLECT: begin
          if (take) begin
            if (blen_q == '0) bstart_q <= addr_i;
            blen_q <= blen_q + CW'(1);
          end
          if (close) st_q <= W_CMD;
        end
        W_CMD: if (mm_rsp.cmd_ready) begin
          st_q   <= W_DATA;
          beat_q <= '0;
        end
        W_DATA: if (wfire) begin
          beat_q <= beat_q + CW'(1);
          if (mm_req.wlast) begin
            st_q   <= W_COLLECT;
            blen_q <= '0;
          end
        end
        default: st_q <= W_COLLECT;
      endcase
    end
  end
endmodule
