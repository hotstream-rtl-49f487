// dma_controller: DMA engine of the Host Interface Bridge.
//
// Moves data between host memory (through the host bridge's burst port)
// and the engine's host streams, following a chain of descriptors that the
// device driver writes into a DESC_N-entry table. Each descriptor names a
// regular 2D block of host memory by the tuple
//     OFFSET  first word of the first contiguous block
//     HSIZE   words per contiguous block
//     STRIDE  distance from the start of one block to the next
//     VSIZE   number of blocks
// plus a direction (host -> engine or engine -> host) and a last-in-chain
// flag. A plain linear transfer is VSIZE = 1. Each block is moved in
// bursts of at most MAX_BURST words, so useful data travels in large
// chunks while the gaps between blocks are skipped.
//
// Host -> engine: a read burst is issued only when the output FIFO has
// room for all of its beats; the FIFO drives the outbound stream.
// Engine -> host: after a write command, the inbound stream is passed to
// the write beats one word per cycle.
//
// Descriptor fields are written one at a time (desc_field 0..4 =
// OFFSET, HSIZE, STRIDE, VSIZE, CTRL with CTRL[0] = engine->host and
// CTRL[1] = last). `start` runs the chain from entry 0; `busy` is high
// until the last descriptor has finished.
module dma_controller
  import hs_pkg::*;
#(
  parameter int unsigned DESC_N    = 16,
  parameter int unsigned DW        = $clog2(DESC_N),
  parameter int unsigned MAX_BURST = 16,
  parameter int unsigned BUF_DEPTH = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  // descriptor table
  input  logic          desc_we,
  input  logic [DW-1:0] desc_idx,
  input  logic [2:0]    desc_field,
  input  logic [31:0]   desc_wdata,
  input  logic          start,
  output logic          busy,
  // host memory port (to the host bridge)
  output mm_req_t       mm_req,
  input  mm_rsp_t       mm_rsp,
  // host -> engine stream
  output data_t         out_data,
  output logic          out_valid,
  input  logic          out_ready,
  // engine -> host stream
  input  data_t         in_data,
  input  logic          in_valid,
  output logic          in_ready
);
  localparam int unsigned CW = $clog2(BUF_DEPTH+1);
  typedef enum logic [2:0] {D_IDLE, D_DESC, D_CMD, D_DATA, D_NEXT} dstate_t;

  addr_t       offset_t [DESC_N];
  addr_t       stride_t [DESC_N];
  logic [15:0] hsize_t  [DESC_N];
  logic [15:0] vsize_t  [DESC_N];
  logic [1:0]  ctrl_t   [DESC_N];

  dstate_t       st_q;
  logic [DW-1:0] cur_q;
  addr_t         row_q, addr_q;
  logic [15:0]   left_q, rows_q;
  logic [15:0]   blen;
  logic          to_host, cmd_fire, last_beat;
  logic [CW-1:0] fcount;
  logic          fempty;

  always_ff @(posedge clk)
    if (desc_we) unique case (desc_field)
      3'd0:    offset_t[desc_idx] <= addr_t'(desc_wdata);
      3'd1:    hsize_t[desc_idx]  <= desc_wdata[15:0];
      3'd2:    stride_t[desc_idx] <= addr_t'(desc_wdata);
      3'd3:    vsize_t[desc_idx]  <= desc_wdata[15:0];
      default: ctrl_t[desc_idx]   <= desc_wdata[1:0];
    endcase

  assign to_host = ctrl_t[cur_q][0];
  assign blen    = (left_q > 16'(MAX_BURST)) ? 16'(MAX_BURST) : left_q;

  assign mm_req.cmd_valid = (st_q == D_CMD) &&
                            (to_host || (CW+1)'(BUF_DEPTH) - (CW+1)'(fcount) >= (CW+1)'(blen));
  assign mm_req.cmd.write = to_host;
  assign mm_req.cmd.addr  = addr_q;
  assign mm_req.cmd.len   = HS_LEN_W'(blen - 16'd1);
  assign cmd_fire         = mm_req.cmd_valid && mm_rsp.cmd_ready;

  // engine -> host: the inbound stream feeds the write beats
  logic [15:0] beat_q;
  assign mm_req.wvalid = (st_q == D_DATA) && to_host && in_valid;
  assign mm_req.wdata  = in_data;
  assign mm_req.wlast  = (beat_q == blen - 16'd1);
  assign in_ready      = (st_q == D_DATA) && to_host && mm_rsp.wready;

  assign last_beat = to_host ? (mm_req.wvalid && mm_rsp.wready && mm_req.wlast)
                             : (mm_rsp.rvalid && mm_rsp.rlast);

  // host -> engine: read beats are buffered
  sync_fifo #(.WIDTH(HS_DATA_W), .DEPTH(BUF_DEPTH)) u_buf (
    .clk, .rst_n, .push(mm_rsp.rvalid), .wdata(mm_rsp.rdata),
    .pop(out_valid && out_ready), .rdata(out_data), .count(fcount),
    .full(), .empty(fempty)
  );
  assign out_valid = !fempty;
  assign busy      = (st_q != D_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q   <= D_IDLE;
      cur_q  <= '0;
      row_q  <= '0;
      addr_q <= '0;
      left_q <= '0;
      rows_q <= '0;
      beat_q <= '0;
    end else begin
      unique case (st_q)
        D_IDLE: if (start) begin
          cur_q <= '0;
          st_q  <= D_DESC;
        end
        D_DESC: begin                       // load a descriptor
          row_q  <= offset_t[cur_q];
          addr_q <= offset_t[cur_q];
          left_q <= hsize_t[cur_q];
          rows_q <= vsize_t[cur_q];
          st_q   <= (hsize_t[cur_q] == '0 || vsize_t[cur_q] == '0) ? D_NEXT : D_CMD;
        end
        D_CMD: if (cmd_fire) begin
          beat_q <= '0;
          st_q   <= D_DATA;
        end
        D_DATA: begin
          if (to_host && mm_req.wvalid && mm_rsp.wready) beat_q <= beat_q + 16'd1;
          if (last_beat) begin
            if (left_q != blen) begin        // more bursts in this block
              left_q <= left_q - blen;
              addr_q <= addr_q + addr_t'(blen);
              st_q   <= D_CMD;
            end else if (rows_q != 16'd1) begin   // next block
              rows_q <= rows_q - 16'd1;
              row_q  <= row_q + stride_t[cur_q];
              addr_q <= row_q + stride_t[cur_q];
              left_q <= hsize_t[cur_q];
              st_q   <= D_CMD;
            end else begin
              st_q <= D_NEXT;
            end
          end
        end
        D_NEXT: begin
          if (ctrl_t[cur_q][1] || cur_q == DW'(DESC_N-1)) st_q <= D_IDLE;
          else begin
            cur_q <= cur_q + DW'(1);
            st_q  <= D_DESC;
          end
        end
        default: st_q <= D_IDLE;
      endcase
    end
  end
endmodule
