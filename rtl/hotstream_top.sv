// hotstream_top: the streaming accelerator, from host bridge to Cores.
//
// Structure:
//   host bridge port -> dma_controller -> dss -> backplane / shared memory
//   NUM_CORES x core (read DFC, write DFC, BMC)        -> mem_arbiter
//   backplane: crossbar over the Cores' PEs and the dss (NUM_CORES+1 nodes)
//
// Coarse-grained access patterns (2D blocks of host memory) are handled by
// the DMA controller; fine-grained patterns (arbitrary address sequences in
// the shared memory) by the DFCs of each Core. Streams between Cores can
// also go straight through the backplane.
//
// What is not inside: the Processing Elements (their stream ports are
// brought out per Core: pe_in_* / pe_out_* to and from the shared memory,
// bp_tx_* / bp_rx_* to and from the backplane), the host bridge (host_req
// / host_rsp is its burst port into host memory) and the shared memory
// device with its controller (sm_req / sm_rsp).
//
// Host register writes (cfg_we, cfg_addr, cfg_wdata), this design's map:
//   cfg_addr[23] = 1   Micro16 program word: core cfg_addr[22:11],
//                      DFC cfg_addr[10] (0 read, 1 write), word cfg_addr[9:0]
//   cfg_addr[23] = 0, region cfg_addr[15:12]:
//     0  DMA: cfg_addr[11] = 1 starts the chain; otherwise descriptor
//        cfg_addr[10:3], field cfg_addr[2:0] (see dma_controller)
//     1  DSS: reg 0 = {out_from_mem, in_to_mem}; reg 1 = write base
//        (restarts the write counter); reg 2 = read base; reg 3 = read
//        count (starts the read)
//     2  backplane: reg o = route of output o: [31] enable, [7:0] source
//     3  core control: reg c, bit 0 starts its read DFC, bit 1 its write DFC
// The DSS start strobes are issued one cycle after the register write, so
// the switch sees the new base. Timing: every block is clocked by clk, and
// rst_n resets it asynchronously.
//
// From the HotStream architecture: the block structure, 16 Cores, the
// round-robin shared-memory arbitration, the full crossbar and two DFCs per
// Core. This design's own choices: the register map, the burst bus, the
// switch attached as backplane node NUM_CORES, and the DSS as the last
// arbiter master.
module hotstream_top
  import hs_pkg::*;
#(
  parameter int unsigned NUM_CORES  = 16,
  parameter int unsigned N_LOOPS    = 3,
  parameter int unsigned IMEM_DEPTH = 1024,
  parameter int unsigned MAX_BURST  = 16,
  parameter int unsigned BUF_DEPTH  = 32,
  parameter int unsigned DESC_N     = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  // host register writes
  input  logic           cfg_we,
  input  logic [23:0]    cfg_addr,
  input  logic [31:0]    cfg_wdata,
  // status
  output logic           dma_busy,
  output logic           dss_busy,
  output logic [NUM_CORES-1:0] core_busy,
  // host bridge burst port (into host memory)
  output mm_req_t        host_req,
  input  mm_rsp_t        host_rsp,
  // shared memory port
  output mm_req_t        sm_req,
  input  mm_rsp_t        sm_rsp,
  // PE streams to/from the shared memory (through the Core's BMC)
  output data_t          pe_in_data   [NUM_CORES],
  output logic [NUM_CORES-1:0] pe_in_valid,
  input  logic [NUM_CORES-1:0] pe_in_ready,
  input  data_t          pe_out_data  [NUM_CORES],
  input  logic [NUM_CORES-1:0] pe_out_valid,
  output logic [NUM_CORES-1:0] pe_out_ready,
  // PE streams to/from the backplane
  input  data_t          bp_tx_data   [NUM_CORES],
  input  logic [NUM_CORES-1:0] bp_tx_valid,
  output logic [NUM_CORES-1:0] bp_tx_ready,
  output data_t          bp_rx_data   [NUM_CORES],
  output logic [NUM_CORES-1:0] bp_rx_valid,
  input  logic [NUM_CORES-1:0] bp_rx_ready
);
  localparam int unsigned P       = NUM_CORES + 1;
  localparam int unsigned PIW     = $clog2(P);
  localparam int unsigned IMEM_AW = $clog2(IMEM_DEPTH);
  localparam int unsigned DW      = $clog2(DESC_N);

  // ------------------------------------------------------ register block
  logic         is_imem;
  logic [3:0]   region;
  logic [11:0]  reg_idx;
  logic         dss_in_to_mem_q, dss_out_from_mem_q;
  addr_t        dss_wr_base_q, dss_rd_base_q, dss_rd_count_q;
  logic         dss_wr_start, dss_rd_start;
  logic [PIW-1:0] route_src_q [P];
  logic [P-1:0]   route_en_q;

  assign is_imem = cfg_addr[23];
  assign region  = cfg_addr[15:12];
  assign reg_idx = cfg_addr[11:0];
  // the start strobes follow the register write by one cycle, so that the
  // switch loads the base just written
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dss_wr_start <= 1'b0;
      dss_rd_start <= 1'b0;
    end else begin
      dss_wr_start <= cfg_we && !is_imem && region == 4'd1 && reg_idx == 12'd1;
      dss_rd_start <= cfg_we && !is_imem && region == 4'd1 && reg_idx == 12'd3;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dss_in_to_mem_q    <= 1'b0;
      dss_out_from_mem_q <= 1'b0;
      dss_wr_base_q      <= '0;
      dss_rd_base_q      <= '0;
      dss_rd_count_q     <= '0;
      route_en_q         <= '0;
      for (int o = 0; o < P; o++) route_src_q[o] <= '0;
    end else if (cfg_we && !is_imem) begin
      if (region == 4'd1) unique case (reg_idx)
        12'd0:   {dss_out_from_mem_q, dss_in_to_mem_q} <= cfg_wdata[1:0];
        12'd1:   dss_wr_base_q  <= addr_t'(cfg_wdata);
        12'd2:   dss_rd_base_q  <= addr_t'(cfg_wdata);
        12'd3:   dss_rd_count_q <= addr_t'(cfg_wdata);
        default: ;
      endcase
      if (region == 4'd2 && int'(reg_idx) < P) begin
        route_en_q[PIW'(reg_idx)]  <= cfg_wdata[31];
        route_src_q[PIW'(reg_idx)] <= PIW'(cfg_wdata[7:0]);
      end
    end
  end

  // --------------------------------------------------------------- HIB
  data_t h2e_data, e2h_data;
  logic  h2e_valid, h2e_ready, e2h_valid, e2h_ready;

  dma_controller #(.DESC_N(DESC_N), .MAX_BURST(MAX_BURST), .BUF_DEPTH(BUF_DEPTH)) u_dma (
    .clk, .rst_n,
    .desc_we    (cfg_we && !is_imem && region == 4'd0 && !reg_idx[11]),
    .desc_idx   (DW'(reg_idx[10:3])),
    .desc_field (reg_idx[2:0]),
    .desc_wdata (cfg_wdata),
    .start      (cfg_we && !is_imem && region == 4'd0 && reg_idx[11]),
    .busy       (dma_busy),
    .mm_req     (host_req),
    .mm_rsp     (host_rsp),
    .out_data   (h2e_data), .out_valid(h2e_valid), .out_ready(h2e_ready),
    .in_data    (e2h_data), .in_valid (e2h_valid), .in_ready (e2h_ready)
  );

  // ------------------------------------------------------------- MCPE
  mm_req_t m_req [P];
  mm_rsp_t m_rsp [P];
  data_t   n_in_data  [P];
  data_t   n_out_data [P];
  logic [P-1:0] n_in_valid, n_in_ready, n_out_valid, n_out_ready;

  dss #(.MAX_BURST(MAX_BURST), .BUF_DEPTH(BUF_DEPTH)) u_dss (
    .clk, .rst_n,
    .in_to_mem(dss_in_to_mem_q), .out_from_mem(dss_out_from_mem_q),
    .wr_base(dss_wr_base_q), .wr_start(dss_wr_start),
    .rd_base(dss_rd_base_q), .rd_count(dss_rd_count_q), .rd_start(dss_rd_start),
    .busy(dss_busy),
    .host_in_data(h2e_data), .host_in_valid(h2e_valid), .host_in_ready(h2e_ready),
    .host_out_data(e2h_data), .host_out_valid(e2h_valid), .host_out_ready(e2h_ready),
    .bp_out_data(n_in_data[NUM_CORES]), .bp_out_valid(n_in_valid[NUM_CORES]),
    .bp_out_ready(n_in_ready[NUM_CORES]),
    .bp_in_data(n_out_data[NUM_CORES]), .bp_in_valid(n_out_valid[NUM_CORES]),
    .bp_in_ready(n_out_ready[NUM_CORES]),
    .mm_req(m_req[NUM_CORES]), .mm_rsp(m_rsp[NUM_CORES])
  );

  for (genvar c = 0; c < NUM_CORES; c++) begin : g_core
    logic ctl_we;
    assign ctl_we = cfg_we && !is_imem && region == 4'd3 && int'(reg_idx) == c;

    core #(.N_LOOPS(N_LOOPS), .IMEM_DEPTH(IMEM_DEPTH), .IMEM_AW(IMEM_AW),
           .MAX_BURST(MAX_BURST), .BUF_DEPTH(BUF_DEPTH)) u_core (
      .clk, .rst_n,
      .imem_we    (cfg_we && is_imem && int'(cfg_addr[22:11]) == c),
      .imem_sel   (cfg_addr[10]),
      .imem_waddr (cfg_addr[IMEM_AW-1:0]),
      .imem_wdata (cfg_wdata),
      .start_rd   (ctl_we && cfg_wdata[0]),
      .start_wr   (ctl_we && cfg_wdata[1]),
      .busy       (core_busy[c]),
      .pe_in_data (pe_in_data[c]),  .pe_in_valid (pe_in_valid[c]),  .pe_in_ready (pe_in_ready[c]),
      .pe_out_data(pe_out_data[c]), .pe_out_valid(pe_out_valid[c]), .pe_out_ready(pe_out_ready[c]),
      .mm_req     (m_req[c]),
      .mm_rsp     (m_rsp[c])
    );

    assign n_in_data[c]   = bp_tx_data[c];
    assign n_in_valid[c]  = bp_tx_valid[c];
    assign bp_tx_ready[c] = n_in_ready[c];
    assign bp_rx_data[c]  = n_out_data[c];
    assign bp_rx_valid[c] = n_out_valid[c];
    assign n_out_ready[c] = bp_rx_ready[c];
  end

  backplane #(.P(P), .IW(PIW)) u_bp (
    .clk, .rst_n,
    .route_src(route_src_q), .route_en(route_en_q),
    .in_data(n_in_data), .in_valid(n_in_valid), .in_ready(n_in_ready),
    .out_data(n_out_data), .out_valid(n_out_valid), .out_ready(n_out_ready)
  );

  mem_arbiter #(.N(P)) u_smarb (
    .clk, .rst_n, .m_req, .m_rsp, .s_req(sm_req), .s_rsp(sm_rsp)
  );
endmodule
