// mm_mem_model: behavioural model of a memory behind the burst port
// (the shared DDR memory, or host memory behind the host bridge).
//
// WORDS words of 16 bits, word addressed (addresses wrap modulo WORDS).
// A command is accepted when the model is idle; read beats follow one per
// cycle after LAT cycles, write beats are accepted one per cycle. With
// STALL = 1 the model inserts random idle cycles on both channels.
// Counters report the bursts and beats served.
module mm_mem_model
  import hs_pkg::*;
#(
  parameter int unsigned WORDS = 65536,
  parameter int unsigned LAT   = 2,
  parameter bit          STALL = 1'b0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  mm_req_t req,
  output mm_rsp_t rsp
);
  logic [15:0] mem [WORDS];
  int unsigned n_rd_bursts, n_wr_bursts, n_beats;

  typedef enum logic [1:0] {M_IDLE, M_LAT, M_RD, M_WR} mstate_t;
  mstate_t st;
  int unsigned a, left, lat;
  logic gate;

  always_ff @(posedge clk) gate <= STALL ? ($urandom_range(0, 3) != 0) : 1'b1;

  always_comb begin
    rsp = '0;
    rsp.cmd_ready = (st == M_IDLE);
    rsp.rvalid    = (st == M_RD) && gate;
    rsp.rdata     = mem[a % WORDS];
    rsp.rlast     = (left == 1);
    rsp.wready    = (st == M_WR) && gate;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= M_IDLE; a <= 0; left <= 0; lat <= 0;
      n_rd_bursts <= 0; n_wr_bursts <= 0; n_beats <= 0;
    end else begin
      unique case (st)
        M_IDLE: if (req.cmd_valid) begin
          a    <= req.cmd.addr;
          left <= int'(req.cmd.len) + 1;
          if (req.cmd.write) begin st <= M_WR; n_wr_bursts <= n_wr_bursts + 1; end
          else begin st <= M_LAT; lat <= LAT; n_rd_bursts <= n_rd_bursts + 1; end
        end
        M_LAT: if (lat <= 1) st <= M_RD; else lat <= lat - 1;
        M_RD: if (rsp.rvalid) begin
          a <= a + 1; left <= left - 1; n_beats <= n_beats + 1;
          if (left == 1) st <= M_IDLE;
        end
        M_WR: if (req.wvalid && rsp.wready) begin
          mem[a % WORDS] <= req.wdata;
          a <= a + 1; left <= left - 1; n_beats <= n_beats + 1;
          if (left == 1) begin
            st <= M_IDLE;
            if (!req.wlast) $error("mm_mem_model: wlast missing on last beat");
          end else if (req.wlast) $error("mm_mem_model: early wlast");
        end
        default: st <= M_IDLE;
      endcase
    end
  end
endmodule
