// hs_pkg: types and constants shared by the streaming-accelerator blocks.
//
// The memory-mapped (MM) bus between the Bus Master Controllers, the
// shared-memory arbiter and the DMA controller is a simple burst protocol
// in the spirit of AXI4 but reduced to what the design needs: one command
// channel (address, beat count, direction), a write-data channel and a
// read-data channel. A transaction is a command followed by all of its
// beats; the master must always accept read beats (it reserves buffer space
// before it issues a read). Addresses count data words, not bytes.
//
// The External Register File (ERF) map and the Micro16 opcodes are this
// design's own encoding; the source describes the registers' roles only.
package hs_pkg;

  parameter int unsigned HS_ADDR_W = 32;  // word address width
  parameter int unsigned HS_DATA_W = 16;  // stream element: 2-byte matrix element
  parameter int unsigned HS_LEN_W  = 8;   // burst beat count minus one (AXI4 style)

  typedef logic [HS_ADDR_W-1:0] addr_t;
  typedef logic [HS_DATA_W-1:0] data_t;

  typedef struct packed {
    logic              write;   // 1 = write burst, 0 = read burst
    addr_t             addr;    // first word address
    logic [HS_LEN_W-1:0] len;     // beats - 1
  } mm_cmd_t;

  // master -> slave
  typedef struct packed {
    logic    cmd_valid;
    mm_cmd_t cmd;
    logic    wvalid;
    data_t   wdata;
    logic    wlast;
  } mm_req_t;

  // slave -> master
  typedef struct packed {
    logic  cmd_ready;
    logic  wready;
    logic  rvalid;
    data_t rdata;
    logic  rlast;
  } mm_rsp_t;

  // ---------------------------------------------------------------- ERF map
  // 16-bit registers; Micro16 register numbers 16..31 address ERF 0..15.
  localparam int unsigned ERF_N       = 16;
  localparam int unsigned ERF_LB_MULT = 0;   // Loopbody multiplication m
  localparam int unsigned ERF_LB_INC  = 1;   // Loopbody increment i (signed)
  localparam int unsigned ERF_LB_INIT_LO = 2;  // Loopbody initial value [15:0]
  localparam int unsigned ERF_LB_INIT_HI = 3;  // Loopbody initial value [31:16]
  // Loopcontrol level k (0-based): reset value at 4+2k, increment at 5+2k
  function automatic int unsigned erf_lc_reset(int unsigned k); return 4 + 2*k; endfunction
  function automatic int unsigned erf_lc_inc(int unsigned k);   return 5 + 2*k; endfunction

  // ------------------------------------------------------------ Micro16 ISA
  // 32-bit instruction: [31:27] opcode, [26:22] rd, [21:17] rs,
  // [15:0] imm (R-type: rt in imm[4:0]).
  typedef enum logic [4:0] {
    OP_NOP  = 5'd0,
    OP_ADD  = 5'd1,   // rd = rs + rt            (sets carry)
    OP_SUB  = 5'd2,   // rd = rs - rt
    OP_AND  = 5'd3,
    OP_OR   = 5'd4,
    OP_XOR  = 5'd5,
    OP_ADDI = 5'd6,   // rd = rs + imm           (sets carry)
    OP_LDI  = 5'd7,   // rd = imm
    OP_ADC  = 5'd8,   // rd = rs + rt + carry    (sets carry)
    OP_ADCI = 5'd9,   // rd = rs + imm + carry   (sets carry)
    OP_SLL  = 5'd10,  // rd = rs << imm[3:0]
    OP_SRL  = 5'd11,  // rd = rs >> imm[3:0]
    OP_BEQ  = 5'd12,  // if rd == rs goto imm
    OP_BNE  = 5'd13,  // if rd != rs goto imm
    OP_BLT  = 5'd14,  // if rd <  rs (signed) goto imm
    OP_JMP  = 5'd15,  // goto imm
    OP_DONE = 5'd16,  // hand the ERF contents to the AGC
    OP_WAIT = 5'd17,  // stall until the ERF may be modified again
    OP_HALT = 5'd18   // stop until restarted
  } op_t;

endpackage
