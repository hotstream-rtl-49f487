// micro16: 16-bit microcontroller that programs the Address Generation Core.
//
// A single-cycle RISC: every cycle one instruction is executed. The
// instruction memory has a synchronous read, so the core presents the
// address of the *next* instruction (pc_next) and the word for `pc`
// arrives exactly when it is executed. There are 15 general registers
// R1..R15 (R0 reads as zero); register numbers 16..31 name the 16 ERF
// registers of the AGC, which can be sources and destinations of any ALU
// instruction without extra latency. The instruction set (hs_pkg::op_t)
// is this design's own: 32-bit words with a 5-bit opcode, rd, rs and a
// 16-bit immediate (rt in imm[4:0] for register-register forms). A carry
// flag from ADD/ADDI/ADC/ADCI allows 32-bit arithmetic on the address
// registers split into two ERF halves.
//
// Interface instructions: DONE pulses `done_o` (the ERF holds a complete
// parameter set); WAIT stalls while `wait_i` is high (the AGC has not yet
// taken the previous set); HALT stops the core until the next `start`.
// `start` restarts execution at address 0.
module micro16
  import hs_pkg::*;
#(
  parameter int unsigned IMEM_AW = 10
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  output logic               running,
  // instruction memory
  output logic [IMEM_AW-1:0] imem_addr,
  input  logic [31:0]        imem_data,
  // ERF of the AGC
  input  logic [15:0]        erf_q [ERF_N],
  output logic               erf_we,
  output logic [3:0]         erf_waddr,
  output logic [15:0]        erf_wdata,
  // AGC handshake
  output logic               done_o,
  input  logic               wait_i
);
  logic [15:0]        gpr [16];
  logic [IMEM_AW-1:0] pc_q, pc_next;
  logic               run_q, carry_q;

  op_t         op;
  logic [4:0]  rd, rs, rt;
  logic [15:0] imm, rdv, rsv, rtv, res;
  logic        wr_en, carry_d, set_carry, take;
  logic [16:0] sum;

  function automatic logic [15:0] rd_reg(input logic [4:0] n);
    if (n[4])        return erf_q[n[3:0]];
    else if (n == 0) return 16'd0;
    else             return gpr[n[3:0]];
  endfunction

  assign op  = op_t'(imem_data[31:27]);
  assign rd  = imem_data[26:22];
  assign rs  = imem_data[21:17];
  assign imm = imem_data[15:0];
  assign rt  = imem_data[4:0];
  assign rdv = rd_reg(rd);
  assign rsv = rd_reg(rs);
  assign rtv = rd_reg(rt);
  assign running = run_q;

  always_comb begin
    res       = '0;
    wr_en     = 1'b0;
    set_carry = 1'b0;
    sum       = '0;
    take      = 1'b0;
    unique case (op)
      OP_ADD:  begin sum = {1'b0, rsv} + {1'b0, rtv};           res = sum[15:0]; wr_en = 1'b1; set_carry = 1'b1; end
      OP_ADDI: begin sum = {1'b0, rsv} + {1'b0, imm};           res = sum[15:0]; wr_en = 1'b1; set_carry = 1'b1; end
      OP_ADC:  begin sum = {1'b0, rsv} + {1'b0, rtv} + 17'(carry_q); res = sum[15:0]; wr_en = 1'b1; set_carry = 1'b1; end
      OP_ADCI: begin sum = {1'b0, rsv} + {1'b0, imm} + 17'(carry_q); res = sum[15:0]; wr_en = 1'b1; set_carry = 1'b1; end
      OP_SUB:  begin res = rsv - rtv;         wr_en = 1'b1; end
      OP_AND:  begin res = rsv & rtv;         wr_en = 1'b1; end
      OP_OR:   begin res = rsv | rtv;         wr_en = 1'b1; end
      OP_XOR:  begin res = rsv ^ rtv;         wr_en = 1'b1; end
      OP_LDI:  begin res = imm;               wr_en = 1'b1; end
      OP_SLL:  begin res = rsv << imm[3:0];   wr_en = 1'b1; end
      OP_SRL:  begin res = rsv >> imm[3:0];   wr_en = 1'b1; end
      OP_BEQ:  take = (rdv == rsv);
      OP_BNE:  take = (rdv != rsv);
      OP_BLT:  take = ($signed(rdv) < $signed(rsv));
      OP_JMP:  take = 1'b1;
      default: ;
    endcase
    carry_d = sum[16];
  end

  logic stall;
  assign stall = (op == OP_WAIT) && wait_i;

  always_comb begin
    if (!run_q)          pc_next = start ? '0 : pc_q;
    else if (op == OP_HALT || stall) pc_next = pc_q;
    else if (take)       pc_next = imm[IMEM_AW-1:0];
    else                 pc_next = pc_q + IMEM_AW'(1);
    if (start) pc_next = '0;
  end
  assign imem_addr = pc_next;

  assign erf_we    = run_q && !start && wr_en && rd[4];
  assign erf_waddr = rd[3:0];
  assign erf_wdata = res;
  assign done_o    = run_q && !start && (op == OP_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q   <= 1'b0;
      pc_q    <= '0;
      carry_q <= 1'b0;
      for (int i = 0; i < 16; i++) gpr[i] <= '0;
    end else begin
      pc_q <= pc_next;
      if (start) begin
        run_q   <= 1'b1;
        carry_q <= 1'b0;
      end else if (run_q) begin
        if (op == OP_HALT) run_q <= 1'b0;
        if (set_carry) carry_q <= carry_d;
        if (wr_en && !rd[4] && rd != 0) gpr[rd[3:0]] <= res;
      end
    end
  end
endmodule
