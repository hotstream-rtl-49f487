// m16_asm_pkg: tiny assembler for Micro16 programs used by the testbenches,
// plus a reference model of the AGC's address sequence.
//
// Register numbers: R0..R15 general (R0 = 0), 16.. the ERF (see hs_pkg).
package m16_asm_pkg;
  import hs_pkg::*;

  localparam logic [4:0] E_MULT    = 5'd16 + 5'(ERF_LB_MULT);
  localparam logic [4:0] E_INC     = 5'd16 + 5'(ERF_LB_INC);
  localparam logic [4:0] E_INIT_LO = 5'd16 + 5'(ERF_LB_INIT_LO);
  localparam logic [4:0] E_INIT_HI = 5'd16 + 5'(ERF_LB_INIT_HI);
  function automatic logic [4:0] e_lc_reset(int k); return 5'(16 + erf_lc_reset(k)); endfunction
  function automatic logic [4:0] e_lc_inc(int k);   return 5'(16 + erf_lc_inc(k));   endfunction

  function automatic logic [31:0] ins(op_t op, logic [4:0] rd, logic [4:0] rs, logic [15:0] imm);
    return {op, rd, rs, 1'b0, imm};
  endfunction
  function automatic logic [31:0] LDI (logic [4:0] rd, logic [15:0] imm);               return ins(OP_LDI, rd, 5'd0, imm); endfunction
  function automatic logic [31:0] ADDI(logic [4:0] rd, logic [4:0] rs, logic [15:0] imm); return ins(OP_ADDI, rd, rs, imm); endfunction
  function automatic logic [31:0] ADCI(logic [4:0] rd, logic [4:0] rs, logic [15:0] imm); return ins(OP_ADCI, rd, rs, imm); endfunction
  function automatic logic [31:0] ADD (logic [4:0] rd, logic [4:0] rs, logic [4:0] rt);   return ins(OP_ADD, rd, rs, 16'(rt)); endfunction
  function automatic logic [31:0] ADC (logic [4:0] rd, logic [4:0] rs, logic [4:0] rt);   return ins(OP_ADC, rd, rs, 16'(rt)); endfunction
  function automatic logic [31:0] SUB (logic [4:0] rd, logic [4:0] rs, logic [4:0] rt);   return ins(OP_SUB, rd, rs, 16'(rt)); endfunction
  function automatic logic [31:0] AND_(logic [4:0] rd, logic [4:0] rs, logic [4:0] rt);   return ins(OP_AND, rd, rs, 16'(rt)); endfunction
  function automatic logic [31:0] OR_ (logic [4:0] rd, logic [4:0] rs, logic [4:0] rt);   return ins(OP_OR, rd, rs, 16'(rt)); endfunction
  function automatic logic [31:0] XOR_(logic [4:0] rd, logic [4:0] rs, logic [4:0] rt);   return ins(OP_XOR, rd, rs, 16'(rt)); endfunction
  function automatic logic [31:0] SLL (logic [4:0] rd, logic [4:0] rs, logic [3:0] sh);   return ins(OP_SLL, rd, rs, 16'(sh)); endfunction
  function automatic logic [31:0] SRL (logic [4:0] rd, logic [4:0] rs, logic [3:0] sh);   return ins(OP_SRL, rd, rs, 16'(sh)); endfunction
  function automatic logic [31:0] BEQ (logic [4:0] a, logic [4:0] b, logic [15:0] t);     return ins(OP_BEQ, a, b, t); endfunction
  function automatic logic [31:0] BNE (logic [4:0] a, logic [4:0] b, logic [15:0] t);     return ins(OP_BNE, a, b, t); endfunction
  function automatic logic [31:0] BLT (logic [4:0] a, logic [4:0] b, logic [15:0] t);     return ins(OP_BLT, a, b, t); endfunction
  function automatic logic [31:0] JMP (logic [15:0] t);  return ins(OP_JMP, 5'd0, 5'd0, t); endfunction
  function automatic logic [31:0] DONE(); return ins(OP_DONE, 5'd0, 5'd0, 16'd0); endfunction
  function automatic logic [31:0] WAIT(); return ins(OP_WAIT, 5'd0, 5'd0, 16'd0); endfunction
  function automatic logic [31:0] HALT(); return ins(OP_HALT, 5'd0, 5'd0, 16'd0); endfunction
  function automatic logic [31:0] NOP();  return ins(OP_NOP, 5'd0, 5'd0, 16'd0); endfunction

  // Reference: addresses of one AGC parameter set for 3 loop levels,
  // written as plain nested loops (independent of the RTL structure):
  // level 1 = addresses of a row, level 2 = rows of a block, level 3 = blocks.
  typedef int unsigned uq_t[$];
  function automatic void agc_ref(ref uq_t q, input int unsigned mult, input int inc,
                                  input int unsigned init, input int unsigned rst[3],
                                  input int lcinc[3]);
    int unsigned s1, s2, y, r[3];
    for (int k = 0; k < 3; k++) r[k] = (rst[k] == 0) ? 1 : rst[k];
    s2 = init;
    for (int b = 0; b < r[2]; b++) begin
      s1 = s2;
      for (int row = 0; row < r[1]; row++) begin
        y = s1;
        for (int a = 0; a < r[0]; a++) begin
          q.push_back(y);
          y = y * mult + inc;
        end
        s1 = s1 + lcinc[0];
      end
      s2 = s2 + lcinc[1];
    end
  endfunction

  // ------------------------------------------------------------------
  // Pattern programs (the benchmark access patterns) and their expected
  // address sequences, computed directly from the pattern geometry.
  typedef logic [31:0] prog_t[$];
  localparam logic [4:0] R0 = 5'd0, R1 = 5'd1, R2 = 5'd2, R3 = 5'd3, R4 = 5'd4,
                         R5 = 5'd5, R6 = 5'd6, R7 = 5'd7;

  // Linear: n consecutive words from 0.
  function automatic prog_t prog_linear(int unsigned n);
    return '{LDI(E_MULT, 1), LDI(E_INC, 1), LDI(E_INIT_LO, 0), LDI(e_lc_reset(0), 16'(n)),
             DONE(), HALT()};
  endfunction
  function automatic void ref_linear(ref uq_t q, input int unsigned n);
    for (int unsigned i = 0; i < n; i++) q.push_back(i);
  endfunction

  // Tiled: a w x h tile of a matrix whose rows are `stride` words apart.
  function automatic prog_t prog_tiled(int unsigned w, int unsigned h, int unsigned stride);
    return '{LDI(E_MULT, 1), LDI(E_INC, 1), LDI(E_INIT_LO, 0), LDI(E_INIT_HI, 0),
             LDI(e_lc_reset(0), 16'(w)), LDI(e_lc_inc(0), 16'(stride)),
             LDI(e_lc_reset(1), 16'(h)), DONE(), HALT()};
  endfunction
  function automatic void ref_tiled(ref uq_t q, input int unsigned w, h, stride);
    for (int unsigned r = 0; r < h; r++)
      for (int unsigned c = 0; c < w; c++) q.push_back(r * stride + c);
  endfunction

  // Diagonal: all anti-diagonals of an n x n row-major matrix, each walked
  // from its top-right cell down-left (step n-1); one parameter set per
  // diagonal, the length growing by one up to n and then shrinking.
  function automatic prog_t prog_diagonal(int unsigned n);
    return '{
      LDI(R1, 0), LDI(R2, 16'(2*n-1)), LDI(R3, 16'(n-1)), LDI(R4, 16'(n)),     // 0-3
      LDI(E_INC, 16'(n-1)), LDI(e_lc_reset(0), 1), LDI(E_INIT_LO, 0),          // 4-6
      DONE(), WAIT(),                                                          // 7-8 loop
      BLT(R1, R3, 13),                                                         // 9
      ADDI(e_lc_reset(0), e_lc_reset(0), 16'hFFFF), ADD(E_INIT_LO, E_INIT_LO, R4), JMP(15), // 10-12
      ADDI(e_lc_reset(0), e_lc_reset(0), 1), ADDI(E_INIT_LO, E_INIT_LO, 1),    // 13-14
      ADCI(E_INIT_HI, E_INIT_HI, 0),                                           // 15
      ADDI(R1, R1, 1), BNE(R1, R2, 7), HALT()};                                // 16-18
  endfunction
  function automatic void ref_diagonal(ref uq_t q, input int unsigned n);
    for (int d = 0; d <= 2*int'(n)-2; d++)
      for (int r = (d > int'(n)-1) ? d-int'(n)+1 : 0; r <= ((d < int'(n)-1) ? d : int'(n)-1); r++)
        q.push_back(int'(unsigned'(r * int'(n) + d - r)));
  endfunction

  // Zig-Zag: the JPEG scan of an 8 x 8 block (row-major), one parameter
  // set per diagonal, alternating direction (step -7 / +7).
  function automatic prog_t prog_zigzag();
    return '{
      LDI(R1, 0), LDI(R2, 15), LDI(R3, 7), LDI(R6, 1), LDI(R7, 49),            // 0-4
      LDI(E_MULT, 1), LDI(E_INIT_HI, 0),                                       // 5-6
      WAIT(),                                                                  // 7 loop
      BLT(R3, R1, 11), ADDI(e_lc_reset(0), R1, 1), JMP(12),                    // 8-10
      SUB(e_lc_reset(0), R2, R1),                                              // 11
      AND_(R5, R1, R6), BNE(R5, R0, 20),                                       // 12-13
      LDI(E_INC, 16'hFFF9), BLT(R3, R1, 18), SLL(E_INIT_LO, R1, 3), JMP(26),   // 14-17 even
      ADD(E_INIT_LO, R1, R7), JMP(26),                                         // 18-19
      LDI(E_INC, 7), BLT(R3, R1, 24), ADD(E_INIT_LO, R1, R0), JMP(26),         // 20-23 odd
      SLL(R5, R1, 3), SUB(E_INIT_LO, R5, R7),                                  // 24-25
      DONE(), ADDI(R1, R1, 1), BNE(R1, R2, 7), HALT()};                        // 26-29
  endfunction
  function automatic void ref_zigzag(ref uq_t q);
    for (int d = 0; d <= 14; d++) begin
      int lo = (d > 7) ? d - 7 : 0, hi = (d < 7) ? d : 7;
      if (d % 2 == 0) for (int r = hi; r >= lo; r--) q.push_back(int'(unsigned'(r*8 + d - r)));
      else            for (int r = lo; r <= hi; r++) q.push_back(int'(unsigned'(r*8 + d - r)));
    end
  endfunction

  // Greek Cross: 8 x 8-word squares on rows 1024 words apart, two squares
  // 16 words apart per parameter set; k iterations, each moving the start
  // by 8200 and then by 8208 words.
  function automatic prog_t prog_cross(int unsigned k);
    return '{
      LDI(E_MULT, 1), LDI(E_INC, 1), LDI(E_INIT_LO, 8192), LDI(E_INIT_HI, 0),  // 0-3
      LDI(e_lc_reset(0), 8), LDI(e_lc_inc(0), 1024), LDI(e_lc_reset(1), 8),    // 4-6
      LDI(e_lc_inc(1), 16), LDI(e_lc_reset(2), 2), LDI(R1, 0), LDI(R2, 16'(k)),// 7-10
      DONE(), WAIT(), ADDI(E_INIT_LO, E_INIT_LO, 8200), ADCI(E_INIT_HI, E_INIT_HI, 0), // 11-14
      DONE(), WAIT(), ADDI(E_INIT_LO, E_INIT_LO, 8208), ADCI(E_INIT_HI, E_INIT_HI, 0), // 15-18
      ADDI(R1, R1, 1), BNE(R1, R2, 11), HALT()};                               // 19-21
  endfunction
  function automatic void ref_cross(ref uq_t q, input int unsigned k);
    int unsigned init = 8192;
    for (int unsigned i = 0; i < 2*k; i++) begin
      for (int unsigned b = 0; b < 2; b++)
        for (int unsigned r = 0; r < 8; r++)
          for (int unsigned c = 0; c < 8; c++) q.push_back(init + b*16 + r*1024 + c);
      init += (i % 2 == 0) ? 8200 : 8208;
    end
  endfunction
endpackage
