// risc_pkg: instruction set of the control RISC processor.
//
// 32-bit instructions: op[31:26] rd[25:22] rs[21:18] rt[17:14] imm[15:0]
// (R-type uses rt, I-type uses imm; the fields overlap and never both).
// Three classes, as the published processor divides them:
//   general arithmetic  ADD SUB AND OR XOR SLL SRL ADDI LUI ORI BEQ BNE JMP
//                       IN OUT HALT
//   configuration       CFGHI (stage bits 39..32 of a configuration word),
//                       CFGW  (configuration memory[rs] = {staged, rt}),
//                       IDXW  (configuration memory index[rs] = rt),
//                       FTW   (function table[imm[7:0]] = rs[15:0])
//   image processing    CUST  (send function table[imm[7:0]] to the PE array;
//                              imm[8] = 1: following instructions wait until
//                              the array has finished), SYNC (wait until the
//                              PE array is idle)
// The encoding is this design's own.
package risc_pkg;
  typedef enum logic [5:0] {
    OP_NOP   = 6'h00,
    OP_ADD   = 6'h01, OP_SUB = 6'h02, OP_AND = 6'h03, OP_OR  = 6'h04,
    OP_XOR   = 6'h05, OP_SLL = 6'h06, OP_SRL = 6'h07,
    OP_ADDI  = 6'h08, OP_LUI = 6'h09, OP_ORI = 6'h0A,
    OP_BEQ   = 6'h10, OP_BNE = 6'h11, OP_JMP = 6'h12,
    OP_IN    = 6'h18, OP_OUT = 6'h19,
    OP_CFGHI = 6'h20, OP_CFGW = 6'h21, OP_IDXW = 6'h22, OP_FTW = 6'h23,
    OP_CUST  = 6'h28, OP_SYNC = 6'h29,
    OP_HALT  = 6'h3F
  } rop_e;

  function automatic logic [31:0] enc_r(rop_e op, logic [3:0] rd, logic [3:0] rs, logic [3:0] rt);
    return {op, rd, rs, rt, 14'd0};
  endfunction

  function automatic logic [31:0] enc_i(rop_e op, logic [3:0] rd, logic [3:0] rs, logic [15:0] imm);
    return {op, rd, rs, 2'd0, imm};
  endfunction
endpackage
