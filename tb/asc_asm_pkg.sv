// asc_asm_pkg - small assembler for the testbenches: functions that build
// 32-bit instruction words in the processor's encoding (see asc_pkg).
package asc_asm_pkg;
  import asc_pkg::*;

  typedef logic [31:0] word_t;

  function automatic word_t nop();
    return word_t'(make_instr(OP_NOP, 1'b0, 0, 0, 0, DSW_COMP, 1'b0, 8'd0));
  endfunction
  function automatic word_t halt();
    return word_t'(make_instr(OP_HALT, 1'b0, 0, 0, 0, DSW_COMP, 1'b0, 8'd0));
  endfunction
  // scalar: rd = rs1 <op> rs2
  function automatic word_t s_rr(opcode_e op, int rd, int rs1, int rs2);
    return word_t'(make_instr(op, 1'b0, 4'(rd), 4'(rs1), 4'(rs2), DSW_COMP, 1'b0, 8'd0));
  endfunction
  // scalar: rd = rs1 <op> imm (MOV: rd = imm)
  function automatic word_t s_ri(opcode_e op, int rd, int rs1, int imm);
    return word_t'(make_instr(op, 1'b0, 4'(rd), 4'(rs1), 4'd0, DSW_COMP, 1'b1, 8'(imm)));
  endfunction
  function automatic word_t s_ld(int rd, int rs1, int off);
    return word_t'(make_instr(OP_LD, 1'b0, 4'(rd), 4'(rs1), 4'd0, DSW_COMP, 1'b0, 8'(off)));
  endfunction
  function automatic word_t s_st(int rs2, int rs1, int off);
    return word_t'(make_instr(OP_ST, 1'b0, 4'd0, 4'(rs1), 4'(rs2), DSW_COMP, 1'b0, 8'(off)));
  endfunction
  function automatic word_t s_br(opcode_e op, int rs1, int rs2, int tgt);
    return word_t'(make_instr(op, 1'b0, 4'd0, 4'(rs1), 4'(rs2), DSW_COMP, 1'b0, 8'(tgt)));
  endfunction
  // parallel instruction, all fields given
  function automatic word_t p(opcode_e op, int rd, int rs1, int rs2,
                              dsw_mode_e dsw, logic bsel, int imm);
    return word_t'(make_instr(op, 1'b1, 4'(rd), 4'(rs1), 4'(rs2), dsw, bsel, 8'(imm)));
  endfunction
  // parallel with immediate broadcast: rd = rs1 <op> imm, or compare rs1 with imm
  function automatic word_t p_i(opcode_e op, int rd, int rs1, int imm);
    return p(op, rd, rs1, 0, DSW_BCAST, 1'b0, imm);
  endfunction
  // parallel with SPE register broadcast: compare/operate rs1 with SPE R[srs]
  function automatic word_t p_s(opcode_e op, int rd, int rs1, int srs);
    return p(op, rd, rs1, srs, DSW_BCAST, 1'b1, 0);
  endfunction
endpackage
