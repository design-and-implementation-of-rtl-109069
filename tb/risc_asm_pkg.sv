// risc_asm_pkg: instruction assembly helpers for the processor testbenches.
// Each function returns one 32-bit instruction word in the layout of risc_pkg:
// [31:28] opcode, [27:24] ALU select, [23:21] rd, [20:18] rs, [17:15] rt,
// [14:0] immediate (two's complement, sign-extended by the decoder).
package risc_asm_pkg;
  import risc_pkg::*;

  function automatic word_t enc(opcode_e op, alu_sel_e sel, reg_addr_t rd, reg_addr_t rs,
                                reg_addr_t rt, logic [IMM_W-1:0] imm);
    return {op, sel, rd, rs, rt, imm};
  endfunction

  function automatic word_t r_alu(alu_sel_e sel, reg_addr_t rd, reg_addr_t rs, reg_addr_t rt);
    return enc(OP_ALU, sel, rd, rs, rt, '0);
  endfunction
  function automatic word_t i_alu(alu_sel_e sel, reg_addr_t rd, reg_addr_t rs, int imm);
    return enc(OP_ALUI, sel, rd, rs, '0, IMM_W'(imm));
  endfunction
  function automatic word_t li(reg_addr_t rd, int imm);       // rd = imm (OR with r0)
    return enc(OP_ALUI, ALU_OR, rd, '0, '0, IMM_W'(imm));
  endfunction
  function automatic word_t lw(reg_addr_t rd, reg_addr_t rs, int imm);
    return enc(OP_LW, ALU_AND, rd, rs, '0, IMM_W'(imm));
  endfunction
  function automatic word_t sw(reg_addr_t rt, reg_addr_t rs, int imm);
    return enc(OP_SW, ALU_AND, '0, rs, rt, IMM_W'(imm));
  endfunction
  // Branch offset is in bytes, relative to the address after the branch.
  function automatic word_t beqz(reg_addr_t rs, int off);
    return enc(OP_BEQZ, ALU_AND, '0, rs, '0, IMM_W'(off));
  endfunction
  function automatic word_t bnez(reg_addr_t rs, int off);
    return enc(OP_BNEZ, ALU_AND, '0, rs, '0, IMM_W'(off));
  endfunction
  function automatic word_t in_p(reg_addr_t rd, int port);
    return enc(OP_IN, ALU_AND, rd, '0, '0, IMM_W'(port));
  endfunction
  function automatic word_t out_p(reg_addr_t rt);
    return enc(OP_OUT, ALU_AND, '0, '0, rt, '0);
  endfunction
  function automatic word_t nop();
    return '0;
  endfunction
endpackage
