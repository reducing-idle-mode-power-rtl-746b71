// imp_asm_pkg: instruction encoders used by the testbenches to write programs
// for the idle mode processor (see imp_pkg for the encoding).
package imp_asm_pkg;
  import imp_pkg::*;

  // register-register form: rd, ra, rb
  function automatic logic [31:0] asm_r(opcode_t op, int rd, int ra, int rb, bit l = 1'b0);
    instr_t i;
    i.op = op; i.l = l; i.rd = 4'(rd); i.ra = 4'(ra); i.imm = '0; i.imm[16:13] = 4'(rb);
    return 32'(i);
  endfunction

  // immediate form: rd, ra, imm17
  function automatic logic [31:0] asm_i(opcode_t op, int rd, int ra, int imm, bit l = 1'b0);
    instr_t i;
    i.op = op; i.l = l; i.rd = 4'(rd); i.ra = 4'(ra); i.imm = 17'(imm);
    return 32'(i);
  endfunction

  // store rb to AR(ar), post-increment when inc
  function automatic logic [31:0] asm_st(int ar, int rb, bit inc, bit l = 1'b0);
    instr_t i;
    i.op = OP_ST; i.l = l; i.rd = 4'(ar); i.ra = '0; i.imm = '0; i.imm[16:13] = 4'(rb); i.imm[0] = inc;
    return 32'(i);
  endfunction
endpackage
