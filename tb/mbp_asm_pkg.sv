// mbp_asm_pkg: instruction encoders for the MBP core testbenches, one
// function per instruction form (encoding as documented in mbp_pkg).
package mbp_asm_pkg;
  import mbp_pkg::*;

  function automatic instr_t r3(iclass_e c, logic [2:0] f, int ra, int rb, int off);
    return {c, f, 4'(ra), 4'(rb), 3'(off), 3'b0};
  endfunction
  function automatic instr_t ri(iclass_e c, logic [2:0] f, int ra, int imm);
    return {c, f, 4'(ra), 10'(imm)};
  endfunction

  function automatic instr_t NOP();                         return '0; endfunction
  function automatic instr_t WGG(alu_f_e f, int rd, int rs); return r3(C_WGG, f, rd, rs, 0); endfunction
  function automatic instr_t WGI(alu_f_e f, int rd, int imm); return ri(C_WGI, f, rd, imm); endfunction
  function automatic instr_t LI(int rd, int imm);           return ri(C_WGI, F_MOV, rd, imm); endfunction
  function automatic instr_t WPG(alu_f_e f, int rd, int rp, int off); return r3(C_WPG, f, rd, rp, off); endfunction
  function automatic instr_t ADDPG(int rd, int rp, int off); return r3(C_WPG, F_ADD, rd, rp, off); endfunction
  function automatic instr_t LDPG(int rd, int rp, int off);  return r3(C_WPG, F_MOV, rd, rp, off); endfunction
  function automatic instr_t STPG(int rs, int rp, int off);  return r3(C_WPG, F_STPG, rs, rp, off); endfunction
  function automatic instr_t BPI(logic [2:0] f, int rp, int off, int imm7);
    return {C_BPI, f, 4'(rp), 3'(off), 7'(imm7)};
  endfunction
  function automatic instr_t MVLPP(int rdp, int rsp);        return r3(C_MPP, MPP_MVLPP, rdp, rsp, 0); endfunction
  function automatic instr_t MVPP(int rdp, int rsp, int off); return r3(C_MPP, MPP_MVPP, rdp, rsp, off); endfunction
  function automatic instr_t BR(logic [2:0] f, int ra, int tgt); return ri(C_BRANCH, f, ra, tgt); endfunction
  function automatic instr_t TJ(int bits, int ra, int base);  return ri(C_TJ, 3'(bits - 1), ra, base); endfunction
  function automatic instr_t MEM(iclass_e c, logic [2:0] f, int ra, int rb, int disp);
    return {c, f, 4'(ra), 4'(rb), 6'(disp)};
  endfunction
  function automatic instr_t LD(int rd, int rb, int disp);  return MEM(C_LMA, MEM_LD, rd, rb, disp); endfunction
  function automatic instr_t ST(int rs, int rb, int disp);  return MEM(C_LMA, MEM_ST, rs, rb, disp); endfunction
  function automatic instr_t ILD(int rd, int rb, int disp); return MEM(C_IMA, MEM_LD, rd, rb, disp); endfunction
  function automatic instr_t IST(int rs, int rb, int disp); return MEM(C_IMA, MEM_ST, rs, rb, disp); endfunction
  function automatic instr_t MMC(mmc_op_e op, int rp, int rarg); return r3(C_MMC, {1'b0, op}, rp, rarg, 0); endfunction
  function automatic instr_t RDT(rdt_op_e op, int rp, int rarg); return r3(C_RDT, {1'b0, op}, rp, rarg, 0); endfunction
  function automatic instr_t INT(logic [2:0] f);            return r3(C_INT, f, 0, 0, 0); endfunction
  function automatic instr_t SPE(logic [2:0] f, int rd);    return r3(C_SPE, f, rd, 0, 0); endfunction
endpackage
