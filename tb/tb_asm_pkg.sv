// Instruction encoders for DNP-II programs written in testbenches (see dnp_pkg for the
// instruction formats).
package tb_asm_pkg;
  import dnp_pkg::*;

  function automatic word_t i_nop();  return {OP_MISC, MISC_NOP, 8'd0}; endfunction
  function automatic word_t i_halt(); return {OP_MISC, MISC_HALT, 8'd0}; endfunction
  function automatic word_t i_ret();  return {OP_MISC, MISC_RET, 8'd0}; endfunction
  function automatic word_t i_setiopr(int rs); return {OP_MISC, MISC_SETIOPR, 5'd0, 3'(rs)}; endfunction
  function automatic word_t i_mova(int an, int rs);
    return {OP_MISC, MISC_MOVA, 2'd0, 2'(an), 1'b0, 3'(rs)};
  endfunction
  function automatic word_t i_ldi(int rd, int imm); return {OP_LDI, 3'(rd), 9'(imm)}; endfunction
  function automatic word_t i_alu(int rd, int rs, alu_op_e f);
    return {OP_ALU, 3'(rd), 3'(rs), 2'd0, f};
  endfunction
  function automatic word_t i_mem(opcode_e op, int r, int an, amode_e m, int ri = 0);
    return {op, 3'(r), 2'(an), m, 3'(ri), 2'd0};
  endfunction
  function automatic word_t i_ldw(int rd, int an, amode_e m = AM_PLAIN, int ri = 0); return i_mem(OP_LDW, rd, an, m, ri); endfunction
  function automatic word_t i_stw(int rs, int an, amode_e m = AM_PLAIN, int ri = 0); return i_mem(OP_STW, rs, an, m, ri); endfunction
  function automatic word_t i_ldx(int rd, int an, amode_e m = AM_PLAIN, int ri = 0); return i_mem(OP_LDX, rd, an, m, ri); endfunction
  function automatic word_t i_stx(int rs, int an, amode_e m = AM_PLAIN, int ri = 0); return i_mem(OP_STX, rs, an, m, ri); endfunction
  function automatic word_t i_mac(int ax, int aw, amode_e xm, amode_e wm, bit clr);
    return {OP_MAC, 2'(ax), 2'(aw), xm, wm, 3'd0, clr};
  endfunction
  function automatic word_t i_lda(int an, int imm); return {OP_LDA, 2'(an), 10'(imm)}; endfunction
  function automatic word_t i_acc2r(int rd, int sh); return {OP_ACC, 3'(rd), ACC_TO_REG, 2'd0, 5'(sh)}; endfunction
  function automatic word_t i_r2acc(int rs); return {OP_ACC, 3'(rs), REG_TO_ACC, 7'd0}; endfunction
  function automatic word_t i_accclr(); return {OP_ACC, 3'd0, ACC_CLEAR, 7'd0}; endfunction
  function automatic word_t i_send(int rs, int pair); return {OP_SEND, 3'(rs), 7'd0, 2'(pair)}; endfunction
  function automatic word_t i_recv(int rd, int pair); return {OP_RECV, 3'(rd), 7'd0, 2'(pair)}; endfunction
  function automatic word_t i_rpt(int n); return {OP_RPT, 4'd0, 8'(n)}; endfunction
  function automatic word_t i_jmp(int a); return {OP_JMP, 4'd0, 8'(a)}; endfunction
  function automatic word_t i_call(int a); return {OP_CALL, 4'd0, 8'(a)}; endfunction
  function automatic word_t i_djnz(int rd, int a); return {OP_DJNZ, 3'(rd), 1'b0, 8'(a)}; endfunction

  // Reference for ACC -> register: arithmetic shift, then saturation to 16 bits.
  function automatic word_t sat_shift(longint acc, int sh);
    longint v = acc >>> sh;
    if (v > 32767) return 16'h7fff;
    if (v < -32768) return 16'h8000;
    return word_t'(v);
  endfunction
endpackage
