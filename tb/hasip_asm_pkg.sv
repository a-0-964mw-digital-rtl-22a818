// hasip_asm_pkg: a minimal assembler for the hearing-aid ASIP, used by the
// processor testbenches to build programs. S() builds a slot word, C() a
// control word, bs_imm() the field immediate of BSLICE and modi_imm() the
// step/modulus immediate of MODADDI. Bundles are assembled by placing
// three slot words and a control word into an instr_t.
package hasip_asm_pkg;
  import hasip_pkg::*;

  function automatic slot_t S(opcode_e op, int d1 = 0, int d2 = 0, int s1 = 0, int s2 = 0, int imm = 0);
    slot_t s;
    s.op = op; s.d1 = 5'(d1); s.d2 = 5'(d2); s.s1 = 5'(s1); s.s2 = 5'(s2); s.imm = 22'(imm);
    return s;
  endfunction

  function automatic ctrl_t C(cop_e cop, int r = 0, int tgt = 0);
    ctrl_t c;
    c.cop = cop; c.r = 5'(r); c.tgt = 8'(tgt);
    return c;
  endfunction

  function automatic instr_t bundle(slot_t s0, slot_t s1 = '0, slot_t s2 = '0, ctrl_t c = '0);
    instr_t i;
    i.slot[0] = s0; i.slot[1] = s1; i.slot[2] = s2; i.ctrl = c;
    return i;
  endfunction

  function automatic int bs_imm(int rs, int rw, int ls, int lw);
    return rs | (rw << 5) | (ls << 10) | (lw << 15);
  endfunction

  function automatic int modi_imm(int step, int modulus);
    return step | (modulus << 6);
  endfunction

  function automatic longint sx16(longint v);
    v = v & 64'hffff;
    return v > 32767 ? v - 65536 : v;
  endfunction
endpackage
