// Instruction encoders used by the testbenches to build programs for the core.
// Standard MIPS32 formats plus the SIMD group (opcode 0x1C, lane options in the
// sa field) and the register-file configure instruction (opcode 0x1F).
package tb_asm_pkg;
  import mc_pkg::*;

  function automatic logic [31:0] rtype(input logic [5:0] funct, input int rd, input int rs,
                                        input int rt, input int sa = 0);
    return {OP_SPECIAL, 5'(rs), 5'(rt), 5'(rd), 5'(sa), funct};
  endfunction
  function automatic logic [31:0] itype(input logic [5:0] op, input int rt, input int rs,
                                        input int imm);
    return {op, 5'(rs), 5'(rt), 16'(imm)};
  endfunction
  function automatic logic [31:0] simd(input logic [5:0] funct, input int rd, input int rs,
                                       input int rt, input int opts);
    return {OP_SIMD, 5'(rs), 5'(rt), 5'(rd), 5'(opts), funct};
  endfunction
  function automatic logic [31:0] addu(input int rd, input int rs, input int rt);
    return rtype(F_ADDU, rd, rs, rt);
  endfunction
  function automatic logic [31:0] addiu(input int rt, input int rs, input int imm);
    return itype(OP_ADDIU, rt, rs, imm);
  endfunction
  function automatic logic [31:0] lui(input int rt, input int imm);
    return itype(OP_LUI, rt, 0, imm);
  endfunction
  function automatic logic [31:0] ori(input int rt, input int rs, input int imm);
    return itype(OP_ORI, rt, rs, imm);
  endfunction
  function automatic logic [31:0] lw(input int rt, input int off, input int base);
    return itype(OP_LW, rt, base, off);
  endfunction
  function automatic logic [31:0] sw(input int rt, input int off, input int base);
    return itype(OP_SW, rt, base, off);
  endfunction
  // branch from the instruction at word index 'at' to word index 'to'
  function automatic logic [31:0] bne(input int rs, input int rt, input int at, input int to);
    return itype(OP_BNE, rt, rs, to - at - 1);
  endfunction
  function automatic logic [31:0] beq(input int rs, input int rt, input int at, input int to);
    return itype(OP_BEQ, rt, rs, to - at - 1);
  endfunction
  function automatic logic [31:0] cfg(input int c);
    return {OP_RFCFG, 21'd0, 5'(c)};
  endfunction
  function automatic logic [31:0] nop();
    return 32'h0;
  endfunction
  function automatic logic [31:0] brk();
    return {26'd0, F_BREAK};
  endfunction
  // SIMD option field: lane width, scalar, signed
  function automatic int opt(input lane_e ln, input bit scalar = 0, input bit sgn = 0);
    return int'(ln) | (int'(scalar) << 2) | (int'(sgn) << 3);
  endfunction
endpackage
