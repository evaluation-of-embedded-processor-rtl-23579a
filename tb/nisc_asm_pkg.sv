// nisc_asm_pkg: testbench helpers that build NISC control words field by
// field, in place of a compiler. Each function takes a control word, sets
// the fields of one unit and returns it, so words can be composed:
//   c = wb0(alu(rd(nop(), 1, 2), ALU_ADD, OP_B1, OP_B2), 3, WB_ALU);
package nisc_asm_pkg;
  import nisc_pkg::*;

  function automatic cw_t nop();
    cw_t c = '0;
    c.nxt = NX_INC;
    return c;
  endfunction

  function automatic cw_t rd(cw_t c, int r1, int r2 = 0);
    c.ra1 = RF_AW'(r1); c.ra2 = RF_AW'(r2); return c;
  endfunction

  function automatic cw_t k(cw_t c, logic [XLEN-1:0] v);
    c.imm = v; return c;
  endfunction

  function automatic cw_t alu(cw_t c, alu_op_e op, op_src_e a, op_src_e b);
    c.alu_en = 1'b1; c.alu_op = op; c.alu_a = a; c.alu_b = b; return c;
  endfunction

  function automatic cw_t alu2(cw_t c, alu_op_e op, op_src_e a, op_src_e b);
    c.alu2_en = 1'b1; c.alu2_op = op; c.alu2_a = a; c.alu2_b = b; return c;
  endfunction

  function automatic cw_t mul(cw_t c, op_src_e a, op_src_e b);
    c.mul_en = 1'b1; c.mul_a = a; c.mul_b = b; return c;
  endfunction

  function automatic cw_t div(cw_t c, op_src_e a, op_src_e b);
    c.div_start = 1'b1; c.div_a = a; c.div_b = b; return c;
  endfunction

  function automatic cw_t cmp(cw_t c, cmp_op_e op, cmp_src_e a, cmp_src_e b);
    c.cmp_en = 1'b1; c.cmp_op = op; c.cmp_a = a; c.cmp_b = b; return c;
  endfunction

  function automatic cw_t wb0(cw_t c, int r, wb_src_e s);
    c.we0 = 1'b1; c.wa0 = RF_AW'(r); c.wb0 = s; return c;
  endfunction

  function automatic cw_t wb1(cw_t c, int r, wb_src_e s);
    c.we1 = 1'b1; c.wa1 = RF_AW'(r); c.wb1 = s; return c;
  endfunction

  function automatic cw_t ld(cw_t c, mem_addr_src_e a);
    c.mem_re = 1'b1; c.mem_addr = a; return c;
  endfunction

  function automatic cw_t st(cw_t c, mem_addr_src_e a);
    c.mem_we = 1'b1; c.mem_addr = a; return c;
  endfunction

  function automatic cw_t nx(cw_t c, next_e n, int off = 0);
    c.nxt = n; c.offset = PC_W'(off); return c;
  endfunction

  function automatic cw_t waitdiv(cw_t c);
    c.wait_div = 1'b1; return c;
  endfunction

endpackage
