// vram_tb_pkg: helpers shared by the VRAM testbenches: a constructor for
// micro-program words and one for single array micro-ops.
package vram_tb_pkg;
  import vram_pkg::*;

  function automatic uprog_word_t uw(array_op_e op, src_e src = SRC_AND,
                                     cond_e cond = COND_IN,
                                     int ra = 0, idx_e ia = IDX_NONE,
                                     int rb = 0, idx_e ib = IDX_NONE,
                                     bit imm = 0, bit set_cin = 0, bit cin = 0,
                                     bit srl = 0, ctl_e ctl = CTL_NONE,
                                     int target = 0, bit last = 0);
    uprog_word_t w;
    w.op = op; w.src = src; w.cond = cond;
    w.row_a = ROW_W'(ra); w.idx_a = ia;
    w.row_b = ROW_W'(rb); w.idx_b = ib;
    w.imm = imm; w.set_cin = set_cin; w.cin = cin; w.srl = srl;
    w.ctl = ctl; w.target = PC_W'(target); w.last = last;
    return w;
  endfunction

  function automatic array_uop_t au(array_op_e op, src_e src = SRC_AND,
                                    cond_e cond = COND_IN, int ra = 0, int rb = 0,
                                    bit srl = 0, bit init_cin = 0, bit cin = 0);
    array_uop_t u;
    u.op = op; u.src = src; u.cond = cond;
    u.row_a = ROW_W'(ra); u.row_b = ROW_W'(rb);
    u.srl = srl; u.init_cin = init_cin; u.cin = cin;
    return u;
  endfunction
endpackage
