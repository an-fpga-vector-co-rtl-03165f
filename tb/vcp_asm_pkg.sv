// vcp_asm_pkg: helpers that build microcode words for the testbenches, plus
// a 16-bit wrap-around used by their reference models.
package vcp_asm_pkg;
  import vcp_pkg::*;

  // Maths word for all lanes: A from store A at aaddr, B chosen by ob.
  function automatic uinstr_t op(alu_op_e a, mask_op_e m, opb_e ob, int aaddr, int baddr);
    uinstr_t u = '0;
    u.pe.lane_all = 1;
    u.pe.alu_op = a; u.pe.mask_op = m; u.pe.opb_sel = ob;
    u.pe.a_op = ADDR_LOAD; u.pe.a_imm = STORE_AW'(aaddr);
    u.pe.b_op = ADDR_LOAD; u.pe.b_imm = STORE_AW'(baddr);
    return u;
  endfunction

  // Same word with a sequencing field.
  function automatic uinstr_t seq(uinstr_t u, seq_op_e s, cond_e c = COND_ALWAYS,
                                  int cbit = 0, int target = 0);
    u.seq.op = s; u.seq.cond = c; u.seq.cond_bit = 4'(cbit); u.seq.target = UC_AW'(target);
    return u;
  endfunction

  // Sets all three address registers to the last word, so that the next
  // increment gives address 0.
  function automatic uinstr_t addr_init();
    uinstr_t u = '0;
    u.pe.a_op = ADDR_LOAD; u.pe.a_imm = '1;
    u.pe.b_op = ADDR_LOAD; u.pe.b_imm = '1;
    u.pe.w_op = ADDR_LOAD; u.pe.w_imm = '1;
    return u;
  endfunction

  // Consumes one input word and writes it into one lane's store A or B.
  function automatic uinstr_t load_word(int lane, bit to_b, bit inc_w);
    uinstr_t u = '0;
    u.seq.wait_in = 1;
    u.pe.lane_sel = LANE_W'(lane);
    u.pe.wr_src = WSRC_SCALAR;
    u.pe.wr_a = !to_b; u.pe.wr_b = to_b;
    u.pe.w_op = inc_w ? ADDR_INC : ADDR_HOLD;
    return u;
  endfunction

  // Reads store B of one lane out through the sum tree.
  function automatic uinstr_t read_b_word(int lane, bit inc_b);
    uinstr_t u = '0;
    u.pe.lane_sel = LANE_W'(lane);
    u.pe.alu_op = ALU_PASS_B; u.pe.mask_op = MASK_B; u.pe.opb_sel = OPB_STORE_B;
    u.pe.b_op = inc_b ? ADDR_INC : ADDR_HOLD;
    u.pe.out_push = 1;
    return u;
  endfunction

  function automatic int w16(longint v);
    logic [15:0] t = v[15:0];
    return int'($signed(t));
  endfunction
endpackage
