// np_tb_pkg: helpers shared by the testbenches: an empty instruction word
// and configuration-word builders.
package np_tb_pkg;
  import np_pkg::*;

  // an instruction that reads nothing, writes nothing and stays at PC 0
  function automatic instr_t nop();
    instr_t i;
    i = '0;
    i.op = OP_PASSA;
    i.a_sel = SRC_ZERO;
    i.b_sel = SRC_ZERO;
    i.cout_src = CO_N;
    return i;
  endfunction

  function automatic cfg_t mk_cfg(int tgt, int addr, logic [CFG_DW-1:0] data);
    cfg_t c;
    c.we = 1'b1;
    c.target = CFG_TW'(tgt);
    c.addr = CFG_AW'(addr);
    c.data = data;
    return c;
  endfunction
endpackage
