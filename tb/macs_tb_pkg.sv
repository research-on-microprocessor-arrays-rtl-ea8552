// Testbench helpers for writing MACS microprograms: a constructor for a
// microinstruction from its main fields (every control bit off) and the
// standard address-CRAM contents (word i: A = B = register i, link i+1).
package macs_tb_pkg;
  import macs_pkg::*;

  function automatic uinstr_t op(alu_src_e src, alu_fn_e fn, alu_dst_e dst, dsel_e dsel,
                                 int ac, int nxt);
    uinstr_t u;
    u         = '0;
    u.src     = src;
    u.fn      = fn;
    u.dst     = dst;
    u.dsel    = dsel;
    u.ac_addr = 4'(ac);
    u.next    = 4'(nxt);
    return u;
  endfunction

  function automatic acram_t ac_word(int i);
    acram_t w;
    w.link = 4'((i + 1) % 16);
    w.a    = 4'(i);
    w.b    = 4'(i);
    return w;
  endfunction
endpackage
