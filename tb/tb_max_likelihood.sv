// Maximum-likelihood plot selection for one track, 20 plots in its gate, on
// the default 8-PE array, one likelihood per microcycle of 16 slots.
// For plot k the array forms
//     L_k = B + LN[g_k] - ((x_k - u_k)^2 * w_k) / 4096 + D - C
// where B is the track's partial sum (in PE6's external memory), LN is
// lookup table 1 of the working memory (100 ln(1 + i)), indexed by the
// plot's spread code g_k, and w_k is the plot's 1/(2 sigma^2) scaled by 4096.
// D is the track's time term
//     D = LN[ER4 + ER3 * EXP[ER2 * (T - V)]]
// with EXP table 0 (1000 exp(-i/300)), products taking their high halves,
// and C is the track's term (Y - U) * ER1 / 4096.
// The working memory streams x, u, g, w onto the system bus in slots 0, 1,
// 2, 5 and reads the track's V in slot 6 and its Y, U in slots 14, 15.
//   PE3: T - V, times ER2, exp lookup (slot 12, answer 13), times ER3, plus
//        ER4 (slot 1 of the next microcycle), ln lookup in slot 7; the answer
//        D is on the bus in slot 8. The chain wraps round the microcycle, so
//        D in microcycle m comes from microcycle m-1; in microcycle 0 it is
//        LN[0], from the reset state.
//   PE4: Y - U (slots 14, 15), times ER1 in slot 0 of the next microcycle;
//        C driven onto the bus in slot 9 (0 in microcycle 0).
//   PE5: d = x - u; d -> external word 1; d*d on the multiplier; w ->
//        external word 2; (d*d)*w; high half to the latch in slot 10.
//   PE6: g; lookup request; LN[g] + B; plus D; minus C; minus PE5's term;
//        L latched in slot 11.
//   PE7: index + 1; L - best, disable if negative; if not disabled emit the
//        new best L and its index (1-based) to the bottom buffer.
// PE0..PE2 are idle. The testbench models the same integer arithmetic,
// compares every L_k (sampled from PE6 in slot 12, which also checks the
// rate of one likelihood per microcycle) and the emitted (L, index) pairs.
module tb_max_likelihood;
  import macs_pkg::*;
  import macs_tb_pkg::*;

  localparam int NPLOT = 20, BSUM = 700, STREAM = 100, VADDR = 50;
  localparam int YY = 300, UY = 200, ER1 = 2000, YADDR = 51, UADDR = 52;
  localparam int TT = 500, VV = 380, ER2 = 1024, ER3 = 1500, ER4 = 40;
  logic clk = 0, rst_n = 0;
  logic host_we = 0, start = 0, bot_pop = 0, busy, done, bot_overflow, top_overflow;
  logic bus_conflict, wm_collision;
  host_tgt_e host_tgt = HT_OPC;
  logic [2:0] host_pe = 0;
  logic [11:0] host_addr = 0, host_rd_addr = 0;
  logic [63:0] host_wdata = 0;
  logic [15:0] n_mcycles = 0;
  word_t host_rd_data, bot_data;
  logic [3:0] slot;
  logic [10:0] bot_count, top_count;
  logic [7:0] pe_enabled;
  int checks = 0, failures = 0, n_l = 0, steps = 0;
  word_t lexp [NPLOT];

  macs_array dut (.clk, .rst_n, .host_we, .host_tgt, .host_pe, .host_addr, .host_wdata,
    .host_rd_addr, .host_rd_data, .start, .n_mcycles, .busy, .done, .slot,
    .bot_pop, .bot_data, .bot_count, .bot_overflow, .top_count, .top_overflow,
    .bus_conflict, .wm_collision, .pe_enabled);

  always #5 clk = ~clk;

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin #5000000; failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // one likelihood per microcycle: PE6's latch in slot 12 of microcycle m is L_m
  always @(negedge clk) if (dut.step) begin
    if (slot == 4'd12 && steps / 16 < NPLOT) begin
      chk(dut.latch[6] == lexp[steps / 16], $sformatf("L(%0d) = %0d expected %0d", steps / 16, dut.latch[6], lexp[steps / 16]));
      n_l++;
    end
    steps++;
  end

  task automatic hw(input host_tgt_e t, input int pe, input int a, input logic [63:0] d);
    host_we = 1; host_tgt = t; host_pe = 3'(pe); host_addr = 12'(a); host_wdata = d;
    @(negedge clk); host_we = 0;
  endtask

  task automatic load_prog(input int pe, input uinstr_t p [16]);
    for (int i = 0; i < 16; i++) begin
      hw(HT_OPC, pe, i, 64'(p[i]));
      hw(HT_ACR, pe, i, 64'(ac_word(i)));
    end
  endtask

  function automatic int t0(int i);
    return int'(1000.0 * $exp(-i / 300.0));
  endfunction

  function automatic int t1(int i);
    return int'(100.0 * $ln(1.0 + i));
  endfunction

  uinstr_t p [16];

  initial begin
    word_t pairs [$];
    int best, dterm, cterm;
    repeat (3) @(negedge clk); rst_n = 1;
    // idle PEs
    for (int i = 0; i < 16; i++) p[i] = nop_instr(4'((i + 1) % 16));
    for (int k = 0; k < 3; k++) load_prog(k, p);
    // PE3: track time term D, one microcycle ahead
    p[1]  = op(SRC_DA, FN_ADD,  DST_NOP,  DSEL_MULH, 4, 2); p[1].lat = 1;
    p[6]  = op(SRC_DZ, FN_ADD,  DST_QREG, DSEL_SYSBUS, 0, 7);
    p[7]  = op(SRC_DQ, FN_SUBS, DST_NOP,  DSEL_EMA, 0, 8); p[7].em_a = 1; p[7].cin = 1; p[7].lat = 1;
    p[7].bus_out = 1; p[7].lut_req = 1; p[7].lut_tbl = 1;
    p[8]  = nop_instr(9); p[8].mul = 1; p[8].em_b = 2;
    p[9]  = op(SRC_DZ, FN_ADD,  DST_RAMF, DSEL_EMA, 4, 10); p[9].em_a = 4;
    p[11] = op(SRC_DZ, FN_ADD,  DST_NOP,  DSEL_MULH, 0, 12); p[11].lat = 1;
    p[12] = nop_instr(13); p[12].bus_out = 1; p[12].lut_req = 1; p[12].lut_tbl = 0;
    p[13] = op(SRC_DZ, FN_ADD,  DST_NOP,  DSEL_SYSBUS, 0, 14); p[13].lat = 1;
    p[14] = nop_instr(15); p[14].mul = 1; p[14].em_b = 3;
    load_prog(3, p);
    // PE4: track term C, one microcycle ahead
    for (int i = 0; i < 16; i++) p[i] = nop_instr(4'((i + 1) % 16));
    p[14] = op(SRC_DZ, FN_ADD,  DST_QREG, DSEL_SYSBUS, 0, 15);
    p[15] = op(SRC_DQ, FN_SUBR, DST_NOP,  DSEL_SYSBUS, 0, 0); p[15].cin = 1; p[15].lat = 1;
    p[0]  = nop_instr(1); p[0].mul = 1; p[0].em_b = 1;
    p[3]  = op(SRC_DZ, FN_ADD,  DST_NOP,  DSEL_MULH, 0, 4); p[3].lat = 1;
    p[9]  = nop_instr(10); p[9].bus_out = 1;
    load_prog(4, p);
    hw(HT_EM, 4, 1, 64'(ER1));
    hw(HT_EM, 3, 1, 64'(TT)); hw(HT_EM, 3, 2, 64'(ER2));
    hw(HT_EM, 3, 3, 64'(ER3)); hw(HT_EM, 3, 4, 64'(ER4));
    // PE5: weighted squared distance
    for (int i = 0; i < 16; i++) p[i] = nop_instr(4'((i + 1) % 16));
    p[0]  = op(SRC_DZ, FN_ADD,  DST_QREG, DSEL_SYSBUS, 0, 1);
    p[1]  = op(SRC_DQ, FN_SUBR, DST_QREG, DSEL_SYSBUS, 0, 2); p[1].cin = 1; p[1].lat = 1;
    p[2]  = nop_instr(3); p[2].em_we = 1; p[2].em_b = 1;
    p[3]  = nop_instr(4); p[3].mul = 1; p[3].em_b = 1;
    p[5]  = op(SRC_DZ, FN_ADD,  DST_RAMF, DSEL_SYSBUS, 2, 6); p[5].lat = 1;
    p[6]  = op(SRC_DZ, FN_ADD,  DST_QREG, DSEL_MULL, 0, 7); p[6].lat = 1; p[6].em_we = 1; p[6].em_b = 2;
    p[7]  = nop_instr(8); p[7].mul = 1; p[7].em_b = 2;
    p[10] = op(SRC_DZ, FN_ADD,  DST_QREG, DSEL_MULH, 0, 11); p[10].lat = 1;
    load_prog(5, p);
    // PE6: log term and likelihood
    for (int i = 0; i < 16; i++) p[i] = nop_instr(4'((i + 1) % 16));
    p[2]  = op(SRC_DZ, FN_ADD,  DST_QREG, DSEL_SYSBUS, 0, 3); p[2].lat = 1;
    p[3]  = nop_instr(4); p[3].bus_out = 1; p[3].lut_req = 1; p[3].lut_tbl = 1;
    p[4]  = op(SRC_DZ, FN_ADD,  DST_QREG, DSEL_SYSBUS, 0, 5);
    p[5]  = op(SRC_DQ, FN_ADD,  DST_QREG, DSEL_EMA, 0, 6); p[5].em_a = 0;
    p[8]  = op(SRC_DQ, FN_ADD,  DST_QREG, DSEL_SYSBUS, 0, 9);
    p[9]  = op(SRC_DQ, FN_SUBR, DST_QREG, DSEL_SYSBUS, 0, 10); p[9].cin = 1;
    p[11] = op(SRC_DQ, FN_SUBR, DST_QREG, DSEL_ABOVE, 0, 12); p[11].cin = 1; p[11].lat = 1;
    load_prog(6, p);
    hw(HT_EM, 6, 0, 64'(BSUM));
    // PE7: running best with index
    for (int i = 0; i < 16; i++) p[i] = nop_instr(4'((i + 1) % 16));
    p[11] = op(SRC_ZB, FN_ADD,  DST_RAMF, DSEL_SYSBUS, 1, 12); p[11].cin = 1; p[11].enable = 1;
    p[12] = op(SRC_DZ, FN_ADD,  DST_QREG, DSEL_ABOVE, 0, 13);
    p[13] = op(SRC_AQ, FN_SUBR, DST_NOP,  DSEL_SYSBUS, 2, 14); p[13].cin = 1; p[13].dis_neg = 1;
    p[14] = op(SRC_ZQ, FN_ADD,  DST_RAMF, DSEL_SYSBUS, 2, 15); p[14].lat = 1; p[14].emit = 1;
    p[15] = op(SRC_ZA, FN_ADD,  DST_NOP,  DSEL_SYSBUS, 1, 0);  p[15].lat = 1; p[15].emit = 1;
    load_prog(7, p);
    // working memory: table 1 and the plot stream
    for (int i = 0; i < 2048; i++) begin
      hw(HT_WM, 0, i, 64'(12'(t0(i))));
      hw(HT_WM, 0, 2048 + i, 64'(12'(t1(i))));
    end
    hw(HT_WM, 0, VADDR, 64'(VV));
    hw(HT_WM, 0, YADDR, 64'(YY));
    hw(HT_WM, 0, UADDR, 64'(UY));
    for (int s = 0; s < 16; s++) hw(HT_WMSCH, 0, s, 64'({WM_IDLE, 12'd0}));
    hw(HT_WMSCH, 0, 0, 64'({WM_RSEQ, 12'd0}));
    hw(HT_WMSCH, 0, 1, 64'({WM_RSEQ, 12'd0}));
    hw(HT_WMSCH, 0, 2, 64'({WM_RSEQ, 12'd0}));
    hw(HT_WMSCH, 0, 5, 64'({WM_RSEQ, 12'd0}));
    hw(HT_WMSCH, 0, 6, 64'({WM_READ, 12'(VADDR)}));
    hw(HT_WMSCH, 0, 14, 64'({WM_READ, 12'(YADDR)}));
    hw(HT_WMSCH, 0, 15, 64'({WM_READ, 12'(UADDR)}));
    hw(HT_WMPTR, 0, 0, 64'(STREAM));
    dterm = t1((((t0((((TT - VV) * ER2) >>> 12) & 2047) * ER3) >>> 12) + ER4) & 2047);
    cterm = ((YY - UY) * ER1) >>> 12;
    best = 0;
    for (int k = 0; k < NPLOT; k++) begin
      int x, u, g, w, d, q, l;
      x = $urandom_range(0, 1000); u = x + $urandom_range(0, 80) - 40;
      g = $urandom_range(0, 255); w = $urandom_range(0, 1023);
      d = x - u; q = (d * d * w) / 4096; l = BSUM + t1(g) - q + ((k == 0) ? t1(0) : dterm - cterm);
      lexp[k] = 12'(l);
      hw(HT_WM, 0, STREAM + 4 * k + 0, 64'(x));
      hw(HT_WM, 0, STREAM + 4 * k + 1, 64'(u));
      hw(HT_WM, 0, STREAM + 4 * k + 2, 64'(g));
      hw(HT_WM, 0, STREAM + 4 * k + 3, 64'(w));
      if (l >= best) begin best = l; pairs.push_back(12'(l)); pairs.push_back(12'(k + 1)); end
    end
    n_mcycles = 16'(NPLOT); start = 1; @(negedge clk); start = 0;
    wait (done); @(negedge clk);
    chk(n_l == NPLOT && steps == 16 * NPLOT, $sformatf("%0d likelihoods in %0d cycles", n_l, steps));
    chk(bot_count == 11'(pairs.size()), $sformatf("%0d words emitted, expected %0d", bot_count, pairs.size()));
    while (bot_count != 0) begin
      word_t e;
      e = (pairs.size() != 0) ? pairs.pop_front() : 12'hFFF;
      chk(bot_data == e, $sformatf("best-so-far word %0d expected %0d", bot_data, e));
      bot_pop = 1; @(negedge clk); bot_pop = 0;
    end
    chk(dut.g_pe[7].u_pe.u_alu.regs[2] == 12'(best), "best likelihood kept in PE7");
    chk(dterm > 100 && cterm > 10, $sformatf("track terms %0d %0d", dterm, cterm));
    chk(!bus_conflict && !wm_collision, "no bus conflict or collision");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
