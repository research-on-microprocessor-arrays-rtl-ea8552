// Real-valued 16-point pipeline FFT, one stage per PE, one sample per
// microcycle, on the default 8-PE array. As in the original analysis, the
// data and the rotation factors are real, so each stage computes the
// butterfly x' = x + yW, y' = x - yW in real arithmetic.
// PE0..PE3 pass the input stream from the top buffer along (one microcycle
// each). PE4..PE7 are the four stages and run the same routine; they differ
// only in their delay length D = 8, 4, 2, 1 (an implicit-shift chain of D
// registers), the constants D and 2D-1 in their external memory, and the
// slot in which each takes its rotation factor from the system bus.
// Per microcycle a stage with counter c (R8, counting modulo 2D):
//   always:  output last microcycle's result; Q <- input y;
//            W from the bus -> external word 2; start y*W; result <- head
//            of the delay chain;
//   c >= D:  result <- head + yW; Q <- head - yW (disabled when c < D);
//   always:  push Q into the delay chain; c <- (c + 1) AND (2D - 1).
// So during the first half of each 2D block the stage fills its delay line
// and sends out what it held, and during the second half it does the
// butterflies. The product's low half is used, so W is a small integer
// (2 cos(pi z / 8) rounded). The working memory streams one factor per
// stage per microcycle. The testbench holds a microcycle-level model of the
// whole chain in 12-bit arithmetic and compares every word PE7 emits.
module tb_fft16;
  import macs_pkg::*;
  import macs_tb_pkg::*;

  localparam int NBLK = 3, NSAMP = 16 * NBLK, NMC = NSAMP + 24;
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
  int checks = 0, failures = 0, n_butterfly = 0;

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

  // butterflies actually executed: a stage PE enabled in slot 11
  always @(negedge clk) if (dut.step && slot == 4'd11)
    for (int k = 4; k < 8; k++) if (dut.pe_enabled[k]) n_butterfly++;

  task automatic hw(input host_tgt_e t, input int pe, input int a, input logic [63:0] d);
    host_we = 1; host_tgt = t; host_pe = 3'(pe); host_addr = 12'(a); host_wdata = d;
    @(negedge clk); host_we = 0;
  endtask

  function automatic int wfac(int z);
    int tab [8] = '{2, 2, 1, 1, 0, -1, -1, -2};
    return tab[z % 8];
  endfunction

  // rotation factor for stage k (delay D) on sample n
  function automatic int wsel(int k, int n);
    int d, c;
    d = 8 >> k; c = n % (2 * d);
    return (c >= d) ? wfac((c - d) * (8 / d)) : 0;
  endfunction

  function automatic int s12(int v);
    v = v & 12'hFFF;
    return (v >= 2048) ? v - 4096 : v;
  endfunction

  uinstr_t p [16];

  initial begin
    int xin [NSAMP];
    int q [8], res [8], dl [4][8], ptr [4], expv [NMC];
    int y, hd, t, d, n_bf;
    repeat (3) @(negedge clk); rst_n = 1;
    // pass-through PEs
    for (int i = 0; i < 16; i++) p[i] = nop_instr(4'((i + 1) % 16));
    p[0] = op(SRC_ZQ, FN_ADD, DST_NOP,  DSEL_SYSBUS, 0, 1); p[0].lat = 1;
    p[1] = op(SRC_DZ, FN_ADD, DST_QREG, DSEL_ABOVE,  0, 2);
    for (int k = 0; k < 4; k++)
      for (int i = 0; i < 16; i++) begin hw(HT_OPC, k, i, 64'(p[i])); hw(HT_ACR, k, i, 64'(ac_word(i))); end
    // FFT stages
    for (int k = 0; k < 4; k++) begin
      acram_t w;
      d = 8 >> k;
      for (int i = 0; i < 16; i++) p[i] = nop_instr(4'((i + 1) % 16));
      p[0]  = op(SRC_DZ, FN_ADD,  DST_NOP,  DSEL_EMA,    0, 1); p[0].em_a = 3; p[0].lat = 1; p[0].enable = 1;
      p[0].emit = (k == 3);
      p[1]  = op(SRC_DZ, FN_ADD,  DST_QREG, DSEL_ABOVE,  0, 2);
      p[2 + k] = op(SRC_DZ, FN_ADD, DST_NOP, DSEL_SYSBUS, 0, 4'(3 + k)); p[2 + k].lat = 1;
      p[3 + k].em_we = 1; p[3 + k].em_b = 2;
      p[7]  = op(SRC_ZQ, FN_ADD,  DST_NOP,  DSEL_SYSBUS, 0, 8); p[7].lat = 1;
      p[8]  = op(SRC_ZA, FN_ADD,  DST_NOP,  DSEL_SYSBUS, 0, 9); p[8].implicit = 1; p[8].lat = 1;
      p[8].mul = 1; p[8].em_b = 2;
      p[9]  = nop_instr(10); p[9].em_we = 1; p[9].em_b = 3;
      p[10] = op(SRC_DA, FN_SUBR, DST_NOP,  DSEL_EMA,    8, 11); p[10].em_a = 0; p[10].cin = 1; p[10].dis_neg = 1;
      p[11] = op(SRC_DA, FN_ADD,  DST_NOP,  DSEL_MULL,   0, 12); p[11].implicit = 1; p[11].lat = 1;
      p[12] = op(SRC_DA, FN_SUBR, DST_QREG, DSEL_MULL,   0, 13); p[12].implicit = 1; p[12].cin = 1;
      p[12].em_we = 1; p[12].em_b = 3;
      p[13] = op(SRC_ZQ, FN_ADD,  DST_RAMF, DSEL_SYSBUS, 0, 14); p[13].implicit = 1; p[13].advance = 1;
      p[13].enable = 1;
      p[14] = op(SRC_ZB, FN_ADD,  DST_RAMF, DSEL_SYSBUS, 8, 15); p[14].cin = 1;
      p[15] = op(SRC_DA, FN_AND,  DST_RAMF, DSEL_EMA,    8, 0);  p[15].em_a = 1;
      for (int i = 0; i < 16; i++) begin
        w = ac_word(i);
        if (i < 8) begin w.link = 4'((i + 1) % d); w.a = 4'(i); w.b = 4'(i); end
        hw(HT_OPC, 4 + k, i, 64'(p[i]));
        hw(HT_ACR, 4 + k, i, 64'(w));
      end
      hw(HT_EM, 4 + k, 0, 64'(d));
      hw(HT_EM, 4 + k, 1, 64'(2 * d - 1));
    end
    // rotation factors: stage k takes stream word 4n + k in slot 2 + k
    for (int s = 0; s < 16; s++) hw(HT_WMSCH, 0, s, 64'({WM_IDLE, 12'd0}));
    for (int k = 0; k < 4; k++) hw(HT_WMSCH, 0, 2 + k, 64'({WM_RSEQ, 12'd0}));
    hw(HT_WMPTR, 0, 0, 64'(0));
    for (int n = 0; n < NMC; n++)
      for (int k = 0; k < 4; k++) hw(HT_WM, 0, 4 * n + k, 64'(12'(wsel(k, n - 4 - k))));
    for (int n = 0; n < NSAMP; n++) begin
      xin[n] = $urandom_range(0, 40) - 20;
      hw(HT_TOP, 0, 0, 64'(12'(xin[n])));
    end
    // model: q = Q of each PE, res = external word 3 of the stages
    for (int i = 0; i < 8; i++) begin q[i] = 0; res[i] = 0; end
    for (int k = 0; k < 4; k++) begin ptr[k] = 0; for (int i = 0; i < 8; i++) dl[k][i] = 0; end
    n_bf = 0;
    for (int n = 0; n < NMC; n++) begin
      int lat [8];
      expv[n] = res[7];
      for (int i = 0; i < 8; i++) lat[i] = (i < 4) ? q[i] : res[i];
      for (int i = 0; i < 8; i++) begin
        y = (i == 0) ? ((n < NSAMP) ? xin[n] : 0) : lat[i - 1];
        if (i < 4) q[i] = y;
        else begin
          int k;
          k = i - 4; d = 8 >> k;
          hd = dl[k][ptr[k]];
          t = s12(y * wsel(k, n - 4 - k));
          if ((n % (2 * d)) < d) begin res[i] = hd; dl[k][ptr[k]] = y; end
          else begin res[i] = s12(hd + t); n_bf++; dl[k][ptr[k]] = s12(hd - t); end
          ptr[k] = (ptr[k] + 1) % d;
        end
      end
    end
    d = 0;
    for (int n = 0; n < NMC; n++) if (expv[n] != 0) d++;
    chk(d > NSAMP / 2, $sformatf("only %0d non-zero outputs", d));
    n_mcycles = 16'(NMC); start = 1; @(negedge clk); start = 0;
    wait (done); @(negedge clk);
    chk(bot_count == 11'(NMC), $sformatf("%0d words emitted", bot_count));
    chk(n_butterfly == n_bf && n_bf > 100, $sformatf("%0d butterflies", n_butterfly));
    for (int n = 0; n < NMC; n++) begin
      chk(bot_data == 12'(expv[n]), $sformatf("output %0d = %0d expected %0d", n, s12(bot_data), expv[n]));
      bot_pop = 1; @(negedge clk); bot_pop = 0;
    end
    chk(!bus_conflict && !wm_collision, "no bus conflict");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
