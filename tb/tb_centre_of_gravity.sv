// Partial-plot correlation: the centre of gravity R~ = sum(S_i R_i) / sum(S_i)
// of 8 partial plots, computed with no multiplier and no divider, only the
// shifts, adds and disable-if-negative of the PEs, on the default 8-PE array.
// Each plot enters the top buffer as an amplitude S (0..15) and a range R.
//   PE0: multiplies S*R by shift and add. ~S is rotated right one bit per
//        step; a negative result (bit of S clear) disables the add of the
//        shifted R for that bit.
//   PE1: accumulates sum(S R) and sum(S) (S one plot late, so both sums
//        cover the same plots) and outputs r = sum(S R), d = 16 sum(S), q = 0.
//   PE2..PE5: restoring division, two quotient bits each. Per bit:
//        Q <- r - d, disable if negative; r <- Q; q <- q OR bit; enable and
//        shift r left. Each passes r, d, q on to the next. Their 16-word
//        programs are rotated so that each starts when its inputs arrive.
//   PE6, PE7: pass q on; PE7 emits it.
// The quotient is q = floor(8 sum(S R) / sum(S)), 5 integer and 3 fraction
// bits, as the 8 quotient bits of the original routine. The running quotient
// over the plots so far comes out once per microcycle. The testbench checks
// each product, each quotient and the run length against a plain model.
module tb_centre_of_gravity;
  import macs_pkg::*;
  import macs_tb_pkg::*;

  localparam int K = 8, LAT = 3;
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
  int checks = 0, failures = 0, steps = 0, n_prod = 0;
  int s_v [K], r_v [K];

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

  // PE0's product for plot m is in its latch in slot 0 of microcycle m+1
  always @(negedge clk) if (dut.step) begin
    if (slot == 4'd0 && steps >= 16 && steps / 16 <= K) begin
      chk(dut.latch[0] == 12'(s_v[steps / 16 - 1] * r_v[steps / 16 - 1]),
          $sformatf("product %0d = %0d", steps / 16 - 1, dut.latch[0]));
      n_prod++;
    end
    steps++;
  end

  task automatic hw(input host_tgt_e t, input int pe, input int a, input logic [63:0] d);
    host_we = 1; host_tgt = t; host_pe = 3'(pe); host_addr = 12'(a); host_wdata = d;
    @(negedge clk); host_we = 0;
  endtask

  function automatic acram_t acw(int a, int b);
    acram_t w;
    w.link = 4'd0; w.a = 4'(a); w.b = 4'(b);
    return w;
  endfunction

  uinstr_t p [16];
  acram_t  ac [16];

  task automatic clear_prog();
    for (int i = 0; i < 16; i++) begin p[i] = nop_instr(4'((i + 1) % 16)); ac[i] = ac_word(i); end
  endtask

  task automatic load_prog(input int pe);
    for (int i = 0; i < 16; i++) begin
      p[i].next = 4'((i + 1) % 16);
      hw(HT_OPC, pe, i, 64'(p[i]));
      hw(HT_ACR, pe, i, 64'(ac[i]));
    end
  endtask

  // quotient model: restoring division with r < 2048 throughout
  function automatic int divide(int num, int den);
    int r, d, q;
    r = num; d = 16 * den; q = 0;
    for (int b = 7; b >= 0; b--) begin
      if (r - d >= 0) begin r = r - d; q = q | (1 << b); end
      r = (2 * r) % 4096;
    end
    return q;
  endfunction

  initial begin
    int sum_s, sum_sr, o, sl;
    repeat (3) @(negedge clk); rst_n = 1;
    // PE0: S * R by shift and add
    clear_prog();
    p[0] = op(SRC_DZ, FN_ADD, DST_QREG, DSEL_ABOVE, 0, 0); p[0].lat = 1;        // Q <- S, pass S
    p[1] = op(SRC_ZQ, FN_EXNOR, DST_RAMD, DSEL_SYSBUS, 1, 0); p[1].sh = SH_ROT;  // R1 <- rotr(~S)
    p[2] = op(SRC_DZ, FN_ADD, DST_RAMF, DSEL_ABOVE, 2, 0);                      // R2 <- R
    p[3] = op(SRC_ZQ, FN_AND, DST_RAMF, DSEL_SYSBUS, 4, 0);                     // R4 <- 0
    ac[5] = acw(2, 4);
    for (int b = 0; b < 4; b++) begin
      p[4 + 3 * b] = op(SRC_ZB, FN_ADD, DST_RAMD, DSEL_SYSBUS, 1, 0);          // test bit b, rotate
      p[4 + 3 * b].sh = SH_ROT; p[4 + 3 * b].dis_neg = 1;
      p[5 + 3 * b] = op(SRC_AB, FN_ADD, DST_RAMF, DSEL_SYSBUS, 5, 0);          // R4 += R2
      if (b < 3) begin
        p[6 + 3 * b] = op(SRC_ZB, FN_ADD, DST_RAMU, DSEL_SYSBUS, 2, 0);        // R2 <<= 1
        p[6 + 3 * b].enable = 1;
      end
    end
    p[15] = op(SRC_ZA, FN_ADD, DST_NOP, DSEL_SYSBUS, 4, 0); p[15].enable = 1; p[15].lat = 1;
    load_prog(0);
    // PE1: sums
    clear_prog();
    ac[6] = acw(5, 2); ac[7] = acw(2, 3);
    p[0] = op(SRC_DA, FN_ADD, DST_RAMF, DSEL_ABOVE, 1, 0);                      // R1 += S R
    p[1] = op(SRC_AB, FN_ADD, DST_RAMF, DSEL_SYSBUS, 6, 0);                     // R2 += R5
    p[2] = op(SRC_DZ, FN_ADD, DST_RAMF, DSEL_ABOVE, 5, 0);                      // R5 <- S
    p[3] = op(SRC_ZA, FN_ADD, DST_RAMU, DSEL_SYSBUS, 7, 0);                     // R3 <- 2 R2
    for (int i = 4; i < 6; i++) p[i] = op(SRC_ZB, FN_ADD, DST_RAMU, DSEL_SYSBUS, 3, 0);
    p[6] = op(SRC_ZB, FN_ADD, DST_RAMU, DSEL_SYSBUS, 3, 0);                     // R3 = 16 R2
    p[7] = op(SRC_ZA, FN_ADD, DST_NOP, DSEL_SYSBUS, 1, 0); p[7].lat = 1;        // r
    p[8] = op(SRC_ZA, FN_ADD, DST_NOP, DSEL_SYSBUS, 3, 0); p[8].lat = 1;        // d
    p[9] = op(SRC_ZQ, FN_AND, DST_NOP, DSEL_SYSBUS, 0, 0); p[9].lat = 1;        // q = 0
    load_prog(1);
    // PE2..PE5: two quotient bits each, the routine starting at slot o
    o = 8;
    for (int pe = 2; pe <= 5; pe++) begin
      clear_prog();
      ac[12] = acw(9, 11);
      p[(o + 0) % 16] = op(SRC_DZ, FN_ADD, DST_RAMF, DSEL_ABOVE, 9, 0);
      p[(o + 1) % 16] = op(SRC_DZ, FN_ADD, DST_RAMF, DSEL_ABOVE, 11, 0);
      p[(o + 2) % 16] = op(SRC_DZ, FN_ADD, DST_RAMF, DSEL_ABOVE, 13, 0);
      for (int b = 0; b < 2; b++) begin
        sl = o + 3 + 4 * b;
        p[sl % 16] = op(SRC_AB, FN_SUBS, DST_QREG, DSEL_SYSBUS, 12, 0);
        p[sl % 16].cin = 1; p[sl % 16].dis_neg = 1;
        p[(sl + 1) % 16] = op(SRC_ZQ, FN_ADD, DST_RAMF, DSEL_SYSBUS, 9, 0);
        p[(sl + 2) % 16] = op(SRC_DA, FN_OR, DST_RAMF, DSEL_EMA, 13, 0);
        p[(sl + 2) % 16].em_a = 4'(b);
        p[(sl + 3) % 16] = op(SRC_ZB, FN_ADD, DST_RAMU, DSEL_SYSBUS, 9, 0);
        p[(sl + 3) % 16].enable = 1;
      end
      p[(o + 11) % 16] = op(SRC_ZA, FN_ADD, DST_NOP, DSEL_SYSBUS, 9, 0);  p[(o + 11) % 16].lat = 1;
      p[(o + 12) % 16] = op(SRC_ZA, FN_ADD, DST_NOP, DSEL_SYSBUS, 11, 0); p[(o + 12) % 16].lat = 1;
      p[(o + 13) % 16] = op(SRC_ZA, FN_ADD, DST_NOP, DSEL_SYSBUS, 13, 0); p[(o + 13) % 16].lat = 1;
      load_prog(pe);
      hw(HT_EM, pe, 0, 64'(1 << (11 - 2 * pe)));
      hw(HT_EM, pe, 1, 64'(1 << (10 - 2 * pe)));
      o = (o + 12) % 16;
    end
    // PE6, PE7: pass q (latched by PE5 in slot o+1) on
    clear_prog();
    p[(o + 2) % 16] = op(SRC_DZ, FN_ADD, DST_QREG, DSEL_ABOVE, 0, 0); p[(o + 2) % 16].lat = 1;
    load_prog(6);
    clear_prog();
    p[(o + 3) % 16] = op(SRC_DZ, FN_ADD, DST_QREG, DSEL_ABOVE, 0, 0); p[(o + 3) % 16].lat = 1;
    p[(o + 3) % 16].emit = 1;
    load_prog(7);
    // the plots: S in 0..15 with sum(S) <= 60, R in 0..31
    sum_s = 0;
    for (int k = 0; k < K; k++) begin
      s_v[k] = (k == 0) ? 15 : $urandom_range(0, 15);
      if (sum_s + s_v[k] > 60) s_v[k] = 0;
      sum_s += s_v[k];
      r_v[k] = $urandom_range(0, 31);
      hw(HT_TOP, 0, 0, 64'(s_v[k]));
      hw(HT_TOP, 0, 0, 64'(r_v[k]));
    end
    n_mcycles = 16'(K + LAT + 1); start = 1; @(negedge clk); start = 0;
    wait (done); @(negedge clk);
    chk(n_prod == K && steps == 16 * (K + LAT + 1), $sformatf("%0d products in %0d cycles", n_prod, steps));
    chk(bot_count == 11'(K + LAT + 1), $sformatf("%0d quotients emitted", bot_count));
    chk(top_count == 0, "all plots taken from the top buffer");
    sum_s = 0; sum_sr = 0;
    for (int e = 0; e < K + LAT + 1; e++) begin
      if (e >= LAT) begin
        chk(bot_data == 12'(divide(sum_sr, sum_s)),
            $sformatf("quotient after %0d plots = %0d expected %0d (%0d / %0d)",
                      e - LAT, bot_data, divide(sum_sr, sum_s), sum_sr, sum_s));
        if (e - LAT < K) begin sum_s += s_v[e - LAT]; sum_sr += s_v[e - LAT] * r_v[e - LAT]; end
      end
      bot_pop = 1; @(negedge clk); bot_pop = 0;
    end
    $display("centre of gravity %0d / %0d = %0d / 8", sum_sr, sum_s, divide(sum_sr, sum_s));
    chk(!bus_conflict && !wm_collision, "no bus conflict");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
