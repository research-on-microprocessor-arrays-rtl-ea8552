// MTI second-order filter spread over six PEs, one sample per microcycle:
//     Y  = X + a1 W1 + a2 W2,    W0 = X + b1 W1 + b2 W2,
//     then W2 <- W1, W1 <- W0 (both held in the working memory).
// Every sample passes through all six PEs within its own microcycle, one
// slot per hop, because the next sample needs this sample's W0:
//   PE0: W1 from the bus; a1*W1 (M); passes X; drives W1 back for W2.
//   PE1: W2 from the bus; a2*W2 (N); passes X and M.
//   PE2: Y = X + M + N; passes X on.
//   PE3: W1 from the bus; b1*W1 (M'); passes X; passes Y on.
//   PE4: W2 from the bus; b2*W2 (N'); passes X, M', Y.
//   PE5: W0 = X + M' + N', driven onto the bus; passes Y on.
//   PE6, PE7: pass Y; PE7 emits it to the bottom buffer.
// Working memory: slot 0 reads W1 (word 100), slot 1 reads W2 (word 101),
// slot 3 writes W2, slot 11 writes W1. Coefficients sit in external word 0
// of PE0, PE1, PE3, PE4; each product uses the high half, so a coefficient
// c stands for c / 4096. The testbench compares every Y and the final W1, W2
// with a model in the same 12-bit arithmetic.
module tb_mti_chain;
  import macs_pkg::*;
  import macs_tb_pkg::*;

  localparam int NS = 48;
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
  int checks = 0, failures = 0;

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

  task automatic hw(input host_tgt_e t, input int pe, input int a, input logic [63:0] d);
    host_we = 1; host_tgt = t; host_pe = 3'(pe); host_addr = 12'(a); host_wdata = d;
    @(negedge clk); host_we = 0;
  endtask

  function automatic int s12(int v);
    v = v & 12'hFFF;
    return (v >= 2048) ? v - 4096 : v;
  endfunction

  function automatic int hi(int c, int w);
    return (c * w) >>> 12;
  endfunction

  uinstr_t p [8][16];

  function automatic uinstr_t pass(int nxt);      // Q <- above, latch it
    uinstr_t u;
    u = op(SRC_DZ, FN_ADD, DST_QREG, DSEL_ABOVE, 0, 4'(nxt)); u.lat = 1;
    return u;
  endfunction

  function automatic uinstr_t getw(int nxt);      // latch the bus word
    uinstr_t u;
    u = op(SRC_DZ, FN_ADD, DST_NOP, DSEL_SYSBUS, 0, 4'(nxt)); u.lat = 1;
    return u;
  endfunction

  function automatic uinstr_t mulh(int nxt);      // latch the product's high half
    uinstr_t u;
    u = op(SRC_DZ, FN_ADD, DST_NOP, DSEL_MULH, 0, 4'(nxt)); u.lat = 1;
    return u;
  endfunction

  function automatic uinstr_t addab(int nxt, bit latch);  // Q <- Q + above
    uinstr_t u;
    u = op(SRC_DQ, FN_ADD, DST_QREG, DSEL_ABOVE, 0, 4'(nxt)); u.lat = latch;
    return u;
  endfunction

  initial begin
    int c [4], x [NS], w1, w2, w1_0, w2_0, y [NS], w0;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 8; k++) for (int i = 0; i < 16; i++) p[k][i] = nop_instr(4'((i + 1) % 16));
    // PE0
    p[0][0] = op(SRC_DZ, FN_ADD, DST_RAMF, DSEL_SYSBUS, 1, 1); p[0][0].lat = 1;   // R1 <- W1
    p[0][1] = op(SRC_DZ, FN_ADD, DST_QREG, DSEL_ABOVE, 0, 2); p[0][1].mul = 1;    // Q <- X; a1*W1
    p[0][2] = op(SRC_ZA, FN_ADD, DST_NOP, DSEL_SYSBUS, 1, 3); p[0][2].lat = 1;    // latch W1
    p[0][3] = op(SRC_ZQ, FN_ADD, DST_NOP, DSEL_SYSBUS, 0, 4); p[0][3].lat = 1;    // latch X
    p[0][3].bus_out = 1;                                                          // W1 -> W2 word
    p[0][4] = mulh(5);                                                            // M
    // PE1
    p[1][1] = getw(2);
    p[1][2].mul = 1;
    p[1][4] = pass(5); p[1][5] = pass(6); p[1][6] = mulh(7);                      // X, M, N
    // PE2
    p[2][5] = pass(6); p[2][6] = addab(7, 0); p[2][7] = addab(8, 1);              // X; Y
    // PE3
    p[3][0] = getw(1); p[3][1].mul = 1;
    p[3][6] = pass(7); p[3][7] = mulh(8);                                         // X, M'
    p[3][8] = op(SRC_DZ, FN_ADD, DST_RAMF, DSEL_ABOVE, 3, 9);                     // R3 <- Y
    p[3][9] = op(SRC_ZA, FN_ADD, DST_NOP, DSEL_SYSBUS, 3, 10); p[3][9].lat = 1;
    // PE4
    p[4][1] = getw(2); p[4][2].mul = 1;
    p[4][7] = pass(8); p[4][8] = pass(9); p[4][9] = mulh(10);                     // X, M', N'
    p[4][10] = op(SRC_DZ, FN_ADD, DST_RAMF, DSEL_ABOVE, 3, 11);
    p[4][11] = op(SRC_ZA, FN_ADD, DST_NOP, DSEL_SYSBUS, 3, 12); p[4][11].lat = 1;
    // PE5
    p[5][8] = op(SRC_DZ, FN_ADD, DST_QREG, DSEL_ABOVE, 0, 9);
    p[5][9] = addab(10, 0); p[5][10] = addab(11, 1);                              // W0
    p[5][11].bus_out = 1;
    p[5][12] = op(SRC_DZ, FN_ADD, DST_RAMF, DSEL_ABOVE, 3, 13);
    p[5][13] = op(SRC_ZA, FN_ADD, DST_NOP, DSEL_SYSBUS, 3, 14); p[5][13].lat = 1;
    // PE6, PE7
    p[6][14] = pass(15); p[7][15] = pass(0); p[7][15].emit = 1;
    for (int k = 0; k < 8; k++)
      for (int i = 0; i < 16; i++) begin
        hw(HT_OPC, k, i, 64'(p[k][i]));
        hw(HT_ACR, k, i, 64'(ac_word(i)));
      end
    // coefficients: a1, a2, b1, b2
    c[0] = 1200; c[1] = -700; c[2] = 1900; c[3] = -900;
    hw(HT_EM, 0, 0, 64'(12'(c[0]))); hw(HT_EM, 1, 0, 64'(12'(c[1])));
    hw(HT_EM, 3, 0, 64'(12'(c[2]))); hw(HT_EM, 4, 0, 64'(12'(c[3])));
    for (int s = 0; s < 16; s++) hw(HT_WMSCH, 0, s, 64'({WM_IDLE, 12'd0}));
    hw(HT_WMSCH, 0, 0,  64'({WM_READ,  12'd100}));
    hw(HT_WMSCH, 0, 1,  64'({WM_READ,  12'd101}));
    hw(HT_WMSCH, 0, 3,  64'({WM_WRITE, 12'd101}));
    hw(HT_WMSCH, 0, 11, 64'({WM_WRITE, 12'd100}));
    w1_0 = 37; w2_0 = -15;
    hw(HT_WM, 0, 100, 64'(12'(w1_0))); hw(HT_WM, 0, 101, 64'(12'(w2_0)));
    w1 = w1_0; w2 = w2_0;
    for (int k = 0; k < NS; k++) begin
      x[k] = $urandom_range(0, 400) - 200;
      hw(HT_TOP, 0, 0, 64'(12'(x[k])));
      y[k] = s12(x[k] + hi(c[0], w1) + hi(c[1], w2));
      w0   = s12(x[k] + hi(c[2], w1) + hi(c[3], w2));
      w2 = w1; w1 = w0;
    end
    n_mcycles = 16'(NS); start = 1; @(negedge clk); start = 0;
    // the word emitted in the last slot reaches the buffer a cycle after done
    wait (done); repeat (2) @(negedge clk);
    chk(bot_count == 11'(NS), $sformatf("%0d outputs", bot_count));
    for (int k = 0; k < NS; k++) begin
      chk(bot_data == 12'(y[k]), $sformatf("Y(%0d) = %0d expected %0d", k, s12(bot_data), y[k]));
      bot_pop = 1; @(negedge clk); bot_pop = 0;
    end
    host_rd_addr = 12'd100; @(negedge clk);
    chk(host_rd_data == 12'(w1), $sformatf("W1 = %0d expected %0d", s12(host_rd_data), w1));
    host_rd_addr = 12'd101; @(negedge clk);
    chk(host_rd_data == 12'(w2), $sformatf("W2 = %0d expected %0d", s12(host_rd_data), w2));
    chk(!bus_conflict && !wm_collision, "no bus conflict");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
