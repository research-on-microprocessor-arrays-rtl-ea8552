// End-to-end test of the full array at its default size (8 PEs, 16-word
// external memories, 4096-word working memory, 1024-word buffers), in two
// operations loaded one after the other by the host.
//
// Operation 1, gate association on a stream of plots:
//   PE0 delays each plot by 16 microcycles through its register file
//   (implicit shifting), PE1 maps it through lookup table 0 of the working
//   memory, PE2..PE6 pass it on, and PE7 keeps only values inside the gate
//   [MIN, MAX] held in its external memory (two disable-if-negative tests),
//   emitting them into the bottom buffer.
// Operation 2, the second-order MTI filter
//   Y = X + a1 W1 + a2 W2, W0 = X + b1 W1 + b2 W2, W2' = W1, W1' = W0:
//   samples enter through the top buffer and pass PE0..PE6; PE7 gets W1 and
//   W2 from the working memory over the system bus, forms the four products
//   on the hardware multiplier, emits Y to the bottom buffer and sends the
//   new W1 and W2 back to the working memory; it also copies a constant from
//   its external memory to the working memory over the bus.
// Results are compared with a model in the testbench (12-bit wrap-around
// arithmetic). Each mechanism is counted and must occur: lookup, disable,
// implicit shift, multiplication, scheduled working-memory read and store,
// top-buffer read, bottom-buffer write, bus output from external memory and
// the program switch between the two operations. The run length of each
// operation (16 slots per microcycle) is checked as well.
module tb_macs_array;
  import macs_pkg::*;
  import macs_tb_pkg::*;

  localparam int N_PE = 8;
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
  logic [N_PE-1:0] pe_enabled;

  macs_array dut (.clk, .rst_n, .host_we, .host_tgt, .host_pe, .host_addr, .host_wdata,
    .host_rd_addr, .host_rd_data, .start, .n_mcycles, .busy, .done, .slot,
    .bot_pop, .bot_data, .bot_count, .bot_overflow, .top_count, .top_overflow,
    .bus_conflict, .wm_collision, .pe_enabled);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_lut = 0, n_dis = 0, n_impl = 0, n_mul = 0, n_wm_rd = 0, n_wm_wr = 0;
  int n_top = 0, n_bot = 0, n_em_bus = 0, n_switch = 0, n_conflict = 0, n_steps = 0;

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // event counters, sampled on the clock
  always @(posedge clk) if (rst_n) begin
    if (dut.step) n_steps++;
    if (dut.u_wm.lut_pend && dut.step) n_lut++;
    if (dut.g_pe[7].ev_disable) n_dis++;
    if (dut.g_pe[0].ev_implicit) n_impl++;
    if (dut.g_pe[7].ev_mul) n_mul++;
    if (dut.step && dut.u_wm.rd_en && !dut.u_wm.lut_pend) n_wm_rd++;
    if (dut.step && dut.u_wm.wr_en) n_wm_wr++;
    if (dut.rd_abv[0] && top_count != 0) n_top++;
    if (dut.emit[N_PE-1]) n_bot++;
    if (dut.drv[7].drv && dut.g_pe[7].u_pe.ui.bus_sel) n_em_bus++;
    if (bus_conflict) n_conflict++;
  end

  task automatic hw(input host_tgt_e t, input int pe, input int a, input logic [63:0] d);
    host_we = 1; host_tgt = t; host_pe = 3'(pe); host_addr = 12'(a); host_wdata = d;
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic load_prog(input int pe, input uinstr_t p [16]);
    for (int i = 0; i < 16; i++) begin
      hw(HT_OPC, pe, i, 64'(p[i]));
      hw(HT_ACR, pe, i, 64'(ac_word(i)));
    end
  endtask

  task automatic run(input int mc);
    int c0, cyc;
    c0 = n_steps; cyc = 0;
    n_mcycles = 16'(mc); start = 1; @(negedge clk); start = 0;
    while (!done && cyc < 100000) begin @(negedge clk); cyc++; end
    chk(done, "run finished");
    chk(n_steps - c0 == 16 * mc, $sformatf("ran %0d slots for %0d microcycles", n_steps - c0, mc));
    @(negedge clk);
  endtask

  function automatic uinstr_t pass_thru();
    uinstr_t u;
    u = op(SRC_DZ, FN_ADD, DST_QREG, DSEL_ABOVE, 0, 1); u.lat = 1; u.enable = 1;
    return u;
  endfunction

  function automatic word_t t0(int i);
    return 12'((i * 3 + 7) % 4096);
  endfunction

  uinstr_t p [16];

  initial begin
    word_t xs [$], expv [$];
    localparam int MAXV = 1800, MINV = 300, NPLOT = 64;
    repeat (3) @(negedge clk); rst_n = 1;

    // ---------------- operation 1: shifter, lookup, gate ----------------
    for (int i = 0; i < 2048; i++) hw(HT_WM, 0, i, 64'(t0(i)));
    for (int s = 0; s < 16; s++) hw(HT_WMSCH, 0, s, 64'({WM_IDLE, 12'd0}));
    // PE0: 16-word shifter
    for (int i = 0; i < 16; i++) p[i] = nop_instr(4'((i + 1) % 16));
    p[0] = op(SRC_DZ, FN_ADD, DST_QREG, DSEL_ABOVE, 0, 1); p[0].enable = 1;
    p[1] = op(SRC_ZA, FN_ADD, DST_NOP, DSEL_SYSBUS, 0, 2); p[1].implicit = 1; p[1].lat = 1;
    p[2] = op(SRC_ZQ, FN_ADD, DST_RAMF, DSEL_SYSBUS, 0, 3); p[2].implicit = 1; p[2].advance = 1;
    load_prog(0, p);
    // PE1: lookup through table 0
    for (int i = 0; i < 16; i++) p[i] = nop_instr(4'((i + 1) % 16));
    p[0] = pass_thru();
    p[1] = nop_instr(2); p[1].bus_out = 1; p[1].lut_req = 1; p[1].lut_tbl = 0;
    p[2] = op(SRC_DZ, FN_ADD, DST_QREG, DSEL_SYSBUS, 0, 3); p[2].lat = 1;
    load_prog(1, p);
    // PE2..PE6: pass on
    for (int i = 0; i < 16; i++) p[i] = nop_instr(4'((i + 1) % 16));
    p[0] = pass_thru();
    for (int k = 2; k <= 6; k++) load_prog(k, p);
    // PE7: gate association
    for (int i = 0; i < 16; i++) p[i] = nop_instr(4'((i + 1) % 16));
    p[0] = op(SRC_DZ, FN_ADD, DST_QREG, DSEL_ABOVE, 0, 1); p[0].enable = 1;
    p[1] = op(SRC_DQ, FN_SUBS, DST_NOP, DSEL_EMA, 0, 2); p[1].cin = 1; p[1].em_a = 0; p[1].dis_neg = 1;
    p[2] = op(SRC_DQ, FN_SUBR, DST_NOP, DSEL_EMA, 0, 3); p[2].cin = 1; p[2].em_a = 1; p[2].dis_neg = 1;
    p[3] = op(SRC_ZQ, FN_ADD, DST_NOP, DSEL_SYSBUS, 0, 4); p[3].lat = 1; p[3].emit = 1;
    load_prog(7, p);
    hw(HT_EM, 7, 0, MAXV);
    hw(HT_EM, 7, 1, MINV);
    for (int i = 0; i < NPLOT; i++) begin
      word_t x, v;
      x = 12'($urandom_range(1, 2047));
      xs.push_back(x);
      hw(HT_TOP, 0, 0, 64'(x));
      v = t0(int'(x));
      if ($signed(v) >= MINV && $signed(v) <= MAXV) expv.push_back(v);
    end
    chk(top_count == NPLOT, "top buffer loaded");
    run(NPLOT + 16 + N_PE + 4);
    chk(top_count == 0, "top buffer drained");
    chk(bot_count == 11'(expv.size()), $sformatf("gated plots %0d expected %0d", bot_count, expv.size()));
    while (bot_count != 0) begin
      word_t e;
      e = (expv.size() != 0) ? expv.pop_front() : 12'hFFF;
      chk(bot_data == e, $sformatf("gated plot %h expected %h", bot_data, e));
      bot_pop = 1; @(negedge clk); bot_pop = 0;
    end

    // ---------------- operation 2: MTI second-order filter ----------------
    n_switch++;
    begin
      word_t a1, a2, b1, b2, kc, w1, w2, x, y, w0;
      word_t xq [$];
      localparam int NS = 40;
      a1 = 12'($urandom); a2 = 12'($urandom); b1 = 12'($urandom); b2 = 12'($urandom);
      kc = 12'($urandom);
      for (int i = 0; i < 16; i++) p[i] = nop_instr(4'((i + 1) % 16));
      p[0] = pass_thru();
      for (int k = 0; k <= 6; k++) load_prog(k, p);
      for (int i = 0; i < 16; i++) p[i] = nop_instr(4'((i + 1) % 16));
      p[0]  = op(SRC_DZ, FN_ADD, DST_RAMF, DSEL_SYSBUS, 1, 1); p[0].lat = 1; p[0].enable = 1;
      p[1]  = op(SRC_DZ, FN_ADD, DST_RAMF, DSEL_SYSBUS, 2, 2); p[1].lat = 1; p[1].mul = 1; p[1].em_b = 0;
      p[2]  = op(SRC_ZA, FN_ADD, DST_NOP,  DSEL_SYSBUS, 1, 3); p[2].lat = 1; p[2].mul = 1; p[2].em_b = 1;
      p[3]  = op(SRC_ZA, FN_ADD, DST_NOP,  DSEL_SYSBUS, 2, 4); p[3].lat = 1; p[3].mul = 1; p[3].em_b = 2;
      p[3].bus_out = 1;
      p[4]  = op(SRC_DZ, FN_ADD, DST_QREG, DSEL_MULL, 0, 5); p[4].mul = 1; p[4].em_b = 3;
      p[5]  = op(SRC_DQ, FN_ADD, DST_QREG, DSEL_MULL, 0, 6);
      p[6]  = op(SRC_DZ, FN_ADD, DST_RAMF, DSEL_MULL, 4, 7);
      p[7]  = op(SRC_DA, FN_ADD, DST_RAMF, DSEL_MULL, 4, 8);
      p[8]  = op(SRC_DQ, FN_ADD, DST_QREG, DSEL_ABOVE, 0, 9); p[8].lat = 1; p[8].emit = 1;
      p[9]  = op(SRC_DA, FN_ADD, DST_QREG, DSEL_ABOVE, 4, 10); p[9].lat = 1;
      p[10] = nop_instr(11); p[10].bus_out = 1;
      p[11] = nop_instr(12); p[11].bus_out = 1; p[11].bus_sel = 1; p[11].em_b = 4;
      load_prog(7, p);
      hw(HT_EM, 7, 0, 64'(a1)); hw(HT_EM, 7, 1, 64'(a2));
      hw(HT_EM, 7, 2, 64'(b1)); hw(HT_EM, 7, 3, 64'(b2)); hw(HT_EM, 7, 4, 64'(kc));
      hw(HT_WM, 0, 100, 0); hw(HT_WM, 0, 101, 0); hw(HT_WM, 0, 102, 0);
      for (int s = 0; s < 16; s++) hw(HT_WMSCH, 0, s, 64'({WM_IDLE, 12'd0}));
      hw(HT_WMSCH, 0, 0,  64'({WM_READ,  12'd100}));
      hw(HT_WMSCH, 0, 1,  64'({WM_READ,  12'd101}));
      hw(HT_WMSCH, 0, 3,  64'({WM_WRITE, 12'd101}));
      hw(HT_WMSCH, 0, 10, 64'({WM_WRITE, 12'd100}));
      hw(HT_WMSCH, 0, 11, 64'({WM_WRITE, 12'd102}));
      for (int i = 0; i < NS; i++) begin
        x = 12'($urandom);
        hw(HT_TOP, 0, 0, 64'(x));
      end
      // samples reach PE7 six microcycles after PE0 takes them; before that
      // PE7 sees the words still held in the latches of PE5..PE0
      for (int i = 0; i < 6; i++) xq.push_back(dut.latch[5 - i]);
      for (int i = 0; i < NS - 6; i++) xq.push_back(dut.u_top.mem[(NPLOT + i) % 1024]);
      run(NS);
      chk(bot_count == NS, $sformatf("filter outputs %0d", bot_count));
      w1 = 0; w2 = 0;
      for (int m = 0; m < NS; m++) begin
        x  = xq.pop_front();
        y  = x + a1 * w1 + a2 * w2;
        w0 = x + b1 * w1 + b2 * w2;
        w2 = w1; w1 = w0;
        chk(bot_data == y, $sformatf("Y(%0d) = %h expected %h", m, bot_data, y));
        bot_pop = 1; @(negedge clk); bot_pop = 0;
      end
      host_rd_addr = 100; #1; chk(host_rd_data == w1, "final W1 in working memory");
      host_rd_addr = 101; #1; chk(host_rd_data == w2, "final W2 in working memory");
      host_rd_addr = 102; #1; chk(host_rd_data == kc, "external-memory word stored over the bus");
    end

    // ---------------- mechanisms ----------------
    chk(n_lut > 0,     $sformatf("lookups %0d", n_lut));
    chk(n_dis > 0,     $sformatf("disables %0d", n_dis));
    chk(n_impl > 0,    $sformatf("implicit shifts %0d", n_impl));
    chk(n_mul > 0,     $sformatf("multiplications %0d", n_mul));
    chk(n_wm_rd > 0,   $sformatf("working-memory reads %0d", n_wm_rd));
    chk(n_wm_wr > 0,   $sformatf("working-memory stores %0d", n_wm_wr));
    chk(n_top == NPLOT + 40, $sformatf("top-buffer reads %0d", n_top));
    chk(n_bot > 0,     $sformatf("bottom-buffer writes %0d", n_bot));
    chk(n_em_bus > 0,  $sformatf("external memory to bus %0d", n_em_bus));
    chk(n_switch > 0,  "program switch");
    chk(n_conflict == 0 && !bot_overflow && !top_overflow, "no bus conflict or overflow");
    $display("mechanisms: lookup=%0d disable=%0d implicit=%0d mul=%0d wm_rd=%0d wm_wr=%0d top=%0d bot=%0d em_bus=%0d switch=%0d",
             n_lut, n_dis, n_impl, n_mul, n_wm_rd, n_wm_wr, n_top, n_bot, n_em_bus, n_switch);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
