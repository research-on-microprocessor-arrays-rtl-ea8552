// Gate association at full size: 1000 plots (one space dimension) go
// through the default 8-PE array. PE0..PE6 run a 4-microinstruction loop that
// passes each plot on, and PE7 runs the 4-microinstruction gate test:
// take the plot (re-enable), MAX - plot and plot - MIN with disable if
// negative, and emit the plot only if the PE is still enabled. The emitted
// plots must be exactly those inside [MIN, MAX], in order. The test also
// checks the rate: PE0 takes a new plot every 4 cycles, so the 1000 plots
// leave the top buffer in 4000 cycles.
module tb_gate_association;
  import macs_pkg::*;
  import macs_tb_pkg::*;

  localparam int NPLOT = 1000, MAXV = 900, MINV = 100;
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
  int steps = 0, last_pop = -1, pops = 0, bad_gap = 0, drained_at = -1;

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

  always @(posedge clk) if (dut.step) begin
    if (dut.rd_abv[0] && top_count != 0) begin
      if (last_pop >= 0 && steps - last_pop != 4) bad_gap++;
      last_pop = steps; pops++;
      if (top_count == 1) drained_at = steps + 1;
    end
    steps++;
  end

  task automatic hw(input host_tgt_e t, input int pe, input int a, input logic [63:0] d);
    host_we = 1; host_tgt = t; host_pe = 3'(pe); host_addr = 12'(a); host_wdata = d;
    @(negedge clk); host_we = 0;
  endtask

  uinstr_t p [16];

  initial begin
    word_t expv [$];
    repeat (3) @(negedge clk); rst_n = 1;
    for (int s = 0; s < 16; s++) hw(HT_WMSCH, 0, s, 64'({WM_IDLE, 12'd0}));
    for (int i = 0; i < 16; i++) p[i] = nop_instr(4'((i + 1) % 4));
    p[0] = op(SRC_DZ, FN_ADD, DST_QREG, DSEL_ABOVE, 0, 1); p[0].lat = 1; p[0].enable = 1;
    for (int k = 0; k < 7; k++) for (int i = 0; i < 16; i++) hw(HT_OPC, k, i, 64'(p[i]));
    for (int i = 0; i < 16; i++) p[i] = nop_instr(4'((i + 1) % 4));
    p[0] = op(SRC_DZ, FN_ADD, DST_QREG, DSEL_ABOVE, 0, 1); p[0].enable = 1;
    p[1] = op(SRC_DQ, FN_SUBS, DST_NOP, DSEL_EMA, 0, 2); p[1].cin = 1; p[1].em_a = 0; p[1].dis_neg = 1;
    p[2] = op(SRC_DQ, FN_SUBR, DST_NOP, DSEL_EMA, 0, 3); p[2].cin = 1; p[2].em_a = 1; p[2].dis_neg = 1;
    p[3] = op(SRC_ZQ, FN_ADD, DST_NOP, DSEL_SYSBUS, 0, 0); p[3].lat = 1; p[3].emit = 1;
    for (int i = 0; i < 16; i++) hw(HT_OPC, 7, i, 64'(p[i]));
    hw(HT_EM, 7, 0, MAXV);
    hw(HT_EM, 7, 1, MINV);
    for (int i = 0; i < NPLOT; i++) begin
      word_t x;
      x = 12'($urandom_range(0, 2600) - 1300);
      hw(HT_TOP, 0, 0, 64'(x));
      if ($signed(x) >= MINV && $signed(x) <= MAXV) expv.push_back(x);
    end
    chk(top_count == NPLOT, "plots loaded");
    n_mcycles = 16'(NPLOT * 4 / 16 + 3); start = 1; @(negedge clk); start = 0;
    wait (done); @(negedge clk);
    chk(pops == NPLOT && bad_gap == 0, $sformatf("one plot every 4 cycles (%0d taken, %0d bad gaps)", pops, bad_gap));
    chk(drained_at == 4 * (NPLOT - 1) + 1, $sformatf("top buffer empty after %0d cycles", drained_at));
    chk(bot_count == 11'(expv.size()), $sformatf("%0d plots in the gate, expected %0d", bot_count, expv.size()));
    while (bot_count != 0) begin
      word_t e;
      e = (expv.size() != 0) ? expv.pop_front() : 12'hFFF;
      chk(bot_data == e, $sformatf("plot %h expected %h", bot_data, e));
      bot_pop = 1; @(negedge clk); bot_pop = 0;
    end
    chk(!bus_conflict && !bot_overflow && !top_overflow, "no conflict or overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
