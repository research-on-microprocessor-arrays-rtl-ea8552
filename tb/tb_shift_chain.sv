// A delay line longer than one PE's 16 registers, made by chaining PEs that
// each shift implicitly: PE0..PE6 each delay the stream by 16 microcycles,
// so a sample entering PE0 from the top buffer leaves PE7 112 microcycles
// later, into the bottom buffer. Each shifter runs the same three words, two
// slots after the PE above (so it reads that PE's latch the slot after it
// was loaded):
//   Q <- above;  latch register[MAR2] (the oldest word);  write Q to
//   register[MAR2] and advance MAR2 along the 16-word link ring.
// PE7 only passes the word on and marks it for the bottom buffer. The
// registers start at zero, so the first 112 outputs are zero; the testbench
// checks every output and that MAR2 of each shifter has gone round.
module tb_shift_chain;
  import macs_pkg::*;
  import macs_tb_pkg::*;

  localparam int NSH = 7, NS = 160, NMC = NS + 16 * NSH;
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

  uinstr_t p [16];
  int n_impl_pe [NSH];
  logic [3:0] mar2_pe [NSH];

  for (genvar g = 0; g < NSH; g++) begin : g_mon
    initial n_impl_pe[g] = 0;
    always @(negedge clk) if (dut.g_pe[g].ev_implicit) n_impl_pe[g]++;
    assign mar2_pe[g] = dut.g_pe[g].u_pe.mar2;
  end

  initial begin
    word_t x [NS];
    int n_impl;
    repeat (3) @(negedge clk); rst_n = 1;
    for (int k = 0; k < 8; k++) begin
      for (int i = 0; i < 16; i++) p[i] = nop_instr(4'((i + 1) % 16));
      if (k < NSH) begin
        p[2 * k]     = op(SRC_DZ, FN_ADD, DST_QREG, DSEL_ABOVE, 0, 0);
        p[2 * k + 1] = op(SRC_ZA, FN_ADD, DST_NOP,  DSEL_SYSBUS, 0, 0);
        p[2 * k + 1].implicit = 1; p[2 * k + 1].lat = 1;
        p[2 * k + 2] = op(SRC_ZQ, FN_ADD, DST_RAMF, DSEL_SYSBUS, 0, 0);
        p[2 * k + 2].implicit = 1; p[2 * k + 2].advance = 1;
      end else begin
        p[2 * k] = op(SRC_DZ, FN_ADD, DST_QREG, DSEL_ABOVE, 0, 0);
        p[2 * k].lat = 1; p[2 * k].emit = 1;
      end
      for (int i = 0; i < 16; i++) begin
        p[i].next = 4'((i + 1) % 16);
        hw(HT_OPC, k, i, 64'(p[i]));
        hw(HT_ACR, k, i, 64'(ac_word(i)));
      end
    end
    for (int s = 0; s < 16; s++) hw(HT_WMSCH, 0, s, 64'({WM_IDLE, 12'd0}));
    for (int n = 0; n < NS; n++) begin
      x[n] = 12'($urandom_range(1, 4095));
      hw(HT_TOP, 0, 0, 64'(x[n]));
    end
    n_mcycles = 16'(NMC); start = 1; @(negedge clk); start = 0;
    wait (done); repeat (2) @(negedge clk);
    n_impl = 0;
    for (int k = 0; k < NSH; k++) n_impl += n_impl_pe[k];
    chk(bot_count == 11'(NMC), $sformatf("%0d outputs", bot_count));
    chk(n_impl == NSH * NMC, $sformatf("%0d MAR2 advances", n_impl));
    for (int m = 0; m < NMC; m++) begin
      word_t e;
      e = (m >= 16 * NSH) ? x[m - 16 * NSH] : 12'd0;
      chk(bot_data == e, $sformatf("output %0d = %0d expected %0d", m, bot_data, e));
      bot_pop = 1; @(negedge clk); bot_pop = 0;
    end
    for (int k = 0; k < NSH; k++)
      chk(mar2_pe[k] == 4'(NMC % 16), $sformatf("PE%0d MAR2 = %0d", k, mar2_pe[k]));
    chk(!bus_conflict && !wm_collision, "no bus conflict");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
