// Test of one processing element running a 16-slot microprogram that uses
// every part of it, repeated for 40 microcycles with random inputs:
//   s0  Q <- word from above (and re-enable), latch it        : buffer read
//   s1  R1 <- system bus; multiply external word 2 by latch    : multiplier
//   s2  R6 <- Q; s4 Q <- product low half; s5 R3 <- high half  : 2 wait cycles
//   s6  latch Q + R1; s7 put latch on the system bus, Q <- R6  : bus output
//   s8  latch register[MAR2] (old) and emit; s9 register[MAR2] <- Q and
//       advance MAR2                                           : implicit shift
//   s10 external word 3 <- latch; latch R3; s11 bus <- external word 3
//   s12 MAX - Q, s13 Q - MIN, disable if negative              : gating
//   s14 latch Q and emit (only in_gate the gate); s15 R5 <- R5+1 if enabled
// Expected values come from a model in the testbench: the 16-deep shift
// delay (8 words in R8..R15, the first word going to R0), the signed product, the gate test. The multiplier result is checked
// to be readable exactly in slot 4 (three slots after the start).
module tb_macs_pe;
  import macs_pkg::*;
  import macs_tb_pkg::*;
  logic clk = 0, rst_n = 0, step = 0, restart = 0;
  logic ld_opc_we = 0, ld_acr_we = 0, ld_em_we = 0;
  logic [3:0] ld_addr = 0, mar0;
  logic [UW-1:0] ld_data = 0;
  word_t above_in = 0, below_in = 0, sysbus_in = 0, latch_out;
  logic emit_out, above_rd, enabled, ev_disable, ev_mul, ev_implicit;
  bus_t bus_out;
  int checks = 0, failures = 0;
  localparam int MAXV = 1500, MINV = 500;

  macs_pe dut (.clk, .rst_n, .step, .restart, .ld_opc_we, .ld_acr_we, .ld_em_we, .ld_addr, .ld_data,
    .above_in, .below_in, .sysbus_in, .latch_out, .emit_out, .bus_out, .above_rd,
    .enabled, .ev_disable, .ev_mul, .ev_implicit, .mar0);
  always #5 clk = ~clk;

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s (slot %0d)", m, mar0); end
  endtask

  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  uinstr_t prog [16];
  word_t   coef;
  word_t   hist [$];
  int      in_gate_count = 0, disables = 0, implicit_steps = 0, muls = 0;

  task automatic load();
    for (int i = 0; i < 16; i++) prog[i] = nop_instr(4'((i + 1) % 16));
    prog[0]  = op(SRC_DZ, FN_ADD, DST_QREG, DSEL_ABOVE, 0, 1); prog[0].enable = 1; prog[0].lat = 1;
    prog[1]  = op(SRC_DZ, FN_ADD, DST_RAMF, DSEL_SYSBUS, 1, 2); prog[1].mul = 1; prog[1].em_b = 2;
    prog[2]  = op(SRC_ZQ, FN_ADD, DST_RAMF, DSEL_SYSBUS, 6, 3);                     // R6 <- Q
    prog[4]  = op(SRC_DZ, FN_ADD, DST_QREG, DSEL_MULL, 0, 5);
    prog[5]  = op(SRC_DZ, FN_ADD, DST_RAMF, DSEL_MULH, 3, 6);
    prog[6]  = op(SRC_AQ, FN_ADD, DST_NOP, DSEL_SYSBUS, 1, 7); prog[6].lat = 1;   // R1 + Q
    prog[7]  = op(SRC_ZA, FN_ADD, DST_QREG, DSEL_SYSBUS, 6, 8); prog[7].bus_out = 1; // Q <- R6
    prog[8]  = op(SRC_ZA, FN_ADD, DST_NOP, DSEL_SYSBUS, 0, 9); prog[8].implicit = 1; prog[8].lat = 1; prog[8].emit = 1;
    prog[9]  = op(SRC_ZQ, FN_ADD, DST_RAMF, DSEL_SYSBUS, 0, 10); prog[9].implicit = 1; prog[9].advance = 1;
    prog[10] = op(SRC_ZA, FN_ADD, DST_NOP, DSEL_SYSBUS, 3, 11); prog[10].em_we = 1; prog[10].em_b = 3; prog[10].lat = 1;
    prog[11] = nop_instr(12); prog[11].bus_out = 1; prog[11].bus_sel = 1; prog[11].em_b = 3;
    prog[12] = op(SRC_DQ, FN_SUBS, DST_NOP, DSEL_EMA, 0, 13); prog[12].cin = 1; prog[12].em_a = 0; prog[12].dis_neg = 1;
    prog[13] = op(SRC_DQ, FN_SUBR, DST_NOP, DSEL_EMA, 0, 14); prog[13].cin = 1; prog[13].em_a = 1; prog[13].dis_neg = 1;
    prog[14] = op(SRC_ZQ, FN_ADD, DST_NOP, DSEL_SYSBUS, 0, 15); prog[14].lat = 1; prog[14].emit = 1;
    prog[15] = op(SRC_ZB, FN_ADD, DST_RAMF, DSEL_SYSBUS, 5, 0); prog[15].cin = 1;
    for (int i = 0; i < 16; i++) begin
      ld_opc_we = 1; ld_addr = 4'(i); ld_data = UW'(prog[i]); @(negedge clk); ld_opc_we = 0;
      ld_acr_we = 1; ld_data = '0;
      ld_data[$bits(acram_t)-1:0] = ac_word(i);
      // implicit chain 0 -> 8 -> 9 -> ... -> 15 -> 8 : an 8-word shifter in R8..R15
      if (i == 0)  ld_data[$bits(acram_t)-1:$bits(acram_t)-4] = 4'd8;
      if (i == 15) ld_data[$bits(acram_t)-1:$bits(acram_t)-4] = 4'd8;
      @(negedge clk); ld_acr_we = 0;
    end
    coef = 12'($urandom_range(0, 4095));
    ld_em_we = 1;
    ld_addr = 0; ld_data = UW'(MAXV); @(negedge clk);
    ld_addr = 1; ld_data = UW'(MINV); @(negedge clk);
    ld_addr = 2; ld_data = UW'(coef); @(negedge clk);
    ld_em_we = 0;
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    load();
    restart = 1; @(negedge clk); restart = 0;
    for (int i = 0; i < 8; i++) hist.push_back(12'd0);
    step = 1;
    for (int m = 0; m < 40; m++) begin
      word_t x, s, old, pl;
      logic signed [23:0] p;
      bit in_gate;
      x = 12'($urandom_range(0, 3000) - 1000);
      s = 12'($urandom);
      p = $signed(coef) * $signed(x);
      if (m == 0) old = 0;
      else begin hist.push_back(x); old = hist.pop_front(); end
      in_gate = ($signed(x) <= MAXV) && ($signed(x) >= MINV);
      for (int k = 0; k < 16; k++) begin
        above_in  = (k == 0) ? x : 12'($urandom);
        sysbus_in = (k == 1) ? s : 12'($urandom);
        #1;
        chk(mar0 == 4'(k), "sequencing");
        chk(above_rd == (k == 0), "read from above only in slot 0");
        chk(bus_out.drv == (k == 7 || k == 11), "bus drive slots");
        if (k == 1) chk(latch_out == x, "latch after slot 0");
        if (k == 4) chk(dut.mul_l == p[11:0], "product readable in slot 4");
        if (k == 7) begin pl = 12'(p[11:0] + s); chk(bus_out.data == pl, "low product + bus word on bus"); end
        if (k == 9) chk(emit_out && latch_out == old, "shift register output");
        if (k == 11) begin
          chk(latch_out == p[23:12], "high product");
          chk(bus_out.data == old, "external memory word on bus");
        end
        if (k == 15) begin
          chk(emit_out == in_gate, "gate emit");
          chk(enabled == in_gate, "enable flag after gate tests");
          if (in_gate) chk(latch_out == x, "gated word");
        end
        if (k != 9 && k != 15) chk(!emit_out, "no stray emit");
        if (ev_disable) disables++;
        if (ev_implicit) implicit_steps++;
        if (ev_mul) muls++;
        @(negedge clk);
      end
      if (in_gate) in_gate_count++;
    end
    step = 0;
    chk(dut.u_alu.regs[5] == 12'(in_gate_count), "counter runs only while enabled");
    chk(disables > 0 && implicit_steps == 40 && muls == 40, "mechanism counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
