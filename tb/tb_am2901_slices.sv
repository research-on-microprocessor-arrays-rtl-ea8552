// Self-checking test of the 12-bit ALU slice cascade. Random operations over
// all sources, functions, destinations and shift inputs are applied and Y, F,
// carry and sign are compared every cycle with a reference model kept in the
// testbench; register-file and Q state is compared indirectly through later
// reads. A few directed cases check known results first.
module tb_am2901_slices;
  import macs_pkg::*;

  logic clk = 0, rst_n = 0, we_en;
  logic [3:0] a_addr, b_addr;
  logic [11:0] d, y, f, q_out;
  alu_src_e src; alu_fn_e fn; alu_dst_e dst;
  logic cin, rmi, rli, qmi, qli, rlo, rmo, qlo, qmo, cout, ovr, fz, fn_neg;
  int checks = 0, failures = 0;

  am2901_slices dut (.clk, .rst_n, .we_en, .a_addr, .b_addr, .d, .src, .fn, .dst, .cin,
    .ram_msb_in(rmi), .ram_lsb_in(rli), .q_msb_in(qmi), .q_lsb_in(qli),
    .ram_lsb_out(rlo), .ram_msb_out(rmo), .q_lsb_out(qlo), .q_msb_out(qmo),
    .y, .f, .cout, .ovr, .f_zero(fz), .f_neg(fn_neg), .q_out);

  always #5 clk = ~clk;

  logic [11:0] m_regs [16];
  logic [11:0] m_q;

  function automatic void model(output logic [11:0] my, output logic [11:0] mf, output logic mc);
    logic [11:0] r, s, a, b;
    logic [12:0] t;
    a = m_regs[a_addr]; b = m_regs[b_addr];
    case (src)
      SRC_AQ: begin r = a; s = m_q; end
      SRC_AB: begin r = a; s = b; end
      SRC_ZQ: begin r = 0; s = m_q; end
      SRC_ZB: begin r = 0; s = b; end
      SRC_ZA: begin r = 0; s = a; end
      SRC_DA: begin r = d; s = a; end
      SRC_DQ: begin r = d; s = m_q; end
      default: begin r = d; s = 0; end
    endcase
    mc = 0;
    case (fn)
      FN_ADD:  begin t = r + s + cin; mf = t[11:0]; mc = t[12]; end
      FN_SUBR: begin t = {1'b0, s} + {1'b0, ~r} + cin; mf = t[11:0]; mc = t[12]; end
      FN_SUBS: begin t = {1'b0, r} + {1'b0, ~s} + cin; mf = t[11:0]; mc = t[12]; end
      FN_OR:   mf = r | s;
      FN_AND:  mf = r & s;
      FN_NOTRS:mf = ~r & s;
      FN_EXOR: mf = r ^ s;
      default: mf = ~(r ^ s);
    endcase
    my = (dst == DST_RAMA) ? a : mf;
  endfunction

  task automatic commit(input logic [11:0] mf);
    if (!we_en) return;
    case (dst)
      DST_QREG: m_q = mf;
      DST_RAMA, DST_RAMF: m_regs[b_addr] = mf;
      DST_RAMQD: begin m_regs[b_addr] = {rmi, mf[11:1]}; m_q = {qmi, m_q[11:1]}; end
      DST_RAMD: m_regs[b_addr] = {rmi, mf[11:1]};
      DST_RAMQU: begin m_regs[b_addr] = {mf[10:0], rli}; m_q = {m_q[10:0], qli}; end
      DST_RAMU: m_regs[b_addr] = {mf[10:0], rli};
      default: ;
    endcase
  endtask

  task automatic apply(input bit directed, input logic [11:0] exp_y);
    logic [11:0] my, mf; logic mc;
    #1;
    model(my, mf, mc);
    checks++;
    if (y !== my || f !== mf || fn_neg !== mf[11] || fz !== (mf == 0) ||
        ((fn <= FN_SUBS) && cout !== mc) || (directed && y !== exp_y)) begin
      failures++;
      $display("MISMATCH src=%0d fn=%0d dst=%0d y=%h exp %h f=%h exp %h", src, fn, dst, y, my, f, mf);
    end
    @(posedge clk);
    commit(mf);
    @(negedge clk);
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (m_regs[i]) m_regs[i] = 0;
    m_q = 0;
    we_en = 1; a_addr = 0; b_addr = 0; d = 0; src = SRC_DZ; fn = FN_ADD; dst = DST_NOP;
    cin = 0; rmi = 0; rli = 0; qmi = 0; qli = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // directed: R3 <- 100, Q <- 30, R3 - Q = 70, Q - R3 = -70, R3 / 2
    d = 12'd100; src = SRC_DZ; fn = FN_ADD; dst = DST_RAMF; b_addr = 3; apply(1, 12'd100);
    d = 12'd30;  dst = DST_QREG; apply(1, 12'd30);
    a_addr = 3; src = SRC_AQ; fn = FN_SUBS; cin = 1; dst = DST_NOP; apply(1, 12'd70);
    fn = FN_SUBR; apply(1, 12'hFBA);
    cin = 0; src = SRC_ZB; fn = FN_ADD; dst = DST_RAMD; b_addr = 3; apply(1, 12'd100);
    src = SRC_ZB; dst = DST_NOP; apply(1, 12'd50);
    src = SRC_ZA; a_addr = 3; dst = DST_RAMA; b_addr = 4; apply(1, 12'd50);
    // random
    repeat (4000) begin
      we_en  = ($urandom_range(0, 7) != 0);
      a_addr = 4'($urandom); b_addr = 4'($urandom); d = 12'($urandom);
      src = alu_src_e'($urandom_range(0, 7)); fn = alu_fn_e'($urandom_range(0, 7));
      dst = alu_dst_e'($urandom_range(0, 7)); cin = 1'($urandom);
      rmi = 1'($urandom); rli = 1'($urandom); qmi = 1'($urandom); qli = 1'($urandom);
      apply(0, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
