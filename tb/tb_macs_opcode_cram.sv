// Test of the opcode control memory: loads a routine whose next-address
// fields form the chain 0->3->1->2->0 (plus 4..15 pointing to 0), steps it and
// checks MAR0 and the word read at every step, the effect of step = 0
// (hold) and of restart.
module tb_macs_opcode_cram;
  import macs_pkg::*;
  logic clk = 0, rst_n = 0, ld_we = 0, restart = 0, step = 0;
  logic [3:0] ld_addr = 0, mar0;
  uinstr_t ld_data, instr;
  int checks = 0, failures = 0;
  logic [3:0] nxt [16];

  macs_opcode_cram dut (.clk, .rst_n, .ld_we, .ld_addr, .ld_data, .restart, .step, .instr, .mar0);
  always #5 clk = ~clk;

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    ld_data = '0;
    foreach (nxt[i]) nxt[i] = 0;
    nxt[0] = 3; nxt[3] = 1; nxt[1] = 2; nxt[2] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      ld_we = 1; ld_addr = 4'(i);
      ld_data = nop_instr(nxt[i]);
      ld_data.em_a = 4'(15 - i);      // tag each word
      @(negedge clk);
    end
    ld_we = 0;
    chk(mar0 == 0, "reset MAR0");
    step = 1;
    for (int k = 0; k < 12; k++) begin
      logic [3:0] expa;
      case (k % 4) 0: expa = 0; 1: expa = 3; 2: expa = 1; default: expa = 2; endcase
      chk(mar0 == expa, $sformatf("step %0d mar0=%0d exp %0d", k, mar0, expa));
      chk(instr.em_a == 4'(15 - expa), "word contents");
      @(negedge clk);
    end
    // now at 0; step once -> 3, then hold
    @(negedge clk); step = 0;
    chk(mar0 == 3, "after 13 steps");
    repeat (3) @(negedge clk);
    chk(mar0 == 3, "hold when not stepping");
    restart = 1; @(negedge clk); restart = 0;
    chk(mar0 == 0, "restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
