// Test of the address control memory: direct (MAR1) addressing returns the
// addressed word's A and B fields; implicit (MAR2) addressing with advance
// walks a linked chain 0->5->9->0, and without advance stays put; restart
// clears MAR2.
module tb_macs_addr_cram;
  import macs_pkg::*;
  logic clk = 0, rst_n = 0, ld_we = 0, implicit = 0, advance = 0, step = 0, restart = 0;
  logic [3:0] ld_addr = 0, ac_addr = 0, a_addr, b_addr, mar2;
  acram_t ld_data;
  int checks = 0, failures = 0;

  macs_addr_cram dut (.clk, .rst_n, .ld_we, .ld_addr, .ld_data, .ac_addr, .implicit, .advance,
                      .step, .restart, .a_addr, .b_addr, .mar2);
  always #5 clk = ~clk;

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  function automatic logic [3:0] lnk(int i);
    return (i == 0) ? 4'd5 : (i == 5) ? 4'd9 : 4'd0;
  endfunction

  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    ld_data = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 16; i++) begin
      ld_we = 1; ld_addr = 4'(i);
      ld_data.link = lnk(i); ld_data.a = 4'(i ^ 4'hA); ld_data.b = 4'(15 - i);
      @(negedge clk);
    end
    ld_we = 0;
    for (int i = 0; i < 16; i++) begin
      ac_addr = 4'(i); #1;
      chk(a_addr == 4'(i ^ 4'hA) && b_addr == 4'(15 - i), $sformatf("direct %0d", i));
    end
    @(negedge clk);
    implicit = 1; advance = 1; step = 1;
    for (int k = 0; k < 9; k++) begin
      logic [3:0] e;
      e = (k % 3 == 0) ? 4'd0 : (k % 3 == 1) ? 4'd5 : 4'd9;
      #1;
      chk(mar2 == e && a_addr == (e ^ 4'hA) && b_addr == 4'(15 - e), $sformatf("chain %0d mar2=%0d", k, mar2));
      @(negedge clk);
    end
    advance = 0; @(negedge clk); @(negedge clk);
    chk(mar2 == 0, "no advance holds");
    advance = 1; @(negedge clk);
    chk(mar2 == 5, "advance again");
    step = 0; @(negedge clk);
    chk(mar2 == 5, "no step holds");
    restart = 1; @(negedge clk); restart = 0;
    chk(mar2 == 0, "restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
