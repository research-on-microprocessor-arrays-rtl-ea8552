// Test of the two-port external memory: random writes through port B with
// random reads on both ports, compared with a model; also checks that a read
// in the writing cycle sees the old word and that reset clears it.
module tb_macs_ext_mem;
  import macs_pkg::*;
  logic clk = 0, rst_n = 0, we_b = 0;
  logic [3:0] addr_a = 0, addr_b = 0;
  word_t wdata_b = 0, ya, yb;
  word_t model [16];
  int checks = 0, failures = 0;

  macs_ext_mem dut (.clk, .rst_n, .addr_a, .addr_b, .we_b, .wdata_b, .ya, .yb);
  always #5 clk = ~clk;

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    foreach (model[i]) model[i] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 16; i++) begin addr_a = 4'(i); addr_b = 4'(15 - i); #1; chk(ya == 0 && yb == 0, "reset clear"); end
    repeat (2000) begin
      addr_a = 4'($urandom); addr_b = 4'($urandom); we_b = 1'($urandom); wdata_b = 12'($urandom);
      #1;
      chk(ya == model[addr_a] && yb == model[addr_b], "read");
      @(posedge clk);
      if (we_b) model[addr_b] = wdata_b;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
