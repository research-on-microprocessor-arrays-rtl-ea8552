// Test of the hardware multiplier: isolated and back-to-back signed products,
// checking H and L against the 24-bit product and that a result first appears
// three cycles after the start (two wait cycles) and then holds.
module tb_macs_hw_mult;
  import macs_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done;
  word_t x = 0, y = 0, h, l;
  int checks = 0, failures = 0;
  logic signed [23:0] exp_p [$];

  macs_hw_mult dut (.clk, .rst_n, .start, .x, .y, .h, .l, .done);
  always #5 clk = ~clk;

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // isolated: start in cycle 0, not readable in cycles 1,2, readable in 3
  task automatic single(input logic [11:0] a, input logic [11:0] b);
    logic signed [23:0] p;
    word_t h0, l0;
    p = $signed(a) * $signed(b);
    h0 = h; l0 = l;
    x = a; y = b; start = 1; @(negedge clk); start = 0; x = 0; y = 0;
    chk(h == h0 && l == l0 && !done, "cycle 1 unchanged");
    @(negedge clk);
    chk(h == h0 && l == l0 && !done, "cycle 2 unchanged");
    @(negedge clk);
    chk({h, l} == p && done, $sformatf("cycle 3 result %h%h exp %h", h, l, p));
    @(negedge clk); @(negedge clk);
    chk({h, l} == p && !done, "holds");
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    single(12'd3, 12'd5);
    single(12'hFFF, 12'd7);          // -1 * 7
    single(12'h800, 12'h800);        // -2048 * -2048
    single(12'd2047, 12'hFFE);
    repeat (200) single(12'($urandom), 12'($urandom));
    // back to back
    for (int k = 0; k < 40; k++) begin
      logic signed [23:0] pp;
      x = 12'($urandom); y = 12'($urandom); start = 1;
      pp = $signed(x) * $signed(y);
      exp_p.push_back(pp);
      @(negedge clk);
      if (k >= 2) begin
        logic signed [23:0] e; e = exp_p.pop_front();
        chk({h, l} == e, "pipelined");
      end
    end
    start = 0;
    @(negedge clk); begin logic signed [23:0] e; e = exp_p.pop_front(); chk({h, l} == e, "drain1"); end
    @(negedge clk); begin logic signed [23:0] e; e = exp_p.pop_front(); chk({h, l} == e, "drain2"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
