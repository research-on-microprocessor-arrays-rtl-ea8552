// Test of the array controller: a run of 3 microcycles must give one restart
// cycle, then exactly 48 stepped cycles with slot counting 0..15 three times,
// then done; a run of 0 microcycles steps nothing.
module tb_macs_ctrl;
  import macs_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, step, restart, busy, done;
  logic [15:0] n_mcycles = 0, mcycle;
  logic [3:0] slot;
  int checks = 0, failures = 0;

  macs_ctrl dut (.clk, .rst_n, .start, .n_mcycles, .step, .restart, .slot, .mcycle, .busy, .done);
  always #5 clk = ~clk;

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic run(input int n);
    int steps, restarts, cyc;
    steps = 0; restarts = 0; cyc = 0;
    n_mcycles = 16'(n); start = 1; @(negedge clk); start = 0;
    while (!done && cyc < 2000) begin
      if (restart) restarts++;
      if (step) begin
        chk(slot == 4'(steps % 16), $sformatf("slot %0d at step %0d", slot, steps));
        steps++;
      end
      @(negedge clk); cyc++;
    end
    chk(restarts == 1, "one restart");
    chk(steps == 16 * n, $sformatf("steps %0d for %0d microcycles", steps, n));
    chk(done && !step, "done");
    @(negedge clk);
    chk(!busy, "idle again");
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    chk(!busy && !step, "idle at reset");
    run(3);
    run(0);
    run(1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
