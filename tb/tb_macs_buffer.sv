// Test of the FIFO used as top and bottom buffer, at a reduced depth of 8:
// random push/pop traffic against a queue model, reads of an empty buffer
// (0), simultaneous push and pop when full, overflow flag and clear.
module tb_macs_buffer;
  import macs_pkg::*;
  localparam int D = 8;
  logic clk = 0, rst_n = 0, clear = 0, push = 0, pop = 0, empty, full, overflow;
  word_t wr_data = 0, rd_data;
  logic [3:0] count;
  word_t q [$];
  int checks = 0, failures = 0;
  bit ovf_seen = 0;

  macs_buffer #(.DEPTH(D)) dut (.clk, .rst_n, .clear, .push, .wr_data, .pop, .rd_data, .empty, .full, .overflow, .count);
  always #5 clk = ~clk;

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    chk(empty && rd_data == 0 && count == 0, "empty after reset");
    repeat (3000) begin
      push = ($urandom_range(0, 99) < 55); pop = ($urandom_range(0, 99) < 45); wr_data = 12'($urandom);
      #1;
      chk(count == 4'(q.size()) && empty == (q.size() == 0) && full == (q.size() == D), "count/flags");
      chk(rd_data == ((q.size() == 0) ? 12'd0 : q[0]), "head");
      @(posedge clk);
      begin
        bit dp, dq;
        dp = pop && q.size() > 0;
        dq = push && (q.size() < D || dp);
        if (push && !dq) ovf_seen = 1;
        if (dp) void'(q.pop_front());
        if (dq) q.push_back(wr_data);
      end
      @(negedge clk);
      chk(overflow == ovf_seen, "overflow flag");
    end
    push = 0; pop = 0;
    clear = 1; @(negedge clk); clear = 0; q.delete(); ovf_seen = 0;
    chk(empty && !overflow && count == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
