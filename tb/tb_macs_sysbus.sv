// Test of the system bus merge with 9 drivers: exactly one driver gives its
// word and lookup marker, no driver gives 0, and two drivers raise conflict
// (checked combinationally; the assertion is not clocked through a conflict).
module tb_macs_sysbus;
  import macs_pkg::*;
  localparam int N = 9;
  logic clk = 0;
  bus_t drv [N];
  word_t data;
  logic lut_req, lut_tbl, conflict;
  int checks = 0, failures = 0;

  macs_sysbus #(.NDRV(N)) dut (.clk, .rst_n(1'b1), .drv, .data, .lut_req, .lut_tbl, .conflict);

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  task automatic idle();
    for (int i = 0; i < N; i++) drv[i] = '0;
  endtask

  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    idle(); #1;
    chk(data == 0 && !conflict && !lut_req, "idle bus");
    repeat (500) begin
      int k; word_t w; bit r, t;
      k = $urandom_range(0, N-1); w = 12'($urandom); r = 1'($urandom); t = 1'($urandom);
      idle();
      drv[k].drv = 1; drv[k].data = w; drv[k].lut_req = r; drv[k].lut_tbl = r & t;
      #1;
      chk(data == w && lut_req == r && lut_tbl == (r & t) && !conflict, "single driver");
    end
    idle(); drv[2].drv = 1; drv[7].drv = 1; #1;
    chk(conflict, "two drivers flagged");
    idle(); #1;
    chk(!conflict, "cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
