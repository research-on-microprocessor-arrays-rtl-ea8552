// Test of the working memory. The testbench plays the PEs' part of the bus.
// Schedule: slot 0 reads word 10, slot 1 stores the bus word at 20, slot 2
// reads through the read pointer, slot 3 stores through the write pointer,
// slot 5 reads word 30. Lookups are requested in slot 4 (table 1, which
// collides with the slot-5 read and must win) and slot 7 (table 0). Over
// several microcycles it checks every word driven, every store (by host
// read-back), the pointer streams and the one-cycle lookup answer.
module tb_macs_working_mem;
  import macs_pkg::*;
  localparam int DEPTH = 4096;
  logic clk = 0, rst_n = 0, step = 0, restart = 0, lut_req_in = 0, lut_tbl_in = 0, collision;
  logic [3:0] slot = 0;
  word_t sysbus_in = 0, host_rd_data;
  bus_t bus_out;
  logic ld_wm_we = 0, ld_sch_we = 0, ld_ptr_we = 0;
  logic [11:0] ld_addr = 0, host_rd_addr = 0;
  logic [15:0] ld_data = 0;
  word_t model [DEPTH];
  int checks = 0, failures = 0, lut_answers = 0, collisions = 0;

  macs_working_mem #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .step, .restart, .slot, .sysbus_in, .lut_req_in,
    .lut_tbl_in, .bus_out, .collision, .ld_wm_we, .ld_sch_we, .ld_ptr_we, .ld_addr, .ld_data,
    .host_rd_addr, .host_rd_data);
  always #5 clk = ~clk;

  task automatic chk(input bit c, input string m);
    checks++; if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  task automatic host(input logic [2:0] which, input int a, input int d);
    ld_wm_we = (which == 0); ld_sch_we = (which == 1); ld_ptr_we = (which == 2);
    ld_addr = 12'(a); ld_data = 16'(d);
    @(negedge clk);
    ld_wm_we = 0; ld_sch_we = 0; ld_ptr_we = 0;
  endtask

  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int rp, wp;
    word_t lut_v;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < DEPTH; i++) begin
      model[i] = 12'((i * 37 + 5) % 4096);
      host(0, i, model[i]);
    end
    for (int s = 0; s < 16; s++) host(1, s, {WM_IDLE, 12'd0});
    host(1, 0, {WM_READ,  12'd10});
    host(1, 1, {WM_WRITE, 12'd20});
    host(1, 2, {WM_RSEQ,  12'd0});
    host(1, 3, {WM_WSEQ,  12'd0});
    host(1, 5, {WM_READ,  12'd30});
    host(2, 0, 100);    // read pointer
    host(2, 1, 3000);   // write pointer
    rp = 100; wp = 3000;
    restart = 1; @(negedge clk); restart = 0;
    step = 1;
    for (int m = 0; m < 6; m++) begin
      for (int s = 0; s < 16; s++) begin
        word_t w;
        slot = 4'(s);
        w = 12'($urandom);
        sysbus_in = 0; lut_req_in = 0; lut_tbl_in = 0;
        if (s == 1 || s == 3) sysbus_in = w;
        if (s == 4) begin lut_v = 12'($urandom); sysbus_in = lut_v; lut_req_in = 1; lut_tbl_in = 1; end
        if (s == 7) begin lut_v = 12'($urandom); sysbus_in = lut_v; lut_req_in = 1; lut_tbl_in = 0; end
        #1;
        case (s)
          0: chk(bus_out.drv && bus_out.data == model[10], "fixed read");
          2: begin chk(bus_out.drv && bus_out.data == model[rp], "pointer read"); rp++; end
          5: begin chk(bus_out.drv && bus_out.data == model[2048 + int'(lut_v[10:0])], "lookup table 1");
                   chk(collision, "collision flagged"); collisions++; lut_answers++; end
          8: begin chk(bus_out.drv && bus_out.data == model[int'(lut_v[10:0])] && !collision, "lookup table 0");
                   lut_answers++; end
          1, 3, 4, 7: chk(!bus_out.drv, "silent while others drive");
          default: chk(!bus_out.drv && bus_out.data == 0, "idle slot");
        endcase
        @(posedge clk);
        if (s == 1) model[20] = w;
        if (s == 3) begin model[wp] = w; wp++; end
        @(negedge clk);
      end
    end
    step = 0;
    for (int a = 0; a < DEPTH; a += 1) begin
      host_rd_addr = 12'(a); #1;
      if (a == 20 || (a >= 3000 && a < 3006)) chk(host_rd_data == model[a], $sformatf("stored word %0d", a));
      else if (host_rd_data != model[a]) begin checks++; failures++; $display("FAIL word %0d changed", a); end
    end
    chk(lut_answers == 12 && collisions == 6, "lookup count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
