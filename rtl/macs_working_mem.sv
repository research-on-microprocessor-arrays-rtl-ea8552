// Working memory on the system bus, with the "intelligence" the PE programs
// rely on.
//
// Three services share the bus port:
//  * a slot schedule: for each of the 16 microinstruction slots of a
//    microcycle one operation, idle, read a fixed word onto the bus, store the
//    bus word at a fixed address, or read/store through an auto-incrementing
//    read or write pointer (for streams such as rotation factors or W1/W2
//    filter states);
//  * a lookup: when the word on the bus is marked as a lookup request, the
//    memory takes it as an address into one of two tables and puts the word
//    found there on the bus in the next cycle (table t occupies the half of
//    the memory selected by t, indexed by the low bits of the request);
//  * a host port to fill the memory, schedule and pointers while stopped and
//    to read any word back.
// A lookup answer takes the bus before a scheduled read of the same cycle,
// which is then dropped; `collision` pulses when that happens.
// Timing: reads are combinational onto the bus in the active cycle; stores and
// pointer steps happen at the rising edge of a stepped cycle.
// The two lookup tables answering one cycle later, and the memory feeding and
// taking back values on the system bus in given slots, follow the report; the
// schedule table, the pointers and the table layout are this design's.
module macs_working_mem
  import macs_pkg::*;
#(
  parameter int unsigned DEPTH = 4096
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     step,
  input  logic                     restart,
  input  logic [SLOT_W-1:0]        slot,
  input  word_t                    sysbus_in,
  input  logic                     lut_req_in,
  input  logic                     lut_tbl_in,
  output bus_t                     bus_out,
  output logic                     collision,
  // host
  input  logic                     ld_wm_we,
  input  logic                     ld_sch_we,
  input  logic                     ld_ptr_we,
  input  logic [$clog2(DEPTH)-1:0] ld_addr,
  input  logic [15:0]              ld_data,
  input  logic [$clog2(DEPTH)-1:0] host_rd_addr,
  output word_t                    host_rd_data
);
  localparam int unsigned AW = $clog2(DEPTH);

  word_t          mem [DEPTH];
  wm_slot_t       sched [NSLOT];
  logic [AW-1:0]  rptr, wptr, rptr0, wptr0;
  logic           lut_pend;
  logic [AW-1:0]  lut_addr;
  wm_slot_t       cur;
  logic [AW-1:0]  rd_addr, wr_addr;
  logic           rd_en, wr_en;

  assign cur = sched[slot];

  always_comb begin
    rd_en   = 1'b0;
    wr_en   = 1'b0;
    rd_addr = cur.addr[AW-1:0];
    wr_addr = cur.addr[AW-1:0];
    unique case (cur.op)
      WM_READ:  rd_en = 1'b1;
      WM_WRITE: wr_en = 1'b1;
      WM_RSEQ:  begin rd_en = 1'b1; rd_addr = rptr; end
      WM_WSEQ:  begin wr_en = 1'b1; wr_addr = wptr; end
      default:  ;
    endcase
  end

  assign bus_out.drv     = step & (lut_pend | rd_en);
  assign bus_out.data    = !step    ? '0 :
                           lut_pend ? mem[lut_addr] :
                           rd_en    ? mem[rd_addr] : '0;
  assign bus_out.lut_req = 1'b0;
  assign bus_out.lut_tbl = 1'b0;
  assign collision       = step & lut_pend & rd_en;
  assign host_rd_data    = mem[host_rd_addr];

  always_ff @(posedge clk) begin
    if (ld_wm_we)                   mem[ld_addr] <= ld_data[DW-1:0];
    else if (step && wr_en)         mem[wr_addr] <= sysbus_in;
    if (ld_sch_we)                  sched[ld_addr[SLOT_W-1:0]] <= wm_slot_t'(ld_data[14:0]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rptr0 <= '0; wptr0 <= '0; rptr <= '0; wptr <= '0;
      lut_pend <= 1'b0; lut_addr <= '0;
    end else begin
      if (ld_ptr_we) begin
        if (ld_addr[0]) wptr0 <= ld_data[AW-1:0];
        else            rptr0 <= ld_data[AW-1:0];
      end
      if (restart) begin
        rptr     <= rptr0;
        wptr     <= wptr0;
        lut_pend <= 1'b0;
      end else if (step) begin
        if (rd_en && !lut_pend && cur.op == WM_RSEQ) rptr <= rptr + 1'b1;
        if (wr_en && cur.op == WM_WSEQ)              wptr <= wptr + 1'b1;
        lut_pend <= lut_req_in;
        if (lut_req_in) lut_addr <= {lut_tbl_in, (AW-1)'(sysbus_in)};
      end
    end
  end

endmodule
