// MACS microprocessor array: a linear chain of N_PE processing elements for
// signal processing at high data rates.
//
// Every PE sees the output latch of its neighbour above and below. The first
// PE's "above" is the top (input) buffer, and a read from above by that PE
// takes the next word out of it; every word the last PE marks as emitted goes
// into the bottom (output) buffer. All PEs and the working memory share one
// system bus. The controller steps all PEs together, one microinstruction per
// clock, in microcycles of 16 slots, so data moves between PEs and across the
// bus in fixed slots that the microprograms agree on.
//
// Host side (all while the array is stopped, except reading the bottom
// buffer): host_we with host_tgt selects what is written: a PE's opcode CRAM,
// address CRAM or external memory (PE chosen by host_pe, word by host_addr),
// a working-memory word, a schedule entry or a pointer, or a push into the top
// buffer. host_rd_addr reads working memory; bot_pop takes results out of the
// bottom buffer. start with n_mcycles runs the array; done pulses at the end.
// The chain, the buses and the buffers follow the report; the host interface
// and the ordering of the two end buffers are this design's.
module macs_array
  import macs_pkg::*;
#(
  parameter int unsigned N_PE      = 8,
  parameter int unsigned EM_DEPTH  = 16,
  parameter int unsigned WM_DEPTH  = 4096,
  parameter int unsigned BUF_DEPTH = 1024
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // host load
  input  logic                         host_we,
  input  host_tgt_e                    host_tgt,
  input  logic [$clog2(N_PE)-1:0]      host_pe,
  input  logic [11:0]                  host_addr,
  input  logic [63:0]                  host_wdata,
  input  logic [$clog2(WM_DEPTH)-1:0]  host_rd_addr,
  output word_t                        host_rd_data,
  // run control
  input  logic                         start,
  input  logic [15:0]                  n_mcycles,
  output logic                         busy,
  output logic                         done,
  output logic [SLOT_W-1:0]            slot,
  // result buffer
  input  logic                         bot_pop,
  output word_t                        bot_data,
  output logic [$clog2(BUF_DEPTH):0]   bot_count,
  output logic                         bot_overflow,
  output logic [$clog2(BUF_DEPTH):0]   top_count,
  output logic                         top_overflow,
  // status
  output logic                         bus_conflict,
  output logic                         wm_collision,
  output logic [N_PE-1:0]              pe_enabled
);
  word_t       latch  [N_PE];
  logic        emit   [N_PE];
  logic        rd_abv [N_PE];
  bus_t        drv    [N_PE+1];
  word_t       sys_data, top_data;
  logic        sys_lut_req, sys_lut_tbl;
  logic        step, restart;
  logic [15:0] mcycle;
  logic        top_empty, top_full, bot_empty, bot_full;

  macs_ctrl u_ctrl (
    .clk, .rst_n, .start, .n_mcycles,
    .step, .restart, .slot, .mcycle, .busy, .done
  );

  for (genvar i = 0; i < int'(N_PE); i++) begin : g_pe
    logic  sel;
    word_t above, below;
    logic  ev_disable, ev_mul, ev_implicit;
    logic [3:0] mar0;

    assign sel   = host_we && (host_pe == ($clog2(N_PE))'(i));
    assign above = (i == 0) ? top_data : latch[(i == 0) ? 0 : i-1];
    assign below = (i == int'(N_PE)-1) ? '0 : latch[(i == int'(N_PE)-1) ? i : i+1];

    macs_pe #(.EM_DEPTH(EM_DEPTH)) u_pe (
      .clk, .rst_n, .step, .restart,
      .ld_opc_we(sel && host_tgt == HT_OPC),
      .ld_acr_we(sel && host_tgt == HT_ACR),
      .ld_em_we (sel && host_tgt == HT_EM),
      .ld_addr  (host_addr[3:0]),
      .ld_data  (host_wdata[UW-1:0]),
      .above_in (above),
      .below_in (below),
      .sysbus_in(sys_data),
      .latch_out(latch[i]),
      .emit_out (emit[i]),
      .bus_out  (drv[i]),
      .above_rd (rd_abv[i]),
      .enabled  (pe_enabled[i]),
      .ev_disable, .ev_mul, .ev_implicit, .mar0
    );
  end

  macs_working_mem #(.DEPTH(WM_DEPTH)) u_wm (
    .clk, .rst_n, .step, .restart, .slot,
    .sysbus_in (sys_data),
    .lut_req_in(sys_lut_req),
    .lut_tbl_in(sys_lut_tbl),
    .bus_out   (drv[N_PE]),
    .collision (wm_collision),
    .ld_wm_we  (host_we && host_tgt == HT_WM),
    .ld_sch_we (host_we && host_tgt == HT_WMSCH),
    .ld_ptr_we (host_we && host_tgt == HT_WMPTR),
    .ld_addr   (host_addr[$clog2(WM_DEPTH)-1:0]),
    .ld_data   (host_wdata[15:0]),
    .host_rd_addr,
    .host_rd_data
  );

  macs_sysbus #(.NDRV(N_PE+1)) u_bus (
    .clk, .rst_n, .drv,
    .data(sys_data), .lut_req(sys_lut_req), .lut_tbl(sys_lut_tbl),
    .conflict(bus_conflict)
  );

  macs_buffer #(.DEPTH(BUF_DEPTH)) u_top (
    .clk, .rst_n, .clear(1'b0),
    .push(host_we && host_tgt == HT_TOP), .wr_data(host_wdata[DW-1:0]),
    .pop(rd_abv[0]), .rd_data(top_data),
    .empty(top_empty), .full(top_full), .overflow(top_overflow), .count(top_count)
  );

  macs_buffer #(.DEPTH(BUF_DEPTH)) u_bot (
    .clk, .rst_n, .clear(1'b0),
    .push(emit[N_PE-1]), .wr_data(latch[N_PE-1]),
    .pop(bot_pop), .rd_data(bot_data),
    .empty(bot_empty), .full(bot_full), .overflow(bot_overflow), .count(bot_count)
  );

endmodule
