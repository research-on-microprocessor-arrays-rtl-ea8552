// One MACS processing element (PE).
//
// Datapath, following the PE block diagram: a six-input multiplexer chooses
// the ALU slices' D input from the system bus (D), the PE above (A), the PE
// below (B), external-memory port A (C) and the multiplier's high (E) and low
// (F) halves. The slices' output Y is loaded into the output latch, which is
// what the neighbours above and below see, what is written into the external
// memory, the Y input of the multiplier, and one input of the bus output
// multiplexer (the other being external-memory port B). Control comes from the
// opcode CRAM (sequenced by MAR0) and the address CRAM (MAR1/MAR2), which
// gives the register addresses and so the implicit shift.
//
// Conditional execution: a PE is enabled or disabled. A microinstruction with
// dis_neg clears the enable flag when the ALU result is negative; one with
// enable sets it and is itself executed. While disabled, the PE keeps
// sequencing in step with the array but writes nothing: no register, Q,
// latch or external-memory write, no multiplication start, no bus drive and
// no read request to the buffer above.
//
// Timing: one microinstruction per clock while `step` is high. The latch is a
// register: a word computed in one cycle is seen by neighbours, the bus and
// the multiplier from the next cycle on. emit_out pulses in the cycle the
// latch shows a word whose microinstruction had `emit` set.
// Host port: ld_* writes opcode CRAM, address CRAM or external memory words
// while the array is stopped.
// The diagram's blocks and connections and the disable-if-negative rule
// follow the report. The latch as an edge-triggered register, the emit
// marker, the shift-line wiring choices and the host port are this design's.
module macs_pe
  import macs_pkg::*;
#(
  parameter int unsigned EM_DEPTH = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          step,
  input  logic          restart,
  // host load
  input  logic          ld_opc_we,
  input  logic          ld_acr_we,
  input  logic          ld_em_we,
  input  logic [3:0]    ld_addr,
  input  logic [UW-1:0] ld_data,
  // neighbour and bus links
  input  word_t         above_in,
  input  word_t         below_in,
  input  word_t         sysbus_in,
  output word_t         latch_out,
  output logic          emit_out,
  output bus_t          bus_out,
  output logic          above_rd,
  // status
  output logic          enabled,
  output logic          ev_disable,  // the enable flag is cleared this cycle
  output logic          ev_mul,      // a multiplication starts this cycle
  output logic          ev_implicit, // MAR2 advances this cycle
  output logic [3:0]    mar0
);
  uinstr_t           ui;
  logic [RF_AW-1:0]  a_addr, b_addr;
  logic [3:0]        mar2;
  word_t             d_in, y, f, q, ya, yb, mul_h, mul_l;
  word_t             latch_q;
  logic              f_neg, f_zero, cout, ovr, mul_done;
  logic              eff_en, act;
  logic              ram_msb_in, ram_lsb_in, q_msb_in, q_lsb_in;
  logic              ram_lsb_out, ram_msb_out, q_lsb_out, q_msb_out;
  logic              em_we;
  logic [$clog2(EM_DEPTH)-1:0] em_addr_b;
  word_t             em_wdata;

  macs_opcode_cram u_opc (
    .clk, .rst_n,
    .ld_we(ld_opc_we), .ld_addr(ld_addr), .ld_data(uinstr_t'(ld_data)),
    .restart, .step,
    .instr(ui), .mar0
  );

  macs_addr_cram u_acr (
    .clk, .rst_n,
    .ld_we(ld_acr_we), .ld_addr(ld_addr), .ld_data(acram_t'(ld_data[$bits(acram_t)-1:0])),
    .ac_addr(ui.ac_addr), .implicit(ui.implicit), .advance(ui.advance),
    .step(act), .restart,
    .a_addr, .b_addr, .mar2
  );

  assign eff_en = enabled | ui.enable;
  assign act    = step & eff_en;

  // Input multiplexer D A B C E F
  always_comb begin
    unique case (ui.dsel)
      DSEL_SYSBUS: d_in = sysbus_in;
      DSEL_ABOVE:  d_in = above_in;
      DSEL_BELOW:  d_in = below_in;
      DSEL_EMA:    d_in = ya;
      DSEL_MULH:   d_in = mul_h;
      DSEL_MULL:   d_in = mul_l;
      default:     d_in = '0;
    endcase
  end

  // Shift-line wiring at the two ends of the slice cascade
  always_comb begin
    ram_msb_in = 1'b0; ram_lsb_in = 1'b0; q_msb_in = 1'b0; q_lsb_in = 1'b0;
    unique case (ui.sh)
      SH_ZERO: ;
      SH_LINK: begin q_msb_in = ram_lsb_out; ram_lsb_in = q_msb_out; end
      SH_SIGN: begin ram_msb_in = f_neg; q_msb_in = ram_lsb_out; ram_lsb_in = q_msb_out; end
      default: begin // SH_ROT
        ram_msb_in = ram_lsb_out; ram_lsb_in = ram_msb_out;
        q_msb_in   = q_lsb_out;   q_lsb_in   = q_msb_out;
      end
    endcase
  end

  am2901_slices #(.NSLICE(DW/4)) u_alu (
    .clk, .rst_n, .we_en(act),
    .a_addr, .b_addr, .d(d_in),
    .src(ui.src), .fn(ui.fn), .dst(ui.dst), .cin(ui.cin),
    .ram_msb_in, .ram_lsb_in, .q_msb_in, .q_lsb_in,
    .ram_lsb_out, .ram_msb_out, .q_lsb_out, .q_msb_out,
    .y, .f, .cout, .ovr, .f_zero, .f_neg, .q_out(q)
  );

  // External memory: host writes while stopped, otherwise latch -> [em_b]
  assign em_we     = ld_em_we | (act & ui.em_we);
  assign em_addr_b = ld_em_we ? ld_addr[$clog2(EM_DEPTH)-1:0] : ui.em_b[$clog2(EM_DEPTH)-1:0];
  assign em_wdata  = ld_em_we ? ld_data[DW-1:0] : latch_q;

  macs_ext_mem #(.DEPTH(EM_DEPTH)) u_em (
    .clk, .rst_n,
    .addr_a(ui.em_a[$clog2(EM_DEPTH)-1:0]), .addr_b(em_addr_b),
    .we_b(em_we), .wdata_b(em_wdata),
    .ya, .yb
  );

  macs_hw_mult u_mul (
    .clk, .rst_n, .start(act & ui.mul),
    .x(yb), .y(latch_q), .h(mul_h), .l(mul_l), .done(mul_done)
  );

  // Output latch, emit marker and enable flag
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      latch_q  <= '0;
      emit_out <= 1'b0;
      enabled  <= 1'b1;
    end else begin
      emit_out <= act & ui.lat & ui.emit;
      if (act & ui.lat) latch_q <= y;
      if (restart)
        enabled <= 1'b1;
      else if (step) begin
        if (eff_en && ui.dis_neg && f_neg) enabled <= 1'b0;
        else if (ui.enable)                enabled <= 1'b1;
      end
    end
  end

  assign latch_out       = latch_q;
  assign bus_out.drv     = act & ui.bus_out;
  assign bus_out.data    = (act & ui.bus_out) ? (ui.bus_sel ? yb : latch_q) : '0;
  assign bus_out.lut_req = act & ui.bus_out & ui.lut_req;
  assign bus_out.lut_tbl = act & ui.bus_out & ui.lut_tbl;
  assign above_rd        = act & (ui.dsel == DSEL_ABOVE);

  assign ev_disable  = step & eff_en & ui.dis_neg & f_neg;
  assign ev_mul      = act & ui.mul;
  assign ev_implicit = act & ui.implicit & ui.advance;

endmodule
