// Opcode control memory of one PE with its address register MAR0.
//
// Holds DEPTH microinstructions (16, one microcycle). MAR0 addresses the
// store; the word read is the current microinstruction, and its next-address
// field is loaded into MAR0 at the end of every stepped cycle, so a routine is
// a chain of words ending with a jump back to its first word. restart sets
// MAR0 to 0 (the start of the microcycle).
//
// Interface: host write port (ld_we, ld_addr, ld_data) used while the array is
// stopped; step advances MAR0. Read is combinational, MAR0 updates at the
// rising edge. The 16-word store and the sequencing by a next-address field
// follow the report; the explicit restart is this design's choice.
module macs_opcode_cram
  import macs_pkg::*;
#(
  parameter int unsigned DEPTH = NSLOT
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     ld_we,
  input  logic [$clog2(DEPTH)-1:0] ld_addr,
  input  uinstr_t                  ld_data,
  input  logic                     restart,
  input  logic                     step,
  output uinstr_t                  instr,
  output logic [$clog2(DEPTH)-1:0] mar0
);
  localparam int unsigned AW = $clog2(DEPTH);

  uinstr_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (ld_we) mem[ld_addr] <= ld_data;
  end

  assign instr = mem[mar0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       mar0 <= '0;
    else if (restart) mar0 <= '0;
    else if (step)    mar0 <= instr.next[AW-1:0];
  end

endmodule
