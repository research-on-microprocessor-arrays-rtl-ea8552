// Address control memory of one PE, with MAR1, MAR2 and their multiplexer.
//
// Each of the DEPTH words holds the two register-file addresses A and B used
// by the ALU slices, plus a link field. Normally the word is chosen directly
// by the microinstruction (the MAR1 path). With `implicit` set the word is
// chosen by MAR2 instead, and with `advance` set MAR2 is then loaded with the
// link field of that word. Filling the store with links 0->1->...->15->0 makes
// a register address that moves on by one every microcycle, so 16 internal
// registers behave as a 16-word shift register (the implicit shift).
//
// Interface: host write port; ac_addr/implicit/advance from the current
// microinstruction; step enables the MAR2 update; restart clears MAR2.
// Read is combinational; MAR2 changes at the rising edge. The report shows the
// store, MAR1, MAR2 and the multiplexer and that the store's output loops back
// into MAR2; the word layout and the link field are this design's reading.
module macs_addr_cram
  import macs_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     ld_we,
  input  logic [$clog2(DEPTH)-1:0] ld_addr,
  input  acram_t                   ld_data,
  input  logic [$clog2(DEPTH)-1:0] ac_addr,
  input  logic                     implicit,
  input  logic                     advance,
  input  logic                     step,
  input  logic                     restart,
  output logic [RF_AW-1:0]         a_addr,
  output logic [RF_AW-1:0]         b_addr,
  output logic [$clog2(DEPTH)-1:0] mar2
);
  localparam int unsigned AW = $clog2(DEPTH);

  acram_t           mem [DEPTH];
  logic [AW-1:0]    sel;
  acram_t           word;

  always_ff @(posedge clk) begin
    if (ld_we) mem[ld_addr] <= ld_data;
  end

  assign sel    = implicit ? mar2 : ac_addr;  // the MUX between MAR1 and MAR2
  assign word   = mem[sel];
  assign a_addr = word.a;
  assign b_addr = word.b;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 mar2 <= '0;
    else if (restart)           mar2 <= '0;
    else if (step && advance)   mar2 <= word.link[AW-1:0];
  end

endmodule
