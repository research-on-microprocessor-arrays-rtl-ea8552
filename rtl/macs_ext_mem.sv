// External memory of one PE: a small two-port data memory beside the ALU.
//
// Port A is read-only and feeds input C of the PE input multiplexer. Port B
// is read/write: its output YB feeds the bus output multiplexer and the X
// input of the hardware multiplier, and its write port takes the word from
// the PE output latch. Both reads are combinational; the write happens at the
// rising edge and a read of the same word in that cycle sees the old value.
// The contents are cleared at reset.
// The two ports and their connections follow the PE diagram; the depth
// (16 words) is this design's choice, as the report only recommends growing
// it to 64 words.
module macs_ext_mem
  import macs_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(DEPTH)-1:0] addr_a,
  input  logic [$clog2(DEPTH)-1:0] addr_b,
  input  logic                     we_b,
  input  word_t                    wdata_b,
  output word_t                    ya,
  output word_t                    yb
);
  word_t mem [DEPTH];

  assign ya = mem[addr_a];
  assign yb = mem[addr_b];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
    end else if (we_b) begin
      mem[addr_b] <= wdata_b;
    end
  end

endmodule
