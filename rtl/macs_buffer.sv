// First-in first-out buffer used at both ends of the PE chain.
//
// As the top buffer the host pushes input words (plots, samples) and the
// first PE pops one each time it reads "from above"; as the bottom buffer the
// last PE pushes each word it emits and the host pops the results. Reading an
// empty buffer gives 0. A push into a full buffer is dropped and sets the
// sticky `overflow` flag until clear. rd_data is combinational; push, pop
// and the count change at the rising edge.
// The report names top and bottom (input and output) buffers and requires
// that they supply data at the array's rate; the FIFO organisation and the
// depth are this design's choice.
module macs_buffer
  import macs_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic                   push,
  input  word_t                  wr_data,
  input  logic                   pop,
  output word_t                  rd_data,
  output logic                   empty,
  output logic                   full,
  output logic                   overflow,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = $clog2(DEPTH);

  word_t         mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (count == ($clog2(DEPTH)+1)'(DEPTH));
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);
  assign rd_data = empty ? '0 : mem[rp];

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0; overflow <= 1'b0;
    end else if (clear) begin
      wp <= '0; rp <= '0; count <= '0; overflow <= 1'b0;
    end else begin
      if (do_push) wp <= wp + 1'b1;
      if (do_pop)  rp <= rp + 1'b1;
      count <= count + {{AW{1'b0}}, do_push} - {{AW{1'b0}}, do_pop};
      if (push && !do_push) overflow <= 1'b1;
    end
  end

endmodule
