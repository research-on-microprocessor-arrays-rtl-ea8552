// Hardware multiplier added to the PE: signed DW x DW product, two cycles of
// delay, high and low halves returned to the PE input multiplexer.
//
// `start` captures X (external memory port B) and Y (the PE output latch) at
// the rising edge. The product is formed in the next cycle and registered,
// then moved to the output registers one cycle later, so the result can be
// read three microinstructions after the one that started it (two wait
// cycles in between). Back-to-back starts are pipelined. The outputs hold the
// last result until a newer one arrives. `h` is the upper DW bits of the
// 2*DW-bit product, `l` the lower DW bits.
// The X and Y sources, the H and L outputs and the two-cycle delay follow the
// report; signed two's-complement operands are this design's choice.
module macs_hw_mult
  import macs_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  word_t x,
  input  word_t y,
  output word_t h,
  output word_t l,
  output logic  done     // pulses in the first cycle a new result is readable
);
  word_t                x_r, y_r;
  logic signed [2*DW-1:0] p_r;
  logic                 v1, v2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_r <= '0; y_r <= '0; p_r <= '0; v1 <= 1'b0; v2 <= 1'b0;
      h <= '0; l <= '0; done <= 1'b0;
    end else begin
      v1   <= start;
      v2   <= v1;
      done <= v2;
      if (start) begin
        x_r <= x;
        y_r <= y;
      end
      if (v1) p_r <= $signed(x_r) * $signed(y_r);
      if (v2) begin
        h <= p_r[2*DW-1:DW];
        l <= p_r[DW-1:0];
      end
    end
  end

endmodule
