// Bit-slice ALU of one PE: NSLICE cascaded Am2901-class slices (3 by default,
// a 12-bit word).
//
// Behaves as the cascaded parts do: a 16-word register file read at two
// addresses A and B, a Q register, a source selector forming the operands
// R and S from {A, B, D, Q, 0}, an 8-function ALU and a destination selector
// that writes F (straight, halved or doubled) into register B and/or Q and
// puts F or A on the output Y. The cascade's ripple carry is modelled as one
// wide adder. The end-of-word shift lines (RAM0/RAM3, Q0/Q3 of the part) are
// ports, so the PE decides what is shifted in.
//
// Timing: A, B, D, I and Cn are used in the same cycle; Y and the flags are
// combinational; the register file and Q change at the rising clock edge when
// we_en is high. Reads see the old contents (write after read).
// The field encodings follow the Am2901. Clearing the registers at reset is
// this design's choice (the part has no reset) so that every word read is
// defined.
module am2901_slices
  import macs_pkg::*;
#(
  parameter int unsigned NSLICE = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 we_en,      // 0: no register or Q write
  input  logic [RF_AW-1:0]     a_addr,
  input  logic [RF_AW-1:0]     b_addr,
  input  logic [4*NSLICE-1:0]  d,
  input  alu_src_e             src,
  input  alu_fn_e              fn,
  input  alu_dst_e             dst,
  input  logic                 cin,
  input  logic                 ram_msb_in, // RAM3 of the top slice (down shift)
  input  logic                 ram_lsb_in, // RAM0 of the bottom slice (up shift)
  input  logic                 q_msb_in,   // Q3 of the top slice (down shift)
  input  logic                 q_lsb_in,   // Q0 of the bottom slice (up shift)
  output logic                 ram_lsb_out,// F bit 0, leaves on a down shift
  output logic                 ram_msb_out,// F top bit, leaves on an up shift
  output logic                 q_lsb_out,  // Q bit 0
  output logic                 q_msb_out,  // Q top bit
  output logic [4*NSLICE-1:0]  y,
  output logic [4*NSLICE-1:0]  f,
  output logic                 cout,
  output logic                 ovr,
  output logic                 f_zero,
  output logic                 f_neg,
  output logic [4*NSLICE-1:0]  q_out
);
  localparam int unsigned W = 4*NSLICE;

  logic [W-1:0] regs [16];
  logic [W-1:0] q;
  logic [W-1:0] a_val, b_val, r, s, r_op, s_op;
  logic [W:0]   sum;

  assign a_val = regs[a_addr];
  assign b_val = regs[b_addr];

  always_comb begin
    unique case (src)
      SRC_AQ: begin r = a_val; s = q;     end
      SRC_AB: begin r = a_val; s = b_val; end
      SRC_ZQ: begin r = '0;    s = q;     end
      SRC_ZB: begin r = '0;    s = b_val; end
      SRC_ZA: begin r = '0;    s = a_val; end
      SRC_DA: begin r = d;     s = a_val; end
      SRC_DQ: begin r = d;     s = q;     end
      default: begin r = d;    s = '0;    end // SRC_DZ
    endcase
  end

  // Operands of the adder, inverted for the two subtractions
  always_comb begin
    r_op = r;
    s_op = s;
    if (fn == FN_SUBR) r_op = ~r;
    if (fn == FN_SUBS) s_op = ~s;
    sum  = {1'b0, r_op} + {1'b0, s_op} + {{W{1'b0}}, cin};
  end

  always_comb begin
    cout = 1'b0;
    ovr  = 1'b0;
    unique case (fn)
      FN_ADD, FN_SUBR, FN_SUBS: begin
        f    = sum[W-1:0];
        cout = sum[W];
        ovr  = (r_op[W-1] == s_op[W-1]) && (f[W-1] != r_op[W-1]);
      end
      FN_OR:    f = r | s;
      FN_AND:   f = r & s;
      FN_NOTRS: f = ~r & s;
      FN_EXOR:  f = r ^ s;
      default:  f = ~(r ^ s); // FN_EXNOR
    endcase
  end

  assign f_zero = (f == '0);
  assign f_neg  = f[W-1];
  assign y      = (dst == DST_RAMA) ? a_val : f;

  assign ram_lsb_out = f[0];
  assign ram_msb_out = f[W-1];
  assign q_lsb_out   = q[0];
  assign q_msb_out   = q[W-1];
  assign q_out       = q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
      for (int i = 0; i < 16; i++) regs[i] <= '0;
    end else if (we_en) begin
      unique case (dst)
        DST_QREG:  q <= f;
        DST_NOP:   ;
        DST_RAMA,
        DST_RAMF:  regs[b_addr] <= f;
        DST_RAMQD: begin
          regs[b_addr] <= {ram_msb_in, f[W-1:1]};
          q            <= {q_msb_in, q[W-1:1]};
        end
        DST_RAMD:  regs[b_addr] <= {ram_msb_in, f[W-1:1]};
        DST_RAMQU: begin
          regs[b_addr] <= {f[W-2:0], ram_lsb_in};
          q            <= {q[W-2:0], q_lsb_in};
        end
        default:   regs[b_addr] <= {f[W-2:0], ram_lsb_in}; // DST_RAMU
      endcase
    end
  end

endmodule
