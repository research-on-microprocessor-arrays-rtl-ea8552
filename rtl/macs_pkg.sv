// Shared types and constants of the MACS processing-element array.
//
// The array is a chain of processing elements (PEs) built around three
// Am2901-class 4-bit ALU slices, which makes a 12-bit data word. All PEs run
// in lockstep through a microcycle of 16 microinstructions, each PE from its
// own control memory. This package holds the data width, the Am2901 field
// encodings (source, function, destination, as defined for that part), and
// the microinstruction layout used by this implementation. The layout of the
// microinstruction word beyond the three Am2901 fields is this design's own;
// the encodings of the three Am2901 fields follow the part.
package macs_pkg;

  localparam int unsigned DW        = 12;  // 3 slices x 4 bits
  localparam int unsigned NSLOT     = 16;  // microinstructions per microcycle
  localparam int unsigned SLOT_W    = 4;
  localparam int unsigned RF_AW     = 4;   // 16 internal registers
  localparam int unsigned EM_AW     = 4;   // external-memory address width

  typedef logic [DW-1:0] word_t;

  // Am2901 source operand pair (R,S), I2..I0
  typedef enum logic [2:0] {
    SRC_AQ = 3'd0, SRC_AB = 3'd1, SRC_ZQ = 3'd2, SRC_ZB = 3'd3,
    SRC_ZA = 3'd4, SRC_DA = 3'd5, SRC_DQ = 3'd6, SRC_DZ = 3'd7
  } alu_src_e;

  // Am2901 ALU function, I5..I3
  typedef enum logic [2:0] {
    FN_ADD  = 3'd0,  // R + S + Cn
    FN_SUBR = 3'd1,  // S - R  (S + ~R + Cn)
    FN_SUBS = 3'd2,  // R - S  (R + ~S + Cn)
    FN_OR   = 3'd3,
    FN_AND  = 3'd4,
    FN_NOTRS= 3'd5,  // ~R & S
    FN_EXOR = 3'd6,
    FN_EXNOR= 3'd7
  } alu_fn_e;

  // Am2901 destination control, I8..I6
  typedef enum logic [2:0] {
    DST_QREG  = 3'd0, // F->Q,        Y=F
    DST_NOP   = 3'd1, //              Y=F
    DST_RAMA  = 3'd2, // F->B,        Y=A
    DST_RAMF  = 3'd3, // F->B,        Y=F
    DST_RAMQD = 3'd4, // F/2->B, Q/2->Q, Y=F
    DST_RAMD  = 3'd5, // F/2->B,      Y=F
    DST_RAMQU = 3'd6, // 2F->B, 2Q->Q, Y=F
    DST_RAMU  = 3'd7  // 2F->B,       Y=F
  } alu_dst_e;

  // Shift-line wiring chosen per microinstruction
  typedef enum logic [1:0] {
    SH_ZERO  = 2'd0,  // zeros shifted in
    SH_LINK  = 2'd1,  // double length: register and Q joined (Q below register)
    SH_SIGN  = 2'd2,  // arithmetic: sign copied in on a down shift, zero on up
    SH_ROT   = 2'd3   // each word rotates on itself
  } shift_e;

  // PE input multiplexer (letters as printed on the PE diagram)
  typedef enum logic [2:0] {
    DSEL_SYSBUS = 3'd0, // D: system bus
    DSEL_ABOVE  = 3'd1, // A: PE above
    DSEL_BELOW  = 3'd2, // B: PE below
    DSEL_EMA    = 3'd3, // C: external memory port A
    DSEL_MULH   = 3'd4, // E: multiplier high half
    DSEL_MULL   = 3'd5  // F: multiplier low half
  } dsel_e;

  // One microinstruction (this design's layout)
  typedef struct packed {
    alu_src_e              src;
    alu_fn_e               fn;
    alu_dst_e              dst;
    logic                  cin;
    dsel_e                 dsel;
    shift_e                sh;
    logic [3:0]            ac_addr;  // address-CRAM word (MAR1 path)
    logic                  implicit; // address the address CRAM through MAR2
    logic                  advance;  // MAR2 <- link field of the word read
    logic [EM_AW-1:0]      em_a;     // external memory port A address
    logic [EM_AW-1:0]      em_b;     // external memory port B address
    logic                  em_we;    // write latch into external memory [em_b]
    logic                  mul;      // start a multiplication X=EM[em_b], Y=latch
    logic                  lat;      // load output latch with Y
    logic                  emit;     // mark the latched word as a data output
    logic                  bus_out;  // drive the system bus
    logic                  bus_sel;  // 0: latch, 1: external memory port B
    logic                  lut_req;  // the bus word is a lookup-table address
    logic                  lut_tbl;  // which of the two tables
    logic                  dis_neg;  // disable the PE if F is negative
    logic                  enable;   // enable the PE (this instruction included)
    logic [SLOT_W-1:0]     next;     // next microinstruction address
  } uinstr_t;

  localparam int unsigned UW = $bits(uinstr_t);

  // Address-CRAM word: two register addresses and a link for implicit shifting
  typedef struct packed {
    logic [3:0]       link;
    logic [RF_AW-1:0] a;
    logic [RF_AW-1:0] b;
  } acram_t;

  // A driver's contribution to the system bus
  typedef struct packed {
    logic  drv;
    word_t data;
    logic  lut_req;
    logic  lut_tbl;
  } bus_t;

  // Working-memory slot operations
  typedef enum logic [2:0] {
    WM_IDLE  = 3'd0,
    WM_READ  = 3'd1,  // drive mem[addr] on the bus
    WM_WRITE = 3'd2,  // store the bus word at mem[addr]
    WM_RSEQ  = 3'd3,  // drive mem[read pointer], pointer + 1
    WM_WSEQ  = 3'd4   // store bus word at mem[write pointer], pointer + 1
  } wm_op_e;

  typedef struct packed {
    wm_op_e      op;
    logic [11:0] addr;
  } wm_slot_t;

  // Host load targets
  typedef enum logic [2:0] {
    HT_OPC   = 3'd0,  // PE opcode CRAM word
    HT_ACR   = 3'd1,  // PE address CRAM word
    HT_EM    = 3'd2,  // PE external memory word
    HT_WM    = 3'd3,  // working memory word
    HT_WMSCH = 3'd4,  // working memory slot schedule entry
    HT_WMPTR = 3'd5,  // working memory pointers: addr 0 read, 1 write
    HT_TOP   = 3'd6   // push a word into the top buffer
  } host_tgt_e;

  // Helper to build a microinstruction with every control bit off
  function automatic uinstr_t nop_instr(logic [SLOT_W-1:0] nxt);
    uinstr_t u;
    u      = '0;
    u.src  = SRC_ZQ;
    u.fn   = FN_AND;
    u.dst  = DST_NOP;
    u.next = nxt;
    return u;
  endfunction

endpackage
