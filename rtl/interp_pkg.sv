// interp_pkg: types and constants shared by the interpolator's blocks.
//
// The 36-bit microinstruction is split, as in the design's word format, into a
// 17-bit CPU field (ALU source 3, function 3, destination 2, register
// addresses 8, carry-in 1), a 16-bit sequencer field (sequencer instruction 4,
// branch address 8, condition select 3, condition enable 1) and a 3-bit I/O
// field decoded into the strobes D0..D7. The field widths follow the design;
// their bit order and the code values below are this implementation's choice.
// ALU source and function codes follow the usual 2901-family ordering; the
// 2-bit destination is this design's own subset of the slice's destinations.
package interp_pkg;

  localparam int unsigned DATA_W  = 24;   // CPU word: six 4-bit slices
  localparam int unsigned SLICES  = 6;
  localparam int unsigned UADDR_W = 12;   // sequencer address width
  localparam int unsigned ROM_AW  = 9;    // 0.5K words of microprogram
  localparam int unsigned ROM_DEPTH = 512;
  localparam int unsigned BR_W    = 8;    // branch field / start address

  typedef enum logic [2:0] {
    SRC_AQ = 3'd0, SRC_AB = 3'd1, SRC_ZQ = 3'd2, SRC_ZB = 3'd3,
    SRC_ZA = 3'd4, SRC_DA = 3'd5, SRC_DQ = 3'd6, SRC_DZ = 3'd7
  } alu_src_e;

  typedef enum logic [2:0] {
    FN_ADD  = 3'd0,  // R + S + Cn
    FN_SUBR = 3'd1,  // S - R - 1 + Cn
    FN_SUBS = 3'd2,  // R - S - 1 + Cn
    FN_OR   = 3'd3,
    FN_AND  = 3'd4,
    FN_NOTRS = 3'd5, // ~R & S
    FN_EXOR = 3'd6,
    FN_EXNOR = 3'd7
  } alu_fn_e;

  typedef enum logic [1:0] {
    DST_NOP  = 2'd0,  // no write, Y = F
    DST_RAMF = 2'd1,  // RAM[B] <= F, Y = F
    DST_QREG = 2'd2,  // Q <= F, Y = F
    DST_RAMA = 2'd3   // RAM[B] <= F, Y = RAM[A]
  } alu_dst_e;

  typedef enum logic [3:0] {
    SEQ_JZ = 4'd0,  SEQ_CJS = 4'd1,  SEQ_JMAP = 4'd2, SEQ_CJP = 4'd3,
    SEQ_PUSH = 4'd4, SEQ_JSRP = 4'd5, SEQ_CJV = 4'd6, SEQ_JRP = 4'd7,
    SEQ_RFCT = 4'd8, SEQ_RPCT = 4'd9, SEQ_CRTN = 4'd10, SEQ_CJPP = 4'd11,
    SEQ_LDCT = 4'd12, SEQ_LOOP = 4'd13, SEQ_CONT = 4'd14, SEQ_TWB = 4'd15
  } seq_op_e;

  // Condition select: the four latched flags, PMSI and Ipulse.
  typedef enum logic [2:0] {
    CC_CARRY = 3'd0, CC_ZERO = 3'd1, CC_NEG = 3'd2, CC_OVR = 3'd3,
    CC_PMSI = 3'd4, CC_IPULSE = 3'd5, CC_NONE6 = 3'd6, CC_NONE7 = 3'd7
  } cond_sel_e;

  // I/O field: index of the decoder output that is asserted.
  typedef enum logic [2:0] {
    IO_XREG = 3'd0,      // D0: load X-reg from CPU Y
    IO_ZREG = 3'd1,      // D1: load Z-reg from CPU Y
    IO_XPULSE = 3'd2,    // D2: X-axis pulse
    IO_ZPULSE = 3'd3,    // D3: Z-axis pulse
    IO_END = 3'd4,       // D4: distribution end
    IO_CLR_IPULSE = 3'd5,// D5: clear Ipulse
    IO_CLR_PMSI = 3'd6,  // D6: clear PMSI
    IO_NONE = 3'd7       // D7: unused, idle code
  } io_code_e;

  typedef struct packed {
    logic c;   // carry out of the 24-bit ALU
    logic z;   // F == 0
    logic n;   // F[23]
    logic v;   // two's-complement overflow
  } flags_t;

  typedef struct packed {
    alu_src_e  src;     // [35:33]
    alu_fn_e   fn;      // [32:30]
    alu_dst_e  dst;     // [29:28]
    logic [3:0] a;      // [27:24]
    logic [3:0] b;      // [23:20]
    logic      cin;     // [19]
    seq_op_e   seq;     // [18:15]
    logic [BR_W-1:0] br;// [14:7]
    cond_sel_e cond;    // [6:4]
    logic      ccen_n;  // [3]  0: unconditional (condition forced true)
    io_code_e  io;      // [2:0]
  } uword_t;

  // Word the pipeline register is cleared to by INIT: ALU idle, jump to zero.
  localparam uword_t UWORD_IDLE = '{src: SRC_ZA, fn: FN_ADD, dst: DST_NOP,
      a: 4'd0, b: 4'd0, cin: 1'b0, seq: SEQ_JZ, br: '0, cond: CC_NONE6,
      ccen_n: 1'b1, io: IO_NONE};

endpackage
