// lpc_pkg: types and constants shared by the bit-slice signal processor.
//
// The 48-bit microinstruction has 13 fields. Their positions and widths
// follow the published format (ALU multiplexer control, ALU source,
// function and destination, ALU A/B register addresses, carry, external
// operand source, external result destination, condition select,
// sequencer instruction and a 12-bit immediate). The codes inside the
// ALU and sequencer fields are those of the 2901 slice and the 2910
// sequencer. The codes of the external source and destination fields, of
// the shift multiplexer field and the layout of the status word are this
// design's own choice: only the field widths are given.
package lpc_pkg;

  localparam int unsigned WORD_W  = 16;   // data word
  localparam int unsigned UADDR_W = 12;   // 4K microinstructions
  localparam int unsigned UWORD_W = 48;   // microinstruction width
  localparam int unsigned DADDR_W = 16;   // 64K data words

  // 2901 source operand select (I2..I0): R and S operands.
  typedef enum logic [2:0] {
    SRC_AQ = 3'd0, SRC_AB = 3'd1, SRC_ZQ = 3'd2, SRC_ZB = 3'd3,
    SRC_ZA = 3'd4, SRC_DA = 3'd5, SRC_DQ = 3'd6, SRC_DZ = 3'd7
  } alu_src_e;

  // 2901 function (I5..I3).
  typedef enum logic [2:0] {
    FN_ADD  = 3'd0,   // R + S + Cn
    FN_SUBR = 3'd1,   // S - R - 1 + Cn
    FN_SUBS = 3'd2,   // R - S - 1 + Cn
    FN_OR   = 3'd3,
    FN_AND  = 3'd4,
    FN_NOTRS= 3'd5,   // ~R & S
    FN_EXOR = 3'd6,
    FN_EXNOR= 3'd7
  } alu_fn_e;

  // 2901 destination (I8..I6).
  typedef enum logic [2:0] {
    DST_QREG  = 3'd0,  // Q <= F,            Y = F
    DST_NOP   = 3'd1,  //                    Y = F
    DST_RAMA  = 3'd2,  // B <= F,            Y = A
    DST_RAMF  = 3'd3,  // B <= F,            Y = F
    DST_RAMQD = 3'd4,  // B <= F/2, Q <= Q/2, Y = F
    DST_RAMD  = 3'd5,  // B <= F/2,          Y = F
    DST_RAMQU = 3'd6,  // B <= 2F,  Q <= 2Q,  Y = F
    DST_RAMU  = 3'd7   // B <= 2F,           Y = F
  } alu_dst_e;

  // Shift end multiplexer (microword bits 1..0): what enters the free end
  // of the register file and Q when the ALU shifts.
  typedef enum logic [1:0] {
    SH_ZERO   = 2'd0,  // zero fill
    SH_ROTATE = 2'd1,  // each register rotates on itself
    SH_DOUBLE = 2'd2,  // RAM and Q form one 32-bit arithmetic shifter
    SH_CARRY  = 2'd3   // status carry enters
  } shift_mux_e;

  // 2910 sequencer instruction (I3..I0).
  typedef enum logic [3:0] {
    SEQ_JZ   = 4'd0,  SEQ_CJS  = 4'd1,  SEQ_JMAP = 4'd2,  SEQ_CJP  = 4'd3,
    SEQ_PUSH = 4'd4,  SEQ_JSRP = 4'd5,  SEQ_CJV  = 4'd6,  SEQ_JRP  = 4'd7,
    SEQ_RFCT = 4'd8,  SEQ_RPCT = 4'd9,  SEQ_CRTN = 4'd10, SEQ_CJPP = 4'd11,
    SEQ_LDCT = 4'd12, SEQ_LOOP = 4'd13, SEQ_CONT = 4'd14, SEQ_TWB  = 4'd15
  } seq_op_e;

  // External ALU operand source (bits 23..21): what drives the D bus.
  typedef enum logic [2:0] {
    XS_ZERO = 3'd0,   // D = 0
    XS_MEM  = 3'd1,   // data memory word at the data address register
    XS_IMM  = 3'd2,   // immediate, sign extended
    XS_IMMU = 3'd3,   // immediate, zero extended
    XS_PMSW = 3'd4,   // product bits 31..16
    XS_PLSW = 3'd5,   // product bits 15..0
    XS_PQ15 = 3'd6,   // product bits 30..15 (fractional Q15 result)
    XS_IN   = 3'd7    // input port
  } ext_src_e;

  // External ALU result destination (bits 27..24): where the Y bus goes.
  typedef enum logic [3:0] {
    XD_NONE    = 4'd0,
    XD_MEM     = 4'd1,   // mem[DAR] <= Y
    XD_DAR     = 4'd2,   // DAR <= Y
    XD_MULX    = 4'd3,   // multiplier X <= Y
    XD_MULY    = 4'd4,   // multiplier Y <= Y
    XD_OUT     = 4'd5,   // output port <= Y
    XD_MEM_INC = 4'd6,   // mem[DAR] <= Y, then DAR <= DAR + 1
    XD_DAR_INC = 4'd7,   // DAR <= DAR + 1 (Y unused)
    XD_DAR_DEC = 4'd8,   // DAR <= DAR - 1 (Y unused)
    XD_MULXY   = 4'd9    // X <= Y and Y <= Y (squaring)
  } ext_dst_e;

  // Status word bits tested by the condition select field (bits 31..28).
  localparam int unsigned ST_TRUE  = 0;
  localparam int unsigned ST_Z     = 1;
  localparam int unsigned ST_NZ    = 2;
  localparam int unsigned ST_C     = 3;
  localparam int unsigned ST_NC    = 4;
  localparam int unsigned ST_N     = 5;
  localparam int unsigned ST_NN    = 6;
  localparam int unsigned ST_V     = 7;
  localparam int unsigned ST_NV    = 8;
  localparam int unsigned ST_LT    = 9;   // N xor V: signed less than
  localparam int unsigned ST_GE    = 10;  // not (N xor V)
  localparam int unsigned ST_EXT0  = 11;  // bits 11..15: external conditions
  localparam int unsigned N_EXT_COND = 5;

  // ALU flags produced by the 16-bit ALU.
  typedef struct packed {
    logic z;   // F == 0
    logic c;   // carry out of bit 15
    logic n;   // F[15]
    logic v;   // two's complement overflow
  } alu_flags_t;

  // The 48-bit microinstruction, most significant field first.
  typedef struct packed {
    logic [11:0] imm;        // 47..36 immediate data / address
    seq_op_e     seq_op;     // 35..32 sequencer instruction
    logic [3:0]  cond_sel;   // 31..28 status word bit tested
    ext_dst_e    ext_dst;    // 27..24 external result destination
    ext_src_e    ext_src;    // 23..21 external operand source
    logic        cin;        // 20     ALU carry in
    logic [3:0]  b_addr;     // 19..16 ALU register B
    logic [3:0]  a_addr;     // 15..12 ALU register A
    logic        unused;     // 11     not used
    alu_dst_e    alu_dst;    // 10..8  ALU destination
    alu_fn_e     alu_fn;     // 7..5   ALU function
    alu_src_e    alu_src;    // 4..2   ALU source operands
    shift_mux_e  shift_mux;  // 1..0   ALU shift multiplexers
  } uinstr_t;

endpackage
