// am2910_seq: microprogram sequencer with the instruction set of the 2910.
//
// It holds a microprogram counter (uPC), a 5-word return/loop stack and
// a register/counter R, and each cycle picks the next microprogram
// address Y from uPC, the D input (the microword's immediate), R, the
// stack top F or the map input, as the 16 instructions of the 2910 say.
// `cc_pass` is the selected status bit (1 = condition true).
//
// One departure from the 2910, set by RET_ADJ: what is pushed is
// uPC - RET_ADJ. With RET_ADJ = 0 this is the device. The processor's
// two-level pipeline keeps uPC one address ahead of the instruction after
// the executing one, so it uses RET_ADJ = 1: a subroutine then returns,
// and a PUSH/LOOP loop then jumps back, to the instruction right after the
// call or push.
//
// Timing: Y is combinational from the instruction, the condition and the
// state. On the rising edge with `en` high, uPC <= Y + 1 and the stack and
// counter change. `y_seq` is 1 when Y came from uPC (no sequence break).
// Reset empties the stack, clears R and sets uPC to RESET_UPC.
module am2910_seq
  import lpc_pkg::*;
#(
  parameter int unsigned AW          = 12,
  parameter int unsigned DEPTH       = 5,
  parameter int unsigned RET_ADJ     = 0,
  parameter logic [AW-1:0] RESET_UPC = '0
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  seq_op_e       op,
  input  logic          cc_pass,
  input  logic [AW-1:0] d,
  input  logic [AW-1:0] map_d,
  output logic [AW-1:0] y,
  output logic          y_seq,
  output logic          full
);

  localparam int unsigned SPW = $clog2(DEPTH + 1);

  logic [AW-1:0]  upc, r;
  logic [AW-1:0]  stack [DEPTH];
  logic [SPW-1:0] sp;            // number of words on the stack
  logic [AW-1:0]  f;

  assign f    = (sp == 0) ? '0 : stack[sp - 1'b1];
  assign full = (sp == SPW'(DEPTH));

  typedef enum logic [1:0] {ST_HOLD, ST_PUSH, ST_POP, ST_CLEAR} stk_e;
  typedef enum logic [1:0] {R_HOLD, R_LOAD, R_DEC} rc_e;

  stk_e stk;
  rc_e  rc;
  logic r_zero;
  assign r_zero = (r == '0);

  always_comb begin
    y   = upc;
    stk = ST_HOLD;
    rc  = R_HOLD;
    unique case (op)
      SEQ_JZ:   begin y = '0; stk = ST_CLEAR; end
      SEQ_CJS:  if (cc_pass) begin y = d; stk = ST_PUSH; end
      SEQ_JMAP: y = map_d;
      SEQ_CJP:  if (cc_pass) y = d;
      SEQ_PUSH: begin stk = ST_PUSH; if (cc_pass) rc = R_LOAD; end
      SEQ_JSRP: begin y = cc_pass ? d : r; stk = ST_PUSH; end
      SEQ_CJV:  if (cc_pass) y = d;
      SEQ_JRP:  y = cc_pass ? d : r;
      SEQ_RFCT: if (!r_zero) begin y = f; rc = R_DEC; end else stk = ST_POP;
      SEQ_RPCT: if (!r_zero) begin y = d; rc = R_DEC; end
      SEQ_CRTN: if (cc_pass) begin y = f; stk = ST_POP; end
      SEQ_CJPP: if (cc_pass) begin y = d; stk = ST_POP; end
      SEQ_LDCT: rc = R_LOAD;
      SEQ_LOOP: if (cc_pass) stk = ST_POP; else y = f;
      SEQ_CONT: ;
      default: begin  // SEQ_TWB
        if (cc_pass) stk = ST_POP;
        else if (!r_zero) begin y = f; rc = R_DEC; end
        else begin y = d; stk = ST_POP; end
      end
    endcase
  end

  // Y came from uPC unless it was loaded from elsewhere. An instruction
  // whose alternative target equals uPC still counts as a break.
  always_comb begin
    y_seq = 1'b1;
    unique case (op)
      SEQ_JZ, SEQ_JMAP, SEQ_JSRP, SEQ_JRP: y_seq = 1'b0;
      SEQ_CJS, SEQ_CJP, SEQ_CJV, SEQ_CRTN, SEQ_CJPP: y_seq = !cc_pass;
      SEQ_RFCT, SEQ_RPCT: y_seq = r_zero;
      SEQ_LOOP: y_seq = cc_pass;
      SEQ_TWB:  y_seq = cc_pass;
      default:  y_seq = 1'b1;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      upc <= RESET_UPC;
      r   <= '0;
      sp  <= '0;
      for (int i = 0; i < DEPTH; i++) stack[i] <= '0;
    end else if (en) begin
      upc <= y + 1'b1;
      unique case (rc)
        R_LOAD:  r <= d;
        R_DEC:   r <= r - 1'b1;
        default: ;
      endcase
      unique case (stk)
        ST_PUSH: begin
          // When full, the top word is overwritten, as in the 2910.
          if (full) stack[DEPTH-1] <= upc - AW'(RET_ADJ);
          else begin
            stack[sp] <= upc - AW'(RET_ADJ);
            sp        <= sp + 1'b1;
          end
        end
        ST_POP:   if (sp != 0) sp <= sp - 1'b1;
        ST_CLEAR: sp <= '0;
        default:  ;
      endcase
    end
  end

endmodule
