// am2901_slice: one 4-bit ALU slice with the function of the 2901
// bit-slice device. Four of them, cascaded, form the 16-bit ALU.
//
// Inside: a 16 x 4 two-port register file (A and B read addresses, writes
// go to B), a Q register, an operand selector that picks R and S from
// A, B, Q, the D input and zero, an 8-function ALU, and shifters in front
// of the register file and Q. The 9-bit instruction is the source,
// function and destination fields of the microword, with the 2901's own
// codes. Shift data leaves and enters through separate in/out pins
// (ram0/ram3/q0/q3) instead of the device's bidirectional pins.
//
// Timing: A and B are read combinationally; the register file and Q load
// on the rising clock edge when `en` is high. Y, F, the carry out and the
// flags are combinational. For the logic functions the carry out and
// overflow are 0, a simplification of the device's P/G-based values.
// The register file starts at zero after reset; the device itself has no
// reset, so this is this design's choice.
module am2901_slice
  import lpc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,          // clock enable (0: cycle cancelled)
  input  alu_src_e   src,
  input  alu_fn_e    fn,
  input  alu_dst_e   dst,
  input  logic [3:0] a_addr,
  input  logic [3:0] b_addr,
  input  logic [3:0] d,
  input  logic       cin,
  output logic [3:0] y,
  output logic [3:0] f,
  output logic       cout,        // Cn+4
  output logic       ovr,         // carry into bit 3 xor carry out
  output logic       f_zero,      // F == 0 for this slice
  // shift linkage
  input  logic       ram0_in,     // enters bit 0 on an up shift
  input  logic       ram3_in,     // enters bit 3 on a down shift
  output logic       ram0_out,    // F[0], leaves on a down shift
  output logic       ram3_out,    // F[3], leaves on an up shift
  input  logic       q0_in,
  input  logic       q3_in,
  output logic       q0_out,
  output logic       q3_out
);

  logic [3:0] regs [16];
  logic [3:0] q;
  logic [3:0] a_val, b_val, r, s;

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
      default: begin r = d;    s = '0;    end  // SRC_DZ
    endcase
  end

  // Arithmetic: R + S + Cn with one operand inverted for the subtractions.
  logic [3:0] op1, op2;
  logic [4:0] sum;
  logic       arith;

  always_comb begin
    op1 = r;
    op2 = s;
    if (fn == FN_SUBR) op1 = ~r;
    if (fn == FN_SUBS) op2 = ~s;
    sum  = {1'b0, op1} + {1'b0, op2} + {4'b0, cin};
    arith = (fn == FN_ADD) || (fn == FN_SUBR) || (fn == FN_SUBS);
    unique case (fn)
      FN_OR:    f = r | s;
      FN_AND:   f = r & s;
      FN_NOTRS: f = ~r & s;
      FN_EXOR:  f = r ^ s;
      FN_EXNOR: f = ~(r ^ s);
      default:  f = sum[3:0];
    endcase
    cout = arith ? sum[4] : 1'b0;
    // carry into bit 3 is sum bit 3 with the operand bits removed
    ovr  = arith ? (sum[4] ^ sum[3] ^ op1[3] ^ op2[3]) : 1'b0;
  end

  assign f_zero   = (f == 4'b0);
  assign ram0_out = f[0];
  assign ram3_out = f[3];
  assign q0_out   = q[0];
  assign q3_out   = q[3];
  assign y        = (dst == DST_RAMA) ? a_val : f;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
      for (int i = 0; i < 16; i++) regs[i] <= '0;
    end else if (en) begin
      unique case (dst)
        DST_QREG:  q <= f;
        DST_NOP:   ;
        DST_RAMA,
        DST_RAMF:  regs[b_addr] <= f;
        DST_RAMQD: begin regs[b_addr] <= {ram3_in, f[3:1]}; q <= {q3_in, q[3:1]}; end
        DST_RAMD:  regs[b_addr] <= {ram3_in, f[3:1]};
        DST_RAMQU: begin regs[b_addr] <= {f[2:0], ram0_in}; q <= {q[2:0], q0_in}; end
        default:   regs[b_addr] <= {f[2:0], ram0_in};   // DST_RAMU
      endcase
    end
  end

endmodule
