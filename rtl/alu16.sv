// alu16: the 16-bit ALU, four 2901-style slices in cascade.
//
// The carry ripples from slice to slice (no carry-lookahead unit). The
// shift linkage joins the slices into one 16-bit shifter for the register
// file and one for Q; the shift multiplexer field of the microword picks
// what enters the free ends: zero, the bit leaving the other end
// (rotate), a 32-bit double-length arithmetic shift of the register file
// and Q together (down: sign of F into RAM, RAM bit 0 into Q; up: Q bit 15
// into RAM, zero into Q), or the stored carry flag.
//
// Flags: Z (F == 0), C (carry out of bit 15), N (F bit 15), V (overflow
// of the top slice). All outputs are combinational; registers load on the
// rising edge when `en` is high.
module alu16
  import lpc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        en,
  input  alu_src_e    src,
  input  alu_fn_e     fn,
  input  alu_dst_e    dst,
  input  shift_mux_e  shift_mux,
  input  logic [3:0]  a_addr,
  input  logic [3:0]  b_addr,
  input  logic [15:0] d,
  input  logic        cin,
  input  logic        carry_flag,  // stored carry, for SH_CARRY
  output logic [15:0] y,
  output logic [15:0] f,
  output alu_flags_t  flags
);

  localparam int NS = 4;

  logic [NS:0]   c;
  logic [NS-1:0] ovr, fz;
  logic [NS-1:0] r0o, r3o, q0o, q3o, r0i, r3i, q0i, q3i;

  assign c[0] = cin;

  for (genvar i = 0; i < NS; i++) begin : g_slice
    am2901_slice u_slice (
      .clk, .rst_n, .en, .src, .fn, .dst, .a_addr, .b_addr,
      .d(d[4*i +: 4]), .cin(c[i]), .y(y[4*i +: 4]), .f(f[4*i +: 4]),
      .cout(c[i+1]), .ovr(ovr[i]), .f_zero(fz[i]),
      .ram0_in(r0i[i]), .ram3_in(r3i[i]), .ram0_out(r0o[i]), .ram3_out(r3o[i]),
      .q0_in(q0i[i]), .q3_in(q3i[i]), .q0_out(q0o[i]), .q3_out(q3o[i])
    );
  end

  // Inner links between neighbouring slices.
  for (genvar i = 0; i < NS; i++) begin : g_link
    if (i > 0) begin : g_up
      assign r0i[i] = r3o[i-1];
      assign q0i[i] = q3o[i-1];
    end
    if (i < NS-1) begin : g_dn
      assign r3i[i] = r0o[i+1];
      assign q3i[i] = q0o[i+1];
    end
  end

  // End multiplexers.
  always_comb begin
    unique case (shift_mux)
      SH_ZERO: begin
        r3i[NS-1] = 1'b0; q3i[NS-1] = 1'b0; r0i[0] = 1'b0; q0i[0] = 1'b0;
      end
      SH_ROTATE: begin
        r3i[NS-1] = r0o[0];    q3i[NS-1] = q0o[0];
        r0i[0]    = r3o[NS-1]; q0i[0]    = q3o[NS-1];
      end
      SH_DOUBLE: begin
        r3i[NS-1] = f[15];     q3i[NS-1] = r0o[0];
        r0i[0]    = q3o[NS-1]; q0i[0]    = 1'b0;
      end
      default: begin
        r3i[NS-1] = carry_flag; q3i[NS-1] = carry_flag;
        r0i[0]    = carry_flag; q0i[0]    = carry_flag;
      end
    endcase
  end

  assign flags.z = &fz;
  assign flags.c = c[NS];
  assign flags.n = f[15];
  assign flags.v = ovr[NS-1];

endmodule
