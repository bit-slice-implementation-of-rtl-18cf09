// tb_lpc_burg: runs lattice LPC analysis after Burg on the processor at
// its default size and checks the reflection coefficients.
//
// Frame: N = 160 samples (20 ms at 8 kHz), order P = 10. The samples
// arrive through the input port and are stored twice, as the forward
// error f[0..N-1] (data address 0) and the backward error b[0..N-1]
// (data address 256). For each stage m = 1..P the microprogram
//   1. accumulates num = sum f[n]*b[n-1] and den = sum f[n]^2 + b[n-1]^2
//      over n = m..N-1 with Q15 products (one multiplier, reloaded
//      between the three products of each term);
//   2. divides: |k| = 2|num|/den by 15 steps of restoring division in
//      the ALU (register file and Q shifted together, carry flag as the
//      unsigned compare), saturating to 0x7fff when 2|num| >= den;
//   3. sets k = -sign(num)|k| and writes it to the output port;
//   4. updates the lattice in place, n = N-1 down to m:
//      f[n] += k*b[n-1], b[n] = b[n-1] + k*f[n] (old values).
// A model with the same 16-bit integer arithmetic gives the expected
// coefficients. The run must also finish within one frame period at the
// 5 MHz microcycle (100,000 cycles).
//
// The original machine ran Burg lattice analysis, chosen over
// Levinson-Durbin because it stays stable under fixed-point truncation.
// Its microprograms were not published: this program, the frame size,
// the order and the Q15 number format are this testbench's own.
module tb_lpc_burg;
  import lpc_pkg::*;

  localparam int N   = 160;
  localparam int P   = 10;
  localparam int B0  = 256;
  localparam int SAT = 64;
  localparam int END = 62;

  logic clk = 0, rst_n = 0;
  logic pl_we;
  logic [11:0] pl_addr;
  logic [47:0] pl_data;
  logic [15:0] in_data, out_data;
  logic in_rd, out_valid, exec, rupture, seq_break, stack_full;
  uinstr_t uword;
  logic [N_EXT_COND-1:0] ext_cond;
  logic [11:0] uaddr;
  logic [15:0] dar;
  alu_flags_t status;
  int checks = 0, failures = 0;

  lpc_processor dut (.*);

  always #5 clk = ~clk;

  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #5000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic uinstr_t u(seq_op_e op = SEQ_CONT, int cond = 0, int imm = 0,
                                ext_src_e xs = XS_ZERO, ext_dst_e xd = XD_NONE,
                                alu_src_e s = SRC_DZ, alu_fn_e fn = FN_ADD,
                                alu_dst_e d = DST_NOP, int a = 0, int b = 0,
                                bit cin = 1'b0, shift_mux_e sh = SH_ZERO);
    uinstr_t w;
    w = '0;
    w.seq_op = op; w.cond_sel = 4'(cond); w.imm = 12'(imm);
    w.ext_src = xs; w.ext_dst = xd; w.alu_src = s; w.alu_fn = fn;
    w.alu_dst = d; w.a_addr = 4'(a); w.b_addr = 4'(b); w.cin = cin; w.shift_mux = sh;
    return w;
  endfunction

  // Registers: R1 n, R2 num, R3 den, R4 remainder, R5 -num, R6 num copy,
  // R7 |k|, R8 f, R9 b, R10 count, R11 k, R12 new b, R13 new f, R15 m.
  uinstr_t prog [int];

  task automatic assemble();
    // input: f[n] = b[n] = x[n]
    prog[0]  = u(.op(SEQ_LDCT), .imm(N-1), .d(DST_RAMF), .b(1));
    prog[1]  = u(.s(SRC_ZA), .a(1), .xd(XD_DAR));
    prog[2]  = u(.xs(XS_IN), .d(DST_RAMF), .b(8), .xd(XD_MEM));
    prog[3]  = u(.xs(XS_IMMU), .imm(B0), .s(SRC_DA), .a(1), .xd(XD_DAR));
    prog[4]  = u(.op(SEQ_RPCT), .imm(1), .s(SRC_ZA), .a(8), .xd(XD_MEM));
    prog[5]  = u(.s(SRC_ZB), .b(1), .cin(1), .d(DST_RAMF));           // delay slot: n++
    prog[6]  = u(.xs(XS_IMMU), .imm(1), .d(DST_RAMF), .b(15));        // m = 1
    // stage loop
    prog[7]  = u(.s(SRC_ZA), .a(15), .d(DST_RAMF), .b(1));            // n = m
    prog[8]  = u(.d(DST_RAMF), .b(2));                                // num = 0
    prog[9]  = u(.d(DST_RAMF), .b(3));                                // den = 0
    prog[10] = u(.xs(XS_IMMU), .imm(N), .s(SRC_DA), .fn(FN_SUBS), .a(15), .cin(1),
                 .d(DST_RAMF), .b(10));                               // count = N - m
    // 1. correlation and energy
    prog[11] = u(.s(SRC_ZA), .a(1), .xd(XD_DAR));
    prog[12] = u(.xs(XS_MEM), .d(DST_RAMF), .b(8), .xd(XD_MULX));     // X = f[n]
    prog[13] = u(.xs(XS_IMMU), .imm(B0-1), .s(SRC_DA), .a(1), .xd(XD_DAR));
    prog[14] = u(.xs(XS_MEM), .d(DST_RAMF), .b(9), .xd(XD_MULY));     // Y = b[n-1]
    prog[15] = u(.s(SRC_ZA), .a(8), .xd(XD_MULXY));                   // X = Y = f
    prog[16] = u(.xs(XS_PQ15), .s(SRC_DA), .a(2), .d(DST_RAMF), .b(2)); // num += f*b
    prog[17] = u(.s(SRC_ZA), .a(9), .xd(XD_MULXY));                   // X = Y = b
    prog[18] = u(.xs(XS_PQ15), .s(SRC_DA), .a(3), .d(DST_RAMF), .b(3)); // den += f*f
    prog[19] = u(.s(SRC_ZB), .b(1), .cin(1), .d(DST_RAMF));           // n++
    prog[20] = u(.xs(XS_PQ15), .s(SRC_DA), .a(3), .d(DST_RAMF), .b(3)); // den += b*b
    prog[21] = u(.s(SRC_ZB), .fn(FN_SUBR), .b(10), .d(DST_RAMF));     // count--
    prog[22] = u(.op(SEQ_CJP), .cond(ST_NZ), .imm(11));
    // 2. division
    prog[23] = u(.s(SRC_ZA), .fn(FN_SUBS), .a(2), .cin(1), .d(DST_RAMF), .b(5)); // -num
    prog[24] = u(.s(SRC_ZA), .a(2), .d(DST_RAMF), .b(6));             // flags of num
    prog[25] = u(.op(SEQ_CJP), .cond(ST_NN), .imm(27), .s(SRC_ZA), .a(2), .d(DST_RAMF), .b(4));
    prog[26] = u(.s(SRC_ZA), .a(5), .d(DST_RAMF), .b(4));             // |num|
    prog[27] = u(.s(SRC_ZB), .b(4), .d(DST_RAMU));                    // rem = 2|num|
    prog[28] = u(.s(SRC_AB), .fn(FN_SUBS), .a(4), .b(3), .cin(1));    // rem - den
    prog[29] = u(.op(SEQ_CJP), .cond(ST_C), .imm(SAT), .d(DST_QREG)); // Q = 0
    prog[30] = u(.op(SEQ_LDCT), .imm(14));                            // 15 steps
    prog[31] = u(.s(SRC_ZB), .b(4), .d(DST_RAMQU));                   // rem, Q <<= 1
    prog[32] = u(.s(SRC_AB), .fn(FN_SUBS), .a(4), .b(3), .cin(1));    // rem - den
    prog[33] = u(.op(SEQ_CJP), .cond(ST_NC), .imm(36));
    prog[34] = u(.s(SRC_AB), .fn(FN_SUBR), .a(3), .b(4), .cin(1), .d(DST_RAMF)); // rem -= den
    prog[35] = u(.s(SRC_ZQ), .cin(1), .d(DST_QREG));                  // quotient bit
    prog[36] = u(.op(SEQ_RPCT), .imm(31));
    prog[37] = u();                                                   // delay slot
    prog[38] = u(.s(SRC_ZQ), .d(DST_RAMF), .b(7));                    // |k| = Q
    // 3. sign and output
    prog[39] = u(.s(SRC_ZA), .a(6));                                  // flags of num
    prog[40] = u(.op(SEQ_CJP), .cond(ST_N), .imm(42), .s(SRC_ZA), .fn(FN_SUBS), .a(7),
                 .cin(1), .d(DST_RAMF), .b(11));                      // k = -|k|
    prog[41] = u(.op(SEQ_CJP), .cond(ST_TRUE), .imm(43));
    prog[42] = u(.s(SRC_ZA), .a(7), .d(DST_RAMF), .b(11));            // k = |k|
    prog[43] = u(.s(SRC_ZA), .a(11), .xd(XD_OUT));
    // 4. lattice update
    prog[44] = u(.s(SRC_ZA), .a(11), .xd(XD_MULX));                   // X = k
    prog[45] = u(.xs(XS_IMMU), .imm(N-1), .d(DST_RAMF), .b(1));       // n = N-1
    prog[46] = u(.xs(XS_IMMU), .imm(N), .s(SRC_DA), .fn(FN_SUBS), .a(15), .cin(1),
                 .d(DST_RAMF), .b(10));
    prog[47] = u(.s(SRC_ZA), .a(1), .xd(XD_DAR));
    prog[48] = u(.xs(XS_MEM), .d(DST_RAMF), .b(8), .xd(XD_MULY));     // Y = f[n]
    prog[49] = u(.xs(XS_IMMU), .imm(B0-1), .s(SRC_DA), .a(1), .xd(XD_DAR));
    prog[50] = u(.xs(XS_MEM), .d(DST_RAMF), .b(9), .xd(XD_MULY));     // Y = b[n-1]
    prog[51] = u(.xs(XS_PQ15), .s(SRC_DA), .a(9), .d(DST_RAMF), .b(12)); // b + k f
    prog[52] = u(.xs(XS_PQ15), .s(SRC_DA), .a(8), .d(DST_RAMF), .b(13)); // f + k b
    prog[53] = u(.s(SRC_ZB), .fn(FN_SUBR), .b(1), .d(DST_RAMF), .xd(XD_DAR_INC)); // n--
    prog[54] = u(.s(SRC_ZA), .a(12), .xd(XD_MEM));                    // b[n]
    prog[55] = u(.s(SRC_ZA), .a(1), .cin(1), .xd(XD_DAR));
    prog[56] = u(.s(SRC_ZA), .a(13), .xd(XD_MEM));                    // f[n]
    prog[57] = u(.s(SRC_ZB), .fn(FN_SUBR), .b(10), .d(DST_RAMF));
    prog[58] = u(.op(SEQ_CJP), .cond(ST_NZ), .imm(47));
    prog[59] = u(.s(SRC_ZB), .b(15), .cin(1), .d(DST_RAMF));          // m++
    prog[60] = u(.xs(XS_IMMU), .imm(P+1), .s(SRC_DA), .fn(FN_SUBR), .a(15), .cin(1));
    prog[61] = u(.op(SEQ_CJP), .cond(ST_NZ), .imm(7));
    prog[END] = u(.op(SEQ_CJP), .cond(ST_TRUE), .imm(END));
    // saturation: |k| = 0xffff >> 1
    prog[SAT]   = u(.xs(XS_IMM), .imm(12'hfff), .d(DST_RAMD), .b(7));
    prog[SAT+1] = u(.op(SEQ_CJP), .cond(ST_TRUE), .imm(39));
  endtask

  // input port: always ready, next sample after each read
  logic [15:0] samples [N];
  int idx = 0;
  logic rd_seen = 0;
  always @(negedge clk) rd_seen <= in_rd;
  always @(posedge clk) begin
    #1;
    if (rd_seen) idx++;
  end
  assign in_data  = samples[(idx < N) ? idx : 0];
  assign ext_cond = '0;

  logic [15:0] outs [$];
  always @(negedge clk) if (rst_n && out_valid) outs.push_back(out_data);

  function automatic logic [15:0] q15(input logic [15:0] a, input logic [15:0] b);
    logic signed [31:0] pr;
    pr = $signed(a) * $signed(b);
    return pr[30:15];
  endfunction

  initial begin
    logic [15:0] f [N], b [N], kexp [P+1];
    int t_start, n_sat;
    pl_we = 0; pl_addr = 0; pl_data = 0;
    n_sat = 0;
    for (int n = 0; n < N; n++) begin
      // two tones and a little noise, small enough that the 16-bit
      // energy sums cannot overflow
      samples[n] = 16'(int'(700.0 * $sin(0.30 * n) + 350.0 * $sin(1.10 * n + 0.5)) +
                       $signed($urandom_range(60)) - 30);
      f[n] = samples[n];
      b[n] = samples[n];
    end
    // model, same arithmetic as the microprogram
    for (int m = 1; m <= P; m++) begin
      logic [15:0] num, den, mag, rem, q, k;
      num = 0; den = 0;
      for (int n = m; n < N; n++) begin
        num = num + q15(f[n], b[n-1]);
        den = den + q15(f[n], f[n]);
        den = den + q15(b[n-1], b[n-1]);
      end
      mag = num[15] ? -num : num;
      rem = mag << 1;
      if (rem >= den) begin
        q = 16'h7fff;
        n_sat++;
      end else begin
        q = 0;
        repeat (15) begin
          rem = rem << 1;
          q = q << 1;
          if (rem >= den) begin rem = rem - den; q = q | 1; end
        end
      end
      k = num[15] ? q : -q;
      kexp[m] = k;
      for (int n = N - 1; n >= m; n--) begin
        logic [15:0] fo, bo;
        fo = f[n]; bo = b[n-1];
        b[n] = bo + q15(k, fo);
        f[n] = fo + q15(k, bo);
      end
    end
    assemble();
    foreach (prog[a]) begin
      @(negedge clk);
      pl_we = 1; pl_addr = 12'(a); pl_data = prog[a];
    end
    @(negedge clk);
    pl_we = 0;
    @(negedge clk) rst_n = 1;
    t_start = cycle;
    wait (outs.size() == P);
    wait (uaddr == END);
    $display("%0d stages took %0d cycles (%0d us at 5 MHz), %0d saturated",
             P, cycle - t_start, (cycle - t_start) / 5, n_sat);
    checks++;
    if (cycle - t_start >= 100000) begin
      failures++;
      $display("FAIL slower than one 20 ms frame at 5 MHz");
    end
    for (int m = 1; m <= P; m++) begin
      $display("  k%0d = %6d (%f)", m, $signed(outs[m-1]), $signed(outs[m-1]) / 32768.0);
      check(outs[m-1], kexp[m], $sformatf("k%0d", m));
    end
    repeat (10) @(negedge clk);
    checks++;
    if (uaddr != END && uaddr != END + 1) begin failures++; $display("FAIL not in idle loop: %0d", uaddr); end
    check(outs.size(), P, "coefficient count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
