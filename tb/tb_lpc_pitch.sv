// tb_lpc_pitch: runs pitch detection by autocorrelation of a center-clipped
// frame on the processor at its default size.
//
// One 160-sample frame of a synthetic voiced sound (pulse train with period
// T0 = 57 samples through a decaying resonance, plus small noise) arrives
// through the input port. The microprogram
//   1. stores the frame;
//   2. finds the peak magnitude and sets the clipping level
//      CL = peak/4 + peak/16 (about 0.3 of the peak);
//   3. center-clips in place: x-CL above CL, x+CL below -CL, else 0;
//   4. calls an autocorrelation subroutine for lag 0 and for lags
//      LMIN..LMAX (20..120, that is 400 Hz down to 67 Hz). The inner loop is
//      six words, with two self-incrementing pointers, and the last word
//      both closes the loop and accumulates the Q15 product;
//   5. keeps the first lag with the largest R(L) and writes R(0), that lag
//      and R(lag).
// A model with the same 16-bit arithmetic gives the expected outputs. The
// lag must also lie within 3 samples of T0.
//
// The original machine used autocorrelation pitch detection with clipping.
// Its microprograms were not published: the frame, lag range, clipping
// level and this program are this testbench's own.
module tb_lpc_pitch;
  import lpc_pkg::*;

  localparam int N    = 160;
  localparam int T0   = 57;
  localparam int LMIN = 20;
  localparam int LMAX = 120;
  localparam int ACF  = 60;
  localparam int END  = 47;

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
    #3000000;
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

  // Registers: R1 lag, R2 / R12 pointers, R3 CL, R4 peak, R5 acc,
  // R6 temp, R7 best R, R8 best lag, R10 products left.
  uinstr_t prog [int];

  task automatic assemble();
    // 1. input
    prog[0]  = u(.xd(XD_DAR));
    prog[1]  = u(.op(SEQ_LDCT), .imm(N-1), .d(DST_RAMF), .b(4));     // peak = 0
    prog[2]  = u(.op(SEQ_RPCT), .imm(2));
    prog[3]  = u(.xs(XS_IN), .xd(XD_MEM_INC));                        // delay slot
    // 2. peak magnitude
    prog[4]  = u(.xd(XD_DAR));
    prog[5]  = u(.op(SEQ_LDCT), .imm(N-1));
    prog[6]  = u(.xs(XS_MEM), .d(DST_RAMF), .b(6), .xd(XD_DAR_INC));
    prog[7]  = u(.op(SEQ_CJP), .cond(ST_NN), .imm(9));
    prog[8]  = u(.s(SRC_ZB), .fn(FN_SUBS), .b(6), .cin(1), .d(DST_RAMF)); // |x|
    prog[9]  = u(.s(SRC_AB), .fn(FN_SUBS), .a(6), .b(4), .cin(1));    // |x| - peak
    prog[10] = u(.op(SEQ_CJP), .cond(ST_NC), .imm(12));
    prog[11] = u(.s(SRC_ZA), .a(6), .d(DST_RAMF), .b(4));
    prog[12] = u(.op(SEQ_RPCT), .imm(7));
    prog[13] = u(.xs(XS_MEM), .d(DST_RAMF), .b(6), .xd(XD_DAR_INC));  // delay slot
    prog[14] = u(.s(SRC_ZA), .a(4), .d(DST_RAMD), .b(6));             // peak/2
    prog[15] = u(.s(SRC_ZB), .b(6), .d(DST_RAMD));                    // peak/4
    prog[16] = u(.s(SRC_ZA), .a(6), .d(DST_RAMF), .b(3));
    prog[17] = u(.s(SRC_ZB), .b(6), .d(DST_RAMD));                    // peak/8
    prog[18] = u(.s(SRC_ZB), .b(6), .d(DST_RAMD));                    // peak/16
    prog[19] = u(.s(SRC_AB), .a(6), .b(3), .d(DST_RAMF));             // CL
    // 3. center clipping
    prog[20] = u(.xd(XD_DAR));
    prog[21] = u(.op(SEQ_LDCT), .imm(N-1));
    prog[22] = u(.xs(XS_MEM), .s(SRC_DA), .fn(FN_SUBS), .a(3), .cin(1), .d(DST_RAMF), .b(6));
    prog[23] = u(.op(SEQ_CJP), .cond(ST_LT), .imm(25));
    prog[24] = u(.op(SEQ_CJP), .cond(ST_TRUE), .imm(29), .s(SRC_ZA), .a(6), .xd(XD_MEM_INC));
    prog[25] = u(.xs(XS_MEM), .s(SRC_DA), .a(3), .d(DST_RAMF), .b(6));
    prog[26] = u(.op(SEQ_CJP), .cond(ST_LT), .imm(28));
    prog[27] = u(.op(SEQ_CJP), .cond(ST_TRUE), .imm(29), .xd(XD_MEM_INC));
    prog[28] = u(.s(SRC_ZA), .a(6), .xd(XD_MEM_INC));
    prog[29] = u(.op(SEQ_RPCT), .imm(22));
    prog[30] = u();                                                   // delay slot
    // 4./5. autocorrelation and peak search
    prog[31] = u(.d(DST_RAMF), .b(1));                                // lag 0
    prog[32] = u(.op(SEQ_CJS), .cond(ST_TRUE), .imm(ACF));
    prog[33] = u(.s(SRC_ZA), .a(5), .xd(XD_OUT));                     // R(0)
    prog[34] = u(.xs(XS_IMMU), .imm(LMIN), .d(DST_RAMF), .b(1));
    prog[35] = u(.xs(XS_IMM), .imm(12'h800), .d(DST_RAMF), .b(7));    // best = -2048
    prog[36] = u(.d(DST_RAMF), .b(8));
    prog[37] = u(.op(SEQ_CJS), .cond(ST_TRUE), .imm(ACF));
    prog[38] = u(.s(SRC_AB), .fn(FN_SUBS), .a(7), .b(5), .cin(1));    // best - R(L)
    prog[39] = u(.op(SEQ_CJP), .cond(ST_GE), .imm(42));
    prog[40] = u(.s(SRC_ZA), .a(5), .d(DST_RAMF), .b(7));
    prog[41] = u(.s(SRC_ZA), .a(1), .d(DST_RAMF), .b(8));
    prog[42] = u(.s(SRC_ZB), .b(1), .cin(1), .d(DST_RAMF));           // lag++
    prog[43] = u(.xs(XS_IMMU), .imm(LMAX+1), .s(SRC_DA), .fn(FN_SUBR), .a(1), .cin(1));
    prog[44] = u(.op(SEQ_CJP), .cond(ST_NZ), .imm(37));
    prog[45] = u(.s(SRC_ZA), .a(8), .xd(XD_OUT));                     // lag
    prog[46] = u(.s(SRC_ZA), .a(7), .xd(XD_OUT));                     // R(lag)
    prog[END] = u(.op(SEQ_CJP), .cond(ST_TRUE), .imm(END));
    // ACF subroutine: R5 = sum c[n]*c[n+R1], n = 0..N-1-R1
    prog[ACF]    = u(.xs(XS_IMMU), .imm(N), .d(DST_RAMF), .b(10));
    prog[ACF+1]  = u(.s(SRC_AB), .fn(FN_SUBR), .a(1), .b(10), .cin(1), .d(DST_RAMF));
    prog[ACF+2]  = u(.xs(XS_IMM), .imm(12'hfff), .d(DST_RAMF), .b(2));            // -1
    prog[ACF+3]  = u(.xs(XS_IMM), .imm(12'hfff), .s(SRC_DA), .a(1), .d(DST_RAMF), .b(12));
    prog[ACF+4]  = u(.d(DST_RAMF), .b(5));
    prog[ACF+5]  = u(.s(SRC_ZB), .b(2), .cin(1), .d(DST_RAMF), .xd(XD_DAR));      // n
    prog[ACF+6]  = u(.xs(XS_MEM), .xd(XD_MULX));
    prog[ACF+7]  = u(.s(SRC_ZB), .b(12), .cin(1), .d(DST_RAMF), .xd(XD_DAR));     // n+L
    prog[ACF+8]  = u(.xs(XS_MEM), .xd(XD_MULY));
    prog[ACF+9]  = u(.s(SRC_ZB), .fn(FN_SUBR), .b(10), .d(DST_RAMF));            // left--
    prog[ACF+10] = u(.op(SEQ_CJP), .cond(ST_NZ), .imm(ACF+5),
                     .xs(XS_PQ15), .s(SRC_DA), .a(5), .d(DST_RAMF), .b(5));       // acc += p
    prog[ACF+11] = u(.op(SEQ_CRTN), .cond(ST_TRUE));
  endtask

  // input port: always ready, next sample after each read
  logic [15:0] x [N];
  int idx = 0;
  logic rd_seen = 0;
  always @(negedge clk) rd_seen <= in_rd;
  always @(posedge clk) begin
    #1;
    if (rd_seen) idx++;
  end
  assign in_data  = x[(idx < N) ? idx : 0];
  assign ext_cond = '0;

  logic [15:0] outs [$];
  always @(negedge clk) if (rst_n && out_valid) outs.push_back(out_data);

  function automatic logic [15:0] q15(input logic [15:0] a, input logic [15:0] b);
    logic signed [31:0] pr;
    pr = $signed(a) * $signed(b);
    return pr[30:15];
  endfunction

  initial begin
    logic [15:0] c [N];
    logic [15:0] peak, cl, r0, best, acc;
    int lag, t_start, seed, n_clip;
    pl_we = 0; pl_addr = 0; pl_data = 0;
    seed = 12345;
    for (int n = 0; n < N; n++) begin
      real v;
      v = 0.0;
      for (int p = 5; p <= n; p += T0)
        v += 3000.0 * (0.9 ** (n - p)) * $cos(0.9 * (n - p));
      seed = (seed * 1103515245 + 12345) & 32'h7fffffff;
      v += real'((seed >>> 8) % 201 - 100);
      x[n] = 16'(int'(v));
    end
    // model
    peak = 0;
    for (int n = 0; n < N; n++) begin
      logic [15:0] m;
      m = x[n][15] ? -x[n] : x[n];
      if (m >= peak) peak = m;
    end
    cl = (peak >> 2) + (peak >> 4);
    n_clip = 0;
    for (int n = 0; n < N; n++) begin
      if ($signed(x[n]) >= $signed(cl)) c[n] = x[n] - cl;
      else if ($signed(x[n]) + $signed(cl) < 0) c[n] = x[n] + cl;
      else c[n] = 0;
      if (c[n] != 0) n_clip++;
    end
    r0 = 0;
    for (int n = 0; n < N; n++) r0 = r0 + q15(c[n], c[n]);
    best = 16'hf800;
    lag = 0;
    for (int l = LMIN; l <= LMAX; l++) begin
      acc = 0;
      for (int n = 0; n < N - l; n++) acc = acc + q15(c[n], c[n+l]);
      if ($signed(best) < $signed(acc)) begin best = acc; lag = l; end
    end
    assemble();
    foreach (prog[ad]) begin
      @(negedge clk);
      pl_we = 1; pl_addr = 12'(ad); pl_data = prog[ad];
    end
    @(negedge clk);
    pl_we = 0;
    @(negedge clk) rst_n = 1;
    t_start = cycle;
    wait (outs.size() == 3);
    wait (uaddr == END);
    $display("peak %0d, clip level %0d, %0d of %0d samples survive clipping",
             peak, cl, n_clip, N);
    $display("R(0) = %0d, pitch lag %0d (T0 = %0d), R(lag) = %0d",
             $signed(outs[0]), outs[1], T0, $signed(outs[2]));
    $display("took %0d cycles (%0d us at 5 MHz)", cycle - t_start, (cycle - t_start) / 5);
    check(outs[0], r0, "R(0)");
    check(outs[1], 16'(lag), "pitch lag");
    check(outs[2], best, "R(lag)");
    checks++;
    if (int'(outs[1]) < T0 - 3 || int'(outs[1]) > T0 + 3) begin
      failures++;
      $display("FAIL lag %0d not near T0 = %0d", outs[1], T0);
    end
    repeat (10) @(negedge clk);
    checks++;
    if (uaddr != END && uaddr != END + 1) begin failures++; $display("FAIL not in idle loop: %0d", uaddr); end
    check(outs.size(), 3, "output count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
