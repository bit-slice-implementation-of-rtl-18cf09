// tb_lpc_gold_rabiner: runs pitch detection after Gold and Rabiner on the
// processor at its default size, one sample at a time as samples arrive.
//
// Input: 320 samples (40 ms at 8 kHz) of a synthetic voiced sound, a pulse
// train with period T0 = 57 samples through a decaying resonance, plus small
// noise. For every sample the microprogram
//   1. detects a peak or a valley at the previous sample (slope change);
//   2. forms six pulse measurements. At a peak p these are m1 = p,
//      m2 = p - last valley and m3 = p - last peak. At a valley v they are
//      m4 = -v, m5 = last peak - v and m6 = last valley - v. Negative
//      values become 0, and all six are 0 when there is no event;
//   3. calls a peak-detecting estimator once for each measurement. Each
//      estimator keeps its state in data memory: a threshold, a blanking
//      counter, the time of the last accepted pulse and a period. A pulse
//      is accepted when it is above the threshold and the estimator is not
//      blanked. An accepted pulse sets the period to the time since the
//      last one, the threshold to the pulse height, and BL samples of
//      blanking. Otherwise the threshold decays by 1/32 per sample, the
//      product thr*2^-5 coming from the multiplier.
// At the end each of the six periods gets a vote count: the number of
// periods (itself included) within 2 samples of it. The period with the
// most votes (the first on a tie) is the estimate. The six periods, the
// estimate and its votes are written out.
//
// This is a compact form of the method: fixed blanking and decay, and a
// six-way vote in place of the full coincidence table. A model with the
// same 16-bit arithmetic gives the expected outputs. The estimate must
// lie within 3 samples of T0, and the processing must keep up with the
// 8 kHz sample rate at the 5 MHz microcycle (625 cycles per sample).
//
// The original machine used Gold-Rabiner pitch detection. Its microprograms
// were not published: the parameters, the simplifications above and this
// program are this testbench's own.
module tb_lpc_gold_rabiner;
  import lpc_pkg::*;

  localparam int NS  = 320;
  localparam int T0  = 57;
  localparam int BL  = 20;
  localparam int ST0 = 256;
  localparam int PPE = 110;
  localparam int END = 102;

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
    #4000000;
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

  // Registers: R1 time n (then outer pointer), R2 estimator input (then
  // inner pointer), R3 x, R4 previous x, R5 rising flag (then votes),
  // R6 last peak (then distance), R7 last valley, R8 scratch (then best
  // votes), R9 estimator state pointer (then best period), R10..R15
  // m1..m6 (then the six periods), R0 scratch.
  uinstr_t prog [int];

  task automatic assemble();
    // clear the six estimator states (4 words each)
    prog[0]  = u(.op(SEQ_LDCT), .imm(23));
    prog[1]  = u(.xs(XS_IMMU), .imm(ST0), .xd(XD_DAR));
    prog[2]  = u(.op(SEQ_RPCT), .imm(2));
    prog[3]  = u(.xd(XD_MEM_INC));                                    // delay slot
    prog[4]  = u(.d(DST_RAMF), .b(1));
    prog[5]  = u(.d(DST_RAMF), .b(4));
    prog[6]  = u(.d(DST_RAMF), .b(5));
    prog[7]  = u(.d(DST_RAMF), .b(6));
    prog[8]  = u(.d(DST_RAMF), .b(7));
    // per sample
    prog[9]  = u(.xs(XS_IN), .d(DST_RAMF), .b(3));
    prog[10] = u(.d(DST_RAMF), .b(10));
    prog[11] = u(.d(DST_RAMF), .b(11));
    prog[12] = u(.d(DST_RAMF), .b(12));
    prog[13] = u(.d(DST_RAMF), .b(13));
    prog[14] = u(.d(DST_RAMF), .b(14));
    prog[15] = u(.d(DST_RAMF), .b(15));
    prog[16] = u(.s(SRC_ZA), .a(5));                                  // flags of rising
    prog[17] = u(.op(SEQ_CJP), .cond(ST_Z), .imm(34));
    // rising: a drop marks a peak at the previous sample
    prog[18] = u(.s(SRC_AB), .fn(FN_SUBS), .a(3), .b(4), .cin(1));    // x - prev
    prog[19] = u(.op(SEQ_CJP), .cond(ST_GE), .imm(49));
    prog[20] = u(.d(DST_RAMF), .b(5));                                // falling
    prog[21] = u(.s(SRC_ZA), .a(4), .d(DST_RAMF), .b(10));            // m1 = p
    prog[22] = u(.op(SEQ_CJP), .cond(ST_NN), .imm(24));
    prog[23] = u(.d(DST_RAMF), .b(10));
    prog[24] = u(.s(SRC_ZA), .a(4), .d(DST_RAMF), .b(11));
    prog[25] = u(.s(SRC_AB), .fn(FN_SUBR), .a(7), .b(11), .cin(1), .d(DST_RAMF)); // m2 = p - lv
    prog[26] = u(.op(SEQ_CJP), .cond(ST_GE), .imm(28));
    prog[27] = u(.d(DST_RAMF), .b(11));
    prog[28] = u(.s(SRC_ZA), .a(4), .d(DST_RAMF), .b(12));
    prog[29] = u(.s(SRC_AB), .fn(FN_SUBR), .a(6), .b(12), .cin(1), .d(DST_RAMF)); // m3 = p - lp
    prog[30] = u(.op(SEQ_CJP), .cond(ST_GE), .imm(32));
    prog[31] = u(.d(DST_RAMF), .b(12));
    prog[32] = u(.s(SRC_ZA), .a(4), .d(DST_RAMF), .b(6));             // last peak
    prog[33] = u(.op(SEQ_CJP), .cond(ST_TRUE), .imm(49));
    // falling: a rise marks a valley at the previous sample
    prog[34] = u(.s(SRC_AB), .fn(FN_SUBS), .a(4), .b(3), .cin(1));    // prev - x
    prog[35] = u(.op(SEQ_CJP), .cond(ST_GE), .imm(49));
    prog[36] = u(.xs(XS_IMMU), .imm(1), .d(DST_RAMF), .b(5));         // rising
    prog[37] = u(.s(SRC_ZA), .fn(FN_SUBS), .a(4), .cin(1), .d(DST_RAMF), .b(13)); // m4 = -v
    prog[38] = u(.op(SEQ_CJP), .cond(ST_GE), .imm(40));
    prog[39] = u(.d(DST_RAMF), .b(13));
    prog[40] = u(.s(SRC_ZA), .a(6), .d(DST_RAMF), .b(14));
    prog[41] = u(.s(SRC_AB), .fn(FN_SUBR), .a(4), .b(14), .cin(1), .d(DST_RAMF)); // m5 = lp - v
    prog[42] = u(.op(SEQ_CJP), .cond(ST_GE), .imm(44));
    prog[43] = u(.d(DST_RAMF), .b(14));
    prog[44] = u(.s(SRC_ZA), .a(7), .d(DST_RAMF), .b(15));
    prog[45] = u(.s(SRC_AB), .fn(FN_SUBR), .a(4), .b(15), .cin(1), .d(DST_RAMF)); // m6 = lv - v
    prog[46] = u(.op(SEQ_CJP), .cond(ST_GE), .imm(48));
    prog[47] = u(.d(DST_RAMF), .b(15));
    prog[48] = u(.s(SRC_ZA), .a(4), .d(DST_RAMF), .b(7));             // last valley
    prog[49] = u(.s(SRC_ZA), .a(3), .d(DST_RAMF), .b(4));             // prev = x
    // the six estimators
    prog[50] = u(.xs(XS_IMMU), .imm(ST0+0), .d(DST_RAMF), .b(9));
    prog[51] = u(.op(SEQ_CJS), .cond(ST_TRUE), .imm(PPE), .s(SRC_ZA), .a(10), .d(DST_RAMF), .b(2)); // m1
    prog[52] = u(.xs(XS_IMMU), .imm(ST0+4), .d(DST_RAMF), .b(9));
    prog[53] = u(.op(SEQ_CJS), .cond(ST_TRUE), .imm(PPE), .s(SRC_ZA), .a(11), .d(DST_RAMF), .b(2)); // m2
    prog[54] = u(.xs(XS_IMMU), .imm(ST0+8), .d(DST_RAMF), .b(9));
    prog[55] = u(.op(SEQ_CJS), .cond(ST_TRUE), .imm(PPE), .s(SRC_ZA), .a(12), .d(DST_RAMF), .b(2)); // m3
    prog[56] = u(.xs(XS_IMMU), .imm(ST0+12), .d(DST_RAMF), .b(9));
    prog[57] = u(.op(SEQ_CJS), .cond(ST_TRUE), .imm(PPE), .s(SRC_ZA), .a(13), .d(DST_RAMF), .b(2)); // m4
    prog[58] = u(.xs(XS_IMMU), .imm(ST0+16), .d(DST_RAMF), .b(9));
    prog[59] = u(.op(SEQ_CJS), .cond(ST_TRUE), .imm(PPE), .s(SRC_ZA), .a(14), .d(DST_RAMF), .b(2)); // m5
    prog[60] = u(.xs(XS_IMMU), .imm(ST0+20), .d(DST_RAMF), .b(9));
    prog[61] = u(.op(SEQ_CJS), .cond(ST_TRUE), .imm(PPE), .s(SRC_ZA), .a(15), .d(DST_RAMF), .b(2)); // m6
    prog[62] = u(.s(SRC_ZB), .b(1), .cin(1), .d(DST_RAMF));           // n++
    prog[63] = u(.xs(XS_IMMU), .imm(NS), .s(SRC_DA), .fn(FN_SUBR), .a(1), .cin(1));
    prog[64] = u(.op(SEQ_CJP), .cond(ST_NZ), .imm(9));
    // write the six periods
    prog[65] = u(.xs(XS_IMMU), .imm(ST0+3), .xd(XD_DAR));
    prog[66] = u(.xs(XS_MEM), .d(DST_RAMF), .b(10), .xd(XD_OUT));   // period 1
    prog[67] = u(.xs(XS_IMMU), .imm(ST0+7), .xd(XD_DAR));
    prog[68] = u(.xs(XS_MEM), .d(DST_RAMF), .b(11), .xd(XD_OUT));   // period 2
    prog[69] = u(.xs(XS_IMMU), .imm(ST0+11), .xd(XD_DAR));
    prog[70] = u(.xs(XS_MEM), .d(DST_RAMF), .b(12), .xd(XD_OUT));   // period 3
    prog[71] = u(.xs(XS_IMMU), .imm(ST0+15), .xd(XD_DAR));
    prog[72] = u(.xs(XS_MEM), .d(DST_RAMF), .b(13), .xd(XD_OUT));   // period 4
    prog[73] = u(.xs(XS_IMMU), .imm(ST0+19), .xd(XD_DAR));
    prog[74] = u(.xs(XS_MEM), .d(DST_RAMF), .b(14), .xd(XD_OUT));   // period 5
    prog[75] = u(.xs(XS_IMMU), .imm(ST0+23), .xd(XD_DAR));
    prog[76] = u(.xs(XS_MEM), .d(DST_RAMF), .b(15), .xd(XD_OUT));   // period 6
    // vote
    prog[77] = u(.d(DST_RAMF), .b(8));                                // best votes = 0
    prog[78] = u(.xs(XS_IMMU), .imm(ST0+3), .d(DST_RAMF), .b(1));
    prog[79] = u(.s(SRC_ZA), .a(1), .xd(XD_DAR));
    prog[80] = u(.xs(XS_MEM), .d(DST_RAMF), .b(3));                   // Pi
    prog[81] = u(.d(DST_RAMF), .b(5));                                // votes = 0
    prog[82] = u(.xs(XS_IMMU), .imm(ST0+3), .d(DST_RAMF), .b(2));
    prog[83] = u(.s(SRC_ZA), .a(2), .xd(XD_DAR));
    prog[84] = u(.xs(XS_MEM), .s(SRC_DA), .fn(FN_SUBR), .a(3), .cin(1), .d(DST_RAMF), .b(6)); // Pi - Pj
    prog[85] = u(.op(SEQ_CJP), .cond(ST_GE), .imm(87));
    prog[86] = u(.s(SRC_ZB), .fn(FN_SUBS), .b(6), .cin(1), .d(DST_RAMF)); // |Pi - Pj|
    prog[87] = u(.xs(XS_IMMU), .imm(3), .s(SRC_DA), .fn(FN_SUBR), .a(6), .cin(1));
    prog[88] = u(.op(SEQ_CJP), .cond(ST_GE), .imm(90));
    prog[89] = u(.s(SRC_ZB), .b(5), .cin(1), .d(DST_RAMF));           // votes++
    prog[90] = u(.xs(XS_IMMU), .imm(4), .s(SRC_DA), .a(2), .d(DST_RAMF), .b(2));
    prog[91] = u(.xs(XS_IMMU), .imm(ST0+27), .s(SRC_DA), .fn(FN_SUBR), .a(2), .cin(1));
    prog[92] = u(.op(SEQ_CJP), .cond(ST_NZ), .imm(83));
    prog[93] = u(.s(SRC_AB), .fn(FN_SUBS), .a(8), .b(5), .cin(1));    // best - votes
    prog[94] = u(.op(SEQ_CJP), .cond(ST_GE), .imm(97));
    prog[95] = u(.s(SRC_ZA), .a(5), .d(DST_RAMF), .b(8));
    prog[96] = u(.s(SRC_ZA), .a(3), .d(DST_RAMF), .b(9));
    prog[97] = u(.xs(XS_IMMU), .imm(4), .s(SRC_DA), .a(1), .d(DST_RAMF), .b(1));
    prog[98] = u(.xs(XS_IMMU), .imm(ST0+27), .s(SRC_DA), .fn(FN_SUBR), .a(1), .cin(1));
    prog[99] = u(.op(SEQ_CJP), .cond(ST_NZ), .imm(79));
    prog[100] = u(.s(SRC_ZA), .a(9), .xd(XD_OUT));                    // estimate
    prog[101] = u(.s(SRC_ZA), .a(8), .xd(XD_OUT));                    // its votes
    prog[END] = u(.op(SEQ_CJP), .cond(ST_TRUE), .imm(END));
    // estimator: state at R9 (+0 threshold, +1 blanking, +2 last, +3 period),
    // input R2, time R1
    prog[PPE]    = u(.s(SRC_ZA), .a(9), .cin(1), .xd(XD_DAR));
    prog[PPE+1]  = u(.xs(XS_MEM), .d(DST_RAMF), .b(0));               // blanking
    prog[PPE+2]  = u(.op(SEQ_CJP), .cond(ST_Z), .imm(PPE+5));
    prog[PPE+3]  = u(.s(SRC_ZA), .fn(FN_SUBR), .a(0), .xd(XD_MEM));   // blanking - 1
    prog[PPE+4]  = u(.op(SEQ_CRTN), .cond(ST_TRUE));
    prog[PPE+5]  = u(.s(SRC_ZA), .a(9), .xd(XD_DAR));
    prog[PPE+6]  = u(.xs(XS_MEM), .s(SRC_DA), .fn(FN_SUBR), .a(2));   // in - thr - 1
    prog[PPE+7]  = u(.op(SEQ_CJP), .cond(ST_LT), .imm(PPE+16));
    prog[PPE+8]  = u(.s(SRC_ZA), .a(2), .xd(XD_MEM));                 // thr = in
    prog[PPE+9]  = u(.s(SRC_ZA), .a(9), .cin(1), .xd(XD_DAR));
    prog[PPE+10] = u(.xs(XS_IMMU), .imm(BL), .xd(XD_MEM));            // blank BL samples
    prog[PPE+11] = u(.xs(XS_IMMU), .imm(2), .s(SRC_DA), .a(9), .xd(XD_DAR));
    prog[PPE+12] = u(.xs(XS_MEM), .s(SRC_DA), .fn(FN_SUBR), .a(1), .cin(1), .d(DST_RAMF), .b(8)); // n - last
    prog[PPE+13] = u(.s(SRC_ZA), .a(1), .xd(XD_MEM_INC));             // last = n
    prog[PPE+14] = u(.s(SRC_ZA), .a(8), .xd(XD_MEM));                 // period
    prog[PPE+15] = u(.op(SEQ_CRTN), .cond(ST_TRUE));
    prog[PPE+16] = u(.xs(XS_MEM), .d(DST_RAMF), .b(0), .xd(XD_MULX)); // X = thr
    prog[PPE+17] = u(.xs(XS_IMMU), .imm(12'h400), .xd(XD_MULY));      // Y = 2^-5
    prog[PPE+18] = u();                                               // multiply
    prog[PPE+19] = u(.xs(XS_PQ15), .s(SRC_DA), .fn(FN_SUBR), .a(0), .cin(1), .xd(XD_MEM)); // decay
    prog[PPE+20] = u(.op(SEQ_CRTN), .cond(ST_TRUE));
  endtask

  // input port: always ready, next sample after each read
  logic [15:0] x [NS];
  int idx = 0;
  logic rd_seen = 0;
  always @(negedge clk) rd_seen <= in_rd;
  always @(posedge clk) begin
    #1;
    if (rd_seen) idx++;
  end
  assign in_data  = x[(idx < NS) ? idx : 0];
  assign ext_cond = '0;

  logic [15:0] outs [$];
  always @(negedge clk) if (rst_n && out_valid) outs.push_back(out_data);

  function automatic logic [15:0] q15(input logic [15:0] a, input logic [15:0] b);
    logic signed [31:0] pr;
    pr = $signed(a) * $signed(b);
    return pr[30:15];
  endfunction

  // estimator state of the model
  logic [15:0] thr [6], blank [6], last [6], period [6];

  task automatic ppe(input int i, input logic [15:0] amp, input logic [15:0] n);
    if (blank[i] != 0) begin
      blank[i] = blank[i] - 1;
    end else if (int'($signed(amp)) - int'($signed(thr[i])) - 1 >= 0) begin
      thr[i] = amp;
      blank[i] = 16'(BL);
      period[i] = n - last[i];
      last[i] = n;
    end else begin
      thr[i] = thr[i] - q15(thr[i], 16'h400);
    end
  endtask

  function automatic int sx(input logic [15:0] v);
    return int'($signed(v));
  endfunction

  initial begin
    logic [15:0] prev, lp, lv, m [6];
    logic rising;
    logic [15:0] best_p, best_v;
    int t_start, n_peaks, n_valleys, n_accept;
    pl_we = 0; pl_addr = 0; pl_data = 0;
    for (int n = 0; n < NS; n++) begin
      real v;
      v = 0.0;
      for (int p = 5; p <= n; p += T0)
        v += 3000.0 * (0.9 ** (n - p)) * $cos(0.9 * (n - p));
      x[n] = 16'(int'(v) + $signed($urandom_range(40)) - 20);
    end
    // model
    for (int i = 0; i < 6; i++) begin thr[i] = 0; blank[i] = 0; last[i] = 0; period[i] = 0; end
    prev = 0; lp = 0; lv = 0; rising = 0;
    n_peaks = 0; n_valleys = 0;
    for (int n = 0; n < NS; n++) begin
      for (int i = 0; i < 6; i++) m[i] = 0;
      if (rising) begin
        if (!(sx(x[n]) - sx(prev) >= 0)) begin
          rising = 0;
          n_peaks++;
          m[0] = prev[15] ? 16'd0 : prev;
          m[1] = (sx(prev) - sx(lv) >= 0) ? prev - lv : 16'd0;
          m[2] = (sx(prev) - sx(lp) >= 0) ? prev - lp : 16'd0;
          lp = prev;
        end
      end else begin
        if (!(sx(prev) - sx(x[n]) >= 0)) begin
          rising = 1;
          n_valleys++;
          m[3] = (0 - sx(prev) >= 0) ? -prev : 16'd0;
          m[4] = (sx(lp) - sx(prev) >= 0) ? lp - prev : 16'd0;
          m[5] = (sx(lv) - sx(prev) >= 0) ? lv - prev : 16'd0;
          lv = prev;
        end
      end
      prev = x[n];
      for (int i = 0; i < 6; i++) ppe(i, m[i], 16'(n));
    end
    best_v = 0; best_p = 0;
    for (int i = 0; i < 6; i++) begin
      logic [15:0] votes;
      votes = 0;
      for (int j = 0; j < 6; j++) begin
        logic [15:0] d;
        d = period[i] - period[j];
        if (sx(period[i]) - sx(period[j]) < 0) d = -d;
        if (sx(d) - 3 < 0) votes++;
      end
      if (sx(best_v) - sx(votes) < 0) begin best_v = votes; best_p = period[i]; end
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
    wait (outs.size() == 8);
    wait (uaddr == END);
    $display("%0d peaks, %0d valleys; periods %0d %0d %0d %0d %0d %0d",
             n_peaks, n_valleys, outs[0], outs[1], outs[2], outs[3], outs[4], outs[5]);
    $display("estimate %0d samples with %0d votes (T0 = %0d); %0d cycles, %0d per sample",
             outs[6], outs[7], T0, cycle - t_start, (cycle - t_start) / NS);
    for (int i = 0; i < 6; i++) check(outs[i], period[i], $sformatf("period %0d", i + 1));
    check(outs[6], best_p, "estimate");
    check(outs[7], best_v, "votes");
    checks++;
    if (int'(outs[6]) < T0 - 3 || int'(outs[6]) > T0 + 3) begin
      failures++;
      $display("FAIL estimate %0d not near T0 = %0d", outs[6], T0);
    end
    checks++;
    if (cycle - t_start >= NS * 625) begin
      failures++;
      $display("FAIL slower than the 8 kHz sample rate at 5 MHz");
    end
    repeat (10) @(negedge clk);
    checks++;
    if (uaddr != END && uaddr != END + 1) begin failures++; $display("FAIL not in idle loop: %0d", uaddr); end
    check(outs.size(), 8, "output count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
