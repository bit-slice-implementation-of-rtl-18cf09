// tb_lpc_levinson: runs the Levinson-Durbin recursion on the processor at
// its default size and checks reflection and predictor coefficients.
//
// The autocorrelation R(0..P) of a frame (P = 10) arrives through the
// input port. For i = 1..P the microprogram
//   1. forms acc = R(i) + sum a[j]*R(i-j), j = 1..i-1 (Q15 products);
//   2. calls a division subroutine: |acc|/E by 15 steps of restoring
//      division, saturating to 0x7fff when |acc| >= E;
//   3. sets k = -sign(acc)|k|, writes it out and updates the prediction
//      error E += k*acc;
//   4. updates the predictor, tmp[j] = a[j] + k*a[i-j], copies tmp back
//      and sets a[i] = k.
// It then writes a[1..P] and the final E. A model with the same 16-bit
// integer arithmetic gives the expected values. Data memory holds R at
// address 0, a at 32 and tmp at 64.
//
// The original machine had a Levinson-Durbin routine as well as the
// lattice forms. Its microprograms were not published: this program, the
// order and the Q15 format are this testbench's own.
module tb_lpc_levinson;
  import lpc_pkg::*;

  localparam int P   = 10;
  localparam int DIV = 80;
  localparam int SAT = 92;
  localparam int END = 66;

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
    #2000000;
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

  // Registers: R1 i, R2 j, R3 E, R4 remainder, R5 acc, R6 temp, R7 |k|,
  // R11 k, R12 index temp.
  uinstr_t prog [int];

  task automatic assemble();
    // input R(0..P) into mem[0..P]
    prog[0]  = u(.op(SEQ_LDCT), .imm(P), .d(DST_RAMF), .b(1));
    prog[1]  = u(.s(SRC_ZA), .a(1), .xd(XD_DAR));
    prog[2]  = u(.op(SEQ_RPCT), .imm(1), .xs(XS_IN), .xd(XD_MEM));
    prog[3]  = u(.s(SRC_ZB), .b(1), .cin(1), .d(DST_RAMF));           // delay slot
    prog[4]  = u(.xd(XD_DAR));
    prog[5]  = u(.xs(XS_MEM), .d(DST_RAMF), .b(3));                   // E = R(0)
    prog[6]  = u(.xs(XS_IMMU), .imm(1), .d(DST_RAMF), .b(1));         // i = 1
    // 1. acc
    prog[7]  = u(.s(SRC_ZA), .a(1), .xd(XD_DAR));
    prog[8]  = u(.xs(XS_MEM), .d(DST_RAMF), .b(5));                   // acc = R(i)
    prog[9]  = u(.xs(XS_IMMU), .imm(1), .d(DST_RAMF), .b(2));         // j = 1
    prog[10] = u(.s(SRC_AB), .fn(FN_SUBS), .a(2), .b(1), .cin(1));    // j - i
    prog[11] = u(.op(SEQ_CJP), .cond(ST_Z), .imm(21));
    prog[12] = u(.xs(XS_IMMU), .imm(32), .s(SRC_DA), .a(2), .xd(XD_DAR));
    prog[13] = u(.xs(XS_MEM), .xd(XD_MULX));                          // X = a[j]
    prog[14] = u(.s(SRC_ZA), .a(1), .d(DST_RAMF), .b(12));
    prog[15] = u(.s(SRC_AB), .fn(FN_SUBR), .a(2), .b(12), .cin(1), .d(DST_RAMF),
                 .xd(XD_DAR));                                        // DAR = i - j
    prog[16] = u(.xs(XS_MEM), .xd(XD_MULY));                          // Y = R(i-j)
    prog[17] = u(.s(SRC_ZB), .b(2), .cin(1), .d(DST_RAMF));           // j++
    prog[18] = u(.xs(XS_PQ15), .s(SRC_DA), .a(5), .d(DST_RAMF), .b(5)); // acc += p
    prog[19] = u(.s(SRC_AB), .fn(FN_SUBS), .a(2), .b(1), .cin(1));
    prog[20] = u(.op(SEQ_CJP), .cond(ST_NZ), .imm(12));
    // 2. |acc| / E
    prog[21] = u(.s(SRC_ZA), .a(5), .d(DST_RAMF), .b(6));             // flags of acc
    prog[22] = u(.op(SEQ_CJP), .cond(ST_NN), .imm(24), .s(SRC_ZA), .a(5), .d(DST_RAMF), .b(4));
    prog[23] = u(.s(SRC_ZA), .fn(FN_SUBS), .a(5), .cin(1), .d(DST_RAMF), .b(4));
    prog[24] = u(.op(SEQ_CJS), .cond(ST_TRUE), .imm(DIV));
    // 3. k, E
    prog[25] = u(.s(SRC_ZA), .a(6));
    prog[26] = u(.op(SEQ_CJP), .cond(ST_N), .imm(28), .s(SRC_ZA), .fn(FN_SUBS), .a(7),
                 .cin(1), .d(DST_RAMF), .b(11));                      // k = -|k|
    prog[27] = u(.op(SEQ_CJP), .cond(ST_TRUE), .imm(29));
    prog[28] = u(.s(SRC_ZA), .a(7), .d(DST_RAMF), .b(11));            // k = |k|
    prog[29] = u(.s(SRC_ZA), .a(11), .xd(XD_OUT));
    prog[30] = u(.s(SRC_ZA), .a(11), .xd(XD_MULX));                   // X = k
    prog[31] = u(.s(SRC_ZA), .a(5), .xd(XD_MULY));                    // Y = acc
    prog[32] = u(.xs(XS_IMMU), .imm(1), .d(DST_RAMF), .b(2));         // j = 1
    prog[33] = u(.xs(XS_PQ15), .s(SRC_DA), .a(3), .d(DST_RAMF), .b(3)); // E += k*acc
    // 4. tmp[j] = a[j] + k*a[i-j]
    prog[34] = u(.s(SRC_AB), .fn(FN_SUBS), .a(2), .b(1), .cin(1));
    prog[35] = u(.op(SEQ_CJP), .cond(ST_Z), .imm(47));
    prog[36] = u(.s(SRC_ZA), .a(1), .d(DST_RAMF), .b(12));
    prog[37] = u(.s(SRC_AB), .fn(FN_SUBR), .a(2), .b(12), .cin(1), .d(DST_RAMF)); // i - j
    prog[38] = u(.xs(XS_IMMU), .imm(32), .s(SRC_DA), .a(12), .xd(XD_DAR));
    prog[39] = u(.xs(XS_MEM), .xd(XD_MULY));                          // Y = a[i-j]
    prog[40] = u(.xs(XS_IMMU), .imm(32), .s(SRC_DA), .a(2), .xd(XD_DAR));
    prog[41] = u(.xs(XS_MEM), .d(DST_RAMF), .b(6));                   // a[j]
    prog[42] = u(.xs(XS_IMMU), .imm(64), .s(SRC_DA), .a(2), .xd(XD_DAR));
    prog[43] = u(.xs(XS_PQ15), .s(SRC_DA), .a(6), .xd(XD_MEM));       // tmp[j]
    prog[44] = u(.s(SRC_ZB), .b(2), .cin(1), .d(DST_RAMF));
    prog[45] = u(.s(SRC_AB), .fn(FN_SUBS), .a(2), .b(1), .cin(1));
    prog[46] = u(.op(SEQ_CJP), .cond(ST_NZ), .imm(36));
    // copy tmp back
    prog[47] = u(.xs(XS_IMMU), .imm(1), .d(DST_RAMF), .b(2));
    prog[48] = u(.s(SRC_AB), .fn(FN_SUBS), .a(2), .b(1), .cin(1));
    prog[49] = u(.op(SEQ_CJP), .cond(ST_Z), .imm(56));
    prog[50] = u(.xs(XS_IMMU), .imm(64), .s(SRC_DA), .a(2), .xd(XD_DAR));
    prog[51] = u(.xs(XS_MEM), .d(DST_RAMF), .b(6));
    prog[52] = u(.xs(XS_IMMU), .imm(32), .s(SRC_DA), .a(2), .xd(XD_DAR));
    prog[53] = u(.s(SRC_ZA), .a(6), .xd(XD_MEM));
    prog[54] = u(.s(SRC_ZB), .b(2), .cin(1), .d(DST_RAMF));
    prog[55] = u(.op(SEQ_CJP), .cond(ST_TRUE), .imm(48));
    prog[56] = u(.xs(XS_IMMU), .imm(32), .s(SRC_DA), .a(1), .xd(XD_DAR));
    prog[57] = u(.s(SRC_ZA), .a(11), .xd(XD_MEM));                    // a[i] = k
    prog[58] = u(.s(SRC_ZB), .b(1), .cin(1), .d(DST_RAMF));           // i++
    prog[59] = u(.xs(XS_IMMU), .imm(P+1), .s(SRC_DA), .fn(FN_SUBR), .a(1), .cin(1));
    prog[60] = u(.op(SEQ_CJP), .cond(ST_NZ), .imm(7));
    // write a[1..P] and E
    prog[61] = u(.xs(XS_IMMU), .imm(33), .xd(XD_DAR));
    prog[62] = u(.op(SEQ_LDCT), .imm(P-1));
    prog[63] = u(.op(SEQ_RPCT), .imm(63), .xs(XS_MEM), .xd(XD_OUT));
    prog[64] = u(.xd(XD_DAR_INC));
    prog[65] = u(.s(SRC_ZA), .a(3), .xd(XD_OUT));
    prog[END] = u(.op(SEQ_CJP), .cond(ST_TRUE), .imm(END));
    // division subroutine: R7 = R4 / R3 (Q15, R4 < R3), else 0x7fff
    prog[DIV]    = u(.s(SRC_AB), .fn(FN_SUBS), .a(4), .b(3), .cin(1));
    prog[DIV+1]  = u(.op(SEQ_CJP), .cond(ST_C), .imm(SAT), .d(DST_QREG)); // Q = 0
    prog[DIV+2]  = u(.op(SEQ_LDCT), .imm(14));
    prog[DIV+3]  = u(.s(SRC_ZB), .b(4), .d(DST_RAMQU));
    prog[DIV+4]  = u(.s(SRC_AB), .fn(FN_SUBS), .a(4), .b(3), .cin(1));
    prog[DIV+5]  = u(.op(SEQ_CJP), .cond(ST_NC), .imm(DIV+8));
    prog[DIV+6]  = u(.s(SRC_AB), .fn(FN_SUBR), .a(3), .b(4), .cin(1), .d(DST_RAMF));
    prog[DIV+7]  = u(.s(SRC_ZQ), .cin(1), .d(DST_QREG));
    prog[DIV+8]  = u(.op(SEQ_RPCT), .imm(DIV+3));
    prog[DIV+9]  = u(.s(SRC_ZQ), .d(DST_RAMF), .b(7));                // delay slot: R7 = Q
    prog[DIV+10] = u(.op(SEQ_CRTN), .cond(ST_TRUE));
    prog[SAT]    = u(.xs(XS_IMM), .imm(12'hfff), .d(DST_RAMD), .b(7));
    prog[SAT+1]  = u(.op(SEQ_CRTN), .cond(ST_TRUE));
  endtask

  // input port: always ready, next value after each read
  logic [15:0] rin [P+1];
  int idx = 0;
  logic rd_seen = 0;
  always @(negedge clk) rd_seen <= in_rd;
  always @(posedge clk) begin
    #1;
    if (rd_seen) idx++;
  end
  assign in_data  = rin[(idx <= P) ? idx : 0];
  assign ext_cond = '0;

  logic [15:0] outs [$];
  always @(negedge clk) if (rst_n && out_valid) outs.push_back(out_data);

  function automatic logic [15:0] q15(input logic [15:0] a, input logic [15:0] b);
    logic signed [31:0] pr;
    pr = $signed(a) * $signed(b);
    return pr[30:15];
  endfunction

  initial begin
    logic [15:0] a [P+1], tmp [P+1], kexp [P+1];
    logic [15:0] e;
    int t_start, n_sat;
    pl_we = 0; pl_addr = 0; pl_data = 0;
    n_sat = 0;
    // autocorrelation of a damped resonance, R(0) about 0.5 in Q15
    for (int k = 0; k <= P; k++)
      rin[k] = 16'(int'(16000.0 * (0.55 ** k) * $cos(0.7 * k)));
    // model
    e = rin[0];
    for (int i = 1; i <= P; i++) begin
      logic [15:0] acc, mag, rem, q, k;
      acc = rin[i];
      for (int j = 1; j < i; j++) acc = acc + q15(a[j], rin[i-j]);
      mag = acc[15] ? -acc : acc;
      rem = mag;
      if (rem >= e) begin
        q = 16'h7fff;
        n_sat++;
      end else begin
        q = 0;
        repeat (15) begin
          rem = rem << 1;
          q = q << 1;
          if (rem >= e) begin rem = rem - e; q = q | 1; end
        end
      end
      k = acc[15] ? q : -q;
      kexp[i] = k;
      e = e + q15(k, acc);
      for (int j = 1; j < i; j++) tmp[j] = a[j] + q15(k, a[i-j]);
      for (int j = 1; j < i; j++) a[j] = tmp[j];
      a[i] = k;
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
    wait (outs.size() == 2 * P + 1);
    wait (uaddr == END);
    $display("order %0d took %0d cycles (%0d us at 5 MHz), %0d saturated",
             P, cycle - t_start, (cycle - t_start) / 5, n_sat);
    for (int i = 1; i <= P; i++) begin
      $display("  k%0d = %8.5f   a%0d = %8.5f", i, $signed(outs[i-1]) / 32768.0,
               i, $signed(outs[P+i-1]) / 32768.0);
      check(outs[i-1], kexp[i], $sformatf("k%0d", i));
      check(outs[P+i-1], a[i], $sformatf("a%0d", i));
    end
    check(outs[2*P], e, "prediction error");
    repeat (10) @(negedge clk);
    checks++;
    if (uaddr != END && uaddr != END + 1) begin failures++; $display("FAIL not in idle loop: %0d", uaddr); end
    check(outs.size(), 2 * P + 1, "output count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
