// tb_lpc_processor: end-to-end test of the processor at its default size
// (4K-word microprogram memory, 64K-word data memory) on one LPC
// analysis step: the autocorrelation of a speech frame.
//
// The microprogram, assembled below from the field helpers, does:
//   1. reads N samples from the input port, polling the "ready"
//      external condition, into data memory 0..N-1 (counter loop);
//   2. subtracts a constant from every sample in place, one single-cycle
//      read-modify-write per sample;
//   3. for k = 0..P computes R(k) = sum x[n]*x[n+k] with Q15 products
//      from the multiplier, in a loop closed by a conditional jump;
//   4. calls a subroutine per lag that writes R(k) and R(k)/2 (arithmetic
//      shift) to the output port, and returns;
//   5. writes the processed frame from data memory to the output port;
//   6. leaves through a computed jump (JMAP) into an idle loop.
// All outputs are compared with a model. The test
// counts each mechanism (sequence break, cancelled cycle, counter-loop
// jump, call, return, read-modify-write, multiply, input wait, JMAP,
// shift) and fails on any that never happened. It checks that every
// break costs exactly one cancelled cycle and that the read-modify-write
// loop runs at one sample per two cycles (the loop word plus its delay
// slot).
module tb_lpc_processor;
  import lpc_pkg::*;

  localparam int N   = 160;    // 20 ms frame at 8 kHz
  localparam int P   = 10;     // predictor order
  localparam int K   = 100;    // constant removed from every sample
  localparam int END = 50;

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

  uinstr_t prog [int];

  task automatic assemble();
    // 1. input loop
    prog[0]  = u(.op(SEQ_LDCT), .imm(N-1), .xd(XD_DAR));            // DAR = 0
    prog[1]  = u(.op(SEQ_CJP), .cond(ST_EXT0), .imm(3));             // ready?
    prog[2]  = u(.op(SEQ_CJP), .cond(ST_TRUE), .imm(1));             // wait
    prog[3]  = u(.op(SEQ_RPCT), .imm(1), .xs(XS_IN), .xd(XD_MEM_INC));
    prog[4]  = u(.xs(XS_IMM), .imm(K), .d(DST_RAMF), .b(2));         // delay slot: R2 = K
    // 2. in-place read-modify-write: mem[n] = mem[n] - R2
    prog[5]  = u(.op(SEQ_LDCT), .imm(N-1));
    prog[6]  = u(.xd(XD_DAR));
    prog[7]  = u(.op(SEQ_RPCT), .imm(7), .xs(XS_MEM), .xd(XD_MEM_INC),
                 .s(SRC_DA), .fn(FN_SUBS), .a(2), .cin(1));
    prog[8]  = u();
    // 3. autocorrelation; R4 = k, R5 = n, R7 = terms left, R3 = sum
    prog[9]  = u(.d(DST_RAMF), .b(4));
    prog[10] = u(.d(DST_RAMF), .b(5));
    prog[11] = u(.d(DST_RAMF), .b(3));
    prog[12] = u(.xs(XS_IMMU), .imm(N), .s(SRC_DA), .fn(FN_SUBS), .a(4), .cin(1),
                 .d(DST_RAMF), .b(7));                               // R7 = N - k
    prog[13] = u(.s(SRC_ZA), .a(5), .xd(XD_DAR));                    // DAR = n
    prog[14] = u(.xs(XS_MEM), .xd(XD_MULX));                         // X = x[n]
    prog[15] = u(.s(SRC_AB), .a(5), .b(4), .xd(XD_DAR));             // DAR = n + k
    prog[16] = u(.xs(XS_MEM), .xd(XD_MULY));                         // Y = x[n+k]
    prog[17] = u(.s(SRC_ZB), .b(5), .cin(1), .d(DST_RAMF));          // n++
    prog[18] = u(.s(SRC_ZB), .fn(FN_SUBR), .b(7), .d(DST_RAMF));     // R7--
    prog[19] = u(.op(SEQ_CJP), .cond(ST_NZ), .imm(13), .xs(XS_PQ15),
                 .s(SRC_DA), .a(3), .d(DST_RAMF), .b(3));            // sum += p
    prog[20] = u(.op(SEQ_CJS), .cond(ST_TRUE), .imm(40));            // output
    prog[21] = u(.s(SRC_ZB), .b(4), .cin(1), .d(DST_RAMF));          // k++
    prog[22] = u(.xs(XS_IMMU), .imm(P+1), .s(SRC_DA), .fn(FN_SUBR), .a(4), .cin(1));
    prog[23] = u(.op(SEQ_CJP), .cond(ST_NZ), .imm(10));
    // 5. dump the data memory to the output port, two cycles per word
    prog[24] = u(.op(SEQ_LDCT), .imm(N-1), .xd(XD_DAR));
    prog[25] = u(.op(SEQ_RPCT), .imm(25), .xs(XS_MEM), .xd(XD_OUT));
    prog[26] = u(.xd(XD_DAR_INC));
    // 6. computed jump to the idle loop
    prog[27] = u(.op(SEQ_JMAP), .xs(XS_IMMU), .imm(END));
    // 4. output subroutine
    prog[40] = u(.s(SRC_ZA), .a(3), .xd(XD_OUT));
    prog[41] = u(.s(SRC_ZA), .a(3), .d(DST_RAMD), .b(6), .sh(SH_DOUBLE));
    prog[42] = u(.op(SEQ_CRTN), .cond(ST_TRUE), .s(SRC_ZA), .a(6), .xd(XD_OUT));
    prog[END] = u(.op(SEQ_CJP), .cond(ST_TRUE), .imm(END));
  endtask

  // ---------------- input port: random gaps between samples ----------------
  logic [15:0] samples [N];
  int idx = 0, gap = 3, n_wait = 0;
  logic ready = 0, rd_seen = 0;

  always @(negedge clk) rd_seen <= in_rd;
  always @(posedge clk) begin
    #1;
    if (rd_seen) begin
      idx++;
      ready = 0;
      gap = $urandom_range(4);
    end else if (!ready) begin
      if (gap == 0) ready = (idx < N);
      else gap--;
    end
  end
  assign in_data  = samples[(idx < N) ? idx : 0];
  assign ext_cond = {4'b0, ready};

  // ---------------- output collection ----------------
  logic [15:0] outs [$];
  always @(negedge clk) if (rst_n && out_valid) outs.push_back(out_data);

  // ---------------- mechanism counters ----------------
  int n_rupt = 0, n_cancel = 0, n_cloop = 0, n_call = 0, n_ret = 0, n_rmw = 0;
  int n_mul = 0, n_jmap = 0, n_shift = 0, n_in = 0, n_nottaken = 0;
  int first_rmw = -1, last_rmw = -1;
  int n_supp_err = 0;
  bit started = 0, prev_rupt = 0;
  always @(negedge clk) if (rst_n) begin
    uinstr_t m;
    m = uword;
    // a cycle is cancelled exactly when the previous one broke the sequence
    if (started && (exec == prev_rupt)) n_supp_err++;
    prev_rupt = rupture;
    if (exec) started = 1;
    if (started && !exec) n_cancel++;
    if (rupture) n_rupt++;
    if (exec) begin
      if ((m.seq_op == SEQ_RPCT || m.seq_op == SEQ_RFCT) && seq_break) n_cloop++;
      if (m.seq_op == SEQ_CJS && rupture) n_call++;
      if (m.seq_op == SEQ_CRTN && rupture) n_ret++;
      if (m.seq_op == SEQ_CJP && !seq_break) n_nottaken++;
      if (m.seq_op == SEQ_JMAP) n_jmap++;
      if (m.ext_dst == XD_MULY) n_mul++;
      if (m.alu_dst == DST_RAMD && m.shift_mux == SH_DOUBLE) n_shift++;
      if (in_rd) n_in++;
      if (m.seq_op == SEQ_CJP && m.cond_sel == 4'(ST_EXT0) && !seq_break) n_wait++;
      if (m.ext_src == XS_MEM && (m.ext_dst == XD_MEM || m.ext_dst == XD_MEM_INC)) begin
        n_rmw++;
        if (first_rmw < 0) first_rmw = cycle;
        last_rmw = cycle;
      end
    end
  end

  task automatic need(input int n, input string what);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
    else $display("  %-28s %0d", what, n);
  endtask

  initial begin
    logic signed [15:0] x [N];
    logic [15:0] r [P+1];
    int t_start;
    pl_we = 0; pl_addr = 0; pl_data = 0;
    for (int n = 0; n < N; n++) begin
      // a decaying tone plus noise, well inside 16 bits
      samples[n] = 16'(int'(3000.0 * $sin(0.35 * n) * (1.0 - n / 400.0)) +
                       $signed($urandom_range(400)) - 200);
      x[n] = 16'($signed(samples[n]) - 16'(K));
    end
    for (int k = 0; k <= P; k++) begin
      r[k] = 0;
      for (int n = 0; n + k < N; n++) begin
        logic signed [31:0] pr;
        pr = x[n] * x[n+k];
        r[k] = r[k] + pr[30:15];
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
    wait (outs.size() == 2 * (P + 1) + N);
    repeat (20) @(negedge clk);
    $display("run took %0d cycles (%0d us at 5 MHz)", cycle - t_start, (cycle - t_start) / 5);
    check(outs.size(), 2 * (P + 1) + N, "output count");
    for (int k = 0; k <= P; k++) begin
      check(outs[2*k],   r[k], $sformatf("R(%0d)", k));
      check(outs[2*k+1], unsigned'(16'($signed(r[k]) >>> 1)), $sformatf("R(%0d)/2", k));
    end
    for (int n = 0; n < N; n++) check(outs[2 * (P + 1) + n], unsigned'(x[n]), $sformatf("mem[%0d]", n));
    checks++;
    if (uaddr != END && uaddr != END + 1) begin failures++; $display("FAIL not in idle loop: %0d", uaddr); end
    check(n_supp_err, 0, "one cancelled cycle per break, and only then");
    check(n_rmw, N, "read-modify-write count");
    check(last_rmw - first_rmw, 2 * (N - 1), "read-modify-write cycles");
    check(n_in, N, "samples read");
    need(n_rupt, "sequence breaks");
    need(n_cancel, "cancelled cycles");
    need(n_cloop, "counter-loop jumps");
    need(n_nottaken, "conditional jumps not taken");
    need(n_call, "subroutine calls");
    need(n_ret, "subroutine returns");
    need(n_rmw, "single-cycle read-modify-write");
    need(n_mul, "multiplications");
    need(n_wait, "input waits");
    need(n_jmap, "computed jumps (JMAP)");
    need(n_shift, "arithmetic shifts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
