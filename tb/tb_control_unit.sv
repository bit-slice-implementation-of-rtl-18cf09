// tb_control_unit: runs a small microprogram through the pipelined
// control unit and compares the sequence of executed microinstructions,
// cycle by cycle, with the expected one. Each word carries its own
// address as a tag in the ALU register fields. The program covers a
// counter loop (LDCT/RPCT, with the word after RPCT executed every pass
// and no cancelled cycle), taken and not-taken conditional jumps (one
// cancelled cycle per taken jump), a subroutine call and return to the
// word after the call, and a PUSH/RFCT loop.
module tb_control_unit;
  import lpc_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [15:0] status_word;
  logic [11:0] map_d, mar;
  uinstr_t mir;
  logic exec, rupture, seq_break, stack_full, pl_we;
  logic [11:0] pl_addr;
  logic [47:0] pl_data;
  int checks = 0, failures = 0;

  control_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic uinstr_t mk(input seq_op_e op, input int cond, input int imm, input int tag);
    uinstr_t u;
    u = '0;
    u.seq_op = op; u.cond_sel = 4'(cond); u.imm = 12'(imm);
    u.alu_dst = DST_NOP; u.ext_src = XS_ZERO; u.ext_dst = XD_NONE;
    {u.b_addr, u.a_addr} = 8'(tag);
    return u;
  endfunction

  task automatic load(input int a, input uinstr_t u);
    @(negedge clk);
    pl_we = 1; pl_addr = 12'(a); pl_data = u;
    @(negedge clk);
    pl_we = 0;
  endtask

  // Expected trace: tag of each executed word, -1 for a cancelled cycle.
  int exp_trace [] = '{0, 1, 2, 3, 4, 2, 3, 4, 2, 3, 4, 5, -1, 8, -1, 12, 13, -1,
                       9, 10, -1, 16, 17, 18, 19, 17, 18, 19, 20, -1, 20, -1, 20};

  initial begin
    int n_rupt = 0;
    status_word = 16'h0001;   // only "true" is set; bit 11 (external 0) is 0
    map_d = 0; pl_we = 0; pl_addr = 0; pl_data = 0;
    for (int a = 0; a < 32; a++) load(a, mk(SEQ_CONT, 0, 0, 200 + a));
    load(0,  mk(SEQ_CONT, 0, 0, 0));
    load(1,  mk(SEQ_LDCT, 0, 2, 1));
    load(2,  mk(SEQ_CONT, 0, 0, 2));
    load(3,  mk(SEQ_RPCT, 0, 2, 3));
    load(4,  mk(SEQ_CONT, 0, 0, 4));
    load(5,  mk(SEQ_CJP,  ST_TRUE, 8, 5));
    load(6,  mk(SEQ_CONT, 0, 0, 6));
    load(8,  mk(SEQ_CJS,  ST_TRUE, 12, 8));
    load(9,  mk(SEQ_CJP,  ST_EXT0, 14, 9));
    load(10, mk(SEQ_CJP,  ST_TRUE, 16, 10));
    load(12, mk(SEQ_CONT, 0, 0, 12));
    load(13, mk(SEQ_CRTN, ST_TRUE, 0, 13));
    load(16, mk(SEQ_PUSH, ST_TRUE, 1, 16));
    load(17, mk(SEQ_CONT, 0, 0, 17));
    load(18, mk(SEQ_RFCT, 0, 0, 18));
    load(19, mk(SEQ_CONT, 0, 0, 19));
    load(20, mk(SEQ_CJP,  ST_TRUE, 20, 20));
    @(negedge clk) rst_n = 1;
    // First cycle: the instruction register is still empty.
    checks++;
    if (exec !== 1'b0) begin failures++; $display("FAIL first cycle not cancelled"); end
    @(negedge clk);
    foreach (exp_trace[i]) begin
      int got;
      got = exec ? int'({mir.b_addr, mir.a_addr}) : -1;
      if (rupture) n_rupt++;
      checks++;
      if (got != exp_trace[i]) begin
        failures++;
        $display("FAIL cycle %0d: executed %0d expected %0d", i, got, exp_trace[i]);
      end
      @(negedge clk);
    end
    checks++;
    if (n_rupt != 7) begin failures++; $display("FAIL %0d ruptures, expected 7", n_rupt); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
