// tb_am2910_seq: the sequencer against a reference model of the 2910
// instruction set, run with random instructions, conditions and D inputs.
// The model keeps its own uPC, stack (5 words, top overwritten when full)
// and register/counter, and pushes uPC - 1 as the processor's sequencer
// does (RET_ADJ = 1). Every instruction must be seen with the condition
// both true and false, and the stack must fill at least once.
module tb_am2910_seq;
  import lpc_pkg::*;

  localparam int AW = 12;
  logic clk = 0, rst_n = 0, en;
  seq_op_e op;
  logic cc_pass, y_seq, full;
  logic [AW-1:0] d, map_d, y;
  int checks = 0, failures = 0;
  int seen [16][2];
  int n_full = 0;

  am2910_seq #(.AW(AW), .DEPTH(5), .RET_ADJ(1), .RESET_UPC(12'd1)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h (op=%0d cc=%0d) t=%0t", what, got, exp, op, cc_pass, $time);
    end
  endtask

  logic [AW-1:0] m_upc, m_r, m_stk [$];

  function automatic logic [AW-1:0] top();
    return (m_stk.size() == 0) ? '0 : m_stk[$];
  endfunction

  initial begin
    logic [AW-1:0] ey;
    logic eseq;
    int push, pop, clr, ld, dec;
    en = 0; op = SEQ_CONT; cc_pass = 0; d = 0; map_d = 0;
    m_upc = 1; m_r = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 8000; t++) begin
      @(negedge clk);
      // Bias away from JZ so the stack gets deep.
      op = seq_op_e'($urandom_range(15));
      if (op == SEQ_JZ && $urandom_range(7) != 0) op = SEQ_CJS;
      cc_pass = 1'($urandom);
      d = ($urandom_range(3) == 0) ? AW'($urandom_range(3)) : AW'($urandom);
      map_d = AW'($urandom);
      en = ($urandom_range(15) != 0);
      #1;
      push = 0; pop = 0; clr = 0; ld = 0; dec = 0;
      ey = m_upc; eseq = 1;
      case (op)
        SEQ_JZ:   begin ey = 0; clr = 1; eseq = 0; end
        SEQ_CJS:  if (cc_pass) begin ey = d; push = 1; eseq = 0; end
        SEQ_JMAP: begin ey = map_d; eseq = 0; end
        SEQ_CJP:  if (cc_pass) begin ey = d; eseq = 0; end
        SEQ_PUSH: begin push = 1; ld = cc_pass; end
        SEQ_JSRP: begin ey = cc_pass ? d : m_r; push = 1; eseq = 0; end
        SEQ_CJV:  if (cc_pass) begin ey = d; eseq = 0; end
        SEQ_JRP:  begin ey = cc_pass ? d : m_r; eseq = 0; end
        SEQ_RFCT: if (m_r != 0) begin ey = top(); dec = 1; eseq = 0; end else pop = 1;
        SEQ_RPCT: if (m_r != 0) begin ey = d; dec = 1; eseq = 0; end
        SEQ_CRTN: if (cc_pass) begin ey = top(); pop = 1; eseq = 0; end
        SEQ_CJPP: if (cc_pass) begin ey = d; pop = 1; eseq = 0; end
        SEQ_LDCT: ld = 1;
        SEQ_LOOP: if (cc_pass) pop = 1; else begin ey = top(); eseq = 0; end
        SEQ_CONT: ;
        SEQ_TWB:  if (cc_pass) pop = 1;
                  else if (m_r != 0) begin ey = top(); dec = 1; eseq = 0; end
                  else begin ey = d; pop = 1; eseq = 0; end
      endcase
      check(y, ey, "Y");
      check(y_seq, eseq, "y_seq");
      check(full, m_stk.size() == 5, "full");
      if (full) n_full++;
      seen[op][cc_pass]++;
      @(posedge clk);
      if (en) begin
        if (push) begin
          if (m_stk.size() == 5) m_stk[4] = m_upc - 1;
          else m_stk.push_back(m_upc - 1);
        end
        if (pop && m_stk.size() != 0) void'(m_stk.pop_back());
        if (clr) m_stk.delete();
        if (ld) m_r = d;
        if (dec) m_r = m_r - 1;
        m_upc = ey + 1;
      end
    end
    for (int i = 0; i < 16; i++)
      for (int c = 0; c < 2; c++) begin
        checks++;
        if (seen[i][c] == 0) begin failures++; $display("FAIL op %0d cc %0d never run", i, c); end
      end
    checks++;
    if (n_full == 0) begin failures++; $display("FAIL stack never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
