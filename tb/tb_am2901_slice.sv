// tb_am2901_slice: random test of one 4-bit ALU slice against a
// reference model of the 2901 source, function and destination codes,
// including register file and Q shifts with random shift inputs.
module tb_am2901_slice;
  import lpc_pkg::*;

  logic clk = 0, rst_n = 0, en;
  alu_src_e src; alu_fn_e fn; alu_dst_e dst;
  logic [3:0] a_addr, b_addr, d, y, f;
  logic cin, cout, ovr, f_zero;
  logic ram0_in, ram3_in, ram0_out, ram3_out, q0_in, q3_in, q0_out, q3_out;
  int checks = 0, failures = 0;

  am2901_slice dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [3:0] m_regs [16];
  logic [3:0] m_q;

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h (src=%0d fn=%0d dst=%0d)", what, got, exp, src, fn, dst);
    end
  endtask

  initial begin
    logic [3:0] r, s, ef, ey;
    int sum, ec, ev, s3;
    en = 1; src = SRC_AB; fn = FN_ADD; dst = DST_NOP; a_addr = 0; b_addr = 0;
    d = 0; cin = 0; ram0_in = 0; ram3_in = 0; q0_in = 0; q3_in = 0;
    for (int i = 0; i < 16; i++) m_regs[i] = 0;
    m_q = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      src = alu_src_e'($urandom_range(7)); fn = alu_fn_e'($urandom_range(7));
      dst = alu_dst_e'($urandom_range(7));
      a_addr = 4'($urandom); b_addr = 4'($urandom); d = 4'($urandom); cin = 1'($urandom);
      ram0_in = 1'($urandom); ram3_in = 1'($urandom); q0_in = 1'($urandom); q3_in = 1'($urandom);
      en = ($urandom_range(9) != 0);
      #1;
      case (src)
        SRC_AQ: begin r = m_regs[a_addr]; s = m_q; end
        SRC_AB: begin r = m_regs[a_addr]; s = m_regs[b_addr]; end
        SRC_ZQ: begin r = 0; s = m_q; end
        SRC_ZB: begin r = 0; s = m_regs[b_addr]; end
        SRC_ZA: begin r = 0; s = m_regs[a_addr]; end
        SRC_DA: begin r = d; s = m_regs[a_addr]; end
        SRC_DQ: begin r = d; s = m_q; end
        default: begin r = d; s = 0; end
      endcase
      ec = 0; ev = 0;
      case (fn)
        FN_ADD:  begin sum = r + s + cin; s3 = (r & 7) + (s & 7) + cin; end
        FN_SUBR: begin sum = (~r & 15) + s + cin; s3 = (~r & 7) + (s & 7) + cin; end
        FN_SUBS: begin sum = r + (~s & 15) + cin; s3 = (r & 7) + (~s & 7) + cin; end
        default: begin sum = 0; s3 = 0; end
      endcase
      case (fn)
        FN_OR: ef = r | s;  FN_AND: ef = r & s;  FN_NOTRS: ef = ~r & s;
        FN_EXOR: ef = r ^ s; FN_EXNOR: ef = ~(r ^ s);
        default: begin ef = 4'(sum); ec = sum >> 4; ev = (sum >> 4) ^ (s3 >> 3); end
      endcase
      ey = (dst == DST_RAMA) ? m_regs[a_addr] : ef;
      check(f, ef, "F"); check(y, ey, "Y");
      check(cout, ec & 1, "Cn+4"); check(ovr, ev & 1, "OVR");
      check(f_zero, ef == 0, "F=0");
      check(ram0_out, ef[0], "RAM0"); check(ram3_out, ef[3], "RAM3");
      check(q0_out, m_q[0], "Q0"); check(q3_out, m_q[3], "Q3");
      @(posedge clk);
      if (en) begin
        case (dst)
          DST_QREG: m_q = ef;
          DST_RAMA, DST_RAMF: m_regs[b_addr] = ef;
          DST_RAMQD: begin m_regs[b_addr] = {ram3_in, ef[3:1]}; m_q = {q3_in, m_q[3:1]}; end
          DST_RAMD: m_regs[b_addr] = {ram3_in, ef[3:1]};
          DST_RAMQU: begin m_regs[b_addr] = {ef[2:0], ram0_in}; m_q = {m_q[2:0], q0_in}; end
          DST_RAMU: m_regs[b_addr] = {ef[2:0], ram0_in};
          default: ;
        endcase
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
