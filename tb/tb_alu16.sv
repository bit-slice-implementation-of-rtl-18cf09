// tb_alu16: random test of the 16-bit ALU (four slices in cascade)
// against a 16-bit reference model: the eight functions with carry,
// overflow, zero and sign flags, the eight destinations, and the four
// shift end modes (zero, rotate, double length, carry).
module tb_alu16;
  import lpc_pkg::*;

  logic clk = 0, rst_n = 0, en;
  alu_src_e src; alu_fn_e fn; alu_dst_e dst; shift_mux_e shift_mux;
  logic [3:0] a_addr, b_addr;
  logic [15:0] d, y, f;
  logic cin, carry_flag;
  alu_flags_t flags;
  int checks = 0, failures = 0;

  alu16 dut (.*);

  always #5 clk = ~clk;

  initial begin
    #300000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] m_regs [16];
  logic [15:0] m_q;
  int n_shift [4];

  task automatic check(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h (src=%0d fn=%0d dst=%0d sh=%0d)",
               what, got, exp, src, fn, dst, shift_mux);
    end
  endtask

  initial begin
    logic [15:0] r, s, ef, ey;
    logic [16:0] sum;
    logic ec, ev, rin_dn, qin_dn, rin_up, qin_up;
    en = 1; src = SRC_AB; fn = FN_ADD; dst = DST_NOP; shift_mux = SH_ZERO;
    a_addr = 0; b_addr = 0; d = 0; cin = 0; carry_flag = 0;
    for (int i = 0; i < 16; i++) m_regs[i] = 0;
    m_q = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      src = alu_src_e'($urandom_range(7)); fn = alu_fn_e'($urandom_range(7));
      dst = alu_dst_e'($urandom_range(7)); shift_mux = shift_mux_e'($urandom_range(3));
      a_addr = 4'($urandom); b_addr = 4'($urandom); cin = 1'($urandom);
      carry_flag = 1'($urandom); en = ($urandom_range(9) != 0);
      // Corner values now and then, to reach carries and overflow.
      case ($urandom_range(3))
        0: d = 16'h7fff;
        1: d = 16'h8000;
        default: d = 16'($urandom);
      endcase
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
        FN_OR: ef = r | s;  FN_AND: ef = r & s;  FN_NOTRS: ef = ~r & s;
        FN_EXOR: ef = r ^ s; FN_EXNOR: ef = ~(r ^ s);
        default: begin
          logic [15:0] o1, o2;
          o1 = (fn == FN_SUBR) ? ~r : r;
          o2 = (fn == FN_SUBS) ? ~s : s;
          sum = {1'b0, o1} + {1'b0, o2} + 17'(cin);
          ef = sum[15:0]; ec = sum[16];
          ev = (o1[15] == o2[15]) && (ef[15] != o1[15]);
        end
      endcase
      ey = (dst == DST_RAMA) ? m_regs[a_addr] : ef;
      check(f, ef, "F"); check(y, ey, "Y");
      check(flags.c, ec, "C"); check(flags.v, ev, "V");
      check(flags.z, ef == 0, "Z"); check(flags.n, ef[15], "N");
      case (shift_mux)
        SH_ZERO:   begin rin_dn = 0; qin_dn = 0; rin_up = 0; qin_up = 0; end
        SH_ROTATE: begin rin_dn = ef[0]; qin_dn = m_q[0]; rin_up = ef[15]; qin_up = m_q[15]; end
        SH_DOUBLE: begin rin_dn = ef[15]; qin_dn = ef[0]; rin_up = m_q[15]; qin_up = 0; end
        default:   begin rin_dn = carry_flag; qin_dn = carry_flag; rin_up = carry_flag; qin_up = carry_flag; end
      endcase
      @(posedge clk);
      if (en) begin
        if (dst >= DST_RAMQD) n_shift[shift_mux]++;
        case (dst)
          DST_QREG: m_q = ef;
          DST_RAMA, DST_RAMF: m_regs[b_addr] = ef;
          DST_RAMQD: begin m_regs[b_addr] = {rin_dn, ef[15:1]}; m_q = {qin_dn, m_q[15:1]}; end
          DST_RAMD:  m_regs[b_addr] = {rin_dn, ef[15:1]};
          DST_RAMQU: begin m_regs[b_addr] = {ef[14:0], rin_up}; m_q = {m_q[14:0], qin_up}; end
          DST_RAMU:  m_regs[b_addr] = {ef[14:0], rin_up};
          default: ;
        endcase
      end
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (n_shift[i] == 0) begin failures++; $display("FAIL shift mode %0d never used", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
