// tb_cycle_suppressor: every sequencer instruction with and without a
// sequence break. A break cancels exactly the next cycle, except for the
// counter-loop instructions RFCT, RPCT and TWB; a cancelled cycle cannot
// itself break; the cycle after reset is cancelled.
module tb_cycle_suppressor;
  import lpc_pkg::*;

  logic clk = 0, rst_n = 0;
  seq_op_e op;
  logic y_seq, exec, rupture;
  int checks = 0, failures = 0;

  cycle_suppressor dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b (op=%0d y_seq=%b) t=%0t", what, got, exp, op, y_seq, $time);
    end
  endtask

  initial begin
    logic exp_exec, brk, counter;
    op = SEQ_CONT; y_seq = 1;
    #12;
    check(exec, 1'b0, "exec in reset");
    @(negedge clk) rst_n = 1;
    check(exec, 1'b0, "first cycle cancelled");
    @(negedge clk);
    exp_exec = 1;
    for (int t = 0; t < 2000; t++) begin
      op = seq_op_e'($urandom_range(15));
      y_seq = 1'($urandom);
      counter = (op == SEQ_RFCT) || (op == SEQ_RPCT) || (op == SEQ_TWB);
      #1;
      brk = exp_exec && !y_seq && !counter;
      check(exec, exp_exec, "exec");
      check(rupture, brk, "rupture");
      @(negedge clk);
      exp_exec = !brk;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
