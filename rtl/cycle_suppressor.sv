// cycle_suppressor: cancels the cycle that follows a sequence break.
//
// In the two-level pipelined control unit the microinstruction after a
// jump has already been fetched when the jump executes. When the
// executing microinstruction breaks the sequence (the sequencer takes Y
// from anywhere but uPC), this circuit marks the next cycle as cancelled:
// the fetched instruction does nothing, and the address and instruction
// registers refill from the new address. Breaks made by the counter-
// controlled loop instructions (RFCT, RPCT, TWB) are not suppressed: the
// instruction after such a loop instruction always executes, so a
// microprogram writes the loop control one microinstruction early.
//
// Timing: `exec` is registered. It is 0 for the cycle after reset (the
// instruction register holds nothing yet) and for one cycle after each
// suppressed break. `rupture` is combinational for the current cycle.
// The cancelled cycle is done with an enable instead of a stopped clock.
module cycle_suppressor
  import lpc_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  seq_op_e op,       // sequencer instruction being executed
  input  logic    y_seq,    // sequencer takes Y from uPC
  output logic    exec,     // current microinstruction takes effect
  output logic    rupture   // current instruction breaks the sequence
);

  logic counter_loop;
  logic cancel_q;

  assign counter_loop = (op == SEQ_RFCT) || (op == SEQ_RPCT) || (op == SEQ_TWB);
  assign exec         = !cancel_q;
  assign rupture      = exec && !y_seq && !counter_loop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cancel_q <= 1'b1;
    else        cancel_q <= rupture;
  end

endmodule
