// control_unit: the two-level pipelined microprogram control unit.
//
// Pipeline level 1: the sequencer's next address goes into the
// microprogram address register (MAR). Level 2: the microprogram memory
// word at MAR goes into the microinstruction (pipeline) register (MIR),
// which drives the data path. A slow memory thus has a whole cycle to
// answer. In steady state MAR holds the address after that of the
// executing instruction, so a taken jump finds the next sequential word
// already fetched: the cycle suppressor cancels it and the registers
// refill from the target (one lost cycle per break). Counter loops
// (RFCT, RPCT, TWB) are not suppressed and execute the word after them.
//
// The sequencer works on the MIR's sequencer field and immediate; in a
// cancelled cycle it is given CONT. The condition is the status word bit
// picked by the condition select field. Pushed return addresses are
// uPC - 1, the word after the call (see am2910_seq). MAR and the
// sequencer form the address-only bus to the microprogram memory.
//
// Timing: MAR and MIR load on every rising edge. `exec` says whether the
// MIR takes effect this cycle; `rupture` marks a suppressed break and
// `seq_break` any break, counter-loop jumps included. After reset the first executed word is
// the one at address 0, in the second cycle.
module control_unit
  import lpc_pkg::*;
#(
  parameter int unsigned AW        = UADDR_W,
  parameter int unsigned DEPTH     = 5,
  parameter string       INIT_FILE = ""
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [15:0]       status_word,
  input  logic [AW-1:0]     map_d,       // JMAP target
  output uinstr_t           mir,
  output logic              exec,
  output logic              rupture,
  output logic              seq_break,   // executed word left the sequence
  output logic [AW-1:0]     mar,
  output logic              stack_full,
  // microprogram load port
  input  logic              pl_we,
  input  logic [AW-1:0]     pl_addr,
  input  logic [UWORD_W-1:0] pl_data
);

  logic [AW-1:0]      y;
  logic               y_seq;
  logic               cc_pass;
  seq_op_e            op_eff;
  logic [UWORD_W-1:0] rom_q;

  assign cc_pass = status_word[mir.cond_sel];
  assign op_eff  = exec ? mir.seq_op : SEQ_CONT;
  assign seq_break = exec && !y_seq;

  am2910_seq #(.AW(AW), .DEPTH(DEPTH), .RET_ADJ(1), .RESET_UPC(AW'(1))) u_seq (
    .clk, .rst_n, .en(1'b1), .op(op_eff), .cc_pass,
    .d(mir.imm[AW-1:0]), .map_d, .y, .y_seq, .full(stack_full)
  );

  cycle_suppressor u_supp (
    .clk, .rst_n, .op(mir.seq_op), .y_seq, .exec, .rupture
  );

  ucode_rom #(.AW(AW), .DW(UWORD_W), .INIT_FILE(INIT_FILE)) u_rom (
    .clk, .addr(mar), .data(rom_q), .we(pl_we), .waddr(pl_addr), .wdata(pl_data)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mar <= '0;
      mir <= '0;
    end else begin
      mar <= y;
      mir <= uinstr_t'(rom_q);
    end
  end

endmodule
