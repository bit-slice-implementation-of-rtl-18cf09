// lpc_processor: 16-bit microprogrammed bit-slice signal processor built
// for real-time linear predictive speech coding.
//
// Harvard organisation: the microprogram memory (4K x 48) and the data
// memory (64K x 16) are separate, so fetching the next microinstruction
// and reading or writing data happen in the same cycle. The control unit
// is a two-level pipeline (address register, instruction register) around
// a 2910-style sequencer, with a cycle suppressor that cancels the
// already-fetched word after a sequence break. The data path is a 16-bit
// ALU of four 2901-style slices, a 16 x 16 multiplier, and the data
// memory with its address register.
//
// Two data buses join the units: the D bus into the ALU, driven by the
// source named in the microword's external source field (memory,
// immediate, product, input port), and the Y bus out of the ALU, taken by
// the unit named in the external destination field (memory, address
// register, multiplier X or Y, output port). One microinstruction can read
// memory, operate on the word and write the result back. The ALU flags of
// every executed microinstruction are kept in a status register; the
// status word built from it and from five external condition inputs
// feeds the sequencer's condition select. The Y bus low 12 bits are the
// sequencer's map input, for computed jumps (JMAP). The ALU's raw function
// output `f` is left open on purpose: the units take the 2901 Y output,
// which equals F except for the RAMA destination, where it is register A.
//
// Interface: `pl_*` loads the microprogram. `in_data` is read when a
// microinstruction selects the input port (`in_rd` pulses in that cycle).
// `out_data` changes, with `out_valid` high for one cycle, when one writes
// the output port. The codes of the external fields and of the status
// word are this design's own (see lpc_pkg). Edge-triggered registers are
// used throughout.
module lpc_processor
  import lpc_pkg::*;
#(
  parameter int unsigned UAW       = UADDR_W,   // microprogram address bits
  parameter int unsigned DAW       = DADDR_W,   // data address bits
  parameter string       INIT_FILE = ""
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  pl_we,
  input  logic [UAW-1:0]        pl_addr,
  input  logic [UWORD_W-1:0]    pl_data,
  input  logic [15:0]           in_data,
  output logic                  in_rd,
  input  logic [N_EXT_COND-1:0] ext_cond,
  output logic [15:0]           out_data,
  output logic                  out_valid,
  // observation
  output logic [UAW-1:0]        uaddr,       // microprogram address register
  output logic                  exec,        // this cycle's instruction executes
  output logic                  rupture,     // this cycle breaks the sequence
  output logic                  seq_break,   // ... or jumps in a counter loop
  output uinstr_t               uword,       // microinstruction register
  output logic [DAW-1:0]        dar,
  output alu_flags_t            status,
  output logic                  stack_full
);

  uinstr_t     mir;
  logic [15:0] status_word;
  logic [15:0] dbus, ybus, mem_q, imm_s, imm_u;
  logic [31:0] prod;
  alu_flags_t  flags;

  // ---------------- control unit ----------------
  control_unit #(.AW(UAW), .INIT_FILE(INIT_FILE)) u_cu (
    .clk, .rst_n, .status_word, .map_d(ybus[UAW-1:0]),
    .mir, .exec, .rupture, .seq_break, .mar(uaddr), .stack_full,
    .pl_we, .pl_addr, .pl_data
  );

  assign uword = mir;

  // ---------------- D bus (ALU operand) ----------------
  assign imm_s = {{4{mir.imm[11]}}, mir.imm};
  assign imm_u = {4'b0, mir.imm};

  always_comb begin
    unique case (mir.ext_src)
      XS_ZERO: dbus = '0;
      XS_MEM:  dbus = mem_q;
      XS_IMM:  dbus = imm_s;
      XS_IMMU: dbus = imm_u;
      XS_PMSW: dbus = prod[31:16];
      XS_PLSW: dbus = prod[15:0];
      XS_PQ15: dbus = prod[30:15];
      default: dbus = in_data;   // XS_IN
    endcase
  end
  assign in_rd = exec && (mir.ext_src == XS_IN);

  // ---------------- ALU ----------------
  alu16 u_alu (
    .clk, .rst_n, .en(exec),
    .src(mir.alu_src), .fn(mir.alu_fn), .dst(mir.alu_dst),
    .shift_mux(mir.shift_mux), .a_addr(mir.a_addr), .b_addr(mir.b_addr),
    .d(dbus), .cin(mir.cin), .carry_flag(status.c),
    .y(ybus), .f(), .flags
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    status <= '0;
    else if (exec) status <= flags;
  end

  always_comb begin
    status_word = '0;
    status_word[ST_TRUE] = 1'b1;
    status_word[ST_Z]    = status.z;
    status_word[ST_NZ]   = !status.z;
    status_word[ST_C]    = status.c;
    status_word[ST_NC]   = !status.c;
    status_word[ST_N]    = status.n;
    status_word[ST_NN]   = !status.n;
    status_word[ST_V]    = status.v;
    status_word[ST_NV]   = !status.v;
    status_word[ST_LT]   = status.n ^ status.v;
    status_word[ST_GE]   = !(status.n ^ status.v);
    status_word[ST_EXT0 +: N_EXT_COND] = ext_cond;
  end

  // ---------------- Y bus destinations ----------------
  logic mem_we, dar_load, dar_inc, dar_dec, mul_x, mul_y, out_we;

  always_comb begin
    mem_we = 1'b0; dar_load = 1'b0; dar_inc = 1'b0; dar_dec = 1'b0;
    mul_x  = 1'b0; mul_y    = 1'b0; out_we  = 1'b0;
    unique case (mir.ext_dst)
      XD_MEM:     mem_we = 1'b1;
      XD_DAR:     dar_load = 1'b1;
      XD_MULX:    mul_x = 1'b1;
      XD_MULY:    mul_y = 1'b1;
      XD_OUT:     out_we = 1'b1;
      XD_MEM_INC: begin mem_we = 1'b1; dar_inc = 1'b1; end
      XD_DAR_INC: dar_inc = 1'b1;
      XD_DAR_DEC: dar_dec = 1'b1;
      XD_MULXY:   begin mul_x = 1'b1; mul_y = 1'b1; end
      default:    ;
    endcase
  end

  data_memory #(.AW(DAW), .DW(16)) u_dmem (
    .clk, .rst_n, .en(exec), .dar_load, .dar_inc, .dar_dec,
    .we(mem_we), .wdata(ybus), .rdata(mem_q), .dar
  );

  trw_mult #(.W(16)) u_mul (
    .clk, .rst_n, .en(exec), .load_x(mul_x), .load_y(mul_y), .d(ybus), .p(prod)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_data  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= exec && out_we;
      if (exec && out_we) out_data <= ybus;
    end
  end

endmodule
