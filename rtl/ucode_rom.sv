// ucode_rom: the microprogram memory, 4K words of 48 bits.
//
// It stands for the slow EPROMs of the control unit: the address comes
// from the microprogram address register and the word read goes to the
// pipeline (microinstruction) register, so the memory has a whole cycle
// to answer. Read is combinational. A write port loads the program, in
// place of programming the EPROMs; a hex file named by INIT_FILE, if not
// empty, preloads it. The size is the published 4K x 48.
module ucode_rom #(
  parameter int unsigned AW        = 12,
  parameter int unsigned DW        = 48,
  parameter string       INIT_FILE = ""
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] data,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata
);

  logic [DW-1:0] mem [2**AW];

  initial begin
    if (INIT_FILE != "") $readmemh(INIT_FILE, mem);
  end

  assign data = mem[addr];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

endmodule
