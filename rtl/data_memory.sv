// data_memory: the data memory with its address register, 64K x 16.
//
// The data address register (DAR) is loaded from the ALU result bus or
// stepped by one. The word at DAR is read combinationally onto the ALU
// operand bus, and a result is written back to the same address on the
// clock edge, so one microcycle can read memory, pass the word through
// the ALU and write memory. The write uses the address held during the
// cycle; a DAR step in the same instruction takes effect after it.
// Memory contents are not reset. The 64K-word size is the published
// maximum; the address register is this design's way of feeding it.
module data_memory #(
  parameter int unsigned AW = 16,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,        // 0: cycle cancelled
  input  logic          dar_load,  // DAR <= wdata
  input  logic          dar_inc,   // DAR <= DAR + 1
  input  logic          dar_dec,   // DAR <= DAR - 1
  input  logic          we,        // mem[DAR] <= wdata
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata,
  output logic [AW-1:0] dar
);

  logic [DW-1:0] mem [2**AW];

  assign rdata = mem[dar];

  always_ff @(posedge clk) begin
    if (en && we) mem[dar] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                dar <= '0;
    else if (en) begin
      if (dar_load)            dar <= wdata[AW-1:0];
      else if (dar_inc)        dar <= dar + 1'b1;
      else if (dar_dec)        dar <= dar - 1'b1;
    end
  end

endmodule
