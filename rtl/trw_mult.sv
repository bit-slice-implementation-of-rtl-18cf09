// trw_mult: 16 x 16 two's complement multiplier with input and product
// registers, standing for the TRW multiplier of the data path.
//
// X and Y load from the ALU result bus; the product register takes X*Y on
// every clock edge. An operand loaded by microinstruction i is thus in
// the product read by microinstruction i+2: one cycle to load and one
// 200 ns cycle to multiply. The register structure and the latency are
// this design's choice; the 200 ns multiply time is the published one.
module trw_mult #(
  parameter int unsigned W = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  input  logic           load_x,
  input  logic           load_y,
  input  logic [W-1:0]   d,
  output logic [2*W-1:0] p
);

  logic signed [W-1:0] x_q, y_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0;
      y_q <= '0;
      p   <= '0;
    end else begin
      if (en && load_x) x_q <= d;
      if (en && load_y) y_q <= d;
      p <= x_q * y_q;
    end
  end

endmodule
