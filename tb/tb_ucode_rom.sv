// tb_ucode_rom: fills the 4K x 48 microprogram memory through its load
// port with a pattern, then reads every word back and compares it with
// the pattern recomputed from the address.
module tb_ucode_rom;
  localparam int AW = 12, DW = 48;
  logic clk = 0, we;
  logic [AW-1:0] addr, waddr;
  logic [DW-1:0] data, wdata;
  int checks = 0, failures = 0;

  ucode_rom #(.AW(AW), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [DW-1:0] pat(input int a);
    return {16'(a * 40503), 16'(a ^ 16'h5a5a), 16'(~a * 7)};
  endfunction

  initial begin
    we = 0; addr = 0; waddr = 0; wdata = 0;
    @(negedge clk);
    for (int a = 0; a < 2**AW; a++) begin
      we = 1; waddr = AW'(a); wdata = pat(a);
      @(negedge clk);
    end
    we = 0;
    for (int a = 2**AW - 1; a >= 0; a--) begin
      addr = AW'(a);
      #1;
      checks++;
      if (data !== pat(a)) begin
        failures++;
        $display("FAIL addr %h: got %h expected %h", a, data, pat(a));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
