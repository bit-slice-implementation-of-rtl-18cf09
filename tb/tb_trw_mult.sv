// tb_trw_mult: random signed operands, including the extreme values, are
// loaded into X and Y in random cycles, separately or together. A model
// of the registers is checked every cycle, so the product must appear
// exactly two cycles after the load (one to load, one to multiply) and
// equal the full 32-bit two's complement product.
module tb_trw_mult;
  localparam int W = 16;
  logic clk = 0, rst_n = 0, en, load_x, load_y;
  logic [W-1:0] d;
  logic [2*W-1:0] p;
  int checks = 0, failures = 0;

  trw_mult #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] pick();
    case ($urandom_range(5))
      0: return 16'h8000;
      1: return 16'h7fff;
      2: return 16'hffff;
      default: return 16'($urandom);
    endcase
  endfunction

  initial begin
    logic signed [W-1:0] mx, my;
    logic signed [2*W-1:0] mp;
    en = 1; load_x = 0; load_y = 0; d = 0;
    mx = 0; my = 0; mp = 0;
    #12;
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 6000; t++) begin
      load_x = 1'($urandom); load_y = 1'($urandom);
      en = ($urandom_range(7) != 0);
      d = pick();
      #1;
      checks++;
      if (p !== mp) begin
        failures++;
        $display("FAIL t=%0d: got %h expected %h", t, p, mp);
      end
      @(negedge clk);
      // Model: the product register takes the old X*Y, then X/Y load.
      mp = mx * my;
      if (en && load_x) mx = d;
      if (en && load_y) my = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
